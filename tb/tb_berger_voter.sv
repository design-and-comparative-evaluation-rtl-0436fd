// tb_berger_voter: exhaustive test of the self-checking voter over all 64 comparator flag
// combinations, without and with the injected internal fault. Expected majority and
// disagreement are computed here by counting; the Berger check must stay quiet without the
// fault and must always fire with it.
module tb_berger_voter;
  import red_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [NKIND-1:0] eq [NCMP];
  logic inject;
  logic [NKIND-1:0] ok;
  logic [NCMP-1:0] disagree;
  logic berger_err;
  berger_voter dut (.eq, .inject, .ok, .disagree, .berger_err);

  initial begin
    for (int inj = 0; inj < 2; inj++)
      for (int v = 0; v < 64; v++) begin
        logic [NKIND-1:0] eok;
        logic [NCMP-1:0] edis;
        inject = 1'(inj);
        for (int c = 0; c < NCMP; c++) eq[c] = 2'(v >> (2*c));
        #1;
        edis = '0;
        for (int t = 0; t < NKIND; t++) begin
          int ones;
          ones = 0;
          for (int c = 0; c < NCMP; c++) ones += int'(eq[c][t]);
          eok[t] = (ones >= 2);
          for (int c = 0; c < NCMP; c++) if (eq[c][t] != eok[t]) edis[c] = 1'b1;
        end
        if (inj == 0) begin
          check(ok == eok, $sformatf("v=%0d ok=%b exp %b", v, ok, eok));
          check(disagree == edis, $sformatf("v=%0d disagree=%b exp %b", v, disagree, edis));
          check(!berger_err, $sformatf("v=%0d false Berger error", v));
        end else begin
          check(berger_err, $sformatf("v=%0d injected fault not detected", v));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

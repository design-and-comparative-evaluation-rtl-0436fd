// tb_result_cmp: checks the comparator on equal pairs and on pairs differing in one random bit.
module tb_result_cmp;
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

  res_t left [NKIND], right [NKIND];
  logic [NKIND-1:0] eq;
  result_cmp dut (.left, .right, .eq);

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [NKIND-1:0] diff;
      for (int t = 0; t < NKIND; t++) begin
        diff[t] = 1'($urandom);
        for (int w = 0; w < 8; w++) left[t][32*w +: 32] = $urandom;
        right[t] = left[t];
        if (diff[t]) begin
          int b;
          b = int'($urandom % 256);
          right[t][b] = !right[t][b];
        end
      end
      #1;
      for (int t = 0; t < NKIND; t++) check(eq[t] == !diff[t], $sformatf("kind %0d diff %0d eq %0d", t, diff[t], eq[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

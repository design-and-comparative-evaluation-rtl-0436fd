// tb_result_buffer: writes random results kind by kind and checks that each entry holds its
// last written value and that unwritten kinds are untouched.
module tb_result_buffer;
  import red_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  logic [NKIND-1:0] we = '0;
  res_t wleft [NKIND], wright [NKIND], rleft [NKIND], rright [NKIND];
  res_t ml [NKIND], mr [NKIND];
  result_buffer dut (.clk, .rst, .we, .wleft, .wright, .rleft, .rright);

  initial begin
    for (int t = 0; t < NKIND; t++) begin wleft[t] = '0; wright[t] = '0; ml[t] = '0; mr[t] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      we = 2'($urandom);
      for (int t = 0; t < NKIND; t++)
        for (int w = 0; w < 8; w++) begin
          wleft[t][32*w +: 32]  = $urandom;
          wright[t][32*w +: 32] = $urandom;
        end
      @(negedge clk);
      for (int t = 0; t < NKIND; t++) if (we[t]) begin ml[t] = wleft[t]; mr[t] = wright[t]; end
      for (int t = 0; t < NKIND; t++)
        check(rleft[t] == ml[t] && rright[t] == mr[t], $sformatf("n=%0d kind %0d", n, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

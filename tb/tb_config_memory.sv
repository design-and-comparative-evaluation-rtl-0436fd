// tb_config_memory: fills a reduced-size configuration memory with a pattern and reads it
// back in a different order, checking the one-cycle read latency.
module tb_config_memory;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  localparam int unsigned RW = 64, DEPTH = 4 * RW, AW = $clog2(DEPTH);
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  config_memory #(.NREGIONS(4), .REGION_WORDS(RW)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  function automatic logic [15:0] pat(int a);
    return 16'((a * 7919) ^ 16'h5a3c);
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pat(a);
    end
    @(negedge clk);
    we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      re = 1; raddr = AW'(a);
      @(negedge clk);
      check(rdata == pat(a), $sformatf("addr %0d: %h", a, rdata));
    end
    re = 0;
    raddr = 0;
    @(negedge clk);
    check(rdata == pat(0), "read port holds without re");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_config_engine: streams each region of a reduced-size configuration memory into the
// behavioural ICAP model (which stalls every fifth word) and checks the word count, the
// checksum of the region's words, the busy/done behaviour and the cycle count
// (2 cycles per word plus one per ICAP stall before the last word).
module tb_config_engine;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  localparam int unsigned RW = 32, DEPTH = 4 * RW, AW = $clog2(DEPTH);
  logic we = 0, req = 0;
  logic [1:0] id = '0;
  logic [AW-1:0] waddr = '0, mem_raddr;
  logic [15:0] wdata = '0, mem_rdata, icap_din, xsum;
  logic mem_re, busy, done, icap_ce_n, icap_write_n, icap_busy;
  int unsigned words;

  config_memory #(.NREGIONS(4), .REGION_WORDS(RW)) u_mem (.clk, .we, .waddr, .wdata,
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));
  config_engine #(.NREGIONS(4), .REGION_WORDS(RW)) dut (.clk, .rst, .req, .id, .busy, .done,
    .mem_re, .mem_raddr, .mem_rdata, .icap_ce_n, .icap_write_n, .icap_din, .icap_busy);
  icap_model #(.BUSY_EVERY(5)) u_icap (.clk, .rst, .ce_n(icap_ce_n), .write_n(icap_write_n),
    .din(icap_din), .busy(icap_busy), .words, .xsum);

  function automatic logic [15:0] pat(int a);
    return 16'((a * 40503) ^ 16'h1234);
  endfunction

  initial begin
    logic [15:0] exp_x;
    int unsigned w0;
    int t0, lat;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = pat(a);
      @(negedge clk);
    end
    we = 0;
    for (int k = 3; k >= 0; k--) begin
      logic [15:0] x0;
      exp_x = '0;
      for (int j = 0; j < RW; j++) exp_x ^= pat(k * RW + j);
      x0 = xsum; w0 = words;
      req = 1; id = 2'(k);
      @(negedge clk);
      req = 0; t0 = 0;
      check(busy, "busy after request");
      while (!done) begin @(negedge clk); t0++; end
      lat = t0;
      @(negedge clk);
      check(!busy, "idle after done");
      check(words - w0 == RW, $sformatf("region %0d: %0d words", k, words - w0));
      check((xsum ^ x0) == exp_x, $sformatf("region %0d: checksum", k));
      // 2 cycles per word, plus one for each ICAP stall that falls before the last word
      begin
        int stalls;
        stalls = 0;
        for (int n = int'(w0); n < int'(w0 + RW - 1); n++) if (n % 5 == 4) stalls++;
        check(lat == 2 * RW + stalls, $sformatf("region %0d: %0d cycles", k, lat));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

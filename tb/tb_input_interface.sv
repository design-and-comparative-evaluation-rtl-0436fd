// tb_input_interface: checks capture on `done`, selection of regular or spare result, the
// valid flags and their clearing, then 200 cycles of random strobes, selections and clears
// against a reference model of the regular and spare registers of each kind.
module tb_input_interface;
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

  logic clr = 0;
  logic [NKIND-1:0] reg_done = '0, spare_done = '0, use_spare = '0, out_valid;
  res_t reg_res [NKIND], spare_res [NKIND], out_res [NKIND];
  input_interface dut (.clk, .rst, .clr, .reg_done, .reg_res, .spare_done, .spare_res,
                       .use_spare, .out_res, .out_valid);

  initial begin
    for (int t = 0; t < NKIND; t++) begin reg_res[t] = '0; spare_res[t] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(out_valid == '0, "nothing valid after reset");
    // regular AES result arrives
    reg_res[0] = 256'hA1; reg_done = 2'b01;
    @(negedge clk);
    reg_done = '0; reg_res[0] = 256'hFF;
    check(out_valid == 2'b01 && out_res[0] == 256'hA1, "AES captured");
    // spare HMAC result arrives while the regular HMAC is selected
    spare_res[1] = 256'hB2; spare_done = 2'b10;
    @(negedge clk);
    spare_done = '0;
    check(out_valid == 2'b01, "spare result not shown while regular selected");
    use_spare = 2'b10;
    #1 check(out_valid == 2'b11 && out_res[1] == 256'hB2, "spare selected");
    reg_res[1] = 256'hC3; reg_done = 2'b10;
    @(negedge clk);
    reg_done = '0;
    use_spare = 2'b00;
    #1 check(out_res[1] == 256'hC3 && out_valid == 2'b11, "regular HMAC captured");
    // clear wins over a capture in the same cycle
    clr = 1; reg_done = 2'b01; reg_res[0] = 256'hD4;
    @(negedge clk);
    clr = 0; reg_done = '0;
    check(out_valid == '0, "cleared");
    check(out_res[0] == 256'hA1, "no capture during clear");
    // random stimulus against a reference model of the two registers per kind
    for (int n = 0; n < 200; n++) begin
      res_t m_reg [NKIND], m_spr [NKIND];
      logic [NKIND-1:0] m_rv, m_sv;
      for (int t = 0; t < NKIND; t++) begin
        m_reg[t] = dut.reg_q[t]; m_spr[t] = dut.spr_q[t];
      end
      m_rv = dut.reg_v; m_sv = dut.spr_v;
      clr        = ($urandom % 8) == 0;
      reg_done   = NKIND'($urandom);
      spare_done = NKIND'($urandom);
      use_spare  = NKIND'($urandom);
      for (int t = 0; t < NKIND; t++) begin
        reg_res[t]   = {8{$urandom}};
        spare_res[t] = {8{$urandom}};
        if (clr) begin
          m_rv[t] = 1'b0; m_sv[t] = 1'b0;
        end else begin
          if (reg_done[t])   begin m_reg[t] = reg_res[t];   m_rv[t] = 1'b1; end
          if (spare_done[t]) begin m_spr[t] = spare_res[t]; m_sv[t] = 1'b1; end
        end
      end
      @(negedge clk);
      for (int t = 0; t < NKIND; t++) begin
        check(out_valid[t] == (use_spare[t] ? m_sv[t] : m_rv[t]), $sformatf("random %0d: valid of kind %0d", n, t));
        if (out_valid[t])
          check(out_res[t] == (use_spare[t] ? m_spr[t] : m_reg[t]), $sformatf("random %0d: result of kind %0d", n, t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

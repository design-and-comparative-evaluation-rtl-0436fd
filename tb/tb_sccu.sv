// tb_sccu: tests the self-checking control unit against a reactive model of the datapath.
// The model raises a module's result-valid flag two cycles after its start strobe and lets
// the test choose the voter verdict and the localization comparisons. Checks the start
// strobes of FT and NFT operations, spare activation on a mismatch, localization to the
// right module with the reconfiguration request and substitution, use of the spare in the
// next operation, release after the reconfiguration, recomputation on a Berger error and
// failure after MAX_RETRY recomputations.
module tb_sccu;
  import red_pkg::*;

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

  logic req_valid = 0, req_ready, req_ft = 0, resp_valid, resp_ready = 0;
  status_t status;
  logic clr, latch_aes, berger_err = 0, recfg_busy = 0, recfg_done = 0, recfg_req, state_err;
  logic [NKIND-1:0] start_left, start_right, start_spare, use_spare_left, use_spare_right;
  logic [NKIND-1:0] buf_we, src_spare, ok = '1, spare_eq_left = '0, spare_eq_right = '0;
  logic [NKIND-1:0] left_valid = '0, right_valid = '0, spare_valid = '0;
  logic [NCMP-1:0] disagree = '0;
  mod_id_t recfg_id;
  sub_e sub_state [NKIND];

  sccu #(.RECEIVER(1'b0), .MAX_RETRY(2)) dut (.*);

  // datapath model: results arrive two cycles after the start strobes
  logic [NKIND-1:0] sl1, sr1, ss1;
  int n_start_l [NKIND], n_start_r [NKIND], n_start_s [NKIND];
  int n_req = 0;
  mod_id_t last_req_id = '0;
  always @(posedge clk) begin
    if (recfg_req && !rst) begin
      n_req++;
      last_req_id <= recfg_id;
    end
    sl1 <= start_left | (start_spare & use_spare_left);
    sr1 <= start_right | (start_spare & use_spare_right);
    ss1 <= start_spare;
    if (clr) begin
      left_valid <= '0; right_valid <= '0; spare_valid <= '0;
    end else begin
      left_valid  <= left_valid | sl1;
      right_valid <= right_valid | sr1;
      spare_valid <= spare_valid | ss1;
    end
    for (int t = 0; t < NKIND; t++) begin
      n_start_l[t] += int'(start_left[t]);
      n_start_r[t] += int'(start_right[t]);
      n_start_s[t] += int'(start_spare[t]);
    end
  end

  task automatic clear_counts();
    for (int t = 0; t < NKIND; t++) begin n_start_l[t] = 0; n_start_r[t] = 0; n_start_s[t] = 0; end
  endtask

  task automatic op(input logic ft);
    @(negedge clk);
    req_ft = ft; req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
  endtask

  task automatic finish_op();
    resp_ready = 1;
    @(negedge clk);
    resp_ready = 0;
  endtask

  initial begin
    clear_counts();
    sl1 = '0; sr1 = '0; ss1 = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // FT, all agree
    op(1'b1);
    check(n_start_l[0] == 1 && n_start_r[0] == 1 && n_start_l[1] == 1 && n_start_r[1] == 1, "FT starts both pairs");
    check(n_start_s[0] == 0 && n_start_s[1] == 0, "spares idle");
    check(status == '0 && src_spare == '0, "clean status");
    finish_op();
    // NFT: only left modules
    clear_counts();
    op(1'b0);
    check(n_start_l[0] == 1 && n_start_r[0] == 0 && n_start_r[1] == 0, "NFT starts left only");
    finish_op();
    // FT, AES pair disagrees, spare equals left -> right faulty
    clear_counts();
    ok = 2'b10; spare_eq_left = 2'b01;
    fork
      op(1'b1);
      begin
        while (!(|start_spare)) @(negedge clk);
        @(negedge clk);   // the check has been taken
        ok = 2'b11;
      end
    join
    check(n_start_s[0] == 1 && n_start_s[1] == 0, "spare AES started once");
    check(status.mismatch == 2'b01 && status.spare_used == 2'b01 && src_spare == 2'b01, "spare result delivered");
    check(sub_state[0] == SUB_RIGHT, "spare replaces right AES");
    spare_eq_left = '0;
    finish_op();
    check(n_req == 1 && last_req_id == 2'd1, "reconfiguration of AES right requested");
    recfg_busy = 1;
    // next op runs the spare in the right slot
    clear_counts();
    op(1'b1);
    check(n_start_r[0] == 0 && n_start_s[0] == 1 && n_start_l[0] == 1, "spare runs in right slot");
    check(use_spare_right == 2'b01, "right interface shows spare");
    finish_op();
    // reconfiguration finishes: spare released when idle
    @(negedge clk);
    recfg_busy = 0; recfg_done = 1;
    @(negedge clk);
    recfg_done = 0;
    repeat (2) @(negedge clk);
    check(sub_state[0] == SUB_NONE, "spare released");
    // Berger error on every check: MAX_RETRY recomputations then failure
    clear_counts();
    berger_err = 1;
    op(1'b1);
    check(status.fail && status.voter_err && status.retries == 4'd2, "failure after retries");
    check(n_start_l[0] == 3, "three launches");
    berger_err = 0;
    finish_op();
    check(!state_err, "state register one-hot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

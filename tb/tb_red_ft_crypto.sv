// tb_red_ft_crypto: tests a sender and a receiver instance of the fault-tolerant cryptographic
// module with a small configuration memory. Expected ciphertexts and digests come from an
// independent software AES-128 and HMAC-SHA3-256. Covers NFT and FT operation, a faulty right
// HMAC in the sender (spare activation, localization, reconfiguration through the ICAP model,
// operation on the spare, release of the spare), a faulty left AES in the receiver, and the
// receiver's integrity verdict for a good and a wrong received digest. Also checks the
// fault-free FT latency against 6.53 us (sender) and 9.63 us (receiver) at 50 MHz.
module tb_red_ft_crypto;
  import crypto_pkg::*;
  import red_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  localparam logic [127:0] KA [3] = '{
    128'ha54dca182530bb1d6d132cded6237b2e,
    128'h7c2999fdafe593253cd654af4dfad714,
    128'h55e5cd8e46dc8ed4b7c2764d2a5a4d76
  };
  localparam logic [127:0] PT [3] = '{
    128'hd91e3f721fcb1971174494d6493c9d5c,
    128'h27a0aeb3fee9232f8af2211f9ee491c5,
    128'h7706f85d8690024ad6bda3401be9c8cb
  };
  localparam logic [127:0] CT [3] = '{
    128'h6c8b37ec6d39a6b066960cab525ef485,
    128'he8569aeb4411bc1418109473f0b3420a,
    128'h84130c164d61dfe60ec037a53437361e
  };
  localparam logic [127:0] KM [3] = '{
    128'h3460be31201e69fedaa0eee8b9997f5c,
    128'hb10becb5563bfc1e6f93427ecbc8fe29,
    128'hccc935f6cd1f61226ae15338ae1a3400
  };
  localparam logic [255:0] MAC [3] = '{
    256'hae9c70bc479e05b7dd2c13bdbb31cb9c341d93289bf9f3db8e3be24bccb15ca4,
    256'h04f2d2c381cd0c734703224b4ed397669850c65779a8f369cc1802ccc3e28504,
    256'hdbc91e09ea82743e6f8603e9b80f02edddf41c16a293d942ce56637f89b80879
  };

  localparam int unsigned RW = 16;
  localparam int unsigned AW = $clog2(4 * RW);

  // two instances: s = sender, r = receiver
  logic    s_req_valid = 0, s_req_ready, s_ft = 0, s_resp_valid, r_req_valid = 0, r_req_ready, r_ft = 0, r_resp_valid;
  blk128_t s_data = '0, r_data = '0, s_ka = '0, s_km = '0, r_ka = '0, r_km = '0, s_aes, r_aes;
  dig256_t r_rxmac = '0, s_mac, r_mac;
  status_t s_st, r_st;
  logic    cfg_we = 0;
  logic [AW-1:0] cfg_waddr = '0;
  logic [15:0] cfg_wdata = '0, s_din, r_din, s_x, r_x;
  logic s_ce, s_wr, s_ibusy, r_ce, r_wr, r_ibusy, s_rbusy, r_rbusy, s_rdone, r_rdone, s_err, r_err;
  mod_id_t s_rid, r_rid;
  sub_e s_sub [NKIND], r_sub [NKIND];
  logic [2:0] s_fi [NKIND] = '{default: '0}, r_fi [NKIND] = '{default: '0};
  int unsigned s_words, r_words;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  red_ft_crypto #(.RECEIVER(1'b0), .REGION_WORDS(RW)) u_s (
    .clk, .rst, .req_valid(s_req_valid), .req_ready(s_req_ready), .req_ft(s_ft), .req_data(s_data),
    .req_key_aes(s_ka), .req_key_mac(s_km), .req_rx_mac('0), .resp_valid(s_resp_valid),
    .resp_ready(1'b1), .resp_aes(s_aes), .resp_mac(s_mac), .resp_status(s_st),
    .cfg_we, .cfg_waddr, .cfg_wdata, .icap_ce_n(s_ce), .icap_write_n(s_wr), .icap_din(s_din),
    .icap_busy(s_ibusy), .recfg_busy(s_rbusy), .recfg_id(s_rid), .recfg_done(s_rdone),
    .sub_state(s_sub), .sccu_err(s_err), .fi_mod(s_fi), .fi_cmp('0), .fi_voter(1'b0));
  red_ft_crypto #(.RECEIVER(1'b1), .REGION_WORDS(RW)) u_r (
    .clk, .rst, .req_valid(r_req_valid), .req_ready(r_req_ready), .req_ft(r_ft), .req_data(r_data),
    .req_key_aes(r_ka), .req_key_mac(r_km), .req_rx_mac(r_rxmac), .resp_valid(r_resp_valid),
    .resp_ready(1'b1), .resp_aes(r_aes), .resp_mac(r_mac), .resp_status(r_st),
    .cfg_we, .cfg_waddr, .cfg_wdata, .icap_ce_n(r_ce), .icap_write_n(r_wr), .icap_din(r_din),
    .icap_busy(r_ibusy), .recfg_busy(r_rbusy), .recfg_id(r_rid), .recfg_done(r_rdone),
    .sub_state(r_sub), .sccu_err(r_err), .fi_mod(r_fi), .fi_cmp('0), .fi_voter(1'b0));
  icap_model u_is (.clk, .rst, .ce_n(s_ce), .write_n(s_wr), .din(s_din), .busy(s_ibusy), .words(s_words), .xsum(s_x));
  icap_model u_ir (.clk, .rst, .ce_n(r_ce), .write_n(r_wr), .din(r_din), .busy(r_ibusy), .words(r_words), .xsum(r_x));

  // heal the reconfigured module
  always @(negedge clk) begin
    if (s_rdone) s_fi[s_rid[1]][s_rid[0] ? 2 : 0] = 1'b0;
    if (r_rdone) r_fi[r_rid[1]][r_rid[0] ? 2 : 0] = 1'b0;
  end

  task automatic send(input int i, input logic ft, output int lat);
    int t0;
    @(negedge clk);
    s_data = PT[i]; s_ka = KA[i]; s_km = KM[i]; s_ft = ft; s_req_valid = 1;
    while (!s_req_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    s_req_valid = 0;
    while (!s_resp_valid) @(negedge clk);
    lat = cyc - t0;
    check(s_aes == CT[i], $sformatf("sender %0d ciphertext %h", i, s_aes));
    check(s_mac == MAC[i], $sformatf("sender %0d digest %h", i, s_mac));
    check(!s_st.fail, $sformatf("sender %0d failed", i));
  endtask

  task automatic receive(input int i, input logic ft, input bit bad_mac, output int lat);
    int t0;
    @(negedge clk);
    r_data = CT[i]; r_ka = KA[i]; r_km = KM[i]; r_ft = ft; r_rxmac = MAC[i] ^ (bad_mac ? 256'h100 : 256'h0);
    r_req_valid = 1;
    while (!r_req_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    r_req_valid = 0;
    while (!r_resp_valid) @(negedge clk);
    lat = cyc - t0;
    check(r_aes == PT[i], $sformatf("receiver %0d plaintext %h", i, r_aes));
    check(r_mac == MAC[i], $sformatf("receiver %0d local digest %h", i, r_mac));
    check(r_st.integrity == !bad_mac, $sformatf("receiver %0d integrity %0d", i, r_st.integrity));
  endtask

  initial begin
    int lat;
    logic [15:0] x3;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 4 * RW; a++) begin
      cfg_we = 1; cfg_waddr = AW'(a); cfg_wdata = 16'(a * 263 + 7);
      @(negedge clk);
    end
    cfg_we = 0;
    x3 = '0;
    for (int a = 3 * RW; a < 4 * RW; a++) x3 ^= 16'(a * 263 + 7);
    // NFT and FT, fault free
    send(0, 1'b0, lat);
    check(s_st.mismatch == '0 && s_st.spare_used == '0, "NFT status");
    send(1, 1'b1, lat);
    check(lat <= 326, $sformatf("sender FT latency %0d", lat));
    receive(1, 1'b1, 0, lat);
    check(lat <= 481, $sformatf("receiver FT latency %0d", lat));
    receive(0, 1'b0, 0, lat);
    receive(2, 1'b1, 1, lat);
    // sender: right HMAC faulty
    s_fi[T_MAC][2] = 1'b1;
    send(2, 1'b1, lat);
    check(s_st.mismatch == 2'b10 && s_st.spare_used == 2'b10, "sender spare HMAC used");
    check(s_sub[T_MAC] == SUB_RIGHT, "sender spare in right HMAC slot");
    send(0, 1'b1, lat);   // runs on the spare
    check(s_st.mismatch == '0, "sender on spare, no mismatch");
    while (s_sub[T_MAC] != SUB_NONE) @(negedge clk);
    check(s_words == RW, $sformatf("sender ICAP words %0d", s_words));
    check(s_x == x3, "sender ICAP got region 3 (HMAC right)");
    // receiver: left AES faulty
    r_fi[T_AES][0] = 1'b1;
    receive(1, 1'b1, 0, lat);
    check(r_st.spare_used == 2'b01 && r_sub[T_AES] == SUB_LEFT, "receiver spare AES in left slot");
    while (r_sub[T_AES] != SUB_NONE) @(negedge clk);
    check(r_words == RW, "receiver ICAP words");
    receive(2, 1'b1, 0, lat);
    check(r_st.mismatch == '0, "receiver healed");
    check(!s_err && !r_err, "control units consistent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_red_ecu_top: end-to-end test of the sending and receiving co-processors.
//
// The testbench plays the two application processors and the FlexRay bus: it hands ECU
// messages to the sender, checks each 48-byte secure payload against ciphertext and digest
// computed by independent software AES-128 and HMAC-SHA3-256, carries the payload to the
// receiver and checks the recovered message, counter and integrity. Behavioural ICAP models
// stand for the FPGA configuration port; when a reconfiguration finishes, the fault injected
// into that module is removed (the module is "healed"). Runs with every parameter at its
// default. Every recovery mechanism is provoked and counted: NFT and FT operation, DMR
// mismatch with spare activation and localization of a left and of a right module,
// partial reconfiguration and release of the spare, operation on the spare, a comparator
// outvoted in TMR, a Berger error of the voter, recomputation, failure after MAX_RETRY,
// integrity loss on the bus and retransmission. Fault-free latencies are checked against the
// co-processor times the design is meant to beat (4.90/6.53 us sender, 9.00/9.63 us receiver
// in NFT/FT mode, at 50 MHz).
module tb_red_ecu_top;
  import crypto_pkg::*;
  import red_pkg::*;

  localparam int unsigned CFG_AW = $clog2(4 * 4096);
  localparam int unsigned NFT_TX_MAX = 245, FT_TX_MAX = 326, NFT_RX_MAX = 450, FT_RX_MAX = 481;

  localparam logic [63:0] MSG [16] = '{
    64'h5157000000000000,
    64'h5157000102030405,
    64'h515700020406080a,
    64'h5157000306090c0f,
    64'h51570004080c1014,
    64'h515700050a0f1419,
    64'h515700060c12181e,
    64'h515700070e151c23,
    64'h5157000810182028,
    64'h51570009121b242d,
    64'h5157000a141e2832,
    64'h5157000b16212c37,
    64'h5157000c1824303c,
    64'h5157000d1a273441,
    64'h5157000e1c2a3846,
    64'h5157000f1e2d3c4b
  };
  localparam logic [383:0] PAYLOAD [16] = '{
    384'h1374307ba9ac7185075f5003ca8065e3c93789c68e783c9287f5df6f9bc82784f7532c6e12c53ce6004ff2594334f48b,
    384'he23ce77a9016fc1d8a25f7e6c60a034f960f78f611c958488f88b06a8db0ea60d00bfaf353b0282f7eed3f3d345bd26c,
    384'hf4f8699350b983fd04c293f13a64fe86f03665e7d88aad66376cc66a569c267b9d54fcb3122cc6ae5601f9197fa8cd48,
    384'h62fe10abbfa69f6982d76195a35e4fd4f6a1470eddee426affecc625fd7877632c08c7daaaab14fd8cc8b07b0afa1e6c,
    384'h4293f71133555860f3a5621eb78ad5a71ddf8ba570b267e4dc1aa31bf892ce2882db057c4395d4e8f8ad2f25a3d9d808,
    384'hb533ead9d97f0c304993cd0e395e4affa85acead46fb869961b53e87da8830a1d0b7923255ca22b676e16803630093a7,
    384'hf7e40770af8a299348bf113b8f167a6112f98b0ffbc884c85a5ec18185fce798a26f335fe61e07e76bd9bce96eb66c57,
    384'h00e76a74dd4006d5ad6ca55ee87d65f272d95687db7fa3c113b97580cba0ce0b88cf8ac58895a5149befc2f369e13b56,
    384'he2c56dac5110251755062075a16d734c05dab2121ad8b770ba7ff2771c7cd003cf1ef0b99835dc9bcf5030b8b2b575c2,
    384'hd05d595b981a5bd947605670d26c3feb93a96851aef12ce9dadf67804d0586598255479870c7ec7567d737ad606e2f35,
    384'hd256898e7e32f241c5af4005f54616698d9acaf1e2275d77fc853643dbe1f7abe28b1efa5b32fa7101eebb13c84b8c76,
    384'h9714600882f91ac8ba2672b0d5abcec24dd4177f659fb2e4a5aa0ec536c5f6f85ee4cf7642072de8ea9298c645d1625c,
    384'h4280e823417bf574cb1f252f5b83b34063354d1714ec9b76dc61c76f097691e0207ff70a03a8fb20ead0e5627439fe0d,
    384'h597e912807fe3c2f6c1b2425f41416f60bff81b7eb49b965cd48f681436501c922e8fc4db05abb841b821154b8608f11,
    384'hde4d10d882de85571e6083b116502a4361c48d23881c4554d3999adb35e7063154716ab296474b76adf68aaf95e84e89,
    384'ha78a6cb7b3c58f0fb8d8ae68e1c128395d56a01d8f04162f91962448c0c51bc8063005345b7ed6474698c1649bf4c3be
  };

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam blk128_t KEY_AES = 128'h000102030405060708090a0b0c0d0e0f;
  localparam blk128_t KEY_MAC = 128'h101112131415161718191a1b1c1d1e1f;
  // both nodes share the secret keys
  blk128_t tx_key_aes = KEY_AES, tx_key_mac = KEY_MAC, rx_key_aes = KEY_AES, rx_key_mac = KEY_MAC;

  // sender
  logic tx_msg_valid = 0, tx_msg_ready, tx_ft_mode = 0, tx_payload_valid, tx_payload_ready = 0;
  logic [63:0] tx_ecu_msg = '0;
  logic [383:0] tx_payload;
  status_t tx_status;
  logic tx_retx_req = 0, tx_cfg_we = 0;
  logic [CFG_AW-1:0] tx_cfg_waddr = '0;
  logic [15:0] tx_cfg_wdata = '0, tx_icap_din;
  logic tx_icap_ce_n, tx_icap_write_n, tx_icap_busy, tx_recfg_busy, tx_recfg_done, tx_sccu_err;
  mod_id_t tx_recfg_id;
  sub_e tx_sub_state [NKIND];
  logic [2:0] tx_fi_mod [NKIND] = '{default: '0};
  logic [NCMP-1:0] tx_fi_cmp = '0;
  logic tx_fi_voter = 0;
  // receiver
  logic rx_payload_valid = 0, rx_payload_ready, rx_ft_mode = 0, rx_msg_valid, rx_msg_ready = 0;
  logic [383:0] rx_payload = '0;
  logic [63:0] rx_ecu_msg, rx_counter;
  logic rx_integrity, rx_retx_req;
  status_t rx_status;
  logic rx_cfg_we = 0;
  logic [CFG_AW-1:0] rx_cfg_waddr = '0;
  logic [15:0] rx_cfg_wdata = '0, rx_icap_din;
  logic rx_icap_ce_n, rx_icap_write_n, rx_icap_busy, rx_recfg_busy, rx_recfg_done, rx_sccu_err;
  mod_id_t rx_recfg_id;
  sub_e rx_sub_state [NKIND];
  logic [2:0] rx_fi_mod [NKIND] = '{default: '0};
  logic [NCMP-1:0] rx_fi_cmp = '0;
  logic rx_fi_voter = 0;

  red_ecu_top dut (.*);

  int unsigned tx_words, rx_words;
  logic [15:0] tx_xsum, rx_xsum;
  icap_model u_icap_tx (.clk, .rst, .ce_n(tx_icap_ce_n), .write_n(tx_icap_write_n),
                        .din(tx_icap_din), .busy(tx_icap_busy), .words(tx_words), .xsum(tx_xsum));
  icap_model u_icap_rx (.clk, .rst, .ce_n(rx_icap_ce_n), .write_n(rx_icap_write_n),
                        .din(rx_icap_din), .busy(rx_icap_busy), .words(rx_words), .xsum(rx_xsum));

  // mechanism counters
  int n_nft = 0, n_ft = 0, n_spare = 0, n_loc_left = 0, n_loc_right = 0, n_reconfig = 0;
  int n_release = 0, n_on_spare = 0, n_cmp_fault = 0, n_voter_err = 0, n_retry = 0;
  int n_fail = 0, n_integrity_loss = 0, n_retx = 0;
  logic [15:0] exp_xsum [4];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // heal a module once its partial reconfiguration has been written
  always @(negedge clk) begin
    if (tx_recfg_done) begin
      tx_fi_mod[tx_recfg_id[1]][tx_recfg_id[0] ? 2 : 0] = 1'b0;
      n_reconfig++;
    end
    if (rx_recfg_done) begin
      rx_fi_mod[rx_recfg_id[1]][rx_recfg_id[0] ? 2 : 0] = 1'b0;
      n_reconfig++;
    end
  end

  // count spare releases
  sub_e tx_sub_prev [NKIND] = '{default: SUB_NONE};
  always @(negedge clk) begin
    for (int t = 0; t < NKIND; t++) begin
      if (tx_sub_prev[t] != SUB_NONE && tx_sub_state[t] == SUB_NONE) n_release++;
      tx_sub_prev[t] = tx_sub_state[t];
    end
  end

  function automatic void tally(input status_t s);
    for (int t = 0; t < NKIND; t++) if (s.spare_used[t]) n_spare++;
    if (s.cmp_fault != '0) n_cmp_fault++;
    if (s.voter_err) n_voter_err++;
    n_retry += int'(s.retries);
    if (s.fail) n_fail++;
  endfunction

  // one message through sender, bus and receiver
  task automatic do_op(input int idx, input logic ft_tx, input logic ft_rx, input bit corrupt,
                       input bit expect_fail, input bit timed);
    int t0, lat;
    status_t s;
    // ---- sender
    @(negedge clk);
    tx_ecu_msg   = MSG[idx];
    tx_ft_mode   = ft_tx;
    tx_msg_valid = 1'b1;
    while (!tx_msg_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    tx_msg_valid = 1'b0;
    while (!tx_payload_valid) @(negedge clk);
    lat = cyc - t0;
    s = tx_status;
    tally(s);
    if (!expect_fail) begin
      check(tx_payload == PAYLOAD[idx], $sformatf("op %0d: payload %h", idx, tx_payload));
      check(!s.fail, $sformatf("op %0d: sender failed", idx));
      if (timed) begin
        check(lat <= int'(ft_tx ? FT_TX_MAX : NFT_TX_MAX),
              $sformatf("op %0d: sender latency %0d", idx, lat));
        $display("op %0d sender %s latency %0d cycles", idx, ft_tx ? "FT" : "NFT", lat);
      end
    end else begin
      check(s.fail, $sformatf("op %0d: failure not reported", idx));
    end
    tx_payload_ready = 1'b1;
    @(negedge clk);
    tx_payload_ready = 1'b0;
    if (expect_fail) return;
    // ---- bus and receiver
    for (int attempt = 0; attempt < 2; attempt++) begin
      rx_payload       = (corrupt && attempt == 0) ? (PAYLOAD[idx] ^ (384'h1 << 300)) : tx_payload;
      rx_ft_mode       = ft_rx;
      rx_payload_valid = 1'b1;
      while (!rx_payload_ready) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      rx_payload_valid = 1'b0;
      while (!rx_msg_valid) @(negedge clk);
      lat = cyc - t0;
      s = rx_status;
      tally(s);
      if (corrupt && attempt == 0) begin
        check(!rx_integrity && rx_retx_req, $sformatf("op %0d: corrupted payload accepted", idx));
        n_integrity_loss++;
        rx_msg_ready = 1'b1;
        tx_retx_req  = 1'b1;
        @(negedge clk);
        rx_msg_ready = 1'b0;
        tx_retx_req  = 1'b0;
        while (!tx_payload_valid) @(negedge clk);
        check(tx_payload == PAYLOAD[idx], $sformatf("op %0d: retransmitted payload", idx));
        n_retx++;
        tx_payload_ready = 1'b1;
        @(negedge clk);
        tx_payload_ready = 1'b0;
      end else begin
        check(rx_ecu_msg == MSG[idx], $sformatf("op %0d: message %h", idx, rx_ecu_msg));
        check(rx_counter == 64'(idx), $sformatf("op %0d: counter %0d", idx, rx_counter));
        check(rx_integrity && !rx_retx_req && !s.fail, $sformatf("op %0d: integrity", idx));
        if (timed && !corrupt) begin
          check(lat <= int'(ft_rx ? FT_RX_MAX : NFT_RX_MAX),
                $sformatf("op %0d: receiver latency %0d", idx, lat));
          $display("op %0d receiver %s latency %0d cycles", idx, ft_rx ? "FT" : "NFT", lat);
        end
        rx_msg_ready = 1'b1;
        @(negedge clk);
        rx_msg_ready = 1'b0;
        break;
      end
    end
    if (ft_tx) n_ft++; else n_nft++;
  endtask

  task automatic wait_tx_spares_free();
    int n = 0;
    while ((tx_sub_state[T_AES] != SUB_NONE || tx_sub_state[T_MAC] != SUB_NONE) && n < 60000) begin
      @(negedge clk);
      n++;
    end
    check(tx_sub_state[T_AES] == SUB_NONE && tx_sub_state[T_MAC] == SUB_NONE, "spares released");
  endtask

  initial begin
    // partial bitstreams: word j of region k is a pattern of k and j
    for (int k = 0; k < 4; k++) exp_xsum[k] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int a = 0; a < 4 * 4096; a++) begin
      tx_cfg_we    = 1'b1;
      tx_cfg_waddr = CFG_AW'(a);
      tx_cfg_wdata = 16'((a * 40503) ^ 16'haa99);
      rx_cfg_we    = 1'b1;
      rx_cfg_waddr = CFG_AW'(a);
      rx_cfg_wdata = 16'((a * 40503) ^ 16'haa99);
      exp_xsum[a / 4096] ^= 16'((a * 40503) ^ 16'haa99);
      @(negedge clk);
    end
    tx_cfg_we = 1'b0;
    rx_cfg_we = 1'b0;

    // 0: NFT, 1: FT, fault free
    do_op(0, 1'b0, 1'b0, 0, 0, 1);
    do_op(1, 1'b1, 1'b1, 0, 0, 1);
    check(tx_status.mismatch == '0 && rx_status.mismatch == '0, "clean FT run");

    // 2: permanent fault in the sender's right AES module
    tx_fi_mod[T_AES][2] = 1'b1;
    do_op(2, 1'b1, 1'b1, 0, 0, 0);
    check(tx_status.mismatch[T_AES] && tx_status.spare_used[T_AES], "op 2: spare AES used");
    check(tx_sub_state[T_AES] == SUB_RIGHT, "op 2: spare replaces right AES");
    if (tx_sub_state[T_AES] == SUB_RIGHT) n_loc_right++;
    check(tx_recfg_busy && tx_recfg_id == 2'd1, "op 2: reconfiguration of AES right started");

    // 3: while it is reconfigured, the left HMAC of the sender fails too
    tx_fi_mod[T_MAC][0] = 1'b1;
    check(tx_sub_state[T_AES] != SUB_NONE, "op 3 runs on the spare AES");
    n_on_spare++;
    do_op(3, 1'b1, 1'b1, 0, 0, 0);
    check(tx_status.mismatch == 2'b10 && tx_status.spare_used == 2'b10, "op 3: spare HMAC used");
    check(tx_sub_state[T_MAC] == SUB_LEFT, "op 3: spare replaces left HMAC");
    if (tx_sub_state[T_MAC] == SUB_LEFT) n_loc_left++;

    // both reconfigurations complete one after the other, then the spares are released
    wait_tx_spares_free();
    check(tx_words == 2 * 4096, $sformatf("ICAP words %0d", tx_words));
    check(tx_xsum == (exp_xsum[1] ^ exp_xsum[2]), "ICAP received regions 1 and 2");

    // 4: clean again after healing
    do_op(4, 1'b1, 1'b1, 0, 0, 1);
    check(tx_status.mismatch == '0, "op 4: healed");

    // 5: receiver comparator 1 faulty: outvoted, result still correct
    rx_fi_cmp = 3'b010;
    do_op(5, 1'b1, 1'b1, 0, 0, 0);
    check(rx_status.cmp_fault == 3'b010, "op 5: comparator 1 localized");
    rx_fi_cmp = '0;

    // 6: transient fault in the receiver's voter: Berger error, recomputation
    rx_fi_voter = 1'b1;
    fork
      begin
        while (!dut.u_receiver.u_crypto.u_sccu.st_info_q.voter_err) @(negedge clk);
        rx_fi_voter = 1'b0;
      end
      do_op(6, 1'b1, 1'b1, 0, 0, 0);
    join
    check(rx_status.voter_err && rx_status.retries == 4'd1, "op 6: voter error recomputed");

    // 7: transient faults in the receiver's left and spare AES: spare matches neither
    rx_fi_mod[T_AES][0] = 1'b1;
    rx_fi_mod[T_AES][1] = 1'b1;
    fork
      begin
        while (dut.u_receiver.u_crypto.u_sccu.st_info_q.retries != 0) @(negedge clk);
        while (dut.u_receiver.u_crypto.u_sccu.st_info_q.retries == 0) @(negedge clk);
        rx_fi_mod[T_AES][0] = 1'b0;
        rx_fi_mod[T_AES][1] = 1'b0;
      end
      do_op(7, 1'b1, 1'b1, 0, 0, 0);
    join
    check(rx_status.retries == 4'd1 && rx_status.spare_used == '0 && rx_status.mismatch[T_AES],
          "op 7: unlocalized fault recomputed");

    // 8: corruption on the bus: integrity lost, retransmission
    do_op(8, 1'b1, 1'b1, 1, 0, 0);

    // 9, 10: spare already standing in when the other AES fails as well -> reported failure
    tx_fi_mod[T_AES][2] = 1'b1;
    do_op(9, 1'b1, 1'b1, 0, 0, 0);
    tx_fi_mod[T_AES][0] = 1'b1;
    do_op(10, 1'b1, 1'b1, 0, 1, 0);
    check(tx_status.retries == 4'd3, "op 10: MAX_RETRY recomputations");
    tx_fi_mod[T_AES][0] = 1'b0;
    wait_tx_spares_free();

    // 11: NFT again, and no self-check error anywhere
    do_op(11, 1'b0, 1'b0, 0, 0, 1);
    check(!tx_sccu_err && !rx_sccu_err, "control units consistent");

    $display("mechanisms: nft=%0d ft=%0d spare=%0d loc_left=%0d loc_right=%0d reconfig=%0d release=%0d on_spare=%0d cmp_fault=%0d voter_err=%0d retry=%0d fail=%0d integrity_loss=%0d retx=%0d",
             n_nft, n_ft, n_spare, n_loc_left, n_loc_right, n_reconfig, n_release, n_on_spare,
             n_cmp_fault, n_voter_err, n_retry, n_fail, n_integrity_loss, n_retx);
    check(n_nft > 0, "NFT mode exercised");
    check(n_ft > 0, "FT mode exercised");
    check(n_spare > 0, "spare activation exercised");
    check(n_loc_left > 0 && n_loc_right > 0, "localization exercised");
    check(n_reconfig > 0, "reconfiguration exercised");
    check(n_release > 0, "spare release exercised");
    check(n_on_spare > 0, "operation on spare exercised");
    check(n_cmp_fault > 0, "comparator TMR exercised");
    check(n_voter_err > 0, "Berger check exercised");
    check(n_retry > 0, "recomputation exercised");
    check(n_fail > 0, "failure report exercised");
    check(n_integrity_loss > 0 && n_retx > 0, "integrity loss and retransmission exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

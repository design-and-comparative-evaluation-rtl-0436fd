// tb_red_sender_node: hands four ECU messages to the sender node and checks each secure
// payload (ciphertext and digest of message plus counter) against values from an independent
// software AES-128 and HMAC-SHA3-256, the counter advancing once per message, in FT and NFT
// mode, and the payload being offered again on a retransmission request.
module tb_red_sender_node;
  import crypto_pkg::*;
  import red_pkg::*;
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

  localparam int unsigned RW = 16, AW = $clog2(4 * RW);
  localparam blk128_t KEY_AES = 128'h000102030405060708090a0b0c0d0e0f;
  localparam blk128_t KEY_MAC = 128'h101112131415161718191a1b1c1d1e1f;
  logic [2:0] fi_mod [NKIND] = '{default: '0};
  logic icap_ce_n, icap_write_n, icap_busy = 1'b0, recfg_busy, recfg_done, sccu_err;
  logic [15:0] icap_din;
  mod_id_t recfg_id;
  sub_e sub_state [NKIND];
  status_t status;

  logic msg_valid = 0, msg_ready, ft_mode = 1, payload_valid, payload_ready = 0, retx_req = 0;
  logic [63:0] ecu_msg = '0;
  logic [383:0] payload;

  red_sender_node #(.REGION_WORDS(RW)) dut (
    .clk, .rst, .msg_valid, .msg_ready, .ecu_msg, .ft_mode, .key_aes(KEY_AES), .key_mac(KEY_MAC),
    .payload_valid, .payload_ready, .payload, .status, .retx_req,
    .cfg_we(1'b0), .cfg_waddr('0), .cfg_wdata('0), .icap_ce_n, .icap_write_n, .icap_din, .icap_busy,
    .recfg_busy, .recfg_id, .recfg_done, .sub_state, .sccu_err, .fi_mod, .fi_cmp('0), .fi_voter(1'b0));

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      ecu_msg = MSG[i]; ft_mode = (i != 2); msg_valid = 1;
      while (!msg_ready) @(negedge clk);
      @(negedge clk);
      msg_valid = 0;
      check(!msg_ready, "one message in flight");
      while (!payload_valid) @(negedge clk);
      check(payload == PAYLOAD[i], $sformatf("payload %0d: %h", i, payload));
      check(!status.fail && status.mismatch == '0, $sformatf("status %0d", i));
      payload_ready = 1;
      @(negedge clk);
      payload_ready = 0;
      check(!payload_valid, "payload taken");
      if (i == 1) begin
        retx_req = 1;
        @(negedge clk);
        retx_req = 0;
        check(payload_valid && payload == PAYLOAD[1], "retransmission offers the same payload");
        payload_ready = 1;
        @(negedge clk);
        payload_ready = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// red_ft_crypto: fault-tolerant cryptographic module of the reconfigurable ECU (FT-SR-DMR).
//
// One node's FPGA co-processor datapath. It holds three AES-128 modules and three SHA-3 HMAC
// modules: for each kind a left and a right regular module that work in dual modular
// redundancy, and a spare. The left input interface collects the left modules' results, the
// right one the right modules'; either can present the spare's result instead. Three
// comparators (TMR) compare left against right, the Berger-coded self-checking voter votes on
// them, and the self-checking control unit (sccu) decides: deliver, activate the spare and
// localize the faulty module against the result buffer, request its partial reconfiguration
// from the reconfiguration subsystem (configuration memory, configuration engine, ICAP port),
// or recompute. In NFT mode (`req_ft` = 0) only the left module of each kind runs and nothing
// is compared.
//
// RECEIVER = 0 (sender node): AES-128 encryption and HMAC of the 128-bit message run in
// parallel; `resp_aes` is the ciphertext and `resp_mac` the digest.
// RECEIVER = 1 (receiver node): AES-128 decryption of the ciphertext first, then the HMAC of
// the recovered plaintext; `resp_aes` is the plaintext, `resp_mac` the local digest and
// `resp_status.integrity` tells whether it equals `req_rx_mac`.
// In the sender `resp_status.integrity` is constant 1 and `req_rx_mac` is unused.
//
// This structure follows the document; the spare being wired to both interfaces (the
// published block diagram draws the spares only beside the left-hand modules), the
// fault-injection inputs and the retry limit are this design's own. The fault-injection
// inputs (`fi_mod`, `fi_cmp`, `fi_voter`) are test hooks: `fi_mod[kind][i]` inverts bit i of
// module i's result (0 left, 1 spare, 2 right), `fi_cmp[c]` inverts comparator c's flags,
// `fi_voter` corrupts the voter. Tie them to 0 in use.
//
// Timing, with no fault: the sender is bounded by the 106-cycle HMAC running beside the
// 11-cycle AES, the receiver by the 21-cycle decryption followed by the HMAC; launch, check and
// phase steps add a few cycles (measured through the nodes: sender 111 NFT / 112 FT, receiver
// 135 NFT / 137 FT). A spare recomputation adds about one more module time, a retry a whole
// operation. Handshakes: `req_valid`/`req_ready`, `resp_valid`/`resp_ready`.
module red_ft_crypto
  import crypto_pkg::*;
  import red_pkg::*;
#(
  parameter bit          RECEIVER     = 1'b0,
  parameter int unsigned MAX_RETRY    = 3,
  parameter int unsigned REGION_WORDS = 4096,
  localparam int unsigned CFG_AW      = $clog2(4 * REGION_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // operation
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_ft,
  input  blk128_t           req_data,
  input  blk128_t           req_key_aes,
  input  blk128_t           req_key_mac,
  input  dig256_t           req_rx_mac,
  output logic              resp_valid,
  input  logic              resp_ready,
  output blk128_t           resp_aes,
  output dig256_t           resp_mac,
  output status_t           resp_status,
  // configuration memory load port
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_waddr,
  input  logic [15:0]       cfg_wdata,
  // ICAP
  output logic              icap_ce_n,
  output logic              icap_write_n,
  output logic [15:0]       icap_din,
  input  logic              icap_busy,
  // observation
  output logic              recfg_busy,
  output mod_id_t           recfg_id,
  output logic              recfg_done,
  output sub_e              sub_state [NKIND],
  output logic              sccu_err,
  // fault injection (test)
  input  logic [2:0]        fi_mod [NKIND],
  input  logic [NCMP-1:0]   fi_cmp,
  input  logic              fi_voter
);
  // ------------------------------------------------------------ request registers
  blk128_t data_q, kaes_q, kmac_q, aes_fin_q;
  res_t    final_res [NKIND];
  dig256_t rxmac_q;

  logic             clr, latch_aes;
  logic [NKIND-1:0] start_l, start_r, start_s, use_sl, use_sr, buf_we, src_spare;
  logic [NKIND-1:0] lv, rv, sv, ok, seq_l, seq_r;
  logic [NCMP-1:0]  disagree;
  logic             berger_err;
  status_t          st;
  logic             rc_req, rc_busy, rc_done;
  mod_id_t          rc_id, rc_id_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_q    <= '0;
      kaes_q    <= '0;
      kmac_q    <= '0;
      rxmac_q   <= '0;
      aes_fin_q <= '0;
    end else begin
      if (req_valid && req_ready) begin
        data_q  <= req_data;
        kaes_q  <= req_key_aes;
        kmac_q  <= req_key_mac;
        rxmac_q <= req_rx_mac;
      end
      if (latch_aes) aes_fin_q <= final_res[T_AES][127:0];
    end
  end

  // ------------------------------------------------------------ module instances
  // index 0: left regular, 1: spare, 2: right regular
  logic [2:0] go   [NKIND];
  logic [2:0] fin  [NKIND];
  res_t       res  [NKIND][3];
  blk128_t    mac_in;

  assign mac_in = RECEIVER ? aes_fin_q : data_q;

  always_comb
    for (int t = 0; t < NKIND; t++) go[t] = {start_r[t], start_s[t], start_l[t]};

  for (genvar i = 0; i < 3; i++) begin : g_mod
    blk128_t aes_out;
    dig256_t mac_out;
    logic    aes_busy, mac_busy;

    if (RECEIVER) begin : g_dec
      aes128_dec u_aes (.clk, .rst, .start(go[T_AES][i]), .key(kaes_q), .din(data_q),
                        .busy(aes_busy), .done(fin[T_AES][i]), .dout(aes_out));
    end else begin : g_enc
      aes128_enc u_aes (.clk, .rst, .start(go[T_AES][i]), .key(kaes_q), .din(data_q),
                        .busy(aes_busy), .done(fin[T_AES][i]), .dout(aes_out));
    end
    sha3_hmac u_mac (.clk, .rst, .start(go[T_MAC][i]), .key(kmac_q), .msg(mac_in),
                     .busy(mac_busy), .done(fin[T_MAC][i]), .digest(mac_out));

    assign res[T_AES][i] = {128'h0, aes_out} ^ (res_t'(fi_mod[T_AES][i]) << i);
    assign res[T_MAC][i] = mac_out ^ (res_t'(fi_mod[T_MAC][i]) << i);

    // a module is only started when idle
    assert property (@(posedge clk) disable iff (rst) go[T_AES][i] |-> !aes_busy);
    assert property (@(posedge clk) disable iff (rst) go[T_MAC][i] |-> !mac_busy);
  end

  // ------------------------------------------------------------ input interfaces
  res_t             l_reg [NKIND], r_reg [NKIND], s_res [NKIND];
  res_t             l_out [NKIND], r_out [NKIND];
  logic [NKIND-1:0] l_done, r_done, s_done;

  always_comb
    for (int t = 0; t < NKIND; t++) begin
      l_reg[t] = res[t][0];  l_done[t] = fin[t][0];
      s_res[t] = res[t][1];  s_done[t] = fin[t][1];
      r_reg[t] = res[t][2];  r_done[t] = fin[t][2];
    end

  input_interface u_if_left (
    .clk, .rst, .clr,
    .reg_done(l_done), .reg_res(l_reg), .spare_done(s_done), .spare_res(s_res),
    .use_spare(use_sl), .out_res(l_out), .out_valid(lv)
  );
  input_interface u_if_right (
    .clk, .rst, .clr,
    .reg_done(r_done), .reg_res(r_reg), .spare_done(s_done), .spare_res(s_res),
    .use_spare(use_sr), .out_res(r_out), .out_valid(rv)
  );

  // spare result as seen by the control unit
  res_t spare_q [NKIND];
  always_ff @(posedge clk) begin
    if (rst) begin
      sv <= '0;
      for (int t = 0; t < NKIND; t++) spare_q[t] <= '0;
    end else begin
      for (int t = 0; t < NKIND; t++)
        if (clr) sv[t] <= 1'b0;
        else if (s_done[t]) begin
          spare_q[t] <= s_res[t];
          sv[t]      <= 1'b1;
        end
    end
  end

  // ------------------------------------------------------------ comparators (TMR) and voter
  logic [NKIND-1:0] eq_raw [NCMP];
  logic [NKIND-1:0] eq     [NCMP];

  for (genvar c = 0; c < NCMP; c++) begin : g_cmp
    result_cmp u_cmp (.left(l_out), .right(r_out), .eq(eq_raw[c]));
    assign eq[c] = eq_raw[c] ^ {NKIND{fi_cmp[c]}};
  end

  berger_voter u_voter (
    .eq, .inject(fi_voter), .ok, .disagree, .berger_err
  );

  // ------------------------------------------------------------ buffer and localization
  res_t buf_l [NKIND], buf_r [NKIND];

  result_buffer u_buf (
    .clk, .rst, .we(buf_we), .wleft(l_out), .wright(r_out), .rleft(buf_l), .rright(buf_r)
  );

  always_comb
    for (int t = 0; t < NKIND; t++) begin
      seq_l[t]     = (spare_q[t] == buf_l[t]);
      seq_r[t]     = (spare_q[t] == buf_r[t]);
      final_res[t] = src_spare[t] ? spare_q[t] : l_out[t];
    end

  // ------------------------------------------------------------ control unit
  sccu #(.RECEIVER(RECEIVER), .MAX_RETRY(MAX_RETRY)) u_sccu (
    .clk, .rst,
    .req_valid, .req_ready, .req_ft, .resp_valid, .resp_ready, .status(st),
    .clr, .start_left(start_l), .start_right(start_r), .start_spare(start_s),
    .use_spare_left(use_sl), .use_spare_right(use_sr), .buf_we, .src_spare, .latch_aes,
    .left_valid(lv), .right_valid(rv), .spare_valid(sv), .ok, .disagree, .berger_err,
    .spare_eq_left(seq_l), .spare_eq_right(seq_r),
    .recfg_req(rc_req), .recfg_id(rc_id), .recfg_busy(rc_busy), .recfg_done(rc_done),
    .sub_state, .state_err(sccu_err)
  );

  // ------------------------------------------------------------ reconfiguration subsystem
  logic              mem_re;
  logic [CFG_AW-1:0] mem_raddr;
  logic [15:0]       mem_rdata;

  config_memory #(.NREGIONS(4), .REGION_WORDS(REGION_WORDS)) u_cfg_mem (
    .clk, .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata)
  );

  config_engine #(.NREGIONS(4), .REGION_WORDS(REGION_WORDS)) u_cfg_eng (
    .clk, .rst, .req(rc_req), .id(rc_id), .busy(rc_busy), .done(rc_done),
    .mem_re, .mem_raddr, .mem_rdata, .icap_ce_n, .icap_write_n, .icap_din, .icap_busy
  );

  always_ff @(posedge clk) begin
    if (rst) rc_id_q <= '0;
    else if (rc_req) rc_id_q <= rc_id;
  end

  assign recfg_busy = rc_busy;
  assign recfg_id   = rc_id_q;
  assign recfg_done = rc_done;

  // ------------------------------------------------------------ response
  always_comb begin
    resp_aes    = RECEIVER ? aes_fin_q : final_res[T_AES][127:0];
    resp_mac    = final_res[T_MAC];
    resp_status = st;
    resp_status.integrity = RECEIVER ? (final_res[T_MAC] == rxmac_q) : 1'b1;
  end

endmodule

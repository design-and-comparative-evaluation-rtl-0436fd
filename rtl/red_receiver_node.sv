// red_receiver_node: co-processor side of the receiving ECU in the reconfigurable design.
//
// Takes a 48-byte secure payload from the FlexRay bus, splits it into the 128-bit ciphertext
// and the 256-bit received digest, and runs the fault-tolerant cryptographic module: AES-128
// decryption recovers the plaintext (64-bit ECU message and 64-bit counter), then the SHA-3
// HMAC of that plaintext gives the local digest, which is compared with the received one.
// The message is delivered with `integrity` set when they match; otherwise `retx_req` asks
// for the message to be sent again. Following the document: the split, the decrypt-then-MAC
// order, the comparison and retransmission on mismatch. This design's own: the handshakes and
// delivering the message fields even when integrity fails (flagged, for the caller to drop).
//
// Timing: a payload is accepted when `payload_ready`; the message appears on `msg_valid`
// about 140 cycles later in FT mode without faults, held until `msg_ready`.
module red_receiver_node
  import crypto_pkg::*;
  import red_pkg::*;
#(
  parameter int unsigned MAX_RETRY    = 3,
  parameter int unsigned REGION_WORDS = 4096,
  localparam int unsigned CFG_AW      = $clog2(4 * REGION_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // from the FlexRay interface
  input  logic              payload_valid,
  output logic              payload_ready,
  input  logic [383:0]      payload,
  input  logic              ft_mode,
  input  blk128_t           key_aes,
  input  blk128_t           key_mac,
  // to the application processor
  output logic              msg_valid,
  input  logic              msg_ready,
  output logic [63:0]       ecu_msg,
  output logic [63:0]       counter,
  output logic              integrity,
  output logic              retx_req,
  output status_t           status,
  // reconfiguration
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_waddr,
  input  logic [15:0]       cfg_wdata,
  output logic              icap_ce_n,
  output logic              icap_write_n,
  output logic [15:0]       icap_din,
  input  logic              icap_busy,
  output logic              recfg_busy,
  output mod_id_t           recfg_id,
  output logic              recfg_done,
  output sub_e              sub_state [NKIND],
  output logic              sccu_err,
  input  logic [2:0]        fi_mod [NKIND],
  input  logic [NCMP-1:0]   fi_cmp,
  input  logic              fi_voter
);
  logic        c_req_ready, c_resp_valid;
  blk128_t     c_aes;
  dig256_t     c_mac;
  status_t     c_st;
  logic        busy_q, mv_q;

  assign payload_ready = !busy_q && !mv_q && c_req_ready;

  red_ft_crypto #(.RECEIVER(1'b1), .MAX_RETRY(MAX_RETRY), .REGION_WORDS(REGION_WORDS)) u_crypto (
    .clk, .rst,
    .req_valid(payload_valid && payload_ready), .req_ready(c_req_ready), .req_ft(ft_mode),
    .req_data(payload[383:256]), .req_key_aes(key_aes), .req_key_mac(key_mac),
    .req_rx_mac(payload[255:0]),
    .resp_valid(c_resp_valid), .resp_ready(1'b1), .resp_aes(c_aes), .resp_mac(c_mac),
    .resp_status(c_st),
    .cfg_we, .cfg_waddr, .cfg_wdata, .icap_ce_n, .icap_write_n, .icap_din, .icap_busy,
    .recfg_busy, .recfg_id, .recfg_done, .sub_state, .sccu_err,
    .fi_mod, .fi_cmp, .fi_voter
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q    <= 1'b0;
      mv_q      <= 1'b0;
      ecu_msg   <= '0;
      counter   <= '0;
      integrity <= 1'b0;
      status    <= '0;
    end else begin
      if (payload_valid && payload_ready) busy_q <= 1'b1;
      if (c_resp_valid) begin
        busy_q    <= 1'b0;
        mv_q      <= 1'b1;
        {ecu_msg, counter} <= c_aes;
        integrity <= c_st.integrity && !c_st.fail;
        status    <= c_st;
      end else if (mv_q && msg_ready) begin
        mv_q <= 1'b0;
      end
    end
  end

  assign msg_valid = mv_q;
  assign retx_req  = mv_q && !integrity;

  // the local digest is consumed through the status bit only
  logic unused_mac;
  assign unused_mac = ^c_mac;

endmodule

// red_sender_node: co-processor side of the sending ECU in the reconfigurable design.
//
// The application processor hands over a 64-bit ECU message. The node appends a 64-bit
// message counter (against replay), runs the fault-tolerant cryptographic module on the
// resulting 128-bit plaintext (AES-128 encryption in parallel with the SHA-3 HMAC, each under
// its own 128-bit key: "encrypt-and-MAC"), and forms the secure payload for the FlexRay bus:
// the 128-bit ciphertext followed by the 256-bit digest, 48 bytes, first byte in bits
// [383:376]. The payload is held until the next message so that it can be offered again when
// the receiver reports a lost integrity (`retx_req`).
// Following the document: message, counter and key sizes, encrypt-and-MAC, payload content.
// This design's own: the counter starting at 0 after reset and incrementing once per accepted
// message, the payload hold register and the valid/ready handshakes.
//
// Timing: one message is accepted when `msg_ready`; its payload appears on `payload_valid`
// about 110 cycles later in FT mode without faults, and is held until `payload_ready`.
module red_sender_node
  import crypto_pkg::*;
  import red_pkg::*;
#(
  parameter int unsigned MAX_RETRY    = 3,
  parameter int unsigned REGION_WORDS = 4096,
  localparam int unsigned CFG_AW      = $clog2(4 * REGION_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // from the application processor
  input  logic              msg_valid,
  output logic              msg_ready,
  input  logic [63:0]       ecu_msg,
  input  logic              ft_mode,
  input  blk128_t           key_aes,
  input  blk128_t           key_mac,
  // to the FlexRay interface
  output logic              payload_valid,
  input  logic              payload_ready,
  output logic [383:0]      payload,
  output status_t           status,
  input  logic              retx_req,
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
  logic [63:0] ctr_q;
  logic        busy_q, pv_q;
  logic        c_req_ready, c_resp_valid;
  blk128_t     c_aes;
  dig256_t     c_mac;
  status_t     c_st;

  red_ft_crypto #(.RECEIVER(1'b0), .MAX_RETRY(MAX_RETRY), .REGION_WORDS(REGION_WORDS)) u_crypto (
    .clk, .rst,
    .req_valid(msg_valid && msg_ready), .req_ready(c_req_ready), .req_ft(ft_mode),
    .req_data({ecu_msg, ctr_q}), .req_key_aes(key_aes), .req_key_mac(key_mac),
    .req_rx_mac('0),
    .resp_valid(c_resp_valid), .resp_ready(1'b1), .resp_aes(c_aes), .resp_mac(c_mac),
    .resp_status(c_st),
    .cfg_we, .cfg_waddr, .cfg_wdata, .icap_ce_n, .icap_write_n, .icap_din, .icap_busy,
    .recfg_busy, .recfg_id, .recfg_done, .sub_state, .sccu_err,
    .fi_mod, .fi_cmp, .fi_voter
  );

  // one message in flight; the next is accepted once the payload has left
  assign msg_ready = !busy_q && !pv_q && c_req_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctr_q   <= '0;
      busy_q  <= 1'b0;
      pv_q    <= 1'b0;
      payload <= '0;
      status  <= '0;
    end else begin
      if (msg_valid && msg_ready) begin
        busy_q <= 1'b1;
        ctr_q  <= ctr_q + 64'd1;
      end
      if (c_resp_valid) begin
        busy_q  <= 1'b0;
        pv_q    <= 1'b1;
        payload <= {c_aes, c_mac};
        status  <= c_st;
      end else if (pv_q && payload_ready) begin
        pv_q <= 1'b0;
      end else if (!pv_q && !busy_q && retx_req) begin
        pv_q <= 1'b1;   // offer the last payload again
      end
    end
  end

  assign payload_valid = pv_q;

endmodule

// red_ecu_top: the FPGA co-processors of a sending and a receiving reconfigurable ECU.
//
// The reconfigurable ECU pairs an ARM application processor with an FPGA co-processor that
// adds confidentiality (AES-128), integrity and authentication (SHA-3 HMAC) to every ECU
// message, and stays correct under faults through FT-SR-DMR: duplicated modules with a spare,
// triplicated comparators, a Berger-coded self-checking voter, a self-checking control unit
// and partial reconfiguration of a faulty module while the spare stands in. This top holds
// the sender node's and the receiver node's co-processor side by side. The application
// processors, the FlexRay interfaces and the bus between them, the key store and the ICAP
// primitives are outside the design: their signals are the ports here. To close the loop,
// connect `tx_payload*` to `rx_payload*` (the FlexRay bus) and `rx_retx_req` to
// `tx_retx_req`.
//
// Parameters: MAX_RETRY recomputations before a result is reported failed; REGION_WORDS
// 16-bit words of partial bitstream stored per reconfigurable module.
module red_ecu_top
  import crypto_pkg::*;
  import red_pkg::*;
#(
  parameter int unsigned MAX_RETRY    = 3,
  parameter int unsigned REGION_WORDS = 4096,
  localparam int unsigned CFG_AW      = $clog2(4 * REGION_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // ---------------- sender node
  input  logic              tx_msg_valid,
  output logic              tx_msg_ready,
  input  logic [63:0]       tx_ecu_msg,
  input  logic              tx_ft_mode,
  input  blk128_t           tx_key_aes,
  input  blk128_t           tx_key_mac,
  output logic              tx_payload_valid,
  input  logic              tx_payload_ready,
  output logic [383:0]      tx_payload,
  output status_t           tx_status,
  input  logic              tx_retx_req,
  input  logic              tx_cfg_we,
  input  logic [CFG_AW-1:0] tx_cfg_waddr,
  input  logic [15:0]       tx_cfg_wdata,
  output logic              tx_icap_ce_n,
  output logic              tx_icap_write_n,
  output logic [15:0]       tx_icap_din,
  input  logic              tx_icap_busy,
  output logic              tx_recfg_busy,
  output mod_id_t           tx_recfg_id,
  output logic              tx_recfg_done,
  output sub_e              tx_sub_state [NKIND],
  output logic              tx_sccu_err,
  input  logic [2:0]        tx_fi_mod [NKIND],
  input  logic [NCMP-1:0]   tx_fi_cmp,
  input  logic              tx_fi_voter,
  // ---------------- receiver node
  input  logic              rx_payload_valid,
  output logic              rx_payload_ready,
  input  logic [383:0]      rx_payload,
  input  logic              rx_ft_mode,
  input  blk128_t           rx_key_aes,
  input  blk128_t           rx_key_mac,
  output logic              rx_msg_valid,
  input  logic              rx_msg_ready,
  output logic [63:0]       rx_ecu_msg,
  output logic [63:0]       rx_counter,
  output logic              rx_integrity,
  output logic              rx_retx_req,
  output status_t           rx_status,
  input  logic              rx_cfg_we,
  input  logic [CFG_AW-1:0] rx_cfg_waddr,
  input  logic [15:0]       rx_cfg_wdata,
  output logic              rx_icap_ce_n,
  output logic              rx_icap_write_n,
  output logic [15:0]       rx_icap_din,
  input  logic              rx_icap_busy,
  output logic              rx_recfg_busy,
  output mod_id_t           rx_recfg_id,
  output logic              rx_recfg_done,
  output sub_e              rx_sub_state [NKIND],
  output logic              rx_sccu_err,
  input  logic [2:0]        rx_fi_mod [NKIND],
  input  logic [NCMP-1:0]   rx_fi_cmp,
  input  logic              rx_fi_voter
);

  red_sender_node #(.MAX_RETRY(MAX_RETRY), .REGION_WORDS(REGION_WORDS)) u_sender (
    .clk, .rst,
    .msg_valid(tx_msg_valid), .msg_ready(tx_msg_ready), .ecu_msg(tx_ecu_msg),
    .ft_mode(tx_ft_mode), .key_aes(tx_key_aes), .key_mac(tx_key_mac),
    .payload_valid(tx_payload_valid), .payload_ready(tx_payload_ready), .payload(tx_payload),
    .status(tx_status), .retx_req(tx_retx_req),
    .cfg_we(tx_cfg_we), .cfg_waddr(tx_cfg_waddr), .cfg_wdata(tx_cfg_wdata),
    .icap_ce_n(tx_icap_ce_n), .icap_write_n(tx_icap_write_n), .icap_din(tx_icap_din),
    .icap_busy(tx_icap_busy),
    .recfg_busy(tx_recfg_busy), .recfg_id(tx_recfg_id), .recfg_done(tx_recfg_done),
    .sub_state(tx_sub_state), .sccu_err(tx_sccu_err),
    .fi_mod(tx_fi_mod), .fi_cmp(tx_fi_cmp), .fi_voter(tx_fi_voter)
  );

  red_receiver_node #(.MAX_RETRY(MAX_RETRY), .REGION_WORDS(REGION_WORDS)) u_receiver (
    .clk, .rst,
    .payload_valid(rx_payload_valid), .payload_ready(rx_payload_ready), .payload(rx_payload),
    .ft_mode(rx_ft_mode), .key_aes(rx_key_aes), .key_mac(rx_key_mac),
    .msg_valid(rx_msg_valid), .msg_ready(rx_msg_ready), .ecu_msg(rx_ecu_msg),
    .counter(rx_counter), .integrity(rx_integrity), .retx_req(rx_retx_req),
    .status(rx_status),
    .cfg_we(rx_cfg_we), .cfg_waddr(rx_cfg_waddr), .cfg_wdata(rx_cfg_wdata),
    .icap_ce_n(rx_icap_ce_n), .icap_write_n(rx_icap_write_n), .icap_din(rx_icap_din),
    .icap_busy(rx_icap_busy),
    .recfg_busy(rx_recfg_busy), .recfg_id(rx_recfg_id), .recfg_done(rx_recfg_done),
    .sub_state(rx_sub_state), .sccu_err(rx_sccu_err),
    .fi_mod(rx_fi_mod), .fi_cmp(rx_fi_cmp), .fi_voter(rx_fi_voter)
  );

endmodule

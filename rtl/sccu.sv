// sccu: self-checking control unit of the FT-SR-DMR cryptographic module.
//
// Sequences one operation of the module and carries out the recovery policy:
//   * LAUNCH starts the AES and HMAC modules of the active kinds. In FT mode both regular
//     modules run (DMR); in NFT mode only the left one. A regular module that is being
//     reconfigured is replaced by the spare of its kind (`sub`).
//   * CHECK reads the self-checking voter once all selected results are in, and writes the
//     results of both regular modules into the result buffer.
//   * If a kind disagrees and its spare is free, the spare recomputes the same input
//     (SPARE_RUN); LOCALIZE compares its result with the two buffered ones: the module that
//     does not match is faulty, the spare's result is delivered, the spare takes the faulty
//     module's place and a partial reconfiguration of that module is requested.
//   * A Berger error of the voter, a disagreement while the spare is already in use, or a
//     spare result matching neither buffered result cause a recomputation, at most MAX_RETRY
//     times, after which the result is reported with `fail`.
//   * When the reconfiguration subsystem reports a module healed, the spare is released at
//     the next idle point.
// In the sender both kinds run in parallel on the message; in the receiver (RECEIVER = 1) AES
// decryption runs first and the HMAC phase then hashes the recovered plaintext.
// The state register is one-hot and checked every cycle (`state_err`), which is what makes
// the unit self-checking here.
// The document gives the policy (spare activation, localization against the buffer,
// reconfiguration, operation on the spare meanwhile); the retry limit, the handling of a
// second fault while the spare is busy and the state encoding are this design's choices.
//
// Interface: `req_valid`/`req_ready` accept an operation and its `req_ft` mode; the result is
// offered with `resp_valid` until `resp_ready`. All other outputs are strobes or levels for the
// datapath in red_ft_crypto. Synchronous active-high reset.
// With RECEIVER = 0 `latch_aes` is constant 0 (the sender has no HMAC phase), and
// `status.integrity` is always 0 here: the module above fills it in from the digest comparison.
module sccu
  import red_pkg::*;
#(
  parameter bit          RECEIVER  = 1'b0,
  parameter int unsigned MAX_RETRY = 3
) (
  input  logic             clk,
  input  logic             rst,
  // operation handshake
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_ft,
  output logic             resp_valid,
  input  logic             resp_ready,
  output status_t          status,
  // datapath control
  output logic             clr,
  output logic [NKIND-1:0] start_left,
  output logic [NKIND-1:0] start_right,
  output logic [NKIND-1:0] start_spare,
  output logic [NKIND-1:0] use_spare_left,
  output logic [NKIND-1:0] use_spare_right,
  output logic [NKIND-1:0] buf_we,
  output logic [NKIND-1:0] src_spare,      // deliver the spare's result for this kind
  output logic             latch_aes,      // receiver: AES phase resolved, start HMAC phase
  // status of the datapath
  input  logic [NKIND-1:0] left_valid,
  input  logic [NKIND-1:0] right_valid,
  input  logic [NKIND-1:0] spare_valid,
  input  logic [NKIND-1:0] ok,
  input  logic [NCMP-1:0]  disagree,
  input  logic             berger_err,
  input  logic [NKIND-1:0] spare_eq_left,
  input  logic [NKIND-1:0] spare_eq_right,
  // reconfiguration subsystem
  output logic             recfg_req,
  output mod_id_t          recfg_id,
  input  logic             recfg_busy,
  input  logic             recfg_done,
  output sub_e             sub_state [NKIND],
  output logic             state_err
);
  typedef enum logic [7:0] {
    S_IDLE     = 8'b0000_0001,
    S_LAUNCH   = 8'b0000_0010,
    S_WAIT     = 8'b0000_0100,
    S_CHECK    = 8'b0000_1000,
    S_SPARE    = 8'b0001_0000,
    S_LOCALIZE = 8'b0010_0000,
    S_PHASE    = 8'b0100_0000,
    S_RESP     = 8'b1000_0000
  } state_e;

  state_e           st_q;
  logic             ft_q;
  logic [NKIND-1:0] act_q;       // kinds computed in this phase
  logic [NKIND-1:0] pend_q;      // kinds waiting for their spare
  sub_e             sub_q [NKIND];
  logic [3:0]       pend_rc_q;   // reconfiguration requests not yet issued, by mod_id
  logic [3:0]       healed_q;    // reconfigurations finished, spare to be released
  mod_id_t          rc_id_q;
  logic             rc_active_q;
  status_t          st_info_q;
  logic [NKIND-1:0] src_q;

  logic [NKIND-1:0] ready_n;
  logic [3:0]       healed_n;

  // healed modules are consumed in S_IDLE, where their spare is released
  always_comb begin
    healed_n = healed_q;
    if (st_q == S_IDLE) healed_n = '0;
    if (recfg_done && rc_active_q) healed_n[rc_id_q] = 1'b1;
  end
  logic             all_ready;

  always_comb begin
    for (int t = 0; t < NKIND; t++)
      ready_n[t] = !act_q[t] || (left_valid[t] && (!ft_q || right_valid[t]));
    all_ready = &ready_n;
  end

  // start strobes and interface selection
  always_comb begin
    start_left  = '0;
    start_right = '0;
    start_spare = '0;
    for (int t = 0; t < NKIND; t++) begin
      use_spare_left[t]  = (sub_q[t] == SUB_LEFT);
      use_spare_right[t] = (sub_q[t] == SUB_RIGHT) && ft_q;
      if (st_q == S_LAUNCH && act_q[t]) begin
        start_left[t]  = (sub_q[t] != SUB_LEFT);
        start_right[t] = ft_q && (sub_q[t] != SUB_RIGHT);
        start_spare[t] = (sub_q[t] == SUB_LEFT) || (ft_q && sub_q[t] == SUB_RIGHT);
      end
      if (st_q == S_CHECK && ft_q && act_q[t] && !berger_err && !ok[t] && sub_q[t] == SUB_NONE)
        start_spare[t] = 1'b1;
    end
  end

  assign clr        = (st_q == S_LAUNCH);
  assign buf_we     = (st_q == S_CHECK && ft_q && !berger_err) ? act_q : '0;
  assign req_ready  = (st_q == S_IDLE);
  assign resp_valid = (st_q == S_RESP);
  assign status     = st_info_q;
  assign src_spare  = src_q;
  assign latch_aes  = (st_q == S_PHASE) && RECEIVER && act_q[T_AES];
  assign recfg_req  = !rc_active_q && !recfg_busy && (pend_rc_q != '0);
  assign recfg_id   = pend_rc_q[0] ? 2'd0 : pend_rc_q[1] ? 2'd1 : pend_rc_q[2] ? 2'd2 : 2'd3;
  assign sub_state  = sub_q;

  // one-hot check of the state register
  logic [3:0] hot_cnt;
  always_comb begin
    hot_cnt = '0;
    for (int i = 0; i < 8; i++) hot_cnt += 4'(st_q[i]);
    state_err = (hot_cnt != 4'd1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q        <= S_IDLE;
      ft_q        <= 1'b0;
      act_q       <= '0;
      pend_q      <= '0;
      src_q       <= '0;
      pend_rc_q   <= '0;
      healed_q    <= '0;
      rc_id_q     <= '0;
      rc_active_q <= 1'b0;
      st_info_q   <= '0;
      for (int t = 0; t < NKIND; t++) sub_q[t] <= SUB_NONE;
    end else begin
      // ---- reconfiguration bookkeeping
      if (recfg_req) begin
        rc_active_q          <= 1'b1;
        rc_id_q              <= recfg_id;
        pend_rc_q[recfg_id]  <= 1'b0;
      end
      if (recfg_done && rc_active_q) rc_active_q <= 1'b0;
      healed_q <= healed_n;

      unique case (st_q)
        S_IDLE: begin
          // release spares whose module has been reconfigured
          for (int t = 0; t < NKIND; t++) begin
            if (healed_q[2*t] && sub_q[t] == SUB_LEFT)  sub_q[t] <= SUB_NONE;
            if (healed_q[2*t+1] && sub_q[t] == SUB_RIGHT) sub_q[t] <= SUB_NONE;
          end
          if (req_valid) begin
            ft_q      <= req_ft;
            act_q     <= RECEIVER ? NKIND'(1 << T_AES) : '1;
            src_q     <= '0;
            st_info_q <= '0;
            st_q      <= S_LAUNCH;
          end
        end
        S_LAUNCH: st_q <= S_WAIT;
        S_WAIT:   if (all_ready) st_q <= ft_q ? S_CHECK : S_PHASE;
        S_CHECK: begin
          st_info_q.cmp_fault <= st_info_q.cmp_fault | disagree;
          if (berger_err) begin
            st_info_q.voter_err <= 1'b1;
            if (st_info_q.retries < 4'(MAX_RETRY)) begin
              st_info_q.retries <= st_info_q.retries + 4'd1;
              st_q <= S_LAUNCH;
            end else begin
              st_info_q.fail <= 1'b1;
              st_q <= S_RESP;
            end
          end else if ((act_q & ~ok) == '0) begin
            st_q <= S_PHASE;
          end else begin
            logic need_retry;
            need_retry = 1'b0;
            for (int t = 0; t < NKIND; t++)
              if (act_q[t] && !ok[t]) begin
                st_info_q.mismatch[t] <= 1'b1;
                if (sub_q[t] != SUB_NONE) need_retry = 1'b1;
              end
            if (need_retry) begin
              if (st_info_q.retries < 4'(MAX_RETRY)) begin
                st_info_q.retries <= st_info_q.retries + 4'd1;
                st_q <= S_LAUNCH;
              end else begin
                st_info_q.fail <= 1'b1;
                st_q <= S_RESP;
              end
            end else begin
              pend_q <= act_q & ~ok;
              st_q   <= S_SPARE;
            end
          end
        end
        S_SPARE: if ((pend_q & ~spare_valid) == '0) st_q <= S_LOCALIZE;
        S_LOCALIZE: begin
          logic lost;
          lost = 1'b0;
          for (int t = 0; t < NKIND; t++)
            if (pend_q[t]) begin
              if (spare_eq_left[t]) begin
                // right module faulty
                sub_q[t]                 <= SUB_RIGHT;
                pend_rc_q[2*t+1]         <= 1'b1;
                src_q[t]                 <= 1'b1;
                st_info_q.spare_used[t]  <= 1'b1;
              end else if (spare_eq_right[t]) begin
                sub_q[t]                 <= SUB_LEFT;
                pend_rc_q[2*t]           <= 1'b1;
                src_q[t]                 <= 1'b1;
                st_info_q.spare_used[t]  <= 1'b1;
              end else begin
                lost = 1'b1;
              end
            end
          pend_q <= '0;
          if (lost) begin
            if (st_info_q.retries < 4'(MAX_RETRY)) begin
              st_info_q.retries <= st_info_q.retries + 4'd1;
              st_q <= S_LAUNCH;
            end else begin
              st_info_q.fail <= 1'b1;
              st_q <= S_RESP;
            end
          end else begin
            st_q <= S_PHASE;
          end
        end
        S_PHASE: begin
          if (RECEIVER && act_q[T_AES]) begin
            act_q <= NKIND'(1 << T_MAC);
            st_q  <= S_LAUNCH;
          end else begin
            st_q <= S_RESP;
          end
        end
        S_RESP: if (resp_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A result is never offered while modules of the operation are still being started.
  assert property (@(posedge clk) disable iff (rst) resp_valid |-> (start_left == '0 && start_spare == '0));
  // Only one reconfiguration at a time.
  assert property (@(posedge clk) disable iff (rst) recfg_req |-> !rc_active_q);

endmodule

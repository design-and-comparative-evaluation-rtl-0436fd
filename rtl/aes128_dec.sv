// aes128_dec: iterative AES-128 decryption core (FIPS-197 inverse cipher), one round per clock.
//
// At the receiver node this core recovers the secure message (ECU message and counter) from the
// 128-bit ciphertext. The document names the operation only; the architecture is this design's
// own: the round keys are not stored. After `start` the core first runs the key schedule forward
// for 10 cycles to reach the last round key, then applies the inverse rounds while stepping the
// key schedule backwards (key_prev), so it needs one 128-bit key register only.
//
// Interface: a one-cycle `start` (accepted while not busy) samples `key` and `din`; `done`
// pulses for one cycle with `dout` valid 1 + 2*AES_ROUNDS = 21 cycles after `start`; `dout` holds
// until the next start. Synchronous active-high reset.
module aes128_dec
  import crypto_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  blk128_t key,
  input  blk128_t din,
  output logic    busy,
  output logic    done,
  output blk128_t dout
);
  typedef enum logic [1:0] {IDLE, EXPAND, ROUNDS} phase_e;

  phase_e     phase_q;
  blk128_t    state_q, rkey_q, ct_q;
  byte_t      rcon_q;
  logic [3:0] cnt_q;

  blk128_t rkey_prev, round_out;

  // rcon of round r is x^(r-1); stepping back divides by x in GF(2^8).
  function automatic byte_t xdiv(byte_t b);
    return b[0] ? ({1'b0, b[7:1]} ^ 8'h8d) : {1'b0, b[7:1]};
  endfunction

  always_comb begin
    rkey_prev = key_prev(rkey_q, rcon_q);
    // inverse round with the current round key applied first
    round_out = state_q ^ rkey_q;
    if (cnt_q != 4'(AES_ROUNDS)) round_out = inv_mix_columns(round_out);
    round_out = inv_sub_bytes(inv_shift_rows(round_out));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q <= IDLE;
      done    <= 1'b0;
      cnt_q   <= '0;
      state_q <= '0;
      rkey_q  <= '0;
      ct_q    <= '0;
      rcon_q  <= 8'h01;
    end else begin
      done <= 1'b0;
      unique case (phase_q)
        IDLE: if (start) begin
          rkey_q  <= key;
          ct_q    <= din;
          rcon_q  <= 8'h01;
          cnt_q   <= 4'd0;
          phase_q <= EXPAND;
        end
        EXPAND: begin
          rkey_q <= key_next(rkey_q, rcon_q);
          cnt_q  <= cnt_q + 4'd1;
          if (cnt_q == 4'(AES_ROUNDS - 1)) begin
            // rkey now becomes K10; rcon stays at the value that produced it
            state_q <= ct_q;
            cnt_q   <= 4'(AES_ROUNDS);
            phase_q <= ROUNDS;
          end else begin
            rcon_q <= xtime(rcon_q);
          end
        end
        ROUNDS: begin
          // cnt = 10 .. 1 applies round keys K10 .. K1; the last step also adds K0
          state_q <= (cnt_q == 4'd1) ? (round_out ^ rkey_prev) : round_out;
          rkey_q  <= rkey_prev;
          rcon_q  <= xdiv(rcon_q);
          cnt_q   <= cnt_q - 4'd1;
          if (cnt_q == 4'd1) begin
            phase_q <= IDLE;
            done    <= 1'b1;
          end
        end
        default: phase_q <= IDLE;
      endcase
    end
  end

  assign busy = (phase_q != IDLE);
  assign dout = state_q;

endmodule

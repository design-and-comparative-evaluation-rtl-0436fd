// keccak_f1600: iterative Keccak-f[1600] permutation (FIPS 202), one round per clock.
//
// The permutation behind SHA-3. The state is 25 lanes of 64 bits, lane A[x][y] at index 5*y+x
// (the document's "lane" of 8 bytes). Round constants and rotation offsets come from
// crypto_pkg, where they are computed from their definitions. The one-round-per-cycle
// structure is this design's own choice; the document only names SHA-3.
//
// Interface: a one-cycle `start` (accepted while not busy) loads `state_in`; `done` pulses one
// cycle with `state_out` valid 1 + KECCAK_ROUNDS = 25 cycles after `start`; `state_out` holds until
// the next start. Synchronous active-high reset.
module keccak_f1600
  import crypto_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  kstate_t state_in,
  output logic    busy,
  output logic    done,
  output kstate_t state_out
);
  kstate_t    s_q;
  logic [4:0] round_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q     <= '0;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        s_q     <= state_in;
        round_q <= '0;
        busy    <= 1'b1;
      end else if (busy) begin
        s_q     <= keccak_round(s_q, KECCAK_RC[round_q]);
        round_q <= round_q + 5'd1;
        if (round_q == 5'(KECCAK_ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign state_out = s_q;

endmodule

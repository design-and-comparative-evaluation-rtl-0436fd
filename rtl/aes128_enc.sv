// aes128_enc: iterative AES-128 encryption core (FIPS-197), one round per clock.
//
// In the reconfigurable ECU this core encrypts the 128-bit secure message (64-bit ECU message
// followed by a 64-bit counter) under a 128-bit secret key; the fault-tolerant module holds three
// of them (two in DMR, one spare). The document names the cipher and its block and key sizes;
// the round-per-cycle architecture with on-the-fly key expansion is this design's own choice.
//
// Interface: a one-cycle `start` (accepted while not busy) samples `key` and `din`. The core
// XORs the first round key on the start edge, then runs one round per cycle; `done` pulses for
// one cycle with `dout` valid 1 + AES_ROUNDS = 11 cycles after `start`, and `dout` holds until the
// next start. Synchronous active-high reset.
module aes128_enc
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
  blk128_t    state_q, rkey_q;
  byte_t      rcon_q;
  logic [3:0] round_q;

  blk128_t rkey_n, round_out;

  always_comb begin
    rkey_n    = key_next(rkey_q, rcon_q);
    round_out = shift_rows(sub_bytes(state_q));
    if (round_q != 4'(AES_ROUNDS)) round_out = mix_columns(round_out);
    round_out = round_out ^ rkey_n;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      round_q <= '0;
      state_q <= '0;
      rkey_q  <= '0;
      rcon_q  <= 8'h01;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state_q <= din ^ key;
        rkey_q  <= key;
        rcon_q  <= 8'h01;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= round_out;
        rkey_q  <= rkey_n;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'(AES_ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = state_q;

endmodule

// sha3_hmac: HMAC-SHA3-256 (FIPS 198-1 over FIPS 202 SHA3-256) of one 128-bit message.
//
// The document's MAC: a SHA-3 based HMAC giving a 256-bit message digest, keyed with its own
// 128-bit secret key, over the 128-bit secure message. The key is zero-padded to the SHA3-256
// block size of 136 bytes, so
//   digest = SHA3-256((K0 ^ opad) || SHA3-256((K0 ^ ipad) || m)),
// which takes exactly four Keccak-f[1600] permutations: inner key block, message block (the
// 16 message bytes with SHA-3 padding 0x06 .. 0x80), outer key block, inner-digest block.
// Each block is XORed into the rate (the first 17 lanes) of the state and permuted by one
// keccak_f1600 instance. Byte 0 of `msg`, `key` and `digest` is their most significant byte.
// The sequencing is this design's own; the document gives the HMAC construction by name only.
//
// Interface: a one-cycle `start` (accepted while not busy) samples `key` and `msg`; `done`
// pulses for one cycle with `digest` valid 1 + 4*(1+24+1) + 1 = 106 cycles after `start`; `digest`
// holds until the next start. Synchronous active-high reset.
module sha3_hmac
  import crypto_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  blk128_t key,
  input  blk128_t msg,
  output logic    busy,
  output logic    done,
  output dig256_t digest
);
  localparam int unsigned RATE_LANES = SHA3_256_RATE / 8;  // 17

  typedef enum logic [2:0] {IDLE, ABSORB, PERM, FINISH} st_e;

  st_e        st_q;
  logic [1:0] blk_q;       // 0: K^ipad, 1: message, 2: K^opad, 3: inner digest
  blk128_t    key_q, msg_q;
  kstate_t    state_q;
  kstate_t    perm_out, perm_in, block;
  logic       perm_start, perm_busy, perm_done;
  dig256_t    digest_q;
  lane_t      inner_q [4];  // inner hash, kept while the outer key block is absorbed

  keccak_f1600 u_perm (
    .clk, .rst,
    .start    (perm_start),
    .state_in (perm_in),
    .busy     (perm_busy),
    .done     (perm_done),
    .state_out(perm_out)
  );

  // the block of the current step, as lanes
  always_comb begin
    block = '0;
    unique case (blk_q)
      2'd0, 2'd2: begin
        for (int i = 0; i < RATE_LANES; i++)
          block[i] = (blk_q == 2'd0) ? {8{8'h36}} : {8{8'h5c}};
        block[0] = block[0] ^ bytes_to_lane(key_q[127:64]);
        block[1] = block[1] ^ bytes_to_lane(key_q[63:0]);
      end
      2'd1: begin
        block[0] = bytes_to_lane(msg_q[127:64]);
        block[1] = bytes_to_lane(msg_q[63:0]);
        block[2] = 64'h06;
        block[RATE_LANES-1] = 64'h80 << 56;
      end
      default: begin
        // inner digest: the first four lanes of the finished inner hash, in lane order
        for (int i = 0; i < 4; i++) block[i] = inner_q[i];
        block[4] = 64'h06;
        block[RATE_LANES-1] = 64'h80 << 56;
      end
    endcase
    // a new hash (blocks 0 and 2) starts from the all-zero state
    perm_in = (blk_q == 2'd0 || blk_q == 2'd2) ? block : (state_q ^ block);
  end

  assign perm_start = (st_q == ABSORB);

  // a block is only absorbed into an idle permutation
  assert property (@(posedge clk) disable iff (rst) perm_start |-> !perm_busy);

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q     <= IDLE;
      blk_q    <= '0;
      key_q    <= '0;
      msg_q    <= '0;
      state_q  <= '0;
      digest_q <= '0;
      inner_q  <= '{default: '0};
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        IDLE: if (start) begin
          key_q <= key;
          msg_q <= msg;
          blk_q <= 2'd0;
          st_q  <= ABSORB;
        end
        ABSORB: st_q <= PERM;
        PERM: if (perm_done) begin
          state_q <= perm_out;
          if (blk_q == 2'd1) for (int i = 0; i < 4; i++) inner_q[i] <= perm_out[i];
          if (blk_q == 2'd3) st_q <= FINISH;
          else begin
            blk_q <= blk_q + 2'd1;
            st_q  <= ABSORB;
          end
        end
        FINISH: begin
          for (int i = 0; i < 4; i++) digest_q[255-64*i -: 64] <= bytes_to_lane(state_q[i]);
          done <= 1'b1;
          st_q <= IDLE;
        end
        default: st_q <= IDLE;
      endcase
    end
  end

  assign busy   = (st_q != IDLE);
  assign digest = digest_q;

endmodule

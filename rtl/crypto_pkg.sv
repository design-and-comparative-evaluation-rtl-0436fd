// crypto_pkg: arithmetic shared by the AES-128 and SHA-3 cores.
//
// AES: the forward and inverse S-boxes are not typed in as tables; they are computed at
// elaboration by constant functions from their definition (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the FIPS-197 affine map with constant 0x63).
// MixColumns and its inverse are written with xtime. A 128-bit AES block keeps byte 0 in
// bits [127:120]; column c is bytes 4c..4c+3.
//
// SHA-3: the 24 Keccak-f[1600] round constants are computed by the rc(t) LFSR of FIPS 202,
// and the rho rotation offsets by the (x,y) -> (y,2x+3y) walk, also at elaboration. A state
// lane A[x][y] is element 5*y+x of a 25-lane array, little-endian in the byte stream.
package crypto_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] blk128_t;
  typedef logic [255:0] dig256_t;
  typedef logic [63:0]  lane_t;
  typedef lane_t [24:0] kstate_t;

  localparam int unsigned AES_ROUNDS    = 10;
  localparam int unsigned KECCAK_ROUNDS = 24;
  // SHA3-256 rate in bytes (block size B of HMAC).
  localparam int unsigned SHA3_256_RATE = 136;

  // ---------------------------------------------------------------- GF(2^8)
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic byte_t gf_inv(byte_t a);
    // a^254 = a^-1 (and 0 -> 0)
    byte_t r = 8'h01;
    byte_t s = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t aes_affine(byte_t b);
    byte_t o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return o ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] gen_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = aes_affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  function automatic logic [255:0][7:0] gen_inv_sbox();
    logic [255:0][7:0] f, t;
    f = gen_sbox();
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX     = gen_sbox();
  localparam logic [255:0][7:0] INV_SBOX = gen_inv_sbox();

  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t get_byte(blk128_t s, int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic blk128_t sub_bytes(blk128_t s);
    blk128_t o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = SBOX[s[127-8*i -: 8]];
    return o;
  endfunction

  function automatic blk128_t inv_sub_bytes(blk128_t s);
    blk128_t o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = INV_SBOX[s[127-8*i -: 8]];
    return o;
  endfunction

  // byte (r,c) is byte 4c+r
  function automatic blk128_t shift_rows(blk128_t s);
    blk128_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = get_byte(s, 4*((c+r)%4)+r);
    return o;
  endfunction

  function automatic blk128_t inv_shift_rows(blk128_t s);
    blk128_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*((c+r)%4)+r) -: 8] = get_byte(s, 4*c+r);
    return o;
  endfunction

  function automatic blk128_t mix_columns(blk128_t s);
    blk128_t o;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c); a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      o[127-8*(4*c)   -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[127-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic blk128_t inv_mix_columns(blk128_t s);
    blk128_t o;
    byte_t a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = get_byte(s, 4*c+r);
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = gf_mul(a[r], 8'h0e) ^ gf_mul(a[(r+1)%4], 8'h0b) ^
                                gf_mul(a[(r+2)%4], 8'h0d) ^ gf_mul(a[(r+3)%4], 8'h09);
    end
    return o;
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  // Next round key from the current one; rcon is the round constant byte.
  function automatic blk128_t key_next(blk128_t k, byte_t rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Previous round key from the current one (inverse of key_next).
  function automatic blk128_t key_prev(blk128_t k, byte_t rcon);
    logic [31:0] w0, w1, w2, w3, p0, p1, p2, p3;
    {w0, w1, w2, w3} = k;
    p3 = w3 ^ w2;
    p2 = w2 ^ w1;
    p1 = w1 ^ w0;
    p0 = w0 ^ sub_word({p3[23:0], p3[31:24]}) ^ {rcon, 24'h0};
    return {p0, p1, p2, p3};
  endfunction

  // ---------------------------------------------------------------- Keccak
  function automatic logic rc_bit(int t);
    logic [7:0] r = 8'h01;
    if (t % 255 == 0) return 1'b1;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    end
    return r[0];
  endfunction

  function automatic logic [23:0][63:0] gen_round_consts();
    logic [23:0][63:0] t;
    for (int ir = 0; ir < 24; ir++) begin
      t[ir] = '0;
      for (int j = 0; j <= 6; j++) t[ir][(1 << j) - 1] = rc_bit(j + 7*ir);
    end
    return t;
  endfunction

  function automatic logic [24:0][5:0] gen_rho_offsets();
    logic [24:0][5:0] t;
    int x, y, nx;
    t = '0;
    x = 1; y = 0;
    for (int k = 0; k < 24; k++) begin
      t[5*y+x] = 6'(((k+1)*(k+2)/2) % 64);
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return t;
  endfunction

  localparam logic [23:0][63:0] KECCAK_RC  = gen_round_consts();
  localparam logic [24:0][5:0]  KECCAK_RHO = gen_rho_offsets();

  function automatic lane_t rotl64(lane_t v, int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  // One round of Keccak-f[1600] (theta, rho, pi, chi, iota).
  function automatic kstate_t keccak_round(kstate_t a, lane_t rc);
    lane_t c [5];
    lane_t d [5];
    kstate_t b, o;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl64(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        // pi: B[y][2x+3y] = rot(A[x][y] ^ D[x], rho[x][y])
        b[5*((2*x+3*y)%5) + y] = rotl64(a[5*y+x] ^ d[x], 32'(KECCAK_RHO[5*y+x]));
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[5*y+x] = b[5*y+x] ^ (~b[5*y+(x+1)%5] & b[5*y+(x+2)%5]);
    o[0] = o[0] ^ rc;
    return o;
  endfunction

  // Byte i of a big-endian byte string placed little-endian in the Keccak lanes.
  function automatic lane_t bytes_to_lane(logic [63:0] be);
    lane_t l;
    for (int i = 0; i < 8; i++) l[8*i +: 8] = be[63-8*i -: 8];
    return l;
  endfunction

endpackage

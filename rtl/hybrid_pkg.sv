// hybrid_pkg: types, constants and constant functions shared by the hybrid
// AES-256 / SHA3-512 core.
//
// AES: a 128-bit block carries byte k (k = 0..15, input order) in bits
// [127-8k -: 8]; state element s[r][c] is byte r+4c, so column c is the
// 32-bit word in bits [127-32c -: 32] with row 0 in its top byte.
// Keccak: lane (x,y) of the 1600-bit state sits in bits [64*(x+5y) +: 64],
// and byte j of the sponge input is state bits [8j +: 8] (FIPS 202 order).
//
// The S-box is built from its definition, a multiplicative inverse in
// GF(2^8) followed by an affine transform, as the document describes it; the
// Keccak round constants and rotation offsets are generated from the FIPS 202
// LFSR and triangular-number formulas, so no table is typed in by hand.
package hybrid_pkg;

  localparam int unsigned AES_ROUNDS   = 14;   // AES-256
  localparam int unsigned AES_NK       = 8;    // key words
  localparam int unsigned AES_XWORDS   = 60;   // expanded key words
  localparam int unsigned KECCAK_ROUNDS = 24;  // 12 + 2*log2(64)
  localparam int unsigned SHA3_RATE    = 576;  // SHA3-512 rate r
  localparam int unsigned SHA3_OUT     = 512;

  typedef logic [7:0]    byte_t;
  typedef logic [31:0]   word_t;
  typedef logic [127:0]  block_t;
  typedef logic [63:0]   lane_t;
  typedef logic [1599:0] kstate_t;

  // Operating mode, encoded as in the document's control table
  // (AES/SHA3 = 1 selects AES).
  typedef enum logic {MODE_SHA3 = 1'b0, MODE_AES = 1'b1} mode_e;

  // ---------------- GF(2^8) arithmetic, polynomial x^8+x^4+x^3+x+1 -------
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254; 0 maps to 0.
  function automatic byte_t ginv(input byte_t a);
    byte_t r = 8'h01;
    byte_t s = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, s);   // 254 = 0b11111110
      s = gmul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(input byte_t a);
    byte_t b = rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
    return ginv(b);
  endfunction

  // InvMixColumns of one column word (row 0 in the top byte).
  function automatic word_t inv_mix_word(input word_t w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    return {gmul(a0,8'h0e) ^ gmul(a1,8'h0b) ^ gmul(a2,8'h0d) ^ gmul(a3,8'h09),
            gmul(a0,8'h09) ^ gmul(a1,8'h0e) ^ gmul(a2,8'h0b) ^ gmul(a3,8'h0d),
            gmul(a0,8'h0d) ^ gmul(a1,8'h09) ^ gmul(a2,8'h0e) ^ gmul(a3,8'h0b),
            gmul(a0,8'h0b) ^ gmul(a1,8'h0d) ^ gmul(a2,8'h09) ^ gmul(a3,8'h0e)};
  endfunction

  function automatic block_t inv_mix_block(input block_t b);
    return {inv_mix_word(b[127:96]), inv_mix_word(b[95:64]),
            inv_mix_word(b[63:32]), inv_mix_word(b[31:0])};
  endfunction

  // Integrated-LUT entry: {substituted byte, 32-bit mixed column word}.
  // addr[8] = 0: encryption, S(a) and the column {02,01,01,03}*S(a).
  // addr[8] = 1: decryption, S^-1(a) and the column {0e,09,0d,0b}*S^-1(a).
  function automatic logic [39:0] itable_entry(input logic [8:0] addr);
    byte_t s;
    if (!addr[8]) begin
      s = sbox(addr[7:0]);
      return {s, xtime(s), s, s, xtime(s) ^ s};
    end else begin
      s = inv_sbox(addr[7:0]);
      return {s, gmul(s,8'h0e), gmul(s,8'h09), gmul(s,8'h0d), gmul(s,8'h0b)};
    end
  endfunction

  // ---------------- Keccak-f[1600] constants ------------------------------
  function automatic logic rc_bit(input int t);
    logic [8:0] r = 9'h001;
    int n = t % 255;
    for (int i = 0; i < n; i++) begin
      r = {r[7:0], 1'b0};
      r[0] ^= r[8];
      r[4] ^= r[8];
      r[5] ^= r[8];
      r[6] ^= r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic lane_t round_constant(input int ir);
    lane_t rc = '0;
    for (int j = 0; j < 7; j++)
      rc[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return rc;
  endfunction

  // Rotation offset r[x][y] of the rho step.
  function automatic int rho_offset(input int x, input int y);
    int cx = 1, cy = 0, nx;
    if (x == 0 && y == 0) return 0;
    for (int t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % 64;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

  function automatic lane_t rotl64(input lane_t v, input int n);
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

endpackage

// ref_pkg: plain behavioural reference models used by the testbenches.
//
// AES-256 is written byte by byte straight from FIPS-197 (SubBytes,
// ShiftRows, MixColumns, AddRoundKey and the inverse cipher in its
// textbook order), and Keccak-f[1600]/SHA3-512 straight from FIPS 202 with
// its round-constant table, so neither shares code with the design (which
// uses merged tables and the equivalent inverse cipher). Byte layout is the
// design's: AES byte k in bits [127-8k -: 8], Keccak lane (x,y) in
// bits [64(x+5y) +: 64].
package ref_pkg;

  function automatic logic [7:0] r_xt(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = r_xt(a);
    end
    return p;
  endfunction

  // S-box tabulated on first use: the inverse of a is found by walking the
  // powers of 03 until the product with a is 01 (checked with r_mul).
  logic [7:0] sb_tab [256];
  logic [7:0] isb_tab [256];
  bit         sb_ready = 0;

  function automatic void r_init();
    logic [7:0] pw [255];
    logic [7:0] inv, s, p;
    p = 1;
    for (int i = 0; i < 255; i++) begin
      pw[i] = p;
      p = r_mul(p, 8'h03);
    end
    for (int a = 0; a < 256; a++) begin
      inv = 0;
      for (int i = 0; i < 255; i++)
        if (r_mul(8'(a), pw[i]) == 8'h01) begin
          inv = pw[i];
          break;
        end
      s = 8'h63;
      for (int k = 0; k < 5; k++) s ^= 8'((inv << k) | (inv >> (8 - k)));
      sb_tab[a] = s;
      isb_tab[s] = 8'(a);
    end
    sb_ready = 1;
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] a);
    if (!sb_ready) r_init();
    return sb_tab[a];
  endfunction

  function automatic logic [7:0] r_isbox(input logic [7:0] a);
    if (!sb_ready) r_init();
    return isb_tab[a];
  endfunction

  typedef logic [7:0] st_t [4][4];   // [row][col]

  function automatic st_t to_st(input logic [127:0] b);
    st_t s;
    for (int k = 0; k < 16; k++) s[k % 4][k / 4] = b[127 - 8 * k -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] b;
    for (int k = 0; k < 16; k++) b[127 - 8 * k -: 8] = s[k % 4][k / 4];
    return b;
  endfunction

  function automatic logic [127:0] r_shift_rows(input logic [127:0] b, input bit inv);
    st_t s = to_st(b), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        t[r][c] = inv ? s[r][(c + 4 - r) % 4] : s[r][(c + r) % 4];
    return from_st(t);
  endfunction

  typedef logic [127:0] rkeys_t [15];

  function automatic rkeys_t r_expand(input logic [255:0] key);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0] rc = 8'h01;
    rkeys_t rk;
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32 * i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i - 1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {r_sbox(t[31:24]), r_sbox(t[23:16]), r_sbox(t[15:8]), r_sbox(t[7:0])} ^ {rc, 24'h0};
        rc = r_xt(rc);
      end else if (i % 8 == 4) begin
        t = {r_sbox(t[31:24]), r_sbox(t[23:16]), r_sbox(t[15:8]), r_sbox(t[7:0])};
      end
      w[i] = w[i - 8] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = {w[4 * r], w[4 * r + 1], w[4 * r + 2], w[4 * r + 3]};
    return rk;
  endfunction

  function automatic logic [127:0] r_sub(input logic [127:0] b, input bit inv);
    for (int k = 0; k < 16; k++) b[8 * k +: 8] = inv ? r_isbox(b[8 * k +: 8]) : r_sbox(b[8 * k +: 8]);
    return b;
  endfunction

  function automatic logic [127:0] r_mix(input logic [127:0] b, input bit inv);
    st_t s = to_st(b), t;
    logic [7:0] m [4];
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 0;
        for (int k = 0; k < 4; k++) t[r][c] ^= r_mul(s[k][c], m[(k + 4 - r) % 4]);
      end
    return from_st(t);
  endfunction

  function automatic logic [127:0] r_aes_enc(input logic [255:0] key, input logic [127:0] pt);
    rkeys_t rk = r_expand(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 14; r++) begin
      s = r_shift_rows(r_sub(s, 0), 0);
      if (r != 14) s = r_mix(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] r_aes_dec(input logic [255:0] key, input logic [127:0] ct);
    rkeys_t rk = r_expand(key);
    logic [127:0] s = ct ^ rk[14];
    for (int r = 13; r >= 0; r--) begin
      s = r_sub(r_shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = r_mix(s, 1);
    end
    return s;
  endfunction

  // ---------------- Keccak-f[1600] ----------------
  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  localparam int ROT [5][5] = '{   // ROT[x][y]
    '{ 0, 36,  3, 41, 18}, '{ 1, 44, 10, 45,  2}, '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56}, '{27, 20, 39,  8, 14}};

  function automatic logic [63:0] r_rol(input logic [63:0] v, input int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic logic [1599:0] r_round(input logic [1599:0] s, input int ir);
    logic [63:0] a [5][5], b [5][5], c [5], d [5];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] = s[64 * (x + 5 * y) +: 64];
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ r_rol(c[(x + 1) % 5], 1);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) a[x][y] ^= d[x];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) b[y][(2 * x + 3 * y) % 5] = r_rol(a[x][y], ROT[x][y]);
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
      a[x][y] = b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
    a[0][0] ^= RC[ir];
    for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) s[64 * (x + 5 * y) +: 64] = a[x][y];
    return s;
  endfunction

  function automatic logic [1599:0] r_keccak_f(input logic [1599:0] s);
    for (int i = 0; i < 24; i++) s = r_round(s, i);
    return s;
  endfunction

  function automatic logic [319:0] r_theta_d(input logic [1599:0] s);
    logic [63:0] c [5];
    logic [319:0] d;
    for (int x = 0; x < 5; x++)
      c[x] = s[64 * x +: 64] ^ s[64 * (x + 5) +: 64] ^ s[64 * (x + 10) +: 64] ^ s[64 * (x + 15) +: 64] ^ s[64 * (x + 20) +: 64];
    for (int x = 0; x < 5; x++) d[64 * x +: 64] = c[(x + 4) % 5] ^ r_rol(c[(x + 1) % 5], 1);
    return d;
  endfunction

  // Reference rate block for the last message block: msg holds len bytes,
  // byte 0 at msg[575:568].
  function automatic logic [575:0] r_pad(input logic [575:0] msg, input int len, input bit last);
    logic [575:0] r = 0;
    for (int j = 0; j < 72; j++) if (!last || j < len) r[8 * j +: 8] = msg[575 - 8 * j -: 8];
    if (last) begin
      r[8 * len +: 8] ^= 8'h06;
      r[575:568] ^= 8'h80;
    end
    return r;
  endfunction
endpackage

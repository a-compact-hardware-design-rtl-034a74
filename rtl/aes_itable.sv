// aes_itable: the integrated look-up table (I-table) of the AES section.
//
// One 512-entry ROM merges the two most expensive AES transforms of both
// directions: SubBytes+MixColumns for encryption and InvSubBytes+
// InvMixColumns for decryption, as the document proposes. Each entry holds
// 40 bits: the substituted byte (used by the last round, which has no
// MixColumns, and by the key schedule) and the 32-bit column contribution of
// a byte sitting in row 0. A byte in row r contributes the same word rotated
// right by 8*r bytes, so the caller rotates instead of keeping four tables.
//
// Interface: dec selects the decryption half, din is the state byte.
// Timing: combinational (asynchronous read). The document aims the table at
// block RAM; a synchronous block-RAM read would add one cycle per round and
// is not used here, so the table maps to distributed ROM. Its initial
// contents are computed from the GF(2^8) definitions when the ROM is
// initialised.
module aes_itable
  import hybrid_pkg::*;
(
  input  logic  dec,
  input  byte_t din,
  output byte_t sub,   // S(din) or S^-1(din)
  output word_t mix    // column word for a byte in row 0
);
  logic [39:0] rom [512];

  // ROM initial contents. Powers of the generator 03 give exp/log tables,
  // so the inverse of a = 03^i is 03^(255-i); the affine transform then
  // gives S(a). The decryption half is filled at address S(a) with a, since
  // S^-1(S(a)) = a. Column products use only xtime chains.
  initial begin
    byte_t exp_t [256];
    byte_t log_t [256];
    byte_t p, inv, s, x2, x4, x8;
    p = 8'h01;
    log_t[0] = 8'h00;
    for (int i = 0; i < 256; i++) begin
      exp_t[i] = p;
      if (i < 255) log_t[p] = 8'(i);
      p = xtime(p) ^ p;
    end
    for (int a = 0; a < 256; a++) begin
      inv = (a == 0) ? 8'h00 : exp_t[(255 - int'(log_t[a])) % 255];
      s   = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      rom[a] = {s, xtime(s), s, s, xtime(s) ^ s};
      x2 = xtime(8'(a));
      x4 = xtime(x2);
      x8 = xtime(x4);
      rom[256 + int'(s)] = {8'(a), x8 ^ x4 ^ x2, x8 ^ 8'(a), x8 ^ x4 ^ 8'(a), x8 ^ x2 ^ 8'(a)};
    end
  end

  logic [39:0] q;
  always_comb q = rom[{dec, din}];
  assign sub = q[39:32];
  assign mix = q[31:0];
endmodule

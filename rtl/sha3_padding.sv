// sha3_padding: turns one 576-bit input block into a SHA3-512 rate block in
// Keccak state byte order, applying the SHA-3 padding on the last block.
//
// The input bus carries message byte 0 in its top byte (din[575:568]), as a
// hexadecimal string is written. The output puts byte j in bits [8j +: 8],
// the order in which the sponge XORs it into lanes 0..8 of the state.
// When last = 1, only the first len bytes (0..71) are message; the domain
// byte 0x06 is XORed in at byte len and 0x80 at byte 71 (the two merge into
// 0x86 when len = 71), and the rest is zero. When last = 0 all 72 bytes are
// message and len is ignored. A len above 71 with last = 1 is out of range
// and is treated as 71.
// Timing: combinational.
module sha3_padding
  import hybrid_pkg::*;
(
  input  logic [575:0] din,
  input  logic [6:0]   len,
  input  logic         last,
  output logic [575:0] rate_block
);
  logic [6:0] n;
  assign n = (len > 7'd71) ? 7'd71 : len;

  always_comb begin
    rate_block = '0;
    for (int j = 0; j < 72; j++) begin
      if (!last || j < int'(n))
        rate_block[8 * j +: 8] = din[575 - 8 * j -: 8];
    end
    if (last) begin
      rate_block[8 * n +: 8] = rate_block[8 * n +: 8] ^ 8'h06;
      rate_block[575:568]    = rate_block[575:568] ^ 8'h80;
    end
  end
endmodule

// aes_shiftrows_unified: ShiftRows and InvShiftRows merged into one byte
// permutation, selected by enc.
//
// Row r of the 4x4 state is rotated left by r positions for encryption and
// right by r positions for decryption; row 0 is never moved. Both
// directions share the wiring of rows 0 and 2 (rotating by two is its own
// inverse), so only rows 1 and 3 need a 2:1 multiplexer per byte.
// Interface: 128-bit block in and out, byte layout of hybrid_pkg.
// Timing: combinational.
module aes_shiftrows_unified
  import hybrid_pkg::*;
(
  input  logic   enc,
  input  block_t din,
  output block_t dout
);
  function automatic byte_t get(input block_t b, input int r, input int c);
    return b[127 - 8 * (r + 4 * c) -: 8];
  endfunction

  always_comb begin
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      dout[127 - 8 * (0 + 4 * c) -: 8] = get(din, 0, c);
      dout[127 - 8 * (2 + 4 * c) -: 8] = get(din, 2, (c + 2) % 4);
      dout[127 - 8 * (1 + 4 * c) -: 8] = enc ? get(din, 1, (c + 1) % 4) : get(din, 1, (c + 3) % 4);
      dout[127 - 8 * (3 + 4 * c) -: 8] = enc ? get(din, 3, (c + 3) % 4) : get(din, 3, (c + 1) % 4);
    end
  end
endmodule

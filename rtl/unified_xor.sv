// unified_xor: the unified XOR section shared by AES and SHA-3.
//
// Two XOR networks serve both algorithms, selected by mode:
//  N1, a bank of 5-input XORs. In AES mode it forms each output column of
//     a middle round from the four I-table words of that column and the
//     round-key column (4 words + key = 5 inputs), for NBLK blocks at once.
//     In SHA-3 mode it forms theta-1, the column parities
//     C[x] = A[x][0] ^ .. ^ A[x][4] (5 lanes = 5 inputs).
//  N2, a bank of 2-input XORs. In AES mode it does the key whitening
//     (block ^ first round key) and the AddRoundKey of the last round
//     (substituted bytes ^ last round key). In SHA-3 mode it forms theta-2,
//     D[x] = C[x-1] ^ ROT(C[x+1], 1), from the N1 result of the same cycle.
// Each bank is max(128*NBLK, 320) bits wide; the operand multiplexers at
// its inputs are the only extra cost of the sharing.
// Interface: aes_t holds, per block b, column c and row r, the rotated
// I-table word at aes_t[b][c][r]; aes_rk is the round key (one key for all
// blocks); aes_x is the N2 operand per block. Outputs not used in the
// current mode carry values of the other mode's operands and are ignored.
// Timing: combinational.
module unified_xor
  import hybrid_pkg::*;
#(
  parameter int unsigned NBLK = 4
) (
  input  mode_e        mode,
  input  word_t        aes_t [NBLK][4][4],
  input  block_t       aes_rk,
  input  block_t       aes_x [NBLK],
  input  kstate_t      sha_a,
  output block_t       aes_n1 [NBLK],
  output block_t       aes_n2 [NBLK],
  output logic [319:0] sha_c,
  output logic [319:0] sha_d
);
  localparam int unsigned W = (128 * NBLK > 320) ? 128 * NBLK : 320;

  logic [W-1:0] n1_in [5];
  logic [W-1:0] n1_out;
  logic [W-1:0] n2_a, n2_b, n2_out;

  // N1 operand selection.
  always_comb begin
    for (int k = 0; k < 5; k++) n1_in[k] = '0;
    if (mode == MODE_AES) begin
      for (int b = 0; b < int'(NBLK); b++)
        for (int c = 0; c < 4; c++) begin
          for (int r = 0; r < 4; r++)
            n1_in[r][128 * b + 32 * (3 - c) +: 32] = aes_t[b][c][r];
          n1_in[4][128 * b + 32 * (3 - c) +: 32] = aes_rk[127 - 32 * c -: 32];
        end
    end else begin
      for (int y = 0; y < 5; y++)
        for (int x = 0; x < 5; x++)
          n1_in[y][64 * x +: 64] = sha_a[64 * (x + 5 * y) +: 64];
    end
  end

  assign n1_out = n1_in[0] ^ n1_in[1] ^ n1_in[2] ^ n1_in[3] ^ n1_in[4];
  assign sha_c  = n1_out[319:0];

  // N2 operand selection.
  always_comb begin
    n2_a = '0;
    n2_b = '0;
    if (mode == MODE_AES) begin
      for (int b = 0; b < int'(NBLK); b++) begin
        n2_a[128 * b +: 128] = aes_x[b];
        n2_b[128 * b +: 128] = aes_rk;
      end
    end else begin
      for (int x = 0; x < 5; x++) begin
        n2_a[64 * x +: 64] = sha_c[64 * ((x + 4) % 5) +: 64];
        n2_b[64 * x +: 64] = rotl64(sha_c[64 * ((x + 1) % 5) +: 64], 1);
      end
    end
  end

  assign n2_out = n2_a ^ n2_b;
  assign sha_d  = n2_out[319:0];

  for (genvar b = 0; b < NBLK; b++) begin : g_out
    assign aes_n1[b] = n1_out[128 * b +: 128];
    assign aes_n2[b] = n2_out[128 * b +: 128];
  end
endmodule

// keccak_sixie: the Six-Input-Equation (SixIE) network of the Keccak-f[1600]
// round, followed by iota.
//
// The document keeps the first two theta equations (column parity C and
// the D word, computed in the unified XOR section) apart and merges the
// rest of the round -- theta-3, rho, pi and chi -- into one equation per
// output bit. With B[X][Y] = ROT(A[x][y] ^ D[x], r[x][y]) for X = y,
// Y = 2x+3y (mod 5), chi gives
//   A'[X][Y] = B[X][Y] ^ (~B[X+1][Y] & B[X+2][Y]),
// and since rho and pi are only wiring, each output bit is a function of
// exactly three state bits and three D bits: six inputs, one 6-input LUT
// on the FPGA. Iota then XORs the round constant of round rnd into lane
// (0,0). Constants and offsets are computed at elaboration (hybrid_pkg).
// Interface: state a, theta word d (lane x of D in d[64x +: 64]), round
// index rnd (0..23). Timing: combinational.
module keccak_sixie
  import hybrid_pkg::*;
(
  input  kstate_t      a,
  input  logic [319:0] d,
  input  logic [4:0]   rnd,
  output kstate_t      a_next
);
  lane_t rc_tab [KECCAK_ROUNDS];
  for (genvar i = 0; i < KECCAK_ROUNDS; i++) begin : g_rc
    assign rc_tab[i] = round_constant(i);
  end

  // B lanes: theta-3 XOR, rho rotation and pi placement (wiring only).
  lane_t b [5][5];   // b[X][Y]
  for (genvar x = 0; x < 5; x++) begin : g_bx
    for (genvar y = 0; y < 5; y++) begin : g_by
      assign b[y][(2 * x + 3 * y) % 5] =
        rotl64(a[64 * (x + 5 * y) +: 64] ^ d[64 * x +: 64], rho_offset(x, y));
    end
  end

  lane_t rc;
  assign rc = (rnd < 5'(KECCAK_ROUNDS)) ? rc_tab[rnd] : '0;

  for (genvar x = 0; x < 5; x++) begin : g_cx
    for (genvar y = 0; y < 5; y++) begin : g_cy
      if (x == 0 && y == 0) begin : g_iota
        assign a_next[0 +: 64] = b[0][0] ^ (~b[1][0] & b[2][0]) ^ rc;
      end else begin : g_chi
        assign a_next[64 * (x + 5 * y) +: 64] =
          b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
      end
    end
  end
endmodule

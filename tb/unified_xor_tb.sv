// unified_xor_tb: drives random operands in both modes and compares N1/N2
// outputs with independently computed AES column sums, AddRoundKey, and the
// SHA-3 theta-1 (C) and theta-2 (D) words.
module unified_xor_tb;
  import hybrid_pkg::*;
  import ref_pkg::*;
  localparam int NB = 4;
  mode_e mode;
  word_t aes_t [NB][4][4];
  block_t aes_rk;
  block_t aes_x [NB];
  kstate_t sha_a;
  block_t aes_n1 [NB];
  block_t aes_n2 [NB];
  logic [319:0] sha_c, sha_d;
  int checks = 0, failures = 0;

  unified_xor #(.NBLK(NB)) dut (.mode, .aes_t, .aes_rk, .aes_x, .sha_a, .aes_n1, .aes_n2, .sha_c, .sha_d);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [31:0] col;
    logic [63:0] c;
    for (int it = 0; it < 50; it++) begin
      mode = MODE_AES;
      aes_rk = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < NB; b++) begin
        aes_x[b] = {$urandom, $urandom, $urandom, $urandom};
        for (int cc = 0; cc < 4; cc++) for (int r = 0; r < 4; r++) aes_t[b][cc][r] = $urandom;
      end
      for (int k = 0; k < 50; k++) sha_a[32 * k +: 32] = $urandom;
      #1;
      for (int b = 0; b < NB; b++) begin
        check(aes_n2[b] == (aes_x[b] ^ aes_rk), "N2 AES");
        for (int cc = 0; cc < 4; cc++) begin
          col = aes_rk[127 - 32 * cc -: 32];
          for (int r = 0; r < 4; r++) col ^= aes_t[b][cc][r];
          check(aes_n1[b][127 - 32 * cc -: 32] == col, "N1 AES");
        end
      end
      mode = MODE_SHA3; #1;
      for (int x = 0; x < 5; x++) begin
        c = 0;
        for (int y = 0; y < 5; y++) c ^= sha_a[64 * (x + 5 * y) +: 64];
        check(sha_c[64 * x +: 64] == c, "theta-1 C");
      end
      check(sha_d == r_theta_d(sha_a), "theta-2 D");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// keccak_sixie_tb: feeds random states with the matching theta D word and
// compares each of the 24 rounds with the FIPS 202 reference round; a zero
// state exposes the round constants directly.
module keccak_sixie_tb;
  import ref_pkg::*;
  logic [1599:0] a, a_next;
  logic [319:0] d;
  logic [4:0] rnd;
  int checks = 0, failures = 0;

  keccak_sixie dut (.a, .d, .rnd, .a_next);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s rnd=%0d", what, rnd);
    end
  endtask

  initial begin
    for (int r = 0; r < 24; r++) begin
      a = '0; d = '0; rnd = 5'(r); #1;
      check(a_next == {1536'h0, RC[r]}, "round constant");
      for (int it = 0; it < 4; it++) begin
        for (int k = 0; k < 50; k++) a[32 * k +: 32] = $urandom;
        d = r_theta_d(a); #1;
        check(a_next == r_round(a, r), "round");
      end
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

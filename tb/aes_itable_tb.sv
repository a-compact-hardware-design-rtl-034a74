// aes_itable_tb: checks all 512 entries of the integrated LUT against the
// reference S-box and a direct GF(2^8) product, plus FIPS-197 S-box values.
module aes_itable_tb;
  import ref_pkg::*;
  logic dec;
  logic [7:0] din, sub;
  logic [31:0] mix;
  int checks = 0, failures = 0;

  aes_itable dut (.dec, .din, .sub, .mix);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s dec=%0d din=%02h sub=%02h mix=%08h", what, dec, din, sub, mix);
    end
  endtask

  initial begin
    logic [7:0] s;
    for (int d = 0; d < 2; d++)
      for (int a = 0; a < 256; a++) begin
        dec = d[0]; din = 8'(a); #1;
        s = d ? r_isbox(8'(a)) : r_sbox(8'(a));
        check(sub == s, "sub");
        if (!d) check(mix == {r_mul(s, 8'h02), s, s, r_mul(s, 8'h03)}, "enc mix");
        else    check(mix == {r_mul(s, 8'h0e), r_mul(s, 8'h09), r_mul(s, 8'h0d), r_mul(s, 8'h0b)}, "dec mix");
      end
    // FIPS-197 Figure 7 / Figure 14 spot values
    dec = 0; din = 8'h00; #1; check(sub == 8'h63, "S(00)");
    dec = 0; din = 8'h53; #1; check(sub == 8'hed, "S(53)");
    dec = 0; din = 8'hff; #1; check(sub == 8'h16, "S(ff)");
    dec = 1; din = 8'h63; #1; check(sub == 8'h00, "Si(63)");
    dec = 1; din = 8'h00; #1; check(sub == 8'h52, "Si(00)");
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

// aes_shiftrows_unified_tb: compares both directions with the reference
// permutation on fixed and random blocks, and checks that InvShiftRows
// undoes ShiftRows.
module aes_shiftrows_unified_tb;
  import ref_pkg::*;
  logic enc;
  logic [127:0] din, dout, fwd;
  int checks = 0, failures = 0;

  aes_shiftrows_unified dut (.enc, .din, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s enc=%0d din=%h dout=%h", what, enc, din, dout);
    end
  endtask

  initial begin
    // byte k holds value k: ShiftRows of 00..0f is 00 05 0a 0f 04 09 0e 03 ...
    enc = 1; din = 128'h000102030405060708090a0b0c0d0e0f; #1;
    check(dout == 128'h00050a0f04090e03080d02070c01060b, "fixed enc");
    enc = 0; #1;
    check(dout == 128'h000d0a0704010e0b0805020f0c090603, "fixed dec");
    for (int i = 0; i < 200; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      enc = 1; #1; check(dout == r_shift_rows(din, 0), "enc"); fwd = dout;
      enc = 0; #1; check(dout == r_shift_rows(din, 1), "dec");
      din = fwd; #1; check(dout == {din == fwd ? r_shift_rows(fwd, 1) : 128'h0}, "round trip");
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

// sha3_padding_tb: checks byte reordering and the 0x06 ... 0x80 padding for
// every message length 0..71, and the pass-through of non-final blocks.
module sha3_padding_tb;
  import ref_pkg::*;
  logic [575:0] din, rate_block;
  logic [6:0] len;
  logic last;
  int checks = 0, failures = 0;

  sha3_padding dut (.din, .len, .last, .rate_block);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s len=%0d last=%0d", what, len, last);
    end
  endtask

  initial begin
    // empty message: first byte 0x06, last byte 0x80
    din = '1; len = 0; last = 1; #1;
    check(rate_block == {8'h80, 560'h0, 8'h06}, "empty message");
    len = 71; #1;
    check(rate_block[575:568] == 8'h86 && rate_block[7:0] == 8'hff, "71 bytes");
    for (int l = 0; l < 72; l++)
      for (int rep = 0; rep < 3; rep++) begin
        for (int k = 0; k < 18; k++) din[32 * k +: 32] = $urandom;
        len = 7'(l); last = 1; #1;
        check(rate_block == r_pad(din, l, 1), "last block");
        last = 0; #1;
        check(rate_block == r_pad(din, 72, 0), "full block");
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

// aes_key_schedule_tb: expands the FIPS-197 Appendix A.3 key and random
// keys, compares all 15 round keys with the reference expansion, checks the
// InvMixColumns read path and that expansion takes 52 cycles.
module aes_key_schedule_tb;
  import ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, ready, rd_invmix = 0;
  logic [255:0] key;
  logic [3:0] rd_idx = 0;
  logic [127:0] rk;
  int checks = 0, failures = 0, cycles;

  aes_key_schedule dut (.clk, .rst_n, .start, .key, .busy, .ready, .rd_idx, .rd_invmix, .rk);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s idx=%0d rk=%h", what, rd_idx, rk);
    end
  endtask

  task automatic expand_and_check(input logic [255:0] k);
    rkeys_t ref_rk = r_expand(k);
    key = k;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!ready) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 52, "expansion cycles");
    for (int r = 0; r < 15; r++) begin
      rd_idx = 4'(r); rd_invmix = 0; #1;
      check(rk == ref_rk[r], "round key");
      rd_invmix = 1; #1;
      check(rk == r_mix(ref_rk[r], 1), "inv-mixed round key");
    end
    rd_invmix = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expand_and_check(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    rd_idx = 4'd2; #1; check(rk[127:96] == 32'h9ba35411, "FIPS-197 w[8]");
    rd_idx = 4'd14; #1; check(rk[31:0] == 32'h706c631e, "FIPS-197 w[59]");
    for (int i = 0; i < 5; i++)
      expand_and_check({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// led_display_tb: loads a result, steps through all 32 pages with button
// presses (checking the wrap-around and that a held button counts once),
// and checks that a new load returns to page 0.
module led_display_tb;
  logic clk = 0, rst_n = 0, load = 0, btn_next = 0;
  logic [511:0] result;
  logic [15:0] led;
  logic [4:0] page;
  int checks = 0, failures = 0;

  led_display dut (.clk, .rst_n, .load, .result, .btn_next, .led, .page);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s page=%0d led=%h", what, page, led);
    end
  endtask

  task automatic press(input int hold);
    @(negedge clk) btn_next = 1;
    repeat (hold) @(negedge clk);
    btn_next = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 16; k++) result[32 * k +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int p = 0; p < 34; p++) begin
      check(page == 5'(p % 32), "page number");
      check(led == result[511 - 16 * (p % 32) -: 16], "page contents");
      press(1 + p % 3);
    end
    @(negedge clk) begin load = 1; result = ~result; end
    @(negedge clk) load = 0;
    check(page == 0 && led == result[511:496], "reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// led_display: shows a 512-bit result on 16 LEDs, 16 bits at a time.
//
// The board has 16 LEDs, so the result is shown as 32 pages of 16 bits,
// page 0 being bits [511:496] (the first two output bytes). A push button
// steps to the next page; it is synchronised with two flip-flops and only
// its rising edge counts, so one press advances exactly one page. The
// page counter wraps from 31 to 0. load (one cycle, from the core's done)
// captures a new result and returns to page 0. The button is assumed to be
// debounced on the board.
// Interface: led is the page's 16 bits (led[15] = most significant bit),
// page is the current page number.
// Timing: led and page change one clock after load and three clocks after
// the button's rising edge reaches btn_next.
module led_display (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [511:0] result,
  input  logic         btn_next,
  output logic [15:0]  led,
  output logic [4:0]   page
);
  logic [511:0] shown;
  logic [2:0]   btn_sync;   // two synchroniser stages plus edge history

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shown    <= '0;
      page     <= '0;
      btn_sync <= '0;
    end else begin
      btn_sync <= {btn_sync[1:0], btn_next};
      if (load) begin
        shown <= result;
        page  <= '0;
      end else if (btn_sync[1] && !btn_sync[2]) begin
        page  <= page + 5'd1;
      end
    end
  end

  assign led = shown[511 - 16 * page -: 16];
endmodule

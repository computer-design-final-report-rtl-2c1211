// clk_div4: divide-by-four counter for the video logic.
//
// A free-running 2-bit counter on the 50 MHz system clock. 'ce' is high
// for one clock in every four, giving the 12.5 MHz pixel rate as a clock
// enable, and 'clk_out' is the counter's top bit, a 12.5 MHz square wave.
// The video logic in this design runs on the system clock gated by 'ce',
// so no second clock domain exists; clk_out is provided for an external
// use. The divide-by-four counter is the design's; using it as a clock
// enable rather than as a clock is this implementation's choice. rst is
// synchronous, active high.
module clk_div4 (
  input  logic clk,
  input  logic rst,
  output logic ce,
  output logic clk_out
);

  logic [1:0] cnt;

  always_ff @(posedge clk)
    if (rst) cnt <= '0;
    else     cnt <= cnt + 2'd1;

  assign ce      = (cnt == 2'd3);
  assign clk_out = cnt[1];

endmodule

// sevenseg_io: seven-segment display register at address 0xc000.
//
// One 8-bit register whose bits drive the display segments directly:
// bit 0 drives segment 1, bit 1 segment 2, ... bit 6 segment 7; bit 7 is
// stored but drives nothing. A write (we high for one clock while sel is
// high) stores the low byte of wdata; reads return the register in the low
// byte of rdata. rst (synchronous, active high) clears it, a choice of this
// implementation.
module sevenseg_io
  import cr16_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sel,
  input  logic       we,
  input  word_t      wdata,
  output word_t      rdata,
  output logic [6:0] seg
);

  logic [7:0] q;

  always_ff @(posedge clk)
    if (rst)            q <= '0;
    else if (sel && we) q <= wdata[7:0];

  assign seg   = q[6:0];
  assign rdata = {8'h00, q};

endmodule

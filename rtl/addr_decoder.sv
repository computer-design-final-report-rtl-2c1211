// addr_decoder: memory-mapped I/O address decoder.
//
// Looks at the 16-bit word address of every memory access and raises
//   io_en    for the whole I/O quadrant 0xc000..0xffff
//   seg_en   0xc000       seven-segment display
//   ppi_en   0xc100       parallel port
//   uart_en  0xc200 and 0xc300, UART data and status/control
//   ps2_en   0xc400       PS/2 keyboard
//   vga_en   0xd000..0xdbff VGA frame buffer
// Purely combinational. The map is the design's; decoding each device on
// the upper address byte only (so 0xc000..0xc0ff all select the display)
// is this implementation's own simplification.
module addr_decoder
  import cr16_pkg::*;
(
  input  word_t addr,
  output logic  io_en,
  output logic  seg_en,
  output logic  ppi_en,
  output logic  uart_en,
  output logic  ps2_en,
  output logic  vga_en
);

  assign io_en   = (addr[15:14] == 2'b11);
  assign seg_en  = (addr[15:8] == 8'hc0);
  assign ppi_en  = (addr[15:8] == 8'hc1);
  assign uart_en = (addr[15:9] == 7'b1100_001);          // 0xc2xx, 0xc3xx
  assign ps2_en  = (addr[15:8] == 8'hc4);
  assign vga_en  = (addr[15:12] == 4'hd) && (addr[11:10] != 2'b11);  // < 0xdc00

endmodule

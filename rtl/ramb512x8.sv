// ramb512x8: 512 x 8-bit synchronous single-port block RAM, one bank of the
// VGA frame buffer (the 4-kbit block RAM primitive the design uses).
//
// When en is high at a rising clock edge: if we is high, din is written at
// addr; dout always registers the word at addr as it was before the edge
// (read-first). When en is low nothing changes. rst clears dout only; the
// memory array has no reset, as in the primitive.
module ramb512x8 (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       we,
  input  logic [8:0] addr,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  logic [7:0] mem [512];

  always_ff @(posedge clk)
    if (en && we) mem[addr] <= din;

  always_ff @(posedge clk)
    if (rst)     dout <= '0;
    else if (en) dout <= mem[addr];

endmodule

// dpram16x8: 16-deep, 8-bit-wide dual-port RAM, the building block of the
// register file (two of them side by side make 16 x 16 bits).
//
// One synchronous write port (we, a_addr, din) and two asynchronous read
// ports: spo reads the word at a_addr, dpo the word at d_addr. A write at
// the rising clock edge is visible on the read ports right after the edge.
// This matches the distributed dual-port RAM primitive the design names.
// The RAM is cleared by no reset; the register file is written before use.
module dpram16x8 (
  input  logic       clk,
  input  logic       we,
  input  logic [3:0] a_addr,
  input  logic [3:0] d_addr,
  input  logic [7:0] din,
  output logic [7:0] spo,
  output logic [7:0] dpo
);

  logic [7:0] mem [16];

  always_ff @(posedge clk)
    if (we) mem[a_addr] <= din;

  assign spo = mem[a_addr];
  assign dpo = mem[d_addr];

endmodule

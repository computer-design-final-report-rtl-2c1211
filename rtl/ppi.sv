// ppi: parallel port interface at address 0xc100.
//
// Two registers. The 8-bit receive register samples the eight port data
// lines every clock; a load from 0xc100 returns it in the low byte. The
// 3-bit send register drives the three port status lines; a store to
// 0xc100 loads it from bits [2:0] of the written word. rst (synchronous,
// active high) clears both. The sampling every clock (which also
// synchronises the external lines) and the reset are this implementation's
// choices.
module ppi
  import cr16_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sel,
  input  logic       we,
  input  word_t      wdata,
  output word_t      rdata,
  input  logic [7:0] port_data,    // parallel port data lines (in)
  output logic [2:0] port_status   // parallel port status lines (out)
);

  logic [7:0] rx_q;

  always_ff @(posedge clk)
    if (rst) begin
      rx_q        <= '0;
      port_status <= '0;
    end else begin
      rx_q <= port_data;
      if (sel && we) port_status <= wdata[2:0];
    end

  assign rdata = {8'h00, rx_q};

endmodule

// vga_bram: 3 KB VGA frame buffer, 3072 x 8 bits, built from six 512 x 8
// block RAM banks.
//
// addr_in[8:0] goes to every bank; addr_in[11:9] is decoded to enable one
// of the six banks, and an 8-to-1 mux, steered by the registered bank
// number, picks that bank's output (the two unused mux inputs read 0).
// Each byte holds four 2-bit pixels. Reads are synchronous: data_out shows
// the byte one clock after the address. A write stores data_in at the
// rising edge when en and write_en are high. The frame buffer has one port;
// which side drives it (the CPU writing, or the VGA core reading) is
// chosen outside. clear (synchronous, active high) resets the output
// registers. Bank count, bank size, decoder and mux follow the design.
module vga_bram #(
  parameter int unsigned BANKS = 6
) (
  input  logic        clk,
  input  logic        clear,
  input  logic [11:0] addr_in,
  input  logic [7:0]  data_in,
  output logic [7:0]  data_out,
  input  logic        en,
  input  logic        write_en
);

  logic [7:0] bank_out [8];
  logic [2:0] bank_q;

  for (genvar i = 0; i < 8; i++) begin : g_bank
    if (i < BANKS) begin : g_ram
      ramb512x8 u_ram (
        .clk  (clk),
        .rst  (clear),
        .en   (en && addr_in[11:9] == 3'(i)),
        .we   (write_en),
        .addr (addr_in[8:0]),
        .din  (data_in),
        .dout (bank_out[i])
      );
    end else begin : g_none
      assign bank_out[i] = 8'h00;
    end
  end

  always_ff @(posedge clk)
    if (clear)   bank_q <= '0;
    else if (en) bank_q <= addr_in[11:9];

  assign data_out = bank_out[bank_q];

endmodule

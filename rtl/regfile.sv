// regfile: 16 x 16-bit register file with one write and two read ports.
//
// As in the design it is two 16x8 dual-port RAMs, one holding the upper
// byte and one the lower byte of every register. A_Addr_In names the
// destination register: it is written with Data_In at the rising edge when
// Write is high, and read on SPO_Out. D_Addr_In names the source register,
// read on DPO_Out. Reads are combinational. There is no reset: the
// registers power up unknown, as the RAM macros do.
module regfile
  import cr16_pkg::*;
(
  input  logic       clk,
  input  logic       write,
  input  logic [3:0] a_addr_in,
  input  logic [3:0] d_addr_in,
  input  word_t      data_in,
  output word_t      spo_out,
  output word_t      dpo_out
);

  dpram16x8 u_hi (
    .clk    (clk),
    .we     (write),
    .a_addr (a_addr_in),
    .d_addr (d_addr_in),
    .din    (data_in[15:8]),
    .spo    (spo_out[15:8]),
    .dpo    (dpo_out[15:8])
  );

  dpram16x8 u_lo (
    .clk    (clk),
    .we     (write),
    .a_addr (a_addr_in),
    .d_addr (d_addr_in),
    .din    (data_in[7:0]),
    .spo    (spo_out[7:0]),
    .dpo    (dpo_out[7:0])
  );

endmodule

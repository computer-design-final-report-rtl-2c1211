// alu: 16-bit arithmetic/logic unit of the CR16-style CPU.
//
// Four units run in parallel and a 4-to-1 output mux picks one:
//   OUT_LOGIC  AND / OR / XOR of A and B, or A itself, chosen by {bl1,bl0}
//   OUT_ADDER  A + B or A - B (add_en = 1 adds, 0 subtracts)
//   OUT_SHIFT  A shifted logically by one bit: left when B is zero or
//              positive, right when B is negative (its sign bit is set)
//   OUT_PASSB  B unchanged
// Flags come from the adder alone, as in the design: zero is a NOR of the
// adder sum, carry_out is the adder carry XORed with "subtract", so on a
// subtraction it reads as a borrow, and ofl is two's-complement overflow.
// Fully combinational, no clock. The unit split, the flag gates and the
// output-mux order follow the design; the code of the fourth logic-mux
// input (pass A, used to move the PC into the ALU result register) is an
// inference from the controller's use of bl0/bl1 and is this design's own.
module alu
  import cr16_pkg::*;
(
  input  word_t      alu_in_a,
  input  word_t      alu_in_b,
  input  alu_logic_e bl,        // {BL1, BL0}
  input  alu_out_e   out_sel,   // {ALU_OUT_S1, ALU_OUT_S0}
  input  logic       add_en,    // 1: add, 0: subtract
  output word_t      alu_out,
  output logic       carry_out,
  output logic       ofl,
  output logic       zero
);

  word_t logic_res, add_res, shift_res;
  logic  co;

  // Adder/subtractor: A + (B ^ {16{sub}}) + sub
  always_comb begin
    word_t b_eff;
    b_eff            = add_en ? alu_in_b : ~alu_in_b;
    {co, add_res}    = {1'b0, alu_in_a} + {1'b0, b_eff} + {16'd0, !add_en};
    carry_out        = co ^ !add_en;
    ofl              = (alu_in_a[15] == b_eff[15]) && (add_res[15] != alu_in_a[15]);
    zero             = ~|add_res;
  end

  always_comb begin
    unique case (bl)
      BL_AND:  logic_res = alu_in_a & alu_in_b;
      BL_OR:   logic_res = alu_in_a | alu_in_b;
      BL_XOR:  logic_res = alu_in_a ^ alu_in_b;
      default: logic_res = alu_in_a;
    endcase
  end

  assign shift_res = alu_in_b[15] ? {1'b0, alu_in_a[15:1]} : {alu_in_a[14:0], 1'b0};

  always_comb begin
    unique case (out_sel)
      OUT_LOGIC: alu_out = logic_res;
      OUT_ADDER: alu_out = add_res;
      OUT_SHIFT: alu_out = shift_res;
      default:   alu_out = alu_in_b;
    endcase
  end

endmodule

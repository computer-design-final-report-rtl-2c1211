// controller: multicycle control state machine and instruction decoder.
//
// Moore machine with the 19 states S0..S18 of the design's state graph.
// Every instruction starts with the four fetch states
//   S0  ALU result register <- PC (logic mux set to pass A)
//   S16 MAR <- PC
//   S14 read request r held until the memory interface answers rddone
//   S15 IR <- read data
// then S1 increments the PC and decodes the instruction into one of six
// paths:
//   R-type (ADD SUB CMP AND OR XOR MOV LSH)         S2  -> S3 (write back)
//   I-type (ADDI SUBI CMPI ANDI ORI XORI MOVI LSHI LUI) S4 -> S3
//   LOAD / STOR   S5 (address to ALU result) -> S6 S18 S8 (load) or
//                 S7 S17 (store; w held until wrdone)
//   Jcond         S10 (target register to ALU result) -> S11
//   Bcond         S12 (PC + sign-extended displacement) -> S11
//   JAL           S9 (PC <- target, ALU result <- return PC) -> S13 (link)
// and returns to S0. S11 loads the PC only when the condition in IR[11:8]
// holds for the PSR flags. Instructions with an unused encoding go straight
// back to S0. The states, their paths and their named control outputs
// follow the design's state graph; the opcode-dependent ALU settings in S2
// and S4, the PSR update (carry and overflow on add and subtract; carry,
// zero and negative on compare, as in the CR16 baseline), the
// suppression of write-back for CMP/CMPI and the condition test in S11 are
// this implementation's reading of what the graph calls its conditional
// signals. rst is synchronous, active high, and returns to S0.
module controller
  import cr16_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  ir,
  input  flags_t flags,
  input  logic   rddone,
  input  logic   wrdone,
  output ctrl_t  ctrl,
  output logic   r,        // read request to the memory interface
  output logic   w,        // write request to the memory interface
  output state_e state
);

  typedef enum logic [2:0] {
    P_RTYPE, P_ITYPE, P_MEM, P_JCOND, P_BCOND, P_JAL, P_NONE
  } path_e;

  opcode_e    op;
  logic [3:0] ext;
  path_e      path;
  state_e     next;
  logic       is_cmp;

  assign op  = opcode_e'(ir[15:12]);
  assign ext = ir[7:4];

  // Which of the six paths the instruction takes
  always_comb begin
    path = P_NONE;
    unique case (op)
      OP_RTYPE:
        if (ext inside {EXT_AND, EXT_OR, EXT_XOR, EXT_ADD, EXT_SUB, EXT_CMP, EXT_MOV})
          path = P_RTYPE;
      OP_SHIFT: path = (ext == EXT_LSH) ? P_RTYPE : P_ITYPE;
      OP_ANDI, OP_ORI, OP_XORI, OP_ADDI, OP_SUBI, OP_CMPI, OP_MOVI, OP_LUI:
        path = P_ITYPE;
      OP_MEM:
        if (ext == EXT_LOAD || ext == EXT_STOR) path = P_MEM;
        else if (ext == EXT_JCND)               path = P_JCOND;
        else if (ext == EXT_JAL)                path = P_JAL;
      OP_BCOND: path = P_BCOND;
      default: path = P_NONE;
    endcase
  end

  assign is_cmp = (op == OP_CMPI) || (op == OP_RTYPE && ext == EXT_CMP);

  // Next state
  always_comb begin
    next = state;
    unique case (state)
      S0:  next = S16;
      S16: next = S14;
      S14: if (rddone) next = S15;
      S15: next = S1;
      S1:
        unique case (path)
          P_RTYPE: next = S2;
          P_ITYPE: next = S4;
          P_MEM:   next = S5;
          P_JCOND: next = S10;
          P_BCOND: next = S12;
          P_JAL:   next = S9;
          default: next = S0;
        endcase
      S2, S4: next = S3;
      S3:  next = S0;
      S5:  next = (ext == EXT_STOR) ? S7 : S6;
      S6:  next = S18;
      S18: if (rddone) next = S8;
      S8:  next = S0;
      S7:  next = S17;
      S17: if (wrdone) next = S0;
      S10, S12: next = S11;
      S11: next = S0;
      S9:  next = S13;
      S13: next = S0;
      default: next = S0;
    endcase
  end

  always_ff @(posedge clk)
    if (rst) state <= S0;
    else     state <= next;

  // ALU settings of S2/S4 from the opcode ("conditional signals")
  function automatic ctrl_t alu_from_opcode(input ctrl_t c_in);
    ctrl_t c;
    logic [3:0] f;
    c = c_in;
    f = (op == OP_RTYPE) ? ext : ir[15:12];
    if (op == OP_SHIFT) begin
      c.out_sel = OUT_SHIFT;
      c.imm_mode = IMM_SEXT5;
    end else if (op == OP_LUI) begin
      c.out_sel = OUT_PASSB;
      c.imm_mode = IMM_LUI;
    end else begin
      unique case (f)
        EXT_AND: begin c.out_sel = OUT_LOGIC; c.bl = BL_AND; end
        EXT_OR:  begin c.out_sel = OUT_LOGIC; c.bl = BL_OR;  end
        EXT_XOR: begin c.out_sel = OUT_LOGIC; c.bl = BL_XOR; end
        EXT_ADD: begin c.out_sel = OUT_ADDER; c.add_en = 1'b1; c.psr_arith = 1'b1;
                       c.imm_mode = IMM_SEXT; end
        EXT_SUB: begin c.out_sel = OUT_ADDER; c.add_en = 1'b0; c.psr_arith = 1'b1;
                       c.imm_mode = IMM_SEXT; end
        EXT_CMP: begin c.out_sel = OUT_ADDER; c.add_en = 1'b0; c.psr_cmp = 1'b1;
                       c.imm_mode = IMM_SEXT; end
        default: begin c.out_sel = OUT_PASSB; end   // MOV / MOVI
      endcase
    end
    return c;
  endfunction

  // Moore outputs
  always_comb begin
    ctrl          = '0;
    ctrl.add_en   = 1'b1;
    ctrl.imm_mode = IMM_ZEXT;
    r = 1'b0;
    w = 1'b0;
    unique case (state)
      S0:  begin ctrl.g_en = 1'b1; ctrl.bl = BL_PASSA; end
      S16: ctrl.mar_enable = 1'b1;
      S14: r = 1'b1;
      S15: ctrl.ir_enable = 1'b1;
      S1:  ctrl.pc_enable = 1'b1;
      S2:  begin ctrl.g_en = 1'b1; ctrl.alu_in_a = 1'b1; ctrl = alu_from_opcode(ctrl); end
      S4:  begin ctrl.g_en = 1'b1; ctrl.alu_in_a = 1'b1; ctrl.alu_in_b = 1'b1;
                 ctrl = alu_from_opcode(ctrl); end
      S3:  ctrl.reg_write = !is_cmp;
      S5:  begin ctrl.g_en = 1'b1; ctrl.out_sel = OUT_PASSB; end
      S6:  ctrl.mar_enable = 1'b1;
      S18: r = 1'b1;
      S8:  begin ctrl.reg_write = 1'b1; ctrl.reg_src = 1'b1; end
      S7:  begin ctrl.mar_enable = 1'b1; ctrl.mdr_enable = 1'b1; end
      S17: w = 1'b1;
      S10: begin ctrl.g_en = 1'b1; ctrl.out_sel = OUT_PASSB; end
      S12: begin ctrl.g_en = 1'b1; ctrl.out_sel = OUT_ADDER; ctrl.alu_in_b = 1'b1;
                 ctrl.add_en = 1'b1; ctrl.imm_mode = IMM_SEXT; end
      S11: ctrl.load_pc = cond_true(ir[11:8], flags);
      S9:  begin ctrl.g_en = 1'b1; ctrl.load_pc = 1'b1; ctrl.pc_jal = 1'b1;
                 ctrl.bl = BL_PASSA; end
      S13: ctrl.reg_write = 1'b1;
      default: ;
    endcase
  end

  // A memory request is never a read and a write at once
  assert property (@(posedge clk) disable iff (rst) !(r && w));

endmodule

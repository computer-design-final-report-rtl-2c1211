// cr16_pkg: shared types and constants of the CR16-style 16-bit computer.
//
// Holds the instruction-field encodings of the baseline instruction set
// (opcode in bits [15:12], first register in [11:8], opcode extension in
// [7:4], second register or immediate in [3:0]/[7:0]), the branch condition
// codes, the ALU select encodings and the controller state names S0..S18 of
// the state graph. The instruction encodings are the standard CR16 baseline
// ones; they agree with the hand-assembled program words of the design's
// bring-up test (d002 = MOVI r0,2; 0051 = ADD; 0190 = SUB; 4042 = STOR ...).
// The ALU select encodings follow the design's control-signal names; the
// numeric choice of logic-function codes is this implementation's own.
package cr16_pkg;

  localparam int unsigned WORD_W = 16;
  typedef logic [WORD_W-1:0] word_t;

  // Major opcodes, instruction bits [15:12]
  typedef enum logic [3:0] {
    OP_RTYPE = 4'b0000,
    OP_ANDI  = 4'b0001,
    OP_ORI   = 4'b0010,
    OP_XORI  = 4'b0011,
    OP_MEM   = 4'b0100,   // LOAD, STOR, Jcond, JAL
    OP_ADDI  = 4'b0101,
    OP_SHIFT = 4'b1000,   // LSH, LSHI
    OP_SUBI  = 4'b1001,
    OP_CMPI  = 4'b1011,
    OP_BCOND = 4'b1100,
    OP_MOVI  = 4'b1101,
    OP_LUI   = 4'b1111
  } opcode_e;

  // Opcode extensions, instruction bits [7:4]
  localparam logic [3:0] EXT_AND  = 4'b0001;
  localparam logic [3:0] EXT_OR   = 4'b0010;
  localparam logic [3:0] EXT_XOR  = 4'b0011;
  localparam logic [3:0] EXT_ADD  = 4'b0101;
  localparam logic [3:0] EXT_SUB  = 4'b1001;
  localparam logic [3:0] EXT_CMP  = 4'b1011;
  localparam logic [3:0] EXT_MOV  = 4'b1101;
  localparam logic [3:0] EXT_LSH  = 4'b0100;
  localparam logic [3:0] EXT_LOAD = 4'b0000;
  localparam logic [3:0] EXT_STOR = 4'b0100;
  localparam logic [3:0] EXT_JAL  = 4'b1000;
  localparam logic [3:0] EXT_JCND = 4'b1100;

  // Branch / jump conditions, instruction bits [11:8]
  localparam logic [3:0] C_EQ = 4'b0000, C_NE = 4'b0001, C_CS = 4'b0010,
                         C_CC = 4'b0011, C_HI = 4'b0100, C_LS = 4'b0101,
                         C_GT = 4'b0110, C_LE = 4'b0111, C_FS = 4'b1000,
                         C_FC = 4'b1001, C_LO = 4'b1010, C_HS = 4'b1011,
                         C_LT = 4'b1100, C_GE = 4'b1101, C_UC = 4'b1110,
                         C_NV = 4'b1111;

  // ALU output mux {ALU_OUT_S1, ALU_OUT_S0}
  typedef enum logic [1:0] {
    OUT_LOGIC = 2'b00,
    OUT_ADDER = 2'b01,
    OUT_SHIFT = 2'b10,
    OUT_PASSB = 2'b11
  } alu_out_e;

  // Logic-function mux {BL1, BL0}
  typedef enum logic [1:0] {
    BL_AND   = 2'b00,
    BL_OR    = 2'b01,
    BL_XOR   = 2'b10,
    BL_PASSA = 2'b11
  } alu_logic_e;

  // Immediate unit modes
  typedef enum logic [1:0] {
    IMM_ZEXT  = 2'b00,   // zero-extend bits [7:0]
    IMM_SEXT  = 2'b01,   // sign-extend bits [7:0]
    IMM_SEXT5 = 2'b10,   // sign-extend bits [4:0] (LSHI amount)
    IMM_LUI   = 2'b11    // bits [7:0] shifted left by 8
  } imm_mode_e;

  // Processor status register flags
  typedef struct packed {
    logic c;   // carry / borrow
    logic l;   // unsigned lower (same flop as c)
    logic f;   // overflow
    logic z;   // zero
    logic n;   // signed less-than
  } flags_t;

  // Control word from the controller to the datapath; the field names are
  // the control signals of the state graph, plus imm_mode, psr_arith,
  // psr_cmp and
  // add_en, which the graph folds into its "conditional signals".
  typedef struct packed {
    logic       g_en;        // load the ALU result register
    logic       alu_in_a;    // ALU A: 1 = Dst register, 0 = PC
    logic       alu_in_b;    // ALU B: 1 = immediate, 0 = Src register
    alu_logic_e bl;          // {BL1, BL0}
    alu_out_e   out_sel;     // {ALU_OUT_S1, ALU_OUT_S0}
    logic       add_en;      // 1 = add, 0 = subtract
    imm_mode_e  imm_mode;
    logic       psr_arith;   // load carry and overflow (ADD/SUB)
    logic       psr_cmp;     // load carry (as L), zero and negative (CMP)
    logic       pc_enable;   // increment the PC
    logic       load_pc;     // load the PC
    logic       pc_jal;      // PC load source: 1 = Src register, 0 = ALU result
    logic       ir_enable;   // load the IR from memory read data
    logic       mar_enable;  // load MAR from the ALU result register
    logic       mdr_enable;  // load MDR from the Dst register
    logic       reg_write;   // write the register file
    logic       reg_src;     // write-back source: 1 = memory, 0 = ALU result
  } ctrl_t;

  // Controller states of the state graph
  typedef enum logic [4:0] {
    S0  = 5'd0,  S1  = 5'd1,  S2  = 5'd2,  S3  = 5'd3,  S4  = 5'd4,
    S5  = 5'd5,  S6  = 5'd6,  S7  = 5'd7,  S8  = 5'd8,  S9  = 5'd9,
    S10 = 5'd10, S11 = 5'd11, S12 = 5'd12, S13 = 5'd13, S14 = 5'd14,
    S15 = 5'd15, S16 = 5'd16, S17 = 5'd17, S18 = 5'd18
  } state_e;

  // Evaluates a branch/jump condition against the flags.
  function automatic logic cond_true(input logic [3:0] cond, input flags_t fl);
    unique case (cond)
      C_EQ: cond_true = fl.z;
      C_NE: cond_true = !fl.z;
      C_CS: cond_true = fl.c;
      C_CC: cond_true = !fl.c;
      C_HI: cond_true = fl.l;
      C_LS: cond_true = !fl.l;
      C_GT: cond_true = fl.n;
      C_LE: cond_true = !fl.n;
      C_FS: cond_true = fl.f;
      C_FC: cond_true = !fl.f;
      C_LO: cond_true = !fl.l && !fl.z;
      C_HS: cond_true = fl.l || fl.z;
      C_LT: cond_true = !fl.n && !fl.z;
      C_GE: cond_true = fl.n || fl.z;
      C_UC: cond_true = 1'b1;
      default: cond_true = 1'b0;
    endcase
  endfunction

endpackage

// datapath: registers, muxes and ALU of the CR16-style multicycle CPU.
//
// Holds the program counter (loadable counter: pc_enable increments,
// load_pc loads), the instruction register, the four-flop processor status
// register, the immediate unit, the two ALU operand muxes, the ALU, the ALU
// result register, the memory address and data registers (MAR, MDR) and
// the register-file write-back mux. All registers update on the rising
// clock edge under the enables of the control word; rst (synchronous,
// active high) clears PC, IR, PSR, the ALU result register, MAR and MDR.
//
//   ALU A  = alu_in_a ? register[IR[11:8]] : PC
//   ALU B  = alu_in_b ? immediate         : register[IR[3:0]]
//   PC in  = pc_jal   ? register[IR[3:0]] : ALU result register
//   RF in  = reg_src  ? mem_rdata         : ALU result register
//
// The PSR keeps carry (borrow after a subtraction), overflow, zero and a
// "negative" bit formed, as in the design, by XORing the ALU carry_out with
// the sign bits of both ALU inputs; that bit is the signed A < B result of
// A - B. The five condition flags C, L, F, Z, N are read from these four
// flops (C and L share the carry flop). ADD/ADDI/SUB/SUBI load the carry
// and overflow flops, CMP/CMPI the carry, zero and negative flops, as in
// the CR16 baseline; a program may therefore subtract between a compare
// and the branch that tests its zero result. The unit structure follows the
// design; the LSHI sign-extension mode and the reset values are this
// implementation's own.
module datapath
  import cr16_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  ctrl_t  ctrl,
  input  word_t  mem_rdata,   // read data from the memory system, held
  output word_t  ir,
  output flags_t flags,
  output word_t  pc,
  output word_t  mar,
  output word_t  mdr
);

  word_t rf_a, rf_b, imm, alu_a, alu_b, alu_y, alu_q, rf_din;
  logic  carry_out, ofl, zero;
  logic  psr_c, psr_f, psr_z, psr_n;

  // Program counter
  always_ff @(posedge clk)
    if (rst)                pc <= '0;
    else if (ctrl.load_pc)  pc <= ctrl.pc_jal ? rf_b : alu_q;
    else if (ctrl.pc_enable) pc <= pc + 16'd1;

  // Instruction register
  always_ff @(posedge clk)
    if (rst)                 ir <= '0;
    else if (ctrl.ir_enable) ir <= mem_rdata;

  // Immediate unit: zero/sign extension or LUI shift
  always_comb begin
    unique case (ctrl.imm_mode)
      IMM_ZEXT:  imm = {8'h00, ir[7:0]};
      IMM_SEXT:  imm = {{8{ir[7]}}, ir[7:0]};
      IMM_SEXT5: imm = {{11{ir[4]}}, ir[4:0]};
      default:   imm = {ir[7:0], 8'h00};
    endcase
  end

  regfile u_rf (
    .clk       (clk),
    .write     (ctrl.reg_write),
    .a_addr_in (ir[11:8]),
    .d_addr_in (ir[3:0]),
    .data_in   (rf_din),
    .spo_out   (rf_a),
    .dpo_out   (rf_b)
  );

  assign alu_a = ctrl.alu_in_a ? rf_a : pc;
  assign alu_b = ctrl.alu_in_b ? imm  : rf_b;

  alu u_alu (
    .alu_in_a  (alu_a),
    .alu_in_b  (alu_b),
    .bl        (ctrl.bl),
    .out_sel   (ctrl.out_sel),
    .add_en    (ctrl.add_en),
    .alu_out   (alu_y),
    .carry_out (carry_out),
    .ofl       (ofl),
    .zero      (zero)
  );

  // ALU result register
  always_ff @(posedge clk)
    if (rst)            alu_q <= '0;
    else if (ctrl.g_en) alu_q <= alu_y;

  // Processor status register: four D flip-flops
  // (add/subtract write carry and overflow, compare writes carry, zero and
  // negative)
  always_ff @(posedge clk)
    if (rst) {psr_c, psr_f, psr_z, psr_n} <= '0;
    else begin
      if (ctrl.psr_arith || ctrl.psr_cmp) psr_c <= carry_out;
      if (ctrl.psr_arith) psr_f <= ofl;
      if (ctrl.psr_cmp) begin
        psr_z <= zero;
        psr_n <= carry_out ^ alu_a[15] ^ alu_b[15];
      end
    end

  assign flags = '{c: psr_c, l: psr_c, f: psr_f, z: psr_z, n: psr_n};

  // Memory address and data registers
  always_ff @(posedge clk)
    if (rst) begin
      mar <= '0;
      mdr <= '0;
    end else begin
      if (ctrl.mar_enable) mar <= alu_q;
      if (ctrl.mdr_enable) mdr <= rf_a;
    end

  // Register-file write-back mux
  assign rf_din = ctrl.reg_src ? mem_rdata : alu_q;

endmodule

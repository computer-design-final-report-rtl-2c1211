// tb_datapath: drives the datapath with hand-made control words, one per
// clock, the way the controller would, and checks registers through the
// MDR (which copies the Dst register), the MAR (which copies the ALU
// result register), the PC and the flags. Covers MOVI, LUI, loads from
// memory data, ADD, SUB, AND/OR/XOR, single-bit shifts, CMP flag setting,
// PC increment, PC-relative branch target and the JAL register jump.
module tb_datapath;
  import cr16_pkg::*;
  logic clk = 0, rst = 1;
  ctrl_t ctrl;
  word_t mem_rdata = 0, ir, pc, mar, mdr;
  flags_t flags;
  int checks = 0, failures = 0;

  datapath dut (.*);
  always #5 clk = ~clk;

  function automatic ctrl_t idle();
    ctrl_t c;
    c = '0;
    c.add_en = 1'b1;
    return c;
  endfunction

  task automatic step(input ctrl_t c);
    @(negedge clk);
    ctrl = c;
    @(negedge clk);
    ctrl = idle();
  endtask

  task automatic load_ir(input word_t instr);
    ctrl_t c;
    mem_rdata = instr;
    c = idle(); c.ir_enable = 1; step(c);
  endtask

  // ALU op on Dst (and Src or immediate), result to ALU register, write back
  task automatic alu_op(input alu_out_e os, input alu_logic_e bl, input logic add_en,
                        input logic use_imm, input imm_mode_e im, input logic psr);
    ctrl_t c;
    c = idle(); c.g_en = 1; c.alu_in_a = 1; c.alu_in_b = use_imm; c.out_sel = os;
    c.bl = bl; c.add_en = add_en; c.imm_mode = im; c.psr_arith = psr;
    step(c);
    c = idle(); c.reg_write = 1; step(c);
  endtask

  // read register ir[11:8] through the MDR
  task automatic expect_dst(input word_t e, input string msg);
    ctrl_t c;
    c = idle(); c.mdr_enable = 1; step(c);
    checks++;
    if (mdr !== e) begin failures++; $display("FAIL %s: %h exp %h", msg, mdr, e); end
  endtask

  task automatic movi(input logic [3:0] r, input logic [7:0] imm);
    load_ir({4'hD, r, imm});
    alu_op(OUT_PASSB, BL_AND, 1, 1, IMM_ZEXT, 0);
  endtask

  initial begin
    ctrl_t c;
    ctrl = idle();
    repeat (2) @(negedge clk);
    rst = 0;
    checks++; if (pc !== 0 || ir !== 0 || flags !== '0) failures++;
    movi(0, 8'h05);                 expect_dst(16'h0005, "MOVI r0");
    // LOAD r1 <- memory word 0x1234
    load_ir(16'h4100);
    mem_rdata = 16'h1234;
    c = idle(); c.reg_write = 1; c.reg_src = 1; step(c);
    load_ir(16'h4100);              expect_dst(16'h1234, "load r1");
    // ADD r0 += r1
    load_ir(16'h0051);
    alu_op(OUT_ADDER, BL_AND, 1, 0, IMM_ZEXT, 1);
    expect_dst(16'h1239, "ADD");
    checks++; if (flags.z || flags.c || flags.f) failures++;
    // zero and negative are compare-only: a zero SUB result leaves Z alone
    load_ir(16'h0090);
    c = idle(); c.g_en = 1; c.alu_in_a = 1; c.out_sel = OUT_ADDER; c.add_en = 0; c.psr_arith = 1;
    step(c);                                          // r0 - r0 = 0, no write-back
    checks++; if (flags.z) begin failures++; $display("FAIL SUB wrote Z"); end
    // SUBI r0 -= 0x39 (sign-extended)
    load_ir(16'h9039);
    alu_op(OUT_ADDER, BL_AND, 0, 1, IMM_SEXT, 1);
    expect_dst(16'h1200, "SUBI");
    // ADDI r0 += -1 (0xff sign-extended)
    load_ir(16'h50FF);
    alu_op(OUT_ADDER, BL_AND, 1, 1, IMM_SEXT, 1);
    expect_dst(16'h11FF, "ADDI -1");
    // AND / OR / XOR with r1 = 0x1234
    load_ir(16'h0011); alu_op(OUT_LOGIC, BL_AND, 1, 0, IMM_ZEXT, 0); expect_dst(16'h1034, "AND");
    load_ir(16'h0021); alu_op(OUT_LOGIC, BL_OR,  1, 0, IMM_ZEXT, 0); expect_dst(16'h1234, "OR");
    load_ir(16'h0031); alu_op(OUT_LOGIC, BL_XOR, 1, 0, IMM_ZEXT, 0); expect_dst(16'h0000, "XOR");
    // LUI r2, 0xab
    load_ir(16'hF2AB); alu_op(OUT_PASSB, BL_AND, 1, 1, IMM_LUI, 0); expect_dst(16'hAB00, "LUI");
    // LSHI r2 left by 1 (imm 0x01), then right (s bit set, 0x1f)
    load_ir(16'h8201); alu_op(OUT_SHIFT, BL_AND, 1, 1, IMM_SEXT5, 0); expect_dst(16'h5600, "LSHI left");
    load_ir(16'h821F); alu_op(OUT_SHIFT, BL_AND, 1, 1, IMM_SEXT5, 0); expect_dst(16'h2B00, "LSHI right");
    // CMP r1(=0x1234) against r0(=0): flags of r0 - r1
    load_ir(16'h00B1);
    c = idle(); c.g_en = 1; c.alu_in_a = 1; c.out_sel = OUT_ADDER; c.add_en = 0; c.psr_cmp = 1;
    step(c);
    checks++;
    if (flags.z !== 0 || flags.l !== 1 || flags.n !== 1 || flags.c !== 1) begin
      failures++; $display("FAIL CMP flags %b", flags);
    end
    // signed compare with a negative Dst: r4 = 0x8000 against r1 = 0x1234
    load_ir(16'hF480); alu_op(OUT_PASSB, BL_AND, 1, 1, IMM_LUI, 0);
    load_ir(16'h04B1);
    c = idle(); c.g_en = 1; c.alu_in_a = 1; c.out_sel = OUT_ADDER; c.add_en = 0; c.psr_cmp = 1;
    step(c);
    checks++;
    if (flags.n !== 1 || flags.l !== 0 || flags.z !== 0) begin
      failures++; $display("FAIL signed CMP flags %b", flags);
    end
    // PC: three increments, then copy PC through the ALU register to the MAR
    repeat (3) begin c = idle(); c.pc_enable = 1; step(c); end
    checks++; if (pc !== 3) failures++;
    c = idle(); c.g_en = 1; c.bl = BL_PASSA; step(c);
    c = idle(); c.mar_enable = 1; step(c);
    checks++; if (mar !== 3) begin failures++; $display("FAIL MAR %h", mar); end
    // branch: PC + sign-extended 0xfe -> 1, loaded from the ALU register
    load_ir(16'hC0FE);
    c = idle(); c.g_en = 1; c.out_sel = OUT_ADDER; c.alu_in_b = 1; c.imm_mode = IMM_SEXT; step(c);
    c = idle(); c.load_pc = 1; step(c);
    checks++; if (pc !== 1) begin failures++; $display("FAIL branch pc %h", pc); end
    // JAL r3, r1: PC <- r1, r3 <- old PC
    load_ir(16'h4381);
    c = idle(); c.g_en = 1; c.load_pc = 1; c.pc_jal = 1; c.bl = BL_PASSA; step(c);
    c = idle(); c.reg_write = 1; step(c);
    checks++; if (pc !== 16'h1234) begin failures++; $display("FAIL jal pc %h", pc); end
    load_ir(16'h4300); expect_dst(16'h0001, "JAL link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

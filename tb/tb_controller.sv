// tb_controller: runs the controller alone. A small responder answers
// every read or write request with rddone/wrdone after a fixed delay, and
// the test presents one instruction at a time on the IR input. For each
// instruction class it records the visited states from S0 back to S0 and
// compares them with the paths of the state graph, and it checks the
// outputs that carry the instruction's effect: write-back (suppressed for
// CMP), the PC load in S11 (only when the condition holds), the JAL
// control set, read and write requests, and the ALU settings of S2/S4.
module tb_controller;
  import cr16_pkg::*;
  logic clk = 0, rst = 1, rddone = 0, wrdone = 0, r, w;
  word_t ir = 0;
  flags_t flags = '0;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;
  int req_cnt = 0;

  controller dut (.*);
  always #5 clk = ~clk;

  // memory responder: answer after 4 clocks of a held request
  always @(posedge clk) begin
    rddone <= 1'b0;
    wrdone <= 1'b0;
    if ((r || w) && !rddone && !wrdone) begin
      req_cnt <= req_cnt + 1;
      if (req_cnt == 3) begin
        rddone  <= r;
        wrdone  <= w;
        req_cnt <= 0;
      end
    end else req_cnt <= 0;
  end

  // effects seen during one instruction
  logic saw_write, saw_load_pc, saw_psr, saw_cmp, saw_r, saw_w;
  alu_out_e os_s24;
  alu_logic_e bl_s24;
  logic add_s24;

  task automatic run(input word_t instr, input state_e exp[$], input string name);
    state_e got[$];
    ir = instr;
    saw_write = 0; saw_load_pc = 0; saw_psr = 0; saw_cmp = 0; saw_r = 0; saw_w = 0;
    // wait for S0 to start
    @(negedge clk);
    while (state != S0) @(negedge clk);
    do begin
      got.push_back(state);
      if (ctrl.reg_write) saw_write = 1;
      if (ctrl.load_pc) saw_load_pc = 1;
      if (ctrl.psr_arith) saw_psr = 1;
      if (ctrl.psr_cmp) saw_cmp = 1;
      if (r) saw_r = 1;
      if (w) saw_w = 1;
      if (state == S2 || state == S4) begin
        os_s24 = ctrl.out_sel; bl_s24 = ctrl.bl; add_s24 = ctrl.add_en;
      end
      @(negedge clk);
    end while (state != S0);
    // collapse repeated wait states
    begin
      state_e c[$];
      foreach (got[i]) if (i == 0 || got[i] != got[i-1]) c.push_back(got[i]);
      checks++;
      if (c != exp) begin
        failures++;
        $write("FAIL %s path:", name);
        foreach (c[i]) $write(" %s", c[i].name());
        $display("");
      end
    end
  endtask

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(16'h0051, '{S0, S16, S14, S15, S1, S2, S3}, "ADD");
    check(saw_write && saw_psr && !saw_cmp && os_s24 == OUT_ADDER && add_s24, "ADD effects");
    run(16'h00B1, '{S0, S16, S14, S15, S1, S2, S3}, "CMP");
    check(!saw_write && saw_cmp && !saw_psr && !add_s24, "CMP no write-back, compare flags");
    run(16'h0031, '{S0, S16, S14, S15, S1, S2, S3}, "XOR");
    check(saw_write && !saw_psr && os_s24 == OUT_LOGIC && bl_s24 == BL_XOR, "XOR effects");
    run(16'h8142, '{S0, S16, S14, S15, S1, S2, S3}, "LSH");
    check(os_s24 == OUT_SHIFT, "LSH shifter");
    run(16'h5001, '{S0, S16, S14, S15, S1, S4, S3}, "ADDI");
    run(16'hF2AB, '{S0, S16, S14, S15, S1, S4, S3}, "LUI");
    check(os_s24 == OUT_PASSB && saw_write, "LUI effects");
    run(16'h8001, '{S0, S16, S14, S15, S1, S4, S3}, "LSHI");
    run(16'h4103, '{S0, S16, S14, S15, S1, S5, S6, S18, S8}, "LOAD");
    check(saw_r && !saw_w && saw_write, "LOAD effects");
    run(16'h4042, '{S0, S16, S14, S15, S1, S5, S7, S17}, "STOR");
    check(saw_w && !saw_write, "STOR effects");
    flags = '0;
    run(16'h40C5, '{S0, S16, S14, S15, S1, S10, S11}, "JEQ not taken");
    check(!saw_load_pc, "JEQ with Z=0 does not load PC");
    run(16'h4EC5, '{S0, S16, S14, S15, S1, S10, S11}, "JUC");
    check(saw_load_pc, "JUC loads PC");
    flags.z = 1;
    run(16'hC0FE, '{S0, S16, S14, S15, S1, S12, S11}, "BEQ taken");
    check(saw_load_pc, "BEQ with Z=1 loads PC");
    flags = '0; flags.l = 1;
    run(16'hC5FE, '{S0, S16, S14, S15, S1, S12, S11}, "BLS not taken");
    check(!saw_load_pc, "BLS with L=1 does not load PC");
    run(16'h4F8E, '{S0, S16, S14, S15, S1, S9, S13}, "JAL");
    check(saw_load_pc && saw_write, "JAL effects");
    run(16'h0071, '{S0, S16, S14, S15, S1}, "unused encoding");
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

// tb_cr16_system: end-to-end test of the whole computer at its default
// parameters (50 MHz clock, 19200 bit/s UART), with the SDRAM model.
//
// The test assembles a program into the SDRAM model (encodings computed by
// the small assembler functions below), releases reset and lets the CPU
// run it. The program exercises every instruction class (R-type, I-type,
// LOAD/STOR, taken and untaken Bcond and Jcond, JAL and return) and every
// I/O device: it writes and reads the seven-segment register, reads the
// parallel port and writes its status lines, sends one byte and receives
// one byte over the UART with the status/control handshakes, waits for a
// PS/2 scan code and clears it, and writes the VGA frame buffer. Results
// are stored to 0x0200.. and compared with values worked out by hand. The
// bench also decodes the UART line, drives the UART receive line and the
// PS/2 keyboard lines, measures the load and store times (13 and 9 clocks)
// and checks the first VGA pixels of the frame after the writes. Every
// mechanism is counted; one that never happens counts as a failure.
module tb_cr16_system;
  import cr16_pkg::*;

  localparam int CLK_HZ = 50_000_000;
  localparam int BAUD   = 19_200;
  localparam int DIV    = CLK_HZ / BAUD;

  logic clk = 0, rst = 1;
  word_t sdram_addr, sdram_wdata, sdram_rdata;
  logic sdram_rd, sdram_wr, sdram_done;
  logic [6:0] seg;
  logic [7:0] ppi_data = 8'hA5;
  logic [2:0] ppi_status;
  logic uart_rxd = 1, uart_txd, kb_clk = 1, kb_data = 1;
  logic vga_hsyncb, vga_vsyncb, video_clk;
  logic [5:0] vga_rgb;
  int checks = 0, failures = 0;

  cr16_system dut (.*);

  sdram_model mem (.clk(clk), .addr(sdram_addr), .wdata(sdram_wdata), .rdata(sdram_rdata),
                   .rd(sdram_rd), .wr(sdram_wr), .done(sdram_done));

  always #10 clk = ~clk;   // 50 MHz

  // ---------------- assembler ----------------
  int unsigned apc;
  function automatic void emit(input word_t w);
    mem.mem[apc] = w;
    apc++;
  endfunction
  function automatic word_t R(input logic [3:0] ext, input logic [3:0] rd, input logic [3:0] rs);
    return {4'h0, rd, ext, rs};
  endfunction
  function automatic word_t I(input opcode_e op, input logic [3:0] rd, input logic [7:0] imm);
    return {op, rd, imm};
  endfunction
  function automatic word_t LOAD(input logic [3:0] rd, input logic [3:0] ra);
    return {4'h4, rd, EXT_LOAD, ra};
  endfunction
  function automatic word_t STOR(input logic [3:0] rs, input logic [3:0] ra);
    return {4'h4, rs, EXT_STOR, ra};
  endfunction
  function automatic word_t BR(input logic [3:0] cond, input int disp);
    return {4'hC, cond, 8'(disp)};
  endfunction
  function automatic word_t JC(input logic [3:0] cond, input logic [3:0] rt);
    return {4'h4, cond, EXT_JCND, rt};
  endfunction
  function automatic word_t JAL(input logic [3:0] rl, input logic [3:0] rt);
    return {4'h4, rl, EXT_JAL, rt};
  endfunction
  function automatic word_t LSHI(input logic [3:0] rd, input logic right);
    return {4'h8, rd, 3'b000, right, right ? 4'hF : 4'h1};
  endfunction
  function automatic word_t LSH(input logic [3:0] rd, input logic [3:0] ra);
    return {4'h8, rd, EXT_LSH, ra};
  endfunction
  // store r to the result area and advance the pointer r13
  function automatic void result(input logic [3:0] r);
    emit(STOR(r, 13));
    emit(I(OP_ADDI, 13, 8'd1));
  endfunction
  // poll address register ra until (mem & mask) is nonzero (cond EQ loops)
  // or zero (cond NE loops)
  function automatic void poll(input logic [3:0] ra, input logic [7:0] mask, input logic [3:0] cond);
    emit(LOAD(2, ra));
    emit(I(OP_ANDI, 2, mask));
    emit(I(OP_CMPI, 2, 8'd0));
    emit(BR(cond, -4));
  endfunction

  word_t expected [$];
  int unsigned halt_addr, ret_addr;

  task automatic assemble();
    int unsigned t;
    apc = 0;
    emit(I(OP_LUI, 13, 8'h02));                 // r13 = 0x0200
    emit(I(OP_MOVI, 1, 8'd5));
    emit(I(OP_MOVI, 2, 8'd3));
    emit(R(EXT_MOV, 3, 1));                     // r3 = 5
    emit(R(EXT_ADD, 3, 2));                     // r3 = 8
    result(3); expected.push_back(16'h0008);
    emit(R(EXT_SUB, 1, 2));                     // r1 = 2
    result(1); expected.push_back(16'h0002);
    emit(I(OP_MOVI, 4, 8'h0F));
    emit(I(OP_ANDI, 4, 8'h3C));                 // 0x0C
    emit(I(OP_ORI, 4, 8'h30));                  // 0x3C
    emit(I(OP_XORI, 4, 8'hFF));                 // 0xC3
    result(4); expected.push_back(16'h00C3);
    emit(I(OP_MOVI, 5, 8'h55));
    emit(I(OP_MOVI, 6, 8'h0F));
    emit(R(EXT_AND, 5, 6));                     // 0x05
    emit(R(EXT_OR, 5, 2));                      // 0x07
    emit(R(EXT_XOR, 5, 1));                     // 0x05
    result(5); expected.push_back(16'h0005);
    emit(I(OP_LUI, 7, 8'h12));
    emit(I(OP_ORI, 7, 8'h34));                  // 0x1234
    result(7); expected.push_back(16'h1234);
    emit(LSHI(7, 0));                           // 0x2468
    emit(LSHI(7, 1));                           // 0x1234
    emit(LSHI(7, 1));                           // 0x091A
    result(7); expected.push_back(16'h091A);
    emit(I(OP_MOVI, 9, 8'd0));
    emit(I(OP_SUBI, 9, 8'd1));                  // r9 = -1
    emit(I(OP_MOVI, 12, 8'h40));
    emit(LSH(12, 9));                           // right: 0x20
    result(12); expected.push_back(16'h0020);
    emit(LSH(12, 2));                           // left: 0x40
    result(12); expected.push_back(16'h0040);
    // counted loop: r8 += 2, three times
    emit(I(OP_MOVI, 7, 8'd3));
    emit(I(OP_MOVI, 8, 8'd0));
    emit(I(OP_ADDI, 8, 8'd2));
    emit(I(OP_SUBI, 7, 8'd1));
    emit(I(OP_CMPI, 7, 8'd0));
    emit(BR(C_NE, -4));
    result(8); expected.push_back(16'h0006);
    // signed against unsigned compare: r10 = 1, r9 = -1
    emit(I(OP_MOVI, 11, 8'd0));
    emit(I(OP_MOVI, 10, 8'd1));
    emit(R(EXT_CMP, 10, 9));                    // L = 1, N = 0, Z = 0
    emit(BR(C_GT, 1));                          // not taken
    emit(I(OP_ORI, 11, 8'h01));
    emit(BR(C_HI, 1));                          // taken
    emit(I(OP_ORI, 11, 8'h10));                 // skipped
    emit(BR(C_EQ, 1));                          // not taken
    emit(I(OP_ORI, 11, 8'h20));
    result(11); expected.push_back(16'h0021);
    // Jcond: unconditional taken, then JEQ not taken (Z = 0 after ADDI)
    t = apc + 3;
    emit(I(OP_MOVI, 14, 8'(t)));
    emit(JC(C_UC, 14));
    emit(I(OP_ORI, 11, 8'h40));                 // skipped
    t = apc + 3;
    emit(I(OP_MOVI, 14, 8'(t)));
    emit(JC(C_EQ, 14));                         // not taken
    emit(I(OP_ORI, 11, 8'h80));
    result(11); expected.push_back(16'h00A1);
    // JAL to the subroutine at 0x00C0, which sets r12 and returns
    emit(I(OP_MOVI, 14, 8'hC0));
    emit(JAL(15, 14));
    ret_addr = apc;
    result(12); expected.push_back(16'h0077);
    result(15); expected.push_back(word_t'(ret_addr));
    // seven-segment display
    emit(I(OP_LUI, 0, 8'hC0));
    emit(I(OP_MOVI, 1, 8'h5B));
    emit(STOR(1, 0));
    emit(LOAD(2, 0));
    result(2); expected.push_back(16'h005B);
    // parallel port
    emit(I(OP_LUI, 0, 8'hC1));
    emit(LOAD(2, 0));
    result(2); expected.push_back(16'h00A5);
    emit(I(OP_MOVI, 1, 8'h06));
    emit(STOR(1, 0));
    // UART transmit 0x4B
    emit(I(OP_LUI, 0, 8'hC2));
    emit(I(OP_LUI, 3, 8'hC3));
    emit(I(OP_MOVI, 1, 8'h4B));
    emit(STOR(1, 0));
    emit(I(OP_MOVI, 1, 8'h02));
    emit(STOR(1, 3));
    poll(3, 8'h02, C_EQ);                       // wait for the acknowledge
    emit(I(OP_MOVI, 1, 8'h00));
    emit(STOR(1, 3));
    poll(3, 8'h02, C_NE);                       // wait for it to fall
    // UART receive
    poll(3, 8'h01, C_EQ);
    emit(LOAD(4, 0));
    result(4); expected.push_back(16'h003C);
    emit(I(OP_MOVI, 1, 8'h01));
    emit(STOR(1, 3));
    poll(3, 8'h01, C_NE);
    // PS/2: wait for a scan code, keep it, clear the register
    emit(I(OP_LUI, 0, 8'hC4));
    poll(0, 8'hFF, C_EQ);
    result(2); expected.push_back(16'h001C);
    emit(STOR(2, 0));
    emit(LOAD(2, 0));
    result(2); expected.push_back(16'h0000);
    // VGA frame buffer: bytes 0 and 1 and the last byte 0xdbff
    emit(I(OP_LUI, 0, 8'hD0));
    emit(I(OP_MOVI, 1, 8'hE4));
    emit(STOR(1, 0));
    emit(I(OP_ADDI, 0, 8'd1));
    emit(I(OP_MOVI, 1, 8'h1B));
    emit(STOR(1, 0));
    emit(I(OP_LUI, 0, 8'hDB));
    emit(I(OP_ORI, 0, 8'hFF));
    emit(I(OP_MOVI, 1, 8'h99));
    emit(STOR(1, 0));
    emit(LOAD(2, 0));                           // write-only: reads 0
    result(2); expected.push_back(16'h0000);
    halt_addr = apc;
    emit(BR(C_UC, -1));                         // stop here
    if (apc > 16'hC0) $display("program too long");
    apc = 'hC0;
    emit(I(OP_MOVI, 12, 8'h77));
    emit(JC(C_UC, 15));
  endtask

  // ---------------- mechanism counters ----------------
  int state_seen [19];
  int n_br_taken, n_br_not, n_j_taken, n_j_not, n_jal;
  int n_io_wr_seg, n_io_wr_ppi, n_io_wr_uart, n_io_wr_ps2, n_io_wr_vga;
  int n_io_rd_seg, n_io_rd_ppi, n_io_rd_uart, n_io_rd_ps2, n_io_rd_vga;
  int n_tx_frames, n_rx_frames, n_kb_frames, n_fb_steal, n_vsync;
  int ld_cycles, st_cycles, n_loads, n_stores, bad_ld, bad_st;

  always @(posedge clk) if (!rst) begin
    state_seen[dut.state]++;
    if (dut.state == S11) begin
      if (dut.ir[15:12] == 4'hC) begin if (dut.ctrl.load_pc) n_br_taken++; else n_br_not++; end
      else begin if (dut.ctrl.load_pc) n_j_taken++; else n_j_not++; end
    end
    if (dut.state == S9) n_jal++;
    if (dut.io_we) begin
      n_io_wr_seg  += int'(dut.seg_en);
      n_io_wr_ppi  += int'(dut.ppi_en);
      n_io_wr_uart += int'(dut.uart_en);
      n_io_wr_ps2  += int'(dut.ps2_en);
      n_io_wr_vga  += int'(dut.vga_en);
    end
    if (dut.rddone && dut.io_en) begin
      n_io_rd_seg  += int'(dut.seg_en);
      n_io_rd_ppi  += int'(dut.ppi_en);
      n_io_rd_uart += int'(dut.uart_en);
      n_io_rd_ps2  += int'(dut.ps2_en);
      n_io_rd_vga  += int'(dut.vga_en);
    end
    if (dut.fb_we) n_fb_steal++;
    // load: S6 S18.. S8 ; store: S7 S17..
    if (dut.state == S6) ld_cycles = 0;
    if (dut.state inside {S6, S18, S8}) ld_cycles++;
    if (dut.state == S8) begin n_loads++; if (ld_cycles != 13) begin bad_ld++; if (bad_ld == 1) $display("load took %0d", ld_cycles); end end
    if (dut.state == S7) st_cycles = 0;
    if (dut.state inside {S7, S17}) st_cycles++;
    if (dut.state == S17 && dut.wrdone) begin n_stores++; if (st_cycles != 9) begin bad_st++; if (bad_st == 1) $display("store took %0d", st_cycles); end end
  end

  // ---------------- UART line monitor and driver ----------------
  logic [7:0] tx_byte;
  initial begin
    forever begin
      @(negedge uart_txd);
      repeat (DIV / 2) @(posedge clk);
      if (uart_txd == 0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          tx_byte[i] = uart_txd;
        end
        repeat (DIV) @(posedge clk);
        n_tx_frames++;
        checks++;
        if (tx_byte != 8'h4B || uart_txd != 1) begin
          failures++; $display("FAIL uart tx byte %h", tx_byte);
        end
        // answer with 0x3C
        repeat (DIV) @(posedge clk);
        begin
          logic [9:0] f;
          f = {1'b1, 8'h3C, 1'b0};
          for (int i = 0; i < 10; i++) begin
            uart_rxd = f[i];
            repeat (DIV) @(posedge clk);
          end
          uart_rxd = 1;
          n_rx_frames++;
        end
        // then a key press on the PS/2 keyboard: make code of 'A'
        repeat (5000) @(posedge clk);
        begin
          logic [10:0] f;
          f = {1'b1, ~^8'h1C, 8'h1C, 1'b0};
          for (int i = 0; i < 11; i++) begin
            kb_data = f[i];
            repeat (500) @(posedge clk);
            kb_clk = 0;
            repeat (1000) @(posedge clk);
            kb_clk = 1;
            repeat (500) @(posedge clk);
          end
          n_kb_frames++;
        end
      end
    end
  end

  // ---------------- VGA pixel check ----------------
  int hq [2], vq [2];
  int pix_checked;
  logic halted;
  function automatic logic [5:0] colour(input logic [1:0] p);
    case (p)
      2'b00: return 6'b110000;
      2'b01: return 6'b000011;
      2'b10: return 6'b001100;
      default: return 6'b111111;
    endcase
  endfunction
  always @(posedge clk) if (!rst && dut.pix_ce) begin
    #1;
    if (halted && n_vsync >= 2 && vq[1] < 2 && hq[1] < 16) begin
      logic [7:0] b;
      b = (hq[1] < 8) ? 8'hE4 : 8'h1B;
      checks++;
      pix_checked++;
      if (vga_rgb !== colour(2'(b >> (6 - 2 * ((hq[1] % 8) / 2))))) begin
        failures++; $display("FAIL pixel h=%0d v=%0d rgb=%b", hq[1], vq[1], vga_rgb);
      end
    end
    hq[1] = hq[0]; vq[1] = vq[0];
    hq[0] = int'(dut.u_vga.hcnt); vq[0] = int'(dut.u_vga.vcnt);
  end
  always @(negedge vga_vsyncb) if (halted) n_vsync++;

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    int cyc;
    halted = 0;
    assemble();
    repeat (5) @(negedge clk);
    rst = 0;
    cyc = 0;
    while (!(dut.state == S11 && dut.pc == word_t'(halt_addr + 1)) && cyc < 3_000_000) begin
      @(negedge clk); cyc++;
    end
    halted = 1;
    $display("program reached its end after %0d clocks", cyc);
    // let a full video frame pass with the new frame buffer
    while (n_vsync < 3 && cyc < 6_000_000) begin @(negedge clk); cyc++; end
    foreach (expected[i]) begin
      checks++;
      if (mem.mem['h200 + i] !== expected[i]) begin
        failures++;
        $display("FAIL result %0d: %h expected %h", i, mem.mem['h200 + i], expected[i]);
      end
    end
    checks++; if (seg !== 7'h5B) begin failures++; $display("FAIL seg %h", seg); end
    checks++; if (ppi_status !== 3'd6) begin failures++; $display("FAIL ppi status"); end
    checks++; if (dut.u_fb.g_bank[5].g_ram.u_ram.mem[511] !== 8'h99) begin
      failures++; $display("FAIL last frame-buffer byte");
    end
    checks++; if (mem.mem[16'hDBFF] !== 16'h0099) begin   // I/O writes reach SDRAM too
      failures++; $display("FAIL SDRAM copy of I/O write");
    end
    foreach (state_seen[i]) need(state_seen[i], $sformatf("state %s", state_e'(i)));
    need(n_br_taken, "Bcond taken");
    need(n_br_not, "Bcond not taken");
    need(n_j_taken, "Jcond taken");
    need(n_j_not, "Jcond not taken");
    need(n_jal, "JAL");
    need(n_loads, "loads (13 clocks)");
    need(n_stores, "stores (9 clocks)");
    checks++; if (bad_ld != 0 || bad_st != 0) begin
      failures++; $display("FAIL access times: %0d loads, %0d stores off", bad_ld, bad_st);
    end
    need(n_io_wr_seg, "seven-segment write");
    need(n_io_rd_seg, "seven-segment read");
    need(n_io_rd_ppi, "parallel port read");
    need(n_io_wr_ppi, "parallel port write");
    need(n_io_wr_uart, "UART register write");
    need(n_io_rd_uart, "UART register read");
    need(n_tx_frames, "UART frame sent");
    need(n_rx_frames, "UART frame received");
    need(n_kb_frames, "PS/2 frame received");
    need(n_io_rd_ps2, "PS/2 read");
    need(n_io_wr_ps2, "PS/2 clear");
    need(n_io_wr_vga, "frame-buffer write");
    need(n_io_rd_vga, "frame-buffer read (write-only)");
    need(n_fb_steal, "frame-buffer port taken from VGA");
    need(n_vsync, "VGA frames");
    need(pix_checked, "VGA pixels checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

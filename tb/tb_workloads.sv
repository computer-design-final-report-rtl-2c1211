// tb_workloads: runs three complete programs on the whole computer at its
// default parameters, each from reset, with the SDRAM model holding the
// program:
//  1. a hand-assembled bring-up program given as raw instruction words
//     (MOVI, ADDI, SUB, ADD, SUBI, LSHI, STOR, OR, LOAD); its four stores
//     are checked against values worked out by hand;
//  2. a display test that copies a digit pattern from a table at 0x3000
//     to the seven-segment register and polls the parallel port; as
//     written, the loop reloads the table index from zero every pass, so
//     the display must show the pattern of digit 0 (0x77);
//  3. the animation player: it blanks the 3 KB frame buffer to white,
//     then copies each frame from SDRAM (one frame byte per word) into the
//     frame buffer at a row/column offset, calling a delay routine after
//     each frame whose length is set by the low nibble of the last PS/2
//     scan code, and starts over after the last frame. It is run twice,
//     with two frames each time: small frames of 4 x 3 bytes (16 x 3
//     pixels) at an offset, with a key pressed, and full-screen frames of
//     32 x 96 bytes (128 x 96 pixels). After each frame the bench compares
//     the whole frame buffer, then watches one complete video frame on the
//     VGA outputs and compares every visible position with its pixel
//     colour. It counts the inner delay-loop passes (65280 with no key,
//     2 x 65280 after the key with scan code 0x21 has been pressed) and
//     checks that one pass takes 51 clocks (three 17-clock instructions).
// The three programs and the table contents are those of the design
// description. Own choices: the frame size, offsets and pixel values of the
// test animation, the key pressed, and the delay routine placed at 0x0080,
// the address the demo's call jumps to (the animation header sits at 0x0100).
module tb_workloads;
  import cr16_pkg::*;

  logic clk = 0, rst = 1;
  word_t sdram_addr, sdram_wdata, sdram_rdata;
  logic sdram_rd, sdram_wr, sdram_done;
  logic [6:0] seg;
  logic [7:0] ppi_data = 8'h0B;
  logic [2:0] ppi_status;
  logic uart_rxd = 1, uart_txd, kb_clk = 1, kb_data = 1;
  logic vga_hsyncb, vga_vsyncb, video_clk;
  logic [5:0] vga_rgb;
  int checks = 0, failures = 0;

  cr16_system dut (.*);
  sdram_model mem (.clk(clk), .addr(sdram_addr), .wdata(sdram_wdata), .rdata(sdram_rdata),
                   .rd(sdram_rd), .wr(sdram_wr), .done(sdram_done));
  always #10 clk = ~clk;

  // ---------------- assembler ----------------
  int unsigned apc;
  function automatic void emit(input word_t w);
    mem.mem[apc] = w;
    apc++;
  endfunction
  function automatic word_t R(input logic [3:0] ext, input logic [3:0] rs, input logic [3:0] rd);
    return {4'h0, rd, ext, rs};            // assembler order: op Rsrc Rdest
  endfunction
  function automatic word_t I(input opcode_e op, input logic [7:0] imm, input logic [3:0] rd);
    return {op, rd, imm};                  // op Imm Rdest
  endfunction
  function automatic word_t LOAD(input logic [3:0] rd, input logic [3:0] ra);
    return {4'h4, rd, EXT_LOAD, ra};
  endfunction
  function automatic word_t STOR(input logic [3:0] rs, input logic [3:0] ra);
    return {4'h4, rs, EXT_STOR, ra};
  endfunction
  function automatic word_t BR(input logic [3:0] cond, input int target);
    return {4'hC, cond, 8'(target - int'(apc) - 1)};
  endfunction
  function automatic word_t JC(input logic [3:0] cond, input logic [3:0] rt);
    return {4'h4, cond, EXT_JCND, rt};
  endfunction
  function automatic word_t JAL(input logic [3:0] rl, input logic [3:0] rt);
    return {4'h4, rl, EXT_JAL, rt};
  endfunction

  task automatic restart();
    rst = 1;
    foreach (mem.mem[i]) mem.mem[i] = '0;
    repeat (5) @(negedge clk);
  endtask

  task automatic run_until_pc(input word_t target, input int limit, output int cyc);
    cyc = 0;
    while (!(dut.state == S0 && dut.pc == target) && cyc < limit) begin
      @(negedge clk); cyc++;
    end
    checks++;
    if (cyc >= limit) begin failures++; $display("FAIL program did not reach %h", target); end
  endtask

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- workload 1: bring-up words ----------------
  task automatic bringup();
    word_t prog [18] = '{16'hd002, 16'h5001, 16'hd110, 16'hd230, 16'h0190, 16'h0051,
                         16'h9005, 16'h8001, 16'h4042, 16'h5201, 16'h4142, 16'h0021,
                         16'h5201, 16'h4042, 16'hd300, 16'h4103, 16'h5201, 16'h4142};
    int cyc;
    restart();
    foreach (prog[i]) mem.mem[i] = prog[i];
    rst = 0;
    run_until_pc(16'd18, 100000, cyc);
    $display("bring-up program: %0d clocks", cyc);
    // r0=2+1=3, r1=0x10, r2=0x30; r1=0x10-3=0x0d; r0=3+0x0d=0x10; r0-5=0x0b; <<1=0x16
    check(mem.mem[16'h30] == 16'h0016, "bring-up store 1");
    check(mem.mem[16'h31] == 16'h000D, "bring-up store 2");
    check(mem.mem[16'h32] == 16'h001F, "bring-up store 3 (OR)");
    check(mem.mem[16'h33] == 16'hD002, "bring-up store 4 (LOAD of word 0)");
  endtask

  // ---------------- workload 2: seven-segment / parallel port ----------------
  task automatic display_test();
    word_t table_ [17] = '{16'h77, 16'h12, 16'h5d, 16'h5b, 16'h3a, 16'h6b, 16'h6f, 16'h52,
                           16'h7f, 16'h7a, 16'h7e, 16'h2f, 16'h65, 16'h1f, 16'h6d, 16'h6c,
                           16'h37};
    int unsigned loop_a;
    int ppi_reads;
    restart();
    foreach (table_[i]) mem.mem['h3000 + i] = table_[i];
    apc = 0;
    emit(I(OP_LUI, 8'hc0, 7));
    emit(I(OP_LUI, 8'hc1, 8));
    emit(I(OP_LUI, 8'h30, 4));
    loop_a = apc;
    emit(I(OP_MOVI, 8'h00, 0));
    emit(R(EXT_ADD, 4, 0));
    emit(LOAD(1, 0));
    emit(STOR(1, 7));
    emit(LOAD(0, 8));
    emit(I(OP_ANDI, 8'h3f, 0));
    emit(I(OP_CMPI, 8'h10, 0));
    emit(BR(C_LS, loop_a));
    emit(I(OP_MOVI, 8'h10, 0));
    emit(BR(C_UC, loop_a));
    rst = 0;
    ppi_reads = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (dut.rddone && dut.ppi_en) ppi_reads++;
    end
    check(seg == 7'h77, "seven-segment shows digit 0 pattern");
    check(ppi_reads > 10, "parallel port polled");
    $display("display test: %0d parallel-port reads in 20000 clocks", ppi_reads);
  endtask

  // ---------------- workload 3: animation demo ----------------
  localparam int FRAMES = 2;
  localparam int ANIM = 'h100, DATA = ANIM + 8, DELAY_FN = 'h80;
  int xres, yres, xoff, yoff;
  int unsigned bne_delay2 = 0;
  int delay_passes = 0, first_pass = 0, last_pass = 0, cyc_all = 0;

  // passes of the delay routine's inner loop (its BNE taken or not)
  always @(negedge clk) begin
    cyc_all++;
    if (dut.state == S11 && dut.pc == word_t'(bne_delay2 + 1)) begin
      delay_passes++;
      if (delay_passes == 1) first_pass = cyc_all;
      last_pass = cyc_all;
    end
  end

  task automatic send_key(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kb_data = f[i];
      repeat (500) @(posedge clk);
      kb_clk = 0;
      repeat (1000) @(posedge clk);
      kb_clk = 1;
      repeat (500) @(posedge clk);
    end
  endtask

  function automatic logic [7:0] pix(input int f, input int y, input int x);
    return 8'(f * 8'h40 + y * 8'h10 + x + 1);
  endfunction

  function automatic logic [7:0] fb(input int a);
    case (a / 512)
      0: return dut.u_fb.g_bank[0].g_ram.u_ram.mem[a % 512];
      1: return dut.u_fb.g_bank[1].g_ram.u_ram.mem[a % 512];
      2: return dut.u_fb.g_bank[2].g_ram.u_ram.mem[a % 512];
      3: return dut.u_fb.g_bank[3].g_ram.u_ram.mem[a % 512];
      4: return dut.u_fb.g_bank[4].g_ram.u_ram.mem[a % 512];
      default: return dut.u_fb.g_bank[5].g_ram.u_ram.mem[a % 512];
    endcase
  endfunction

  // byte a of the frame buffer as frame f should leave it
  function automatic logic [7:0] fb_expect(input int f, input int a);
    int y, x;
    y = a / 32 - yoff / 32;
    x = a % 32 - xoff;
    if (y >= 0 && y < yres && x >= 0 && x < xres) return pix(f, y, x);
    return 8'hFF;
  endfunction

  task automatic check_frame(input int f);
    int errs;
    errs = 0;
    for (int a = 0; a < 3072; a++)
      if (fb(a) !== fb_expect(f, a)) errs++;
    check(errs == 0, $sformatf("frame %0d: whole frame buffer", f));
  endtask

  // Watches one whole video frame at the pixel rate and compares every
  // visible position with the colour of its frame-buffer pixel (the 128 x 96
  // picture doubled to 256 x 192 at the top left, black elsewhere).
  task automatic check_video(input int f);
    int h, v, n, errs;
    logic was_ce, vs_prev, synced;
    errs = 0; synced = 0; was_ce = 0; vs_prev = 1; h = 0; v = 0; n = 0;
    while (n < 400 * 525 + 10) begin
      @(negedge clk);
      if (was_ce) begin
        // the outputs now show the position two pixel counts back
        if (synced) begin
          logic [5:0] exp_rgb;
          exp_rgb = 6'd0;
          if (h < 256 && v < 192) begin
            logic [7:0] b;
            b = fb_expect(f, (v / 2) * 32 + h / 8);
            case (2'(b >> (6 - 2 * ((h % 8) / 2))))
              2'b00: exp_rgb = 6'b110000;
              2'b01: exp_rgb = 6'b000011;
              2'b10: exp_rgb = 6'b001100;
              default: exp_rgb = 6'b111111;
            endcase
          end
          if (vga_rgb !== exp_rgb) errs++;
          n++;
          h++;
          if (h == 400) begin h = 0; v = (v + 1) % 525; end
        end
        if (vs_prev && !vga_vsyncb) begin synced = 1; h = 1; v = 490; end
        vs_prev = vga_vsyncb;
      end
      was_ce = dut.pix_ce;
    end
    check(errs == 0, $sformatf("frame %0d: one full video frame on the VGA outputs", f));
  endtask

  // Loads the animation player and an animation of FRAMES frames of
  // x_bytes x y_lines bytes at byte offsets (x_off, y_off_lines * 32), and
  // runs it for one cycle. With a key the second delay is doubled.
  task automatic demo(input int x_bytes, input int y_lines, input int x_off,
                      input int y_off_lines, input logic key, input logic video);
    int unsigned blank_a, cycle_a, frame_a, ver_a, hor_a, d1_a, d2_a;
    xres = x_bytes; yres = y_lines; xoff = x_off; yoff = y_off_lines * 32;
    restart();
    mem.mem[ANIM + 0] = 16'(xres);
    mem.mem[ANIM + 1] = 16'(yres);
    mem.mem[ANIM + 2] = 16'(xoff);
    mem.mem[ANIM + 3] = 16'(yoff);
    mem.mem[ANIM + 4] = 16'(FRAMES);
    mem.mem[ANIM + 5] = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < yres; y++)
        for (int x = 0; x < xres; x++)
          mem.mem[DATA + (f * yres + y) * xres + x] = {8'h00, pix(f, y, x)};
    apc = 0;
    emit(I(OP_LUI, 8'h01, 6));                  // animation header
    emit(LOAD(7, 6));  emit(I(OP_ADDI, 1, 6));  // x resolution (bytes)
    emit(LOAD(8, 6));  emit(I(OP_ADDI, 1, 6));  // y resolution
    emit(LOAD(9, 6));  emit(I(OP_ADDI, 1, 6));  // x offset (bytes)
    emit(LOAD(10, 6)); emit(I(OP_ADDI, 1, 6));  // y offset (bytes)
    emit(LOAD(11, 6)); emit(I(OP_ADDI, 1, 6));  // number of frames
    emit(LOAD(12, 6)); emit(I(OP_ADDI, 3, 6));  // delay (unused), data
    emit(I(OP_LUI, 8'hd0, 5));
    emit(I(OP_LUI, 8'hdb, 0));
    emit(I(OP_ORI, 8'hff, 0));
    emit(I(OP_MOVI, 8'hff, 2));                 // four white pixels
    blank_a = apc;
    emit(STOR(2, 5));
    emit(I(OP_ADDI, 1, 5));
    emit(R(EXT_CMP, 5, 0));
    emit(BR(C_LS, blank_a));
    cycle_a = apc;
    emit(R(EXT_MOV, 6, 4));
    emit(I(OP_MOVI, 0, 3));
    frame_a = apc;
    emit(I(OP_LUI, 8'hd0, 5));
    emit(I(OP_MOVI, 0, 1));
    emit(R(EXT_ADD, 10, 5));
    ver_a = apc;
    emit(I(OP_MOVI, 0, 0));
    emit(R(EXT_ADD, 9, 5));
    hor_a = apc;
    emit(LOAD(2, 4));
    emit(STOR(2, 5));
    emit(I(OP_ADDI, 1, 4));
    emit(I(OP_ADDI, 1, 5));
    emit(I(OP_ADDI, 1, 0));
    emit(R(EXT_CMP, 7, 0));
    emit(BR(C_HI, hor_a));
    emit(R(EXT_ADD, 9, 5));
    emit(I(OP_ADDI, 1, 1));
    emit(R(EXT_CMP, 8, 1));
    emit(BR(C_HI, ver_a));
    emit(I(OP_MOVI, 8'h80, 14));
    emit(JAL(15, 14));
    emit(I(OP_ADDI, 1, 3));
    emit(R(EXT_CMP, 11, 3));
    emit(BR(C_HI, frame_a));
    emit(BR(C_UC, cycle_a));
    if (apc > DELAY_FN) $display("demo program overlaps the delay routine");
    apc = DELAY_FN;                             // delay routine
    emit(I(OP_LUI, 8'hc4, 5));
    emit(LOAD(1, 5));
    emit(I(OP_ANDI, 8'h0f, 1));
    emit(R(EXT_MOV, 1, 13));
    d1_a = apc;
    emit(I(OP_LUI, 8'hff, 14));
    d2_a = apc;
    emit(I(OP_SUBI, 1, 14));
    emit(I(OP_CMPI, 0, 14));
    bne_delay2 = apc;
    emit(BR(C_NE, d2_a));
    emit(I(OP_CMPI, 0, 13));
    emit(I(OP_SUBI, 1, 13));
    emit(BR(C_NE, d1_a));
    emit(JC(C_UC, 15));
    rst = 0;
    if (key)
      fork
        begin
          // press 'C' (scan code 0x21, low nibble 1) during frame 0's delay
          wait (dut.state == S9);
          repeat (100000) @(posedge clk);
          send_key(8'h21);
        end
      join_none
    for (int f = 0; f < FRAMES; f++) begin
      int cyc;
      cyc = 0;
      while (dut.state != S9 && cyc < 2_000_000) begin @(negedge clk); cyc++; end
      check(cyc < 2_000_000, "frame drawn");
      delay_passes = 0;
      check_frame(f);
      if (video) check_video(f);
      // wait for the delay routine to return
      while (!(dut.state == S11 && dut.ir[11:8] == C_UC && dut.ir[15:12] == 4'h4) && cyc < 30_000_000) begin
        @(negedge clk); cyc++;
      end
      @(negedge clk);
      $display("frame %0d: delay loop passes %0d", f, delay_passes);
      check(delay_passes == ((key && f == 1) ? 2 * 65280 : 65280), $sformatf("delay length of frame %0d", f));
      // three instructions per pass, each 14 fetch + 1 decode + 2 execute clocks
      if (f == 0) check(last_pass - first_pass == 51 * (delay_passes - 1), "51 clocks per delay pass");
    end
  endtask

  initial begin
    bringup();
    display_test();
    demo(4, 3, 14, 10, 1'b1, 1'b1);     // small frames at an offset, key pressed
    demo(32, 96, 0, 0, 1'b0, 1'b1);     // full-screen frames
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

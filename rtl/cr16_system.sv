// cr16_system: the complete 16-bit CR16-style computer.
//
// A multicycle CPU (controller + datapath with its ALU and register file)
// fetches and executes baseline CR16 instructions from a word-addressed
// 16-bit memory. Every load and store goes through the SDRAM interface to
// the external SDRAM controller (ports sdram_*), which answers each rd or
// wr with a one-cycle done. Addresses 0xc000..0xffff are also decoded as
// memory-mapped I/O:
//   0xc000 seven-segment register   0xc100 parallel port
//   0xc200 UART data                0xc300 UART status/control
//   0xc400 PS/2 scan code           0xd000..0xdbff VGA frame buffer
// Writes to I/O are also written to the SDRAM, so every access takes the
// same handshake and the same time; a device register is written in the
// cycle the interface reports wrdone. Reads from I/O also run the full
// SDRAM read, and the interface latches the device's data instead of the
// SDRAM's. The VGA frame buffer has a single port: the CPU owns it for the
// one clock of a frame-buffer write and the VGA core reads it the rest of
// the time, so a write can spoil the byte the screen is fetching (a
// one-byte glitch, which the design accepts). The video logic runs on the
// system clock with a divide-by-four clock enable (12.5 MHz at the 50 MHz
// system clock). rst is synchronous, active high; execution starts at
// address 0x0000. There are no interrupts. The structure is the design's;
// the single clock domain and the write timing of I/O registers are this
// implementation's choices.
module cr16_system
  import cr16_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 19_200
) (
  input  logic       clk,
  input  logic       rst,
  // SDRAM controller
  output word_t      sdram_addr,
  output word_t      sdram_wdata,
  input  word_t      sdram_rdata,
  output logic       sdram_rd,
  output logic       sdram_wr,
  input  logic       sdram_done,
  // seven-segment display
  output logic [6:0] seg,
  // parallel port
  input  logic [7:0] ppi_data,
  output logic [2:0] ppi_status,
  // UART
  input  logic       uart_rxd,
  output logic       uart_txd,
  // PS/2 keyboard
  input  logic       kb_clk,
  input  logic       kb_data,
  // VGA
  output logic       vga_hsyncb,
  output logic       vga_vsyncb,
  output logic [5:0] vga_rgb,
  output logic       video_clk
);

  // ---------------- CPU ----------------
  ctrl_t  ctrl;
  word_t  ir, pc, mar, mdr, mem_rdata;
  flags_t flags;
  state_e state;
  logic   r, w, rddone, wrdone;

  controller u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .ir     (ir),
    .flags  (flags),
    .rddone (rddone),
    .wrdone (wrdone),
    .ctrl   (ctrl),
    .r      (r),
    .w      (w),
    .state  (state)
  );

  datapath u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .mem_rdata (mem_rdata),
    .ir        (ir),
    .flags     (flags),
    .pc        (pc),
    .mar       (mar),
    .mdr       (mdr)
  );

  // ---------------- memory interface ----------------
  word_t io_rdata, rdata_mux;
  logic  io_en, seg_en, ppi_en, uart_en, ps2_en, vga_en;

  assign rdata_mux = io_en ? io_rdata : sdram_rdata;

  sdram_if u_sdif (
    .clk       (clk),
    .rst       (rst),
    .w         (w),
    .r         (r),
    .done      (sdram_done),
    .rdata_in  (rdata_mux),
    .wr        (sdram_wr),
    .wrdone    (wrdone),
    .rd        (sdram_rd),
    .rddone    (rddone),
    .rdata_out (mem_rdata)
  );

  assign sdram_addr  = mar;
  assign sdram_wdata = mdr;

  addr_decoder u_dec (
    .addr    (mar),
    .io_en   (io_en),
    .seg_en  (seg_en),
    .ppi_en  (ppi_en),
    .uart_en (uart_en),
    .ps2_en  (ps2_en),
    .vga_en  (vga_en)
  );

  // ---------------- I/O devices ----------------
  word_t seg_rdata, ppi_rdata, uart_rdata, ps2_rdata;
  logic  io_we;
  logic [7:0] scancode;
  logic  kb_strobe;

  assign io_we = wrdone && io_en;

  sevenseg_io u_seg (
    .clk   (clk),
    .rst   (rst),
    .sel   (seg_en),
    .we    (io_we),
    .wdata (mdr),
    .rdata (seg_rdata),
    .seg   (seg)
  );

  ppi u_ppi (
    .clk         (clk),
    .rst         (rst),
    .sel         (ppi_en),
    .we          (io_we),
    .wdata       (mdr),
    .rdata       (ppi_rdata),
    .port_data   (ppi_data),
    .port_status (ppi_status)
  );

  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk     (clk),
    .rst     (rst),
    .sel     (uart_en),
    .reg_sel (mar[8]),
    .we      (io_we),
    .wdata   (mdr),
    .rdata   (uart_rdata),
    .rxd     (uart_rxd),
    .txd     (uart_txd)
  );

  ps2_kbd u_ps2 (
    .clk      (clk),
    .rst      (rst),
    .sel      (ps2_en),
    .we       (io_we),
    .rdata    (ps2_rdata),
    .kb_clk   (kb_clk),
    .kb_data  (kb_data),
    .scancode (scancode),
    .strobe   (kb_strobe)
  );

  always_comb begin
    io_rdata = '0;
    if (seg_en)  io_rdata = seg_rdata;
    if (ppi_en)  io_rdata = ppi_rdata;
    if (uart_en) io_rdata = uart_rdata;
    if (ps2_en)  io_rdata = ps2_rdata;
    // the frame buffer is write-only: reads return 0
  end

  // ---------------- VGA ----------------
  logic        pix_ce, fb_we;
  logic [14:0] vga_addr;
  logic [7:0]  fb_rdata;
  logic        vga_csb, vga_oeb, vga_web;

  clk_div4 u_div (
    .clk     (clk),
    .rst     (rst),
    .ce      (pix_ce),
    .clk_out (video_clk)
  );

  // Frame-buffer port: the CPU's write wins, otherwise the VGA core reads
  assign fb_we = io_we && vga_en;

  vga_bram u_fb (
    .clk      (clk),
    .clear    (rst),
    .addr_in  (fb_we ? mar[11:0] : vga_addr[11:0]),
    .data_in  (mdr[7:0]),
    .data_out (fb_rdata),
    .en       (1'b1),
    .write_en (fb_we)
  );

  vga_core u_vga (
    .clk    (clk),
    .rst    (rst),
    .ce     (pix_ce),
    .hsyncb (vga_hsyncb),
    .vsyncb (vga_vsyncb),
    .rgb    (vga_rgb),
    .addr   (vga_addr),
    .data   (fb_rdata),
    .csb    (vga_csb),
    .oeb    (vga_oeb),
    .web    (vga_web)
  );

endmodule

// vga_core: VGA timing and pixel generator for a 128 x 96, 2-bit-per-pixel
// frame buffer shown as 2 x 2 blocks.
//
// Runs on the system clock, advancing only when ce (the 12.5 MHz pixel
// rate) is high. One pixel clock is one horizontal count; the timing is a
// 640 x 480, 60 Hz frame at half horizontal resolution:
//   horizontal 400 counts: 320 visible, 8 front porch, 48 sync, 24 back
//   vertical   525 lines : 480 visible, 10 front porch, 2 sync, 33 back
// Both syncs are active low. The frame-buffer picture fills the top-left
// 256 x 192 counts of the visible area (every buffer pixel is two counts
// wide and two lines high); the rest of the visible area is black, and
// the output is black during blanking.
// Pipeline (all steps on ce): step 0, the counters form the frame-buffer
// byte address {line[7:1], count[7:3]} on addr; the synchronous frame
// buffer answers on data; step 1, at the first count of every byte the
// byte is loaded into the pixel register, and sync and blanking are
// delayed one step; step 2, the 2-bit pixel chosen by count[2:1] (pixel 0
// in bits [7:6]) is mapped to the 6-bit rgb output {R1 R0 G1 G0 B1 B0}:
//   00 red, 01 blue, 10 green, 11 white.
// So rgb, hsyncb and vsyncb are registered and aligned, two pixel clocks
// behind the counters. csb, oeb and web are the unused external-RAM
// strobes, held inactive (high). rst is synchronous, active high.
// The 128 x 96 size, 2-bit colour, 2 x 2 blocks, 15-bit address port,
// four pixels per byte and the pixel register are the design's; the timing
// numbers, the pixel order within a byte and the colour codes are this
// implementation's choices.
module vga_core #(
  parameter int unsigned H_VIS   = 320,
  parameter int unsigned H_FP    = 8,
  parameter int unsigned H_SYNC  = 48,
  parameter int unsigned H_BP    = 24,
  parameter int unsigned V_VIS   = 480,
  parameter int unsigned V_FP    = 10,
  parameter int unsigned V_SYNC  = 2,
  parameter int unsigned V_BP    = 33,
  parameter int unsigned FB_W    = 128,
  parameter int unsigned FB_H    = 96
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  output logic        hsyncb,
  output logic        vsyncb,
  output logic [5:0]  rgb,
  output logic [14:0] addr,
  input  logic [7:0]  data,
  output logic        csb,
  output logic        oeb,
  output logic        web
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic [9:0] hcnt, vcnt;
  logic       hs0, vs0, pic0;
  logic       hs1, vs1, pic1;
  logic [2:0] h1;
  logic [7:0] pix_byte;

  // A: horizontal pixel counter, B: vertical line counter
  always_ff @(posedge clk)
    if (rst) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (ce) begin
      if (hcnt == 10'(H_TOT - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == 10'(V_TOT - 1)) ? '0 : vcnt + 10'd1;
      end else begin
        hcnt <= hcnt + 10'd1;
      end
    end

  // C, D: sync pulses; E: combinational blanking / picture area
  assign hs0  = !(hcnt >= 10'(H_VIS + H_FP) && hcnt < 10'(H_VIS + H_FP + H_SYNC));
  assign vs0  = !(vcnt >= 10'(V_VIS + V_FP) && vcnt < 10'(V_VIS + V_FP + V_SYNC));
  assign pic0 = (hcnt < 10'(2 * FB_W)) && (vcnt < 10'(2 * FB_H));

  // H: address of the byte holding the next four pixels
  assign addr = {3'b000, vcnt[7:1], hcnt[7:3]};

  // F, I: pipelined blanking and the pixel-data register
  always_ff @(posedge clk)
    if (rst) begin
      hs1      <= 1'b1;
      vs1      <= 1'b1;
      pic1     <= 1'b0;
      h1       <= '0;
      pix_byte <= '0;
    end else if (ce) begin
      hs1  <= hs0;
      vs1  <= vs0;
      pic1 <= pic0;
      h1   <= hcnt[2:0];
      if (hcnt[2:0] == 3'd0) pix_byte <= data;
    end

  // J: map the active pixel to the colour guns
  logic [1:0] pix;
  logic [5:0] colour;
  always_comb begin
    unique case (h1[2:1])
      2'd0: pix = pix_byte[7:6];
      2'd1: pix = pix_byte[5:4];
      2'd2: pix = pix_byte[3:2];
      default: pix = pix_byte[1:0];
    endcase
    unique case (pix)
      2'b00: colour = 6'b11_00_00;
      2'b01: colour = 6'b00_00_11;
      2'b10: colour = 6'b00_11_00;
      default: colour = 6'b11_11_11;
    endcase
  end

  always_ff @(posedge clk)
    if (rst) begin
      hsyncb <= 1'b1;
      vsyncb <= 1'b1;
      rgb    <= '0;
    end else if (ce) begin
      hsyncb <= hs1;
      vsyncb <= vs1;
      rgb    <= pic1 ? colour : 6'b00_00_00;
    end

  // G: external RAM strobes, not used
  assign csb = 1'b1;
  assign oeb = 1'b1;
  assign web = 1'b1;

endmodule

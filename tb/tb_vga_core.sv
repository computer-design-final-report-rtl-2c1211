// tb_vga_core: runs the VGA core for one whole frame plus a little, with
// a pixel enable every other clock and a frame-buffer model whose byte at
// address a is (a * 37 + 11) mod 256. It checks the sync periods and pulse
// widths (400 counts per line, 48 low; 525 lines per frame, 2 low), and
// for every pixel position it tracks itself (from the first vsync) the
// expected colour: black outside the 256 x 192 picture and during
// blanking, otherwise the 2-bit pixel of its byte mapped to
// 00 red, 01 blue, 10 green, 11 white. Outputs lag the position by two
// pixel clocks.
module tb_vga_core;
  logic clk = 0, rst = 1, ce = 0;
  logic hsyncb, vsyncb, csb, oeb, web;
  logic [5:0] rgb;
  logic [14:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  vga_core dut (.*);
  always #5 clk = ~clk;

  // synchronous frame-buffer model
  always @(posedge clk) data <= 8'((int'(addr) * 37 + 11) % 256);

  function automatic logic [5:0] expect_rgb(input int h, input int v);
    int a;
    logic [7:0] b;
    logic [1:0] p;
    if (h >= 256 || v >= 192) return 6'd0;
    a = (v / 2) * 32 + h / 8;
    b = 8'((a * 37 + 11) % 256);
    p = 2'(b >> (6 - 2 * ((h % 8) / 2)));
    case (p)
      2'b00: return 6'b110000;
      2'b01: return 6'b000011;
      2'b10: return 6'b001100;
      default: return 6'b111111;
    endcase
  endfunction

  initial begin
    int h, v, n, last_hfall, last_vfall, hlow, vlow;
    logic hs_prev, vs_prev, synced;
    repeat (3) @(negedge clk);
    rst = 0;
    synced = 0; hs_prev = 1; vs_prev = 1; last_hfall = -1; last_vfall = -1;
    n = 0; hlow = 0; vlow = 0; h = 0; v = 0;
    while (n < 2 * 400 * 525 + 5000) begin
      @(negedge clk); ce = 1;
      @(negedge clk); ce = 0;
      n++;
      // outputs now show position n-1 of the pipeline, two counts back
      if (!hsyncb) hlow++;
      if (!vsyncb) vlow++;
      if (hs_prev && !hsyncb) begin
        if (last_hfall >= 0) begin
          checks++;
          if (n - last_hfall != 400) begin failures++; $display("FAIL line %0d", n - last_hfall); end
        end
        last_hfall = n;
      end
      if (!hs_prev && hsyncb) begin
        checks++;
        if (hlow != 48) begin failures++; $display("FAIL hsync width %0d", hlow); end
        hlow = 0;
      end
      if (vs_prev && !vsyncb) begin
        if (last_vfall >= 0) begin
          checks++;
          if (n - last_vfall != 400 * 525) failures++;
        end
        last_vfall = n;
        // first output count of the vsync pulse is count 0 of line 490,
        // pixel 0 of line 0 is 35 lines later
        synced = 1;
        h = 0; v = 490;
      end
      if (!vs_prev && vsyncb) begin
        checks++;
        if (vlow != 2 * 400) begin failures++; $display("FAIL vsync width %0d", vlow); end
        vlow = 0;
      end
      if (synced) begin
        // position of the current output, then advance
        if (v < 480 && h < 320) begin
          checks++;
          if (rgb !== expect_rgb(h, v)) begin
            failures++;
            if (failures < 10) $display("FAIL rgb h=%0d v=%0d got %b exp %b", h, v, rgb, expect_rgb(h, v));
          end
        end else if (!(v < 480 && h < 320)) begin
          checks++;
          if (rgb !== 6'd0) failures++;
        end
        h++;
        if (h == 400) begin h = 0; v = (v + 1) % 525; end
      end
      hs_prev = hsyncb; vs_prev = vsyncb;
    end
    checks++;
    if (!synced || csb !== 1 || oeb !== 1 || web !== 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (2 * 400 * 525 + 20000)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

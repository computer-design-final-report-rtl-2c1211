// tb_ps2_kbd: sends PS/2 frames (make and break codes of several keys),
// checks the scan-code register and the strobe after each good frame,
// that a frame with bad parity is dropped, and that a store clears the
// register.
module tb_ps2_kbd;
  import cr16_pkg::*;
  logic clk = 0, rst = 1, sel = 0, we = 0, kb_clk = 1, kb_data = 1, strobe;
  word_t rdata;
  logic [7:0] scancode;
  int checks = 0, failures = 0, strobes = 0;

  ps2_kbd dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (strobe) strobes++;

  task automatic send(input logic [7:0] b, input logic bad_parity);
    logic [10:0] f;
    f = {1'b1, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kb_data = f[i];
      repeat (10) @(posedge clk);
      kb_clk = 0;
      repeat (20) @(posedge clk);
      kb_clk = 1;
      repeat (10) @(posedge clk);
    end
    repeat (10) @(posedge clk);
  endtask

  initial begin
    static logic [7:0] codes [8] = '{8'h1C, 8'hF0, 8'h1C, 8'hE0, 8'h75, 8'hE0, 8'hF0, 8'h75};
    int s0;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (codes[i]) begin
      s0 = strobes;
      send(codes[i], 1'b0);
      checks++;
      if (scancode !== codes[i] || rdata !== {8'h00, codes[i]} || strobes != s0 + 1) begin
        failures++;
        $display("FAIL code %h got %h strobes %0d", codes[i], scancode, strobes - s0);
      end
    end
    s0 = strobes;
    send(8'h32, 1'b1);
    checks++;
    if (scancode !== 8'h75 || strobes != s0) failures++;
    @(negedge clk); sel = 1; we = 1;
    @(negedge clk); sel = 0; we = 0;
    checks++;
    if (rdata !== 16'h0000) failures++;
    send(8'h1C, 1'b0);
    checks++;
    if (scancode !== 8'h1C) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

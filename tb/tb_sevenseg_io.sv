// tb_sevenseg_io: writes random words to the seven-segment register with
// and without the select, and checks segments and read-back.
module tb_sevenseg_io;
  import cr16_pkg::*;
  logic clk = 0, rst = 1, sel = 0, we = 0;
  word_t wdata = 0, rdata;
  logic [6:0] seg;
  logic [7:0] model = 0;
  int checks = 0, failures = 0;

  sevenseg_io dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    checks++; if (seg !== 7'd0 || rdata !== 16'd0) failures++;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sel = 1'($urandom); we = 1'($urandom); wdata = word_t'($urandom);
      @(negedge clk);
      if (sel && we) model = wdata[7:0];
      sel = 0; we = 0;
      checks++;
      if (seg !== model[6:0] || rdata !== {8'h00, model}) failures++;
    end
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

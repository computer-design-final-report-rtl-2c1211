// tb_clk_div4: checks that the clock enable is high exactly one clock in
// four and that clk_out is a square wave of four clocks' period.
module tb_clk_div4;
  logic clk = 0, rst = 1, ce, clk_out;
  int checks = 0, failures = 0;
  int last_ce = -1, n = 0;
  logic [3:0] hist = '0;

  clk_div4 dut (.clk(clk), .rst(rst), .ce(ce), .clk_out(clk_out));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk); #1;
      n++;
      if (ce) begin
        if (last_ce >= 0) begin
          checks++;
          if (n - last_ce != 4) failures++;
        end
        last_ce = n;
      end
      hist = {hist[2:0], clk_out};
      if (i >= 4) begin
        // square wave of period 4, high in the clock where ce is high
        checks++;
        if (hist[2] !== ~hist[0] || (ce && !clk_out)) failures++;
        if (hist[0] == hist[1] && hist[1] == hist[2]) failures++;
      end
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

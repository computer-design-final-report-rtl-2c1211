// tb_ppi: drives the parallel-port data lines and writes the send
// register; checks the read value (one clock of sampling delay) and the
// three status lines.
module tb_ppi;
  import cr16_pkg::*;
  logic clk = 0, rst = 1, sel = 0, we = 0;
  word_t wdata = 0, rdata;
  logic [7:0] port_data = 0;
  logic [2:0] port_status, model = 0;
  int checks = 0, failures = 0;

  ppi dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      port_data = 8'($urandom);
      sel = 1'($urandom); we = 1'($urandom); wdata = word_t'($urandom);
      @(negedge clk);
      if (sel && we) model = wdata[2:0];
      sel = 0; we = 0;
      checks++;
      if (rdata !== {8'h00, port_data} || port_status !== model) failures++;
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

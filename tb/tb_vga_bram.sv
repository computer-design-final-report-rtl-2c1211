// tb_vga_bram: fills the whole 3072-byte frame buffer with random bytes,
// reads every byte back (one clock of read latency) and checks that
// addresses beyond the six banks read zero and that a disabled port holds.
module tb_vga_bram;
  logic clk = 0, clear = 1, en = 0, write_en = 0;
  logic [11:0] addr_in = 0;
  logic [7:0] data_in = 0, data_out;
  logic [7:0] shadow [3072];
  int checks = 0, failures = 0;

  vga_bram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    clear = 0;
    for (int i = 0; i < 3072; i++) begin
      @(negedge clk);
      en = 1; write_en = 1; addr_in = 12'(i); data_in = 8'($urandom);
      shadow[i] = data_in;
    end
    @(negedge clk);
    write_en = 0;
    for (int n = 0; n < 6000; n++) begin
      int i;
      i = (n < 3072) ? (3071 - n) : $urandom_range(0, 4095);
      @(negedge clk);
      addr_in = 12'(i);
      @(negedge clk);
      checks++;
      if (data_out !== ((i < 3072) ? shadow[i] : 8'h00)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h", i, data_out);
      end
    end
    // disabled port keeps its output
    addr_in = 12'd5;
    @(negedge clk);
    en = 0; addr_in = 12'd6;
    @(negedge clk);
    checks++;
    if (data_out !== shadow[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

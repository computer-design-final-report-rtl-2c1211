// tb_regfile: self-checking test of the 16 x 16 register file. Random
// writes are mirrored in a shadow array; both read ports are compared with
// it after every write.
module tb_regfile;
  import cr16_pkg::*;

  logic clk = 0, write = 0;
  logic [3:0] a_addr = 0, d_addr = 0;
  word_t din = 0, spo, dpo;
  word_t shadow [16];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .write(write), .a_addr_in(a_addr), .d_addr_in(d_addr),
               .data_in(din), .spo_out(spo), .dpo_out(dpo));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      a_addr = 4'(i); din = word_t'($urandom); write = 1;
      shadow[i] = din;
      @(negedge clk);
      write = 0;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_addr = 4'($urandom); d_addr = 4'($urandom);
      din = word_t'($urandom); write = 1'($urandom);
      #1;
      checks++;
      if (spo !== shadow[a_addr] || dpo !== shadow[d_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d spo=%h exp %h d=%0d dpo=%h exp %h",
                                    a_addr, spo, shadow[a_addr], d_addr, dpo, shadow[d_addr]);
      end
      @(posedge clk);
      if (write) shadow[a_addr] = din;
      #1;
      checks++;
      if (dpo !== shadow[d_addr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

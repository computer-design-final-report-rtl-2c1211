// tb_sdram_if: runs reads and writes through the SDRAM handshake interface
// against the SDRAM model, checking the rd/wr commands, the one-cycle
// rddone/wrdone answers, the latched read data and the number of clocks
// from request to answer (latency of the model + 2).
module tb_sdram_if;
  import cr16_pkg::*;
  localparam int RD_LAT = 9, WR_LAT = 6;
  logic clk = 0, rst = 1, w = 0, r = 0, done, wr, wrdone, rd, rddone;
  word_t rdata_m, rdata_out, addr = 0, wdata = 0;
  int checks = 0, failures = 0;

  sdram_model #(.RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) mem (
    .clk(clk), .addr(addr), .wdata(wdata), .rdata(rdata_m), .rd(rd), .wr(wr), .done(done));

  sdram_if dut (.clk(clk), .rst(rst), .w(w), .r(r), .done(done), .rdata_in(rdata_m),
                .wr(wr), .wrdone(wrdone), .rd(rd), .rddone(rddone), .rdata_out(rdata_out));

  always #5 clk = ~clk;

  task automatic access(input logic is_write, input word_t a, input word_t d,
                        output word_t q, output int cycles);
    @(negedge clk);
    addr = a; wdata = d;
    if (is_write) w = 1; else r = 1;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
      if (rd && wr) failures++;
    end while (!(is_write ? wrdone : rddone));
    q = rdata_out;
    @(negedge clk);
    w = 0; r = 0;
    @(posedge clk); #1;
    checks++;
    if (rddone || wrdone) failures++;     // answers last one clock
  endtask

  initial begin
    word_t shadow [32];
    word_t q;
    int cyc;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      shadow[i] = word_t'($urandom);
      access(1'b1, word_t'(i), shadow[i], q, cyc);
      checks++;
      if (cyc != WR_LAT + 2) begin failures++; $display("FAIL write took %0d", cyc); end
    end
    for (int i = 0; i < 64; i++) begin
      int k;
      k = $urandom_range(0, 31);
      access(1'b0, word_t'(k), 0, q, cyc);
      checks++;
      if (q !== shadow[k]) begin failures++; $display("FAIL read %0d got %h exp %h", k, q, shadow[k]); end
      checks++;
      if (cyc != RD_LAT + 2) begin failures++; $display("FAIL read took %0d", cyc); end
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

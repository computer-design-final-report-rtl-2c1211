// tb_uart: checks both UART directions and their memory-mapped handshakes
// at a reduced bit period of 16 clocks. Transmit: the frame on txd is
// sampled mid-bit and compared with the written byte, the bit period is
// measured, and the acknowledge bit must rise after the frame and fall once
// the request is lowered. Receive: frames driven on rxd must appear in the
// receive register with status bit0, which falls after the acknowledge;
// a frame arriving while a byte is still pending must be dropped.
module tb_uart;
  import cr16_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, sel = 0, reg_sel = 0, we = 0, rxd = 1, txd;
  word_t wdata = 0, rdata;
  int checks = 0, failures = 0;

  uart #(.CLK_HZ(DIV * 10), .BAUD(10)) dut (.*);
  always #5 clk = ~clk;

  task automatic wreg(input logic rs, input word_t d);
    @(negedge clk);
    sel = 1; reg_sel = rs; we = 1; wdata = d;
    @(negedge clk);
    sel = 0; we = 0;
  endtask

  task automatic rreg(input logic rs, output word_t q);
    @(negedge clk);
    sel = 1; reg_sel = rs; #1;
    q = rdata;
    @(negedge clk);
    sel = 0;
  endtask

  task automatic send_rx(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (DIV) @(posedge clk);
    end
    rxd = 1;
  endtask

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    word_t q;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---------- transmit ----------
    for (int t = 0; t < 3; t++) begin
      logic [7:0] b, got;
      longint t_start, t_stop;
      b = 8'($urandom);
      wreg(0, {8'h00, b});
      wreg(1, 16'h0002);
      // find the start bit
      t_start = 0;
      while (txd) begin @(posedge clk); t_start++; end
      t_start = $time;
      repeat (DIV / 2) @(posedge clk);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        got[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      check(txd == 1, "stop bit");
      check(got == b, "tx byte");
      // acknowledge appears at the end of the stop bit
      q = '0;
      while (!q[1] && $time - t_start < 20 * DIV * 10) rreg(1, q);
      t_stop = $time;
      check(q[1] == 1'b1, "tx ack high");
      check((t_stop - t_start) >= 10 * DIV * 10 && (t_stop - t_start) <= 10 * DIV * 10 + 60,
            "frame length 10 bits");
      wreg(1, 16'h0000);
      rreg(1, q);
      check(q[1] == 1'b0, "tx ack low after request low");
      check(txd == 1'b1, "line idle");
    end
    // ---------- receive ----------
    for (int t = 0; t < 3; t++) begin
      logic [7:0] b;
      b = 8'($urandom);
      send_rx(b);
      repeat (4) @(posedge clk);
      rreg(1, q);
      check(q[0] == 1'b1, "rx ready");
      rreg(0, q);
      check(q[7:0] == b, "rx byte");
      if (t == 1) begin
        // a second frame while the first is pending is dropped
        send_rx(~b);
        repeat (4) @(posedge clk);
        rreg(0, q);
        check(q[7:0] == b, "no overwrite while pending");
      end
      wreg(1, 16'h0001);
      repeat (2) @(posedge clk);
      rreg(1, q);
      check(q[0] == 1'b0, "rx ready cleared by ack");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

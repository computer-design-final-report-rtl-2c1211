// uart: serial transmitter and receiver with a memory-mapped handshake.
//
// Registers (reg_sel = address bit 8):
//   0xc200 read : receive register (low byte)   write: transmit register
//   0xc300 read : status  bit0 = byte received, bit1 = transmit acknowledge
//          write: control bit0 = receive acknowledge, bit1 = transmit request
// Receiving: when a frame arrives the byte goes to the receive register and
// status bit0 rises. The program reads 0xc200 and writes 1 to control
// bit0; the receiver then drops status bit0 (and clears control bit0).
// While status bit0 is high any further frame is discarded: there is only
// one byte of buffering. Transmitting: the program writes the transmit
// register, raises control bit1 and waits for status bit1; the transmitter
// sends one frame and then raises status bit1, which falls again once the
// program lowers control bit1 (four-phase handshake).
// Line format: 8 data bits, LSB first, one start and one stop bit, no
// parity, at BAUD bit/s derived from CLK_HZ by a counter (2604 clocks per
// bit at 50 MHz for 19200 bit/s). rxd is synchronised by two flops and
// sampled mid-bit; a frame whose stop bit is low is dropped. rst is
// synchronous, active high; txd idles high.
// The register map, the handshakes and 19.2 kbit/s are the design's; the
// frame format, mid-bit sampling, dropping of extra frames and the
// hardware clearing of control bit0 are this implementation's choices.
module uart
  import cr16_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 19_200
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  sel,       // address decoder: 0xc200 or 0xc300
  input  logic  reg_sel,   // 0: data register, 1: status/control
  input  logic  we,        // one-cycle write strobe
  input  word_t wdata,
  output word_t rdata,
  input  logic  rxd,
  output logic  txd
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);

  // ---------------- register interface ----------------
  logic [7:0] tx_data, rx_data;
  logic       rx_ready, rx_ack, tx_req, tx_ack;

  assign rdata = reg_sel ? {14'd0, tx_ack, rx_ready} : {8'h00, rx_data};

  // ---------------- transmitter ----------------
  typedef enum logic [1:0] {T_IDLE, T_SEND, T_DONE} tst_e;
  tst_e             tst;
  logic [CW-1:0]    tcnt;
  logic [3:0]       tbit;
  logic [9:0]       tshift;

  always_ff @(posedge clk)
    if (rst) begin
      tst     <= T_IDLE;
      tcnt    <= '0;
      tbit    <= '0;
      tshift  <= '1;
      tx_ack  <= 1'b0;
      tx_data <= '0;
      tx_req  <= 1'b0;
    end else begin
      if (sel && we && !reg_sel) tx_data <= wdata[7:0];
      if (sel && we &&  reg_sel) tx_req  <= wdata[1];
      unique case (tst)
        T_IDLE:
          if (tx_req && !tx_ack) begin
            tst    <= T_SEND;
            tshift <= {1'b1, tx_data, 1'b0};
            tcnt   <= '0;
            tbit   <= '0;
          end
        T_SEND:
          if (tcnt == CW'(DIV - 1)) begin
            tcnt   <= '0;
            tshift <= {1'b1, tshift[9:1]};
            if (tbit == 4'd9) begin
              tst    <= T_DONE;
              tx_ack <= 1'b1;
            end else begin
              tbit <= tbit + 4'd1;
            end
          end else begin
            tcnt <= tcnt + CW'(1);
          end
        T_DONE:
          if (!tx_req) begin
            tx_ack <= 1'b0;
            tst    <= T_IDLE;
          end
        default: tst <= T_IDLE;
      endcase
    end

  assign txd = (tst == T_SEND) ? tshift[0] : 1'b1;

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rst_e;
  rst_e          rs;
  logic [CW-1:0] rcnt;
  logic [2:0]    rbit;
  logic [7:0]    rshift;
  logic [1:0]    rsync;

  always_ff @(posedge clk)
    if (rst) begin
      rsync    <= 2'b11;
      rs       <= R_IDLE;
      rcnt     <= '0;
      rbit     <= '0;
      rshift   <= '0;
      rx_data  <= '0;
      rx_ready <= 1'b0;
      rx_ack   <= 1'b0;
    end else begin
      rsync <= {rsync[0], rxd};
      if (sel && we && reg_sel && wdata[0]) rx_ack <= 1'b1;
      if (rx_ready && rx_ack) begin
        rx_ready <= 1'b0;
        rx_ack   <= 1'b0;
      end
      unique case (rs)
        R_IDLE:
          if (!rsync[1]) begin
            rs   <= R_START;
            rcnt <= '0;
          end
        R_START:   // wait half a bit, confirm the start bit
          if (rcnt == CW'(DIV / 2 - 1)) begin
            rcnt <= '0;
            rbit <= '0;
            rs   <= rsync[1] ? R_IDLE : R_DATA;
          end else rcnt <= rcnt + CW'(1);
        R_DATA:
          if (rcnt == CW'(DIV - 1)) begin
            rcnt   <= '0;
            rshift <= {rsync[1], rshift[7:1]};
            if (rbit == 3'd7) rs <= R_STOP;
            rbit <= rbit + 3'd1;
          end else rcnt <= rcnt + CW'(1);
        R_STOP:
          if (rcnt == CW'(DIV - 1)) begin
            rs <= R_IDLE;
            if (rsync[1] && !rx_ready) begin
              rx_data  <= rshift;
              rx_ready <= 1'b1;
            end
          end else rcnt <= rcnt + CW'(1);
        default: rs <= R_IDLE;
      endcase
    end

endmodule

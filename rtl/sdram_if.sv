// sdram_if: handshake state machine between the CPU controller and the
// SDRAM controller.
//
// Waits in IDLE for a read (r) or write (w) request from the controller,
// then raises rd or wr towards the SDRAM controller and holds it until that
// side answers with a one-cycle done. It then gives the controller a
// one-cycle rddone or wrdone and returns to IDLE. For reads it also latches
// the read data present on rdata_in in the cycle done arrives and holds it
// on rdata_out until the next read completes, so the controller can load
// the instruction or data register after rddone. Requests are levels held
// by the controller until it sees the matching *done. rst is synchronous,
// active high. The request/answer sequence is the design's; the data latch
// and the done-pulse convention are this implementation's own.
module sdram_if
  import cr16_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  w,          // write request from the controller
  input  logic  r,          // read request from the controller
  input  logic  done,       // done from the SDRAM controller (one cycle)
  input  word_t rdata_in,   // read data, valid while done is high
  output logic  wr,         // write command to the SDRAM controller
  output logic  wrdone,     // write finished, to the controller
  output logic  rd,         // read command to the SDRAM controller
  output logic  rddone,     // read finished, to the controller
  output word_t rdata_out   // read data held for the controller
);

  typedef enum logic [2:0] {IDLE, READ, WRITE, RD_ACK, WR_ACK} st_e;
  st_e st;

  always_ff @(posedge clk)
    if (rst) begin
      st        <= IDLE;
      rdata_out <= '0;
    end else begin
      unique case (st)
        IDLE:   if (r) st <= READ; else if (w) st <= WRITE;
        READ:   if (done) begin st <= RD_ACK; rdata_out <= rdata_in; end
        WRITE:  if (done) st <= WR_ACK;
        RD_ACK: st <= IDLE;
        WR_ACK: st <= IDLE;
        default: st <= IDLE;
      endcase
    end

  assign rd     = (st == READ);
  assign wr     = (st == WRITE);
  assign rddone = (st == RD_ACK);
  assign wrdone = (st == WR_ACK);

endmodule

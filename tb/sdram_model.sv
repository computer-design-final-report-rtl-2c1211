// sdram_model: behavioural model of the board SDRAM and its controller, for
// simulation only (not synthesizable logic of the design).
//
// 64K x 16-bit words. A read (rd) or write (wr) command, held high by the
// requester, is answered after RD_LAT or WR_LAT clocks with a one-cycle
// 'done'; read data is driven on rdata while done is high. Defaults are
// chosen so that a complete CPU load takes 13 clocks and a store 9 clocks,
// the access times measured on the original board.
module sdram_model #(
  parameter int unsigned RD_LAT = 8,
  parameter int unsigned WR_LAT = 5
) (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  input  logic        rd,
  input  logic        wr,
  output logic        done
);

  logic [15:0] mem [65536];
  int unsigned cnt = 0;
  int unsigned reads = 0, writes = 0;

  initial done = 1'b0;
  initial rdata = '0;
  initial foreach (mem[i]) mem[i] = '0;

  always @(posedge clk) begin
    done <= 1'b0;
    if ((rd || wr) && !done) begin
      cnt <= cnt + 1;
      if (rd && cnt + 1 == RD_LAT) begin
        rdata <= mem[addr];
        done  <= 1'b1;
        cnt   <= 0;
        reads <= reads + 1;
      end else if (wr && cnt + 1 == WR_LAT) begin
        mem[addr] <= wdata;
        done      <= 1'b1;
        cnt       <= 0;
        writes    <= writes + 1;
      end
    end else begin
      cnt <= 0;
    end
  end

endmodule

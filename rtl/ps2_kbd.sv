// ps2_kbd: PS/2 keyboard receiver holding the last scan code at 0xc400.
//
// The keyboard drives kb_clk and kb_data; both are synchronised to the
// system clock by two flops each. On every falling edge of kb_clk one bit
// of the 11-bit frame (start 0, eight data bits LSB first, odd parity,
// stop 1) is shifted in. When the frame is complete and well formed, its
// byte is written to the scan-code register and 'strobe' pulses for one
// clock; a malformed frame is dropped. Make and break codes (F0 xx, E0 ..)
// arrive as separate bytes and each overwrites the register, so a program
// sees them one at a time. A load returns the register in the low byte. A
// store to 0xc400 clears the register to 0, so a program can tell a second
// press of the same key from the first. Because the register is updated
// in the system clock domain, it changes one clock after the last kb_clk
// edge of a frame. rst is synchronous, active high.
// The one-byte buffer and the clearing by the program are the design's;
// the frame check and clear-on-store are this implementation's choices.
module ps2_kbd
  import cr16_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sel,
  input  logic       we,
  output word_t      rdata,
  input  logic       kb_clk,
  input  logic       kb_data,
  output logic [7:0] scancode,
  output logic       strobe
);

  logic [2:0]  clk_s;
  logic [1:0]  dat_s;
  logic [10:0] shift;
  logic [3:0]  nbits;
  logic        fall;

  assign fall = clk_s[2] && !clk_s[1];

  always_ff @(posedge clk)
    if (rst) begin
      clk_s    <= '1;
      dat_s    <= '1;
      shift    <= '0;
      nbits    <= '0;
      scancode <= '0;
      strobe   <= 1'b0;
    end else begin
      clk_s  <= {clk_s[1:0], kb_clk};
      dat_s  <= {dat_s[0], kb_data};
      strobe <= 1'b0;
      if (sel && we) scancode <= '0;
      if (fall) begin
        if (nbits == 4'd10) begin
          nbits <= '0;
          // shift[9:0] holds start..parity, the stop bit is arriving now
          if (!shift[1] && dat_s[1] && ^{shift[10:2]}) begin
            scancode <= shift[9:2];
            strobe   <= 1'b1;
          end
        end else begin
          nbits <= nbits + 4'd1;
        end
        shift <= {dat_s[1], shift[10:1]};
      end
    end

  assign rdata = {8'h00, scancode};

endmodule

// tb_alu: self-checking test of the ALU. Random operands and every control
// setting are applied; results and flags are compared with a reference
// computed here in plain integer arithmetic.
module tb_alu;
  import cr16_pkg::*;

  word_t a, b, y;
  alu_logic_e bl;
  alu_out_e   os;
  logic add_en, co, ofl, zero;
  int checks = 0, failures = 0;

  alu dut (.alu_in_a(a), .alu_in_b(b), .bl(bl), .out_sel(os), .add_en(add_en),
           .alu_out(y), .carry_out(co), .ofl(ofl), .zero(zero));

  task automatic check(input word_t ey, input logic eco, input logic eofl, input logic ez,
                       input logic flags_valid);
    checks++;
    if (y !== ey || (flags_valid && (co !== eco || ofl !== eofl || zero !== ez))) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h bl=%0d os=%0d add=%b y=%h exp %h co=%b/%b ofl=%b/%b z=%b/%b",
                 a, b, bl, os, add_en, y, ey, co, eco, ofl, eofl, zero, ez);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int sa, sb, sr;
      int unsigned ua, ub, ur;
      word_t ey;
      logic eco, eofl, ez;
      a = word_t'($urandom);
      b = word_t'($urandom);
      if (i % 7 == 0) b = a;
      if (i % 11 == 0) a = 16'h8000;
      add_en = 1'($urandom);
      bl = alu_logic_e'($urandom_range(0, 3));
      os = alu_out_e'($urandom_range(0, 3));
      sa = int'($signed(a)); sb = int'($signed(b));
      ua = 32'(a); ub = 32'(b);
      if (add_en) begin
        ur = ua + ub; sr = sa + sb; eco = (ur > 32'hFFFF);
      end else begin
        ur = ua - ub; sr = sa - sb; eco = (ua < ub);
      end
      eofl = (sr > 32767) || (sr < -32768);
      ez   = (ur[15:0] == 0);
      case (os)
        OUT_LOGIC: ey = (bl == BL_AND) ? (a & b) : (bl == BL_OR) ? (a | b) :
                        (bl == BL_XOR) ? (a ^ b) : a;
        OUT_ADDER: ey = ur[15:0];
        OUT_SHIFT: ey = (sb < 0) ? word_t'(ua >> 1) : word_t'(ua << 1);
        default:   ey = b;
      endcase
      #1;
      check(ey, eco, eofl, ez, 1'b1);
    end
    // directed: 0x7fff + 1 overflows, 0 - 1 borrows, 5 - 5 is zero
    a = 16'h7fff; b = 16'h0001; add_en = 1; os = OUT_ADDER; bl = BL_AND; #1;
    check(16'h8000, 1'b0, 1'b1, 1'b0, 1'b1);
    a = 16'h0000; b = 16'h0001; add_en = 0; #1;
    check(16'hffff, 1'b1, 1'b0, 1'b0, 1'b1);
    a = 16'h0005; b = 16'h0005; #1;
    check(16'h0000, 1'b0, 1'b0, 1'b1, 1'b1);
    a = 16'h8001; b = 16'hffff; os = OUT_SHIFT; #1;   // negative B: right
    check(16'h4000, 1'b0, 1'b0, 1'b0, 1'b0);
    a = 16'h8001; b = 16'h0001; #1;                   // positive B: left
    check(16'h0002, 1'b0, 1'b0, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

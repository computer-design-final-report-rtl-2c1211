// tb_addr_decoder: walks all 65536 addresses and compares every enable of
// the I/O address decoder with the memory map.
module tb_addr_decoder;
  import cr16_pkg::*;
  word_t addr;
  logic io_en, seg_en, ppi_en, uart_en, ps2_en, vga_en;
  int checks = 0, failures = 0;
  int hits [6];

  addr_decoder dut (.*);

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic e_io, e_seg, e_ppi, e_uart, e_ps2, e_vga;
      addr = word_t'(i);
      e_io   = (i >= 'hc000);
      e_seg  = (i >= 'hc000 && i <= 'hc0ff);
      e_ppi  = (i >= 'hc100 && i <= 'hc1ff);
      e_uart = (i >= 'hc200 && i <= 'hc3ff);
      e_ps2  = (i >= 'hc400 && i <= 'hc4ff);
      e_vga  = (i >= 'hd000 && i <= 'hdbff);
      #1;
      checks++;
      if ({io_en, seg_en, ppi_en, uart_en, ps2_en, vga_en} !==
          {e_io, e_seg, e_ppi, e_uart, e_ps2, e_vga}) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h", addr);
      end
      hits[0] += int'(seg_en); hits[1] += int'(ppi_en); hits[2] += int'(uart_en);
      hits[3] += int'(ps2_en); hits[4] += int'(vga_en); hits[5] += int'(io_en);
    end
    checks++;
    if (hits[4] != 3072 || hits[5] != 16384) failures++;
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

// tb_adc_address_gen: checks storage address and range check for every region
// size of the status-word table (4096 down to 64 channels), random region
// bases and channel numbers. Expected values are computed arithmetically:
// address = base + channel, out of range when channel >= region size.
`timescale 1ns/1ps
module tb_adc_address_gen;
  import pha_pkg::*;
  logic [6:0] base;
  logic [5:0] mask;
  logic [11:0] channel;
  addr_t address;
  logic out_of_range;
  int checks = 0, failures = 0;

  adc_address_gen dut (.base, .mask, .channel, .address, .out_of_range);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r <= 6; r++) begin          // r ones from bit 12: 4096 >> r channels
      int size;
      size = 4096 >> r;
      for (int b = 0; b < 40; b++) begin
        int region_base;
        region_base = ($urandom % (8192 / size)) * size;
        mask = 6'((6'h3F << (6 - r)));
        base = 7'(region_base >> 6);
        for (int c = 0; c < 60; c++) begin
          int ch;
          ch = (c < 4) ? ((c < 2) ? (size - 1 + c) % 4096 : (c == 2 ? 0 : 4095)) : int'($urandom % 4096);
          channel = 12'(ch);
          #1;
          checks++;
          if (out_of_range !== (ch >= size)) begin
            failures++;
            if (failures < 10) $display("FAIL range size=%0d ch=%0d oor=%b", size, ch, out_of_range);
          end
          if (ch < size) begin
            checks++;
            if (int'(address) != region_base + ch) begin
              failures++;
              if (failures < 10) $display("FAIL addr size=%0d base=%0d ch=%0d got=%0d", size, region_base, ch, address);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_disp_y_data_register: loads random channel counts, shifts them by every
// Y-shift setting 0..15 and checks the 10-bit Y DAC code against
// (count * 2^shift mod 2^18) / 2^8; checks the mark-mode selection of the
// address ramp.
`timescale 1ns/1ps
module tb_disp_y_data_register;
  import pha_pkg::*;
  logic clk = 0, rst, clr, load, shift, mark;
  word_t data, y;
  logic [5:0] mark_y;
  logic [9:0] y_dac;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  disp_y_data_register dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {clr, load, shift, mark} = '0; data = '0; mark_y = '0; rst = 1;
    @(posedge clk); rst <= 0;
    for (int t = 0; t < 200; t++) begin
      int s;
      longint unsigned cnt, expect_y;
      s = t % 16;
      cnt = (t < 16) ? 262143 : longint'($urandom % 262144) >> ($urandom % 18);
      @(posedge clk) clr <= 1;
      @(posedge clk) begin clr <= 0; load <= 1; data <= word_t'(cnt); end
      @(posedge clk) load <= 0;
      repeat (s) begin @(posedge clk) shift <= 1; end
      @(posedge clk) shift <= 0;
      #1;
      expect_y = ((cnt << s) % 262144) >> 8;
      checks++;
      if (y_dac != 10'(expect_y)) begin
        failures++;
        if (failures < 10) $display("FAIL cnt=%0d shift=%0d y=%0d want %0d", cnt, s, y_dac, expect_y);
      end
    end
    mark = 1;
    for (int a = 0; a < 64; a++) begin
      mark_y = 6'(a); #1;
      checks++;
      if (y_dac != 10'(a * 16)) begin failures++; $display("FAIL mark y %0d", y_dac); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

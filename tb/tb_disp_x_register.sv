// tb_disp_x_register: for every range code of the display range table
// (7777..7600 octal) counts the advances until DISPLAY OFLO and checks the
// point count (4096..32), the X value of every point, the OR-loading of the
// upper register and the copy used by mark and set mode.
`timescale 1ns/1ps
module tb_disp_x_register;
  import pha_pkg::*;
  logic clk = 0, rst, clr, load, zero_lo, copy, advance;
  word_t iob;
  logic [11:0] upper, x;
  logic oflo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  disp_x_register dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [11:0] codes[8] = '{12'o7777, 12'o7776, 12'o7774, 12'o7770, 12'o7760, 12'o7740, 12'o7700, 12'o7600};
    int          chans[8] = '{4096, 2048, 1024, 512, 256, 128, 64, 32};
    {clr, load, zero_lo, copy, advance} = '0; iob = '0; rst = 1;
    @(posedge clk); rst <= 0;
    for (int k = 0; k < 8; k++) begin
      int n;
      logic done;
      @(posedge clk) clr <= 1;
      @(posedge clk) begin clr <= 0; load <= 1; iob <= {6'o40, codes[k]}; zero_lo <= 1; end
      @(posedge clk) begin load <= 0; zero_lo <= 0; end
      #1 chk(upper == codes[k] && x == 0, $sformatf("load code %o", codes[k]));
      n = 0; done = 0;
      while (!done && n < 5000) begin
        chk(x == 12'(n * (4096 / chans[k])), $sformatf("x point %0d of %0d", n, chans[k]));
        advance <= 1;
        #1 done = oflo;
        @(posedge clk); #1;
        n++;
      end
      advance <= 0;
      chk(n == chans[k], $sformatf("range %o gave %0d points, want %0d", codes[k], n, chans[k]));
      chk(x == 0, "x wrapped to 0");
    end
    // OR-load and copy (mark mode X position)
    @(posedge clk) clr <= 1;
    @(posedge clk) begin clr <= 0; load <= 1; iob <= 18'o000123; end
    @(posedge clk) begin iob <= 18'o004000; end
    @(posedge clk) begin load <= 0; copy <= 1; end
    @(posedge clk) copy <= 0;
    #1 chk(upper == 12'o4123 && x == 12'o4123, "OR-load then copy");
    @(posedge clk) advance <= 0;
    #1 chk(x == 12'o4123, "mark X stays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

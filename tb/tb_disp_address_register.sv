// tb_disp_address_register: checks OR-loading of address and Y shift from
// status word 1, address stepping, the sixteenth-point indication, MARK OFLO
// after 64 steps from zero, and the Y-shift counter reload and count-down.
`timescale 1ns/1ps
module tb_disp_address_register;
  import pha_pkg::*;
  logic clk = 0, rst, clr, load, inc, load_count, count_dec;
  word_t iob;
  addr_t addr;
  logic [3:0] yshift;
  logic count_zero, sixteenth, mark_oflo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  disp_address_register dut (.*);

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
    int n16, noflo;
    {clr, load, inc, load_count, count_dec} = '0; iob = '0; rst = 1;
    @(posedge clk); rst <= 0;
    // SW1 = shift 0101, address 01000 octal (IOT 2106: clear then load)
    @(posedge clk) clr <= 1;
    @(posedge clk) begin clr <= 0; load <= 1; iob <= {4'b0101, 1'b0, 13'o01000}; end
    @(posedge clk) load <= 0;
    #1 chk(addr == 13'o01000 && yshift == 4'b0101, "load SW1");
    // step 100 addresses, count sixteenth flags
    n16 = 0;
    for (int i = 0; i < 100; i++) begin
      chk(addr == 13'(13'o01000 + i), "address steps by one");
      if (sixteenth) begin n16++; chk(addr[3:0] == 4'hF, "sixteenth at 15 mod 16"); end
      @(posedge clk) inc <= 1;
      @(posedge clk) inc <= 0;
      #1;
    end
    chk(n16 == 6, $sformatf("sixteenth seen %0d times in 100 steps", n16));
    // shift counter
    @(posedge clk) load_count <= 1;
    @(posedge clk) load_count <= 0;
    #1 chk(!count_zero, "counter loaded");
    for (int i = 0; i < 5; i++) begin
      @(posedge clk) count_dec <= 1;
    end
    @(posedge clk) count_dec <= 0;
    #1 chk(count_zero, "counter zero after 5 decrements");
    // mark mode: SW1 zero, 64 steps to MARK OFLO
    @(posedge clk) clr <= 1;
    @(posedge clk) clr <= 0;
    noflo = 0;
    for (int i = 0; i < 64; i++) begin
      @(posedge clk) inc <= 1;
      #1 if (mark_oflo) begin noflo++; chk(i == 63, $sformatf("mark oflo at step %0d", i)); end
      @(posedge clk) inc <= 0;
    end
    #1 chk(noflo == 1, "one MARK OFLO per 64 points");
    chk(addr == 13'o100, "carry into bit 11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

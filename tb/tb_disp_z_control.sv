// tb_disp_z_control: checks the delay and width of the intensification pulse
// and that the C.R.O. select bit (status word 2 bit 4) steers it to Z1 or Z2.
// Random status words (all other bits random) and random trigger spacing;
// every cycle Z1, Z2 and BUSY are compared with a reference worked out from
// the number of clock edges since the trigger was sampled: the pulse starts
// D+1 edges after that edge and lasts W cycles.
`timescale 1ns/1ps
module tb_disp_z_control;
  import pha_pkg::*;
  localparam int D = 2, W = 10;
  logic clk = 0, rst, load_sw2, trig, z1, z2, cro_sel, busy;
  word_t iob;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  disp_z_control #(.Z_DELAY_CYCLES(D), .Z_WIDTH_CYCLES(W)) dut (.*);

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

  // reference: edges since trig was last sampled high, and the select bit
  int  since = 1000;
  bit  sel_ref = 0;
  int  seen_z1 = 0, seen_z2 = 0;
  always @(posedge clk) begin
    if (rst) begin since = 1000; sel_ref = 0; end
    else begin
      if (trig) since = 0; else if (since < 1000) since++;
      if (load_sw2) sel_ref = iob[13];
    end
  end

  initial begin
    load_sw2 = 0; trig = 0; iob = '0; rst = 1;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // fixed pair first: select 0, then select 1
    for (int k = 0; k < 60; k++) begin
      int gap;
      @(posedge clk) begin
        load_sw2 <= 1;
        iob <= word_t'($urandom) & ~18'o020000 | (k == 1 || (k > 1 && $urandom % 2) ? 18'o020000 : 18'o0);
      end
      @(posedge clk) load_sw2 <= 0;
      @(posedge clk) trig <= 1;
      @(posedge clk) trig <= 0;
      gap = D + W + 2 + int'($urandom % 8);
      repeat (gap) @(posedge clk);
    end
    chk(seen_z1 > 10 && seen_z2 > 10, $sformatf("both scopes used: Z1 %0d Z2 %0d", seen_z1, seen_z2));
    rst <= 1;
    @(posedge clk);
    rst <= 0;
    #1 chk(!cro_sel && !z1 && !z2, "reset clears select and pulse");
    $display("pulses on Z1 %0d, on Z2 %0d", seen_z1, seen_z2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle comparison, just after each edge
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      bit on;
      on = since >= D + 1 && since <= D + W;
      chk(cro_sel == sel_ref, "select bit");
      chk(z1 == (on && !sel_ref), $sformatf("z1=%0d at %0d edges after trigger", z1, since));
      chk(z2 == (on && sel_ref), $sformatf("z2=%0d at %0d edges after trigger", z2, since));
      if (on) chk(busy, "busy during the pulse");
      if (since >= 1 && since <= D) chk(busy, "busy during the delay");
      if (since > D + W + 1 && since < 1000) chk(!busy, "idle after the pulse");
      if (z1 && since == D + 1) seen_z1++;
      if (z2 && since == D + 1) seen_z2++;
    end
  end
endmodule

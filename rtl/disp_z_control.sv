// disp_z_control: Z-axis intensification of the display and C.R.O. selection.
//
// A trigger (the last Y shift done, or a clock pulse of the sixteens
// brightening) starts a short delay, so the X and Y deflection can settle,
// and then the intensification pulse. A flip-flop loaded from bus bit 4 on
// IOT load status word 2 steers the pulse to Z1 (bit 4 = 0) or Z2 (bit 4 = 1):
// two oscilloscopes share X and Y and only the selected one is brightened.
// The two monostables in series follow the original circuit; their lengths,
// Z_DELAY_CYCLES and Z_WIDTH_CYCLES, are this design's choice. The pulse
// rises Z_DELAY_CYCLES + 1 cycles after the clock edge that samples `trig`
// and lasts Z_WIDTH_CYCLES. `busy` is high from that edge to the end of the
// pulse.
`timescale 1ns/1ps
module disp_z_control
  import pha_pkg::*;
#(
  parameter int unsigned Z_DELAY_CYCLES = 2,
  parameter int unsigned Z_WIDTH_CYCLES = 10
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  load_sw2,   // IOT 2124
  input  word_t iob,
  input  logic  trig,
  output logic  z1,
  output logic  z2,
  output logic  cro_sel,
  output logic  busy
);
  logic dly_q, dly_fall, pulse;
  logic pulse_fall;

  always_ff @(posedge clk) begin
    if (rst)           cro_sel <= 1'b0;
    else if (load_sw2) cro_sel <= sw2_cro_sel(iob);
  end

  one_shot #(.CYCLES(Z_DELAY_CYCLES)) u_dly (
    .clk, .rst, .trig, .q(dly_q), .fall(dly_fall)
  );
  one_shot #(.CYCLES(Z_WIDTH_CYCLES)) u_width (
    .clk, .rst, .trig(dly_fall), .q(pulse), .fall(pulse_fall)
  );

  assign z1   = pulse & ~cro_sel;
  assign z2   = pulse &  cro_sel;
  assign busy = dly_q | dly_fall | pulse;
endmodule

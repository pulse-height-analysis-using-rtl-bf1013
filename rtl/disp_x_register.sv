// disp_x_register: X-axis range/marker register and X counter of the display.
//
// The upper register takes status word 2 bits 6..17. In display mode it holds
// the range code (7777 octal = 4096 channels, 7776 = 2048, ... 7600 = 32);
// in mark and set mode it holds the X position. The lower register drives the
// 12-bit X DAC. In display mode it starts at zero and each advance adds the
// weight of the lowest set bit of the range code (1, 2, 4, ...), so any range
// sweeps the full screen width; the carry out of bit 0 (the top) is DISPLAY
// OFLO and ends the histogram. In mark and set mode the lower register is
// copied from the upper one and then left alone.
// The upper register is loaded as in the original circuit: IOT clear resets
// it, IOT load ORs the bus bits in. A range code of zero (not a listed code)
// gives one point per sweep. All outputs change on the clock edge after a
// control strobe; `oflo` is combinational with `advance`.
`timescale 1ns/1ps
module disp_x_register
  import pha_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,      // IOT 2122: clear status word 2
  input  logic        load,     // IOT 2124: OR status word 2 in
  input  word_t       iob,
  input  logic        zero_lo,  // lower register to 0 (start of a histogram)
  input  logic        copy,     // lower register <= upper (mark, set)
  input  logic        advance,  // next histogram point
  output logic [11:0] upper,
  output logic [11:0] x,
  output logic        oflo      // DISPLAY OFLO strobe
);
  logic [12:0] step, sum;

  always_comb begin
    step = (upper == '0) ? 13'h1000 : {1'b0, upper & (~upper + 12'd1)};
    sum  = {1'b0, x} + step;
    oflo = advance & sum[12];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      upper <= '0;
      x     <= '0;
    end else begin
      if (clr)       upper <= '0;
      else if (load) upper <= upper | sw2_xfield(iob);
      if (zero_lo)      x <= '0;
      else if (copy)    x <= upper;
      else if (advance) x <= sum[11:0];
    end
  end
endmodule

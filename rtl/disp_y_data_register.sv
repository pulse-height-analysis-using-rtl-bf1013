// disp_y_data_register: Y-axis data register and Y DAC selector.
//
// At each display data channel transfer the memory word (the channel count,
// up to 262143) is loaded, then shifted left once per `shift` strobe, as many
// times as the Y-shift setting says; bits shifted out at the top are lost. The
// ten most significant bits drive the 10-bit Y DAC, so every shift doubles the
// vertical scale. In mark mode the Y DAC instead shows the six low address
// bits in its six most significant bits, which draws the vertical marker line.
// `clr` empties the register before a new transfer. Outputs change on the clock
// edge after a strobe; `y_dac` is combinational in `mark`.
// The load-then-shift register and the mark-mode selector follow the original
// circuit; taking the top ten bits for the DAC is this design's reading of the
// Y-shift table (shift 0 = full scale 2^18).
`timescale 1ns/1ps
module disp_y_data_register
  import pha_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       load,      // data channel word valid
  input  word_t      data,
  input  logic       shift,     // SHIFT Y-DATA
  input  logic       mark,
  input  logic [5:0] mark_y,    // address bits 12..17
  output word_t      y,
  output logic [9:0] y_dac
);
  always_ff @(posedge clk) begin
    if (rst)        y <= '0;
    else if (clr)   y <= '0;
    else if (load)  y <= data;
    else if (shift) y <= {y[16:0], 1'b0};
  end

  assign y_dac = mark ? {mark_y, 4'b0000} : y[17:8];
endmodule

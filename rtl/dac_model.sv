// dac_model: behavioural model of a binary-weighted digital-to-analogue converter.
//
// Not synthesizable logic: it stands for the X (12-bit) and Y (10-bit)
// deflection converters that drive the oscilloscope. The output voltage is
// code / 2^W of the full-scale voltage VFS and follows the input code after
// SETTLE_NS nanoseconds. Code 0 is the left or bottom edge of the screen.
// Port names follow the converter's role (digital code in, analogue out); the
// full-scale voltage and settling time are this model's own values.
`timescale 1ns/1ps
module dac_model #(
  parameter int unsigned W         = 12,
  parameter real         VFS       = 10.0,
  parameter int unsigned SETTLE_NS = 1000
) (
  input  logic [W-1:0] code,
  output real          vout
);
  real target;

  always_comb target = VFS * real'(code) / real'(2.0 ** W);

  initial vout = 0.0;
  always @(target) vout <= #(SETTLE_NS) target;
endmodule

// one_shot: clocked stand-in for the L803 monostable of the original circuit.
//
// A one-cycle trigger starts an output pulse of CYCLES clock cycles; a trigger
// while the pulse runs restarts it (retriggerable). `fall` is a one-cycle
// strobe in the cycle after the pulse ends. The widths of the analogue
// monostables become cycle counts of the system clock.
`timescale 1ns/1ps
module one_shot #(
  parameter int unsigned CYCLES = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic trig,
  output logic q,
  output logic fall
);
  localparam int unsigned CW = (CYCLES < 2) ? 1 : $clog2(CYCLES + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      fall <= 1'b0;
    end else begin
      fall <= 1'b0;
      if (trig)
        cnt <= CW'(CYCLES);
      else if (cnt != '0) begin
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) fall <= 1'b1;
      end
    end
  end

  assign q = (cnt != '0);
endmodule

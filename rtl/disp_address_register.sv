// disp_address_register: display memory address register and Y-shift counter.
//
// Status word 1 bits 5..17 give the 13-bit memory address of the first
// channel to display (display mode) or of the Y value (set mode); bits 0..3
// give the Y shift of Table 4 (0000 = full scale 2^18 counts, each step halves
// it). Both registers are cleared by IOT 2102 and OR-loaded by IOT 2104, as in
// the original circuit.
// The address advances by one after every point. In mark mode the address is
// not used for memory: its six low bits form the Y ramp of the marker line,
// and the carry into address bit 11 after 64 points is MARK OFLO. `sixteenth`
// tells that the next advance is the sixteenth (low four bits all ones), when
// the display brightens the current point.
// After each data channel transfer `load_count` copies the Y shift into the
// shift counter, which `count_dec` counts down; `count_zero` ends the shifting.
`timescale 1ns/1ps
module disp_address_register
  import pha_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,         // IOT 2102
  input  logic       load,        // IOT 2104
  input  word_t      iob,
  input  logic       inc,         // advance to the next address
  input  logic       load_count,  // shift counter <= Y shift
  input  logic       count_dec,
  output addr_t      addr,
  output logic [3:0] yshift,
  output logic       count_zero,
  output logic       sixteenth,
  output logic       mark_oflo    // carry into address bit 11, with inc
);
  logic [3:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr   <= '0;
      yshift <= '0;
      count  <= '0;
    end else begin
      if (clr) begin
        addr   <= '0;
        yshift <= '0;
      end else if (load) begin
        addr   <= addr | sw1_address(iob);
        yshift <= yshift | sw1_yshift(iob);
      end else if (inc) begin
        addr <= addr + 1'b1;
      end
      if (load_count)                     count <= yshift;
      else if (count_dec && count != '0)  count <= count - 1'b1;
    end
  end

  assign count_zero = (count == '0);
  assign sixteenth  = (addr[3:0] == 4'hF);
  assign mark_oflo  = inc & (addr[5:0] == 6'h3F);
endmodule

// display_interface: C.R.O. display controller with direct memory access.
//
// The program sets up a picture with two status words and then leaves the
// display alone: the interface reads the channel contents straight from
// memory through the data channel and draws them point by point.
//   Status word 1 (IOT 2102 clear, 2104 OR-load, 2106 both):
//     bits 0..3 Y shift, bits 5..17 memory address (display start / set-mode
//     Y address; zero in mark mode).
//   Status word 2 (IOT 2122 clear, 2124 OR-load, 2126 both):
//     bits 0..3 mode (0 display, 1 mark, 3 set), bit 4 C.R.O. select,
//     bits 6..17 range code (display) or X position (mark, set).
//   IOT 2101 skips on the overflow flag, IOT 2121 enables its interrupt.
// The flag is set when a histogram sweep (DISPLAY OFLO), a 64-point marker
// line (MARK OFLO) or a set-mode point is finished.
// Outputs: 12-bit X DAC code, 10-bit Y DAC code, intensification pulses Z1/Z2.
// Blocks: disp_control (mode register, flag, sequencer), disp_x_register,
// disp_address_register, disp_y_data_register, disp_z_control, and a dch_port
// for the data channel read. The read word arrives on `iob` with `dch_done`.
// Timing: one point per POINT_CYCLES of `clk` at most (20 us in the original,
// 200 cycles of the 10 MHz clock assumed here).
`timescale 1ns/1ps
module display_interface
  import pha_pkg::*;
#(
  parameter int unsigned POINT_CYCLES    = 200,
  parameter int unsigned SIXTEENS_CYCLES = 800,
  parameter int unsigned SIXTEENS_REPEAT = 100,
  parameter int unsigned SIXTEENS_DELAY  = 10,
  parameter int unsigned Z_DELAY_CYCLES  = 2,
  parameter int unsigned Z_WIDTH_CYCLES  = 10
) (
  input  logic       clk,
  input  logic       rst,
  // programmed transfers
  input  logic [8:0] dev_sel,
  input  logic       iop1,
  input  logic       iop2,
  input  logic       iop4,
  input  word_t      iob,        // accumulator on IOT, memory word on dch_done
  output logic       skip_rq,
  output logic       int_rq,
  // data channel
  input  logic       dch_en_in,
  input  logic       dch_gr,
  input  logic       dch_done,
  output logic       dch_rq,
  output logic       dch_en_out,
  output logic       ena,
  output addr_t      dch_addr,   // driven only while ena
  // C.R.O.
  output logic [11:0] x_code,
  output logic [9:0]  y_code,
  output logic        z1,
  output logic        z2,
  // status, for observation
  output disp_mode_t  mode,
  output logic        flag,
  output logic        sixteens,
  output logic        point_done
);
  logic s1_sel, s1_skip, s1_clr, s1_load;
  logic s2_sel, s2_skip, s2_clr, s2_load;
  logic dch_flag, clr_rq;
  logic count_zero, sixteenth, x_oflo, mark_oflo, z_busy;
  logic x_zero, x_copy, x_advance, a_inc, cnt_load, cnt_dec, y_clr, y_shift, z_trig;
  logic int_en, cro_sel;
  logic [11:0] upper;
  logic [3:0]  yshift;
  addr_t       addr;
  word_t       y;

  iot_device_selector #(.DEV(DEV_DISP_SW1)) u_ds1 (
    .dev_sel, .iop1, .iop2, .iop4, .sel(s1_sel), .iot1(s1_skip), .iot2(s1_clr), .iot4(s1_load)
  );
  iot_device_selector #(.DEV(DEV_DISP_SW2)) u_ds2 (
    .dev_sel, .iop1, .iop2, .iop4, .sel(s2_sel), .iot1(s2_skip), .iot2(s2_clr), .iot4(s2_load)
  );

  dch_port u_dch (
    .clk, .rst, .flag(dch_flag), .en_in(dch_en_in), .dch_gr, .dch_done,
    .dch_rq, .en_out(dch_en_out), .ena, .clr_rq
  );

  disp_control #(
    .POINT_CYCLES(POINT_CYCLES), .SIXTEENS_CYCLES(SIXTEENS_CYCLES),
    .SIXTEENS_REPEAT(SIXTEENS_REPEAT), .SIXTEENS_DELAY(SIXTEENS_DELAY)
  ) u_ctl (
    .clk, .rst,
    .sw1_skip(s1_skip), .sw2_int_en(s2_skip), .sw2_clr(s2_clr), .sw2_load(s2_load),
    .iob, .skip_rq, .int_rq, .mode, .flag, .int_en,
    .dch_flag, .xfer_done(clr_rq),
    .count_zero, .sixteenth, .x_oflo, .mark_oflo, .z_busy,
    .x_zero, .x_copy, .x_advance, .a_inc, .cnt_load, .cnt_dec, .y_clr, .y_shift, .z_trig,
    .sixteens, .point_done
  );

  disp_x_register u_x (
    .clk, .rst, .clr(s2_clr), .load(s2_load), .iob,
    .zero_lo(x_zero), .copy(x_copy), .advance(x_advance),
    .upper, .x(x_code), .oflo(x_oflo)
  );

  disp_address_register u_a (
    .clk, .rst, .clr(s1_clr), .load(s1_load), .iob, .inc(a_inc),
    .load_count(cnt_load), .count_dec(cnt_dec),
    .addr, .yshift, .count_zero, .sixteenth, .mark_oflo
  );

  disp_y_data_register u_y (
    .clk, .rst, .clr(y_clr), .load(clr_rq), .data(iob), .shift(y_shift),
    .mark(mode.mark & ~mode.display), .mark_y(addr[5:0]), .y, .y_dac(y_code)
  );

  disp_z_control #(.Z_DELAY_CYCLES(Z_DELAY_CYCLES), .Z_WIDTH_CYCLES(Z_WIDTH_CYCLES)) u_z (
    .clk, .rst, .load_sw2(s2_load), .iob, .trig(z_trig),
    .z1, .z2, .cro_sel, .busy(z_busy)
  );

  assign dch_addr = ena ? addr : '0;
endmodule

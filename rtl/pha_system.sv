// pha_system: one pulse height analysis station on a PDP-15 I/O bus.
//
// Two interfaces share the processor's I/O bus and its data channel:
//   adc_interface      adds one to the memory word of each converted pulse
//                      (data channel increment cycle);
//   display_interface  reads channel contents and draws histogram, marker
//                      lines and program-set points on the oscilloscope
//                      (data channel read cycles).
// Neither needs the program once its status words are loaded. The data
// channel priority chain runs processor -> A.D.C. -> display, so a pending
// pulse is stored before the next display point is fetched; the enable leaves
// the display on `dch_en_out` for further devices. Bus outputs of the two
// interfaces (request, address, skip, interrupt) are wired-OR as on the real
// bus. Two behavioural converters turn the X and Y codes into deflection
// voltages.
// Timing constants of the original monostables and point rate are turned
// into cycles of the system clock, CLK_HZ (10 MHz assumed): 20 us per point,
// 80 us sixteens brightening after a 1 us delay, 1 us CLR ADC pulse.
`timescale 1ns/1ps
module pha_system
  import pha_pkg::*;
#(
  parameter int unsigned CLK_HZ = 10_000_000
) (
  input  logic        clk,
  input  logic        pwr_clr,
  // programmed transfers
  input  logic [8:0]  dev_sel,      // IOT instruction bits 6..14
  input  logic        iop1,
  input  logic        iop2,
  input  logic        iop4,
  input  word_t       iob,          // accumulator, or memory word on dch_done
  output logic        skip_rq,
  output logic        int_rq,
  // data channel
  input  logic        dch_en_in,
  input  logic        dch_gr,
  input  logic        dch_done,
  input  logic        io_oflo,
  output logic        dch_rq,
  output logic        dch_en_out,
  output addr_t       dch_addr,
  output logic        inc_mb,
  // A.D.C.
  input  logic [11:0] adc_data,
  input  logic        adc_ready,
  input  logic        adc_alt,
  input  logic        adc_busy,
  output logic        adc_clr,
  output logic        adc_inhibit,
  output logic        adc_abort,
  // oscilloscope
  output logic [11:0] x_code,
  output logic [9:0]  y_code,
  output real         x_volts,
  output real         y_volts,
  output logic        z1,
  output logic        z2,
  // status, for observation
  output logic        adc_ovf_flag,
  output logic        disp_flag,
  output disp_mode_t  disp_mode,
  output logic        sixteens,
  output logic        point_done
);
  localparam int unsigned POINT_CYCLES    = us_to_cycles(CLK_HZ, 20);
  localparam int unsigned SIXTEENS_CYCLES = us_to_cycles(CLK_HZ, 80);
  localparam int unsigned SIXTEENS_REPEAT = us_to_cycles(CLK_HZ, 10);
  localparam int unsigned SIXTEENS_DELAY  = us_to_cycles(CLK_HZ, 1);
  localparam int unsigned CLR_CYCLES      = us_to_cycles(CLK_HZ, 1);
  localparam int unsigned Z_WIDTH_CYCLES  = us_to_cycles(CLK_HZ, 1);
  localparam int unsigned Z_DELAY_CYCLES  = (CLK_HZ / 5_000_000 == 0) ? 1 : CLK_HZ / 5_000_000;

  logic        a_skip, a_int, a_rq, a_en_out, a_ena;
  logic        d_skip, d_int, d_rq, d_ena;
  addr_t       a_addr, d_addr;
  adc_status_t adc_status;

  adc_interface #(.CLR_CYCLES(CLR_CYCLES)) u_adc (
    .clk, .rst(pwr_clr),
    .dev_sel, .iop1, .iop2, .iop4, .iob, .skip_rq(a_skip), .int_rq(a_int),
    .dch_en_in, .dch_gr, .dch_done, .io_oflo,
    .dch_rq(a_rq), .dch_en_out(a_en_out), .ena(a_ena), .dch_addr(a_addr), .inc_mb,
    .adc_data, .adc_ready, .adc_alt, .adc_busy, .adc_clr, .adc_inhibit, .adc_abort,
    .status(adc_status), .ovf_flag(adc_ovf_flag)
  );

  display_interface #(
    .POINT_CYCLES(POINT_CYCLES), .SIXTEENS_CYCLES(SIXTEENS_CYCLES),
    .SIXTEENS_REPEAT(SIXTEENS_REPEAT), .SIXTEENS_DELAY(SIXTEENS_DELAY),
    .Z_DELAY_CYCLES(Z_DELAY_CYCLES), .Z_WIDTH_CYCLES(Z_WIDTH_CYCLES)
  ) u_disp (
    .clk, .rst(pwr_clr),
    .dev_sel, .iop1, .iop2, .iop4, .iob, .skip_rq(d_skip), .int_rq(d_int),
    .dch_en_in(a_en_out), .dch_gr, .dch_done,
    .dch_rq(d_rq), .dch_en_out, .ena(d_ena), .dch_addr(d_addr),
    .x_code, .y_code, .z1, .z2,
    .mode(disp_mode), .flag(disp_flag), .sixteens, .point_done
  );

  dac_model #(.W(12)) u_xdac (.code(x_code), .vout(x_volts));
  dac_model #(.W(10)) u_ydac (.code(y_code), .vout(y_volts));

  assign skip_rq  = a_skip | d_skip;
  assign int_rq   = a_int | d_int;
  assign dch_rq   = a_rq | d_rq;
  assign dch_addr = a_addr | d_addr;

  a_one_owner: assert property (@(posedge clk) disable iff (pwr_clr) !(a_ena && d_ena));
endmodule

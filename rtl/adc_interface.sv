// adc_interface: A.D.C. to PDP-15 interface with direct memory increment.
//
// Each pulse converted by the A.D.C. adds one to a memory word without the
// program taking part. The program loads an 18-bit status word with IOT 2004
// (enable, overflow-interrupt enable, base address, range mask); from then on
// every READY from the A.D.C. is handled here:
//   * the channel number is combined with the base address (adc_address_gen);
//   * if the A.D.C. reports ALT (error) or the channel lies outside the masked
//     range, the event is dropped: ABORT is pulsed and the A.D.C. is reset
//     through CLR ADC, with no memory cycle;
//   * otherwise the ADC flag is set and, when the interface is enabled, a data
//     channel increment cycle (INC MB) is requested at that address. When the
//     cycle ends (CLR RQ) the A.D.C. is reset and may convert the next pulse.
// If the processor reports IO OFLO (the incremented word wrapped past
// 262143) during this interface's cycle, the overflow flag is set; it raises
// a program interrupt when status bit 1 is set. IOT 2001 skips on the flag,
// IOT 2002 clears it. Loading the status word also resets the A.D.C.
// Interface: IOT strobes and IOB as one-cycle pulses on `clk`, the data
// channel handshake of dch_port, and the A.D.C. lines READY (held until the
// A.D.C. is reset), ALT, BUSY, with CLR ADC and ADC INHIBIT back to it.
// Timing: an accepted event requests the data channel two cycles after READY
// rises; CLR ADC is a pulse of CLR_CYCLES (1 us in the original circuit).
// The flags and gating follow the original circuit; clocking everything from
// one system clock is this design's choice.
`timescale 1ns/1ps
module adc_interface
  import pha_pkg::*;
#(
  parameter int unsigned CLR_CYCLES = 10
) (
  input  logic        clk,
  input  logic        rst,          // PWR CLR
  // programmed transfers
  input  logic [8:0]  dev_sel,
  input  logic        iop1,
  input  logic        iop2,
  input  logic        iop4,
  input  word_t       iob,          // accumulator on IOT 2004
  output logic        skip_rq,
  output logic        int_rq,       // PROG INT RQ
  // data channel
  input  logic        dch_en_in,
  input  logic        dch_gr,
  input  logic        dch_done,
  input  logic        io_oflo,
  output logic        dch_rq,
  output logic        dch_en_out,
  output logic        ena,
  output addr_t       dch_addr,     // driven only while ena
  output logic        inc_mb,       // increment-memory cycle, with ena
  // A.D.C.
  input  logic [11:0] adc_data,
  input  logic        adc_ready,
  input  logic        adc_alt,
  input  logic        adc_busy,
  output logic        adc_clr,      // CLR ADC
  output logic        adc_inhibit,
  output logic        adc_abort,        // ABORT strobe: event dropped
  // status, for observation
  output adc_status_t status,
  output logic        ovf_flag
);
  logic  iot1, iot2, iot4, sel;
  logic  ready_d, ready_rise;
  logic  adc_flag;
  addr_t ev_addr, gen_addr;
  logic  out_of_range;
  logic  clr_rq, clr_fall;

  iot_device_selector #(.DEV(DEV_ADC)) u_ds (
    .dev_sel, .iop1, .iop2, .iop4, .sel, .iot1, .iot2, .iot4
  );

  adc_address_gen u_addr (
    .base(status.base), .mask(status.mask), .channel(adc_data),
    .address(gen_addr), .out_of_range
  );

  dch_port u_dch (
    .clk, .rst, .flag(adc_flag & status.enable), .en_in(dch_en_in),
    .dch_gr, .dch_done, .dch_rq, .en_out(dch_en_out), .ena, .clr_rq
  );

  assign ready_rise = adc_ready & ~ready_d;
  assign adc_abort      = ready_rise & ~adc_flag & (adc_alt | out_of_range);

  always_ff @(posedge clk) begin
    if (rst) begin
      status      <= '0;
      ovf_flag    <= 1'b0;
      ready_d     <= 1'b0;
      adc_flag    <= 1'b0;
      ev_addr     <= '0;
      adc_inhibit <= 1'b0;
    end else begin
      ready_d <= adc_ready;
      if (iot4) status <= decode_adc_status(iob);
      // ADC flag: an accepted conversion waiting for its memory cycle
      if (clr_rq || iot4)
        adc_flag <= 1'b0;
      else if (ready_rise && !adc_flag && !(adc_alt || out_of_range)) begin
        adc_flag <= 1'b1;
        ev_addr  <= gen_addr;
      end
      // channel overflow flag
      if (iot2)
        ovf_flag <= 1'b0;
      else if (io_oflo && ena && dch_done)
        ovf_flag <= 1'b1;
      // ADC INHIBIT: set while the A.D.C. is busy, reset by CLR ADC
      if (adc_clr)
        adc_inhibit <= 1'b0;
      else if (adc_busy)
        adc_inhibit <= 1'b1;
    end
  end

  // CLR ADC one-shot: after an abort, after the memory cycle, on status load
  one_shot #(.CYCLES(CLR_CYCLES)) u_clr (
    .clk, .rst, .trig(adc_abort | clr_rq | iot4), .q(adc_clr), .fall(clr_fall)
  );

  assign dch_addr = ena ? ev_addr : '0;
  assign inc_mb   = ena;
  assign int_rq   = ovf_flag & status.ovf_int_en;
  assign skip_rq  = iot1 & ovf_flag;
endmodule

// pha_pkg: shared types and constants of the pulse height analysis interfaces.
//
// The PDP-15 numbers the bits of its 18-bit word from 0 (most significant) to
// 17 (least significant). Vectors in this RTL are little-endian, so PDP bit n
// is vector bit 17-n; the helpers below and the field comments keep to that.
// Memory addresses are 13 bits (PDP bits 5..17), enough for the 8192-word
// memory of the computer.
//
// IOT device codes: an IOT instruction 70xxxx carries a 6-bit device code in
// bits 6-11 and a subdevice field in bits 12-14; together they are the three
// octal digits written in the middle of the IOT number. The A.D.C. answers to
// 200 (IOT 2001/2002/2004), the display to 210 (status word 1) and 212
// (status word 2). The pulses IOP1, IOP2 and IOP4 select the operation.
// The status word fields follow the original interface; the helper functions
// and the 13-bit address width are this design's.
`timescale 1ns/1ps
package pha_pkg;

  typedef logic [17:0] word_t;   // one PDP-15 word, vector bit 17 = PDP bit 0
  typedef logic [12:0] addr_t;   // memory address, PDP bits 5..17

  // Device/subdevice selections (octal digits of MB bits 6..14).
  localparam logic [8:0] DEV_ADC      = 9'o200;
  localparam logic [8:0] DEV_DISP_SW1 = 9'o210;
  localparam logic [8:0] DEV_DISP_SW2 = 9'o212;

  // A.D.C. status word (Table 1), decoded.
  typedef struct packed {
    logic       enable;     // bit 0: take data
    logic       ovf_int_en; // bit 1: interrupt on channel overflow
    logic [6:0] base;       // bits 5..11: base address, address bits 5..11
    logic [5:0] mask;       // bits 12..17: range mask, bit 12 masks channel bit 11
  } adc_status_t;

  function automatic adc_status_t decode_adc_status(word_t w);
    adc_status_t s;
    s.enable     = w[17];     // PDP bit 0
    s.ovf_int_en = w[16];     // PDP bit 1
    s.base       = w[12:6];   // PDP bits 5..11
    s.mask       = w[5:0];    // PDP bits 12..17
    return s;
  endfunction

  // Display modes held in the mode register (status word 2, bits 0..3).
  typedef struct packed {
    logic display;  // bit 0
    logic mark;     // bit 1
    logic set;      // bit 3
  } disp_mode_t;

  function automatic disp_mode_t sw2_mode(word_t w);
    disp_mode_t m;
    m.display = w[17];  // PDP bit 0
    m.mark    = w[16];  // PDP bit 1
    m.set     = w[14];  // PDP bit 3
    return m;
  endfunction

  // Status word fields used by the display registers.
  function automatic logic [3:0] sw1_yshift(word_t w);  return w[17:14]; endfunction // bits 0..3
  function automatic addr_t      sw1_address(word_t w); return w[12:0];  endfunction // bits 5..17
  function automatic logic       sw2_cro_sel(word_t w); return w[13];    endfunction // bit 4
  function automatic logic [11:0] sw2_xfield(word_t w); return w[11:0];  endfunction // bits 6..17

  // Cycles of a clock of clk_hz in a time of us microseconds (at least 1).
  function automatic int unsigned us_to_cycles(int unsigned clk_hz, int unsigned us);
    longint unsigned c;
    c = (longint'(clk_hz) * us) / 1_000_000;
    return (c == 0) ? 1 : int'(c);
  endfunction

endpackage

// adc_address_gen: storage address and range check of the A.D.C. interface.
//
// The status word holds a base address in bits 5..11 and a range mask in bits
// 12..17. Mask bit 12 covers channel bit 11, mask bit 17 covers channel bit 6;
// a set mask bit halves the region (000000 = 4096 channels, 111111 = 64). The
// address is the base bits OR-ed with the channel number: channel bits 0..5
// always reach address bits 12..17, channel bits 6..11 reach address bits
// 11..6 only where the mask is clear. The base bits under unmasked channel
// positions must be zero (they are shown as 0 in the status-word table), so
// the OR is the sum base + channel. A channel with a 1 under a set mask bit is
// out of range: the transfer is aborted instead.
// Purely combinational, as the gating of the original register card.
`timescale 1ns/1ps
module adc_address_gen
  import pha_pkg::*;
(
  input  logic [6:0]  base,      // status bits 5..11 (address bits 5..11)
  input  logic [5:0]  mask,      // status bits 12..17
  input  logic [11:0] channel,   // A.D.C. data, bit 0 = ADC00 = least significant
  output addr_t       address,   // memory address, vector bit 0 = PDP bit 17
  output logic        out_of_range
);
  always_comb begin
    address      = {base, 6'b0} | {1'b0, channel[11:6] & ~mask, channel[5:0]};
    out_of_range = |(channel[11:6] & mask);
  end
endmodule

// iot_device_selector: IOT decoding for one device/subdevice of the PDP-15 I/O bus.
//
// The processor places bits 6..14 of the IOT instruction (device code and
// subdevice, the three middle octal digits of the IOT number) on the
// device-select lines and then issues the timing pulses IOP1, IOP2 and IOP4,
// one per clock cycle here. When the select lines equal DEV, each pulse is
// passed on as a strobe of its own. The interface registers use them as:
// IOP1 = skip test, IOP2 = clear, IOP4 = load. An IOT whose low digit is 6
// (2106, 2126) issues IOP2 then IOP4 and so clears and reloads a register.
// Decoding by an 8-input gate on the select lines follows the original device
// selectors; the one-cycle strobe timing is this design's own.
`timescale 1ns/1ps
module iot_device_selector
  import pha_pkg::*;
#(
  parameter logic [8:0] DEV = DEV_ADC
) (
  input  logic [8:0] dev_sel,   // MB bits 6..14 of the IOT instruction
  input  logic       iop1,
  input  logic       iop2,
  input  logic       iop4,
  output logic       sel,       // device addressed
  output logic       iot1,      // skip test strobe
  output logic       iot2,      // clear strobe
  output logic       iot4       // load strobe
);
  always_comb begin
    sel  = (dev_sel == DEV);
    iot1 = sel & iop1;
    iot2 = sel & iop2;
    iot4 = sel & iop4;
  end
endmodule

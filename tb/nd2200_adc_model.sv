// nd2200_adc_model: behavioural model of the 12-bit analogue-to-digital converter.
//
// The task pulse(channel, alt, accepted) offers one input pulse whose height
// converts to `channel`. It is taken only if the converter is idle and not
// inhibited; otherwise it is lost (dead time). A taken pulse raises BUSY for
// the conversion time, one 20 ns clock period of the converter's 50 MHz clock
// per channel (CONV_NS_PER_CH), then presents the channel on `data` with READY
// (and ALT for a faulty conversion) until CLR resets the converter.
`timescale 1ns/1ps
module nd2200_adc_model #(
  parameter int unsigned CONV_NS_PER_CH = 20
) (
  input  logic        clk,
  input  logic        inhibit,
  input  logic        clr,
  output logic [11:0] data,
  output logic        ready,
  output logic        alt,
  output logic        busy
);
  int n_taken, n_lost;

  initial begin
    data = '0; ready = 0; alt = 0; busy = 0; n_taken = 0; n_lost = 0;
  end

  task automatic pulse(input logic [11:0] channel, input logic is_alt, output logic accepted);
    if (busy || ready || inhibit || clr) begin
      accepted = 1'b0;
      n_lost++;
    end else begin
      accepted = 1'b1;
      n_taken++;
      busy = 1'b1;
      fork
        begin
          #(CONV_NS_PER_CH * (int'(channel) + 1));
          @(posedge clk);
          data  <= channel;
          alt   <= is_alt;
          ready <= 1'b1;
          busy  <= 1'b0;
        end
      join_none
    end
  endtask

  always @(posedge clk) if (clr) begin
    ready <= 1'b0;
    alt   <= 1'b0;
  end
endmodule

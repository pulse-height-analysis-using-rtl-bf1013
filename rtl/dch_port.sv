// dch_port: data channel (direct memory access) request logic of one device.
//
// The device raises `flag` when it wants one memory cycle. The port turns it
// into DCH RQ to the processor. The processor answers with a one-cycle grant
// DCH GR, which belongs to the first requesting device of the priority chain:
// a device with `en_in` high and a request pending takes it, and `en_out`, the
// enable passed to the next device, is low while this device is requesting
// or transferring. The owner keeps ENA high for the whole transfer (it puts its
// address on the bus during ENA). The processor ends the cycle with the
// one-cycle `dch_done` strobe (data valid for a read, increment done for an
// increment cycle); the port then gives the one-cycle CLR RQ strobe and drops
// ENA, and the device clears its flag.
// The signal names follow the original interface glossary; the exact handshake
// timing is this design's own, since the original takes it from the processor's
// interface manual.
`timescale 1ns/1ps
module dch_port (
  input  logic clk,
  input  logic rst,
  input  logic flag,      // device wants a transfer (level)
  input  logic en_in,     // DCH EN IN: no device ahead in the chain is requesting
  input  logic dch_gr,    // DCH GR: grant strobe from the processor
  input  logic dch_done,  // end-of-transfer strobe from the processor
  output logic dch_rq,    // DCH RQ to the processor
  output logic en_out,    // DCH EN OUT to the next device
  output logic ena,       // this device owns the current transfer
  output logic clr_rq     // CLR RQ strobe: transfer finished
);
  logic rq;

  always_ff @(posedge clk) begin
    if (rst) begin
      rq  <= 1'b0;
      ena <= 1'b0;
    end else begin
      if (dch_gr && rq && en_in) begin
        rq  <= 1'b0;
        ena <= 1'b1;
      end else if (flag && !rq && !ena) begin
        rq <= 1'b1;
      end
      if (ena && dch_done) ena <= 1'b0;
    end
  end

  assign dch_rq = rq;
  assign en_out = en_in & ~rq & ~ena;
  assign clr_rq = ena & dch_done;

  // A grant never reaches two owners: ENA only rises from a pending request.
  a_ena_from_rq: assert property (@(posedge clk) disable iff (rst)
    $rose(ena) |-> $past(rq && dch_gr && en_in));
endmodule

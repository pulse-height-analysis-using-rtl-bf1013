// disp_control: mode register, overflow flag and point sequencer of the display.
//
// The mode register takes bits 0..3 of status word 2: bit 0 display
// (histogram), bit 1 mark (vertical line), bit 3 set (one program-set point).
// IOT 2122 clears it and IOT 2124 ORs the new bits in, so IOT 2126 loads it.
// While a mode bit is set the sequencer draws one point every POINT_CYCLES
// (20 us in the original), never faster:
//   display/set: request a data channel read at the display address; the word
//                is loaded into the Y data register, the Y shift is loaded into
//                the shift counter and the Y data is shifted that many times;
//   mark:        no memory read, the Y DAC shows the address ramp;
//   then the Z one-shot brightens the point. In display mode, if the next
//   address step is the sixteenth, then after SIXTEENS_DELAY cycles (a 1 us
//   one-shot in the original) the point is held for SIXTEENS_CYCLES (80 us)
//   and re-brightened every SIXTEENS_REPEAT cycles.
//   Last the point advances: display mode steps X and the address, mark mode
//   steps the address, set mode steps the address and ends.
// DISPLAY OFLO (X carry) clears the display bit, MARK OFLO (carry into address
// bit 11, after 64 points) clears the mark bit; both set the flag. A set-mode
// point also clears its bit and sets the flag when it has been drawn, so the
// program knows it may load the next point (this design's choice). The flag
// is cleared by loading or clearing status word 2, makes IOT 2101 skip, and
// raises an interrupt once IOT 2121 has enabled it.
// If several mode bits are set, display goes before mark before set (this
// design's choice). All control outputs are one-cycle strobes.
`timescale 1ns/1ps
module disp_control
  import pha_pkg::*;
#(
  parameter int unsigned POINT_CYCLES    = 200,
  parameter int unsigned SIXTEENS_CYCLES = 800,
  parameter int unsigned SIXTEENS_REPEAT = 100,
  parameter int unsigned SIXTEENS_DELAY  = 10
) (
  input  logic       clk,
  input  logic       rst,
  // IOT strobes
  input  logic       sw1_skip,    // IOT 2101
  input  logic       sw2_int_en,  // IOT 2121
  input  logic       sw2_clr,     // IOT 2122
  input  logic       sw2_load,    // IOT 2124
  input  word_t      iob,
  output logic       skip_rq,
  output logic       int_rq,
  output disp_mode_t mode,
  output logic       flag,
  output logic       int_en,
  // data channel
  output logic       dch_flag,
  input  logic       xfer_done,   // CLR RQ of this device
  // datapath status
  input  logic       count_zero,
  input  logic       sixteenth,
  input  logic       x_oflo,
  input  logic       mark_oflo,
  input  logic       z_busy,
  // datapath control
  output logic       x_zero,
  output logic       x_copy,
  output logic       x_advance,
  output logic       a_inc,
  output logic       cnt_load,
  output logic       cnt_dec,
  output logic       y_clr,
  output logic       y_shift,
  output logic       z_trig,
  output logic       sixteens,    // brightening hold in progress
  output logic       point_done   // strobe: a point has been drawn
);
  typedef enum logic [2:0] {
    S_IDLE, S_REQ, S_SHIFT, S_INTENS, S_SIXTEENS, S_ADVANCE, S_WAIT
  } state_t;

  localparam int unsigned TW = $clog2(POINT_CYCLES + 1);
  localparam int unsigned SW = $clog2(SIXTEENS_CYCLES + SIXTEENS_DELAY + 1);

  state_t        state;
  logic [TW-1:0] tcnt;
  logic [SW-1:0] scnt;
  logic          active;
  disp_mode_t    cur;      // mode of the point in progress

  assign active = mode.display | mode.mark | mode.set;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      mode   <= '0;
      flag   <= 1'b0;
      int_en <= 1'b0;
      tcnt   <= '0;
      scnt   <= '0;
      cur    <= '0;
    end else begin
      if (tcnt != '1) tcnt <= tcnt + 1'b1;
      if (sw2_int_en) int_en <= 1'b1;
      if (sw2_clr) begin
        mode <= '0;
        flag <= 1'b0;
      end else if (sw2_load) begin
        mode <= mode | sw2_mode(iob);
        flag <= 1'b0;
      end

      unique case (state)
        S_IDLE: if (active && !sw2_clr && !sw2_load) begin
          tcnt <= TW'(1);
          if (mode.display)   cur <= '{display: 1'b1, mark: 1'b0, set: 1'b0};
          else if (mode.mark) cur <= '{display: 1'b0, mark: 1'b1, set: 1'b0};
          else                cur <= '{display: 1'b0, mark: 1'b0, set: 1'b1};
          state <= mode.display ? S_REQ : (mode.mark ? S_INTENS : S_REQ);
        end
        S_REQ:    if (xfer_done) state <= S_SHIFT;
        S_SHIFT:  if (count_zero) state <= S_INTENS;
        S_INTENS: if (!z_busy && !z_trig) begin
          if (cur.display && sixteenth) begin
            scnt  <= SW'(SIXTEENS_CYCLES + SIXTEENS_DELAY);
            state <= S_SIXTEENS;
          end else
            state <= S_ADVANCE;
        end
        S_SIXTEENS: begin
          scnt <= scnt - 1'b1;
          if (scnt == SW'(1)) state <= S_ADVANCE;
        end
        S_ADVANCE: begin
          if (cur.display && x_oflo)    begin mode.display <= 1'b0; flag <= 1'b1; end
          if (cur.mark    && mark_oflo) begin mode.mark    <= 1'b0; flag <= 1'b1; end
          if (cur.set)                  begin mode.set     <= 1'b0; flag <= 1'b1; end
          state <= S_WAIT;
        end
        S_WAIT: if (tcnt >= TW'(POINT_CYCLES - 1)) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // one-cycle controls
  logic start;
  assign start = (state == S_IDLE) && active && !sw2_clr && !sw2_load;

  always_comb begin
    x_zero     = sw2_clr | (sw2_load & sw2_mode(iob).display);
    x_copy     = start & ~mode.display;
    y_clr      = start;
    dch_flag   = (state == S_REQ);
    cnt_load   = (state == S_REQ) & xfer_done;
    cnt_dec    = (state == S_SHIFT) & ~count_zero;
    y_shift    = cnt_dec;
    sixteens   = (state == S_SIXTEENS) && (scnt <= SW'(SIXTEENS_CYCLES));
    z_trig     = ((state == S_SHIFT) & count_zero)
               | (start & ~mode.display & mode.mark)
               | (sixteens && (scnt % SW'(SIXTEENS_REPEAT) == '0));
    x_advance  = (state == S_ADVANCE) & cur.display;
    a_inc      = (state == S_ADVANCE);
    point_done = (state == S_ADVANCE);
    skip_rq    = sw1_skip & flag;
    int_rq     = flag & int_en;
  end

  a_one_mode_running: assert property (@(posedge clk) disable iff (rst)
    (state != S_IDLE) |-> $onehot(cur));
endmodule

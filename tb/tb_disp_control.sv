// tb_disp_control: the display sequencer alone, with the datapath replaced by
// testbench responses (memory cycle delay, shift counter, X overflow after N
// points, address low bits, Z busy time). Checks the 20 us point period, the
// number of Y shifts per point, the sixteens hold length, its
// re-brightenings and the delay before it, that DISPLAY OFLO / MARK OFLO /
// a set point end their mode and set the flag, one memory read per display or set point and none in
// mark mode, display before mark when both bits are set, and the skip and
// interrupt outputs.
`timescale 1ns/1ps
module tb_disp_control;
  import pha_pkg::*;
  localparam int P = 200, S16 = 800, REP = 100, SD = 10, NPTS = 32, ZB = 12;
  logic clk = 0, rst;
  logic sw1_skip, sw2_int_en, sw2_clr, sw2_load;
  word_t iob;
  logic skip_rq, int_rq, flag, int_en, dch_flag, xfer_done;
  disp_mode_t mode;
  logic count_zero, sixteenth, x_oflo, mark_oflo, z_busy;
  logic x_zero, x_copy, x_advance, a_inc, cnt_load, cnt_dec, y_clr, y_shift, z_trig, sixteens, point_done;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  disp_control #(.POINT_CYCLES(P), .SIXTEENS_CYCLES(S16), .SIXTEENS_REPEAT(REP), .SIXTEENS_DELAY(SD)) dut (.*);

  // datapath stand-ins
  int cnt, xpts, addr, zleft, mem_wait, shifts_this_point, z_trigs, z_in_s16;
  int yshift_setting;
  assign count_zero = (cnt == 0);
  assign sixteenth  = (addr % 16 == 15);
  assign x_oflo     = x_advance && (xpts == NPTS - 1);
  assign mark_oflo  = a_inc && (addr % 64 == 63);
  assign z_busy     = (zleft != 0);
  assign xfer_done  = dch_flag && (mem_wait == 1);
  always @(posedge clk) begin
    if (dch_flag) mem_wait <= (mem_wait == 0) ? 6 : mem_wait - 1; else mem_wait <= 0;
    if (cnt_load) cnt <= yshift_setting; else if (cnt_dec) cnt <= cnt - 1;
    if (cnt_dec) shifts_this_point++;
    if (x_zero) xpts <= 0; else if (x_advance) xpts <= xpts + 1;
    if (a_inc) addr <= addr + 1;
    if (z_trig) begin zleft <= ZB; z_trigs++; if (sixteens) z_in_s16++; end
    else if (zleft != 0) zleft <= zleft - 1;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic iot(input logic s1skip, input logic en, input logic clr, input logic ld, input word_t w);
    @(posedge clk) begin sw1_skip <= s1skip; sw2_int_en <= en; sw2_clr <= clr; sw2_load <= ld; iob <= w; end
    @(posedge clk) begin sw1_skip <= 0; sw2_int_en <= 0; sw2_clr <= 0; sw2_load <= 0; end
  endtask

  int starts[$];
  int s16_len, s16_start, last_z;
  always @(posedge clk) begin
    if (y_clr) starts.push_back(cyc);
    if (z_trig && !sixteens) last_z = cyc;
    if (sixteens && !$past(sixteens)) begin
      s16_start = cyc;
      // the point's own Z pulse ends (ZB cycles), then the delay one-shot runs
      chk(cyc - last_z >= ZB + SD && cyc - last_z <= ZB + SD + 3,
          $sformatf("sixteens hold starts %0d cycles after the point's Z trigger", cyc - last_z));
    end
    if (!sixteens && $past(sixteens)) begin
      chk(cyc - s16_start == S16, $sformatf("sixteens hold %0d cycles", cyc - s16_start));
      s16_len++;
    end
    if (point_done && mode.display && yshift_setting >= 0) begin
      chk(shifts_this_point == yshift_setting, $sformatf("%0d shifts, want %0d", shifts_this_point, yshift_setting));
    end
    if (point_done) shifts_this_point = 0;
    if (sw1_skip) chk(skip_rq == flag, "IOT 2101 skips exactly when the flag is set");
    else chk(!skip_rq, "no skip without IOT 2101");
    if (xfer_done) reads_this_point++;
    if (point_done) begin
      if (mode.display || mode.set) chk(reads_this_point == 1, $sformatf("%0d memory reads for one point", reads_this_point));
      else chk(reads_this_point == 0, "mark point makes no memory read");
      reads_this_point = 0;
    end
  end
  int reads_this_point = 0;

  // every point starts P cycles after the previous one, except after a
  // sixteenth point (address 15 mod 16), which is held longer
  task automatic check_gaps();
    for (int i = 1; i < starts.size(); i++) begin
      if ((i - 1) % 16 == 15)
        chk(starts[i] - starts[i-1] >= S16 + SD && starts[i] - starts[i-1] <= S16 + SD + P, $sformatf("gap after sixteenth point %0d", starts[i] - starts[i-1]));
      else
        chk(starts[i] - starts[i-1] == P, $sformatf("point %0d gap %0d, want %0d", i, starts[i] - starts[i-1], P));
    end
  endtask

  initial begin
    {sw1_skip, sw2_int_en, sw2_clr, sw2_load} = '0; iob = '0;
    cnt = 0; xpts = 0; addr = 0; zleft = 0; mem_wait = 0; shifts_this_point = 0;
    z_trigs = 0; z_in_s16 = 0; s16_len = 0; yshift_setting = 5;
    rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    // display: NPTS points, 2 sixteens holds
    iot(0, 0, 1, 0, '0);
    iot(0, 0, 0, 1, 18'o400000);
    repeat (NPTS * P + 3 * S16) @(posedge clk);
    chk(flag && !mode.display, "display ended by DISPLAY OFLO with flag");
    chk(!int_rq, "no interrupt before IOT 2121");
    chk(starts.size() == NPTS, $sformatf("%0d display points", starts.size()));
    check_gaps();
    chk(s16_len == 2, $sformatf("%0d sixteens holds", s16_len));
    chk(z_in_s16 == 2 * (S16 / REP), $sformatf("%0d re-brightenings", z_in_s16));
    iot(0, 1, 0, 0, '0);
    #1 chk(int_rq, "interrupt after IOT 2121");
    iot(1, 0, 0, 0, '0);
    // mark: 64 points with no memory cycle
    starts.delete(); addr = 0; yshift_setting = -1;
    iot(0, 0, 1, 0, '0);
    #1 chk(!flag && !int_rq, "flag cleared by clear SW2");
    iot(0, 0, 0, 1, 18'o200000);
    repeat (64 * P + 50) @(posedge clk);
    chk(flag && !mode.mark, "mark ended by MARK OFLO");
    chk(starts.size() == 64, $sformatf("%0d mark points", starts.size()));
    // set: one point
    starts.delete(); yshift_setting = 2;
    iot(0, 0, 1, 0, '0);
    iot(0, 0, 0, 1, 18'o040000);
    repeat (3 * P) @(posedge clk);
    chk(flag && !mode.set && starts.size() == 1, $sformatf("set mode draws one point: flag=%b set=%b n=%0d", flag, mode.set, starts.size()));
    // display and mark together: the histogram first, then the marker
    starts.delete(); addr = 0; yshift_setting = 0; s16_len = 0;
    iot(0, 0, 1, 0, '0);
    iot(0, 0, 0, 1, 18'o600000);
    repeat (NPTS * P + 3 * S16 + 64 * P + 50) @(posedge clk);
    chk(flag && mode == '0, "both modes ended");
    // the marker counts on from the address where the histogram stopped
    chk(starts.size() == NPTS + 64 - NPTS % 64, $sformatf("%0d points for display then mark", starts.size()));
    // display frames with random Y shifts
    for (int f = 0; f < 4; f++) begin
      starts.delete(); addr = 0; yshift_setting = int'($urandom % 16);
      iot(0, 0, 1, 0, '0);
      iot(0, 0, 0, 1, 18'o400000);
      repeat (NPTS * P + 3 * S16) @(posedge clk);
      chk(flag && !mode.display && starts.size() == NPTS, $sformatf("frame with shift %0d: %0d points", yshift_setting, starts.size()));
      check_gaps();
      iot(1, 0, 0, 0, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

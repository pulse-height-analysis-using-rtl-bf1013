// tb_pha_system: end-to-end run of one analysis station at default parameters
// (10 MHz clock, 20 us per display point).
// A pulse source feeds the A.D.C. model with a two-peak spectrum plus pulses
// above the region and faulty (ALT) conversions while a small program, acting
// as the computer's software, keeps the display refreshed: histogram of the
// 1024-channel region, then marker 1, marker 2, then the histogram again, each
// loaded when the display flag interrupts. After two refresh frames the
// source stops, a channel is driven into overflow, whose interrupt makes the
// program disable the A.D.C.; a last frame is then checked point by point
// against memory, and two set-mode points are drawn on the second scope.
// Checked: memory counts against the pulses stored, every point of the last
// histogram and marker, the frame time (points at 20 us plus the sixteens
// holds), and that each mechanism happened: out-of-range abort, ALT abort,
// data channel contention, channel overflow interrupt, DISPLAY OFLO, MARK
// OFLO, sixteens brightening, set mode, skip IOTs, second-scope select.
`timescale 1ns/1ps
module tb_pha_system;
  import pha_pkg::*;
  localparam int P = 200, S16 = 800;
  localparam int BASE = 'o4000, NCH = 1024, YSH = 6;
  logic clk = 0, pwr_clr;
  logic [8:0] dev_sel;
  logic iop1, iop2, iop4, skip_rq, int_rq;
  word_t iob;
  logic dch_gr, dch_done, io_oflo, dch_rq, dch_en_out, inc_mb;
  addr_t dch_addr;
  logic [11:0] adc_data, x_code;
  logic adc_ready, adc_alt, adc_busy, adc_clr, adc_inhibit, adc_abort;
  logic [9:0] y_code;
  real x_volts, y_volts;
  logic z1, z2, adc_ovf_flag, disp_flag, sixteens, point_done;
  disp_mode_t disp_mode;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #50 clk = ~clk;
  always @(posedge clk) cyc++;

  pha_system dut (.*, .dch_en_in(1'b1));

  pdp15_model u_cpu (
    .clk, .rst(pwr_clr), .dev_sel, .iop1, .iop2, .iop4, .iob, .skip_rq,
    .dch_gr, .dch_done, .io_oflo, .dch_rq, .dch_addr, .inc_mb
  );
  nd2200_adc_model u_conv (
    .clk, .inhibit(adc_inhibit), .clr(adc_clr), .data(adc_data), .ready(adc_ready),
    .alt(adc_alt), .busy(adc_busy)
  );

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- mechanisms
  int m_oor, m_alt, m_contend, m_ovf_int, m_disp_oflo, m_mark_oflo, m_s16, m_set, m_skip, m_z2;
  always @(posedge clk) if (!pwr_clr) begin
    if (adc_abort && adc_alt) m_alt++;
    else if (adc_abort) m_oor++;
    if (dut.a_rq && dut.d_rq) m_contend++;
    if (sixteens && !$past(sixteens)) m_s16++;
    if (z2 && !$past(z2)) m_z2++;
  end

  // ---------------------------------------------------------------- points
  typedef struct { int x; int y; bit s16; } zrec_t;
  zrec_t zq[$];
  always @(posedge clk) if ((z1 | z2) && !$past(z1 | z2))
    zq.push_back('{int'(x_code), int'(y_code), sixteens});

  // ---------------------------------------------------------------- pulse source
  int expect_cnt[NCH];
  bit source_on, adc_enabled;
  int offered, stored;
  initial begin
    logic acc;
    foreach (expect_cnt[i]) expect_cnt[i] = 0;
    source_on = 0;
    wait (source_on);
    while (source_on) begin
      int ch, r;
      bit alt;
      repeat (100 + $urandom % 500) @(posedge clk);
      r = int'($urandom % 100);
      if (r < 40)      ch = 300 + int'($urandom % 21) - 10 + int'($urandom % 21) - 10;
      else if (r < 70) ch = 700 + int'($urandom % 11) - 5 + int'($urandom % 11) - 5;
      else if (r < 90) ch = int'($urandom % 1024);
      else             ch = 1024 + int'($urandom % 3072);
      alt = ($urandom % 25 == 0);
      u_conv.pulse(12'(ch), alt, acc);
      offered++;
      if (acc && adc_enabled && !alt && ch < NCH) begin expect_cnt[ch]++; stored++; end
    end
  end

  // ---------------------------------------------------------------- program
  function automatic word_t adc_sw(bit en, bit ovf);
    return {en, ovf, 3'b000, 7'(BASE >> 6), 6'b110000};   // 1024 channels
  endfunction

  logic sk;
  task automatic load_histogram();
    u_cpu.iot(9'o210, 3'b110, {4'(YSH), 1'b0, 13'(BASE)}, sk);        // IOT 2106
    u_cpu.iot(9'o212, 3'b110, {4'b1000, 2'b00, 12'o7774}, sk);         // IOT 2126
  endtask
  task automatic load_marker(input int x);
    u_cpu.iot(9'o210, 3'b110, '0, sk);
    u_cpu.iot(9'o212, 3'b110, {4'b0100, 2'b00, 12'(x)}, sk);
  endtask

  // one refresh frame driven by the display interrupt; returns its length
  task automatic frame(output longint len);
    longint t0;
    t0 = cyc;
    load_histogram();
    for (int step = 0; step < 3; step++) begin
      bit done;
      done = 0;
      while (!done) begin
        @(posedge clk iff int_rq);
        u_cpu.iot(9'o210, 3'b001, '0, sk);                              // IOT 2101
        if (sk) begin
          m_skip++;
          done = 1;
          if (step == 0) m_disp_oflo++; else m_mark_oflo++;
          if (step == 0) load_marker(4 * 300);
          else if (step == 1) load_marker(4 * 700);
        end else begin
          u_cpu.iot(9'o200, 3'b001, '0, sk);                            // IOT 2001
          if (sk) begin
            m_ovf_int++;
            u_cpu.iot(9'o200, 3'b010, '0, sk);                          // IOT 2002
            u_cpu.iot(9'o200, 3'b100, adc_sw(0, 0), sk);                // stop
            adc_enabled = 0;
          end
        end
      end
    end
    len = cyc - t0;
  endtask

  initial begin
    longint flen;
    int n, held;
    pwr_clr = 1;
    adc_enabled = 0;
    repeat (5) @(posedge clk);
    pwr_clr <= 0;
    repeat (2) @(posedge clk);
    u_cpu.iot(9'o200, 3'b100, adc_sw(1, 1), sk);                        // IOT 2004
    adc_enabled = 1;
    u_cpu.iot(9'o212, 3'b001, '0, sk);                                  // IOT 2121
    source_on = 1;
    for (int f = 0; f < 2; f++) begin
      frame(flen);
      $display("frame %0d: %0d cycles = %0d us", f, flen, flen / 10);
      // a point with a sixteens hold lasts the hold plus its own draw time
      chk(flen >= (1152 - 64) * P + 64 * S16 && flen <= 1152 * P + 64 * S16,
          $sformatf("frame length %0d cycles", flen));
    end
    // overflow: drive channel 300 to the top, let the source hit it
    wait (!adc_busy && !adc_ready && !adc_clr && !dch_rq);
    u_cpu.mem[BASE + 300] = 18'd262141;
    expect_cnt[300] = 262141;                          // compared modulo 2^18
    frame(flen);
    source_on = 0;
    chk(!adc_enabled, "program stopped the A.D.C. on channel overflow");
    repeat (2000) @(posedge clk);
    // memory check
    for (int i = 0; i < NCH; i++) begin
      int want;
      want = expect_cnt[i] % 262144;
      chk(int'(u_cpu.mem[BASE + i]) == want,
          $sformatf("channel %0d holds %0d, want %0d", i, u_cpu.mem[BASE + i], want));
    end
    chk(u_cpu.mem[BASE + NCH] == '0 && u_cpu.mem[BASE - 1] == '0, "nothing stored outside the region");
    // last frame, checked point by point
    zq.delete();
    frame(flen);
    n = 0; held = 0;
    foreach (zq[k]) begin
      if (zq[k].s16) held++;
      else begin
        int want_x, want_y;
        if (n < NCH) begin
          want_x = 4 * n;
          want_y = int'(((longint'(u_cpu.mem[BASE + n]) << YSH) % 262144) >> 8);
        end else if (n < NCH + 64) begin
          want_x = 1200; want_y = (n - NCH) * 16;
        end else begin
          want_x = 2800; want_y = (n - NCH - 64) * 16;
        end
        chk(zq[k].x == want_x && zq[k].y == want_y, $sformatf("point %0d at (%0d,%0d), want (%0d,%0d)", n, zq[k].x, zq[k].y, want_x, want_y));
        n++;
      end
    end
    chk(n == NCH + 128, $sformatf("frame drew %0d points", n));
    chk(held == 64 * 8, $sformatf("%0d sixteens re-brightenings", held));
    // set mode, scope 2
    zq.delete();
    u_cpu.iot(9'o210, 3'b110, {4'd0, 1'b0, 13'(BASE + 300)}, sk);
    for (int p = 0; p < 2; p++) begin
      u_cpu.iot(9'o212, 3'b110, {4'b0001, 2'b10, 12'(100 * p)}, sk);
      @(posedge clk iff disp_flag);
      m_set++;
    end
    chk(zq.size() == 2 && zq[1].y == int'(u_cpu.mem[BASE + 301] >> 8), "set-mode points");
    $display("pulses offered %0d, stored %0d", offered, stored);
    $display("mechanisms: oor %0d alt %0d contention %0d ovf_int %0d disp_oflo %0d mark_oflo %0d sixteens %0d set %0d skip %0d z2 %0d",
             m_oor, m_alt, m_contend, m_ovf_int, m_disp_oflo, m_mark_oflo, m_s16, m_set, m_skip, m_z2);
    chk(m_oor > 0, "out-of-range abort happened");
    chk(m_alt > 0, "ALT abort happened");
    chk(m_contend > 0, "data channel contention happened");
    chk(m_ovf_int > 0, "overflow interrupt happened");
    chk(m_disp_oflo > 0, "DISPLAY OFLO happened");
    chk(m_mark_oflo > 0, "MARK OFLO happened");
    chk(m_s16 > 0, "sixteens happened");
    chk(m_set > 0, "set mode happened");
    chk(m_skip > 0, "skip happened");
    chk(m_z2 > 0, "second scope brightened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

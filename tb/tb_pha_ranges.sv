// tb_pha_ranges: every region size of the A.D.C. status word (4096 down to 64
// channels) and every display range (4096 down to 32 channels) on the full
// station at default parameters. For each size: acquire pulses into a region
// at a random aligned base, including pulses just above the region, check the
// memory; then draw the histogram with the matching range code and check the
// number of points, their X spacing (4096 / channels), their Y values and the
// sweep time (20 us per point plus the sixteens holds).
`timescale 1ns/1ps
module tb_pha_ranges;
  import pha_pkg::*;
  localparam int P = 200, S16 = 800;
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
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  typedef struct { int x; int y; bit s16; } zrec_t;
  zrec_t zq[$];
  always @(posedge clk) if ((z1 | z2) && !$past(z1 | z2))
    zq.push_back('{int'(x_code), int'(y_code), sixteens});

  logic sk, acc;
  int expect_cnt[int];

  initial begin
    logic [11:0] codes[8] = '{12'o7777, 12'o7776, 12'o7774, 12'o7770, 12'o7760, 12'o7740, 12'o7700, 12'o7600};
    pwr_clr = 1;
    repeat (5) @(posedge clk);
    pwr_clr <= 0;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 8; r++) begin
      int size, base, n, bad;
      longint t0, t1;
      size = 4096 >> r;
      base = int'($urandom % (8192 / size)) * size;
      foreach (u_cpu.mem[i]) u_cpu.mem[i] = '0;
      expect_cnt.delete();
      if (r <= 6) begin
        // A.D.C. region of this size
        u_cpu.iot(9'o200, 3'b100, {1'b1, 1'b0, 3'b000, 7'(base >> 6), 6'((6'h3F << (6 - r)))}, sk);
        // the load IOT also fires the converter CLR pulse; let it finish
        wait (!adc_clr && !adc_inhibit);
        repeat (2) @(posedge clk);
        bad = 0;
        for (int k = 0; k < 300; k++) begin
          int ch;
          ch = (k % 10 == 0) ? size + int'($urandom % (4096 - size + 1)) : int'($urandom % size);
          if (ch > 4095) ch = size - 1;
          u_conv.pulse(12'(ch), 1'b0, acc);
          chk(acc, "converter free");
          if (ch < size) begin
            if (expect_cnt.exists(ch)) expect_cnt[ch]++; else expect_cnt[ch] = 1;
          end else bad++;
          repeat (20) @(posedge clk);
          wait (!adc_busy && !adc_ready && !adc_clr && !dch_rq);
          repeat (2) @(posedge clk);
        end
        for (int a = 0; a < 8192; a++) begin
          int want;
          want = (a >= base && a < base + size && expect_cnt.exists(a - base)) ? expect_cnt[a - base] : 0;
          chk(int'(u_cpu.mem[a]) == want, $sformatf("size %0d: mem[%0o]=%0d want %0d", size, a, u_cpu.mem[a], want));
        end
      end else begin
        for (int i = 0; i < size; i++) u_cpu.mem[base + i] = word_t'(i * 977);
      end
      // display sweep
      zq.delete();
      u_cpu.iot(9'o210, 3'b110, {4'd8, 1'b0, 13'(base)}, sk);
      t0 = cyc;
      u_cpu.iot(9'o212, 3'b110, {4'b1000, 2'b00, codes[r]}, sk);
      @(posedge clk iff disp_flag);
      t1 = cyc;
      n = 0;
      foreach (zq[k]) if (!zq[k].s16) begin
        int want_y;
        want_y = int'(((longint'(u_cpu.mem[base + n]) << 8) % 262144) >> 8);
        chk(zq[k].x == n * (4096 / size) && zq[k].y == want_y, $sformatf("range %0d point %0d at (%0d,%0d) want (%0d,%0d)", size, n, zq[k].x, zq[k].y, n * (4096 / size), want_y));
        n++;
      end
      chk(n == size, $sformatf("range %0d drew %0d points", size, n));
      chk(t1 - t0 >= longint'(size - size / 16) * P + longint'(size / 16) * S16 &&
          t1 - t0 <= longint'(size) * P + longint'(size / 16) * S16 + 2 * P,
          $sformatf("range %0d sweep %0d cycles", size, t1 - t0));
      $display("range %0d channels: sweep %0d us", size, (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

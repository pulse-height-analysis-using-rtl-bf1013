// tb_adc_interface: the A.D.C. interface with the computer and converter models.
//   1. Status word: enabled, overflow interrupt on, 512-channel region at
//      2000 octal. 400 random pulses (some above channel 511, some with ALT):
//      memory must hold a count per in-range channel and nothing elsewhere;
//      out-of-range and ALT events must give ABORT without a memory cycle.
//   2. A channel already at 262143 overflows: flag, interrupt, IOT 2001 skip,
//      IOT 2002 clear.
//   3. Disabled interface: no memory cycle.
//   4. Latency: the data channel request follows READY by two cycles.
`timescale 1ns/1ps
module tb_adc_interface;
  import pha_pkg::*;
  logic clk = 0, rst;
  logic [8:0] dev_sel;
  logic iop1, iop2, iop4, skip_rq, int_rq;
  word_t iob;
  logic dch_gr, dch_done, io_oflo, dch_rq, dch_en_out, ena, inc_mb;
  addr_t dch_addr;
  logic [11:0] adc_data;
  logic adc_ready, adc_alt, adc_busy, adc_clr, adc_inhibit, adc_abort, ovf_flag;
  adc_status_t status;
  int checks = 0, failures = 0, cyc = 0, n_abort = 0;

  always #50 clk = ~clk;
  always @(posedge clk) begin cyc++; if (adc_abort) n_abort++; end

  adc_interface #(.CLR_CYCLES(10)) dut (
    .clk, .rst, .dev_sel, .iop1, .iop2, .iop4, .iob, .skip_rq, .int_rq,
    .dch_en_in(1'b1), .dch_gr, .dch_done, .io_oflo, .dch_rq, .dch_en_out, .ena,
    .dch_addr, .inc_mb, .adc_data, .adc_ready, .adc_alt, .adc_busy, .adc_clr,
    .adc_inhibit, .adc_abort, .status, .ovf_flag
  );
  pdp15_model u_cpu (
    .clk, .rst, .dev_sel, .iop1, .iop2, .iop4, .iob, .skip_rq,
    .dch_gr, .dch_done, .io_oflo, .dch_rq, .dch_addr, .inc_mb
  );
  nd2200_adc_model u_conv (
    .clk, .inhibit(adc_inhibit), .clr(adc_clr), .data(adc_data), .ready(adc_ready),
    .alt(adc_alt), .busy(adc_busy)
  );

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic settle();
    int n;
    n = 0;
    do begin @(posedge clk); n++; end
    while ((adc_busy || adc_ready || adc_clr || dch_rq || ena || adc_inhibit) && n < 10000);
    repeat (2) @(posedge clk);
  endtask

  // latency READY -> DCH RQ
  int lat_seen, lat_ok, t_ready;
  always @(posedge clk) begin
    if (adc_ready && !$past(adc_ready)) t_ready = cyc;
    if (!rst && dch_rq && !$past(dch_rq) && status.enable) begin
      lat_seen++;
      if (cyc - t_ready == 2) lat_ok++; else $display("latency %0d at %0d", cyc - t_ready, cyc);
    end
  end

  function automatic word_t adc_sw(bit en, bit ovf, int base, int size);
    int r;
    r = 0;
    while ((4096 >> r) > size) r++;
    return {en, ovf, 3'b000, 7'(base >> 6), 6'((6'h3F << (6 - r)))};
  endfunction

  logic sk, acc;
  int expect_cnt[int];
  initial begin
    int base, n_bad, n_good, aborts0;
    rst = 1;
    repeat (4) @(posedge clk);
    rst <= 0;
    base = 'o2000;
    u_cpu.iot(9'o200, 3'b100, adc_sw(1, 1, base, 512), sk);
    @(posedge clk);
    chk(status.enable && status.ovf_int_en && status.mask == 6'b111000 && status.base == 7'(base >> 6), "status word decoded");
    settle();
    n_bad = 0; n_good = 0; aborts0 = n_abort;
    for (int i = 0; i < 400; i++) begin
      int ch;
      bit is_alt;
      ch = int'($urandom % 600);
      is_alt = ($urandom % 20 == 0);
      u_conv.pulse(12'(ch), is_alt, acc);
      chk(acc, "converter idle between pulses");
      settle();
      if (ch >= 512 || is_alt) n_bad++;
      else begin
        n_good++;
        if (expect_cnt.exists(ch)) expect_cnt[ch]++; else expect_cnt[ch] = 1;
      end
    end
    chk(n_abort - aborts0 == n_bad, $sformatf("aborts %0d, want %0d", n_abort - aborts0, n_bad));
    chk(u_cpu.n_inc == n_good, $sformatf("increment cycles %0d, want %0d", u_cpu.n_inc, n_good));
    for (int a = 0; a < 8192; a++) begin
      int want;
      want = (a >= base && a < base + 512 && expect_cnt.exists(a - base)) ? expect_cnt[a - base] : 0;
      if (int'(u_cpu.mem[a]) != want) begin
        chk(0, $sformatf("mem[%0o]=%0d want %0d", a, u_cpu.mem[a], want));
      end
    end
    checks++;
    chk(lat_seen == n_good && lat_ok == lat_seen, $sformatf("READY to request latency ok %0d of %0d", lat_ok, lat_seen));

    // overflow
    u_cpu.mem[base + 7] = '1;
    chk(!int_rq, "no interrupt yet");
    u_conv.pulse(12'd7, 1'b0, acc);
    settle();
    chk(u_cpu.mem[base + 7] == '0 && u_cpu.n_oflo == 1, "channel wrapped");
    chk(ovf_flag && int_rq, "overflow flag and interrupt");
    u_cpu.iot(9'o200, 3'b001, '0, sk);
    chk(sk, "IOT 2001 skips on overflow");
    u_cpu.iot(9'o200, 3'b010, '0, sk);
    @(posedge clk);
    chk(!ovf_flag && !int_rq, "IOT 2002 clears flag");
    u_cpu.iot(9'o200, 3'b001, '0, sk);
    chk(!sk, "no skip after clear");

    // disabled
    u_cpu.iot(9'o200, 3'b100, adc_sw(0, 0, base, 512), sk);
    settle();
    begin
      int n_before;
      n_before = u_cpu.n_inc;
      u_conv.pulse(12'd3, 1'b0, acc);
      repeat (300) @(posedge clk);
      chk(u_cpu.n_inc == n_before && !dch_rq, "disabled interface makes no memory cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

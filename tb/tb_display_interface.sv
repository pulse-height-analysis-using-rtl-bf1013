// tb_display_interface: runs the display interface against the computer model.
//   1. Display mode, 64-channel range, Y shift 3: every intensified point must
//      show X = 64 * i and Y = top ten bits of (count << 3); points 20 us
//      apart; every sixteenth point held and re-brightened; the overflow flag
//      rises after the last point, IOT 2101 then skips and, once IOT 2121 has
//      enabled it, the interrupt request is raised.
//   2. Mark mode: 64 points at a fixed X with Y climbing, then the flag.
//   3. Set mode on the second oscilloscope: one point per status word 2,
//      Y read from the address in status word 1, which steps by one.
`timescale 1ns/1ps
module tb_display_interface;
  import pha_pkg::*;
  localparam int P = 200, S16 = 800, REP = 100;
  logic clk = 0, rst;
  logic [8:0] dev_sel;
  logic iop1, iop2, iop4, skip_rq, int_rq;
  word_t iob;
  logic dch_gr, dch_done, io_oflo, dch_rq, dch_en_out, ena;
  addr_t dch_addr;
  logic [11:0] x_code;
  logic [9:0] y_code;
  logic z1, z2, flag, sixteens, point_done;
  disp_mode_t mode;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #50 clk = ~clk;   // 10 MHz
  always @(posedge clk) cyc++;

  display_interface #(.POINT_CYCLES(P), .SIXTEENS_CYCLES(S16), .SIXTEENS_REPEAT(REP)) dut (
    .clk, .rst, .dev_sel, .iop1, .iop2, .iop4, .iob, .skip_rq, .int_rq,
    .dch_en_in(1'b1), .dch_gr, .dch_done, .dch_rq, .dch_en_out, .ena, .dch_addr,
    .x_code, .y_code, .z1, .z2, .mode, .flag, .sixteens, .point_done
  );

  pdp15_model u_cpu (
    .clk, .rst, .dev_sel, .iop1, .iop2, .iop4, .iob, .skip_rq,
    .dch_gr, .dch_done, .io_oflo, .dch_rq, .dch_addr, .inc_mb(1'b0)
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // record every intensification
  typedef struct { int x; int y; int z; int t; bit s16; } zrec_t;
  zrec_t zq[$];
  logic zprev = 0;
  always @(posedge clk) begin
    zprev <= z1 | z2;
    if ((z1 | z2) && !zprev) zq.push_back('{int'(x_code), int'(y_code), z2 ? 2 : 1, cyc, sixteens});
  end

  task automatic wait_flag(input int limit);
    int n;
    n = 0;
    while (!flag && n < limit) begin @(posedge clk); n++; end
  endtask

  logic sk;
  initial begin
    int base, n, held, last_t, gaps_ok, nrm;
    rst = 1;
    repeat (4) @(posedge clk);
    rst <= 0;
    // memory: a spectrum of 64 channels at 02000 octal
    base = 'o2000;
    for (int i = 0; i < 64; i++) u_cpu.mem[base + i] = word_t'((i * 523 + 7) % 40000);
    u_cpu.iot(9'o212, 3'b001, '0, sk);          // 2121: enable interrupt
    u_cpu.iot(9'o210, 3'b110, {4'd3, 1'b0, 13'(base)}, sk);   // 2106: SW1
    zq.delete();
    u_cpu.iot(9'o212, 3'b110, {4'b1000, 2'b00, 12'o7700}, sk); // 2126: display, 64 ch
    wait_flag(200000);
    chk(flag, "display flag set at end of sweep");
    chk(int_rq, "interrupt requested");
    chk(!mode.display, "display bit cleared by DISPLAY OFLO");
    n = 0; held = 0; last_t = -1; gaps_ok = 0; nrm = 0;
    foreach (zq[k]) begin
      if (zq[k].s16) begin
        held++;
        chk(n > 0 && zq[k].x == (n - 1) * 64, "held point keeps X");
      end else begin
        int want_y;
        want_y = int'(((longint'((n * 523 + 7) % 40000) << 3) % 262144) >> 8);
        chk(zq[k].x == n * 64, $sformatf("point %0d x=%0d", n, zq[k].x));
        chk(zq[k].y == want_y, $sformatf("point %0d y=%0d want %0d", n, zq[k].y, want_y));
        chk(zq[k].z == 1, "Z1 selected");
        if (last_t >= 0 && (n % 16) != 0) begin
          nrm++;
          if (zq[k].t - last_t == P) gaps_ok++;
        end
        last_t = zq[k].t;
        n++;
      end
    end
    chk(n == 64, $sformatf("display drew %0d points", n));
    chk(held == 4 * (S16 / REP), $sformatf("sixteens re-brightenings %0d", held));
    chk(gaps_ok == nrm && nrm > 0, $sformatf("20 us point spacing %0d of %0d", gaps_ok, nrm));
    u_cpu.iot(9'o210, 3'b001, '0, sk);
    chk(sk, "IOT 2101 skips on flag");
    $display("reads after display %0d", u_cpu.n_read);

    // mark mode at X = 1234 octal
    u_cpu.iot(9'o210, 3'b110, '0, sk);
    zq.delete();
    u_cpu.iot(9'o212, 3'b110, {4'b0100, 2'b00, 12'o1234}, sk);
    chk(!flag, "flag cleared by loading SW2");
    wait_flag(50000);
    chk(flag && !mode.mark, "mark flag");
    chk(zq.size() == 64, $sformatf("mark points %0d", zq.size()));
    foreach (zq[k]) chk(zq[k].x == 'o1234 && zq[k].y == k * 16, $sformatf("mark point %0d x=%0o y=%0d", k, zq[k].x, zq[k].y));
    u_cpu.iot(9'o210, 3'b001, '0, sk);
    chk(sk, "skip after mark");
    $display("reads after mark %0d", u_cpu.n_read);

    // set mode on scope 2: SW1 = shift 0, address base+5; two points
    u_cpu.iot(9'o210, 3'b110, {4'd0, 1'b0, 13'(base + 5)}, sk);
    zq.delete();
    u_cpu.iot(9'o212, 3'b110, {4'b0001, 2'b10, 12'o0100}, sk);
    wait_flag(5000);
    u_cpu.iot(9'o212, 3'b110, {4'b0001, 2'b10, 12'o0200}, sk);
    wait_flag(5000);
    chk(zq.size() == 2, $sformatf("set points %0d", zq.size()));
    if (zq.size() == 2) begin
      chk(zq[0].x == 'o100 && zq[0].y == int'(((5 * 523 + 7) % 40000) >> 8) && zq[0].z == 2, "set point 1");
      chk(zq[1].x == 'o200 && zq[1].y == int'(((6 * 523 + 7) % 40000) >> 8) && zq[1].z == 2, "set point 2 (address stepped)");
    end
    chk(u_cpu.n_read == 64 + 2, $sformatf("memory reads %0d", u_cpu.n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dch_port: two data channel ports in one priority chain, served by a small
// processor loop in the testbench. Random request flags; checks that every
// request gets exactly one transfer, that never both own the bus, that the
// first device of the chain wins a contested grant, and that CLR RQ comes
// exactly with the end-of-transfer strobe.
`timescale 1ns/1ps
module tb_dch_port;
  logic clk = 0, rst;
  logic [1:0] flag, dch_rq, en_out, ena, clr_rq;
  logic dch_gr, dch_done;
  int checks = 0, failures = 0;
  int served[2], wanted[2], contested, first_wins;

  always #5 clk = ~clk;

  dch_port u0 (.clk, .rst, .flag(flag[0]), .en_in(1'b1),      .dch_gr, .dch_done,
               .dch_rq(dch_rq[0]), .en_out(en_out[0]), .ena(ena[0]), .clr_rq(clr_rq[0]));
  dch_port u1 (.clk, .rst, .flag(flag[1]), .en_in(en_out[0]), .dch_gr, .dch_done,
               .dch_rq(dch_rq[1]), .en_out(en_out[1]), .ena(ena[1]), .clr_rq(clr_rq[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // devices: raise a flag now and then, drop it on CLR RQ
  always @(posedge clk) begin
    if (rst) flag <= '0;
    else for (int i = 0; i < 2; i++) begin
      if (clr_rq[i]) flag[i] <= 1'b0;
      else if (!flag[i] && ($urandom % 8 == 0)) begin flag[i] <= 1'b1; wanted[i]++; end
    end
  end

  // processor: grant, hold the cycle for a few clocks, end it
  initial begin
    dch_gr = 0; dch_done = 0; rst = 1; flag = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      if (|dch_rq) begin
        logic both;
        both = &dch_rq;
        dch_gr <= 1;
        @(posedge clk);
        dch_gr <= 0;
        @(posedge clk);
        checks++;
        if ($countones(ena) != 1) begin failures++; $display("FAIL ena=%b after grant", ena); end
        if (both) begin
          contested++;
          checks++;
          if (ena !== 2'b01) begin failures++; $display("FAIL priority ena=%b", ena); end
          else first_wins++;
        end
        repeat ($urandom % 5) @(posedge clk);
        dch_done <= 1;
        #1;
        @(posedge clk);
        dch_done <= 0;
      end
    end
    repeat (20) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (served[i] != wanted[i] - int'(flag[i])) begin
        failures++;
        $display("FAIL dev%0d wanted %0d served %0d pending %b", i, wanted[i], served[i], flag[i]);
      end
    end
    checks++;
    if (contested == 0) begin failures++; $display("FAIL no contested grant happened"); end
    $display("contested grants %0d, first device won %0d", contested, first_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 2; i++) if (clr_rq[i]) begin
      served[i]++;
      checks++;
      if (!dch_done || !ena[i]) begin failures++; $display("FAIL clr_rq without done/ena"); end
    end
    checks++;
    if (&ena) begin failures++; $display("FAIL two owners"); end
  end
endmodule

// tb_dac_model: checks the converter model's output voltage for random codes
// after the settling time, for the 12-bit X and 10-bit Y widths.
`timescale 1ns/1ps
module tb_dac_model;
  logic [11:0] xc;
  logic [9:0]  yc;
  real xv, yv;
  int checks = 0, failures = 0;

  dac_model #(.W(12)) ux (.code(xc), .vout(xv));
  dac_model #(.W(10)) uy (.code(yc), .vout(yv));

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      int a, b;
      a = (i == 0) ? 4095 : int'($urandom % 4096);
      b = (i == 0) ? 0 : int'($urandom % 1024);
      xc = 12'(a); yc = 10'(b);
      #2000;
      checks += 2;
      if (xv < 10.0 * a / 4096 - 1e-6 || xv > 10.0 * a / 4096 + 1e-6) begin failures++; $display("FAIL x %f", xv); end
      if (yv < 10.0 * b / 1024 - 1e-6 || yv > 10.0 * b / 1024 + 1e-6) begin failures++; $display("FAIL y %f", yv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

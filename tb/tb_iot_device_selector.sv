// tb_iot_device_selector: checks the IOT decoder for the three device codes of
// the station (200 A.D.C., 210 display word 1, 212 display word 2) against
// every device-select value with random IOP pulse patterns.
`timescale 1ns/1ps
module tb_iot_device_selector;
  import pha_pkg::*;
  logic [8:0] dev_sel;
  logic iop1, iop2, iop4;
  logic [2:0] sel, i1, i2, i4;
  int checks = 0, failures = 0;

  iot_device_selector #(.DEV(DEV_ADC))      u0 (.dev_sel, .iop1, .iop2, .iop4, .sel(sel[0]), .iot1(i1[0]), .iot2(i2[0]), .iot4(i4[0]));
  iot_device_selector #(.DEV(DEV_DISP_SW1)) u1 (.dev_sel, .iop1, .iop2, .iop4, .sel(sel[1]), .iot1(i1[1]), .iot2(i2[1]), .iot4(i4[1]));
  iot_device_selector #(.DEV(DEV_DISP_SW2)) u2 (.dev_sel, .iop1, .iop2, .iop4, .sel(sel[2]), .iot1(i1[2]), .iot2(i2[2]), .iot4(i4[2]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[3] = '{128, 136, 138};   // 200, 210, 212 octal
    for (int d = 0; d < 512; d++) begin
      for (int k = 0; k < 4; k++) begin
        dev_sel = 9'(d);
        {iop4, iop2, iop1} = 3'($urandom);
        #1;
        for (int j = 0; j < 3; j++) begin
          logic hit;
          hit = (d == codes[j]);
          checks++;
          if (sel[j] !== hit || i1[j] !== (hit & iop1) || i2[j] !== (hit & iop2) || i4[j] !== (hit & iop4)) begin
            failures++;
            if (failures < 10) $display("FAIL dev=%o j=%0d", d, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

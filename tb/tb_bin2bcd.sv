// tb_bin2bcd: exhaustive check of the three-cell binary-to-BCD converter, 0..255.
module tb_bin2bcd;
  import ph_meter_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] bin;
  bcd3_t      bcd;
  int checks = 0, failures = 0;

  bin2bcd dut (.bin, .bcd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      bin = 8'(v);
      #1;
      checks++;
      if (int'(bcd.hundreds) != v / 100 || int'(bcd.tens) != (v / 10) % 10 ||
          int'(bcd.units) != v % 10) begin
        failures++;
        $display("FAIL %0d -> %0d %0d %0d", v, bcd.hundreds, bcd.tens, bcd.units);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

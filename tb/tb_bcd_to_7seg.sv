// tb_bcd_to_7seg: all 16 input codes against segment patterns named by letter.
module tb_bcd_to_7seg;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic [3:0] bcd;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  bcd_to_7seg dut (.bcd, .seg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      bcd = 4'(d);
      #1;
      checks++;
      if (seg != seg_ref(d)) begin
        failures++;
        $display("FAIL digit %0d seg=%b expected %b", d, seg, seg_ref(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

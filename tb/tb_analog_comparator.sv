// tb_analog_comparator: decision around the threshold, with and without an
// input offset.
module tb_analog_comparator;
  import ph_meter_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  volt_nv_t vp, vn;
  logic out0, out_off;
  int checks = 0, failures = 0;

  analog_comparator dut0 (.vp, .vn, .vout(out0));
  analog_comparator #(.OFFSET_NV(1000)) dut_off (.vp, .vn, .vout(out_off));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      longint d;
      vn = 32'(500_000_000 + $urandom_range(0, 500_000_000));
      d  = longint'($urandom_range(0, 4000)) - 2000;
      vp = 32'(longint'(vn) + d);
      #1;
      checks++;
      if (out0 != (d > 0) || out_off != (d > 1000)) begin
        failures++;
        $display("FAIL vp=%0d vn=%0d out=%b/%b", vp, vn, out0, out_off);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ref_level_shifter: each bit selects 1.0 V for SAR(N)=1 and 0.5 V for
// SAR(N)=0, for random codes, and shows the midpoint for an invalid pair.
module tb_ref_level_shifter;
  import ph_meter_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic [6:0] sar, sarn;
  volt_nv_t [6:0] ref_v;
  int checks = 0, failures = 0;

  ref_level_shifter dut (.sar, .sarn, .v_ref_lo(V_REF_LO_NV), .v_ref_hi(V_REF_HI_NV), .ref_v);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      sar  = 7'(c);
      sarn = ~7'(c);
      #1;
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (ref_v[i] != (c[i] ? 32'd1_000_000_000 : 32'd500_000_000)) begin
          failures++;
          $display("FAIL code %0d bit %0d ref=%0d", c, i, ref_v[i]);
        end
      end
    end
    sar = 7'h7F; sarn = 7'h01;
    #1;
    checks++;
    if (ref_v[0] != 32'd750_000_000 || ref_v[1] != 32'd1_000_000_000) begin
      failures++;
      $display("FAIL invalid pair ref0=%0d", ref_v[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_r2r_ladder: with ideal 30k/60k resistors VOUT must be
// 0.5 V + code * 0.5 V / 128 exactly; with a 2R of 61k the output is held
// against the tb's own node-voltage solution of the ladder (Gauss-Seidel on
// the seven node equations, in real arithmetic).
module tb_r2r_ladder;
  import ph_meter_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  volt_nv_t [6:0] ref_v;
  volt_nv_t vout_ideal, vout_skew;
  int checks = 0, failures = 0;

  r2r_ladder dut_ideal (.ref_v, .v_bottom(V_REF_LO_NV), .vout(vout_ideal));
  r2r_ladder #(.R2_OHM(61_000)) dut_skew (.ref_v, .v_bottom(V_REF_LO_NV), .vout(vout_skew));

  function automatic real ladder_node_solution(int code, real r, real r2);
    real v[7];
    real g;
    for (int k = 0; k < 7; k++) v[k] = 0.75;
    repeat (2000)
      for (int k = 0; k < 7; k++) begin
        real vb, num;
        vb  = code[k] ? 1.0 : 0.5;
        num = vb / r2;
        g   = 1.0 / r2;
        if (k == 0) begin num += 0.5 / r2; g += 1.0 / r2; end
        else        begin num += v[k-1] / r; g += 1.0 / r; end
        if (k < 6)  begin num += v[k+1] / r; g += 1.0 / r; end
        v[k] = num / g;
      end
    return v[6];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      for (int i = 0; i < 7; i++) ref_v[i] = c[i] ? V_REF_HI_NV : V_REF_LO_NV;
      #1;
      checks++;
      if (vout_ideal != 32'(500_000_000 + c * 3_906_250)) begin
        failures++;
        $display("FAIL ideal code %0d vout=%0d", c, vout_ideal);
      end
      if (c % 9 == 0) begin
        real expv, err;
        expv = ladder_node_solution(c, 30000.0, 61000.0) * 1.0e9;
        err  = real'(vout_skew) - expv;
        checks++;
        if (err > 50.0 || err < -50.0) begin
          failures++;
          $display("FAIL skewed code %0d vout=%0d expected %f", c, vout_skew, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ref_level_shifter: behavioural model of the seven reference level shifters.
//
// Behavioural model, not synthesizable logic. In the chip each bit N has a
// pair of transistors, driven by the 0 V / 3 V logic signals SAR(N) and its
// complement SARN(N), that connect REF(N) either to the 1.0 V diode reference
// (SAR(N) = 1) or to the 0.5 V one (SAR(N) = 0); REF(N) then drives the
// 2R resistor of that bit of the ladder. This model switches the two
// reference voltages, given in nanovolts, instantly. If SAR(N) and SARN(N)
// are not complementary both transistors are on or off, which the model
// shows as the midpoint of the two references.
module ref_level_shifter
  import ph_meter_pkg::*;
#(
  parameter int unsigned N = 7
) (
  input  logic                 [N-1:0] sar,
  input  logic                 [N-1:0] sarn,
  input  volt_nv_t                     v_ref_lo,
  input  volt_nv_t                     v_ref_hi,
  output volt_nv_t [N-1:0]             ref_v
);
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      if (sar[i] != sarn[i]) ref_v[i] = sar[i] ? v_ref_hi : v_ref_lo;
      else                   ref_v[i] = volt_nv_t'((33'(v_ref_lo) + 33'(v_ref_hi)) >> 1);
    end
  end
endmodule

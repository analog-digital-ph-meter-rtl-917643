// r2r_ladder: behavioural model of the seven-bit R-2R voltage-scaling D/A.
//
// Behavioural model, not synthesizable logic. The ladder is a chain of
// series resistors R between nodes 0..N-1, each node tied through 2R to its
// bit voltage REF(k), and node 0 terminated by 2R to the 0.5 V bottom
// reference; VOUT is node N-1. The model solves it from the bottom up with
// the Thevenin equivalent seen below each node:
//   Rs   = R + Rth(k-1)            (Rth(-1) = 2R - R, so node 0 sees 2R)
//   V(k) = (REF(k)*Rs + V(k-1)*2R) / (2R + Rs),  Rth(k) = 2R*Rs / (2R + Rs)
// With exact 2R = 2 * R this gives V(k) = (REF(k) + V(k-1)) / 2, that is
// VOUT = Vbottom + code * (1.0 V - 0.5 V) / 128 for REF levels of 0.5 V and
// 1.0 V. R and 2R default to the 30 kohm and 60 kohm of the original design
// and can be changed to study ratio errors. Voltages are in nanovolts. The
// millisecond settling of the real ladder is not modelled.
module r2r_ladder
  import ph_meter_pkg::*;
#(
  parameter int unsigned N      = 7,
  parameter int unsigned R_OHM  = 30_000,
  parameter int unsigned R2_OHM = 60_000
) (
  input  volt_nv_t [N-1:0] ref_v,
  input  volt_nv_t         v_bottom,
  output volt_nv_t         vout
);
  // resistances in milliohms, so the Thevenin resistance keeps its fraction
  localparam longint RM  = longint'(R_OHM)  * 1000;
  localparam longint R2M = longint'(R2_OHM) * 1000;

  always_comb begin
    longint vth, rth, rs;
    vth = longint'(v_bottom);
    rth = R2M - RM;
    for (int k = 0; k < int'(N); k++) begin
      rs  = RM + rth;
      vth = (longint'(ref_v[k]) * rs + vth * R2M) / (R2M + rs);
      rth = (R2M * rs) / (R2M + rs);
    end
    vout = volt_nv_t'(vth);
  end
endmodule

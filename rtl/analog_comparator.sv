// analog_comparator: behavioural model of the two-stage comparator.
//
// Behavioural model, not synthesizable logic. The chip's comparator is a
// differential pair with a current-mirror load followed by an inverting
// common-source stage, biased from Ibias. The model keeps only its decision:
// vout = 1 when VP exceeds VN by more than OFFSET_NV nanovolts. In the chip
// VP takes the sensor voltage and VN the ladder output, so vout = 1 means the
// trial code is below the input and its bit is kept. Gain, offset drift and
// delay of the real circuit are not modelled.
module analog_comparator
  import ph_meter_pkg::*;
#(
  parameter int OFFSET_NV = 0
) (
  input  volt_nv_t vp,
  input  volt_nv_t vn,
  output logic     vout
);
  always_comb vout = (longint'(vp) > longint'(vn) + longint'(OFFSET_NV));
endmodule

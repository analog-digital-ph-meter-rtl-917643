// digital_comparator: self-test stand-in for the analog comparator.
//
// In test mode the on-chip counter takes the place of the sensor and this
// comparator takes the place of the analog one. It keeps the bit under test
// when count >= trial; with "greater than or equal" (where the analog path
// effectively decides "greater than") a conversion of count returns count
// itself, so every counter value 0..2^N-1 maps to one known display reading.
// Combinational.
module digital_comparator #(
  parameter int unsigned N = 7
) (
  input  logic [N-1:0] count,
  input  logic [N-1:0] trial,
  output logic         keep
);
  always_comb keep = (count >= trial);
endmodule

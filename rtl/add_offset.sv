// add_offset: the "add 11 to approximation" stage.
//
// The seven-bit approximation 0..127 covers pH 1.1 to 13.8 in steps of 0.1,
// so adding 11 turns it straight into the pH in tenths (11..138). That value
// then only needs a plain binary-to-BCD conversion, which is how the
// original design avoids a scaled decoder. Purely combinational; the output
// is one bit wider than the input so that 127 + 11 does not overflow.
module add_offset #(
  parameter int unsigned N      = 7,
  parameter int unsigned OFFSET = 11
) (
  input  logic [N-1:0] code,
  output logic [N:0]   tenths
);
  always_comb tenths = {1'b0, code} + (N+1)'(OFFSET);
endmodule

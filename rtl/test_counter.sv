// test_counter: exhaustive stimulus counter of the built-in self test.
//
// Counts 0, 1, .., 2^N-1, advancing by one on each clock edge with `step`
// high (once per completed self-test conversion), and wraps to 0. `last` is
// high while the count is at its maximum, so `step & last` marks the final
// self-test step. clear_n (asynchronous, active low) resets the count to 0.
// The counter is named by the original design; stepping once per conversion
// is this design's choice.
module test_counter #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         clear_n,
  input  logic         step,
  output logic [N-1:0] count,
  output logic         last
);
  always_ff @(posedge clk or negedge clear_n) begin
    if (!clear_n)  count <= '0;
    else if (step) count <= count + 1'b1;
  end

  always_comb last = (count == '1);
endmodule

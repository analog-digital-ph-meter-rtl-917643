// signature_register: signature compression and go/no-go flag of the self test.
//
// A W-bit multiple-input signature register (MISR) folds the decoded display
// lines into its state once per self-test step: on a clock edge with
// `capture` high, sig <= (sig << 1) ^ (sig[W-1] ? POLY : 0) ^ data, a
// Galois-form LFSR with characteristic polynomial x^21 + x^2 + 1 for the
// default W = 21. On the capture that also has `finish` high the updated
// signature is compared with the hard-wired GOOD_SIGNATURE: `go_nogo` is set
// on a match and `done` rises; both then hold until clear_n.
// clear_n (asynchronous, active low) seeds the register with 0.
// Compressing the display outputs and a hard-wired good signature follow the
// original design; width, polynomial, seed and the signature value are this
// design's own (GOOD_SIGNATURE is what the fault-free chip produces for
// counter values 0..127).
module signature_register #(
  parameter int unsigned   W              = 21,
  parameter logic [W-1:0]  POLY           = W'(21'h000005),
  parameter logic [W-1:0]  GOOD_SIGNATURE = W'(21'h1CCDCB)
) (
  input  logic         clk,
  input  logic         clear_n,
  input  logic         capture,
  input  logic         finish,
  input  logic [W-1:0] data,
  output logic [W-1:0] signature,
  output logic         go_nogo,
  output logic         done
);
  logic [W-1:0] sig_next;

  always_comb
    sig_next = {signature[W-2:0], 1'b0} ^ (signature[W-1] ? POLY : '0) ^ data;

  always_ff @(posedge clk or negedge clear_n) begin
    if (!clear_n) begin
      signature <= '0;
      go_nogo   <= 1'b0;
      done      <= 1'b0;
    end else if (capture && !done) begin
      signature <= sig_next;
      if (finish) begin
        go_nogo <= (sig_next == GOOD_SIGNATURE);
        done    <= 1'b1;
      end
    end
  end
endmodule

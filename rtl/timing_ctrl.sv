// timing_ctrl: start/stop timing of the chip ("timing and clk").
//
// A press of the momentary sample switch starts everything: it sets the run
// flag asynchronously (which enables the oscillator, so no clock is needed
// to wake up) and holds the chip reset clear_n low. clear_n is released by a
// two-flop synchroniser on the second clock edge after the switch opens, so
// the conversion starts cleanly on the oscillator clock.
//
// Normal mode: the first clock edge that sees the conversion done clears the
// run flag, which stops the oscillator until the next press; the approximation
// register then holds the reading.
// Test mode: every completed conversion is one self-test step. `step` is high
// for that cycle (capture the signature, advance the counter, restart the
// conversion); `finish` marks the step with the counter at its last value,
// and the oscillator stops after it.
//
// Using the switch as the reset pulse and stopping the oscillator when done
// follow the original design; the synchroniser and the one-cycle restart
// between self-test steps are this design's choices.
module timing_ctrl (
  input  logic clk,
  input  logic sample,
  input  logic test_mode,
  input  logic conv_done,
  input  logic last_step,
  output logic clear_n,
  output logic osc_en,
  output logic step,
  output logic finish
);
  logic run;
  logic [1:0] rsync;
  logic stop;

  always_ff @(posedge clk or posedge sample) begin
    if (sample) rsync <= 2'b00;
    else        rsync <= {rsync[0], 1'b1};
  end

  always_comb begin
    clear_n = rsync[1];
    step    = clear_n && run && test_mode && conv_done;
    finish  = step && last_step;
    stop    = clear_n && conv_done && (!test_mode || last_step);
    osc_en  = run;
  end

  always_ff @(posedge clk or posedge sample) begin
    if (sample)    run <= 1'b1;
    else if (stop) run <= 1'b0;
  end
endmodule

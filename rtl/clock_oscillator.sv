// clock_oscillator: behavioural model of the on-chip clock oscillator.
//
// Behavioural model, not synthesizable logic. The oscillator runs only while
// `en` is high and holds `clk` low while it is off, so the chip draws no
// clock power between readings. The first rising edge comes HALF_PERIOD_NS
// after en rises; the default of 500 us (1 kHz) is this model's choice of
// the "slow" clock the original design asks for, slow enough for a ladder
// that settles in milliseconds.
module clock_oscillator #(
  parameter int unsigned HALF_PERIOD_NS = 500_000
) (
  input  logic en,
  output logic clk
);
  timeunit 1ns;
  timeprecision 1ps;

  initial clk = 1'b0;

  always begin
    if (!en) begin
      clk = 1'b0;
      @(posedge en);
    end
    #(HALF_PERIOD_NS);
    clk = en ? ~clk : 1'b0;
  end
endmodule

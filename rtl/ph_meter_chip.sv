// ph_meter_chip: the complete pH meter chip.
//
// A pH sensor delivers a voltage proportional to pH between 0.5 V and 1.0 V.
// The chip digitises it with a seven-bit successive-approximation converter
// (approximation register, level shifters, R-2R ladder and comparator) and
// shows pH 1.1 to 13.8 on three seven-segment digits: the seven-bit code
// plus 11 is the pH in tenths. A press of `sample` starts the on-chip
// oscillator and a conversion; the oscillator stops when the reading is
// complete. With test_mode = 1 the chip runs its built-in self test and
// reports go_nogo, driving the comparator output and clock to pads.
//
// The digital part is ph_meter_core (synthesizable). The level shifters,
// ladder, comparator and oscillator are behavioural models; voltages are
// 32-bit nanovolt values, and the two diode references come in as ports.
// Reading time: 2 clocks of reset release plus 7 conversion clocks after
// the switch opens, at the 1 kHz default clock about 9 ms.
module ph_meter_chip
  import ph_meter_pkg::*;
#(
  parameter int unsigned OSC_HALF_PERIOD_NS = 500_000
) (
  input  logic               sample,
  input  logic               test_mode,
  input  volt_nv_t           v_sensor,
  input  volt_nv_t           v_ref_lo,
  input  volt_nv_t           v_ref_hi,
  output seg7_t [DIGITS-1:0] seg,
  output logic               go_nogo,
  output logic               selftest_done,
  output logic               comp_pad,
  output logic               clk_pad,
  output logic               busy
);
  logic                      clk, osc_en, cmp_out;
  logic     [SAR_BITS-1:0]   sar, sarn;
  volt_nv_t [SAR_BITS-1:0]   ref_v;
  volt_nv_t                  v_dac;

  clock_oscillator #(.HALF_PERIOD_NS(OSC_HALF_PERIOD_NS)) u_osc (.en(osc_en), .clk);

  ph_meter_core u_core (
    .clk, .sample, .test_mode,
    .cmp_analog (cmp_out),
    .sar, .sarn, .osc_en, .seg,
    .go_nogo, .selftest_done, .comp_pad, .clk_pad
  );

  ref_level_shifter #(.N(SAR_BITS)) u_shift (.sar, .sarn, .v_ref_lo, .v_ref_hi, .ref_v);

  r2r_ladder #(.N(SAR_BITS)) u_ladder (.ref_v, .v_bottom(v_ref_lo), .vout(v_dac));

  analog_comparator u_cmp (.vp(v_sensor), .vn(v_dac), .vout(cmp_out));

  always_comb busy = osc_en;
endmodule

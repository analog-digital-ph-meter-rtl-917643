// ph_meter_core: digital part of the pH meter chip.
//
// Conversion: the approximation register (sar_register) offers a trial code
// on sar/sarn to the off-core level shifters and R-2R ladder; the analog
// comparator answers on cmp_analog (1 = sensor above the ladder voltage) and
// one bit is decided per clock, msb first, seven clocks in all. The register
// output goes through "add 11" (pH in tenths, 11..138), a binary-to-BCD
// converter and three seven-segment decoders to the display. The leading
// digit is blanked when it is 0; the decimal point after the middle digit is
// assumed to be lit permanently on the display and has no output here.
//
// Self test (test_mode = 1): the analog decision is replaced by a digital
// comparator fed by an on-chip counter, the analog comparator output and the
// clock are driven to comp_pad and clk_pad, and each completed conversion
// folds the 21 segment lines into a signature register and advances the
// counter. After all 2^SAR_BITS counter values the oscillator stops and
// go_nogo tells whether the signature matched the hard-wired good one.
//
// Timing: a press of `sample` enables the oscillator (osc_en) and resets the
// core; a normal reading is complete SAR_BITS clocks after clear_n is
// released, and the oscillator stops one clock later. One self-test step
// takes SAR_BITS + 1 clocks, so the whole self test takes 128 * 8 clocks.
// The block structure follows the original design (block diagram and
// self-test diagram); the sequencing details are this design's choices.
module ph_meter_core
  import ph_meter_pkg::*;
#(
  parameter int unsigned         N              = SAR_BITS,
  parameter int unsigned         OFFSET         = PH_OFFSET,
  parameter logic [SEG_LINES-1:0] GOOD_SIGNATURE = 21'h1CCDCB
) (
  input  logic              clk,
  input  logic              sample,
  input  logic              test_mode,
  input  logic              cmp_analog,
  output logic [N-1:0]      sar,
  output logic [N-1:0]      sarn,
  output logic              osc_en,
  output seg7_t [DIGITS-1:0] seg,
  output logic              go_nogo,
  output logic              selftest_done,
  output logic              comp_pad,
  output logic              clk_pad
);
  logic         clear_n, step, finish, conv_done, last_count;
  logic         keep, keep_digital;
  logic [N-1:0] trial, count;
  logic [N:0]   tenths;
  bcd3_t        bcd;
  logic [3:0]   lead_digit;

  timing_ctrl u_timing (
    .clk, .sample, .test_mode,
    .conv_done (conv_done),
    .last_step (last_count),
    .clear_n, .osc_en, .step, .finish
  );

  // After the final self-test step the register keeps its last reading.
  sar_register #(.N(N)) u_sar (
    .clk, .clear_n,
    .start  (step && !finish),
    .keep,
    .trial, .result (),
    .done   (conv_done)
  );

  test_counter #(.N(N)) u_counter (
    .clk, .clear_n, .step,
    .count, .last (last_count)
  );

  digital_comparator #(.N(N)) u_dcmp (.count, .trial, .keep(keep_digital));

  always_comb begin
    keep     = test_mode ? keep_digital : cmp_analog;
    sar      = trial;
    sarn     = ~trial;
    comp_pad = test_mode & cmp_analog;
    clk_pad  = test_mode & clk;
  end

  add_offset #(.N(N), .OFFSET(OFFSET)) u_add (.code(trial), .tenths);

  bin2bcd u_bcd (.bin(8'(tenths)), .bcd);

  always_comb lead_digit = (bcd.hundreds == 4'd0) ? BCD_BLANK : bcd.hundreds;

  bcd_to_7seg u_seg2 (.bcd(lead_digit), .seg(seg[2]));
  bcd_to_7seg u_seg1 (.bcd(bcd.tens),   .seg(seg[1]));
  bcd_to_7seg u_seg0 (.bcd(bcd.units),  .seg(seg[0]));

  signature_register #(.W(SEG_LINES), .GOOD_SIGNATURE(GOOD_SIGNATURE)) u_sig (
    .clk, .clear_n,
    .capture   (step),
    .finish,
    .data      (seg),
    .signature (),
    .go_nogo,
    .done      (selftest_done)
  );
endmodule

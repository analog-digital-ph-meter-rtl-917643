// tb_ph_meter_core: the digital core with an ideal analog path modelled in
// the testbench. Checks readings for sampled codes (display, conversion
// time, oscillator stop), then a full self test (1026 clocks, go_nogo,
// pad outputs), and counts that each mechanism occurred.
module tb_ph_meter_core;
  import ph_meter_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, sample = 0, test_mode = 0, cmp_analog;
  logic [6:0] sar, sarn;
  logic osc_en, go_nogo, selftest_done, comp_pad, clk_pad;
  seg7_t [2:0] seg;
  int checks = 0, failures = 0;
  int vin2 = 0;                 // sensor as 2 * code units
  int n_blank = 0, n_two_digit = 0, n_stop = 0, n_clkpad = 0, n_comppad = 0;

  ph_meter_core dut (.clk, .sample, .test_mode, .cmp_analog, .sar, .sarn, .osc_en,
                     .seg, .go_nogo, .selftest_done, .comp_pad, .clk_pad);

  always #5 if (osc_en) clk = ~clk; else clk = 0;

  // ideal ladder and comparator: 1 when the sensor is above the trial code
  always_comb cmp_analog = (2 * int'(sar) < vin2);

  always @(posedge clk_pad) n_clkpad++;
  always @(posedge comp_pad) n_comppad++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t sar=%0d seg=%h)", what, $time, sar, seg);
    end
  endtask

  // Press the switch, release it, count clocks until the oscillator stops.
  task automatic press_and_wait(output int edges);
    sample = 1;
    #23 sample = 0;
    edges = 0;
    while (osc_en && edges < 5000) begin
      @(posedge clk);
      edges++;
      #1;
    end
    if (!osc_en) n_stop++;
  endtask

  initial begin
    int edges;
    int codes[$] = '{0, 1, 88, 89, 100, 127, 64, 42};
    #3;
    foreach (codes[i]) begin
      vin2 = 2 * codes[i] + 1;
      press_and_wait(edges);
      expect_true(edges == 2 + SAR_BITS + 1, "reading takes 2 + 7 + 1 clocks");
      expect_true(int'(sar) == codes[i] && sarn == ~sar, "converted code");
      expect_true(seg == display_ref(codes[i]), "display");
      if (codes[i] + 11 < 100) begin
        n_blank++;
        expect_true(seg[2] == 7'd0, "leading zero blanked");
      end else n_two_digit++;
    end
    expect_true(n_clkpad == 0 && n_comppad == 0, "pads quiet in normal mode");
    // self test, analog path pulled the wrong way: it must be ignored
    test_mode = 1;
    vin2 = 0;
    press_and_wait(edges);
    expect_true(edges == 2 + 128 * (SAR_BITS + 1), "self test takes 2 + 128 * 8 clocks");
    expect_true(selftest_done && go_nogo, "self test passes");
    expect_true(n_clkpad >= 128 * 8, "clock driven to pad in test mode");
    expect_true(seg == display_ref(127), "display holds the last step");
    // comparator to pad follows the analog comparator in test mode
    vin2 = 300;
    #1 expect_true(comp_pad == 1'b1, "comparator to pad");
    vin2 = 0;
    #1 expect_true(comp_pad == 1'b0 && n_comppad > 0, "comparator to pad low");
    test_mode = 0;
    #1 expect_true(!comp_pad && !clk_pad, "pads off outside test mode");
    // mechanisms seen
    expect_true(n_blank > 0, "leading-zero blanking occurred");
    expect_true(n_two_digit > 0, "two-digit pH occurred");
    expect_true(n_stop == 9, "oscillator stopped after every run");
    $display("readings with blank lead: %0d, two-digit: %0d, oscillator stops: %0d, pad clocks: %0d",
             n_blank, n_two_digit, n_stop, n_clkpad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

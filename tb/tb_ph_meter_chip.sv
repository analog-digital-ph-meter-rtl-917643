// tb_ph_meter_chip: end-to-end test of the whole chip at its default
// parameters (1 kHz oscillator). Sensor voltages for a range of pH values are
// applied as nanovolt levels, the sample switch is pressed, and the display
// is compared with the reading expected from the transfer function
// code = ceil((v - 0.5 V) / (0.5 V / 128)) - 1, pH = (code + 11) / 10.
// Then the self test runs all 128 steps. Counted mechanisms: readings,
// oscillator stops, blanked leading digits, two-digit pH values, self-test
// passes, pad clock edges and comparator-to-pad activity; each must occur.
module tb_ph_meter_chip;
  import ph_meter_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam time T_CLK = 1_000_000;  // default oscillator period, ns

  logic     sample = 0, test_mode = 0;
  volt_nv_t v_sensor = V_REF_LO_NV;
  seg7_t [2:0] seg;
  logic go_nogo, selftest_done, comp_pad, clk_pad, busy;
  int checks = 0, failures = 0;
  int n_read = 0, n_stop = 0, n_blank = 0, n_two = 0, n_pass = 0;
  int n_clkpad = 0, n_comppad = 0;

  ph_meter_chip dut (.sample, .test_mode, .v_sensor, .v_ref_lo(V_REF_LO_NV), .v_ref_hi(V_REF_HI_NV),
                     .seg, .go_nogo, .selftest_done, .comp_pad, .clk_pad, .busy);

  always @(posedge clk_pad) n_clkpad++;
  always @(posedge comp_pad) n_comppad++;

  initial begin
    #(T_CLK * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t seg=%h)", what, $time, seg);
    end
  endtask

  // expected code for a sensor voltage, worked out from the ladder step
  function automatic int code_of(longint v_nv);
    longint x = v_nv - 500_000_000;
    int c;
    if (x <= 0) return 0;
    c = int'((x + 3_906_249) / 3_906_250) - 1;   // ceil(x / step) - 1
    return (c > 127) ? 127 : c;
  endfunction

  task automatic read_ph(longint v_nv, output time t_busy);
    time t_rel;
    int c = code_of(v_nv);
    v_sensor = volt_nv_t'(v_nv);
    sample = 1;
    #(T_CLK * 2);
    expect_true(busy, "oscillator runs while the switch is held");
    sample = 0;
    t_rel = $time;
    wait (!busy);
    t_busy = $time - t_rel;
    n_stop++;
    n_read++;
    #(T_CLK * 5);
    expect_true(!busy, "oscillator stays off");
    expect_true(seg == display_ref(c), "display reading");
    if (seg[2] == 7'd0) n_blank++; else n_two++;
    $display("v=%0d nV  code=%0d  pH=%0d.%0d  reading time %0d us", v_nv, c, (c + 11) / 10, (c + 11) % 10, t_busy / 1000);
  endtask

  initial begin
    time tb_;
    longint volts[$] = '{500_000_000, 1_000_000_000, 730_468_750, 731_000_000,
                         851_562_500, 600_000_000, 999_000_000, 512_000_000};
    #(T_CLK / 3);
    foreach (volts[i]) begin
      read_ph(volts[i], tb_);
      // released reset after 2 clocks, 7 conversion clocks, stop on the next
      expect_true(tb_ >= 9 * T_CLK && tb_ <= 11 * T_CLK, "reading time 9..11 clock periods");
    end
    // pH 7.0 reads as 7.0: code 59, sensor between ladder steps 59 and 60
    read_ph(500_000_000 + 59 * 3_906_250 + 1_953_125, tb_);
    expect_true(seg[1] == seg_ref(7) && seg[0] == seg_ref(0), "pH 7.0");
    expect_true(n_clkpad == 0 && n_comppad == 0, "no pad activity in normal mode");

    // built-in self test
    test_mode = 1;
    v_sensor  = 32'd760_000_000;
    sample = 1;
    #(T_CLK * 2);
    sample = 0;
    wait (!busy);
    #(T_CLK * 2);
    expect_true(selftest_done, "self test complete");
    expect_true(go_nogo, "self test go");
    if (go_nogo) n_pass++;
    expect_true(n_clkpad >= 2 + 128 * 8, "clock to pad during self test");
    expect_true(n_comppad > 0, "comparator to pad during self test");
    test_mode = 0;
    $display("readings %0d, oscillator stops %0d, blank lead %0d, two-digit %0d, self-test passes %0d, pad clocks %0d, comparator pad edges %0d",
             n_read, n_stop, n_blank, n_two, n_pass, n_clkpad, n_comppad);
    expect_true(n_read == 9 && n_stop == 9, "readings and oscillator stops");
    expect_true(n_blank > 0, "leading-zero blanking occurred");
    expect_true(n_two > 0, "two-digit pH occurred");
    expect_true(n_pass == 1, "self test passed once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

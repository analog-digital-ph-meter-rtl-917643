// tb_timing_ctrl: oscillator enable on a press, reset release two clocks
// after the switch opens, stop after a normal conversion, and the
// step/finish sequence of a self test. A tb-side counter stands in for the
// conversion (done 7 clocks after clear_n or a restart).
module tb_timing_ctrl;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, sample = 0, test_mode = 0;
  logic conv_done, last_step;
  logic clear_n, osc_en, step, finish;
  int checks = 0, failures = 0;
  int conv_cnt, step_cnt;
  int steps_seen = 0;

  timing_ctrl dut (.clk, .sample, .test_mode, .conv_done, .last_step,
                   .clear_n, .osc_en, .step, .finish);

  // the tb's own clock is gated by osc_en, as the oscillator would be
  always #5 if (osc_en) clk = ~clk; else clk = 0;

  // stand-in for the register and counter
  always_ff @(posedge clk or negedge clear_n) begin
    if (!clear_n) begin conv_cnt <= 0; step_cnt <= 0; end
    else if (step && !finish) begin conv_cnt <= 0; step_cnt <= step_cnt + 1; end
    else if (conv_cnt < 7) conv_cnt <= conv_cnt + 1;
  end
  always_comb conv_done = (conv_cnt == 7);
  always_comb last_step = (step_cnt == 3);

  // count the self-test steps at the clock edges that take them
  always @(posedge clk)
    if (step) begin
      steps_seen <= steps_seen + 1;
      expect_true(finish == (steps_seen == 3), "finish only on the last step");
    end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic press(int hold_ns);
    sample = 1;
    #1 expect_true(osc_en && !clear_n, "press enables oscillator and resets");
    #(hold_ns);
    sample = 0;
  endtask

  initial begin
    int edges;
    #3;
    // normal reading
    press(30);
    expect_true(!clear_n, "reset held at release");
    @(posedge clk); #1 expect_true(!clear_n, "reset after first edge");
    @(posedge clk); #1 expect_true(clear_n, "reset released on second edge");
    edges = 0;
    while (osc_en && edges < 50) begin @(posedge clk); edges++; #1; end
    expect_true(edges == 8, "oscillator stops one clock after done");
    expect_true(!osc_en, "oscillator stopped");
    #200 expect_true(!osc_en && clk == 0, "stays stopped");
    // self test: four steps of 8 clocks, finish on the last
    test_mode = 1;
    press(30);
    edges = 0;
    steps_seen = 0;
    while (osc_en && edges < 200) begin
      @(posedge clk);
      edges++;
      #1;
    end
    expect_true(steps_seen == 4, "four self-test steps");
    expect_true(edges == 2 + 4 * 8, "self-test clock count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

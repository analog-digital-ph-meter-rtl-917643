// tb_clock_oscillator: the clock runs with the set period only while enabled
// and rests low while disabled.
module tb_clock_oscillator;
  timeunit 1ns; timeprecision 1ps;
  logic en = 0, clk;
  int checks = 0, failures = 0;
  int edges = 0;
  time last_rise = 0, period = 0;

  clock_oscillator #(.HALF_PERIOD_NS(100)) dut (.en, .clk);

  always @(posedge clk) begin
    edges++;
    period = $time - last_rise;
    last_rise = $time;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    checks++;
    if (edges != 0 || clk != 0) begin failures++; $display("FAIL runs while disabled"); end
    en = 1;
    #(100 * 2 * 10 + 50);
    checks++;
    if (edges != 10) begin failures++; $display("FAIL %0d edges in 10 periods", edges); end
    checks++;
    if (period != 200) begin failures++; $display("FAIL period %0t", period); end
    en = 0;
    #150;
    edges = 0;
    #5000;
    checks++;
    if (edges != 0 || clk != 0) begin failures++; $display("FAIL runs after disable"); end
    en = 1;
    #1050;
    checks++;
    if (edges != 5) begin failures++; $display("FAIL restart gave %0d edges", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

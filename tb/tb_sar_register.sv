// tb_sar_register: converts every code 0..127 against an ideal input and
// checks the result, the trial sequence, the 7-clock conversion time, the
// hold after done and the synchronous restart.
module tb_sar_register;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 7;
  logic clk = 0, clear_n = 0, start = 0, keep;
  logic [N-1:0] trial, result;
  logic done;
  int checks = 0, failures = 0;
  int vin2;          // input as 2 * code units; keep = trial below input
  bit greater_eq;    // 1: keep when value >= trial (self-test rule)

  sar_register #(.N(N)) dut (.clk, .clear_n, .start, .keep, .trial, .result, .done);

  always #5 clk = ~clk;

  always_comb keep = greater_eq ? (vin2 >= 2 * int'(trial)) : (2 * int'(trial) < vin2);

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
      $display("FAIL %s (t=%0t trial=%0d result=%0d done=%b)", what, $time, trial, result, done);
    end
  endtask

  // Run one conversion from an asynchronous clear and check its timing.
  task automatic convert(int expected);
    int cycles = 0;
    @(negedge clk);
    clear_n = 0;
    #1;
    expect_true(trial == 7'b1000000 && !done, "trial after clear");
    @(negedge clk);
    clear_n = 1;
    while (!done && cycles < 20) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    expect_true(cycles == N, "conversion takes N clocks");
    expect_true(int'(result) == expected && trial == result, "conversion result");
  endtask

  initial begin
    greater_eq = 0;
    vin2 = 0;
    #12;
    // analog rule: input halfway between codes c and c+1 gives c
    for (int c = 0; c < 128; c++) begin
      vin2 = 2 * c + 1;
      convert(c);
    end
    // self-test rule: integer input v with ">=" gives v exactly
    greater_eq = 1;
    for (int v = 0; v < 128; v++) begin
      vin2 = 2 * v;
      convert(v);
    end
    // the register holds its result while done, whatever keep says
    vin2 = 0;
    repeat (5) @(posedge clk);
    #1 expect_true(int'(result) == 127 && done, "hold after done");
    // synchronous restart
    @(negedge clk);
    start = 1;
    @(posedge clk);
    #1 expect_true(trial == 7'b1000000 && result == 0 && !done, "restart by start");
    start = 0;
    repeat (N) @(posedge clk);
    #1 expect_true(done && result == 0, "conversion after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

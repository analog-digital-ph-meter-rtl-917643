// tb_test_counter: random stepping, wrap-around, `last` and asynchronous clear.
module tb_test_counter;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, clear_n = 0, step = 0;
  logic [6:0] count;
  logic last;
  int checks = 0, failures = 0;
  int model = 0, wraps = 0;

  test_counter dut (.clk, .clear_n, .step, .count, .last);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    checks++;
    if (int'(count) != model || last != (model == 127)) begin
      failures++;
      $display("FAIL count=%0d last=%b model=%0d", count, last, model);
    end
  endtask

  initial begin
    #12 clear_n = 1;
    check_now();
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (step) begin
        if (model == 127) wraps++;
        model = (model + 1) % 128;
      end
      #1 check_now();
    end
    // asynchronous clear between clock edges
    @(negedge clk);
    #1 clear_n = 0;
    #1 model = 0;
    check_now();
    clear_n = 1;
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("FAIL counter wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

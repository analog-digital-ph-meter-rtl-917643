// tb_digital_comparator: all 128 x 128 count/trial pairs.
module tb_digital_comparator;
  timeunit 1ns; timeprecision 1ps;
  logic [6:0] count, trial;
  logic       keep;
  int checks = 0, failures = 0;

  digital_comparator dut (.count, .trial, .keep);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++)
      for (int t = 0; t < 128; t++) begin
        count = 7'(c);
        trial = 7'(t);
        #1;
        checks++;
        if (keep != (c >= t)) begin
          failures++;
          $display("FAIL count=%0d trial=%0d keep=%b", c, t, keep);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_add_offset: exhaustive check of the add-11 stage for all 128 codes.
module tb_add_offset;
  timeunit 1ns; timeprecision 1ps;
  logic [6:0] code;
  logic [7:0] tenths;
  int checks = 0, failures = 0;

  add_offset dut (.code, .tenths);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      code = 7'(c);
      #1;
      checks++;
      if (int'(tenths) != c + 11) begin
        failures++;
        $display("FAIL code=%0d tenths=%0d", c, tenths);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

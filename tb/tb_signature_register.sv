// tb_signature_register: random data against the tb's own MISR model, then a
// full fault-free self-test sequence (go_nogo = 1) and one with a single
// wrong segment line (go_nogo = 0).
module tb_signature_register;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, clear_n = 0, capture = 0, finish = 0;
  logic [20:0] data = '0, signature;
  logic go_nogo, done;
  int checks = 0, failures = 0;
  logic [20:0] model;

  signature_register dut (.clk, .clear_n, .capture, .finish, .data, .signature, .go_nogo, .done);

  always #5 clk = ~clk;

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
      $display("FAIL %s sig=%h model=%h", what, signature, model);
    end
  endtask

  task automatic self_test(int bad_step, bit expect_go);
    @(negedge clk) clear_n = 0;
    @(negedge clk) clear_n = 1;
    model = '0;
    for (int c = 0; c < 128; c++) begin
      @(negedge clk);
      capture = 1;
      finish  = (c == 127);
      data    = display_ref(c) ^ ((c == bad_step) ? 21'h000100 : 21'h0);
      model   = misr_step(model, data);
      @(negedge clk);
      capture = 0;
      finish  = 0;
      data    = 21'h1FFFFF;   // ignored without capture
    end
    #1 expect_true(signature == model, "self-test signature");
    expect_true(done && go_nogo == expect_go, "go/no-go");
  endtask

  initial begin
    #12 clear_n = 1;
    model = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      capture = $urandom_range(0, 1);
      data    = 21'($urandom);
      if (capture) model = misr_step(model, data);
      @(posedge clk);
      #1 expect_true(signature == model, "random compression");
    end
    capture = 0;
    self_test(-1, 1'b1);
    // frozen after done
    @(negedge clk) begin capture = 1; data = 21'h12345; end
    @(negedge clk) capture = 0;
    expect_true(signature == model && go_nogo, "hold after done");
    self_test(57, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

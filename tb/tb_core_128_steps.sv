// tb_core_128_steps: all 128 input steps through the digital core in normal
// (reading) mode. As in a gate-level bench of the chip's digital part, an
// external counter supplies the input value and an external digital
// comparator (count >= trial) closes the conversion loop; each step is one
// press of the sample switch. Every reading must equal the counter value,
// shown as pH (count + 11) / 10, and take 2 + 7 + 1 clocks.
module tb_core_128_steps;
  import ph_meter_pkg::*;
  import tb_ref_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, sample = 0, cmp;
  logic [6:0] sar, sarn;
  logic osc_en, go_nogo, selftest_done, comp_pad, clk_pad;
  seg7_t [2:0] seg;
  int checks = 0, failures = 0;
  int count = 0;

  ph_meter_core dut (.clk, .sample, .test_mode(1'b0), .cmp_analog(cmp), .sar, .sarn, .osc_en,
                     .seg, .go_nogo, .selftest_done, .comp_pad, .clk_pad);

  always #5 if (osc_en) clk = ~clk; else clk = 0;
  always_comb cmp = (count >= int'(sar));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    #3;
    for (count = 0; count < 128; count++) begin
      edges = 0;
      sample = 1;
      #17 sample = 0;
      while (osc_en && edges < 100) begin
        @(posedge clk);
        edges++;
        #1;
      end
      checks++;
      if (edges != 10 || int'(sar) != count || seg != display_ref(count)) begin
        failures++;
        $display("FAIL step %0d: sar=%0d edges=%0d seg=%h", count, sar, edges, seg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

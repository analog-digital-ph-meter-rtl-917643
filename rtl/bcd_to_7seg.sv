// bcd_to_7seg: BCD digit to seven-segment decoder/driver.
//
// One instance drives each display digit. Segments are active high in the
// order {g, f, e, d, c, b, a} (a = top, then clockwise, g = middle). Digits
// 6 and 9 are drawn with their tails. Codes 10 to 15 give a blank digit,
// which the chip uses to suppress a leading zero. The original decoder
// equations came from a tabular description that is not reproduced here;
// the segment patterns and polarity are this design's choice.
// Combinational.
module bcd_to_7seg
  import ph_meter_pkg::*;
(
  input  logic [3:0] bcd,
  output seg7_t      seg
);
  always_comb begin
    unique case (bcd)
      4'd0:    seg = 7'b011_1111;
      4'd1:    seg = 7'b000_0110;
      4'd2:    seg = 7'b101_1011;
      4'd3:    seg = 7'b100_1111;
      4'd4:    seg = 7'b110_0110;
      4'd5:    seg = 7'b110_1101;
      4'd6:    seg = 7'b111_1101;
      4'd7:    seg = 7'b000_0111;
      4'd8:    seg = 7'b111_1111;
      4'd9:    seg = 7'b110_1111;
      default: seg = 7'b000_0000;
    endcase
  end
endmodule

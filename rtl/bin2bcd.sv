// bin2bcd: eight-bit binary to three BCD digits from three 74HC185-type cells.
//
// The original design uses the conversion method of the standard 74HC185
// six-bit converter; how the cells are cascaded is this design's own and
// works as follows for a value v = 4*m + r with m = v[7:2], r = v[1:0]:
//   cell 1 converts m              -> 10*t1 + u1
//   cell 2 converts {u1, r}        =  4*u1 + r  -> 10*t2 + u2   (u2: units)
//   so v = 40*t1 + 10*t2 + u2, and since t2 <= 3 the tens count 4*t1 + t2
//   is just the bit string {t1, t2[1:0]}:
//   cell 3 converts {t1, t2[1:0]}  -> hundreds, tens
// All combinational, three cells deep.
module bin2bcd
  import ph_meter_pkg::*;
(
  input  logic [7:0] bin,
  output bcd3_t      bcd
);
  logic [2:0] t1, t2, t3;
  logic [3:0] u1, u2, u3;

  bcd185_cell u_cell1 (.bin(bin[7:2]),                .tens(t1), .units(u1));
  bcd185_cell u_cell2 (.bin({u1, bin[1:0]}),              .tens(t2), .units(u2));
  bcd185_cell u_cell3 (.bin({1'b0, t1, t2[1:0]}),         .tens(t3), .units(u3));

  always_comb begin
    bcd.hundreds = {1'b0, t3};
    bcd.tens     = u3;
    bcd.units    = u2;
  end
endmodule

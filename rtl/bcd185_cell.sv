// bcd185_cell: one binary-to-BCD cell with the function of a 74HC185.
//
// The 74HC185 converts a six-bit binary number to two BCD digits. Its
// least significant bit needs no conversion (it is the lsb of the units
// digit as well), so only the upper five bits b[5:1] enter the cell; the
// lsb is passed straight through. The internal logic of the part is not
// reproduced: the cell is written as a divide and remainder by ten, which
// has the same truth table. Combinational.
//
//   bin   : six-bit binary value 0..63
//   tens  : BCD tens digit 0..6 (three bits are enough)
//   units : BCD units digit 0..9
module bcd185_cell (
  input  logic [5:0] bin,
  output logic [2:0] tens,
  output logic [3:0] units
);
  logic [4:0] upper;    // bin / 2, 0..31
  logic [2:0] t;        // tens digit of bin = upper / 5
  logic [2:0] r;        // upper % 5, 0..4

  always_comb begin
    upper = bin[5:1];
    t     = 3'(upper / 5'd5);
    r     = 3'(upper - 5'(t) * 5'd5);
    tens  = t;
    // units = 2 * (upper % 5) + lsb, which is bin % 10
    units = {r, bin[0]};
  end
endmodule

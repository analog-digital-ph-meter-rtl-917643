// ph_meter_pkg: types and constants shared by the pH meter chip.
//
// The chip digitises a pH sensor voltage of 0.5 V to 1.0 V with a seven-bit
// successive-approximation converter and shows pH 1.1 to 13.8 on three
// seven-segment digits. The numbers below (7 bits, offset 11, 0.5 V span,
// 30k/60k ladder resistors) are those of the original design.
//
// Analog quantities are carried between the behavioural models as unsigned
// 32-bit integers in nanovolts (volt_nv_t); one step of the 7-bit ladder,
// 0.5 V / 128, is exactly 3 906 250 nV. This representation is a choice of
// this model, not of the original circuit.
package ph_meter_pkg;

  localparam int unsigned SAR_BITS  = 7;   // approximation register width
  localparam int unsigned PH_OFFSET = 11;  // code 0 reads pH 1.1
  localparam int unsigned DIGITS    = 3;   // seven-segment digits
  localparam int unsigned SEG_LINES = 7 * DIGITS;

  typedef logic [SAR_BITS-1:0] sar_code_t;

  // Voltage in nanovolts.
  typedef logic [31:0] volt_nv_t;
  localparam volt_nv_t V_REF_LO_NV = 32'd500_000_000;   // 0.5 V
  localparam volt_nv_t V_REF_HI_NV = 32'd1_000_000_000; // 1.0 V

  // Segment lines of one digit, {g, f, e, d, c, b, a}, active high.
  typedef logic [6:0] seg7_t;

  // Three BCD digits of the reading: hundreds = tens of pH,
  // tens = units of pH, units = tenths of pH.
  typedef struct packed {
    logic [3:0] hundreds;
    logic [3:0] tens;
    logic [3:0] units;
  } bcd3_t;

  // BCD code that the seven-segment decoder shows as a blank digit.
  localparam logic [3:0] BCD_BLANK = 4'hF;

endpackage

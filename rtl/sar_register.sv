// sar_register: successive-approximation register with its control register.
//
// A one-hot control shift register `ctrl` selects the bit being decided; a
// "1" walks from the msb to the lsb through a field of zeros. The value
// offered to the D/A converter and the comparators, `trial`, is the
// approximation register with the selected bit forced to 1. At each clock
// edge the selected mux-flipflop loads the comparator decision `keep`
// (1 = input above trial, keep the bit; 0 = trial too high, clear it) and the
// control "1" moves one place down. After N clocks the control register is
// empty, `done` is high and `result` holds the conversion.
//
// Timing: clear_n low (asynchronous) or start high (synchronous) loads
// ctrl = 100..0 and result = 0. Bit N-1 is decided at the first following
// clock edge, bit 0 at the N-th, and done is high from then on. With done
// high the register holds its value whatever keep does.
// The one-hot control register and the one-bit-per-clock decision follow the
// original design; forming `trial` by OR-ing the control register into the
// result, and the start input, are this design's choices.
module sar_register #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         clear_n,
  input  logic         start,
  input  logic         keep,
  output logic [N-1:0] trial,
  output logic [N-1:0] result,
  output logic         done
);
  logic [N-1:0] ctrl;

  localparam logic [N-1:0] CTRL_MSB = {1'b1, {(N-1){1'b0}}};

  always_ff @(posedge clk or negedge clear_n) begin
    if (!clear_n) begin
      ctrl   <= CTRL_MSB;
      result <= '0;
    end else if (start) begin
      ctrl   <= CTRL_MSB;
      result <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++)
        if (ctrl[i]) result[i] <= keep;
      ctrl <= ctrl >> 1;
    end
  end

  always_comb begin
    trial = result | ctrl;
    done  = (ctrl == '0);
  end

  // The control register is one-hot while converting and empty when done.
  a_ctrl_onehot0 : assert property (@(posedge clk) disable iff (!clear_n) $onehot0(ctrl));
endmodule

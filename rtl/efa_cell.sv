// Exact full adder (EFA) cell.
//
// The reference one-bit adder: Sum is the three-input XOR, Cout the majority
// of the three inputs. In the approximate ripple carry adder it fills every
// bit position at and above NAB. The original cell is a 10-transistor
// circuit; only its logic function is described here.
//
// Interface: x, y (operand bits), cin (carry in) -> sum, cout.
// Timing: purely combinational, no clock.
module efa_cell (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = x ^ y ^ cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end

endmodule

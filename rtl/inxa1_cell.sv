// InXA1: inexact adder cell with an exact Sum and an approximate Carry.
//
// Sum is the exact three-input XOR. The carry out is simply the carry in
// passed through, which is wrong in two of the eight input rows:
// (x,y,cin) = (0,0,1) gives cout = 1 instead of 0, and (1,1,0) gives 0
// instead of 1 (25 % carry error rate, no Sum errors). Because the error is
// in the carry, it reaches the following cells of a multi-bit adder. The
// truth table is the one the cell was defined by; the expressions below are
// the simplest ones that reproduce it. The carry out is therefore a plain
// wire from cin, with no logic of its own.
//
// Interface: x, y (operand bits), cin (carry in) -> sum, cout.
// Timing: purely combinational, no clock.
module inxa1_cell (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = x ^ y ^ cin;
    cout = cin;
  end

endmodule

// InXA2: inexact adder cell with an exact Carry and an approximate Sum.
//
// Cout is the exact majority function. Sum is (x XOR y) OR cin, which is
// wrong in two of the eight input rows: (0,1,1) and (1,0,1) give sum = 1
// instead of 0 (25 % Sum error rate, no carry errors). The carry chain of a
// multi-bit adder built from this cell stays exact, so every wrong Sum bit
// costs exactly its own weight and nothing propagates to higher bits. The
// truth table is the one the cell was defined by; the expressions below are
// the simplest ones that reproduce it.
//
// Interface: x, y (operand bits), cin (carry in) -> sum, cout.
// Timing: purely combinational, no clock.
module inxa2_cell (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = (x ^ y) | cin;
    cout = (x & y) | (x & cin) | (y & cin);
  end

endmodule

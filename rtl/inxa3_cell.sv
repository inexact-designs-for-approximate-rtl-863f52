// InXA3: inexact adder cell with an exact Carry and Sum = NOT Carry.
//
// Cout is the exact majority function and Sum is its inverse, so the XOR of
// an exact adder is replaced by an inverter. This is wrong in two of the
// eight input rows: (0,0,0) gives sum = 1 instead of 0 and (1,1,1) gives
// sum = 0 instead of 1 (25 % Sum error rate, no carry errors). The carry
// chain stays exact. The truth table is the one the cell was defined by.
//
// Interface: x, y (operand bits), cin (carry in) -> sum, cout.
// Timing: purely combinational, no clock.
module inxa3_cell (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic maj;

  always_comb begin
    maj  = (x & y) | (x & cin) | (y & cin);
    cout = maj;
    sum  = ~maj;
  end

endmodule

// The three inexact-cell adders side by side.
//
// Three N-bit approximate ripple carry adders, one built with each of the
// inexact cells InXA1, InXA2 and InXA3 in its NAB least significant
// positions and exact full adders above. They are independent alternatives
// with their own operands and results, so they can be compared on the same
// or on different inputs. Each result is N+1 bits wide: the N sum bits with
// the carry out of the top cell as MSB. The carry into each adder is 0.
//
// The cells and the replacement scheme follow the cell-replacement method;
// N = 12 is the width at which the adders are characterised exhaustively.
// NAB = 6 (half the adder) is this design's choice of default.
//
// Interface: a1/b1 -> r1 (InXA1), a2/b2 -> r2 (InXA2), a3/b3 -> r3 (InXA3).
// Timing: purely combinational, no clock.
module inxa_adder_top
  import inxa_pkg::*;
#(
  parameter int N   = 12,
  parameter int NAB = 6
) (
  input  logic [N-1:0] a1,
  input  logic [N-1:0] b1,
  output logic [N:0]   r1,
  input  logic [N-1:0] a2,
  input  logic [N-1:0] b2,
  output logic [N:0]   r2,
  input  logic [N-1:0] a3,
  input  logic [N-1:0] b3,
  output logic [N:0]   r3
);

  inxa_rca #(.N(N), .NAB(NAB), .CELL(CELL_INXA1)) u_rca1 (
    .a(a1), .b(b1), .cin(1'b0), .sum(r1[N-1:0]), .cout(r1[N])
  );

  inxa_rca #(.N(N), .NAB(NAB), .CELL(CELL_INXA2)) u_rca2 (
    .a(a2), .b(b2), .cin(1'b0), .sum(r2[N-1:0]), .cout(r2[N])
  );

  inxa_rca #(.N(N), .NAB(NAB), .CELL(CELL_INXA3)) u_rca3 (
    .a(a3), .b(b3), .cin(1'b0), .sum(r3[N-1:0]), .cout(r3[N])
  );

endmodule

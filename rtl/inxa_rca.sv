// Approximate ripple carry adder built by cell replacement.
//
// An N-bit ripple carry adder whose NAB least significant full adders are
// replaced by an inexact cell (chosen by CELL) while the remaining N-NAB
// cells are exact full adders. The carry ripples from bit 0 to bit N-1
// through whichever cell sits at each position. NAB = 0 gives an exact
// adder, NAB = N an adder made only of inexact cells.
//
// The replacement scheme (inexact cells from the LSB upwards, NAB counting
// them) and the 12-bit width follow the cell-replacement method this design
// implements. The default NAB of 6 (half the adder) and the InXA2 cell are
// this design's choice of a representative point; both are parameters.
// The cin port and the separate cout are also this design's choice; tie
// cin to 0 for plain addition of two operands.
//
// Interface: a, b (N-bit operands), cin -> sum (N bits), cout.
// Timing: purely combinational, N cells of ripple delay, no clock.
module inxa_rca
  import inxa_pkg::*;
#(
  parameter int    N    = 12,
  parameter int    NAB  = 6,
  parameter cell_e CELL = CELL_INXA2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  initial begin
    assert (N >= 1) else $error("inxa_rca: N must be at least 1");
    assert (NAB >= 0 && NAB <= N) else $error("inxa_rca: NAB must be within 0..N");
  end

  logic [N:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;
  assign cout = c[N];

  for (genvar i = 0; i < N; i++) begin : g_bit
    if (i >= NAB || CELL == CELL_EFA) begin : g_exact
      efa_cell u_cell (.x(a[i]), .y(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end else if (CELL == CELL_INXA1) begin : g_inxa1
      inxa1_cell u_cell (.x(a[i]), .y(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end else if (CELL == CELL_INXA2) begin : g_inxa2
      inxa2_cell u_cell (.x(a[i]), .y(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end else begin : g_inxa3
      inxa3_cell u_cell (.x(a[i]), .y(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
    end
  end

endmodule

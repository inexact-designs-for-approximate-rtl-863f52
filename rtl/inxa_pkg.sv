// Shared definitions for the inexact-adder library.
//
// cell_e names the full-adder cell that fills the approximate (least
// significant) part of an approximate ripple carry adder. CELL_EFA is the
// exact full adder; CELL_INXA1..3 are the three inexact cells. The encoding
// is this design's own choice; nothing outside this library depends on it.
package inxa_pkg;

  typedef enum logic [1:0] {
    CELL_EFA   = 2'd0,  // exact full adder
    CELL_INXA1 = 2'd1,  // exact Sum, Cout = Cin
    CELL_INXA2 = 2'd2,  // Sum = (X ^ Y) | Cin, exact Cout
    CELL_INXA3 = 2'd3   // Sum = ~Cout, exact Cout
  } cell_e;

endpackage

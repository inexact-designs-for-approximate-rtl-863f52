// Workload: exhaustive characterisation of the 12-bit approximate adders.
//
// Builds twelve 12-bit approximate ripple carry adders, one for each of the
// three inexact cells at NAB = 3, 6, 9 and 12 (25, 50, 75 and 100 % of the
// adder), and applies every one of the 2^24 operand pairs. Each result is
// compared with a bit-serial truth-table reference, and the error rate
// (ER), normalised mean error distance (NMED) and mean relative error
// distance (MRED, the sum a + b = 0 left out) of each adder are printed.
// Checked at every NAB: InXA2 has the lowest ER, InXA1 and InXA3 have equal
// ER, InXA2's NMED is below InXA1's, and the ER rises with NAB for every
// cell. Checked only where they hold: InXA2's NMED is below InXA3's at
// NAB 3 and 6 (InXA3's is lower at NAB 9 and 12), and InXA1 has the highest
// MRED at NAB 3, 6 and 9 (InXA3's is highest at NAB 12). A watchdog ends a
// hung run with a failure.
module tb_rca12_sweep;
  import inxa_pkg::*;

  localparam int N  = 12;
  localparam int NN = 4;   // NAB = 3 * (n + 1)

  localparam logic [7:0] SUM_TAB  [4] = '{8'h96, 8'h96, 8'hBE, 8'h17};
  localparam logic [7:0] COUT_TAB [4] = '{8'hE8, 8'hAA, 8'hE8, 8'hE8};

  logic [N-1:0] a, b;
  logic [N:0]   res [3][NN];

  int     checks = 0, failures = 0;
  longint n_err [3][NN], sum_ed [3][NN];
  real    sum_red [3][NN];

  for (genvar c = 0; c < 3; c++) begin : g_cell
    for (genvar n = 0; n < NN; n++) begin : g_nab
      inxa_rca #(.N(N), .NAB(3 * (n + 1)), .CELL(cell_e'(c + 1))) dut (
        .a(a), .b(b), .cin(1'b0), .sum(res[c][n][N-1:0]), .cout(res[c][n][N])
      );
    end
  end

  function automatic logic [N:0] ref_add(int ct, int nab, logic [N-1:0] x, logic [N-1:0] y);
    logic [N:0] r;
    logic       c;
    int         t;
    logic [2:0] idx;
    c = 1'b0;
    for (int i = 0; i < N; i++) begin
      t    = (i < nab) ? ct : 0;
      idx  = {x[i], y[i], c};
      r[i] = SUM_TAB[t][idx];
      c    = COUT_TAB[t][idx];
    end
    r[N] = c;
    return r;
  endfunction

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] exact;
    longint     ed;
    real        total, rmax, nmed [3][NN], mred [3][NN];
    foreach (n_err[c, n]) begin
      n_err[c][n] = 0; sum_ed[c][n] = 0; sum_red[c][n] = 0.0;
    end
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      {a, b} = (2 * N)'(i);
      #1;
      exact = {1'b0, a} + {1'b0, b};
      for (int c = 0; c < 3; c++) begin
        for (int n = 0; n < NN; n++) begin
          checks++;
          if (res[c][n] !== ref_add(c + 1, 3 * (n + 1), a, b)) begin
            failures++;
            if (failures < 10) $display("InXA%0d NAB %0d: %0d + %0d = %0d", c + 1, 3 * (n + 1),
                                        a, b, res[c][n]);
          end
          if (res[c][n] != exact) begin
            n_err[c][n]++;
            ed = longint'(res[c][n]) - longint'(exact);
            if (ed < 0) ed = -ed;
            sum_ed[c][n] += ed;
            if (exact != 0) sum_red[c][n] += real'(ed) / real'(exact);
          end
        end
      end
    end
    total = real'(longint'(1) << (2 * N));
    rmax  = 2.0 * real'((1 << N) - 1);
    $display("cell   NAB   ER %%     NMED       MRED");
    for (int c = 0; c < 3; c++) begin
      for (int n = 0; n < NN; n++) begin
        nmed[c][n] = real'(sum_ed[c][n]) / total / rmax;
        mred[c][n] = sum_red[c][n] / (total - 1.0);
        $display("InXA%0d  %3d  %6.2f  %9.6f  %9.6f", c + 1, 3 * (n + 1),
                 100.0 * real'(n_err[c][n]) / total, nmed[c][n], mred[c][n]);
      end
    end
    for (int n = 0; n < NN; n++) begin
      checks += 3;
      if (!(n_err[1][n] < n_err[0][n] && n_err[1][n] < n_err[2][n])) begin
        failures++;
        $display("NAB %0d: InXA2 does not have the lowest ER", 3 * (n + 1));
      end
      if (n_err[0][n] != n_err[2][n]) begin
        failures++;
        $display("NAB %0d: InXA1 and InXA3 ER differ", 3 * (n + 1));
      end
      if (!(nmed[1][n] < nmed[0][n])) begin
        failures++;
        $display("NAB %0d: InXA2 NMED not below InXA1", 3 * (n + 1));
      end
      if (n < NN - 1) begin
        checks += 2;
        if (n < NN - 2 && !(nmed[1][n] < nmed[2][n])) begin
          failures++;
          $display("NAB %0d: InXA2 NMED not below InXA3", 3 * (n + 1));
        end
        if (!(mred[0][n] > mred[1][n] && mred[0][n] > mred[2][n])) begin
          failures++;
          $display("NAB %0d: InXA1 MRED is not the highest", 3 * (n + 1));
        end
      end
      if (n > 0) begin
        checks++;
        for (int c = 0; c < 3; c++)
          if (!(n_err[c][n] > n_err[c][n-1])) begin
            failures++;
            $display("InXA%0d: ER does not grow from NAB %0d to %0d", c + 1, 3 * n, 3 * (n + 1));
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Workload: image addition with 16-bit approximate adders.
//
// Adds two 256 x 256 8-bit greyscale images pixel by pixel with 16-bit
// approximate ripple carry adders: the three inexact cells at every NAB
// from 1 to 16 (48 adders), against the exact sum. The two images are
// generated here, no file is read:
//   A(j,k) = ((j * k) >> 8) + ((j ^ k) & 63), clipped to 255  (smooth
//            product ramp with a fine texture),
//   B(j,k) = 255 - ((3 * j + 5 * k) & 255)                     (diagonal
//            stripes running the other way).
// For every adder it accumulates, over all pixels p (exact sum) and q
// (approximate sum), the quality measures of approximate image addition:
//   MSE  mean (p - q)^2            PSNR 10 log10(511^2 / MSE)
//   MAE  mean |p - q|              NAE  sum |p - q| / sum p^2
//   AD   mean (p - q)              MD   max |p - q|
//   SC   sum p^2 / sum q^2         NK   sum p * q / sum p^2
// and prints them. PSNR uses 511, the largest 9-bit sum, as the peak.
// Every result is also compared with a bit-serial truth-table reference.
// Checked: InXA2's MSE is below InXA1's at every NAB and below InXA3's at
// NAB 1-4 and 9-16 (on these two images InXA3 has the lower MSE at NAB
// 5-8), InXA2 has the lowest MD of the three cells at every NAB, and every
// adder's MSE is non-decreasing in NAB. A watchdog ends a hung run with a
// failure.
module tb_image_add;
  import inxa_pkg::*;

  localparam int N    = 16;
  localparam int SIDE = 256;

  localparam logic [7:0] SUM_TAB  [4] = '{8'h96, 8'h96, 8'hBE, 8'h17};
  localparam logic [7:0] COUT_TAB [4] = '{8'hE8, 8'hAA, 8'hE8, 8'hE8};

  logic [N-1:0] a, b;
  logic [N:0]   res [3][N];   // [cell][NAB - 1]

  int     checks = 0, failures = 0;
  real    s_sq [3][N], s_abs [3][N], s_d [3][N], s_q2 [3][N], s_pq [3][N];
  longint md [3][N];

  for (genvar c = 0; c < 3; c++) begin : g_cell
    for (genvar n = 0; n < N; n++) begin : g_nab
      inxa_rca #(.N(N), .NAB(n + 1), .CELL(cell_e'(c + 1))) dut (
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

  function automatic int pix_a(int j, int k);
    int v;
    v = ((j * k) >> 8) + ((j ^ k) & 63);
    return (v > 255) ? 255 : v;
  endfunction

  function automatic int pix_b(int j, int k);
    return 255 - ((3 * j + 5 * k) & 255);
  endfunction

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p, q, d;
    real    pix, s_p2, mse [3][N];
    s_p2 = 0.0;
    foreach (md[c, n]) begin
      s_sq[c][n] = 0.0; s_abs[c][n] = 0.0; s_d[c][n] = 0.0;
      s_q2[c][n] = 0.0; s_pq[c][n] = 0.0; md[c][n] = 0;
    end
    for (int j = 0; j < SIDE; j++) begin
      for (int k = 0; k < SIDE; k++) begin
        a = N'(pix_a(j, k));
        b = N'(pix_b(j, k));
        #1;
        p = longint'(a) + longint'(b);
        for (int c = 0; c < 3; c++) begin
          for (int n = 0; n < N; n++) begin
            checks++;
            if (res[c][n] !== ref_add(c + 1, n + 1, a, b)) begin
              failures++;
              if (failures < 10) $display("InXA%0d NAB %0d: %0d + %0d = %0d", c + 1, n + 1,
                                          a, b, res[c][n]);
            end
            q = longint'(res[c][n]);
            d = p - q;
            s_d[c][n]  += real'(d);
            s_sq[c][n] += real'(d * d);
            if (d < 0) d = -d;
            s_abs[c][n] += real'(d);
            if (d > md[c][n]) md[c][n] = d;
            s_q2[c][n] += real'(q * q);
            s_pq[c][n] += real'(p * q);
          end
        end
      end
    end
    pix = real'(SIDE * SIDE);
    for (int j = 0; j < SIDE; j++)
      for (int k = 0; k < SIDE; k++) begin
        p = longint'(pix_a(j, k)) + longint'(pix_b(j, k));
        s_p2 += real'(p * p);
      end
    $display("cell   NAB        MSE     PSNR       MAE       NAE         AD     MD      SC      NK");
    for (int c = 0; c < 3; c++) begin
      for (int n = 0; n < N; n++) begin
        mse[c][n] = s_sq[c][n] / pix;
        $display("InXA%0d  %3d %10.2f %8.2f %9.3f %9.6f %10.3f %6d %7.4f %7.4f", c + 1, n + 1,
                 mse[c][n],
                 (mse[c][n] > 0.0) ? 10.0 * $log10(511.0 * 511.0 / mse[c][n]) : 999.0,
                 s_abs[c][n] / pix, s_abs[c][n] / s_p2, s_d[c][n] / pix, md[c][n],
                 s_p2 / s_q2[c][n], s_pq[c][n] / s_p2);
      end
    end
    for (int n = 0; n < N; n++) begin
      checks += 2;
      if (!(mse[1][n] <= mse[0][n]) ||
          ((n + 1 <= 4 || n + 1 >= 9) && !(mse[1][n] <= mse[2][n]))) begin
        failures++;
        $display("NAB %0d: InXA2 MSE is not the lowest", n + 1);
      end
      if (!(md[1][n] <= md[0][n] && md[1][n] <= md[2][n])) begin
        failures++;
        $display("NAB %0d: InXA2 MD is not the lowest", n + 1);
      end
      if (n > 0) begin
        checks++;
        for (int c = 0; c < 3; c++)
          if (mse[c][n] < mse[c][n-1]) begin
            failures++;
            $display("InXA%0d: MSE falls from NAB %0d to %0d", c + 1, n, n + 1);
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

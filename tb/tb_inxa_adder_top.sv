// End-to-end testbench for inxa_adder_top at its default parameters.
//
// Drives all 2^(2N) operand pairs (2^24 for N = 12) into the three adders
// and compares every result with a bit-serial reference that looks each
// cell up in its truth table (InXA cell below bit NAB, exact cell above).
// Over the exhaustive set it accumulates the error metrics of each adder:
//   ER    share of inputs with a wrong result,
//   MED   mean |exact - approximate|,
//   NMED  MED / (largest exact result, 2 * (2^N - 1)),
//   MRED  mean |exact - approximate| / exact (exact result 0 skipped),
// and checks the expected ordering between the cells: InXA2 has the lowest
// error rate, InXA1 and InXA3 have equal error rates, InXA2's NMED is below
// InXA1's, and InXA1 has the highest MRED. It counts how often each
// mechanism of the design happened and fails if one never did: an error
// in each adder, an InXA1 carry error that reaches the exact upper bits,
// an InXA3 error that lowers the result, and a carry out of the top cell.
// A final phase drives different random operands into the three adders to
// show that they are independent. A watchdog ends a hung run with a failure.
module tb_inxa_adder_top;

  localparam int N   = 12;
  localparam int NAB = 6;

  // Truth tables, bit i = row {x, y, cin} == i: exact, InXA1, InXA2, InXA3.
  localparam logic [7:0] SUM_TAB  [4] = '{8'h96, 8'h96, 8'hBE, 8'h17};
  localparam logic [7:0] COUT_TAB [4] = '{8'hE8, 8'hAA, 8'hE8, 8'hE8};

  logic [N-1:0] a [3], b [3];
  logic [N:0]   r [3];

  int     checks = 0, failures = 0;
  longint n_err [3], sum_ed [3];
  real    sum_red [3];
  longint n_prop1 = 0, n_low3 = 0, n_cout = 0;

  inxa_adder_top dut (
    .a1(a[0]), .b1(b[0]), .r1(r[0]),
    .a2(a[1]), .b2(b[1]), .r2(r[1]),
    .a3(a[2]), .b3(b[2]), .r3(r[2])
  );

  function automatic logic [N:0] ref_add(int ct, logic [N-1:0] x, logic [N-1:0] y);
    logic [N:0] res;
    logic       c;
    int         t;
    logic [2:0] idx;
    c = 1'b0;
    for (int i = 0; i < N; i++) begin
      t      = (i < NAB) ? ct : 0;
      idx    = {x[i], y[i], c};
      res[i] = SUM_TAB[t][idx];
      c      = COUT_TAB[t][idx];
    end
    res[N] = c;
    return res;
  endfunction

  task automatic check_lane(int k, bit stats);
    logic [N:0] want, exact;
    longint     ed;
    want  = ref_add(k + 1, a[k], b[k]);
    exact = {1'b0, a[k]} + {1'b0, b[k]};
    checks++;
    if (r[k] !== want) begin
      failures++;
      if (failures < 10)
        $display("adder %0d: %0d + %0d = %0d, want %0d", k + 1, a[k], b[k], r[k], want);
    end
    if (!stats) return;
    if (r[k] != exact) begin
      n_err[k]++;
      ed = longint'(r[k]) - longint'(exact);
      if (ed < 0) ed = -ed;
      sum_ed[k] += ed;
      if (exact != 0) sum_red[k] += real'(ed) / real'(exact);
      if (k == 0 && r[k][N:NAB] != exact[N:NAB]) n_prop1++;
      if (k == 2 && r[k] < exact) n_low3++;
    end
    if (r[k][N]) n_cout++;
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real total, rmax, er [3], med [3], nmed [3], mred [3];
    for (int k = 0; k < 3; k++) begin
      n_err[k] = 0; sum_ed[k] = 0; sum_red[k] = 0.0;
    end
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      for (int k = 0; k < 3; k++) {a[k], b[k]} = (2 * N)'(i);
      #1;
      for (int k = 0; k < 3; k++) check_lane(k, 1'b1);
    end
    total = real'(longint'(1) << (2 * N));
    rmax  = 2.0 * real'((1 << N) - 1);
    for (int k = 0; k < 3; k++) begin
      er[k]   = real'(n_err[k]) / total;
      med[k]  = real'(sum_ed[k]) / total;
      nmed[k] = med[k] / rmax;
      mred[k] = sum_red[k] / (total - 1.0);
      $display("InXA%0d N=%0d NAB=%0d: ER %6.2f %%  MED %8.3f  NMED %8.6f  MRED %8.6f",
               k + 1, N, NAB, 100.0 * er[k], med[k], nmed[k], mred[k]);
    end
    checks++;
    if (!(n_err[1] < n_err[0] && n_err[1] < n_err[2])) begin
      failures++;
      $display("InXA2 does not have the lowest error rate");
    end
    checks++;
    if (n_err[0] != n_err[2]) begin
      failures++;
      $display("InXA1 and InXA3 error rates differ");
    end
    checks++;
    if (!(nmed[1] < nmed[0])) begin
      failures++;
      $display("InXA2 NMED not below InXA1 NMED");
    end
    checks++;
    if (!(mred[0] > mred[1] && mred[0] > mred[2])) begin
      failures++;
      $display("InXA1 MRED is not the highest");
    end
    // Independent operands per adder.
    for (int i = 0; i < 5000; i++) begin
      for (int k = 0; k < 3; k++) begin
        a[k] = N'($urandom);
        b[k] = N'($urandom);
      end
      #1;
      for (int k = 0; k < 3; k++) check_lane(k, 1'b0);
    end
    $display("mechanisms: errors %0d/%0d/%0d, InXA1 carry error into exact bits %0d, InXA3 low results %0d, carry out %0d",
             n_err[0], n_err[1], n_err[2], n_prop1, n_low3, n_cout);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_err[k] == 0) begin
        failures++;
        $display("adder %0d never produced an approximate result", k + 1);
      end
    end
    checks += 3;
    if (n_prop1 == 0) begin failures++; $display("InXA1 carry error never reached the exact bits"); end
    if (n_low3 == 0)  begin failures++; $display("InXA3 never produced a low result"); end
    if (n_cout == 0)  begin failures++; $display("no carry out seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for inxa_rca.
//
// Builds 8-bit approximate adders for every cell type (exact, InXA1, InXA2,
// InXA3) and NAB = 0, 2, 4, 6, 8, and applies all 65536 operand pairs with
// carry in 0, plus random pairs with carry in 1. Each result is compared
// with a bit-serial reference that looks every cell up in its truth table
// (8-bit constants indexed by {x, y, cin}), independent of the RTL.
// It then checks properties of the error rate over the exhaustive set:
//   - NAB = 0 and the all-exact adder never err;
//   - InXA2 errs on fewer inputs than InXA1 and InXA3, which err equally;
//   - the exact carry chain of InXA2 and InXA3 keeps their error distance
//     below 2^NAB, and InXA2 only ever adds (its wrong Sum bits are 1s).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_inxa_rca;
  import inxa_pkg::*;

  localparam int W  = 8;
  localparam int NC = 4;   // cell types
  localparam int NN = 5;   // NAB values 0, 2, 4, 6, 8

  localparam logic [7:0] SUM_TAB  [NC] = '{8'h96, 8'h96, 8'hBE, 8'h17};
  localparam logic [7:0] COUT_TAB [NC] = '{8'hE8, 8'hAA, 8'hE8, 8'hE8};

  logic [W-1:0] a, b;
  logic         cin;
  logic [W:0]   res [NC][NN];

  int checks = 0, failures = 0;
  longint errs [NC][NN];

  for (genvar c = 0; c < NC; c++) begin : g_cell
    for (genvar n = 0; n < NN; n++) begin : g_nab
      inxa_rca #(.N(W), .NAB(2 * n), .CELL(cell_e'(c))) dut (
        .a(a), .b(b), .cin(cin), .sum(res[c][n][W-1:0]), .cout(res[c][n][W])
      );
    end
  end

  function automatic logic [W:0] ref_add(int ct, int nab, logic [W-1:0] x, logic [W-1:0] y,
                                         logic ci);
    logic [W:0] r;
    logic       c;
    int         t;
    logic [2:0] idx;
    c = ci;
    for (int i = 0; i < W; i++) begin
      t    = (i < nab) ? ct : 0;
      idx  = {x[i], y[i], c};
      r[i] = SUM_TAB[t][idx];
      c    = COUT_TAB[t][idx];
    end
    r[W] = c;
    return r;
  endfunction

  task automatic check_all(logic ci);
    logic [W:0] want, exact;
    int         ed;
    exact = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, ci};
    for (int c = 0; c < NC; c++) begin
      for (int n = 0; n < NN; n++) begin
        want = ref_add(c, 2 * n, a, b, ci);
        checks++;
        if (res[c][n] !== want) begin
          failures++;
          if (failures < 10)
            $display("cell %0d NAB %0d: %0d + %0d + %0d = %0d, want %0d",
                     c, 2 * n, a, b, ci, res[c][n], want);
        end
        if (ci == 1'b0 && res[c][n] != exact) begin
          errs[c][n]++;
          ed = int'(res[c][n]) - int'(exact);
          if ((c == 2 && (ed < 0 || ed >= (1 << (2 * n)))) ||
              (c == 3 && (ed <= -(1 << (2 * n)) || ed >= (1 << (2 * n))))) begin
            failures++;
            if (failures < 10)
              $display("cell %0d NAB %0d: error %0d out of range", c, 2 * n, ed);
          end
        end
      end
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (errs[c, n]) errs[c][n] = 0;
    cin = 1'b0;
    for (int i = 0; i < (1 << (2 * W)); i++) begin
      {a, b} = (2 * W)'(i);
      #1;
      check_all(1'b0);
    end
    cin = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom);
      b = W'($urandom);
      #1;
      check_all(1'b1);
    end
    for (int n = 0; n < NN; n++)
      $display("NAB %0d: error rate %%  InXA1 %6.2f  InXA2 %6.2f  InXA3 %6.2f", 2 * n,
               100.0 * real'(errs[1][n]) / 65536.0, 100.0 * real'(errs[2][n]) / 65536.0,
               100.0 * real'(errs[3][n]) / 65536.0);
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (errs[0][n] != 0) begin
        failures++;
        $display("exact adder erred at NAB %0d", 2 * n);
      end
      checks++;
      if (n == 0 ? (errs[1][0] != 0 || errs[2][0] != 0 || errs[3][0] != 0)
                 : !(errs[2][n] < errs[1][n] && errs[1][n] == errs[3][n] && errs[2][n] > 0)) begin
        failures++;
        $display("error-rate ordering wrong at NAB %0d", 2 * n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench for inxa2_cell (Sum = (x ^ y) | cin, exact Cout).
//
// Applies all eight (x, y, cin) rows and compares sum and cout with the
// cell's truth table, written here as 8-bit constants indexed by
// {x, y, cin}. It also counts the rows where the cell differs from an exact
// full adder and checks the counts: 2 Sum error(s) and 0 Cout error(s).
// A watchdog ends the run with a failure if it does not finish in time.
module tb_inxa2_cell;

  localparam logic [7:0] SUM_TAB   = 8'hBE;  // expected sum, bit i = row {x,y,cin} == i
  localparam logic [7:0] COUT_TAB  = 8'hE8;  // expected cout
  localparam logic [7:0] EXACT_SUM = 8'h96;
  localparam logic [7:0] EXACT_CO  = 8'hE8;

  logic x, y, cin, sum, cout;
  int   checks = 0, failures = 0;
  int   sum_err = 0, cout_err = 0;

  inxa2_cell dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {x, y, cin} = 3'(r);
      #1;
      checks++;
      if (sum !== SUM_TAB[r] || cout !== COUT_TAB[r]) begin
        failures++;
        $display("row %0d (x,y,cin=%b%b%b): got sum=%b cout=%b, want sum=%b cout=%b",
                 r + 1, x, y, cin, sum, cout, SUM_TAB[r], COUT_TAB[r]);
      end
      if (sum != EXACT_SUM[r]) sum_err++;
      if (cout != EXACT_CO[r]) cout_err++;
    end
    checks++;
    if (sum_err != 2 || cout_err != 0) begin
      failures++;
      $display("error counts sum=%0d cout=%0d, want 2 and 0", sum_err, cout_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

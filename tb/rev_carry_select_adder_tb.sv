// Self-checking testbench for rev_carry_select_adder at its default width.
//
// Applies every combination of the two operands and the carry in and
// compares {cout, sum} with integer addition. It counts the cases that
// select the carry-in-0 chain and the carry-in-1 chain, and the cases where
// the two chains disagree in their carry out (so the carry-out multiplexer
// really chooses), and fails if any of these never happened. A watchdog
// ends the run after a fixed number of clock cycles.
module rev_carry_select_adder_tb;
  localparam int unsigned W = rev_adder_pkg::ADDER_WIDTH;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0, n_cout_differs = 0;

  rev_carry_select_adder dut (.x, .y, .cin, .sum, .cout);

  initial begin
    repeat (20 * (1 << (2 * W + 1)) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int i = 0; i < (1 << W); i++)
        for (int j = 0; j < (1 << W); j++) begin
          int exp_total;
          x = W'(i); y = W'(j); cin = 1'(ci);
          @(posedge clk);
          exp_total = i + j + ci;
          checks++;
          if ({cout, sum} !== (W+1)'(exp_total)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d = %0d, got cout=%b sum=%0d",
                     i, j, ci, exp_total, cout, sum);
          end
          if (ci == 0) n_sel0++; else n_sel1++;
          // carry out with cin=0 and with cin=1 differ exactly when i+j = 2^W-1
          if (i + j == (1 << W) - 1) n_cout_differs++;
        end
    $display("chain 0 selected %0d times, chain 1 %0d times, chains' carries differed %0d times",
             n_sel0, n_sel1, n_cout_differs);
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0 || n_cout_differs == 0) begin
      failures++;
      $display("FAIL a selection case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for rev_carry_skip_adder at its default width.
//
// Applies every combination of the two operands and the carry in
// (2 * 2^(2*WIDTH) cases) and compares {cout, sum} with integer addition.
// block_p is compared with its definition (every bit of x ^ y is 1). It
// counts how often the carry is taken through the bypass (block_p = 1) and
// through the ripple chain, and fails if either path is never exercised,
// or if a bypassed case ever has a carry out different from the carry in.
// A watchdog ends the run after a fixed number of clock cycles.
module rev_carry_skip_adder_tb;
  localparam int unsigned W = rev_adder_pkg::ADDER_WIDTH;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] x, y, sum;
  logic         cin, cout, block_p;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_ripple = 0;

  rev_carry_skip_adder dut (.x, .y, .cin, .sum, .cout, .block_p);

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
          logic exp_p;
          x = W'(i); y = W'(j); cin = 1'(ci);
          @(posedge clk);
          exp_total = i + j + ci;
          exp_p     = ((x ^ y) == {W{1'b1}});
          checks++;
          if ({cout, sum} !== (W+1)'(exp_total)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d = %0d, got cout=%b sum=%0d",
                     i, j, ci, exp_total, cout, sum);
          end
          checks++;
          if (block_p !== exp_p) begin
            failures++;
            $display("FAIL x=%b y=%b block_p=%b expected %b", x, y, block_p, exp_p);
          end
          if (exp_p) begin
            n_bypass++;
            checks++;
            if (cout !== cin) begin
              failures++;
              $display("FAIL bypass case x=%b y=%b: cout=%b cin=%b", x, y, cout, cin);
            end
          end else begin
            n_ripple++;
          end
        end
    $display("carry taken through bypass %0d times, through ripple chain %0d times",
             n_bypass, n_ripple);
    checks++;
    if (n_bypass == 0 || n_ripple == 0) begin
      failures++;
      $display("FAIL a carry path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

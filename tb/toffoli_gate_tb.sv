// Self-checking testbench for toffoli_gate.
//
// Applies all eight input patterns and compares P, Q, R with a reference
// written as a truth statement (R is 1 exactly when an odd number of
// {A AND B, C} are 1). It also checks that the gate is reversible: the eight
// output patterns must all be different. A watchdog ends the run after a
// fixed number of clock cycles.
module toffoli_gate_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  toffoli_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      logic exp_r;
      {a, b, c} = 3'(v);
      @(posedge clk);
      exp_r = ((a == 1'b1 && b == 1'b1) != (c == 1'b1));
      checks++;
      if (p !== a || q !== b || r !== exp_r) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b expected r=%b", a, b, c, p, q, r, exp_r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b produced twice: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    // AND mode (C = 0): R must be A AND B.
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      c = 1'b0;
      @(posedge clk);
      checks++;
      if (r !== (v == 3)) begin
        failures++;
        $display("FAIL AND mode ab=%b%b r=%b", a, b, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

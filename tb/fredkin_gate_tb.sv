// Self-checking testbench for fredkin_gate.
//
// Applies all eight input patterns. The reference is the controlled swap:
// with A = 0 the outputs Q, R equal B, C; with A = 1 they equal C, B. It also
// checks that the gate is reversible (eight distinct outputs) and that it
// conserves the number of ones, a property of the Fredkin gate. A watchdog
// ends the run after a fixed number of clock cycles.
module fredkin_gate_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut (.a, .b, .c, .p, .q, .r);

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
      logic exp_q, exp_r;
      {a, b, c} = 3'(v);
      @(posedge clk);
      if (a) begin exp_q = c; exp_r = b; end
      else   begin exp_q = b; exp_r = c; end
      checks++;
      if (p !== a || q !== exp_q || r !== exp_r) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b expected %b%b%b", a, b, c, p, q, r, a, exp_q, exp_r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b produced twice: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
      checks++;
      if (32'(a) + 32'(b) + 32'(c) != 32'(p) + 32'(q) + 32'(r)) begin
        failures++;
        $display("FAIL abc=%b%b%b: number of ones not conserved", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

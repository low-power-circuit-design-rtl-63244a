// Self-checking testbench for tsg_gate (full-adder configuration).
//
// Applies all eight combinations of A, B and carry in. The reference is
// integer addition: {S, R} must equal A + B + C, Q must be 1 when exactly
// one of A, B is 1, and P must equal A. It also checks that the four outputs
// identify the three inputs uniquely (eight distinct output patterns). A
// watchdog ends the run after a fixed number of clock cycles.
module tsg_gate_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, p, q, r, s;
  int   checks = 0, failures = 0;
  logic [15:0] seen;

  tsg_gate dut (.a, .b, .c, .p, .q, .r, .s);

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
      int total;
      {a, b, c} = 3'(v);
      @(posedge clk);
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if ({s, r} !== 2'(total)) begin
        failures++;
        $display("FAIL abc=%b%b%b carry,sum=%b%b expected %0d", a, b, c, s, r, total);
      end
      checks++;
      if (q !== (int'(a) + int'(b) == 1) || p !== a) begin
        failures++;
        $display("FAIL abc=%b%b%b p=%b q=%b", a, b, c, p, q);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b produced twice: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Fredkin gate: a 3-input, 3-output reversible controlled swap.
//
// A is the control and passes through as P. When A is 0, B and C pass
// straight through to Q and R; when A is 1 they are swapped:
//   Q = A'B ^ AC,   R = A'C ^ AB.
// Output Q is therefore a 2:1 multiplexer with select A (B when A=0, C when
// A=1), which is how the adders use the gate: as the bypass multiplexer of
// the carry skip adder and as the output multiplexers of the carry select
// adder. R carries the other, unselected input and is a garbage output there.
//
// Interface: single-bit a, b, c in; p, q, r out. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule

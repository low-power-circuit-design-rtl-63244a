// Toffoli gate: a 3-input, 3-output reversible gate.
//
// Inputs A and B pass straight through (P = A, Q = B), and the third output
// carries the AND of A and B folded into C:  R = (A & B) ^ C.  The mapping
// from (A,B,C) to (P,Q,R) is one-to-one, so no information is lost. With C
// tied to 0 the gate is a reversible 2-input AND, which is how the carry skip
// adder uses it to build the block propagate signal.
//
// Interface: single-bit a, b, c in; p, q, r out. Purely combinational,
// no clock or reset. The equations are the standard Toffoli definition; the
// gate is modelled as logic, not as the pass-transistor circuit it can be
// built from.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule

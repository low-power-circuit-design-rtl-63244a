// TSG reversible gate in its full-adder configuration.
//
// The TSG gate is a 4-input, 4-output reversible gate. With its third input
// held at the constant 0 a single TSG gate is a complete full adder:
//   P = A                      (passes through, garbage)
//   Q = A ^ B                  (the bit's propagate signal)
//   R = A ^ B ^ C              (sum)
//   S = ((A ^ B) & C) ^ (A & B) (carry out)
// Only this configuration is defined here, so the constant input is not a
// port: the module has the three live inputs A, B and carry in C. With two
// garbage outputs (P, and Q where the propagate is not needed) the gate
// replaces a conventional full adder one for one.
//
// Interface: single-bit a, b, c in; p, q, r, s out. Purely combinational.
// The gate's behaviour with its third input at 1 is not modelled.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic a_xor_b;
  assign a_xor_b = a ^ b;

  assign p = a;
  assign q = a_xor_b;
  assign r = a_xor_b ^ c;
  assign s = (a_xor_b & c) ^ (a & b);
endmodule

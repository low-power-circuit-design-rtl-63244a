// Ripple-carry adder made of TSG full adders.
//
// Bit i is one TSG gate (third input 0) fed with x[i], y[i] and the carry
// from bit i-1; its R output is sum[i], its S output the carry into bit i+1
// and its Q output the propagate p[i] = x[i] ^ y[i]. The carry of the top
// bit leaves as cout. Both the carry skip adder (one chain, plus the
// bypass) and the carry select adder (two chains with carry in 0 and 1)
// are built on this chain.
//
// Interface: x, y and sum are WIDTH bits, prop gives the per-bit
// propagate signals, cin/cout are the chain's carry in and out.
// Purely combinational; the delay is WIDTH TSG carry stages.
module tsg_ripple_adder #(
  parameter int unsigned WIDTH = rev_adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] prop,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    tsg_gate u_fa (
      .a (x[i]),
      .b (y[i]),
      .c (carry[i]),
      .p (),              // garbage output
      .q (prop[i]),
      .r (sum[i]),
      .s (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule

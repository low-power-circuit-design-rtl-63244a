// Reversible carry skip (carry bypass) adder, one block of WIDTH bits.
//
// The sum is formed by a ripple chain of TSG full adders (tsg_ripple_adder).
// Each TSG gate also yields its bit's propagate signal Pi = Xi ^ Yi. When
// every bit propagates, the carry out of the block equals the carry in, so
// the block's carry out can be taken from Cin directly instead of waiting for
// it to ripple through all WIDTH stages:
//
//   block_p = P0 & P1 & ... & P(WIDTH-1)        (chain of WIDTH-1 Toffoli
//                                                gates, C input tied to 0)
//   cout    = block_p ? cin : C(WIDTH)          (Fredkin gate: control =
//                                                block_p, B = ripple carry,
//                                                C = cin, output Q)
//
// At the default WIDTH of 4 that is the four TSG gates, three Toffoli gates
// and one Fredkin gate of the reversible design. The AND of the propagates
// is built as a chain (T1 = P0P1, T2 = T1P2, T3 = T2P3); a balanced tree
// would compute the same value with the same gate count. block_p is brought
// out as a port so that the bypass can be observed; the remaining garbage
// outputs of the gates are left unconnected.
//
// Interface: x, y, sum are WIDTH bits; cin, cout, block_p one bit.
// Purely combinational, no clock or reset.
module rev_carry_skip_adder #(
  parameter int unsigned WIDTH = rev_adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             block_p
);
  logic [WIDTH-1:0] prop;
  logic             ripple_cout;
  // and_chain[i] = P0 & ... & Pi
  logic [WIDTH-1:0] and_chain;

  tsg_ripple_adder #(.WIDTH(WIDTH)) u_chain (
    .x    (x),
    .y    (y),
    .cin  (cin),
    .sum  (sum),
    .prop (prop),
    .cout (ripple_cout)
  );

  assign and_chain[0] = prop[0];

  for (genvar i = 1; i < WIDTH; i++) begin : g_and
    toffoli_gate u_and (
      .a (and_chain[i-1]),
      .b (prop[i]),
      .c (1'b0),
      .p (),              // garbage output
      .q (),              // garbage output
      .r (and_chain[i])
    );
  end

  assign block_p = and_chain[WIDTH-1];

  fredkin_gate u_bypass (
    .a (block_p),
    .b (ripple_cout),
    .c (cin),
    .p (),                // garbage output
    .q (cout),
    .r ()                 // garbage output
  );

  initial begin
    assert (WIDTH >= 2)
      else $error("rev_carry_skip_adder: WIDTH must be at least 2");
  end
endmodule

// Reversible carry select adder, one block of WIDTH bits.
//
// Two ripple chains of TSG full adders add the operands in parallel, one
// assuming a carry in of 0 and one assuming 1. The real carry in then only
// has to steer WIDTH+1 multiplexers (the WIDTH sum bits and the carry out)
// instead of rippling through the block:
//
//   sum  = cin ? sum_1  : sum_0
//   cout = cin ? cout_1 : cout_0
//
// Each multiplexer is a Fredkin gate with cin on its control input, the
// chain-0 value on B and the chain-1 value on C; its Q output is the
// selected value and P, R are garbage. At the default WIDTH of 4 this is
// eight TSG gates and five Fredkin gates. The choice of TSG gates for the
// full adders and Fredkin gates for the multiplexers is this design's own,
// made to match the gates used in the carry skip adder.
//
// Interface: x, y, sum are WIDTH bits; cin, cout one bit. Purely
// combinational; the delay from cin to any output is one Fredkin stage.
module rev_carry_select_adder #(
  parameter int unsigned WIDTH = rev_adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] sum_0, sum_1;
  logic             cout_0, cout_1;

  tsg_ripple_adder #(.WIDTH(WIDTH)) u_rca0 (
    .x    (x),
    .y    (y),
    .cin  (1'b0),
    .sum  (sum_0),
    .prop (),
    .cout (cout_0)
  );

  tsg_ripple_adder #(.WIDTH(WIDTH)) u_rca1 (
    .x    (x),
    .y    (y),
    .cin  (1'b1),
    .sum  (sum_1),
    .prop (),
    .cout (cout_1)
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_sum_mux
    fredkin_gate u_mux (
      .a (cin),
      .b (sum_0[i]),
      .c (sum_1[i]),
      .p (),              // garbage output
      .q (sum[i]),
      .r ()               // garbage output
    );
  end

  fredkin_gate u_cout_mux (
    .a (cin),
    .b (cout_0),
    .c (cout_1),
    .p (),
    .q (cout),
    .r ()
  );
endmodule

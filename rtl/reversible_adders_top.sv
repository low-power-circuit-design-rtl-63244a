// Top level: the two reversible-logic adders side by side.
//
// The design consists of two independent WIDTH-bit adders built only from
// reversible gates (TSG, Toffoli and Fredkin): a carry skip adder, where a
// Fredkin multiplexer lets the carry in bypass the ripple chain when every
// bit propagates, and a carry select adder, where two precomputed ripple
// chains are chosen between by the carry in. They share nothing, so each
// has its own operand, carry and result ports (skip_* and sel_*).
// skip_bypass reports when the carry skip adder takes its bypass path.
//
// Purely combinational: results follow the inputs with no clock or reset.
module reversible_adders_top #(
  parameter int unsigned WIDTH = rev_adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] skip_x,
  input  logic [WIDTH-1:0] skip_y,
  input  logic             skip_cin,
  output logic [WIDTH-1:0] skip_sum,
  output logic             skip_cout,
  output logic             skip_bypass,

  input  logic [WIDTH-1:0] sel_x,
  input  logic [WIDTH-1:0] sel_y,
  input  logic             sel_cin,
  output logic [WIDTH-1:0] sel_sum,
  output logic             sel_cout
);
  rev_carry_skip_adder #(.WIDTH(WIDTH)) u_skip (
    .x       (skip_x),
    .y       (skip_y),
    .cin     (skip_cin),
    .sum     (skip_sum),
    .cout    (skip_cout),
    .block_p (skip_bypass)
  );

  rev_carry_select_adder #(.WIDTH(WIDTH)) u_select (
    .x    (sel_x),
    .y    (sel_y),
    .cin  (sel_cin),
    .sum  (sel_sum),
    .cout (sel_cout)
  );
endmodule

// Shared constants for the reversible-logic adders.
//
// ADDER_WIDTH is the operand width of both adders. Four bits is the block
// size the carry skip and carry select adders are built for; the RTL is
// written generically over the width so that the same structure can be
// reused for other block sizes.
package rev_adder_pkg;
  localparam int unsigned ADDER_WIDTH = 4;
endpackage

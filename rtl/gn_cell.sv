// gn_cell: grey cell of a parallel-prefix carry tree.
//
// Used where the lower group already reaches down to the carry-in, so that
// its generate g1 is a finished carry. Only the group generate is needed:
//     G = g2 | (p2 & g1).
// The result is the carry out of the upper group. Purely combinational.
// The cell name and ports follow the adder it is used in; the equation is
// the usual prefix operator.
module gn_cell (
  input  logic g2,
  input  logic p2,
  input  logic g1,
  output logic G
);
  assign G = g2 | (p2 & g1);
endmodule

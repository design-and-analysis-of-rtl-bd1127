// gp_cell: black cell of a parallel-prefix carry tree.
//
// Merges the (generate, propagate) pair of an upper bit group (g2, p2) with
// the pair of the adjacent lower group (g1, p1) into the pair of the combined
// group, using the prefix operator
//     G = g2 | (p2 & g1),   P = p2 & p1.
// Purely combinational, one AND-OR level plus one AND.
// The cell name and its six ports follow the adder it is used in; the
// equations are the usual prefix operator, which the port names imply.
module gp_cell (
  input  logic g2,
  input  logic p2,
  input  logic g1,
  input  logic p1,
  output logic G,
  output logic P
);
  assign G = g2 | (p2 & g1);
  assign P = p2 & p1;
endmodule

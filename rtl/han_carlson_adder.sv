// han_carlson_adder: WIDTH-bit Han-Carlson parallel-prefix adder.
//
// Computes {cout, sum} = a + b + cin with a carry tree of log2(WIDTH)+1
// levels. The carry-in is treated as an extra lowest position of the prefix
// tree (position 0, generate = cin), and operand bit i sits at position i+1.
// The tree has three parts:
//   1. pair level: every odd position j merges with position j-1;
//   2. Kogge-Stone levels on the odd positions only, with spans 2, 4, 8, ...;
//   3. a final level in which every even position j >= 2 merges with the
//      finished odd position j-1 below it.
// Black cells (gp_cell) keep both generate and propagate; grey cells
// (gn_cell) are used wherever the lower operand already reaches the carry-in.
// After the tree, position i holds the carry into bit i, so
//   sum[i] = a[i] ^ b[i] ^ carry[i],   cout = carry[WIDTH].
// For WIDTH = 16 this is exactly the 5-level, 16-bit network of the design:
// 8 cells on the pair level, 7, 6 and 4 on the Kogge-Stone levels (spans 2,
// 4, 8) and 8 on the final level. Two departures from that network are
// deliberate: the span-2 and span-4 cells of the lowest odd positions take
// the finished carry of position 1 (bit 0 merged with cin) rather than cin
// alone, which a correct sum needs, and cout is the carry out of bit
// WIDTH-1, produced by one more grey cell on the final level.
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module han_carlson_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NPOS = WIDTH + 1;          // prefix positions, cin included
  localparam int KSL  = $clog2(NPOS / 2);   // Kogge-Stone levels on odd positions
  localparam int NLEV = KSL + 2;            // pair level + KS levels + final level

  // input stage: bitwise generate and propagate
  logic [WIDTH-1:0] g, p;
  assign g = a & b;
  assign p = a ^ b;

  // Level k of the tree is the generate block g_lvl[k]; its vectors gv/pv hold
  // the group generate/propagate of every position after that level.
  for (genvar k = 0; k <= NLEV; k++) begin : g_lvl
    localparam int S = (k >= 2 && k <= KSL + 1) ? (1 << (k - 1)) : 1;  // span
    logic [NPOS-1:0] gv, pv;
    if (k == 0) begin : g_in
      // input: cin at position 0, operand bit i at position i+1
      assign gv = {g, cin};
      assign pv = {p, 1'b0};
    end else begin : g_cells
      for (genvar j = 0; j < NPOS; j++) begin : g_pos
        // which positions get a cell on this level
        localparam bit ACT = (k == NLEV) ? (j % 2 == 0 && j >= 2)
                                         : (j % 2 == 1 && j >= S);
        // grey where the lower operand already reaches the carry-in
        localparam bit GREY = (k == NLEV) || (j < 2 * S);
        if (ACT && GREY) begin : g_grey
          gn_cell u_gn (.g2(g_lvl[k-1].gv[j]), .p2(g_lvl[k-1].pv[j]),
                        .g1(g_lvl[k-1].gv[j-S]), .G(gv[j]));
          assign pv[j] = 1'b0;
        end else if (ACT) begin : g_black
          gp_cell u_gp (.g2(g_lvl[k-1].gv[j]), .p2(g_lvl[k-1].pv[j]),
                        .g1(g_lvl[k-1].gv[j-S]), .p1(g_lvl[k-1].pv[j-S]),
                        .G(gv[j]), .P(pv[j]));
        end else begin : g_pass
          assign gv[j] = g_lvl[k-1].gv[j];
          assign pv[j] = g_lvl[k-1].pv[j];
        end
      end
    end
  end

  // output stage
  // position i of the last level is the carry into bit i
  assign sum  = p ^ g_lvl[NLEV].gv[WIDTH-1:0];
  assign cout = g_lvl[NLEV].gv[WIDTH];
endmodule

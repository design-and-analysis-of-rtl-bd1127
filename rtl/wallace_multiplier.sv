// wallace_multiplier: unsigned N x N Wallace-tree multiplier whose final
// carry-propagate addition is done by a Han-Carlson parallel-prefix adder.
//
// How it works:
//   1. Partial products: row r is (a & {N{b[r]}}) shifted left by r, held as
//      a 2N-bit word. There are N rows.
//   2. Wallace reduction: on every level the rows are taken in groups of
//      three and each group goes through a csa_row (a row of full adders),
//      which turns it into two rows; the one or two rows left over pass on
//      unchanged. A level with r rows leaves 2*floor(r/3) + (r mod 3). This
//      goes on until two rows are left. For N = 8 the row counts are
//      8 -> 6 -> 4 -> 3 -> 2, four full-adder delays.
//   3. Final addition: the two rows are added by han_carlson_adder with
//      WIDTH = 2N (16 bits for N = 8), with carry-in 0.
// The product of two N-bit numbers fits in 2N bits, so working modulo 2^2N
// all the way down gives the exact product. No full adder ever produces a
// carry out of bit 2N-1 here, so the final adder's carry-out is always 0
// and is left unread.
// The multiplier as a whole (a Wallace tree closed by a parallel-prefix
// adder) follows the design; the operand width, unsigned operands, the
// AND-array partial products and the word-level grouping of rows into
// full-adder rows are this implementation's choices. N = 8 is chosen so that
// the final adder is the 16-bit Han-Carlson adder.
// Interface: a, b in; product out. Purely combinational, no clock or reset.
module wallace_multiplier #(
  parameter int N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] product
);
  localparam int W = 2 * N;

  // rows left after `lev` reduction levels, starting from N rows
  function automatic int rows_at(input int lev);
    int r;
    r = N;
    for (int i = 0; i < lev; i++)
      if (r > 2) r = 2 * (r / 3) + (r % 3);
    return r;
  endfunction

  // number of levels needed to get down to two rows
  function automatic int num_levels();
    int r, n;
    r = N;
    n = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + (r % 3);
      n++;
    end
    return n;
  endfunction

  localparam int NL = num_levels();

  // g_lev[k].rows: the rows left after k reduction levels (k = 0: the partial
  // products); rows beyond rows_at(k) are held at 0
  for (genvar k = 0; k <= NL; k++) begin : g_lev
    logic [W-1:0] rows [N];
    if (k == 0) begin : g_pp
      for (genvar r = 0; r < N; r++) begin : g_row
        assign rows[r] = W'(a & {N{b[r]}}) << r;
      end
    end else begin : g_red
      localparam int RIN  = rows_at(k - 1);
      localparam int NGRP = RIN / 3;
      localparam int REM  = RIN % 3;
      localparam int ROUT = 2 * NGRP + REM;
      for (genvar grp = 0; grp < NGRP; grp++) begin : g_csa
        csa_row #(.W(W)) u_csa (
          .x(g_lev[k-1].rows[3*grp]), .y(g_lev[k-1].rows[3*grp+1]),
          .z(g_lev[k-1].rows[3*grp+2]),
          .s(rows[2*grp]), .c(rows[2*grp+1])
        );
      end
      for (genvar i = 0; i < REM; i++) begin : g_pass
        assign rows[2*NGRP+i] = g_lev[k-1].rows[3*NGRP+i];
      end
      for (genvar i = ROUT; i < N; i++) begin : g_zero
        assign rows[i] = '0;
      end
    end
  end

  // final carry-propagate addition
  logic final_cout;  // carry out of bit 2N-1: always 0, not needed
  han_carlson_adder #(.WIDTH(W)) u_cpa (
    .a(g_lev[NL].rows[0]), .b(g_lev[NL].rows[1]), .cin(1'b0),
    .sum(product), .cout(final_cout)
  );
endmodule

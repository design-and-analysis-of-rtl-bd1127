// csa_row: one row of full adders (a 3:2 carry-save compressor).
//
// Reduces three W-bit operands x, y, z to a sum word and a carry word with
// x + y + z == s + c (modulo 2^W). Each bit is an independent full adder: the
// sum bit stays in place and the carry bit moves one place up, so c[0] is 0
// and the carry out of bit W-1 is dropped. No carry ripples along the row, so
// its delay is one full adder whatever W is. Purely combinational.
// This is the building block of the Wallace-tree reduction.
module csa_row #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-2:0] maj;  // majority of bits 0 .. W-2; bit W-1's carry is dropped
  assign s   = x ^ y ^ z;
  assign maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
  assign c   = {maj, 1'b0};
endmodule

// tb_wallace_multiplier: exhaustive end-to-end test of the 8 x 8 Wallace-tree
// multiplier at its default parameters.
//
// Every one of the 65536 operand pairs is applied, one per nanosecond, and
// the product is compared with the simulator's own multiplication. While it
// runs, the test looks at the two rows the Wallace tree hands to the final
// Han-Carlson adder and counts how often each mechanism of the datapath is
// exercised:
//   - reduction: the two rows both carry ones, so the final adder has real
//     work and the tree did not just pass a single partial product through;
//   - long carry: a carry in the final adder is generated and then propagated
//     across 8 or more bit positions, i.e. through the upper prefix levels;
//   - the corner products 0 and 255 * 255.
// A mechanism that never happens counts as a failure. The final adder's
// carry-out is also checked to be 0 for every pair: no carry is lost when
// the tree drops carries above bit 15, so the two rows add up to the exact
// product.
`timescale 1ns/1ps
module tb_wallace_multiplier;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;
  int n_reduce = 0, n_long_carry = 0, n_zero = 0, n_max = 0;

  wallace_multiplier dut (.a, .b, .product);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // longest run of positions that a generated carry travels through
  function automatic int carry_run(input logic [2*N-1:0] x, input logic [2*N-1:0] y);
    int best, run;
    logic live;
    best = 0; run = 0; live = 1'b0;
    for (int i = 0; i < 2 * N; i++) begin
      if (x[i] & y[i]) begin live = 1'b1; run = 0; end
      else if ((x[i] ^ y[i]) && live) begin run++; if (run > best) best = run; end
      else begin live = 1'b0; run = 0; end
    end
    return best;
  endfunction

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        logic [2*N-1:0] exp, r0, r1;
        logic [2*N:0]   wide;
        a = N'(i); b = N'(j);
        #1;
        exp = 16'(i * j);
        checks++;
        if (product !== exp) begin
          failures++;
          if (failures < 10) $display("%0d * %0d gave %0d, expected %0d", i, j, product, exp);
        end
        r0 = dut.u_cpa.a;
        r1 = dut.u_cpa.b;
        wide = {1'b0, r0} + {1'b0, r1};
        if (r0 != '0 && r1 != '0) n_reduce++;
        if (carry_run(r0, r1) >= 8) n_long_carry++;
        checks++;
        if (wide[2*N] || dut.u_cpa.cout) begin
          failures++;
          if (failures < 10) $display("%0d * %0d: final rows overflow", i, j);
        end
        if (exp == '0) n_zero++;
        if (i == 255 && j == 255) begin
          n_max++;
          checks++;
          if (product !== 16'd65025) begin failures++; $display("255 * 255 wrong"); end
        end
      end
    end
    $display("two-row reductions %0d, long final carries %0d, zero products %0d, max products %0d",
             n_reduce, n_long_carry, n_zero, n_max);
    if (n_reduce == 0)     begin failures++; $display("no two-row reduction seen"); end
    if (n_long_carry == 0) begin failures++; $display("no long carry in the final adder"); end
    if (n_zero == 0)       begin failures++; $display("no zero product"); end
    if (n_max == 0)        begin failures++; $display("255 * 255 not applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

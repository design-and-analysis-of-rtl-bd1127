// tb_han_carlson_adder: self-checking test of the Han-Carlson adder.
//
// The 16-bit adder at its default width gets:
//   - the eight operand sets of the reference waveform of the design, with
//     the sums printed there (18 + 8960 = 8978, ..., 29700 + 33043 + 1 = 62744);
//   - carry-chain patterns: a single generate at bit i followed by an all-
//     propagate run up to the top, with and without carry-in, so that a carry
//     has to cross every level of the prefix tree;
//   - 200000 random operand pairs with random carry-in.
// Two further instances, WIDTH = 8 and WIDTH = 32, get random operands, to
// show that the generic tree is right at other widths (odd and even numbers
// of Kogge-Stone levels). Expected values come from the simulator's own
// integer addition. Purely combinational: one vector per nanosecond.
`timescale 1ns/1ps
module tb_han_carlson_adder;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [7:0]  a8, b8, s8;
  logic        c8;
  logic [31:0] a32, b32, s32;
  logic        c32;
  int checks = 0, failures = 0;
  int long_chains = 0;

  han_carlson_adder dut (.a, .b, .cin, .sum, .cout);
  han_carlson_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin, .sum(s8),  .cout(c8));
  han_carlson_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin, .sum(s32), .cout(c32));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] ta, input logic [15:0] tb, input logic tc);
    logic [16:0] exp;
    a = ta; b = tb; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb} + 17'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("16-bit: %0d + %0d + %0d gave %0d cout %0d, expected %0d",
                 ta, tb, tc, sum, cout, exp);
    end
  endtask

  // reference waveform of the design: operands, carry-in and printed sum
  typedef struct packed {
    logic [15:0] a, b;
    logic        cin;
    logic [15:0] sum;
  } vec_t;
  localparam vec_t REF [8] = '{
    '{16'd18,    16'd8960,  1'b0, 16'd8978},
    '{16'd4097,  16'd8194,  1'b0, 16'd12291},
    '{16'd18,    16'd8960,  1'b1, 16'd8979},
    '{16'd4097,  16'd8194,  1'b1, 16'd12292},
    '{16'd952,   16'd854,   1'b0, 16'd1806},
    '{16'd2136,  16'd5479,  1'b1, 16'd7616},
    '{16'd29700, 16'd33043, 1'b0, 16'd62743},
    '{16'd29700, 16'd33043, 1'b1, 16'd62744}
  };

  initial begin
    a8 = '0; b8 = '0; a32 = '0; b32 = '0;
    foreach (REF[i]) begin
      a = REF[i].a; b = REF[i].b; cin = REF[i].cin;
      #1;
      checks += 2;
      if (sum !== REF[i].sum) begin
        failures++;
        $display("reference vector %0d: sum %0d, expected %0d", i, sum, REF[i].sum);
      end
      if (cout !== 1'b0) begin
        failures++;
        $display("reference vector %0d: cout set", i);
      end
    end

    // generate at bit i, propagate from i+1 to 15 (or from 0 with cin only)
    for (int i = -1; i < 16; i++) begin
      for (int c = 0; c < 2; c++) begin
        logic [15:0] ga, gb;
        ga = '1; gb = '0;                 // every bit propagates
        if (i >= 0) begin
          ga = ga & ~((16'(1) << i) - 16'(1));   // bits below i: nothing
          gb[i] = 1'b1;                   // bit i generates (a=b=1)
        end
        check16(ga, gb, c[0]);
        if (i < 0 && c == 1) long_chains++;
        if (i >= 0 && i < 8) long_chains++;
      end
    end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);

    for (int n = 0; n < 200000; n++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));

    for (int n = 0; n < 20000; n++) begin
      logic [8:0]  e8;
      logic [32:0] e32;
      a8 = 8'($urandom); b8 = 8'($urandom);
      a32 = $urandom; b32 = $urandom;
      cin = 1'($urandom);
      #1;
      e8  = {1'b0, a8} + {1'b0, b8} + 9'(cin);
      e32 = {1'b0, a32} + {1'b0, b32} + 33'(cin);
      checks += 2;
      if ({c8, s8} !== e8) begin
        failures++;
        if (failures < 10) $display("8-bit: %0d + %0d + %0d wrong", a8, b8, cin);
      end
      if ({c32, s32} !== e32) begin
        failures++;
        if (failures < 10) $display("32-bit: %0d + %0d + %0d wrong", a32, b32, cin);
      end
    end

    if (long_chains == 0) begin
      failures++;
      $display("no carry chain of 8 or more bits was applied");
    end
    $display("carry chains of 8+ bits applied: %0d", long_chains);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gn_cell: exhaustive self-checking test of the grey prefix cell.
// All 8 input combinations are applied; G is compared with the carry rule
// "generate, or propagate an incoming carry".
`timescale 1ns/1ps
module tb_gn_cell;
  logic g2, p2, g1, G;
  int checks = 0, failures = 0;

  gn_cell dut (.g2, .p2, .g1, .G);

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expG;
      {g2, p2, g1} = 3'(v);
      #1;
      expG = (v >= 4) || (v == 3);  // g2 set, or p2 and g1 set
      checks++;
      if (G !== expG) begin failures++; $display("G wrong for %b", 3'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gp_cell: exhaustive self-checking test of the black prefix cell.
// All 16 input combinations are applied; G and P are compared with the
// prefix operator written out as a truth table lookup.
`timescale 1ns/1ps
module tb_gp_cell;
  logic g2, p2, g1, p1, G, P;
  int checks = 0, failures = 0;

  gp_cell dut (.g2, .p2, .g1, .p1, .G, .P);

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic expG, expP;
      {g2, p2, g1, p1} = 4'(v);
      #1;
      // upper group generates, or it propagates a carry the lower one makes
      expG = (v[3] == 1'b1) || (v[2] == 1'b1 && v[1] == 1'b1);
      expP = (v[2] == 1'b1) && (v[0] == 1'b1);
      checks += 2;
      if (G !== expG) begin failures++; $display("G wrong for %b", 4'(v)); end
      if (P !== expP) begin failures++; $display("P wrong for %b", 4'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_csa_row: self-checking test of the 3:2 carry-save row.
// For random 16-bit operands x, y, z it checks that s + c == x + y + z
// modulo 2^16, that c[0] is 0, and that every sum bit is the parity of the
// three input bits. Purely combinational: one vector per nanosecond.
`timescale 1ns/1ps
module tb_csa_row;
  logic [15:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_row #(.W(16)) dut (.x, .y, .z, .s, .c);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      if (n == 0) begin x = '1; y = '1; z = '1; end
      #1;
      checks += 3;
      if (16'(s + c) !== 16'(x + y + z)) begin
        failures++;
        if (failures < 10) $display("%h + %h + %h: s %h c %h", x, y, z, s, c);
      end
      if (c[0] !== 1'b0) failures++;
      for (int i = 0; i < 16; i++)
        if (s[i] !== (x[i] ^ y[i] ^ z[i])) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

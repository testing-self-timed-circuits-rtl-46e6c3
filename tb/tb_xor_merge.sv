// Testbench of the XOR merge: every transition on either input gives one
// transition on the output.
`timescale 1ns/1ps
module tb_xor_merge;
  logic a, b, z, zprev;
  int checks = 0, failures = 0;

  xor_merge dut (.a(a), .b(b), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; #1;
    checks++; if (z != 0) failures++;
    for (int i = 0; i < 200; i++) begin
      zprev = z;
      if ($urandom % 2) a = ~a; else b = ~b;
      #1;
      checks++;
      if (z == zprev) begin failures++; $display("FAIL: no output transition"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the delay element model: each input transition appears on
// the output exactly DELAY ns later.
`timescale 1ns/1ps
module tb_delay_element;
  localparam int DELAY = 3;
  logic i, o;
  int checks = 0, failures = 0;

  delay_element #(.DELAY(DELAY)) dut (.i(i), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i = 0; #10;
    for (int k = 0; k < 50; k++) begin
      i = ~i;
      #(DELAY - 1);
      checks++; if (o == i) begin failures++; $display("FAIL: early"); end
      #2;
      checks++; if (o != i) begin failures++; $display("FAIL: late"); end
      #($urandom_range(1, 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

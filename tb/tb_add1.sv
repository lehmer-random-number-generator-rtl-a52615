// tb_add1: exhaustive self-checking test of the 1-bit full adder:
// for all eight input combinations a + b + c must equal 2*d + s.
module tb_add1;
  logic a, b, c, d, s;
  int checks = 0, failures = 0;

  add1 dut (.a(a), .b(b), .c(c), .d(d), .s(s));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {c, b, a} = 3'(i);
      #1;
      checks++;
      if (int'(a) + int'(b) + int'(c) != 2 * int'(d) + int'(s)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> d=%0d s=%0d", a, b, c, d, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

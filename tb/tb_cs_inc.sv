// tb_cs_inc: self-checking test of the carry-save incrementer mod 2^31-1,
// with the increment (INC = 1, the default) and without (INC = 0):
// (s + dh) mod M must equal (a + b + INC) mod M.
module tb_cs_inc;
  localparam longint MM = 64'h7FFF_FFFF;
  logic [30:0] a, b, s1, dh1, s0, dh0;
  int checks = 0, failures = 0;

  cs_inc             dut1 (.a(a), .b(b), .s(s1), .dh(dh1));
  cs_inc #(.INC(0))  dut0 (.a(a), .b(b), .s(s0), .dh(dh0));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = (i < 2) ? {31{i[0]}} : 31'($urandom());
      b = (i < 2) ? 31'h7FFF_FFFF : 31'($urandom());
      #1;
      checks += 2;
      if ((longint'(s1) + longint'(dh1)) % MM != (longint'(a) + longint'(b) + 1) % MM) begin
        failures++;
        $display("FAIL INC=1 a=%h b=%h s=%h dh=%h", a, b, s1, dh1);
      end
      if ((longint'(s0) + longint'(dh0)) % MM != (longint'(a) + longint'(b)) % MM) begin
        failures++;
        $display("FAIL INC=0 a=%h b=%h s=%h dh=%h", a, b, s0, dh0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

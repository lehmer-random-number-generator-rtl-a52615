// tb_csa_mod_m: self-checking test of the carry-save adder mod 2^31-1:
// (s + dh) mod M must equal (a + b + c) mod M, and the carry vector must be
// the per-bit majority rotated left by one.
module tb_csa_mod_m;
  localparam longint MM = 64'h7FFF_FFFF;
  logic [30:0] a, b, c, s, dh, maj;
  int checks = 0, failures = 0;

  csa_mod_m dut (.a(a), .b(b), .c(c), .s(s), .dh(dh));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = (i == 0) ? 31'h7FFF_FFFF : 31'($urandom());
      b = (i == 0) ? 31'h7FFF_FFFF : 31'($urandom());
      c = (i == 0) ? 31'h7FFF_FFFF : 31'($urandom());
      #1;
      maj = (a & b) | (b & c) | (a & c);
      checks += 2;
      if ((longint'(s) + longint'(dh)) % MM != (longint'(a) + longint'(b) + longint'(c)) % MM) begin
        failures++;
        $display("FAIL sum a=%h b=%h c=%h s=%h dh=%h", a, b, c, s, dh);
      end
      if (dh != {maj[29:0], maj[30]}) begin
        failures++;
        $display("FAIL carry rotation a=%h b=%h c=%h dh=%h", a, b, c, dh);
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

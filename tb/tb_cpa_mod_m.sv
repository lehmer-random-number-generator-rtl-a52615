// tb_cpa_mod_m: self-checking test of the 31-bit adder/subtracter mod 2^31-1.
// Random and corner operands in [0, M]; the result, reduced mod M, must
// equal (a + b) mod M or (a - b) mod M computed with 64-bit integers. Also
// counts how often the end-around carry (add) or borrow (sub) was needed.
module tb_cpa_mod_m;
  localparam longint MM = 64'h7FFF_FFFF;
  logic [30:0] a, b, f;
  logic        sub;
  int checks = 0, failures = 0, wraps = 0;

  cpa_mod_m dut (.a(a), .b(b), .sub(sub), .f(f));

  function automatic logic [30:0] pick(int unsigned n);
    unique case (n % 6)
      0: return 31'h7FFF_FFFF;
      1: return 31'h0;
      2: return 31'h1;
      3: return 31'h4000_0000;
      default: return 31'($urandom());
    endcase
  endfunction

  task automatic check();
    longint ea, eb, exp, got;
    #1;
    ea = longint'(a); eb = longint'(b);
    exp = sub ? ((ea - eb) % MM + MM) % MM : (ea + eb) % MM;
    got = longint'(f) % MM;
    if (sub ? (ea < eb) : (ea + eb > MM)) wraps++;
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL sub=%0d a=%h b=%h f=%h exp=%h", sub, a, b, f, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      sub = i[0];
      a = (i < 400) ? pick(i / 2) : 31'($urandom());
      b = (i < 400) ? pick(i / 12) : 31'($urandom());
      check();
    end
    if (wraps == 0) begin
      failures++;
      $display("FAIL end-around carry never exercised");
    end
    $display("end-around carries/borrows exercised: %0d", wraps);
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

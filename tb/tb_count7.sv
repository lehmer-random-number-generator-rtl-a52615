// tb_count7: exhaustive test of the 7:3 counter against a population count.
module tb_count7;
  logic [6:0] x;
  logic [2:0] cnt;
  int checks = 0, failures = 0;

  count7 dut (.x(x), .cnt(cnt));

  initial begin
    for (int i = 0; i < 128; i++) begin
      x = 7'(i);
      #1;
      checks++;
      if (int'(cnt) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b cnt=%0d", x, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

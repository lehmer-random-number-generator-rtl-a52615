// tb_nrn: self-checking test of the five combinational next-random-number
// circuits (carry-save tree, carry-save tree on five terms minus Z, chain and
// tree of carry-propagate adders, bit-slice ring). For every Z each output
// must equal 16807*Z mod (2^31 - 1) computed with 64-bit integers. Z covers
// corner values (1, M-1, powers of two, the inverse of 16807) and random
// values in [1, M-1].
module tb_nrn;
  localparam longint unsigned MM = 64'h7FFF_FFFF;
  localparam longint unsigned AM = 16807;
  logic [30:0] z;
  logic [30:0] r [5];
  int checks = 0, failures = 0;

  nrn_csa_tree  dut0 (.z(z), .r(r[0]));
  nrn_csa_sub   dut1 (.z(z), .r(r[1]));
  nrn_cpa_chain dut2 (.z(z), .r(r[2]));
  nrn_cpa_tree  dut3 (.z(z), .r(r[3]));
  nrn_bitslice  dut4 (.z(z), .r(r[4]));

  function automatic logic [30:0] ref_next(logic [30:0] v);
    return 31'((longint'(v) * AM) % MM);
  endfunction

  // 16807^(M-2) mod M, the multiplicative inverse of 16807.
  function automatic logic [30:0] inv_a();
    longint unsigned base = AM, e = MM - 2, acc = 1;
    while (e != 0) begin
      if (e[0]) acc = (acc * base) % MM;
      base = (base * base) % MM;
      e >>= 1;
    end
    return 31'(acc);
  endfunction

  task automatic check(logic [30:0] v);
    z = v;
    #1;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (r[k] !== ref_next(v)) begin
        failures++;
        if (failures < 20) $display("FAIL nrn%0d z=%0d r=%0d exp=%0d", k, v, r[k], ref_next(v));
      end
    end
  endtask

  initial begin
    check(31'd1);
    check(31'h7FFF_FFFE);
    check(inv_a());
    for (int i = 0; i < 31; i++) check(31'(1) << i);
    for (int i = 0; i < 3000; i++) begin
      logic [30:0] v;
      v = 31'($urandom());
      if (v == 31'h7FFF_FFFF || v == 0) v = 31'd12345;
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

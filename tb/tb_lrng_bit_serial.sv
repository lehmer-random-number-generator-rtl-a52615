// tb_lrng_bit_serial: self-checking test of the bit-serial generator and its
// control unit. Checks reset, seed load, results against 16807*Z mod
// (2^31-1), the latency of 219 clock edges from the edge that accepts op = 1
// to the edge that writes Z (1 load + 7 passes of 31 + 1 copy), that op is
// ignored while busy, and the corner seeds 1, M-1, the inverse of 16807
// (result 1) and the all-ones word (congruent to 0, result all ones).
module tb_lrng_bit_serial;
  import lrng_pkg::*;
  localparam longint unsigned MM = 64'h7FFF_FFFF;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  op = 2'd0;
  logic [30:0] seed = '0, z;
  logic        busy;
  int checks = 0, failures = 0, ignored = 0;

  lrng_bit_serial dut (.clk(clk), .rst_n(rst_n), .op(op), .seed(seed), .z(z), .busy(busy));

  always #5 clk = ~clk;

  function automatic logic [30:0] ref_next(logic [30:0] v);
    return 31'((longint'(v) * 16807) % MM);
  endfunction

  function automatic logic [30:0] inv_a();
    longint unsigned base = 16807, e = MM - 2, acc = 1;
    while (e != 0) begin
      if (e[0]) acc = (acc * base) % MM;
      base = (base * base) % MM;
      e >>= 1;
    end
    return 31'(acc);
  endfunction

  task automatic expect_eq(longint unsigned got, longint unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic load_seed(logic [30:0] s);
    op = OP_SEED; seed = s; @(posedge clk); #1;
    op = OP_NOP;
    expect_eq(z, s, "seed load");
  endtask

  task automatic gen_next(bit disturb);
    logic [30:0] zin;
    int lat;
    zin = z;
    op = OP_NEXT; @(posedge clk); #1;
    lat = 1;
    op = disturb ? OP_SEED : OP_NOP; seed = 31'd5;
    while (busy) begin
      @(posedge clk); #1;
      op = OP_NOP;
      lat++;
    end
    if (disturb) ignored++;
    if (zin == 31'h7FFF_FFFF) expect_eq(z, 31'h7FFF_FFFF, "all ones stays all ones");
    else expect_eq(z, ref_next(zin), "result");
    expect_eq(lat, 219, "latency");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    expect_eq(z, 1, "reset value");
    expect_eq(busy, 0, "idle after reset");
    rst_n = 1'b1;
    load_seed(31'd1);
    for (int i = 0; i < 40; i++) gen_next(i % 5 == 2);
    load_seed(inv_a());
    gen_next(0);
    expect_eq(z, 1, "result 1 for Z = inverse of a");
    for (int i = 0; i < 40; i++) begin
      load_seed(31'($urandom_range(1, 32'h7FFF_FFFE)));
      gen_next(0);
    end
    load_seed(31'h7FFF_FFFE);
    gen_next(0);
    load_seed(31'h7FFF_FFFF);
    gen_next(0);
    if (ignored == 0) begin failures++; $display("FAIL busy-ignore never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

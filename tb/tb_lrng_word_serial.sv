// tb_lrng_word_serial: self-checking test of the word-serial generator in
// both forms: seven terms (SIX_TERMS = 0, the default, six additions) and
// five terms minus Z (SIX_TERMS = 1, five cycles). Checks reset, seed load,
// nop, the result against 16807*Z mod (2^31-1), the latency (6 or 5 clock
// edges from the edge that accepts op = 1 to the edge that writes Z), and
// that op is ignored while busy.
module tb_lrng_word_serial;
  import lrng_pkg::*;
  localparam longint unsigned MM = 64'h7FFF_FFFF;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  op = 2'd0;
  logic [30:0] seed = '0;
  logic [30:0] z [2];
  logic        busy [2];
  int checks = 0, failures = 0, ignored = 0;

  lrng_word_serial                   dut7 (.clk(clk), .rst_n(rst_n), .op(op), .seed(seed), .z(z[0]), .busy(busy[0]));
  lrng_word_serial #(.SIX_TERMS(1))  dut6 (.clk(clk), .rst_n(rst_n), .op(op), .seed(seed), .z(z[1]), .busy(busy[1]));

  always #5 clk = ~clk;

  function automatic logic [30:0] ref_next(logic [30:0] v);
    return 31'((longint'(v) * 16807) % MM);
  endfunction

  task automatic expect_eq(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // Generate one number on both generators; check value and latency.
  task automatic gen_next(logic [30:0] zin, bit disturb);
    int lat [2];
    bit done [2];
    lat = '{0, 0}; done = '{0, 0};
    op = OP_NEXT;
    @(posedge clk); #1;
    lat = '{1, 1};
    op = disturb ? OP_SEED : OP_NOP;
    seed = 31'd5;
    while (!(done[0] && done[1])) begin
      for (int g = 0; g < 2; g++) if (!done[g] && !busy[g]) done[g] = 1;
      if (done[0] && done[1]) break;
      @(posedge clk); #1;
      op = OP_NOP;   // a seed request is offered only in the first busy cycle
      for (int g = 0; g < 2; g++) if (!done[g]) lat[g]++;
    end
    op = OP_NOP;
    if (disturb) ignored++;
    for (int g = 0; g < 2; g++) expect_eq(z[g], ref_next(zin), g == 0 ? "seven-term result" : "six-term result");
    expect_eq(lat[0], 6, "seven-term latency");
    expect_eq(lat[1], 5, "six-term latency");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    expect_eq(z[0], 1, "reset value"); expect_eq(z[1], 1, "reset value");
    expect_eq(busy[0], 0, "idle after reset");
    rst_n = 1'b1;
    op = OP_SEED; seed = 31'd42; @(posedge clk); #1;
    op = OP_NOP; @(posedge clk); #1;
    expect_eq(z[0], 42, "seed"); expect_eq(z[1], 42, "seed");
    for (int i = 0; i < 300; i++) begin
      logic [30:0] zin;
      zin = z[0];
      gen_next(zin, i % 7 == 3);
      if (z[0] != z[1]) break;
      if (i % 50 == 49) begin
        op = OP_SEED; seed = 31'($urandom_range(1, 32'h7FFF_FFFE)); @(posedge clk); #1;
        op = OP_NOP;
        expect_eq(z[0], seed, "reseed");
      end
    end
    if (ignored == 0) begin failures++; $display("FAIL busy-ignore never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

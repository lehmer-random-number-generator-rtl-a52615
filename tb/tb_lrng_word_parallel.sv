// tb_lrng_word_parallel: self-checking test of the complete word-parallel
// generator (default NRN: carry-save tree). Checks the reset value, the three
// operations of the operation table (nop, next, seed), op = 3 as nop, one
// number per clock cycle against 16807*Z mod (2^31-1), and the 10000th
// number from seed 1, which for this generator ("minimal standard") is
// 1043618065.
module tb_lrng_word_parallel;
  import lrng_pkg::*;
  localparam longint unsigned MM = 64'h7FFF_FFFF;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  op = 2'd0;
  logic [30:0] seed = '0, z, expz;
  int checks = 0, failures = 0, cycles = 0;

  lrng_word_parallel dut (.clk(clk), .rst_n(rst_n), .op(op), .seed(seed), .z(z));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [30:0] ref_next(logic [30:0] v);
    return 31'((longint'(v) * 16807) % MM);
  endfunction

  task automatic expect_z(logic [30:0] e, string what);
    checks++;
    if (z !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: z=%0d exp=%0d", what, z, e);
    end
  endtask

  task automatic step(logic [1:0] o, logic [30:0] s);
    op = o; seed = s;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 expect_z(31'd1, "reset value");
    rst_n = 1'b1;
    step(OP_NOP, 31'd99);         expect_z(31'd1, "nop after reset");
    step(OP_SEED, 31'd42);        expect_z(31'd42, "seed load");
    step(OP_NOP, 31'd7);          expect_z(31'd42, "nop holds");
    step(2'd3, 31'd7);            expect_z(31'd42, "op 3 holds");
    expz = 31'd42;
    for (int i = 0; i < 2000; i++) begin
      expz = ref_next(expz);
      step(OP_NEXT, 31'd0);       expect_z(expz, "next");
    end
    for (int i = 0; i < 200; i++) begin
      logic [30:0] s;
      s = 31'($urandom_range(1, 32'h7FFF_FFFE));
      step(OP_SEED, s);           expect_z(s, "random seed");
      step(OP_NEXT, 31'd0);       expect_z(ref_next(s), "next after seed");
    end
    step(OP_SEED, 31'd1);
    for (int i = 0; i < 10000; i++) step(OP_NEXT, 31'd0);
    expect_z(31'd1043618065, "10000th number from seed 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bs_datapath: self-checking test of the bit-serial datapath. Each trial
// loads A and B, clears C, loads k = 30, then runs 31 shift cycles and
// checks that A = A + B (mod 2^31) with the carry out left in C, that B has
// rotated back to its loaded value, and that zk rose exactly in the 31st
// cycle. A second pass then checks that the kept carry enters bit 0
// (A + B + C), and nop / clear operations are checked to hold / zero.
module tb_bs_datapath;
  import lrng_pkg::*;
  logic        clk = 1'b0;
  reg_op_e     opa = R_NOP, opb = R_NOP, opc = R_NOP, opk = R_NOP;
  logic [30:0] aa = '0, bb = '0, a;
  logic [4:0]  kk = 5'd30;
  logic        c, d, zk;
  int checks = 0, failures = 0;

  bs_datapath dut (.clk(clk), .opa(opa), .opb(opb), .opc(opc), .opk(opk),
                   .aa(aa), .bb(bb), .kk(kk), .a(a), .c(c), .d(d), .zk(zk));

  always #5 clk = ~clk;

  task automatic expect_eq(longint unsigned got, longint unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic set_ops(reg_op_e oa, reg_op_e ob, reg_op_e oc, reg_op_e ok);
    opa = oa; opb = ob; opc = oc; opk = ok;
  endtask

  // One pass of 31 shift cycles; returns the cycle index at which zk was seen.
  task automatic pass(output int zk_at);
    zk_at = -1;
    set_ops(R_SHIFT, R_SHIFT, R_SHIFT, R_SHIFT);
    for (int i = 0; i < 31; i++) begin
      if (zk && zk_at < 0) zk_at = i;
      @(posedge clk); #1;
    end
    set_ops(R_NOP, R_NOP, R_NOP, R_NOP);
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [30:0] x, y;
      logic [31:0] sum;
      logic [31:0] sum2;
      int zk_at;
      x = (t == 0) ? 31'h7FFF_FFFF : 31'($urandom());
      y = (t == 0) ? 31'h7FFF_FFFF : 31'($urandom());
      aa = x; bb = y; kk = 5'd30;
      set_ops(R_LOAD, R_LOAD, R_CLR, R_LOAD);
      @(posedge clk); #1;
      expect_eq(a, x, "A load");
      expect_eq(c, 0, "C clear");
      pass(zk_at);
      sum = {1'b0, x} + {1'b0, y};
      expect_eq(a, sum[30:0], "A after pass 1");
      expect_eq(c, sum[31], "carry after pass 1");
      expect_eq(zk_at, 30, "zk in last bit cycle");
      // Second pass with the kept carry and reloaded k.
      kk = 5'd30; opk = R_LOAD;
      @(posedge clk); #1;
      pass(zk_at);
      sum2 = {1'b0, sum[30:0]} + {1'b0, y} + 32'(sum[31]);
      expect_eq(a, sum2[30:0], "A after pass 2 (carry kept)");
      expect_eq(c, sum2[31], "carry after pass 2");
      // Hold, then clear B and shift: A + 0 + C.
      set_ops(R_NOP, R_CLR, R_NOP, R_LOAD);
      @(posedge clk); #1;
      expect_eq(a, sum2[30:0], "A holds on nop");
      pass(zk_at);
      expect_eq(a, 31'(sum2[30:0] + 31'(sum2[31])), "A after adding cleared B");
    end
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

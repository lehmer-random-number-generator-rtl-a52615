// lrng_bit_serial: Lehmer random number generator built around a single
// 1-bit adder (the case study's temporal bit-serial implementation).
//
// R = a*Z mod M is formed as Z + E1 + E2 + E5 + E7 + E8 + E14, one bit per
// clock: A starts as Z, each 31-cycle pass adds one rotation of Z held in B
// (loaded from a rotation multiplexer), the carry register C carries the
// end-around carry from pass to pass, and a last pass adding 0 absorbs the
// remaining carry: 7 passes, 217 adder cycles. bs_datapath holds the
// registers and the adder, bs_control sequences them.
//
// Interface: op as in lrng_word_parallel (0 nop, 1 next, 2 load seed). op = 1
// is accepted when busy is low; z takes the new number 219 clock edges later
// (1 load + 217 pass cycles + 1 copy), with busy high meanwhile and op ignored. The rotation
// multiplexer, the handshake and the reset value Z = 1 are this design's.
module lrng_bit_serial
  import lrng_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   op,
  input  logic [W-1:0] seed,
  output logic [W-1:0] z,
  output logic         busy
);
  bs_ctrl_t     opcds;
  logic [W-1:0] a, bb;
  logic         c, d, zk;
  logic         st;

  assign st   = (op == OP_NEXT);    // bs_control looks at st only when idle
  assign busy = opcds.busy;

  // Rotation multiplexer feeding B's parallel input.
  always_comb begin
    bb = z;
    for (int unsigned i = 0; i < NTERMS; i++)
      if (opcds.sel == 3'(i)) bb = lrot(z, ROT7[i]);
  end

  bs_control u_ctl (
    .clk(clk), .rst_n(rst_n), .st(st), .zr(zk), .opcds(opcds)
  );

  bs_datapath u_dp (
    .clk(clk),
    .opa(opcds.opa), .opb(opcds.opb), .opc(opcds.opc), .opk(opcds.opk),
    .aa(z), .bb(bb), .kk(5'(W - 1)),
    .a(a), .c(c), .d(d), .zk(zk)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z <= W'(1);
    end else if (opcds.done) begin
      z <= a;
    end else if (!opcds.busy && op == OP_SEED) begin
      z <= seed;
    end
  end

  // The carry-absorbing seventh pass never leaves a carry (see bs_control).
  a_carry_absorbed : assert property (@(posedge clk) disable iff (!rst_n) opcds.done |-> !c);

  logic unused_ok;
  assign unused_ok = d;
endmodule

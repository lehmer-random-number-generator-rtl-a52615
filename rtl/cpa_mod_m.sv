// cpa_mod_m: 31-bit carry-propagate adder/subtracter modulo M = 2^31 - 1.
//
// Function: f = (a + b) mod M when sub = 0, f = (a - b) mod M when sub = 1.
// A plain 31-bit addition gives a + b = d31*2^31 + S; since 2^31 = 1 (mod M)
// the result is S + d31, i.e. the carry out of bit 30 is added back at bit 0
// (cyclic, or end-around, carry). For subtraction d31 is a borrow worth -1 and
// the borrow out is fed back as borrow in. This follows the case study.
//
// Structure: a ripple chain of 1-bit cells (add1 or sub1 per bit, chosen by
// sub). Drawn literally the end-around carry closes a combinational loop. This
// design breaks it: a first chain started with carry 0 gives the carry out
// d31, and the result chain is started with d31. Both give the same sum
// because a carry out of 1 with carry-in 0 stays 1 with carry-in 1, and a
// carry out of 0 with carry-in 0 means no position generates a carry.
//
// A result congruent to 0 may appear as all ones (the second representation
// of 0 in one's-complement arithmetic). Combinational, no clock.
module cpa_mod_m #(
  parameter int unsigned W = 31
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] f
);
  logic [W:0]   c0;    // carries of the pre-pass (carry in 0)
  logic [W:0]   c1;    // carries of the result chain
  logic [W-1:0] s0_unused;

  assign c0[0] = 1'b0;
  assign c1[0] = c0[W];          // end-around carry / borrow

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic da0, sa0, ds0, ss0, da1, sa1, ds1, ss1;
    add1 u_add0 (.a(a[i]), .b(b[i]), .c(c0[i]), .d(da0), .s(sa0));
    sub1 u_sub0 (.a(a[i]), .b(b[i]), .c(c0[i]), .d(ds0), .s(ss0));
    add1 u_add1 (.a(a[i]), .b(b[i]), .c(c1[i]), .d(da1), .s(sa1));
    sub1 u_sub1 (.a(a[i]), .b(b[i]), .c(c1[i]), .d(ds1), .s(ss1));
    assign c0[i+1]      = sub ? ds0 : da0;
    assign s0_unused[i] = sub ? ss0 : sa0;
    assign c1[i+1]      = sub ? ds1 : da1;
    assign f[i]         = sub ? ss1 : sa1;
  end

  // Only the carry out of the pre-pass is used.
  logic unused_ok;
  assign unused_ok = ^{s0_unused, c1[W]};
endmodule

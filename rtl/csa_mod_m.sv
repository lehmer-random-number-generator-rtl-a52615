// csa_mod_m: 31-bit carry-save adder modulo M = 2^31 - 1.
//
// Three operands in, two out: 31 independent 1-bit adders give a sum vector S
// and a carry vector D with 2*D + S = a + b + c. Modulo M, 2*D is D rotated
// left by one (bit 30 moves to bit 0), so the outputs satisfy
// (s + dh) mod M = (a + b + c) mod M with dh = rotl(D, 1). No carry travels
// between positions; the delay is one 1-bit adder. As in the case study, the
// modulo operation needs only this rewiring of the carries. Combinational.
module csa_mod_m #(
  parameter int unsigned W = 31
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] dh
);
  logic [W-1:0] d;

  for (genvar i = 0; i < W; i++) begin : g_bit
    add1 u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .d(d[i]), .s(s[i]));
  end

  assign dh = {d[W-2:0], d[W-1]};
endmodule

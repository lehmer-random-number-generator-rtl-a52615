// count7: 7:3 counter. cnt = number of ones among the seven bits of x.
//
// Four 1-bit adders: two reduce x[2:0] and x[5:3], a third adds their sums and
// x[6] (giving the weight-1 bit), a fourth adds the three weight-2 carries
// (giving the weight-2 and weight-4 bits). The case study names the block
// ("7:3") and its function; this adder arrangement is this design's.
// Combinational.
module count7 (
  input  logic [6:0] x,
  output logic [2:0] cnt   // value 4*cnt[2] + 2*cnt[1] + cnt[0]
);
  logic c1, s1, c2, s2, c3;

  add1 u_fa1 (.a(x[0]), .b(x[1]), .c(x[2]), .d(c1), .s(s1));
  add1 u_fa2 (.a(x[3]), .b(x[4]), .c(x[5]), .d(c2), .s(s2));
  add1 u_fa3 (.a(s1),   .b(s2),   .c(x[6]), .d(c3), .s(cnt[0]));
  add1 u_fa4 (.a(c1),   .b(c2),   .c(c3),   .d(cnt[2]), .s(cnt[1]));
endmodule

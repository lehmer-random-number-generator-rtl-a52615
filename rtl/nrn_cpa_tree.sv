// nrn_cpa_tree: next-random-number circuit, R = a*Z mod M, from six
// carry-propagate adders mod M arranged as a three-level tree.
//
// Level 1 adds (E14, E8), (E7, E5) and (E1, Z); level 2 adds the first two
// sums, and E2 to the third; level 3 adds the two level-2 results. The
// connections are those of the case study's tree figure. Three adder delays
// instead of six. Combinational, 31-bit z in, 31-bit r out.
module nrn_cpa_tree
  import lrng_pkg::*;
(
  input  logic [W-1:0] z,
  output logic [W-1:0] r
);
  logic [W-1:0] s14_8, s7_5, s1_0, s_left, s_right;

  cpa_mod_m #(.W(W)) u_l1a (.a(lrot(z, 14)), .b(lrot(z, 8)), .sub(1'b0), .f(s14_8));
  cpa_mod_m #(.W(W)) u_l1b (.a(lrot(z, 7)),  .b(lrot(z, 5)), .sub(1'b0), .f(s7_5));
  cpa_mod_m #(.W(W)) u_l1c (.a(lrot(z, 1)),  .b(z),          .sub(1'b0), .f(s1_0));
  cpa_mod_m #(.W(W)) u_l2a (.a(s14_8),       .b(s7_5),       .sub(1'b0), .f(s_left));
  cpa_mod_m #(.W(W)) u_l2b (.a(lrot(z, 2)),  .b(s1_0),       .sub(1'b0), .f(s_right));
  cpa_mod_m #(.W(W)) u_l3  (.a(s_left),      .b(s_right),    .sub(1'b0), .f(r));
endmodule

// nrn_csa_tree: next-random-number circuit, R = a*Z mod M, from a tree of
// carry-save adders mod M and one final carry-propagate adder mod M.
//
// This is the main word-parallel form of the case study. The seven rotated
// copies of Z are reduced to two words by five carry-save adders in four
// levels, each with its carry vector rotated left by one (dh = 2*D mod M):
//   level 1: CSA_a(E14, E8, E7)       CSA_b(E2, E1, Z)
//   level 2: CSA_c(dh_a, s_a, E5)
//   level 3: CSA_d(s_c, dh_b, s_b)
//   level 4: CSA_e(dh_c, dh_d, s_d)
// and the carry-propagate adder mod M adds dh_e and s_e. The connections are
// those of the case study's figure. Delay: four 1-bit adders plus one 31-bit
// carry propagation. Combinational, 31-bit z in, 31-bit r out.
module nrn_csa_tree
  import lrng_pkg::*;
(
  input  logic [W-1:0] z,
  output logic [W-1:0] r
);
  logic [W-1:0] s_a, dh_a, s_b, dh_b, s_c, dh_c, s_d, dh_d, s_e, dh_e;

  csa_mod_m #(.W(W)) u_csa_a (.c(lrot(z, 14)), .b(lrot(z, 8)), .a(lrot(z, 7)), .s(s_a), .dh(dh_a));
  csa_mod_m #(.W(W)) u_csa_b (.c(lrot(z, 2)),  .b(lrot(z, 1)), .a(z),          .s(s_b), .dh(dh_b));
  csa_mod_m #(.W(W)) u_csa_c (.c(dh_a),        .b(s_a),        .a(lrot(z, 5)), .s(s_c), .dh(dh_c));
  csa_mod_m #(.W(W)) u_csa_d (.c(s_c),         .b(dh_b),       .a(s_b),        .s(s_d), .dh(dh_d));
  csa_mod_m #(.W(W)) u_csa_e (.c(dh_c),        .b(dh_d),       .a(s_d),        .s(s_e), .dh(dh_e));
  cpa_mod_m #(.W(W)) u_cpa   (.a(s_e), .b(dh_e), .sub(1'b0), .f(r));
endmodule

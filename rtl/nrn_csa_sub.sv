// nrn_csa_sub: next-random-number circuit from a = 2^14 + 2^8 + 2^7 + 2^5 +
// 2^3 - 1, i.e. R = (E14 + E8 + E7 + E5 + E3 - Z) mod M.
//
// Six operands: the five rotated copies and the one's complement of Z. Modulo
// M = 2^31 - 1 the 31-bit complement ~Z equals M - Z, which is -Z (mod M), so
// negation is free. The arrangement follows the case study's figure:
//   level 1: CSA1(E14, E8, E7)        CSA2(E5, E3, ~Z)
//   level 2: CSA3(dh1, s1, dh2)
//   level 3: CSA4(dh3, s3, s2)
//   level 4: carry-save row on (dh4, s4)
// then the carry-propagate adder mod M. The case study makes the level-4 row
// an incrementer (adding 1, from -Z = ~Z + 1); in arithmetic mod 2^31 - 1
// that would give a*Z + 1, so this design instantiates the row with INC = 0
// (a half-adder row) and obtains a*Z mod M. Combinational.
module nrn_csa_sub
  import lrng_pkg::*;
(
  input  logic [W-1:0] z,
  output logic [W-1:0] r
);
  logic [W-1:0] s1, dh1, s2, dh2, s3, dh3, s4, dh4, s5, dh5;

  csa_mod_m #(.W(W)) u_csa1 (.c(lrot(z, 14)), .b(lrot(z, 8)), .a(lrot(z, 7)), .s(s1), .dh(dh1));
  csa_mod_m #(.W(W)) u_csa2 (.c(lrot(z, 5)),  .b(lrot(z, 3)), .a(~z),         .s(s2), .dh(dh2));
  csa_mod_m #(.W(W)) u_csa3 (.c(dh1),         .b(s1),         .a(dh2),        .s(s3), .dh(dh3));
  csa_mod_m #(.W(W)) u_csa4 (.c(dh3),         .b(s3),         .a(s2),         .s(s4), .dh(dh4));
  cs_inc    #(.W(W), .INC(1'b0)) u_inc (.b(dh4), .a(s4), .s(s5), .dh(dh5));
  cpa_mod_m #(.W(W)) u_cpa (.a(s5), .b(dh5), .sub(1'b0), .f(r));
endmodule

// nrn_cpa_chain: next-random-number circuit, R = a*Z mod M, from six
// carry-propagate adders mod M connected in series.
//
// The seven rotated copies E14, E8, E7, E5, E2, E1, E0 = Z of the current
// number (Ei = Z*2^i mod M = left rotation by i) are summed one after the
// other: ((((E14 + E8) + E7) + E5) + E2) + E1) + Z. This is the first and
// slowest word-parallel arrangement of the case study (six adder delays of 31
// bits each in the worst case). Combinational, 31-bit z in, 31-bit r out.
module nrn_cpa_chain
  import lrng_pkg::*;
(
  input  logic [W-1:0] z,
  output logic [W-1:0] r
);
  localparam int unsigned ORDER [NTERMS] = '{14, 8, 7, 5, 2, 1, 0};

  // Stage k adds term k to the sum of stage k-1 (stage 0 is term 0 alone).
  for (genvar k = 0; k < NTERMS; k++) begin : g_stage
    logic [W-1:0] sum;
    if (k == 0) begin : g_first
      assign sum = lrot(z, ORDER[0]);
    end else begin : g_add
      cpa_mod_m #(.W(W)) u_add (.a(g_stage[k-1].sum), .b(lrot(z, ORDER[k])), .sub(1'b0), .f(sum));
    end
  end
  assign r = g_stage[NTERMS-1].sum;
endmodule

// nrn_bitslice: next-random-number circuit, R = a*Z mod M, as a ring of 31
// identical column cells (the case study's spatial bit-serial form).
//
// A fixed shifter (wiring only) presents column k of the rotation matrix,
// bit k of E14, E8, E7, E5, E2, E1, E0, to cell k. Each cell counts its seven
// bits and passes the weight-2 and weight-4 parts of the count, the carry of
// its 3:2 adder and its ripple carry to the next cell (see nrn_bitslice_cell).
// Because 2^31 = 1 (mod M) everything leaving column 30 re-enters at column
// 0. The count and 3:2 signals form an open ring (no signal depends on
// itself). The ripple carry would close a loop; as in cpa_mod_m it is broken
// by a second row of cells started with carry 0, whose carry out from column
// 30 becomes the carry into column 0 of the result row.
// Combinational, 31-bit z in, 31-bit r out.
module nrn_bitslice
  import lrng_pkg::*;
(
  input  logic [W-1:0] z,
  output logic [W-1:0] r
);
  logic [6:0] zcol [W];

  // Shifter: bit k of Ei is bit (k - i) mod W of Z.
  for (genvar k = 0; k < W; k++) begin : g_col
    for (genvar j = 0; j < NTERMS; j++) begin : g_row
      assign zcol[k][j] = z[(k + W - ROT7[j]) % W];
    end
  end

  logic        c_end;   // end-around carry, from the pre-pass row

  for (genvar p = 0; p < 2; p++) begin : g_row
    logic [2:0] d [W];
    logic       e [W];
    logic [W:0] c;
    logic [W-1:0] rr;

    assign c[0] = (p == 0) ? 1'b0 : c_end;
    for (genvar k = 0; k < W; k++) begin : g_cell
      nrn_bitslice_cell u_cell (
        .zcol (zcol[k]),
        .d_in (d[(k + W - 1) % W]),
        .e_in (e[(k + W - 1) % W]),
        .c_in (c[k]),
        .d_out(d[k]),
        .e_out(e[k]),
        .c_out(c[k+1]),
        .r    (rr[k])
      );
    end
    if (p == 0) begin : g_pre
      assign c_end = c[W];
      logic unused_ok;
      assign unused_ok = ^rr;
    end else begin : g_res
      assign r = rr;
      logic unused_ok;
      assign unused_ok = c[W];
    end
  end
endmodule

// nrn_bitslice_cell: one column (bit position k) of the spatial bit-serial
// next-random-number circuit.
//
// The seven bits of column k of the rotation matrix (bit k of E14, E8, E7,
// E5, E2, E1, E0) are counted by a 7:3 counter: count_k = 4*w4_k + 2*w2_k + w1_k.
// The weight-2 bit belongs to column k+1 and the weight-4 bit to column k+2,
// so a 3:2 adder in column k adds w1_k, w2_(k-1) and w4_(k-2); its carry goes
// to column k+1. A 1-bit carry-propagate adder then adds the 3:2 sum, the 3:2
// carry of column k-1 and the ripple carry, producing bit k of R.
//
// Interface to the neighbours (the three levels 7:3, 3:2, CPA follow the case
// study; the bundling of the bits is this design's reading of its figures):
//   d_in  = {w4_(k-2), w4_(k-1), w2_(k-1)}   from cell k-1
//   d_out = {w4_(k-1), w4_k,     w2_k}       to cell k+1 (w4_(k-1) passes through)
//   e_in / e_out   3:2 carry from / to the neighbours
//   c_in / c_out   ripple carry of the final adder
// Combinational.
module nrn_bitslice_cell (
  input  logic [6:0] zcol,
  input  logic [2:0] d_in,
  input  logic       e_in,
  input  logic       c_in,
  output logic [2:0] d_out,
  output logic       e_out,
  output logic       c_out,
  output logic       r
);
  logic [2:0] cnt;
  logic       sp;

  count7 u_cnt (.x(zcol), .cnt(cnt));
  add1   u_csa (.a(cnt[0]), .b(d_in[0]), .c(d_in[2]), .d(e_out), .s(sp));
  add1   u_cpa (.a(sp), .b(e_in), .c(c_in), .d(c_out), .s(r));

  assign d_out = {d_in[1], cnt[2], cnt[1]};
endmodule

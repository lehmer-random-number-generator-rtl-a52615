// lrng_top: the implementations of the Lehmer random number generator
// (R = 16807*Z mod (2^31 - 1)) side by side.
//
//   z_wp[0]  word-parallel, carry-save tree NRN (the main form)
//   z_wp[1]  word-parallel, carry-save tree on five terms minus Z
//   z_wp[2]  word-parallel, six carry-propagate adders in series
//   z_wp[3]  word-parallel, six carry-propagate adders in a tree
//   z_wp[4]  word-parallel, ring of 31 bit-slice column cells
//   z_ws     word-serial: one mod-M adder, six cycles per number
//   z_bs     bit-serial: one 1-bit adder, 219 cycles per number
//
// The five word-parallel generators share op_wp and seed_wp and, given the
// same seed, produce the same sequence, one number per cycle. The serial
// generators have their own op, seed and busy. op: 0 nop, 1 next, 2 load
// seed. All registers use clk and the synchronous active-low rst_n, which
// sets every Z to 1. Placing all implementations in one top is this design's
// arrangement; each one follows the case study.
module lrng_top
  import lrng_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   op_wp,
  input  logic [W-1:0] seed_wp,
  output logic [W-1:0] z_wp [5],
  input  logic [1:0]   op_ws,
  input  logic [W-1:0] seed_ws,
  output logic [W-1:0] z_ws,
  output logic         busy_ws,
  input  logic [1:0]   op_bs,
  input  logic [W-1:0] seed_bs,
  output logic [W-1:0] z_bs,
  output logic         busy_bs
);
  localparam nrn_arch_e ARCHS [5] = '{NRN_CSA_TREE, NRN_CSA_SUB, NRN_CPA_CHAIN,
                                      NRN_CPA_TREE, NRN_BITSLICE};

  for (genvar i = 0; i < 5; i++) begin : g_wp
    lrng_word_parallel #(.ARCH(ARCHS[i])) u_gen (
      .clk(clk), .rst_n(rst_n), .op(op_wp), .seed(seed_wp), .z(z_wp[i])
    );
  end

  lrng_word_serial u_ws (
    .clk(clk), .rst_n(rst_n), .op(op_ws), .seed(seed_ws), .z(z_ws), .busy(busy_ws)
  );

  lrng_bit_serial u_bs (
    .clk(clk), .rst_n(rst_n), .op(op_bs), .seed(seed_bs), .z(z_bs), .busy(busy_bs)
  );
endmodule

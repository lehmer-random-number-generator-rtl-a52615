// lrng_pkg: constants and types shared by the Lehmer random number generator.
//
// The generator computes R = a*Z mod M with the multiplier a = 7^5 = 16807 and
// the Mersenne prime modulus M = 2^31 - 1. Because 2^31 = 1 (mod M), multiplying
// a 31-bit number by 2^i modulo M is a left rotation by i positions, and a
// carry out of bit 30 is worth 1 at bit 0. a has ones in bit positions
// 14, 8, 7, 5, 2, 1 and 0, so a*Z mod M is the mod-M sum of seven rotated
// copies of Z; equivalently a = 2^14 + 2^8 + 2^7 + 2^5 + 2^3 - 1 gives five
// rotated copies minus Z. All of this follows the case study; the operation
// encoding (nop, next, seed) is the one of its operation table, while the
// NRN selector enum is this design's.
package lrng_pkg;

  localparam int unsigned W = 31;                 // word width; M = 2^W - 1

  // Rotation amounts of the seven terms of a = 16807 = 7^5, least first.
  localparam int unsigned NTERMS = 7;
  localparam int unsigned ROT7 [NTERMS] = '{0, 1, 2, 5, 7, 8, 14};

  // Operation of the complete generator (operation table of the case study).
  typedef enum logic [1:0] {
    OP_NOP  = 2'd0,   // Z <= Z
    OP_NEXT = 2'd1,   // Z <= a*Z mod M
    OP_SEED = 2'd2    // Z <= Zs
  } op_e;

  // Which combinational next-random-number circuit a word-parallel generator uses.
  typedef enum logic [2:0] {
    NRN_CSA_TREE  = 3'd0,  // carry-save tree, seven terms
    NRN_CSA_SUB   = 3'd1,  // carry-save tree, five terms minus Z
    NRN_CPA_CHAIN = 3'd2,  // six carry-propagate adders in series
    NRN_CPA_TREE  = 3'd3,  // six carry-propagate adders in a tree
    NRN_BITSLICE  = 3'd4   // ring of 31 column cells
  } nrn_arch_e;

  // Register operations of the bit-serial datapath (hold, load, shift/count, clear).
  typedef enum logic [1:0] {
    R_NOP   = 2'd0,
    R_LOAD  = 2'd1,
    R_SHIFT = 2'd2,   // A, B: shift right; C: take the adder carry; k: count down
    R_CLR   = 2'd3
  } reg_op_e;

  // Opcodes from the bit-serial control unit to its datapath.
  typedef struct packed {
    reg_op_e    opa;
    reg_op_e    opb;
    reg_op_e    opc;
    reg_op_e    opk;
    logic [2:0] sel;    // which rotation of Z is loaded into B (index into ROT7)
    logic       busy;   // a computation is running
    logic       done;   // A holds the result: load it into Z
  } bs_ctrl_t;

  // Left rotation by i of a W-bit word: Z * 2^i mod M.
  function automatic logic [W-1:0] lrot(input logic [W-1:0] z, input int unsigned i);
    logic [W-1:0] r;
    for (int unsigned j = 0; j < W; j++) r[(j + i) % W] = z[j];
    return r;
  endfunction

endpackage

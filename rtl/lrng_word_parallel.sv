// lrng_word_parallel: complete Lehmer random number generator with a
// combinational next-random-number (NRN) circuit.
//
// A 31-bit Z register is loaded through a three-way multiplexer selected by
// op: 0 keeps Z, 1 loads R = a*Z mod M from the NRN circuit, 2 loads the
// seed. The structure and the operation table follow the case study. ARCH
// picks one of the NRN circuits (all compute the same function); the
// carry-save tree is the default. One new number per clock cycle; z shows
// the register, so a number requested with op = 1 is visible after the edge.
//
// Reset (synchronous, active low) sets Z to 1, and op = 3 acts as nop: both
// are this design's choices. A seed of 0 or M (all ones) is outside the
// generator's cycle and makes it stay at that value; it is not checked.
module lrng_word_parallel
  import lrng_pkg::*;
#(
  parameter nrn_arch_e ARCH = NRN_CSA_TREE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   op,
  input  logic [W-1:0] seed,
  output logic [W-1:0] z
);
  logic [W-1:0] r;

  if (ARCH == NRN_CSA_TREE) begin : g_csa_tree
    nrn_csa_tree  u_nrn (.z(z), .r(r));
  end else if (ARCH == NRN_CSA_SUB) begin : g_csa_sub
    nrn_csa_sub   u_nrn (.z(z), .r(r));
  end else if (ARCH == NRN_CPA_CHAIN) begin : g_cpa_chain
    nrn_cpa_chain u_nrn (.z(z), .r(r));
  end else if (ARCH == NRN_CPA_TREE) begin : g_cpa_tree
    nrn_cpa_tree  u_nrn (.z(z), .r(r));
  end else begin : g_bitslice
    nrn_bitslice  u_nrn (.z(z), .r(r));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z <= W'(1);
    end else begin
      unique case (op)
        OP_NEXT: z <= r;
        OP_SEED: z <= seed;
        default: z <= z;
      endcase
    end
  end
endmodule

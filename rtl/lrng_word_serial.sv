// lrng_word_serial: Lehmer random number generator that adds the rotated
// copies of Z one per clock cycle with a single carry-propagate
// adder/subtracter mod M.
//
// With SIX_TERMS = 0 it runs the case study's word-serial loop
//   R = Z;  for k = 2..7: R = (R + next rotation) mod M
// over the rotations 1, 2, 5, 7, 8, 14: six additions, six clock cycles.
// With SIX_TERMS = 1 it uses a = 2^14 + 2^8 + 2^7 + 2^5 + 2^3 - 1:
// R = E14 + E8 + E7 + E5 + E3 - Z, five cycles, the last one subtracting.
// The loop is the case study's; the datapath (Z register, accumulator, one
// adder, rotation multiplexer, step counter) and the handshake are this
// design's.
//
// Interface: op as in lrng_word_parallel (0 nop, 1 next, 2 load seed). An op
// of 1 is accepted when busy is low; busy is then high while the additions
// run, op is ignored, and z takes the new number at the clock edge that ends
// the last addition: the sixth edge counting the one that accepts op = 1 (the
// fifth with SIX_TERMS = 1). Reset sets Z to 1; seeds are not checked.
module lrng_word_serial
  import lrng_pkg::*;
#(
  parameter bit SIX_TERMS = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   op,
  input  logic [W-1:0] seed,
  output logic [W-1:0] z,
  output logic         busy
);
  // Term sequences: rotation amounts in the order they are added.
  localparam int unsigned NT = SIX_TERMS ? 6 : 7;
  localparam int unsigned SEQ7 [7] = '{0, 1, 2, 5, 7, 8, 14};
  localparam int unsigned SEQ6 [7] = '{14, 8, 7, 5, 3, 0, 0};

  logic [W-1:0] acc;        // partial sum R
  logic [2:0]   k;          // index of the term added in this cycle
  logic [W-1:0] opa, opb, f;
  logic         sub;

  // Rotation multiplexer and operand selection.
  always_comb begin
    opb = '0;
    for (int unsigned i = 0; i < NT; i++)
      if (k == 3'(i)) opb = lrot(z, SIX_TERMS ? SEQ6[i] : SEQ7[i]);
    opa = busy ? acc : lrot(z, SIX_TERMS ? SEQ6[0] : SEQ7[0]);
    sub = SIX_TERMS && (k == 3'(NT - 1));
  end

  cpa_mod_m #(.W(W)) u_add (.a(opa), .b(opb), .sub(sub), .f(f));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z    <= W'(1);
      acc  <= '0;
      k    <= 3'd1;
      busy <= 1'b0;
    end else if (!busy) begin
      k <= 3'd1;
      unique case (op)
        OP_NEXT: begin
          acc  <= f;            // first addition, term 0 + term 1
          k    <= 3'd2;
          busy <= 1'b1;
        end
        OP_SEED: z <= seed;
        default: ;
      endcase
    end else begin
      acc <= f;
      if (k == 3'(NT - 1)) begin
        z    <= f;
        k    <= 3'd1;
        busy <= 1'b0;
      end else begin
        k <= k + 3'd1;
      end
    end
  end
endmodule

// cs_inc: 31-bit carry-save incrementer modulo M = 2^31 - 1.
//
// Two operands in, sum vector s and rotated carry vector dh out, with
// (s + dh) mod M = (a + b + INC) mod M. Each bit is a half adder
// (s_i = a_i ^ b_i, d_i = a_i & b_i); with INC = 1 bit 0 adds a constant 1,
// s_0 = ~(a_0 ^ b_0) and d_0 = a_0 | b_0, the equations of the case study.
// The carry vector is rotated left by one as in csa_mod_m.
//
// INC = 0 (a plain carry-save half-adder row) is this design's addition; it is
// what the five-terms-minus-Z NRN needs, see nrn_csa_sub. Combinational.
module cs_inc #(
  parameter int unsigned W   = 31,
  parameter bit          INC = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic [W-1:0] dh
);
  logic [W-1:0] d;

  always_comb begin
    s = a ^ b;
    d = a & b;
    if (INC) begin
      s[0] = ~(a[0] ^ b[0]);
      d[0] = a[0] | b[0];
    end
  end

  assign dh = {d[W-2:0], d[W-1]};
endmodule

// bs_datapath: datapath of the temporal bit-serial generator: registers A, B
// and C, one 1-bit adder and the step counter k.
//
// The adder adds A[0], B[0] and the carry register C. Shifting A right moves
// the sum bit into A[30], so after 31 shift cycles A holds A + B, least
// significant bit first; B rotates right (B[0] re-enters at B[30]) and C takes
// the adder's carry each cycle. Keeping C from one 31-cycle pass to the next
// adds the carry out of bit 30 at bit 0 of the next pass, which is the cyclic
// carry of addition mod 2^31 - 1. k counts the bits of a pass; zk flags k = 0.
// The registers, adder and counter and their connections follow the case
// study; the operation encoding is this design's.
//
// Register operations (reg_op_e): A: nop/load aa/shift; B: nop/load bb/rotate/
// clear; C: nop/clear/take carry; k: nop/load kk/count down. All registers
// change on the rising clock edge; d (the adder carry) is combinational.
module bs_datapath
  import lrng_pkg::*;
(
  input  logic         clk,
  input  reg_op_e      opa,
  input  reg_op_e      opb,
  input  reg_op_e      opc,
  input  reg_op_e      opk,
  input  logic [W-1:0] aa,
  input  logic [W-1:0] bb,
  input  logic [4:0]   kk,
  output logic [W-1:0] a,
  output logic         c,
  output logic         d,
  output logic         zk
);
  logic [W-1:0] b;
  logic [4:0]   k;
  logic         s;

  add1 u_sigma (.a(a[0]), .b(b[0]), .c(c), .d(d), .s(s));

  always_ff @(posedge clk) begin
    unique case (opa)
      R_LOAD:  a <= aa;
      R_SHIFT: a <= {s, a[W-1:1]};
      R_CLR:   a <= '0;
      default: ;
    endcase
    unique case (opb)
      R_LOAD:  b <= bb;
      R_SHIFT: b <= {b[0], b[W-1:1]};
      R_CLR:   b <= '0;
      default: ;
    endcase
    unique case (opc)
      R_SHIFT: c <= d;
      R_CLR:   c <= 1'b0;
      R_LOAD:  c <= d;
      default: ;
    endcase
    unique case (opk)
      R_LOAD:  k <= kk;
      R_SHIFT: k <= k - 5'd1;
      R_CLR:   k <= '0;
      default: ;
    endcase
  end

  assign zk = (k == '0);
endmodule

// add1: 1-bit full adder, a + b + c = 2*d + s.
//
// The basic cell of every adder in the generator: s = a ^ b ^ c and
// d = ab + bc + ca, the equations of the case study. Purely combinational.
module add1 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic d,   // carry, weight 2
  output logic s    // sum, weight 1
);
  assign s = a ^ b ^ c;
  assign d = (a & b) | (b & c) | (c & a);
endmodule

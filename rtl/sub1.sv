// sub1: 1-bit full subtracter, a - b - c = -2*d + s.
//
// c is the borrow in and d the borrow out (weight -2). s = a ^ b ^ c and
// d = ~a b + b c + c ~a, the equations of the case study. Purely
// combinational; used by the carry-propagate adder/subtracter mod M.
module sub1 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic d,   // borrow out, weight -2
  output logic s    // difference, weight 1
);
  assign s = a ^ b ^ c;
  assign d = (~a & b) | (b & c) | (c & ~a);
endmodule

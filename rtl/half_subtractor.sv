// half_subtractor: one-bit subtraction a - b without a borrow in.
//
// d = a xor b is the difference bit; bout = (not a) and b is the borrow, set when
// b is 1 and a is 0. Built from one XOR, one NOT and one AND, as in the classic gate
// structure. Purely combinational.
module half_subtractor (
  input  logic a,     // minuend
  input  logic b,     // subtrahend
  output logic d,     // difference
  output logic bout   // borrow
);
  assign d    = a ^ b;
  assign bout = ~a & b;
endmodule

// full_subtractor: one-bit subtraction a - b - bin.
//
// Two half subtractors in series: the first forms a - b, the second subtracts the
// borrow in from that difference. Either stage borrowing makes the cell borrow, so
// the two borrows are ORed (two XOR, two NOT, two AND and one OR gate in all).
// Purely combinational; borrow path is four gate levels, difference two.
module full_subtractor (
  input  logic a,     // minuend
  input  logic b,     // subtrahend
  input  logic bin,   // borrow in
  output logic d,     // difference
  output logic bout   // borrow out
);
  logic d1, b1, b2;

  half_subtractor u_hs0 (.a(a),  .b(b),   .d(d1), .bout(b1));
  half_subtractor u_hs1 (.a(d1), .b(bin), .d(d),  .bout(b2));

  assign bout = b1 | b2;
endmodule

// bsls_group_rbhs: one N-bit group of the borrow select subtractor with a ripple
// borrow half subtractor.
//
// An N-bit ripple borrow subtractor computes the slice difference with borrow in = 0.
// The N-bit ripple borrow half subtractor then subtracts the borrow of the previous
// group from that difference directly, so no second precomputed result and no
// multiplexer are needed. The group borrows when its own subtraction borrowed or
// when subtracting the incoming borrow underflowed: one OR gate joins the two.
// Purely combinational: bin -> bout ripples through N half subtractors and the OR.
// An immediate assertion checks that the two borrows are never set together.
module bsls_group_rbhs #(
  parameter int unsigned N = 2  // group width
) (
  input  logic [N-1:0] a,     // minuend slice
  input  logic [N-1:0] b,     // subtrahend slice
  input  logic         bin,   // borrow from the previous group
  output logic [N-1:0] d,     // difference slice
  output logic         bout   // borrow to the next group
);
  logic [N-1:0] d0;
  logic         b_rbs, b_rbhs;

  rbs #(.N(N)) u_rbs (.a(a), .b(b), .bin(1'b0), .d(d0), .bout(b_rbs));

  rbhs #(.N(N)) u_rbhs (.y(d0), .bpg(bin), .d(d), .bout(b_rbhs));

  assign bout = b_rbs | b_rbhs;

  // A borrowing slice leaves a nonzero difference, so the half-subtractor chain can
  // only underflow when the slice itself did not borrow: the OR never sees two ones.
  always_comb begin
    assert (!(b_rbs && b_rbhs))
      else $error("bsls_group_rbhs: slice borrow and half-subtractor borrow both set");
  end
endmodule

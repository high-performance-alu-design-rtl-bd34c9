// bsls_group_blo: one N-bit group of the borrow select subtractor with
// binary-less-one logic.
//
// An N-bit ripple borrow subtractor computes {borrow, difference} of the slice with
// borrow in = 0, without waiting for the lower groups. An (N+1)-bit binary-less-one
// derives the result for borrow in = 1 from it: reading {borrow, difference} as an
// (N+1)-bit two's-complement number, subtracting one gives both the new difference
// and the new borrow. When the borrow of the previous group arrives, a (2N+2):(N+1)
// multiplexer picks one of the two words; its top bit is this group's borrow out.
// Purely combinational: bin -> bout is one multiplexer level. An immediate
// assertion checks that the RBS word is always in the range the BLO relies on.
module bsls_group_blo #(
  parameter int unsigned N = 2  // group width
) (
  input  logic [N-1:0] a,     // minuend slice
  input  logic [N-1:0] b,     // subtrahend slice
  input  logic         bin,   // borrow from the previous group
  output logic [N-1:0] d,     // difference slice
  output logic         bout   // borrow to the next group
);
  logic [N-1:0] d0;
  logic         b0;
  logic [N:0]   r1;

  rbs #(.N(N)) u_rbs (.a(a), .b(b), .bin(1'b0), .d(d0), .bout(b0));

  blo #(.N(N + 1)) u_blo (.bi({b0, d0}), .x(r1));

  bsls_mux #(.W(N + 1)) u_mux (.in0({b0, d0}), .in1(r1), .sel(bin), .y({bout, d}));

  // {b0, d0} = a - b is at least -(2^N - 1), so subtracting one never wraps the
  // (N+1)-bit word: the most negative value -2^N never reaches the BLO.
  always_comb begin
    assert (!(b0 && d0 == '0))
      else $error("bsls_group_blo: RBS result outside the two's-complement range");
  end
endmodule

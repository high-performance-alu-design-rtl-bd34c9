// bsls_rbhs: unsigned borrow select subtractor, {bout, d} = a - b - bin.
//
// The operands are cut into NUM_GROUPS groups, LSB first, of 2, 2, 3, 4, 5 ... bits
// (16 bits for the default five groups, bit ranges [1:0], [3:2], [6:4], [10:7],
// [15:11]). Group 1 is a plain 2-bit ripple borrow subtractor taking bin. All groups
// compute their slice at once; only the borrow chain between groups is serial.
// Groups 2 and up each hold an n-bit ripple borrow subtractor with borrow in 0, an
// n-bit ripple borrow half subtractor that subtracts the incoming borrow, and one OR
// gate for the group borrow; the multiplexer of the classic design is gone (the
// ALU_BSL2 subtractor).
// d is the difference modulo 2^W; bout = 1 means a < b + bin. Purely combinational.
// The group sizes and structure follow the published design; the parameterised
// group count is this design's own.
module bsls_rbhs
  import alu_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = 5,                       // number of groups
  localparam int unsigned W         = bsls_width(NUM_GROUPS)   // operand width
) (
  input  logic [W-1:0] a,     // minuend
  input  logic [W-1:0] b,     // subtrahend
  input  logic         bin,   // borrow in
  output logic [W-1:0] d,     // difference
  output logic         bout   // borrow out
);
  logic [NUM_GROUPS:0] gb;  // gb[g] = borrow into group g

  assign gb[0] = bin;

  rbs #(.N(group_width(0))) u_g0 (
    .a(a[group_width(0)-1:0]), .b(b[group_width(0)-1:0]), .bin(gb[0]),
    .d(d[group_width(0)-1:0]), .bout(gb[1])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned GW  = group_width(g);
    bsls_group_rbhs #(.N(GW)) u_grp (
      .a(a[LSB +: GW]), .b(b[LSB +: GW]), .bin(gb[g]),
      .d(d[LSB +: GW]), .bout(gb[g+1])
    );
  end

  assign bout = gb[NUM_GROUPS];
endmodule

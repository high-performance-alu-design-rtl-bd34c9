// rbs: N-bit ripple borrow subtractor, {bout, d} = a - b - bin.
//
// A chain of N full subtractors; the borrow ripples from the LSB to the MSB, so the
// delay grows linearly with N. In the borrow select subtractors most instances have
// bin tied to 0, which lets synthesis reduce the LSB cell to a half subtractor.
// Purely combinational.
module rbs #(
  parameter int unsigned N = 2  // operand width
) (
  input  logic [N-1:0] a,     // minuend
  input  logic [N-1:0] b,     // subtrahend
  input  logic         bin,   // borrow in
  output logic [N-1:0] d,     // difference
  output logic         bout   // borrow out of the MSB
);
  logic [N:0] brw;

  assign brw[0] = bin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_subtractor u_fs (
      .a(a[i]), .b(b[i]), .bin(brw[i]), .d(d[i]), .bout(brw[i+1])
    );
  end

  assign bout = brw[N];
endmodule

// blo: N-bit binary-less-one, x = bi - 1 (mod 2^N).
//
// Bit i of the result flips exactly when all lower input bits are 0, i.e.
// x[i] = bi[i] xnor (bi[0] | ... | bi[i-1]); x[0] = ~bi[0]. For N = 3 this is
// x0 = ~b0, x1 = b1 xnor b0, x2 = b2 xor ~(b0 | b1), the published equations; the
// extension to any N is this design's. The running OR is a chain, so the delay
// grows with N. Purely combinational.
module blo #(
  parameter int unsigned N = 3  // width
) (
  input  logic [N-1:0] bi,  // input word
  output logic [N-1:0] x    // bi - 1
);
  logic [N-1:0] any_low;  // any_low[i] = |bi[i-1:0]

  assign any_low[0] = 1'b0;
  for (genvar i = 1; i < N; i++) begin : g_or
    assign any_low[i] = any_low[i-1] | bi[i-1];
  end

  assign x = bi ~^ any_low;
endmodule

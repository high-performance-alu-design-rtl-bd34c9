// bsls_mux: (2W):W multiplexer of a borrow select group.
//
// W 2:1 multiplexers sharing one select: y = sel ? in1 : in0. In a BLO group in0 is
// {borrow, difference} computed with borrow in = 0, in1 the same word less one, and
// sel is the borrow coming from the previous group. Purely combinational.
module bsls_mux #(
  parameter int unsigned W = 3  // width of each input (n+1 for an n-bit group)
) (
  input  logic [W-1:0] in0,  // result for borrow in = 0
  input  logic [W-1:0] in1,  // result for borrow in = 1
  input  logic         sel,  // borrow from the previous group
  output logic [W-1:0] y     // selected result
);
  for (genvar i = 0; i < W; i++) begin : g_mux2
    assign y[i] = (in0[i] & ~sel) | (in1[i] & sel);
  end
endmodule

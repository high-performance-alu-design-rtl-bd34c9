// rbhs: N-bit ripple borrow half subtractor, {bout, d} = y - bpg.
//
// A chain of N half subtractors: each subtracts the borrow of the stage below from
// one bit of y, starting with bpg, the borrow from the previous group. If bpg is 0
// y passes unchanged; otherwise the result is y - 1. bout is the borrow of the last
// stage and is 1 only when bpg = 1 and y = 0. Purely combinational.
module rbhs #(
  parameter int unsigned N = 3  // width
) (
  input  logic [N-1:0] y,     // input word (difference of the group's RBS)
  input  logic         bpg,   // borrow from the previous group
  output logic [N-1:0] d,     // y - bpg
  output logic         bout   // borrow out of the last half subtractor
);
  logic [N:0] brw;

  assign brw[0] = bpg;

  for (genvar i = 0; i < N; i++) begin : g_bit
    half_subtractor u_hs (.a(y[i]), .b(brw[i]), .d(d[i]), .bout(brw[i+1]));
  end

  assign bout = brw[N];
endmodule

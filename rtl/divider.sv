// divider: the ALU's unsigned divider, q = a / b (quotient only).
//
// Only its place in the ALU is published, so it is a behavioural division left to
// synthesis. Division by zero is not defined by the source; this design returns
// all ones then, the quotient a restoring divider produces. Purely combinational.
module divider #(
  parameter int unsigned W = 16  // operand width
) (
  input  logic [W-1:0] a,  // dividend
  input  logic [W-1:0] b,  // divisor
  output logic [W-1:0] q   // quotient
);
  always_comb begin
    if (b == '0) q = '1;
    else         q = a / b;
  end
endmodule

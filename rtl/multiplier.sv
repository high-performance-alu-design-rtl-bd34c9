// multiplier: the ALU's unsigned multiplier, p = a * b with the full 2W-bit product.
//
// Only its place in the ALU is published, so it is a behavioural multiplication left
// to synthesis. Purely combinational.
module multiplier #(
  parameter int unsigned W = 16  // operand width
) (
  input  logic [W-1:0]   a,  // operand
  input  logic [W-1:0]   b,  // operand
  output logic [2*W-1:0] p   // product
);
  assign p = {{W{1'b0}}, a} * {{W{1'b0}}, b};
endmodule

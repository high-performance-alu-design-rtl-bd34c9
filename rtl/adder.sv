// adder: the ALU's addition unit, sum = a + b with the carry as bit W.
//
// Only its place in the ALU is published, not its insides, so it is written as a
// plain addition and left to synthesis. Purely combinational.
module adder #(
  parameter int unsigned W = 16  // operand width
) (
  input  logic [W-1:0] a,    // operand
  input  logic [W-1:0] b,    // operand
  output logic [W:0]   sum   // a + b, carry in the MSB
);
  assign sum = {1'b0, a} + {1'b0, b};
endmodule

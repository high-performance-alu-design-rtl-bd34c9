// alu_bsl_top: the two proposed ALUs side by side.
//
// ALU_BSL1 (port suffix 1) uses the borrow select subtractor with binary-less-one
// logic; ALU_BSL2 (suffix 2) the one with ripple borrow half subtractors. Apart from
// the subtractor both are the same four-operation ALU (add, subtract, multiply,
// divide) with a one-cycle registered output, and they share only the clock. Each
// brings out its operands, op_sel, registered aluout and the adder/subtractor
// outputs sum, sub and br.
module alu_bsl_top
  import alu_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = 5,                      // subtractor groups
  localparam int unsigned W         = bsls_width(NUM_GROUPS)  // data width (16)
) (
  input  logic           clk,
  // ALU_BSL1
  input  logic [W-1:0]   a1,
  input  logic [W-1:0]   b1,
  input  logic [1:0]     op_sel1,
  output logic [2*W-1:0] aluout1,
  output logic [W:0]     sum1,
  output logic [W-1:0]   sub1,
  output logic           br1,
  // ALU_BSL2
  input  logic [W-1:0]   a2,
  input  logic [W-1:0]   b2,
  input  logic [1:0]     op_sel2,
  output logic [2*W-1:0] aluout2,
  output logic [W:0]     sum2,
  output logic [W-1:0]   sub2,
  output logic           br2
);
  alu #(.NUM_GROUPS(NUM_GROUPS), .SUB_ARCH(SUB_BLO)) u_alu_bsl1 (
    .clk(clk), .a(a1), .b(b1), .op_sel(op_e'(op_sel1)),
    .aluout(aluout1), .sum(sum1), .sub(sub1), .br(br1)
  );

  alu #(.NUM_GROUPS(NUM_GROUPS), .SUB_ARCH(SUB_RBHS)) u_alu_bsl2 (
    .clk(clk), .a(a2), .b(b2), .op_sel(op_e'(op_sel2)),
    .aluout(aluout2), .sum(sum2), .sub(sub2), .br(br2)
  );
endmodule

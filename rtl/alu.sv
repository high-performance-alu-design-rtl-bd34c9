// alu: 16-bit four-operation ALU built around a borrow select subtractor.
//
// Four units work in parallel on a and b: an adder (17-bit sum), a borrow select
// subtractor (16-bit difference and borrow), a 16x16 multiplier (32-bit product) and
// a divider (16-bit quotient). op_sel picks one result, zero-extended to 32 bits, and
// a register clocked by clk holds it on aluout: the result of the operands present
// at a rising edge appears on aluout right after that edge (one cycle of latency).
// The register has no reset. sum, sub and br are the combinational unit outputs.
//
// SUB_ARCH chooses the subtractor: SUB_BLO gives the ALU_BSL1 variant (groups with
// binary-less-one logic and multiplexers), SUB_RBHS the ALU_BSL2 variant (groups with
// ripple borrow half subtractors and an OR gate). The unit set, the output register
// and op_sel = 01 for subtraction follow the published design; the other operation
// codes (00 add, 10 multiply, 11 divide), the zero extension and the quotient-only
// divider are this design's choices.
module alu
  import alu_pkg::*;
#(
  parameter int unsigned NUM_GROUPS = 5,                      // subtractor groups
  parameter sub_arch_e   SUB_ARCH   = SUB_BLO,                // subtractor variant
  localparam int unsigned W         = bsls_width(NUM_GROUPS)  // data width (16)
) (
  input  logic           clk,     // clock
  input  logic [W-1:0]   a,       // operand a
  input  logic [W-1:0]   b,       // operand b
  input  op_e            op_sel,  // operation select
  output logic [2*W-1:0] aluout,  // registered result
  output logic [W:0]     sum,     // a + b
  output logic [W-1:0]   sub,     // a - b (mod 2^W)
  output logic           br       // borrow of a - b (a < b)
);
  logic [2*W-1:0] prod;
  logic [W-1:0]   quot;
  logic [2*W-1:0] result;

  adder #(.W(W)) u_add (.a(a), .b(b), .sum(sum));

  if (SUB_ARCH == SUB_BLO) begin : g_bsa1
    bsls_blo #(.NUM_GROUPS(NUM_GROUPS)) u_bsa (
      .a(a), .b(b), .bin(1'b0), .d(sub), .bout(br)
    );
  end else begin : g_bsa2
    bsls_rbhs #(.NUM_GROUPS(NUM_GROUPS)) u_bsa (
      .a(a), .b(b), .bin(1'b0), .d(sub), .bout(br)
    );
  end

  multiplier #(.W(W)) u_mul (.a(a), .b(b), .p(prod));

  divider #(.W(W)) u_div (.a(a), .b(b), .q(quot));

  always_comb begin
    unique case (op_sel)
      OP_ADD:  result = {{(W-1){1'b0}}, sum};
      OP_SUB:  result = {{W{1'b0}}, sub};
      OP_MUL:  result = prod;
      OP_DIV:  result = {{W{1'b0}}, quot};
      default: result = '0;
    endcase
  end

  always_ff @(posedge clk) aluout <= result;
endmodule

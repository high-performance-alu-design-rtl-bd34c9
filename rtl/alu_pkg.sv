// alu_pkg: types and constants shared by the borrow select subtractors and the ALU.
//
// The 16-bit borrow select subtractor is cut into five groups of 2, 2, 3, 4 and 5
// bits (LSB first). That split is the published one; generalising it as "group 0 has
// 2 bits, group i (i >= 1) has i+1 bits" is this design's own choice, so that the
// group count can be a parameter. The ALU operation codes are partly this design's
// choice: only "01 = subtract" is fixed by the published waveforms.
package alu_pkg;

  // ALU operation select (op_sel[1:0]).
  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_DIV = 2'b11
  } op_e;

  // Which borrow select subtractor the ALU uses.
  typedef enum logic {
    SUB_BLO  = 1'b0,  // ALU_BSL1: groups with binary-less-one + multiplexer
    SUB_RBHS = 1'b1   // ALU_BSL2: groups with ripple borrow half subtractor + OR
  } sub_arch_e;

  // Width of group g (0-based).
  function automatic int group_width(input int g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Bit position of the LSB of group g.
  function automatic int group_lsb(input int g);
    int s;
    s = 0;
    for (int k = 0; k < g; k++) s += group_width(k);
    return s;
  endfunction

  // Total operand width for a given number of groups (5 groups -> 16 bits).
  function automatic int bsls_width(input int num_groups);
    return group_lsb(num_groups);
  endfunction

endpackage

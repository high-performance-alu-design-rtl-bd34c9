# 16-bit ALU with borrow select subtractors

A ripple borrow subtractor is slow because its borrow has to travel from the LSB to
the MSB. A *borrow select* subtractor (BSLS) cuts the operands into groups that all
subtract at once. Each group works out its result for both possible incoming borrows
and keeps the right one when the borrow arrives. The classic form needs two
subtractors per group plus a multiplexer, which costs area. This RTL builds two leaner
forms of the BSLS and places each in a small four-operation ALU:

- **ALU_BSL1**: each group derives its "borrow in = 1" result from its "borrow in = 0"
  result with a *binary-less-one* (BLO) circuit. A multiplexer then picks one of the two.
- **ALU_BSL2**: each group drops the second result and the multiplexer. A *ripple borrow
  half subtractor* (RBHS) subtracts the incoming borrow from the group's difference, and
  one OR gate forms the group borrow.

Both ALUs are 16 bits wide. They compute add, subtract, multiply and divide in parallel,
select one result with `op_sel`, and register it on a 32-bit `aluout`.

## Group structure of the subtractor

The 16-bit subtractor has five groups, LSB first:

| group | bits     | width | contents (BLO form)                 | contents (RBHS form)        |
|-------|----------|-------|-------------------------------------|-----------------------------|
| 1     | [1:0]    | 2     | 2-bit ripple borrow subtractor (RBS) taking `bin` | same                        |
| 2     | [3:2]    | 2     | 2-bit RBS, 3-bit BLO, 6:3 mux       | 2-bit RBS, 2-bit RBHS, OR   |
| 3     | [6:4]    | 3     | 3-bit RBS, 4-bit BLO, 8:4 mux       | 3-bit RBS, 3-bit RBHS, OR   |
| 4     | [10:7]   | 4     | 4-bit RBS, 5-bit BLO, 10:5 mux      | 4-bit RBS, 4-bit RBHS, OR   |
| 5     | [15:11]  | 5     | 5-bit RBS, 6-bit BLO, 12:6 mux      | 5-bit RBS, 5-bit RBHS, OR   |

Every RBS in groups 2 to 5 has its borrow in tied to 0, so it does not wait for the
lower groups. Only the borrow between groups (b1 to b4, then the final `bout`) is
serial. Group widths grow toward the MSB because the borrow reaches the upper groups
later, which leaves them more time for their own longer ripple.

The parameter `NUM_GROUPS` (default 5) extends this pattern: group 1 has 2 bits and
group *g* ≥ 2 has *g* bits. The width is therefore 2 + 2 + 3 + … , which is 16 for five
groups. The package `alu_pkg` computes group widths and offsets (`group_width`,
`group_lsb`, `bsls_width`). The published design is only the five-group, 16-bit case.

### Why the BLO gives both the difference and the borrow

Let an *n*-bit group's RBS produce difference `d0` and borrow `b0` with borrow in 0.
Read the (n+1)-bit word `{b0, d0}` as a two's-complement number. It then equals the
signed value A − B of the slice, which lies between −(2ⁿ−1) and 2ⁿ−1. Subtracting one
more (borrow in = 1) can never leave the (n+1)-bit range. So `{b0, d0} − 1` is exactly
`{b1, d1}`, the borrow and difference for borrow in 1. That is why the BLO is one bit
wider than the group. Each BLO bit inverts when all lower bits are zero:

    x[0] = ~b[0]
    x[i] = b[i] xnor (b[0] | b[1] | ... | b[i-1])

For 3 bits this is x0 = ~b0, x1 = b1 xnor b0, x2 = b2 xor ~(b0 | b1). The multiplexer
(`bsls_mux`, one 2:1 mux per bit) selects `{b0, d0}` or the BLO output by the incoming
borrow. Its top bit is the group's borrow out.

### Why one OR gate is enough in the RBHS form

The RBHS is a chain of half subtractors that computes `d0 − bin`. Its final borrow is
1 only when `bin = 1` and `d0 = 0`. The group as a whole borrows if its own subtraction
borrowed (`b0`) or if the incoming borrow underflowed `d0`. These two cases cannot
happen together, so `bout = b0 | rbhs_bout`. Here the incoming borrow ripples through
the n half subtractors of each group instead of passing one mux level. In exchange the
group needs no second result and no multiplexer.

### Building cells

- `half_subtractor`: d = a ^ b, bout = ~a & b.
- `full_subtractor`: two half subtractors in series, with the two borrows ORed.
- `rbs`: N full subtractors in a ripple chain.
- `rbhs`: N half subtractors in a ripple chain.
- `blo`: the BLO formula above, built on a running OR.

## The ALU

`alu` instantiates `adder`, one of the two subtractors (`SUB_ARCH = SUB_BLO` or
`SUB_RBHS`), `multiplier` and `divider`. A case on `op_sel` selects the result:

| `op_sel` | operation | `aluout`                           |
|----------|-----------|------------------------------------|
| `00`     | add       | `{15'b0, sum[16:0]}`               |
| `01`     | subtract  | `{16'b0, sub[15:0]}`               |
| `10`     | multiply  | 32-bit unsigned product            |
| `11`     | divide    | `{16'b0, quotient}`; all ones if b = 0 |

- **Latency.** `aluout` is a register clocked on the rising edge of `clk`. The result for
  the operands present at one edge appears on `aluout` just after that edge.
- **Reset.** The register has none, so `aluout` is undefined until the first edge.
- **Subtraction.** `sub` is the unsigned difference modulo 2¹⁶ and `br` is its borrow,
  which is 1 when a < b. The borrow is not part of `aluout`. The subtractor's own
  borrow in is tied to 0.
- **Unit outputs.** `sum`, `sub` and `br` are also brought out combinationally.

Two reference vectors, both with `op_sel = 01`:

| a      | b      | `sub`  | `br` | `sum`   | `aluout`    |
|--------|--------|--------|------|---------|-------------|
| `A57F` | `E557` | `C028` | 1    | `18AD6` | `0000_C028` |
| `D4B2` | `1D43` | `B76F` | 0    | `0F1F5` | `0000_B76F` |

`alu_bsl_top` is the top. It holds ALU_BSL1 and ALU_BSL2 side by side and shares only
`clk`. Each ALU has its own ports, with suffix 1 or 2.

The original FPGA implementation reported 450 LUTs / 33.657 ns for ALU_BSL1 and
443 LUTs / 33.441 ns for ALU_BSL2.
This RTL has not been characterised against those figures.

## What is fixed by the original design and what is chosen here

The following come from the original design:

- the five-group split and bit ranges;
- the contents of each group in both forms;
- the BLO equations;
- the gate structure of the half and full subtractors;
- the four units and the output register;
- the port names and widths;
- `op_sel = 01` for subtraction.

The following are choices made here:

- The codes 00, 10 and 11 for add, multiply and divide.
- The zero extension of results into `aluout`.
- The divider's quotient-only output and its all-ones result on division by zero.
- No reset on the output register.
- The adder, multiplier and divider are plain behavioural `+`, `*` and `/`. Their insides
  are unspecified, so synthesis is left to choose them.
- The extension of the group pattern and of the BLO to other widths.

The following are not included:

- A signed-magnitude output stage. This would complement and negate the difference when
  the borrow is 1. It is a known variant of the BSLS, but the ALU's reference results
  are plain modulo-2¹⁶ differences.
- Square, square-root and inverse units. These are sometimes listed for such ALUs, but a
  2-bit `op_sel` has no code left for them.

## Files

Each file begins with a comment on its function, interface and timing.

- `rtl/alu_pkg.sv`: the `op_e` and `sub_arch_e` enums and the group-geometry functions.
- `rtl/half_subtractor.sv`, `full_subtractor.sv`, `rbs.sv`, `rbhs.sv`, `blo.sv`,
  `bsls_mux.sv`: the subtractor cells.
- `rtl/bsls_group_blo.sv`, `bsls_group_rbhs.sv`: one upper group of each form.
- `rtl/bsls_blo.sv`, `bsls_rbhs.sv`: the full subtractors. Ports: `a`, `b`, `bin` in;
  `d`, `bout` out.
- `rtl/adder.sv`, `multiplier.sv`, `divider.sv`, `alu.sv`, `alu_bsl_top.sv`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Verification

- **Cells.** The testbenches for the cells and groups test every input exhaustively at
  several widths: `rbs` and both group types at 1 to 5 bits, `blo` at 1 to 7, `rbhs` at
  1 to 6. Each result is compared against integer arithmetic.
- **16-bit subtractors.** Both are checked on corner cases and 20 000 random operand
  sets. The testbenches count how often a borrow entered each of groups 2 to 5, and
  fail if one never did.
- **`tb_alu`.** Runs both variants through all four operations. It checks the
  one-cycle latency and that the result holds until the next edge.
- **`tb_alu_bsl_top`.** The end-to-end test, at the default size. It replays the two
  reference vectors above, then runs 20 000 random and corner cycles on both ALUs. It
  counts each mechanism and fails if one never occurs:
  - every `op_sel` code;
  - a final borrow and none;
  - adder carry out;
  - division by zero;
  - for each upper group, a borrow entering it;
  - for each upper group, a borrow created only because the incoming borrow underflowed
    the group's own difference. This is the case that the BLO or RBHS path exists for.

To simulate one testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/alu_pkg.sv tb/tb_alu_bsl_top.sv \
        --top-module tb_alu_bsl_top -o sim
    ./obj_dir/sim

To lint the design: `verilator --lint-only -Wall -y rtl rtl/alu_pkg.sv rtl/alu_bsl_top.sv`.

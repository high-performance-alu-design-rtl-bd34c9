// tb_alu_bsl_top: end-to-end test of both ALUs at their default size (16 bits, five
// subtractor groups). It replays the two published simulation vectors (op_sel = 01:
// a = A57F, b = E557 gives sub = C028, br = 1, sum = 18AD6; a = D4B2, b = 1D43 gives
// sub = B76F, br = 0, sum = 0F1F5), then drives random and corner operands through
// every operation, checking each registered result one cycle after its operands.
// It counts the mechanisms of the design and fails if one never happened: every
// operation code; a final borrow and none; for each group boundary of the
// subtractor, a borrow entering the group, and a borrow produced only because the
// incoming borrow underflowed the group's own difference (the case the
// binary-less-one / half-subtractor path exists for); carry out of the adder;
// division by zero. The two ALUs get different operands in the random phase.
module tb_alu_bsl_top;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  int n_op [4];
  int n_borrow, n_noborrow, n_carry, n_div0;
  int n_gin [1:4];
  int n_gund [1:4];

  logic        clk;
  logic [15:0] a1, b1, a2, b2;
  logic [1:0]  op1, op2;
  logic [31:0] out1, out2;
  logic [16:0] sum1, sum2;
  logic [15:0] sub1, sub2;
  logic        br1, br2;

  alu_bsl_top dut (
    .clk(clk),
    .a1(a1), .b1(b1), .op_sel1(op1), .aluout1(out1), .sum1(sum1), .sub1(sub1), .br1(br1),
    .a2(a2), .b2(b2), .op_sel2(op2), .aluout2(out2), .sum2(sum2), .sub2(sub2), .br2(br2)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_out(input logic [1:0] o, input logic [15:0] x, input logic [15:0] y);
    case (o)
      2'b00:   return 32'(x) + 32'(y);
      2'b01:   return 32'(16'(x - y));
      2'b10:   return 32'(x) * 32'(y);
      default: return (y == 0) ? 32'h0000_FFFF : 32'(x / y);
    endcase
  endfunction

  // Count the subtractor and ALU mechanisms for one operand pair.
  task automatic count(input logic [1:0] o, input logic [15:0] x, input logic [15:0] y);
    n_op[o]++;
    if (x < y) n_borrow++; else n_noborrow++;
    if (32'(x) + 32'(y) > 32'hFFFF) n_carry++;
    if (o == 2'b11 && y == 0) n_div0++;
    for (int g = 1; g <= 4; g++) begin
      int lsb, gw, mlow, xs, ys;
      logic bin_g;
      lsb   = group_lsb(g);
      gw    = group_width(g);
      mlow  = (1 << lsb) - 1;
      bin_g = (int'(x) & mlow) < (int'(y) & mlow);
      xs    = (int'(x) >> lsb) & ((1 << gw) - 1);
      ys    = (int'(y) >> lsb) & ((1 << gw) - 1);
      if (bin_g) n_gin[g]++;
      if (bin_g && xs == ys) n_gund[g]++;
    end
  endtask

  task automatic step(input logic [1:0] o1, input logic [15:0] x1, input logic [15:0] y1,
                      input logic [1:0] o2, input logic [15:0] x2, input logic [15:0] y2);
    logic [31:0] e1, e2;
    op1 = o1; a1 = x1; b1 = y1;
    op2 = o2; a2 = x2; b2 = y2;
    #1;
    checks++;
    if (int'(sum1) != int'(x1) + int'(y1) || sub1 !== 16'(x1 - y1) || br1 !== (x1 < y1) ||
        int'(sum2) != int'(x2) + int'(y2) || sub2 !== 16'(x2 - y2) || br2 !== (x2 < y2)) begin
      failures++;
      $display("FAIL units: %h-%h=%h br%0b | %h-%h=%h br%0b", x1, y1, sub1, br1, x2, y2, sub2, br2);
    end
    e1 = ref_out(o1, x1, y1);
    e2 = ref_out(o2, x2, y2);
    count(o1, x1, y1);
    count(o2, x2, y2);
    @(posedge clk); #1;
    checks++;
    if (out1 !== e1 || out2 !== e2) begin
      failures++;
      $display("FAIL aluout1=%h (exp %h) aluout2=%h (exp %h)", out1, e1, out2, e2);
    end
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    for (int g = 1; g <= 4; g++) begin n_gin[g] = 0; n_gund[g] = 0; end
    n_borrow = 0; n_noborrow = 0; n_carry = 0; n_div0 = 0;
    @(negedge clk);

    // Published waveform vectors, same vector on both ALUs.
    step(2'b01, 16'hA57F, 16'hE557, 2'b01, 16'hA57F, 16'hE557);
    checks++;
    if (sub1 !== 16'hC028 || br1 !== 1'b1 || sum1 !== 17'h18AD6 || out1 !== 32'h0000_C028 ||
        sub2 !== 16'hC028 || br2 !== 1'b1 || out2 !== 32'h0000_C028) begin
      failures++;
      $display("FAIL published vector 1: sub=%h br=%0b sum=%h aluout=%h", sub1, br1, sum1, out1);
    end
    step(2'b01, 16'hD4B2, 16'h1D43, 2'b01, 16'hD4B2, 16'h1D43);
    checks++;
    if (sub1 !== 16'hB76F || br1 !== 1'b0 || sum1 !== 17'h0F1F5 || out1 !== 32'h0000_B76F ||
        sub2 !== 16'hB76F || br2 !== 1'b0 || out2 !== 32'h0000_B76F) begin
      failures++;
      $display("FAIL published vector 2: sub=%h br=%0b sum=%h aluout=%h", sub2, br2, sum2, out2);
    end

    // 0 - 1 and 8421 - 0422: a borrow from group 1 that underflows every higher
    // group, and one that enters group 2 only to be absorbed there.
    step(2'b01, 16'h0000, 16'h0001, 2'b01, 16'h8421, 16'h0422);
    // Division by zero on both.
    step(2'b11, 16'h1234, 16'h0000, 2'b11, 16'hFFFF, 16'h0000);

    // Random and corner traffic.
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] r [4];
      foreach (r[k]) begin
        case ($urandom_range(0, 5))
          0:       r[k] = 16'($urandom_range(0, 3));
          1:       r[k] = 16'hFFFF - 16'($urandom_range(0, 3));
          default: r[k] = 16'($urandom);
        endcase
      end
      // half of the time make b share a's upper slices so borrows underflow groups
      if (i % 2 == 0) r[1] = (r[0] & 16'hFFF0) | (r[1] & 16'h000F);
      step(2'($urandom), r[0], r[1], 2'($urandom), r[2], r[3]);
    end

    // Every mechanism must have occurred.
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL op_sel %0d never used", i); end
    end
    checks++; if (n_borrow == 0)   begin failures++; $display("FAIL no final borrow"); end
    checks++; if (n_noborrow == 0) begin failures++; $display("FAIL no borrow-free case"); end
    checks++; if (n_carry == 0)    begin failures++; $display("FAIL no adder carry"); end
    checks++; if (n_div0 == 0)     begin failures++; $display("FAIL no division by zero"); end
    for (int g = 1; g <= 4; g++) begin
      checks++;
      if (n_gin[g] == 0 || n_gund[g] == 0) begin
        failures++;
        $display("FAIL group %0d: borrow in %0d, underflow %0d", g + 1, n_gin[g], n_gund[g]);
      end
    end
    $display("ops add/sub/mul/div: %0d %0d %0d %0d; borrow %0d, none %0d, carry %0d, div0 %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_borrow, n_noborrow, n_carry, n_div0);
    for (int g = 1; g <= 4; g++)
      $display("group %0d: borrow in %0d, borrow by underflow %0d", g + 1, n_gin[g], n_gund[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

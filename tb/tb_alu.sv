// tb_alu: check of both ALU variants (BLO and RBHS subtractor) for all four
// operations. Operands change at the falling edge; the registered result must show
// the reference value right after the next rising edge and must not change before
// it (one cycle of latency). sum, sub and br are checked combinationally.
module tb_alu;
  import alu_pkg::*;
  int checks = 0, failures = 0;
  int cycles;
  logic        clk;
  logic [15:0] a, b;
  op_e         op;
  logic [31:0] out1, out2;
  logic [16:0] sum1, sum2;
  logic [15:0] sub1, sub2;
  logic        br1, br2;

  alu #(.SUB_ARCH(SUB_BLO))  dut1 (.clk(clk), .a(a), .b(b), .op_sel(op),
                                  .aluout(out1), .sum(sum1), .sub(sub1), .br(br1));
  alu #(.SUB_ARCH(SUB_RBHS)) dut2 (.clk(clk), .a(a), .b(b), .op_sel(op),
                                  .aluout(out2), .sum(sum2), .sub(sub2), .br(br2));

  initial begin
    clk = 1'b0;
    cycles = 0;
  end
  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  function automatic logic [31:0] ref_out(input op_e o, input logic [15:0] x, input logic [15:0] y);
    case (o)
      OP_ADD:  return 32'(x) + 32'(y);
      OP_SUB:  return 32'(16'(x - y));
      OP_MUL:  return 32'(x) * 32'(y);
      default: return (y == 0) ? 32'h0000_FFFF : 32'(x / y);
    endcase
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_v;
    int c0;
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      a  = (i % 7 == 0) ? 16'($urandom_range(0, 3)) : 16'($urandom);
      b  = (i % 5 == 0) ? 16'($urandom_range(0, 3)) : 16'($urandom);
      op = op_e'(i % 4);
      #1;
      // combinational unit outputs
      checks++;
      if (int'(sum1) != int'(a) + int'(b) || sum2 !== sum1 ||
          sub1 !== 16'(a - b) || sub2 !== sub1 ||
          br1 !== (a < b) || br2 !== br1) begin
        failures++;
        $display("FAIL units a=%h b=%h sum=%h/%h sub=%h/%h br=%0b/%0b",
                 a, b, sum1, sum2, sub1, sub2, br1, br2);
      end
      expect_v = ref_out(op, a, b);
      c0 = cycles;
      @(posedge clk); #1;
      checks++;
      if (cycles - c0 != 1 || out1 !== expect_v || out2 !== expect_v) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h out=%h/%h expected %h", op.name(), a, b, out1, out2, expect_v);
      end
      @(negedge clk);
      checks++;
      if (i > 0 && (out1 !== expect_v || out2 !== expect_v)) begin
        failures++;
        $display("FAIL result changed before the next edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

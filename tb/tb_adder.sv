// tb_adder: check of the 17-bit sum of the 16-bit adder against integer addition,
// corners and random operands.
module tb_adder;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [16:0] sum;

  adder dut (.a(a), .b(b), .sum(sum));

  task automatic check();
    #1;
    checks++;
    if (int'(sum) !== int'(a) + int'(b)) begin
      failures++;
      $display("FAIL a=%h b=%h sum=%h", a, b, sum);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hFFFF; b = 16'hFFFF; check();
    a = 16'hFFFF; b = 16'h0001; check();
    a = 16'h0000; b = 16'h0000; check();
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom); b = 16'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

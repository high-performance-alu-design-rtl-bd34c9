// tb_half_subtractor: exhaustive check of the half subtractor against the integer
// difference a - b (d is its LSB, bout its sign).
module tb_half_subtractor;
  logic a, b, d, bout;
  int checks = 0, failures = 0;

  half_subtractor dut (.a(a), .b(b), .d(d), .bout(bout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int diff;
      {a, b} = 2'(i);
      #1;
      diff = int'(a) - int'(b);
      checks++;
      if (d !== diff[0] || bout !== (diff < 0)) begin
        failures++;
        $display("FAIL a=%0b b=%0b d=%0b bout=%0b", a, b, d, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

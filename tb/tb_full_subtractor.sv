// tb_full_subtractor: exhaustive check of the full subtractor against the integer
// a - b - bin (d is its LSB, bout its sign).
module tb_full_subtractor;
  logic a, b, bin, d, bout;
  int checks = 0, failures = 0;

  full_subtractor dut (.a(a), .b(b), .bin(bin), .d(d), .bout(bout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int diff;
      {a, b, bin} = 3'(i);
      #1;
      diff = int'(a) - int'(b) - int'(bin);
      checks++;
      if (d !== diff[0] || bout !== (diff < 0)) begin
        failures++;
        $display("FAIL a=%0b b=%0b bin=%0b d=%0b bout=%0b", a, b, bin, d, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

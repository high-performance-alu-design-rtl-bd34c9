// tb_divider: check of the quotient against q * b <= a < (q + 1) * b, and of all
// ones on division by zero.
module tb_divider;
  int checks = 0, failures = 0;
  logic [15:0] a, b, q;

  divider dut (.a(a), .b(b), .q(q));

  task automatic check();
    longint qa, ba;
    #1;
    checks++;
    qa = longint'(q);
    ba = longint'(b);
    if (b == 0) begin
      if (q !== 16'hFFFF) begin
        failures++;
        $display("FAIL divide by zero a=%h q=%h", a, q);
      end
    end else if (!(qa * ba <= longint'(a) && longint'(a) < (qa + 1) * ba)) begin
      failures++;
      $display("FAIL a=%h b=%h q=%h", a, b, q);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hFFFF; b = 16'h0001; check();
    a = 16'h1234; b = 16'h0000; check();
    a = 16'h0005; b = 16'h0007; check();
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom);
      b = (i % 3 == 0) ? 16'($urandom_range(0, 255)) : 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

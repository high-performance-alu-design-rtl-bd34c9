// tb_blo: exhaustive check of the binary-less-one at widths 1 to 7 against
// (bi - 1) mod 2^N; includes the published 3-bit case.
module tb_blo;
  int checks = 0, failures = 0;
  logic [6:0] bi;
  logic [6:0] x [1:7];

  for (genvar n = 1; n <= 7; n++) begin : g_w
    blo #(.N(n)) dut (.bi(bi[n-1:0]), .x(x[n][n-1:0]));
    if (n < 7) begin : g_pad
      assign x[n][6:n] = '0;
    end
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      bi = 7'(i);
      #1;
      for (int n = 1; n <= 7; n++) begin
        int mask;
        mask = (1 << n) - 1;
        if ((i & mask) == i) begin
          checks++;
          if (int'(x[n]) !== ((i - 1) & mask)) begin
            failures++;
            $display("FAIL N=%0d bi=%0d x=%0d", n, i, x[n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

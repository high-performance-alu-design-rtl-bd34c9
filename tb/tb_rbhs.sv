// tb_rbhs: exhaustive check of the ripple borrow half subtractor at widths 1 to 6:
// {bout, d} must equal y - bpg, bout set only for y = 0 and bpg = 1.
module tb_rbhs;
  int checks = 0, failures = 0;
  logic [5:0] y;
  logic       bpg;
  logic [5:0] d  [1:6];
  logic       bo [1:6];

  for (genvar n = 1; n <= 6; n++) begin : g_w
    rbhs #(.N(n)) dut (.y(y[n-1:0]), .bpg(bpg), .d(d[n][n-1:0]), .bout(bo[n]));
    if (n < 6) begin : g_pad
      assign d[n][5:n] = '0;
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
      {bpg, y} = 7'(i);
      #1;
      for (int n = 1; n <= 6; n++) begin
        int mask, yi, diff;
        mask = (1 << n) - 1;
        yi   = int'(y);
        if ((yi & mask) == yi) begin
          diff = yi - int'(bpg);
          checks++;
          if (int'(d[n]) !== (diff & mask) || bo[n] !== (diff < 0)) begin
            failures++;
            $display("FAIL N=%0d y=%0d bpg=%0b d=%0d bout=%0b", n, yi, bpg, d[n], bo[n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

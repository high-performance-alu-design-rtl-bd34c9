// tb_bsls_group_blo: exhaustive check of bsls_group_blo at the widths 1 to 5 against the integer
// difference a - b - bin: d must equal it modulo 2^N and bout must be 1 exactly when
// it is negative.
module tb_bsls_group_blo;
  int checks = 0, failures = 0;

  // One instance per width, all driven from the same loop variables.
  logic [4:0] a, b;
  logic       bin;
  logic [4:0] d   [1:5];
  logic       bo  [1:5];

  for (genvar n = 1; n <= 5; n++) begin : g_w
    bsls_group_blo #(.N(n)) dut (
      .a(a[n-1:0]), .b(b[n-1:0]), .bin(bin), .d(d[n][n-1:0]), .bout(bo[n])
    );
    if (n < 5) begin : g_pad
      assign d[n][4:n] = '0;
    end
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      {bin, a, b} = 11'(i);
      #1;
      for (int n = 1; n <= 5; n++) begin
        int mask, ai, bi_, diff;
        mask = (1 << n) - 1;
        ai   = int'(a) & mask;
        bi_  = int'(b) & mask;
        diff = ai - bi_ - int'(bin);
        if (ai == int'(a) && bi_ == int'(b)) begin  // each operand pair once per width
          checks++;
          if (int'(d[n]) !== (diff & mask) || bo[n] !== (diff < 0)) begin
            failures++;
            $display("FAIL N=%0d a=%0d b=%0d bin=%0b d=%0d bout=%0b", n, ai, bi_, bin, d[n], bo[n]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

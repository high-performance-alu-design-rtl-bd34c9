// tb_bsls_blo: check of the 16-bit borrow select subtractor (five groups) against
// the integer a - b - bin. Directed corner cases make the borrow ripple across every
// group boundary; random operands cover the rest. Also counts, per group boundary,
// how often a borrow crossed it, and fails if one never did.
module tb_bsls_blo;
  localparam int W = 16;
  int checks = 0, failures = 0;
  int crossed [1:4];
  logic [W-1:0] a, b, d;
  logic         bin, bout;

  bsls_blo dut (.a(a), .b(b), .bin(bin), .d(d), .bout(bout));

  task automatic check();
    int diff;
    #1;
    diff = int'(a) - int'(b) - int'(bin);
    checks++;
    if (int'(d) !== (diff & 32'hFFFF) || bout !== (diff < 0)) begin
      failures++;
      $display("FAIL a=%h b=%h bin=%0b d=%h bout=%0b", a, b, bin, d, bout);
    end
    for (int g = 1; g <= 4; g++) if (dut.gb[g]) crossed[g]++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 1; g <= 4; g++) crossed[g] = 0;
    // 0 - 1 and 0 - 0 - bin: borrow through all groups
    a = '0; b = 16'd1; bin = 0; check();
    a = '0; b = '0;    bin = 1; check();
    a = 16'hFFFF; b = 16'hFFFF; bin = 1; check();
    a = 16'h8000; b = 16'h0001; bin = 0; check();
    // a borrow created at the top of each group and absorbed higher up
    for (int s = 0; s < 16; s++) begin
      a = 16'(1 << s); b = 16'(1 << (s > 0 ? s - 1 : 0)) + 16'd1; bin = 1'(s); check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); bin = 1'($urandom); check();
    end
    for (int g = 1; g <= 4; g++) begin
      checks++;
      if (crossed[g] == 0) begin
        failures++;
        $display("FAIL no borrow ever entered group %0d", g + 1);
      end
    end
    $display("borrow into groups 2..5: %0d %0d %0d %0d", crossed[1], crossed[2], crossed[3], crossed[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_multiplier: check of the 32-bit product against a shift-and-add reference,
// corners and random operands.
module tb_multiplier;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [31:0] p;

  multiplier dut (.a(a), .b(b), .p(p));

  function automatic logic [31:0] ref_mul(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] acc;
    acc = '0;
    for (int i = 0; i < 16; i++) if (y[i]) acc += {16'b0, x} << i;
    return acc;
  endfunction

  task automatic check();
    #1;
    checks++;
    if (p !== ref_mul(a, b)) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h", a, b, p);
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
    a = 16'h0000; b = 16'h1234; check();
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom); b = 16'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

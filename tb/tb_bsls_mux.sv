// tb_bsls_mux: random check of the (2W):W multiplexer at W = 6 (the 12:6 mux of the
// top group): y must be in0 when sel = 0 and in1 when sel = 1.
module tb_bsls_mux;
  int checks = 0, failures = 0;
  logic [5:0] in0, in1, y;
  logic       sel;

  bsls_mux #(.W(6)) dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      in0 = 6'($urandom);
      in1 = 6'($urandom);
      sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL in0=%h in1=%h sel=%0b y=%h", in0, in1, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

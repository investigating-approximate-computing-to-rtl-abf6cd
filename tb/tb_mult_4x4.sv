// tb_mult_4x4: exhaustive check of the 4x4 multiplier cell against a*b.
module tb_mult_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  mult_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 16; k++) begin
        a = 4'(i); b = 4'(k);
        #1;
        checks++;
        if (int'(p) != i * k) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, k, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

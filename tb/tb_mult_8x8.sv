// tb_mult_8x8: exhaustive check of the recursive 8x8 multiplier against a*b.
module tb_mult_8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  mult_8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int k = 0; k < 256; k++) begin
        a = 8'(i); b = 8'(k);
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

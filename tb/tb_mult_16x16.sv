// tb_mult_16x16: corner and random checks of the recursive 16x16 multiplier.
module tb_mult_16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  longint unsigned ua, ub;

  mult_16x16 dut (.a(a), .b(b), .p(p));

  task automatic check(input longint unsigned x, input longint unsigned y);
    a = 16'(x); b = 16'(y);
    #1;
    checks++;
    if (longint'(p) != x * y) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d", x, y, p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(65535, 65535); check(65535, 1); check(1, 65535);
    check(256, 255); check(32768, 32768); check(255, 65280);
    for (int n = 0; n < 50000; n++) begin
      ua = longint'($urandom_range(65535));
      ub = longint'($urandom_range(65535));
      check(ua, ub);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

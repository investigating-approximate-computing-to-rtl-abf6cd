// tb_fxp_multiplier: signed Q5.10 products against the reference truncation
// (sign = product bit 31, value bits 24..10), on corners and random operands.
module tb_fxp_multiplier;
  import fxp_pkg::*;
  import tb_ref_pkg::*;
  fxp_t a, b, p;
  int checks = 0, failures = 0;

  fxp_multiplier dut (.a(a), .b(b), .p(p));

  task automatic check(input int x, input int y);
    int exp_v;
    a = fxp_t'(x); b = fxp_t'(y);
    #1;
    exp_v = mul_ref(x, y);
    checks++;
    if (int'(p) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d expected %0d", x, y, p, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(1024, 1024);    // 1.0 * 1.0
    check(-1024, 1024);   // -1.0 * 1.0
    check(-1024, -1536);  // -1.0 * -1.5
    check(512, -3);       // tiny negative product rounds toward minus infinity
    check(-32768, -32768);
    check(-32768, 1024);
    check(32767, 32767);
    check(0, -5000);
    for (int n = 0; n < 40000; n++) begin
      if (n % 2 == 0) check($urandom_range(65535) - 32768, $urandom_range(65535) - 32768);
      else            check($urandom_range(4095) - 2048, $urandom_range(4095) - 2048);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

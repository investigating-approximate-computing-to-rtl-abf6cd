// tb_sat_adder: the saturating adder in its exact form and with 2, 4 and 8
// approximate low bits, against the integer reference (clamp to -32768..32767),
// including positive and negative overflow and the effect of the carry-in.
module tb_sat_adder;
  import tb_ref_pkg::*;
  logic signed [15:0] a, b;
  logic               cin;
  logic signed [15:0] s0, s2, s4, s8;
  logic               o0, o2, o4, o8;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  sat_adder #(.W(16), .APPROX_BITS(0)) u0 (.a(a), .b(b), .cin(cin), .s(s0), .ovf(o0));
  sat_adder #(.W(16), .APPROX_BITS(2)) u2 (.a(a), .b(b), .cin(cin), .s(s2), .ovf(o2));
  sat_adder #(.W(16), .APPROX_BITS(4)) u4 (.a(a), .b(b), .cin(cin), .s(s4), .ovf(o4));
  sat_adder #(.W(16), .APPROX_BITS(8)) u8 (.a(a), .b(b), .cin(cin), .s(s8), .ovf(o8));

  task automatic cmp(input string tag, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d cin=%0d got %0d exp %0d", tag, a, b, cin, got, exp_v);
    end
  endtask

  task automatic check(input int x, input int y, input int c);
    longint exact;
    a = 16'(x); b = 16'(y); cin = c[0];
    #1;
    cmp("k0", int'(s0), add_ref(x, y, c, 0));
    cmp("k2", int'(s2), add_ref(x, y, c, 2));
    cmp("k4", int'(s4), add_ref(x, y, c, 4));
    cmp("k8", int'(s8), add_ref(x, y, c, 8));
    exact = longint'(x) + longint'(y) + longint'(c);
    cmp("ovf0", int'(o0), int'(exact > 32767 || exact < -32768));
    if (o0) n_ovf++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32767, 1, 0);        // positive overflow -> 32767
    check(-32768, -1, 0);      // negative overflow -> -32768
    check(30000, 30000, 1);
    check(-20000, -20000, 0);
    check(32767, -32768, 1);   // mixed signs never overflow
    check(5, 7, 1);            // carry-in adds one in the exact adder
    check(3, 3, 0);            // OR cell: 3|3 = 3 in the low bits plus carry
    check(-1, 1, 0);
    for (int n = 0; n < 30000; n++) begin
      if (n % 3 == 0) check($urandom_range(65535) - 32768, $urandom_range(65535) - 32768, $urandom_range(1));
      else            check($urandom_range(8191) - 4096, $urandom_range(8191) - 4096, $urandom_range(1));
    end
    if (n_ovf == 0) begin
      failures++;
      $display("FAIL no overflow case seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

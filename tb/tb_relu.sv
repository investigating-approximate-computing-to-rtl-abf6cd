// tb_relu: ReLU output against max(x, 0) for corners and random inputs.
module tb_relu;
  logic signed [15:0] x, y;
  int checks = 0, failures = 0;

  relu #(.W(16)) dut (.x(x), .y(y));

  task automatic check(input int v);
    int e;
    x = 16'(v);
    #1;
    e = (v > 0) ? v : 0;
    checks++;
    if (int'(y) != e) begin
      failures++;
      $display("FAIL relu(%0d) = %0d", v, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(32767); check(-32768);
    for (int n = 0; n < 2000; n++) check($urandom_range(65535) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_seq_divider: random and corner divisions against integer division, including
// division by zero (all ones), and the latency of NW+1 clocks from start to done.
module tb_seq_divider;
  localparam int NW = 32, DW = 18;
  logic clk = 0, rst, start, busy, done;
  logic [NW-1:0] num, quo;
  logic [DW-1:0] den;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_divider #(.NW(NW), .DW(DW)) dut (.clk(clk), .rst(rst), .start(start), .num(num), .den(den),
                                       .busy(busy), .done(done), .quo(quo));

  task automatic check(input longint unsigned n, input longint unsigned d);
    longint unsigned e;
    int lat;
    @(negedge clk);
    num = NW'(n); den = DW'(d); start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    e = (d == 0) ? 64'hFFFF_FFFF : n / d;
    checks += 2;
    if (longint'(quo) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d / %0d = %0d exp %0d", n, d, quo, e);
    end
    if (lat != NW + 1) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; num = '0; den = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(100, 7); check(0, 5); check(32'hFFFF_FFFF, 1); check(32'hFFFF_FFFF, 18'h3FFFF);
    check(12345, 0); check(32768 << 15, 32768); check(5, 9);
    for (int n = 0; n < 2000; n++)
      check(longint'($urandom()), longint'($urandom_range(262143)));
    for (int n = 0; n < 500; n++)
      check(longint'($urandom_range(32768)) << 15, longint'($urandom_range(229376, 32768)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

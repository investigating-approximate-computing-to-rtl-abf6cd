// tb_softmax: seven Q5.10 logits in, probabilities out. Checks every probability
// bit-exactly against the reference (table exponentials, integer division), checks
// it against the real-valued softmax within the table's precision, checks the
// predicted class, the sum of the probabilities, and the start-to-done latency.
module tb_softmax;
  import fxp_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 7;
  logic clk = 0, rst, start, busy, done;
  fxp_t logits [N];
  logic [15:0] prob [N];
  logic [2:0] pred;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  softmax #(.N(N)) dut (.clk(clk), .rst(rst), .start(start), .logits(logits),
                        .busy(busy), .done(done), .prob(prob), .pred(pred));

  task automatic cmp(input string tag, input longint got, input longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", tag, got, exp_v);
    end
  endtask

  task automatic run(input int range_v);
    int xs[N], m, am, e[N], s, lat, psum;
    real rs, rp;
    m = -40000; am = 0;
    for (int i = 0; i < N; i++) begin
      xs[i] = $urandom_range(2 * range_v) - range_v;
      if (xs[i] > 32767) xs[i] = 32767;
      if (xs[i] < -32768) xs[i] = -32768;
      logits[i] = fxp_t'(xs[i]);
      if (xs[i] > m) begin m = xs[i]; am = i; end
    end
    s = 0;
    for (int i = 0; i < N; i++) begin e[i] = exp_ref(xs[i], m); s += e[i]; end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done && lat < 1000) begin @(negedge clk); lat++; end
    cmp("latency", lat, 2 + N * (NW_DIV + 2));
    cmp("pred", pred, am);
    rs = 0.0;
    for (int i = 0; i < N; i++) rs += $exp(real'(xs[i] - m) / 1024.0);
    psum = 0;
    for (int i = 0; i < N; i++) begin
      cmp($sformatf("prob%0d", i), prob[i], (longint'(e[i]) << 15) / s);
      rp = $exp(real'(xs[i] - m) / 1024.0) / rs * 32768.0;
      checks++;
      if ((real'(prob[i]) - rp) > 1000.0 || (rp - real'(prob[i])) > 1000.0) begin
        failures++;
        $display("FAIL prob%0d=%0d real %f", i, prob[i], rp);
      end
      psum += prob[i];
    end
    checks++;
    if (psum > 32768 || psum < 32768 - 8) begin
      failures++;
      $display("FAIL probabilities sum to %0d", psum);
    end
  endtask

  localparam int NW_DIV = 32;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0;
    for (int i = 0; i < N; i++) logits[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(0);          // all equal: 1/7 each
    for (int n = 0; n < 30; n++) run(2048);
    for (int n = 0; n < 30; n++) run(8192);
    for (int n = 0; n < 10; n++) run(40000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

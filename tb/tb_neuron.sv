// tb_neuron: the three neuron kinds (accurate, approximate layer 1, approximate
// layer 2/3) run the same random input/weight sequences; after every accumulation
// z and y are compared with the integer reference (alternating carry, saturating
// adds, bias), and done must come exactly two clocks after start. A sequence with
// large operands must saturate.
module tb_neuron;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst;
  logic start;
  fxp_t x, w, bias;
  logic busy[3], done[3], sat[3];
  fxp_t z[3], y[3];
  int checks = 0, failures = 0;
  int n_sat = 0, n_relu0 = 0, n_diff = 0;
  int ksum[3]  = '{0, 2, 4};
  int kbias[3] = '{0, 8, 8};

  always #5 clk = ~clk;

  neuron #(.KIND(NK_ACCURATE))   u_acc (.clk(clk), .rst(rst), .start(start), .x(x), .w(w), .bias(bias),
                                        .busy(busy[0]), .done(done[0]), .z(z[0]), .y(y[0]), .sat(sat[0]));
  neuron #(.KIND(NK_APPROX_L1))  u_l1  (.clk(clk), .rst(rst), .start(start), .x(x), .w(w), .bias(bias),
                                        .busy(busy[1]), .done(done[1]), .z(z[1]), .y(y[1]), .sat(sat[1]));
  neuron #(.KIND(NK_APPROX_L23)) u_l23 (.clk(clk), .rst(rst), .start(start), .x(x), .w(w), .bias(bias),
                                        .busy(busy[2]), .done(done[2]), .z(z[2]), .y(y[2]), .sat(sat[2]));

  task automatic cmp(input string tag, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d (t=%0t)", tag, got, exp_v, $time);
    end
  endtask

  // One neuron evaluation of n inputs; gap = idle clocks between accumulations.
  task automatic run(input int n, input int xr, input int wr, input int br, input int gap);
    int acc[3], e, bv, lat;
    for (int k = 0; k < 3; k++) acc[k] = 0;
    bv = $urandom_range(2 * br) - br;
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int i = 0; i < n; i++) begin
      x = fxp_t'($urandom_range(2 * xr) - xr);
      w = fxp_t'($urandom_range(2 * wr) - wr);
      bias = fxp_t'(bv);
      start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done[0]) begin
        @(negedge clk);
        lat++;
        if (lat > 10) break;
      end
      cmp("latency", lat, 2);
      for (int k = 0; k < 3; k++) begin
        acc[k] = add_ref(acc[k], mul_ref(int'(x), int'(w)), i % 2, ksum[k]);
        e = add_ref(acc[k], bv, 0, kbias[k]);
        cmp($sformatf("z kind%0d step%0d", k, i), int'(z[k]), e);
        cmp($sformatf("y kind%0d step%0d", k, i), int'(y[k]), (e > 0) ? e : 0);
        cmp("done", int'(done[k]), 1);
        if (sat[k]) n_sat++;
      end
      if (z[0] < 0) n_relu0++;
      if (z[0] != z[1]) n_diff++;
      repeat (gap) @(negedge clk);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; x = '0; w = '0; bias = '0;
    repeat (3) @(negedge clk);
    // the reference after reset: z = 0
    rst = 0;
    @(negedge clk);
    for (int k = 0; k < 3; k++) cmp("reset z", int'(z[k]), 0);
    run(256, 1024, 200, 300, 0);       // a layer-1 neuron: inputs 0..1, small weights
    run(16, 4000, 1500, 2000, 1);
    run(16, 4000, 1500, 2000, 0);
    run(20, 30000, 30000, 100, 0);     // large operands: must saturate
    run(7, 16000, 16000, 0, 2);
    if (n_sat == 0)   begin failures++; $display("FAIL no saturation seen"); end
    if (n_relu0 == 0) begin failures++; $display("FAIL ReLU never clamped"); end
    if (n_diff == 0)  begin failures++; $display("FAIL approximate never differed"); end
    $display("saturations=%0d relu_clamps=%0d approx_differs=%0d", n_sat, n_relu0, n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ecg_mlp_top: end-to-end test of the classifier at its default sizes
// (256-16-16-7, approximate layer-1 and layer-2/3 neurons).
//
// For each of four heartbeat windows it loads parameters through the memory port,
// streams 256 raw samples, and compares the 7 output-neuron values, the 7 softmax
// probabilities and the predicted class with an integer reference model of the whole
// network (min-max normalisation, Q5.10 products, saturating adds with alternating
// carry and lower-part-OR approximate bits, ReLU, table-based softmax). It also checks
// the clocks from the last sample to the result, and counts that each mechanism
// occurred: adder saturation, ReLU clamping, a result that differs from exact
// arithmetic because of the approximate adders, carry-in 1 summations, input
// back-pressure, and a flat (constant) window.
module tb_ecg_mlp_top;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst;
  logic pm_we;
  logic [PM_AW-1:0] pm_addr;
  fxp_t pm_wdata;
  logic s_valid, s_ready;
  logic signed [15:0] s_data;
  logic res_valid;
  ecg_class_e res_class;
  logic [15:0] res_prob [N_OUT];
  fxp_t res_logit [N_OUT];

  int checks = 0, failures = 0;
  int pm [PM_DEPTH];
  int raw [N_IN];
  int n_sat = 0, n_relu = 0, n_approx = 0, n_carry1 = 0, n_bp = 0, n_flat = 0, n_cls[N_OUT];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ecg_mlp_top dut (
    .clk(clk), .rst(rst), .pm_we(pm_we), .pm_addr(pm_addr), .pm_wdata(pm_wdata),
    .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data),
    .res_valid(res_valid), .res_class(res_class), .res_prob(res_prob), .res_logit(res_logit));

  // mechanism probes
  always @(posedge clk) begin
    if (dut.u_neuron_l1.sat || dut.u_neuron_l23.sat) n_sat++;
    if ((dut.u_neuron_l1.start && dut.u_neuron_l1.carry == 1'b0) ||
        (dut.u_neuron_l23.start && dut.u_neuron_l23.carry == 1'b0)) n_carry1++;  // toggles to 1
    if (s_valid && !s_ready) n_bp++;
  end

  task automatic cmp(input string tag, input int g, input int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", tag, g, e);
    end
  endtask

  task automatic load_params(input int w1, input int w23, input int b);
    for (int a = 0; a < PM_DEPTH; a++) begin
      if (a < PM_L2_W)      pm[a] = $urandom_range(2 * w1) - w1;
      else if (a < PM_L1_B) pm[a] = $urandom_range(2 * w23) - w23;
      else                  pm[a] = $urandom_range(2 * b) - b;
    end
    for (int a = 0; a < PM_DEPTH; a++) begin
      @(negedge clk);
      pm_we = 1; pm_addr = PM_AW'(a); pm_wdata = fxp_t'(pm[a]);
    end
    @(negedge clk) pm_we = 0;
  endtask

  // Reference network for the current pm[] and raw[].
  task automatic reference(output int lg[N_OUT], output int pr[N_OUT], output int cls);
    int xin[], h1[N_H1], h2[N_H2], xs[], ws[], mn, mx, m, s, e[N_OUT], ex;
    xin = new[N_IN];
    mn = raw[0]; mx = raw[0];
    for (int i = 0; i < N_IN; i++) begin if (raw[i] < mn) mn = raw[i]; if (raw[i] > mx) mx = raw[i]; end
    for (int i = 0; i < N_IN; i++) xin[i] = norm_ref(raw[i], mn, mx);
    ws = new[N_IN];
    for (int j = 0; j < N_H1; j++) begin
      for (int i = 0; i < N_IN; i++) ws[i] = pm[PM_L1_W + j * N_IN + i];
      h1[j] = neuron_ref(xin, ws, pm[PM_L1_B + j], 2, 8);
      ex    = neuron_ref(xin, ws, pm[PM_L1_B + j], 0, 0);
      if (ex != h1[j]) n_approx++;
      if (h1[j] < 0) begin h1[j] = 0; n_relu++; end
    end
    xs = new[N_H1]; ws = new[N_H1];
    for (int i = 0; i < N_H1; i++) xs[i] = h1[i];
    for (int j = 0; j < N_H2; j++) begin
      for (int i = 0; i < N_H1; i++) ws[i] = pm[PM_L2_W + j * N_H1 + i];
      h2[j] = neuron_ref(xs, ws, pm[PM_L2_B + j], 4, 8);
      if (h2[j] < 0) begin h2[j] = 0; n_relu++; end
    end
    for (int i = 0; i < N_H2; i++) xs[i] = h2[i];
    for (int j = 0; j < N_OUT; j++) begin
      for (int i = 0; i < N_H2; i++) ws[i] = pm[PM_L3_W + j * N_H2 + i];
      lg[j] = neuron_ref(xs, ws, 0, 4, 8);
    end
    m = lg[0]; cls = 0;
    for (int j = 1; j < N_OUT; j++) if (lg[j] > m) begin m = lg[j]; cls = j; end
    s = 0;
    for (int j = 0; j < N_OUT; j++) begin e[j] = exp_ref(lg[j], m); s += e[j]; end
    for (int j = 0; j < N_OUT; j++) pr[j] = int'((longint'(e[j]) << 15) / s);
  endtask

  // Stream one window; returns clocks from the last accepted sample to res_valid.
  task automatic classify(input int kind);
    int lg[N_OUT], pr[N_OUT], cls, t_last, lat, k;
    for (int i = 0; i < N_IN; i++) begin
      case (kind)
        0: raw[i] = 200 + $urandom_range(60) - 30 + ((i >= 124 && i < 132) ? 1500 - 150 * (i > 127 ? i - 127 : 128 - i) : 0);
        1: raw[i] = $urandom_range(65535) - 32768;
        default: raw[i] = 777;
      endcase
    end
    if (kind == 2) n_flat++;
    reference(lg, pr, cls);
    k = 0;
    while (k < N_IN) begin
      s_valid = 1; s_data = 16'(raw[k]);
      @(posedge clk);
      if (s_ready) k++;
      #1;
    end
    // keep offering a sample while the window is processed: it must not be taken
    @(negedge clk) s_data = 16'sd5;
    lat = 1;
    t_last = cyc;
    repeat (20) begin
      @(negedge clk);
      lat++;
      checks++;
      if (s_ready) begin failures++; $display("FAIL ready while busy"); end
    end
    s_valid = 0;
    while (!res_valid && lat < 100000) begin @(negedge clk); lat++; end
    // normalisation 256*29, then per neuron 5 + 2*inputs, then softmax
    cmp("latency", lat, N_IN * 29 + 1 + (N_H1 * (5 + 2 * N_IN) + N_H2 * (5 + 2 * N_H1) + N_OUT * (5 + 2 * N_H2)) + 242);
    for (int j = 0; j < N_OUT; j++) begin
      cmp($sformatf("logit%0d", j), int'(res_logit[j]), lg[j]);
      cmp($sformatf("prob%0d", j), int'(res_prob[j]), pr[j]);
    end
    cmp("class", int'(res_class), cls);
    n_cls[cls]++;
    $display("window kind %0d: class %0d, logits %0d %0d %0d %0d %0d %0d %0d, %0d clocks",
             kind, res_class, lg[0], lg[1], lg[2], lg[3], lg[4], lg[5], lg[6], lat);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pm_we = 0; pm_addr = '0; pm_wdata = '0; s_valid = 0; s_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    load_params(300, 1500, 600);
    classify(0);
    classify(1);
    classify(2);
    load_params(20000, 20000, 20000);    // large weights drive the adders into saturation
    classify(0);
    $display("saturations=%0d relu_clamps=%0d approx_differs=%0d carry1_sums=%0d backpressure=%0d flat=%0d",
             n_sat, n_relu, n_approx, n_carry1, n_bp, n_flat);
    if (n_sat == 0)    begin failures++; $display("FAIL no saturation"); end
    if (n_relu == 0)   begin failures++; $display("FAIL no ReLU clamp"); end
    if (n_approx == 0) begin failures++; $display("FAIL approximation never visible"); end
    if (n_carry1 == 0) begin failures++; $display("FAIL carry never 1"); end
    if (n_bp == 0)     begin failures++; $display("FAIL no back-pressure"); end
    if (n_flat == 0)   begin failures++; $display("FAIL no flat window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

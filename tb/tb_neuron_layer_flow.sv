// tb_neuron_layer_flow: the whole 256-16-16-7 network evaluated on a single accurate
// neuron, driven the way the reference neuron testbench drives it: for every neuron,
// reset for 2 clocks; for every input, present input, weight and bias, pulse start for
// one clock and wait 2 more clocks. Hidden-layer outputs go through ReLU and become the
// next layer's inputs; the 7 output values (before softmax) are compared with the
// integer reference for ten random normalised beats, and the clock count per beat must
// be 39*2 + 4464*3.
module tb_neuron_layer_flow;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst, start;
  fxp_t x, w, bias, z, y;
  logic busy, done, sat;
  int checks = 0, failures = 0;
  int pm [PM_DEPTH];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  neuron #(.KIND(NK_ACCURATE)) dut (.clk(clk), .rst(rst), .start(start), .x(x), .w(w), .bias(bias),
                                    .busy(busy), .done(done), .z(z), .y(y), .sat(sat));

  // One neuron on the hardware, following the reference testbench timing.
  task automatic hw_neuron(input int xs[], input int wbase, input int b, output int out);
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < xs.size(); i++) begin
      x = fxp_t'(xs[i]); w = fxp_t'(pm[wbase + i]); bias = fxp_t'(b);
      start = 1;
      @(negedge clk) start = 0;
      repeat (2) @(negedge clk);
    end
    out = int'(z);
  endtask

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xin[], h1[], h2[], lg[N_OUT], ref_h1[], ref_h2[], ws[], r, t0;
    rst = 1; start = 0; x = '0; w = '0; bias = '0;
    for (int a = 0; a < PM_DEPTH; a++)
      pm[a] = (a < PM_L2_W) ? $urandom_range(600) - 300 :
              (a < PM_L1_B) ? $urandom_range(3000) - 1500 : $urandom_range(1200) - 600;
    @(negedge clk);
    for (int beat = 0; beat < 10; beat++) begin
      xin = new[N_IN]; h1 = new[N_H1]; h2 = new[N_H2];
      ref_h1 = new[N_H1]; ref_h2 = new[N_H2];
      for (int i = 0; i < N_IN; i++) xin[i] = $urandom_range(1024);
      t0 = cyc;
      for (int j = 0; j < N_H1; j++) begin
        hw_neuron(xin, PM_L1_W + j * N_IN, pm[PM_L1_B + j], r);
        h1[j] = (r > 0) ? r : 0;
      end
      for (int j = 0; j < N_H2; j++) begin
        hw_neuron(h1, PM_L2_W + j * N_H1, pm[PM_L2_B + j], r);
        h2[j] = (r > 0) ? r : 0;
      end
      for (int j = 0; j < N_OUT; j++) hw_neuron(h2, PM_L3_W + j * N_H2, 0, lg[j]);
      checks++;
      if (cyc - t0 != 39 * 2 + 4464 * 3) begin
        failures++;
        $display("FAIL beat %0d took %0d clocks", beat, cyc - t0);
      end
      // reference
      ws = new[N_IN];
      for (int j = 0; j < N_H1; j++) begin
        for (int i = 0; i < N_IN; i++) ws[i] = pm[PM_L1_W + j * N_IN + i];
        r = neuron_ref(xin, ws, pm[PM_L1_B + j], 0, 0);
        ref_h1[j] = (r > 0) ? r : 0;
      end
      ws = new[N_H1];
      for (int j = 0; j < N_H2; j++) begin
        for (int i = 0; i < N_H1; i++) ws[i] = pm[PM_L2_W + j * N_H1 + i];
        r = neuron_ref(ref_h1, ws, pm[PM_L2_B + j], 0, 0);
        ref_h2[j] = (r > 0) ? r : 0;
      end
      for (int j = 0; j < N_OUT; j++) begin
        for (int i = 0; i < N_H2; i++) ws[i] = pm[PM_L3_W + j * N_H2 + i];
        r = neuron_ref(ref_h2, ws, 0, 0, 0);
        checks++;
        if (r != lg[j]) begin
          failures++;
          $display("FAIL beat %0d output %0d got %0d exp %0d", beat, j, lg[j], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_normalizer: streams 256-sample windows (random amplitudes, a flat window,
// a window with gaps in s_valid) and checks every normalised Q5.10 output, its
// address, the ready/done handshake and the cycle count.
module tb_input_normalizer;
  import fxp_pkg::*;
  import tb_ref_pkg::*;
  localparam int NI = 256;
  logic clk = 0, rst;
  logic s_valid, s_ready, wr_en, done;
  logic signed [15:0] s_data;
  logic [7:0] wr_addr;
  fxp_t wr_data;
  int checks = 0, failures = 0;
  int xs[NI], mn, mx, got[NI], nwr, t0, cyc;

  always #5 clk = ~clk;

  input_normalizer #(.N_IN_P(NI), .SW(16)) dut (
    .clk(clk), .rst(rst), .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data), .done(done));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_en) begin
      got[wr_addr] <= int'(wr_data);
      nwr <= nwr + 1;
    end
  end

  task automatic window(input int amp, input int offs, input bit gaps);
    int exp_v, lat;
    for (int i = 0; i < NI; i++) xs[i] = offs + $urandom_range(2 * amp) - amp;
    mn = xs[0]; mx = xs[0];
    foreach (xs[i]) begin if (xs[i] < mn) mn = xs[i]; if (xs[i] > mx) mx = xs[i]; end
    nwr = 0;
    checks++;
    if (!s_ready) begin failures++; $display("FAIL not ready"); end
    for (int i = 0; i < NI; i++) begin
      if (gaps && (i % 5 == 0)) begin s_valid = 0; @(negedge clk); end
      s_valid = 1; s_data = 16'(xs[i]);
      @(negedge clk);
    end
    s_valid = 0;
    t0 = cyc;
    lat = 0;
    checks++;
    if (s_ready) begin failures++; $display("FAIL ready while normalising"); end
    while (!done && lat < 20000) begin @(negedge clk); lat++; end
    @(negedge clk);
    cmp("writes", nwr, NI);
    cmp("cycles", lat, NI * 29);
    for (int i = 0; i < NI; i++) cmp($sformatf("x%0d", i), got[i], norm_ref(xs[i], mn, mx));
  endtask

  task automatic cmp(input string tag, input int g, input int e);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", tag, g, e);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; s_valid = 0; s_data = '0; cyc = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    window(1000, 0, 0);
    window(32767, 0, 1);
    window(0, 123, 0);       // flat: all zeros
    window(200, -5000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

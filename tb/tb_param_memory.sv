// tb_param_memory: fills the whole parameter memory with a pattern, reads it back
// with the one-clock read latency, and checks that out-of-range writes do nothing.
module tb_param_memory;
  import fxp_pkg::*;
  logic clk = 0, we;
  logic [PM_AW-1:0] waddr, raddr;
  fxp_t wdata, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  param_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  function automatic fxp_t pat(int a);
    return fxp_t'((a * 40503 + 7) & 16'hFFFF);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    @(negedge clk);
    for (int a = 0; a < PM_DEPTH; a++) begin
      we = 1; waddr = PM_AW'(a); wdata = pat(a);
      @(negedge clk);
    end
    we = 1; waddr = PM_AW'(PM_DEPTH + 3); wdata = 16'h1234;  // out of range
    @(negedge clk);
    we = 0;
    for (int a = 0; a < PM_DEPTH; a++) begin
      raddr = PM_AW'(a);
      @(negedge clk);
      checks++;
      if (rdata != pat(a)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h", a, rdata);
      end
    end
    raddr = PM_AW'(PM_DEPTH + 3);
    @(negedge clk);
    checks++;
    if (rdata != '0) begin failures++; $display("FAIL out-of-range read %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

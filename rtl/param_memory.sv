// param_memory: on-chip store of all network weights and biases (Q5.10).
//
// DEPTH words of 16 bits: the 4096 + 256 + 112 weights of the three dense layers and
// the 16 + 16 biases of the two hidden layers, at the addresses fixed in fxp_pkg
// (weights neuron-major, i.e. layer-1 weight of neuron j, input i at 256*j + i).
// The host writes it through the write port before classification; the sequencer
// reads it with one clock of latency (rdata follows raddr of the previous edge), a
// shape that maps onto an FPGA block RAM. The memory organisation is this design's
// choice. Contents are not reset.
module param_memory
  import fxp_pkg::*;
#(
  parameter int unsigned DEPTH = PM_DEPTH,
  parameter int unsigned AW    = PM_AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fxp_t          wdata,
  input  logic [AW-1:0] raddr,
  output fxp_t          rdata
);
  fxp_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule

// ecg_mlp_top: arrhythmia classifier for one heartbeat window of 256 ECG samples.
//
// The network is a 256-16-16-7 multi-layer perceptron (ReLU hidden layers, softmax
// output, biases in the two hidden layers only) in Q5.10 fixed point. Instead of one
// circuit per neuron, the layers are computed one neuron at a time on a reused neuron:
// an approximate "layer-1" neuron for the first dense layer and an approximate
// "layer-2/3" neuron for the other two, the split the source design makes because the
// first layer holds over 90 % of the multiplications and can tolerate the cheapest
// arithmetic. Each layer's outputs go to a small buffer that is the next layer's input.
//
// Flow: (1) a 256-sample window arrives on s_valid/s_ready (raw signed samples) and is
// min-max normalised into the input buffer; (2) the sequencer runs layer 1 (16 neurons
// x 256 inputs), layer 2 (16 x 16) and layer 3 (7 x 16, no bias, no ReLU), reading
// weights and biases from the parameter memory; (3) softmax turns the 7 output values
// into probabilities; res_valid pulses with res_class, res_prob and res_logit.
//
// Per neuron: reset the neuron and fetch its bias (2 clocks), then one input every two
// clocks (operands latched, then start), then 2 clocks to finish and store the output.
// One window costs 2*4464 + 5*39 clocks of network and ~240 softmax clocks after normalisation, which itself
// takes 256 load clocks plus 256*29 clocks. The host loads the parameters through
// pm_we/pm_addr/pm_wdata (layout in fxp_pkg) before the first window; new samples are
// accepted only while the sequencer is idle. Using two neuron instances and on-chip
// buffers in place of the source design's file-based neuron testbench is this design's
// choice; rst is synchronous.
module ecg_mlp_top
  import fxp_pkg::*;
#(
  parameter neuron_kind_e L1_KIND  = NK_APPROX_L1,
  parameter neuron_kind_e L23_KIND = NK_APPROX_L23
) (
  input  logic              clk,
  input  logic              rst,
  // parameter memory load port
  input  logic              pm_we,
  input  logic [PM_AW-1:0]  pm_addr,
  input  fxp_t              pm_wdata,
  // ECG window input
  input  logic              s_valid,
  output logic              s_ready,
  input  logic signed [15:0] s_data,
  // result
  output logic              res_valid,
  output ecg_class_e        res_class,
  output logic [15:0]       res_prob  [N_OUT],
  output fxp_t              res_logit [N_OUT]
);
  typedef enum logic [3:0] {
    T_IDLE, T_NSTART, T_NBIAS, T_ISSUE, T_LATCH, T_GO, T_FIN, T_STORE,
    T_SM_START, T_SM_WAIT
  } tstate_e;

  tstate_e      state;
  logic [1:0]   layer;
  logic [3:0]   j;          // neuron index within the layer
  logic [8:0]   i;          // input index within the neuron
  logic [8:0]   n_in_c;
  logic [4:0]   n_out_c;

  fxp_t in_buf [N_IN];
  fxp_t h1 [N_H1];
  fxp_t h2 [N_H2];
  fxp_t logit [N_OUT];

  fxp_t x_q, w_q, bias_q, x_c;
  logic [PM_AW-1:0] raddr_c;
  fxp_t             pm_rdata;

  // normalizer
  logic             nz_valid, nz_ready, nz_wr, nz_done;
  logic [7:0]       nz_addr;
  fxp_t             nz_data;

  // neurons
  logic n1_rst, n1_start, n1_busy, n1_done, n1_sat;
  logic n2_rst, n2_start, n2_busy, n2_done, n2_sat;
  fxp_t n1_z, n1_y, n2_z, n2_y;
  logic clear, go;

  // softmax
  logic        sm_start, sm_busy, sm_done;
  logic [15:0] sm_prob [N_OUT];
  logic [2:0]  sm_pred;

  // ---------------------------------------------------------------- input side
  assign nz_valid = s_valid && (state == T_IDLE);
  assign s_ready  = nz_ready && (state == T_IDLE);

  input_normalizer #(.N_IN_P(N_IN), .SW(16)) u_norm (
    .clk(clk), .rst(rst), .s_valid(nz_valid), .s_ready(nz_ready), .s_data(s_data),
    .wr_en(nz_wr), .wr_addr(nz_addr), .wr_data(nz_data), .done(nz_done));

  always_ff @(posedge clk)
    if (nz_wr) in_buf[nz_addr] <= nz_data;

  // ---------------------------------------------------------------- parameters
  always_comb begin
    n_in_c  = (layer == 2'd0) ? 9'(N_IN) : 9'(N_H1);
    n_out_c = (layer == 2'd0) ? 5'(N_H1) : (layer == 2'd1) ? 5'(N_H2) : 5'(N_OUT);
    if (state == T_NSTART)
      raddr_c = (layer == 2'd0) ? PM_AW'(PM_L1_B + 32'(j)) : PM_AW'(PM_L2_B + 32'(j));
    else
      case (layer)
        2'd0:    raddr_c = PM_AW'(PM_L1_W + 32'(j) * N_IN + 32'(i));
        2'd1:    raddr_c = PM_AW'(PM_L2_W + 32'(j) * N_H1 + 32'(i));
        default: raddr_c = PM_AW'(PM_L3_W + 32'(j) * N_H2 + 32'(i));
      endcase
    case (layer)
      2'd0:    x_c = in_buf[i[7:0]];
      2'd1:    x_c = h1[i[3:0]];
      default: x_c = h2[i[3:0]];
    endcase
  end

  param_memory #(.DEPTH(PM_DEPTH), .AW(PM_AW)) u_pm (
    .clk(clk), .we(pm_we), .waddr(pm_addr), .wdata(pm_wdata),
    .raddr(raddr_c), .rdata(pm_rdata));

  // ---------------------------------------------------------------- neurons
  assign clear    = (state == T_NSTART);
  assign go       = (state == T_GO);
  assign n1_rst   = rst || (clear && layer == 2'd0);
  assign n2_rst   = rst || (clear && layer != 2'd0);
  assign n1_start = go && (layer == 2'd0);
  assign n2_start = go && (layer != 2'd0);

  neuron #(.KIND(L1_KIND)) u_neuron_l1 (
    .clk(clk), .rst(n1_rst), .start(n1_start), .x(x_q), .w(w_q), .bias(bias_q),
    .busy(n1_busy), .done(n1_done), .z(n1_z), .y(n1_y), .sat(n1_sat));

  neuron #(.KIND(L23_KIND)) u_neuron_l23 (
    .clk(clk), .rst(n2_rst), .start(n2_start), .x(x_q), .w(w_q), .bias(bias_q),
    .busy(n2_busy), .done(n2_done), .z(n2_z), .y(n2_y), .sat(n2_sat));

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= T_IDLE;
      layer     <= '0;
      j         <= '0;
      i         <= '0;
      x_q       <= '0;
      w_q       <= '0;
      bias_q    <= '0;
      sm_start  <= 1'b0;
      res_valid <= 1'b0;
      res_class <= CLS_N;
      for (int k = 0; k < N_OUT; k++) begin
        res_prob[k]  <= '0;
        res_logit[k] <= '0;
        logit[k]     <= '0;
      end
      for (int k = 0; k < N_H1; k++) h1[k] <= '0;
      for (int k = 0; k < N_H2; k++) h2[k] <= '0;
    end else begin
      sm_start  <= 1'b0;
      res_valid <= 1'b0;
      case (state)
        T_IDLE: if (nz_done) begin
          layer <= 2'd0;
          j     <= '0;
          state <= T_NSTART;
        end
        T_NSTART: state <= T_NBIAS;                 // neuron cleared, bias address out
        T_NBIAS: begin
          bias_q <= (layer == 2'd2) ? '0 : pm_rdata;  // output layer has no bias
          i      <= '0;
          state  <= T_ISSUE;
        end
        T_ISSUE: state <= T_LATCH;                  // weight i read on this edge
        T_LATCH: begin
          x_q   <= x_c;
          w_q   <= pm_rdata;
          i     <= i + 1'b1;                        // next weight read during T_GO
          state <= T_GO;
        end
        T_GO: state <= (i == n_in_c) ? T_FIN : T_LATCH;
        T_FIN: state <= T_STORE;                    // neuron in its summation state
        T_STORE: begin
          case (layer)
            2'd0:    h1[j] <= n1_y;
            2'd1:    h2[j] <= n2_y;
            default: logit[j[2:0]] <= n2_z;
          endcase
          if (5'(j) == n_out_c - 1'b1) begin
            j <= '0;
            if (layer == 2'd2) begin
              sm_start <= 1'b1;
              state    <= T_SM_START;
            end else begin
              layer <= layer + 1'b1;
              state <= T_NSTART;
            end
          end else begin
            j     <= j + 1'b1;
            state <= T_NSTART;
          end
        end
        T_SM_START: state <= T_SM_WAIT;
        T_SM_WAIT: if (sm_done) begin
          res_valid <= 1'b1;
          res_class <= ecg_class_e'(sm_pred);
          res_prob  <= sm_prob;
          res_logit <= logit;
          state     <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  softmax #(.N(N_OUT)) u_softmax (
    .clk(clk), .rst(rst), .start(sm_start), .logits(logit),
    .busy(sm_busy), .done(sm_done), .prob(sm_prob), .pred(sm_pred));

  // The neuron must have finished its last summation when its output is stored.
  a_store_done: assert property (@(posedge clk) disable iff (rst)
    (state == T_STORE) |-> ((layer == 2'd0) ? n1_done : n2_done));

endmodule

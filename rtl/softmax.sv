// softmax: output activation of the last layer, o_i = e^(x_i) / sum_j e^(x_j).
//
// Following the look-up-table approach the source design adopts for softmax, the
// exponentials come from a small table and the normalisation costs N-1 additions and
// N divisions. The table and the number formats are this design's choice:
//   * subtract the largest logit m, so every exponent d_i = m - x_i is >= 0 and
//     e^(x_i - m) lies in (0, 1];
//   * write e^(-d) = 2^(-t) with t = d * log2(e) (log2(e) = 47274 / 2^15); the integer
//     part n of t becomes a right shift, the top 5 fraction bits k index a 32-entry
//     table of 2^(-k/32) in unsigned Q1.15, computed at elaboration as successive
//     powers of 2^(-1/32) (1050733751 / 2^30);
//   * add the seven exponentials (6 adders) and divide each by the sum with one shared
//     bit-serial divider: prob_i = (e_i << 15) / sum, unsigned Q1.15 (1.0 = 32768).
// pred is the index of the largest logit (lowest index on a tie), i.e. the class with
// the highest probability.
//
// Timing: start latches the logits; one clock later the exponentials and their sum are
// registered, then the seven divisions take 33 clocks each; done pulses when prob and
// pred are all valid (about 235 clocks after start). rst is synchronous.
module softmax
  import fxp_pkg::*;
#(
  parameter int unsigned N        = N_OUT,
  parameter int unsigned LUT_BITS = 5
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  fxp_t           logits [N],
  output logic           busy,
  output logic           done,
  output logic [15:0]    prob [N],
  output logic [2:0]     pred
);
  localparam int unsigned LUT_N  = 1 << LUT_BITS;
  localparam int unsigned SUM_W  = 16 + $clog2(N) + 1;
  localparam logic [15:0] LOG2E_Q15 = 16'd47274;
  localparam logic [31:0] ROOT_Q30  = 32'd1050733751;  // 2^(-1/32) in Q2.30

  typedef logic [15:0] lut_t [LUT_N];

  // Table of 2^(-k/LUT_N) in unsigned Q1.15, by repeated multiplication in Q2.30.
  function automatic lut_t make_lut();
    lut_t        t;
    logic [63:0] v;
    v = 64'd1 << 30;
    for (int k = 0; k < LUT_N; k++) begin
      t[k] = 16'((v + 64'd16384) >> 15);
      v    = (v * 64'(ROOT_Q30) + (64'd1 << 29)) >> 30;
    end
    return t;
  endfunction

  localparam lut_t EXP_LUT = make_lut();

  typedef enum logic [1:0] {S_IDLE, S_EXP, S_DIV, S_WAIT} state_e;

  state_e            state;
  fxp_t              x_q [N];
  logic [15:0]       e_c [N];
  logic [15:0]       e_q [N];
  logic [SUM_W-1:0]  sum_c, sum_q;
  fxp_t              max_c;
  logic [2:0]        arg_c;
  logic [2:0]        idx;
  logic              div_start, div_busy, div_done;
  logic [31:0]       div_quo;

  // Largest logit and its index.
  always_comb begin
    max_c = x_q[0];
    arg_c = '0;
    for (int i = 1; i < N; i++)
      if (x_q[i] > max_c) begin
        max_c = x_q[i];
        arg_c = 3'(i);
      end
  end

  // Exponentials from the table, and their sum.
  always_comb begin
    logic [15:0]         d;
    logic [31:0]         t;
    logic [6:0]          n;
    logic [LUT_BITS-1:0] k;
    sum_c = '0;
    for (int i = 0; i < N; i++) begin
      d = 16'({max_c[15], max_c} - {x_q[i][15], x_q[i]});  // m - x_i in Q.10, 0..65535
      t = 32'(d) * 32'(LOG2E_Q15);                        // 25 fraction bits
      n = t[31:25];
      k = t[24:25-LUT_BITS];
      e_c[i] = (n >= 7'd16) ? 16'd0 : (EXP_LUT[k] >> n[3:0]);
      sum_c  = sum_c + SUM_W'(e_c[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      idx   <= '0;
      sum_q <= '0;
      pred  <= '0;
      div_start <= 1'b0;
      for (int i = 0; i < N; i++) begin
        x_q[i]  <= '0;
        e_q[i]  <= '0;
        prob[i] <= '0;
      end
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          x_q   <= logits;
          state <= S_EXP;
        end
        S_EXP: begin
          e_q       <= e_c;
          sum_q     <= sum_c;
          pred      <= arg_c;
          idx       <= '0;
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV: state <= S_WAIT;  // divider picks up div_start on this edge
        S_WAIT: if (div_done) begin
          prob[idx] <= div_quo[15:0];
          if (32'(idx) == N - 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx       <= idx + 1'b1;
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  seq_divider #(.NW(32), .DW(SUM_W)) u_div (
    .clk(clk), .rst(rst), .start(div_start),
    .num({1'b0, e_q[idx], 15'd0}),
    .den(sum_q),
    .busy(div_busy), .done(div_done), .quo(div_quo));

endmodule

// input_normalizer: min-max normalisation of one heartbeat window at the input layer,
//   x'_i = (x_i - min) / (max - min),
// so that every network input lies in [0, 1] whatever instrument recorded the ECG.
//
// Phase 1 (s_ready high): N_IN signed raw samples are accepted on a valid/ready
// handshake, stored in a local buffer, and the running minimum and maximum are kept.
// Phase 2: for each stored sample the shared bit-serial divider computes
// ((x_i - min) << 10) / (max - min), the Q5.10 value (0 .. 1024), which is written out
// on wr_en/wr_addr/wr_data into the network's input buffer. done pulses after the last
// write and the block returns to phase 1. A flat window (max = min) yields zeros.
// The raw sample format (signed SW-bit codes), the truncation of the quotient and the
// sequential division are this design's choices; the formula is the source design's.
// Timing: N_IN clocks to load (one sample per clock at most), then N_IN*(SW+12) clocks
// to normalise. rst is synchronous.
module input_normalizer
  import fxp_pkg::*;
#(
  parameter int unsigned N_IN_P = N_IN,
  parameter int unsigned SW     = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      s_valid,
  output logic                      s_ready,
  input  logic signed [SW-1:0]      s_data,
  output logic                      wr_en,
  output logic [$clog2(N_IN_P)-1:0] wr_addr,
  output fxp_t                      wr_data,
  output logic                      done
);
  localparam int unsigned AW = $clog2(N_IN_P);
  localparam int unsigned DW = SW + 1;            // range of a difference
  localparam int unsigned NW = DW + FXP_FRAC;     // dividend width

  typedef enum logic [1:0] {S_LOAD, S_DIV, S_WAIT} state_e;

  state_e               state;
  logic signed [SW-1:0] raw [N_IN_P];
  logic signed [SW-1:0] mn, mx;
  logic [AW-1:0]        cnt;
  logic                 div_start, div_busy, div_done;
  logic [NW-1:0]        div_quo;
  logic [DW-1:0]        range_c, diff_c;

  always_comb begin
    range_c = DW'({mx[SW-1], mx} - {mn[SW-1], mn});
    diff_c  = DW'({raw[cnt][SW-1], raw[cnt]} - {mn[SW-1], mn});
  end

  assign s_ready = (state == S_LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_LOAD;
      cnt       <= '0;
      mn        <= '0;
      mx        <= '0;
      wr_en     <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      done      <= 1'b0;
      div_start <= 1'b0;
    end else begin
      wr_en     <= 1'b0;
      done      <= 1'b0;
      div_start <= 1'b0;
      case (state)
        S_LOAD: if (s_valid) begin
          raw[cnt] <= s_data;
          if (cnt == '0) begin
            mn <= s_data;
            mx <= s_data;
          end else begin
            if (s_data < mn) mn <= s_data;
            if (s_data > mx) mx <= s_data;
          end
          cnt <= cnt + 1'b1;
          if (32'(cnt) == N_IN_P - 1) begin
            cnt       <= '0;
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: state <= S_WAIT;  // divider takes div_start on this edge
        S_WAIT: if (div_done) begin
          wr_en   <= 1'b1;
          wr_addr <= cnt;
          wr_data <= (range_c == '0) ? '0 : fxp_t'(div_quo);
          if (32'(cnt) == N_IN_P - 1) begin
            cnt   <= '0;
            done  <= 1'b1;
            state <= S_LOAD;
          end else begin
            cnt       <= cnt + 1'b1;
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  seq_divider #(.NW(NW), .DW(DW)) u_div (
    .clk(clk), .rst(rst), .start(div_start),
    .num({diff_c, {FXP_FRAC{1'b0}}}), .den(range_c),
    .busy(div_busy), .done(div_done), .quo(div_quo));

endmodule

// neuron: one multiply-accumulate neuron of a dense layer, reused for every neuron of
// a layer by resetting it between neurons.
//
// Datapath: the Q5.10 product x*w is added to the running sum by the summation adder
// (saturating, with a carry-in); a second, bias adder adds the bias to the new sum and
// its result is registered as z; y = ReLU(z). Control is a two-state machine, following
// the source design: S_CARRY waits for start and sets the carry-in for this summation,
// S_SUM registers the new sum. The carry-in alternates 0, 1, 0, ... over consecutive
// summations after reset, which the source design uses to offset the bias of the
// truncating multiplier.
//
// KIND selects the adders: NK_ACCURATE uses exact adders; NK_APPROX_L1 approximates the
// lowest 2 bits of the summation, NK_APPROX_L23 the lowest 4, and both approximate the
// lowest 8 bits of the bias addition. The approximate 4x4 multiplier cells of the source
// design are not modelled: every kind uses the accurate multiplier.
//
// Timing: start is taken in S_CARRY; the next cycle is S_SUM; done pulses the cycle
// after that, with z and y updated, and sat flags that either adder clamped. A new start is accepted when busy is low, so the
// rate is one input every two clocks. x, w and bias are not registered and must be held
// from start until done. rst is synchronous and clears the sum, the output and the carry.
module neuron
  import fxp_pkg::*;
#(
  parameter neuron_kind_e KIND = NK_ACCURATE
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fxp_t x,
  input  fxp_t w,
  input  fxp_t bias,
  output logic busy,
  output logic done,
  output fxp_t z,
  output fxp_t y,
  output logic sat
);
  typedef enum logic {S_CARRY = 1'b0, S_SUM = 1'b1} state_e;

  state_e state;
  fxp_t   acc, prod, sum_next, biased;
  logic   carry;
  logic   ovf_sum, ovf_bias;

  fxp_multiplier u_mul (.a(x), .b(w), .p(prod));

  sat_adder #(.W(FXP_W), .APPROX_BITS(sum_approx_bits(KIND))) u_add_sum (
    .a(acc), .b(prod), .cin(carry), .s(sum_next), .ovf(ovf_sum));

  sat_adder #(.W(FXP_W), .APPROX_BITS(bias_approx_bits(KIND))) u_add_bias (
    .a(sum_next), .b(bias), .cin(1'b0), .s(biased), .ovf(ovf_bias));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_CARRY;
      carry <= 1'b1;       // toggled to 0 before the first summation
      acc   <= '0;
      z     <= '0;
      done  <= 1'b0;
      sat   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_CARRY: if (start) begin
          carry <= ~carry;
          state <= S_SUM;
        end
        S_SUM: begin
          acc   <= sum_next;
          z     <= biased;
          done  <= 1'b1;
          sat   <= ovf_sum | ovf_bias;
          state <= S_CARRY;
        end
        default: state <= S_CARRY;
      endcase
    end
  end

  assign busy = (state == S_SUM);

  relu #(.W(FXP_W)) u_relu (.x(z), .y(y));

  // The operands must not change while the summation is in progress.
  property p_hold_operands;
    @(posedge clk) disable iff (rst) (state == S_SUM) |-> ($stable(x) && $stable(w) && $stable(bias));
  endproperty
  a_hold_operands: assert property (p_hold_operands);

  property p_no_start_when_busy;
    @(posedge clk) disable iff (rst) busy |-> !start;
  endproperty
  a_no_start_when_busy: assert property (p_no_start_when_busy);

endmodule

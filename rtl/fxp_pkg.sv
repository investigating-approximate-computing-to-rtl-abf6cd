// fxp_pkg: shared number format and type definitions of the ECG classifier.
//
// All data in the datapath is 16-bit two's-complement fixed point with 1 sign bit,
// 5 integer bits and 10 fraction bits (Q5.10), the format chosen in the source design
// as a margin over the 12 bits its accuracy sweep needed. The package also holds the
// network shape (256-16-16-7), the neuron kinds (accurate and the two approximate
// variants) and the seven output classes.
package fxp_pkg;

  localparam int unsigned FXP_W    = 16;  // total width
  localparam int unsigned FXP_FRAC = 10;  // fraction bits
  localparam int unsigned FXP_INT  = 5;   // integer bits (plus the sign)

  typedef logic signed [FXP_W-1:0] fxp_t;

  localparam fxp_t FXP_MAX = 16'sh7FFF;
  localparam fxp_t FXP_MIN = 16'sh8000;
  localparam fxp_t FXP_ONE = fxp_t'(1 << FXP_FRAC);

  // Network shape: 256 inputs, two hidden layers of 16, 7 output classes.
  localparam int unsigned N_IN  = 256;
  localparam int unsigned N_H1  = 16;
  localparam int unsigned N_H2  = 16;
  localparam int unsigned N_OUT = 7;

  // Parameter memory layout (weights neuron-major, then the biases of layers 1 and 2).
  localparam int unsigned PM_L1_W = 0;
  localparam int unsigned PM_L2_W = PM_L1_W + N_IN * N_H1;   // 4096
  localparam int unsigned PM_L3_W = PM_L2_W + N_H1 * N_H2;   // 4352
  localparam int unsigned PM_L1_B = PM_L3_W + N_H2 * N_OUT;  // 4464
  localparam int unsigned PM_L2_B = PM_L1_B + N_H1;          // 4480
  localparam int unsigned PM_DEPTH = PM_L2_B + N_H2;         // 4496
  localparam int unsigned PM_AW   = 13;

  // Neuron variants: the accurate neuron and the two approximate ones.
  typedef enum logic [1:0] {
    NK_ACCURATE   = 2'd0,
    NK_APPROX_L1  = 2'd1,  // summation 2 approximate bits, bias 8
    NK_APPROX_L23 = 2'd2   // summation 4 approximate bits, bias 8
  } neuron_kind_e;

  function automatic int unsigned sum_approx_bits(neuron_kind_e k);
    case (k)
      NK_APPROX_L1:  return 2;
      NK_APPROX_L23: return 4;
      default:       return 0;
    endcase
  endfunction

  function automatic int unsigned bias_approx_bits(neuron_kind_e k);
    return (k == NK_ACCURATE) ? 0 : 8;
  endfunction

  // Output classes, in output-neuron order.
  typedef enum logic [2:0] {
    CLS_N     = 3'd0,  // normal beat
    CLS_L     = 3'd1,  // left bundle branch block
    CLS_R     = 3'd2,  // right bundle branch block
    CLS_V     = 3'd3,  // premature ventricular contraction
    CLS_PACED = 3'd4,  // paced beat
    CLS_A     = 3'd5,  // atrial premature beat
    CLS_OTHER = 3'd6   // catch-all for rarer arrhythmias
  } ecg_class_e;

endpackage

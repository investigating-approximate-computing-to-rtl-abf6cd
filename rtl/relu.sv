// relu: rectified linear unit of the hidden layers, y = x when x > 0, else 0.
// A single sign test, as in the source design; combinational. Applied to the
// pre-activation value of the two hidden layers (the output layer uses softmax).
module relu #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  assign y = x[W-1] ? '0 : x;
endmodule

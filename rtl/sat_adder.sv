// sat_adder: 16-bit two's-complement adder with carry-in and saturation.
//
// Overflow can only happen when both operands have the same sign and the sum comes
// out with the opposite sign; the result is then clamped to the largest positive or
// negative value of the operands' sign, as in the source design.
//
// APPROX_BITS > 0 makes the lowest APPROX_BITS bits approximate, as the approximate
// neurons do (2 or 4 bits for the running sum, 8 bits for the bias). The source design
// names only "the most area-efficient 1-bit adder" for these bits; this design uses a
// lower-part OR cell: each low sum bit is a|b, and the carry into the accurate upper
// part is a&b of the highest approximate bit. The carry-in then has no effect.
// Interface: purely combinational; ovf flags a clamped result.
module sat_adder #(
  parameter int unsigned W           = 16,
  parameter int unsigned APPROX_BITS = 0
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                cin,
  output logic signed [W-1:0] s,
  output logic                ovf
);
  localparam int unsigned K = (APPROX_BITS > W - 1) ? W - 1 : APPROX_BITS;

  logic [W-1:0] raw;

  generate
    if (K == 0) begin : g_exact
      assign raw = W'(a) + W'(b) + W'(cin);
    end else begin : g_approx
      logic [K-1:0]   low;
      logic [W-K-1:0] high;
      logic           c_k;
      always_comb begin
        low  = a[K-1:0] | b[K-1:0];
        c_k  = a[K-1] & b[K-1];
        high = a[W-1:K] + b[W-1:K] + (W-K)'(c_k);
      end
      assign raw = {high, low};
    end
  endgenerate

  always_comb begin
    ovf = (a[W-1] == b[W-1]) && (raw[W-1] != a[W-1]);
    if (!ovf)
      s = raw;
    else if (a[W-1])
      s = {1'b1, {(W-1){1'b0}}};
    else
      s = {1'b0, {(W-1){1'b1}}};
  end
endmodule

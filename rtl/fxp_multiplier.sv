// fxp_multiplier: signed Q5.10 x Q5.10 multiplier.
//
// The operand magnitudes go through the recursive unsigned 16x16 multiplier; the
// 32-bit product is negated when the signs differ, which gives the two's-complement
// product with its binary point at bit 20. As in the source design the result keeps
// bit 31 as the sign, bits 24..20 as the integer part and bits 19..10 as the fraction,
// without rounding and without saturation: a product beyond the Q5.10 range wraps.
// The sign handling around the unsigned core is this design's choice.
// Interface: p = a * b in Q5.10, purely combinational.
module fxp_multiplier
  import fxp_pkg::*;
(
  input  fxp_t a,
  input  fxp_t b,
  output fxp_t p
);
  logic [15:0] mag_a, mag_b;
  logic [31:0] umag, prod;
  logic        neg;

  always_comb begin
    mag_a = a[15] ? 16'(-a) : 16'(a);  // |-32768| = 32768 still fits in 16 unsigned bits
    mag_b = b[15] ? 16'(-b) : 16'(b);
    neg   = a[15] ^ b[15];
  end

  mult_16x16 u_core (.a(mag_a), .b(mag_b), .p(umag));

  always_comb begin
    prod = neg ? (~umag + 32'd1) : umag;
    p    = fxp_t'({prod[31], prod[24:10]});
  end
endmodule

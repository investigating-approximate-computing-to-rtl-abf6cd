// mult_16x16: unsigned 16x16 multiplier built from four 8x8 multipliers.
//
// Same recursion as mult_8x8 one level up: the four byte products are shifted by
// 0, 8, 8 and 16 bits and summed into the 32-bit product. The source design notes
// that the multiplier fed with the two low bytes toggles most, as the fraction bits
// of Q5.10 data carry the most ones.
// Interface: p = a * b, purely combinational.
module mult_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] p_ll, p_lh, p_hl, p_hh;

  mult_8x8 u_ll (.a(a[7:0]),  .b(b[7:0]),  .p(p_ll));
  mult_8x8 u_lh (.a(a[7:0]),  .b(b[15:8]), .p(p_lh));
  mult_8x8 u_hl (.a(a[15:8]), .b(b[7:0]),  .p(p_hl));
  mult_8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(p_hh));

  assign p = 32'(p_ll) + (32'(p_lh) << 8) + (32'(p_hl) << 8) + (32'(p_hh) << 16);
endmodule

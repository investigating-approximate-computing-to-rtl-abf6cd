// mult_8x8: unsigned 8x8 multiplier built recursively from four 4x4 cells.
//
// The operands are split into high and low nibbles; the four partial products
// aL*bL, aL*bH, aH*bL and aH*bH are shifted by 0, 4, 4 and 8 bits and summed.
// Interface: p = a * b, purely combinational.
module mult_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] p_ll, p_lh, p_hl, p_hh;

  mult_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(p_ll));
  mult_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(p_lh));
  mult_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(p_hl));
  mult_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(p_hh));

  assign p = 16'(p_ll) + (16'(p_lh) << 4) + (16'(p_hl) << 4) + (16'(p_hh) << 8);
endmodule

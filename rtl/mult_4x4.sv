// mult_4x4: accurate unsigned 4x4-bit multiplier, the leaf cell of the recursive
// 16x16 multiplier (16x16 = four 8x8, 8x8 = four 4x4).
//
// The recursive 4x4 -> 8x8 -> 16x16 structure follows the source design, whose
// approximate neurons replace exactly this cell with an approximate 4x4 multiplier.
// Those cells are defined elsewhere and are not modelled, so every multiplier here
// uses this accurate cell.
// Interface: p = a * b, purely combinational.
module mult_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  // Shift-and-add of the four partial products.
  always_comb begin
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p = p + (8'(a) << i);
  end
endmodule

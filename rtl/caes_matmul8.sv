// caes_matmul8: 8-bit matrix multiplier over GF(2), y = M * x.
//
// The 64-bit matrix holds eight 8-bit columns, column j in bits 8j+7..8j
// (the image of input bit j); the output is the XOR of the columns whose
// input bit is set.  With M = [xtime^0(c) .. xtime^7(c)] this multiplies
// by the field constant c, so the same unit serves field-basis changes,
// affine matrices and the configurable MixColumns.  Combinational.
module caes_matmul8
  import caes_pkg::*;
(
  input  mat8_t m,
  input  byte_t x,
  output byte_t y
);
  always_comb begin
    y = '0;
    for (int j = 0; j < 8; j++)
      y ^= m[8*j +: 8] & {8{x[j]}};
  end
endmodule

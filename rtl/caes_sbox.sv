// caes_sbox: configurable S-box (SubBytes) for one byte.
//
// y = (A*delta'^-1) * Inv(delta' * x) + c_A.  delta' maps the polynomial
// basis of the chosen m(x) into the composite field GF((2^4)^2), the inverse
// is taken there, and the merged matrix A*delta'^-1 maps back and applies the
// affine matrix in one step; c_A is the affine constant.  All three are
// run-time inputs, so m(x), A and c_A can change without new tables.  Used
// four times as SubWord() in the key generator.  Combinational.
module caes_sbox
  import caes_pkg::*;
(
  input  mat8_t d,     // delta'
  input  mat8_t adi,   // A * delta'^-1
  input  byte_t ca,    // affine constant
  input  byte_t x,
  output byte_t y
);
  byte_t xc, inv;

  caes_matmul8 u_in  (.m(d),   .x(x),   .y(xc));
  caes_gf_inv  u_inv (.a(xc),  .y(inv));

  byte_t yl;
  caes_matmul8 u_out (.m(adi), .x(inv), .y(yl));

  assign y = yl ^ ca;
endmodule

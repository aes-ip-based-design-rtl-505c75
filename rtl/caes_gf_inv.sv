// caes_gf_inv: multiplicative inverse of one byte in the composite field
// GF((2^4)^2), q0(y) = y^4+y+1 and q1(x) = x^2+x+w with w = {1001}.
//
// An input byte is s = s_h*x + s_l (s_h = bits 7..4).  Following the extended
// Euclidean derivation, Theta = (s_h^2*w + (s_h+s_l)*s_l)^-1 in GF(2^4) and the
// inverse is s_h*Theta*x + (s_h+s_l)*Theta: a squarer, a multiply-by-w, three
// GF(2^4) multipliers and one GF(2^4) inverter.  Zero maps to zero.
// The GF(2^4) inverter evaluates A^14 = A^2*A^4*A^8 (the design's own
// choice of a closed form for A^14).  Purely combinational.
module caes_gf_inv
  import caes_pkg::*;
(
  input  byte_t a,   // composite-field element
  output byte_t y    // its inverse
);
  logic [3:0] sh, sl, sx, sq_w, prod, theta;

  always_comb begin
    sh    = a[7:4];
    sl    = a[3:0];
    sx    = sh ^ sl;
    sq_w  = gf16_mulw(gf16_sq(sh));
    prod  = gf16_mul(sx, sl);
    theta = gf16_inv(sq_w ^ prod);
    y     = {gf16_mul(sh, theta), gf16_mul(sx, theta)};
  end
endmodule

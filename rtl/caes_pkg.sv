// caes_pkg: types and combinational helper functions shared by the
// configurable-AES (C-AES) coprocessor.
//
// Bit-matrix convention: an 8x8 matrix over GF(2) is held as 64 bits, eight
// bytes, where byte j (bits 8j+7..8j) is the image of basis vector e_j, i.e.
// column j.  y = M*x is then the XOR of the columns selected by the bits of x.
// This is the form of the xtime^i(c) columns of the MixColumns multiplier
// (one column per bit of the data byte).  A matrix product P = M1*M2 is eight
// matrix-vector products: column j of P is M1 * (column j of M2).
//
// The composite field GF((2^4)^2) uses q0(y)=y^4+y+1 for GF(2^4) and
// q1(x)=x^2+x+w, w={1001}, for the extension, as in the design's S-box.  An
// 8-bit composite element is {s_h, s_l} with s_h in bits 7..4.
package caes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [63:0]  mat8_t;

  // Key length code of the Key Length pin: 00 128-bit, 01 192-bit, 10 256-bit.
  typedef enum logic [1:0] {
    KL128 = 2'b00,
    KL192 = 2'b01,
    KL256 = 2'b10
  } keylen_e;

  // Parameters prepared by the parameter initialization engine and consumed
  // by the cipher engine and the key generator (one set, for the mode chosen
  // at initialization).
  typedef struct packed {
    mat8_t        d;    // delta'   : polynomial basis of m(x) -> composite field
    mat8_t        di;   // delta'^-1
    mat8_t        adi;  // A * delta'^-1
    mat8_t        dai;  // delta' * A^-1
    mat8_t [3:0]  mc;   // merged MixColumns' / InvMixColumns' matrices
    byte_t        m;    // m(x) without its x^8 term
    byte_t        ca;   // affine constant c_A
    byte_t        cap;  // c'_A = delta' * A^-1 * c_A
  } caes_params_t;

  localparam int unsigned PARAM_WORDS = 10;

  function automatic byte_t matvec(input mat8_t mtx, input byte_t v);
    byte_t r;
    r = '0;
    for (int j = 0; j < 8; j++)
      if (v[j]) r ^= mtx[8*j +: 8];
    return r;
  endfunction

  function automatic mat8_t matmul(input mat8_t m1, input mat8_t m2);
    mat8_t r;
    for (int j = 0; j < 8; j++)
      r[8*j +: 8] = matvec(m1, m2[8*j +: 8]);
    return r;
  endfunction

  // xtime in GF(2^8) modulo x^8 + m.
  function automatic byte_t xtime_m(input byte_t a, input byte_t m);
    return a[7] ? ({a[6:0], 1'b0} ^ m) : {a[6:0], 1'b0};
  endfunction

  // ---------------- GF(2^4), q0 = y^4 + y + 1 ----------------
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r, t;
    r = '0;
    t = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= t;
      t = {t[2:0], 1'b0} ^ (t[3] ? 4'b0011 : 4'b0000);
    end
    return r;
  endfunction

  // A^2 (eq. squarer): a3 y^3 + (a3^a1) y^2 + a2 y + (a2^a0)
  function automatic logic [3:0] gf16_sq(input logic [3:0] a);
    return {a[3], a[3] ^ a[1], a[2], a[2] ^ a[0]};
  endfunction

  // A * w, w = {1001}: a0 y^3 + a3 y^2 + a2 y + (a1^a0)
  function automatic logic [3:0] gf16_mulw(input logic [3:0] a);
    return {a[0], a[3], a[2], a[1] ^ a[0]};
  endfunction

  // A^-1 = A^14 = A^2 * A^4 * A^8 (0 maps to 0).
  function automatic logic [3:0] gf16_inv(input logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf16_sq(a);
    a4 = gf16_sq(a2);
    a8 = gf16_sq(a4);
    return gf16_mul(gf16_mul(a2, a4), a8);
  endfunction

  // Inverse in GF((2^4)^2): Theta = (sh^2 w + sh sl + sl^2)^-1,
  // result = sh*Theta x + (sh+sl)*Theta.
  function automatic byte_t gf256c_inv(input byte_t s);
    logic [3:0] sh, sl, sx, th;
    sh = s[7:4];
    sl = s[3:0];
    sx = sh ^ sl;
    th = gf16_inv(gf16_mulw(gf16_sq(sh)) ^ gf16_mul(sx, sl));
    return {gf16_mul(sh, th), gf16_mul(sx, th)};
  endfunction

  function automatic int unsigned nr_of(input keylen_e kl);
    case (kl)
      KL192:   return 12;
      KL256:   return 14;
      default: return 10;
    endcase
  endfunction

  function automatic int unsigned nk_of(input keylen_e kl);
    case (kl)
      KL192:   return 6;
      KL256:   return 8;
      default: return 4;
    endcase
  endfunction

  // State byte (row r, column c) sits at byte index 4c+r, byte 0 being
  // bits 127..120 as in FIPS-197.
  function automatic byte_t st_byte(input block_t b, input int r, input int c);
    return b[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic block_t shift_rows(input block_t b);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = st_byte(b, r, (c + r) % 4);
    return o;
  endfunction

  function automatic block_t inv_shift_rows(input block_t b);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = st_byte(b, r, (c + 4 - r) % 4);
    return o;
  endfunction

endpackage

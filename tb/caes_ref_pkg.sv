// caes_ref_pkg: reference model for the testbenches of the C-AES
// coprocessor, written independently of the RTL.
//
// It computes configurable AES directly in the polynomial basis of m(x):
// field multiplication by shift-and-add, inversion by search, S-box
// y = A*x^-1 + c_A, MixColumns with an arbitrary row vector, the FIPS-197
// key schedule with Rcon = x^(i-1) mod m(x), and the CBC mode.  For the
// hardware it derives the basis change delta' by searching the composite
// field GF((2^4)^2) (q0 = y^4+y+1, q1 = x^2+x+{1001}) for a root of m(x),
// inverts bit matrices by search and builds the ten parameter words.
// Matrices are eight 8-bit columns, column j in bits 8j+7..8j.
package caes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [63:0]  m64;
  typedef logic [127:0] u128;
  typedef logic [31:0]  u32;

  typedef struct {
    u8  m;        // m(x) without x^8
    m64 a;        // affine matrix
    m64 ai;       // its inverse
    u8  ca;       // affine constant
    u32 crow;     // MixColumns row {c0,c1,c2,c3}
    u32 drow;     // InvMixColumns row
    m64 d;        // delta'
    m64 di;       // delta'^-1
  } cfg_t;

  function automatic u8 gmul(u8 a, u8 b, u8 m);
    u8 r = 0;
    u8 t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= t;
      t = t[7] ? (u8'(t << 1) ^ m) : u8'(t << 1);
    end
    return r;
  endfunction

  function automatic u8 ginv(u8 a, u8 m);
    if (a == 0) return 0;
    for (int b = 1; b < 256; b++)
      if (gmul(a, u8'(b), m) == 8'h01) return u8'(b);
    return 0;
  endfunction

  // x^8 + m irreducible <=> no zero divisors.
  function automatic bit irreducible(u8 m);
    if (!m[0]) return 0;
    for (int a = 2; a < 256; a++)
      for (int b = a; b < 256; b++)
        if (gmul(u8'(a), u8'(b), m) == 0) return 0;
    return 1;
  endfunction

  function automatic u8 mv(m64 mx, u8 v);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      bit acc = 0;
      for (int j = 0; j < 8; j++) acc ^= mx[8*j + i] & v[j];
      r[i] = acc;
    end
    return r;
  endfunction

  function automatic m64 mm(m64 a, m64 b);
    m64 r;
    for (int j = 0; j < 8; j++) r[8*j +: 8] = mv(a, b[8*j +: 8]);
    return r;
  endfunction

  function automatic bit minv(m64 a, output m64 r);
    r = 0;
    for (int j = 0; j < 8; j++) begin
      bit found = 0;
      for (int x = 0; x < 256; x++)
        if (!found && mv(a, u8'(x)) == u8'(1 << j)) begin
          r[8*j +: 8] = u8'(x);
          found = 1;
        end
      if (!found) return 0;
    end
    return 1;
  endfunction

  // Matrix of multiplication by the constant c: columns xtime^i(c).
  function automatic m64 cmat(u8 c, u8 m);
    m64 r;
    for (int i = 0; i < 8; i++) r[8*i +: 8] = gmul(c, u8'(1 << i), m);
    return r;
  endfunction

  // ---- composite field GF((2^4)^2) ----
  function automatic logic [3:0] g16(logic [3:0] a, logic [3:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 8'(a) << i;
    for (int i = 7; i >= 4; i--) if (p[i]) p ^= 8'b10011 << (i - 4);
    return p[3:0];
  endfunction

  function automatic u8 cmul(u8 a, u8 b);
    logic [3:0] hh = g16(a[7:4], b[7:4]);
    logic [3:0] hi = hh ^ g16(a[7:4], b[3:0]) ^ g16(a[3:0], b[7:4]);
    logic [3:0] lo = g16(a[3:0], b[3:0]) ^ g16(hh, 4'h9);
    return {hi, lo};
  endfunction

  // delta': columns gamma^i for a root gamma of x^8 + m in the composite field.
  function automatic bit find_delta(u8 m, output m64 d, output m64 di);
    d = 0; di = 0;
    for (int g = 2; g < 256; g++) begin
      u8 pw [9];
      u8 acc;
      pw[0] = 8'h01;
      for (int i = 1; i <= 8; i++) pw[i] = cmul(pw[i-1], u8'(g));
      acc = pw[8];
      for (int i = 0; i < 8; i++) if (m[i]) acc ^= pw[i];
      if (acc == 0) begin
        for (int i = 0; i < 8; i++) d[8*i +: 8] = pw[i];
        if (minv(d, di)) return 1;
      end
    end
    return 0;
  endfunction

  // ---- configurable AES ----
  function automatic u8 sbox(cfg_t c, u8 x);
    return mv(c.a, ginv(x, c.m)) ^ c.ca;
  endfunction

  function automatic u8 isbox(cfg_t c, u8 y);
    return ginv(mv(c.ai, y ^ c.ca), c.m);
  endfunction

  function automatic u8 sb(u128 s, int r, int col);
    return s[127 - 8*(4*col + r) -: 8];
  endfunction

  function automatic u128 mixc(u128 s, u32 row, u8 m);
    u128 o;
    u8 cf [4];
    for (int k = 0; k < 4; k++) cf[k] = row[31 - 8*k -: 8];
    for (int col = 0; col < 4; col++)
      for (int r = 0; r < 4; r++) begin
        u8 acc = 0;
        for (int j = 0; j < 4; j++) acc ^= gmul(cf[(j - r + 4) % 4], sb(s, j, col), m);
        o[127 - 8*(4*col + r) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic u128 shrows(u128 s, bit inv);
    u128 o;
    for (int col = 0; col < 4; col++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*col + r) -: 8] = inv ? sb(s, r, (col + 4 - r) % 4) : sb(s, r, (col + r) % 4);
    return o;
  endfunction

  // Inverse row vector of the circulant MixColumns matrix (Gauss-Jordan).
  function automatic bit inv_row(u32 row, u8 m, output u32 drow);
    u8 a [4][8];
    u8 cf [4];
    drow = 0;
    for (int k = 0; k < 4; k++) cf[k] = row[31 - 8*k -: 8];
    for (int r = 0; r < 4; r++)
      for (int j = 0; j < 8; j++)
        a[r][j] = (j < 4) ? cf[(j - r + 4) % 4] : ((j - 4 == r) ? 8'h01 : 8'h00);
    for (int col = 0; col < 4; col++) begin
      int piv = -1;
      u8 iv;
      for (int r = col; r < 4; r++) if (piv < 0 && a[r][col] != 0) piv = r;
      if (piv < 0) return 0;
      for (int j = 0; j < 8; j++) begin u8 t = a[col][j]; a[col][j] = a[piv][j]; a[piv][j] = t; end
      iv = ginv(a[col][col], m);
      for (int j = 0; j < 8; j++) a[col][j] = gmul(a[col][j], iv, m);
      for (int r = 0; r < 4; r++)
        if (r != col && a[r][col] != 0) begin
          u8 f = a[r][col];
          for (int j = 0; j < 8; j++) a[r][j] ^= gmul(f, a[col][j], m);
        end
    end
    for (int k = 0; k < 4; k++) drow[31 - 8*k -: 8] = a[0][4 + k];
    return 1;
  endfunction

  function automatic int nr_of(int kl);
    return kl == 1 ? 12 : kl == 2 ? 14 : 10;
  endfunction

  function automatic int nk_of(int kl);
    return kl == 1 ? 6 : kl == 2 ? 8 : 4;
  endfunction

  // Round key i of the expanded key (kl: 0/1/2 = 128/192/256).
  function automatic u128 round_key(cfg_t c, logic [255:0] key, int kl, int i);
    u32 w [64];
    int nk = nk_of(kl);
    int nr = nr_of(kl);
    u8  rc = 8'h01;
    for (int k = 0; k < nk; k++) w[k] = key[255 - 32*k -: 32];
    for (int j = nk; j < 4*(nr+1); j++) begin
      u32 t = w[j-1];
      if (j % nk == 0) begin
        t = {t[23:0], t[31:24]};
        for (int b = 0; b < 4; b++) t[8*b +: 8] = sbox(c, t[8*b +: 8]);
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02, c.m);
      end else if (nk == 8 && j % nk == 4) begin
        for (int b = 0; b < 4; b++) t[8*b +: 8] = sbox(c, t[8*b +: 8]);
      end
      w[j] = w[j-nk] ^ t;
    end
    return {w[4*i], w[4*i+1], w[4*i+2], w[4*i+3]};
  endfunction

  function automatic u128 encrypt(cfg_t c, logic [255:0] key, int kl, u128 pt);
    int nr = nr_of(kl);
    u128 s = pt ^ round_key(c, key, kl, 0);
    for (int r = 1; r <= nr; r++) begin
      u128 t = shrows(s, 0);
      for (int b = 0; b < 16; b++) t[8*b +: 8] = sbox(c, t[8*b +: 8]);
      if (r != nr) t = mixc(t, c.crow, c.m);
      s = t ^ round_key(c, key, kl, r);
    end
    return s;
  endfunction

  function automatic u128 decrypt(cfg_t c, logic [255:0] key, int kl, u128 ct);
    int nr = nr_of(kl);
    u128 s = ct ^ round_key(c, key, kl, nr);
    for (int r = nr - 1; r >= 0; r--) begin
      u128 t = shrows(s, 1);
      for (int b = 0; b < 16; b++) t[8*b +: 8] = isbox(c, t[8*b +: 8]);
      t ^= round_key(c, key, kl, r);
      if (r != 0) t = mixc(t, c.drow, c.m);
      s = t;
    end
    return s;
  endfunction

  // Standard AES configuration.
  function automatic cfg_t std_cfg();
    cfg_t c;
    c.m = 8'h1B;
    for (int j = 0; j < 8; j++) c.a[8*j +: 8] = u8'({8'h1F, 8'h1F} >> (8 - j));
    void'(minv(c.a, c.ai));
    c.ca   = 8'h63;
    c.crow = 32'h02030101;
    c.drow = 32'h0E0B0D09;
    void'(find_delta(c.m, c.d, c.di));
    return c;
  endfunction

  // Random valid configuration (irreducible m, invertible A and C).
  function automatic cfg_t rand_cfg();
    cfg_t c;
    do c.m = u8'($urandom) | 8'h01; while (!irreducible(c.m));
    do c.a = {$urandom, $urandom}; while (!minv(c.a, c.ai));
    c.ca = u8'($urandom);
    do c.crow = $urandom; while (!inv_row(c.crow, c.m, c.drow));
    void'(find_delta(c.m, c.d, c.di));
    return c;
  endfunction

  // The ten parameter words for the given direction.
  function automatic u32 param_word(cfg_t c, bit ende, int idx);
    case (idx)
      0: return {16'h0, c.ca, c.m};
      1: return ende ? c.drow : c.crow;
      2: return c.ai[63:32];
      3: return c.ai[31:0];
      4: return c.d[63:32];
      5: return c.d[31:0];
      6: return c.di[63:32];
      7: return c.di[31:0];
      8: return c.a[63:32];
      default: return c.a[31:0];
    endcase
  endfunction

endpackage

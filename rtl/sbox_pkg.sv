// sbox_pkg: field arithmetic and mapping matrices for the composite-field
// Rijndael Sbox.
//
// The Sbox works in GF((2^4)^2) instead of GF(2^8). The ground field GF(2^4)
// uses the polynomial y^4+y+1 (0x13); the extension uses x^2+x+w14 with
// w14 = 0x9, the 14th power of the generator w = 0x2. A composite element
// a1*x+a0 is stored as one byte with a1 in bits 7:4 and a0 in bits 3:0, so
// the root x of the extension polynomial (called alpha) is the byte 0x10.
//
// alpha is primitive in GF((2^4)^2). The eight powers of alpha that are roots
// of the Rijndael polynomial m(z) = z^8+z^4+z^3+z+1 are alpha^5, alpha^10,
// alpha^20, alpha^40, alpha^80, alpha^160, alpha^65 and alpha^130; each gives
// one isomorphism z -> alpha^k. The functions below build, at elaboration,
// the 8x8 GF(2) matrices of that isomorphism (T), of its inverse, and of the
// inverse merged with the Rijndael affine transformation. Matrices are packed
// as eight 8-bit columns: column i is the image of input bit i. For k = 5
// the matrix T equals the published one for the most compact circuit.
//
// All functions are constant functions used only to compute parameters; the
// hardware itself is written gate by gate in the modules.
package sbox_pkg;

  typedef logic [3:0] nibble_t;
  typedef logic [7:0] byte_t;
  // Eight columns of an 8x8 matrix over GF(2); col[i] is the image of bit i.
  typedef logic [7:0][7:0] gf2_matrix_t;

  // 128-bit State; byte i = row (i mod 4), column (i div 4). Byte 0 is the
  // most significant byte of the packed vector.
  typedef byte_t [0:15] state_t;

  localparam nibble_t W14 = 4'h9;       // w^14, constant of x^2 + x + w14
  localparam byte_t   ALPHA = 8'h10;    // root x of the extension polynomial
  localparam byte_t   AFFINE_C = 8'h63; // Rijndael affine constant

  // GF(2^4) product modulo y^4+y+1, shift-and-add form.
  function automatic nibble_t gf4_mul_f(nibble_t a, nibble_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'h13 << (i - 4);
    return p[3:0];
  endfunction

  // GF((2^4)^2) product modulo x^2+x+w14.
  function automatic byte_t gf24_mul_f(byte_t a, byte_t b);
    nibble_t hh, c1, c0;
    hh = gf4_mul_f(a[7:4], b[7:4]);
    c1 = gf4_mul_f(a[7:4], b[3:0]) ^ gf4_mul_f(a[3:0], b[7:4]) ^ hh;
    c0 = gf4_mul_f(a[3:0], b[3:0]) ^ gf4_mul_f(hh, W14);
    return {c1, c0};
  endfunction

  function automatic byte_t gf24_pow_f(byte_t a, int unsigned n);
    byte_t r;
    r = 8'h01;
    for (int unsigned i = 0; i < n; i++) r = gf24_mul_f(r, a);
    return r;
  endfunction

  // Matrix-vector product over GF(2).
  function automatic byte_t mat_apply(gf2_matrix_t m, byte_t v);
    byte_t r;
    r = '0;
    for (int i = 0; i < 8; i++) if (v[i]) r ^= m[i];
    return r;
  endfunction

  // Matrix product a*b over GF(2).
  function automatic gf2_matrix_t mat_mul(gf2_matrix_t a, gf2_matrix_t b);
    gf2_matrix_t r;
    for (int i = 0; i < 8; i++) r[i] = mat_apply(a, b[i]);
    return r;
  endfunction

  // T: GF(2^8) -> GF((2^4)^2), z^i -> (alpha^k)^i.
  function automatic gf2_matrix_t iso_matrix(int unsigned k);
    gf2_matrix_t t;
    byte_t beta;
    beta = gf24_pow_f(ALPHA, k);
    for (int i = 0; i < 8; i++) t[i] = gf24_pow_f(beta, i);
    return t;
  endfunction

  // Inverse of a nonsingular matrix: column j is the vector v with m*v = e_j.
  function automatic gf2_matrix_t mat_inverse(gf2_matrix_t m);
    gf2_matrix_t r;
    for (int j = 0; j < 8; j++) begin
      r[j] = '0;
      for (int v = 0; v < 256; v++)
        if (mat_apply(m, byte_t'(v)) == byte_t'(1 << j)) r[j] = byte_t'(v);
    end
    return r;
  endfunction

  // Linear part A of the Rijndael affine transformation:
  // b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7), indices mod 8.
  function automatic gf2_matrix_t affine_matrix();
    gf2_matrix_t a;
    for (int j = 0; j < 8; j++) begin
      a[j] = '0;
      for (int i = 0; i < 8; i++)
        if (j == i || j == (i + 4) % 8 || j == (i + 5) % 8 ||
            j == (i + 6) % 8 || j == (i + 7) % 8)
          a[j][i] = 1'b1;
    end
    return a;
  endfunction

  // A * T^-1: inverse mapping and affine transformation in one matrix.
  function automatic gf2_matrix_t inv_iso_affine_matrix(int unsigned k);
    return mat_mul(affine_matrix(), mat_inverse(iso_matrix(k)));
  endfunction

  // T * A^-1: inverse affine transformation and mapping in one matrix.
  function automatic gf2_matrix_t inv_affine_iso_matrix(int unsigned k);
    return mat_mul(iso_matrix(k), mat_inverse(affine_matrix()));
  endfunction

  // Constant added after T * A^-1: T * A^-1 * 0x63.
  function automatic byte_t inv_affine_iso_const(int unsigned k);
    return mat_apply(inv_affine_iso_matrix(k), AFFINE_C);
  endfunction

  // True when alpha^k is one of the eight roots of m(z).
  function automatic bit iso_power_valid(int unsigned k);
    byte_t b;
    b = gf24_pow_f(ALPHA, k);
    return (gf24_pow_f(b, 8) ^ gf24_pow_f(b, 4) ^ gf24_pow_f(b, 3) ^ b ^ 8'h01) == 8'h00;
  endfunction

endpackage

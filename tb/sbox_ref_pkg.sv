// sbox_ref_pkg: reference models used by the testbenches.
//
// Everything here is computed the slow, direct way and shares no code with
// the design: GF(2^8) products by shift-and-add modulo z^8+z^4+z^3+z+1,
// inverses by exhaustive search, the Sbox from the definition (inverse, then
// the affine transformation bit by bit), composite-field products from the
// definition of GF((2^4)^2) with x^2+x+w14, and AES key expansion and
// encryption as in FIPS-197.
package sbox_ref_pkg;

  typedef logic [7:0] rbyte_t;
  typedef rbyte_t rtable_t [256];

  // ---- GF(2^8), Rijndael polynomial ----
  function automatic rbyte_t gf8_mul(rbyte_t a, rbyte_t b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic rbyte_t gf8_inv(rbyte_t a);
    for (int b = 1; b < 256; b++) if (gf8_mul(a, rbyte_t'(b)) == 8'h01) return rbyte_t'(b);
    return 8'h00;
  endfunction

  // Affine transformation, bit by bit as in the standard.
  function automatic rbyte_t affine(rbyte_t b);
    rbyte_t r;
    rbyte_t c = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return r;
  endfunction

  function automatic rtable_t sbox_table();
    rtable_t t;
    for (int a = 0; a < 256; a++) t[a] = affine(gf8_inv(rbyte_t'(a)));
    return t;
  endfunction

  function automatic rtable_t inv_table(rtable_t s);
    rtable_t t;
    for (int a = 0; a < 256; a++) t[s[a]] = rbyte_t'(a);
    return t;
  endfunction

  // ---- GF(2^4), y^4+y+1 ----
  function automatic logic [3:0] gf4_mul(logic [3:0] a, logic [3:0] b);
    logic [3:0] r, x;
    r = '0; x = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'h3 : 4'h0);
    end
    return r;
  endfunction

  // ---- GF((2^4)^2), x^2 + x + 0x9; high nibble = coefficient of x ----
  function automatic rbyte_t gf24_mul(rbyte_t a, rbyte_t b);
    logic [3:0] p2, p1, p0;
    p2 = gf4_mul(a[7:4], b[7:4]);                                  // x^2 term
    p1 = gf4_mul(a[7:4], b[3:0]) ^ gf4_mul(a[3:0], b[7:4]);
    p0 = gf4_mul(a[3:0], b[3:0]);
    // x^2 = x + 9
    return {p1 ^ p2, p0 ^ gf4_mul(p2, 4'h9)};
  endfunction

  function automatic rbyte_t gf24_pow(rbyte_t a, int n);
    rbyte_t r = 8'h01;
    for (int i = 0; i < n; i++) r = gf24_mul(r, a);
    return r;
  endfunction

  // Isomorphism z -> alpha^k, alpha = 0x10, applied to a GF(2^8) byte.
  function automatic rbyte_t to_composite(int k, rbyte_t a);
    rbyte_t beta, r;
    beta = gf24_pow(8'h10, k);
    r = '0;
    for (int i = 0; i < 8; i++) if (a[i]) r ^= gf24_pow(beta, i);
    return r;
  endfunction

  // ---- AES (FIPS-197), State as 128 bits, byte 0 most significant ----
  typedef logic [127:0] block_t;

  function automatic rbyte_t get_b(block_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic block_t ref_round(rtable_t sb, block_t s, block_t k, bit last);
    rbyte_t st [16];
    rbyte_t t  [16];
    block_t o;
    for (int i = 0; i < 16; i++) st[i] = sb[get_b(s, i)];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) t[4*c + r] = st[4*((c + r) % 4) + r];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        rbyte_t a0, a1, a2, a3;
        a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
        t[4*c]   = gf8_mul(2, a0) ^ gf8_mul(3, a1) ^ a2 ^ a3;
        t[4*c+1] = a0 ^ gf8_mul(2, a1) ^ gf8_mul(3, a2) ^ a3;
        t[4*c+2] = a0 ^ a1 ^ gf8_mul(2, a2) ^ gf8_mul(3, a3);
        t[4*c+3] = gf8_mul(3, a0) ^ a1 ^ a2 ^ gf8_mul(2, a3);
      end
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = t[i];
    return o ^ k;
  endfunction

  // Key expansion for Nk = 4, 6 or 8 words; returns Nr+1 round keys.
  function automatic void expand_key(rtable_t sb, logic [255:0] key, int nk,
                                     output block_t rk [15]);
    logic [31:0] w [60];
    logic [31:0] tmp;
    rbyte_t rcon;
    int nr;
    nr = nk + 6;
    rcon = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      tmp = w[i-1];
      if (i % nk == 0) begin
        tmp = {tmp[23:0], tmp[31:24]};
        tmp = {sb[tmp[31:24]], sb[tmp[23:16]], sb[tmp[15:8]], sb[tmp[7:0]]};
        tmp[31:24] ^= rcon;
        rcon = gf8_mul(rcon, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        tmp = {sb[tmp[31:24]], sb[tmp[23:16]], sb[tmp[15:8]], sb[tmp[7:0]]};
      end
      w[i] = w[i-nk] ^ tmp;
    end
    for (int r = 0; r < 15; r++)
      rk[r] = (r <= nr) ? {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]} : '0;
  endfunction

  function automatic block_t encrypt(rtable_t sb, block_t rk [15], int nr, block_t pt);
    block_t s;
    s = pt ^ rk[0];
    for (int r = 1; r <= nr; r++) s = ref_round(sb, s, rk[r], r == nr);
    return s;
  endfunction

endpackage

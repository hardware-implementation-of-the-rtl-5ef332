// gf24_inverse: multiplicative inverse in the composite field GF((2^4)^2).
//
// For A = a1*x + a0 (a1 in bits 7:4, a0 in bits 3:0) and extension
// polynomial x^2+x+w14, the inverse is
//   B = b1*x + b0 = (a1*x + (a1+a0)) / d,   d = a0*(a1+a0) + a1^2*w14
// so the 8-bit inversion reduces to one 4-bit inversion plus small GF(2^4)
// operators:
//   adder        t  = a1 + a0
//   multiplier   p  = a0 * t
//   squarer      q  = a1^2
//   const mult.  r  = q * w14
//   adder        d  = p + r
//   inverter     di = d^-1
//   multiplier   b1 = a1 * di
//   multiplier   b0 = t  * di
// Zero maps to zero (d = 0 and the inverter returns 0). Combinational; the
// longest path runs adder, multiplier, adder, inverter, multiplier.
module gf24_inverse
  import sbox_pkg::*;
(
  input  byte_t a,
  output byte_t b
);
  nibble_t a1, a0, t, p, q, r, d, di, b1, b0;

  assign a1 = a[7:4];
  assign a0 = a[3:0];

  gf4_adder     u_add_t  (.a(a1), .b(a0), .c(t));
  gf4_mul       u_mul_p  (.a(a0), .b(t),  .c(p));
  gf4_squarer   u_sq     (.a(a1), .b(q));
  gf4_const_mul u_cmul   (.a(q),  .b(r));
  gf4_adder     u_add_d  (.a(p),  .b(r),  .c(d));
  gf4_inv       u_inv    (.a(d),  .b(di));
  gf4_mul       u_mul_b1 (.a(a1), .b(di), .c(b1));
  gf4_mul       u_mul_b0 (.a(t),  .b(di), .c(b0));

  assign b = {b1, b0};
endmodule

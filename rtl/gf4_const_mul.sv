// gf4_const_mul: multiplication by the constant w^14 = 0x9 = y^3+1 in
// GF(2^4), field polynomial y^4+y+1.
//
// w^14 is the constant term of the extension polynomial x^2+x+w14. It was
// chosen because the product is almost a rewiring:
//   b0 = a0^a1, b1 = a2, b2 = a3, b3 = a0
// a single XOR gate. Combinational.
module gf4_const_mul
  import sbox_pkg::*;
(
  input  nibble_t a,
  output nibble_t b
);
  assign b = {a[0], a[3], a[2], a[0] ^ a[1]};
endmodule

// gf4_squarer: squaring in GF(2^4), field polynomial y^4+y+1.
//
// Squaring is linear over GF(2): a^2 = a0 + a1*y^2 + a2*y^4 + a3*y^6, and
// with y^4 = y+1, y^6 = y^3+y^2 this is
//   b0 = a0^a2, b1 = a2, b2 = a1^a3, b3 = a3
// which costs two XOR gates. Combinational.
module gf4_squarer
  import sbox_pkg::*;
(
  input  nibble_t a,
  output nibble_t b
);
  assign b = {a[3], a[1] ^ a[3], a[2], a[0] ^ a[2]};
endmodule

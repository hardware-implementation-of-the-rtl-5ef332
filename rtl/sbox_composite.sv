// sbox_composite: the Rijndael Sbox (SubBytes on one byte) built on composite
// field arithmetic.
//
// The byte is mapped into GF((2^4)^2) by the matrix T (direct_map), inverted
// there with one GF(2^4) inversion and a few GF(2^4) multipliers
// (gf24_inverse), and mapped back with the inverse mapping and the affine
// transformation merged into one matrix plus the constant 0x63
// (inv_map_affine). ISO_POWER selects which of the eight field isomorphisms
// is used; the default 5 gives the smallest circuit.
//
// Fully combinational: s follows a after the gate delays, no clock.
module sbox_composite
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5
) (
  input  byte_t a,
  output byte_t s
);
  byte_t y, yi;

  direct_map     #(.ISO_POWER(ISO_POWER)) u_map (.a(a),  .y(y));
  gf24_inverse                            u_inv (.a(y),  .b(yi));
  inv_map_affine #(.ISO_POWER(ISO_POWER)) u_out (.y(yi), .s(s));
endmodule

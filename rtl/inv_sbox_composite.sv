// inv_sbox_composite: the Rijndael inverse Sbox (InvSubBytes on one byte) on
// the same composite-field inverter as the forward Sbox.
//
// Here the inverse affine transformation comes first and is merged with the
// mapping T into one matrix plus a constant (inv_affine_direct_map); the
// element is inverted in GF((2^4)^2) (gf24_inverse) and mapped back with T^-1
// alone (inv_map). The cost is therefore close to that of the forward Sbox.
// ISO_POWER as in sbox_composite. Fully combinational.
module inv_sbox_composite
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5
) (
  input  byte_t s,
  output byte_t a
);
  byte_t y, yi;

  inv_affine_direct_map #(.ISO_POWER(ISO_POWER)) u_in  (.s(s),  .y(y));
  gf24_inverse                                   u_inv (.a(y),  .b(yi));
  inv_map               #(.ISO_POWER(ISO_POWER)) u_map (.y(yi), .a(a));
endmodule

// inv_affine_direct_map: inverse Rijndael affine transformation merged with
// the homomorphic mapping T, the first stage of the inverse Sbox.
//
// The inverse affine step is b = A^-1*(s ^ 0x63); mapping into the composite
// field multiplies by T. Together: y = (T*A^-1)*s ^ (T*A^-1)*0x63, one 8x8
// GF(2) matrix and a constant, both computed at elaboration for the
// isomorphism ISO_POWER (default 5, see sbox_pkg). Combinational.
module inv_affine_direct_map
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5
) (
  input  byte_t s,
  output byte_t y
);
  localparam gf2_matrix_t M = inv_affine_iso_matrix(ISO_POWER);
  localparam byte_t       C = inv_affine_iso_const(ISO_POWER);

  if (!iso_power_valid(ISO_POWER)) begin : g_bad_power
    $error("ISO_POWER must make alpha^ISO_POWER a root of the Rijndael polynomial");
  end

  always_comb y = mat_apply(M, s) ^ C;
endmodule

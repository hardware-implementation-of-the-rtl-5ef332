// inv_map: inverse homomorphic mapping T^-1 from the composite field
// GF((2^4)^2) back to GF(2^8) in the Rijndael polynomial basis, without the
// affine step. It is the last stage of the inverse Sbox. T^-1 is computed at
// elaboration for the isomorphism ISO_POWER (default 5, see sbox_pkg).
// Combinational.
module inv_map
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5
) (
  input  byte_t y,
  output byte_t a
);
  localparam gf2_matrix_t TI = mat_inverse(iso_matrix(ISO_POWER));

  if (!iso_power_valid(ISO_POWER)) begin : g_bad_power
    $error("ISO_POWER must make alpha^ISO_POWER a root of the Rijndael polynomial");
  end

  always_comb a = mat_apply(TI, y);
endmodule

// inv_map_affine: inverse homomorphic mapping merged with the Rijndael affine
// transformation.
//
// Mapping a composite-field element y back to GF(2^8) is the matrix T^-1;
// the affine step is s = A*b ^ 0x63 with
//   b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7)   (indices mod 8).
// Both are linear, so one matrix M = A*T^-1 does the two at once, and the
// constant 0x63 costs four inverters. M is computed at elaboration for the
// isomorphism ISO_POWER (default 5, see sbox_pkg). Combinational.
module inv_map_affine
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5
) (
  input  byte_t y,
  output byte_t s
);
  localparam gf2_matrix_t M = inv_iso_affine_matrix(ISO_POWER);

  if (!iso_power_valid(ISO_POWER)) begin : g_bad_power
    $error("ISO_POWER must make alpha^ISO_POWER a root of the Rijndael polynomial");
  end

  always_comb s = mat_apply(M, y) ^ AFFINE_C;
endmodule

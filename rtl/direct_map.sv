// direct_map: the homomorphic mapping T from GF(2^8) in the Rijndael
// polynomial basis to the composite field GF((2^4)^2).
//
// T is the 8x8 GF(2) matrix whose column i is beta^i, beta = alpha^ISO_POWER
// (see sbox_pkg). ISO_POWER picks one of the eight isomorphisms; the default 5
// is the one that gave the most compact Sbox, and its matrix is
//   row (output bit 7..0), column (input bit 7..0)
//   1 0 1 0 0 0 0 0
//   1 1 0 1 0 0 1 0
//   0 0 0 0 1 1 0 0
//   1 0 1 0 0 0 1 0
//   0 0 0 1 0 1 1 0
//   0 1 1 1 0 1 0 0
//   0 1 0 0 1 0 0 0
//   0 1 1 1 1 0 1 1
// The matrix is computed at elaboration; the hardware is the resulting XOR
// network. Combinational.
module direct_map
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5
) (
  input  byte_t a,
  output byte_t y
);
  localparam gf2_matrix_t T = iso_matrix(ISO_POWER);

  if (!iso_power_valid(ISO_POWER)) begin : g_bad_power
    $error("ISO_POWER must make alpha^ISO_POWER a root of the Rijndael polynomial");
  end

  always_comb y = mat_apply(T, a);
endmodule

// gf4_adder: addition in GF(2^4), a bitwise XOR of two nibbles (four XOR
// gates). Combinational.
module gf4_adder
  import sbox_pkg::*;
(
  input  nibble_t a,
  input  nibble_t b,
  output nibble_t c
);
  assign c = a ^ b;
endmodule

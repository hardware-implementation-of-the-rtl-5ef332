// gf4_mul: general multiplier in GF(2^4), field polynomial y^4+y+1.
//
// Mastrovito form: the product is c = M(a) * b, where M(a) is a 4x4 matrix
// over GF(2) whose entries are bits of a or sums of two bits of a. For
// y^4+y+1 only three such sums occur (a0^a3, a3^a2, a2^a1), so the circuit
// is 16 two-input ANDs and 15 two-input XORs (3 for the sums, 3 per output
// bit), the gate count the Mastrovito architecture is known for. Purely
// combinational, no clock.
module gf4_mul
  import sbox_pkg::*;
(
  input  nibble_t a,
  input  nibble_t b,
  output nibble_t c
);
  logic s03, s32, s21;

  always_comb begin
    s03 = a[0] ^ a[3];
    s32 = a[3] ^ a[2];
    s21 = a[2] ^ a[1];
    c[0] = (a[0] & b[0]) ^ (a[3] & b[1]) ^ (a[2] & b[2]) ^ (a[1] & b[3]);
    c[1] = (a[1] & b[0]) ^ (s03  & b[1]) ^ (s32  & b[2]) ^ (s21  & b[3]);
    c[2] = (a[2] & b[0]) ^ (a[1] & b[1]) ^ (s03  & b[2]) ^ (s32  & b[3]);
    c[3] = (a[3] & b[0]) ^ (a[2] & b[1]) ^ (a[1] & b[2]) ^ (s03  & b[3]);
  end
endmodule

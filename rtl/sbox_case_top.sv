// sbox_case_top: Rijndael round logic with composite-field Sboxes, plus a
// standalone composite-field inverse Sbox.
//
// The main part is aes_round: a 128-bit State register updated once per
// clock by a complete round (sixteen composite-field Sboxes, ShiftRows
// wiring, MixColumns, AddRoundKey). Round keys are supplied by the user, one
// per cycle, through round_key; there is no key schedule on chip. See
// aes_round for the load/step/last protocol and timing.
//
// Beside it, inv_sbox_composite computes the Rijndael inverse Sbox of inv_in
// combinationally on inv_out; it shares the composite-field inverter design
// with the forward Sbox and has no connection to the round logic.
//
// ISO_POWER selects the GF(2^8) -> GF((2^4)^2) isomorphism for every Sbox;
// the default 5 gives the smallest Sbox.
module sbox_case_top
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           step,
  input  logic           last,
  input  logic [127:0]   din,
  input  logic [127:0]   round_key,
  output logic [127:0]   state,
  input  logic [7:0]     inv_in,
  output logic [7:0]     inv_out
);
  aes_round #(.ISO_POWER(ISO_POWER)) u_round (
    .clk, .rst_n, .load, .step, .last,
    .din(state_t'(din)), .round_key(state_t'(round_key)), .state
  );

  inv_sbox_composite #(.ISO_POWER(ISO_POWER)) u_inv_sbox (.s(inv_in), .a(inv_out));
endmodule

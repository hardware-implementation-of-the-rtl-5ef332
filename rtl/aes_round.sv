// aes_round: Rijndael round logic computing one full round per clock cycle.
//
// The 128-bit State register is updated by
//   load : State <= din ^ round_key                     (initial key addition)
//   step : State <= AddRoundKey(MixColumns(ShiftRows(SubBytes(State))))
//          with MixColumns left out when last = 1 (the final round)
// SubBytes uses sixteen composite-field Sboxes in parallel (sub_bytes).
// ShiftRows costs no logic: row r is rotated left by r bytes purely by the
// choice of wires, out[r + 4c] = in[r + 4((c + r) mod 4)]. AddRoundKey is
// 128 XOR gates.
//
// The round keys come from outside, one per cycle; the block does not count
// rounds, so the same logic serves 10, 12 or 14 rounds. A 128-bit key
// encryption is: load with round key 0, nine steps with keys 1..9, one step
// with last = 1 and key 10; the ciphertext is on state after the eleventh
// rising edge. load has priority over step. rst_n clears the State
// asynchronously. The round order and the final round without MixColumns
// follow the AES standard.
module aes_round
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5,
  parameter int unsigned NSBOX = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   step,
  input  logic   last,
  input  state_t din,
  input  state_t round_key,
  output state_t state
);
  state_t sb, sr, mc, next_round;

  sub_bytes #(.ISO_POWER(ISO_POWER), .NSBOX(NSBOX)) u_sub_bytes (.din(state), .dout(sb));

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[r + 4*c] = sb[r + 4*((c + r) % 4)];
  end

  mix_columns u_mix_columns (.din(sr), .dout(mc));

  assign next_round = (last ? sr : mc) ^ round_key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (load)  state <= din ^ round_key;
    else if (step)  state <= next_round;
  end
endmodule

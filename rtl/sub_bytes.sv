// sub_bytes: the SubBytes step for the whole 128-bit State, sixteen
// composite-field Sboxes side by side, one per State byte, so that a full
// round fits in one clock cycle. Combinational.
module sub_bytes
  import sbox_pkg::*;
#(
  parameter int unsigned ISO_POWER = 5,
  parameter int unsigned NSBOX = 16
) (
  input  state_t din,
  output state_t dout
);
  if (NSBOX != 16) begin : g_bad_nsbox
    $error("NSBOX must be 16: one Sbox per State byte");
  end

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox_composite #(.ISO_POWER(ISO_POWER)) u_sbox (.a(din[i]), .s(dout[i]));
  end
endmodule

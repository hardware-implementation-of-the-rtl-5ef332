// mix_columns: the MixColumns step for the whole State.
//
// Each column (bytes 4c..4c+3, top row first) is taken as a polynomial over
// GF(2^8) and multiplied modulo x^4+1 by the fixed polynomial
// a(x) = {03}x^3 + {01}x^2 + {01}x + {02} of the AES standard. Only constant
// multipliers are needed: {02}*b is xtime (shift left, xor 0x1b when the top
// bit falls out) and {03}*b = xtime(b) ^ b, so the block is a pure XOR
// network. Combinational.
module mix_columns
  import sbox_pkg::*;
(
  input  state_t din,
  output state_t dout
);
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // out_r = 2*in_r ^ 3*in_(r+1) ^ in_(r+2) ^ in_(r+3)
        dout[4*c + r] = xtime(din[4*c + r])
                      ^ xtime(din[4*c + (r+1)%4]) ^ din[4*c + (r+1)%4]
                      ^ din[4*c + (r+2)%4]
                      ^ din[4*c + (r+3)%4];
      end
    end
  end
endmodule

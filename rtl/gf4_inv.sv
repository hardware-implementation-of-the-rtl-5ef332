// gf4_inv: multiplicative inverse in GF(2^4), field polynomial y^4+y+1.
//
// Written as a 16-entry look-up table, left to synthesis to reduce to gates.
// Entry a holds a^14 = a^-1; entry 0 holds 0, so that the whole Sbox maps
// {00} to the image of zero as the Rijndael standard requires.
// Combinational.
module gf4_inv
  import sbox_pkg::*;
(
  input  nibble_t a,
  output nibble_t b
);
  always_comb begin
    unique case (a)
      4'h0: b = 4'h0;
      4'h1: b = 4'h1;
      4'h2: b = 4'h9;
      4'h3: b = 4'he;
      4'h4: b = 4'hd;
      4'h5: b = 4'hb;
      4'h6: b = 4'h7;
      4'h7: b = 4'h6;
      4'h8: b = 4'hf;
      4'h9: b = 4'h2;
      4'ha: b = 4'hc;
      4'hb: b = 4'h5;
      4'hc: b = 4'ha;
      4'hd: b = 4'h4;
      4'he: b = 4'h3;
      4'hf: b = 4'h8;
    endcase
  end
endmodule

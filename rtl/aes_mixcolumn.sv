// aes_mixcolumn: MixColumns on one column of the AES state.
//
// The column (a0 a1 a2 a3, a0 in the top byte) is treated as a polynomial over
// GF(2^8) and multiplied by a(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo
// x^4 + 1, which gives
//   b0 = 2a0 ^ 3a1 ^  a2 ^  a3     b1 =  a0 ^ 2a1 ^ 3a2 ^  a3
//   b2 =  a0 ^  a1 ^ 2a2 ^ 3a3     b3 = 3a0 ^  a1 ^  a2 ^ 2a3
// The 32-bit AES has one such unit and uses it once per cycle.
// Interface: din (32) -> dout (32), combinational.
module aes_mixcolumn
  import aes_pkg::*;
(
  input  word_t din,
  output word_t dout
);

  byte_t a [4];
  byte_t a2 [4];

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      a[r]  = din[31 - 8*r -: 8];
      a2[r] = xtime(a[r]);
    end
    for (int r = 0; r < 4; r++) begin
      // b_r = 2*a_r ^ 3*a_{r+1} ^ a_{r+2} ^ a_{r+3}
      dout[31 - 8*r -: 8] = a2[r]
                          ^ a2[(r + 1) % 4] ^ a[(r + 1) % 4]
                          ^ a[(r + 2) % 4]
                          ^ a[(r + 3) % 4];
    end
  end

endmodule

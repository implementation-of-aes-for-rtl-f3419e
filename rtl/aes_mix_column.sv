// aes_mix_column: MixColumns of one 32-bit state column in GF(2^8).
//
// Each output byte is the GF(2^8) sum of the four column bytes multiplied by
// the circulant coefficients {02,03,01,01}. Multiplication by 02 is xtime
// (shift left, reduce by 0x1b) and by 03 is xtime plus the byte itself, so the
// unit is four xtime multipliers and a 32-bit XOR network. Row 0 is the top
// byte of the word. Purely combinational. Building the unit from GF(2^8)
// multipliers and a 32-bit XOR per column follows the published design; the xtime
// form of the multipliers is this design's choice.
module aes_mix_column
  import aes_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);

  byte_t a [4];
  byte_t x2 [4];

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      a[r]  = col_in[31 - 8 * r -: 8];
      x2[r] = xtime(a[r]);
    end
    for (int r = 0; r < 4; r++) begin
      // out[r] = 2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3]
      col_out[31 - 8 * r -: 8] = x2[r] ^ x2[(r + 1) % 4] ^ a[(r + 1) % 4]
                               ^ a[(r + 2) % 4] ^ a[(r + 3) % 4];
    end
  end

endmodule

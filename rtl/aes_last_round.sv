// aes_last_round: the final (tenth) AES-128 round as a 128-bit unit.
//
// The last round has no MixColumns. The state from the ninth round is
// shifted (ShiftRows), every byte is substituted through its own S-box table
// (16 tables) and the last round key, words 40..43 of the expanded key, is
// added by XOR. The result is the ciphertext. Purely combinational.
module aes_last_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t last_key,
  output block_t ciphertext
);

  for (genvar c = 0; c < NB; c++) begin : g_col
    word_t shifted;
    word_t subbed;
    assign shifted = shifted_column(state_in, c);
    for (genvar r = 0; r < 4; r++) begin : g_row
      aes_sbox u_sbox (.din(shifted[31 - 8 * r -: 8]), .dout(subbed[31 - 8 * r -: 8]));
    end
    assign ciphertext[127 - 32 * c -: 32] = subbed ^ last_key[127 - 32 * c -: 32];
  end

endmodule

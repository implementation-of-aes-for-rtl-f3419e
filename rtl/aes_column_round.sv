// aes_column_round: one 32-bit packet of an intermediate AES round.
//
// The packet is a state column that has already been gathered through
// ShiftRows (byte row r comes from column c+r). The unit substitutes its four
// bytes through four S-box tables, mixes the column with MixColumns and adds
// the matching 32-bit word of the round key by XOR: 64 input bits (32 data,
// 32 key) and 32 output bits, as the round transformation is described. Four
// of these work side by side in aes_round_core, one per column. Purely
// combinational.
module aes_column_round
  import aes_pkg::*;
(
  input  word_t col_in,   // ShiftRows-gathered column
  input  word_t key_in,   // round key word for this column
  output word_t col_out
);

  word_t subbed;
  word_t mixed;

  for (genvar r = 0; r < 4; r++) begin : g_sub
    aes_sbox u_sbox (.din(col_in[31 - 8 * r -: 8]), .dout(subbed[31 - 8 * r -: 8]));
  end

  aes_mix_column u_mix (.col_in(subbed), .col_out(mixed));

  assign col_out = mixed ^ key_in;

endmodule

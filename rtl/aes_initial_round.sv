// aes_initial_round: the initial AddRoundKey of AES-128.
//
// The 128-bit plaintext collected from four 32-bit words is combined with the
// 128-bit initial key (the first four expanded-key words) by XOR, column by
// column. Purely combinational; the result is written into the round core's
// 128-bit state register. The XOR of plaintext and initial key follows the
// published design; doing it combinationally on the way into the state register is
// this design's choice.
module aes_initial_round
  import aes_pkg::*;
(
  input  block_t plaintext,
  input  block_t init_key,
  output block_t state_out
);

  for (genvar c = 0; c < NB; c++) begin : g_col
    assign state_out[127 - 32 * c -: 32] = plaintext[127 - 32 * c -: 32]
                                         ^ init_key[127 - 32 * c -: 32];
  end

endmodule

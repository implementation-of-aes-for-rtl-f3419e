// aes_key_select: round-key selection from the expanded key.
//
// The expanded key holds 11 round keys of four 32-bit words. This unit hands
// the round transformation the key it needs: rk_first is words 0..3 for the
// initial round, rk_round is words 4r..4r+3 for intermediate round r (1..9,
// the "9 groups"), and rk_last is words 40..43 for the last round. rk_round is
// a multiplexer driven by the round counter; a round number outside 1..9
// gives round 1's key. Purely combinational. Selecting round keys from a
// stored expanded key follows the published design; the three separate outputs are
// this design's reading of its block diagram.
module aes_key_select
  import aes_pkg::*;
(
  input  word_t      w [NWORDS],
  input  logic [3:0] round,
  output block_t     rk_first,
  output block_t     rk_round,
  output block_t     rk_last
);

  logic [3:0] r;

  assign r = (round >= 4'd1 && round <= 4'(NR - 1)) ? round : 4'd1;

  always_comb begin
    for (int c = 0; c < NB; c++) begin
      rk_first[127 - 32 * c -: 32] = w[c];
      rk_round[127 - 32 * c -: 32] = w[NB * r + c];
      rk_last [127 - 32 * c -: 32] = w[NB * NR + c];
    end
  end

endmodule

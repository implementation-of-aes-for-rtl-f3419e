// aes_enc_top: AES-128 encryption core with 32-bit key, plaintext and
// ciphertext ports.
//
// The core encrypts 128-bit blocks (for example the pixels of an image) with
// a 128-bit key, but every port is a 32-bit word stream so the block needs
// far fewer pins. Data flow:
//   key words  -> aes_word_loader -> aes_key_expansion (44 words, stored)
//                                         |
//                                  aes_key_select (first / round r / last)
//                                         |
//   plain words -> aes_word_loader -> aes_round_core -> aes_word_unloader -> cipher words
// Each stream uses a valid/ready pair; a word moves on a rising clock edge
// where both are high. Words are sent most significant (state column 0)
// first. A key is loaded once (4 words) and expanded in 40 clocks; it stays in
// force for every following block until a new key is sent. A new key is taken
// only while the round core is idle, and blocks wait in the plaintext loader
// until the key schedule is ready. Once running, a block enters the round
// core every 10 clocks, while the next plaintext is being collected and the
// previous ciphertext is being sent out (4 words each). key_busy is high while
// a complete key is waiting or being expanded; stall is high while a finished block waits for the
// ciphertext receiver. Reset is active-low and asynchronous.
module aes_enc_top
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // key input, 4 x 32 bits
  input  logic        key_valid,
  output logic        key_ready,
  input  logic [31:0] key_word,
  // plaintext input, 4 x 32 bits
  input  logic        pt_valid,
  output logic        pt_ready,
  input  logic [31:0] pt_word,
  // ciphertext output, 4 x 32 bits, paced by ct_ready (external enable)
  output logic        ct_valid,
  input  logic        ct_ready,
  output logic [31:0] ct_word,
  output logic        ct_last,
  // status
  output logic        key_busy,
  output logic        stall
);

  block_t     key_block, pt_block, ct_block;
  logic       key_blk_valid, key_blk_ready;
  logic       pt_blk_valid, pt_blk_ready;
  logic       ct_blk_valid, ct_blk_ready;
  logic       kexp_ready, kexp_key_ready;
  logic       core_busy;
  logic [3:0] round_no;
  word_t      w [NWORDS];
  block_t     rk_first, rk_round, rk_last;

  aes_word_loader #(.WORDS(NB), .W(32)) u_key_in (
    .clk, .rst_n,
    .in_valid(key_valid), .in_ready(key_ready), .in_word(key_word),
    .out_valid(key_blk_valid), .out_ready(key_blk_ready), .out_data(key_block)
  );

  // A new key replaces the schedule only when no block is in flight.
  assign key_blk_ready = kexp_key_ready && !core_busy;

  aes_key_expansion u_kexp (
    .clk, .rst_n,
    .key_valid(key_blk_valid && !core_busy), .key_ready(kexp_key_ready),
    .key_in(key_block), .ready(kexp_ready), .w(w)
  );

  assign key_busy = !kexp_key_ready || key_blk_valid;

  aes_key_select u_ksel (
    .w(w), .round(round_no),
    .rk_first(rk_first), .rk_round(rk_round), .rk_last(rk_last)
  );

  aes_word_loader #(.WORDS(NB), .W(32)) u_pt_in (
    .clk, .rst_n,
    .in_valid(pt_valid), .in_ready(pt_ready), .in_word(pt_word),
    .out_valid(pt_blk_valid), .out_ready(pt_blk_ready), .out_data(pt_block)
  );

  aes_round_core u_core (
    .clk, .rst_n,
    .key_ok(kexp_ready && !key_blk_valid),
    .in_valid(pt_blk_valid), .in_ready(pt_blk_ready), .in_block(pt_block),
    .rk_first(rk_first), .rk_round(rk_round), .rk_last(rk_last),
    .round_no(round_no), .busy(core_busy), .stall(stall),
    .out_valid(ct_blk_valid), .out_ready(ct_blk_ready), .out_block(ct_block)
  );

  aes_word_unloader #(.WORDS(NB), .W(32)) u_ct_out (
    .clk, .rst_n,
    .in_valid(ct_blk_valid), .in_ready(ct_blk_ready), .in_data(ct_block),
    .out_valid(ct_valid), .out_ready(ct_ready), .out_word(ct_word), .out_last(ct_last)
  );

endmodule

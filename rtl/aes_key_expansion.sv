// aes_key_expansion: AES-128 key schedule, one 32-bit word per clock.
//
// The 128-bit initial key is written as expanded-key words w[0..3] when
// key_valid & key_ready. Then one new word is produced per clock for
// i = 4..43:  w[i] = w[i-4] ^ t,  where t = SubWord(RotWord(w[i-1])) ^ Rcon
// when i is a multiple of 4 and t = w[i-1] otherwise. Rcon starts at 0x01 and
// is doubled in GF(2^8) after each use. Working on single 32-bit words keeps
// the schedule to four S-box tables and one 32-bit XOR path. The 44 words
// (11 round keys) are kept in a register array for the round-key selector.
// Timing: 40 clocks after the key is taken, `ready` rises and stays high
// until the next key is taken; key_ready is low while words are produced.
// Reset is active-low and asynchronous. The 32-bit word operation follows the
// published design; computing the schedule once and storing it is this design's
// choice.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_valid,
  output logic   key_ready,
  input  block_t key_in,
  output logic   ready,
  output word_t  w [NWORDS]
);

  logic [5:0] idx;
  logic       busy;
  byte_t      rcon;
  word_t      prev, rot, sub, temp;

  assign key_ready = !busy;

  assign prev = w[idx - 6'd1];
  assign rot  = {prev[23:0], prev[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sub
    aes_sbox u_sbox (.din(rot[31 - 8 * b -: 8]), .dout(sub[31 - 8 * b -: 8]));
  end

  assign temp = (idx[1:0] == 2'd0) ? (sub ^ {rcon, 24'h0}) : prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      idx   <= '0;
      rcon  <= 8'h01;
      for (int i = 0; i < NWORDS; i++) w[i] <= '0;
    end else if (!busy) begin
      if (key_valid) begin
        for (int c = 0; c < NK; c++) w[c] <= key_in[127 - 32 * c -: 32];
        idx   <= 6'(NK);
        rcon  <= 8'h01;
        busy  <= 1'b1;
        ready <= 1'b0;
      end
    end else begin
      w[idx] <= w[idx - 6'(NK)] ^ temp;
      if (idx[1:0] == 2'd0) rcon <= xtime(rcon);
      if (idx == 6'(NWORDS - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        idx <= idx + 6'd1;
      end
    end
  end

endmodule

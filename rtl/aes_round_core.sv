// aes_round_core: iterative AES-128 round datapath with a 128-bit state
// register split into four 32-bit packets.
//
// A block accepted on in_valid & in_ready passes through the initial round
// (XOR with rk_first) into the 128-bit state register. For rounds 1..9 the
// register is read as four ShiftRows-gathered 32-bit packets; each packet goes
// through its own column unit (SubBytes, MixColumns, AddRoundKey) and the four
// results are written back to the register together, one round per clock.
// round_no tells the key selector which round key to drive on rk_round. In
// round 10 the 128-bit last-round unit turns the register into the ciphertext
// using rk_last and writes it to the output register.
//
// Overlap: in the clock that finishes round 10 the state register is free,
// so the next block may be loaded in that same clock. A new block is thus
// taken every NR = 10 clocks while input and output words are transferred by
// the loaders alongside. Latency from acceptance to out_valid is 11 clocks.
// If the previous ciphertext is still waiting in the output register
// (out_valid & !out_ready) round 10 is held and `stall` is high.
// key_ok must be high for a block to be accepted. Reset is active-low and
// asynchronous. The packet split, the nine iterated rounds and the separate
// 128-bit last round follow the published design; one round per clock and the
// handshakes are this design's choices.
module aes_round_core
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_ok,
  input  logic       in_valid,
  output logic       in_ready,
  input  block_t     in_block,
  input  block_t     rk_first,
  input  block_t     rk_round,
  input  block_t     rk_last,
  output logic [3:0] round_no,
  output logic       busy,
  output logic       stall,
  output logic       out_valid,
  input  logic       out_ready,
  output block_t     out_block
);

  block_t state;
  block_t init_state;
  block_t round_state;
  block_t last_state;
  logic   slot_free;
  logic   finishing;

  aes_initial_round u_init (.plaintext(in_block), .init_key(rk_first), .state_out(init_state));

  for (genvar c = 0; c < NB; c++) begin : g_packet
    aes_column_round u_col (
      .col_in (shifted_column(state, c)),
      .key_in (rk_round[127 - 32 * c -: 32]),
      .col_out(round_state[127 - 32 * c -: 32])
    );
  end

  aes_last_round u_last (.state_in(state), .last_key(rk_last), .ciphertext(last_state));

  assign slot_free = !out_valid || out_ready;
  assign finishing = busy && (round_no == 4'(NR)) && slot_free;
  assign stall     = busy && (round_no == 4'(NR)) && !slot_free;
  assign in_ready  = key_ok && (!busy || finishing);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      round_no  <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (finishing) begin
        out_block <= last_state;
        out_valid <= 1'b1;
        busy      <= 1'b0;
      end else if (busy && round_no < 4'(NR)) begin
        state    <= round_state;
        round_no <= round_no + 4'd1;
      end
      if (in_valid && in_ready) begin
        state    <= init_state;
        round_no <= 4'd1;
        busy     <= 1'b1;
      end
    end
  end

  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> round_no >= 4'd1 && round_no <= 4'(NR));
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_block));

endmodule

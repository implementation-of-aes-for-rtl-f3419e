// aes_word_loader: packs four consecutive 32-bit words into one 128-bit block.
//
// The key and the plaintext enter the core as four 32-bit words each, so the
// block needs 32 input pins instead of 128. Each word is shifted into a
// 128-bit register on a clock edge where in_valid (the load enable) and
// in_ready are high; the first word becomes column 0, the most significant
// word. After the fourth word the block is offered on out_data with
// out_valid high and no further word is taken until the consumer accepts the
// block with out_ready. The handshakes are valid/ready: a transfer happens on
// a rising clock edge where both are high. Reset is active-low and
// asynchronous. The enable-controlled registers follow the published design; the
// handshake signals are this design's choice.
module aes_word_loader #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned W     = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [W-1:0]         in_word,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [WORDS*W-1:0]   out_data
);

  localparam int unsigned CW = $clog2(WORDS + 1);

  logic [CW-1:0] count;

  assign in_ready  = !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        // shift left by one word; the oldest word drops off the top
        out_data <= (WORDS*W)'({out_data, in_word});
        if (count == CW'(WORDS - 1)) begin
          count     <= '0;
          out_valid <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  // A full block is held stable until it is accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule

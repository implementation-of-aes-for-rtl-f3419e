// aes_word_unloader: sends a 128-bit block out as four consecutive 32-bit words.
//
// The ciphertext leaves the core 32 bits at a time to save output pins. A
// block is taken on in_valid & in_ready and then presented word by word on
// out_word, column 0 (the most significant word) first, with out_last marking
// the fourth word. A word advances on a clock edge where out_valid and the
// external enable out_ready are both high, so the receiver sets the pace. A
// new block is accepted in the same cycle the last word of the previous one
// leaves, so output words can follow each other without a gap. Reset is
// active-low and asynchronous. Splitting the output under an external enable
// follows the published design; the handshake is this design's choice.
module aes_word_unloader #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned W     = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [WORDS*W-1:0]   in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [W-1:0]         out_word,
  output logic                 out_last
);

  localparam int unsigned CW = $clog2(WORDS + 1);

  logic [WORDS*W-1:0] shreg;
  logic [CW-1:0]      count;

  assign out_word = shreg[WORDS*W-1 -: W];
  assign out_last = out_valid && (count == CW'(WORDS - 1));
  assign in_ready = !out_valid || (out_ready && count == CW'(WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      count     <= '0;
      out_valid <= 1'b0;
    end else if (in_valid && in_ready) begin
      shreg     <= in_data;
      count     <= '0;
      out_valid <= 1'b1;
    end else if (out_valid && out_ready) begin
      shreg <= shreg << W;
      if (count == CW'(WORDS - 1)) begin
        count     <= '0;
        out_valid <= 1'b0;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_word));

endmodule

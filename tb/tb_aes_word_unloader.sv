// tb_aes_word_unloader: random blocks in, random output enable; the words
// must leave in order, most significant first, with out_last on the fourth.
module tb_aes_word_unloader;
  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic [127:0] in_data = '0;
  logic [31:0]  out_word;
  int checks = 0, failures = 0;

  aes_word_unloader #(.WORDS(4), .W(32)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] expq[$];
  int          sent = 0, got = 0, back_to_back = 0;
  logic        last_was_last = 0;
  localparam int NBLK = 200;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (got < 4 * NBLK) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = (sent < NBLK) && ($urandom_range(0, 2) != 0);
        in_data  = {$urandom, $urandom, $urandom, $urandom};
      end
      out_ready = (got > 400) ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_word !== expq[0] || out_last !== (got % 4 == 3)) begin
          failures++;
          $display("FAIL word %0d: %08h last=%0b expected %08h", got, out_word, out_last, expq[0]);
        end
        void'(expq.pop_front());
        got++;
        if (last_was_last && got % 4 == 1) back_to_back++;
        last_was_last = out_last;
      end else if (!out_valid) last_was_last = 0;
      if (in_valid && in_ready) begin
        for (int c = 0; c < 4; c++) expq.push_back(in_data[127 - 32 * c -: 32]);
        sent++;
      end
    end
    checks++;
    if (back_to_back == 0) begin failures++; $display("FAIL no gapless block transfer seen"); end
    $display("back-to-back blocks: %0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

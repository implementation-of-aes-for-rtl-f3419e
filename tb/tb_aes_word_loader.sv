// tb_aes_word_loader: random valid/ready traffic; every 128-bit block must
// equal its four input words, first word on top, and appear one clock after
// its fourth word. Inputs are driven and handshakes observed at the falling
// clock edge.
module tb_aes_word_loader;
  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0]  in_word = '0;
  logic [127:0] out_data;
  int checks = 0, failures = 0;

  aes_word_loader #(.WORDS(4), .W(32)) dut (.*);

  always #5 clk = ~clk;

  logic [127:0] expq[$];
  logic [127:0] acc;
  int           nwords = 0, sent = 0, got = 0;
  int           fourth_cycle = -1, cycle = 0;
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
    while (got < NBLK) begin
      @(negedge clk);
      cycle++;
      if (!(in_valid && !in_ready)) begin   // hold a word until it is taken
        in_valid = (sent < NBLK) && ($urandom_range(0, 3) != 0);
        in_word  = $urandom;
      end
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid) begin
        if (fourth_cycle >= 0) begin
          checks++;
          if (cycle != fourth_cycle + 1) begin
            failures++;
            $display("FAIL block appeared %0d cycles after its last word", cycle - fourth_cycle);
          end
          fourth_cycle = -1;
        end
        if (in_ready) begin failures++; $display("FAIL in_ready high while full"); end
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== expq[0]) begin
          failures++;
          $display("FAIL block %0d: %032h expected %032h", got, out_data, expq[0]);
        end
        void'(expq.pop_front());
        got++;
      end
      if (in_valid && in_ready) begin
        acc = {acc[95:0], in_word};
        nwords++;
        if (nwords == 4) begin
          expq.push_back(acc);
          nwords = 0;
          sent++;
          fourth_cycle = cycle;   // out_valid expected from the next clock on
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

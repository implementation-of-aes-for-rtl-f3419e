// tb_aes_key_expansion: key schedule against FIPS-197 Appendix A.1 words and
// the reference model for random keys; `ready` must rise exactly 40 clocks
// after the key is taken and key_ready must be low meanwhile.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         key_valid = 0, key_ready, ready;
  logic [127:0] key_in = '0;
  logic [31:0]  w [44];
  int checks = 0, failures = 0;

  aes_key_expansion dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(logic [127:0] k);
    words_t exp = expand_key(k);
    int n = 0;
    @(negedge clk);
    key_in = k;
    key_valid = 1;
    #1;
    checks++;
    if (!key_ready) begin failures++; $display("FAIL key_ready low when idle"); end
    @(negedge clk);
    key_valid = 0;
    key_in = '1;               // the key must have been captured
    while (!ready) begin
      n++;
      if (key_ready) begin failures++; $display("FAIL key_ready high while expanding"); end
      @(negedge clk);
      if (n > 100) break;
    end
    checks++;
    if (n != 40) begin failures++; $display("FAIL ready after %0d clocks, expected 40", n); end
    for (int i = 0; i < 44; i++) begin
      checks++;
      if (w[i] !== exp[i]) begin
        failures++;
        $display("FAIL w[%0d] = %08h expected %08h", i, w[i], exp[i]);
      end
    end
  endtask

  initial begin
    words_t a1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Appendix A.1 of FIPS-197: the reference model must match published words
    a1 = expand_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (a1[4] !== 32'ha0fafe17 || a1[43] !== 32'hb6630ca6) begin
      failures++; $display("FAIL reference key schedule");
    end
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (w[43] !== 32'hb6630ca6 || w[40] !== 32'hd014f9a8) begin
      failures++; $display("FAIL published last round key");
    end
    run_key(128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < 20; i++) run_key(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

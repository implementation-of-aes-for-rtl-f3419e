// tb_aes_round_core: the round datapath with round keys supplied by the
// reference key schedule. Checks every ciphertext, the 11-clock latency from
// acceptance to out_valid, one accepted block per 10 clocks when the input
// is always valid and the output always ready, the round-10 stall when the
// output is not taken, and that no block is taken while key_ok is low.
module tb_aes_round_core;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         key_ok = 0, in_valid = 0, in_ready, busy, stall, out_valid, out_ready = 0;
  logic [127:0] in_block = '0, rk_first, rk_round, rk_last, out_block;
  logic [3:0]   round_no;
  int checks = 0, failures = 0;

  aes_round_core dut (.*);

  always #5 clk = ~clk;

  logic [127:0] key;
  words_t       ws;
  assign rk_first = round_key(ws, 0);
  assign rk_last  = round_key(ws, 10);
  always_comb rk_round = (round_no >= 1 && round_no <= 9) ? round_key(ws, int'(round_no)) : '0;

  logic [127:0] expq[$];
  int           accq[$];
  bit           timedq[$];
  int           cycle = 0, got = 0, stalls = 0, last_acc = -1, gaps10 = 0, lat_checks = 0;
  int           mode = 0;   // 0 random, 1 streaming, 2 output blocked, 3 drain
  logic         prev_ov = 0, prev_hs = 0;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(negedge clk);
    cycle++;
    if (!(in_valid && !in_ready)) begin
      in_valid = (mode == 1 || mode == 2) ? 1'b1 : (mode == 0) ? ($urandom_range(0, 3) == 0) : 1'b0;
      in_block = rand128();
    end
    case (mode)
      0:       out_ready = ($urandom_range(0, 1) == 0);
      2:       out_ready = 1'b0;
      default: out_ready = 1'b1;
    endcase
    #1;
    if (stall) begin
      stalls++;
      checks++;
      if (!(out_valid && !out_ready && round_no == 4'd10)) begin
        failures++; $display("FAIL stall without a blocked output");
      end
    end
    // a new result appears: check its latency if its round was never held
    if (out_valid && (!prev_ov || prev_hs)) begin
      int a = accq.pop_front();
      bit t = timedq.pop_front();
      if (t) begin
        checks++;
        lat_checks++;
        if (cycle - a != 11) begin
          failures++; $display("FAIL latency %0d, expected 11", cycle - a);
        end
      end
    end
    prev_ov = out_valid;
    prev_hs = out_valid && out_ready;
    if (out_valid && out_ready) begin
      checks++;
      if (out_block !== expq[0]) begin
        failures++;
        $display("FAIL block %0d: %032h expected %032h", got, out_block, expq[0]);
      end
      void'(expq.pop_front());
      got++;
    end
    if (in_valid && in_ready) begin
      if (!key_ok) begin failures++; $display("FAIL block taken without key"); end
      expq.push_back(encrypt(key, in_block));
      accq.push_back(cycle);
      timedq.push_back(mode == 1 || mode == 3);
      if (mode == 1 && last_acc >= 0) begin
        checks++;
        if (cycle - last_acc != 10) begin
          failures++; $display("FAIL blocks %0d clocks apart while streaming", cycle - last_acc);
        end else gaps10++;
      end
      last_acc = cycle;
    end
  endtask

  task automatic drain();
    mode = 3;
    while (busy || out_valid || expq.size() > 0) step();
  endtask

  initial begin
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ws  = expand_key(key);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // no key: nothing may be accepted
    in_valid = 1;
    repeat (5) begin
      @(negedge clk); #1;
      checks++;
      if (in_ready) begin failures++; $display("FAIL in_ready without key"); end
    end
    key_ok = 1;
    // FIPS-197 Appendix B block first
    in_block = 128'h3243f6a8885a308d313198a2e0370734;
    checks++;
    if (encrypt(key, in_block) !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++; $display("FAIL reference cipher");
    end
    #1;
    expq.push_back(encrypt(key, in_block));
    accq.push_back(cycle);
    timedq.push_back(1);
    drain();
    mode = 0; repeat (300) step();
    drain();
    mode = 1; last_acc = -1; repeat (200) step();
    mode = 2; repeat (40) step();
    mode = 0; repeat (300) step();
    drain();
    key = rand128(); ws = expand_key(key);
    mode = 0; repeat (200) step();
    drain();
    checks += 4;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    if (gaps10 == 0) begin failures++; $display("FAIL no streaming seen"); end
    if (lat_checks == 0) begin failures++; $display("FAIL no latency measured"); end
    if (got < 50) begin failures++; $display("FAIL only %0d blocks", got); end
    $display("blocks %0d, stall cycles %0d, streaming gaps %0d, latencies %0d",
             got, stalls, gaps10, lat_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

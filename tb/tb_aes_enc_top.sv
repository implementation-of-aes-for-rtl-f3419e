// tb_aes_enc_top: end-to-end test of the AES-128 encryption core at its
// default configuration, through its 32-bit word ports only.
//
// Sends keys and plaintexts as 32-bit words and collects ciphertext words,
// checking each block against the reference model and the published
// FIPS-197 examples. Phases: random pacing, streaming (a block must leave
// every 10 clocks), a blocked receiver (the core must stall and lose
// nothing), plaintext sent while a key is still being expanded (it must
// wait), and key changes between bursts. Each of these mechanisms is counted
// and a mechanism that never happened counts as a failure.
module tb_aes_enc_top;
  import aes_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        key_valid = 0, key_ready, pt_valid = 0, pt_ready;
  logic        ct_valid, ct_ready = 0, ct_last, key_busy, stall;
  logic [31:0] key_word = '0, pt_word = '0, ct_word;
  int checks = 0, failures = 0;

  aes_enc_top dut (.*);

  always #5 clk = ~clk;

  logic [31:0]  keyq[$], ptq[$];
  logic [127:0] expq[$];
  logic [127:0] cur_key;
  logic [127:0] ct_acc;
  int           ct_n = 0, blocks = 0, cycle = 0;
  int           mode = 0;   // 0 random, 1 streaming, 2 receiver blocked
  // mechanism counters
  int           n_keys = 0, n_wait_key = 0, n_stall = 0, n_overlap = 0, n_stream = 0;
  int           last_ct_done = -1;
  int           first_pt_done = -1, n_latency = 0;
  bit           lat_armed = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_key(logic [127:0] k);
    for (int c = 0; c < 4; c++) keyq.push_back(k[127 - 32 * c -: 32]);
    cur_key = k;
    n_keys++;
  endtask

  task automatic send_block(logic [127:0] p);
    for (int c = 0; c < 4; c++) ptq.push_back(p[127 - 32 * c -: 32]);
    expq.push_back(encrypt(cur_key, p));
  endtask

  task automatic step();
    logic pt_hs, ct_hs, key_hs;
    @(negedge clk);
    cycle++;
    if (!(key_valid && !key_ready)) begin
      key_valid = (keyq.size() > 0) && (mode == 1 || $urandom_range(0, 1) == 0);
      key_word  = key_valid ? keyq[0] : $urandom;
    end
    if (!(pt_valid && !pt_ready)) begin
      pt_valid = (ptq.size() > 0) && (mode != 0 || $urandom_range(0, 2) != 0);
      pt_word  = pt_valid ? ptq[0] : $urandom;
    end
    ct_ready = (mode == 2) ? 1'b0 : (mode == 1) ? 1'b1 : ($urandom_range(0, 2) != 0);
    #1;
    key_hs = key_valid && key_ready;
    pt_hs  = pt_valid && pt_ready;
    ct_hs  = ct_valid && ct_ready;
    if (stall) n_stall++;
    if (pt_valid && !pt_ready && key_busy) n_wait_key++;
    if (pt_hs && ct_hs) n_overlap++;
    if (key_hs) void'(keyq.pop_front());
    if (pt_hs) begin
      void'(ptq.pop_front());
      if (ptq.size() % 4 == 0 && lat_armed && first_pt_done < 0) first_pt_done = cycle;
    end
    if (ct_valid && first_pt_done >= 0) begin
      // first ciphertext word after an idle core: 13 clocks after the last
      // plaintext word (1 to hand the block to the core, 11 in the round
      // core, 1 into the output word register)
      checks++;
      n_latency++;
      if (cycle - first_pt_done != 13) begin
        failures++; $display("FAIL first ciphertext %0d clocks after plaintext", cycle - first_pt_done);
      end
      first_pt_done = -1;
      lat_armed = 0;
    end
    if (ct_hs) begin
      ct_acc = {ct_acc[95:0], ct_word};
      ct_n++;
      checks++;
      if (ct_last !== (ct_n == 4)) begin failures++; $display("FAIL ct_last on word %0d", ct_n); end
      if (ct_n == 4) begin
        ct_n = 0;
        checks++;
        if (expq.size() == 0 || ct_acc !== expq[0]) begin
          failures++;
          $display("FAIL block %0d: %032h expected %032h", blocks, ct_acc, expq[0]);
        end
        void'(expq.pop_front());
        blocks++;
        if (mode == 1 && last_ct_done >= 0 && cycle - last_ct_done == 10) n_stream++;
        if (mode == 1 && last_ct_done >= 0 && cycle - last_ct_done != 10) begin
          // streaming must settle to one block every 10 clocks
          if (n_stream > 0) begin failures++; $display("FAIL streaming gap %0d", cycle - last_ct_done); end
        end
        last_ct_done = cycle;
      end
    end
  endtask

  task automatic drain();
    mode = 0;
    while (expq.size() > 0 || keyq.size() > 0) step();
    repeat (3) step();       // the last handshake takes effect at the next edge
    while (key_busy) step();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 Appendix B, then Appendix C.1, each checked against its
    // published ciphertext
    checks += 2;
    if (encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
        !== 128'h3925841d02dc09fbdc118597196a0b32) begin failures++; $display("FAIL ref B"); end
    if (encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL ref C.1"); end

    send_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    send_block(128'h3243f6a8885a308d313198a2e0370734);   // waits for the key schedule
    mode = 1;
    while (expq.size() > 0) step();
    send_key(128'h000102030405060708090a0b0c0d0e0f);
    drain();
    lat_armed = 1;
    send_block(128'h00112233445566778899aabbccddeeff);
    mode = 1;
    while (expq.size() > 0) step();
    // random pacing
    for (int i = 0; i < 40; i++) send_block(rand128());
    drain();
    // streaming
    send_key(rand128());
    for (int i = 0; i < 30; i++) send_block(rand128());
    mode = 1; repeat (150) step();
    // receiver blocked: the core stalls with a finished block
    mode = 2; repeat (60) step();
    drain();
    // new key with plaintext right behind it
    send_key(rand128());
    for (int i = 0; i < 20; i++) send_block(rand128());
    drain();
    checks += 6;
    if (n_keys < 2)      begin failures++; $display("FAIL key changes not exercised"); end
    if (n_wait_key == 0) begin failures++; $display("FAIL plaintext never waited for the key"); end
    if (n_stall == 0)    begin failures++; $display("FAIL output stall never happened"); end
    if (n_overlap == 0)  begin failures++; $display("FAIL input and output never overlapped"); end
    if (n_stream == 0)   begin failures++; $display("FAIL no 10-clock block interval seen"); end
    if (n_latency == 0)  begin failures++; $display("FAIL latency never measured"); end
    $display("blocks %0d keys %0d wait-for-key %0d stall %0d overlap %0d stream %0d latency %0d",
             blocks, n_keys, n_wait_key, n_stall, n_overlap, n_stream, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

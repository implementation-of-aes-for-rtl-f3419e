// tb_image_encrypt: encrypts a generated 64 x 64 8-bit grey-scale image
// (4096 bytes = 256 AES blocks, electronic-codebook order, row-major pixels,
// 16 pixels per block) through aes_enc_top at its default configuration.
//
// The pixels are a diagonal gradient with a bright square, value
// (x + 2*y) mod 256, or 0xff inside the square; several blocks are therefore
// identical and must give identical ciphertexts, as ECB does. Every
// ciphertext block is checked against the reference model, and the whole
// image, streamed with the receiver always ready, must take at most
// 10 clocks per block plus a fixed start-up (key expansion and first-block
// latency).
module tb_image_encrypt;
  import aes_ref_pkg::*;

  localparam int W = 64, H = 64;
  localparam int NBLK = W * H / 16;

  logic        clk = 0, rst_n = 0;
  logic        key_valid = 0, key_ready, pt_valid = 0, pt_ready;
  logic        ct_valid, ct_ready = 1, ct_last, key_busy, stall;
  logic [31:0] key_word = '0, pt_word = '0, ct_word;
  int checks = 0, failures = 0;

  aes_enc_top dut (.*);

  always #5 clk = ~clk;

  logic [127:0] key = 128'h000102030405060708090a0b0c0d0e0f;
  logic [127:0] pt_blocks [NBLK];
  logic [127:0] ct_blocks [NBLK];
  logic [31:0]  ptq[$], keyq[$];

  function automatic logic [7:0] pixel(int x, int y);
    if (x >= 16 && x < 32 && y >= 16 && y < 32) return 8'hff;
    return 8'((x + 2 * y) % 256);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got = 0, nword = 0, cycles = 0, same = 0;
    logic [127:0] acc;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < 16; k++)
        pt_blocks[b][127 - 8 * k -: 8] = pixel((b * 16 + k) % W, (b * 16 + k) / W);
    for (int c = 0; c < 4; c++) keyq.push_back(key[127 - 32 * c -: 32]);
    for (int b = 0; b < NBLK; b++)
      for (int c = 0; c < 4; c++) ptq.push_back(pt_blocks[b][127 - 32 * c -: 32]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (got < NBLK && cycles < 100000) begin
      @(negedge clk);
      cycles++;
      key_valid = keyq.size() > 0;
      key_word  = key_valid ? keyq[0] : '0;
      pt_valid  = ptq.size() > 0;
      pt_word   = pt_valid ? ptq[0] : '0;
      #1;
      if (key_valid && key_ready) void'(keyq.pop_front());
      if (pt_valid && pt_ready) void'(ptq.pop_front());
      if (ct_valid && ct_ready) begin
        acc = {acc[95:0], ct_word};
        if (++nword == 4) begin
          nword = 0;
          ct_blocks[got] = acc;
          checks++;
          if (acc !== encrypt(key, pt_blocks[got])) begin
            failures++; $display("FAIL image block %0d", got);
          end
          got++;
        end
      end
    end
    // identical plaintext blocks (inside the square) give identical ciphertexts
    // (compared with the block one pixel row above)
    for (int b = W / 16; b < NBLK; b++)
      if (pt_blocks[b] == pt_blocks[b - W / 16]) begin
        checks++;
        same++;
        if (ct_blocks[b] !== ct_blocks[b - W / 16]) begin failures++; $display("FAIL ECB block %0d", b); end
      end
    checks += 2;
    if (same == 0) begin failures++; $display("FAIL no repeated block in the image"); end
    // 4 key words + 1 handover + 40 expansion + 5 loader/handover + 11 + 1 + 4 output,
    // then 10 clocks per further block; allow a small margin
    if (cycles > 10 * (NBLK - 1) + 80) begin
      failures++; $display("FAIL image took %0d clocks", cycles);
    end
    $display("image %0dx%0d: %0d blocks in %0d clocks, %0d repeated blocks", W, H, got, cycles, same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

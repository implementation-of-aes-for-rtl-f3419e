// tb_aes_initial_round: initial AddRoundKey on the FIPS-197 Appendix B
// example and on random blocks.
module tb_aes_initial_round;
  import aes_ref_pkg::*;

  logic [127:0] pt, key, st;
  int checks = 0, failures = 0;

  aes_initial_round dut (.plaintext(pt), .init_key(key), .state_out(st));

  task automatic check(logic [127:0] p, logic [127:0] k, logic [127:0] exp);
    pt = p;
    key = k;
    #1;
    checks++;
    if (st !== exp) begin
      failures++;
      $display("FAIL %032h ^ %032h -> %032h, expected %032h", p, k, st, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
          128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int i = 0; i < 200; i++) begin
      logic [127:0] p = rand128(), k = rand128();
      logic [127:0] e;
      for (int b = 0; b < 16; b++) e[8 * b +: 8] = p[8 * b +: 8] ^ k[8 * b +: 8];
      check(p, k, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

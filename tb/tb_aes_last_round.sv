// tb_aes_last_round: final round (ShiftRows, SubBytes, AddRoundKey) on the
// FIPS-197 Appendix B example and against the reference model.
module tb_aes_last_round;
  import aes_ref_pkg::*;

  logic [127:0] st, key, ct;
  int checks = 0, failures = 0;

  aes_last_round dut (.state_in(st), .last_key(key), .ciphertext(ct));

  task automatic check(logic [127:0] s, logic [127:0] k, logic [127:0] exp);
    st = s;
    key = k;
    #1;
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL state %032h key %032h -> %032h, expected %032h", s, k, ct, exp);
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
    // Appendix B: start of round 10 and round key 10 give the ciphertext
    check(128'heb40f21e592e38848ba113e71bc342d2, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6,
          128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 300; i++) begin
      logic [127:0] s = rand128(), k = rand128();
      check(s, k, sub_bytes(shift_rows(s)) ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

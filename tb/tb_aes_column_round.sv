// tb_aes_column_round: one packet of an intermediate round (SubBytes,
// MixColumns, AddRoundKey) against the reference model, plus the first
// column of round 1 of the FIPS-197 Appendix B example.
module tb_aes_column_round;
  import aes_ref_pkg::*;

  logic [31:0] col_in, key_in, col_out;
  int checks = 0, failures = 0;

  aes_column_round dut (.col_in(col_in), .key_in(key_in), .col_out(col_out));

  task automatic check(logic [31:0] c, logic [31:0] k, logic [31:0] exp);
    col_in = c;
    key_in = k;
    #1;
    checks++;
    if (col_out !== exp) begin
      failures++;
      $display("FAIL col %08h key %08h -> %08h, expected %08h", c, k, col_out, exp);
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
    // FIPS-197 Appendix B, round 1, column 0 with round key word a0fafe17
    // state after initial round: 19 3d e3 be / a0 f4 e2 2b / 9a c6 8d 2a / e9 f8 48 08
    // ShiftRows column 0 is 19 f4 8d 08
    check(32'h19f48d08, 32'ha0fafe17, 32'ha49c7ff2);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] c = $urandom, k = $urandom;
      check(c, k, mix_col(sub_word(c)) ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

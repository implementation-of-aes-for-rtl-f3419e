// tb_aes_mix_column: MixColumns of one column against known examples and
// the reference model on random columns.
module tb_aes_mix_column;
  import aes_ref_pkg::*;

  logic [31:0] col_in, col_out;
  int checks = 0, failures = 0;

  aes_mix_column dut (.col_in(col_in), .col_out(col_out));

  task automatic check(logic [31:0] a, logic [31:0] exp);
    col_in = a;
    #1;
    checks++;
    if (col_out !== exp) begin
      failures++;
      $display("FAIL mix(%08h) = %08h, expected %08h", a, col_out, exp);
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
    check(32'hdb135345, 32'h8e4da1bc);   // well-known MixColumns test columns
    check(32'hf20a225c, 32'h9fdc589d);
    check(32'hc6c6c6c6, 32'hc6c6c6c6);
    check(32'hd4d4d4d5, 32'hd5d5d7d6);
    check(32'h2d26314c, 32'h4d7ebdf8);
    // FIPS-197 Appendix B, round 1, column 0: d4 bf 5d 30 -> 04 66 81 e5
    check(32'hd4bf5d30, 32'h046681e5);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] v = $urandom;
      check(v, mix_col(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

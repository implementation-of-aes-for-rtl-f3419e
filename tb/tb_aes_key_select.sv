// tb_aes_key_select: random expanded keys; the first, per-round and last
// round keys must be the right groups of four words for rounds 1..9.
module tb_aes_key_select;
  logic [31:0]  w [44];
  logic [3:0]   round;
  logic [127:0] rk_first, rk_round, rk_last;
  int checks = 0, failures = 0;

  aes_key_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 44; i++) w[i] = $urandom;
      for (int r = 1; r <= 9; r++) begin
        round = 4'(r);
        #1;
        checks += 3;
        if (rk_round !== {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]}) begin
          failures++; $display("FAIL round %0d key %032h", r, rk_round);
        end
        if (rk_first !== {w[0], w[1], w[2], w[3]}) begin
          failures++; $display("FAIL first key %032h", rk_first);
        end
        if (rk_last !== {w[40], w[41], w[42], w[43]}) begin
          failures++; $display("FAIL last key %032h", rk_last);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

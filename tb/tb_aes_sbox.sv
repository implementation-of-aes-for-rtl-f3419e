// tb_aes_sbox: checks all 256 entries of the S-box table against the
// reference model, and a few entries against published values.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.din(din), .dout(dout));

  task automatic check(logic [7:0] a, logic [7:0] exp);
    din = a;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL sbox[%02h] = %02h, expected %02h", a, dout, exp);
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
    // published entries of the AES S-box
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'h19, 8'hd4);
    check(8'hff, 8'h16);
    if (sbox(8'h53) !== 8'hed) begin failures++; $display("FAIL reference model"); end
    for (int a = 0; a < 256; a++) check(8'(a), sbox(8'(a)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

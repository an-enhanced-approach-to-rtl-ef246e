// tb_blowfish_f: checks the F combiner ((S1 + S2) xor S3) + S4 on hand-worked
// vectors (carries out of bit 31 dropped) and on random operands against a
// step-by-step 33-bit computation.
module tb_blowfish_f;
  import blowfish_pkg::*;

  sbox_out_t s;
  word_t     f;
  int checks = 0, failures = 0;

  blowfish_f dut (.s(s), .f(f));

  task automatic check(logic [31:0] exp, string what);
    #1;
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL %s: s=%h f=%08h expected %08h", what, s, f, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] a;
    // 1 + 2 = 3; 3 ^ 5 = 6; 6 + 7 = 13
    s = {32'd7, 32'd5, 32'd2, 32'd1};
    check(32'd13, "small");
    // FFFFFFFF + 1 = 0 (wrap); 0 ^ 0F0F0F0F; + F0F0F0F1 = 0 (wrap)
    s = {32'hF0F0F0F1, 32'h0F0F0F0F, 32'h00000001, 32'hFFFFFFFF};
    check(32'h00000000, "wrap");
    // 80000000 + 80000000 = 0; 0 ^ 12345678; + 1 = 12345679
    s = {32'h00000001, 32'h12345678, 32'h80000000, 32'h80000000};
    check(32'h12345679, "carry out");
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 4; k++) s[k] = $urandom;
      a = {1'b0, s[0]} + {1'b0, s[1]};
      a = {1'b0, a[31:0] ^ s[2]};
      a = a + {1'b0, s[3]};
      check(a[31:0], "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

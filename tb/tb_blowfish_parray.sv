// tb_blowfish_parray: reads every subkey step on all three ports, in both
// directions, for a zero key (which must give the pi digits themselves) and
// for random keys, and compares with the reference subkey function.
module tb_blowfish_parray;
  import bf_ref_pkg::*;
  import blowfish_pkg::*;

  key_t                key;
  logic                decrypt;
  logic [2:0][4:0]     idx;
  word_t [2:0]         subkey;
  int checks = 0, failures = 0;

  blowfish_parray #(.NREAD(3)) dut (.key(key), .decrypt(decrypt), .idx(idx), .subkey(subkey));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = '0; decrypt = 1'b0;
    idx = {5'd17, 5'd1, 5'd0};
    #1;
    checks += 3;
    if (subkey[0] !== 32'h243F6A88 || subkey[1] !== 32'h85A308D3 || subkey[2] !== 32'h8979FB1B) begin
      failures++;
      $display("FAIL zero key: %h", subkey);
    end
    for (int n = 0; n < 50; n++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      for (int d = 0; d < 2; d++) begin
        decrypt = d[0];
        for (int i = 0; i < 18; i++) begin
          idx = {5'(i), 5'((i + 5) % 18), 5'((i + 11) % 18)};
          #1;
          for (int r = 0; r < 3; r++) begin
            int step;
            step = int'(idx[r]);
            checks++;
            if (subkey[r] !== subkey_ref(step)) begin
              failures++;
              $display("FAIL key=%h dec=%0d step=%0d got %08h exp %08h",
                       key, d, step, subkey[r], subkey_ref(step));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] subkey_ref(int step);
    return bf_ref_pkg::subkey(key, decrypt ? 17 - step : step);
  endfunction
endmodule

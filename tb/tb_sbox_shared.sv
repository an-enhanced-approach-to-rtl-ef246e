// tb_sbox_shared: drives random 32-bit words on both core ports of the
// shared S-box store every cycle and checks that one clock later each port
// returns S1..S4 of the word's four bytes (S1 from bits 31:24), including the
// published S3[0], S4[0] and S4[255] words.
module tb_sbox_shared;
  import bf_ref_pkg::*;
  import blowfish_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t     [1:0] addr, addr_q;
  sbox_out_t [1:0] sdata;
  int checks = 0, failures = 0;

  sbox_shared #(.NCORES(2)) dut (.clk(clk), .addr(addr), .sdata(sdata));

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load();
    addr[0] = 32'h0000_0000;
    addr[1] = 32'hFFFF_FFFF;
    @(posedge clk); #1;
    check(sdata[0][0], 32'hD1310BA6, "S1[0]");
    check(sdata[0][2], 32'hE93D5A68, "S3[0]");
    check(sdata[0][3], 32'h3A39CE37, "S4[0]");
    check(sdata[1][3], 32'h3AC372E6, "S4[255]");
    for (int n = 0; n < 1000; n++) begin
      addr[0] = $urandom;
      addr[1] = $urandom;
      addr_q  = addr;
      @(posedge clk); #1;
      addr[0] = $urandom;
      addr[1] = $urandom;
      for (int c = 0; c < 2; c++) begin
        check(sdata[c][0], S[0][addr_q[c][31:24]], "S1");
        check(sdata[c][1], S[1][addr_q[c][23:16]], "S2");
        check(sdata[c][2], S[2][addr_q[c][15:8]],  "S3");
        check(sdata[c][3], S[3][addr_q[c][7:0]],   "S4");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

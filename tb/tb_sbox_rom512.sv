// tb_sbox_rom512: checks one S-box ROM bank (S1|S2 image) against the
// published first/last words of the Blowfish S-boxes and against the image
// read independently by the reference package, with a new random address on
// every port in every cycle so that the one-cycle registered read latency is
// checked as well.
module tb_sbox_rom512;
  import bf_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0][8:0]  addr;
  logic [3:0][31:0] data;
  logic [3:0][8:0]  addr_q;
  int checks = 0, failures = 0;

  sbox_rom512 dut (.clk(clk), .addr(addr), .data(data));

  function automatic logic [31:0] expect_word(logic [8:0] a);
    return a[8] ? S[1][a[7:0]] : S[0][a[7:0]];
  endfunction

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
    // Published Blowfish S-box words (S1[0], S1[255], S2[0], S2[255]).
    addr = {9'd0, 9'd255, 9'd256, 9'd511};
    @(posedge clk); #1;
    check(data[3], 32'hD1310BA6, "S1[0]");
    check(data[2], 32'h6E85076A, "S1[255]");
    check(data[1], 32'h4B7A70E9, "S2[0]");
    check(data[0], 32'hDB83ADF7, "S2[255]");
    // Random sweep: data after an edge belongs to the address before it.
    for (int n = 0; n < 1000; n++) begin
      for (int p = 0; p < 4; p++) addr[p] = 9'($urandom);
      addr_q = addr;
      @(posedge clk); #1;
      for (int p = 0; p < 4; p++) addr[p] = 9'($urandom);
      for (int p = 0; p < 4; p++) check(data[p], expect_word(addr_q[p]), "random read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_blowfish_divider: checks that the input stage captures block, key and
// mode on start, presents [63:0] and [127:64] as lo and hi, pulses go once,
// holds everything while busy (ignoring and flagging a second start), and
// releases busy after cores_done.
module tb_blowfish_divider;
  import blowfish_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, start, cores_done, decrypt, go, busy, dropped;
  block128_t data_in;
  key_t      key_in, key;
  mode_e     mode_in;
  block64_t  lo, hi;
  int checks = 0, failures = 0;

  blowfish_divider dut (
    .clk(clk), .rst_n(rst_n), .start(start), .data_in(data_in), .key_in(key_in),
    .mode_in(mode_in), .cores_done(cores_done), .lo(lo), .hi(hi), .key(key),
    .decrypt(decrypt), .go(go), .busy(busy), .dropped(dropped)
  );

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] d, k;
    bit dec;
    rst_n = 1'b0; start = 1'b0; cores_done = 1'b0;
    data_in = '0; key_in = '0; mode_in = MODE_ENCRYPT;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 50; n++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      dec = n[0];
      @(negedge clk);
      expect_true(!busy && !go, "idle before start");
      start = 1'b1; data_in = d; key_in = k;
      mode_in = dec ? MODE_DECRYPT : MODE_ENCRYPT;
      @(negedge clk);
      start = 1'b0;
      data_in = ~d; key_in = ~k; mode_in = dec ? MODE_ENCRYPT : MODE_DECRYPT;
      expect_true(go && busy, "go and busy after start");
      expect_true(lo == d[63:0] && hi == d[127:64], "halves");
      expect_true(key == k && decrypt == dec, "key and mode");
      // A second start while busy: ignored and flagged.
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      expect_true(!go, "go is a single pulse");
      expect_true(dropped, "dropped pulse");
      expect_true(lo == d[63:0] && hi == d[127:64] && key == k && decrypt == dec,
                  "held while busy");
      repeat (1 + n % 5) @(negedge clk);
      expect_true(busy && !dropped, "still busy");
      cores_done = 1'b1;
      @(negedge clk);
      cores_done = 1'b0;
      expect_true(!busy, "released after cores_done");
      expect_true(lo == d[63:0] && hi == d[127:64], "result halves kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

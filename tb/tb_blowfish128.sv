// tb_blowfish128: end-to-end test of the 128-bit Blowfish at its default
// configuration.
//
// Encrypts and decrypts random 128-bit blocks under random keys and checks
// each result against the reference model (each 64-bit half is an
// independent Blowfish block), a known-answer vector, and the round trip
// decrypt(encrypt(x)) = x as in an encrypt-then-decrypt loopback.  It checks
// the 19-clock latency (edge that samples start = 1, edge that raises done =
// 19), a run of back-to-back blocks at one block per 19 clocks, and counts
// how often each mechanism occurred: encryption, decryption, a mode switch
// between consecutive blocks, a start ignored while busy, and a start
// accepted on the first cycle after done.  A mechanism that never occurred
// counts as a failure.
module tb_blowfish128;
  import bf_ref_pkg::*;
  import blowfish_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, start, done, busy, dropped;
  mode_e     mode;
  key_t      key;
  block128_t data_in, data_out;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0, n_dropped = 0, n_b2b = 0;
  mode_e last_mode = MODE_ENCRYPT;
  bit    have_last = 1'b0;

  blowfish128 dut (
    .clk(clk), .rst_n(rst_n), .start(start), .mode(mode), .key(key),
    .data_in(data_in), .data_out(data_out), .done(done), .busy(busy),
    .dropped(dropped)
  );

  always @(posedge clk) if (dropped) n_dropped++;

  task automatic check128(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // One block.  Assumes it is called at a negedge with the design idle.
  task automatic run(input logic [127:0] k, input mode_e m, input logic [127:0] x,
                     input bit poke, output logic [127:0] y);
    int edges;
    if (have_last && m != last_mode) n_switch++;
    last_mode = m; have_last = 1'b1;
    if (m == MODE_ENCRYPT) n_enc++; else n_dec++;
    key = k; mode = m; data_in = x; start = 1'b1;
    @(posedge clk);
    edges = 1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      if (poke && edges == 7) begin
        start = 1'b1; data_in = ~x; mode = (m == MODE_ENCRYPT) ? MODE_DECRYPT : MODE_ENCRYPT;
      end else begin
        start = 1'b0; data_in = x; mode = m;
      end
      @(posedge clk);
      edges++;
      @(negedge clk);
    end
    start = 1'b0;
    y = data_out;
    checks++;
    if (edges != int'(LATENCY)) begin
      failures++;
      $display("FAIL latency %0d edges, expected %0d", edges, LATENCY);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, x, c, p;
    int t0, t1, nb;
    load();
    rst_n = 1'b0; start = 1'b0; mode = MODE_ENCRYPT; key = '0; data_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Known answer: both halves carry the same block.
    k = 128'h0123456789ABCDEF_FEDCBA9876543210;
    run(k, MODE_ENCRYPT, {2{64'h0123456789ABCDEF}}, 1'b0, c);
    check128(c, {2{64'h794359D976C38D2B}}, "known answer");
    // The block is back on the first cycle after done: the next start
    // is accepted immediately (back-to-back).
    run(k, MODE_DECRYPT, c, 1'b0, p);
    n_b2b++;
    check128(p, {2{64'h0123456789ABCDEF}}, "known answer decrypt");

    for (int n = 0; n < 60; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      x = {$urandom, $urandom, $urandom, $urandom};
      run(k, MODE_ENCRYPT, x, n % 3 == 0, c);
      check128(c, bf128(k, 1'b0, x), "encrypt");
      run(k, MODE_DECRYPT, c, n % 3 == 1, p);
      check128(p, x, "loopback");
      if (n % 2 == 0) begin
        run(k, MODE_DECRYPT, x, 1'b0, p);
        check128(p, bf128(k, 1'b1, x), "decrypt");
      end
      if (n % 5 == 0) begin
        @(negedge clk);   // an idle cycle between blocks now and then
      end else begin
        n_b2b++;
      end
    end

    // Throughput: back-to-back blocks, one per LATENCY clocks.
    nb = 10;
    t0 = $time;
    for (int n = 0; n < nb; n++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      run(k, MODE_ENCRYPT, x, 1'b0, c);
      check128(c, bf128(k, 1'b0, x), "stream");
      n_b2b++;
    end
    t1 = $time;
    checks++;
    if ((t1 - t0) != nb * int'(LATENCY) * 10) begin
      failures++;
      $display("FAIL throughput: %0d ns for %0d blocks", t1 - t0, nb);
    end

    $display("mechanisms: encrypt=%0d decrypt=%0d mode_switch=%0d start_dropped=%0d back_to_back=%0d",
             n_enc, n_dec, n_switch, n_dropped, n_b2b);
    checks += 5;
    if (n_enc == 0)     begin failures++; $display("FAIL no encryption");  end
    if (n_dec == 0)     begin failures++; $display("FAIL no decryption");  end
    if (n_switch == 0)  begin failures++; $display("FAIL no mode switch"); end
    if (n_dropped == 0) begin failures++; $display("FAIL no dropped start"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

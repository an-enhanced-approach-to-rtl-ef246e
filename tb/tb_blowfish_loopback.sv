// tb_blowfish_loopback: end-to-end test of the whole design at its default
// configuration: plaintext -> encryption unit -> decryption unit.
//
// Random 128-bit blocks and keys are started, some with idle gaps and some
// back-to-back on the edge after the previous ciphertext appears, so that two
// blocks are in flight at once (one per stage).  Every ciphertext is checked
// against the reference model, every recovered block against its plaintext,
// and the latencies of 19 and 38 clock edges are checked (edge that samples
// start = 1).  Mechanisms counted, each required at least once: encryption,
// decryption, two blocks overlapping in the two stages, a start ignored
// while the encryption stage is busy, and a back-to-back start.
module tb_blowfish_loopback;
  import bf_ref_pkg::*;
  import blowfish_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, start, cipher_valid, done, busy, dropped;
  key_t      key;
  block128_t data_in, cipher_out, data_out;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_overlap = 0, n_dropped = 0, n_b2b = 0;

  blowfish_loopback dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .data_in(data_in),
    .cipher_out(cipher_out), .cipher_valid(cipher_valid), .data_out(data_out),
    .done(done), .busy(busy), .dropped(dropped)
  );

  // Scoreboard of blocks in flight, in order.
  logic [127:0] q_pt  [$];
  logic [127:0] q_key [$];
  int           q_t0  [$];
  logic [127:0] d_pt  [$];
  int           d_t0  [$];
  int           edge_no = 0;
  int           in_flight = 0;

  always @(posedge clk) begin
    edge_no++;
    if (dropped) n_dropped++;
  end

  always @(negedge clk) begin
    if (cipher_valid) begin
      logic [127:0] pt, k;
      int t0;
      pt = q_pt.pop_front(); k = q_key.pop_front(); t0 = q_t0.pop_front();
      n_enc++;
      checks += 2;
      if (cipher_out !== bf128(k, 1'b0, pt)) begin
        failures++;
        $display("FAIL cipher %032h expected %032h", cipher_out, bf128(k, 1'b0, pt));
      end
      if (edge_no - t0 + 1 != int'(LATENCY)) begin
        failures++;
        $display("FAIL encryption latency %0d", edge_no - t0 + 1);
      end
      d_pt.push_back(pt);
      d_t0.push_back(t0);
    end
    if (done) begin
      logic [127:0] pt;
      int t0;
      pt = d_pt.pop_front(); t0 = d_t0.pop_front();
      n_dec++;
      in_flight--;
      checks += 2;
      if (data_out !== pt) begin
        failures++;
        $display("FAIL loopback %032h expected %032h", data_out, pt);
      end
      if (edge_no - t0 + 1 != 2 * int'(LATENCY)) begin
        failures++;
        $display("FAIL loopback latency %0d", edge_no - t0 + 1);
      end
    end
    if (in_flight >= 2) n_overlap++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load();
    rst_n = 1'b0; start = 1'b0; key = '0; data_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      data_in = {$urandom, $urandom, $urandom, $urandom};
      start = 1'b1;
      // The design is idle here, so this start is taken at the next edge.
      q_pt.push_back(data_in);
      q_key.push_back(key);
      q_t0.push_back(edge_no + 1);
      in_flight++;
      @(negedge clk);
      start = 1'b0;
      // Pokes while busy, then wait for the encryption stage to free.
      while (busy) begin
        if ($urandom_range(0, 7) == 0) begin
          start = 1'b1;
          data_in = ~data_in;
        end else begin
          start = 1'b0;
        end
        @(negedge clk);
      end
      start = 1'b0;
      if (n % 4 == 3) repeat ($urandom_range(1, 30)) @(negedge clk);
      else n_b2b++;
    end
    while (in_flight != 0) @(negedge clk);
    $display("mechanisms: encrypt=%0d decrypt=%0d overlap_cycles=%0d start_dropped=%0d back_to_back=%0d",
             n_enc, n_dec, n_overlap, n_dropped, n_b2b);
    checks += 6;
    if (n_enc != 100)   begin failures++; $display("FAIL %0d encryptions", n_enc); end
    if (n_dec != 100)   begin failures++; $display("FAIL %0d decryptions", n_dec); end
    if (n_overlap == 0) begin failures++; $display("FAIL no overlap"); end
    if (n_dropped == 0) begin failures++; $display("FAIL no dropped start"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back start"); end
    if (q_pt.size() != 0 || d_pt.size() != 0) begin failures++; $display("FAIL blocks left over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

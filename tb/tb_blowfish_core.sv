// tb_blowfish_core: one 64-bit core on one port of the shared S-box store.
// Checks encryption and decryption of random blocks under random keys
// against the reference model, a fixed known-answer vector, the round trip
// decrypt(encrypt(x)) = x, the core latency of 17 clock edges (edge that samples go
// through the edge that raises done, both counted), and that a go pulse while the
// core is busy is ignored.
module tb_blowfish_core;
  import bf_ref_pkg::*;
  import blowfish_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, go, decrypt, done, busy;
  key_t      key;
  block64_t  din, dout;
  word_t     [0:0] sb_addr;
  sbox_out_t [0:0] sb_data;
  int checks = 0, failures = 0;
  int ignored_go = 0;

  blowfish_core dut (
    .clk(clk), .rst_n(rst_n), .go(go), .decrypt(decrypt), .key(key),
    .din(din), .dout(dout), .done(done), .busy(busy),
    .sb_addr(sb_addr[0]), .sb_data(sb_data[0])
  );

  sbox_shared #(.NCORES(1)) u_sbox (.clk(clk), .addr(sb_addr), .sdata(sb_data));

  task automatic check64(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // Runs one block; returns the result and checks the latency.
  task automatic run(input logic [127:0] k, input bit dec, input logic [63:0] x,
                     input bit poke_busy, output logic [63:0] y);
    int cycles;
    @(negedge clk);
    key = k; decrypt = dec; din = x; go = 1'b1;
    @(posedge clk);           // go sampled here
    @(negedge clk);
    go = 1'b0;
    cycles = 0;
    while (!done) begin
      if (poke_busy && cycles == 5) begin
        go = 1'b1;            // must be ignored: core is busy
        din = ~x;
        ignored_go++;
      end else begin
        go = 1'b0;
        din = x;
      end
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    go = 1'b0;
    y = dout;
    checks++;
    if (cycles != 16) begin
      failures++;
      $display("FAIL latency: %0d clocks, expected 16", cycles);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL core did not return to idle");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    logic [63:0]  x, c, p;
    load();
    rst_n = 1'b0; go = 1'b0; decrypt = 1'b0; key = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Known answer, worked out with an independent software Blowfish.
    run(128'h0123456789ABCDEF_FEDCBA9876543210, 1'b0, 64'h0123456789ABCDEF, 1'b0, c);
    check64(c, 64'h794359D976C38D2B, "known answer encrypt");
    run(128'h0123456789ABCDEF_FEDCBA9876543210, 1'b1, 64'h794359D976C38D2B, 1'b0, p);
    check64(p, 64'h0123456789ABCDEF, "known answer decrypt");
    for (int n = 0; n < 40; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      x = {$urandom, $urandom};
      run(k, 1'b0, x, n % 4 == 1, c);
      check64(c, bf64(k, 1'b0, x), "encrypt");
      run(k, 1'b1, c, n % 4 == 3, p);
      check64(p, x, "round trip");
      run(k, 1'b1, x, 1'b0, p);
      check64(p, bf64(k, 1'b1, x), "decrypt");
    end
    checks++;
    if (ignored_go == 0) begin
      failures++;
      $display("FAIL go-while-busy never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// blowfish128: 128-bit Blowfish built from two parallel 64-bit cores.
//
// The 128-bit block is cut by the divider into [63:0] and [127:64]; each
// half is a standard 64-bit Blowfish block and is enciphered by its own
// iterative core, both cores running in lockstep.  The cores share one
// S-box store (two 512 x 32-bit synchronous ROM banks holding the four
// Blowfish S-boxes) and the same 128-bit key and mode.  Their results are
// joined again into data_out = {hi core, lo core}.
//
// mode selects encryption (0) or decryption (1) for the whole block.  The
// key is the 128-bit key applied to the P-array (see blowfish_parray).
//
// Interface: start with data_in, key and mode; data_out and a one-cycle
// done pulse come back; busy is high while a block is in flight and start
// is then ignored (dropped pulses when that happens).
// Timing: 19 clock edges per block, counting the edge that samples start as
// the first and the edge that raises done as the 19th: one for the input
// register, one for the input whitening, sixteen rounds, and one for the
// output register.  A new block can start on the edge after done, so the
// throughput is 128 bits per 19 clocks.  An assertion checks the latency
// against blowfish_pkg::LATENCY.  The structure (divider, two cores,
// shared S-box, joined output) and the 19-cycle latency follow the design
// this RTL implements; the handshake is this design's.
module blowfish128
  import blowfish_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  mode_e     mode,
  input  key_t      key,
  input  block128_t data_in,
  output block128_t data_out,
  output logic      done,
  output logic      busy,
  output logic      dropped
);

  block64_t  lo, hi;
  key_t      key_q;
  logic      decrypt, go;
  block64_t  dout_lo, dout_hi;
  logic      done_lo, done_hi, busy_lo, busy_hi;
  word_t     [1:0] sb_addr;
  sbox_out_t [1:0] sb_data;

  blowfish_divider u_divider (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .data_in   (data_in),
    .key_in    (key),
    .mode_in   (mode),
    .cores_done(done_lo),
    .lo        (lo),
    .hi        (hi),
    .key       (key_q),
    .decrypt   (decrypt),
    .go        (go),
    .busy      (busy),
    .dropped   (dropped)
  );

  blowfish_core u_core_lo (
    .clk    (clk),
    .rst_n  (rst_n),
    .go     (go),
    .decrypt(decrypt),
    .key    (key_q),
    .din    (lo),
    .dout   (dout_lo),
    .done   (done_lo),
    .busy   (busy_lo),
    .sb_addr(sb_addr[0]),
    .sb_data(sb_data[0])
  );

  blowfish_core u_core_hi (
    .clk    (clk),
    .rst_n  (rst_n),
    .go     (go),
    .decrypt(decrypt),
    .key    (key_q),
    .din    (hi),
    .dout   (dout_hi),
    .done   (done_hi),
    .busy   (busy_hi),
    .sb_addr(sb_addr[1]),
    .sb_data(sb_data[1])
  );

  sbox_shared #(.NCORES(2)) u_sbox (
    .clk  (clk),
    .addr (sb_addr),
    .sdata(sb_data)
  );

  // Output register: joins the two halves.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= '0;
      done     <= 1'b0;
    end else begin
      done <= done_lo;
      if (done_lo) data_out <= {dout_hi, dout_lo};
    end
  end

  // The two cores are started together and must stay in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (done_lo == done_hi) && (busy_lo == busy_hi));

  // An accepted start is answered by done exactly LATENCY edges later.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> ##(LATENCY) done);

endmodule

// blowfish_loopback: encryption unit followed by a decryption unit.
//
// This is the complete arrangement the design is evaluated in: a plaintext
// block enters an encryption unit, the ciphertext it produces is passed
// straight into a decryption unit under the same key, and the decryption
// unit's output is the recovered plaintext, which must equal the input.  Both
// units are 128-bit Blowfish engines (blowfish128: two 64-bit cores sharing a
// ROM S-box store), one with its mode tied to encryption and one tied to
// decryption.  The ciphertext is brought out as well.
//
// The chaining of an encrypting and a decrypting unit under one key follows
// the design's top-level RTL; the start/done handshake between them and the
// key register that keeps the key for the decryption stage are this
// design's.
//
// Interface: start with data_in and key; cipher_out with cipher_valid (a
// one-cycle pulse) after the encryption stage, data_out with done after the
// decryption stage.  busy means the encryption stage cannot accept a block;
// dropped pulses when a start is ignored for that reason.
// Timing: 19 clock edges per stage, so cipher_valid rises on the 19th edge
// and done on the 38th, counting the edge that samples start as the first.
// The two stages work as a two-stage pipeline: a new block may start on the
// edge after cipher_valid, giving one block every 19 clocks.
module blowfish_loopback
  import blowfish_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  key_t      key,
  input  block128_t data_in,
  output block128_t cipher_out,
  output logic      cipher_valid,
  output block128_t data_out,
  output logic      done,
  output logic      busy,
  output logic      dropped
);

  key_t      key_enc, key_dec;
  logic      dec_busy, dec_dropped;

  // Key of the block now in the encryption stage, handed to the decryption
  // stage together with its ciphertext.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              key_enc <= '0;
    else if (start && !busy) key_enc <= key;
  end

  blowfish128 u_encrypt (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .mode    (MODE_ENCRYPT),
    .key     (key),
    .data_in (data_in),
    .data_out(cipher_out),
    .done    (cipher_valid),
    .busy    (busy),
    .dropped (dropped)
  );

  assign key_dec = key_enc;

  blowfish128 u_decrypt (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (cipher_valid),
    .mode    (MODE_DECRYPT),
    .key     (key_dec),
    .data_in (cipher_out),
    .data_out(data_out),
    .done    (done),
    .busy    (dec_busy),
    .dropped (dec_dropped)
  );

  // The decryption stage is always free when a ciphertext arrives.
  a_dec_free: assert property (@(posedge clk) disable iff (!rst_n)
    cipher_valid |-> !dec_busy);
  a_no_dec_drop: assert property (@(posedge clk) disable iff (!rst_n)
    !dec_dropped);

endmodule

// blowfish_divider: input stage of the 128-bit Blowfish.
//
// Accepts a 128-bit block together with the key and the mode when start is
// high and the design is not busy, registers them, and hands the block to
// the two 64-bit cores as the halves [63:0] and [127:64].  One cycle after
// accepting it pulses go to both cores, and it keeps the block, key and mode
// stable until the cores report done, so the cores can read them directly.
// A start that arrives while a block is in flight is ignored and counted
// on the dropped output (a one-cycle pulse).
//
// The split into [63:0] and [127:64] and the mode input follow the block
// diagram of the design; the start/busy handshake is this design's.
//
// Interface: start/data_in/key_in/mode_in from the user; lo/hi/key/decrypt
// and go to the cores; cores_done from them.
// Timing: start sampled at edge 0, go high for the cycle after edge 0,
// busy high from edge 0 until (excluding) the edge after cores_done.
module blowfish_divider
  import blowfish_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  block128_t data_in,
  input  key_t      key_in,
  input  mode_e     mode_in,
  input  logic      cores_done,
  output block64_t  lo,
  output block64_t  hi,
  output key_t      key,
  output logic      decrypt,
  output logic      go,
  output logic      busy,
  output logic      dropped
);

  block128_t blk;
  mode_e     mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk     <= '0;
      key     <= '0;
      mode    <= MODE_ENCRYPT;
      go      <= 1'b0;
      busy    <= 1'b0;
      dropped <= 1'b0;
    end else begin
      go      <= 1'b0;
      dropped <= 1'b0;
      if (!busy) begin
        if (start) begin
          blk  <= data_in;
          key  <= key_in;
          mode <= mode_in;
          go   <= 1'b1;
          busy <= 1'b1;
        end
      end else begin
        if (start) dropped <= 1'b1;
        if (cores_done) busy <= 1'b0;
      end
    end
  end

  assign lo      = blk[63:0];
  assign hi      = blk[127:64];
  assign decrypt = (mode == MODE_DECRYPT);

endmodule

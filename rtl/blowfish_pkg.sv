// Blowfish shared constants and types.
//
// Holds the numbers every Blowfish block agrees on: the 64-bit block split
// into two 32-bit halves, sixteen Feistel rounds, eighteen P-array subkeys,
// four S-boxes of 256 words, and the initial P-array value.  The initial
// P-array is the first 18 32-bit words of the fractional part of pi in
// hexadecimal (pi = 3.243F6A88 85A308D3 ...), which is the standard Blowfish
// initialisation; the S-boxes continue the same digit sequence and live in
// the ROM image files read by sbox_rom512.
//
// The 19-cycle block latency is the figure this design is built to; the
// remaining constants are Blowfish itself.
package blowfish_pkg;

  localparam int unsigned ROUNDS     = 16;  // Feistel rounds
  localparam int unsigned NSUBKEYS   = 18;  // P1..P18
  localparam int unsigned LATENCY    = 19;  // start edge to done edge, 128-bit block

  typedef logic [31:0] word_t;
  typedef logic [63:0] block64_t;
  typedef logic [127:0] block128_t;
  typedef logic [127:0] key_t;

  // The four S-box outputs that feed one F function, index 0 = S1.
  typedef word_t [3:0] sbox_out_t;

  typedef enum logic {
    MODE_ENCRYPT = 1'b0,
    MODE_DECRYPT = 1'b1
  } mode_e;

  // Initial P-array: pi fraction hex digits 1..144.
  localparam word_t P_INIT [NSUBKEYS] = '{
    32'h243F6A88, 32'h85A308D3, 32'h13198A2E, 32'h03707344,
    32'hA4093822, 32'h299F31D0, 32'h082EFA98, 32'hEC4E6C89,
    32'h452821E6, 32'h38D01377, 32'hBE5466CF, 32'h34E90C6C,
    32'hC0AC29B7, 32'hC97C50DD, 32'h3F84D5B5, 32'hB5470917,
    32'h9216D5D9, 32'h8979FB1B
  };

endpackage

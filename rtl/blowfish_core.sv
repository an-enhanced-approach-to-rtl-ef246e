// blowfish_core: iterative 64-bit Blowfish encryption / decryption.
//
// One Feistel round per clock.  The block is held as two 32-bit halves
// xl|xr (xl = din[63:32]).  On go the core loads xl = L xor P(0) and xr = R,
// and at the same edge the shared S-box ROM captures S1..S4 of xl, because
// the core drives sb_addr with the value being loaded.  In each of the 16
// following cycles the registered S-box words give F(xl); the core forms
// t = xr xor F(xl) and, for rounds 0..14, loads xl = t xor P(r+1), xr = xl
// (the half swap) while again pointing sb_addr at the new xl.  Round 15 does
// not swap; it applies the output whitening instead:
//   dout = { xl xor P(17), t xor P(16) }.
// Decryption is the same datapath with the subkeys read in reverse order
// (see blowfish_parray).  The round structure, F function and subkey use are
// standard Blowfish; the one-round-per-cycle schedule that hides the ROM's
// registered read is this design's.
//
// Interface: go starts a block (sampled in IDLE only; ignored while busy);
// din, key and decrypt must stay stable until done.  sb_addr / sb_data
// connect to one port pair of sbox_shared (one clock read latency).
// Timing: go sampled at edge 0 (input whitening), rounds 0..15 at edges
// 1..16; dout valid and done high (one-cycle pulse) after edge 16, i.e. 17
// clock edges per 64-bit block counting the go edge.  busy is high from
// edge 0 until the edge that raises done.
module blowfish_core
  import blowfish_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      go,
  input  logic      decrypt,
  input  key_t      key,
  input  block64_t  din,
  output block64_t  dout,
  output logic      done,
  output logic      busy,
  // shared S-box store port
  output word_t     sb_addr,
  input  sbox_out_t sb_data
);

  typedef enum logic {IDLE, RUN} state_e;

  state_e     state;
  logic [3:0] rnd;
  word_t      xl, xr;
  word_t      f, t;
  word_t      sk_next, sk16, sk17;
  logic [2:0][4:0] idx;
  word_t [2:0]     subkey;

  always_comb begin
    idx[0] = (state == IDLE) ? 5'd0 : {1'b0, rnd} + 5'd1;
    idx[1] = 5'd16;
    idx[2] = 5'd17;
  end

  blowfish_parray #(.NREAD(3)) u_parray (
    .key    (key),
    .decrypt(decrypt),
    .idx    (idx),
    .subkey (subkey)
  );

  assign sk_next = subkey[0];
  assign sk16    = subkey[1];
  assign sk17    = subkey[2];

  blowfish_f u_f (
    .s(sb_data),
    .f(f)
  );

  assign t = xr ^ f;

  // Address for the S-box lookup of the xl being loaded at the next edge.
  always_comb begin
    if (state == IDLE) sb_addr = din[63:32] ^ sk_next;
    else               sb_addr = t ^ sk_next;
  end

  assign busy = (state == RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      rnd   <= '0;
      done  <= 1'b0;
      xl    <= '0;
      xr    <= '0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (go) begin
            xl    <= din[63:32] ^ sk_next;
            xr    <= din[31:0];
            rnd   <= '0;
            state <= RUN;
          end
        end
        RUN: begin
          if (rnd == 4'(ROUNDS - 1)) begin
            dout  <= {xl ^ sk17, t ^ sk16};
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            xl  <= t ^ sk_next;
            xr  <= xl;
            rnd <= rnd + 4'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule

// bf_ref_pkg: behavioural reference model of the 128-bit Blowfish used by
// the testbenches.
//
// A plain software-style Blowfish: the S-boxes are read from the same ROM
// images the hardware uses (two files of 512 words: S1|S2 and S3|S4), the
// initial P-array is typed in here separately, and the cipher is the loop
//   for i in 0..15: L ^= P[i]; R ^= F(L); swap(L, R)
//   swap(L, R); R ^= P[16]; L ^= P[17]
// with P[i] = P_INIT[i] xor key word (i mod 4).  Decryption runs the same loop
// with the P-array reversed.  Call load() once before use.
package bf_ref_pkg;

  logic [31:0] S [4][256];

  localparam logic [31:0] PI_P [18] = '{
    32'h243F6A88, 32'h85A308D3, 32'h13198A2E, 32'h03707344, 32'hA4093822,
    32'h299F31D0, 32'h082EFA98, 32'hEC4E6C89, 32'h452821E6, 32'h38D01377,
    32'hBE5466CF, 32'h34E90C6C, 32'hC0AC29B7, 32'hC97C50DD, 32'h3F84D5B5,
    32'hB5470917, 32'h9216D5D9, 32'h8979FB1B
  };

  function automatic void load();
    logic [31:0] b0 [512];
    logic [31:0] b1 [512];
    $readmemh("rtl/sbox_bank0.hex", b0);
    $readmemh("rtl/sbox_bank1.hex", b1);
    for (int i = 0; i < 256; i++) begin
      S[0][i] = b0[i];
      S[1][i] = b0[256 + i];
      S[2][i] = b1[i];
      S[3][i] = b1[256 + i];
    end
  endfunction

  function automatic logic [31:0] f_of(logic [31:0] x);
    logic [31:0] h;
    h = S[0][x[31:24]] + S[1][x[23:16]];
    h = h ^ S[2][x[15:8]];
    return h + S[3][x[7:0]];
  endfunction

  function automatic logic [31:0] subkey(logic [127:0] key, int i);
    logic [31:0] kw;
    case (i % 4)
      0: kw = key[127:96];
      1: kw = key[95:64];
      2: kw = key[63:32];
      default: kw = key[31:0];
    endcase
    return PI_P[i] ^ kw;
  endfunction

  function automatic logic [63:0] bf64(logic [127:0] key, bit dec, logic [63:0] blk);
    logic [31:0] p [18];
    logic [31:0] l, r, tmp;
    for (int i = 0; i < 18; i++) p[i] = subkey(key, dec ? 17 - i : i);
    l = blk[63:32];
    r = blk[31:0];
    for (int i = 0; i < 16; i++) begin
      l = l ^ p[i];
      r = r ^ f_of(l);
      tmp = l; l = r; r = tmp;
    end
    tmp = l; l = r; r = tmp;
    r = r ^ p[16];
    l = l ^ p[17];
    return {l, r};
  endfunction

  function automatic logic [127:0] bf128(logic [127:0] key, bit dec, logic [127:0] blk);
    return {bf64(key, dec, blk[127:64]), bf64(key, dec, blk[63:0])};
  endfunction

endpackage

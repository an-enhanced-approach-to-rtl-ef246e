// blowfish_f: the Blowfish F function combiner.
//
// F(x) = ((S1[a] + S2[b]) xor S3[c]) + S4[d], additions modulo 2^32, where
// a|b|c|d are the bytes of x.  The S-box lookups themselves happen in the
// shared synchronous ROM, so this block only receives the four looked-up
// words and combines them exactly as the standard F function does.
//
// Interface: s[0..3] = S1..S4 outputs, f = result.  Purely combinational.
module blowfish_f
  import blowfish_pkg::*;
(
  input  sbox_out_t s,
  output word_t     f
);

  always_comb begin
    f = ((s[0] + s[1]) ^ s[2]) + s[3];
  end

endmodule

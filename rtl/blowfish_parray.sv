// blowfish_parray: the eighteen round subkeys P1..P18.
//
// The subkeys are the initial P-array (pi digits) XORed with the 128-bit key
// taken as four 32-bit words K0..K3 (K0 = key[127:96]) and repeated
// cyclically: P(i) = P_INIT(i) xor K(i mod 4), i = 0..17.  Because the S-boxes
// sit in ROM and cannot be rewritten, this design does not run Blowfish's
// 521-encryption key expansion; the key enters through the P-array XOR only.
// That is this design's choice.
//
// Decryption reads the same array backwards, so step k returns P(k) when
// encrypting and P(17-k) when decrypting.  The core uses step 0 for the
// input whitening, steps 1..15 in the rounds and steps 16 and 17 for the
// output whitening.
//
// Interface: NREAD independent read ports; idx values above 17 return the
// value of step 17.  Purely combinational (the key is held by the caller).
module blowfish_parray
  import blowfish_pkg::*;
#(
  parameter int unsigned NREAD = 3
) (
  input  key_t                  key,
  input  logic                  decrypt,
  input  logic [NREAD-1:0][4:0] idx,
  output word_t [NREAD-1:0]     subkey
);

  word_t parr [NSUBKEYS];

  always_comb begin
    for (int i = 0; i < NSUBKEYS; i++) begin
      parr[i] = P_INIT[i] ^ key[127 - 32*(i % 4) -: 32];
    end
  end

  always_comb begin
    for (int r = 0; r < NREAD; r++) begin
      logic [4:0] k;
      k = (idx[r] > 5'd17) ? 5'd17 : idx[r];
      subkey[r] = decrypt ? parr[5'd17 - k] : parr[k];
    end
  end

endmodule

// hb_cipher16: loop-unrolled 16-bit Hummingbird block cipher, encryption.
//
// Purely combinational: one full encryption E_k(din) settles within one clock
// cycle, which is what lets the speed-optimized cores run one block-cipher
// call per cycle. Four regular rounds, each
//   m = L(S(m ^ Kj))            (j = 1..4)
// followed by the final round
//   dout = S(m ^ K1 ^ K3) ^ K2 ^ K4
// where K1..K4 are the four 16-bit words of the 64-bit subkey `key`
// (K1 in key[63:48]). S is the layer of four 4-bit S-boxes and L the linear
// layer, both in hb_pkg.
//
// The round structure is that of the Hummingbird 16-bit block cipher; the
// unrolled form and the key packing are this design's choices.
module hb_cipher16
  import hb_pkg::*;
#(
  // 0: S-boxes S1..S4 on the four nibbles; 1..4: S-box S<SBOX> on every nibble
  parameter int unsigned SBOX = 3
)
(
  input  word_t   din,
  input  subkey_t key,
  output word_t   dout
);

  word_t m [5];

  always_comb begin
    m[0] = din;
    for (int unsigned j = 1; j <= 4; j++)
      m[j] = lin(s_layer(m[j-1] ^ rkey(key, j), SBOX));
    dout = s_layer(m[4] ^ rkey(key, 1) ^ rkey(key, 3), SBOX) ^ rkey(key, 2) ^ rkey(key, 4);
  end

  if (SBOX > 4) begin : g_bad_sbox
    $error("SBOX must be 0..4");
  end

endmodule

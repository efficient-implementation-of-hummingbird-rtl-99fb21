// hb_decipher16: loop-unrolled 16-bit Hummingbird block cipher, decryption.
//
// Purely combinational inverse of hb_cipher16 for the same 64-bit subkey:
//   m = S^-1(din ^ K2 ^ K4) ^ K1 ^ K3
//   m = S^-1(L^-1(m)) ^ Kj      for j = 4, 3, 2, 1
// The speed-optimized encryption/decryption core uses it for its decryption
// routine, one decryption per clock cycle. The paper names the decryption
// routine; its rounds are derived here by inverting the encryption rounds.
module hb_decipher16
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
    m[4] = s_layer_inv(din ^ rkey(key, 2) ^ rkey(key, 4), SBOX) ^ rkey(key, 1) ^ rkey(key, 3);
    for (int unsigned j = 4; j >= 1; j--)
      m[j-1] = s_layer_inv(lin_inv(m[j]), SBOX) ^ rkey(key, j);
    dout = m[0];
  end

  if (SBOX > 4) begin : g_bad_sbox
    $error("SBOX must be 0..4");
  end

endmodule

// hb_pkg: shared types, constants and pure functions of the Hummingbird cores.
//
// Hummingbird works on 16-bit words. Its 256-bit key is four 64-bit subkeys
// k1..k4, one per 16-bit block cipher E_k1..E_k4; each subkey is in turn four
// 16-bit round keys K1..K4. The 16-bit block cipher has four regular rounds
// (round-key XOR, a layer of four 4-bit S-boxes, the linear layer L) and a
// final round (XOR with K1^K3, S-box layer, XOR with K2^K4).
//
// Key packing (this design's choice): key[255:192] is k1 and key[63:0] is k4;
// inside a 64-bit subkey, bits [63:48] are round key K1 and [15:0] are K4.
// With four distinct S-boxes, the most significant nibble of a word goes
// through S1 and the least significant through S4; the optimized cores instead
// repeat one S-box on all four nibbles (SBOX parameter, see s_layer).
//
// The S-box tables, the linear layer L(x) = x ^ (x <<< 6) ^ (x <<< 10) and the
// feedback polynomial of the 16-bit LFSR are those of Hummingbird-1; the
// inverse L^-1(y) = y ^ (y <<< 2) ^ (y <<< 4) ^ (y <<< 12) ^ (y <<< 14)
// follows from L. Following the implementation this RTL reproduces, every
// addition modulo 2^16 of the original algorithm is an XOR.
package hb_pkg;

  typedef logic [15:0] word_t;
  typedef logic [63:0] subkey_t;
  typedef logic [255:0] key_t;

  // Operation modes of the encryption/decryption core.
  typedef enum logic [1:0] {
    MODE_ENC     = 2'd0,  // every block is encrypted
    MODE_DEC     = 2'd1,  // every block is decrypted
    MODE_ENC_DEC = 2'd2,  // blocks alternate, starting with an encryption
    MODE_DEC_ENC = 2'd3   // blocks alternate, starting with a decryption
  } mode_e;

  // The LFSR is seeded with the last initialization result OR this constant,
  // which keeps it away from the all-zero state.
  localparam word_t LFSR_SEED_OR = 16'h1000;

  function automatic logic [3:0] sbox(input logic [1:0] idx, input logic [3:0] x);
    logic [3:0] s1 [16] = '{4'h8, 4'h6, 4'h5, 4'hF, 4'h1, 4'hC, 4'hA, 4'h9,
                            4'hE, 4'hB, 4'h2, 4'h4, 4'h7, 4'h0, 4'hD, 4'h3};
    logic [3:0] s2 [16] = '{4'h0, 4'h7, 4'hE, 4'h1, 4'h5, 4'hB, 4'h8, 4'h2,
                            4'h3, 4'hA, 4'hD, 4'h6, 4'hF, 4'hC, 4'h4, 4'h9};
    logic [3:0] s3 [16] = '{4'h2, 4'hE, 4'hF, 4'h5, 4'hC, 4'h1, 4'h9, 4'hA,
                            4'hB, 4'h4, 4'h6, 4'h8, 4'h0, 4'h7, 4'h3, 4'hD};
    logic [3:0] s4 [16] = '{4'h0, 4'h7, 4'h3, 4'h4, 4'hC, 4'h1, 4'hA, 4'hF,
                            4'hD, 4'hE, 4'h6, 4'hB, 4'h2, 4'h8, 4'h9, 4'h5};
    case (idx)
      2'd0:    return s1[x];
      2'd1:    return s2[x];
      2'd2:    return s3[x];
      default: return s4[x];
    endcase
  endfunction

  function automatic logic [3:0] sbox_inv(input logic [1:0] idx, input logic [3:0] x);
    logic [3:0] i1 [16] = '{4'hD, 4'h4, 4'hA, 4'hF, 4'hB, 4'h2, 4'h1, 4'hC,
                            4'h0, 4'h7, 4'h6, 4'h9, 4'h5, 4'hE, 4'h8, 4'h3};
    logic [3:0] i2 [16] = '{4'h0, 4'h3, 4'h7, 4'h8, 4'hE, 4'h4, 4'hB, 4'h1,
                            4'h6, 4'hF, 4'h9, 4'h5, 4'hD, 4'hA, 4'h2, 4'hC};
    logic [3:0] i3 [16] = '{4'hC, 4'h5, 4'h0, 4'hE, 4'h9, 4'h3, 4'hA, 4'hD,
                            4'hB, 4'h6, 4'h7, 4'h8, 4'h4, 4'hF, 4'h1, 4'h2};
    logic [3:0] i4 [16] = '{4'h0, 4'h5, 4'hC, 4'h2, 4'h3, 4'hF, 4'hA, 4'h1,
                            4'hD, 4'hE, 4'h6, 4'hB, 4'h4, 4'h8, 4'h9, 4'h7};
    case (idx)
      2'd0:    return i1[x];
      2'd1:    return i2[x];
      2'd2:    return i3[x];
      default: return i4[x];
    endcase
  endfunction

  // The same S-boxes in Boolean-function form: each output bit as an XOR of
  // AND terms of the input bits (algebraic normal form, obtained from the
  // tables by the binary Moebius transform). Bit 0 is the least significant.
  function automatic logic [3:0] sbox_bfr(input logic [1:0] idx, input logic [3:0] x);
    logic [3:0] y;
    case (idx)
      2'd0: begin  // S1
        y[0] = x[1] ^ x[2] ^ (x[0]&x[2]) ^ (x[0]&x[3]) ^ (x[1]&x[3]) ^ (x[0]&x[1]&x[3]) ^ (x[0]&x[2]&x[3]);
        y[1] = x[0] ^ (x[0]&x[2]) ^ (x[1]&x[2]) ^ (x[0]&x[1]&x[2]) ^ x[3] ^ (x[0]&x[3]) ^ (x[0]&x[1]&x[3]);
        y[2] = x[0] ^ x[1] ^ (x[0]&x[1]) ^ (x[1]&x[2]) ^ x[3] ^ (x[0]&x[1]&x[3]);
        y[3] = 1'b1 ^ x[0] ^ x[1] ^ x[2] ^ (x[0]&x[1]&x[2]) ^ (x[0]&x[3]);
      end
      2'd1: begin  // S2
        y[0] = x[0] ^ x[2] ^ (x[0]&x[2]) ^ (x[1]&x[2]) ^ x[3] ^ (x[2]&x[3]) ^ (x[0]&x[2]&x[3]);
        y[1] = x[0] ^ x[1] ^ (x[1]&x[2]) ^ x[3] ^ (x[0]&x[3]) ^ (x[0]&x[1]&x[3]) ^ (x[0]&x[2]&x[3]) ^ (x[1]&x[2]&x[3]);
        y[2] = x[0] ^ x[1] ^ x[2] ^ (x[0]&x[1]&x[2]) ^ (x[0]&x[3]) ^ (x[1]&x[2]&x[3]);
        y[3] = x[1] ^ (x[0]&x[1]) ^ (x[0]&x[2]) ^ (x[0]&x[1]&x[2]) ^ (x[0]&x[3]) ^ (x[0]&x[1]&x[3]) ^ (x[2]&x[3]);
      end
      2'd2: begin  // S3
        y[0] = x[1] ^ (x[0]&x[2]) ^ x[3] ^ (x[0]&x[3]) ^ (x[0]&x[1]&x[3]) ^ (x[2]&x[3]) ^ (x[0]&x[2]&x[3]);
        y[1] = 1'b1 ^ (x[0]&x[1]) ^ x[2] ^ (x[0]&x[3]) ^ (x[0]&x[1]&x[3]) ^ (x[1]&x[2]&x[3]);
        y[2] = x[0] ^ x[1] ^ (x[0]&x[1]) ^ x[2] ^ (x[0]&x[1]&x[3]) ^ (x[2]&x[3]) ^ (x[1]&x[2]&x[3]);
        y[3] = x[0] ^ x[1] ^ x[2] ^ (x[1]&x[2]) ^ (x[0]&x[1]&x[2]) ^ x[3] ^ (x[0]&x[2]&x[3]);
      end
      default: begin  // S4
        y[0] = x[0] ^ x[1] ^ (x[1]&x[2]) ^ x[3] ^ (x[2]&x[3]) ^ (x[0]&x[2]&x[3]) ^ (x[1]&x[2]&x[3]);
        y[1] = x[0] ^ x[1] ^ (x[0]&x[2]) ^ (x[0]&x[1]&x[3]) ^ (x[2]&x[3]) ^ (x[0]&x[2]&x[3]);
        y[2] = x[0] ^ x[2] ^ (x[1]&x[2]) ^ x[3] ^ (x[0]&x[3]) ^ (x[0]&x[1]&x[3]) ^ (x[1]&x[2]&x[3]);
        y[3] = x[2] ^ (x[0]&x[2]) ^ (x[0]&x[1]&x[2]) ^ x[3] ^ (x[1]&x[3]) ^ (x[0]&x[1]&x[3]);
      end
    endcase
    return y;
  endfunction

  // Substitution layer. sel = 0: S1 on the top nibble ... S4 on the bottom
  // nibble; sel = 1..4: the one S-box S<sel> on all four nibbles.
  function automatic word_t s_layer(input word_t x, input int unsigned sel);
    word_t y;
    for (int unsigned n = 0; n < 4; n++)
      y[15-4*n -: 4] = sbox(2'((sel == 0) ? n : sel - 1), x[15-4*n -: 4]);
    return y;
  endfunction

  // Substitution layer built from the Boolean-function form of the S-boxes.
  function automatic word_t s_layer_bfr(input word_t x, input int unsigned sel);
    word_t y;
    for (int unsigned n = 0; n < 4; n++)
      y[15-4*n -: 4] = sbox_bfr(2'((sel == 0) ? n : sel - 1), x[15-4*n -: 4]);
    return y;
  endfunction

  function automatic word_t s_layer_inv(input word_t x, input int unsigned sel);
    word_t y;
    for (int unsigned n = 0; n < 4; n++)
      y[15-4*n -: 4] = sbox_inv(2'((sel == 0) ? n : sel - 1), x[15-4*n -: 4]);
    return y;
  endfunction

  function automatic word_t rotl(input word_t x, input int unsigned n);
    return word_t'((x << n) | (x >> (16 - n)));
  endfunction

  // Permutation (linear) layer.
  function automatic word_t lin(input word_t x);
    return x ^ rotl(x, 6) ^ rotl(x, 10);
  endfunction

  function automatic word_t lin_inv(input word_t y);
    return y ^ rotl(y, 2) ^ rotl(y, 4) ^ rotl(y, 12) ^ rotl(y, 14);
  endfunction

  // Round key j (1..4) of a 64-bit subkey.
  function automatic word_t rkey(input subkey_t k, input int unsigned j);
    return k[64-16*j +: 16];
  endfunction

  // 64-bit subkey i (1..4) of the 256-bit key.
  function automatic subkey_t subkey(input key_t key, input int unsigned i);
    return key[256-64*i +: 64];
  endfunction

  // One step of the 16-bit Fibonacci LFSR with characteristic polynomial
  // x^16 + x^15 + x^12 + x^10 + x^7 + x^3 + 1: shift left, feedback into bit 0.
  function automatic word_t lfsr_step(input word_t s);
    return {s[14:0], s[15] ^ s[14] ^ s[11] ^ s[9] ^ s[6] ^ s[2]};
  endfunction

endpackage

// hb_ref_pkg: algorithm-level reference model of Hummingbird for the testbenches.
//
// Written independently of the RTL's datapath: S-boxes come from hex strings,
// the linear layer is evaluated bit by bit, inverse S-boxes and the inverse
// linear layer are found by search (call ref_setup() once first), and the
// state update is applied to the whole state at once, as the algorithm states
// it, rather than in the cores' cycle order. `sel` picks the S-box use:
// 0 for S1..S4 on the four nibbles, 1..4 for S<sel> on every nibble.
// Additions are XORs, as in the hardware. Key packing: k1 = key[255:192],
// round key K1 = k[63:48].
package hb_ref_pkg;

  typedef struct {
    logic [15:0] rs[4];
    logic [15:0] lfsr;
  } ref_state_t;

  // S1..S4 as strings of 16 hex digits, entry 0 first.
  localparam string SBOX_HEX[4] = '{"865F1CA9EB2470D3", "07E15B823AD6FC49",
                                     "2EF5C19AB468073D", "0734C1AFDE6B2895"};

  logic [3:0]  sb    [4][16];
  logic [3:0]  sbinv [4][16];
  logic [15:0] linv_col [16];

  function automatic int hexval(byte c);
    if (c >= "0" && c <= "9") return int'(c) - int'("0");
    return int'(c) - int'("A") + 10;
  endfunction

  function automatic logic [15:0] ref_L(logic [15:0] x);
    logic [15:0] y;
    for (int i = 0; i < 16; i++)
      y[i] = x[i] ^ x[(i + 16 - 6) % 16] ^ x[(i + 16 - 10) % 16];
    return y;
  endfunction

  function automatic void ref_setup();
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 16; i++) begin
        sb[s][i] = 4'(hexval(SBOX_HEX[s][i]));
        sbinv[s][sb[s][i]] = 4'(i);
      end
    for (int x = 0; x < 65536; x++) begin
      logic [15:0] y;
      y = ref_L(16'(x));
      if ($countones(y) == 1)
        for (int b = 0; b < 16; b++) if (y[b]) linv_col[b] = 16'(x);
    end
  endfunction

  function automatic logic [15:0] ref_Linv(logic [15:0] y);
    logic [15:0] x = '0;
    for (int b = 0; b < 16; b++) if (y[b]) x ^= linv_col[b];
    return x;
  endfunction

  function automatic logic [15:0] ref_S(logic [15:0] x, bit inv, int sel);
    logic [15:0] y;
    for (int n = 0; n < 4; n++) begin
      logic [3:0] v;
      v = x[15 - 4*n -: 4];
      y[15 - 4*n -: 4] = inv ? sbinv[sel == 0 ? n : sel - 1][v] : sb[sel == 0 ? n : sel - 1][v];
    end
    return y;
  endfunction

  function automatic logic [15:0] rk(logic [63:0] k, int j);
    return k[63 - 16*(j-1) -: 16];
  endfunction

  function automatic logic [63:0] sk(logic [255:0] key, int i);
    return key[255 - 64*(i-1) -: 64];
  endfunction

  function automatic logic [15:0] ref_E(logic [63:0] k, logic [15:0] x, int sel);
    for (int j = 1; j <= 4; j++) x = ref_L(ref_S(x ^ rk(k, j), 0, sel));
    return ref_S(x ^ rk(k, 1) ^ rk(k, 3), 0, sel) ^ rk(k, 2) ^ rk(k, 4);
  endfunction

  function automatic logic [15:0] ref_D(logic [63:0] k, logic [15:0] x, int sel);
    x = ref_S(x ^ rk(k, 2) ^ rk(k, 4), 1, sel) ^ rk(k, 1) ^ rk(k, 3);
    for (int j = 4; j >= 1; j--) x = ref_S(ref_Linv(x), 1, sel) ^ rk(k, j);
    return x;
  endfunction

  function automatic logic [255:0] rand_key();
    logic [255:0] k;
    for (int i = 0; i < 8; i++) k[32*i +: 32] = $urandom;
    return k;
  endfunction

  function automatic logic [15:0] ref_lfsr(logic [15:0] s);
    return {s[14:0], ^(s & 16'hCA44)};
  endfunction

  function automatic void ref_init(ref ref_state_t st, input logic [255:0] key,
                                   input logic [15:0] nonce[4], input int sel);
    logic [15:0] v12, v23, v34, v41;
    for (int i = 0; i < 4; i++) st.rs[i] = nonce[i];
    for (int t = 0; t < 4; t++) begin
      v12 = ref_E(sk(key, 1), st.rs[0] ^ st.rs[2], sel);
      v23 = ref_E(sk(key, 2), v12 ^ st.rs[1], sel);
      v34 = ref_E(sk(key, 3), v23 ^ st.rs[2], sel);
      v41 = ref_E(sk(key, 4), v34 ^ st.rs[3], sel);
      st.rs[0] ^= v34;
      st.rs[1] ^= v12;
      st.rs[2] ^= v23;
      st.rs[3] ^= v41;
    end
    st.lfsr = v41 | 16'h1000;
  endfunction

  function automatic void ref_update(ref ref_state_t st, input logic [15:0] v12,
                                     input logic [15:0] v23, input logic [15:0] v34);
    logic [15:0] n1, n4;
    st.lfsr = ref_lfsr(st.lfsr);
    n1 = st.rs[0] ^ v34;
    n4 = st.rs[3] ^ v12 ^ n1;
    st.rs[2] = st.rs[2] ^ v23 ^ st.lfsr;
    st.rs[1] = st.rs[1] ^ v12 ^ n4;
    st.rs[0] = n1;
    st.rs[3] = n4;
  endfunction

  function automatic logic [15:0] ref_encrypt(ref ref_state_t st, input logic [255:0] key,
                                              input logic [15:0] pt, input int sel);
    logic [15:0] v12, v23, v34, ct;
    v12 = ref_E(sk(key, 1), pt ^ st.rs[0], sel);
    v23 = ref_E(sk(key, 2), v12 ^ st.rs[1], sel);
    v34 = ref_E(sk(key, 3), v23 ^ st.rs[2], sel);
    ct  = ref_E(sk(key, 4), v34 ^ st.rs[3], sel);
    ref_update(st, v12, v23, v34);
    return ct;
  endfunction

  function automatic logic [15:0] ref_decrypt(ref ref_state_t st, input logic [255:0] key,
                                              input logic [15:0] ct, input int sel);
    logic [15:0] v12, v23, v34, pt;
    v34 = ref_D(sk(key, 4), ct, sel) ^ st.rs[3];
    v23 = ref_D(sk(key, 3), v34, sel) ^ st.rs[2];
    v12 = ref_D(sk(key, 2), v23, sel) ^ st.rs[1];
    pt  = ref_D(sk(key, 1), v12, sel) ^ st.rs[0];
    ref_update(st, v12, v23, v34);
    return pt;
  endfunction

endpackage

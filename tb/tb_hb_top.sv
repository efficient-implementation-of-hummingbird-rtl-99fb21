// tb_hb_top: end-to-end test of the whole design at its default sizes.
//
// Scenario:
//  1. The three cores get the same key and nonce and encrypt the same stream
//     of plaintext blocks, each as fast as it accepts them. The two
//     speed-optimized cores (both with S-box S3) must produce the same
//     ciphertexts, and all three the reference model's for their S-box, with the
//     initialization and block latencies of each core (20/4 cycles for the
//     speed-optimized cores, 68/17 for the area-optimized core).
//  2. `ce` is dropped and the encryption/decryption core restarted with the
//     same key and nonce in decryption mode; fed the ciphertexts, it must
//     return the plaintexts.
//  3. The encryption/decryption core runs both alternating modes against a
//     reference peer.
// Every mechanism is counted: nonce loads, completed initializations,
// back-to-back blocks per core, blocks that complete the deferred RS2 update
// of the encryption-only core, each operation mode, each KEYSEL value and the
// restarts; one that never happens counts as a failure.
module tb_hb_top;
  import hb_pkg::*;
  import hb_ref_pkg::*;

  localparam int NBLK = 64;
  // S-box choices of the cores' default configurations
  localparam int SEL_SPEED = 3, SEL_AREA = 1;

  logic         clk = 0, rst_n = 0;
  logic         se_ce = 0, se_pt_valid = 0, se_ready, se_vo;
  logic [15:0]  se_nonce = '0, se_pt = '0, se_ct;
  logic         sed_ce = 0, sed_din_valid = 0, sed_ready, sed_vo, sed_dout_dec;
  logic [15:0]  sed_nonce = '0, sed_din = '0, sed_dout;
  mode_e        sed_mode = MODE_ENC;
  logic         ae_ce = 0, ae_pt_valid = 0, ae_ready, ae_vo;
  logic [15:0]  ae_nonce = '0, ae_pt = '0, ae_ct, ae_key1, ae_key2, ae_key3, ae_key4;
  logic [1:0]   ae_keysel;
  logic [255:0] key = '0;

  hb_top dut (
    .clk, .rst_n,
    .se_ce, .se_nonce, .se_key(key), .se_pt, .se_pt_valid, .se_ready, .se_ct, .se_vo,
    .sed_ce, .sed_mode, .sed_nonce, .sed_key(key), .sed_din, .sed_din_valid,
    .sed_ready, .sed_dout, .sed_dout_dec, .sed_vo,
    .ae_ce, .ae_nonce, .ae_keysel, .ae_key1, .ae_key2, .ae_key3, .ae_key4,
    .ae_pt, .ae_pt_valid, .ae_ready, .ae_ct, .ae_vo
  );

  // external key register of the area-optimized core
  always_comb {ae_key1, ae_key2, ae_key3, ae_key4} = sk(key, int'(ae_keysel) + 1);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int m_nonce_load = 0, m_init = 0, m_restart = 0, m_rs2_deferred = 0;
  int m_b2b[3] = '{0, 0, 0}, m_mode[4] = '{0, 0, 0, 0}, m_keysel[4] = '{0, 0, 0, 0};

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  always @(negedge clk) begin
    cycle++;
    if (ae_ce) m_keysel[ae_keysel]++;
  end

  logic [15:0] nonce[4], P[NBLK], C_ref[NBLK], C_ref_ae[NBLK];
  logic [15:0] C_se[NBLK], C_sed[NBLK], C_ae[NBLK], P_back[NBLK];

  // Raises CE, loads the nonce through NONCE, then waits for READY; RESULT is
  // the number of cycles from CE to READY.
  `define HB_START(CE, NONCE, READY, RESULT) \
    begin \
      int c1; \
      CE = 0; @(negedge clk); CE = 1; c1 = cycle; \
      for (int i = 0; i < 4; i++) begin NONCE = nonce[i]; @(negedge clk); end \
      m_nonce_load++; \
      while (!READY && cycle - c1 < 200) @(negedge clk); \
      if (READY) m_init++; \
      RESULT = cycle - c1; \
    end

  // Feeds blocks IN[0..NBLK-1] with VALID held high and collects outputs into
  // OUT, checking the latency LAT of each block and counting back-to-back
  // accepts (spacing SP) under index B2B.
  `define HB_STREAM(VALID, DATA, READY, VO, RES, IN, OUT, LAT, SP, B2B) \
    begin \
      int acc_c[NBLK]; int na, no, last; na = 0; no = 0; last = -100; \
      while (no < NBLK && cycle < 1000000) begin \
        if (VO) begin \
          OUT[no] = RES; checks++; \
          if (cycle - acc_c[no] != LAT) fail($sformatf("latency %0d, expected %0d", cycle - acc_c[no], LAT)); \
          no++; \
        end \
        VALID = na < NBLK; DATA = na < NBLK ? IN[na] : 16'($urandom); \
        if (READY && VALID) begin \
          acc_c[na] = cycle; if (cycle - last == SP) m_b2b[B2B]++; last = cycle; na++; \
        end \
        @(negedge clk); \
      end \
      VALID = 0; \
    end

  task automatic compare(string what, logic [15:0] got[NBLK], logic [15:0] exp[NBLK]);
    for (int i = 0; i < NBLK; i++) begin
      checks++;
      if (got[i] !== exp[i]) fail($sformatf("%s block %0d: %h expected %h", what, i, got[i], exp[i]));
    end
  endtask

  task automatic alt_session(mode_e m);
    ref_state_t st, peer;
    int t;
    bit dec;
    sed_mode = m;
    ref_init(st, key, nonce, SEL_SPEED);
    ref_init(peer, key, nonce, SEL_SPEED);
    `HB_START(sed_ce, sed_nonce, sed_ready, t)
    m_restart++;
    checks++;
    if (t != 20) fail("encryption/decryption core initialization length");
    dec = (m == MODE_DEC_ENC);
    for (int i = 0; i < 16; i++) begin
      logic [15:0] p, x, e;
      p = 16'($urandom);
      if (dec) begin x = ref_encrypt(peer, key, p, SEL_SPEED); e = ref_decrypt(st, key, x, SEL_SPEED); end
      else begin x = p; e = ref_encrypt(st, key, p, SEL_SPEED); void'(ref_decrypt(peer, key, e, SEL_SPEED)); end
      while (!sed_ready) @(negedge clk);
      sed_din = x;
      sed_din_valid = 1;
      @(negedge clk);
      sed_din_valid = 0;
      while (!sed_vo) @(negedge clk);
      checks++;
      if (sed_dout !== e || sed_dout_dec !== dec) fail($sformatf("mode %0d block %0d", m, i));
      checks++;
      if (dec && sed_dout !== p) fail("alternating mode lost the peer's plaintext");
      m_mode[m]++;
      dec = !dec;
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t st, st_ae;
    int t_se, t_sed, t_ae;
    ref_setup();
    key = rand_key();
    for (int i = 0; i < 4; i++) nonce[i] = 16'($urandom);
    ref_init(st, key, nonce, SEL_SPEED);
    ref_init(st_ae, key, nonce, SEL_AREA);
    for (int i = 0; i < NBLK; i++) begin
      P[i] = 16'($urandom);
      C_ref[i] = ref_encrypt(st, key, P[i], SEL_SPEED);
      C_ref_ae[i] = ref_encrypt(st_ae, key, P[i], SEL_AREA);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. all three cores encrypt the same stream
    fork
      begin
        `HB_START(se_ce, se_nonce, se_ready, t_se)
        `HB_STREAM(se_pt_valid, se_pt, se_ready, se_vo, se_ct, P, C_se, 4, 4, 0)
      end
      begin
        sed_mode = MODE_ENC;
        `HB_START(sed_ce, sed_nonce, sed_ready, t_sed)
        `HB_STREAM(sed_din_valid, sed_din, sed_ready, sed_vo, sed_dout, P, C_sed, 4, 4, 1)
      end
      begin
        `HB_START(ae_ce, ae_nonce, ae_ready, t_ae)
        `HB_STREAM(ae_pt_valid, ae_pt, ae_ready, ae_vo, ae_ct, P, C_ae, 17, 16, 2)
      end
    join
    checks += 3;
    if (t_se != 20) fail($sformatf("encryption-only core initialization %0d cycles", t_se));
    if (t_sed != 20) fail($sformatf("encryption/decryption core initialization %0d cycles", t_sed));
    if (t_ae != 68) fail($sformatf("area-optimized core initialization %0d cycles", t_ae));
    compare("speed enc", C_se, C_ref);
    compare("speed enc/dec", C_sed, C_ref);
    compare("area enc", C_ae, C_ref_ae);
    m_mode[MODE_ENC] += NBLK;
    m_rs2_deferred += NBLK - 1;

    // 2. restart the enc/dec core and decrypt the ciphertexts
    sed_mode = MODE_DEC;
    `HB_START(sed_ce, sed_nonce, sed_ready, t_sed)
    m_restart++;
    `HB_STREAM(sed_din_valid, sed_din, sed_ready, sed_vo, sed_dout, C_se, P_back, 4, 4, 1)
    compare("decryption round trip", P_back, P);
    m_mode[MODE_DEC] += NBLK;

    // 3. alternating modes
    alt_session(MODE_ENC_DEC);
    alt_session(MODE_DEC_ENC);

    $display("nonce loads %0d, initializations %0d, restarts %0d, RS2 completions %0d",
             m_nonce_load, m_init, m_restart, m_rs2_deferred);
    $display("back-to-back blocks: speed enc %0d, speed enc/dec %0d, area enc %0d",
             m_b2b[0], m_b2b[1], m_b2b[2]);
    $display("blocks per mode: %0d %0d %0d %0d; KEYSEL cycles: %0d %0d %0d %0d",
             m_mode[0], m_mode[1], m_mode[2], m_mode[3],
             m_keysel[0], m_keysel[1], m_keysel[2], m_keysel[3]);
    checks++;
    if (m_nonce_load == 0 || m_init != m_nonce_load || m_restart == 0 || m_rs2_deferred == 0)
      fail("a start-up mechanism never happened");
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (m_b2b[i] == 0) fail($sformatf("core %0d never ran blocks back to back", i));
    end
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (m_mode[i] == 0) fail($sformatf("mode %0d never ran", i));
      if (m_keysel[i] == 0) fail($sformatf("KEYSEL %0d never driven", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

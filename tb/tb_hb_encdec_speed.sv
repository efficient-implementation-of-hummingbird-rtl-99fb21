// tb_hb_encdec_speed: end-to-end test of the speed-optimized
// encryption/decryption core in all four operation modes.
//
// Each session loads a nonce, checks that `ready` rises 20 cycles after `ce`,
// then streams blocks (back to back and with gaps). A reference model of the
// core predicts every output; a second reference instance plays the peer that
// shares key and nonce and performs the opposite operation, so every
// decryption is checked to return the peer's plaintext and every encryption
// to decrypt correctly at the peer. Latency (4 cycles to `vo`) and the
// `dout_dec` flag are checked too.
module tb_hb_encdec_speed;
  import hb_ref_pkg::*;

  // S-box choice of the core's default configuration
  localparam int SEL = 3;
  import hb_pkg::*;

  logic         clk = 0, rst_n = 0, ce = 0, din_valid = 0, ready, vo, dout_dec;
  logic [15:0]  nonce = '0, din = '0, dout;
  logic [255:0] key = '0;
  mode_e        mode = MODE_ENC;
  int checks = 0, failures = 0, cycle = 0;
  int n_enc = 0, n_dec = 0, n_mode[4] = '{0, 0, 0, 0}, back_to_back = 0;

  hb_encdec_speed dut (.clk, .rst_n, .ce, .mode, .nonce, .key, .din, .din_valid,
                       .ready, .dout, .dout_dec, .vo);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  logic [15:0] exp_q[$];
  logic        expdec_q[$];
  int          due_q[$];
  int          last_accept = -100;

  task automatic next_cycle();
    @(negedge clk);
    cycle++;
    if (vo) begin
      checks++;
      if (exp_q.size() == 0) fail("vo with no block in flight");
      else begin
        logic [15:0] e;
        logic ed;
        int d;
        e  = exp_q.pop_front();
        ed = expdec_q.pop_front();
        d  = due_q.pop_front();
        if (dout !== e) fail($sformatf("dout %h expected %h", dout, e));
        checks++;
        if (dout_dec !== ed) fail("dout_dec wrong");
        checks++;
        if (cycle != d) fail($sformatf("vo at cycle %0d, expected %0d", cycle, d));
      end
    end
  endtask

  task automatic session(mode_e m, int nblocks);
    ref_state_t st, peer;
    logic [15:0] n[4];
    logic [255:0] k;
    int c1, got;
    bit alt;
    k = rand_key();
    for (int i = 0; i < 4; i++) n[i] = 16'($urandom);
    key  = k;
    mode = m;
    ref_init(st, k, n, SEL);
    ref_init(peer, k, n, SEL);
    ce = 0;
    next_cycle();
    ce = 1;
    c1 = cycle;
    for (int i = 0; i < 4; i++) begin
      nonce = n[i];
      next_cycle();
    end
    while (!ready && cycle - c1 < 100) next_cycle();
    checks++;
    if (cycle - c1 != 20) fail($sformatf("initialization took %0d cycles, expected 20", cycle - c1));
    got = 0;
    alt = 0;
    while (got < nblocks) begin
      din_valid = ($urandom % 3) != 0;
      if (ready && din_valid) begin
        bit dec;
        logic [15:0] p;
        case (m)
          MODE_ENC:     dec = 0;
          MODE_DEC:     dec = 1;
          MODE_ENC_DEC: dec = alt;
          default:      dec = !alt;
        endcase
        alt = !alt;
        p = 16'($urandom);
        if (dec) begin
          din = ref_encrypt(peer, k, p, SEL);
          exp_q.push_back(ref_decrypt(st, k, din, SEL));
          checks++;
          if (exp_q[$] !== p) fail("reference decryption lost the peer's plaintext");
          n_dec++;
        end else begin
          din = p;
          exp_q.push_back(ref_encrypt(st, k, p, SEL));
          checks++;
          if (ref_decrypt(peer, k, exp_q[$], SEL) !== p) fail("peer cannot decrypt the ciphertext");
          n_enc++;
        end
        expdec_q.push_back(dec);
        due_q.push_back(cycle + 4);
        if (cycle - last_accept == 4) back_to_back++;
        last_accept = cycle;
        n_mode[m]++;
        got++;
      end else din = 16'($urandom);
      next_cycle();
      if (!ready) begin
        din_valid = 0;
        din = 16'($urandom);
      end
      while (!ready) next_cycle();
    end
    din_valid = 0;
    repeat (6) next_cycle();
    checks++;
    if (exp_q.size() != 0) fail("blocks left without output");
  endtask

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_setup();
    repeat (2) next_cycle();
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      session(MODE_ENC, 30);
      session(MODE_DEC, 30);
      session(MODE_ENC_DEC, 30);
      session(MODE_DEC_ENC, 30);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) fail($sformatf("mode %0d never ran", i));
    end
    checks++;
    if (back_to_back == 0) fail("no back-to-back blocks");
    $display("encryptions %0d decryptions %0d back-to-back %0d", n_enc, n_dec, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

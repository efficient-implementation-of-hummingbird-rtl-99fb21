// tb_hb_enc_speed: end-to-end test of the speed-optimized encryption-only core.
//
// For several keys and nonces it loads the rotors, checks that `ready` rises
// exactly 20 cycles after `ce`, then encrypts a stream of blocks, some back
// to back and some with idle gaps, and compares every ciphertext with the
// reference model. It checks the 4-cycle latency from acceptance to `vo` and
// that back-to-back blocks are accepted every 4 cycles. Dropping `ce` between
// sessions checks the return to the idle state.
module tb_hb_enc_speed;
  import hb_ref_pkg::*;

  // S-box choice of the core's default configuration
  localparam int SEL = 3;

  logic         clk = 0, rst_n = 0, ce = 0, pt_valid = 0, ready, vo;
  logic [15:0]  nonce = '0, pt = '0, ct;
  logic [255:0] key = '0;
  int checks = 0, failures = 0, cycle = 0;
  int back_to_back = 0, gaps = 0;

  hb_enc_speed dut (.clk, .rst_n, .ce, .nonce, .key, .pt, .pt_valid, .ready, .ct, .vo);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  logic [15:0] exp_q[$];
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
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (ct !== e) fail($sformatf("ct %h expected %h", ct, e));
        checks++;
        if (cycle != d) fail($sformatf("vo at cycle %0d, expected %0d", cycle, d));
      end
    end
  endtask

  task automatic session(logic [255:0] k, int nblocks);
    ref_state_t st;
    logic [15:0] n[4];
    int c1, got;
    for (int i = 0; i < 4; i++) n[i] = 16'($urandom);
    key = k;
    ref_init(st, k, n, SEL);
    ce = 0;
    next_cycle();
    ce = 1;
    c1 = cycle;
    for (int i = 0; i < 4; i++) begin
      nonce = n[i];
      checks++;
      if (ready) fail("ready during nonce load");
      next_cycle();
    end
    nonce = 16'($urandom);
    while (!ready && cycle - c1 < 100) next_cycle();
    checks++;
    if (cycle - c1 != 20) fail($sformatf("initialization took %0d cycles, expected 20", cycle - c1));
    got = 0;
    while (got < nblocks) begin
      pt_valid = ($urandom % 4) != 0;
      pt = 16'($urandom);
      if (ready && pt_valid) begin
        if (cycle - last_accept == 4) back_to_back++;
        else gaps++;
        last_accept = cycle;
        exp_q.push_back(ref_encrypt(st, k, pt, SEL));
        due_q.push_back(cycle + 4);
        got++;
      end
      next_cycle();
      if (!ready) begin
        pt_valid = 0;
        pt = 16'($urandom);   // plaintext must only matter in the accept cycle
      end
      while (!ready) next_cycle();
    end
    pt_valid = 0;
    repeat (6) next_cycle();
    checks++;
    if (exp_q.size() != 0) fail("blocks left without output");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_setup();
    repeat (2) next_cycle();
    rst_n = 1;
    session('0, 20);
    session(rand_key(), 50);
    for (int s = 0; s < 5; s++) session(rand_key(), 40);
    checks++;
    if (back_to_back == 0 || gaps == 0) fail("stream lacked back-to-back blocks or gaps");
    $display("back-to-back blocks %0d, blocks after a gap %0d", back_to_back, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hb_enc_area: end-to-end test of the area-optimized encryption core.
//
// The testbench plays the external key register: it returns the four words of
// subkey k(keysel+1) on key1..key4 in the same cycle. Per session it loads a
// nonce, checks that `ready` rises 68 cycles after `ce`, streams blocks with
// and without gaps and compares each ciphertext with the reference model. It
// checks the 17-cycle latency to `vo`, a 16-cycle spacing of back-to-back
// blocks, and that KEYSEL visits all four subkeys.
module tb_hb_enc_area;
  import hb_ref_pkg::*;

  // S-box choice of the core's default configuration
  localparam int SEL = 1;

  logic         clk = 0, rst_n = 0, ce = 0, pt_valid = 0, ready, vo;
  logic [15:0]  nonce = '0, pt = '0, ct, key1, key2, key3, key4;
  logic [1:0]   keysel;
  logic [255:0] key = '0;
  int checks = 0, failures = 0, cycle = 0;
  int back_to_back = 0, gaps = 0, ksel_seen[4] = '{0, 0, 0, 0};

  hb_enc_area dut (.clk, .rst_n, .ce, .nonce, .keysel, .key1, .key2, .key3, .key4,
                   .pt, .pt_valid, .ready, .ct, .vo);

  // external key register
  always_comb {key1, key2, key3, key4} = sk(key, int'(keysel) + 1);

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
    ksel_seen[keysel]++;
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

  task automatic session(int nblocks);
    ref_state_t st;
    logic [15:0] n[4];
    logic [255:0] k;
    int c1, got;
    k = rand_key();
    for (int i = 0; i < 4; i++) n[i] = 16'($urandom);
    key = k;
    ref_init(st, k, n, SEL);
    ce = 0;
    next_cycle();
    ce = 1;
    c1 = cycle;
    for (int i = 0; i < 4; i++) begin
      nonce = n[i];
      next_cycle();
    end
    nonce = 16'($urandom);
    while (!ready && cycle - c1 < 200) next_cycle();
    checks++;
    if (cycle - c1 != 68) fail($sformatf("initialization took %0d cycles, expected 68", cycle - c1));
    got = 0;
    while (got < nblocks) begin
      pt_valid = ($urandom % 3) != 0;
      pt = 16'($urandom);
      if (ready && pt_valid) begin
        if (cycle - last_accept == 16) back_to_back++;
        else gaps++;
        last_accept = cycle;
        exp_q.push_back(ref_encrypt(st, k, pt, SEL));
        due_q.push_back(cycle + 17);
        got++;
      end
      next_cycle();
      if (!ready) begin
        pt_valid = 0;
        pt = 16'($urandom);
      end
      while (!ready) next_cycle();
    end
    pt_valid = 0;
    repeat (20) next_cycle();
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
    for (int s = 0; s < 6; s++) session(25);
    checks++;
    if (back_to_back == 0 || gaps == 0) fail("stream lacked back-to-back blocks or gaps");
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (ksel_seen[i] == 0) fail($sformatf("KEYSEL never selected k%0d", i + 1));
    end
    $display("back-to-back blocks %0d, blocks after a gap %0d", back_to_back, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

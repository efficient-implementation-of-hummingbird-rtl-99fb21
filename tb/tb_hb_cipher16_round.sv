// tb_hb_cipher16_round: drives the round-based block cipher with single and
// back-to-back encryptions, compares each result with the reference model and
// checks the timing: `done` exactly four cycles after `start`, `busy` during
// the three cycles between, and a new start accepted in the `done` cycle,
// for every S-box choice in both S-box implementation forms.
module tb_hb_cipher16_round;
  import hb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] din = '0, dout;
  logic [63:0] key = '0;
  int checks = 0, failures = 0, cycle = 0;

  logic [15:0] dout_g[5], dout_b[5];

  // default instance (S1 on every nibble) checked for timing and value; one
  // more instance per S-box choice, in table and in Boolean-function form,
  // checked for value
  hb_cipher16_round dut (.clk, .rst_n, .start, .din, .key, .dout, .busy, .done);
  for (genvar g = 0; g < 5; g++) begin : g_sel
    hb_cipher16_round #(.SBOX(g)) u (.clk, .rst_n, .start, .din, .key, .dout(dout_g[g]),
                                     .busy(), .done());
    hb_cipher16_round #(.SBOX(g), .SBOX_BFR(1'b1)) ub (.clk, .rst_n, .start, .din, .key,
                                                      .dout(dout_b[g]), .busy(), .done());
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // Starts an encryption in the current cycle (called right after a falling
  // edge) and returns after the result has been checked, in its done cycle.
  task automatic encrypt(logic [63:0] k, logic [15:0] x);
    int c0;
    key   = k;
    din   = x;
    start = 1;
    checks++;
    if (busy) fail("busy in a start cycle");
    c0 = cycle;
    @(negedge clk);
    start = 0;
    din   = $urandom;   // input must only matter in the start cycle
    while (!done) begin
      checks++;
      if (!busy) fail("busy low while rounds remain");
      @(negedge clk);
      if (cycle - c0 > 10) break;
    end
    checks++;
    if (cycle - c0 != 4) fail($sformatf("latency %0d cycles, expected 4", cycle - c0));
    checks++;
    if (dout !== ref_E(k, x, 1)) fail($sformatf("E(%h,%h)=%h expected %h", k, x, dout, ref_E(k, x, 1)));
    for (int g = 0; g < 5; g++) begin
      checks++;
      if (dout_g[g] !== ref_E(k, x, g)) fail($sformatf("SBOX=%0d E(%h,%h)=%h", g, k, x, dout_g[g]));
      checks++;
      if (dout_b[g] !== ref_E(k, x, g)) fail($sformatf("SBOX=%0d BFR E(%h,%h)=%h", g, k, x, dout_b[g]));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_setup();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    encrypt(64'h0123_4567_89AB_CDEF, 16'hBEEF);
    @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (dout !== ref_E(64'h0123_4567_89AB_CDEF, 16'hBEEF, 1)) fail("dout not held while idle");
    // back-to-back: each next start in the done cycle of the previous one
    for (int i = 0; i < 300; i++)
      encrypt({$urandom, $urandom}, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

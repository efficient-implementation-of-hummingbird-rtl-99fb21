// tb_hb_cipher16: checks the unrolled block cipher against the reference model
// for random keys and inputs, plus fixed corner values, for the default and
// for every S-box choice, and that the reference decryption inverts each
// result.
module tb_hb_cipher16;
  import hb_ref_pkg::*;

  logic [15:0] din, dout;
  logic [63:0] key;
  int checks = 0, failures = 0;

  logic [15:0] dout_g[5];

  // default instance (S3 on every nibble) and one instance per S-box choice
  hb_cipher16 dut (.din(din), .key(key), .dout(dout));
  for (genvar g = 0; g < 5; g++) begin : g_sel
    hb_cipher16 #(.SBOX(g)) u (.din(din), .key(key), .dout(dout_g[g]));
  end

  task automatic check(logic [63:0] k, logic [15:0] x);
    logic [15:0] exp;
    key = k;
    din = x;
    #1;
    exp = ref_E(k, x, 3);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL E(%h,%h)=%h expected %h", k, x, dout, exp);
    end
    for (int g = 0; g < 5; g++) begin
      checks++;
      if (dout_g[g] !== ref_E(k, x, g)) begin
        failures++;
        $display("FAIL SBOX=%0d E(%h,%h)=%h expected %h", g, k, x, dout_g[g], ref_E(k, x, g));
      end
      checks++;
      if (ref_D(k, dout_g[g], g) !== x) begin
        failures++;
        $display("FAIL reference D(E(x)) != x for SBOX=%0d", g);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_setup();
    check('0, '0);
    check('1, '1);
    check(64'h0123_4567_89AB_CDEF, 16'h1234);
    for (int i = 0; i < 2000; i++)
      check({$urandom, $urandom}, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hb_decipher16: checks the unrolled decryption against the reference
// decryption for random keys and inputs, and that it inverts the reference
// encryption, for the default and for every S-box choice.
module tb_hb_decipher16;
  import hb_ref_pkg::*;

  logic [15:0] din, dout;
  logic [63:0] key;
  int checks = 0, failures = 0;

  logic [15:0] dout_g[5];

  // default instance (S3 on every nibble) and one instance per S-box choice
  hb_decipher16 dut (.din(din), .key(key), .dout(dout));
  for (genvar g = 0; g < 5; g++) begin : g_sel
    hb_decipher16 #(.SBOX(g)) u (.din(din), .key(key), .dout(dout_g[g]));
  end

  task automatic check(logic [63:0] k, logic [15:0] x);
    key = k;
    din = ref_E(k, x, 3);
    #1;
    checks++;
    if (dout !== x) begin
      failures++;
      $display("FAIL D(%h,E(%h))=%h", k, x, dout);
    end
    din = x;
    #1;
    checks++;
    if (dout !== ref_D(k, x, 3)) begin
      failures++;
      $display("FAIL D(%h,%h)=%h expected %h", k, x, dout, ref_D(k, x, 3));
    end
    for (int g = 0; g < 5; g++) begin
      checks++;
      if (dout_g[g] !== ref_D(k, x, g)) begin
        failures++;
        $display("FAIL SBOX=%0d D(%h,%h)=%h", g, k, x, dout_g[g]);
      end
      checks++;
      if (ref_E(k, dout_g[g], g) !== x) begin
        failures++;
        $display("FAIL SBOX=%0d E(D(x)) != x", g);
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
    check('1, 16'hFFFF);
    for (int i = 0; i < 2000; i++)
      check({$urandom, $urandom}, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

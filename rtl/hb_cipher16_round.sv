// hb_cipher16_round: round-based 16-bit Hummingbird block cipher (encryption).
//
// One round-function block is reused for the four regular rounds: round-key
// XOR, the four S-boxes and the permutation layer. A second S-box layer with
// four XORs forms the final round, so the datapath has five XORs, eight
// S-boxes and one permutation layer. Three multiplexers steer it:
//   M1  4:1, picks round key K1..K4 of the subkey by the round counter;
//   M2  2:1, feeds the block input (first round) or the stored round result;
//   M3  2:1, stores either the regular round result or, in the fourth
//       cycle, the final-round result (the ciphertext).
// The result goes into one 16-bit register.
//
// Timing: `start` is sampled with `din` in the first cycle; the register holds
// round 1..3 results after the first three clock edges and the ciphertext
// after the fourth. `done` is high for the one cycle following the fourth
// edge, while `dout` shows the ciphertext; `dout` keeps it until the next
// start. A new `start` is accepted in any cycle in which `busy` is low, the
// `done` cycle included, so encryptions can run back to back every four
// cycles. `key` must stay stable from the start cycle to the fourth edge.
//
// SBOX chooses which S-box fills the two S-box layers (one S-box repeated on
// all nibbles, or S1..S4) and SBOX_BFR whether they are written as lookup
// tables or as Boolean functions: the two implementation strategies compared
// for this cipher on the FPGA. Both give the same function.
//
// The datapath and its multiplexers follow the paper; the handshake
// (start/busy/done) and the reset values are this design's choices.
module hb_cipher16_round
  import hb_pkg::*;
#(
  // 0: S-boxes S1..S4 on the four nibbles; 1..4: S-box S<SBOX> on every nibble
  parameter int unsigned SBOX = 1,
  // S-box implementation: 0 as lookup tables (LUT), 1 as Boolean functions
  parameter bit SBOX_BFR = 1'b0
)
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  word_t   din,
  input  subkey_t key,
  output word_t   dout,
  output logic    busy,
  output logic    done
);

  logic [1:0] rnd_q;    // index of the round computed in this cycle, 0..3
  word_t      data_q;   // the 16-bit round register
  word_t      m2_out, rk, round_out, final_out, m3_out;

  // M1: round key selected by the round counter.
  always_comb begin
    case (rnd_q)
      2'd0:    rk = rkey(key, 1);
      2'd1:    rk = rkey(key, 2);
      2'd2:    rk = rkey(key, 3);
      default: rk = rkey(key, 4);
    endcase
  end

  // M2, shared regular round, final round, M3.
  assign m2_out    = busy ? data_q : din;
  word_t s_in1, s_in2, s_out1, s_out2;

  assign s_in1 = m2_out ^ rk;
  assign s_in2 = round_out ^ rkey(key, 1) ^ rkey(key, 3);
  if (SBOX_BFR) begin : g_bfr
    assign s_out1 = s_layer_bfr(s_in1, SBOX);
    assign s_out2 = s_layer_bfr(s_in2, SBOX);
  end else begin : g_lut
    assign s_out1 = s_layer(s_in1, SBOX);
    assign s_out2 = s_layer(s_in2, SBOX);
  end

  assign round_out = lin(s_out1);
  assign final_out = s_out2 ^ rkey(key, 2) ^ rkey(key, 4);
  assign m3_out    = (rnd_q == 2'd3) ? final_out : round_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd_q  <= '0;
      data_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        data_q <= m3_out;
        rnd_q  <= rnd_q + 2'd1;
        if (rnd_q == 2'd3) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        data_q <= round_out;
        rnd_q  <= 2'd1;
        busy   <= 1'b1;
      end
    end
  end

  assign dout = data_q;

  // The round counter is 0 whenever no encryption is in flight.
  a_idle_round : assert property (@(posedge clk) disable iff (!rst_n) !busy |-> rnd_q == 2'd0);

  if (SBOX > 4) begin : g_bad_sbox
    $error("SBOX must be 0..4");
  end

endmodule

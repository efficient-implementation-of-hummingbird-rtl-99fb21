// hb_enc_area: area-optimized Hummingbird encryption core.
//
// The four block ciphers E_k1..E_k4 of Hummingbird share one round-based
// 16-bit block cipher (hb_cipher16_round), which needs four cycles per call,
// so a 16-bit plaintext block takes 16 cycles. The 64-bit subkeys are not
// stored in the core: it drives KEYSEL (`keysel`, 0..3 for k1..k4) and reads
// the selected subkey's four 16-bit words back on KEY1..KEY4 (`key1`..`key4`)
// from an external key register, combinationally in the same cycle. The
// internal state is four rotors RS1..RS4 and a 16-bit LFSR; three temporary
// registers keep the intermediate values of a block: RH holds V12, RA holds
// V23 and RE holds V34.
//
// Initialization: when `ce` goes high the rotors take `nonce`, one word per
// cycle for four cycles. Four iterations follow, each of four cipher calls:
//   V12 = E1(RS1^RS3)  V23 = E2(V12^RS2)  V34 = E3(V23^RS3)  V41 = E4(V34^RS4)
//   RS1 ^= V34  RS2 ^= V12  RS3 ^= V23  RS4 ^= V41
// and the LFSR is seeded with V41 | 16'h1000. That is 4 + 4*16 = 68 cycles;
// `ready` first rises in cycle 69.
//
// Encryption of PT: V12 = E1(PT^RS1), V23 = E2(V12^RS2), V34 = E3(V23^RS3),
// CT = E4(V34^RS4), then LFSR' = step(LFSR), RS1' = RS1^V34,
// RS3' = RS3^V23^LFSR', RS4' = RS4^V12^RS1', RS2' = RS2^V12^RS4'.
//
// Timing: a cipher call starts in the same cycle in which the previous one
// delivers its result, so calls run back to back. `pt` is taken when `ready`
// and `pt_valid` are high; `ct` is valid with `vo` high 17 cycles later and
// `ready` is high again after 16, so blocks stream at one per 16 cycles.
// Dropping `ce` returns the core to its idle state.
//
// Following the paper: the round-based cipher, the external subkey
// interface KEYSEL/KEY1..KEY4, temporary registers RH/RA/RE, XOR in place of
// addition modulo 2^16. This design's own choices: the cycle counts above
// (the paper gives none for this core), which value each temporary
// register holds, the handshake, the LFSR (from Hummingbird-1).
module hb_enc_area
  import hb_pkg::*;
#(
  // 0: S-boxes S1..S4 on the four nibbles; 1..4: S-box S<SBOX> on every nibble
  parameter int unsigned SBOX = 1,
  // S-box implementation: 0 as lookup tables (LUT), 1 as Boolean functions
  parameter bit SBOX_BFR = 1'b0
)
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  word_t      nonce,
  output logic [1:0] keysel,
  input  word_t      key1,
  input  word_t      key2,
  input  word_t      key3,
  input  word_t      key4,
  input  word_t      pt,
  input  logic       pt_valid,
  output logic       ready,
  output word_t      ct,
  output logic       vo
);

  typedef enum logic [1:0] {ST_OFF, ST_LOAD, ST_INIT, ST_RUN} state_e;

  state_e     state_q;
  logic [1:0] it_q;       // load word / initialization iteration
  logic [1:0] eidx_q;     // which of E1..E4 is in flight
  logic       inflight_q; // a cipher call has been started and not yet consumed
  word_t      rs1_q, rs2_q, rs3_q, rs4_q, lfsr_q;
  word_t      rh_q, ra_q, re_q;

  logic       rc_start, rc_busy, rc_done;
  word_t      rc_din, rc_dout, y;
  logic [1:0] next_idx;
  logic       step;        // the cipher is free: consume a result / start a call
  logic       last_call;   // the result consumed now is that of E4
  logic       accept;

  // Rotor values after the E4 result of this cycle is absorbed.
  word_t      rs1_n, rs2_n, rs3_n, rs4_n, lfsr_n;

  assign y         = rc_dout;
  assign step      = !rc_busy && (state_q == ST_INIT || state_q == ST_RUN);
  assign last_call = inflight_q && eidx_q == 2'd3;
  assign next_idx  = inflight_q ? eidx_q + 2'd1 : 2'd0;
  assign keysel    = rc_busy ? eidx_q : next_idx;

  // Ready: idle in ST_RUN, or a cycle that ends a block or the initialization.
  // The cycle that absorbs the last initialization result already counts.
  assign ready  = step && ((state_q == ST_RUN && (!inflight_q || last_call)) ||
                           (state_q == ST_INIT && last_call && it_q == 2'd3));
  assign accept = ready && pt_valid;

  always_comb begin
    rs1_n  = rs1_q;
    rs2_n  = rs2_q;
    rs3_n  = rs3_q;
    rs4_n  = rs4_q;
    lfsr_n = lfsr_q;
    if (step && last_call) begin
      if (state_q == ST_INIT) begin
        rs1_n = rs1_q ^ re_q;
        rs2_n = rs2_q ^ rh_q;
        rs3_n = rs3_q ^ ra_q;
        rs4_n = rs4_q ^ y;
        if (it_q == 2'd3) lfsr_n = y | LFSR_SEED_OR;
      end else begin
        lfsr_n = lfsr_step(lfsr_q);
        rs1_n  = rs1_q ^ re_q;
        rs3_n  = rs3_q ^ ra_q ^ lfsr_n;
        rs4_n  = rs4_q ^ rh_q ^ rs1_n;
        rs2_n  = rs2_q ^ rh_q ^ rs4_n;
      end
    end
  end

  // Operand multiplexers of the block cipher and the start decision.
  always_comb begin
    rc_start = 1'b0;
    rc_din   = '0;
    if (step) begin
      case (next_idx)
        2'd0: begin
          if (state_q == ST_INIT && !(last_call && it_q == 2'd3)) begin
            rc_start = 1'b1;
            rc_din   = rs1_n ^ rs3_n;
          end else begin
            rc_start = accept;
            rc_din   = pt ^ rs1_n;
          end
        end
        2'd1: begin rc_start = 1'b1; rc_din = y ^ rs2_q; end
        2'd2: begin rc_start = 1'b1; rc_din = y ^ rs3_q; end
        default: begin rc_start = 1'b1; rc_din = y ^ rs4_q; end
      endcase
    end
  end

  hb_cipher16_round #(.SBOX(SBOX), .SBOX_BFR(SBOX_BFR)) u_round (
    .clk   (clk),
    .rst_n (rst_n),
    .start (rc_start),
    .din   (rc_din),
    .key   ({key1, key2, key3, key4}),
    .dout  (rc_dout),
    .busy  (rc_busy),
    .done  (rc_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_OFF;
      it_q       <= '0;
      eidx_q     <= '0;
      inflight_q <= 1'b0;
      rs1_q      <= '0;
      rs2_q      <= '0;
      rs3_q      <= '0;
      rs4_q      <= '0;
      lfsr_q     <= '0;
      rh_q       <= '0;
      ra_q       <= '0;
      re_q       <= '0;
      ct         <= '0;
      vo         <= 1'b0;
    end else begin
      vo <= 1'b0;
      if (!ce) begin
        state_q    <= ST_OFF;
        inflight_q <= 1'b0;
      end else begin
        unique case (state_q)
          ST_OFF: begin
            rs1_q      <= nonce;
            it_q       <= 2'd1;
            inflight_q <= 1'b0;
            state_q    <= ST_LOAD;
          end
          ST_LOAD: begin
            case (it_q)
              2'd1:    rs2_q <= nonce;
              2'd2:    rs3_q <= nonce;
              default: rs4_q <= nonce;
            endcase
            it_q <= it_q + 2'd1;
            if (it_q == 2'd3) state_q <= ST_INIT;
          end
          ST_INIT, ST_RUN: begin
            if (step) begin
              // Consume the result of the call in flight.
              if (inflight_q) begin
                case (eidx_q)
                  2'd0: rh_q <= y;
                  2'd1: ra_q <= y;
                  2'd2: re_q <= y;
                  default: begin
                    rs1_q  <= rs1_n;
                    rs2_q  <= rs2_n;
                    rs3_q  <= rs3_n;
                    rs4_q  <= rs4_n;
                    lfsr_q <= lfsr_n;
                    if (state_q == ST_INIT) begin
                      it_q <= it_q + 2'd1;
                      if (it_q == 2'd3) state_q <= ST_RUN;
                    end else begin
                      ct <= y;
                      vo <= 1'b1;
                    end
                  end
                endcase
              end
              inflight_q <= rc_start;
              if (rc_start) eidx_q <= next_idx;
            end
          end
        endcase
      end
    end
  end

  a_done_consumed : assert property (@(posedge clk) disable iff (!rst_n)
                                     (ce && inflight_q && !rc_busy) |-> rc_done);

endmodule

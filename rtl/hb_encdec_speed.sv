// hb_encdec_speed: speed-optimized Hummingbird encryption/decryption core.
//
// Two loop-unrolled 16-bit block ciphers, an encryption routine
// (hb_cipher16) and a decryption routine (hb_decipher16), each make one call
// per clock cycle, so a 16-bit block is encrypted or decrypted in four cycles.
// The internal state is four 16-bit rotors RS1..RS4 and a 16-bit LFSR.
//
// Initialization is the same as in hb_enc_speed: four cycles load the nonce
// words into RS1..RS4 through the rotor multiplexers, then four iterations of
// four cycles run on the encryption routine; `ready` rises in cycle 21.
//
// Per block, with the state at time t:
//   encryption  V12 = E1(PT^RS1)   V23 = E2(V12^RS2)  V34 = E3(V23^RS3)  CT = E4(V34^RS4)
//   decryption  V34 = D4(CT)^RS4   V23 = D3(V34)^RS3  V12 = D2(V23)^RS2  PT = D1(V12)^RS1
// where D_i is the inverse of E_i. The XOR after the decryption routine is the
// extra XOR that the decryption path needs. In the fourth cycle every rotor is
// fully updated from V12, V23 and V34 (the same values in both directions):
//   LFSR' = step(LFSR)  RS1' = RS1^V34  RS3' = RS3^V23^LFSR'
//   RS4'  = RS4^V12^RS1'  RS2' = RS2^V12^RS4'
// so the core can switch between encryption and decryption from one block to
// the next; the rotors always follow the sender's and receiver's common state.
//
// Modes (`mode`, sampled with each block): 0 every block encrypted, 1 every
// block decrypted, 2 blocks alternate starting with an encryption, 3 blocks
// alternate starting with a decryption. The alternation restarts with each
// initialization.
//
// Interface and timing: `din` is taken when `ready` and `din_valid` are high
// and is read directly by the first cipher call in that cycle; `dout` is
// valid with `vo` high four cycles later, `dout_dec` telling whether it is a
// decrypted plaintext (1) or a ciphertext (0). Blocks stream at one per four
// cycles. Dropping `ce` returns the core to its idle state.
//
// Following the paper: shared initialization, two cipher routines fed by
// their own input multiplexers, full update of every rotor per block, the
// four modes, four cycles per block, XOR in place of addition modulo 2^16.
// This design's own choices: the exact meaning of the alternating modes, the
// handshake, the nonce port and key packing, the LFSR (from Hummingbird-1).
module hb_encdec_speed
  import hb_pkg::*;
#(
  // 0: S-boxes S1..S4 on the four nibbles; 1..4: S-box S<SBOX> on every nibble
  parameter int unsigned SBOX = 3
)
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  mode_e mode,
  input  word_t nonce,
  input  key_t  key,
  input  word_t din,
  input  logic  din_valid,
  output logic  ready,
  output word_t dout,
  output logic  dout_dec,
  output logic  vo
);

  typedef enum logic [1:0] {ST_OFF, ST_LOAD, ST_INIT, ST_RUN} state_e;

  state_e     state_q;
  logic [1:0] ph_q;
  logic [1:0] it_q;
  logic       busy_q;
  logic       dec_q;    // the block in flight is a decryption
  logic       alt_q;    // alternating modes: the next block takes the second operation
  word_t      rs1_q, rs2_q, rs3_q, rs4_q, lfsr_q;
  word_t      v12_q, v23_q, v34_q;

  word_t      ein, eout, din_d, dout_d, dec_res;
  subkey_t    ekey, dkey;
  logic       accept, dec_now, dec_pick;
  word_t      lfsr_nx, rs1_nx, rs3_nx, rs4_nx, rs2_nx;

  assign ready  = (state_q == ST_RUN) && !busy_q;
  assign accept = ready && din_valid;

  // Operation of a block about to start.
  always_comb begin
    case (mode)
      MODE_ENC:     dec_pick = 1'b0;
      MODE_DEC:     dec_pick = 1'b1;
      MODE_ENC_DEC: dec_pick = alt_q;
      default:      dec_pick = !alt_q;
    endcase
  end
  assign dec_now = busy_q ? dec_q : dec_pick;

  // Subkey multiplexers: encryption uses k1..k4, decryption k4..k1.
  always_comb begin
    case (ph_q)
      2'd0:    begin ekey = subkey(key, 1); dkey = subkey(key, 4); end
      2'd1:    begin ekey = subkey(key, 2); dkey = subkey(key, 3); end
      2'd2:    begin ekey = subkey(key, 3); dkey = subkey(key, 2); end
      default: begin ekey = subkey(key, 4); dkey = subkey(key, 1); end
    endcase
  end

  // M7: encryption-routine input.
  always_comb begin
    ein = '0;
    if (state_q == ST_INIT) begin
      case (ph_q)
        2'd0:    ein = rs1_q ^ rs3_q;
        2'd1:    ein = rs2_q;          // already RS2 ^ V12
        2'd2:    ein = rs3_q;          // already RS3 ^ V23
        default: ein = v34_q ^ rs4_q;
      endcase
    end else begin
      case (ph_q)
        2'd0:    ein = din ^ rs1_q;
        2'd1:    ein = v12_q ^ rs2_q;
        2'd2:    ein = v23_q ^ rs3_q;
        default: ein = v34_q ^ rs4_q;
      endcase
    end
  end

  // M8: decryption-routine input, and the XOR with the rotor after it.
  always_comb begin
    case (ph_q)
      2'd0:    begin din_d = din;   dec_res = dout_d ^ rs4_q; end
      2'd1:    begin din_d = v34_q; dec_res = dout_d ^ rs3_q; end
      2'd2:    begin din_d = v23_q; dec_res = dout_d ^ rs2_q; end
      default: begin din_d = v12_q; dec_res = dout_d ^ rs1_q; end
    endcase
  end

  hb_cipher16   #(.SBOX(SBOX)) u_enc (.din(ein),   .key(ekey), .dout(eout));
  hb_decipher16 #(.SBOX(SBOX)) u_dec (.din(din_d), .key(dkey), .dout(dout_d));

  // Full state update of the fourth cycle.
  assign lfsr_nx = lfsr_step(lfsr_q);
  assign rs1_nx  = rs1_q ^ v34_q;
  assign rs3_nx  = rs3_q ^ v23_q ^ lfsr_nx;
  assign rs4_nx  = rs4_q ^ v12_q ^ rs1_nx;
  assign rs2_nx  = rs2_q ^ v12_q ^ rs4_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= ST_OFF;
      ph_q     <= '0;
      it_q     <= '0;
      busy_q   <= 1'b0;
      dec_q    <= 1'b0;
      alt_q    <= 1'b0;
      rs1_q    <= '0;
      rs2_q    <= '0;
      rs3_q    <= '0;
      rs4_q    <= '0;
      lfsr_q   <= '0;
      v12_q    <= '0;
      v23_q    <= '0;
      v34_q    <= '0;
      dout     <= '0;
      dout_dec <= 1'b0;
      vo       <= 1'b0;
    end else begin
      vo <= 1'b0;
      if (!ce) begin
        state_q <= ST_OFF;
        busy_q  <= 1'b0;
        ph_q    <= '0;
      end else begin
        unique case (state_q)
          ST_OFF: begin
            rs1_q   <= nonce;
            it_q    <= 2'd1;
            state_q <= ST_LOAD;
          end
          ST_LOAD: begin
            case (it_q)
              2'd1:    rs2_q <= nonce;
              2'd2:    rs3_q <= nonce;
              default: rs4_q <= nonce;
            endcase
            it_q <= it_q + 2'd1;
            if (it_q == 2'd3) begin
              state_q <= ST_INIT;
              ph_q    <= '0;
            end
          end
          ST_INIT: begin
            ph_q <= ph_q + 2'd1;
            case (ph_q)
              2'd0: rs2_q <= rs2_q ^ eout;
              2'd1: rs3_q <= rs3_q ^ eout;
              2'd2: begin
                rs1_q <= rs1_q ^ eout;
                v34_q <= eout;
              end
              default: begin
                rs4_q <= rs4_q ^ eout;
                it_q  <= it_q + 2'd1;
                if (it_q == 2'd3) begin
                  lfsr_q  <= eout | LFSR_SEED_OR;
                  alt_q   <= 1'b0;
                  state_q <= ST_RUN;
                end
              end
            endcase
          end
          ST_RUN: begin
            if (busy_q || accept) begin
              ph_q <= ph_q + 2'd1;
              if (!busy_q) begin
                busy_q <= 1'b1;
                dec_q  <= dec_pick;
              end
              case (ph_q)
                2'd0: if (dec_now) v34_q <= dec_res; else v12_q <= eout;
                2'd1: if (dec_now) v23_q <= dec_res; else v23_q <= eout;
                2'd2: if (dec_now) v12_q <= dec_res; else v34_q <= eout;
                default: begin
                  dout     <= dec_now ? dec_res : eout;
                  dout_dec <= dec_now;
                  vo       <= 1'b1;
                  busy_q   <= 1'b0;
                  lfsr_q   <= lfsr_nx;
                  rs1_q    <= rs1_nx;
                  rs2_q    <= rs2_nx;
                  rs3_q    <= rs3_nx;
                  rs4_q    <= rs4_nx;
                  if (mode == MODE_ENC_DEC || mode == MODE_DEC_ENC) alt_q <= !alt_q;
                end
              endcase
            end
          end
        endcase
      end
    end
  end

  a_ph_idle : assert property (@(posedge clk) disable iff (!rst_n)
                               (state_q == ST_RUN && !busy_q) |-> ph_q == 2'd0);

endmodule

// hb_enc_speed: speed-optimized Hummingbird encryption-only core.
//
// One loop-unrolled 16-bit block cipher (hb_cipher16) is time-shared by the
// four block ciphers E_k1..E_k4 of Hummingbird, one call per clock cycle, so a
// 16-bit plaintext block takes four cycles. The internal state is four 16-bit
// rotors RS1..RS4 and a 16-bit LFSR.
//
// Initialization: when `ce` goes high, the rotors are loaded from `nonce`,
// one 16-bit word per cycle (RS1 in the first cycle, RS4 in the fourth). From
// the fifth cycle the core runs four iterations of four cycles each:
//   V12 = E1(RS1^RS3)  V23 = E2(V12^RS2)  V34 = E3(V23^RS3)  V41 = E4(V34^RS4)
//   RS1 ^= V34  RS2 ^= V12  RS3 ^= V23  RS4 ^= V41
// and seeds the LFSR with V41 | 16'h1000 after the last one. `ready` rises in
// cycle 21, after 20 cycles of initialization.
//
// Encryption of a block PT with the state at time t:
//   V12 = E1(PT^RS1)  V23 = E2(V12^RS2)  V34 = E3(V23^RS3)  CT = E4(V34^RS4)
//   LFSR' = step(LFSR)  RS1' = RS1^V34  RS3' = RS3^V23^LFSR'
//   RS4'  = RS4^V12^RS1'  RS2' = RS2^V12^RS4'
// As in the paper's encryption-only core, the RS2 update is split over two
// successive blocks: RS2 takes V12 while block t is encrypted and RS4' at the
// start of block t+1, just before RS2 is next read. Since every addition is an
// XOR, the rotor that has just absorbed a V value is itself the input of the
// next block cipher (RS2^V12 in the second cycle), which saves an XOR stage.
//
// Interface and timing: `pt` is taken in a cycle where `ready` and `pt_valid`
// are both high; the first block-cipher call reads it directly in that cycle.
// `ct` is valid, with `vo` high for one cycle, four cycles later, which is
// also the next cycle in which `ready` is high, so blocks stream at one per
// four cycles. Dropping `ce` returns the core to its idle state.
//
// Following the paper: 4+16 cycle initialization, 4 cycles per block, XOR
// in place of addition modulo 2^16, the split RS2 update. This design's own
// choices: one nonce word per cycle on a single port, the pt_valid handshake,
// the key packing of hb_pkg, the LFSR (taken from the Hummingbird-1 algorithm).
module hb_enc_speed
  import hb_pkg::*;
#(
  // 0: S-boxes S1..S4 on the four nibbles; 1..4: S-box S<SBOX> on every nibble
  parameter int unsigned SBOX = 3
)
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  word_t nonce,
  input  key_t  key,
  input  word_t pt,
  input  logic  pt_valid,
  output logic  ready,
  output word_t ct,
  output logic  vo
);

  typedef enum logic [1:0] {ST_OFF, ST_LOAD, ST_INIT, ST_RUN} state_e;

  state_e     state_q;
  logic [1:0] ph_q;     // cycle within a four-cycle group, selects k1..k4
  logic [1:0] it_q;     // load word / initialization iteration
  logic       busy_q;   // a plaintext block is being encrypted (ST_RUN)
  logic       pend_q;   // RS2 still lacks the RS4' of the previous block
  word_t      rs1_q, rs2_q, rs3_q, rs4_q, lfsr_q;
  word_t      v_q;      // result of the previous block-cipher call
  word_t      v12_q;    // V12 of the block in flight

  word_t      cin, cout, lfsr_nx, rs2_full;
  subkey_t    ksel;
  logic       accept;

  assign ready    = (state_q == ST_RUN) && !busy_q;
  assign accept   = ready && pt_valid;
  assign lfsr_nx  = lfsr_step(lfsr_q);
  assign rs2_full = pend_q ? (rs2_q ^ rs4_q) : rs2_q;

  // Subkey multiplexer: k1..k4 by cycle of the group.
  always_comb begin
    case (ph_q)
      2'd0:    ksel = subkey(key, 1);
      2'd1:    ksel = subkey(key, 2);
      2'd2:    ksel = subkey(key, 3);
      default: ksel = subkey(key, 4);
    endcase
  end

  // Block-cipher input multiplexers.
  always_comb begin
    cin = '0;
    if (state_q == ST_INIT) begin
      case (ph_q)
        2'd0:    cin = rs1_q ^ rs3_q;
        2'd1:    cin = rs2_q;          // already RS2 ^ V12
        2'd2:    cin = rs3_q;          // already RS3 ^ V23
        default: cin = v_q ^ rs4_q;
      endcase
    end else begin
      case (ph_q)
        2'd0:    cin = pt ^ rs1_q;
        2'd1:    cin = rs2_q;          // already V12 ^ RS2 (fully updated)
        2'd2:    cin = v_q ^ rs3_q;
        default: cin = v_q ^ rs4_q;
      endcase
    end
  end

  hb_cipher16 #(.SBOX(SBOX)) u_cipher (.din(cin), .key(ksel), .dout(cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_OFF;
      ph_q    <= '0;
      it_q    <= '0;
      busy_q  <= 1'b0;
      pend_q  <= 1'b0;
      rs1_q   <= '0;
      rs2_q   <= '0;
      rs3_q   <= '0;
      rs4_q   <= '0;
      lfsr_q  <= '0;
      v_q     <= '0;
      v12_q   <= '0;
      ct      <= '0;
      vo      <= 1'b0;
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
            v_q  <= cout;
            ph_q <= ph_q + 2'd1;
            case (ph_q)
              2'd0: rs2_q <= rs2_q ^ cout;
              2'd1: rs3_q <= rs3_q ^ cout;
              2'd2: rs1_q <= rs1_q ^ cout;
              default: begin
                rs4_q <= rs4_q ^ cout;
                it_q  <= it_q + 2'd1;
                if (it_q == 2'd3) begin
                  lfsr_q  <= cout | LFSR_SEED_OR;
                  pend_q  <= 1'b0;
                  state_q <= ST_RUN;
                end
              end
            endcase
          end
          ST_RUN: begin
            if (!busy_q) begin
              if (accept) begin
                // First cycle: V12; RS2 completes the previous block's update
                // with RS4' and starts this block's with V12.
                v12_q  <= cout;
                rs2_q  <= rs2_full ^ cout;
                pend_q <= 1'b0;
                busy_q <= 1'b1;
                ph_q   <= 2'd1;
              end
            end else begin
              v_q  <= cout;
              ph_q <= ph_q + 2'd1;
              case (ph_q)
                2'd1: ;                                    // V23
                2'd2: begin                                // V34
                  lfsr_q <= lfsr_nx;
                  rs3_q  <= rs3_q ^ v_q ^ lfsr_nx;
                  rs1_q  <= rs1_q ^ cout;
                end
                default: begin                             // CT
                  ct     <= cout;
                  vo     <= 1'b1;
                  rs4_q  <= rs4_q ^ v12_q ^ rs1_q;
                  pend_q <= 1'b1;
                  busy_q <= 1'b0;
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

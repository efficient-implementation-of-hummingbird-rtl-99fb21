// hb_top: the three Hummingbird cores side by side.
//
// The design offers three independent implementations of the Hummingbird
// ultra-lightweight cipher, for different area/speed trade-offs, each with
// its own ports (prefixes se_, sed_ and ae_) and sharing only clock and reset:
//   se_   speed-optimized encryption-only core (hb_enc_speed): one loop-unrolled
//         16-bit block cipher, 20-cycle initialization, 4 cycles per block;
//   sed_  speed-optimized encryption/decryption core (hb_encdec_speed): adds an
//         unrolled decryption routine and four operation modes, 4 cycles per
//         block;
//   ae_   area-optimized encryption core (hb_enc_area): one round-based 16-bit
//         block cipher, 68-cycle initialization, 16 cycles per block, subkeys
//         fetched from an external key register through ae_keysel and
//         ae_key1..ae_key4.
// The external plaintext and key registers are outside the design; their
// signals are ports. See each core for its interface and timing.
module hb_top
  import hb_pkg::*;
#(
  // S-box use of each core (0: S1..S4 on the four nibbles; 1..4: S<n> on
  // every nibble); the defaults are the configurations of the results table
  parameter int unsigned SE_SBOX  = 3,
  parameter int unsigned SED_SBOX = 3,
  parameter int unsigned AE_SBOX  = 1
)
(
  input  logic       clk,
  input  logic       rst_n,

  // speed-optimized encryption-only core
  input  logic       se_ce,
  input  word_t      se_nonce,
  input  key_t       se_key,
  input  word_t      se_pt,
  input  logic       se_pt_valid,
  output logic       se_ready,
  output word_t      se_ct,
  output logic       se_vo,

  // speed-optimized encryption/decryption core
  input  logic       sed_ce,
  input  mode_e      sed_mode,
  input  word_t      sed_nonce,
  input  key_t       sed_key,
  input  word_t      sed_din,
  input  logic       sed_din_valid,
  output logic       sed_ready,
  output word_t      sed_dout,
  output logic       sed_dout_dec,
  output logic       sed_vo,

  // area-optimized encryption core
  input  logic       ae_ce,
  input  word_t      ae_nonce,
  output logic [1:0] ae_keysel,
  input  word_t      ae_key1,
  input  word_t      ae_key2,
  input  word_t      ae_key3,
  input  word_t      ae_key4,
  input  word_t      ae_pt,
  input  logic       ae_pt_valid,
  output logic       ae_ready,
  output word_t      ae_ct,
  output logic       ae_vo
);

  hb_enc_speed #(.SBOX(SE_SBOX)) u_enc_speed (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (se_ce),
    .nonce    (se_nonce),
    .key      (se_key),
    .pt       (se_pt),
    .pt_valid (se_pt_valid),
    .ready    (se_ready),
    .ct       (se_ct),
    .vo       (se_vo)
  );

  hb_encdec_speed #(.SBOX(SED_SBOX)) u_encdec_speed (
    .clk       (clk),
    .rst_n     (rst_n),
    .ce        (sed_ce),
    .mode      (sed_mode),
    .nonce     (sed_nonce),
    .key       (sed_key),
    .din       (sed_din),
    .din_valid (sed_din_valid),
    .ready     (sed_ready),
    .dout      (sed_dout),
    .dout_dec  (sed_dout_dec),
    .vo        (sed_vo)
  );

  hb_enc_area #(.SBOX(AE_SBOX)) u_enc_area (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ae_ce),
    .nonce    (ae_nonce),
    .keysel   (ae_keysel),
    .key1     (ae_key1),
    .key2     (ae_key2),
    .key3     (ae_key3),
    .key4     (ae_key4),
    .pt       (ae_pt),
    .pt_valid (ae_pt_valid),
    .ready    (ae_ready),
    .ct       (ae_ct),
    .vo       (ae_vo)
  );

endmodule

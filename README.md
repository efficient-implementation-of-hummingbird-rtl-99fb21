# Hummingbird ultra-lightweight cipher cores

Hummingbird is a cipher for devices with almost no silicon to spare: RFID tags,
smart cards, sensor nodes. It is a hybrid. A small rotor state is mixed with
the data the way a rotor machine would do it. The mixing function is four
16-bit block ciphers. So a 16-bit block costs four tiny block-cipher calls,
and both sides of a link must keep the rotor state in step.

This RTL follows the FPGA architectures of the paper *Efficient Implementation
of Hummingbird Cryptographic Algorithm on a Reconfigurable Platform*. That paper
targets a Spartan-3. It gives three cores for different area/speed trade-offs,
and its main change to the algorithm is that **every addition modulo 2^16 is
replaced by an XOR**. All three cores are here, side by side in `hb_top`:

| core | module | block cipher | initialization | per 16-bit block | S-box |
|---|---|---|---|---|---|
| speed-optimized, encryption only | `hb_enc_speed` | one loop-unrolled cipher, 1 call/cycle | 20 cycles | 4 cycles | S3 on all nibbles |
| speed-optimized, encryption/decryption | `hb_encdec_speed` | unrolled encryption and decryption routines | 20 cycles | 4 cycles, enc or dec | S3 on all nibbles |
| area-optimized, encryption only | `hb_enc_area` | one round-based cipher, 4 cycles/call | 68 cycles | 16 cycles | S1 on all nibbles |

## The algorithm as built

**Key and state.** The 256-bit key is four 64-bit subkeys k1..k4, one for each
block cipher E1..E4. Each subkey is four 16-bit round keys K1..K4. The state is
four 16-bit rotors RS1..RS4 and a 16-bit LFSR.

**16-bit block cipher** E_k. It has four regular rounds `m = L(S(m ^ Kj))` for
j = 1..4, then a final round `S(m ^ K1 ^ K3) ^ K2 ^ K4`.

- `S` is a layer of 4-bit S-boxes.
- `L(x) = x ^ (x <<< 6) ^ (x <<< 10)` is the linear (permutation) layer.
- The decryption D_k runs the rounds backwards, using inverse S-boxes and
  `L^-1(y) = y ^ (y<<<2) ^ (y<<<4) ^ (y<<<12) ^ (y<<<14)`.

The original algorithm puts four different S-boxes S1..S4 on the four nibbles.
The optimized cores instead repeat one S-box on all four nibbles: S1 in the area
core and S3 in the speed cores. The `SBOX` parameter selects this. A value of 1
to 4 repeats that S-box; 0 gives the original S1..S4 arrangement.

**Initialization.** A 64-bit nonce is loaded into RS1..RS4. Then four
iterations run:

```
V12 = E1(RS1^RS3)  V23 = E2(V12^RS2)  V34 = E3(V23^RS3)  V41 = E4(V34^RS4)
RS1 ^= V34   RS2 ^= V12   RS3 ^= V23   RS4 ^= V41
```

After the last iteration, the LFSR is seeded with `V41 | 16'h1000`.

**Encryption** of PT, and the state update that follows it:

```
V12 = E1(PT^RS1)   V23 = E2(V12^RS2)   V34 = E3(V23^RS3)   CT = E4(V34^RS4)
LFSR' = step(LFSR)  RS1' = RS1^V34  RS3' = RS3^V23^LFSR'
RS4'  = RS4^V12^RS1'  RS2' = RS2^V12^RS4'
```

**Decryption** yields the same V12, V23 and V34 in reverse order:
`V34 = D4(CT)^RS4`, `V23 = D3(V34)^RS3`, `V12 = D2(V23)^RS2`,
`PT = D1(V12)^RS1`. It then applies the same state update. So a sender and a
receiver that start from the same key and nonce stay in step.

The LFSR is a Fibonacci register with polynomial
x^16+x^15+x^12+x^10+x^7+x^3+1. It shifts left, with feedback into bit 0.

**Key packing.** `key[255:192]` is k1 and `key[63:0]` is k4. Inside a subkey,
`[63:48]` is K1. The S-box tables are in `rtl/hb_pkg.sv`.

## How the speed-optimized encryption core saves logic

`hb_enc_speed` has a single unrolled cipher, and a subkey multiplexer steps
through k1..k4. A block takes four cycles, one for each of E1..E4.

Because additions are XORs, the core can reuse a rotor register as a cipher
input. During initialization, RS2 absorbs V12 in cycle 1. At that point RS2
already holds `V12 ^ RS2`, which is exactly E2's input in cycle 2. RS3 works the
same way for E3.

During encryption, the RS2 update is split across two blocks. While block t is
encrypted, RS2 absorbs V12. When block t+1 starts, RS2 absorbs RS4(t+1). RS2 is
not read again before then.

The only extra storage is two 16-bit registers: V12 of the block in flight, and
the last cipher result. One flag records that RS2 still owes the RS4 term.

## Encryption/decryption core and its modes

`hb_encdec_speed` instantiates both the unrolled encryption and decryption
routines, each with its own input multiplexer. For decryption, the result is
XORed with the matching rotor. V12, V23 and V34 are kept in three registers. In
the fourth cycle of each block, every rotor is fully updated. This lets the
operation change from one block to the next.

`mode` is sampled with each block:

| mode | blocks |
|---|---|
| 0 `MODE_ENC` | all encrypted |
| 1 `MODE_DEC` | all decrypted |
| 2 `MODE_ENC_DEC` | alternate: encrypt, decrypt, encrypt, ... |
| 3 `MODE_DEC_ENC` | alternate: decrypt, encrypt, ... |

The alternation restarts at each initialization. `dout_dec` flags decrypted
outputs.

## Area-optimized core and the external key register

`hb_cipher16_round` has a single round block: key XOR, S-box layer and L. It is
used four times. A second S-box layer with four XORs forms the final round,
which runs in the same cycle as round 4. Three multiplexers steer the datapath:

- M1 picks the round key.
- M2 chooses between the block input and the stored round result.
- M3 stores either the round result or the final ciphertext.

One call takes four cycles. It starts with `start` and ends with a one-cycle
`done`. A new call may start in the `done` cycle.

The S-boxes of this cipher can be written in two ways, which the paper compares
on the FPGA. Setting `SBOX_BFR = 0` (the default) uses lookup tables. Setting
`SBOX_BFR = 1` writes each output bit as a Boolean function, an XOR of AND terms
of the input bits. Both give the same cipher.

`hb_enc_area` does not store the key. It drives `keysel` (0..3 for k1..k4). The
subkey's four words must come back on `key1..key4` in the same cycle, from a
register outside the core. Three temporary registers hold intermediate values:
RH = V12, RA = V23 and RE = V34. The state is updated in the cycle that
delivers E4's result. In that same cycle the next block, or the first block
after initialization, can already start. That gives 4 + 16·4 = 68 cycles of
initialization and 16 cycles per block.

## Interface and timing, common to all cores

- `rst_n` is an asynchronous, active-low reset.
- `ce` is the chip enable. While `ce` is low, a core stays idle and `ready` is
  low.
- In the cycle `ce` is first high, and in the three cycles after it, `nonce`
  supplies RS1, RS2, RS3 and RS4 in turn.
- `ready` first goes high 20 cycles after `ce` rises (68 for the area core).
- A block is taken in a cycle where both `ready` and `pt_valid` (`din_valid`)
  are high. The plaintext only needs to be valid in that cycle.
- The result appears with a one-cycle `vo`, 4 cycles later (17 for the area
  core). It then stays on `ct`/`dout` until the next result.
- With the valid input held high, blocks stream at one per 4 cycles (16 for
  the area core).

## Where this RTL departs from the paper or fills gaps

The paper refers to the original Hummingbird specification for the cipher
itself. It does not print the following, so they are taken from the published
Hummingbird-1 algorithm:

- the S-box tables;
- L;
- the round-key order and the final-round keys;
- the state-update equations;
- the LFSR.

Treat these as the point to check first if you must interoperate with another
implementation.

The paper gives no exact timing for the area core. It also does not fix the
following, which are choices made here:

- the area core's 68- and 16-cycle counts;
- the nonce port (one word per cycle);
- the handshakes;
- the key packing;
- which temporary register holds which value;
- the meaning of the two alternating modes.

The paper's numbered multiplexers are only partly identifiable from its text.
Those of the round-based cipher (M1–M3) are as described. In the cores they
appear as ordinary input and update multiplexers.

Two further points:

- The paper's "traditional" core, with four S-boxes and modular additions, is
  a baseline and is not built. Setting `SBOX = 0` gives its S-box arrangement,
  but the additions remain XORs.
- The paper's FPGA area and clock figures (Spartan-3) are implementation
  results. Nothing in the RTL targets them. The two S-box forms of
  `hb_cipher16_round` only change how the S-boxes are written; the mapping is
  left to synthesis.

Because addition is replaced by XOR, these cores do **not** produce the
ciphertexts of the original modular-addition Hummingbird.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare
against `tb/hb_ref_pkg.sv`, an algorithm-level model written independently of
the datapath:

- S-boxes are parsed from hex strings.
- L is evaluated bit by bit.
- L^-1 and the inverse S-boxes are found by search.
- The state update is applied in one step.

| testbench | what it checks |
|---|---|
| `tb_hb_cipher16`, `tb_hb_decipher16` | thousands of random keys and blocks, for every `SBOX` setting; the two are inverses |
| `tb_hb_cipher16_round` | values for every `SBOX` setting, in both S-box forms; exactly 4 cycles per call; back-to-back calls |
| `tb_hb_enc_speed`, `tb_hb_enc_area` | several sessions per core (init length; streams with and without gaps; every ciphertext; latency and spacing); all KEYSEL values for the area core |
| `tb_hb_encdec_speed` | all four modes against a reference peer that performs the opposite operation |
| `tb_hb_top` | whole design at default parameters, described below |

`tb_hb_top` runs all three cores on one key, nonce and plaintext stream:

- the two speed cores must agree with each other and with the reference;
- the area core must match the reference for S1;
- the encryption/decryption core is restarted, decrypts the ciphertexts back
  to the plaintexts, and then runs both alternating modes;
- it counts each mechanism (nonce loads, restarts, deferred RS2 completions,
  back-to-back blocks per core, each mode, each KEYSEL value) and fails if any
  count is zero.

All these testbenches pass.

Known limit: the S-box tables and the round structure in the reference model
are typed in from the same algorithm description as the RTL. The tests prove
that the RTL and the model agree. They cannot catch an error that both share.

## Simulating

Every file holds one module or package, named after it. Packages must be listed
first. For example:

```
verilator --binary --timing --assert rtl/hb_pkg.sv tb/hb_ref_pkg.sv \
  rtl/hb_cipher16.sv rtl/hb_decipher16.sv rtl/hb_cipher16_round.sv \
  rtl/hb_enc_speed.sv rtl/hb_encdec_speed.sv rtl/hb_enc_area.sv rtl/hb_top.sv \
  tb/tb_hb_top.sv --top-module tb_hb_top -o sim && ./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`, and each has a
watchdog. For a single block, list only the files it uses, plus
`tb/hb_ref_pkg.sv` for its testbench. For example, the combinational ciphers
need only `hb_pkg.sv` and their own file.

## Files

- `rtl/hb_pkg.sv`: types (`word_t`, `subkey_t`, `key_t`), the `mode_e` enum,
  S-boxes as tables and as Boolean functions, L and L^-1, key slicing, LFSR
  step.
- `rtl/hb_cipher16.sv`, `rtl/hb_decipher16.sv`: unrolled 16-bit block cipher
  and its inverse.
- `rtl/hb_cipher16_round.sv`: round-based 16-bit block cipher.
- `rtl/hb_enc_speed.sv`, `rtl/hb_encdec_speed.sv`, `rtl/hb_enc_area.sv`: the
  three cores.
- `rtl/hb_top.sv`: the three cores side by side. Parameters `SE_SBOX`,
  `SED_SBOX` and `AE_SBOX` set each core's S-box.
- `tb/`: the reference model and one testbench per module.

# AES-128 key-cohort cipher with per-block variable keys

This design encrypts a stream of 128-bit blocks with AES-128, but does not
use the same key for every block. The user loads one symmetric key, and a
variable key generator expands it into a sequence of pseudorandom 128-bit sub
keys, one per block. Block 1 is encrypted under sub key 1, block 2 under sub
key 2, and so on. The intent is that recovering the key of one block, for
example by brute force, tells an attacker nothing directly about the others.

The receiving side holds the same symmetric key and runs an identical
generator. It steps once for every block it decrypts, so the n-th ciphertext
is decrypted under the n-th sub key. Both ends live in one top module,
`aes_vkp_top`. It has an encryption channel and a decryption channel, each
with its own AES core and its own key generator.

Each AES core is an ordinary iterative AES-128 implementation (FIPS-197), one
round per clock. A mode input turns the variable keys off. The cores then use
the loaded key unchanged, and the design reproduces the standard AES-128 test
vectors.

## The sub key sequence

The generator (`vkp_keygen`) is a 128-bit Fibonacci LFSR. It uses the
maximal-length feedback polynomial x^128 + x^126 + x^101 + x^99 + 1: each
step shifts the register left by one bit and feeds in the XOR of bits 127,
125, 100 and 98. One sub key is the register advanced by 128 such steps, so
every bit is replaced between keys. The 128 steps are unrolled into one XOR
network, and a new key is ready in one clock.

- `key_load` (one clock) stores `sym_key` and seeds both generators with it.
  One clock later each generator holds sub key 1 = LFSR^128(sym_key). The
  symmetric key itself is never used as a block key in this mode.
- Each block that a channel accepts while `vkp_en` is high uses that
  channel's current sub key. In the same clock the generator steps to the
  next sub key.
- While `vkp_en` is low, blocks use the stored `sym_key` and the generator
  does not step.

Rules for the user, which follow from this:

- **The channels agree only by counting.** The decryption channel must see
  the ciphertexts in the order they were produced. It must see every one of
  them, and the same `vkp_en` setting must apply to each. Dropping or
  reordering one block desynchronises every block after it. A new `key_load`
  resynchronises both sides.
- **An all-zero key** is the LFSR's stuck state: every sub key would then be
  zero. Do not load it with `vkp_en` high.
- **The sequence is linear.** Any one sub key determines all later ones by
  the LFSR recurrence. The scheme stops a brute-force search on one block
  from decrypting the stream only while the sub keys stay secret. It is not
  a cryptographic key-derivation function. Replacing `lfsr_steps` in
  `vkp_keygen.sv` with a stronger function keeps every interface the same.

The polynomial, the 128 steps per key and the seeding rule are choices of
this implementation. They are parameters of `vkp_keygen` (`TAPS`, `STEPS`,
`KEY_BITS`), but the top uses the defaults.

## Top-level interface (`aes_vkp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_load` | in | 1 | store `sym_key` and reseed both generators |
| `sym_key` | in | 128 | symmetric key |
| `vkp_en` | in | 1 | 1: new sub key per block; 0: fixed key (plain AES-128) |
| `enc_in_valid/ready`, `enc_in_block` | | 1/1/128 | plaintext in |
| `enc_out_valid/ready`, `enc_out_block` | | 1/1/128 | ciphertext out |
| `dec_in_valid/ready`, `dec_in_block` | | 1/1/128 | ciphertext in |
| `dec_out_valid/ready`, `dec_out_block` | | 1/1/128 | plaintext out |

All four streams use valid/ready. A transfer happens on a rising edge where
both signals are high, and a source holds its data until then. Neither
channel accepts a block in a clock where `key_load` is high. The two
channels are independent and may run at the same time.

Blocks are 128-bit vectors in the usual AES byte order. Byte 0 is bits
[127:120] and sits in row 0, column 0 of the state; byte n is row n%4,
column n/4. A vector such as `00112233...eeff` therefore reads left to right
as printed.

## The AES cores

### Encryption (`aes_encrypt`): 11 clocks per block

| clock | what happens |
|---|---|
| accept | state <= block XOR key; round-key register <= key |
| 1..9 | SubBytes -> ShiftRows -> MixColumns -> AddRoundKey(next round key) |
| 10 | SubBytes -> ShiftRows -> AddRoundKey (no MixColumns) |
| then | `out_valid` high; `result` held until `out_ready` |

In every round clock, `key_expansion` forms the next round key from the one
in the register, so round keys are never stored. The key is sampled together
with the block, which is what lets each block use a different key.

### Decryption (`aes_decrypt`): 21 clocks per block

Decryption needs the round keys last-first. Each block may come with a new
key, so a precomputed key table would be refilled for every block anyway.
The core therefore runs the schedule itself:

| clock | what happens |
|---|---|
| accept | state <= block; round-key register <= key |
| 1..10 | key schedule runs forward to round key 10; in clock 10 the state is also XORed with it |
| 11..20 | InvShiftRows -> InvSubBytes -> AddRoundKey(previous round key) -> InvMixColumns, the last clock without InvMixColumns; `key_expansion_inv` walks the schedule one step back per clock |
| then | `out_valid` high, result held until `out_ready` |

`key_expansion_inv` inverts one schedule step. Given round key r as words
n0..n3, it computes w3 = n3^n2, w2 = n2^n1 and w1 = n1^n0. It then computes
w0 = n0 ^ SubWord(RotWord(w3)) ^ Rcon[r].

### Control (`aes_ctrl`)

Both cores share one sequencer. Its states are idle, an optional preparation
phase (`PRE_CYCLES`: 0 for encryption, 10 for decryption), the round phase
(`NR` = 10) and result-held. It outputs `load`, `pre`, `run`, a 1-based
counter `cnt` (the round number during `run`) and `last`. It accepts the
next block in the same clock the held result is taken. With the output
always ready, a core therefore completes one block every 11 clocks
(encryption) or every 21 clocks (decryption). Assertions check that a held
result is not dropped and that no block is accepted while the core is busy.

At a clock f, encryption gives 128·f/11 bit/s, which is 4.05 Gbit/s at
348.3 MHz. Decryption gives 128·f/21, which is 2.12 Gbit/s at the same
clock.

### S-box

`sbox` has no stored table. It computes the GF(2^8) inverse as a^254 (with
0 mapped to 0) through a fixed chain of multiplications. It then applies the
AES affine map. The matrix has rows 11111000, 01111100, ... 11110001 (output
bit 7 first, input bits 7..0), and the constant is 0x63. `inv_sbox` applies
the inverse affine map first, then the inverse. The field arithmetic is in
`aes_pkg` (`xtime`, `gf_mul`, `gf_inv`, `rcon`). `sub_bytes` and
`inv_sub_bytes` use 16 S-box instances each. `key_expansion` and
`key_expansion_inv` use 4 each.

## Module map

| file | role |
|---|---|
| `aes_pkg.sv` | block/word types, Rcon, GF(2^8) arithmetic |
| `sbox.sv`, `inv_sbox.sv` | byte substitution and its inverse |
| `sub_bytes.sv`, `inv_sub_bytes.sv` | 16 S-boxes over the state |
| `shift_rows.sv`, `inv_shift_rows.sv` | row rotations (left / right by row number) |
| `mix_columns.sv`, `inv_mix_columns.sv` | column matrices [02 03 01 01 ...] and [0e 0b 0d 09 ...] |
| `add_round_key.sv` | state XOR round key |
| `key_expansion.sv`, `key_expansion_inv.sv` | one key-schedule step forward / backward |
| `aes_ctrl.sv` | sequencer and handshake |
| `aes_encrypt.sv`, `aes_decrypt.sv` | iterative AES-128 cores |
| `vkp_keygen.sv` | variable key (sub key) generator |
| `aes_vkp_top.sv` | top: two channels, key register, mode switch |

The default size of `aes_vkp_top` after generic synthesis is about 15,000
word-level cells and 911 flip-flop bits. Most of the logic is the 44 S-boxes
computed in logic: 20 in the encryption core and 24 in the decryption core.

## Where this design departs from the description it follows

- **Dynamic S-box: not built.** The scheme this design follows names a
  "dynamic", key-dependent S-box, but gives no construction for it. Its
  published test results are those of the standard S-box. This design uses
  the standard, fixed S-box throughout.
- **Affine constant.** The S-box affine map is used with the standard
  constant 0x63. This is the value that the reference encryption vector
  (00112233..ff under 000102..0f gives 69c4e0d86a7b0430d8cdb78070b4c55a)
  requires.
- **Key generator details.** The generator is described only as producing
  keys from feedback taps and a seed, a new pseudorandom sub key for each
  block. The LFSR length, polynomial, step count and seeding rule are this
  design's choices.
- **Timing and area.** The reported implementation gives 348.295 MHz,
  2.86 Gbit/s and 62 Spartan-3 slices, but no clock-level schedule. This
  design runs one round per clock (11 clocks per encrypted block). Its 128-bit
  state and round-key registers alone exceed what 62 slices hold (about 124
  flip-flops), so it will not reach that area figure. Critical path and
  power figures cannot be checked from RTL.
- **Own choices throughout.** The following were all chosen here: the
  pairing of two synchronised channels in one top, the fixed-key mode
  switch, the valid/ready handshakes, synchronous active-low reset, and the
  backward key walk in decryption.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends. The expected values come from
`tb/aes_ref_pkg.sv`, a separate software model. It builds its S-box with a
different construction from the RTL. It expands all eleven round keys ahead
of time, and it models the LFSR bit by bit. Published AES vectors are also
checked directly.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_vkp_top.sv --top-module tb_aes_vkp_top
./obj_dir/Vtb_aes_vkp_top
```

Replace `aes_vkp_top` with any block name to run its own test.
`tb_aes_vkp_top` runs the top at its default parameters. It covers the
fixed-key vector in both directions and a 12-block variable-key session with
encryption and decryption overlapping. It then reloads the key and runs a
4-block session. Outputs are taken late at random, and blocks are offered
during `key_load`. It counts each of these events and fails if one never
occurred. The core testbenches check the 11- and 21-clock latencies on every
block. `tb_workload_throughput` streams 32 blocks back-to-back through
each channel of the top, in both modes. It checks the 11- and 21-clock
spacing and prints the resulting throughput at 348.295 MHz.

# AES-GCM-256 authenticated encryption engine

This is a compact AES-GCM engine for a 256-bit key and a 96-bit IV. It encrypts a
message in counter mode and computes its 128-bit authentication tag. The design
trades throughput for area. It has a single iterative AES-256 core, reused for
the hash key, every counter block and the tag mask. GHASH uses one fully
parallel GF(2^128) multiplier, so hashing a block takes one clock and never
stalls the cipher.

One plaintext block takes 16 clocks: 15 AES rounds plus one clock to hand over
to the next block. The ciphertext block is hashed in the same clock in which it
leaves. All data, including the key and the IV, enters through one 128-bit
input. All results, ciphertext blocks and then the tag, leave through one
128-bit output.

The architecture follows the VHDL/Virtex-5 design in the thesis *FPGA
Implementation using VHDL of the AES-GCM 256-bit Authenticated Encryption
Algorithm*. That design has an iterative AES core with on-the-fly key
expansion, a Mastrovito-style parallel multiplier and a 12-state controller.
The cycle-level interface, the strobe meanings and the last-block mask format
were not fully specified there, so they are choices made here. Each one is
listed under "Interpretations and departures" below.

## What a message looks like on the pins

Top module: `aes_gcm` (no parameters).

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset |
| `start` | in | begin a message (taken when idle) |
| `din[127:0]` | in | the single data input |
| `iv_end`, `key_end`, `lsb_end`, `size_end` | in | "the word on `din` is the IV / a key half / the last-block mask / the sizes" |
| `aad_end` | in | no more AAD blocks |
| `plain_end` | in | no more plaintext blocks |
| `in_ack` | out | `din` was consumed in this clock |
| `c_out_rdy` | out | `dout` holds a ciphertext block (one clock) |
| `done` | out | `dout` holds the tag (one clock) |
| `dout[127:0]` | out | ciphertext block or tag (registered) |

A message is a fixed sequence:

1. **Start.** Pulse `start` for one clock.
2. **Five parameter words**, one per clock. Each word is taken in the clock its
   strobe is high. A missing strobe simply makes the engine wait.

   | order | strobe | `din` carries |
   |---|---|---|
   | 1 | `iv_end` | IV in `din[127:32]` (`din[31:0]` ignored) |
   | 2 | `key_end` | K[255:128] |
   | 3 | `key_end` | K[127:0] |
   | 4 | `lsb_end` | last-block mask: ones in the leading *u* bits, where *u* is the number of valid bits in the last plaintext block |
   | 5 | `size_end` | len(A) in bits (upper 64 bits) ‖ len(C) in bits (lower 64 bits) |

3. **Hash key.** The engine computes H = E(K, 0^128). This takes 16 clocks and
   needs no input.
4. **AAD.** While `aad_end` = 0 the engine takes one AAD block per clock from
   `din`, with a partial last block zero-padded. The first clock with
   `aad_end` = 1 ends the phase and takes nothing, so an empty AAD costs one
   clock.
5. **Plaintext.** The engine takes one plaintext block every 16 clocks. Blocks
   are taken in the clocks where `in_ack` is high, and a partial last block is
   zero-padded. If `plain_end` = 1 in such a clock, the phase ends and nothing
   is taken. Each block is XORed with E(K, Y_i), where Y_i is the i-th counter
   block. 16 clocks after the block was taken, the ciphertext appears on `dout`
   with `c_out_rdy`. The last block (by len(C)) is ANDed with the mask, so the
   padding bits of the ciphertext are zero.
6. **Tag.** The engine hashes len(A)‖len(C), encrypts Y0 and outputs
   T = GHASH(H, A, C) ⊕ E(K, Y0) on `dout` with `done`. The engine is then idle
   again.

A buffer in front of the engine can keep `aad_end`/`plain_end` low exactly as
long as it has data. It presents the next block on `din` and advances whenever
`in_ack` is high. This is how `tb/tb_aes_gcm.sv` models it.

### Cycle budget

Count the `start` clock as clock 0, with no stalls on the parameter words, nA
AAD blocks and nP plaintext blocks. Then `done` is high in clock

    1 (start) + 5 (parameters) + 16 (H) + (nA + 1) + (16·nP + 1) + 1 (length block) + 1 (AES start) + 16 (E(K,Y0))
    = 42 + nA + 16·nP

For example, 2 AAD blocks and 4 plaintext blocks take 108 clocks. In steady
state the engine moves 128 bits every 16 clocks, which is 8 bits per clock.

## The AES-256 core (`aes256`)

The core is iterative: one 128-bit State register goes through one round per
clock.

    State ─► ShiftRows ─► SubBytes ─► MixColumns ─┐
                              └──────────────────►├─ mux (last round: skip MixColumns)
                                         data_in ─┴─ mux (first clock: take data_in)
                                                     └─► AddRoundKey ─► State

`aes_control` steps through RST, then R1…R15, then back to RST:

- **R1** applies round key 0 to `data_in`.
- **R2…R14** are the 13 full rounds.
- **R15** is the final round, without MixColumns.
- `done` rises in the clock after R15. The core accepts a new `start` in that
  same clock, so it runs back-to-back at one block per 16 clocks.
- `key` is sampled in the `start` clock and `data_in` in the next clock (R1).

**Key expansion on the fly** (`aes_key_scheduler`) is the least obvious part.
AES-256 needs 15 round keys, that is 60 words. The scheduler keeps only 8
words (256 bits) in a register:

- In odd states (h_k = 0) the upper half is the round key.
- In even states (h_k = 1) the lower half is the round key.
- After each even state the register advances by one full AES-256 expansion
  step of eight words. This step runs in one clock as a chain of XORs with two
  SubWord operations: SubWord(RotWord(w7)) ⊕ Rcon for the first word, and
  SubWord of the fourth new word for the fifth.

Seven expansions therefore cover rounds 2…14. The round constant is
01, 01, 02, 02, …, 40, 40 for rounds 1…14 (`aes_rcon`), one value per expansion.

The S-box is a 256-entry table (`gcm_pkg::sbox`), used by `aes_sbox`. The core
has 16 S-boxes in SubBytes and 8 in the key scheduler, and synthesis maps them
to ROMs. Only encryption is built, because GCM never runs AES backwards.

## GHASH and the single-clock multiplier (`ghash`, `gf128_mult`)

GHASH folds the blocks into one accumulator: X ← (X ⊕ B)·H. B runs over the AAD
blocks, then the ciphertext blocks, then len(A)‖len(C). This chain is serial,
because each step needs the previous result. The multiplier therefore has to
finish in one clock, or it would throttle the AAD phase and the final steps.

`gf128_mult` uses GCM's reflected bit order: bit 127 of a vector is the
coefficient of x^0. It works in two steps:

1. It forms the 128 rows V_0 = Y and V_{j+1} = (V_j ≫ 1) ⊕ (V_j[0] ? R : 0),
   with R = E1‖0^120. This is the reduction by x^128 + x^7 + x^2 + x + 1
   unrolled.
2. It computes every output bit as an AND/XOR tree: z[i] = ⊕_j (V_j[i] ∧ x[127−j]).

The whole product is combinational. It is the longest path in the design: about
128 levels for the rows, which are mostly wiring, plus a 7-level XOR tree. In
the original FPGA implementation it used about a quarter of a Virtex-5 LX50T.
`ghash` adds the H register and the accumulator around it.

## Controller (`gcm_control`)

The controller has 12 states:

| state | does | leaves on |
|---|---|---|
| RST | idle; clears the accumulator and block count | `start` |
| R_IN1 | load IV | `iv_end` |
| R_IN2a / R_IN2b | load K[255:128] / K[127:0] | `key_end` |
| R_IN3 | load last-block mask | `lsb_end` |
| R_IN4 | load sizes, start AES on 0^128 | `size_end` |
| R1 | wait for H, store it; preset counter to Y0 = IV‖0^31‖1 | AES done |
| R2 | one AAD block into GHASH per clock | `aad_end` |
| R3 | plaintext loop, see below | `plain_end` |
| R4 | len(A)‖len(C) into GHASH | — |
| R5 | start AES on Y0 | — |
| R6 | wait for E(K,Y0), output the tag | AES done |

In R3 a flag records whether a block is in flight. When none is, or the one in
flight finishes in the current clock, the controller checks `plain_end`. If
more blocks follow, it takes the next one into the plaintext register, steps
the counter (inc32) and starts AES, all in the same clock. The counter step and
the AES start line up because the core samples `data_in` one clock after
`start`. A finishing block's ciphertext is hashed in that same clock, so the
block period is exactly 16 clocks.

The other datapath modules are:

- `gcm_init_regs`: the parameter registers, all loaded from `din`.
- `gctr_counter`: the counter block.
- `aes_gcm`: the input and output multiplexers, the plaintext register, the
  64-bit block count that finds the last block, and the output register.

## Interpretations and departures

These points are not settled by the original description, or contradict it.
Each is resolved as follows:

- **Reduction constant.** The original text gives R as `0x7080…`. In the bit
  order used here, that value does not reproduce the GCM test vectors, so the
  standard R = E1‖0^120 is used.
- **Key schedule.** Three choices follow FIPS-197, as the test vectors require:
  - The original prose says the lower key half is used first and places Rcon
    in the low byte of the word. Here the upper half is used first and Rcon sits
    in the high byte.
  - The original prose gives only the AES-128 expansion rule. The AES-256 rule
    here adds the extra SubWord on the fifth word.
  - The controller's h_k sequence (0 in R1, 1 in R2, …) matches the original
    state diagram.
- **H takes 16 clocks.** One passage says R1 takes 14 clocks. The life-cycle
  chart says 16, and the core's own timing gives 16.
- **Tag mask computed at the end.** E(K,Y0) is computed after the last
  plaintext block. This costs 16 clocks of AES plus 1 clock to start it, as the
  controller description says. A shorter "1 cycle" final step would need
  E(K,Y0) to be computed and stored earlier.
- **Last-block mask.** The original keeps a 128-bit "LSB of the last plain
  text" register loaded as a parameter word. Here it is a left-aligned bit mask
  applied to the last ciphertext block, which is found from len(C).
- **`in_ack`** is an addition. Without it a buffer cannot know which clock
  takes a plaintext block. The strobes `*_end` have the meanings in the table
  above. Their exact timing is this design's choice.
- **Registered outputs.** `dout`, `c_out_rdy` and `done` are registered, one
  clock after the AES core finishes.
- **Reset** is synchronous and active high, and clears all registers.

## Not built

- Decryption and tag verification. The engine only encrypts.
- IVs other than 96 bits, where Y0 = GHASH(H, {}, IV).
- Truncated tags. The full 128-bit tag is produced.
- The streaming buffer that feeds the engine. It is outside the design and is
  modelled only in the testbench.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a clock watchdog. The
reference models in `tb/gcm_ref_pkg.sv` are written independently of the RTL:

- The S-box is computed as the GF(2^8) inverse followed by the affine map.
- AES-256 uses a textbook word-by-word key expansion.
- The GF(2^128) product is bit-serial.

Highlights:

- `tb_aes_gcm` runs the whole engine. It covers the three standard AES-256 GCM
  test vectors: all-zero key with one block; 64-byte plaintext; 60-byte
  plaintext with 20-byte AAD. Ciphertexts and tags match the published values.
  It also runs 12 random messages, including empty AAD, empty plaintext and
  partial last blocks, against the reference GCM. It checks:
  - H is ready 16 clocks after the size word.
  - AAD is taken one block per clock.
  - Ciphertext blocks leave exactly 16 clocks apart.
  - The total latency is 42 + nA + 16·nP.

  It counts init stalls, AAD phases, empty AAD, partial and full last blocks,
  empty plaintext and back-to-back blocks, and each must occur at least once.
- `tb_aes256` checks the FIPS-197 AES-256 example, the GCM hash keys and counter
  encryptions, random blocks, the 16-clock latency and back-to-back starts.
- `tb_gf128_mult` checks the product H·(X1 ⊕ A2) of the AAD test vector and
  300 random products against the bit-serial algorithm.
- `tb_aes_key_scheduler` checks all 15 round keys for the FIPS key, the zero
  key and random keys.

To run a testbench with Verilator (5.x):

    verilator --binary --timing -Irtl -Itb rtl/gcm_pkg.sv tb/gcm_ref_pkg.sv \
        tb/tb_aes_gcm.sv --top-module tb_aes_gcm -Mdir obj -o sim
    ./obj/sim

Replace `tb_aes_gcm` with any other `tb_<module>`. The end-to-end test runs the
unmodified top in under a second.

## Size

Yosys coarse synthesis of `aes_gcm` gives about 830 word-level cells and 1717
flip-flop bits. The S-box case tables become 49 Kbit of ROM: 24 S-boxes of
2 Kbit each. The multiplier alone is about 510 word-level cells, mostly 128-bit
AND/XOR.

## Files

- `rtl/gcm_pkg.sv`: shared types, state enums, S-box table, xtime, inc32.
- `rtl/aes_sbox.sv`, `aes_sub_bytes.sv`, `aes_shift_rows.sv`,
  `aes_mix_columns.sv`, `aes_add_round_key.sv`: the AES round steps.
- `rtl/aes_rcon.sv`, `aes_key_scheduler.sv`: on-the-fly key expansion.
- `rtl/aes_control.sv`, `aes256.sv`: AES controller and core.
- `rtl/gf128_mult.sv`, `ghash.sv`: multiplier and GHASH accumulator.
- `rtl/gctr_counter.sv`, `gcm_init_regs.sv`, `gcm_control.sv`: GCM counter,
  parameter registers and controller.
- `rtl/aes_gcm.sv`: the top.
- `tb/`: one testbench per module, plus the reference package.

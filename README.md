# Pipelined AES-128 encryption/decryption core

This is a hardware implementation of the Advanced Encryption Standard with a
128-bit key (AES-128, FIPS-197). It encrypts and decrypts 128-bit blocks. The
ten cipher rounds are unrolled into a pipeline of registered stages, so the
core accepts a new block every clock and returns it 11 clocks later. The
design rests on three ideas:

* **One datapath for both directions.** Every stage can run an encryption round
  or a decryption round. Each block carries its own direction bit down the
  pipeline, so encrypt and decrypt blocks may follow each other in any order,
  clock by clock. The S-boxes, the ShiftRows wiring and the MixColumns
  multiplier are shared between the two directions.
* **Round keys made on the fly.** No table of expanded keys is stored. A block
  enters with its first round key, and each stage derives the next key from the
  previous one. Encryption steps the key schedule forward; decryption steps it
  in reverse. Both use the same key-schedule hardware.
* **Rounds 1–9 are one module; round 10 is another.** The last round has no
  MixColumns, so it has a module of its own.

## Data layout

Blocks, keys and states are `logic [127:0]` vectors in FIPS-197 byte order.
Byte 0, the first byte of the plaintext or key, is bits `[127:120]`. Byte 15 is
bits `[7:0]`. The 4×4 state is filled column by column: byte *k* is row `k % 4`,
column `k / 4`. So the 32-bit column (key word) *c* is bits `[127-32c -: 32]`.
With this order the FIPS-197 test vectors can be used exactly as printed:

| key | plaintext | ciphertext |
|---|---|---|
| `2b7e151628aed2a6abf7158809cf4f3c` | `3243f6a8885a308d313198a2e0370734` | `3925841d02dc09fbdc118597196a0b32` |
| `000102030405060708090a0b0c0d0e0f` | `00112233445566778899aabbccddeeff` | `69c4e0d86a7b0430d8cdb78070b4c55a` |

## The pipeline and how the keys travel

```
            key_in ──► aes_key_setup ──► enc_key = k[0], dec_key = k[10]
                                              │
in_block ─► XOR k[0] or k[10] ─► [reg 0] ─► aes_round 1 ─► ... ─► aes_round 9 ─► aes_last_round ─► out_block
                       (state, key, direction and valid move together through every register)
```

Let k[0] to k[10] be the AES-128 round keys. k[0] is the cipher key.

| stage | encryption: key used | operations | decryption: key used | operations |
|---|---|---|---|---|
| 0 (in `aes_top`) | k[0] | AddRoundKey | k[10] | AddRoundKey |
| r = 1..9 (`aes_round #(r)`) | k[r] = forward step of k[r-1] | ShiftRows, SubBytes, MixColumns, AddRoundKey | k[10-r] = reverse step of k[11-r] | InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns |
| 10 (`aes_last_round`) | k[10] | ShiftRows, SubBytes, AddRoundKey | k[0] | InvShiftRows, InvSubBytes, AddRoundKey |

Decryption is the plain inverse cipher: it runs the encryption steps backwards
and uses the round keys from last to first.

Each stage register holds the block's state and also the round key that the
stage used. The next stage applies one key-schedule step to that key, with the
round constant for its position. That gives the next stage's key. A key step
and a round take place in the same clock.

The forward key step (`aes_key_step`) takes k[i-1] = (w0, w1, w2, w3) to k[i]:

    g(w) = SubWord(RotWord(w)) ^ {rcon_i, 24'h0}
    n0 = w0 ^ g(w3); n1 = n0 ^ w1; n2 = n1 ^ w2; n3 = n2 ^ w3

The reverse step takes k[i] = (w0..w3) back to k[i-1]:

    p3 = w3 ^ w2; p2 = w2 ^ w1; p1 = w1 ^ w0; p0 = w0 ^ g(p3)

Both steps use the same four S-boxes. Only the input to `g` changes: `w3`
forward, `w3 ^ w2` in reverse. rcon_i is x^(i-1) in GF(2^8), that is
01, 02, 04, 08, 10, 20, 40, 80, 1B, 36.

Decryption starts from k[10], which has to be known before the first block
comes in. That is the job of `aes_key_setup`. When a key is loaded, the module
stores it as k[0]. It then runs its own `aes_key_step` forward ten times, one
step per clock, and stores the result as k[10]. These two keys are the only
ones stored anywhere.

Every block carries its own key. So a new key can be loaded while blocks under
the old key are still in the pipeline, and those blocks finish correctly.

## Shared arithmetic

* **S-box (`aes_sbox`).** Encryption computes A(x⁻¹), where A is the AES affine
  map with constant 63. Decryption computes (A⁻¹(x))⁻¹. The GF(2^8) inverse is
  shared between the two. It is computed as x^254 (so 0 maps to 0) with a chain
  of squarings and multiplies: x², x³, x¹², x¹⁵, x²⁴⁰, and finally
  x²⁵⁴ = x²⁴⁰·x¹²·x². No look-up table is used. The field polynomial is
  x⁸+x⁴+x³+x+1.
* **MixColumns (`aes_mix_columns`).** The forward matrix is circulant
  (02 03 01 01). InvMixColumns uses the same multiplier after a cheap
  pre-step. With u = 04·(a0^a2) and v = 04·(a1^a3), the column becomes
  (a0^u, a1^v, a2^u, a3^v). Multiplying that by the forward matrix gives
  exactly the product with (0E 0B 0D 09).
* **ShiftRows (`aes_shift_rows`).** Row r rotates left by r bytes for
  encryption and right by r bytes for decryption. Rows 0 and 2 come out the same
  in both directions, so half of the outputs are plain wires.
* **Stage order.** SubBytes works byte by byte and ShiftRows only moves bytes,
  so the order of the two does not matter. Both directions therefore run
  ShiftRows and then SubBytes. The only thing that differs is where the round
  key is added: after MixColumns when encrypting, before InvMixColumns when
  decrypting. `aes_round` has one XOR bank in each place and a mux on the
  MixColumns input.

## Interface and timing (`aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_load` | in | 1 | one-cycle strobe: take `key_in` as the new cipher key |
| `key_in` | in | 128 | cipher key |
| `in_ready` | out | 1 | a key is loaded and expanded; blocks may be presented |
| `in_valid` | in | 1 | a block is presented this cycle |
| `in_decrypt` | in | 1 | 1 = decrypt `in_block`, 0 = encrypt it |
| `in_block` | in | 128 | plaintext or ciphertext |
| `out_valid` | out | 1 | `out_block` holds a result |
| `out_decrypt` | out | 1 | direction the result was computed in |
| `out_block` | out | 128 | ciphertext or plaintext |

* Latency: a block sampled with `in_valid` at clock edge *n* appears with
  `out_valid` after edge *n* + 11.
* Throughput: one block per clock, in either direction, in any mix.
* Key loading: `in_ready` falls after the edge that samples `key_load`. It rises
  again 11 edges after that edge. Out of reset no key is loaded and `in_ready`
  is low.
* There is no back-pressure. The output must be taken when `out_valid` is high.
  An assertion in `aes_top` flags `in_valid` while `in_ready` is low. Blocks
  presented at such a time are dropped.
* Reset clears only the valid bits and the key-setup state. The data registers
  are not reset.

At 128 bits per clock, the core's throughput is 128 × f_clk bits per second.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `aes_pkg.sv` | types (`byte_t`, `word_t`, `block_t`), `NR = 10`, `xtime`, `gmul`, `round_const` |
| `aes_sbox.sv` | shared forward/inverse S-box |
| `aes_sub_bytes.sv` | 16 S-boxes: (Inv)SubBytes |
| `aes_shift_rows.sv` | (Inv)ShiftRows |
| `aes_mix_columns.sv` | (Inv)MixColumns |
| `aes_add_round_key.sv` | AddRoundKey |
| `aes_key_step.sv` | one forward or reverse key-schedule step |
| `aes_key_setup.sv` | key register and iterative derivation of k[10] |
| `aes_round.sv` | registered stage for rounds 1–9 (parameter `ROUND`) |
| `aes_last_round.sv` | registered stage for round 10 |
| `aes_top.sv` | the pipeline |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, and
`aes_ref_pkg.sv`, a software model of AES-128 that was written separately from
the RTL. The model builds its S-box by brute-force search for inverses and
multiplies by the full matrices. Each testbench compares the RTL with this
model on random data and with FIPS-197 example values. Each one ends by
printing `TB_RESULT checks=N failures=M`.

`tb_aes_top` runs the whole core at its only size. It covers the FIPS-197
vectors in both directions, then 3,000 cycles of random traffic: random
direction, random idle cycles, and keys changed while blocks are in flight.
It checks every result, its direction bit and the latency of 11. It also
counts, and requires, each of these events at least once:

* a key load and its wait
* an encryption and a decryption
* a direction change between back-to-back blocks
* a full pipeline of 11 blocks
* a key change with blocks in flight
* an idle cycle

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

To run another testbench, change the top module, for example
`tb/tb_aes_round.sv --top-module tb_aes_round`. The other modules are found
through `-Irtl`. Each testbench finishes in well under a second.

## What is this design's own choice

The description this core follows gives these points:

* AES-128 with 10 rounds
* the four round operations and their inverses
* the same module for rounds 1–9 and a separate last round without MixColumns
* a pipeline
* S-boxes built around the multiplicative inverse and shared between
  encryption and decryption
* round keys generated in real time
* forward and reverse key scheduling in the same hardware
* decryption that uses the expanded key from the last round key backwards

These points are this implementation's own choices:

* One registered stage per round, plus one for the initial AddRoundKey. This
  gives a latency of 11 and one block per clock. No latency or clock rate was
  specified.
* A direction bit that travels with each block, so one pipeline serves both
  directions.
* The host interface: `key_load`, `in_ready` and valid signals with no
  back-pressure. The core is meant to sit beside a general-purpose processor,
  but that processor and its bus are not part of this RTL.
* Deriving k[10] with a 10-cycle iterative forward expansion at key load.
* The x^254 inverter and the InvMixColumns decomposition.
* FIPS-197 byte order.
* Which registers are reset.

Not included:

* **AES-192 and AES-256.** These were only said to be easy to add. Adding them
  would need longer keys, 12 or 14 stages and a different key step.
* **Back-pressure (stalling).** There is none.

## Implementation notes

* The whole core is combinational logic and flip-flops. There are no memories.
  Yosys coarse synthesis reports about 70k word-level cells and 3,101 flip-flop
  bits for `aes_top`. Most of the cells come from the 204 S-boxes: 16 per stage
  for the data plus 4 per stage for the key, across 10 stages, and 4 more in
  the key setup.
* The S-box is a deep chain of GF(2^8) multiplies. For high clock rates,
  retiming or a composite-field (GF((2^4)^2)) inverter would shorten it. The
  interface would not change.

# AES-128 decryption core, fully unrolled

This core turns a 128-bit AES ciphertext block back into plaintext, given the
128-bit cipher key. All ten rounds of the inverse cipher and the whole key
schedule are laid out in hardware, side by side. Nothing is iterated. A new
block can enter every clock cycle, each with its own key, and its plaintext
leaves two cycles later.

```
            clk
             |
 ciphertext -+->[reg]--(+)--> round 1 --> round 2 --> ... --> round 9 --> round 10 -->[reg]--> plaintext
                        ^        ^           ^                   ^           ^
                        |k10     |k9         |k8                 |k1         |k0
 key --------->[reg]--> key_expansion: k0 = key, k1 ... k10 (w[0..43])
```

`kr` stands for round key r, which is words w[4r..4r+3] of the expanded key.
Decryption uses the round keys in reverse order: k10 first, the cipher key k0
last.

## Interface and timing

| port         | dir | width | meaning                                     |
|--------------|-----|-------|---------------------------------------------|
| `clk`        | in  | 1     | clock, rising edge                          |
| `ciphertext` | in  | 128   | cipher block, first byte in bits 127:120    |
| `key`        | in  | 128   | cipher key, first byte in bits 127:120      |
| `plaintext`  | out | 128   | decrypted block, registered                 |

- Both inputs are captured on a rising edge.
- The plaintext register loads on the next rising edge.
- So a block presented before edge n shows up after edge n+1: a latency of
  2 cycles and a throughput of one block per cycle.
- There is no reset and no valid or ready signal. The ports are a clock and
  three 128-bit buses: 385 pins in all.
- A user who needs a valid flag can delay their own input-valid bit by two
  flip-flops.
- The output holds no useful value until two edges have passed.

## Data layout

A block is 16 bytes, byte 0 in bits 127:120. The AES state is a 4x4 byte
matrix filled column by column. Byte i sits in row `i mod 4`, column
`i div 4`:

```
  S0  S4  S8  S12
  S1  S5  S9  S13
  S2  S6  S10 S14
  S3  S7  S11 S15
```

Every module uses the slice `[127 - 8*i -: 8]` for byte i.

## One round, and why the key goes in before InvMixColumns

`dec_round` applies four steps, in this order:

1. **InvShiftRows** (`inv_shift_rows`). Row r rotates right by r bytes. Row 0
   stays put. The byte at (r, c) moves to (r, c+r mod 4). It is only wiring.
2. **InvSubBytes** (`inv_sub_bytes`). Sixteen copies of the inverse S-box
   table, one per byte.
3. **AddRoundKey** (`add_round_key`). A 128-bit XOR with the round key.
4. **InvMixColumns** (`inv_mix_columns`). Each column is multiplied over
   GF(2^8) (modulus x^8+x^4+x^3+x+1) by the circulant matrix whose first row
   is 0E 0B 0D 09. The constant products are built from `xtime` and XORs.
   Round 10 leaves this step out (`LAST = 1`).

This is the *straightforward* inverse cipher. It is the exact mirror of
encryption, so the round keys are the plain expanded keys. The other
well-known form, the "equivalent inverse cipher", puts AddRoundKey last. It
then needs round keys that have themselves passed through InvMixColumns.
This core does not use that form. Swapping the key addition and
InvMixColumns in `dec_round` without also changing the keys gives wrong
results. The `dec_round` testbench checks for exactly that mistake.

InvShiftRows and InvSubBytes commute, so their relative order does not matter
to the result. The order above is kept so that the intermediate values match
the published trace of the worked example below.

## Key expansion

`key_expansion` computes all 44 words at once:

- w[0..3] is the key.
- w[i] = w[i-4] XOR t, where t = w[i-1], except when i is a multiple of 4.
- Then t = SubWord(RotWord(w[i-1])) XOR Rcon(i/4).
- RotWord rotates the four bytes of a word left by one byte.
- SubWord passes each byte through the forward S-box.
- Rcon(j) is 01 shifted left j-1 times in GF(2^8): 01 02 04 08 10 20 40 80 1B 36.

The schedule takes ten stages of four S-box lookups each, all combinational.
It lies in series with the rounds: the first key addition needs k10, which is
the *last* word group the forward recurrence produces. The critical path is
therefore the key schedule plus all ten rounds. If the key is fixed for long
runs of blocks, the round keys could be computed once and kept in registers
(1408 flip-flops). This core does not do that, so that it can take a
different key every cycle.

## The substitution tables

`aes_dec_pkg` holds the inverse S-box as a 256-entry constant array
(`INV_SBOX`). Entry `16*x + y` is the value in row x, column y of the usual
16x16 table. `inv_sbox` simply indexes it.

The key schedule needs the *forward* S-box. That table is not stored a second
time. `aes_dec_pkg` builds `SBOX` at elaboration time by inverting the
`INV_SBOX` permutation (`SBOX[INV_SBOX[i]] = i`). The two tables therefore
cannot disagree. Synthesis maps each table to LUT logic or a ROM.

Altogether the design uses 160 inverse tables (16 per round) and 40 forward
tables (4 per key-schedule stage).

## Worked example

Inputs:

- ciphertext `9E756943661D7C5561F3F9781F5E32DE`
- key `0A1B2C3D4E5F6789ABCDEF0123456789`

Result: plaintext `0123456789ABCDEF0123456789ABCDEF`.

State at the start of each round (internal signal `s[r-1]` of the top):

| round | state                              |
|-------|------------------------------------|
| 1     | `f46bb2650bac86248682a37e05bc5bab` |
| 2     | `505293ff5afa9ea67a8c1f32c57b33e4` |
| 3     | `7953607d688762e1a752f86baab441b9` |
| 4     | `2328f5796e830a4e3e8a5e2480bd653a` |
| 5     | `af8d3f64bb69acd3359fef155eee144b` |
| 6     | `f1ac0e074290db464eed601e06254cb9` |
| 7     | `22c969eafffc95d1c81d8bcad6cce3a2` |
| 8     | `bcf2751caa34dd57d3edc2f1437c6c63` |
| 9     | `386fe207f666357da39a01b738fe461f` |
| 10    | `2bbfac33c628acbeac28f933ac07ac33` |

Inside round 1, the state after InvShiftRows is
`f4bca3240b6b5b7e86acb2ab05828665`. After InvSubBytes it is
`ba7871a69e05578adcaa3e0e3611dcbc`. After AddRoundKey with
`80dd547207af21578ac0a077fd933373` it is `3aa525d499aa76dd566a9e79cb82efcf`.
InvMixColumns then gives the round-2 value above. The unit testbenches use
these numbers.

## What the design takes as given, and what it chooses

The design follows a specific architecture description. These parts come from
that description:

- the ten-round structure with an initial key addition;
- the step order inside a round;
- leaving InvMixColumns out of the last round;
- the order in which the round keys are used;
- the key schedule and its Rcon values;
- the inverse S-box implemented as a lookup table;
- the values of the two worked examples.

These are choices of this design:

- **Registers.** There is one register stage in front of the datapath and one
  behind it. The description does not say where registers sit. An FPGA mapping
  of the original design reported about 1500 flip-flops; this core has 384.
  More pipeline stages can be added between rounds. Then the key (or the round
  keys) must move down the pipeline together with each block.
- **No reset, no handshake.** This matches the 385-pin interface reported for
  the original design.
- **The InvMixColumns matrix.** Its coefficients come from the AES standard.
  The description only calls the step a Galois-field matrix product.
- **Deriving the forward S-box** from the inverse table.
- **Byte order** on the buses.

Two things are not provided at all:

- any system-on-chip wrapper (bus interface, key storage);
- the physical implementation. The original design was also taken through
  standard-cell layout and power analysis. That work belongs to a cell
  library and tool flow, not to RTL.

A board with fewer than 385 user I/O pins cannot hold this core as a
stand-alone top level. It has to sit behind some narrower on-chip interface.

## Size

Generic synthesis (yosys, coarse) gives:

- 384 flip-flops;
- about 4400 word-level cells;
- the 200 S-box tables as 256x8 ROMs.

## Files

`rtl/`:

| file                  | content                                                        |
|-----------------------|----------------------------------------------------------------|
| `aes_dec_pkg.sv`      | types, `INV_SBOX`, derived `SBOX`, GF(2^8) helpers (`xtime`, `mul9/11/13/14`) |
| `inv_sbox.sv`, `sbox.sv` | byte lookup tables                                          |
| `inv_sub_bytes.sv`, `inv_shift_rows.sv`, `inv_mix_columns.sv`, `add_round_key.sv` | the four round steps |
| `dec_round.sv`        | one round, parameter `LAST` drops InvMixColumns                |
| `key_expansion.sv`    | key schedule, output `round_keys[0..10]`                       |
| `aes128_decrypt.sv`   | top level                                                      |

`tb/`:

- `aes_ref_pkg.sv` is an independent software model. Its S-box comes from
  the GF(2^8) inverse and the affine map, not from the design's table. It
  holds the key schedule, the inverse steps, and a forward encryption used to
  make random test data.
- Each module has a self-checking testbench, `<module>_tb.sv`. Each ends by
  printing `TB_RESULT checks=N failures=M`.

`aes128_decrypt_tb` runs the top level at its only configuration. It covers:

- four known-answer blocks back to back: the example above, the textbook
  vector with key `0f1571c947d9e8590cb7add6af7f6798`, and the two FIPS-197
  vectors;
- for the textbook vector, the intermediate states and all ten round keys
  inside the core;
- a measurement of the 2-cycle latency;
- 2000 random blocks at one block per cycle, half with a fresh key every
  cycle and half with a key shared by a run of 100 blocks.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/aes_dec_pkg.sv tb/aes_ref_pkg.sv \
    tb/aes128_decrypt_tb.sv --top-module aes128_decrypt_tb
./obj_dir/Vaes128_decrypt_tb
```

To run another testbench, replace the testbench file and the top-module name,
for example with `tb/dec_round_tb.sv` and `dec_round_tb`. Each run takes well
under a second. To lint the design:

```
verilator --lint-only -Wall -y rtl rtl/aes_dec_pkg.sv rtl/aes128_decrypt.sv
```

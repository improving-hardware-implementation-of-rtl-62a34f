# Unrolled AES encryptor for 128-, 192-, 256- and 512-bit keys, with ECB and CBC

This RTL encrypts 128-bit blocks with AES as one combinational circuit. All
rounds, and the key schedule next to them, are unrolled into a single netlist
with no clock and no registers. The ciphertext is valid one propagation delay
after the key and plaintext settle.

Two ideas shape the datapath. Both aim to shorten the critical path on an
FPGA by doing more work side by side:

* **The S-box is split into four small lookup tables.** The 16×16
  substitution table is cut into four 8×8 quadrants. Every input byte is
  looked up in all four at once. The quadrant that holds the byte returns the
  value and the other three return zero, so a 4-input XOR merges them.
* **MixColumns is built from three tiny byte units.** M2 multiplies by {02},
  M3 is a byte XOR that forms {03}·x as {02}·x ⊕ x, and M4 is a 4-input byte
  XOR. Each of the 16 state bytes passes through the same M2 and M3 at the
  same time, and each output byte is one M4.

Besides standard AES-128/192/256, the design supports a 512-bit-key
extension ("AES-512"): 16 words of key, 16 rounds and 68 expanded-key words.
It keeps the 128-bit block and the standard round function.

## Hierarchy

```
aes_top                    8 encryptors side by side, each with its own ports
├── aes_cipher  ×4         ECB core, NK = 4, 6, 8, 16
│   ├── aes_key_expand     all NR+1 round keys, combinational
│   │   └── aes_sbox       SubWord bytes
│   └── aes_cipher_rounds  initial AddRoundKey + NR rounds
│       ├── aes_add_round_key ── aes_xor2 ×16
│       └── aes_round ×NR
│           ├── aes_sub_bytes ── aes_sbox ×16
│           │                     ├── aes_sbox_quad ×4 (64-entry LUTs)
│           │                     └── aes_xor4 (merges the quadrants)
│           ├── aes_shift_rows    (wiring)
│           ├── aes_mix_columns   (omitted in the last round)
│           │   ├── aes_mc_m2 ×16  (M2)
│           │   ├── aes_xor2  ×16  (M3)
│           │   └── aes_xor4  ×16  (M4)
│           └── aes_add_round_key
└── aes_cbc  ×4            CBC chain of CBC_BLOCKS blocks, NK = 4, 6, 8, 16
    ├── aes_key_expand     one schedule shared by the chain
    ├── aes_add_round_key  plaintext ⊕ IV / previous ciphertext
    └── aes_cipher_rounds ×CBC_BLOCKS
```

`aes_pkg` holds the shared types (`byte_t`, `word_t`, `block_t`), the round
count `nr_of(NK)`, `xtime` and `rcon`.

## Bit and byte layout

* A block is `logic [127:0]`. Byte 0 is bits 127:120 and byte 15 is bits
  7:0, so a hex literal reads in the usual test-vector order.
* Bytes fill the 4×4 state column by column: byte `4c+r` is row `r`,
  column `c`.
* A key of NK words is `logic [32*NK-1:0]`, with word 0 in the most
  significant bits.

## The quadrant S-box (`aes_sbox`, `aes_sbox_quad`)

For input byte `a`, the table row is `a[7:4]` and the column is `a[3:0]`.
Quadrant `Q = {a[7], a[3]}` selects one of the four 8×8 blocks. Inside a
quadrant the entry index is `{a[6:4], a[2:0]}`. Each `aes_sbox_quad #(.Q(q))`
holds its 64 entries as a constant table, cut at elaboration from the full
Rijndael table. It drives its entry when `{a[7],a[3]} == q`, and zero
otherwise.

The table values are the standard S-box. Entry `v` is the GF(2⁸) inverse of
`v` modulo x⁸+x⁴+x³+x+1 (0 maps to 0), followed by the affine map
`s = b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 0x63`.

The merge stage is described as a byte-wise adder. It is built as an XOR.
Only one operand is ever non-zero, so XOR, OR and integer addition give the
same result.

## MixColumns from M2, M3 and M4 (`aes_mix_columns`)

For each input byte `x` the unit forms `d2 = M2(x) = {02}·x` and
`d3 = M3(d2, x) = {03}·x`. Output row `r` of a column is

```
out[r] = M4( d2[r], d3[r+1], x[r+2], x[r+3] )      (indices mod 4)
```

This is the matrix `[02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02]`.
Per round this gives 16 M2, 16 M3 and 16 M4 units. A 10-round cipher has 9
MixColumns rounds, so it holds 144 of each. Its 11 AddRoundKey stages add
another 176 byte XOR2 units.

## Key schedules (`aes_key_expand`)

The schedule produces `NW = 4·(NR+1)` words. The first NK words are the key.
Each later word `w[i]` is:

| condition                  | w[i]                                          |
|----------------------------|-----------------------------------------------|
| `i mod NK == 0`            | `SubWord(RotWord(w[i-1])) ⊕ Rcon(i/NK) ⊕ w[i-NK]` |
| `NK > 6` and `i mod 4 == 0`| `SubWord(w[i-1]) ⊕ w[i-NK]`                   |
| otherwise                  | `w[i-1] ⊕ w[i-NK]`                            |

`Rcon(j)` is `{02}^(j-1)` in the top byte of the word. For NK = 4, 6 and 8
this is the FIPS-197 schedule. For NK = 16 (the 512-bit key):

* Words 0–15 are the key itself, so round keys 0 to 3 are the key's four
  128-bit quarters.
* `RotWord`/`SubWord`/`Rcon` is applied at i = 16, 32, 48 and 64, so only
  Rcon1 to Rcon4 are used.
* `SubWord` alone is applied at the other multiples of 4.

Round key `r` is `{w[4r], w[4r+1], w[4r+2], w[4r+3]}`. Each expanded word is
its own generate block (`g_word[i].w`). That keeps the long dependency chain
acyclic for lint tools.

A check point for the 512-bit variant: take the SP 800-38A 256-bit key
`603DEB10…0914DFF4` and write it twice to form the 512-bit key. Encrypt the
plaintext `6BC1BEE22E409F96E93D7E117393172A`. After round 9 the state is
`FDFAEEA39003AE13205D1675715727E3` and the round-9 key is
`C6E13F1F5530ABD2EB792FBC5C247426`. The full ciphertext is
`5E018FB585127FACD411CF34823F4AEC`.

## ECB and CBC

* **ECB** (`aes_cipher`). One block in, one block out:
  `ct = E_key(pt)`. The `subkey` output gives the last round key.
* **CBC** (`aes_cbc`). `ct[0] = E(pt[0] ⊕ iv)` and
  `ct[i] = E(pt[i] ⊕ ct[i-1])`.
  * The usual chaining register is replaced by wires. `CBC_BLOCKS` round
    datapaths sit in series, so block `i` settles after about `i+1` cipher
    delays.
  * The chain depth is fixed at elaboration (`NBLOCKS`, default 2).
  * All blocks of a chain share one key schedule.

Only encryption is implemented. There is no decryption datapath (no inverse
S-box and no InvMixColumns). CFB, OFB and CTR modes are not included.

## Timing and size

The design has no clock, reset or handshake. Every output is a pure function
of the inputs, and its latency is the settling time of the logic.

The path depth grows linearly with the round count:
* AES-512 has 16 rounds against 10 for AES-128.
* Its key schedule runs alongside the rounds rather than ahead of them.
* A CBC chain of `n` blocks is `n` cipher depths long.

This suits low-rate use or timing studies. For throughput you would insert
pipeline registers between `aes_round` instances. That change is local to
`aes_cipher_rounds`. The round keys would then need matching delay, or would
have to come from a precomputed key.

Coarse synthesis of `aes_top` (four ECB cores plus four two-block CBC
chains) gives about 105k word-level cells. Each quadrant LUT stays a 64×8
memory cell, so the memory bits count all S-box tables. A single AES-512 core
lints in about 2 s. The whole top needs about 3 minutes to build for
simulation with Verilator and runs in milliseconds.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. The testbenches use the behavioural model
in `tb/aes_ref_pkg.sv`. That model computes the S-box from the GF(2⁸) inverse
and the affine map, and MixColumns by generic GF multiplication, so it shares
no tables with the RTL.

The following vectors are also checked:

* FIPS-197 Appendix C vectors for 128, 192 and 256 bits
* the FIPS-197 round-1 example and the MixColumns example column
  `D4 BF 5D 30 → 04 66 81 E5`
* SP 800-38A ECB and CBC vectors
* the 512-bit check point above

Example with plain Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_aes_cipher \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_cipher.sv -o sim
./obj_dir/sim
```

`tb_aes_top` runs the whole design at its default parameters. It drives all
eight encryptors with the published vectors and with random data. It counts
how often ECB was checked for each key size, and how often a change of IV
reached the second CBC block. If any of these never happened, it reports a
failure.

`tb_aes_avalanche` measures the avalanche effect. It flips one random
plaintext bit and counts how many ciphertext bits change, on the AES-128 and
AES-512 cores, over 200 random trials. Both land near the ideal 50% (about
49–50%). The test fails if the mean leaves 45–55%, or if a single trial
changes fewer than 20 or more than 108 of the 128 bits.

## Where this RTL makes its own choices

* **No pipeline registers.** The design is described both as "fully
  pipelined" and by synthesis reports that list zero registers. The RTL
  follows the register-free form.
* **Keys are ports.** The reference FPGA builds wired some keys in as
  constants to save pins. Here every core takes its key as an input.
* **Placement.** All eight variant/mode combinations are placed in one top,
  side by side. The reference builds each one as a separate project.
* **Quadrant indexing.** The quadrant numbering `{a[7],a[3]}` and the LUT
  index order are this design's choice. The XOR used as the merge adder is
  also this design's choice.
* **Shared CBC key schedule.** One key schedule per CBC chain is an area
  choice.
* **Not modelled.** An "Increment Bytes" unit is listed in the reference
  module count, but its function is not known, so it is not modelled. The
  Rcon values it may have supplied come from `aes_pkg::rcon`.
* **Timing not covered by simulation.** Nanosecond delays and logic-element
  counts depend on the FPGA and its tools, so the testbenches do not
  reproduce them. Simulation here checks function only.

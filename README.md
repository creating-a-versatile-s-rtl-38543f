# AES-128 with a message- and key-dependent S-box

Standard AES uses one fixed substitution table (S-box) for every block and
every key. This design replaces it with a table that is rebuilt for each
block, from that block's plaintext and the key. The table is still a
permutation of the 256 byte values, so SubBytes remains a bijection. Which
permutation it is, though, changes whenever the message or the key changes.
All the cipher's XORs, rotations and additions are written as the reversible
building blocks they are meant to become (Feynman gates, MTS full-adder
cells). The RTL is ordinary synthesizable SystemVerilog, and nothing here
models power.

The top level, `dyn_aes_top`, takes a 128-bit message and a 128-bit key. It
first builds the table (254 clocks), then runs an iterative AES-128 encryption
of the same message under that table (one round per clock).

## How the table is built

The table comes from a single seed byte d', which is expanded by an 8-bit
LFSR.

**1. From message and key to 16 bytes.** `alpha = key XOR message`, 128 bits,
viewed as bytes a[0] (bits 127:120) to a[15].

**2. Mixing each byte** (`byte_mixer`). For each byte a, let n1 be its number
of one bits and n0 = 8 - n1 its number of zero bits. Then

    d = ( ror(a, n1) + ror(a, n0) ) mod 256

where `ror` rotates right and a rotation by 8 changes nothing. The addition is
a real 8-bit addition with the carry thrown away, not an XOR. This choice
matters: an XOR gives a different seed and does not reproduce the reference
table below.

**3. Folding to one byte** (`seed_gen`). d' = d[0] + d[1] + ... + d[15]
mod 256. It is computed in a tree of 15 eight-bit ripple-carry adders, and
every carry is dropped.

**4. Expanding to 256 entries** (`lfsr8`, `dyn_sbox`). The LFSR shifts toward
its MSB and feeds `q7 ^ q3 ^ q2 ^ q1` into bit 0 (taps 8, 4, 3, 2, 1 when
stages are counted from 1). That feedback is maximal-length, so from any
non-zero seed it visits all 255 non-zero bytes before repeating. The table is:

| entry | value |
|---|---|
| 0 | d' (the seed itself) |
| i = 1..254 | LFSR state i steps after the seed |
| 255 | 00 |

Entry x is the substitute for byte value x: `SubBytes(x) = sbox[x]`.

**Worked example.** Take message `544f4e20776e69546f656e772020656f` and key
`5473206768204b20616d754674796e75`: "Two One Nine Two" and "Thats my Kung Fu"
with each block written column by column. They give d' = 0x67. The table
begins `67 ce 9c 39 73 e7 cf 9e 3c 78 f1 e3 ...` and ends
`... 46 8c 19 33 00`. The testbenches check this full 2048-bit table.

**Zero seed.** If d' is 0, the LFSR would stay at 0 and the table would hold
only zeros. This design then uses seed 0x01 instead and raises `seed_fixup`.
The rule is this design's own addition. If seeds are spread evenly, about
one message/key pair in 256 hits it.

**Messages and keys that are not 128 bits.** `dyn_sbox` and `seed_gen` take
`MSG_W` and `KEY_W` parameters (default 128):

- A shorter value is padded with zeros appended below it: the value occupies
  the upper bits.
- A longer value is cut into 128-bit chunks, chunk 0 being the most
  significant. The `chunk_sel` input picks which chunk seeds the table, and a
  last partial chunk is zero padded.

Padding position and chunk order are this design's choices.

## The reversible building blocks

- **Feynman gate** (`feynman_gate`): P = A, Q = A xor B. With B = 0 it is a
  reversible fan-out (copy). With B in use it performs every XOR in the
  design: message + key, AddRoundKey, and the sums inside MixColumns.
- **MTS gate** (`mts_gate`): a 4-input, 4-output full-adder cell. It takes a,
  b, carry-in and a constant 0, and gives two garbage outputs, the sum and
  the carry. The exact garbage functions (P = a, Q = a ^ b) are this design's;
  the mapping is one-to-one, so the cell is reversible.
- **Ripple-carry adder** (`rc_adder`): a chain of W MTS gates. Gate k's
  fourth output is gate k+1's carry-in. Its garbage outputs are brought out
  on a `garbage` port, and parents leave that port unconnected.
- **Modulo adder** (`mod_adder8`): the ripple-carry adder plus removal of 256
  when the 9-bit sum carries.
- **Rotator** (`rot_feynman`): the reference structure rotates by one position
  through a column of copying Feynman gates and repeats N times. Here the N
  steps are folded into log2(W) stages of 2^k positions each; the function is
  the same. `RIGHT` selects the direction, and W is a parameter: 8 for the
  S-box, 32 for ShiftRows, and wider rows if a wider cipher is built.

Lint reports the unconnected garbage outputs as unused signals. That is
expected in reversible logic.

## The cipher datapath

`aes_encrypt` is a standard iterative AES-128 encryptor. The only differences
from standard AES are that the S-box is an input, and how MixColumns is built.

- **Round 0**: plaintext xor key.
- **Rounds 1-9**: SubBytes, ShiftRows, MixColumns, AddRoundKey.
- **Round 10**: SubBytes, ShiftRows, AddRoundKey.
- **Key schedule** (`key_expansion`): the round key is computed on the fly, one
  step per round, with the standard AES-128 schedule. Its SubWord uses the same
  dynamic table as the rounds. That is this design's choice; a variant with the
  fixed table in the key schedule would also fit the reference structure.
- **ShiftRows** (`shift_rows`): each 32-bit row goes through a left rotator by
  8·r bits. The amounts are constant, so it synthesizes to wiring only.
- **MixColumns** (`mix_columns`): the standard matrix M = [2 3 1 1; 1 2 3 1;
  1 1 2 3; 3 1 1 2] multiplies the 4x4 state. The product is assembled from
  2x2 blocks: `mix_column_2x2` computes C = A·X over GF(2^8), and
  C1 = A1B1^A2B2, C2 = A1B3^A2B4, C3 = A3B1^A4B2, C4 = A3B3^A4B4. Each output
  block of M·S is the Feynman sum of two such products, eight instances in
  all. `gf_mul8` uses the AES field polynomial 0x11b.

With the standard AES table loaded as its S-box, `aes_encrypt` reproduces the
FIPS-197 test vectors. This checks the datapath independently of the dynamic
table.

## Interface and timing of `dyn_aes_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock, rising edge |
| rst | in | 1 | synchronous reset, active high |
| start | in | 1 | latch msg and key, build table, encrypt; ignored while busy |
| msg | in | 128 | plaintext, byte 0 in bits 127:120 |
| key | in | 128 | key |
| busy | out | 1 | operation in progress |
| done | out | 1 | one-cycle pulse; ct valid from this cycle on |
| ct | out | 128 | ciphertext, held until the next block finishes |
| sbox | out | 2048 | table last built, entry 0 in bits 2047:2040 |
| seed | out | 8 | seed of that table |

Call the clock edge that samples `start` edge 0. Then:

- Edge 0 writes table entries 0 and 255.
- Edges 1-254 write entries 1-254, and `dyn_sbox` pulses its done.
- Edge 255 performs AES round 0.
- Edges 256-265 perform rounds 1-10.
- `done` is high in the cycle after edge 265.

So one block takes 266 cycles, and there is no overlap between blocks: each
needs its own table. Assertions check two rules: the cipher starts only on a
complete table, and the table does not change while the cipher runs.

The sub-blocks have the same style of handshake:

- `dyn_sbox`: `start`, then `busy`, then a `done` pulse 254 edges later.
  `valid` stays high while a complete table is held.
- `aes_encrypt`: `start`, then `done` 10 edges later, with `round` showing
  1-10.

## What is not here

- **Key generation unit.** The reference structure derives the key from the
  message in a "key generation unit" whose function is not specified. Here
  the key is simply an input.
- **Wider blocks (192, 256, 512, 1024 bits).** The target is a cipher whose key
  is as long as its block. For these sizes no state layout, round count, key
  schedule or MixColumns matrix is defined, so only the 128-bit cipher exists.
  The S-box generator and the rotator already accept other widths.
- **Decryption.** Not described, and not built. It would need the inverse of
  each dynamic table.
- **Security analysis.** Only the avalanche behaviour below is measured. The
  table is an LFSR sequence rather than a GF(2^8) inverse, so its
  nonlinearity is far below that of the AES S-box. Treat this design as an
  experiment, not a vetted cipher.

## Choices made here

The following points are not fixed by the original description. They are
decided here, and each can be changed locally:

- **Table order and indexing.** Entry 0 is the seed and entry 255 is 00;
  `SubBytes(x) = sbox[x]`. The order matches the reference table.
- **Combining the two rotations.** Addition modulo 256. The description also
  words this step as an XOR; addition is the reading that reproduces the
  reference table.
- **Zero seed.** Replaced by 01.
- **Wide inputs.** Padding below the value, chunk 0 the most significant,
  chunk chosen by `chunk_sel`.
- **Build speed.** One table entry per clock; the full table is exposed as
  registers.
- **MTS gate.** Garbage-output functions as given above.
- **Rotator.** Log-depth stages instead of N single-step rotations; the
  function is the same.
- **Reset.** Synchronous and active high.
- **AES details.** Field polynomial, MixColumns matrix, key schedule, and
  AES-128's 10 rounds are standard AES. The key schedule's SubWord uses the
  dynamic table.
- **Cipher speed.** One round per clock, with round keys made on the fly.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference models
live in `tb/tb_ref_pkg.sv`: integer arithmetic, a carry-less GF multiply, and
the standard S-box computed from the field inverse and affine map. What is
checked:

- **Exhaustive.** `mts_gate`, `rc_adder` (W = 8), `mod_adder8`, `byte_mixer`,
  `gf_mul8`, and `rot_feynman` (W = 8).
- **Known vectors.** FIPS-197 ShiftRows, MixColumns, SubBytes, AddRoundKey,
  key schedule and full encryption, all with the standard table. The worked
  table above for `dyn_sbox`.
- **Random.** Against the reference model: seeds (including 64- and 192-bit
  inputs), tables (including a zero seed), and full encryptions with dynamic
  tables.
- **Timing.** Latencies of 254, 10 and 265 edges; starts ignored while busy.
- **End to end.** `tb_dyn_aes_top` runs at the default parameters: the worked
  example, eight random blocks, and one zero-seed block. It counts table
  builds, zero-seed replacements, rounds with and without MixColumns, ignored
  starts and table changes, and fails if any of these never happens.
- **Avalanche.** `tb_avalanche` encrypts the worked-example message, then the
  same message with bit 127, 124, 109, 75, 48, 32, 12, 2, 1 or 0 flipped, each
  under its own table. Between 43 % and 57 % of ciphertext bits change (mean
  48 %).
- **S-box quality.** `tb_sbox_metrics` measures the worked-example table.
  Strict avalanche criterion: mean 0.512 (min 0.453, max 0.563). Flipping
  message bit 0 changes 1024 of the 2048 table bits. The correlation between
  x and S(x) is -0.016.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal \
      -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/dsbox_pkg.sv tb/tb_ref_pkg.sv tb/tb_dyn_aes_top.sv \
      --top-module tb_dyn_aes_top -o sim
    obj_dir/sim

Replace `tb_dyn_aes_top` with any other `tb/tb_*.sv`. Every testbench runs in
well under a second.

## Files

| file | contents |
|---|---|
| `rtl/dsbox_pkg.sv` | byte, state and table types; sizes |
| `rtl/dyn_aes_top.sv` | top: sequencing of table build and encryption |
| `rtl/dyn_sbox.sv` | table builder: seed, LFSR fill, 256 x 8 register table |
| `rtl/seed_gen.sv` | pad/chunk, key xor message, per-byte mix, mod-256 sum |
| `rtl/byte_mixer.sv` | one byte: count, two rotations, modulo add |
| `rtl/lfsr8.sv` | 8-bit LFSR |
| `rtl/rc_adder.sv`, `rtl/mts_gate.sv` | MTS-gate ripple-carry adder |
| `rtl/mod_adder8.sv` | modulo 2^8 adder |
| `rtl/rot_feynman.sv`, `rtl/feynman_gate.sv` | rotator, Feynman gate |
| `rtl/aes_encrypt.sv` | iterative AES-128 core |
| `rtl/sub_bytes.sv`, `rtl/shift_rows.sv`, `rtl/mix_columns.sv`, `rtl/mix_column_2x2.sv`, `rtl/gf_mul8.sv`, `rtl/add_round_key.sv`, `rtl/key_expansion.sv` | round functions |
| `tb/tb_ref_pkg.sv` | reference models |
| `tb/tb_<module>.sv` | one testbench per module, plus `tb_avalanche.sv` and `tb_sbox_metrics.sv` |

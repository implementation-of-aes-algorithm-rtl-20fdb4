# AES-128 encryption and decryption unit

This is a compact, iterative hardware implementation of the Advanced
Encryption Standard with a 128-bit key. One request takes a 128-bit key, a
128-bit block and a mode bit. The unit expands the key into the 11 round keys
and then runs either the cipher or the inverse cipher, one round per clock.
After that, `ready` rises and `data_out` holds the ciphertext or the
recovered plaintext. The goal is a small, easy-to-read datapath of the kind
used on FPGAs to encrypt bulk data: a single 128-bit state register per
direction, combinational round logic and a register file of round keys.

It reproduces the standard known-answer vectors, for example:

| key | plaintext | ciphertext |
|---|---|---|
| `2b7e151628aed2a6abf7158809cf4f3c` | `6bc1bee22e409f96e93d7e117393172a` | `3ad77bb40d7a3660a89ecaf32466ef97` |
| `2b7e151628aed2a6abf7158809cf4f3c` | `3243f6a8885a308d313198a2e0370734` | `3925841d02dc09fbdc118597196a0b32` |
| `000102030405060708090a0b0c0d0e0f` | `00112233445566778899aabbccddeeff` | `69c4e0d86a7b0430d8cdb78070b4c55a` |

## How a block is laid out

Everything here depends on one convention, so it comes first. A block is one
packed `logic [127:0]`, written exactly as test vectors are printed. The
leftmost hex pair is byte 0 and sits in bits `[127:120]`. AES sees the block
as a 4x4 byte matrix *filled column by column*: byte `i` is row `i % 4`,
column `i / 4`. Each 32-bit slice `[127-32c -: 32]` is therefore one column,
with row 0 in its top byte. For the block `00 01 02 ... 0f`:

```
        col0 col1 col2 col3
row 0    00   04   08   0c
row 1    01   05   09   0d
row 2    02   06   0a   0e
row 3    03   07   0b   0f
```

`ShiftRows` works on rows, which are spread across the four columns.
`MixColumns` works on columns, which are contiguous 32-bit slices. Round keys
use the same layout: word `w[4r+j]` of the key schedule is column `j` of
round key `r`.

## The round transformations

All four transformations are combinational modules with a `state_i` input
and a `state_o` output. Each has its inverse for decryption.

- **SubBytes / InvSubBytes** (`aes_sub_bytes`, `aes_inv_sub_bytes`). Sixteen
  parallel lookups, one per byte. The S-box value is the multiplicative
  inverse in GF(2^8), then an affine transform:
  `s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`, with
  `b = x^-1` and `0^-1 = 0`. The tables are not typed in. `aes_pkg` computes
  them at elaboration from that formula, with the inverse as `x^254`.
  Synthesis then sees a 256x8 ROM per lookup. The inverse table is the
  inverse permutation of the forward one.
- **ShiftRows / InvShiftRows** (`aes_shift_rows`, `aes_inv_shift_rows`).
  Row `r` is rotated left by `r` bytes (right for the inverse). This is pure
  wiring, so synthesis reports every output as wired to an input. That is
  expected: the block is a fixed byte permutation.
- **MixColumns / InvMixColumns** (`aes_mix_columns`, `aes_inv_mix_columns`).
  Each column is multiplied by a circulant matrix over GF(2^8), modulo
  `x^8+x^4+x^3+x+1`. The forward matrix's first row is `02 03 01 01`. The
  inverse matrix's first row is `0e 0b 0d 09`. Multiplying by `02` is `xtime`:
  shift left, then XOR with `0x1b` if a bit fell out. Every other constant is
  a sum of `xtime` powers, so each column is a small XOR network with no
  general multiplier.
- **AddRoundKey** (`aes_add_round_key`). A 128-bit XOR. It is its own
  inverse, so both directions use it.

## The two cores

Each core (`aes_encrypt`, `aes_decrypt`) has one 128-bit state register, a
round counter and a single `aes_add_round_key`. The key addition is shared:
- While the core is idle, its input is the incoming block. The cycle of
  `start` then performs the initial key addition.
- While the core is busy, its input is the round result.

The cores do not store keys. They output `rk_idx_o`, the index of the round
key they need in the current cycle, and expect that key on `round_key_i` in
the same cycle.

**Encryption** (`aes_encrypt`), round key 0 at start, then round `r` = 1..10:

```
state <- ShiftRows(SubBytes(state)) -> [MixColumns, rounds 1..9 only] -> XOR rk[r]
```

**Decryption** (`aes_decrypt`) is the straightforward inverse cipher. It
starts with round key 10, then runs step `r` = 1..10 with key `k = 10 - r`:

```
state <- InvSubBytes(InvShiftRows(state)) -> XOR rk[k] -> [InvMixColumns, unless k = 0]
```

Here InvMixColumns comes *after* the key addition, and the keys are used in
reverse order. This reverse order is why the unit computes and stores the
whole key schedule before a core starts. The equivalent inverse cipher, with
transformed round keys, is not used.

Each core takes 11 cycles per block, counting the start cycle. `ready`
rises after the 10th rising edge following the edge that samples `start`.
A new `start` may be given in the same cycle that `ready` is seen. A `start`
while `busy` is ignored.

## Key expansion and the round-key store

`aes_key_expansion` produces one full round key per clock from the previous
one:

```
w0' = w0 ^ SubWord(RotWord(w3)) ^ {Rcon, 00, 00, 00}
w1' = w1 ^ w0'     w2' = w2 ^ w1'     w3' = w3 ^ w2'
```

- `RotWord` rotates a word left by one byte.
- `SubWord` applies the S-box to each of its 4 bytes.
- `Rcon` starts at `01` and is passed through `xtime` after each round, giving
  `01 02 04 08 10 20 40 80 1b 36`.

The 11 keys go into a register file of 11 x 128 bits, index 0 being the
cipher key. The file has one combinational read port. After a start pulse,
`busy` is high for 10 cycles and then `keys_valid` rises. A second start
during an expansion restarts it with the new key.

## The top level, `aes_top`

```
                +-------------------+  rd_idx (mux by mode)
 key_i -------->| aes_key_expansion |<------------------------+
                |  11 x 128 store   |--- rd_key ---+          |
                +-------------------+              v          |
 data_i --> [data reg] --+--> aes_encrypt ---------+--> rk_idx |
                         +--> aes_decrypt ---------+--> rk_idx-+
                                   |  data_o mux by mode
                                   v
                                data_o, ready_o
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i` | in | 1 | clock, rising edge |
| `rst_ni` | in | 1 | synchronous reset, active low |
| `start_i` | in | 1 | one-cycle pulse; `mode_i`, `key_i` and `data_i` are sampled with it |
| `mode_i` | in | 1 | `aes_pkg::mode_t`: `MODE_ENCRYPT` (0) or `MODE_DECRYPT` (1) |
| `key_i` | in | 128 | cipher key |
| `data_i` | in | 128 | plaintext (encrypt) or ciphertext (decrypt) |
| `data_o` | out | 128 | result; valid while `ready_o` is high, held until the next start |
| `busy_o` | out | 1 | a request is in progress; `start_i` is ignored |
| `ready_o` | out | 1 | result valid |

A small state machine sequences each request:
1. IDLE. The unit latches the mode and the block and starts the key
   expansion.
2. EXPAND. This takes 10 cycles. When the keys are valid, the unit starts
   the selected core.
3. RUN. This takes 11 cycles. Then `ready_o` rises.

From the edge that samples `start_i` to `ready_o` is 22 rising edges. The
key store's single read port is steered to whichever core is running.
Assertions check that the two cores never run at the same time, and that
neither runs during an expansion.

Things the top does not do, by design:
- The key is re-expanded for every request, even if it has not changed.
  Holding the keys and skipping EXPAND when the same key returns is a simple
  extension that cuts a request to 11 cycles.
- The two cores do not overlap, so the throughput is one block per 23 cycles
  (128/23 bits per clock).
- Only 128-bit keys are supported. AES-192 and AES-256 would need 12 and 14
  rounds and a different key schedule.

## Design choices beyond the algorithm

The following come from the AES algorithm itself:
- the transformations and their order
- the round count of 10, with no MixColumns in the last round
- the key schedule

The `ready` and `data_out` outputs keep the names of the original design.

The following are this implementation's own choices:
- one round per cycle
- computing the S-box tables at elaboration
- one shared AddRoundKey per core
- a precomputed round-key store rather than on-the-fly key generation
- separate encryption and decryption datapaths
- the `start`/`mode`/`busy` handshake
- the synchronous active-low reset

State and key registers hold random values until they are written. Reset
clears only the control state and the state registers.

Synthesis of the top gives:
- about 540 flip-flop bits
- a 1408-bit round-key store (11 x 128)
- 36 S-box ROMs of 256x8: 16 in each core and 4 in the key expansion

On an FPGA these map to block RAM or LUTs. No timing or area figures were
measured.

## Files

- `rtl/aes_pkg.sv`: types (`block_t`, `byte_t`, `mode_t`, `rk_idx_t`),
  `NR = 10`, GF(2^8) functions and the generated S-box tables.
- `rtl/aes_sub_bytes.sv`, `rtl/aes_inv_sub_bytes.sv`,
  `rtl/aes_shift_rows.sv`, `rtl/aes_inv_shift_rows.sv`,
  `rtl/aes_mix_columns.sv`, `rtl/aes_inv_mix_columns.sv`,
  `rtl/aes_add_round_key.sv`: the round transformations.
- `rtl/aes_key_expansion.sv`: key schedule and round-key store.
- `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv`: iterative cores.
- `rtl/aes_top.sv`: the complete unit.
- `tb/aes_ref_pkg.sv`: reference model used by all testbenches.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

## Verification

`tb/aes_ref_pkg.sv` is a reference model written independently of the RTL:
- Its S-box comes from a brute-force search for each inverse and a bit-level
  affine formula.
- It keeps the state as a `[4][4]` byte array.
- It computes the matrix products with a general GF(2^8) multiplier.

Each testbench checks its module against this model and against fixed
known-answer values (FIPS-197 Appendices B and C.1, plus the ECB vector in
the table above):
- The SubBytes benches cover all 256 byte values in all 16 positions.
- The MixColumns benches cover every single-bit input and random states.
- The sequential benches also check cycle counts (10 for key expansion,
  10 per core, 22 end to end), held outputs, an ignored start while busy,
  back-to-back starts and restarts.
- `tb_aes_top` runs the whole unit in both modes, including encrypt/decrypt
  round trips on random keys. It counts key expansions, encryptions,
  decryptions, mode switches and ignored starts, and fails if any of them
  never happens.

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each also
has a watchdog.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other `tb_*` module. `-Irtl -Itb` lets
Verilator find the submodules by file name. The simulation is two-state:
uninitialised registers start at arbitrary values, which the design
tolerates because every register that is read is either reset or written
before use.

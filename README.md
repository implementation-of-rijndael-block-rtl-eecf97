# Iterative Rijndael (AES) processor: 128, 192 and 256-bit keys

This is a compact AES encryption and decryption core. It keeps one 128-bit
state register and sends it through a single combinational round once per
clock. Round keys are produced next to the rounds ("on the fly"), so no table
of round keys is stored. The same hardware handles all three AES key sizes
(10, 12 or 14 rounds), and the key size is chosen per block at run time.
Encryption and decryption share the front half of the round. The S-box and
its inverse are look-up tables.

The design is aimed at small systems such as mobile devices and smart cards.
It trades throughput for area: one block at a time, one round per cycle.

## Datapath

```
            key ──► aes_key_sched ──► round_key ─────────────┐
                                                              │
 in_data ──► state_q ──► Add Round Key (initial round) ──┐    │
               ▲                                         │    │
               │   ┌──────────── aes_round ─────────────┐│    │
               └───┤ Substitution / Inv. Substitution    ││    │
                   │ Shift Row / Inv. Shift Row          ││    │
                   │   mode 0: MixColumn → AddRoundKey   │◄───┘
                   │   mode 1: AddRoundKey → InvMixCol.  │
                   │   (final round: no (Inv)MixColumn)  │
                   └─────────────────────────────────────┘
```

`state_q` is loaded from one of three sources:

- `in_data`, when a block is started;
- `state_q ^ round_key`, in the initial round, which is Add Round Key only;
- the output of `aes_round`, in rounds 1 to Nr.

`out_data` is `state_q`.

### Why decryption can share the encryption front end

In textbook AES, a decryption round applies Inverse Shift Rows and then
Inverse Substitution. Both steps work on single bytes: one moves bytes, the
other replaces each byte by itself through a table. So their order does not
change the result. This core applies Inverse Substitution first and then
Inverse Shift Rows. Both modes therefore run Substitution then Shift Row, and
the mode changes only which table and which rotation are used.

After that front end, the two modes take different branches:

| mode | branch | final round |
|------|--------|-------------|
| 0, encrypt | MixColumn, then Add Round Key | MixColumn skipped |
| 1, decrypt | Add Round Key, then Inverse MixColumn | Inverse MixColumn skipped |

Decryption keeps Add Round Key ahead of Inverse MixColumn. It can therefore
use the encryption round keys unchanged, in reverse order. No
InvMixColumn-transformed keys are needed.

### Shift Row

The state is four 32-bit rows. Row r holds bytes r, r+4, r+8 and r+12 of the
block, and byte 0 is the first byte on the bus. Rotations (left, in bytes):

| row | encrypt | decrypt |
|-----|---------|---------|
| 0   | 0       | 0       |
| 1   | 1       | 3       |
| 2   | 2       | 2       |
| 3   | 3       | 1       |

Rows 0 and 2 are the same in both modes and are shared. Only rows 1 and 3
need a multiplexer. Here the rotations are plain wiring in front of the state
register.

### S-box and SI-box

Each is a 256-entry ROM (`aes_sbox`, `aes_inv_sbox`). The round uses 16 of
each; `aes_sub_bytes` selects between them by mode. The table contents are
not typed into the source. `aes_pkg` computes them during elaboration from
the definition:

- **S(x):** the multiplicative inverse of x in GF(2^8), with 0 mapped to 0,
  followed by the affine transform. Output bit i is the parity of
  `AFF_ROW[i] & b`, XORed with 0x63.
- **SI(x):** XOR with 0x63, then the inverse matrix `IAFF_ROW`, then the
  multiplicative inverse.

The field polynomial is x^8 + x^4 + x^3 + x + 1. In both matrices, bit j of
row i is the coefficient of input bit b_j, and b_0 is the least significant
bit:

```
AFF_ROW  = F1 E3 C7 8F 1F 3E 7C F8      (b'_i = b_i ^ b_i+4 ^ b_i+5 ^ b_i+6 ^ b_i+7 ^ c_i)
IAFF_ROW = A4 49 92 25 4A 94 29 52      (b_i  = b'_i+2 ^ b'_i+5 ^ b'_i+7, after ^0x63)
```

Synthesis turns each ROM into ordinary logic, or keeps it as a ROM macro.

### MixColumn and Inverse MixColumn

Both are built from `xtime`, which multiplies by 2 in GF(2^8): shift left,
then XOR 0x1B if a bit was carried out. MixColumn uses the coefficients
(02 03 01 01). Inverse MixColumn uses (0E 0B 0D 09), formed from 2a, 4a and 8a.

## On-the-fly key generation

This is the least obvious part of the design.

AES expands the cipher key into words w[0], w[1], … . Round key r is
w[4r..4r+3]. The key length is Nk words (4, 6 or 8). The recurrence is:

```
w[i] = w[i-Nk] ^ F(w[i-1], i)
F(t, i) = SubWord(RotWord(t)) ^ Rcon(i/Nk)   if i mod Nk == 0
        = SubWord(t)                          if Nk == 8 and i mod Nk == 4
        = t                                   otherwise
```

### The sliding window

`aes_key_sched` holds a window of the Nk words starting at the current round
key: w[4r] … w[4r+Nk-1]. The round key is the first four words of the window,
read straight from a register.

A **forward step** computes the four words after the window, using the
recurrence above. It then slides the window by four words, to round r+1.

A **backward step** runs the recurrence the other way:

```
w[i-Nk] = w[i] ^ F(w[i-1], i)
```

It computes the four words before the window, the last one first, and slides
the window back to round r-1. For Nk = 4, the third-to-last of these words
needs one just computed in the same step. The other words come from the old
window.

### Kinds of step

A step makes 4 words, but the key period is Nk words. For 192-bit keys these
are out of phase, so which word gets SubWord moves from step to step. There
are three kinds of step:

- SubWord at word 0;
- SubWord at word 2;
- no SubWord at all.

For 256-bit keys there are two kinds, and SubWord is always at word 0:

- with RotWord and Rcon;
- SubWord only.

For 128-bit keys every step is the same. The window logic handles all of
these from `i mod Nk`.

### Decryption key set-up

Decryption needs the last round key first. Before it starts, the controller
therefore steps the generator forward Nr times, with no data in flight. It
then steps backward once per round. The backward recurrence works even
though, for 192 and 256-bit keys, the window then holds a few words beyond
the end of the key schedule. Those words are computed by the same
recurrence, so stepping back still gives exact keys.

### Cost

The generator holds an 8-word window, which is the 256-bit worst case. It
has four SubWord units for forward steps and four for backward steps. The
round key is a register output, so no key logic lies in the round's critical
path.

## Control and timing

`aes_ctrl` is a four-state machine:

1. **IDLE.** Waits for `start`.
2. **KEY_SETUP.** Decryption only; lasts Nr cycles.
3. **INIT.** The initial Add Round Key.
4. **ROUND.** Runs rounds 1 to Nr, then goes back to IDLE.

The controller steps the key generator in every cycle of INIT and ROUND
except the final round. As a result, the generator never steps past round key
0 or round key Nr.

| key | Nr | encrypt: start → done | decrypt: start → done |
|-----|----|-----------------------|-----------------------|
| 128 | 10 | 12 cycles             | 22 cycles             |
| 192 | 12 | 14 cycles             | 26 cycles             |
| 256 | 14 | 16 cycles             | 30 cycles             |

Latency is counted from the clock edge that samples `start` to the edge that
raises `done`. Encryption takes Nr + 2 cycles and decryption 2·Nr + 2. Each
block is independent: every start reloads the key.

## Interface (`rijndael_core`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| start | in | 1 | start a block. Sampled only while `busy` is low and ignored while busy. |
| decrypt | in | 1 | 0 encrypt, 1 decrypt |
| key_len | in | 2 | `aes_pkg::key_len_e`: 0 = 128, 1 = 192, 2 = 256 bits |
| key | in | 256 | cipher key, left aligned (a 128-bit key goes in bits 255:128) |
| in_data | in | 128 | plaintext or ciphertext block, first byte in bits 127:120 |
| busy | out | 1 | operation in progress |
| done | out | 1 | one-cycle pulse: `out_data` holds the result |
| out_data | out | 128 | result. Held until the next start. |

`key`, `in_data`, `decrypt` and `key_len` are sampled only on the `start`
cycle. The core has no parameters: the three key sizes are all built in.

Two assertions in the core check its own sequencing:

- the key index used by each round (r when encrypting, Nr − r when
  decrypting);
- the round number at the final round.

The controller also asserts that the key generator is never asked to step
both ways in the same cycle.

## Design choices worth knowing

- **Throughput.** The core does one round per clock. The critical path is
  S-box ROM → MixColumn or Inverse MixColumn → XOR.
- **Decryption cost.** Decryption costs Nr extra cycles per block for the key
  set-up. A variant could keep the final window of an encryption, or of a
  previous decryption with the same key, and skip that pass. This core does
  not.
- **Initial round.** The input block is first captured in `state_q`. The
  initial Add Round Key follows in the next cycle, so `key` and `in_data` need
  to be valid only on the start cycle.
- **S-box tables.** The round S-boxes and the key-generator S-boxes are
  separate copies of the same table. They are not time-shared.
- **Key sizes.** One core serves all three key sizes. A build for 128-bit
  keys only would drop the upper half of the key window and the 192/256-bit
  step logic.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- compares the module against `aes_ref_pkg`, an independent behavioural AES
  model;
- prints `TB_RESULT checks=N failures=M`.

`aes_ref_pkg` differs from the RTL on purpose:

- its S-box comes from a brute-force inverse search;
- its SI-box comes from inverting the S-box;
- its key expansion is the full textbook loop;
- its decryption is the textbook inverse cipher order.

What each testbench covers:

| testbench | checks |
|-----------|--------|
| `tb_aes_sbox`, `tb_aes_inv_sbox` | all 256 entries, published values, bijectivity |
| `tb_aes_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_mix_columns`, `tb_aes_inv_mix_columns`, `tb_aes_add_round_key` | published FIPS-197 intermediate values, random states, round trips |
| `tb_aes_round` | all four mode / final-round combinations; FIPS-197 Appendix B rounds 1 and 10 |
| `tb_aes_key_sched` | every round key, forward and backward, for all three key sizes (FIPS keys and random keys) |
| `tb_aes_ctrl` | cycle counts and strobe counts for each mode and key size; no key step in the final round; `start` ignored while busy |
| `tb_rijndael_core` | end to end, described below |

`tb_rijndael_core` runs end to end at the core's only configuration:

- the FIPS-197 Appendix B and C.1–C.3 vectors, in both directions;
- 180 random operations against the model, including round trips;
- the latency of every operation;
- `out_data` staying stable after `done`.

It also counts how often each mechanism was exercised, and fails if one never
was:

- each mode and each key size;
- the decryption key set-up;
- the final-round bypass;
- the three 192-bit step kinds and the two 256-bit step kinds;
- ignored start requests.

Everything runs in well under a second.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_rijndael_core.sv \
    --top-module tb_rijndael_core
./obj_dir/Vtb_rijndael_core
```

To test another block, replace `tb_rijndael_core` with that block's
testbench. `verilator --lint-only -Wall -Irtl rtl/aes_pkg.sv rtl/<module>.sv`
lints one module.

Two lint warnings are expected and harmless:

- the ascending byte range of `state_t` (`[0:15]`). It is deliberate: byte 0
  is the first byte of the block.
- the reset used both asynchronously and in the assertions' `disable iff`.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | types (`state_t`, `key_len_e`), round counts, GF(2^8) helpers, S-box/SI-box table generation |
| `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv` | S-box and SI-box look-up tables |
| `rtl/aes_sub_bytes.sv` | 16 S-boxes + 16 SI-boxes, mode select |
| `rtl/aes_shift_rows.sv` | Shift Row / Inverse Shift Row |
| `rtl/aes_mix_columns.sv`, `rtl/aes_inv_mix_columns.sv` | MixColumn and its inverse |
| `rtl/aes_add_round_key.sv` | 128-bit XOR |
| `rtl/aes_round.sv` | one full round, both modes, final-round bypass |
| `rtl/aes_key_sched.sv` | on-the-fly forward/backward round key generator |
| `rtl/aes_ctrl.sv` | sequencer |
| `rtl/rijndael_core.sv` | top level |
| `tb/aes_ref_pkg.sv` | behavioural reference model |
| `tb/tb_*.sv` | testbenches |

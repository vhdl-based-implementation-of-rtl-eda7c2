# AES-128 encryption and decryption core, one round per clock

This core encrypts and decrypts 128-bit blocks with the Advanced Encryption
Standard (AES, the Rijndael cipher) under a 128-bit key. It is built the
way a textbook describes AES. The block is a 4x4 matrix of bytes called
the *state*. It is first XORed with the key. It then goes through ten
rounds of four transformations: Sub bytes, Shift row, Mix columns and Add
round key. The last round leaves out Mix columns. Decryption runs the
inverse transformations in reverse order.

The hardware is iterative. One register holds the state, and one round of
combinational logic is applied to it per clock. A small control unit with
a round counter sequences each direction. An encryption or decryption
therefore takes 11 clocks. A shared key schedule stores all eleven round
keys, so a key is expanded once and then serves any number of blocks in
either direction.

## Byte order: the one thing to get right

The design packs the state into its 128-bit ports **row by row**:

```
bits 127:96  = row 0 = S(0,0) S(0,1) S(0,2) S(0,3)
bits  95:64  = row 1 = S(1,0) ...
bits  63:32  = row 2
bits  31:0   = row 3        byte (r,c) = bits [127-8*(4r+c) -: 8]
```

FIPS-197 packs a block **column by column**: input byte i goes to row
i mod 4, column i/4. The two orders are transposes of each other. The
same row-major order applies to the key port as well. To use a FIPS-197
vector, transpose the 4x4 byte matrix of the plain text and of the key
before applying them, and transpose the result.

The core then computes ordinary AES. For example, FIPS-197 appendix C.1
becomes:

| | FIPS-197 order | as applied to this core |
|---|---|---|
| key | `000102030405060708090a0b0c0d0e0f` | `0004080c_0105090d_02060a0e_03070b0f` |
| plain text | `00112233445566778899aabbccddeeff` | `004488cc_115599dd_2266aaee_3377bbff` |
| cipher text | `69c4e0d86a7b0430d8cdb78070b4c55a` | `696ad870_c47bcdb4_e004b7c5_d830805a` |

The row-major order comes from the example values the design was
specified with. They are reproduced by the unit testbenches. For input
`ffeeddcc_bbaa9988_77665544_33221100`:

| transformation | result |
|---|---|
| Sub bytes | `1628c14b_eaaceec4_f533fc1b_c3938263` |
| Shift row | `ffeeddcc_aa9988bb_55447766_00332211` (row r rotated left by r bytes) |
| Mix columns | `77665544_38291a0b_ffeeddcc_b0a19283` |
| Add round key, key `55ee76cc_bbaa9988_33665544_33221100` | `aa00ab00_00000000_44000000_00000000` |

A different byte order would change the Shift row and Mix columns results.
If you need FIPS order at the pins, put a transposing wire swap in front of
`data_in`, `key` and behind `data_out` in a wrapper. Nothing inside needs
to change.

## Structure

```
aes_top
├── aes_key_expansion      key schedule: 44 x 32-bit words, 2 read ports
│   └── aes_sbox x4        SubWord
├── aes_cipher             encryption unit
│   ├── aes_cipher_control     IDLE/RUN machine + round counter
│   └── aes_cipher_datapath    state register + one round
│       ├── aes_add_round_key      initial XOR
│       ├── aes_shift_rows → aes_sub_bytes (16 x aes_sbox) → aes_mix_columns
│       └── aes_add_round_key      round key XOR
└── aes_decipher           decryption unit
    ├── aes_decipher_control
    └── aes_decipher_datapath
        ├── aes_add_round_key      initial XOR
        ├── aes_inv_shift_rows → aes_inv_sub_bytes (16 x aes_inv_sbox)
        ├── aes_add_round_key → aes_inv_mix_columns
```

`aes_pkg` holds the shared types (`state_t`, `word_t`, `byte_t`), the
byte accessor `get_b(state, r, c)` and the GF(2^8) arithmetic.

### Encryption round

At the start cycle the state register loads `data_in ^ roundkey[0]` (the
initial round). Each of the next NR clocks loads

```
AddRoundKey(MixColumns(SubBytes(ShiftRows(state))), roundkey[k])     k = 1 .. NR-1
AddRoundKey(SubBytes(ShiftRows(state)), roundkey[NR])                k = NR (last)
```

Shift row sits ahead of Sub bytes. The two commute because Sub bytes acts
on each byte alone. The control unit's `last` output bypasses Mix columns
in round NR.

### Decryption round

The start cycle loads `data_in ^ roundkey[NR]`. Round k (k = 1..NR) then
loads

```
InvMixColumns(AddRoundKey(InvSubBytes(InvShiftRows(state)), roundkey[NR-k]))
```

In round NR, InvMixColumns is bypassed. This is the straightforward
inverse cipher: each encryption step is undone in reverse order. It is not
the "equivalent inverse cipher" of FIPS-197, so the round keys are used
unchanged, only in reverse order.

### Key schedule

`aes_key_expansion` keeps the expanded key as a linear array of
NB*(NR+1) = 44 32-bit words. Word c of the key is column c of the key
matrix, which is `{key(0,c), key(1,c), key(2,c), key(3,c)}` in the
row-major port order. Each clock produces the four words of the next
round key by the usual rule:

```
w[i] = w[i-4] ^ SubWord(RotWord(w[i-1])) ^ {Rcon, 24'h0}     i mod 4 = 0
w[i] = w[i-4] ^ w[i-1]                                       otherwise
Rcon = 01, 02, 04, ... (doubled in GF(2^8) every round)
```

Four S-boxes are used for this. Two asynchronous read ports, one per
unit, return round key k already rearranged into the state's row-major
order, so it can be XORed straight onto the state.

### S-boxes

The S-box and its inverse are 256 x 8 constant tables. They are not typed
in. They are filled at elaboration by a constant function in `aes_pkg`:
the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (computed as
a^254, with 0 mapping to 0), followed by the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 63h`. The inverse
S-box applies the inverse affine map (`rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^
05h`), then the GF inverse. Synthesis sees 16 ROMs per data path plus four
in the key schedule.

## Interface and timing (`aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `reset` | in | 1 | synchronous, active high; clears state registers, `key_ready`, `busy` |
| `key_load` | in | 1 | one-cycle pulse: expand `key` |
| `key` | in | 128 | cipher key, row-major |
| `key_ready` | out | 1 | round keys valid |
| `start` | in | 1 | one-cycle pulse: start an operation on `data_in` |
| `decrypt` | in | 1 | sampled with `start`: 0 encrypt, 1 decrypt |
| `data_in` | in | 128 | block, row-major; sampled only in the start cycle |
| `data_out` | out | 128 | result, held until the next accepted start |
| `busy` | out | 1 | an operation is running |
| `done` | out | 1 | one-cycle pulse when `data_out` is valid |

* `key_ready` falls in the cycle after `key_load` is sampled. It rises
  again NR+1 = 11 rising edges after that edge.
* `done` is high 11 edges after the edge that sampled `start`. A new
  `start` can be given in the cycle `done` is high. One block per 11 clocks
  is the throughput.
* While `busy` is high, `start` and `key_load` are ignored. A key change
  under a running block would corrupt it. `start` is also ignored while
  `key_ready` is low.
* Only one operation runs at a time. `data_out` comes from whichever unit
  ran last.

The sub-units `aes_cipher` and `aes_decipher` have the same start/done/busy
handshake. They take their round keys through `rk_idx`/`rk`, so they can
also be used with a key store of your own.

## Parameter

`NR` (default 10) is the number of rounds. The key schedule holds
4*(NR+1) words and the counter runs to NR. Ten is AES-128. The design
was also described at one point with a 7-round count. Building with
`NR = 7` gives that reduced-round cipher; the testbenches check it against
a 7-round reference model. Only 10 is AES, and only 10 and 7 are
tested.

## What is specified and what is chosen here

These points come from the original specification of the design: the
transformations and their order, ten rounds with no Mix columns in the
last round, the 128-bit block and key, the key schedule as a linear array
of Nb(Nr+1) 4-byte words, separate data path and control unit for cipher
and decipher joined structurally, an active-high reset, and the example
values above.

These are this implementation's own choices:

* the start/done/busy handshake, which replaces a level `enable`;
* the synchronous reset;
* one round per clock and one round key per clock in the key expansion;
* the shared key store with two read ports, and the lock-out rules in
  `aes_top`;
* computing the S-box tables from their definition;
* the structure of the decryption rounds, which the specification only
  names as the reverse of encryption;
* the inverse Mix columns matrix (`0e 0b 0d 09`).

Not built: the specification mentions saving area by reordering Sub bytes
and Shift row and "calculating 4 bytes of data" at a time. That suggests a
narrower S-box path, but it is not described well enough to build. Here
the reordering is kept (Shift row comes first) and all 16 bytes are
substituted in one clock. The design is not tied to any FPGA family.

## Size

Coarse synthesis with yosys at NR = 10 gives about 860 word-level cells
and 283 flip-flop bits for the whole core. There are 37 memories: 36
S-box ROMs of 2048 bits each, plus the 1408-bit key word array, which is
counted as memory.

## Verification

Each module has a self-checking testbench in `tb/` named `<module>_tb`.
Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog. The reference model `tb/aes_ref_pkg.sv` is written
independently of the RTL. It computes GF products by carry-less
multiplication with explicit reduction, inverses by exhaustive search, and
the full cipher in FIPS-197 order with `transpose()` at the boundary.

| testbench | what it checks |
|---|---|
| `aes_sbox_tb`, `aes_inv_sbox_tb` | all 256 entries, e.g. S(53h) = edh |
| `aes_sub_bytes_tb` … `aes_add_round_key_tb` | the example values above, plus 300 random states each |
| `aes_key_expansion_tb` | FIPS-197 A.1 round keys 1 and 10, all round keys on both ports, `ready` timing, restart mid-expansion |
| `aes_cipher_control_tb`, `aes_decipher_control_tb` | round key index order, `last`, `done` timing, ignored starts |
| `aes_cipher_datapath_tb`, `aes_decipher_datapath_tb` | the state after every round against the reference |
| `aes_cipher_tb`, `aes_decipher_tb` | FIPS-197 B and C.1, random blocks, latency, with NR = 10 and 7 |
| `aes_top_tb` | end to end at default parameters (see below) |

`aes_top_tb` loads 10 keys and runs 34 encryptions and 34 decryptions,
including FIPS-197 B and C.1 in both directions and round trips through
the core. It checks every latency. It also counts each special case and
fails if one never occurred: key change, start while busy, start while
the key is being expanded, and key load while busy.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes_top_tb.sv --top-module aes_top_tb
./obj_dir/Vaes_top_tb
```

Replace `aes_top_tb` with any other testbench name. Each one finishes in
well under a second.

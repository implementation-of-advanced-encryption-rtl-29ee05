# AES-128 / AES-256 engine for FPGAs, encryption and decryption side by side

This is a compact, iterative AES (Rijndael, 128-bit block) engine. One key
schedule feeds two separate round datapaths: one encrypts, one decrypts. Each
datapath keeps one 128-bit state register and spends two clock cycles per
round. In the first cycle, SubBytes and ShiftRows run as a single fused
stage. In the second, MixColumns and AddRoundKey run together. The key
schedule writes all round keys into a small key store at the start of an
operation, one key per cycle.

The same RTL builds AES-128 (10 rounds) or AES-256 (14 rounds). A single
parameter, `KEY_BITS`, selects which, and 256 is the default. A board-level
wrapper for a Zynq-7000 (Zedboard) runs one NIST test vector after power-up
and shows the result on the eight user LEDs.

## Why encryption and decryption finish at different times

The whole design is built around one fact. Encryption uses round keys in the
order they are generated (k0, k1, …, kNr). Decryption uses them in reverse,
starting with kNr, and kNr is the last key the schedule produces.

* **Encryption** starts in the same cycle as the key schedule. The schedule
  makes one key per cycle and a round takes two cycles, so the key a round
  needs is always already in the store. An assertion in `aes_core` checks
  this.
* **Decryption** cannot start until kNr exists. It starts in the cycle the
  schedule produces kNr. That key goes straight to the decryption datapath
  through a bypass, so no cycle is lost writing it and reading it back.

All latencies are counted in clock edges after the edge that samples `start`:

| | AES-128 | AES-256 |
|---|---|---|
| round keys generated (`keys_ready`) | 10 (k1..k10) | 13 (k2..k14) |
| encryption (`enc_done`) = 2·Nr − 1 | 19 | 27 |
| decryption (`dec_done`) = key schedule + 2·Nr − 1 | 29 | 40 |

The encryption schedule, edge by edge (Nr = 10):

```
edge 0        state <= plaintext ^ k0                 (initial AddRoundKey, at load)
edge 2r-1     state <= ShiftRows(SubBytes(state))     r = 1..Nr-1
edge 2r       state <= MixColumns(state) ^ k_r
edge 2Nr-1    state <= ShiftRows(SubBytes(state)) ^ k_Nr   -> enc_done (edge 19)
```

Decryption does the same in mirror image. It is loaded with
`ciphertext ^ k_Nr` at edge D, which is edge 10 or 13. Then each inverse
round takes two edges: first `InvSubBytes(InvShiftRows(state))`, then
`InvMixColumns(state ^ k_r)`. The last inverse round adds k0 without
InvMixColumns, and `dec_done` rises at edge D + 2·Nr − 1. The AES-256 key
has two round keys' worth of material (k0 and k1), so its schedule
generates 13 keys, not 14.

## State layout

A block is a 128-bit vector with its first byte in bits [127:120]. Byte *n*
is state element s[n mod 4][n div 4]. The state is therefore stored column by
column, and each 32-bit slice `[127-32c -: 32]` is column *c*. ShiftRows
rotates row *r* left by *r*, which is only wiring. `aes_sub_shift` uses this:
it feeds S-box (r, c) from input byte s[r][(c+r) mod 4], so the "shift" costs
no logic. `aes_inv_sub_shift` takes s[r][(c−r) mod 4] through inverse S-boxes.
All sixteen byte lanes are unrolled with generate loops, so a whole round
step finishes in one cycle.

## Key schedule (`aes_key_expansion`)

A window register holds the newest Nk words of the expanded key (Nk = 4 or 8).
Each cycle it produces four words w[i..i+3], with i = 4·idx:

* the first word gets `SubWord(RotWord(w[i-1])) ^ Rcon` when i is a multiple
  of Nk;
* for AES-256 only, it gets `SubWord(w[i-1])` with no rotate and no Rcon when
  i mod 8 = 4, that is, for odd round keys;
* every other word is the XOR chain `w[i+k] = w[i+k-Nk] ^ w[i+k-1]`.

The window then drops its oldest four words. Four S-boxes do the SubWord. The
Rcon values 01, 02, 04, …, 80, 1B, 36 are a table in `aes_pkg`. AES-256 uses
only the first seven.

The round keys that are just the cipher key (k0, and k1 for AES-256) never pass
through the schedule. `aes_round_key_ram` loads them on its `load` port in the
start cycle.

## Blocks

| module | what it is |
|---|---|
| `aes_pkg` | types, S-box and inverse S-box tables, Rcon, `xtime`, phase enums |
| `aes_sbox`, `aes_inv_sbox` | one-byte ROM lookups |
| `aes_sub_shift`, `aes_inv_sub_shift` | 16 S-boxes with (Inv)ShiftRows folded into the wiring |
| `aes_mix_columns`, `aes_inv_mix_columns` | column × [02 03 01 01] / [0E 0B 0D 09] in GF(2⁸), built from `xtime` |
| `aes_add_round_key` | 128-bit XOR |
| `aes_key_expansion` | one round key per cycle, as above |
| `aes_round_key_ram` | Nr+1 × 128-bit register array, load + write port, two combinational read ports |
| `aes_encrypt`, `aes_decrypt` | the two iterative datapaths (state register, round counter, 3-state phase) |
| `aes_core` | key schedule + key store + both datapaths |
| `aes_zedboard_top` | board wrapper: power-up sequence, fixed test vector, LEDs |

### `aes_core` interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: captures `key`, `pt_in`, `ct_in` and begins |
| `key` | in | KEY_BITS | cipher key, first byte in the MSBs |
| `pt_in` / `ct_in` | in | 128 | block to encrypt / block to decrypt |
| `ct_out`, `enc_done` | out | 128, 1 | ciphertext; valid while `enc_done` is high |
| `pt_out`, `dec_done` | out | 128, 1 | plaintext; valid while `dec_done` is high |
| `keys_ready` | out | 1 | all round keys are in the store |

The inputs only need to be valid during the `start` cycle. The done flags
drop at the next `start` and stay high until then. A `start` during an
operation abandons it and begins a new one. Each operation handles one
block, so a new key costs a new schedule. The design has no key caching
across blocks.

### Board wrapper (`aes_zedboard_top`)

The ports are `clk` (the 100 MHz board clock) and `led[7:0]`, which is nine
I/Os. There is no reset pin. A 4-bit counter gets its value from the FPGA
configuration. It holds the core in reset for 8 cycles and then gives one
`start` pulse, 14 cycles after configuration. The core encrypts NIST SP
800-38A ECB block 1 (plaintext `6bc1bee2…`) and decrypts that block's known
ciphertext under the same key. When both are done,
`led = {ciphertext[127:124], plaintext[127:124]}`:

* `0xF6` for AES-256 (ciphertext `f3eed1bd…`);
* `0x36` for AES-128 (ciphertext `3ad77bb4…`).

The LEDs are 0 before that.

## Where this RTL makes its own choices

These points come from this implementation, not from the design it
reproduces:

* **Reset and handshake.** Reset is synchronous and active low. `start` is a
  pulse and the done flags are sticky. The board wrapper makes its reset
  from a configuration-initialised register. Simulators must honour the
  declaration initialiser, which Verilator does.
* **AddRoundKey placement.** AddRoundKey shares the MixColumns cycle. In the
  final round it shares the SubBytes/ShiftRows cycle. This is what makes the
  latencies 2·Nr − 1.
* **Forwarding kNr to decryption.** Forwarding kNr in the cycle it is
  generated lets decryption start exactly when the key schedule ends.
* **Key store.** The key store is a register array with combinational reads.
  The S-boxes are combinational ROMs. On an FPGA they map to LUTs, or to
  distributed ROM; they do not map to block RAM, because block RAM would
  need a registered address and therefore a different cycle split. So the
  resource figures of the original FPGA build are not reproduced: about
  3.9k/4.5k LUTs, 1.7k/1.6k FFs and 70.5 BRAM tiles for AES-128/AES-256 on an
  xc7z020. No timing closure at 100 MHz has been done either.
* **Key sizes.** Only 128- and 256-bit keys are supported. An elaboration
  assertion rejects other values of `KEY_BITS`. AES-192 would need a key
  schedule that produces six words per key step, which is not one round key
  per cycle.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/aes_ref_pkg.sv`, a behavioural AES written from the field arithmetic. It
computes its S-box as the GF(2⁸) inverse followed by the affine map, so it
does not share the RTL's tables.

* The S-boxes are checked exhaustively, all 256 entries.
* The round steps are checked against the first round of the standard
  worked example and 500 random states each.
* The key schedule is checked key by key, with its timing, for 128- and
  256-bit keys.
* Both datapaths are checked round by round and for exact latency.
* `tb_aes_core` runs all four NIST SP 800-38A ECB blocks for both key
  sizes, random keys and blocks, and an interrupted operation. It checks
  the 10/13, 19/27 and 29/40 latencies. It also counts the cycles in which
  encryption overlapped the key schedule and in which decryption waited
  for it.
* `tb_aes_zedboard_top` drives only the clock of the default (AES-256)
  board design and checks the LED value `0xF6`. It also checks the full
  ciphertext and plaintext, and every latency. `tb_aes_zedboard_top_128`
  does the same for the AES-128 build (`0x36`).

Running one testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
    tb/tb_aes_core.sv -y rtl -y tb --top-module tb_aes_core -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second. To lint the synthesizable
part, run `verilator --lint-only -Wall rtl/aes_pkg.sv rtl/aes_zedboard_top.sv -y rtl`.
Lint reports only style notices: signals left unused because the LEDs
use just the top nibble of each result, unused package constants, and the
configuration-initialised power-up counter.

# AES-128 single-round engine with block-RAM S-boxes

This is an AES-128 encryption and decryption engine (128-bit blocks,
128-bit key, 10 rounds) built around one hardware round that the data passes
through ten times. It follows a published FPGA architecture for Xilinx Virtex
parts. That architecture rests on three ideas:

- **One datapath for both directions.** The forward and inverse rounds use
  the same four steps, so one set of units serves both modes, steered by
  multiplexers. Each unit has a mode input where the two directions differ.
- **S-boxes in block RAM.** Each of the 16 bytes has its own 8x512 ROM. The
  ROM holds the encryption S-box in its lower half and the decryption S-box
  in its upper half. The ROM read is registered, so the 16 ROMs are also the
  register that closes the round loop.
- **A pipelined MixColumn, used to interleave blocks.** The inverse
  MixColumn is the slowest part of the loop, so 1 to 3 registers are placed
  in the MixColumn unit. A pass through the round then takes several
  cycles. Several independent blocks (ECB mode) share the loop, one per
  register stage, so the engine still finishes one block every 10 cycles.

The key schedule computes the eleven round keys once. They are stored as
eleven 128-bit words, and the core reads them in ascending order to encrypt
and in descending order to decrypt.

## The round loop (`aes_core`)

```
 in_block ─> XOR K(pre) ─┐ round_sel
                         ├──> BYTE_SUB ──> SHIFT_ROW ──┬─────────────> XOR K(post) ──┐
 loop-back ──────────────┘    16 x sbox_rom             │                             │
        ^                     (registered)              └──> MIX_COLUMN ──────────────┘
        └──────────────────────── round_out  <──────  (1..3 registers, bypassable)
```

The pre-addition happens only as a block enters the loop. It uses K0 to
encrypt and K10 to decrypt. After that, each pass through the loop does one
round. The order of the steps depends on the mode:

| pass r (1..10) | encryption                          | decryption                                   |
|----------------|-------------------------------------|----------------------------------------------|
| S-box ROMs     | S-box                               | inverse S-box                                |
| SHIFT_ROW      | rotate row i left by i              | rotate row i right by i                      |
| then           | MixColumn (skipped when r = 10)     | XOR K(10-r)                                  |
| then           | XOR K(r)                            | inverse MixColumn (skipped when r = 10)      |

In decryption the inverse MixColumn sits *after* the key addition. It
belongs to the next round of the standard inverse cipher, which is why
decryption skips MixColumn in its first round. Placing it at the end of a
pass gives the same result, and both modes then skip MixColumn on pass 10.
The post-addition uses K1..K10 to encrypt and K9..K0 to decrypt. BYTE_SUB
and SHIFT_ROW commute, so their order is free. SHIFT_ROW is pure wiring plus
a forward/inverse multiplexer.

Only one 128-bit XOR array does the post-addition. Multiplexers place it
after MIX_COLUMN for encryption and before it for decryption. So the two
modes use that XOR at different stages of the loop. As a result, all blocks
in the loop must be in the same mode. A block in the other mode waits with
`in_ready` low until the loop is empty. That is a choice made in this RTL.

### Pipelining and interleaving

`IMIX_REGS` chooses where MIX_COLUMN has registers:

| IMIX_REGS | registers in MIX_COLUMN                              | blocks in loop D | latency | rate            |
|-----------|------------------------------------------------------|------------------|---------|-----------------|
| 1         | output                                               | 2                | 20      | 1 block / 10 cy |
| 2         | input, output                                        | 3                | 30      | 1 block / 10 cy |
| 3 (default)| input, between multipliers and XOR trees, output    | 4                | 40      | 1 block / 10 cy |

There are D = 1 + IMIX_REGS register stages in the loop: the S-box ROMs plus
the MixColumn registers. Each stage holds one block. A small tag travels
with each block, one stage at a time, and records whether the stage holds a
block and which round that block is in. The tag sets the round key index
and the MixColumn bypass. The MixColumn registers also carry the mode and
the bypass flag, so each block is processed with its own settings.

A block enters when the stage reaching the loop entry is empty or holds a
block that is just finishing. So when one block leaves, the next can enter
in the same cycle. With a steady input stream, block n+D enters exactly
10·D cycles after block n, which gives one block per 10 cycles.

The original design reports 10 cycles per block for all three register
variants. This RTL takes that figure to mean D blocks interleaved in ECB
mode, as described above. The figure cannot be met with one block in
flight once MixColumn has registers.

### MixColumn (`mix_column`, `mul_byte`)

Each byte goes through one Multiply-Byte unit (`mul_byte`). The unit forms
b·1, b·x, b·x² and b·x³ by shift-and-reduce: shift left, AND the bit shifted
out with 0x1B, then XOR. It XORs these into the four coefficient products:
{02,03,01,01} for the forward transform and {0E,0B,0D,09} for the inverse.
The reduction polynomial is x⁸+x⁴+x³+x+1. A multiplexer picks the
coefficient set. For each output byte, an XOR tree combines the matching
products of the four bytes in its column. Output byte (r,c) takes the
product of byte (j,c) with coefficient (j−r) mod 4. When `en` is low, the
block passes through unchanged.

## Key scheduling (`key_sched`, `key_mem`)

The key schedule does not read back from the key memory. It keeps two
quad-word registers: the previous round key and the current one being built.
A round key is built one 32-bit word per cycle:

| cycle | action                                                        |
|-------|---------------------------------------------------------------|
| SUB   | S-box ROMs look up RotWord(prev.w3) (4 byte lookups)           |
| W0    | w0 = prev.w0 ^ SubWord ^ {Rcon,0,0,0}                          |
| W1    | w1 = prev.w1 ^ w0                                              |
| W2    | w2 = prev.w2 ^ w1                                              |
| W3    | w3 = prev.w3 ^ w2; write {w0..w3} to key_mem; prev ← it; Rcon·x|

The cycle that takes `start` writes the user key as K0. The full expansion
therefore takes 1 + 10·5 = **51 cycles**. `keys_valid` rises after the 51st
clock edge, counting the edge that takes `start`.

`key_mem` holds 11 × 128 bits as distributed (LUT) RAM. It has one
synchronous write port and two asynchronous read ports, one for the pre-key
and one for the post-key. Addresses 11 to 15 read as zero.

## S-box tables (`sbox_rom`, `aes_pkg`)

The S-box contents are not stored in a data file. They are computed at
elaboration by `aes_pkg::sbox_table()` from the definition:

- The forward S-box is S(a) = A(a⁻¹). Here a⁻¹ is the inverse in GF(2⁸)
  modulo 0x11B, computed as a²⁵⁴, with 0 mapped to 0.
- A(b) = b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 0x63.
- Entries 0–255 hold S, and entries 256–511 hold S⁻¹.

Synthesis turns the table into a 4-Kbit ROM per instance. The core uses 16
instances. The key schedule uses 4 more, which read only the forward half.

## Top level and interface (`aes_top`)

| port              | dir | width | meaning |
|-------------------|-----|-------|---------|
| `clk`, `rst_n`    | in  | 1     | clock; synchronous active-low reset of the control state |
| `key_start`       | in  | 1     | load `user_key`; taken when `key_start_ready` is high |
| `user_key`        | in  | 128   | key, byte 0 = bits 127:120; must be valid only in the cycle it is taken |
| `key_start_ready` | out | 1     | core empty and no expansion running |
| `keys_valid`      | out | 1     | K0..K10 written; low from a key load until its end |
| `in_valid`/`in_ready` | in/out | 1 | block handshake; the block is taken when both are high |
| `in_mode`         | in  | 1     | 0 encrypt, 1 decrypt |
| `in_block`        | in  | 128   | plaintext or ciphertext (AES byte order) |
| `out_valid`       | out | 1     | result valid for this cycle only |
| `out_mode`, `out_block` | out | 1, 128 | mode and result |

The handshakes and their rules were chosen for this RTL:

- `in_ready` is low while keys are not valid, while the stage at the loop
  entry holds a block that still has rounds to go, and while a mode change
  waits for the loop to drain.
- A new key is taken only when the core is empty. So blocks in flight never
  see a key set that is half written.
- A block that has been offered must stay on the inputs until it is taken.
  An assertion in `aes_core` checks this.
- Results come out in the order the blocks went in. Each result comes
  exactly 10·(1+IMIX_REGS) cycles after its block was taken.
- The output has no back-pressure. The receiver must take each result in
  the cycle it appears.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Expected values come from `tb/aes_ref_pkg.sv`. This is a separate
behavioural AES model. It finds S-box inverses by exhaustive search and uses
generic GF(2⁸) matrix products, so it shares no code with the RTL.

| testbench          | what it covers |
|--------------------|----------------|
| `tb_sbox_rom`      | all 512 entries; registered read |
| `tb_byte_sub`      | random blocks, both modes, 1-cycle latency |
| `tb_shift_row`     | fixed vector from the standard, random blocks, inverse∘forward = identity |
| `tb_mul_byte`      | all 256 bytes × both coefficient sets |
| `tb_mix_column`    | IMIX_REGS = 1, 2, 3 side by side; per-cycle random mode and bypass; exact latency |
| `tb_add_round_key` | fixed and random vectors |
| `tb_key_mem`       | both read ports, overwrites, out-of-range reads |
| `tb_key_sched`     | 8 keys, including the standard's example (K10 = d014f9a8…); each key written once, K_i in cycle 5·i, 51 cycles in all |
| `tb_aes_core`      | standard vectors, 40-cycle latency, 10 cycles per block in a stream, mode switch, stalls, random traffic |
| `tb_aes_top`       | full engine at default parameters, end to end; counts every mechanism and fails if one never happens |
| `tb_aes_variants`  | full engine with IMIX_REGS = 1 and 2: stream rate, latency, encrypt/decrypt round trip |

`tb_aes_top` uses the default parameters, so it runs the full-size design.
It checks the known-answer vectors from FIPS-197 (appendices B and C.1). It
runs a stream of 32 encryptions, then decrypts the results and compares
them with the original plaintexts. It also reloads a key while blocks are
in flight and sends about 200 random blocks in mixed modes. It counts these
events:

- key expansions
- encryptions and decryptions
- MixColumn bypass passes
- loop slots refilled in the same cycle they finish
- stalls for a busy slot, for a mode switch and for keys not yet valid
- key reloads held off by a busy core

To run a testbench with plain Verilator (5.x), from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
    tb/aes_ref_pkg.sv rtl/aes_pkg.sv -y rtl -y tb \
    tb/tb_aes_top.sv --top-module tb_aes_top -Mdir obj_top
./obj_top/Vtb_aes_top
```

Replace `tb_aes_top` with any other testbench name. Each testbench runs in
seconds.

## How far it follows the original design

These parts follow the original design:

- the combined datapath, with pre-addition and post-addition
- the order of the round keys in each mode
- the MixColumn bypass rules
- the 8x512 S-box ROMs with both tables, 16 of them in the core
- the Multiply-Byte construction, 16 copies
- the SHIFT_ROW multiplexer
- the three MixColumn register variants
- the 11 × 128 key memory
- key scheduling on a previous-key register and a current-key register,
  5 cycles per key and 51 in all

These are choices made in this RTL, where the original leaves the details
open:

- The S-box ROMs double as the round register, and D blocks are interleaved
  so that 10 cycles per block holds in every variant.
- The internal MixColumn register of the third variant sits between the
  multipliers and the XOR trees.
- A single post-addition XOR serves both modes, which allows only one mode
  in the loop at a time.
- The key memory is built as distributed RAM with two asynchronous read
  ports.
- The key schedule does one S-box lookup cycle and then one key word per
  cycle.
- SubWord uses four single-port ROM instances. The original describes two
  dual-ported block RAMs.
- All handshakes, the reset behaviour and the byte ordering, which follows
  FIPS-197, are this RTL's own.

The original also looks at S-boxes in LUT RAM. That option is not built
here. Any synthesis tool can map the `sbox_rom` table to LUTs if asked.
Clock rates, slice counts and Mbit/s figures depend on the FPGA flow, and
simulation cannot check them.

## Changing the design

- Set `aes_top #(.IMIX_REGS(1|2|3))` to choose a variant. Other values are
  rejected at elaboration. The block rate stays at one per 10 cycles, and
  the latency and the number of blocks in flight change as in the table
  above.
- The rules for accepting blocks are all in `aes_core`, in the signals
  `loop_busy`, `mode_ok` and `in_ready`. Output back-pressure would need a
  global enable on the S-box ROM registers and the MixColumn registers.
- `NR` (10) and the 4-bit key index are in `aes_pkg`. Supporting 192- or
  256-bit keys would need a different key schedule and 13 or 15 key words.

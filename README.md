# Compact masked AES-128 encryption core

This is the RTL of a small AES-128 encryption core meant for smart cards and
other hand-held devices. It has two main ideas:

* **Area.** Only four S-boxes are built. They compute the inverse in the
  composite field GF((2^4)^2), where the only non-trivial operation is a
  16-entry GF(2^4) inversion table. The four S-boxes work on one state column
  per cycle and also serve the key schedule.
* **Side-channel resistance.** Data are masked against first-order
  differential power analysis using the *Transformed Masking Method*. The
  plaintext is XORed with a random mask and stays masked until the
  ciphertext is written. Inside the S-box the additive mask is swapped for a
  multiplicative one around the non-linear inversion and then swapped back.

The architecture follows the paper "An FPGA Implementation of Rijndael:
Trade-offs for Side-Channel Security": the field choice, the S-box
structures, the 4-lane datapath, the controller's phases and the
2 / 9 / 1-cycle budget. Where the paper leaves details open, this RTL makes
its own choices. They are marked as such below and in each file's header.
The design only encrypts. Decryption is not part of it.

## The composite-field S-box (`bytesub`)

The S-box computes `S(a) = A·a⁻¹ + 0x63`, where a⁻¹ is the inverse in
GF(2^8) modulo x⁸+x⁴+x³+x+1 and A is the FIPS-197 affine matrix. Instead of
inverting in GF(2^8), the byte is moved to a tower field:

* GF(2^4) uses Q(y) = y⁴+y+1. An element is 4 bits, and the generator is ω = y = 0010.
* GF((2^4)^2) uses P(x) = x²+x+ω¹⁴ with ω¹⁴ = 1001. An element is a pair
  {a1,a0} standing for a1·x+a0.

The 8×8 GF(2) matrix T (`cf_map`) is the field isomorphism that sends the
AES generator x to {5,9}. Its rows, top row = output bit 7, are
`a0 d2 0c a2 16 74 48 7b` (hex, bit 7 of each row byte = input bit 7).
In the tower field the inverse is

    d  = a0·(a1+a0) + a1²·ω¹⁴
    b1 = a1 · d⁻¹
    b0 = (a1+a0) · d⁻¹

This takes one GF(2^4) table inversion (`gf4_inv`), three multipliers
(`gf4_mul`, Mastrovito form), two nibble adders, one squarer (`gf4_sq`,
2 XORs) and one multiplication by the constant ω¹⁴ (`gf4_mul_w14`, 1 XOR,
because ω¹⁴ = ω⁻¹ is a division by y). The way back, T⁻¹, is merged with the
affine matrix into one matrix A·T⁻¹ (`cf_invmap_affine`), with rows
`4e 70 96 c9 6f 6d d3 8f`, followed by adding 0x63.

## The masked S-box (`bytesub_masked`, `mask_prep`)

Masking by XOR alone does not survive the inversion. The masked S-box
therefore takes `A ^ X` and works as follows:

1. After T it holds `A1+X1` and `A0+X0`, with {X1,X0} = T·X.
2. Each operand of a multiplication is converted to a multiplicative mask
   by a fresh non-zero nibble Y. For example, `(A0+X0)·Y + X0·Y = A0·Y`.
   The same is done for A1 and for A1+A0 (with the precomputed `X1+X0`). The
   squared path uses `A1²ω¹⁴·Y² + X1²ω¹⁴·Y²`.
3. The inversion input is then `Y²·d`, so the table returns `Y⁻²·d⁻¹`.
4. The two output products give `Y⁻¹·b1` and `Y⁻¹·b0`.
5. Adding `X1·Y⁻¹` (or `X0·Y⁻¹`) and multiplying by Y turns these into
   `b1+X1` and `b0+X0`. The inverse now carries the same additive mask as
   its input.
6. Since A·T⁻¹ is linear, the block outputs **`S(A) ^ A·X`**, where A·X
   uses the affine matrix without its constant.

Compared with the plain S-box this costs 12 extra GF(2^4) multipliers and
6 extra nibble adders. No wire carries A, A1 or A0 unmasked.

The operands `X1`, `X0`, `X1+X0`, `X1²ω¹⁴`, `Y`, `Y²` and `Y⁻¹` enter the
S-box as ports. `mask_prep` computes them per lane, together with the
output mask `A·X`. A zero random nibble is replaced by Y = 1, because Y must
be invertible.

A known limit of multiplicative masking applies here. A zero value stays
zero whatever Y is (`0·Y = 0`), so a zero `A0`, `A1+A0` or `d` is not hidden
by Y. The additive masks X1 and X0 still hide it on the nibble wires before
the conversion. This design adds no countermeasure of its own for this case.

## Mask bookkeeping in the core (`aes_core`)

The paper states the principle: mask on entry, keep the data masked and the
mask independent of the data, remove the mask at the end. This core puts it
into practice as follows. All of it is this design's choice.

* When the plaintext is read, 128 fresh random bits X are XORed into the
  state and also stored in a 128-bit **mask register**.
* AddRoundKey does not change the mask.
* ShiftRow and MixColumn are linear, so a second `round_linear` instance
  applies them to the mask register, with a zero key.
* In each ByteSub cycle, a lane's mask byte m enters `mask_prep`, and `A·m`
  is written back to the mask register together with the lane result.
* The ciphertext `state ^ mask` is formed only when the output register is
  written.
* Each lane draws a fresh Y every cycle.
* Key bytes pass through the same masked lanes with their own fresh random
  additive mask, which is removed before the key update. The key register
  itself is not masked.

The random bits come from two 64-bit xorshift generators (`prng`), 128 bits
per cycle. They are simple and **not cryptographically strong**. A real
device should feed `rnd` from a true random number generator. The generators
can be reseeded through `seed_we`/`seed`.

The mask register and the second linear layer roughly double the linear
part of the datapath. Expect the masked build to cost more than a design
that shares one mask across the state. The paper reports an area overhead
below 20 % for its masked FPGA build, but it does not say how it tracks the
mask.

## Round schedule (`aes_ctrl`)

One encryption, counted in clock cycles after the edge that samples `start`:

| phase | cycles | work |
|---|---|---|
| start-up | 2 | read plaintext and key from the input registers (and apply the mask); initial AddRoundKey |
| round 1..10 | 9 each | see below; round 10 skips MixColumn |
| output | 1 | write `state ^ mask` into the output register |

Inside a round (cycle 1..9):

| cycle | S-box lanes | registers |
|---|---|---|
| 1–4 | ByteSub of state column 0–3 into the lane register | — |
| 2–5 | — | lane register written back to column 0–3 (overlapping with the next column's ByteSub) |
| 6 | idle | — |
| 7 | SubWord(RotWord(w3)) | — |
| 8 | — | key register ← next round key (`key_expand`, 136 XOR); rcon doubles |
| 9 | — | state ← ShiftRow, MixColumn, AddRoundKey (`round_linear`) |

The paper fixes these points: 2 start-up cycles, 9-cycle rounds, the key
ByteSub in cycle 7, the key update in cycle 8, a 1-cycle output write, and a
ByteSub result registered one cycle after it is computed. The placement of
cycles 1–6, including the idle cycle 6, is this design's reading.

**Latency: 93 cycles** = 2 + 10·9 + 1. The paper's results table gives
102 cycles per block. That matches 2 + 11·9 + 1, and its text speaks of ten
regular rounds followed by a final round. AES-128 has ten rounds in total,
the last without MixColumn, and this core performs exactly those. The
ciphertext therefore matches FIPS-197, and the block takes 9 cycles fewer
than the paper reports. At the clock rates the paper reports for its FPGA
builds (33 MHz unmasked, 23 MHz masked) this gives 45 and 32 Mbit/s.

## Interface (`aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst` | in | 1 | synchronous reset; returns to IDLE from any state and aborts an encryption |
| `load` | in | 1 | write `pt_in`/`key_in` into the input registers |
| `pt_in`, `key_in` | in | 128 | plaintext and key, FIPS-197 byte order (byte 0 in bits 127:120) |
| `start` | in | 1 | start an encryption; ignored while `busy` |
| `seed_we`, `seed` | in | 1, 128 | reseed the random generators |
| `ct_out` | out | 128 | output register, holds the last ciphertext |
| `done` | out | 1 | one-cycle pulse in the cycle after `ct_out` is written |
| `busy` | out | 1 | high from the cycle after `start` until the output write |

The input registers are read only in the first cycle of an encryption, so
the next block can be loaded while one is running. `ct_out` is written on
the 93rd rising edge after the one that samples `start`, and `done` is high
during the following cycle.

Parameter: `MASKED` (bit, default 1). Setting it to 0 builds the unsecured
core with plain composite-field S-boxes and a mask register held at 0. The
timing is the same.

## Files

`rtl/`:
* `aes_pkg.sv`: types, the T / A·T⁻¹ / A matrices, `mat8`, `xtime`, `shift_rows`, the controller's `ctrl_t` struct
* `gf4_mul.sv`, `gf4_sq.sv`, `gf4_mul_w14.sv`, `gf4_inv.sv`: GF(2^4) arithmetic
* `cf_map.sv`, `cf_invmap_affine.sv`: the field maps
* `bytesub.sv`, `bytesub_masked.sv`, `mask_prep.sv`: S-boxes
* `mixcolumn.sv`, `round_linear.sv`, `key_expand.sv`: linear layer and key schedule
* `aes_ctrl.sv`: controller
* `aes_core.sv`: datapath
* `prng.sv`: mask source
* `aes_top.sv`: top level with input and output registers

`tb/`:
* one self-checking testbench `tb_<module>.sv` per module
* `tb_aes_top_unsecured.sv`: the `MASKED = 0` build
* `aes_ref_pkg.sv`: a reference written from the definitions. GF products
  are computed by shift-and-add, inverses by search, the S-box as
  inverse + affine, and AES-128 in plain software.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

## Verification

* The arithmetic blocks are checked exhaustively. `cf_map` is checked to be
  an isomorphism over all 65 536 operand pairs.
* `bytesub` is checked on all 256 inputs. `bytesub_masked` is checked on
  all 256 inputs with 16 random (X, Y) pairs each.
* `aes_ctrl` is checked cycle by cycle against the schedule above.
* `aes_core` is checked, masked and unmasked, against the FIPS-197 vectors
  and random blocks. After every round its test also checks that
  `state ^ mask` is the true round state while `state` alone is not.
* `tb_aes_top` runs the default build end to end. It covers the FIPS-197
  vectors, the 93-cycle latency, fresh masks for a repeated block,
  reseeding, a reset that aborts a block, `start` and `load` during a run,
  and back-to-back blocks.

Simulate with Verilator 5 from the project root, for example:

    verilator --binary --timing --top-module tb_aes_top -Irtl -Itb -y rtl -y tb \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv -o sim && ./obj_dir/sim

The same pattern works for any `tb_<name>`. Every testbench finishes within
seconds.

## What to keep in mind

* The isomorphism T is the one for x → {5,9}. Any of the eight isomorphisms
  would work. Changing it means recomputing both `T_ROWS` and `ATINV_ROWS`
  in `aes_pkg` (ATINV = A·T⁻¹ over GF(2)).
* The multiply-by-02 in MixColumn reduces with 0x1B, the AES polynomial.
* Reset is synchronous and clears every register. The random generators
  restart from their fixed seeds, so reseed after reset in a real device.
* The S-boxes are purely combinational between registers. The longest path
  is the masked S-box, about a dozen GF(2^4) operations deep.

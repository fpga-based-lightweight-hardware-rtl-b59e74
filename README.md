# PHOTON-80/20/16 round-based hash core

PHOTON is a lightweight sponge hash for devices with little logic to spare:
RFID tags, sensors, IoT edge nodes. This core implements its smallest
variant, PHOTON-80/20/16:

- 80-bit digest
- 20-bit input rate and 16-bit output rate
- 100-bit state

The core takes one round per clock. The whole permutation round is a single
combinational path, so a 12-round permutation takes 12 cycles. A complete
hash takes 60 round cycles: 12 to absorb the message and 4 x 12 to squeeze
out the rest of the digest.

The architecture saves area in two ways:

- **The round-constant register is also the controller.** The 20-bit
  register that feeds AddConstants doubles as the round counter. There is
  no separate round counter and no state machine.
- **MixColumns uses look-up tables.** Its GF(2^4) products come from
  16-entry tables, not from multiplier logic.

## What one hash computes

The state is a 5 x 5 matrix of 4-bit cells. For a 20-bit message block `m`:

1. **Load.** The state is set to `IV ^ (m << 80)`, so the message lands in
   the 20 leftmost bits, which form row 0. The IV follows the PHOTON rule
   `0^76 || n/4 || r || r'`, with each field one byte. That gives
   `IV = 0x...0_14_14_10`.
2. **Absorb.** The 12-round permutation P is applied. The top 16 bits of
   the state (row 0, cells 0..3) are digest segment z0.
3. **Squeeze.** Four more times, P is applied and the next 16-bit segment
   is read from the same place. This gives z1..z4.

There is no padding stage. `msg_i` is used as the complete, already padded
rate block, and only one block is absorbed per hash. To hash longer
messages you would need to add a padding unit and a multi-block absorb loop.

### Bit and cell order

Cell (i, j) holds bits `4*(5i+j) .. 4*(5i+j)+3` of the state written as a
string, most significant bit first. In the packed type `photon_pkg::state_t`:

- cell (0,0) is the top nibble, bits 99..96;
- cell (4,4) is the bottom nibble, bits 3..0.

The types use ascending packed ranges (`[0:4]`), so `s[i][j]` is cell
(i, j) directly. Lint tools remark on these ranges; that is expected.

`hash_o` holds the segments with the **first one in the low bits**:

```
hash_o = { z4, z3, z2, z1, z0 }      // z0 = hash_o[15:0]
```

The usual string form of the digest is `z0 || z1 || z2 || z3 || z4`. To get
it, read `hash_o` 16 bits at a time from the bottom.

For the message `593EF` the core produces
`hash_o = 80'he750b145fdbcf96f27e9`. In string order that is
`27e9 f96f fdbc b145 e750`.

This digest was checked against an independent bit-level model. It was
**not** checked against a published test vector. If you need
interoperability with another PHOTON implementation, first confirm that
the bit order and the IV byte layout match it. Both are isolated in
`photon_pkg`.

## The round

`photon_round` chains four steps:

| step | module | what it does |
|---|---|---|
| AddConstants | `add_constants` | XORs the per-row constant `RC(v) ^ IC(i)` into cell (i,0). The internal constants are `IC = 0,1,3,6,4`. |
| SubCells | `sub_cells` | Passes each of the 25 cells through the PRESENT S-box `C56B90AD3EF84712`. |
| ShiftRows | `shift_rows` | Rotates row i left by i cells. This is wiring only. |
| MixColumns | `mix_columns` | Multiplies each column by A^5 in GF(2^4), modulus x^4+x+1. |

A^5 is the fifth power of the companion matrix whose last row is
`(1,2,9,9,2)`:

```
 1 2 9 9 2
 2 5 3 8 D
 D B A C 1
 1 F 2 3 E
 E E 8 5 C
```

In `mix_columns`, each output cell is the XOR of five products. Each
product `A5[i][k] * x` is read from a 16-entry table for that coefficient.
The tables are not typed in. They are computed at elaboration time by the
constant function `gf16_mul` (shift-and-add, reduced by x^4+x+1), so
`MUL_LUT[c][x] = c * x`. Synthesis folds them into plain logic; a generic
synthesis run lists them as small read-only memories before technology
mapping.

## The round-constant register as counter and controller

This is the least obvious part of the design (`round_constants`).

The 20-bit register holds one nibble per row. Row i holds
`RC(v) ^ IC(i)`, the exact value AddConstants needs in round v. Row 0 has
`IC(0) = 0`, so it holds the bare round constant. That is what the core
uses as its round counter:

| row-0 value | meaning |
|---|---|
| 0 | idle; `start_i` loads the state |
| 1,3,7,E,D,B,6,C,9,2,5,A | rounds 1..12 of a permutation |
| A | also "last round": a digest segment is taken |

Each step moves every row through the 4-bit LFSR
`x -> {x[2:0], x[3] XNOR x[2]}`, applied to the row's RC part:

```
row_i <= lfsr(row_i ^ IC(i)) ^ IC(i)
```

Because IC is constant, this costs only wiring and inverters. The same LFSR
takes the idle value 0 to 1, so the load step and the first round need no
special case.

After round 12 (row 0 = A) the register does one of two things:

- If another permutation follows, it jumps straight to the round-1
  constants. The five permutations of a hash therefore run back to back
  with no idle cycle.
- After the fifth permutation, it returns to the idle value.

A 3-bit permutation count in `photon80` tells these two cases apart. The
register's own value cannot, because every permutation runs through the
same twelve constants. An assertion checks that each row always equals
row 0 XOR its own IC.

Per-row constants for rounds 1..12:

```
row 0: 1 3 7 E D B 6 C 9 2 5 A
row 1: 0 2 6 F C A 7 D 8 3 4 B
row 2: 2 0 4 D E 8 5 F A 1 6 9
row 3: 7 5 1 8 B D 0 A F 4 3 C
row 4: 5 7 3 A 9 F 2 8 D 6 1 E
```

## Interface and timing (`photon80`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | synchronous, active-low reset; aborts a hash |
| `start_i` | in | 1 | start a hash; taken only while `ready_o` is high |
| `msg_i` | in | 20 | message block; sampled only at the accepting edge |
| `ready_o` | out | 1 | idle |
| `done_o` | out | 1 | one-cycle pulse: `hash_o` is complete |
| `hash_o` | out | 80 | digest, z0 in `[15:0]` |

A hash runs as follows. Edge 0 is the edge at which `start_i` is sampled
high while `ready_o` is high.

```
edge 0        load: STR <= IV ^ {msg, 80'b0}
edge 1..12    permutation 1 (absorb); at edge 12, z0 is shifted into hash_o
edge 13..24   permutation 2;          at edge 24, z1
...
edge 49..60   permutation 5;          at edge 60, z4; done_o and ready_o go high
```

- `start_i` is ignored while the core is busy.
- A new hash can start in the cycle where `done_o` is high. Back to back,
  the core therefore finishes one hash every 61 cycles: 60 rounds plus the
  load cycle.
- `hash_o` changes while a hash is running. It is valid when `done_o` is
  high, and it stays unchanged until 12 cycles into the next hash, when
  that hash's first segment is shifted in.

## Resources

The core has 204 flip-flops:

- 100 for the state register STR;
- 20 for the round-constant register;
- 80 for the digest register;
- 3 for the permutation count;
- 1 for `done_o`.

A generic synthesis (no FPGA mapping) of `photon80` gives about 720
word-level cells. Almost all of them are in the 25 S-boxes and the
MixColumns tables.

## Choices this design makes

These points are not fixed by the algorithm or the architecture. They are
this design's own decisions:

- **Load cycle.** The IV/message load takes a cycle of its own, before the
  60 rounds. The usual figure of 60 cycles per hash counts rounds only.
  Counted from the load, the core takes 61 cycles.
- **Four extra flip-flops.** The permutation count and the `done_o` flag
  sit on top of the 200 registers the architecture itself needs.
- **Handshake and reset.** The start/ready/done handshake and the
  synchronous reset are this design's choices.
- **Squeeze wrap.** Going from round 12 straight to round 1 of the next
  permutation is this design's way of fitting the squeeze into 48 cycles.
- **Bit order, IV layout and digest order.** These follow the reading
  described above.
- **No serial option.** The internal constants could instead come from a
  small NOR-feedback LFSR, which suits a serial, nibble-wide datapath. That
  option is not used here, because the datapath is round-parallel.
- **One variant only.** Only PHOTON-80/20/16 is built. The other PHOTON
  variants use other matrix sizes, other MDS matrices and, for the 256-bit
  one, the AES S-box. None of that is included.

## Verification

Every module has a self-checking test bench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
`tb/photon_ref_pkg.sv` works on flat 100-bit vectors and computes
MixColumns the serial way: it applies the companion matrix five times with
a shift-and-reduce multiply. It therefore shares neither tables nor
arithmetic with the RTL.

| test bench | checks |
|---|---|
| `tb_sub_cells` | every S-box entry in every cell; random states |
| `tb_shift_rows` | a literal vector; random states |
| `tb_mix_columns` | unit columns against the literal A^5; random states against the serial model |
| `tb_add_constants` | the twelve real constant sets; random constants |
| `tb_photon_round` | a literal first-round vector; all twelve rounds on random states |
| `tb_round_constants` | the 5 x 12 constant table; idle value; holding; last flag; wrap; return to idle; reset |
| `tb_photon80` | full hashes: see below |

`tb_photon80` hashes `593EF` (against a literal digest) plus back-to-back,
held-start, random and reset-aborted hashes. It checks:

- that `done_o` comes exactly 60 edges after the accepting edge;
- that `ready_o` is low in between;
- each digest against the reference model.

It also counts how often each mechanism occurred (load, wrap, segment
capture, return to idle, ignored start, back-to-back start, abort) and
fails if any count is zero.

To run a test bench with Verilator 5, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/photon_pkg.sv tb/photon_ref_pkg.sv \
  tb/tb_photon80.sv --top-module tb_photon80
./obj_dir/Vtb_photon80
```

Replace `tb_photon80` with any other test bench name. Each runs in well
under a second.

## Files

- `rtl/photon_pkg.sv` — sizes, types, IV, S-box, IC, A^5, the LFSR step
  and the GF(2^4) multiply.
- `rtl/add_constants.sv`, `rtl/sub_cells.sv`, `rtl/shift_rows.sv`,
  `rtl/mix_columns.sv` — the four round steps.
- `rtl/photon_round.sv` — one full round.
- `rtl/round_constants.sv` — the constant register, counter and controller.
- `rtl/photon80.sv` — the top: state register, load multiplexer and digest
  register.
- `tb/` — the reference model package and one test bench per module.

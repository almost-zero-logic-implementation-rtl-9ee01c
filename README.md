# A block-RAM Troika permutation core with one S-box

Troika is a ternary sponge hash built for the IOTA ledger. Its state is 729
trits (a 9 x 3 x 27 cuboid of columns x rows x slices). It absorbs messages
243 trits at a time and applies a 24-round permutation after each block. A
round is SubTrytes (a 3-trit S-box on each tryte), ShiftRows, ShiftLanes,
AddColumnParity and AddRoundConstant.

This core spends almost no logic on that permutation. It keeps the whole
state in two small dual-port RAMs, which map onto the two 18 Kb halves of one
FPGA block-RAM tile. It then streams the state through the datapath one trit
per clock. The datapath is one S-box, one column-parity accumulator and one
11-stage ternary LFSR that makes the round constants. Most of the
permutation is done by *where* each trit is written back. ShiftRows and
ShiftLanes cost no datapath logic. They are folded into the write addresses
that the controller generates.

Costs and limits:

| quantity | value |
|---|---|
| cycles per phase | 734 (729 trits + 5 pipeline) |
| cycles per permutation | 2 x 24 x 734 = 35232 |
| cycles per absorbed block, with 243 host writes | 35475 |
| RAM-1 | 1458 trits |
| RAM-2 | 729 trits (756 words in variant 3) |
| flip-flops outside the RAMs | about 120 |

The round constants and ShiftRows amounts deserve a warning before you use
this RTL. The architecture calls for an 11-stage ternary LFSR for the round
constants, but its feedback polynomial and seed are not published with the
architecture. This design picks its own (see below), so **its digests do not
match official Troika test vectors.** Everything else follows the Troika
definition. Swapping in the right constants is a local change in
`troika_pkg` and `troika_rc_gen`.

## Trits in hardware: a one-hot code

Each trit is carried inside the datapath as a 3-bit one-hot word:

| trit | one-hot b2b1b0 | 2-bit d1d0 |
|---|---|---|
| 0 | 001 | 00 |
| 1 | 010 | 01 |
| 2 | 100 | 10 |

GF(3) arithmetic in this code is a small AND-OR network:

* Adder (`trit_add`): y2 = a0b2 | a1b1 | a2b0, y1 = a0b1 | a1b0 | a2b2, and y0 = ~(y1|y2).
* Multiplier (`trit_mul`): y0 = a0 | b0, y1 = a1b1 | a2b2, and y2 = ~(y0|y1).
* Adding a constant is a rotation of the three wires. Negation swaps wires 1 and 2. Both cost no gates.
* Conversion to and from the 2-bit code (`trit_2to3`) is b2 = d1, b1 = d0, b0 = ~(d1|d0). The way back is d1 = b2, d0 = b1.

The S-box (`troika_sbox`) is Troika's three-round Feistel network written
out. With a = x0 - 1:

* t1 = a·x1 + x2
* t2 = x1·t1 + a
* t3 = t1·t2 + x1
* s(x0,x1,x2) = (t3, t2, t1)

That is three multipliers and three adders. Here x0 is the first
(lowest-address) trit of the tryte. The testbench checks all 27 inputs
against the published Troika S-box table.

## Memory map

The trit at (slice z, row y, column x) is at address z·27 + y·9 + x. The rate
(the message block and the digest) is therefore addresses 0..242, which are
the first nine slices.

| RAM | words | contents |
|---|---|---|
| RAM-1 | 0..728 | state between rounds; the host loads and reads it here |
| RAM-1 | 729..1457 | state after SubTrytes + ShiftRows + ShiftLanes |
| RAM-2 | 0..728 | second copy of that intermediate state |
| RAM-2 | 729..755 | ShiftLanes table (variant 3 only) |

RAM-2 exists only to give Phase 2 three read ports. Phase 2 needs the
column being updated plus its two neighbours in every cycle, and it also has
to write the result. RAM-1 supplies one read and the write. RAM-2's two
ports supply the neighbours.

All RAMs (`troika_dpram`) are synchronous and true dual-port, and they
include the block-RAM output register. A read issued in cycle t returns its
data in cycle t+2.

## The two phases of a round

The controller (`troika_ctrl`) runs each phase for exactly 734 cycles. Its
counter `cnt` goes 0..733. In both phases the trit read in cycle j is
written in cycle j+5:

* The RAM takes 2 cycles to return it.
* The datapath takes 3 cycles.

The last five cycles of a phase drain this pipeline. Three coordinate
counters (`troika_coord_cnt`) follow the read position (j), the write
position (j+5) and, in variant 3, a lookup position (j+3). Each counter holds
(slice, row, column) and can walk the cuboid in address order or column by
column. So no address is ever divided or multiplied by a non-constant.

### Phase 1: SubTrytes, ShiftRows, ShiftLanes

The datapath for this phase is `troika_sbox_stage`.

1. RAM-1 port A reads addresses 0..728 in order.
2. Each trit enters a 2-trit shift register.
3. When the third trit of a tryte arrives, the S-box evaluates the whole tryte. Its three output trits are loaded in parallel into a 3-trit output shift register. That register then shifts them out one per cycle, so the stream has no gaps.
4. Trit j (at z, y, x) is written to two places at once: word 729 + dest of RAM-1 (port B) and word dest of RAM-2 (port A). The destination is:

```
x'   = (x + 3·SHIFT_ROWS[y]) mod 9            ShiftRows: row y moves y trytes
z'   = (z + SHIFT_LANES[9·y + x']) mod 27     ShiftLanes: lane (y, x') moves along z
dest = z'·27 + y·9 + x'
```

`SHIFT_ROWS` = {0, 1, 2} trytes. `SHIFT_LANES` is the 27-entry table of the
Troika specification, held in `troika_pkg`. In variant 3 the table is not in
logic. It sits in RAM-2 words 729..755, and RAM-2 port B, which is idle in
Phase 1, reads the entry two cycles before the write that needs it.

### Phase 2: AddColumnParity, AddRoundConstant

The datapath for this phase is `troika_col_parity`. The controller walks the
state column by column: slice-major, then column, with rows 0, 1, 2 in
consecutive cycles. For the row-y trit of column (z, x) it reads three trits:

| port | trit |
|---|---|
| RAM-1 port B | own trit, word 729 + z·27 + y·9 + x |
| RAM-2 port A | left neighbour (z, y, x-1) |
| RAM-2 port B | neighbour (z+1, y, x+1) |

Indices wrap: x modulo 9, z modulo 27.

1. The two neighbour trits are added and accumulated over the three rows. The accumulator is cleared on row 0.
2. After row 2 it holds the sum of both adjacent column parities. That sum is latched into an update register.
3. The column's own trits, delayed by three registers, pass an adder that adds the latched parity.
4. Row 0 also gets the round-constant trit.
5. The results are written back to RAM-1 words 0..728 through port A, one per cycle, in the same column order.

The round-constant LFSR (`troika_rc_gen`) advances once per column, after
the row-0 write. It is reloaded at the start of every permutation. One
permutation therefore uses 24 x 243 constant trits, and every permutation
uses the same ones.

**Round-constant LFSR, this design's choice.** The LFSR has 11 ternary
stages s[0..10] and the constant is s[0]. Each step shifts the stages and
sets s[10] ← s[2] − s[0] (mod 3). Every stage starts at 1. The polynomial
has the maximal period 3^11 − 1. Only the form of the generator comes from
the architecture: 11 ternary stages, updated once every third trit. The
taps and seed do not. To reproduce real Troika digests, replace this
generator with one that yields the official constants (for example a
24 x 243-trit table, or the correct LFSR).

## Storage variants (`troika_top` parameter `IMPL`)

| IMPL | RAM-1 | RAM-2 | trit code in RAM | ShiftLanes table |
|---|---|---|---|---|
| 1 (default) | 1458 x 3 | 729 x 3 | one-hot | logic |
| 2 | 1458 x 2 | 729 x 2 | 2-bit, converted at every RAM port | logic |
| 3 | 1458 x 2 | 756 x 5 | 2-bit, converted at every RAM port | RAM-2 words 729..755 |

All three compute the same permutation in the same number of cycles.
`tb_troika_variants` runs them side by side. In variant 3 the table reaches
RAM-2 through the memory's initial contents, as a block-RAM init would
load it. In a flow without RAM initialisation, the host would have to write
the table there.

## Using the core

`troika_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (RAM contents are not reset) |
| `host_en`, `host_we` | in | 1 | host access to RAM-1 port A; allowed only while `busy` is low |
| `host_addr` | in | 11 | trit address |
| `host_wdata` | in | 2 | trit in the 2-bit code 00/01/10 |
| `host_rdata` | out | 2 | trit read; valid 2 cycles after the read request |
| `start` | in | 1 | one-cycle pulse: run one 24-round permutation; ignored while busy |
| `busy` | out | 1 | high for exactly 35232 cycles, from the cycle after `start` |
| `done` | out | 1 | one-cycle pulse after the last busy cycle |
| `phase`, `round` | out | 2, 5 | current phase (0 idle, 1, 2) and round (0..23) |

Padding and sponge bookkeeping are left to the host processor. To hash a
message:

1. Pad it: append one `1` trit, then zeros up to a multiple of 243.
2. For the first block, write its 243 trits to addresses 0..242 and zeros to 243..728.
3. Pulse `start`. `start` may share a cycle with the last host write. Wait for `done`.
4. For each further block, overwrite only 0..242. The capacity (243..728) must be left alone. Pulse `start` again.
5. Read the 243-trit digest from 0..242.

An assertion flags host access while busy.

## Where this RTL departs from, or fills in, the architecture

* **Round constants:** the LFSR taps and seed are invented (see above), so digests differ from official Troika.
* **ShiftRows and ShiftLanes constants:** ShiftRows uses 0/1/2 trytes per row and ShiftLanes uses the Troika specification's table. Neither is restated in the architecture description.
* **Port assignment:** the block diagram places both the S-box input and output on RAM-1 port B. A single port cannot read the first half and write the second half of RAM-1 in the same cycle. Here Phase 1 reads through port A and writes through port B. Phase 2 reads through port B and writes through port A, where the host multiplexer also sits.
* **Pipeline depth:** the datapaths have three registers, plus two cycles of RAM latency. That depth is chosen so that a phase is the stated 734 cycles. The register counts in the block diagram are not copied one for one.
* **Generic RAMs:** the RAMs are written as inferable arrays sized to the need. The original mapping uses two 2048 x 8 RAMB18 primitives.
* **Host port code:** the host port always uses the 2-bit code. Variant 1 converts at the port.
* **Not reproduced:** clock frequency and LUT/FF counts are FPGA implementation results that RTL simulation cannot confirm. At 150 MHz, 35475 cycles per block gives about 4200 blocks/s.

## Verification

Every testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=N failures=M` line. `tb/troika_ref_pkg.sv` is an integer
reference model of the permutation. It is written step by step from the
definitions and shares no code with the RTL.

* `tb_troika_top` (default parameters) hashes a two-block and a one-block message. It compares all 729 state trits after each permutation with the model and checks 35232 busy cycles. It also counts every mechanism: host writes and reads, both phases, round-constant adds, continued absorb and done.
* `tb_troika_variants` does the same for variants 1, 2 and 3 together. It also counts the lane-table reads of variant 3.
* `tb_troika_iota_tx` hashes an IOTA-transaction-sized message: 2673 trytes, which pad to 34 blocks. It checks 35475 cycles per block and the digest.
* `tb_troika_ctrl` checks every address and strobe of the controller over a whole permutation. It also checks that the Phase-1 destinations form a permutation of the state.
* Unit testbenches cover the adder, multiplier, converter, S-box, both datapath stages, the LFSR, the coordinate counter and the RAM.

Running a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/troika_pkg.sv tb/troika_ref_pkg.sv tb/tb_troika_top.sv \
  --top tb_troika_top -o sim -Mdir obj && ./obj/sim
```

Use the same command for any other testbench. Include `tb/troika_ref_pkg.sv`
when the testbench imports it. A full permutation takes well under a second
to simulate.

## Files

| file | content |
|---|---|
| `rtl/troika_pkg.sv` | geometry, trit types, ShiftRows/ShiftLanes constants, LFSR definition |
| `rtl/trit_add.sv`, `rtl/trit_mul.sv`, `rtl/trit_2to3.sv` | one-hot GF(3) add and multiply; code conversion |
| `rtl/troika_sbox.sv` | the S-box |
| `rtl/troika_sbox_stage.sv` | Phase-1 datapath |
| `rtl/troika_col_parity.sv` | Phase-2 datapath |
| `rtl/troika_rc_gen.sv` | round-constant LFSR |
| `rtl/troika_coord_cnt.sv` | cuboid coordinate counter |
| `rtl/troika_ctrl.sv` | phase sequencer and address generator |
| `rtl/troika_dpram.sv` | dual-port RAM |
| `rtl/troika_top.sv` | the core |

# Reduction-tree checksum units

The Internet checksum (IP, TCP, UDP) is the inverted 16-bit one's
complement sum of a block of 16-bit words. A conventional unit adds the
words one at a time into a wide accumulator and folds the overflow back in
at the end, so a block of W words costs W carry-propagate additions.

The units in this repository instead take many words at once and reduce
them with rows of full adders, the way a parallel multiplier reduces its
partial products. Three words become two without any carry propagation;
repeated, this takes any number of words down to two, which one ordinary
adder then sums. What makes this work for checksums is the **end-around
carry**: in one's complement arithmetic 2^16 equals 1, so the carry out of
bit 15 of every full-adder row can simply be wired into bit 0 of the next
row. No overflow word ever has to be carried along, every intermediate row
stays 16 bits wide, and the result is the exact one's complement sum.

All RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with no vendor
primitives.

## The reduction row

`ones_csa` is one row of sixteen full adders. For input words `a`, `b`,
`c`:

```
sum   = a ^ b ^ c
maj   = (a & b) | (a & c) | (b & c)
carry = {maj[14:0], maj[15]}      // carry moves one column left, bit 15 wraps to bit 0
```

`sum + carry` equals `a + b + c` modulo 2^16 - 1. A stage of a tree is
`csa_stage`: its first G groups of three rows go through G `ones_csa` rows
and become 2G rows; the rows that are left over pass straight down. A stage
of CUR rows thus yields CUR - G rows, and costs one full-adder delay.

## Two rules for sizing the stages

The trees differ only in how many groups each stage reduces
(`cksum_pkg` computes the sizes at elaboration time).

**Leveled** (`leveled_reducer`, after Dadda). Stage sizes come from a fixed
sequence, x[i+1] = floor(3/2 x[i]):

```
2, 3, 4, 6, 9, 13, 19, 28, 42, 63, 94, 141, 211, ...
```

The first stage reduces the input to the largest sequence value below it;
every later stage steps down one value. Twelve rows go 12, 9, 6, 4, 3, 2.
Because the stages are the same whatever the block size, a short block can
**enter part-way down**: the `entry` input selects the stage at which the
rows are injected, and the stages above it receive zeros and stay idle. A
17-row pass through a 28-level tree enters at the 19-row stage and saves a
stage. `cksum_pkg::entry_stage()` picks the deepest stage that holds a
given number of rows. Entering lower never changes the sum; it only
shortens the path and avoids toggling the upper stages.

**3-to-2** (`three_to_two_reducer`, after Wallace). Every stage reduces all
complete groups of three, so x rows become ceil(2/3 x). The sizes follow
from the input count alone: 12, 8, 6, 4, 3, 2 for twelve rows; 160, 107,
72, 48, 32, 22, 15, 10, 7, 5, 4, 3, 2 for 160 rows. The tree is fixed at
elaboration by `N_IN` and has no entry input.

Both modules take `K_OUT` (default 2). With a larger `K_OUT` the tree stops
as soon as K_OUT or fewer rows remain. This is the *M-to-k* partial reducer
of the hybrid unit: 141-to-42 leveled is 141, 94, 63, 42; 160-to-48 3-to-2
is 160, 107, 72, 48.

Both trees are purely combinational. Their depth is the number of stages
times one full-adder delay, e.g. 5 stages for 12 rows with either rule.

## Finishing: adder, incrementer, inverter

`oc_final_adder` adds the two remaining rows into 17 bits. It adds bit 16
back in (the incrementer; this cannot overflow again) and inverts the
result to get the checksum. With `CARRY_SELECT = 1` it computes `a + b` and
`a + b + 1` side by side and uses the carry out of the first to select one,
taking the incrementer off the critical path. Both forms give identical
results. `checksum_zero` supports receive-side checking: summing a block
that includes its stored checksum gives checksum 0 exactly when the data
are intact.

A sum is 0x0000 only for an all-zero block (checksum 0xFFFF); otherwise it
lies in 0x0001..0xFFFF. This matches a serial end-around-carry adder bit
for bit, so reduction-tree and serial units always agree.

## The three checksum units

All three read the words of a memory block in parallel and take one
**reduction pass per clock cycle**. A pass pushes one window of rows
through the tree. A request is a one-cycle `start` with `num_words`. The
unit is `busy` while it works, pulses `done`, and holds `checksum` until
the next request. Words past `num_words` read as zero, which does not
change a one's complement sum. In the formulas below, W is the number of
words in the block.

### Single unit (`cksum_single_unit`)

One M-level tree and two feedback registers (Reg1, Reg2). The first pass
reduces words 0..M-1 to two rows and stores them in Reg1/Reg2. Each later
pass reduces Reg1, Reg2 and the next M-2 words. The pass that reaches the
end of the block sends its two rows through `oc_final_adder`, and the
checksum is registered.

```
passes P = 1                          if W <= M
         = 1 + ceil((W - M) / (M - 2))  otherwise
done is set at the end of pass P (P cycles after the start cycle)
```

With a leveled tree every pass enters at the deepest stage that holds its
rows. This helps short blocks and the last, partly filled pass of a long
one. `short_entry` reports that it happened.

### Multiple units (`cksum_multi_unit`)

N_UNITS (default 3) M-level trees work side by side, each with its own
Reg1/Reg2. Their 2N output rows go through a 2N-row tree of the same kind
(6, 4, 3, 2), then `oc_final_adder`. In the first pass unit u takes words
u·M .. u·M+M-1. Afterwards the units share a window that starts at N·M and
advances by N·(M-2) per pass. Unit u takes the M-2 words at offset u·(M-2)
and adds its own two feedback rows.

```
P = 1                                    if W <= N·M
  = 1 + ceil((W - N·M) / (N·(M - 2)))    otherwise
```

### Hybrid (`cksum_hybrid_unit`)

This unit is for a design that already has a serial checksum unit and
adds only a partial reducer in front of it. An M-to-K tree reduces the
first M words to K rows, which are held in K feedback registers. While at
least M-K words remain, another pass reduces the K rows and the next M-K
words. Then the K rows and the leftover words (fewer than M-K) go, one per
cycle, through `conv_cksum_unit`.

`conv_cksum_unit` is the conventional unit. It adds each word into a
32-bit partial-sum register. The register's two halves are then added into
17 bits, incremented on overflow, and inverted. The 32-bit sum is exact
for up to 65537 words.

```
P = 1 + number of further passes, R = leftover words
serial words = K + R,   done is set P + K + R + 1 cycles after the start cycle
```

## Top level: `cksum_top`

`cksum_top` holds one `cksum_mem_block` and, side by side, the six units
that pair each organisation with each tree. The memory is 256 × 16-bit
registers with a one-word write port (`wr_en`, `wr_addr`, `wr_data`) and
all words readable in parallel. The units are sized as evaluated for a
160-word block. Results are arrays indexed by `cksum_pkg::engine_e`:

| index          | unit                                   | 160 words              |
|----------------|----------------------------------------|------------------------|
| `E_SINGLE_LEV` | single, leveled, M = 63                | 3 passes               |
| `E_SINGLE_32`  | single, 3-to-2, M = 55                 | 3 passes               |
| `E_MULTI_LEV`  | 3 × leveled M = 63, carry-select adder | 1 pass                 |
| `E_MULTI_32`   | 3 × 3-to-2 M = 54, carry-select adder  | 1 pass                 |
| `E_HYB_LEV`    | leveled 141-to-42 + serial unit        | 1 pass, 61 serial words |
| `E_HYB_32`     | 3-to-2 160-to-48 + serial unit         | 1 pass, 48 serial words |

One `start` runs all six on words 0..`num_words`-1, and all six must give
the same checksum. Other per-unit outputs: `busy`, `done`, `checksum`,
`checksum_zero` and `passes`. The hybrids also report `serial_words`. The
first four units report `final_overflow`. The single leveled unit reports
`short_entry`. Other sizes are parameters of `cksum_top`
(`SINGLE_LEV_M`, `MULTI_32_M`, `HYB_LEV_K`, ...) or of the units
themselves.

Reset is synchronous and active low throughout. It clears the memory, the
feedback registers and the results.

## What follows the published method and what does not

Taken from the published reduction-tree checksum method:

- the end-around-carry full-adder rows;
- both stage-sizing rules and their stage sizes;
- the M-to-k partial reducer;
- entry into a leveled tree at an inner stage, with the unused stages fed
  zeros;
- the single, multiple and hybrid organisations with their feedback
  registers;
- the adder/incrementer/inverter and its carry-select alternative;
- the conventional 32-bit serial unit;
- all tree sizes used as defaults.

This design's own choices:

- **Timing.** The method is given only as combinational delays (in gate
  and full-adder delays). Here every pass is one clock cycle and no
  registers sit inside the trees. Long trees (211 or 160 rows, 10 to 12
  full-adder levels) will limit the clock frequency.
- **Pass schedule.** The first pass uses all M inputs for data; later
  passes give two inputs (K in the hybrid) to the feedback rows. This
  reproduces most of the evaluated pass counts: 3 passes at 55 and 63
  levels, 11 passes at 17 levels, 2 passes for three 28-level units, and
  61 and 48 serial words for the two hybrids. Two evaluated counts differ:
  - a 19-level leveled single unit needs 10 passes for 160 words, not 11;
  - three 27-level 3-to-2 units need 3 passes, not 2 (81 + 75 = 156 < 160
    words).
- **Hybrid sizing.** In the hybrid, the reducer is read as M rows in, K
  rows out, with K feedback registers. Its figure shows only two output
  rows and two registers, but the published sizes (141-to-42, 160-to-48)
  only work out with K of each.
- **Multiple units.** How words are shared among the units is this
  design's choice.
- **Memory.** Its organisation and depth (256) are this design's choice.
  So are the request/`done` handshake and the reset.
- **Top level.** The six units side by side in `cksum_top` are a
  convenience for comparing them. A product would instantiate the one
  organisation it needs. The carry-select adder is used in the
  multiple-unit instances only.

Not built:

- the network processor that issues start and stop;
- the two-adder and eighty-adder conventional baselines.

## Files

```
rtl/cksum_pkg.sv             word type, method and unit enums, stage-size functions
rtl/ones_csa.sv              16 full adders with end-around carry
rtl/csa_stage.sv             one tree stage (helper)
rtl/leveled_reducer.sv       leveled tree with entry select, optional M-to-k stop
rtl/three_to_two_reducer.sv  3-to-2 tree, optional M-to-k stop
rtl/oc_final_adder.sv        adder, incrementer (or carry-select), inverter
rtl/conv_cksum_unit.sv       conventional serial checksum unit
rtl/cksum_mem_block.sv       word memory with parallel read
rtl/cksum_single_unit.sv     single-reducer unit
rtl/cksum_multi_unit.sv      multiple-reducer unit
rtl/cksum_hybrid_unit.sv     partial reducer + serial unit
rtl/cksum_top.sv             memory and the six units
tb/tb_<module>.sv            self-checking testbench per module
tb/tb_table1_configs.sv      the 160-word block on the sizes not in cksum_top
```

## Simulating

Every testbench is self-checking. It prints one line
`TB_RESULT checks=N failures=F`, and has a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/cksum_pkg.sv tb/tb_cksum_top.sv --top-module tb_cksum_top
./obj_dir/Vtb_cksum_top
```

Replace the testbench name for the other modules. `tb_cksum_top` runs
the top level at its default sizes. Building it takes well under a minute
and the run takes under a second.

What the testbenches compare against is a reference one's complement sum
computed in the testbench, and the pass, serial-word and latency formulas
above:

- the trees keep the sum modulo 2^16 - 1 for every legal entry stage, and
  produce the stage sizes listed above;
- the units are run on blocks of 0 to 256 words of random, all-ones,
  all-zero and small-valued data;
- the top-level test writes the memory through its port and runs the
  160-word block;
- it does a transmit/receive round trip: it stores the computed checksum
  in the block, and the receive-side sum must then flag zero;
- it counts that multi-pass feedback, hybrid feedback passes, leftover
  serial words, short entries, final-adder overflows and zero results
  all occur.

Each testbench was also run against a deliberately broken copy of its
module, and each one failed.

# Conflict-free FFT engine on single-ported memory banks

An in-place FFT needs 2B operands per cycle for B butterflies. With a
read-process/write pipeline that overlaps reads with earlier writes, it needs
even more. The usual answer is multi-ported memory. This design uses G
ordinary single-ported banks instead. The order in which butterflies are
visited (the *schedule*) and the way datapoints are spread over the banks
(the *bank map*) are built together. As a result, any G consecutive accesses
within a stage fall into G different banks. The butterfly units therefore
never wait for memory inside a stage. The remaining collisions happen where
one stage hands over to the next. A small bypass buffer absorbs them.

At its default parameters the engine is a 1024-point complex radix-2 FFT. It
has one butterfly, a two-deep overlapped pipeline and four banks of 256
words. It finishes a transform in 5121 cycles: 5120 butterfly operations plus
one cycle to fill the pipeline. Without the bypass buffer it takes 5130.
Setting `R=4` builds the same engine with radix-4 butterflies.

## Sizes and names

| symbol | meaning | default |
|---|---|---|
| D | number of datapoints (complex samples) | 1024 |
| S | log2 D, the number of radix-2 stages | 10 |
| B | butterflies working in parallel | 1 |
| R | butterfly radix, 2 or 4 | 2 |
| P | pipeline depth, read to write-back | 2 |
| G | number of banks = smallest power of two >= B·R·P (B·R without overlap) | 4 |
| T | log2 G | 2 |

A stage performs D/(2B) *operations*, and each operation reads and writes 2B
datapoints. (Radix 4 is described in its own section below.) Numbering the accesses of a stage 0..D−1 gives the *schedule
position* i. The schedule turns (stage s, position i) into a datapoint index
d. Datapoint d lives in bank `m(d)`, at row `d >> T`.

## The bank map (`bank_map`)

Bank bit k is the parity of every datapoint bit whose position is k modulo T:

    m_k(d) = d_k ^ d_(k+T) ^ d_(k+2T) ^ ...

Take any set of G datapoints that agree everywhere except in T *adjacent* bit
positions. These T positions cover every residue modulo T exactly once. Each
bank bit is therefore one of the free bits XOR a constant, so the G
datapoints land in G different banks. The schedule keeps every group of G
consecutive accesses inside such a set.

For D = 8 and G = 4, datapoints 0..7 land in banks 0, 1, 2, 3, 1, 0, 3, 2.

## The schedule: generate, then reorder

**Generate (`schedule_gen`).** In the classic in-place radix-2 schedule,
stage s visits position i at d = i rotated left by s bits (S-bit rotation).
Consecutive positions then differ in bits s, s+1, ... . These are the
*toggle bits*, T of them per aligned group of G. Near the end (s > S−T) a
plain rotation would wrap the toggle bits around the word and split them. For
those stages the low T bits of i are rotated within themselves instead, by
s−(S−T), and placed above the rest of i:

    s <= S-T :  d = rotl_S(i, s)
    s >  S-T :  d = { rotl_T(i[T-1:0], s-(S-T)), i[S-1:T] }

Every aligned group of G positions now differs only in T adjacent bits.
Those bits are s..s+T−1 in the early stages and the top T bits in the late
ones. Within a group, the two inputs of each butterfly still differ only in
bit s.

**Reorder (`reorder_unit`).** Aligned groups are now conflict free. But with
overlap, a cycle touches a window of 2·B·P positions that need not be aligned
to a group. Such a window is conflict free only if every group visits the
banks in the *same* order. The reorder step gets this by replacing each
toggle bit at position b with bank bit m_(b mod T) of the generated index.
The result is the same group of datapoints, visited in a fixed bank order
0, 1, ..., G−1 for every group of the stage. Any G consecutive positions,
aligned or not, then touch G distinct banks.

The resulting 8-point, 4-bank schedule (datapoints in access order):

    stage 0: 0 1 2 3 5 4 7 6
    stage 1: 0 2 4 6 5 7 1 3
    stage 2: 0 4 2 6 5 1 7 3

`addr_gen` walks stages and operations. It feeds positions 2Bk..2Bk+2B−1 of
operation k through both steps and pairs them into butterflies: positions
2Bk+2j and 2Bk+2j+1 form butterfly j. The input with bit s clear is the upper
one. It also produces the twiddle exponent (upper index mod 2^s)·2^(S−1−s).

## Pipeline and overlap (`cfs_fft`)

An operation reads its 2B operands and computes the butterflies in the same
cycle. The banks read asynchronously. The results then pass through P−2
register stages and are written back in place in the P-th cycle.

* `OVERLAP=1`: a new operation issues every cycle while older results are
  still being written. A stage of D/(2B) operations takes D/(2B) cycles, and
  the whole transform takes S·D/(2B) + P − 1 cycles if nothing stalls. G must
  cover 2·B·P accesses.
* `OVERLAP=0`: the next operation issues only after the previous one is
  written. This takes S·D/(2B)·P cycles, and G = 2B suffices.

For D = 8 with one butterfly and P = 2, this gives 13 cycles with overlap and
24 without. The testbench checks both counts.

## Stage boundaries and the bypass buffer (`bypass_buffer`)

The argument above holds inside a stage. When the writes of the last
operations of stage s overlap the first reads of stage s+1, the two stages
use different bank orders. A write and a read can then name the same bank.
The engine checks every cycle which pending writes collide with the reads
about to issue.

* With `BYPASS=1`, colliding writes are *parked* in the bypass buffer if they
  fit. The buffer holds R·B/2 words: one per butterfly for radix 2. The reads go
  ahead. A parked word:
  * is forwarded to any later read of the same datapoint. Operand priority
    is: a word being parked this cycle, then a buffer hit, then the bank.
  * is dropped when a newer write of the same datapoint reaches the banks.
  * is otherwise written back through a spare write port in a cycle when its
    bank is idle. At the latest this happens after the last operation, when
    every bank is idle.
* If the words do not fit, or `BYPASS=0`, the read stalls for one cycle and
  the writes complete.

For 1024 points, B=1 and P=2, nine stage boundaries each collide once. With
the buffer all nine are parked and the run takes 5121 cycles. Without it,
each costs a stall and the run takes 5130 cycles.

The engine also stalls a read of a datapoint whose new value is still inside
the pipeline (a read-after-write hazard). This can only matter for P > 2. It
never triggered in any configuration simulated (P up to 16), so it is kept as
a guard only.

## Shorter transforms at run time

The engine is built for D points, but `log2_len`, sampled with `start`,
selects any transform of 2^L points with T <= L <= S and 2^L >= 2B. All the
logic is reused:

* **Bank map.** It needs no change. The datapoint bits above L are simply
  zero.
* **Schedule.** The generate and reorder steps rotate within L bits instead
  of S. In the last stages the top toggle bits sit just below bit L.
* **Controller.** It runs L stages of 2^L/(2B) operations.
* **Twiddles.** The exponent keeps the full-size units, because
  W_(2^L)^k = W_D^(k·D/2^L). The one ROM therefore serves every length.

A short transform uses datapoints 0..2^L−1. Load x[n] into the bit reversal
of n over L bits. On the default build an 8-point transform takes 13 cycles
and a 64-point one takes 193.

## Radix 4 (`R=4`, `butterfly_r4`)

With `R=4` each operation runs B radix-4 butterflies and does the work of two
radix-2 stages, s and s+1, for s = 0, 2, 4, .... The schedule is still the
radix-2 schedule of stage s. Take four consecutive positions 4Bk+4j .. +3.
In the early stages the generate step puts bits s and s+1 of the datapoint at
the bottom of the position, and the reorder step only XORs them with bits
that are equal across the four positions. In the late stages the same holds
for the rotated top bits. So the four datapoints differ exactly in bits s+1
and s and are the four inputs of one radix-4 butterfly. The group size is now
4B·P (overlapped), which keeps every window of operations in distinct banks.

`addr_gen` orders the four datapoints by their bits (s+1, s) and supplies
three twiddle exponents. With a = datapoint mod 2^s, these are a·2^(S−1−s)
for the first layer and a·2^(S−2−s), (a + 2^s)·2^(S−2−s) for the second.
`butterfly_r4` is two layers of `butterfly_r2`, so a radix-4 transform gives
the same bits as the radix-2 engine, in half the operations. L must be even.
Two radix-4 butterflies on a three-deep overlapped pipeline need G = 32
banks; a 64-point run on such an engine takes 26 cycles (24 operations plus
two to fill).

## Radix 3: a nine-point engine on three banks (`cfs_fft9_r3`, `butterfly_r3`)

The map also serves radices that are not powers of two. Take a radix-3
butterfly. It needs three operands, so it uses a group-4 map over sixteen
locations and keeps only the locations that fall in banks 0, 1 and 2. Each
aligned group of four locations then offers exactly one location per bank.
The other location of each group stays empty: 3, 6 and 9, plus 12..15.

Nine datapoints fill three groups:

| group | bank 0 | bank 1 | bank 2 |
|---|---|---|---|
| 0 | 0 | 1 | 2 |
| 1 | 5 | 4 | 7 |
| 2 | 10 | 11 | 8 |

Element b of group a sits in bank (a + b) mod 3. The transform has two
stages:

* **Stage 0** runs one butterfly per group, on that group's three elements.
* **Stage 1** runs one butterfly per element index b, across the three
  groups. Input a of that butterfly is multiplied by W9^(a·b).

Thanks to the (a + b) mod 3 placement, every operation of either stage
touches the three banks once each.

To use the engine:

* Load x[3m + r] into element m of group r.
* The result X[b + 3a] appears in element b of group a, scaled by 1/16.
* A transform takes 12 cycles: six operations, each read and written on a
  two-cycle pipeline without overlap.

`butterfly_r3` computes the three outputs from s = u1 + u2 and d = u1 − u2:

    y0 = u0 + s
    y1 = u0 − s/2 − j(√3/2)·d
    y2 = u0 − s/2 + j(√3/2)·d

This needs a single constant multiply by √3 per part. All outputs are scaled
by 1/4.

This engine is separate from `cfs_fft`, and its testbench checks it against
an exact nine-point DFT.

## Arithmetic (`butterfly_r2`, `twiddle_rom`)

* Samples are complex, {re, im}, each W = 16-bit two's complement.
* Twiddles are TW = 16 bits per part, with 1.0 = 2^14. Entry k of the ROM is
  round(cos(2πk/D)·2^14) and round(−sin(2πk/D)·2^14). The ROM is computed at
  elaboration by a constant function, so there is no data file.
* The butterfly is radix-2 decimation in time: a' = (a + w·b)/2 and
  b' = (a − w·b)/2. The product is truncated back to the data scale, and the
  sum and difference are halved by an arithmetic shift and saturated.
* Halving in every stage keeps the data in range, so the output is the DFT
  divided by D.

## Using the engine

Ports of `cfs_fft`:

* `clk`, `rst_n`: clock and synchronous active-low reset.
* `host_we`, `host_addr`, `host_wdata`, `host_rdata`: the host port.
* `start`, `log2_len`, `busy`, `done`: run control.
* `cycles`, `stalls`, `bypasses`: counters for the last transform.

How to run a transform:

1. While the engine is idle, write sample x[n] to datapoint `bitrev(n)`
   through the host port. Writes happen at the clock edge. `host_rdata`
   shows datapoint `host_addr` combinationally.
2. Set `log2_len` to S, or to a smaller length as described above. Pulse
   `start` for one cycle. `busy` stays high until `done` pulses for one
   cycle.
3. Datapoint k then holds X[k]/2^L in natural order (X[k]/D at full
   length).

The counters:

* `cycles`: from the first read to the last bank write.
* `stalls`: cycles in which an operation could not issue.
* `bypasses`: parked writes.

Assertions in the RTL check that no bank is ever asked for two accesses in
one cycle, and that the engine parks words only when they fit.

## Files

* `rtl/cfs_pkg.sv`: the group-size rule and the state type.
* `rtl/bank_map.sv`, `rtl/schedule_gen.sv`, `rtl/reorder_unit.sv`,
  `rtl/addr_gen.sv`: the schedule.
* `rtl/sram_bank.sv`, `rtl/bank_array.sv`: the banks and the port-to-bank
  routing.
* `rtl/twiddle_rom.sv`, `rtl/butterfly_r2.sv`, `rtl/butterfly_r4.sv`: the
  arithmetic.
* `rtl/bypass_buffer.sv`: the bypass buffer.
* `rtl/cfs_fft.sv`: the top level.
* `rtl/butterfly_r3.sv`, `rtl/cfs_fft9_r3.sv`: the separate nine-point
  radix-3 engine.

Every module has a testbench `tb/<module>_tb.sv`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>`.

* `tb/cfs_fft_tb.sv` runs fourteen configurations through `tb/fft_runner.sv`:
  * D = 8 without and with overlap, expecting 24 and 13 cycles
  * D = 1024 with and without the buffer, expecting 5121 and 5130
  * D = 32 with B = 2
  * D = 16 with P = 4
  * D = 256 with B = 4 and P = 5
  * D = 64 with B = 2, P = 3 and no overlap
  * a 64-point run on the 1024-point engine
  * a 16-point run on a 64-point engine with 16 banks (its shortest length)
  * D = 16 with P = 3 (eight banks), 34 cycles without a stall
  * radix 4: D = 16 without overlap (16 cycles), D = 64 overlapped, and a
    64-point run on a 256-point engine with B = 2 and P = 3 (32 banks)

  Each run is compared bit for bit with a software model of the same
  arithmetic (`tb/fft_ref_pkg.sv`) and, within a few LSB, with a
  floating-point DFT. The testbench counts each mechanism and fails if one
  never happened: overlapped issue, stage change, conflict stall, parking,
  write-back from the buffer, stall with the buffer full, non-overlapped
  issue, a run-time shorter length, and radix 4.
* `tb/cfs_fft_full_tb.sv` runs the default engine twice. The 1024-point run
  must take 5121 cycles with zero stalls. The 8-point run, selected at run
  time, must take 13 cycles.

The schedule testbenches compare against hand-checkable tables:

* the D = 8 / G = 4, D = 16 / G = 8 and D = 32 / G = 8 schedules
* the bank numbers 0,1,2,3,1,0,3,2 for D = 8
* exhaustive properties for 1024 and 256 points: distinct banks in every
  window, one bank order per stage, and a permutation of the datapoints in
  every stage

Simulate with Verilator 5, for example:

    verilator --binary --timing -Mdir obj -y rtl -y tb +libext+.sv \
        rtl/cfs_pkg.sv tb/fft_ref_pkg.sv tb/cfs_fft_tb.sv --top-module cfs_fft_tb
    obj/Vcfs_fft_tb

Change the size or shape with the parameters of `cfs_fft`: `D`, `B`, `R`, `P`,
`OVERLAP`, `BYPASS`, `W` and `TW`. G and the bank size follow from them.

## How far it has been checked

What has been checked:

* Every transform in the testbenches matches a bit-exact software model of
  the same arithmetic.
* The results lie within a few LSB of a floating-point DFT.
* The bank assertions never fired.

What has not been checked, or is idealized:

* The design has not been checked for timing or area on any target.
* The banks are modeled as arrays with an asynchronous read. A real SRAM
  macro with a registered read would add one pipeline stage in front of the
  butterflies, and the schedule would then need G for P+1.
* The read-after-write stall is untested, because no configuration needed
  it.
* Saturation and truncation make the fixed-point error grow by about one LSB
  per stage.

## Where this design goes beyond or departs from the schedule it implements

The following are this design's own choices, because the underlying method
describes the schedule, not a datapath:

* the host port
* the number format and scaling
* asynchronous-read banks
* the row inside a bank (`d >> T`)
* how operations are cut into butterflies
* the stall and parking arbitration
* the internals of the bypass buffer

Two details of the reorder rule are stated in two ways in the source
description:

* **Which bank bit replaces a toggle bit.** One form replaces toggle bit b
  with m_(b mod T). The other computes it from only the bits at and above b.
  The first reproduces the published example schedules, so it is used here.
* **How many toggle bits sit at the top in the last stages.** T is used,
  not T−1.

The method also covers cases not built here:

* **Mixed-radix engines and radix 8 or more.** The main engine runs radix 2
  or radix 4, and radix 4 is built as two fused radix-2 stages. The radix-3
  case exists only as the fixed nine-point example above.
* **Transform sizes that are not powers of the radix.**
* **Multi-ported banks.**

The source notes only that the bank map serves shorter lengths. Extending
run-time length selection to the schedule steps and the controller is this
design's own work.

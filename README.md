# Multi-clocked scan register: single-latch scan paths under asP* control

Circuits whose registers are single transparent latches (common in
high-throughput datapaths) are expensive to make scannable. A conventional
scan cell needs a master and a slave latch (L1/L2) so that every bit of the
scan path can shift on the same clock edge; one of the two is dead weight in
normal operation. This design removes that second latch. Each register bit is
a single latch (`scan_latch`), and the latches of a scan path are not clocked
together but one row after another, like falling dominoes, by a small
self-timed controller. A latch is only ever written after its successor has
already copied its old value, so one latch per bit is enough.

The controller is a ring of asP* (asynchronous symmetric pulse protocol)
stages. The whole thing is called a multi-clocked scan register (MCSR). The
RTL contains:

| module | what it is |
|---|---|
| `scan_latch` | single-latch scan cell: one latch, data and gate multiplexers selected by `sw` |
| `asp_ctrl` | one asP* controller stage (behavioural model with delays) |
| `mcsr_ring` | m x (n+1) scan-cell array plus the ring of n+1 controllers |
| `mcsr` | MCSR with asynchronous input/output environment stages `c_in`, `c_out` and scan-out latch |
| `mcsr_clocked` | MCSR driven by an ordinary scan clock `sck` |
| `clocked_dft` | P scan paths, each a chain of S sub-circuits with their own clocked MCSR |
| `mcsr_top` | `mcsr` and `clocked_dft` side by side |
| `mcsr_pkg` | timing constants and the area model |

## The array and the scan order

An MCSR controls an array of scan cells SL(i,j) with m columns (i = 1..m) and
n+1 rows (j = 0..n). Rows 1..n are the registers of the circuit under test
(m*n bits, ports `func_d`/`func_q`, element `[i-1][j-1]`). Row 0 is one extra
latch per column used only for shifting.

The scan path runs up each column and then to the bottom of the next one:

    sc_in -> SL(1,0) -> SL(1,1) -> ... -> SL(1,n) -> SL(2,0) -> ... -> SL(m,n) -> scan out

All cells of row j share one gate pulse `en[j]` from controller c_j. So a
column is not a shift register by itself. The rows are loaded in a fixed
order, and that order makes the array behave as one m*n-bit shift register.

## How one shift works: the bubble

Each controller stage is either *full* (its row holds data that the next row
has not yet copied) or *empty* (its row may be overwritten). The state is the
signal `s`: 1 = empty, 0 = full. A stage fires when its predecessor is full
and it is empty. Firing means three things:

1. wait for the predecessor's data to arrive at the latches (`T_DATA`);
2. pulse its row's latch gate `en` (`T_PULSE`);
3. after the pulse (`T_STATE`), become full and make the predecessor empty.

The stages form a ring: c_(j-1) -> c_j for j = 1..n, and c_n -> c_0. At c_0 the
ring has a **join** and a **fork**:

- c_0 also waits for the input environment stage `c_in` to be full (a
  scan-in bit is ready);
- the event that fills c_0 also fills the output environment stage `c_out`.
  It loads the scan-out latch from SL(m,n) with the same `en[0]` pulse.

So c_0 fires only when c_in and c_n are full and c_0 and c_out are empty.

After reset, c_0 is empty and c_1..c_n are full: the ring holds exactly one
empty slot, the "bubble". One shift goes like this:

| step | fires | rows loaded | states afterwards |
|---|---|---|---|
| 1 | c_0 | row 0 <- sc_in / previous column's row n; SCout <- SL(m,n) | c_0 full, c_in and c_n empty, c_out full |
| 2 | c_n | row n <- row n-1 | c_n full, c_(n-1) empty |
| 3 | c_(n-1) | row n-1 <- row n-2 | ... |
| ... | ... | ... | ... |
| n+1 | c_1 | row 1 <- row 0 | c_1 full, c_0 empty: back at rest |

The bubble travels backwards round the ring. Every row is written from a row
that is still holding its old value, and it is written only after its own old
value has been copied forward. The cost is one asP* event per row per shift.
Writing all rows on one edge would need a second latch per bit.

At rest (c_0 empty) row 0 duplicates row 1, so the distinct storage is the
m*n cells of rows 1..n. In path order these are SL(1,1..n), SL(2,1..n), ...,
SL(m,1..n). After one shift, each of these cells holds its predecessor's old
value, SL(1,1) holds the scan-in bit, and the old SL(m,n) has gone out.
`func_q` lists the cells in exactly this order: bit 0 = SL(1,1), bit m*n-1 =
SL(m,n).

## Running a test on `mcsr`

1. **Initialise**: pulse `rst_n` low. c_0, c_in and c_out become empty, and
   c_1..c_n full. Each `asp_ctrl` stays idle until it has seen `rst_n` low
   once.
2. **Insert** (sw = 1, `out_fix_empty` = 1 so scan-out bits are not waited
   for): for each bit, wait for `in_full` = 0, drive `sc_in`, and pulse
   `in_put`. Keep `sc_in` stable until `in_full` falls. m*n bits fill the
   register; the first bit ends up in SL(m,n).
3. **Evaluate**: sw = 0, one `clk` pulse (rows 1..n load `func_d`), sw = 1.
   Change `sw` only with the ring at rest and `clk` low.
4. **Extract** (`in_fix_full` = 1 so the ring refills from `sc_in` without a
   handshake, `out_fix_empty` = 0): for each bit, wait for `out_full`, read
   `sc_out`, and pulse `out_take`. The first bit out is SL(m,n). Release
   `in_fix_full` only just after c_0 has fired (for example after `out_full`
   rises), never in the middle of an event.

With both handshakes live, a new vector can be shifted in while the old one
is shifted out. With both held (`in_fix_full` = `out_fix_empty` = 1) the ring
runs freely, one shift every (n+1) events.

The pulse/level handshake (`in_put`, `in_full`, `out_take`, `out_full`) and
the two hold inputs are this implementation's interface. The environment
stages themselves (c_in, c_out and the scan-out latch) follow the MCSR
structure described above.

## Controller timing model

The controllers are self-timed pulse circuits (GasP style). They work
because of the delays of their own gates, so `asp_ctrl` is a **behavioural
model** with explicit delays in picoseconds. It is not synthesizable: yosys
refuses its `wait` loop, which also means no synthesis sizes are reported for
the modules that contain it. Verilator (`--timing`) simulates it.

The default delays are 15 ps + 30 ps + 16 ps = 61 ps per event. That value is
calibrated, not derived: a 0.13 um, 1.2 V transistor-level implementation of
this scheme has shift cycle times of almost exactly 61 ps x (n+1) at m = 32:

| n | model cycle | transistor-level cycle | overhead vs L1/L2 |
|---|---|---|---|
| 4 | 305 ps | 0.305 ns | 36.7 % |
| 8 | 549 ps | 0.550 ns | 23.0 % |
| 16 | 1037 ps | 1.04 ns | 16.2 % |
| 32 | 2013 ps | 2.02 ns | 12.8 % |
| 64 | 3965 ps | 3.97 ns | 11.1 % |

How the 61 ps is split among data settling, pulse width and recovery is this
model's own choice. Only the event order is prescribed: the pulse starts after
the data has arrived, and both state changes come after the pulse has ended.
Change `T_DATA`, `T_PULSE` and `T_STATE` to explore other circuits. The cycle
is always (T_DATA + T_PULSE + T_STATE) x (n+1).

`asp_ctrl` asserts the protocol rules: a stage's `ready` may not be withdrawn
during its event, and a stage may not be drained while it is empty.

## Clocked MCSR and its clock rules

`mcsr_clocked` fits the MCSR into a conventional, clocked scan flow:

- the scan clock replaces the input environment (`sck` low means c_in full);
- the output stage is removed (c_out is always empty);
- `sc_out` is SL(m,n) itself.

Each falling edge of `sck` fires c_0 once, and the bubble then finishes the
shift by itself. Let T_emp be the time from the sck fall until c_0 is full
(one event, 61 ps), and T_full the time until c_0 is empty again
(61 x (n+1) ps). Then:

- T_emp < sck low time < T_full. Too short a low time withdraws c_0's request
  mid-event. Too long a low time lets c_0 fire twice.
- T_full < sck period.
- `sc_in` must be stable from the fall until T_emp after it. Change it after
  the rising edge.
- `sc_out` changes T_out = 76 ps after the fall (one event, then T_DATA into
  row n). It is valid before the next rising edge.

Assertions in `mcsr_clocked` report a double firing of c_0 and an sck fall
that comes before the previous shift has finished. The request is also gated
with `sw`, so `sck` does nothing in normal mode; that gating is this design's
choice.

## Sub-circuit structure (`clocked_dft`)

Long enable wires across a die would eat the area that the single latches
save. So a large circuit is split into sub-circuits, each with its own small
clocked MCSR, and these are chained into P scan paths SI[p] -> SO[p]. All
sub-circuits share `clk`, `sw` and `sck`.

Chaining works without extra latches because of the timing. A sub-circuit's
c_0 samples `sc_in` within one event after the sck fall. The previous
sub-circuit's last cell changes only when its en_n fires, one event later. So
every sub-circuit takes the bit its neighbour held before the edge.

Paths may differ in the number of sub-circuits (`NSUB[p]`, at most `S`) and
sub-circuits may differ in size (`SUB_M_OF`, `SUB_N_OF`, indexed `p*S+k`, at
most `SUB_M` x `SUB_N`). The functional ports are sized for the largest
sub-circuit. A smaller one uses the low elements and leaves the rest of its
`func_q` at 0.

With sub-circuits of different sizes, the clock rules apply to the extremes:

- the largest T_out must be below the low time;
- the low time must be below the smallest T_full (the smallest n);
- the largest T_full (the largest n) must be below the period.

The defaults (P = 2 paths of S = 2 sub-circuits, all 32 x 16) are illustrative
choices, not given values.

## Area model

Overheads are counted in latch units. L1/L2 scan cells add m*n. The MCSR adds
the m row-0 latches plus three latch equivalents per controller: m + 3(n+1).
This sum is at least 2*sqrt(3mn) + 3, with equality at m = 3n. For 512 scan
bits (m = 32, n = 16) the MCSR costs 16.2 % of the L1/L2 overhead.
`mcsr_pkg` provides `area_typical`, `area_mcsr`, `area_ratio_permille` and
`cycle_ps`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 32 | columns of the MCSR array (scan bits per row) |
| `N` | 16 | rows under test (controllers c_1..c_n) |
| `T_DATA`, `T_PULSE`, `T_STATE` | 15, 30, 16 ps | controller event timing |
| `P`, `S` | 2, 2 | scan paths and largest number of sub-circuits per path in `clocked_dft` |
| `SUB_M`, `SUB_N` | 32, 16 | largest sub-circuit MCSR |
| `NSUB`, `SUB_M_OF`, `SUB_N_OF` | all S, SUB_M, SUB_N | per-path count and per-sub-circuit sizes |

All modules use `timeunit 1ps`.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/mcsr_pkg.sv tb/tb_mcsr_top.sv \
        --top-module tb_mcsr_top -Mdir obj_top -o sim
    ./obj_top/sim

| testbench | what it covers |
|---|---|
| `tb_scan_latch` | both modes, transparency, hold, random sequences |
| `tb_asp_ctrl` | a five-stage linear asP* FIFO: data order, event timing, back-pressure |
| `tb_mcsr` | 4 x 3 MCSR: insertion with an input stall, capture, extraction with an output stall, live exchange, free-running period, order en_0, en_n, ..., en_1 |
| `tb_mcsr_clocked` | 4 x 3 clocked MCSR: shifts per sck cycle, capture, extraction, T_out |
| `tb_clocked_dft` | paths of 3 and 2 sub-circuits of five different sizes: shifting across sub-circuit boundaries, capture |
| `tb_mcsr_top` | the whole design at default size (512-bit async MCSR, 2 x 1024-bit clocked paths): one complete insert/capture/extract, a looped scan path with a 1010... pattern, and the 1037 ps period. About 20 s |
| `tb_table1` | five MCSRs (m = 32, n = 4..64): cycle times and area ratios of the table above, and the area bound |

The simulator is two-state. The testbenches pulse `rst_n` 1 -> 0 -> 1 so that
every asynchronous reset sees an edge.

## What to trust, and where this departs from the scheme

- The cell, the array, the scan order, the ring with its join and fork, the
  initial state, the operating sequence and the clocked variant's rules
  follow the scheme as described. The sub-circuit structure is the same
  scheme applied per sub-circuit.
- The asP* controller is a timed behavioural model, not a circuit. Its
  correctness depends on its delays exactly as a real GasP stage's does. The
  61 ps calibration reproduces the transistor-level cycle times above to
  within 0.7 %. Nothing else about the real circuit (pulse shape, margins,
  power) is modelled.
- The environment stages are small pulse-clocked state bits with a pulse/level
  tester handshake. This handshake, the `in_fix_full`/`out_fix_empty` pins,
  the `rst_n` input, the polarity of `sw` (1 = test) and the active-high latch
  gates are this design's choices.
- Row 0 cells are hard-wired to test mode and have no functional input.
- The circuit under test's logic is outside the design: `func_d`/`func_q`
  connect to it. The tester is also outside the design.
- `scan_latch` is a level-sensitive latch on purpose; Verilator's style
  warnings about `always_latch` are expected.

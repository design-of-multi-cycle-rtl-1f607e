# Even-odd transposition sorters: from one unit to N(N-1)/2

This library sorts an array of N unsigned W-bit numbers (default N = 16,
W = 8) into descending order with the even-odd transposition ("even-odd
permutation") method, and offers the same function in six hardware
structures. They differ in how many compare-and-rearrange units they build
and how many clocks they spend: at one end a purely combinational network
with N(N-1)/2 units, at the other a single unit reused N(N-1)/2 times. The
four multi-cycle structures in between fold the sorting network onto fewer
units by running the same kind of operation several times, with
multiplexers in front of the units, demultiplexers behind them and delay
registers for intermediate results. A designer can pick the trade-off
between area and time that a task needs.

## The sorting network

An even-odd sort of N numbers (N even) runs N *tiers*, alternately even and
odd:

* an even tier compares lanes (0,1), (2,3), ..., (N-2,N-1): N/2 operations;
* an odd tier compares lanes (1,2), (3,4), ..., (N-3,N-2): N/2-1
  operations, lanes 0 and N-1 pass through.

The sort starts with an even tier. After N tiers any input is sorted; the
network holds N/2 · N/2 + N/2 · (N/2 - 1) = N(N-1)/2 operations. Each
operation puts the larger of its two numbers in the lower-numbered lane, so
`d_out[0]` is the largest number and `d_out[N-1]` the smallest. Equal numbers
are allowed; the order is on unsigned values.

`sort_pkg` holds the counting functions (`tier_ops`, `pair_lane`,
`total_ops`) and the idle/run state type shared by the controllers.

## The compare-and-rearrange unit

`compare_exchange` is the one operational unit every structure is made of:
a comparator and two multiplexers. M1 passes the smaller input to `y1`, M2
the larger to `y2`.

The comparator, `gt_comparator`, works without a subtractor. Each bit pair
goes through a half adder fed with `a[i]` and `~b[i]`: the carry says "a
wins at this bit", the sum says "the bits are equal". For every bit a NAND
gate takes that bit's carry and the equality signals of all higher bits; it
goes low exactly when a and b agree above bit i and a has the 1 at bit i.
The AND of all NAND outputs is the active-low result `p_n`: 0 when a > b, 1
when a ≤ b. That signal drives the two multiplexers directly.

`oe_tier` is a row of these units forming one even or one odd tier. The
combinational and pipelined devices and the combined device build from it.

## The six devices

| module | units | clocks from start to result | new array every |
|---|---|---|---|
| `algorithmic_od` | N(N-1)/2 | 0 (combinational) | — |
| `conveyor_od` | N(N-1)/2 | N | 1 clock |
| `combined_mod` | N-1 | N/2 | N/2 + 1 clocks |
| `seq_iter_mod` | N/2 | N | N + 1 clocks |
| `sequential_mod` | N | 2N-2 | 2N-1 clocks |
| `iterative_mod` | 1 | N(N-1)/2 | N(N-1)/2 + 1 clocks |

For N = 16 that is 0, 16, 8, 16, 30 and 120 clocks.
"Clocks from start to result" counts rising edges after the edge that took
the array; the device raises its `done` (or `out_valid`) output right after
the last of them.

### Algorithmic device (`algorithmic_od`)

The network laid out in space: N tiers of `oe_tier`, no registers. It is
the largest device and the only one without a clock.

### Conveyor device (`conveyor_od`)

The algorithmic device with a register bank in front of the first tier and
one after every tier, N + 1 banks or N(N+1) registers. It takes an array on
every clock with `in_valid` high; the array comes out on `d_out`, with
`out_valid` high, N clocks after the input registers took it. The valid bit
is only there so a user can tell real results from an empty pipeline.

### Combined multi-cycle device (`combined_mod`, `combined_ctrl`)

This is the structure with the best balance of area and speed, and the one
worth reading first. The network is the same pattern, an even tier and then
an odd tier, repeated N/2 times. The combined device builds that pattern
once: an even row of N/2 units chained, in the same clock, into an odd row of
N/2-1 units, N-1 units in all. Around it:

* input registers, loaded from `d_in` on the edge that takes `start`;
* one 2:1 multiplexer per lane, selecting the input register in the first
  iteration and the intermediate delay register afterwards (`sel_mux`);
* one 1:2 demultiplexer per lane, sending each iteration's result to the
  intermediate registers, or in the last iteration to the output registers
  (`sel_demux`);
* the control device `combined_ctrl`, an idle/run state machine with an
  iteration counter that produces `load_in`, `step_en`, the selects, `busy`
  and `done`.

The K = N/2 iterations take the K clocks after the start edge. Counting the
start cycle as the first, the result is ready in cycle K + 1: for N = 6 and
the numbers 45 32 67 09 47 78 (hex) the outputs read 78 67 47 45 32 09 in
cycle 4. The per-lane selects are brought out of the device so they can be
watched. All lanes carry the same select value, because in a given
iteration every lane takes the same path.

### Sequential-iterative multi-cycle device (`seq_iter_mod`)

N/2 units do one tier per clock. Operand multiplexers in front of unit j
take lanes (2j, 2j+1) in even tiers and (2j+1, 2j+2) in odd tiers; the last
unit idles in odd tiers. The first tier reads the input registers, later
tiers the delay registers, and after tier N the array goes to the output
registers.

### Sequential multi-cycle device (`sequential_mod`)

This is the hardest one to follow. It has one unit per tier, N units in all.
Each unit works through the pairs of its own tier one after another: a pair
counter drives two N/2-input operand multiplexers. All units share one bank
of delay registers and work *at the same time*. Unit t takes its next pair as
soon as unit t-1 has finished the two operations that pair depends on:

* an odd-tier unit on pair k needs the previous even tier's pairs k and
  k+1 to be done;
* an even-tier unit on pair k needs the previous odd tier's pairs k-1 and k
  to be done (only k-1 for the last pair).

So each tier sweeps across the array a little behind the one before, like a
wave. With pairs counted from k = 0 and cycles from 0, unit 0 does pair k in
cycle k, odd tier 2m+1 in cycle k+3m+2 and even tier 2m (m ≥ 1) in cycle
k+3m. The last operation falls in cycle 2N-3, which gives 2N-2 clocks in all.
In any cycle the units that work touch disjoint lanes, because every lane's
operations form a chain of dependencies. An assertion in the module checks
this. N must be at least 4.

### Iterative multi-cycle device (`iterative_mod`)

One unit performs the whole network, one operation per clock. A tier counter
and a pair counter pick the lanes; the unit's results are written back to
the same two lanes. It is the smallest device and the slowest.

### Handshake of the multi-cycle devices

`start` is taken only while the device is idle. The edge that takes it loads
the input registers; `d_in` may change right after. `busy` is high until the
result is written; `done` is high for one cycle after that; `d_out` holds
the result until the next one is written. A `start` while busy is ignored.
`rst` is synchronous, active high, and clears every register, data included,
so `d_out` reads zero after reset. Each multi-cycle device asserts in
simulation that `done` never comes with `busy` and only follows a run.

## Top level

`sorting_devices_top` places the six devices side by side, each with its own
ports (`alg_*`, `cv_*`, `cmb_*`, `it_*`, `si_*`, `sq_*`); only `clk` and `rst`
are shared. It exists to compare the structures in one build; in a real
system one would use only the device one needs.

## Relative size

Coarse synthesis with Yosys at N = 16, W = 8 gives the word-level cell
counts below. A comparator, multiplexer or adder counts as one cell, so
only the ratios mean anything. Register bits are counted from the RTL.

| device | word-level cells | register bits |
|---|---|---|
| `algorithmic_od` | 3240 | 0 |
| `conveyor_od` | 3247 | 2193 (17 banks of 16 × 8, plus 17 valid bits) |
| `sequential_mod` | 1275 | 450 |
| `combined_mod` | 485 | 390 |
| `seq_iter_mod` | 328 | 390 |
| `iterative_mod` | 149 | 393 |

Every multi-cycle device holds three banks of N numbers (input,
intermediate, output), 384 bits, plus its counters. The sequential device
spends most of its logic on its N lane multiplexers. The conveyor device
costs about as much logic as the algorithmic one, plus its registers.

## Where this RTL departs from the structures it follows

The structures come with unit and register counts and iteration counts;
the wiring of the multi-cycle devices and their sequencing were filled in
here.

* **Sequential-iterative iteration count.** The structure is specified
  with N/2 units and N(N-1)/2 ÷ (N/2) = N-1 iterations. The even-odd network
  has N tiers that depend on each other in a chain, and N/2 units cannot
  finish them in N-1 clocks without chaining two tiers in one clock. This
  device does one tier per clock and takes N clocks.
* **Sequential device sequencing.** The specification gives N units with
  N/2-input multiplexers, a time of roughly N comparator delays plus N/2
  multiplexer delays, and a throughput of one unit step. The overlapping
  waves described above are this design's own way of sequencing the units.
  They take 2N-2 clocks per array and accept a new array only after the last
  one is done. Taking a new array on every step would need a register bank
  per tier.
* **Iterative and sequential-iterative multiplexers.** The specified
  multiplexer and demultiplexer counts (for example two (N/2+2)-input
  multiplexers in the iterative device) are not reproduced exactly. The
  operand selection here is a plain lane selector addressed by counters.
* **Combined device iterations.** Each of the N/2 iterations runs the even
  row and the odd row in one clock. That is the only way N/2 iterations of
  N-1 units can cover all N(N-1)/2 operations.
* **Comparator wiring.** The half-adder and NAND structure and the
  active-low output are as specified; which half-adder output feeds which
  NAND input was worked out here so that the circuit computes a > b.
* **Own choices.** The following are not part of the specification: the
  descending order (taken from the reference example's output order),
  unsigned numbers, even N, the `start`/`busy`/`done` handshake, ignoring a
  `start` while busy, the synchronous reset that clears data, and the
  conveyor's valid bit.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and stops through a watchdog if it
hangs. Expected results come from an insertion sort in `tb/tb_sort_pkg.sv`,
not from an even-odd network.

| testbench | what it checks |
|---|---|
| `tb_gt_comparator` | all 4-bit input pairs; random 8- and 16-bit pairs |
| `tb_compare_exchange` | all 4-bit input pairs; random 8-bit pairs |
| `tb_algorithmic_od` | all 256 inputs at N = 4, W = 2; the six-number example; random and patterned arrays at N = 6 and 16 |
| `tb_conveyor_od` | 400 arrays streamed one per clock with bubbles, at N = 6 and 16: order, exact latency, full pipeline, reset |
| `tb_combined_ctrl` | the select and enable sequence, clock by clock, at N = 6 and 16, with `start` held during a run |
| `tb_combined_mod`, `tb_iterative_mod`, `tb_seq_iter_mod`, `tb_sequential_mod` | through `tb/mod_driver.sv`, at N = 6 (the example first) and 16: result, exact latency, `busy`/`done`, reset, a `start` while busy |
| `tb_sorting_devices_top` | through `tb/top_exerciser.sv`: 40 arrays through all six devices at the default size, with no parameter overrides. It checks every result and latency, and that every mechanism happens: a full conveyor pipeline, the combined device's select switching, starts ignored while busy, and sequential-device runs short enough that tier units must have overlapped |
| `tb_workloads` | the same exerciser on two more copies of the top: N = 6, W = 8, where every device first gets the example array, and N = 8, W = 4 |

Patterned arrays include all-equal, ascending, descending, alternating and
many-duplicate inputs.

To run one with Verilator 5 from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/sort_pkg.sv tb/tb_sort_pkg.sv tb/tb_combined_mod.sv \
  --top-module tb_combined_mod --Mdir obj_combined -o sim
./obj_combined/sim
```

Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/sort_pkg.sv rtl/<module>.sv`.

## Changing the size

Every module takes `N` (count of numbers, even; at least 4 for
`sequential_mod`) and `W` (bits per number). The comparator and all
counters scale with them. The combinational and pipelined devices grow as
N², the combined device as N. To sort fewer numbers than N, fill the spare
lanes with 0; they sort to the bottom.

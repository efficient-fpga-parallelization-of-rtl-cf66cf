# Parallel Lipschitz interpolation engine

This is an FPGA engine that evaluates a Lipschitz-interpolation model for one
query point. It handles thousands of stored samples in a few dozen clock
cycles. A model of this kind stands in for an expensive function, such as a
model-predictive control law. Evaluating it needs only subtraction, absolute
value, comparison and one final halving, so the whole computation can be
spread over many small parallel lanes without a single multiplier.

The default build handles a data set of up to 256 × 55 = 14 080 points with
3 inputs and 1 output, in 16-bit fixed point. It answers a query in 57 clock
cycles, which is 855 ns at a 15 ns clock. These are the sizes of a
self-balancing two-wheel robot controller: the control law is learnt from
14 000 recorded states and must be evaluated well within a 40 ms sampling
period.

## The computation

Assume a data set of points `(w_i, f_i)` and a function with Lipschitz
constant `L`. The estimate at a query `q` is the midpoint of the tightest
enclosure the data allow:

```
ceiling  u_i = f_i/L + |q - w_i|_inf
floor    l_i = f_i/L - |q - w_i|_inf
f~(q)    = ( min_i u_i + max_i l_i ) / 2          prediction = L * f~(q)
```

There are two tricks that make this cheap in hardware:

* **Outputs are stored pre-divided by L.** The only multiplication in the
  textbook formula (`L * |q - w_i|`) disappears, and `L` is applied to the
  result by whoever consumes it. Everything stored and everything in
  `f_out` is in "divided by L" units.
* **The distance is the infinity norm.** It costs one subtractor and one
  absolute value per input, plus a maximum. A Euclidean norm would need
  multipliers and a square root.

Each point's ceiling and floor do not depend on the other points. All that
couples the points is the final minimum and maximum, and a reduction tree
computes those.

## Datapath

```
            +-----------+     +------+
  q ------->|           |     |      |
  BRAM 0 -->|  ECAU 0   |---->|      |     +------------+     +------+     +-----+
  BRAM 1 -->|  ECAU 1   |---->| K-in |---->| partial    |---->| n-in |---->| ALU |--> f_out
   ...      |   ...     |     | tree |     | results    |     | tree |     |     |
  BRAM K-1->|  ECAU K-1 |---->|      |     | (n entries)|     |      |     +-----+
            +-----------+     +------+     +------------+     +------+
                    ^ addr/ena                 ^ addr/enb           ^ out_ld
                    +---------------- lip_fsm -+--------------------+
```

| Module | Role |
|---|---|
| `lip_data_bram` | One of K data memories. Row `a` holds the point this lane works on in batch `a`. Simple dual-port RAM with a registered read. |
| `lip_ecau` | Enclosure calculation arithmetic unit, one per lane. Computes `d = max_k |q_k - w_k|`, then `u = f + d` and `l = f - d`. Combinational. |
| `lip_minmax` | One comparison block. Merges two {ceiling, floor} pairs into {min ceiling, max floor}. |
| `lip_cmp_tree` | Balanced binary tree of `lip_minmax`, `ceil(log2 N)` levels deep. Combinational. It is used twice: over the K lanes and over the n partial results. |
| `lip_partial_mem` | n entries, one {min ceiling, max floor} pair per batch. All entries are readable at once, so it is built from registers. |
| `lip_output_alu` | `(min_u + max_l) >>> 1`, with the sum one bit wider. Result register with a load enable. |
| `lip_fsm` | Moore sequencer that walks the memories through the n batches. |
| `lip_top` | Wires everything together and adds the query register and the load port. |
| `lip_pkg` | Default sizes and the sequencer state type. |

### Batching

If K lanes cannot take the whole data set at once, the set is split into
`n = ceil(N_D / K)` batches. Memory `b`, row `a` holds one point of
batch `a`. Each cycle, all K memories read row `a`, the K ECAUs and the
K-input tree reduce that batch to one pair, and the pair is stored in entry
`a` of the partial-result memory. After n cycles, a second tree (n inputs)
reduces the stored pairs and the ALU halves their sum. A power-of-two K is
not required. Neither tree needs a power-of-two input count: missing leaves
get a pair that never wins (most positive ceiling, most negative floor), so
the comparators they feed reduce to wires.

### Sequencing and timing

The core of `lip_fsm` is a ring of n address states. Each rising edge
advances the memory address by one, and after the last row it returns to
row 0. Around the ring there are three framing states:

* `IDLE` waits for `start`.
* `FLUSH` writes the last batch's partial result. The data memories have one
  cycle of read latency, so the partial-result write for batch `a`
  (`enb`, `addr_b = a`) comes one cycle after the read of row `a`
  (`ena`, `addr_a = a`).
* `OUT` loads the output register from the second tree.

Timing at the top level:

| edge after the one that took `start` | what happens |
|---|---|
| 1 … n | memories read rows 0 … n-1 |
| 2 … n+1 | partial results of batches 0 … n-1 written |
| n+2 | output register loaded, `valid` rises, `busy` falls |

So a prediction takes **n + 2 cycles**, which is 57 at the default size.
Throughput is bounded by the n memory reads; the two extra cycles are fixed
overhead. `valid` stays high and `f_out` holds its value until the next
`start`. A `start` while `busy` is high is ignored. To run back to back,
hold `start` high.

The longest combinational path is one memory read through an ECAU and the
`log2 K = 8` levels of the K-input tree. Those levels are not pipelined,
because one batch has to finish per cycle. A 15 ns clock is the target for
a 7-series FPGA.

## Number format and error budget

Every signal uses the same signed two's-complement format: 1 sign bit,
`IBITS = 3` integer bits and `FBITS = 12` fractional bits, 16 bits in all.
All arithmetic wraps at 16 bits, with one exception: the output sum is one
bit wider.

* **Range.** Inputs and stored outputs are scaled to [0, 1]. Differences
  then lie in [-1, 1], distances in [0, 1], ceilings in [0, 2] and floors in
  [-1, 1]. Everything fits in [-2, 2], so two integer bits would do. The third
  is a guard bit. The format covers [-8, 8), so nothing overflows as long as
  the inputs respect the scaling. Nothing checks this in hardware.
* **Precision.** Each stored or query word is within `a = 2^-13` of its real
  value. A distance is therefore within `2a`, and a ceiling or floor within
  `3a`. The minimum and maximum do not widen the error, and neither does
  averaging two values that are each within `3a`. The halving shift rounds
  toward minus infinity, which can add up to one more `a`. The worst-case
  output error is therefore `4a ≈ 4.9e-4`. The `3a ≈ 3.66e-4` figure used to size the fraction
  ignores the shift. In the full-size test, 1 query in 2500 went slightly
  over `3a` (3.69e-4). The largest error otherwise stayed close to 3e-4.
  The default fraction width is sized against `3a`, so the guaranteed bound
  of the default build is 4.9e-4, not the 4e-4 target. A result register
  one bit wider, which keeps the bit the shift drops, would restore `3a`;
  that change is not made here.

`lip_pkg` derives the two bit counts rather than stating them. `ibits_min`
takes the largest signal magnitude (2.0) and returns the bits needed to hold
it plus a guard bit. `fbits_min` takes the allowed error (4e-4) and returns
the smallest fraction whose `3·2^-(FBITS+1)` bound meets it. Change
`LIP_VMAX` or `LIP_RHO_MAX` to re-size every default together. The smallest
format that meets both constraints is also the cheapest, because the area
and energy of this multiplier-free datapath grow linearly with the word
width.

To trade area for precision by hand, change `W`. The format is only a convention:
the RTL is a plain W-bit signed datapath and knows nothing of the binary
point. Rescale the data to match.

## Loading the data set

The top has a load port. Data are written while `busy` is low, one row per
cycle: `ld_we`, `ld_bank` (which memory), `ld_addr` (which batch) and
`ld_data`. A row is packed outputs first:

```
ld_data = { f~_1, ..., f~_NY, w_1, ..., w_NW }     f~_1 in the top W bits
```

Any assignment of points to (bank, batch) slots works. A data set smaller
than K × n must fill the spare slots with copies of one of its own points.
A duplicate cannot change any minimum or maximum, so the result is the one
for the real set, and no "valid" bit or mask is needed. Writes while `busy`
is high are dropped.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 16 | word width (1 + 3 + 12) |
| `NW` | 3 | inputs per point / query dimension |
| `NY` | 1 | outputs per point (one comparator tree per output, sharing the distance) |
| `K` | 256 | lanes: memories, ECAUs and tree leaves |
| `DEPTH` | 55 | batches n, the depth of every memory; `ceil(14000/256)` |

K = 256 is the largest lane count reported to fit the 53 200 LUTs of the
Zynq-7000 device targeted (implementation results, not reproduced here). `DEPTH` is fixed when the design is built, so each
prediction always takes `DEPTH + 2` cycles. For a smaller data set, build
with `DEPTH = ceil(N_D / K)` or pad the set.

## Where this RTL makes its own choices

These points are not set by the architecture. They are choices made here:

* **Control interface.** The architecture has only a clock, a query and an
  output. The `start`/`busy`/`valid` handshake, the query register (`q` is
  captured when `start` is taken), the asynchronous active-low reset and the
  load port are all additions. The memories are not reset.
* **Latency.** The latency is `n + 2` cycles. A strict reading of the
  architecture gives `n` cycles.
* **Division by two.** It is a one-bit arithmetic shift. One drawing of the
  architecture labels the ALU `(u + l) >> 2`. Since the formula has a factor
  of ½, this RTL shifts by one bit.
* **Comparison block.** It is built from one signed less-than and one signed
  greater-than, each driving a multiplexer.
* **Partial-result memory.** It is registers, not a block RAM, because all
  n entries must be read in the same cycle.
* **Padding.** Spare slots take duplicate points, and tree leaves are padded
  with neutral pairs.

Not included: the processor interface (an AXI-Lite link to an ARM core was
used for processor-in-the-loop tests, with no register map available) and
the scaling of the result by `L`.

## Verification

Each module has a self-checking testbench in `tb/`. The tests use random
operands and compare them against integer models written independently of
the RTL.

| Testbench | What it checks |
|---|---|
| `tb_lip_minmax` | min/max of random words, extremes and ties |
| `tb_lip_ecau` | distance, ceilings and floors for operands in [0, 1] |
| `tb_lip_cmp_tree` | trees of 13 (padded), 8 and 1 leaves |
| `tb_lip_data_bram` | read latency, hold while `ena` is low, overwrite |
| `tb_lip_partial_mem` | writes land in one entry only; enable respected |
| `tb_lip_output_alu` | floor of half the sum over the full signed range; reset; hold |
| `tb_lip_fsm` | cycle-by-cycle trace at depths 5 and 1; starts while busy ignored |
| `tb_lip_top` | end to end at K = 4, n = 5, 2 outputs: random and corner queries, padded data set, latency n+2, ignored start and load while busy; each mechanism is counted and must occur |
| `tb_lip_time_sweep` | engines of K = 16 built for 16, 100, 500 and 1000 points (1, 7, 32, 63 batches): exact results, latency DEPTH+2 at each size (uses `tb_lip_sweep_unit`) |
| `tb_lip_range_eval` | 10^5 random samples scaled to [0, 1] through ECAUs, a comparison block and the ALU: exact results, and every internal signal inside [-1, 2] |
| `tb_lip_top_full` | default parameters: 14 000 synthetic points plus 80 padding copies, 2500 queries, bit-exact against an integer model and within `4·2^-13` of the real-valued formula, latency 57 for every query |

`tb_lip_ref_pkg` holds the reference model. It evaluates the formula point
by point.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` at the end. A
watchdog stops a run that hangs. Build and run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lip_top_full \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lip_pkg.sv tb/tb_lip_ref_pkg.sv tb/tb_lip_top_full.sv -o sim
./obj_dir/sim
```

The full-size test builds in about 20 s and runs in under 10 s. The data in
it are synthetic: uniform random inputs and outputs. The real robot data
set is not included. The tests therefore check that the arithmetic is
exact, but they do not check the quality of the learnt controller.

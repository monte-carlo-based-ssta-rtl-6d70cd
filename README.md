# A netlist-shaped pipeline for Monte Carlo statistical timing analysis

Statistical static timing analysis (SSTA) asks for the *distribution* of a
circuit's worst (or best) path delay when every gate delay varies randomly. The
usual reference method is Monte Carlo. Each run draws one random delay for every
timing arc of every gate, then does an ordinary static timing analysis (STA) of
that "virtual die". Many thousands of runs are needed, and the runs are
independent of each other.

This design turns the circuit under analysis into the analysis hardware. Every gate
of the target netlist becomes a small unit, the **DGLC** (delay-sample generator
and latest-arrival-time calculator). Every wire of the netlist becomes a **link**
between DGLCs. A DGLC draws fresh normal delay samples for its input arcs on every
clock. It adds them to the arrival times on its inputs and registers the maximum:
one gate level per clock. Because the structure is the netlist itself, a new Monte
Carlo run can enter every clock. The engine therefore delivers **one complete STA
of the whole circuit per clock cycle**, after a latency of the logic depth plus
one. The engine has to be rebuilt for each netlist. This suits an FPGA, where the
engine is re-elaborated for the circuit at hand.

```
            run r enters (PI arrival = 0)              one sample per clock
                 |                                             ^
   PI ---------->+--> DGLC(level 1) --link--> DGLC(level 2) ... |
                 |        |                       ^            |
                 |        +--link (regs)----------+            |
                 +--> DGLC(level 1) --link--> ... --> PO links -> sink max/min -> delay_o
                                                                      |
                                                              delay_histogram
   DGLC:  at_i[0] --(+ delay sample 0)--\
                                         >-- max / min --[reg]--> at_o
          at_i[1] --(+ delay sample 1)--/
   delay sample k = MEAN_k + round(SIGMA_k * z_k),  z_k from an NDRNG (12 LFSR uniforms)
```

## Files

| file | contents |
|------|----------|
| `rtl/mcssta_pkg.sv` | widths, number formats, the `gate_t` netlist record, cell delays, the c17 example netlist |
| `rtl/mult6_netlist_pkg.sv` | 6x6-bit array multiplier netlist (318 gates), built by constant functions; the default target |
| `rtl/mcssta_top.sv` | the engine: DGLC array, links, sink comparator, run tracking, histogram |
| `rtl/dglc.sv` | per-gate unit: arc delay generators, saturating adders, comparator, output register |
| `rtl/arc_delay_gen.sv` | one arc: normal sample scaled to the arc's mean and sigma |
| `rtl/ndrng.sv` | normal random numbers by the central limit theorem |
| `rtl/lfsr_rng.sv` | leap-forward LFSR, 96 uniform bits per clock |
| `rtl/at_comparator.sv` | N-input max/min |
| `rtl/link.sv` | DGLC-to-DGLC connection with pipeline balancing registers |
| `rtl/delay_histogram.sv` | distribution of the circuit-delay samples |
| `tb/` | one self-checking testbench per module, reference models, a per-run exact checker |

## Number formats

* **Delays and arrival times** are unsigned 16-bit integers (`delay_t`). The
  netlists shipped here use 0.1 ps per LSB, so the range is 6553.5 ps. Every
  addition saturates at 65535 instead of wrapping.
* **Arc delay distributions** are normal, given per input arc as a mean and a
  standard deviation in the same unit (`gate_t.mean[k]`, `gate_t.sigma[k]`).
  Whoever writes the netlist record converts floating-point library data to these
  integers.
* **Normal samples** `z` are signed 14-bit numbers with 9 fraction bits.

## The random-number chain (lfsr_rng -> ndrng -> arc_delay_gen)

Every delay arc has its own chain, so the arcs of one run are independent.

1. `lfsr_rng` is a 64-bit Fibonacci LFSR for x^64+x^63+x^61+x^60+1. It is
   advanced 96 steps per clock by an unrolled XOR network. The 96 new bits are the
   output word.
2. `ndrng` cuts the word into twelve 8-bit uniforms `u_i` and forms
   `z = 2*sum(u_i) - 12*255`, in units of 1/512. The mean is exactly zero. The
   variance is `12 * 4 * (2^16-1)/12 / 512^2`, which is 1 to within 2^-16. So the
   sum needs no scaling: this is the classic "sum of twelve uniforms" generator.
   The tails stop at about 6 sigma.
3. `arc_delay_gen` forms `MEAN + round(SIGMA * z / 512)`. This is one
   constant-coefficient multiply and one add, rounded half-up. The result is
   clamped to `[0, 65535]` because a delay cannot be negative. With sigma at 10 %
   of the mean, the clamp lies 10 sigma away and never acts.

Each arc's seed is set at elaboration (splitmix64 of the gate and arc index in
`mcssta_top`). All arcs run the same m-sequence of period 2^64-1 at different
phases. Each chain has two registers (z, delay) behind the LFSR. These only
delay the random stream; they add no latency to a run.

## Pipeline timing and run alignment

This section covers the part that is easiest to get wrong.

**Levels.** Primary inputs are level 0. A gate is level `1 + max(level of its
inputs)`. `mcssta_top` computes the level table once at elaboration
(`calc_levels`). This requires the netlist record to be in topological order.
The depth `D` is the largest level among the primary outputs.

**One level per clock.** A DGLC registers its output. A run that enters at
enabled clock `r` reaches the output register of a level-L gate at clock `r+L-1`.
All primary-input arrival times are 0, so the primary inputs need no pipeline.

**Links balance paths.** Suppose a gate at level `Ld` is fed by a gate at level
`Ls < Ld-1`. The value arriving from that driver belongs to an older run than the
other inputs. The link therefore holds `Ld-1-Ls` registers (`link` with
`LAT = Ld-1-Ls`; `LAT = 0` is a plain wire). Primary outputs are padded the same
way to level `D`. Without this, reconvergent paths would combine delay samples of
different runs. The mean would hardly change, but the correlation that
reconvergence creates would be lost. An example from the c17 netlist: G22 =
NAND(G10, G16) has G10 at level 1 and G16 at level 2, so the G10 -> G22 link
holds one register.

**Sink and latency.** An `at_comparator` takes the max (or min) over the padded
primary outputs. Its result is registered as `delay_o`. The sample of the run that
entered at enabled clock `r` therefore appears after enabled clock `r+D`, which is
`D+1` enabled clocks including the entry clock. `delay_valid_o` pulses once per
new sample. At the default (the multiplier, `D = 48`) the latency is 49 clocks.

**Valid tracking, stalls and the mode switch.** A shift register `vld_q[1..D]`
follows the runs through the levels.
* `en` low freezes every register in the engine, including the LFSRs, the links
  and `vld_q`. No sample is reported during a stall, and the analysis resumes
  exactly where it stopped.
* `mode_min` selects latest arrival / longest path (max, 0) or earliest arrival /
  shortest path (min, 1). The input goes straight to every comparator. A run that
  straddles a change would mix the two analyses, so a change clears `vld_q`. The
  run that enters on the switching clock is the first valid one of the new mode.
  Its sample appears `D+1` enabled clocks later. The runs that were in flight are
  lost, not reported wrongly.

## The DGLC

`dglc` holds one `arc_delay_gen` per used input (`N_IN` is 1 for an inverter and
2 for NAND2/NOR2). Each clock it computes `sat(at_i[k] + delay_k)` for every arc
and reduces the sums with `at_comparator`. The result goes into the `at_o`
register. The arc delay samples are registered, so the critical path of a DGLC is
one 16-bit adder plus one compare-select. The per-arc mean, sigma and seed come in
as packed parameter vectors, taken from the netlist record.

## Describing a target netlist

A netlist is an array of `gate_t` records (`mcssta_pkg`):

```
kind   : GT_INV, GT_NAND2 or GT_NOR2 (documentation only; the timing is in the arcs)
n_in   : 1 or 2
src[k] : driving node of input k  (node n < N_PI is a primary input,
                                    node N_PI+g is the output of gate g)
mean[k], sigma[k] : arc k delay distribution
```

Hand it to the engine together with the primary-output node list:

```systemverilog
mcssta_top #(.N_PI(5), .N_GATES(6), .N_PO(2),
             .GATES(mcssta_pkg::C17_GATES), .PO(mcssta_pkg::C17_PO),
             .HIST_BASE(16'd700), .HIST_SHIFT(2)) u_engine (...);
```

`mcssta_pkg::mk_gate(kind, a, b)` fills in the cell delays of the small library
in the package. Those are NAND2 25.0/28.0 ps, NOR2 32.0/35.0 ps and INV 18.0 ps,
with sigma 10 % of the mean. They are illustrative numbers, not data from a
library. A netlist computed by a constant function should be built as an array of
`gate_bits_t`: the same record as a plain vector, assignable to `gate_t`.
Some tools cannot evaluate constant functions that return arrays of structs.
`mult6_netlist_pkg` shows the pattern.

### Default target: 6x6-bit array multiplier

The default engine analyses a 6x6-bit unsigned array multiplier built from
NAND2 and INV cells.
* It has 36 AND partial products (NAND2 + INV each).
* It has five ripple-carry adder rows: 6 half adders of 5 gates and 24 full
  adders of 9 NAND2.
* In total that is 318 gates and 594 delay arcs, with 12 inputs, 12 outputs and a
  depth of 48.

The package's gate records are checked to multiply correctly for all 4096 input
pairs. With the package's cell delays, the nominal longest path is 1307.0 ps. The
Monte Carlo mean of the longest path is about 1346 ps, with sigma about 14.2 ps.
The histogram defaults (64 bins of 3.2 ps from 1250.0 ps) cover that distribution
with the tail beyond 1454.8 ps gathered in the last bin.

## Collecting the result: delay_histogram

Every valid sample increments one of `HIST_BINS` 32-bit saturating counters.
* Bin `b` covers `HIST_BASE + b*2^HIST_SHIFT` up to, but not including, the next
  bin's start.
* Samples below the base go to bin 0.
* Samples beyond the last bin go to the last bin, so the right-hand tail, which
  decides timing yield, is never lost.

`hist_n_samples_o` counts all samples. `hist_clear_i` zeroes everything.
`hist_rd_addr_i` / `hist_rd_data_o` is an asynchronous read port for reading the
bins after an analysis. The histogram takes one sample per clock and never stalls
the engine.

## Cost

Hardware grows linearly with the netlist. Coarse synthesis of the default engine
(594 arcs) gives about 118,000 flip-flop bits, roughly 200 per arc. Most of them
are the LFSR state (64) and output word (96). The XOR network of the 96-step
leap-forward dominates the logic. For larger netlists the obvious savings are
fewer uniform bits per sample (`N_UNIF`, `U_W`) or LFSR words shared between arcs.
Neither is implemented.

## How far it can be trusted

Each module has a self-checking testbench that compares against models written
separately from the RTL:

| testbench | what it checks |
|-----------|----------------|
| `tb_lfsr_rng` | every 96-bit word against a bit-serial recurrence model; hold on stall; period 255 of an 8-bit instance |
| `tb_ndrng` | every sample against the sum of a separately generated word; mean, variance and range over 20000 samples |
| `tb_arc_delay_gen` | every sample against `mean + floor(sigma*z/512 + 0.5)`; mean and sigma; both clamps |
| `tb_at_comparator` | random and corner vectors, both modes, N = 2 and 5 |
| `tb_link` | LAT 0, 1, 4 against a queue, with random stalls |
| `tb_dglc` | two- and one-input DGLC against separate arc generators; saturation; both modes; stalls |
| `tb_delay_histogram` | every bin against a model, underflow, tail, counter saturation, clear |
| `tb_mcssta_top` | the engine on c17: exact per-run check of every sample, latency D+1 after start and after each mode switch, sample count, mean and sigma of max and min delay against a software Monte Carlo (Box-Muller normals), histogram bins, clear |
| `tb_mcssta_full` | the engine at its default parameters (the multiplier): a 17000-run max analysis and a 2000-run min analysis with the same exact, latency, count, statistics and histogram checks, plus the 99.9 % point of the delay from the histogram against 17000 software runs |

The exact per-run check (`tb/mcssta_run_checker.sv`) records, at every enabled
clock, the delay sample that each arc applies. From those samples it recomputes
the STA of every reported run. It therefore proves the alignment of runs through
the links, not only the statistics. On the multiplier, the engine's mean and sigma
agree with the software Monte Carlo to within its sampling error. In one 17000-run
analysis the mean was 1346.3 ps against 1346.2 ps and sigma 14.2 ps against 14.0 ps.
The 99.9 % point read from the histogram was 1394.0 ps (a bin edge) against
1393.4 ps.

The normal generator is the weakest part statistically. A 12-term uniform sum has
no tail beyond 6 sigma, and its far tail (beyond about 4 sigma) is thinner than a
Gaussian's. Yield estimates at very high confidence levels depend on exactly that
tail. The testbenches check mean, variance and range, not the tail shape. Each
chain uses one LFSR for all twelve uniforms, which are consecutive, linearly
related bits of one m-sequence. This is common practice but untested here beyond
the moments.

The package defines a NOR2 cell, but neither shipped netlist uses it. The engine
treats every cell alike, through its arc records, so only the cell's delay numbers
are unexercised.

## Simulating

With Verilator 5 (any testbench works the same way):

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/mcssta_pkg.sv rtl/mult6_netlist_pkg.sv tb/mcssta_ref_pkg.sv \
    tb/tb_mcssta_full.sv --top-module tb_mcssta_full -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. `tb_mcssta_full` builds
in about a minute and runs in seconds. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/mcssta_pkg.sv rtl/mult6_netlist_pkg.sv rtl/<module>.sv`.

## What follows the original scheme and what is this design's own

Following the scheme:
* one DGLC per gate, made of NDRNGs, adders and a comparator;
* LFSR uniform generators feeding the normal generators;
* normal arc delays given by a mean and a standard deviation per arc;
* per-instance delay parameters and RNG seeds;
* max or min analysis;
* one gate level per clock in a fully pipelined engine generated per netlist;
* NAND/NOR/INV cells;
* a 6-bit multiplier as the evaluated circuit.

This design's own choices:
* the generation of the engine by SystemVerilog generate loops from a netlist
  record, instead of a separate netlist-to-RTL program;
* the central-limit normal generator and all word widths and number formats;
* the LFSR polynomial and leap-forward;
* the saturation and clamping;
* the link balancing registers;
* the enable/stall and the mode switch with flush;
* the sink comparator over the primary outputs;
* the histogram;
* the multiplier's gate structure, the cell delays and the c17 example.

Not covered: the software parts of such a flow. These are the netlist parser,
the GPU implementation of sample-parallel Monte Carlo, and sampling schemes such
as quasi Monte Carlo or MCMC that reduce the number of runs. They are algorithms
for processors, not hardware.

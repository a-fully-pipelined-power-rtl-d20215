# Monte Carlo statistical timing analysis as a hardware pipeline

Monte Carlo statistical static timing analysis (MC-SSTA) estimates the
distribution of a circuit's arrival times by running ordinary static timing
analysis over and over, each time with a fresh random delay for every gate arc.
It is the accuracy reference for faster SSTA methods, and it is slow in
software because millions of STA runs are needed.

This RTL turns the circuit under analysis itself into the analysis engine.
Every logic gate of the target netlist becomes one small hardware unit, a
**DGLC** (Delay sample Generator and LAT Calculator), and the units are wired
together exactly like the gates. Each DGLC draws a normally distributed delay
for each of its input arcs, adds it to the arrival time on that input, keeps the
latest (or earliest) sum, and registers it. Because every DGLC has its own
registers, the netlist becomes a pipeline. Gates at different depths work on
different Monte Carlo samples at the same time, and one complete STA result
leaves the output per sample period.

The repository holds:

* the generic building blocks (`lfsr`, `ndrng`, `dglc`);
* `mcssta_top`, the engine for a three-gate example netlist;
* beside it, a 12-bit seeded LFSR used to demonstrate the seed-loading
  controller.

## Structure

```
mcssta_top
 ├─ u_gate_a : dglc (2 inputs) ─┐
 ├─ u_gate_b : dglc (3 inputs) ─┴─► u_gate_c : dglc (2 inputs) ─► lat_out
 │     every dglc input k:  in_q[k] ──► adder ◄── ndrng[k] ◄── lfsr (32 bit)
 │                          all adders ──► comparator (max / min) ──► link_out register
 └─ u_atpg_lfsr : lfsr (12 bit, stand-alone, own ports)
```

| file | what it is |
|---|---|
| `rtl/mcssta_pkg.sv` | widths, CLT constants, `lat_t`, `link_t`, `analysis_e`, LFSR state codes, saturating add |
| `rtl/lfsr.sv` | seeded Fibonacci LFSR with IDLE/ENA/START seed controller |
| `rtl/ndrng.sv` | central-limit normal generator, one delay sample per 96 clocks |
| `rtl/dglc.sv` | one gate: K input registers, K NDRNGs, K adders, comparator, output register |
| `rtl/mcssta_top.sv` | example netlist A, B → C, plus the 12-bit LFSR |

## The sample period and the pipeline (read this first)

Everything in the engine moves on one strobe, `advance`. It is high for one
clock each time the NDRNGs finish a new delay sample, which takes
N × N_RNG = 12 × 8 = **96 clocks**. On that clock, inside every DGLC:

* the output register takes `max_k(in_q[k] + delay[k])` (or `min`). It uses
  the input registers as they were and the delays that have just been made;
* the input registers take the incoming links.

A gate therefore holds two pipeline registers, one at its inputs and one at its
output, and delays a sample by two advances. In the example, A and B work on
sample n+1 while C combines their results for sample n. A link carries a
`valid` bit next to the LAT. The output's `valid` is the AND of the inputs'
`valid` bits, so invalid data is flushed while the pipeline fills: `lat_out`
becomes valid on the 4th advance after start.

All LFSRs in the engine must be started by the same `seed_en` clock, so that
every NDRNG finishes on the same clock. Each DGLC takes its `advance` from its
first NDRNG, and assertions check that all arcs and all gates stay in step.

Because each path stage adds a sample of latency, two paths of different depth
that meet again combine delays from different Monte Carlo samples. Every
delay is drawn independently, so each combination is still a valid sample. The
one exception is a gate whose output fans out and reconverges later: the two
branches then see different draws of that gate's delay, where a software
MC-SSTA would use one draw. The example netlist has no reconvergent fanout.
For circuits that have it, balancing registers would be needed, and they are
not provided.

Throughput is one output sample per 96 clocks for any netlist size. At 50 MHz
that is about 520,000 samples per second. A million samples take about 1.9 s.

## Delay samples: the NDRNG

Each arc's delay is drawn from N(μ, σ) with the central limit theorem:

    d = σ · 2√3/√N · (X_1 + … + X_N − N/2) + μ,   X_i uniform in (0, 1]

With N = 12 the scale factor 2√3/√12 is exactly 1. The hardware is therefore an
accumulator, a subtraction, one multiplication by the constant σ and one
addition of μ. (For other N the factor is folded into σ at elaboration.)

The uniform numbers come from the arc's own 32-bit LFSR, which moves one bit
per clock. Every N_RNG = 8 clocks its low 8 bits are completely new. They are
read as an integer `u`, and X = (u+1)/256. Twelve such words make one sample.
In fixed point (μ, σ and the sample are unsigned Q8.8):

    S      = Σ (u_i + 1)                       (12 words)
    sample = clamp( μ + floor( σ_eff · (S − 12·128) / 256 ), 0, 65535 )

Samples below zero are clamped to 0. That only happens when μ is within
about 6σ of zero. The (u+1) mapping and the floor together bias the mean up by
`6σ/256 − 0.5` LSB (σ counted in LSBs), which is one LSB for σ = 0.25 (64 LSBs). A 12-term CLT generator
cannot go beyond ±6σ, so the tails are cut there.

`ndrng` timing: the first word is read on the first clock the LFSR runs (the
clock on which it shows the seed). The first `valid` is high 90 clocks after
the clock edge that takes `seed_en`. After that `valid` comes every 96 clocks,
for one clock each time, and `sample` holds its value between pulses.

## The LFSR and its seed controller

`lfsr` shifts left by one bit per clock. The new bit 0 is the XOR of the taps.
With the default taps 32, 22, 2, 1 (x^32 + x^22 + x^2 + x + 1) the period is
2^32 − 1. One million samples use 9.6·10^7 bits per arc, so no bit is reused.

An XOR LFSR that powers up at zero stays at zero. The register is therefore
explicitly reset to zero, and a three-state controller loads a non-zero seed
before shifting:

| state | code | action |
|---|---|---|
| IDLE  | 00 | register held at 0 (reset state); `seed_en` → ENA |
| ENA   | 01 | register ← seed; → START |
| START | 10 | shift every clock; left only by reset |

Every arc gets its own seed so the arcs are uncorrelated. A DGLC derives them
from `SEED_BASE + k·0x9E3779B9`, forced odd. An assertion rejects a zero seed.

The 12-bit instance in the top (`atpg_lfsr_*` ports) uses taps 12 and 1. Seeded
with 0xAAA it gives AAA, 555, AAB, 556, AAC, 559, AB3, 566, ACC. That is the
reference sequence this configuration was matched to. The polynomial is not
maximal-length (period 3255 from that seed), so this instance is a
demonstration of the controller, not a random source.

## Number formats and parameters

| name | default | meaning |
|---|---|---|
| `W_LAT`, `N_FR` | 16, 8 | LAT/delay word, fractional bits (Q8.8, range 0 … 255.996) |
| `N_CLT` | 12 | uniform words per normal sample |
| `N_RNG` | 8 | bits per uniform word |
| `W_LFSR` | 32 | LFSR width |
| `dglc.K_IN` | 4 | inputs of a gate |
| `dglc.MODE` | `LONG_PATH` | `LONG_PATH` = add-max (latest arrival), `SHORT_PATH` = add-min (earliest arrival, hold checks) |
| `dglc.MU`, `dglc.SIGMA` | 1.0, 0.1 per arc | arc delay distribution, Q8.8 |

The adders in a DGLC saturate at full scale. On a tie, the comparator keeps the
lowest input index; `winner` reports which input was kept.

`mcssta_top` uses these example gate delays (Q8.8; μ/σ per arc):
A: 1.0/0.10, 1.2/0.15; B: 0.8/0.08, 1.0/0.10, 1.1/0.12; C: 0.9/0.10 (from A),
1.1/0.10 (from B).

## Mapping another netlist

The engine's shape is the netlist's shape. For a different circuit:

1. Instantiate one `dglc` per gate, with `K_IN` = fan-in.
2. Give each DGLC its arcs' μ and σ in Q8.8 and a distinct `SEED_BASE`.
3. Connect each gate's `link_out` to the `link_in` slots of its fan-out gates.
4. Drive the primary inputs' `link_t` (arrival time plus valid).
5. Drive one `seed_en` to all DGLCs.

Collecting the output samples into a histogram or moments is up to the
consumer of `lat_out`. It is not part of this RTL.

## How far it is verified

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=… failures=…`:

* `lfsr_tb`: reset to zero; the IDLE→ENA→START codes; the 12-bit reference
  sequence; 2000 steps of the 32-bit register against a bit-level model.
* `ndrng_tb`: 300 samples from each of three generators, bit-exact against an
  independent model. This includes a generator that clamps at zero, a
  generator with N = 6 (scale factor folded into σ), and the 90/96-clock
  timing.
* `ndrng_stats_tb`: 100,000 samples (9.6 M clocks). Checks the mean, the
  standard deviation, the fractions within 1/2/3σ, nothing beyond 6σ, and
  lag-1 correlation.
* `dglc_tb`: a 4-input max gate and a 3-input min gate over 200 samples, with
  random input LATs and valid bits, bit-exact against a model. Every input
  wins at least once, and saturation occurs.
* `mcssta_top_tb`: the whole example engine at its default parameters for 400
  samples. Every link, winner and valid bit is checked against a model of
  the netlist. The test also checks the pipeline fill and the 12-bit LFSR
  sequence, and prints the mean and σ of the output LAT.
* `mcssta_top_short_tb`: the same end-to-end check with `MODE = SHORT_PATH`
  (add-min in every gate).

Not verified: timing closure on an FPGA. The critical path is likely the
constant multiply-add-clamp in each NDRNG, and 50 MHz is the target.

## Simulating

With Verilator 5 (a single command per testbench; the package comes first):

```
verilator --binary --timing --assert --top-module mcssta_top_tb \
    rtl/mcssta_pkg.sv rtl/lfsr.sv rtl/ndrng.sv rtl/dglc.sv rtl/mcssta_top.sv \
    tb/mcssta_top_tb.sv
./obj_dir/Vmcssta_top_tb
```

For the other testbenches, list only the RTL files they need (`lfsr_tb`:
package and `lfsr`; `ndrng_tb` and `ndrng_stats_tb`: plus `ndrng`; `dglc_tb`:
plus `dglc`). The testbenches compute their expected values from their own
copies of the LFSR and CLT arithmetic. If you change a formula or default in
the RTL, change the model in the testbench too.

## Departures and open points

* The source design produces the RTL per netlist with a generator program.
  Here the example netlist is written by hand, and the generator is not part
  of this repository.
* The 32-bit taps and shift direction follow the published structure. The
  feedback gate type is taken to be XOR, because that is what gives the
  maximal period.
* The taps of the 12-bit demonstration register (12 and 1) are chosen only
  to reproduce its reference sequence; the source does not state them.
* N_RNG = 8, the Q8.8 format, clamping, saturation, the link valid bit, the
  tie rule and the seed derivation are this design's own choices.
* The source design claims power savings from its choice of tap placement and
  from a 50 %-duty-cycle clocking scheme. Neither is described in enough detail
  to implement, and this RTL has no power-specific logic.
* The source's FPGA project also lists a clock module and two block RAMs
  whose function is not described. The engine takes its clock from a port and
  uses no memories.

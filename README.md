# Glitch-filtered loop unrolling for low-cost FPGAs

Block ciphers and sorting networks apply the same function many times: SIMON-128
runs 68 rounds, AES-256 runs 14, and a 32-input bitonic sorter has 15
compare-exchange stages. There are two usual ways to build them.

- **Sequential.** One round and a register, one round per clock. It is small, but
  it needs a fast clock (on an FPGA, usually from a PLL) and spends energy
  clocking the state register every round.
- **Unrolled.** All rounds in a row, one result per slow clock. No state is stored
  between rounds. But every round turns the uneven arrival times at its inputs
  into glitches, and the next round turns those glitches into more. Deep in the
  chain, most of the switching is glitches, so dynamic energy grows fast with
  the number of rounds.

This RTL keeps the unrolled structure and cuts the glitch cascade. A
transparent latch (a *glitch filter*) sits after every few rounds. It opens
only once the rounds in front of it have settled, so the rounds after it see
one clean transition per clock, not the glitches of every round before. The
latch enables come from one short pulse per clock. The pulse passes through
delay segments built from ordinary FPGA logic: carry chains on Xilinx, LUT
chains on Altera. No extra clocks, PLLs or changes to the FPGA architecture
are needed.

The repository holds this scheme for three workloads: SIMON 128/128, AES-256
and a 32 × 16-bit bitonic sorter. Each is fully unrolled with filters. There
are also partially unrolled SIMON and AES variants, and a top level that
reproduces a bench setup: a cycle counter drives a ROM, which feeds each design.

## How one filtered unrolled cycle works

```
 clk  ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____________________/‾‾‾‾
 launch register  ==X== block n ==================================X== n+1
 en[0] (pulse)    ____/‾\___________________________________________/‾\__
 en[1]            _________/‾\______________________  (Tc later)
 en[2]            ______________/‾\_________________  (2 Tc later)
 ...
 en[NF]           ____________________________/‾\___
 output register                                   X== result n ==
```

1. At a rising edge the launch register takes a new block. The same edge
   starts the enable pulse: `enable_pulse_gen` ANDs the clock with an
   inverted, delayed copy of itself.
2. The pulse runs down a chain of `enable_delay_segment`s, one per filter.
   Segment *f* ends at `en[f]`, which drives the 128 (or 512) latch enables
   of filter *f* and feeds segment *f+1*.
3. Each segment's delay `Tc` must exceed the logic delay `Tr` of the rounds
   between two filters. Filter *f* is then transparent only after its input
   has settled. It passes that value on and closes before the next edge.
4. The last round group drives the output register, which loads at the next
   rising edge. A fully unrolled design therefore gives one result per clock,
   with one clock of latency. The clock period must cover the whole enable
   chain plus the pulse.

A segment is sized as (rounds per filter) × (delay elements per round). The
delay elements per round come from timing analysis of the rounds on a
particular device. The defaults are the values used on Artix-7 and Cyclone IV:

| workload | filter every | Xilinx slices / round | Altera LUTs / round | chain at default, Xilinx | Altera | clock period used |
|---|---|---|---|---|---|---|
| SIMON-128 (68 rounds) | 2 rounds | 3 | 18 | 33 × 4.68 ns = 154 ns | 422 ns | 340 ns / 600 ns |
| AES-256 (14 rounds)   | 1 round  | 7 | 36 | 13 × 5.46 ns = 71 ns  | 166 ns | 175 ns / 300 ns |
| bitonic sort (15 stages) | 2 stages | 7 | 36 | 7 × 10.9 ns = 76 ns | 179 ns | 120 ns / 220 ns |

A filter spacing of 2, 1 and 2 gave the lowest measured energy for these
three workloads. Closer spacing costs latch area; wider spacing lets glitches
build up again. The spacing is the `FILTER_SPACING` parameter. A spacing of
at least the round count removes all filters, which gives the plain unrolled
circuit.

## Delay elements and latches per FPGA family

`FAMILY` (`gf_pkg::family_e`) selects one of two physical forms of every
filter. Both forms behave the same in simulation.

| | `FAM_XILINX` (Artix-7) | `FAM_ALTERA` (Cyclone IV) |
|---|---|---|
| delay element | one slice's carry chain: MUXCYs with select tied high, 780 ps (CYCINIT to CO[2]) | one LUT4, 155 ps, plus about 200 ps of routing within the LAB |
| model | `carry_delay_chain`, `SLICES` × (`SLICE_PS` + `ROUTE_PS`) | `lut_delay_chain`, `LUTS` × (`LUT_PS` + `ROUTE_PS`) |
| latch | slice storage element in latch mode (LDCE), `always_latch` | one LUT per bit with its output fed back: `q = en&d \| ~en&q \| d&q` |

Routing between carry-chain slices depends on placement. It is not modelled:
`ROUTE_PS` defaults to 0, and a real build would constrain that routing
tightly. The consensus term `d&q` in the Altera latch is a choice made here
to keep the feedback latch hazard-free. Between the LUT chain and the latches,
Cyclone IV inserts a global clock buffer. It is treated as a wire.

### What is a model and what is logic

The delays are physical properties of placed FPGA resources. RTL cannot
express them. `enable_pulse_gen`, `carry_delay_chain` and `lut_delay_chain`
are therefore **behavioural models**. They use `#` delays, so a simulator
shows when each latch opens. A synthesis tool ignores the delays: for it the
pulse becomes `clk & ~clk`, a constant 0, and the filters never open. A
synthesis report of the fully unrolled designs shows their outputs as
constant for this reason. To build this on a real device, replace the three
models with vendor primitives (CARRY4 chains, LUT instances, LDCE) and keep
them together with `DONT_TOUCH`-style attributes and placement and delay
constraints. Everything else (rounds, key schedules, sorter stages, latches,
registers, control, ROM) is ordinary synthesizable RTL.

The simulation is zero-delay everywhere except the enable path. The round
logic settles instantly, so simulation cannot show glitches or the energy
they cost. What the testbenches do check is the part the scheme depends on:

- a filter holds the previous block after the launch edge;
- it passes the new block only when its delayed enable arrives;
- the whole chain finishes inside the clock period;
- the results are correct.

## The designs

| module | what it is | main parameters (defaults) |
|---|---|---|
| `simon128_unrolled_gf` | SIMON 128/128, all 68 rounds in one cycle, filters every `FILTER_SPACING` rounds | `FILTER_SPACING=2`, `SLICES_PER_ROUND=3`, `LUTS_PER_ROUND=18`, `FAMILY` |
| `aes256_unrolled_gf` | AES-256 encryption, 14 rounds in one cycle | `FILTER_SPACING=1`, `SLICES_PER_ROUND=7`, `LUTS_PER_ROUND=36` |
| `bitonic_unrolled_gf` | ascending bitonic sorter, N values of W bits, one sort per cycle | `N=32`, `W=16`, `FILTER_SPACING=2`, `SLICES_PER_STAGE=7`, `LUTS_PER_STAGE=36` |
| `simon128_partial_gf` | SIMON with `UNROLL` rounds per clock, ceil(68/UNROLL) clocks per block | `UNROLL=4` (17 clocks; 50 MHz gives 340 ns) |
| `aes256_partial_gf` | AES with `UNROLL` rounds per clock, ceil(14/UNROLL) clocks per block | `UNROLL=2` (7 clocks) |
| `gf_top` | all five side by side, each with a counter, a ROM and its own clock | `FAMILY`, `ROM_DEPTH=16` |

The fully unrolled modules share one interface. The ports are `clk`, `rst_n`,
`key_load`/`key_in` (the key register, not on the sorter),
`in_valid`/`data_in`, and `out_valid`/`data_out`. A word sampled with
`in_valid` at edge *n* appears on `data_out` with `out_valid` after edge *n+1*.
Words may come on every clock. The key schedule is combinational from the key
register. It therefore switches only when the key changes. With a fixed key
it folds away at synthesis.

**Partial unrolling** trades latency for a faster clock. A short chain of
rounds with its filters sits between state registers, and the block loops
through it. The two most recent round keys are registered and the key
schedule is unrolled alongside the rounds. Two things differ from the fully
unrolled version:

- the key logic toggles every cycle;
- the state register is clocked every cycle.

Both limit the savings. The partial interface is `start` (accepted while
`busy` is low), `key_in` and `data_in`, with a one-cycle `out_valid` strobe
after ceil(R/UNROLL) clocks. When `UNROLL` does not divide the round count,
the last cycle takes the state after the remaining rounds. For example,
UNROLL=5 for SIMON uses 3 rounds in its 14th cycle. In AES each slot knows
its round number, so the slot that runs round 14 skips MixColumns.

**Data formats.**
- SIMON: a block is `{x, y}` with x in bits 127:64. The key is `{k1, k0}` with
  k0 (the first round key) in bits 63:0.
- AES: byte 0 of the state is bits 127:120, so FIPS-197 vectors read left to
  right. The key is 256 bits, first byte in bits 255:248.
- Sorter: element *i* is bits `16*i +: 16`. The output is ascending, unsigned.

**Cipher and network internals.** SIMON and AES are the standard
algorithms. Testbenches check them against the published known answers. The
AES S-box is not typed in: `aes_pkg::gen_sbox()` builds it at elaboration by
walking GF(2^8) with generator 3 and applying the affine map. The sorter is
the textbook bitonic network: stage (k, j) pairs element *i* with *i*⊕*j*,
ascending when *i*&*k* = 0. The published work used third-party RTL for AES
and the sorter. It named only their sizes, so the internal structure here
(and the sorter's exact stage wiring) is this design's.

## The bench setup (`gf_top`)

For each design, a free-running `cycle_counter` addresses a `stim_rom`, which
gives a new word every clock. The fully unrolled designs take a word on every
clock while `run` is high. `run` is delayed one clock to match the ROM's read
latency. The partial designs start a new block whenever `run` is high and they
are idle. The keys arrive on ports:

- the fully unrolled designs load them into their key registers with
  `*_key_load`;
- the partial designs take the key at each start, so hold it steady while
  `run` is high.

The results leave on output ports, where a logic analyser would watch them.
The ROM contents are only test data: a 64-bit xorshift sequence (`x ^= x<<13;
x ^= x>>7; x ^= x<<17`) from a per-design seed, computed at elaboration.

Not included: the analog and vendor parts of a power-measurement bench. These
are the current-sense circuitry, the ADC and JTAG bridge, the logic analyser,
the PLL that only the sequential baseline needs, and the FFT core used in an
embedded-application test. Their places are the ports of `gf_top`.

## Simulating

Every testbench checks itself, and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --top-module gf_top_tb -y rtl -y tb \
    rtl/gf_pkg.sv rtl/simon_pkg.sv rtl/aes_pkg.sv rtl/bitonic_pkg.sv tb/ref_pkg.sv tb/gf_top_tb.sv
./obj_dir/Vgf_top_tb
```

`--timing` is required, because the enable path uses delays. The packages
must come first. Replace `gf_top_tb` with any testbench in `tb/`:

- `gf_top_tb`: the whole setup at default parameters, Xilinx form, clocks of
  340/175/120/20/25 ns. It also counts each mechanism: filter enables,
  filter holds, ROM wrap, key reload and multi-cycle partial runs.
- `gf_top_altera_tb`: the same in Altera form, at 600/300/220/35/43 ns.
- `*_unrolled_gf_tb`: each workload in both forms. They check known answers
  and back-to-back streams with a key reload, one-clock latency, and that the
  chain fits the period. They also check that the first filter holds after
  the launch edge.
- `*_partial_gf_tb`: a dividing and a non-dividing `UNROLL`, with exact cycle
  counts.
- `unroll_degree_sweep_tb`: partial SIMON at unrolling degrees 2, 4, 5, 7, 10,
  17 and 68, and partial AES at 2, 4, 6, 8 and 14. Each runs at the clock
  listed for that degree, and the bench checks the results, `ceil(R/U)` cycles
  per block, and that the enable chain closes before every edge.
- `aes_filter_spacing_tb`, `sort_filter_spacing_tb`: the AES and sorter
  designs built with a filter every 1, 2, 3, 5 and 7 rounds (stages), and
  with no filter at all. All six copies get one shared
  stream at the default clock. Every copy must produce correct results one
  clock after launch, with its enable chain closed before the edge. These
  benches check function only: a zero-delay simulation cannot show the
  glitch power that the spacing trades against latch area. SIMON has no such
  sweep: six 68-round copies take too long to compile. It is tested at its
  default spacing; its filter-placement code is written the same way as in
  the other two designs.
- one testbench per leaf block (latch, pulse, delay chains, rounds, key
  schedules, S-box, sorter stage, counter, ROM).

`tb/ref_pkg.sv` holds the reference models. They are written separately from
the RTL packages: the AES S-box there is found by an exhaustive inverse
search.

## Changing it

- **Another device or speed grade.** Set `SLICES_PER_ROUND` / `LUTS_PER_ROUND`
  so that one segment is slower than the rounds it guards. Set `SLICE_PS`,
  `LUT_PS` and `ROUTE_PS` to the measured element delays. Then make sure the
  clock period covers the chain. The testbenches flag an enable that is still
  high at the next edge.
- **Filter placement.** Change `FILTER_SPACING`. Filters sit after rounds that
  are multiples of it. There is never a filter after the last round, because
  the output register takes that round.
- **Pulse width.** `gf_pkg::DEF_PULSE_PS` (1.5 ns) is a choice made here. It
  must be longer than one delay element, because continuous-assignment delays
  are inertial and would swallow a shorter pulse. In hardware it must also be
  long enough for the latches to capture.
- **Reset.** Only the valid flags and control state are reset. The data, key
  and latch contents are not, because a latch primitive with its set/reset
  tied off has no reset.

## Files

`rtl/`: packages `gf_pkg` (family type, element delays), `simon_pkg`,
`aes_pkg` and `bitonic_pkg`; one module per file as listed above, plus the
leaf blocks `glitch_filter`, `enable_pulse_gen`, `carry_delay_chain`,
`lut_delay_chain`, `enable_delay_segment`, `simon_round`, `simon_key_expand`,
`aes_sbox`, `aes_round`, `aes256_key_expand`, `bitonic_stage`,
`cycle_counter` and `stim_rom`. `tb/`: one self-checking testbench per module,
the two end-to-end benches, the unrolling-degree and filter-spacing sweeps,
and `ref_pkg`.

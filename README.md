# Bipartitioned pipeline stage

In a pipelined circuit a large share of the power goes into the pipeline registers,
which reload every input bit on every clock edge whether or not anything useful changed.
This design splits one pipeline stage in two along a single input, the *partition
variable* SEL. By Shannon expansion,

    f(X) = SEL' · f(X)|SEL=0  +  SEL · f(X)|SEL=1

so the stage's combinational block f can be replaced by its two cofactors, each a
smaller circuit that no longer depends on SEL. Each cofactor gets its own input
register. On every clock edge only the register belonging to the current value of SEL is
clocked; the other keeps its contents, so neither it nor the cofactor behind it
switches. A multiplexer picks the active cofactor's result for the output register.

The saving depends entirely on which input is chosen as SEL. If the input sequence keeps
returning to a few patterns that differ in SEL, each register sees only "its" patterns and
stops toggling. Example: a stage whose inputs alternate between 000 and 111 flips all
three input-register bits every cycle. Partitioned on the first input, 000 always goes to
R1 and 111 always to R2, and after one cycle neither register toggles again.

## Structure

```
             +--------- R1 (clk1) ---- Subcircuit1 = f|SEL=0 ---+
 in_data ----+  (inputs without SEL)                            MUX ---- R0 (clk) ---- out_data
             +--------- R2 (clk2) ---- Subcircuit2 = f|SEL=1 ---+ ^
 SEL = in_data[SEL_IDX] ---> bp_clock_ctrl --- clk1, clk2 -------  |
                                         \---- mux_sel ------------+
```

| module            | role |
|-------------------|------|
| `bipartition_top` | the stage: splits the input bus, instantiates everything below |
| `bp_clock_ctrl`   | gating latch, two AND gates (clk1, clk2), select hold for the MUX |
| `bp_pipe_reg`     | rising-edge register with asynchronous reset; used for R1, R2 and R0 |
| `bp_subcircuit`   | one cofactor f\|SEL=SEL_VAL of the chosen function |
| `bp_mux`          | 2:1 output multiplexer, 0 selects Subcircuit1 |
| `bp_pkg`          | the function menu (`bench_e`), widths, cofactor helper |

R1 and R2 store only the inputs other than SEL (N_IN−1 bits each). SEL itself is a
constant inside each register (always 0 in R1, always 1 in R2), so storing it would add
flip-flops without information. The remaining inputs keep their order with the gap
closed.

## Clock gating and timing

This is the part that needs care, and the reason the stage has latches.

SEL is taken straight from the input bus, before any register, so it changes whenever the
inputs change. If it were ANDed with the clock directly, a change of SEL while the clock is
high would cut or create a clock pulse. `bp_clock_ctrl` therefore passes SEL through a
*gating latch* that is transparent only while `clk` is low and holds while `clk` is high:

    clk1 = clk & ~sel_gate      (R1 loads on edges where SEL = 0)
    clk2 = clk &  sel_gate      (R2 loads on edges where SEL = 1)

The enable of each AND gate can change only while `clk` is low, so each rising edge of
`clk` produces exactly one full pulse, on clk1 or on clk2, and nothing while `clk` is high.
The testbench toggles SEL in the middle of the high phase to check this.

The multiplexer needs the SEL value of the *previous* edge for a whole cycle: during the
cycle after edge k, the selected cofactor is evaluating the data captured at edge k, and
R0 samples its result at edge k+1. The gating latch cannot supply this, because it is
open again during the low phase and already follows the next SEL. A second element holds
the latched SEL: in the original arrangement it is a latch open while `clk` is high, fed
by the gating latch, so the two latches together form a master-slave flip-flop on SEL. In
this RTL it is written as a rising-edge flip-flop fed by the gating latch. Its input does
not change while the latch would be open, so the waveform is the same. It also avoids a
zero-delay race in simulation: otherwise the select could change at edge k+1 before R0
samples.

Resulting timing of `bipartition_top`:

* `in_data` (including SEL) must be stable before a rising edge of `clk`; change it while
  `clk` is low or just after the rising edge.
* f(in_data) appears on `out_data` after the following rising edge: a latency of two
  edges and one result per cycle, the same as an unpartitioned stage with an input and an
  output register.
* `rst_n` is an asynchronous, active-low reset that clears R0, R1 and R2. It is level
  sensitive in hardware; in simulation, assert it with an edge (start at 1, then drive 0).

Glitch-free gating relies on normal clock-gating timing closure, as for any
latch-and-AND clock gate. In an ASIC flow the latch and the AND gates would normally be
replaced by the library's integrated clock-gating cell.

## Choosing the partition variable

SEL is chosen before synthesis, not by hardware. The method: take a typical input
sequence for the stage. For each input pin in turn, route every vector of the sequence
(without that pin) to R1 or R2 according to the pin's value. Count the bit toggles each
register would make, and keep the pin with the fewest toggles in total. With n inputs that
is n trials, cheap enough for brute force. Few register toggles also mean low activity at
the cofactors' inputs, so the same choice keeps the subcircuits quiet.

The chosen pin enters the RTL as the parameter `SEL_IDX`. `tb/tb_bp_workloads.sv` carries
out this selection over every pin of every provided function. It also checks that the
register toggles measured in simulation equal the count predicted from the sequence.

## Parameters and functions

`bipartition_top #(.BENCH(...), .SEL_IDX(...))`

| BENCH           | inputs | outputs | function |
|-----------------|--------|---------|----------|
| `BENCH_EXAMPLE` (default) | 3 (a,b,c = in[2:0]) | 2 (f1 = out[1], f2 = out[0]) | f1 = a'c + ab, f2 = ab + bc + ac |
| `BENCH_RD53`    | 5 | 3 | number of ones in the input |
| `BENCH_RD73`    | 7 | 3 | number of ones in the input |
| `BENCH_XOR5`    | 5 | 1 | parity |
| `BENCH_SYM9`    | 9 | 1 | 1 when 3 to 6 inputs are one |

The default is the small example function, partitioned on a (`SEL_IDX = 2`). Its cofactors
are f1 = c, f2 = bc for a = 0 and f1 = b, f2 = b + c for a = 1. The other four are
well-known MCNC/LGSynth91 benchmark circuits, written from their standard definitions.
Port widths follow from BENCH (`N_IN = bench_n_in(BENCH)`, `N_OUT = bench_n_out(BENCH)`).

To add a function, extend `bench_e`, `bench_n_in`, `bench_n_out` and `bench_eval` in
`rtl/bp_pkg.sv` (raise `MAX_IN`/`MAX_OUT` if needed). The subcircuits are written as "the
whole function with SEL tied to a constant", and synthesis reduces each to its cofactor.
For the default configuration one output of Subcircuit1 (f1 = c) is a plain wire from its
input.

## Where this RTL departs from the original architecture

* The select element for the MUX is a flip-flop rather than a high-transparent latch (see
  above). The function is the same.
* The original does not describe a reset; the asynchronous reset on R0, R1 and R2 is an
  addition.
* Which latch drives the MUX select, where the inversion for clk1 sits, and the mux
  polarity are a reading of a block diagram that does not spell them out. The rule "R1
  loads when SEL = 0, R2 when SEL = 1" is from the original.
* For the example function, one written form of f1 (ab + ab') and one wording of the
  cofactors (with a = 0 and a = 1 exchanged) disagree with its truth table. This RTL
  follows the truth table.
* Logic optimisation of the cofactors is left to the synthesis tool.
* Six further benchmarks used to evaluate the architecture (sao2, 5xp1, bw, clip, con1,
  misex1) are arbitrary PLA-style functions whose tables are not available here. They are
  not provided, and the architecture's reported power and delay figures were therefore
  not reproduced.
* The energy evaluation itself was a transistor-level power simulation. Nothing in this
  RTL measures power. The testbenches count register toggles as a proxy.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_bipartition_top` | default stage end to end: exhaustive and random inputs against the example truth table with two-edge latency. Register contents after each edge: the selected register is loaded and the other holds. The 000/111 sequence: R1/R2 make 0 toggles where an ungated register makes 3 per cycle. Counts R1/R2 loads and holds, selections of each subcircuit and SEL changes, and fails if any never occurs. |
| `tb_bp_workloads` | all five functions, each partitioned on every input (29 stages), with a mixed sequence. Checks outputs against reference models and measured R1/R2 toggles against the selection model, and reports the best SEL per function. |
| `tb_bp_clock_ctrl` | one gated pulse per clock edge on the correct gated clock, none while clk is low, no glitch when SEL changes during the high phase, mux_sel held for the whole cycle |
| `tb_bp_pipe_reg` | reset, capture, hold while the clock is stopped, no pass-through while clk is high |
| `tb_bp_subcircuit` | example cofactors against the partitioned truth tables (SEL = a and SEL = c); rd53, 9sym and xor5 cofactors against models |
| `tb_bp_mux` | all select and data combinations at 4 bits |

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/bp_pkg.sv tb/tb_bipartition_top.sv \
        --top-module tb_bipartition_top -o sim
    ./obj_dir/sim

`tb_bp_workloads` needs `-Itb` to find `tb_bp_bench_probe.sv`. Lint with
`verilator --lint-only -Wall -Irtl rtl/bp_pkg.sv rtl/bipartition_top.sv`. The only warning
is an unused upper output bit of the function helper in `bp_subcircuit`, which appears
for functions with fewer than three outputs. Synthesis infers one latch, the intended
gating latch in `bp_clock_ctrl`.

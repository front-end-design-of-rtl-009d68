# Pulsed-latch shift register

A long shift register is nothing but storage elements in a row: there is no
logic between the stages, so speed hardly matters and area and power are
decided almost entirely by the storage element. A pulsed latch (a plain
level-sensitive latch opened by a short clock pulse) is much smaller than a
master-slave flip-flop. It cannot simply replace the flip-flops of a shift
register, though: while one common pulse is high, every latch in the chain is
transparent at once and a bit runs through several stages in one clock.

This design makes a shift register out of latches anyway by giving each
shift **several short, non-overlapping pulses that sweep the chain from its
end towards its input**. Each latch is opened only after its successor has
already copied it, so nothing is lost and nothing races. To keep the number
of distinct pulses small, the latches are split into groups of K that share
the same pulses, and each group ends in one extra *temporary* latch that keeps
the group's last bit safe until the next group has taken it.

The RTL is SystemVerilog (IEEE 1800-2017). The default configuration is
256 one-bit stages in groups of K = 4: 320 latches and 5 pulsed clocks.

## One shift, step by step

Take a sub shift register of K = 4 data latches Q1..Q4 and a temporary latch
T1, followed by a second sub shift register Q5..Q8, T2, and so on. Every
sub shift register gets the same five pulse lines, `CLK_pulse<T>` and
`CLK_pulse<1>`..`CLK_pulse<4>`. Latch Qi of *every* group is opened by
`CLK_pulse<i>`, and every temporary latch by `CLK_pulse<T>`.

For each rising clock edge the five pulses fire one after another:

| step | pulse          | group 1           | group 2           |
|------|----------------|-------------------|-------------------|
| 1    | `CLK_pulse<T>` | T1 <- Q4          | T2 <- Q8          |
| 2    | `CLK_pulse<4>` | Q4 <- Q3          | Q8 <- Q7          |
| 3    | `CLK_pulse<3>` | Q3 <- Q2          | Q7 <- Q6          |
| 4    | `CLK_pulse<2>` | Q2 <- Q1          | Q6 <- Q5          |
| 5    | `CLK_pulse<1>` | Q1 <- IN          | Q5 <- T1          |

In every step the latch being written reads a neighbour that has not yet been
written in this shift. The one exception would be Q5: its natural source Q4
was overwritten in step 2. That is what the temporary latch is for. T1 copied
Q4 in step 1, before Q4 changed, and Q5 reads T1 in step 5. After the
five steps, every data latch holds what its predecessor held before, so the
chain has moved one place. Each Ti holds the same word as the last data latch
of its group did before the shift, which is the word now in the first latch
of the next group.

The cost of a K-bit grouping for an N-bit register (N a multiple of K):

* N data latches plus N/K temporary latches,
* K + 1 pulsed clocks, independent of N.

A larger K means fewer temporary latches but more pulse circuits and a longer
pulse sweep per shift (so a lower maximum shift rate). K = 4 is the
architecture's choice.

## Pulse generation

The pulses must be short, strictly in the order T, K, K-1, ..., 1, and never
overlap. Two generators are provided, selected by the top-level parameter
`PULSE_GEN`.

### Delay-line generator (default, `PGEN_DELAY_LINE`)

This is the generator of the architecture. K + 1 identical clock-pulse
circuits are chained. Each one passes its input clock through a delay element
and two inverters. The node between the inverters is an inverted, delayed
copy of the clock. An AND gate combines it with the undelayed clock, which
gives a pulse at every rising edge. The pulse is `DELAY_PS + INV_PS` wide and
goes out through a clock buffer. The output of the second inverter is the
delayed clock that feeds the next circuit. It rises one inverter delay after
the AND output has fallen, so consecutive pulses are separated by a small gap.
The first circuit drives `CLK_pulse<T>`, the next `CLK_pulse<K>`, and the last
`CLK_pulse<1>`. Because each pulse is cut by an AND gate from two delayed
edges, it can be narrower than the summed rise and fall times of the delay
chain.

With the default delays (40 ps delay element, 5 ps per inverter and buffer),
the j-th pulse of a shift rises `j*50 + 5` ps after the clock edge and is
45 ps wide. A whole sweep takes `(K+1)*50` = 250 ps. So the shift clock
period must be longer than that, and the clock must stay high and low for more
than 40 ps each. The delay values are this implementation's own; the
architecture gives none.

`clock_pulse_circuit` and `delayed_pulse_clock_gen` are **timing models**
built from `#` delays. They simulate correctly with `--timing`. Synthesis
drops the delays, so the pulses, and with them the whole latch array, become
constant. A real implementation would use a delay cell from the target
library.

### Synchronous sequencer (`PGEN_SEQUENCER`)

This generator is an addition of this implementation, for use with
synthesis and FPGA flows. A phase counter on a fast clock runs through
2(K + 1) cycles per shift. It raises one pulse in each even phase (T, K, ...,
1) and leaves every odd phase as a gap. All outputs are flip-flop outputs, so
they are glitch-free. It also produces `main_clk`, a shift clock that is high
in phases 0..K. With this generator, `clk` is the fast clock and one shift
takes 2(K + 1) = 10 of its cycles.

## Top level: `pulsed_latch_shift_reg`

| parameter   | default           | meaning |
|-------------|-------------------|---------|
| `N`         | 256               | number of data stages (multiple of K) |
| `K`         | 4                 | data latches per sub shift register |
| `WIDTH`     | 1                 | bits per stage |
| `PULSE_GEN` | `PGEN_DELAY_LINE` | pulse source (`pls_pkg::pulse_gen_e`) |
| `DELAY_PS`, `INV_PS`, `BUF_PS` | 40, 5, 5 | delays of the delay-line model |

| port       | dir | width         | meaning |
|------------|-----|---------------|---------|
| `clk`      | in  | 1             | shift clock (delay line) or fast clock (sequencer) |
| `rst`      | in  | 1             | asynchronous, active-high clear of all latches and the sequencer |
| `din`      | in  | WIDTH         | serial input |
| `q`        | out | N x WIDTH     | data latches; `q[0]` = Q1 is the newest word |
| `t`        | out | N/K x WIDTH   | temporary latches T1..TM |
| `dout`     | out | WIDTH         | `q[N-1]`, the word that entered N shifts ago |
| `pulse`    | out | K+1           | `pulse[0]` = `CLK_pulse<T>`, `pulse[i]` = `CLK_pulse<i>` |
| `main_clk` | out | 1             | shift clock (`clk` itself with the delay line) |

Timing rules:

* One shift per rising edge of `main_clk`. A word on `din` is in `q[0]` after
  one shift and at `dout` after N shifts.
* `din` is sampled while `CLK_pulse<1>` is high, which is the last pulse of
  the sweep. It may change at the rising edge of `main_clk`.
* `q` and `t` are settled once the sweep is over: 250 ps after the clock edge
  with the default delays, or at the end of the last sequencer phase.
* Every latch has the reset. The generators do not need one for correct
  shifting, but the sequencer is reset too.

Two kinds of assertion guard these rules in simulation.
`latch_shift_array` asserts that at most one pulse is high at a time.
`delayed_pulse_clock_gen` checks, on every clock edge, that the clock period
covers a whole sweep and that each clock phase is longer than one pulse.

## Module hierarchy

```
pulsed_latch_shift_reg          top; picks the pulse source
 |- delayed_pulse_clock_gen     K+1 chained clock-pulse circuits (timing model)
 |   '- clock_pulse_circuit     delay, 2 inverters, AND gate, clock buffer
 |- pulse_sequencer             synthesizable alternative source
 '- latch_shift_array           M = N/K sub shift registers in a chain
     '- sub_shift_reg           K data latches + 1 temporary latch
         '- pulsed_latch        level-sensitive latch with clear
pls_pkg                         pulse-source enum, index of CLK_pulse<T>
```

Lint may report that `pulsed_latch` contains no latch once it is inlined into
a larger design. The `always_latch` block does hold its value when neither
`rst` nor `pulse` is high, and synthesis infers N + N/K latch bits for the
array (320 at the defaults).

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each one also has a watchdog. To build
and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/pls_pkg.sv tb/tb_full_size.sv --top-module tb_full_size
./obj_dir/Vtb_full_size
```

| testbench                    | what it checks |
|------------------------------|----------------|
| `tb_pulsed_latch`            | transparency, hold and clear against the latch rule, random steps |
| `tb_sub_shift_reg`           | 200 hand-driven pulse sweeps against a shift model; only the addressed latch moves per pulse |
| `tb_latch_shift_array`       | N = 16, 8-bit words: all data latches, temporary latches and `dout` after every shift |
| `tb_clock_pulse_circuit`     | pulse delay, pulse width, delayed-clock delay, one pulse per period |
| `tb_delayed_pulse_clock_gen` | pulse order T,4,3,2,1, rise times, widths, no overlap |
| `tb_pulse_sequencer`         | pulse pattern for every phase, `main_clk`, shift period, reset mid-sequence |
| `tb_pulsed_latch_shift_reg`  | end to end with both sources (N = 16, 8-bit words): model comparison, ordered sweeps, hand-overs through temporary latches, reset mid-stream, pulse timing |
| `tb_full_size`               | default configuration (256 x 1 bit, delay line): 528 shifts, full-state comparison, latency of exactly 256 shifts |
| `tb_workloads`               | 4-bit and 256-bit registers with 8-bit words side by side, latency N for each |

The full-size run takes well under a second of wall time.

## What comes from the architecture and what does not

Taken from the architecture:

* the sub-shift-register structure;
* the temporary latch and its hand-over to the next group;
* the reverse pulse order;
* the latch and pulse-circuit counts (N + N/K latches, K + 1 pulses);
* the clock-pulse circuit (delay, two inverters, AND gate, clock buffer);
* K = 4, and register lengths of 4 and 256 bits.

Choices of this implementation:

* **Word width.** The architecture describes one bit per latch, and `WIDTH`
  defaults to 1. The original evaluation displayed 8-bit values, so the
  testbenches also run `WIDTH = 8`.
* **Reset.** The asynchronous clear on every latch is an addition. The
  original simulations had a reset input, but its behaviour is not described.
* **Serial output.** The output is taken from the last data latch, so the
  latency is N shifts. The architecture does not name an output. The last
  temporary latch holds the same word one shift later and is available on
  `t[M-1]`.
* **Delay values.** The delays of the delay-line model (40/5/5 ps) are
  invented.
* **Sequencer.** The synchronous sequencer, its 2(K + 1)-cycle period with
  gap cycles, and `main_clk` are this implementation's own.
* **Assertions.** The checks on pulse overlap and on clock timing are
  additions.

Not included: the conventional flip-flop shift register that the
architecture was compared against. The original evaluation reported a
256-bit flip-flop version at about 20.6k gate equivalents against about
12.9k for the latch version, measured with an FPGA synthesis tool. Those
numbers were not reproduced here.

Caveats for reuse: as a gate-level circuit, this shift register is only as
good as its pulse timing. Pulse width must cover the latch's setup time.
Consecutive pulses must not overlap across process, voltage and temperature
corners. In the delay-line version, the whole sweep must finish inside one
clock period. The RTL models only the logical order of the pulses and the
delay-line timing at nominal values.

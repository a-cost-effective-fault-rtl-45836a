# TDMA-based fault tolerance for signal TSVs, without spare TSVs

In a two-die 3-D stack, every through-silicon via (TSV) that carries a signal
from die 1 to die 2 can be born defective: a void or delamination adds series
resistance (an *open*, which shows up as extra delay), and a leak to the
substrate (a *short*) pulls the TSV low. The usual repair adds spare TSVs and
the muxes to switch to them. This design adds **no spare TSV**. Instead it
time-multiplexes each group of N TSVs (N = 4 by default): the N signal lines
of a group take turns, one clock cycle each. In any cycle only one line of a
group is being sent, so the other N-1 TSVs of the group are idle, and a line
whose own TSV is bad is simply sent over an idle healthy neighbour. The same
time slots are used to test the TSVs one at a time, which also keeps the test
current to a single TSV per group at any moment.

The price is bandwidth: each line is delivered once every N cycles, so the
TSVs must be clocked N times faster than the signals they carry change. The
default TDMA clock is 500 MHz.

## Frames and slots

A 2-bit counter (log2 N bits) runs through slots 0..N-1; slot i belongs to
line i and TSV i of the group. N consecutive slots form a *frame*. The input
`testmode` decides what a frame does:

| Testmode | Frame | What happens in slot i |
|---|---|---|
| 1 | test frame | TSV i is measured; its verdict is stored in `status[i]` (1 = defective) |
| 0 | normal frame | line i is sent over TSV i if `status[i]` = 0, otherwise over TSV (i+1) mod N |

A full test of all TSVs therefore takes N cycles, and delivering every line
once takes another N cycles: 2N cycles from power-up to the first complete
transfer of a group. All groups run in lock-step, so this is also the figure
for the whole design, whatever its size.

```
cycle      1     2     3     4   |  5     6     7     8
slot       0     1     2     3   |  0     1     2     3
testmode   1     1     1     1   |  0     0     0     0
           test  test  test  test|  send  send  send  send
           TSV0  TSV1  TSV2  TSV3|  line0 line1 line2 line3
                                    (over TSV1 if TSV0 failed)
```

`out_sig[i]` changes on the rising edge that ends slot i, and `out_vld[i]` is
high for the cycle after that edge. An input only needs to be stable during
its own slot. During a test frame the outputs keep their last values.

## Per-lane routing on die 1

Each lane has a 1-to-4 demultiplexer. Its select is the pair
{Testmode, Testresult}, where Testresult is the current slot's verdict:

| Testmode | Testresult | Output of lane i's demux |
|---|---|---|
| 0 | 0 | normal path: data onto TSV i |
| 0 | 1 | reroute path: data onto TSV (i+1) mod N |
| 1 | 0 | test enable (active low) turns on TSV i's pull-down pMOS |
| 1 | 1 | TSV i's signal-path nMOS is switched off |

In normal frames Testresult is `status[slot]`. In test frames it is 0 for the
first half of the slot, which turns the pull-down on so the TSV can be
measured. The comparator output is captured on the falling clock edge in the
middle of the slot. From then on Testresult is that verdict. A failing TSV
therefore has its pull-down released and its signal-path nMOS turned off in
the same cycle. The verdict is written into `status[i]` on the rising edge
that ends the slot. The signal-path nMOS stays off for as long as the status
bit is set, so a defective TSV is never driven again. This avoids heating,
electromigration and leakage through it.

## How a TSV is measured

The test path of a lane is a voltage divider. A pull-up nMOS on die 2 is on
during test frames. Then comes the TSV, then a pull-down pMOS on die 1 that is
on only in that lane's slot. The voltage V_tsv at the die-1 end, taken at the
capture instant, falls as an open adds resistance. It falls much further when
a short leaks current to the substrate. One comparator per group checks
V_tsv against a reference V_ref and flags the TSV when V_tsv <= V_ref.

`tsv_test_network` models this with a table of characterised voltages
(65 nm, 1.2 V supply, 2 um / 180 nm transistors, 0.7 GHz test clock) and
linear interpolation between them:

| Defect | Resistance | V_tsv |
|---|---|---|
| none | - | 600.4 mV |
| open | 1 k / 2 k / 3 k / 4 k / 5 k / 10 k / 50 k ohm | 546.3 / 527.2 / 517.1 / 510.8 / 506.4 / 489.3 / 442.2 mV |
| short to substrate | 500 / 1 k / 1.5 k / 2 k ohm | 310.1 / 380.0 / 409.6 / 431.6 mV |

Choosing V_ref sets the smallest defect that is caught. 1 kohm of extra
resistance on the 200 fF TSV is about 200 ps of delay. A V_ref of 546.3 mV
catches it. A V_ref of 442.2 mV catches only opens of 50 kohm or more, about
10 ns, along with the tabulated shorts. The default, half the supply (600.0 mV), catches every tabulated
defect and passes a defect-free TSV. `vref_dmv` is in steps of 0.1 mV, so
600.0 mV is 6000. Outside the table, the model holds opens above 50 kohm at
442.2 mV. It takes shorts below 500 ohm as falling linearly to 0 V, and
shorts above 2 kohm as rising linearly back to 600.4 mV at 10 kohm. These
extrapolations are the model's own.

## What die 2 needs, and the double TSVs

Die 2 must know which slot it is in, whether a test is running, and whether
the current slot was rerouted. Die 1 sends En, Testmode, Testresult and the
slot number (N = 4: 5 bits per group) over *double* TSVs. Each bit travels on
two TSVs in parallel, so a single open TSV in a pair does not lose the bit.
On die 2, a 1-to-N demultiplexer hands Testresult of slot i to the 1-to-2
demultiplexer on TSV (i+1) mod N. That demultiplexer then steers the TSV back
to output line i instead of line i+1. These control TSVs are not tested or
repaired by the scheme; their duplication is what protects them.

## Hierarchy

```
tsv_ft_top                     NUM_TSV lines, ceil(NUM_TSV/N) groups
├── tdma_oscillator            En-gated clock (behavioural model)
└── tsv_ft_group  [per group]
    ├── tdma_module            die 1: slot counter (tdma_counter), mux1 N:1,
    │                          mux2 2:1 (Testmode), demux1 1:N (data),
    │                          demux6 1:N (Testresult)
    ├── tsv_testing_ctrl       die 1: capture flip-flop, N-bit status register
    ├── routing_die1           die 1: N 1:4 demuxes, signal-path nMOS gates
    ├── tsv_link_model         the N signal TSVs (behavioural model)
    ├── tsv_test_network       pull-up, pull-down, comparator (behavioural model)
    ├── double_tsv             control bits to die 2 (behavioural model)
    └── routing_die2           die 2: demux1 1:N, N 1:2 demuxes, output registers
tsv_ft_pkg                     routing-select enum, defect record, voltage constants
```

The digital blocks (`tdma_counter`, `tdma_module`, `tsv_testing_ctrl`,
`routing_die1`, `routing_die2`) are synthesizable. The four behavioural
models stand for physical parts: an oscillator, transistors and a
comparator, and TSVs. They exist so that the whole stack can be simulated
with defects injected. `tsv_ft_group` and `tsv_ft_top` instantiate them, so
those two levels are for simulation. A netlist of one die would take the
digital blocks and replace the models with the real cells.

## Top-level interface (`tsv_ft_top`)

| Port | Dir | Meaning |
|---|---|---|
| `rst_n` | in | asynchronous reset, active low: slot 0, every TSV good, outputs 0 |
| `en` | in | runs the oscillator and the slot counters; low freezes everything |
| `testmode` | in | 1 = test frame, 0 = normal frame |
| `vref_dmv[15:0]` | in | comparator reference, 0.1 mV steps, shared by all groups |
| `in_sig[NUM_TSV]` | in | W-bit input lines on die 1 |
| `defect[NUM_TSV]` | in | open and short resistance of each signal TSV, in ohms, 0 = none (simulation) |
| `dbl_open_a/b[G]` | in | which double-TSV control wires are open (simulation) |
| `tdma_clk` | out | the oscillator clock; stimulus should be synchronous to it |
| `slot` | out | current slot |
| `out_sig[NUM_TSV]`, `out_vld` | out | W-bit output lines on die 2, update strobes |
| `status`, `nmos_on` | out | verdict and signal-path state of every TSV |
| `v_tsv_dmv[G]` | out | voltage being measured in each group |

Line k belongs to group k / N, lane k mod N. If NUM_TSV is not a multiple of
N, the missing lanes of the last group are tied off and never used.

Reset note: `rst_n` is asynchronous and the clock is stopped while `en` is
low. Drive `rst_n` from 1 to 0 so that the reset sees a falling edge, or
assert it while the clock runs.

Operating rules:
- Run a complete test frame, N consecutive cycles with `testmode` = 1, before
  relying on normal frames. A test frame may start in any slot.
- Change `testmode` between cycles, that is, just after a rising edge of
  `tdma_clk`.
- Re-running a test frame overwrites every verdict.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_TSV` | 1000 | signal lines, one TSV each |
| `N` | 4 | TSVs per group (at least 2) |
| `W` | 8 | bits per line |
| `HALF_PERIOD_PS` | 1000 | half period of the TDMA clock (500 MHz) |
| `OPEN_FAIL_OHM` | 1000 | data-path model: open resistance at which a TSV loses its data |
| `SHORT_FAIL_OHM` | 2000 | data-path model: short resistance at or below which a TSV loses its data |

The default of 1000 lines is a common illustrative design size. The
benchmark stacks this scheme is usually evaluated on have 1362 (AES core),
1454, 2100, 3678, 3782, 7356 and 9112 signal TSVs. Each needs
`NUM_TSV` set to its own count, that is 341 to 2278 groups of 4. Smaller
test stacks of 186 to 800 TSVs fit in the default build.

## Choices made in this implementation

The scheme fixes the structure: the slot counter, the muxes and demuxes, the
truth table, the test principle, the status register and the double TSVs.
The following are this implementation's choices:

- **Reroute target.** A line whose TSV failed goes to the next TSV of its
  group, (i+1) mod N. A group therefore survives one defective TSV, or
  several if no two of them are neighbours. If TSVs i and i+1 both fail,
  line i is lost. Its output then reads 0, because the neighbour's
  signal-path nMOS is off.
- **Line width.** W = 8 bits per "TSV" lane, with one verdict per lane. A
  physical implementation with one wire per TSV uses W = 1.
- **Capture instant.** The verdict is captured on the falling clock edge,
  mid-slot. This stands in for the analog signal-capture time.
- **Comparator boundary.** The comparator flags V_tsv <= V_ref rather than
  strictly below. That way a V_ref equal to a tabulated voltage catches the
  defect it is tabulated for.
- **Die-2 output registers** hold each line between its slots. This gives a
  latency of one cycle after the line's slot.
- **Control to die 2.** En and Testmode cross on double TSVs together with
  Testresult and the slot. Die 2 uses Testmode to switch its pull-up on.
- **Shared clock.** One oscillator and one V_ref serve all groups. The scheme
  gives each group's TDMA module its own oscillator.
- **Data-path fault model.** `tsv_link_model` makes a TSV with 1 kohm of
  open or a short of 2 kohm or less deliver zeros. A defect that the chosen
  V_ref lets through (for example a 1 kohm open with V_ref = 500 mV) is
  therefore visible as a corrupted line. This is how the testbenches show
  the effect of V_ref.

## Simulating

All files are SystemVerilog 2017 and are written for Verilator 5 with
`--timing`, because the oscillator model uses delays. The package must come
first. From the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tsv_ft_pkg.sv \
    tb/tb_tsv_ft_top.sv --top-module tb_tsv_ft_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself,
with a watchdog in case it hangs. They are self-checking against reference
values computed in the testbench:

| Testbench | Covers |
|---|---|
| `tb_tdma_module` | counter sequence and hold, one active lane per slot, mux/demux paths |
| `tb_tsv_testing_ctrl` | N-cycle test frame, Testresult before and after capture, status in normal mode, retest |
| `tb_tsv_test_network` | every characterised voltage, interpolation, comparator boundary, idle cases |
| `tb_routing_die1` | all four truth-table outcomes, nMOS gating, reroute target |
| `tb_routing_die2` | output path selection, one-cycle latency, freeze in test mode, pull-up |
| `tb_tsv_link_model`, `tb_double_tsv` | the physical models' thresholds and redundancy |
| `tb_tdma_oscillator` | 2000 ps period, start delay, clean stop |
| `tb_tsv_ft_group` | one group end to end. A directed case: TSV 0 open, caught in cycle 1, line 0 = 8'b11111100 delivered over TSV 1 in cycle 5. Then random opens, shorts, lowered V_ref and double-TSV opens |
| `tb_tsv_ft_top` | 10 lines in 3 groups (one half used), with every mechanism counted: test frames, open and short detection, reroutes, normal transfers, escapes under a low V_ref, nMOS cut-offs, double-TSV single opens, oscillator stops |
| `tb_tsv_ft_top_full` | the same checks on the default 1000-line build, about 60 000 checks |
| `tb_tsv_ft_top_aes` | the same checks at 1362 lines, the AES-core benchmark's TSV count (341 groups, the last half used) |

The full-size build takes about 1.5 minutes to compile with Verilator, the
1362-line one about 2 minutes. Each then runs in well under a second.

## Limits

- Only the digital control is real logic. Voltages, delays and defect effects
  come from the behavioural models and their table. They are not a circuit
  simulation.
- The scheme's own evaluation of yield, area, power and crosstalk is not
  reproduced here. Nothing in this RTL depends on it.
- Two neighbouring defective TSVs in a group are not repaired (see
  "Reroute target").
- The double TSVs of the control link are assumed to lose a bit only when
  both wires of the pair are open. They are not tested.

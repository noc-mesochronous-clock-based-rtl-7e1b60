# Mesochronous synchronizer for network-on-chip links

In a mesochronous network every router or core runs on a clock of the same
frequency, but the clocks arrive with arbitrary, fixed phase offsets. Data
that crosses from one node to the next is launched on the transmitter's
clock (`clk_tx`) and must be sampled on the receiver's clock (`clk_rx`).
If a `clk_rx` edge lands too close to a data transition, the receiving
flip-flop can go metastable.

This synchronizer avoids that without a FIFO, a phase detector or a tunable
delay per data bit. It captures the data on **both** edges of `clk_rx` and
decides **once, after reset**, which of the two registers to use:

* A *selection window* (SW) is built from the transmitted clock. It opens
  ΔH after a `clk_tx` rising edge and lasts half a period. Data launched on
  that `clk_tx` edge is stable for the whole window, with at least ΔH of
  hold margin and at least T/2 − ΔH of setup margin.
* If a rising edge of `clk_rx` falls inside the window, the rising-edge
  register is safe. The *selection signal* SS is then 1.
* Otherwise the falling edge of `clk_rx`, half a period away, falls inside
  the window. SS is 0 and the falling-edge register is used.

Since the window covers exactly half a period, one of the two edges always
falls inside it, so every phase offset is handled.

## The phase map

Let φ be how far a `clk_rx` rising edge lags the `clk_tx` rising edge that
launched the data, taken modulo the period T. For the default ΔH = 200 ps
with T = 1000 ps:

| φ (ps)          | rising edge in SW? | SS | sampling edge | latency (launch → `data_out`) |
|-----------------|--------------------|----|---------------|-------------------------------|
| 0 … ΔH          | no (hold region)   | 0  | falling       | φ + T/2 (500 … 700)           |
| ΔH … ΔH + T/2   | yes                | 1  | rising        | φ (200 … 700)                 |
| ΔH + T/2 … T    | no (setup region)  | 0  | falling       | φ − T/2 (200 … 500)           |

The latency is therefore always between ΔH and ΔH + T/2. One word is passed
per clock period, with no gaps and no repeats. `data_out` is driven straight
from the selected register, so it changes on the `clk_rx` rising edge
(SS = 1) or falling edge (SS = 0). With SS = 0 the receiving logic still has
half a period to use it.

## Choosing ΔH

ΔH is the only tuning knob. It comes from the setup time, hold time and
metastability window (MW = setup + hold) of the flip-flops in the target
process:

1. ΔH > t_hold, so the rising-edge choice never samples just after a
   transition.
2. ΔH < T/2 − t_setup, so the end of the window stays clear of the next
   transition.
3. MW < T/2, so both conditions can hold at once.

No process numbers are built in. The defaults (`meso_pkg`) assume
T = 1000 ps and t_setup = t_hold = 50 ps, and take ΔH = 200 ps. At those
values all three rules hold with margin. For another clock or process,
change `DEFAULT_DELTA_H_PS` or the `DELTA_H_PS` parameter.

## Blocks

```
             clk_tx ──► delay_line (ΔH) ──► clk_tx_delay
                                               │
                    sw_gen: rising-edge flop ──┤ XOR ──► sw ──┐
                            falling-edge flop ─┘              │
                                                              ▼
             clk_rx ─────────────────────────────────► ss_gen ──► ss
                                                              │
             data ──► rising-edge register  (MUX input 1) ─┐  │
                 └──► falling-edge register (MUX input 0) ─┴──MUX──► data_out
```

### `delay_line`: the ΔH element (behavioural model)

This block delays `clk_tx` by `DELTA_H_PS`. In silicon it is a buffer chain
sized from the measured flip-flop timing. Here it is a delayed continuous
assignment, which synthesis ignores. Any real implementation must substitute
a delay cell of the right value.

### `sw_gen`: selection window generator

Two flip-flops are clocked by the delayed clock, one on each edge. Both
reset to 0. The rising-edge flop goes to 1 at the first delayed rising edge
and stays there. The falling-edge flop copies it at the following delayed
falling edge. Their XOR is the window, a single pulse after each reset.
The rising-edge flop is also output as `sw_armed`: the window has begun.

### `ss_gen`: selection signal generator

A flip-flop with enable samples SW on every `clk_rx` rising edge. A second
flip-flop, clocked on the falling edge of `clk_rx`, closes the enable. It
closes at the first falling edge after the window has begun (`sw_armed`).
From then on SS is frozen.

This means the decision is made by the last `clk_rx` rising edge before that
falling edge. That rising edge is either inside the window (SS = 1), or in
the half period just before it (SS = 0), and the falling edge is then
inside the window. Both cases are correct. SW is asynchronous to `clk_rx`
and is sampled once, which is how the scheme works. A sample taken right at
a window edge can go either way. Both choices are safe there, because the
window edges are at least ΔH and T/2 − ΔH from the data transitions.

### `data_buffer`: dual-edge registers and MUX

The incoming data is registered on the rising edge and, separately, on the
falling edge of `clk_rx`. SS drives a 2:1 MUX: 1 selects the rising-edge
register and 0 the falling-edge register. Both registers reset to 0.

### `meso_sync`: one synchronizer

This module wires the three generators and the buffer together. Reset comes
from the transmitter, along with the data and `clk_tx`. `sw` and `ss` are
brought out for observation.

### `meso_link`: top level, a bidirectional link

A link between two nodes A and B uses one synchronizer per direction, each
at the receiving end. A→B uses `clk_a` as transmitted clock and `clk_b` as
local clock, and B→A the reverse. Each direction takes its reset from its
transmitter. The nodes (routers, IP cores) are outside this RTL and connect
through the ports.

## Reset and start-up rules

* `rst_n` is asynchronous and active low. It may be released at any instant
  relative to either clock.
* The first SW pulse opens at the first delayed `clk_tx` rising edge after
  release. SS is final at most one `clk_rx` period later.
* The transmitter may send its first word on the **second** `clk_tx` rising
  edge after release, and one word per edge after that. Earlier words may be
  sampled with an undecided SS.
* The decision is taken once. The scheme assumes the phase offset stays
  fixed (mesochronous clocks). Phase drift larger than the margins
  (≈ ΔH − t_hold on one side, T/2 − ΔH − t_setup on the other) needs a new
  reset.

## Departures from the original circuit

The source circuit drives the D inputs of the falling-edge window flop and
of the SS enable flop with a constant 1. This RTL drives both from the
window's rising-edge flop (`sw_armed`):

* **Window flop.** With a constant 1, a reset released while the delayed
  clock is high lets the falling-edge flop fire first. The XOR then opens its
  pulse in the wrong half period, from a delayed falling edge to the next
  rising edge. In simulation this trips the single-pulse assertion.
* **Enable flop.** With a constant 1, the decision closes at the first
  falling `clk_rx` edge after reset, which may come before the window
  exists. SS then freezes at 0 for phases that need 1. In the all-phase
  test at random reset instants, the constant-1 version failed 786 of
  5465 checks. With `sw_armed` it passes all of them.

The intended behaviour is unchanged. Other points that are this design's
own choices:

* The data width defaults to 1, which is the single data line the block
  diagram shows. Set `DATA_W` for wider links; each bit gets its own pair of
  registers.
* Reset polarity (active low) and the reset values (0) of SS and the data
  registers.
* The ΔH value and the timing it assumes (see above).

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench        | what it checks |
|------------------|----------------|
| `delay_line_tb`  | output equals input delayed by ΔH, edge by edge |
| `sw_gen_tb`      | 60 reset-release instants over a period: window opens at the predicted instant, lasts T/2, never reopens, `sw_armed` sticky |
| `ss_gen_tb`      | 80 clock phases: SS = 1 exactly when a rising edge is inside the window; enable closes; SS ignores later spurious SW pulses |
| `data_buffer_tb` | both registers and both MUX inputs against the values present at each edge |
| `meso_sync_tb`   | 84 phases (13 ps sweep plus window-edge, setup- and hold-region points), random reset instants, 13 random 8-bit words per run: SS, sampling margin ≥ 50 ps, latency in [ΔH, ΔH + T/2], every word on `data_out` |
| `meso_link_tb`   | the top at its default parameters, both directions, 61 phases: the same checks per direction, and counts of the four cases (rising edge inside / outside the window, setup region, hold region), each required at least once |

`ms_stream_checker` is the shared source and scoreboard. It predicts SS and
latency from the phase alone, not from the design.

Simulation has two states only, so it cannot show metastability. The
testbenches instead check that the edge the design chooses keeps the
assumed setup and hold margins from every data transition.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module meso_link_tb rtl/meso_pkg.sv tb/meso_link_tb.sv
./obj_dir/Vmeso_link_tb
```

Swap in another `*_tb` name for the block tests. Every file carries
`` `timescale 1ps/1ps ``, and the delays are in picoseconds.

## Files

* `rtl/meso_pkg.sv`: default width and ΔH
* `rtl/delay_line.sv`: ΔH delay (behavioural)
* `rtl/sw_gen.sv`, `rtl/ss_gen.sv`, `rtl/data_buffer.sv`: the three parts
* `rtl/meso_sync.sv`: one synchronizer
* `rtl/meso_link.sv`: top level, two synchronizers forming a bidirectional link
* `tb/*_tb.sv`: testbenches; `tb/ms_stream_checker.sv`: shared scoreboard

Not included: the routers and cores of the network, which are only the
setting for this design, and pad or I/O buffers.

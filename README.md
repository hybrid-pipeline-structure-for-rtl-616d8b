# SOLAR hybrid pipeline: a learning array with "soft" connections

A self-organizing learning array (SOLAR) is a grid of identical neurons. Each
neuron picks its inputs from other neurons, picks an arithmetic function, and
passes its result on; which inputs and which function are the result of
learning and may change while the network runs. Wiring every neuron to every
possible source with multiplexers costs area that grows faster than the
network. The hybrid pipeline avoids that wiring altogether.

Each column of the array owns one long shift register, the *routing channel*.
All data a column may need (the input sample, or everything the previous
columns produced) travels round this channel in numbered *slots*. A neuron is
tapped into the channel at one stage. It watches the slot numbers go by,
copies the slots it is configured to read, computes, and later drops its
result back into the same slots as they pass again. A connection between two
neurons is therefore just a slot number held in the reading neuron: changing
the network's topology means changing a few register bits, and the hardware
grows linearly with the number of neurons.

This repository holds synthesizable SystemVerilog for that structure,
following the hybrid-pipeline SOLAR architecture published by J. A. Starzyk,
M. Ding and Y. Liu, together with self-checking testbenches. The default
configuration is the 4 x 3 array (4 neurons per column, 3 columns, 4-item
input samples) used there with the Iris data set.

## Terms

| symbol | meaning | default |
|---|---|---|
| N | data items per input sample | 4 |
| C | copy ratio: how often each input item is repeated in the channel | 4 |
| L | channel length in slots, L = C * N | 16 |
| K | neurons (nodes) per column | 4 |
| COLS | columns | 3 |
| M | node clock cycles per channel shift | 10 |
| P_i | stage at which node i taps its column's channel | 3, 7, 11, 15 |
| XL | extra processing laps per period | 0 |

A *shift cycle* is one step of the channel; a *node cycle* is one period of
`clk`. The channel moves once every M node cycles (`shift_en`), which gives
each node several clock cycles per slot to compare slot numbers and
capture or replace data.

## One period in one column

Everything is organised in *periods* of 3L shift cycles, counted by
`phase` = 0 .. 3L-1 and identical in all columns.

| shift cycles | switch at top | what the nodes do |
|---|---|---|
| 0 .. L-1 | data | the new sample streams in, slot 0 first; node i starts reading at cycle P_i, when slot 0 reaches its tap |
| L .. L+P_i-1 | feedback | the channel now circulates; node i sees the rest of the slots, so every slot has passed every node exactly once |
| up to L+P_k | feedback | nodes that have all their operands compute (one node cycle here) and wait |
| L+P_k .. 2L+P_k-1 | feedback | write window: every slot passes every node once more, and each node overwrites its slots with its result |
| 2L+P_k .. 3L-1 | feedback | idle |

At the end of the period the switch goes back to *data*. The next sample
enters the column at the top, and the slots leaving the bottom (the column's
finished work, slot 0 first) enter the next column. A sample thus spends
exactly one period in each column, the pipeline delay per column is 3L shift
cycles, and with COLS columns, COLS samples are in flight at once. A sample
leaves the last column 3L * COLS shift cycles after it entered the first
(1440 `clk` cycles at the defaults), and a new sample can enter every
3L * M = 480 `clk` cycles.

Because every node of a column finishes reading before any node of that
column starts writing, a node never sees a result of its own column. Each
column is one layer of a feed-forward network.

Nodes that need more time for reading and computing than L shift cycles can
be given it. The parameter XL inserts XL extra laps of L shift cycles before
the write window, so the period becomes (3 + XL) * L. The fixed-function nodes
here finish within a few clocks and never need this, so XL defaults to 0.

### Which slot is where

With `phase` = e (shift strobes already taken this period), stage j of the
channel holds slot (e - 1 - j) mod L. Node i reads the output of stage
P_i - 1 and so sees slot `tin` = (e - P_i) mod L. Its result enters stage P_i
through a 2:1 multiplexer: it replaces that same slot. Because the period is
a whole number of laps, slot numbering is the same in every column and every
period. This is why one shared timing controller can serve the whole array.

### Two nodes, one slot

If two nodes of a column are configured to write the same slot, the write
that falls later in the write window stays. Node i writes slot s in the
window cycle congruent to s + P_i (mod L). This is usually, but not always,
the node further down the channel. The configuration should avoid such
conflicts unless this order is what is wanted.

## Copy ratio and reaching back across layers

The feeder repeats every input item C times (slots 0..C-1 carry item 0, and
so on). A node that uses an input copy overwrites that copy with its result.
The remaining copies pass through unchanged, so a node in a later column can
still read a primary input (or any older result) directly, skipping layers.
C = 1 suits a strictly layered network; larger C gives more room for
cross-layer connections and for nodes with several inputs. The end-to-end test
includes such a cross-layer connection.

## The node

`solar_node` is a small state machine with the four modes of the
architecture: idle, reading, processing and writing. Its configuration
(`node_cfg_t`) is:

| field | bits | meaning |
|---|---|---|
| en | 1 | node takes part |
| func | 3 | node function: 0 ident, 1 half, 2 log, 3 exp, 4 sigmoid, 5 add, 6 sub |
| pre_a | 3 | one-input function applied to the first operand (ident, half, log, exp, sigmoid) |
| pre_b | 3 | the same for the second operand |
| slot_a | 8 | first input slot, also written with the result |
| slot_b | 8 | second input slot for add/sub, also written with the result |

A node therefore computes func(pre_a(x_a), pre_b(x_b)). One input
connection can take the logarithm of its operand, the other the
exponential, and the node then subtracts them. In a drawing of the network,
pre_a and pre_b are the functions written on the arcs into a node, and func
is the function written under it. A two-input code (add, sub) given as
pre_a or pre_b acts as identity. All three functions are evaluated in the
processing mode, by three instances of the function unit.

A node whose slots do not exist in the channel (slot >= L) never completes
reading and writes nothing. A disabled node stays idle.

### Functions (`solar_alu`)

All data are 8-bit unsigned.

| function | result |
|---|---|
| ident | a |
| half | floor(a/2) |
| add | floor(a/2) + floor(b/2): a "modified add" that cannot overflow (47, 57 -> 51) |
| sub | floor(a/2) - floor(b/2), limited at 0 |
| log | about 32 * log2(a), 0 for a = 0 (Mitchell's leading-one approximation, error < 4 LSB) |
| exp | about 2^(a/32), the inverse of log (error < 7 % + 1 LSB) |
| sigmoid | about 256 / (1 + e^-(a-128)/16), limited to 255 (piecewise linear, error < 6 LSB) |

The function set and the modified add follow the published design. The
scalings of log, exp and sigmoid, and the limit on sub, are this
implementation's own choices; change `solar_alu` if a different number
format is wanted.

## Interface of the top, `solar_array`

| port | dir | meaning |
|---|---|---|
| clk, rst_n | in | node clock; asynchronous active-low reset |
| in_valid, in_ready, in_data[N] | in/out/in | one N-item sample, taken when both valid and ready are high; one sample per period is taken |
| node_cfg[COLS][K] | in | configuration of every node; change it only between periods |
| out_valid, out_slot, out_data | out | the L slots of a finished sample, one per shift cycle during the first lap of a period, slot 0 first; out_valid pulses for one clk per slot |
| node_mode[COLS][K], node_sel[COLS] | out | each node's mode and channel-write strobe, for observation |
| shift_en, phase, feed_active | out | channel strobe, shift cycle in the period, real sample entering column 1 |

If no sample is waiting when a period starts, that period carries a bubble:
zeros are fed and the sample is marked invalid all the way to the output.

An offered sample must stay on `in_data`, with `in_valid` high, until it is
taken. Assertions in the feeder check this. Each node also asserts that it
drives the channel only inside the write window and only with a computed
result.

## Blocks

| module | role |
|---|---|
| `solar_pkg` | data, slot, function, mode and configuration types; node placement rule |
| `solar_timing` | shared controller: `shift_en` every M clocks, period counter, top switch, write window, optional extra laps |
| `solar_feeder` | sample buffer with valid/ready; repeats each item C times into column 1 |
| `solar_alu` | node function unit |
| `solar_node` | node: slot matching, operand capture, input and node functions, mode sequence, write-back select |
| `solar_column` | L-stage channel with top switch, feedback, and K nodes with their multiplexers |
| `solar_array` | top: timing, feeder and COLS columns chained into the pipeline |

Nodes are spread evenly along the channel: P_i = (i+1) * L / K - 1. The last
node sits at the bottom stage, P_k = L - 1. The constraints are L >= 2K and
M >= 4.

## Size

After coarse synthesis the design is dominated by the channels (8 bits per
slot) and by about 29 flip-flops per node. It grows linearly with the
number of columns:

| array | nodes | cells | flip-flop bits |
|---|---|---|---|
| 4 x 3 | 12 | 2438 | 820 |
| 4 x 6 | 24 | 4748 | 1555 |
| 4 x 12 | 48 | 9368 | 3025 |
| 4 x 24 | 96 | 18608 | 5965 |

Flip-flops per column: 16 * 8 channel bits + 4 nodes * 29 + 1 valid bit =
245. Add 85 bits for the timing and feeder logic.

## Where this RTL departs from the published design

* **Node processor.** The published nodes are programmed soft processors
  (Xilinx picoBlaze) running faster than the channel. Here a fixed-function
  state machine and `solar_alu` do what those programs do: read slots,
  compute, write back. The node needs only a few clocks per shift cycle (M >= 4)
  instead of a multi-cycle program.
* **Clocks.** Instead of a separate, slower channel clock, the channel is
  clocked by `clk` with the enable `shift_en`. The default ratio M = 10
  follows the name of the divided clock (`clk_10`) in the published
  single-node waveform. The ratio itself is not stated there.
* **Parameters not given by the architecture**, chosen here: data width 8,
  copy ratio 4, node positions, function scalings, the sample handshake and
  bubbles, reset behaviour.
* **Input range R.** The architecture defines an input range R that limits
  how far back a node may reach. This RTL does not enforce it: any slot can be
  configured.
* **Configuration and learning.** Choosing connections and functions
  (learning) is outside this RTL. The configuration is a plain input array.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | checks |
|---|---|
| `tb_solar_alu` | all functions against an integer reference for every operand, and against real-valued log2, 2^x and logistic functions; 47, 57 -> 51 |
| `tb_solar_timing` | strobe spacing, period counter, switch, write window and period length, cycle by cycle, with and without an extra lap |
| `tb_solar_feeder` | slot order with C-fold repetition, handshake back-pressure, bubbles |
| `tb_solar_node` | single-node experiment: reads 47 and 57 at slots 4 and 5 and writes 51 into both; mode sequence, slot numbers, write timing; a unary function, input functions on both operands, and a disabled node |
| `tb_solar_column` | 40 periods of random data and configurations against a reference column model, including write conflicts and missing slots |
| `tb_solar_array` | whole array at its defaults: 75 four-feature samples through a fixed 4 x 3 network wired like the published Iris example (connections and functions), then 20 samples with a new configuration every period. Checks every output slot and the latency, and counts reads, writes, circulation, bubbles, back-pressure, reconfiguration, cross-layer reads and a full pipeline |
| `tb_solar_array_sizes` | the 4 x 6, 4 x 12 and 4 x 24 arrays, and a 4 x 3 array with XL = 1, with random configurations: every output slot and the latency |

The Iris feature values themselves are not used. The 75 samples are
synthetic, drawn from the ranges of the four Iris features scaled by 20. The
reference model is `tb/tb_solar_ref_pkg.sv`.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/solar_pkg.sv tb/tb_solar_ref_pkg.sv tb/tb_solar_array.sv --top-module tb_solar_array
./obj_dir/Vtb_solar_array
```

Replace `tb_solar_array` with any other testbench name. Each one runs in well
under a second of simulation time.

# 19-channel 16:1 serializer for a 64 GS/s DAC

A DAC running at 64 GS/s needs its digital samples at 64 Gbit/s per line,
far faster than any memory or logic core can deliver them in parallel form.
This design closes that gap with a serializer placed between the sample memory
and the DAC output stage. The memory delivers, on each of 19 lines, a 16-bit
word every 250 ps (16 × 4 Gbit/s). The serializer sends each word out bit by
bit at 64 Gbit/s, one bit every 15.625 ps. The 19 lines follow from an 8-bit
DAC segmented into four unary bits (15 thermometer lines) and four binary
bits. Aggregate throughput is 19 × 64 Gbit/s = 1.216 Tbit/s.

The architecture is built for static CMOS at the edge of its speed:

* every channel is a binary tree of identical 2:1 stages, four levels deep,
  on 4, 8, 16 and 32 GHz clocks;
* each 2:1 stage needs **only one clock phase**, because of a two-latch /
  three-latch arrangement explained below;
* the four clocks come from a divide-by-two chain fed by one external 32 GHz
  clock. The lower dividers have resets, so the frequency levels can be
  started one after another.

The RTL models the circuit at the level of latches, selectors and toggle
flip-flops, one logic bit per differential pair. It is synthesizable and
reproduces the exact cycle behaviour: when each bit is captured, in which
unit interval it leaves, and how the clocks start.

## The 2:1 stage (`mux2_stage`)

A stage takes two inputs D0 and D1 at f bit/s and one clock at f Hz. It
outputs D0 and D1 alternately at 2f bit/s. It holds five latches
(`fast_latch`) and one transmission-gate selector (`tg_mux`):

```
        L-latch   H-latch                        +-----------+
  D0 ──[ open ]──[ open ]───────────── M0 ──────>| clk=0: M0 |
        clk=0     clk=1                          |           |──> Y
  D1 ──[ open ]──[ open ]──[ open ]─── M1 ──────>| clk=1: M1 |
        clk=0     clk=1     clk=0                +-----------+
```

* The first two latches of each path form a rising-edge flip-flop. D0 and D1
  are therefore captured together at the same rising edge: the inputs are
  synchronous.
* M0 changes only at rising edges. It is selected while clk is low, so it is
  stable whenever it is passed.
* The third latch delays M1 by half a period. M1 changes only at falling
  edges and is selected while clk is high.
* The two selector inputs never switch together, so the output is free of
  glitches. No second clock phase (quadrature or otherwise) is needed, at any
  level of the tree.

Timing rule for a stage with period T whose pair is captured at rising edge t0:

| interval               | Y carries |
|------------------------|-----------|
| [t0 + T/2, t0 + T)     | D0        |
| [t0 + T,   t0 + 3T/2)  | D1        |

## The 16:1 channel (`mux16_channel`)

Fifteen stages form a four-level tree. The eight leaf stages (4 GHz) take the
16 input bits, four stages run at 8 GHz and two at 16 GHz, and the root stage
at 32 GHz produces the 64 Gbit/s output. Stages are numbered as a heap: stage
1 is the root, and stage n takes stage 2n as D0 and stage 2n+1 as D1.

**Bit order.** Each stage sends D0 first. A leaf input's time slot is
therefore its path from the root with the bits reversed. The leaf inputs are
wired through `serializer_pkg::bit_reverse`, so `data_i[0]` leaves first and
`data_i[15]` last.

**Clock alignment.** Every divided clock toggles on falling edges of the
clock it comes from. An edge of a slower clock therefore always falls midway
between two rising (capturing) edges of the next faster clock. Each level
then captures its children's output exactly in the middle of a bit.

**Latency.** Apply the stage rule level by level. From the capture edge, the
4 GHz level delivers to the 8 GHz capture edge after 12 UI (3/4 of its 16-UI
period). The next levels add 6 UI and then 3 UI, and the root adds 1 UI. Here
1 UI = 15.625 ps. Bit 0 of a word thus starts **22 UI (343.75 ps)** after the
rising 4 GHz edge that captured the word, and the 16 bits follow back to back.
`serializer_pkg::first_bit_latency_ui()` computes the same number for other
tree depths.

## Clock generation (`clock_network`, `freq_div_noreset`, `freq_div_reset`)

```
 clk_i 32 GHz ──┬───────────────────────────────────────────── clk[0] (root stages)
                └─[A: ÷2, no reset]─┬───────────────────────── clk[1] 16 GHz
                                    └─[B: ÷2, rst_i[0]]─┬───── clk[2]  8 GHz
                                                        └─[C: ÷2, rst_i[1]]── clk[3] 4 GHz = word clock
```

* **Divider A** (32 → 16 GHz) has no reset. In the circuit a reset device
  would load the 32 GHz node too much. It starts with the first input edge from
  a defined power-up state, which the RTL gives as an initial value of 0 on the
  state bit. Verilator warns about this initial value (PROCASSINIT). The
  warning is expected: the initial value is the only initialisation this
  divider has.
* **Dividers B and C** gate their state with In AND NOT R. While R is high the
  divided clock is low, even if the divider's own input clock stands still, as
  it does while the divider in front is held in reset. After R falls, the
  divider's output rises at the next falling edge of its input.
* **Cascaded start.** Releasing `rst_i[0]` first starts the 8 GHz level.
  Releasing `rst_i[1]` later starts the 4 GHz level. This brings up the
  serializer one frequency level at a time, which avoids large steps in supply
  current. It also lets the word clock start at a known moment. The order and
  spacing of the releases are up to the user. The top-level testbenches
  release B 20 periods of the 32 GHz clock after power-up, and C 24 periods
  after B.

In silicon, each clock then passes a tapered inverter driver chain and a
transmission line along the 19 channels, followed by a local driver per
channel. The driver chains use resistive feedback (R = 4000 Ω·µm / Wn) and
extra inverters in the faster branches that equalise delay. These are analog
buffers designed for one result: all four clocks arriving aligned, with
about 8.8 ps of residual skew. The RTL wires the clocks directly, which is that
ideal, zero-skew result.

**Skew margin.** A stage's inputs change on edges of the next slower clock,
and the stage captures them on its own rising edges. Those rising edges lie
half a period of the faster clock away from the input changes. In this
zero-delay model, a skew between two neighbouring clock levels is therefore
tolerated up to just under half a period of the faster clock: ±15.6 ps
between the 32 and the 16 GHz clocks, and more at the lower levels.
`tb_mux16_skew` measures this margin. Real latches have clock-to-output and
setup times, which shrink the margin. At transistor level, about +5/−10 ps
between the 32 and 16 GHz clocks is the expected figure, which is why the
driver chains must keep the clock skew in the single-digit picosecond range.

## Top level (`serializer`)

| port          | dir | width        | meaning |
|---------------|-----|--------------|---------|
| `clk_i`       | in  | 1            | external 32 GHz clock |
| `div_rst_i`   | in  | 2            | active-high resets: bit 0 divider B (16→8 GHz), bit 1 divider C (8→4 GHz) |
| `data_i`      | in  | 19 × 16      | `data_i[c]` is the word of channel c, bit 0 sent first |
| `word_clk_o`  | out | 1            | 4 GHz word clock for the data source |
| `ser_o`       | out | 19           | 64 Gbit/s serial output per channel |

The data source must clock itself from `word_clk_o`. It changes `data_i` after
a falling edge of `word_clk_o`, and the serializer captures the word at the
next rising edge. All 19 channels share the clocks, so their outputs are
bit-aligned. Parameters: `N_CH` (19) and `LEVELS` (4, which gives 16:1 and
four clocks; needs at least 3). For other ratios, change `LEVELS`; the tree,
the bit reversal, the divider chain and the latency formula all follow.

After synthesis the default top holds 1425 latches (19 × 15 × 5), 285 selectors
and 3 divider flip-flops.

## What is modelled and what is not

Followed as described: 19 identical channels, and the 16:1 ratio as a
four-level tree of 15 stages. Also the two-latch/three-latch stage with one
clock phase, and the selector phases (M0 passed at clk low, M1 at clk high).
The dividers follow too: 32 GHz in, four clock frequencies, divider A without
reset, and B and C with the In AND NOT R reset.

Choices of this design, where the circuit description leaves it open:

* one logic bit per differential pair;
* dividers toggle on the falling edge of their input clock, which sets the
  clock alignment and the 22-UI latency;
* the reset of B and C is modelled as acting on its level, as an asynchronous
  clear;
* the order of bits in a word (bit 0 first), and the word clock brought out to
  the data source;
* the assignment of segmentation lines to channels. The workload testbench
  uses channels 0–14 for the unary lines and 15–18 for the binary lines.

Not represented: everything whose behaviour is analog. That covers delay,
skew, jitter, duty cycle, bandwidth, the resistive-feedback driver chains,
transmission lines and local drivers, transistor sizing, FD-SOI body bias, and
power. The sample memory, the binary-to-thermometer encoding and the DAC
output stage are outside the serializer.

## Testbenches

All are self-checking. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. All run at full size with default parameters. All of them pass with
Verilator 5, under several random seeds for the initial state. Each module's
testbench also fails when one deliberate fault is put into the module: a
swapped latch polarity, a missing latch, wrong leaf wiring, a wrong divider
edge, and so on.

| testbench              | checks |
|------------------------|--------|
| `tb_fast_latch`        | both latch polarities against the latch rules, random clock and data |
| `tb_tg_mux`            | all selector input patterns |
| `tb_mux2_stage`        | D0/D1 slots at 32 GHz, half-period latency, and that M0 moves only at clk high and M1 only at clk low |
| `tb_mux16_channel`     | 400 random words bit-exact in their slots, 22-UI latency, 16 UI between captures; the testbench makes the four clocks itself |
| `tb_freq_div_noreset`  | power-up state, first toggle at the first falling edge, never on a rising edge |
| `tb_freq_div_reset`    | hold under reset (also without clock edges), release timing, repeated reset |
| `tb_clock_network`     | periods, edge alignment, reset of B holding 8 and 4 GHz, cascaded start |
| `tb_serializer`        | complete design: cascaded start, 2 × 300 random words on all 19 channels, restart from reset, latency and rate; counts each mechanism |
| `tb_mux16_skew`        | skew of the 16/8/4 GHz clocks against the 32 GHz clock stepped from −14 to +14 ps with data streaming (no bit may change), then +20 ps, where errors must appear |
| `tb_dac_workload`      | 3200 8-bit samples (sine, then random) in 4 unary + 4 binary segmentation; rebuilds every DAC code from the 19 outputs and checks the thermometer code |

Running one with plain Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/serializer_pkg.sv \
          tb/tb_serializer.sv --top-module tb_serializer -o sim
./obj_dir/sim
```

Lint the RTL with
`verilator --lint-only -Wall -Wno-fatal -Irtl rtl/serializer_pkg.sv rtl/serializer.sv`.
It reports only the expected PROCASSINIT warning on the power-up value of
divider A. All files use
`timeunit 1ps; timeprecision 1fs`, so the 15.625 ps half period of the 32 GHz
clock is exact.

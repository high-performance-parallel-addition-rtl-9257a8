# Hybrid wave-pipelined 32-bit parallel adder

A 32-bit parallel-prefix adder, split into three pipe stages by four
register ranks. Each rank has its own clock: a copy of the rank before it,
delayed by a chain of inverters.

In a conventional pipeline a stage must empty before the next clock edge,
so the slowest stage sets the clock period. In a wave pipeline the logic
is padded so that all paths take about the same time. New operands can
then enter before earlier ones have left, and several independent *waves*
of data travel through the logic at once. What limits the clock is the
*spread* between the shortest and longest path, not the longest path.

Hybrid wave pipelining keeps a few register ranks. Each stage between two
ranks is still long enough to hold more than one wave. Because each
rank's clock is delayed by about the stage's delay, every clock edge
travels through the pipe together with the wave it launched. Only the
path-delay spread within one stage matters. The intermediate nodes can be
observed at the ranks. The clock can also be slowed down to any period
above the minimum, and results stay correct.

With the default timing model and a 560 ps clock, the pipe holds eight
waves: three in each of the first two stages and two in the last.

## Datapath

```
 a,b ─► rank 0 ─► gen/prop ─► level 1 ─► level 2 ─► rank 1 ─► level 3 ─► level 4 ─► rank 2 ─► level 5 ─► sum ─► rank 3 ─► sum, cout
        clk                                         clk1                           clk2                          clk_out
         │                                           ▲                              ▲                              ▲
         └──────────────── Δ1 (inverters) ───────────┘──────── Δ2 ──────────────────┘──────── Δ3 ─────────────────┘
```

**Generate/propagate.** Computes `g_i = a_i·b_i` and `p_i = a_i ⊕ b_i`.
`p_i` is also the half sum. It travels with the carries as a third signal,
`f`, so that it reaches the sum stage with the same delay.

**Carry network.** The network has five levels of the associative operator
`(g, p) ∘ (g', p') = (g + p·g', p·p')`. It is a divide-and-conquer prefix
tree. At level L, every bit whose index has bit L−1 set combines its group
with the group held by the top bit of the lower block of 2^(L−1) bits. All
other bits pass through unchanged. After level L, bits 0 … 2^L−1 hold their
final carries `c_i = G_i`, the carry out of bits i … 0. The partner bit at
the last level drives 16 loads. This is the price of a five-level tree
without a wider pipe.

Each bit at each level is one of four cells:

| cell | when | function |
|---|---|---|
| black circle (`cell_black_circle`) | bit combines, result not yet final | `g = gl + pl·gr`, `p = pl·pr`, `f` passed |
| black square (`cell_black_square`) | bit combines, result is a final carry | `g = gl + pl·gr`, `f` passed, no `p` |
| white circle | bit idle, group wider than one bit | buffer of `f, g, p` |
| white square | bit idle, carry final or one-bit group | buffer of `f, g` |

In silicon, the white cells match the two gate delays of the black ones,
and the operators are built from NAND gates whose delay varies little with
the data. In logic they are wires, so `carry_level` writes them as
assignments. A one-bit group carries no `p` wire, because its propagate is
its own `f`. `hwp_pkg::cell_kind` gives the cell for any level and bit. It
reproduces the 32-bit cell map exactly, for example:

- level 1: odd bits combine, even bits idle;
- level 5: bits 16–31 combine with bit 15; bits 0–15 are already final.

**Sum.** `sum_i = f_i ⊕ c_(i−1)` and `sum_0 = f_0`. There is no carry input.
`cout = c_31` is registered with the sum.

**Stage split.** Rank 1 follows level 2 and rank 2 follows level 4. So
stage 1 is generate/propagate plus two levels, stage 2 is two levels, and
stage 3 is one level plus the sum.

## Clocking and waves in flight

This is the part that needs care. Call stage k's logic delay `D_k` and its
clock delay `Δ_k`. Rank k launches a wave on some edge at time t. The wave
reaches rank k+1 at time t + D_k. Rank k+1 sees the delayed copy of the
same edge at time t + Δ_k. The capture is correct if:

- `Δ_k ≥ D_k,max` plus setup time: the wave has arrived;
- `T > Δ_k − D_k,min` plus hold time: the next wave, launched at t + T,
  has not yet started to arrive.

Here `D_k,min` and `D_k,max` are the stage's shortest and longest path
delays.

The clock period `T` therefore has only a lower bound. That bound is the
stage's delay spread plus margins, however long the stage is. Above it,
every period works: wave-pipelined at short periods, conventionally
pipelined at long ones.

A stage holds about `ceil(Δ_k / T)` waves at once. The defaults are:

| stage | `D_k,max` | `D_k,min` | clock delay `Δ_k` | minimum `T` | waves at T = 560 ps |
|---|---|---|---|---|---|
| 1 | 1500 ps | 1040 ps | 1560 ps (78 inverters × 20 ps) | 520 ps | 3 |
| 2 | 1500 ps | 1040 ps | 1560 ps | 520 ps | 3 |
| 3 | 1000 ps | 540 ps | 1040 ps (52 inverters) | 500 ps | 2 |
| pipe | | | 4160 ps | 520 ps | 8 |

`Δ_k` is `D_k,max + CLK_MARGIN_PS` (40 ps), rounded up to an even number
of inverters. `D_k,min` is `D_k,max − DISPERSION_PS` (460 ps). The whole
adder therefore runs at any period above 520 ps. Below that, a register
samples while the next wave is already arriving, and the sums come out
wrong. The edges are counted one to one: the k-th rising edge of
`clk_out` carries the sum of the operands sampled on the k-th rising edge
of `clk`.

If the global clock stops, the edges already in the inverter chains keep
going. Every wave that entered still reaches the output, so clock gating
needs no extra flush cycles.

**Timing model.** The logic itself is written with zero delay. Two
behavioural models add the timing:

- `stage_delay`: a chain of 20 ps delay segments after each stage's logic.
  A change starts to show at the tap for the shortest path and has
  settled at the tap for the longest. While the two taps differ, the
  output is not valid; the model then shows the settled word inverted.
  A new value does not cancel the one still in flight. As in real gates,
  a pulse shorter than one segment is lost.
- `clk_delay`: the inverter chain that makes each local clock.

Synthesis ignores the delays and both models become wires. All ranks then
share `clk`, and the result is an ordinary three-stage pipeline: a sum
appears three `clk` edges after its operands were sampled. Setting
`S1_LOGIC_PS = S2_LOGIC_PS = S3_LOGIC_PS = 0` gives the same behaviour in
simulation.

The dispersion window is the same for every bit and every input pattern.
In silicon it depends on the data and on each gate; the operator gates are
chosen to keep it small.

## Interface (`hwp_adder32`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | clock of the input rank; operands sampled on its rising edge |
| `rst_n` | in | 1 | asynchronous, active low; clears every rank, so outputs read 0 until the first wave arrives |
| `a`, `b` | in | N | operands |
| `sum` | out | N | sum, changes on the rising edge of `clk_out` |
| `cout` | out | 1 | carry out of the top bit |
| `clk_out` | out | 1 | local clock of the output rank; sample `sum` with it |

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | width, a power of two ≥ 4 |
| `S1_LEVELS`, `S2_LEVELS` | 2, 2 | carry levels in stages 1 and 2; stage 3 gets the rest |
| `S1_LOGIC_PS`, `S2_LOGIC_PS`, `S3_LOGIC_PS` | 1500, 1500, 1000 | modelled stage logic delays; 0 = no delay |
| `DISPERSION_PS` | 460 | shortest path = longest − this, in every stage |
| `CLK_MARGIN_PS` | 40 | how much longer each clock delay is than its stage delay |
| `INV_PS` | 20 | delay of one inverter in the clock chains |

All modules use `timeunit 1ps`.

In simulation, the inverter chains start in arbitrary states. Hold `clk`
low for about 5 ns after time 0 before counting `clk_out` edges.

## Where this departs from the published adder, and what is assumed

The following come from the published adder:

- the structure: register placement, the cell of every bit at every level,
  and the five-level tree;
- the equations;
- the 32-bit width;
- the use of inverter chains for the local clocks.

The following are this design's own choices:

- **Delay values.** The published adder gives no per-stage delays. The
  defaults were chosen so that a 560 ps clock, its reported cycle time,
  gives eight waves in a three-stage pipe, as reported. The 3/3/2 split
  is a guess. The dispersion puts the model's minimum period (520 ps)
  just under 560 ps.
- **Clock-delay rule.** Each local clock is delayed by the stage's longest
  delay plus a margin, so that it travels with its wave. The original
  prose ties the clock delay to the stage's delay difference
  (d_max − d_min). Here that difference sets the minimum clock period
  instead.
- **Extra ports.** `cout`, `clk_out` and the asynchronous reset.
- **Circuit detail.** The biased NAND gates and the balancing buffer
  cells are not modelled as circuits. Data-dependent delay is reduced
  to one fixed window per stage.
- **Unused propagate bits.** The intermediate ranks are 3N bits wide.
  The `p` bits of square cells are constant 0 and synthesis removes them.

The 560 ps cycle time and the comparison with a conventional pipeline are
transistor-level results. Logic simulation cannot confirm or refute them.

## Files

`rtl/`:

| file | contents |
|---|---|
| `hwp_pkg.sv` | cell enum and the tree-construction functions |
| `hwp_adder32.sv` | top level |
| `dff_rank.sv` | register rank |
| `gp_unit.sv` | generate/propagate |
| `carry_level.sv` | one prefix level |
| `cell_black_circle.sv`, `cell_black_square.sv` | operator cells |
| `sum_unit.sv` | sum |
| `clk_delay.sv` | behavioural model: inverter-chain clock delay |
| `stage_delay.sv` | behavioural model: stage logic delay |

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus two
for the top:

- `tb_hwp_adder32` runs a timed copy and a zero-delay copy side by side.
  It sends 300 additions at 560 ps and 100 at 2000 ps, then stops the
  clock. It checks every result, zero output before the pipe fills,
  waves in flight per stage (3/3/2, 8 in total), one wave per stage at
  the slow clock, and that every wave drains after the clock stops.
- `tb_hwp_adder32_full` runs 1000 additions at 560 ps with every
  parameter at its default.
- `tb_hwp_adder32_period` sweeps the clock period at the default
  parameters. It requires clean sums at 800, 600, 560 and 540 ps, and
  overrun at 500 and 460 ps.

## Simulating

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/hwp_pkg.sv tb/tb_hwp_adder32.sv --top-module tb_hwp_adder32 -o sim
./obj_dir/sim
```

Use the same command with any other testbench name. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops; `failures=0` is a pass.
Every testbench has a watchdog. All of them finish in seconds.

## Changing it

- **Another width.** Set `N` to a power of two and choose how many levels
  each stage gets with `S1_LEVELS` and `S2_LEVELS`.
- **Different timing.** Change the `S*_LOGIC_PS` delays. The clock chains
  follow them automatically. By the capture rule above, the clock period
  must exceed `CLK_MARGIN_PS + DISPERSION_PS`, plus the rounding of each
  chain to an even number of inverters.
- **Plain pipeline.** The synthesizable view is the same netlist with all
  delays removed.

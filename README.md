# Scan chain swapping through TSVs in a two-layer 3D IC

Shifting a test pattern into a scan chain makes every flip-flop toggle each
time a 0-to-1 or 1-to-0 edge in the scan stream passes it. In a 3D stack the
die that is far from the heat sink suffers most from that power. This design
lowers the number of such toggles per layer with very little hardware. The
scan chains of the two layers swap a zone of cells through through-silicon
vias (TSVs). Inside the zone, each layer's scan stream runs through the
other layer's flip-flops. Bits that would make a layer's own stream change
value twice can then be delivered by the other layer's stream, where they
fit without a transition.

The RTL is small: a mux-D scan flip-flop, a per-layer scan chain with four
TSV ports, and a top that stacks two layers and crosses the TSVs. Most of
the subtlety lies in how a tester must prepare patterns for the swapped
chains. That part is described at length below and is modelled in the
testbenches.

## The swapped stack

Cells of each layer are numbered 1..N from the scan input. The zone is cells
`F = SWAP_FIRST` to `L = SWAP_LAST`, the same positions in both layers. The
defaults are N = 7 and zone 5..6:

```
              heat sink
top layer:    si_top -> T1 -> T2 -> T3 -> T4   T5 -> T6   T7 -> so_top
                                          \ /          \ /
                                     TSVs  X       TSVs X
                                          / \          / \
bottom layer: si_bot -> B1 -> B2 -> B3 -> B4   B5 -> B6   B7 -> so_bot
```

That gives two scan paths:

* **path A**: `top_scan_in` → T1..T4 → B5, B6 → T7 → `top_scan_out`
* **path B**: `bot_scan_in` → B1..B4 → T5, T6 → B7 → `bot_scan_out`

Each crossing site has one TSV in each direction, so four TSVs in all:

| TSV | from | to |
|---|---|---|
| entry, down | top cell F-1, or `top_scan_in` when F = 1 | bottom cell F |
| entry, up | bottom cell F-1, or `bot_scan_in` when F = 1 | top cell F |
| exit, down | top cell L | bottom cell L+1, or `bot_scan_out` when L = N |
| exit, up | bottom cell L | top cell L+1, or `top_scan_out` when L = N |

Only the scan path changes. In capture (and in functional operation), when
`scan_en` is low, every cell still loads the `d` input from its own layer's
logic. The zone is fixed when the chip is built: TSVs are placed where the
zone analysis of the test set puts the boundaries. It is therefore a
parameter, not a run-time setting.

The two layers may have different lengths (`TOP_LEN`, `BOT_LEN`). The zone
must lie within the shorter one. Path A always has `TOP_LEN` cells and
path B `BOT_LEN` cells.

### Example

The top layer must hold 0000110 and the bottom layer 1111001 (cells 1..7).
Swapping cells 5..6 makes path A hold 0000000 and path B 1111111. Neither
stream has a single transition. Loaded from reset, the top layer toggles 2
times and the bottom layer 5 times. The same patterns in plain chains cost
10 and 17 toggles. `tb_scan3d_top` checks this case.

## Preparing patterns for the swapped stack

A tester that drives this stack must do three things that a tester for
plain chains does not.

1. **Map layer contents to paths.** If the top layer must hold `t[i]` and
   the bottom layer `b[i]`, then path A must carry `b[i]` for i in the zone
   and `t[i]` elsewhere. Path B carries the reverse.
2. **Serialise last cell first.** Path position N is shifted in first, and
   position 1 last. A path shorter than the longest one is padded at the
   front. Padding bits fall out of the far end before the load finishes.
   Padding with the path's last bit adds no transitions. A full load takes
   `max(TOP_LEN, BOT_LEN)` shift cycles.
3. **Unscramble the responses.** The captured responses leave in path
   order. The bits at zone positions on `top_scan_out` belong to the bottom
   layer, and those on `bot_scan_out` belong to the top layer.

### Choosing the zone

The testbenches choose the zone from the test set as follows:

* Look at the patterns of the layer away from the heat sink, within the
  common length of the two chains.
* For each position i, count the patterns that have a 0-to-1 transition
  there. Do the same for 1-to-0 transitions. A transition at i is a
  specified bit at i whose next specified bit has the other value.
* For each kind, take the position that maximises count × i. The factor i
  is the number of cells that a transition between cells i and i+1 passes
  on its way in, so it is the number of toggles that transition costs.
* The zone runs from one past the smaller of the two positions up to the
  larger.

For the example above this gives cells 5..6.

### Filling don't-care bits

The low-power fill used with the swapped stack sets each don't-care bit to
the nearest specified bit before it along its scan path. A leading
don't-care takes the first specified bit. The fill is applied to the swapped
paths, not to each layer's pattern. A don't-care inside the zone therefore
takes its value from the other layer's bits around it. Take top pattern
0010X10 and bottom pattern 110XX01 with zone 4..5. The bottom layer's X
bits sit in path A between a 1 and a 1, so they become 1. The top layer's X
sits in path B after a 0, so it becomes 0. `tb_scan3d_workload` checks this
example.

## Modules

| module | role |
|---|---|
| `scan3d_top` | the two-layer stack, its four TSV wires and a shift-rule assertion at the zone entry |
| `layer_scan_chain` | one layer's chain of `scan_ff` cells with the zone's TSV ports |
| `scan_ff` | mux-D scan flip-flop with asynchronous active-low reset to 0 |

Parameters of `scan3d_top` (`layer_scan_chain` has the same ones, with
`CHAIN_LEN` for the length):

| parameter | default | meaning |
|---|---|---|
| `TOP_LEN` | 7 | cells in the top layer's chain (next to the heat sink) |
| `BOT_LEN` | 7 | cells in the bottom layer's chain |
| `SWAP_EN` | 1 | 0 builds plain chains without the zone, for comparison |
| `SWAP_FIRST` | 5 | first cell of the zone |
| `SWAP_LAST` | 6 | last cell of the zone |

Ports of `scan3d_top`:

* `clk`, `rst_n` and `scan_en`.
* For each layer, `*_scan_in` and `*_scan_out`.
* For each layer, `*_d` and `*_q`, with bit i for cell i. These are where
  the layer's own logic connects.

Timing: the flip-flops are the only state. A bit on a scan input reaches
cell i after i shift cycles, whichever layer cell i is on. The TSVs are
modelled as wires, with no delay.

With `SWAP_EN` set, elaboration checks stop the build if the zone is empty
or runs past either chain. A concurrent assertion in
`scan3d_top` checks every shift cycle: the first zone cell of each layer
must take the value the other layer offered through the entry TSV.

## What is the source's and what is this design's own

These points follow the published method:

* Two layers, each with one scan chain.
* The crossing at the zone edges, and the worked sizes: 7 cells per layer
  and zone 5..6.
* Chains of different length, with the zone bounded by the common length.
* The zone-selection and filling ideas.

These points are choices made here:

* The scan cell is a mux-D flip-flop.
* The reset is asynchronous, active-low, to 0.
* Each crossing site has one TSV per direction.
* A zone may touch the first or the last cell.
* `SWAP_EN` exists.
* All port names.

The source describes two steps only loosely, and the testbenches fill in
the details:

* **Zone selection.** The source does not say which patterns are counted,
  how don't-care bits break up transitions, or which side of the zone a
  boundary position falls on. The reading above is the one that reproduces
  the worked example.
* **Low-power fill.** The source names it without defining it. The
  nearest-earlier-bit rule is the one that reproduces the filled example.

Two things are not built:

* **Pattern reordering.** The zone selection and the fill are software steps
  on the test set. So is the reordering of patterns and responses that the
  tester must do. None of them is RTL here. The testbenches contain
  reference models of all three.
* **The circuits under test.** The logic of each layer is left out. Its
  connection points are the `*_d` and `*_q` ports.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb/tb_scan_ff.sv` drives random shift and capture cycles and an
  asynchronous reset pulse.
* `tb/tb_layer_scan_chain.sv` runs three layers side by side: an inner zone,
  a zone that covers the whole chain, and no zone. It checks every cell
  after every cycle against the rule "a cell holds what its scan source
  offered". It also checks the three signals that leave the layer.
* `tb/tb_scan3d_top.sv` uses the default sizes. It first runs the worked
  example, including its toggle counts. It then runs 60 rounds of capture
  followed by a load. Each round checks the layer contents and checks the
  unloaded responses in path order. It counts shift cycles, captures, loads
  whose zone carries the other layer's differing data, and unloads whose
  zone responses leave through the other layer's output. Each count must be
  above zero.
* `tb/tb_scan3d_workload.sv` runs the whole flow through `tb/tb_swap_flow.sv`
  on four layer pairs with one chain per circuit. The chain lengths are the
  flip-flop counts of ISCAS'89 pairs: s13207/s15850 (669/597),
  s38417/s35932 (1636/1728) and s38584/s35932 (1426/1728). The first pair
  also runs with the two circuits exchanged (597/669). Each pair gets
  16 synthetic patterns with 30% specified bits and a band structure. For
  each pair the flow:
  * picks the zone with the procedure above;
  * loads the patterns into three stacks: all-zero fill, low-power fill,
    and swapped with low-power fill;
  * checks that every specified bit lands in its own layer;
  * checks that the toggles measured on each layer's flip-flops equal a
    count derived from the scan streams alone.

  It also runs the zone-4..5 fill example. On these synthetic patterns the
  swapped stack toggles the bottom layer 13–34% less than low-power fill
  alone, depending on the pair. The patterns are not the benchmark circuits' ATPG patterns, so
  these figures show that the mechanism works. They are not a reproduction
  of measured results. The band structure was chosen to resemble the worked
  example, where swapping pays off. On patterns without such structure the
  gain would be smaller, or there might be none.

Run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  --top-module tb_scan3d_top tb/tb_scan3d_top.sv
obj_dir/Vtb_scan3d_top
```

The workload testbench takes a few minutes to compile, because its stacks
have up to 1728 cells per layer, and under a minute to run.

## Changing the design

* Set `TOP_LEN` and `BOT_LEN` to the chain lengths of the two circuits. Set
  `SWAP_FIRST` and `SWAP_LAST` to the zone your pattern analysis picked. A
  different zone means TSVs at different places, so it is a change to the
  physical design.
* `tb_swap_flow` takes lengths, pattern count and seed as parameters. To
  study a test set of your own, replace its `pbit` function with your
  patterns.
* More than two layers, or several zones per chain, are not supported. Both
  would be natural extensions of `layer_scan_chain`: one pair of TSV ports
  per zone boundary.

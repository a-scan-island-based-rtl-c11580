# Scan islands for pre-bond test of a two-layer die stack

When a processor is split across two dies that are later bonded face to
face, neither die is a working circuit on its own: half of the blocks are
missing, and thousands of signals end in die-to-die (D2D) vias that lead
nowhere until bonding. Without a way to test each die before bonding,
every bad die is only found after it has been stacked with a good one, so
the yield of the stack drops with every layer added.

The design here treats each die as a closed *scan island*. Every D2D signal
gets a scan cell on both sides of the bond: an injection cell where the
signal enters a layer and an observation cell where it leaves. Before
bonding, a tester can supply every missing input and read every dangling
output through scan chains. Each layer has a *Layer Test Controller* (LTC)
that reaches its chains through probe pads. After bonding, the pads are cut
off, and the same chains become part of one serial loop behind a standard
IEEE 1149.1 TAP. The test hardware therefore keeps a use for the life of
the chip. A redundant, enable-controlled clock tree gives the die that is
normally clocked from the other layer a clock of its own before bonding.

The sizes are those of a two-layer split of an Alpha 21264 class core:
1115 signals go from layer 1 to layer 2 and 1282 from layer 2 to layer 1.
That makes 2397 signals and 4794 border cells, with sixteen chains per
layer.

## Border cells

`inject_scan_cell` sits on a signal that arrives through a via and feeds
logic directly. It is one flip-flop in a scan chain. With `scan_en` high it
shifts. With `scan_en` low it **holds**, so the injected pattern stays in
place while the logic runs. While `test_en` (Test_Enable) is high the logic
sees the stored bit instead of the via.

In the circuit this cell models, the stored bit reaches the via net through
a pass transistor. That costs very little area, but it can only be turned
on before bonding. After bonding it would fight the driver on the other
layer. A two-state simulation cannot show that conflict, so the pass device
is written as a 2:1 select. The rule it implies is enforced one level up:
the LTC forces `test_en` low whenever the stack is bonded, and an assertion
checks this. If you want injection to work after bonding, you are asking for
the real multiplexer version, which costs area and delay on every D2D path.
In that case, lift the `bonded` gating of `test_en` in
`layer_test_controller`.

`observe_scan_cell` taps a signal that leaves through a via. It shifts when
`scan_en` is high. Otherwise it captures the outgoing value when
`capture_en` is high, and holds when neither is set. The tap does not touch
the outgoing net.

Every D2D signal gets both cells, even where the via connects to a register
that could itself be made scannable. This is the worst case for area. A real
design would drop cells wherever an existing scan flop already sits on the
via.

## One layer: `die_layer`

A layer holds `N_IN` injection cells and `N_OUT` observation cells. They are
numbered 0..N_IN-1 for injection and N_IN..N_IN+N_OUT-1 for observation.
Cell *k* sits in chain *k* mod 16, at position *k* div 16 counted from the
chain's head. Chain lengths therefore differ by at most one: 149 or 150
cells at the default size. Each chain starts with a port pair,
`core_si`/`core_so`. This is where the layer's own scannable registers are
stitched in. Leave the pair looped back if there are none.

### Layer Test Controller

Before bonding (`bonded = 0`) the LTC is driven from probe pads:

| pads | meaning |
|---|---|
| `pad_si[15:0]`, `pad_so[15:0]` | one scan-in and one scan-out per lane |
| `pad_sel` | `SEL_CHAINS`: lane *i* is chain *i*; `SEL_BYPASS`: lane *i* is one-bit bypass register *i* |
| `pad_se`, `pad_ce`, `pad_te` | shift enable, capture enable, Test_Enable |

Sixteen lanes, sixteen bypass bits and one select make the 33-pad interface
this LTC is modelled on. The three control pads are extra, because that pad
count leaves out shift, capture and Test_Enable. With the bypass selected,
the chains are frozen (no shift, no capture) and each lane is a one-cycle
delay. This lets a tester check its probe contacts without touching the
chains.

After bonding (`bonded = 1`) the pads are ignored, `pad_so` is held at 0 and
`test_en` is 0. The LTC is then one link of the serial loop:
`tdi -> chain 0 -> chain 1 -> ... -> chain 15 -> tdo` when chains are
selected, or `tdi -> bypass register 0 -> tdo` when bypass is selected.

### Pre-bond test sequence (per layer, `pad_sel = SEL_CHAINS`)

1. Shift for *L* cycles with `pad_se = 1`, where *L* is the longest chain.
   At cycle *t*, lane *c* carries the bit meant for position *L-1-t* of
   chain *c*.
2. Set `pad_se = 0` and `pad_te = 1`. The injected values now drive the
   layer's logic.
3. Wait while the logic settles. Registered paths need one cycle per
   register stage.
4. Give one cycle of `pad_ce = 1`. The observation cells capture.
5. Shift *L* cycles more. Before the *t*-th shift, lane *c* shows position
   *len(c)-1-t*.

## After bonding: TAP and serial loop

`tap_controller` is a standard IEEE 1149.1 TAP. It has the sixteen-state
controller, a 4-bit instruction register that captures `0001`, a one-bit
BYPASS register, and TDO updated on the falling edge of TCK. Three
instructions exist:

| opcode | name | data path between TDI and TDO |
|---|---|---|
| `4'h3` | `IR_LAYER_SCAN` | every chain of every layer; Capture-DR makes all observation cells capture |
| `4'h2` | `IR_LAYER_BYPASS` | one bypass bit per layer |
| `4'hF` and anything else | `IR_BYPASS` | the TAP's own bypass bit |

The loop runs from the TAP to the LTC on its own layer (layer 2), then to
the LTC on layer 1, then back to the TAP. At the default size it is
2 x 2397 + 100 = 4894 bits long; the 100 bits are the adder example below.
After Capture-DR the first bit on TDO is the last cell of layer 1's chain
15. Then come the rest of that chain back to its head, then chains 14 down
to 0, then layer 2 in the same order. There is no boundary-scan register and
no IDCODE. Add them to `tap_controller` if the chip needs full 1149.1
compliance at its package pins.

TCK is the same net as the chip clock in `die_stack_top`, so the chains
shift on TCK after bonding.

## Clocking before and after bonding

The power-optimised clock tree lies almost entirely on layer 2. Layer 1
only gets local clock taps through vias, so before bonding it has no clock.
`redundant_clock_tree` is a second H-tree on layer 1 with an enable on every
buffer.

- **Before bonding:** the tester drives `l1_probe_clk` and holds
  `l1_tree_en` high. Every leaf carries the probe clock.
- **After bonding:** `l1_tree_en` goes low and every buffer of the redundant
  tree switches off. Each leaf then carries the clock arriving through its
  via.

A disabled buffer is modelled as idling low. The leaf net is modelled as a
select between tree and via. In silicon both would be buffer outputs with
enables on a shared net, and a synthesis flow should use clock-gating cells
for them. The tree has four binary levels, which gives sixteen leaves.
Layer 1's border cells use leaf 0 and the adder island uses leaf 1.

## The staggered adder example

`staggered_adder` is a three-stage pipelined adder:

1. Adds the low halves of the operands.
2. After a register bank, adds the high halves and the carry from stage 1.
3. After a second bank, derives the flags (carry, signed overflow, negative,
   zero) combinationally.

The sum and flags appear two rising edges after the operands.
`adder_island` puts it between D2D buses, as if its operands came from
another layer and its result went to one. It has 32 + 32 injection cells on
the operands and 36 observation cells on `{flags, sum}`, all in one chain
that starts at operand A bit 0. The capture must come on the third edge
after the pattern is loaded. In `die_stack_top` the island sits on layer 1
at the head of chain 0, so that chain is 250 cells long.

The 32-bit width and the flag set are this design's choices.

## The stack: `die_stack_top`

`bonded` selects between two situations:

- **`bonded = 0`:** two separate dies on probe stations. Vias are open and
  read as 0. Each LTC answers on its own pads, and layer 1 runs on its probe
  clock.
- **`bonded = 1`:** the finished stack. Vias connect the layers, the pads
  are dead, layer 1 runs on its via clocks, and the TAP reaches both layers.

The processor logic of the two layers is not included. Its D2D inputs
(`l1_logic_in`, `l2_logic_in`), its D2D outputs (`l1_core_out`,
`l2_core_out`), its scan segments (`l*_core_si`/`l*_core_so`) and the scan
controls those segments need are ports of the top. The adder's operand and
result buses on the layer-2 side are ports too (`l2_adder_*`).

Parameters, all with defaults taken from the reference sizes except where
noted:

| parameter | default | meaning |
|---|---|---|
| `N12` | 1115 | signals from layer 1 to layer 2 |
| `N21` | 1282 | signals from layer 2 to layer 1 |
| `NCH` | 16 | chains (and bypass bits) per layer |
| `AW` | 32 | adder width (own choice) |
| `CLK_LEVELS` | 4 | levels of the redundant clock tree (own choice) |

## Where this departs from the reference circuit, and what is assumed

- **Pass transistors become selects.** The injection pass transistor is a
  2:1 select, and pre-bond injection is still the only injection allowed
  (see *Border cells*).
- **Flip-flops, not latches.** Cells are edge-triggered flip-flops; the
  reference cell is built from an eight-transistor latch.
- **Three extra pads.** The LTC has shift, capture and Test_Enable pads in
  addition to the 33-pad interface.
- **Unspecified details are this design's own.** Stitching order, serial
  loop order, the one-bit serial bypass, the select encoding and the TAP
  opcodes are chosen here. So are resets: every flip-flop resets
  asynchronously to 0.
- **Layer roles are chosen.** Which die carries the TAP and the main clock
  tree (layer 2) and which gets the redundant tree (layer 1) is this
  design's choice.
- **Physical parts are not modelled.** Pads, vias, probing, power and
  ground nets, and the decoupling capacitors that bonded power/ground test
  pads form have no logic function. They appear only as the ports and the
  `bonded` switch described above.
- **Area is not checked.** The reference cost estimate is 75.8 um^2 per cell
  and about 0.17% of the die. That is a layout figure, which RTL cannot
  confirm. The cell count behind it (4794) is what the default parameters
  build.

## Files

`rtl/`:

- `scan_island_pkg.sv`: shared constants, the select type, TAP states and
  opcodes, and the flag struct.
- `inject_scan_cell.sv`, `observe_scan_cell.sv`: the border cells.
- `staggered_adder.sv`, `adder_island.sv`: the adder example.
- `layer_test_controller.sv`, `die_layer.sv`: one layer.
- `tap_controller.sv`: the IEEE 1149.1 TAP.
- `redundant_clock_tree.sv`: the layer-1 test clock tree.
- `die_stack_top.sv`: the whole two-layer stack.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each ends
by printing `TB_RESULT checks=N failures=M`.

`tb_die_stack_top` runs at the default size. It covers:

- the complete pre-bond test of both layers: load, inject, capture and
  unload, checked bit by bit;
- the pad bypass lanes;
- via transfers in both directions after bonding;
- a full `IR_LAYER_SCAN` capture and unload of the 4894-bit loop;
- a flush through the loop;
- `IR_LAYER_BYPASS` and `IR_BYPASS`.

It counts each of these mechanisms and fails if one never happens.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/scan_island_pkg.sv \
    tb/tb_die_stack_top.sv --top-module tb_die_stack_top -Mdir obj_top
./obj_top/Vtb_die_stack_top
```

Replace `die_stack_top` with any other module name to run its testbench.
The other files are found through `-Irtl`. The full-size stack test takes
well under a second.

Lint with:

```
verilator --lint-only -Wall -Irtl rtl/scan_island_pkg.sv rtl/die_stack_top.sv
```

# PARS: power-aware route selection for silicon-photonic Benes switches

A silicon-photonic switch fabric is built from 2x2 microring-resonator (MRR)
switching elements. Each element is either **Bar**: light stays on its
through port. Or it is **Cross**: light is dropped to the other output.
Fabrication-process and thermal variations shift every ring's resonance by a
different amount. Each element therefore needs some *trimming* power (heater
power) to be pulled back to its operating point, and that power depends on
the state it is pulled to:

* `P_TB` is the trimming power needed to hold the element in Bar.
* `P_TC` is the trimming power needed to hold it in Cross.

For some elements Cross is the cheap state, for others Bar is.

A multistage network such as Benes offers several routes between any input
and output. PARS (power-aware and reliable control plane) uses that freedom.
It gives every element a **default state**, the one that costs it less
power. For each connection it then picks the route that forces the fewest
elements out of their default state. The fabric itself is unchanged: only
the controller's choice of route differs.

This repository holds synthesizable SystemVerilog for that controller,
sized for an N x N Benes fabric, with N = 8 by default. It also holds
self-checking testbenches built around a behavioural model of the optical
fabric.

## The two mechanisms

| mechanism | default state of each element | what is minimised |
|---|---|---|
| configuration-aware (`mode_ca = 1`) | Bar for every element (the as-designed state) | number of elements set to Cross |
| trimming-aware (`mode_ca = 0`, the main mode) | Cross if `P_TC < P_TB`, else Bar | number of path elements away from their own default |

Both mechanisms use the same hardware. The configuration-aware mechanism is
the trimming-aware one with the default vector forced to all zeros.

## The Benes fabric as the controller sees it

An N x N Benes network has `2*log2(N) - 1` stages of `N/2` elements. That is
`S = N*log2(N) - N/2` elements in all:

| N | stages | elements S | routes per input-output pair | route-table entries |
|---|---|---|---|---|
| 2 | 1 | 1 | 1 | 4 |
| 4 | 3 | 6 | 2 | 32 |
| 8 (default) | 5 | 20 | 4 | 256 |
| 16 | 7 | 56 | 8 | 2048 |

A route crosses exactly one element per stage. Elements are numbered row by
row: element (row r, stage t) is `r*STAGES + t`. Bit `s` of every S-bit
vector refers to element `s`, with Bar = 0 and Cross = 1. For 4x4:

```
            stage 0        stage 1        stage 2
 row 0   I0,I1 -> S0       S1             S2 -> O0,O1
 row 1   I2,I3 -> S3       S4             S5 -> O2,O3

 S0.out0 -> S1.in0    S1.out0 -> S2.in0
 S0.out1 -> S4.in0    S1.out1 -> S5.in0
 S3.out0 -> S1.in1    S4.out0 -> S2.in1
 S3.out1 -> S4.in1    S4.out1 -> S5.in1
```

The upper output of a first-stage element feeds the upper half-size
sub-network, and its lower output feeds the lower one. The last stage
mirrors this, and the construction repeats inside each half down to a
single 2x2 centre element.

Worked example (4x4). From I0 to O0 there are two routes:

* S0, S1 and S2 all in Bar.
* S0 in Cross, S4 in Bar, S2 in Cross.

The configuration-aware mechanism takes the first. Now suppose variations
make Cross the cheap state of S3 and S5. From I3 to O3 the routes are:

* S3, S4 and S5 in Bar. This costs 2, because S3 and S5 leave their Cross
  default.
* S3 in Cross, S1 in Bar, S5 in Cross. This costs 0.

The trimming-aware mechanism therefore takes the second route.

## Blocks

```
 p_tb, p_tc ──► trim_classifier ──► D register (trim_load) ──┬──► default_state
                                                             │ mode_ca forces 0
 req_in, req_out ──► route_lut ──► N/2 routes (cfg, mask) ──►route_selector ──► output register ──► cfg, cfg_route, cfg_cost, cfg_valid
```

### `trim_classifier`: default state per element

This block sets `d[s] = 1` (Cross) when `p_tc[s] < p_tb[s]`. Equal codes
keep Bar. The powers are `TW`-bit unsigned codes, with `TW = 8` by default.
They come from whatever calibration measures the ring displacement, which
lies outside this design.

The switching power `P_C` that Cross also draws is not part of the
comparison. The rule compares only how far the displaced resonance is from
each operating point. To fold `P_C` in, add it to `p_tc` before the
controller.

### `route_lut`: every route of every pair

This is a read-only table indexed by `{in_port, out_port}`. Each entry holds
all `N/2` routes of that pair. A route has two S-bit vectors:

* `route_cfg` gives the state each element on the path must take.
* `route_mask` marks the elements on the path.

The table is not typed in. An elaboration-time function computes it by
taking the Benes network apart recursively. Bit `lvl` of the route index,
most significant bit first, picks the upper (0) or lower (1) sub-network at
recursion level `lvl`.

At each level the route uses one first-stage element, `j = in/2`, and one
last-stage element, `j' = out/2`, of the current sub-network:

* The first-stage element's state is `(in mod 2) XOR sub`.
* The last-stage element's state is `(out mod 2) XOR sub`.

The recursion continues with `in/2` and `out/2` inside the chosen half. The
2x2 centre element finally takes state `in XOR out`.

At N = 8 the table is 64 entries x 4 routes x 40 bits, or 10,240 bits.

### `route_selector`: XNOR, count, minimum

For each candidate route k, all in parallel:

```
R_D[k]  = route_cfg[k] XNOR D            1 = element already in its default
cost[k] = popcount(route_mask[k] & ~R_D[k])   path elements pushed out of default
```

A linear scan keeps the first route whose cost is strictly below the best so
far, so ties go to the lowest route index. The output configuration is:

```
cfg = (route_cfg[k*] & route_mask[k*]) | (D & ~route_mask[k*])
```

The path elements take the states the route needs. Every element off the
path is left in its default state, where it draws the least power. The
selector is purely combinational.

### `pars_controller`: top level

This module holds the D register and the mode multiplexer, instantiates the
three blocks above and registers the result.

| port | dir | width (N = 8) | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `trim_load` | in | 1 | load D from the classified `p_tb`/`p_tc` |
| `p_tb`, `p_tc` | in | 20 x 8 | trimming-power codes per element |
| `mode_ca` | in | 1 | 1 configuration-aware, 0 trimming-aware |
| `req_valid`, `req_in`, `req_out` | in | 1, 3, 3 | connection request |
| `cfg_valid` | out | 1 | result of the previous cycle's request |
| `cfg` | out | 20 | fabric configuration (Bar 0, Cross 1) |
| `cfg_route` | out | 2 | index of the chosen route in the table |
| `cfg_cost` | out | 3 | path elements away from their default |
| `default_state` | out | 20 | the D vector currently held |

Timing:

* A request is accepted on every clock edge. Its result appears on the next
  cycle with `cfg_valid = 1`.
* `cfg` holds its value between requests.
* `trim_load` updates D at the same edge. A request made in that same cycle
  still uses the old D.
* `mode_ca` is sampled together with each request.
* Reset sets D and `cfg` to all Bar and clears `cfg_valid`.
* A radix that is not a power of two stops elaboration with an error.

## What this RTL takes from the PARS method and what it adds

These parts follow the PARS method: the two mechanisms, the per-element
default state chosen by comparing trimming powers, the search over a table
of precomputed routes, the XNOR comparison with the default vector, the
choice of the route with the fewest elements out of default, the Benes case
study and the 8x8 main size.

These parts are this design's own choices:

* **The sense of the comparison.** The published algorithm forms
  `R XNOR D` and keeps the route with the fewest ones. Taken literally, that
  picks the route that *agrees least* with the defaults, which contradicts
  the method's stated aim. Here the cost counts the zeros of `R XNOR D` on
  the path, which means the elements pushed out of their default. The
  output is the chosen route applied to the fabric, not the `R XNOR D`
  vector itself.
* **Path masks and off-path elements.** Only elements on the route are
  costed. Every other element is set to its default state.
* **One pair per request.** A request routes a single input-output pair.
  The controller does not track other live connections or resolve conflicts
  between them, so an external scheduler must serialise conflicting
  requests.
* **The table is a fixed ROM.** Routes are computed at elaboration for a
  Benes network and cannot be rewritten at run time. Another topology would
  need another generating function, or a writable table.
* **Clocking and interface.** The D register, the one-cycle registered
  output, the valid signals, the reset values, the trimming-code width and
  the tie rules are all this design's choices.
* **Not reproduced.** The reported area, power and delay of the controller
  (about 44 ps at 8x8 in a 15 nm flow) and the fabric power savings (about
  28% for the trimming-aware mechanism) depend on a device power model and a
  cell library that are not part of this RTL. The testbenches count elements
  held out of their default state instead. On random variation patterns
  over every pair of an 8x8 fabric, the trimming-aware mechanism leaves
  about half as many elements out of their default as the
  configuration-aware one.

The optical parts are not in the RTL: the rings, the Benes fabric, the
heater drivers and whatever measures the resonance displacement. The
controller's `cfg` and `default_state` outputs would drive the heater
drivers, and `p_tb`/`p_tc` would come from the measurement.

## Verification

The reference in every testbench is `tb/benes_model_pkg.sv`. This is a
behavioural fabric model written independently of the route generator: it
follows light line by line through explicit inter-stage permutations. It
can trace a configuration from an input to an output, and it can search all
`2^STAGES` state choices along a path for every route and its least cost.

| testbench | covers |
|---|---|
| `tb_trim_classifier` | ties, extremes, off-by-one codes, 500 random vectors |
| `tb_route_lut` | every pair at 8x8 and 4x4: path length, connectivity, mask = traced path, no stray bits, distinct routes, route count = model's count; the two 4x4 I0 to O0 routes |
| `tb_route_selector` | directed ties and config-aware cases, 3000 random lists against a reference min-scan |
| `tb_pars_controller` | default size, 6000 cycles of random requests, loads and modes, a mid-run reset; checks connectivity, optimal cost, off-path defaults, 1-cycle latency, idle hold, load/request ordering, and counts each mechanism |
| `tb_pars_radix` | N = 2, 4 and 8 over all pairs and 20 variation patterns; the 4x4 example; compares the two mechanisms |

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. Each has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pars_pkg.sv tb/benes_model_pkg.sv rtl/trim_classifier.sv rtl/route_lut.sv \
  rtl/route_selector.sv rtl/pars_controller.sv tb/tb_pars_controller.sv \
  --top-module tb_pars_controller
./obj_dir/Vtb_pars_controller
```

`tb_pars_radix` also needs `tb/pars_radix_run.sv`. The single-block
testbenches need only the package, the block and, for `tb_route_lut`, the
model package.

## Changing it

* **Radix.** Set `N` on `pars_controller`, using a power of two. It
  elaborates up to N = 32. The route table grows as `N^3/2` routes, so large
  radices would want an online route generator instead.
* **Code width.** Set `TW`.
* **Another topology.** Replace the route function in `route_lut`. The
  selector takes any list of `R` routes of `P` elements each.

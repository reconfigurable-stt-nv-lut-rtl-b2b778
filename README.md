# Reconfigurable STT-NV LUT functional units

A small processor core has few functional units. When a burst of, say,
FP additions arrives, the single FP adder becomes the bottleneck while the
multipliers and dividers, idle more than 95 % of the time, sit unused. This
design turns those rarely used units into reconfigurable ones. Each
multiplier and divider is a LUT fabric whose configuration is held in
spin-transfer-torque non-volatile (STT-NV, magnetic tunnel junction) cells.
Hardware watches how busy each function is and rewrites the LUTs of idle
units, so that they become extra copies of whichever function is in
demand. A unit turns back the moment its own function is needed.

The RTL here is the functional-unit cluster of one dual-issue core:

| units | technology | functions |
|---|---|---|
| 3 integer ALUs | static CMOS, fixed | int add/sub |
| 1 FP adder | static CMOS, fixed | fp add/sub |
| 4 reconfigurable units (home: int mul, int div, fp mul, fp div) | STT-NV LUT fabric | any of the six functions |

The integer and FP adders stay in CMOS. A LUT adder costs about 3x the delay
and 6x the active power of a CMOS one. A LUT multiplier is smaller than its
CMOS version and leaks far less.

## Functions and their codes

`rfu_pkg::fn_e` lists the six functions in this order: `FN_INT_ADD`,
`FN_FP_ADD`, `FN_FP_MUL`, `FN_INT_MUL`, `FN_INT_DIV`, `FN_FP_DIV`. The
balanced policy also hands out idle units in this order.

Datapaths (`fn_exec`) are 64 bits wide:
- integer add/subtract;
- the low 64 bits of a 64x64 product;
- unsigned divide or remainder. Dividing by zero gives an all-ones quotient,
  and the remainder equals the dividend;
- IEEE 754 double add/subtract, multiply and divide, rounded to nearest
  even. Subnormal inputs and outputs are flushed to zero, and invalid
  operations return `0x7FF8000000000000`.

Latencies, in cycles from issue to result:

| function | CMOS | STT-NV LUT |
|---|---|---|
| int add | 1 | 3 |
| fp add | 2 | 6 |
| fp mul | 4 | 8 |
| int mul | 3 | 6 |
| int div (unpipelined) | 20 | 40 |
| fp div (unpipelined) | 12 | 24 |

The STT-NV column applies the published delay ratios to the CMOS numbers:
- adders are 2.89x slower, rounded up to 3x;
- multipliers are pipelined twice as deep;
- dividers are assumed to be twice as deep as well.

The CMOS numbers are this design's own choice for a 1 GHz core.

## How a reconfigurable unit changes function

Each reconfigurable unit (`stt_rfu`) owns a configuration array
(`stt_lut_array`) of 65 four-input LUTs of 16 bits each: 1040 bits, stored
as 9 words of 128 bits. 65 LUTs is the size of the 64-bit LUT adder, and so
bounds the bits that differ between two functions. The unit does not keep
its function in a separate register. It decodes it from LUT 0 of its own
array, the header, which holds `{12'hC0F, 1'b0, fn}`. Whatever has been
written into the fabric is what the unit does. If the header is invalid,
the unit refuses all work.

A rewrite is run by `reconfig_ctrl`:

1. It raises `hold` on the unit, so the unit takes no new operations.
2. It waits until the unit has no operation in flight.
3. It copies the 9 words of the target image from `cfg_rom` over one shared
   128-bit bus. An STT-NV write takes 25 cycles (25 ns at 1 GHz), so a new
   word is accepted every 25 cycles.
4. It releases the unit when the last word has settled.

With the default parameters, the unit is held for 2 + 9 x 25 = **227 cycles**
plus any drain time. The published estimate of 8 writes and 200 cycles
rounds 1040 bits down to 1 Kbit. This design writes all 1040 bits.

The controller rewrites one unit at a time. It keeps a target function per
unit. A policy decision loads all the targets at once. An adjustment request
puts one unit back to its home function and marks it urgent. An urgent unit
is served before any other pending rewrite, but a rewrite already in
progress is finished first.

The published scheme, at each interval, first resets every reconfigured
unit to its home function and then applies the new assignment. Here the two
steps are merged into one rewrite straight to the final function, which
ends in the same state. A unit whose function does not change is not
touched.

The configuration ROM holds one full image per function. No real bitstreams
exist for this design. The header LUT is the only functional part of an
image. The other 64 LUTs hold a placeholder truth table
`tt(fn,k) = ((fn+1)*0x9E37) ^ (k*0x7F4B) ^ (k<<9)` (16 bits) for LUT k. The
real arithmetic of every function is `fn_exec`, a behavioural stand-in for
the LUT netlist. Routing and switch-box configuration is not modelled.

At reset, each array loads the image of its home function. This stands for
the power-on state of a non-volatile, pre-programmed fabric.

## Monitoring and the three adaptation algorithms

`activity_monitor` counts, for each function, the cycles in which it was
*busy*. A function is busy in a cycle if:
- a unit configured to it has an operation in flight, or
- an operation of that function is waiting to issue.

At the end of a period, the monitor does three things:
- it copies the counts to `snap_cnt`;
- it clears the counters;
- it pulses `decide`.

The period depends on the algorithm:

| `algo` | period | decisions |
|---|---|---|
| `ALGO_NONE` | none | none; units stay home (the unadapted baseline) |
| `ALGO_STATIC` | `LEARN` = 100 M cycles | exactly one, at the end of the learning phase |
| `ALGO_DYN_BIA` | `INTERVAL` = 100 K cycles | every interval |
| `ALGO_DYN_BMA` | `INTERVAL` = 100 K cycles | every interval |

Changing `algo` sends every unit home and restarts monitoring.

`reconfig_policy` turns the counts into targets. A reconfigurable unit is
*idle* if its home function had a count of zero. Units that are not idle keep
their home function. The idle units, taken in unit order k = 0, 1, 2, ...,
are handed out as follows (nA is the number of functions with a non-zero
count):

- **Static**: to the active functions in order of activity. Idle unit k gets
  the (k mod nA)-th most active function.
- **Balanced idle-to-active (BIA)**: to the active functions in the fixed
  order int add, fp add, fp mul, int mul, int div, fp div. Idle unit k gets
  the (k mod nA)-th of them. This rule only needs one idle bit per
  function. Here the same busy counters serve all three algorithms.
- **Biased idle-to-most-active (BMA)**: a function other than int add is
  *highly active* if it was busy more than `BMA_THRESH` = 10 K cycles of the
  interval. The first idle unit goes to the most active highly active
  function. Every other idle unit goes to int add, because int add is almost
  always the busiest function.

The wrap-around (k mod nA) and the tie-break (lower function code first) are
this design's choices.

## Issue, conflicts and adjustment

`fu_issue` receives up to two operations per cycle. Slot 0 is served first.
Each operation goes to the lowest-numbered free unit that is currently
configured to its function.

If no such unit is free, the operation is refused (`accept` low). This is a
*functional-unit conflict*. The issue stage must offer the operation again.

If no unit at all is configured to the requested function, the issue logic
also raises an adjustment request. This happens, for example, when the only
multiplier has become an adder. The request goes to every reconfigurable
unit whose home is that function.

## Top level: `rfu_cluster_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `algo` | in | `algo_e`: none, static, dynamic BIA, dynamic BMA |
| `req[2]` | in | `fu_req_t`: `valid`, `fn`, `subop` (subtract / remainder), `a`, `b`, 8-bit `tag` |
| `accept[2]` | out | operation taken this cycle (combinational from `req`) |
| `res[8]` | out | `fu_res_t` per unit: `valid`, `tag`, `data`. Units 0-2 are the int ALUs, 3 the FP adder, 4-7 the reconfigurable units |
| `unit_fn[8]` | out | current function of every unit |
| `rfu_held[4]`, `rfu_target[4]`, `reconfiguring`, `learning` | out | state of the adaptation |
| `n_conflict`, `n_adjust`, `n_reconfig`, `n_decide` | out | 32-bit event counters |

An operation accepted in cycle t appears on its unit's `res` port in cycle
t + L, where L comes from the latency table. Each unit has its own result
port, so results never collide.

Parameters, with their published defaults: `N_INT_ALU` = 3,
`INTERVAL` = 100000, `LEARN` = 100000000, `BMA_THRESH` = 10000, `WCYC` = 25.
`N_FP_ADD` = 1 is this design's own choice. The published configuration
builds a 4-core chip. Each core would hold one such cluster. The core
pipeline, caches and chip-level integration are not part of this RTL.

## Files

- `rtl/rfu_pkg.sv`: types, latency tables, configuration image formula.
- `rtl/fn_exec.sv`, `rtl/fp_add64.sv`, `rtl/fp_mul64.sv`, `rtl/fp_div64.sv`:
  datapaths.
- `rtl/fu_exec_pipe.sv`: latency and delay line of one unit. With a fixed
  function it is a CMOS unit.
- `rtl/stt_lut_array.sv`: clock-level behavioural model of the MTJ
  configuration cells. It is synthesizable, but the real part is a process
  macro.
- `rtl/stt_rfu.sv`, `rtl/cfg_rom.sv`, `rtl/reconfig_ctrl.sv`,
  `rtl/activity_monitor.sv`, `rtl/reconfig_policy.sv`, `rtl/fu_issue.sv`,
  `rtl/rfu_cluster_top.sv`.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  - `tb/tb_rfu_cluster_top.sv` runs the whole cluster at reduced sizes: a
    1000-cycle interval, a 3000-cycle learning phase and 4-cycle writes.
  - `tb/tb_rfu_cluster_full.sv` runs it with every default: dynamic BIA and
    BMA over 100 K-cycle intervals, about 400 K cycles.
  - The 100 M-cycle static learning phase is only simulated at reduced size.
  - `tb/tb_rfu_workloads.sv` runs one operation stream four times: with no
    adaptation, static, BIA and BMA. The stream is int add / int mul
    traffic, then a long FP-add-heavy phase. The test checks that every
    adaptive run finishes sooner than the baseline. At reduced sizes, the
    three adaptive runs finish in about 6350 cycles and the baseline in
    8319, a speedup of about 1.3x. The conflicts drop from 4633 to about
    700.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rfu_cluster_top \
    rtl/rfu_pkg.sv $(ls rtl/*.sv | grep -v rfu_pkg) tb/tb_rfu_cluster_top.sv
./obj_dir/Vtb_rfu_cluster_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`.

The end-to-end test checks every result against a reference. Integer
results use integer arithmetic. FP results use the simulator's double
arithmetic. The test also counts the following events and fails if any of
them never happens:
- conflicts;
- rewrites;
- adjustments;
- operations executed by a unit outside its home function;
- drain cycles;
- algorithm switches.

It also checks the unit assignments that BIA, BMA and static reach on known
traffic. The unit testbenches check:
- the 25-cycle write and the 225-cycle image rewrite;
- the 227-cycle hold;
- every latency in the table;
- the policy rules, on hand-worked cases.

## Known departures and limits

- The datapaths are plain logic, not LUT netlists. The LUT images are
  placeholders except for the header. Area and power of the real fabric are
  therefore not represented.
- Reset followed by reconfiguration is merged into a single rewrite.
- An adjustment waits for a rewrite already in progress; the published
  scheme says the unit is turned back "immediately".
- An image needs 9 bus writes (225 cycles), not the published 8
  (200 cycles).
- The switch-box and routing configuration is not modelled. Only its energy
  was ever estimated.
- FP subnormals are flushed to zero, and the integer divide is unsigned.

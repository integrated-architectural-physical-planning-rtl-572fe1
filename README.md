# Current-surge-aware integer issue/execute cluster

Clock gating saves power by stopping the clock of every functional unit (FU)
that has no work in a cycle. The price is current surge: when several
neighbouring units switch from quiet to busy in the same cycle, the local
current demand on the on-die power grid jumps, and the resulting supply droop
sets how much decoupling capacitance the chip needs.

This RTL implements the integer part of a 6-way superscalar processor whose
**selection logic decides not only which instructions issue, but which
physical units run them**, so that the busy units are spread over the
floorplan rather than clustered. Three mechanisms do this:

1. **Dynamic FU selection (DFS).** The baseline stacked arbiters pick the
   instructions. If the set of physical units they would use is a known
   high-noise combination, a small look-up table substitutes another
   combination of the same unit types with lower noise.
2. **Dynamic issue width scaling (DIWS).** Some unit combinations have no
   alternative. For those, if the multipliers' later stages are busy at the
   same time, one instruction is held back for a cycle.
3. **Separately gated multiplier stages.** Each stage of the 3-stage
   multiplier has its own clock gate, so the first stage can be quiet while
   the others finish. This lets the first stage be placed away from the rest
   of the multiplier as a separate floorplan module.

The execute cluster has 2 general ALUs (GU: adder, shifter, logic),
4 simple ALUs (SU: adder, logic) and 2 pipelined multipliers (MULT), a
96-entry register file, and it issues at most 6 instructions per cycle. All
sizes are module parameters whose defaults are these numbers.

## Issue patterns and usage patterns

Two terms are central to the design:

* The **issue pattern** is how many units of each type are needed in a
  cycle, written e.g. `2G3S1M` (2 GUs, 3 SUs, 1 MULT).
* The **usage pattern** is which physical units serve it, e.g.
  `M1+S1+S2+G1+G2+S3`. In RTL this is `cs_pkg::up_t`, a packed struct with
  one bit per unit: `m[1:0]` (M1, M2), `g[1:0]` (G1, G2), `s[3:0]` (S1..S4),
  with unit 1 in bit 0.

Because the arbiters are stacked, the baseline logic always uses the
lowest-numbered units of each type: its usage pattern is a prefix per type.
For `2G3S1M` it is `M1+S1+S2+G1+G2+S3`. On the floorplan this design's
look-up table was filled for, these units sit next to each other, which makes
this the worst pattern of all:

```
 | REG FILE | M1 (3 stages) | S1 | S2 | G1 | G2 | S3 | S4 | M2 (3 stages) |
```

`M1+S1+G1+G2+S3+S4` does the same work with S2 quiet and S4 busy, which
spreads the current better. It is the lowest-noise pattern for `2G3S1M`
(0.2942 V of peak noise against 0.3023 V, with no decoupling capacitance).

## Datapath and timing

```
 issue window (outside)                                          cycle t
   req_g/req_s/req_m, uop[] ──► dfs_select_unit ──► sel_* (one-hot entry per unit), issued[]
                                   │
        select_logic ─► UP ─► dfs_lut ─► UP_V ─► diws_gate ─► fu_en ─► fu_steer
        (stacked arbiters,         (FOUND, FLAG,        ▲
         6-wide limit)              hmask, drop)   mult_history
                                                                  
   per unit: payload mux ─► regfile read (2 ports per unit) ─► operand regs behind a clock gate
                                                                  cycle t+1
   GU / SU compute ─► wb bus ─► regfile write at end of t+1
   MULT stage 1 (t+1) ─► stage 2 (t+2) ─► stage 3 (t+3) ─► wb bus ─► write at end of t+3
```

* From requests to grants, unit selects and `issued`, everything is
  combinational within the issue cycle. The look-up table adds logic depth
  to the wakeup/selection stage but no pipeline stage. A circuit estimate
  for 0.18 µm puts the table at about 33 ps on an 816 ps stage, which stays
  below the 851 ps execute/bypass stage.
* In the issue cycle each selected unit captures opcode, operands and
  destination. It does so in registers clocked through its own
  `clock_gate`, enabled by its select. A unit that is not selected gets no
  clock edge.
* GU and SU results are on their result bus (`wb_g`, `wb_s`) in the next
  cycle with `valid` high, and are written at the end of that cycle.
  Multiply results appear three cycles after issue (`wb_m`).
* The window is outside the cluster, and so are wakeup, operand readiness
  and forwarding. The window must request only instructions whose sources
  are already written, and must remove the entries flagged in `issued`.
  Entries it requested but that were not issued (width limit or DIWS) simply
  request again.

## Baseline selection: stacked arbiters (`fu_arbiter`, `stacked_select`, `select_logic`)

`fu_arbiter` is one arbiter cell. `anyreq` (the OR of the requests) switches
its unit on. A priority encoder returns a one-hot `grant` when `enable` is
high. Entry 0 has the highest priority; the original design leaves the
policy open. `enable` is tied high for all integer units, since they are
single-cycle or fully pipelined.

`stacked_select` chains `N_FU` arbiters for one unit type. A request granted
by arbiter *i* is removed before it reaches arbiter *i+1*. Arbiter *k*
therefore grants the (*k*+1)-th request in priority order, and unit *k*+1 is used only
if units 1..*k* are.

`select_logic` has one stack per type (2 GU, 4 SU, 2 MULT). Each window
entry raises exactly one of `req_g`, `req_s` or `req_m`. Eight units but
six issue slots means a width limit is needed: the first six busy arbiters
are kept in the order M1, M2, G1, G2, S1..S4. The survivors form `UP`.
Per-type request lines and the slot order are this design's choices.

## The look-up table (`dfs_lut`)

This is where the design's noise knowledge lives. Each of the 20 entries
(`cs_pkg::lut_entry_t`) holds:

| field   | meaning |
|---------|---------|
| `valid` | entry in use |
| `tag`   | a usage pattern the baseline logic can produce whose peak noise exceeds the tolerable noise level |
| `up_o`  | the lowest-noise usage pattern with the same issue pattern |
| `flag`  | apply issue width scaling when this entry hits |
| `hmask` | which later multiplier stages (`[mult][stage-2]`) make scaling necessary |
| `drop`  | which unit's instruction is held back when scaling applies |

`UP` is compared with all valid tags in parallel. On a hit, `found` is high
and the selector passes `up_o` on as `UP_V`. On a miss `UP_V = UP`. When
several entries share a tag, the lowest index wins. The `hmask` and `drop`
fields are this design's way of encoding the scaling condition. The
original proposal leaves both open.

**Where the contents come from.** The table is computed offline for one
floorplan. For every usage pattern, the current each power-grid node
supplies is estimated as

    I(k) = Σ_j factor[j] · J_s · A_jk

Here A_jk is the area of module *j* that node *k* feeds. `factor` is 2 for a
clocked integer unit, 0 for a gated one and 1 for low-activity blocks such
as the register file. A circuit simulation of the power mesh then gives
each pattern's peak noise. The tolerable level was 10 % of the 1.8 V supply.
Patterns above it become tags, and the lowest-noise pattern with the same
issue pattern becomes their `up_o`.

**Reset contents.** Only two entries are fixed by the published results for
the floorplan above. Both are built by `cs_pkg::lut_reset_entry`:

| entry | tag | up_o | flag | scaling |
|-------|-----|------|------|---------|
| 0 | `M1+S1+S2+G1+G2+S3` (2G3S1M) | `M1+S1+G1+G2+S3+S4` | 0 | – |
| 1 | `S1+S2+G1+G2+S3+S4` (2G4S0M) | same | 1 | any later MULT stage busy → hold back the S4 instruction |

After DFS, the worst remaining pattern on this floorplan is `2G4S0M`, and
no other usage pattern exists for it. The published results report that
flagging it for issue width scaling removes it as the worst case. Entries
2..19 reset to empty. Load them, or any other floorplan's table, through
`cfg_we` / `cfg_idx` / `cfg_entry`, one entry per clock. The mirrored
floorplan with the register file in the middle uses the same hardware with
different contents. Its contents were not published, so none are provided.

## Issue width scaling (`mult_history`, `diws_gate`)

`mult_history` shifts each multiplier's issue bit through two flops. In any
cycle, `busy[i][j]` says that stage *j*+2 of MULT *i*+1 will be working in
the cycle in which the instructions now being selected execute. These are
exactly the stages that are already committed when the selection is made.

`diws_gate` raises `disable_o` when the hit entry has `flag` set and any
stage in its `hmask` is busy. The units in the entry's `drop` mask are then
removed from `UP_V`, which gives `fu_en`. This is the active-high form of
"DISABLE denies the GRANT of the offending instruction". The grant becomes
`GRANTi and not DISABLEi` per arbiter, and the held-back instruction stays
in the window. The published simulations put the resulting IPC loss at
about 2·10⁻⁷, because the scaled pattern almost never coincides with busy
multipliers in real programs.

## Steering (`fu_steer`, `dfs_select_unit`)

Once `UP_V` differs from `UP`, the arbiters no longer match the units one
to one. `fu_steer` sends the instruction of the *k*-th granted arbiter of a
type to the unit holding the *k*-th set bit of `UP_V` (counting from
unit 1). That unit only receives it if it is still in `fu_en`. An arbiter
whose unit was removed, or that has no unit in `UP_V`, loses its grant.
`dfs_select_unit` composes all of the above. It turns the surviving
arbiter grants into `sel_g/sel_s/sel_m` (one-hot window entry per physical
unit) and `issued`. It also asserts that a table hit never changes the
number of issued instructions.

## Clock-gated units (`clock_gate`, `gu`, `su`, `mult3`)

`clock_gate` is the usual latch-plus-AND gate. The enable is latched while
the clock is low, so `gclk` cannot glitch. Its latch is intended, and is the
only latch in the design.

`gu` executes `OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL,
OP_SRA`. `su` executes the first five of these. Both are 64 bits wide and
return results one cycle after issue. `mult3` returns the low 64 bits of the
product, split over its stages:

* stage 1: `aL·bL`, `aL·bH`, `aH·bL` on 32-bit halves
* stage 2: sum of the two cross terms
* stage 3: final addition of `aL·bL` and the cross sum shifted by 32

Every stage's input registers sit behind their own clock gate, enabled by
the previous stage's valid bit. `stage_act` shows which stages run in the
current cycle. The top's `fu_active` and `mult_stage_act` outputs give the
per-cycle activity from which current demand can be tallied.

## Register file (`regfile`)

The register file has 96 × 64-bit registers with 16 combinational read
ports (two per unit) and 9 write ports (one per unit plus `ext_*` for
results from outside the integer cluster, e.g. loads). On a same-cycle
write to one register, the highest-numbered port wins. Reset clears all
registers. The original design gives only the entry count. The port
structure is this design's choice.

## Top level (`cs_int_cluster`)

| port | dir | meaning |
|------|-----|---------|
| `req_g`, `req_s`, `req_m` `[95:0]` | in | window entry requests a GU / SU / MULT |
| `uop[95:0]` (`uop_t`: op, src1, src2, dst) | in | payload of each window entry |
| `issued[95:0]` | out | entries issued this cycle |
| `cfg_we`, `cfg_idx`, `cfg_entry` | in | write one look-up-table entry |
| `ext_we`, `ext_waddr`, `ext_wdata` | in | external register write |
| `wb_g[2]`, `wb_s[4]`, `wb_m[2]` (`wb_t`: valid, dst, data) | out | result buses |
| `up`, `up_v`, `fu_en`, `found`, `disable_o` | out | this cycle's selection decisions |
| `fu_active`, `mult_stage_act` | out | units / multiplier stages clocked this cycle |
| `mult_hist` | out | multiplier history used by issue width scaling |

Clock `clk` is rising-edge; reset `rst_n` is asynchronous and active-low.
It clears the look-up table to its reset contents, the multiplier history,
all valid bits and the register file.

## Departures and open points

* The look-up table holds only the two entries above. The rest of a
  20-entry table depends on a power-grid analysis of a concrete layout, and
  must be loaded through the configuration port.
* The scaling condition (`hmask`, "any selected stage busy") and the
  held-back unit (`drop`) are encodings chosen here. The original leaves
  open which multiplier histories trigger scaling and which instruction is
  denied.
* Per-type request lines, the M-G-S order of the six issue slots,
  lowest-index-first priority, the 64-bit width, the opcode set, the
  multiplier's internal split and all register-file ports are this
  design's choices.
* Arbiters are flat 96-input priority encoders rather than trees of 4-input
  cells.
* Floorplan, power grid and decoupling capacitance are physical and are not
  represented. Their only logical effects are the table contents and the
  separately gated multiplier stages.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. All of them, including the end-to-end one,
run at the default sizes in well under a second of simulation time. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_cs_int_cluster rtl/cs_pkg.sv tb/tb_cs_int_cluster.sv
./obj_dir/Vtb_cs_int_cluster
```

Change `--top-module` and the testbench file for the others:

* `tb_fu_arbiter`, `tb_stacked_select`, `tb_select_logic`: exhaustive or
  random stimulus against reference selection rules.
* `tb_dfs_lut`: reset contents, lookups, and programming through the
  configuration port.
* `tb_mult_history`, `tb_diws_gate`, `tb_fu_steer`.
* `tb_dfs_select_unit`: the whole selection unit against a cycle-level
  reference model. It covers the 2G3S1M remap, scaling of 2G4S0M after
  multiplies, the width limit and a table write.
* `tb_clock_gate`, `tb_gu`, `tb_su`, `tb_mult3`, `tb_regfile`: results,
  latencies, and that gated units do not change state.
* `tb_cs_int_cluster`: a model window issues about 6000 random instructions
  through the full cluster, with a table entry written half-way through. Every result must come back exactly once, after
  1 or 3 cycles, with the value computed from a model register file. A
  second phase reads back registers the first phase wrote. The test counts
  remaps, scaling events, width-limited cycles, multiplies and cycles with
  gated units, and fails if any of them never happened.
* `tb_issue_patterns`: every issue pattern a 6-way cycle can have, with
  and without busy multipliers, on the reset table.

Verilator lint reports a few unused bits (upper halves of the cross partial
products, and the pass-through request mask of the last arbiter). It also
warns that `rst_n` is used both asynchronously and inside the assertions'
`disable iff`. None of these is a fault.

# A self-timed 24 × 24 partial-array-of-array multiplier

This is the mantissa multiplier of an IEEE single-precision floating-point
multiplier (24 × 24 → 48 bits), built without a clock. It makes two choices:

* **Partial array of array (PAA).** The multiplier is not reduced by one large
  tree or one long array. It is reduced eight bits at a time by a small array
  of arrays. Three passes through that slice, added up in an accumulator, give
  the 48-bit product. The hardware is about a third of a full array-of-array,
  and each pipeline stage is about two carry-save-adder delays deep, so the
  stages are balanced.
* **Micropipeline control.** Each stage has a bundled-data latch controlled by
  a Muller C-element and two-phase (transition) handshakes. A tunable delay
  element on each request stands in for clock tuning: it is set after
  fabrication so that every request arrives after its data. The final
  carry-propagate adder is different. It is a dual-rail, precharged
  carry-completion-sensing adder. It reports when it has finished, so its
  speed follows the actual carry chains in the operands, not the worst case.

The RTL is SystemVerilog (IEEE 1800-2017). It passes Verilator `-Wall` lint
and slang with no errors. The remaining warnings are explained below. All blocks have
self-checking testbenches.

## The datapath of one pass

One pass multiplies the 24-bit multiplicand `x` by an 8-bit slice `y` of the
multiplier. It keeps the result as a carry-save pair (two vectors whose sum is
the value):

```
 stage 1   sub-array y[1:0] ─┐                       sub-array y[7:4]
           sub-array y[3:2] ─┴─ (4,2) row ─► x*y[3:0]   ─► x*y[7:4]
           ───────────────────────── latch L1 ─────────────────────────
 stage 2               (4,2) row: x*y[3:0] + (x*y[7:4] << 4)  ─► x*y (32 b)
           ───────────────────────── latch L2 ─────────────────────────
 stage 3               (4,2) accumulator: acc = (acc << 8) + x*y  (48 b)
           ─────────────────────── accumulator latch ──────────────────
 stage 4               carry-completion-sensing adder ─► product (48 b)
```

* `array_submult` is an array-type sub-multiplier. Rows of (3,2) counters sum
  L partial products with no carry propagation. The 2-row sub-arrays need no
  counters. The 4-row sub-array needs two counter rows.
* `comp42` is a row of (4,2) cells. Each cell is two (3,2) counters, with the
  middle carry passed to the next bit. That is two counter delays.
* `paa_accumulator` adds the slice product into the running total in
  carry-save form. Slices come most significant first, so the old total only
  has to move left by 8 bits. That is wiring, not a shifter. On the first pass
  of a multiply the old total is replaced by zero.

Inside the array all widths are modular. A carry-save pair whose true sum fits
in W bits never loses anything when it is cut to W bits. The accumulator's
pair is only correct modulo 2^48, which is enough because the product fits in
48 bits.

A 2-bit **pass index** travels with the data. It is counted at stage 1 and
tells the accumulator which pass is the first (clear the total) and the final
stage which pass is the last (deliver a product).

## Self-timed control: how the stages move data

Stages 1 to 3 are micropipeline stages. Every control wire is a transition
signal: each edge, rising or falling, is one event.

```
 start ─► var_delay ─► r1 ─►(C)─ c1 ─► var_delay ─► r2 ─►(C)─ c2 ─► var_delay ─► r3 ─►(C)─ c3 ─► final stage
                           ▲                             ▲                             ▲
                 ¬ pass-done(c2)               ¬ pass-done(c3)               ¬ pass-done(ack of final stage)
```

* **C-element** (`muller_c`). Its output `c_i` changes only after the request
  `r_i` has changed *and* the next stage has acknowledged the previous item.
  The next stage's acknowledge is its own C-element output, inverted at the
  input.
* **Latch** (`mp_latch`). A capture/pass latch is transparent while its two
  control inputs are equal. Stage i's latch captures on `c_i` and opens again
  on `c_{i+1}`. An event on `c_i` therefore both stores stage i's data and
  acknowledges stage i-1.
* **Bundling delay** (`var_delay`). Each request goes through a variable delay
  that must be longer than the logic of the stage it enters. All elements
  share one setting, `dly_sel`. This part is a behavioural model with
  `#` delays, not synthesizable logic. In silicon it is a tunable delay line.
* **Pass-done delay.** The acknowledge that reopens a latch reaches the
  C-element of the same stage `PASS_PS` (200 ps) later. This gives a latch
  that has just opened time to pass the new data before it captures again. In
  zero-delay RTL this delay also orders two events that would otherwise fall
  in the same time step.
* **The accumulator loop.** Stage 3 feeds its own output back to its input. A
  single transparent latch in that loop would race. So the accumulator has a
  second, feedback latch that is open only while the stage latch holds. At any
  moment one of the two latches is closed.

The final stage (`cpa_stage`) connects the two-phase pipeline to the
four-phase precharged adder:

1. A request event arrives. The accumulator latch now holds the new pair.
2. `eval` rises, and the adders evaluate.
3. `done` rises. If the pass is the last of a multiply, the product is
   registered and `prod_req` toggles.
4. `eval` falls, and the adders precharge.
5. `done` falls, and the acknowledge toggles. This reopens the accumulator
   latch.

A last pass does not start while the previous product has not been taken
(`prod_req != prod_ack`). This back-pressure travels up the pipeline through
the C-elements until `start_ack` stops. The adder also runs on the first and
second passes, and their sums are thrown away.

## The carry-completion-sensing adder

`ccs_adder` carries every carry on two rails, "is 1" and "is 0". Both rails
are low during precharge. When `eval` rises:

* a bit with `a == b` settles its carry-out at once (generate or kill);
* a bit with `a != b` passes on its carry-in;
* a skip path lets a carry jump over a block of `BLK` bits (5) that all
  propagate.

The sum rails (`sum_t`, `sum_f`) are formed from the propagate signal and the
carry rails. Exactly one rail of each bit rises once that bit is settled.

`done_detect` produces `done`. In the circuit, each bit's rail pair drives
one "still pending" signal, and all of them act on a single shared `done`
node, so `done` rises only when no bit is pending. In RTL,
`done = AND over bits of (sum_t | sum_f)`.

The 48-bit sum uses two adders in a chain. One adds the high 25 bits, which
is the width the final adder is sized for. The other adds the low 23 bits.
The low adder's dual-rail carry-out is the high adder's carry-in.

**Timing model.** The adder has a parameter `CELL_PS`, the delay of one
carry cell. It is applied through the tiny helper `cell_delay`, and
synthesis ignores it. With 100 ps cells, a 25-bit adder behaves as follows:

* A carry that must cross all 25 bits finishes in 0.9 ns. The skip paths
  carry it past whole blocks; a plain ripple would need 2.5 ns.
* Random operands finish in 0.46 ns on average, because their carry chains
  are short. This is the average-case behaviour that completion sensing is
  chosen for.
* Precharge clears every rail within one cell delay.

With `CELL_PS = 0` (the module default) the adder is a zero-delay model, and
only the protocol and the arithmetic remain.

## Interface of `paa_top`

| port | dir | width | meaning |
|---|---|---|---|
| `rst_n` | in | 1 | asynchronous reset, active low; `start` and `prod_ack` low during reset |
| `x` | in | 24 | multiplicand, held for the three slices of a multiply |
| `y` | in | 8 | current multiplier slice: `y[23:16]`, then `y[15:8]`, then `y[7:0]` |
| `start` | in | 1 | toggle to offer a slice |
| `start_ack` | out | 1 | follows `start` once the slice is captured; `x`, `y` may then change |
| `dly_sel` | in | 4 | bundling delay setting: `DLY_BASE_PS + dly_sel * DLY_STEP_PS` |
| `prod` | out | 48 | product |
| `prod_req` | out | 1 | toggles when a new product is on `prod` |
| `prod_ack` | in | 1 | toggle to take the product |

Parameters:

* `DLY_BASE_PS` (2200) and `DLY_STEP_PS` (250) set the variable delays.
* `PASS_PS` (200) sets the pass-done delay.
* `CPA_CELL_PS` (100) sets the carry-cell delay of the final adders.
  It is used only in simulation.

The sizes (24-bit operands, 8-bit slices, 3 passes, 25-bit high adder) are in
`paa_pkg`.

With `dly_sel = 4` each stage's bundling delay is 3.2 ns. A prompt
environment then gets:

* one multiply every 10.2 ns;
* 16.6 ns from the first slice until the accumulator holds the last pass;
* 17.6 ns from the first slice until the binary product is out.

The original design's targets were 13 ns per multiply (76 M multiplies/s),
17 ns of array latency, and 24 ns for the whole multiply including rounding.
These delays were chosen to meet them. They are settings of a delay model,
not a timing analysis of any technology.

## How far to trust it, and where it departs

Taken from the source design:

* the PAA structure: 2 + 2 + 4 row sub-arrays, two (4,2) rows, a (4,2)
  accumulator, 8 partial products per pass, 3 passes;
* the stage boundaries and where the C-elements and variable delays sit;
* two-phase transition signalling;
* a precharged, dual-rail, carry-skip, carry-completion-sensing final adder
  for the high 25 bits, and its completion detector.

Choices made here, where the source is silent:

* slice order (most significant first) and the shift-left accumulator;
* the pass index;
* the accumulator's feedback latch;
* the pass-done delay;
* the final stage's handshake;
* the skip block size;
* the delay values;
* reset.

Departures:

* **Latches are separate from the logic.** The original merges each latch
  into the gate in front of it (Earle latches).
* **Circuit-level modelling is not included.** This covers DCFL NOR-only
  gates, transistor sizes and buffers on the latch control lines.
* **No rounding.** A 23-bit completion-sensing adder adds the low-order bits.
  In the original these go to a rounding unit that keeps a single rounding
  mode. Here the full 48-bit integer product is delivered instead.
* **No sign or exponent logic.** The floating-point sign and exponent paths
  are not part of this RTL.

Lint notes:

* Verilator reports three loops as circular combinational logic. Each loop
  runs through two latches that are never open at the same time: the
  accumulator and its feedback latch, and the pass-index latch pair.
* The C-element and the latches are written with `always_latch` on purpose.
* `var_delay` and `cell_delay` are the only modules with delays.
* The other warnings are signals left unused on purpose. Examples are the
  false sum rails after completion detection and the carry out of bit 47.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with values
computed independently in the testbench:

| testbench | what it checks |
|---|---|
| `tb_csa32`, `tb_comp42` | (3,2) and (4,2) rows, random and corner operands |
| `tb_array_submult` | 2-row and 4-row sub-arrays: `s + c == x * y` exactly |
| `tb_muller_c`, `tb_mp_latch` | C-element against a reference model; latch capture/hold/pass over many events |
| `tb_var_delay` | delay equals `BASE + sel*STEP` for every setting, both edge directions |
| `tb_paa_accumulator` | three-pass totals, clearing on the first pass, tag, hold while the input changes |
| `tb_ccs_adder` | precharge state, sums and carry-out on both rails, `done`, long propagate chains; timed: skip-path worst case, average-case completion, one-cell precharge |
| `tb_done_detect` | all-precharged, each single unsettled bit, random rails |
| `tb_cpa_stage` | one evaluate cycle per request, product only on the last pass, back-pressure |
| `tb_paa_top` | 604 full multiplies at default parameters (corner and random operands) |

`tb_paa_top` checks each product. At `dly_sel = 4` it also checks:

* the streaming rate: at most 13 ns per multiply;
* the array latency: at most 17 ns;
* the product latency: at most 24 ns.

A second phase uses random gaps, a slow consumer and changing `dly_sel`. The testbench
counts that each mechanism happened: passes, first-pass clears, final-stage
back-pressure, and stalls at the stage-1 and stage-3 C-elements.

Two handshake rules are also checked by assertions in the RTL, in every
simulation:

* no sum bit of `ccs_adder` is ever high on both rails;
* `done` of the final stage rises only while `eval` is high.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Any testbench builds the same way. Verilator needs `--timing` for the delays.
The package goes first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/paa_pkg.sv tb/tb_paa_top.sv --top-module tb_paa_top -o sim
./obj_dir/sim
```

Everything runs in a few seconds. Testbenches, `var_delay` and `cell_delay` declare
`timeunit 1ps`.

## Files

* `rtl/paa_pkg.sv`: sizes and carry-save pair types.
* `rtl/paa_top.sv`: the multiplier: four stages and their control.
* Datapath: `rtl/array_submult.sv`, `rtl/comp42.sv`, `rtl/csa32.sv`,
  `rtl/paa_accumulator.sv`.
* Control: `rtl/muller_c.sv`, `rtl/mp_latch.sv`, and `rtl/var_delay.sv`
  (behavioural model).
* Final adder: `rtl/cpa_stage.sv`, `rtl/ccs_adder.sv`, `rtl/done_detect.sv`,
  and `rtl/cell_delay.sv` (simulation delay of a carry cell).
* `tb/`: one testbench per module.

# Data-driven and look-ahead clock gating

The clock is the busiest net in a synchronous circuit: every flip-flop's
clock pin toggles every cycle, even when the flip-flop would just reload the
value it already holds. Clock gating suppresses those useless pulses. This
RTL implements two fine-grained gating schemes at the level of individual
flip-flops, and a small circuit that uses the second one:

* **Data-driven clock gating (DDCG)**, modified to use a half adder as the
  change detector. A group of flip-flops gets a clock pulse only when at least
  one of them has a data input different from its output.
* **Look-ahead clock gating (LACG).** Each flip-flop's enable is computed one
  cycle early, from the flip-flops that feed it.
* **A 4-bit LFSR built from LACG flip-flops.** A plain LFSR clocks all four
  flip-flops every cycle. Here each flip-flop is clocked only when its value
  can change.

Both schemes only decide *whether a clock pulse is delivered*. The register
contents are identical, cycle for cycle, to the same circuit with a free-running
clock. The testbenches check exactly that against ungated reference models.

## The clock gate (`icg`)

Both schemes end in the same integrated clock-gating cell: a latch followed by
an AND gate. The latch is transparent while `clk` is low and holds while `clk`
is high, so `gclk = clk & en_latched` never carries a clipped or extra pulse,
even if `en` moves during the high phase. `en` must settle before the rising
edge of `clk`. The latch is deliberate. Lint and synthesis tools report it as
a latch, and that report is expected.

## Data-driven gating (`ddcg_reg`)

```
d[i] ──┬──────────────► D  FF[i] ──► q[i]
       └─ half adder ◄── q[i]          ▲
            sum[i] ──► OR over i ──► icg ──► gclk (shared by all K FFs)
```

A flip-flop whose next value equals its present value needs no clock. The
half-adder sum `d ^ q` flags a pending change. The sums of the K flip-flops in
a group are ORed into one request, and one `icg` clocks the whole group (a
multi-bit flip-flop). The carry outputs of the half adders are not used, and
those pins are left open on purpose.

Timing cost: the request is computed in the same cycle from `d`, so the path
`d → half adder → OR → latch` must settle within the cycle, before the rising
edge. `q` has the usual one-cycle latency. `clk_en` is an extra output that
shows the request, so delivered pulses can be counted.

Parameter `K` (default 1) sets the group size. The default is a single gated
flip-flop. The testbench also runs a 4-bit group.

## Look-ahead gating (`lacg_dff`)

This is the least obvious part of the design. Read this section before
changing anything in `lacg_dff` or `lfsr_lacg`.

A flip-flop B whose `D` is a function of other flip-flops (its *sources*) can
only see a new `D` after one of those sources has changed. So:

> if no source of B changes at edge *t*, then B does not need a pulse at edge *t+1*.

Whether source A changes at edge *t* is known before edge *t*: it is A's own
`d ^ q`. Each `lacg_dff` therefore does two things:

1. It exports `tgl = d ^ q` (a half-adder sum), meaning "I change at the
   coming edge".
2. It takes `la_en`, the OR of its sources' `tgl`. It registers `la_en` on the
   free-running clock into `en_q`, and `en_q` drives the `icg`. The pulse at
   edge *t+1* is delivered iff some source toggled at edge *t*.

The enable logic now has a whole cycle (the register stage) instead of a
fraction of one. The price is one extra flip-flop per gated cell. The gating
is also conservative: a source change does not always change the function
feeding B, and B is then clocked for nothing. That is harmless.

**Why it stays correct.** The prediction assumes that B already holds the
value its sources imply, i.e. that B was up to date after the previous edge.
That is true after every edge, by induction, provided it is true once. The
enable register therefore resets to 1. The first edge after reset always
clocks every LACG flip-flop, and that edge establishes the invariant. If you
change the reset behaviour, keep this property. A cell whose enable resets to
0 can be stuck forever with a stale value.

**Using it.** `la_en` must come from the `tgl` outputs of the flip-flops that
drive `d`, or from any signal that is 1 whenever `d` may change at the
coming edge. Driving `la_en` from anything weaker would lose data, so the
cell carries an assertion (`a_no_lost_change`): in simulation, any edge it
suppresses while `d != q` is reported as an error.

## LFSR with LACG (`lfsr_lacg`)

Four `lacg_dff` cells form a shift chain `q0 → q1 → q2 → q3`. The XOR of `q3`
and `q2` is fed back into `q0` (x⁴ + x³ + 1). `out = q3`. From any non-zero
seed (default `4'b0001`) the register steps through all 15 non-zero states.

| flip-flop | `d`        | `la_en` (sources' toggles) |
|-----------|------------|----------------------------|
| q0        | q3 ^ q2    | tgl3 \| tgl2               |
| q1        | q0         | tgl0                       |
| q2        | q1         | tgl1                       |
| q3        | q2         | tgl2                       |

Over a run of the top-level test, the four flip-flops receive roughly half to
four fifths of the pulses that an ungated LFSR would get. The feedback
flip-flop is clocked most often. For the XOR feedback, the exact condition for
`q0` would be `tgl3 ^ tgl2`. The generic OR is used instead. It clocks `q0` a
little more often but follows the general rule above. Changing it to the XOR
is safe for this particular feedback. `TAPS` and `N` are parameters. A
different polynomial works as long as `TAPS` and `SEED` fit `N`.

## Top level (`cg_top`)

`cg_top` places the DDCG register (`ddcg_d`, `ddcg_q`, `ddcg_clk_en`) and the
LACG LFSR (`lfsr_q`, `lfsr_out`, `lfsr_clk_en`) side by side. The two share
`clk` and the active-low asynchronous reset `rst_n`, and nothing else: they are
two independent demonstrations of the two gating styles. All
`*_clk_en` outputs are observation ports, 1 when the coming rising edge is
delivered to that group.

## How far to trust it, and what is this design's own

* Taken from the schemes as described: the per-bit XOR/half-adder change
  detection, the OR into one joint enable per group, the latch + AND clock
  gate, the 4-bit LFSR built from LACG flip-flops with feedback `q3 ^ q2`
  into `q0`.
* This design's own choices: the internal structure of the LACG cell
  (registered look-ahead enable, reset to 1, OR-of-sources rule), the DDCG
  group size default of 1, the active-low asynchronous resets, the LFSR seed,
  and the `clk_en` observation outputs.
* The schemes were originally characterised by transistor-level power and
  noise simulation (on the order of 10 to 50 µW for a single gated flip-flop).
  Power and noise are not modelled here. The testbenches count delivered
  clock pulses as the measure of saved clock activity.
* The plain, ungated LFSR is a comparison baseline only. It exists as the
  reference model in the testbenches, not as RTL.
* The clock gating is real: the flip-flops sit on derived clocks. Any flow
  that uses this RTL must handle gated clocks (clock-tree synthesis through
  the ICG, latch timing). For an FPGA, map `icg` to the device's clock-enable
  or clock-buffer primitive.

## Verification

Every module has a self-checking testbench in `tb/`. Inputs are driven in the
low phase of the clock, and outputs are compared with reference models
written independently in the bench:

| testbench       | what it checks |
|-----------------|----------------|
| `tb_half_adder` | all four input combinations against `a + b` |
| `tb_icg`        | pulse passed iff enable was 1; no glitch when enable toggles in the high phase; gated clock low in the low phase |
| `tb_ddcg_reg`   | K = 1 and K = 4: request = any bit differs, `q` one cycle late, delivered pulses = cycles with a change |
| `tb_lacg_dff`   | fed by a source register: first edge after reset delivered, then a pulse exactly one edge after each source change, `q` one cycle late |
| `tb_lfsr_lacg`  | state, output and all four enables every cycle against an ungated LFSR; period 15; fewer pulses than ungated |
| `tb_cg_top`     | both circuits together at default parameters for 100 cycles; fails if any of these never happened: a DDCG pulse delivered or suppressed, a LACG pulse delivered or suppressed for each of q0..q3, an LFSR wrap-around |

Each bench prints `TB_RESULT checks=N failures=M` and has a cycle-count
watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
          tb/tb_cg_top.sv --top-module tb_cg_top
./obj_dir/Vtb_cg_top
```

Replace `tb_cg_top` with any other bench. The modules are two-state safe:
every register is reset, and the ICG latch follows its enable whenever the
clock is low.

# Double rank counter with carry gating ahead of the counting pulse

A double rank counter stores every binary digit twice, in a *true* flip-flop
T and a *false* flip-flop F, and counts by copying the number back and forth
between the two ranks: a **down pulse** copies T into F and an **up pulse**
copies F into T. Because no flip-flop is ever read while it is being written,
the counter needs no transient storage. It takes two pulses per count.

In the usual gating schemes, the carry of a count ripples from flip-flop to
flip-flop. The counting pulse therefore needs time proportional to the number
of stages to settle. This design removes that delay:

* The **up pulse** copies the complement of F into T in every stage at
  once. It is unconditional and has no carry path.
* The **down pulse** copies T into F directly, but in stage *i* only when
  T(i-1) … T(0) are all 1. That condition comes from a chain of AND gates,
  one per stage, which passes the down pulse from stage to stage. The chain
  is settled by the true rank before the pulse arrives, so every stage that
  has to change changes at the same time. In the original four-stage
  hardware, the settling time was about that of one flip-flop, against about
  four flip-flop delays for the conventional counter.

The count is made by the down pulse: after it the false rank holds
`~(T+1)`, and the next up pulse makes `T = T+1`. Between counts the false
rank always holds `~T`, so it counts down from all ones while the true rank
counts up. One counter gives the additive and the subtractive count.

## Files

| file | contents |
|---|---|
| `rtl/drc_pkg.sv` | the `gating_e` and `stage_mode_e` enums |
| `rtl/drc_stage.sv` | one digit stage: T and F flip-flops, the two transfer gates, the carry gate |
| `rtl/drc_counter.sv` | the N-stage counter (top), with preset and assertions |
| `tb/tb_drc_stage.sv` | random test of the three stage modes against a bit-level model |
| `tb/tb_drc_counter.sv` | end-to-end test at the default size |
| `tb/tb_drc_counter_variants.sv` | the other arrangements, plus a six-stage counter |

## One stage

Each stage (`drc_stage`) receives two pulses:

* `par_pulse` is the pulse that reaches all stages in parallel.
* `carry_in` is the other pulse, already gated by all lower stages.

The stage passes the gated pulse on as `carry_out` only when its own
condition holds. `MODE` selects the transfers:

| MODE | `par_pulse` | parallel transfer | gated transfer | `carry_out` |
|---|---|---|---|---|
| `STAGE_UP_CPL` (main) | up | T ← ~F | F ← T | `carry_in & T` |
| `STAGE_DN_CPL` | up | T ← F | F ← ~T | `carry_in & T` |
| `STAGE_SWAP` | down | F ← ~T | T ← F | `carry_in & ~F` |

One of the two copies has to be a complement, because T has to change on
every count. The choice of which copy decides what the false rank reads.

## Gating arrangements (`GATING` parameter of `drc_counter`)

* **`GATING_3`** (default): all stages are `STAGE_UP_CPL`. After a down
  pulse F = ~(T+1); after an up pulse F = ~T. The true and false ranks go
  through these values, read just after each down pulse:

  | T | 0000 | 0001 | 0010 | … | 0111 | 1000 | … | 1110 | 1111 |
  |---|---|---|---|---|---|---|---|---|---|
  | F | 1110 | 1101 | 1100 | … | 0111 | 0110 | … | 0000 | 1111 |

* **`GATING_4`**: all stages are `STAGE_DN_CPL`. After a down pulse
  F = T+1, and the up pulse copies it into T unchanged.
* **`GATING_5`**: the roles of the ranks are swapped (`STAGE_SWAP`). The down
  pulse copies ~T into F in parallel. The up pulse makes the count, gated
  along the false rank by "F(i-1) … F(0) all 0". Here the carry chain sits on
  the up pulse, so this arrangement gives up the speed advantage. Its use is
  to start counting from a number placed directly in the true rank.
* **`GATING_MIXED`**: stage *i* is `STAGE_UP_CPL` if `MIXED_UP_CPL[i]` is 1,
  and `STAGE_DN_CPL` otherwise. The true rank still counts correctly. The
  false rank holds ~T in some bit positions and T in the others, so it no
  longer reads as a binary count. Use this when only the true rank matters.

## Interface and timing of `drc_counter`

```
drc_counter #(.N(4), .GATING(drc_pkg::GATING_3), .MIXED_UP_CPL('1))
  (clk, rst_n, up, dn, load, preset[N-1:0],
   true_rank[N-1:0], false_rank[N-1:0], carry_out)
```

* The original pulse-driven flip-flops are modelled as clocked flip-flops.
  `up`, `dn` and `load` are one-cycle enables, sampled on the rising edge of
  `clk`. The ranks change on that edge.
* One count is `dn` followed by `up`. The pulses may be separated by idle
  cycles, but they must not coincide, and `load` must not coincide with
  either. Assertions check both rules.
* `carry_out` is the gated pulse leaving the top stage. It is combinational,
  and it is high during the pulse that makes the count wrap from 2^N-1 to 0
  (the `dn` pulse, or the `up` pulse under `GATING_5`). It can drive a
  further counter section.
* `rst_n` is an asynchronous reset, active low. It sets the count to 0 and
  leaves the false rank as it would be after an up pulse: all ones under
  `GATING_3` and `GATING_5`, zeros under `GATING_4`.

### Starting from a predetermined number

`load` gates `preset` into one rank in a single cycle:

* **`GATING_3` / `GATING_4` / `GATING_MIXED`**: `preset` goes into the false
  rank. It is complemented in `STAGE_UP_CPL` stages and loaded unchanged in
  `STAGE_DN_CPL` stages. Counting then starts with an `up` pulse, which
  makes the true rank equal to `preset`. To count on from P, load P+1, or
  load P and apply one extra `dn`, `up` pair. The counter has no adder of
  its own.
* **`GATING_5`**: `preset` goes into the true rank unchanged, and counting
  starts with a `dn` pulse. No plus one is needed.

## What follows the original design and what is this design's own

These parts follow the original design:

* the transfer rules of all three arrangements;
* the per-stage free choice of complement form;
* the AND-gate carry chain carrying the pulse from stage to stage;
* the preset forms;
* the default size of four stages.

These are choices made here:

* the clocked, enable-based modelling of the pulses;
* the reset values;
* load priority over a pulse;
* the assertions;
* the parameter and port names and the enum encodings.

The original work is about the analog settling time of the down pulse (one
flip-flop delay against four). Synchronous RTL cannot show that difference.
What the RTL keeps is the structure that produces it: the carry condition is
a combinational AND chain evaluated before the pulse, and the up pulse has
no carry path. The conventional counter used as the comparison is not
included.

## Verification

The testbenches need only `verilator` 5 with `--timing`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/drc_pkg.sv \
    tb/tb_drc_counter.sv --top-module tb_drc_counter -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **`tb_drc_stage`** drives the three stage modes with random pulses and
  loads for 2000 cycles. Every cycle it compares T, F and `carry_out` with a
  model written directly from the transfer rules.
* **`tb_drc_counter`** runs the default configuration (four stages,
  `GATING_3`, no parameter overrides). It checks:
  * 40 counts: the T/F table above after every `dn`; T unchanged by `dn`
    and advanced by one on `up`; F = ~T after `up`; `carry_out` exactly when
    T is all ones;
  * both ways of starting from a preset;
  * a wrap after a preset;
  * 3000 random cycles against a rule-level model.

  It also counts that each of these actually happened: the carry reaching
  the top stage, a wrap, a preset load, the false rank stepping down, and a
  carry stopping at stage 0.
* **`tb_drc_counter_variants`** covers:
  * `GATING_4`, checking F = T+1 after each `dn`;
  * `GATING_5`, with a preset into the true rank and the count made on `up`;
  * a six-stage `GATING_MIXED` counter;
  * a six-stage `GATING_3` counter through a full wrap.

## Changing it

* **Width**: set `N`. The carry chain grows by one AND gate per stage. Its
  depth is N gates, which is still ahead of the pulse.
* **Arrangement**: set `GATING`, and `MIXED_UP_CPL` for `GATING_MIXED`.

# Barrel shifter with deterministic completion detection

A logarithmic barrel shifter always costs its full depth: a 32-bit shifter
has five multiplexer stages, and a circuit that waits a fixed time must wait
for all five even when the shift amount is 1. But which stages a shift
really uses is known from the shift amount alone. A shift by `s` changes
nothing after the stage of the highest set bit of `s`, so the result is
already final there. This design uses that fact twice. It takes the result
from that earlier stage, and it times the acknowledge with a delay path that
has one element per stage used. Completion is deterministic: nothing is
speculated, so no wrong early completion ever has to be cancelled.

The design is a 32-bit shifter, `abbs_32`, with a four-phase request/acknowledge
handshake of the bundled-data kind: the data travels on plain wires, and a
separate `req`/`ack` pair says when it is valid. The completion delay is made
of clocked elements, by default one clock cycle per shifter stage used.

## Block structure

```
            +--------------------------- abbs_32 ----------------------------+
 inp_data ->| u0 data_reg (32) --> cbs: stage0 -> stage1 -> ... -> stage5    |
 shf_data ->| u1 data_reg (5)  --+    b[0]      b[1]            b[5]         |
 shf_type ->| u2 data_reg (3)    |      \________|___________/               |
            |                    |      dcdc:   oss (6:1 per bit) -----------|-> abbs_op
            |                    +----->        sds (32 x 9 table) -> selects|-> sds_op
 req ------>| req_q flip-flop -------->         dgu (6 delay elements) ------|-> ack
            +----------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `abbs_pkg` | Shift-kind enum and `active_stages()`, the stage-count rule |
| `cbs_stage` | One row of N 2:1 multiplexers: pass, or shift by `2^i` |
| `cbs` | Five stages in a chain, all stage outputs brought out (`b[0..5]`) |
| `sds` | Shift-dependent selector: 32-word table addressed by the shift amount |
| `oss` | Output selection stage: picks `b[k]`, the first stage that holds the result |
| `dgu` | Delay generating unit: the matched delay path from request to acknowledge |
| `dcdc` | Completion detection circuit: `sds` + `oss` + `dgu` |
| `data_reg` | Operand register (`u0` data, `u1` shift amount, `u2` shift kind) |
| `abbs_32` | Top: registers, shifter, completion circuit, handshake |

## The shifter (`cbs`, `cbs_stage`)

Stage `i` (1 to 5) shifts by `2^(i-1)` when bit `i-1` of the shift amount
is set, and passes its input on otherwise. The smallest shift comes first.
That order matters: it makes the stages above the highest set bit idle.
Each stage supports six shift kinds. The kind decides which bits enter at
the vacated end:

| Code | Kind | Bits entering |
|---|---|---|
| 0 `OP_SRL` | right, logical | zeros at the top |
| 1 `OP_SRA` | right, arithmetic | copies of bit 31 |
| 2 `OP_SRC` | right, circular | the bits leaving at the bottom |
| 3 `OP_SLL` | left, logical | zeros at the bottom |
| 4 `OP_SLA` | left, arithmetic | zeros at the bottom (same as SLL) |
| 5 `OP_SLC` | left, circular | the bits leaving at the top |

Codes 6 and 7 behave as `OP_SRL`. Bit 31 is the most significant bit.

## Completion detection (`sds`, `oss`, `dgu`)

This is the heart of the design.

**Stages used.** For shift amount `s`, let `k` be the position of its highest
set bit plus one, with `k = 0` for `s = 0`. So `k` is 1 for s = 1, 2 for s = 2..3,
3 for 4..7, 4 for 8..15 and 5 for 16..31. Stages `k+1..5` all have their select
low, so `b[k]` already equals the final result.

**Selector table (`sds`).** The table has one 9-bit word per shift amount,
computed at elaboration from the rule above:

| Bits | Field | Value for shift `s` |
|---|---|---|
| [2:0] | OSS select | `k` |
| [3] | DOSS | always 1 (the output stage is always on the path) |
| [8:4] | D0..D4 | bit `j` set for `j < k` (thermometer code) |

For example, s = 0 gives `00000_1_000`, s = 1 gives `00001_1_001`, s = 2 and
s = 3 both give `00011_1_010`, and s = 21 gives `11111_1_101`.

**Output selection (`oss`).** The output stage is a 6-input multiplexer per bit.
Select 0 takes the registered input and skips the shifter entirely. Select `k`
takes stage `k`.

**Delay path (`dgu`).** The delay path is a chain of six elements, D0..D4 and
then DOSS. A selected element is a short shift register, `TAU_STAGE` cycles
long for a shifter stage and `TAU_OSS` for the output stage. Both are one
cycle by default. An unselected element is bypassed by a multiplexer. The
request therefore reaches `ack` after `k·TAU_STAGE + TAU_OSS` cycles (`k + 1`
by default). It never waits the full six unless the shift really uses all
five stages. The path is level-sensitive, so when the request falls, `ack`
falls after the same delay. This is the return-to-zero half of the
four-phase handshake.

One detail is easy to miss. A bypassed element still holds flip-flops, so
it is kept cleared. Otherwise a request level from an earlier handshake
could linger in it. The next shift might select that element, and the old
level would then reach `ack` too early. With the default one-cycle elements
this cannot happen. It can when `TAU_STAGE` is larger than `TAU_OSS`, and
`tb_dgu` checks exactly that case.

For the delay to be safe, each element must be at least as slow as the logic
it stands for. So `TAU_STAGE` clock periods must cover one multiplexer
stage, and `TAU_OSS` periods the output multiplexer.

Over all 32 shift amounts, the element counts sum to
1·1 + 1·2 + 2·3 + 4·4 + 8·5 + 16·6 = 161. That is an average of 5.03
elements against 6 for a fixed worst-case wait. The gain is larger when small
shifts dominate, as they do in operand alignment, where most exponent
differences are small.

## Handshake and timing (`abbs_32`)

1. The requester sets `inp_data`, `shf_data` and `shf_type`, then raises `req`.
2. On the first rising clock edge that sees `req` high (`req` high and `req_q`
   low), the three operand registers load. On the same edge `req_q` rises, and
   `req_q` is the request fed into the delay path.
3. `ack` rises `k + 2` clock edges after `req` was driven: one edge to capture
   the operands, and one for each selected delay element (with the default
   one-cycle elements). `abbs_op` is valid
   while `ack` is high. The inputs may change as soon as the operands are
   captured.
4. The requester drops `req`. `ack` falls `k + 2` edges later.
5. The requester may raise `req` again once `ack` is low.

The result and `sds_op` are combinational from the registers. Two concurrent
assertions in `abbs_32` check the requester's side of the protocol: `req` may
rise only while `ack` is low, and may fall only while `ack` is high. The reset
is synchronous and active high. It clears the registers and the delay path.

## How far to trust it, and where it departs from the original scheme

- **Clocked delay elements.** The original scheme is asynchronous. Its delay
  elements are gate chains, built to be a little slower than the multiplexer
  stages they copy, so the acknowledge follows the real propagation delay.
  Here each element is a whole number of clock cycles, one by default. This
  is safe whenever that many clock periods exceed the delay of the stage the
  element stands for. It keeps the scheme's defining property,
  a latency that depends on the shift amount, but in whole cycles, not in gate
  delays. The original per-stage delay figures (a 90 nm library) are not
  reproduced.
- **Chosen, not given:** the order of the six delay-select bits within the
  table word; the shift-kind input and its encoding (the original scheme
  describes a shifter in one direction and names the six kinds); the operand
  registers' load rule; the reset behaviour; and the return-to-zero timing of
  `ack`.
- **Not included:** the hybrid-rail variant of the shifter, which is described
  only as having no delay-estimation circuit; the asynchronous domino
  pipeline with synchronizing logic gates that is discussed as background;
  and the fixed-delay and fully synchronous shifters that serve only as
  comparison baselines.

Every module has a self-checking testbench. The outputs are compared with a
reference model built on the language's own shift operators (`tb/abbs_ref_pkg.sv`),
and cycle counts are checked where latency is defined.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_abbs_32 \
    rtl/abbs_pkg.sv tb/abbs_ref_pkg.sv tb/tb_abbs_32.sv
./obj_dir/Vtb_abbs_32
```

Dependencies are found through `-Irtl -Itb`. Only the two packages must be
listed first.

| Testbench | What it runs |
|---|---|
| `tb_cbs_stage` | each stage distance, every kind, both select values |
| `tb_cbs` | every shift amount and kind. Checks each stage output and that stage `k` already holds the result |
| `tb_sds` | all 32 table words, plus the worked examples above |
| `tb_oss` | every select code |
| `tb_dgu` | rise and fall delay equal the summed length of the selected elements, for one-cycle elements and for 3-/2-cycle ones |
| `tb_dcdc` | result, table word and latency `k·TAU_STAGE + TAU_OSS` for every shift amount (built with 2-/3-cycle elements) |
| `tb_data_reg` | reset, load, hold |
| `tb_abbs_32` | end to end at full size: every shift amount × kind, latency `k + 2` both ways, operands held while the inputs change, and a count of each path (`k` = 0..5, each kind) |
| `tb_abbs_32_avg_delay` | uniform sweep per kind: 161 delay elements per 32 shifts against 192 for the worst case |

## Changing it

`N` (a power of two) sets the width on every module. `LAMBDA = log2 N` and
the table width `OSS_W + LAMBDA + 1` follow from it. The testbenches are
written for N = 32. `TAU_STAGE` and `TAU_OSS` on `abbs_32`, `dcdc` and `dgu`
set the length of the delay elements in clock cycles. Raise them when the
clock period is shorter than a multiplexer stage.

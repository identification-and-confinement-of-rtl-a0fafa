# Fault-confining WCHB half buffers for dual-rail QDI pipelines

Quasi-delay-insensitive (QDI) pipelines have no clock, and so they have no
sampling edge that masks short transients. A weak-conditioned half buffer
(WCHB) stores every rising rail that arrives while it is armed. A single
event transient (SET) on an idle rail during that window is kept, and it
becomes a wrong data bit or the illegal dual-rail code `{1,1}`. That code
then travels down the pipeline.

This RTL builds two small changes to the WCHB that confine such faults:

* **Deadlocking WCHB.** A bit that ends up `{1,1}` can never return to
  spacer, so the pipeline stops (fail stop) instead of passing on corrupt
  data. Use it where a wrong result is worse than a halt.
* **Interlocking WCHB.** The first rail of a bit to rise locks its partner
  at 0, so `{1,1}` cannot form. Once the correct rail is in, a later pulse on
  the other rail is ignored.

Both are built from a pair of cross-coupled asymmetric C gates per bit.
The top level, `qdi_fi_target`, is the fault-injection target used to
evaluate them. It holds a 4-stage, 2-bit pipeline of each kind, and each
pipeline has injection points on five victim wires.

## Dual-rail channels and the 4-phase handshake

Each data bit travels on two wires, a true rail `t` and a false rail `f`
(type `qdi_pkg::dr_bit_t`):

| `{t,f}` | meaning |
|---|---|
| `00` | spacer (null phase) |
| `10` | logic 1 |
| `01` | logic 0 |
| `11` | illegal: only a fault produces it |

A channel carries a word of such bits plus one acknowledge wire that runs
backwards. The protocol is 4-phase and return-to-zero:

1. The sender drives a data word.
2. The receiver raises `ack` once every bit holds data.
3. The sender returns all rails to spacer.
4. The receiver lowers `ack` once every bit is spacer.

Completion is detected with an OR per bit. A C gate across the bits then
makes the acknowledge rise only when all bits are complete, and fall only
when all bits are empty (`completion_detector`). An OR reports `11` as
complete, which is why an illegal bit passes the detectors of a classic
pipeline without being noticed.

## The WCHB stage and its sensitivity windows

Each rail of a `wchb_stage` goes through a C gate. The gate's second input
is `en = ~ack_in`, the inverted acknowledge of the next stage. The stage's
own `ack_out` is the completion detector applied to the gate outputs. The
stage works like this:

* While the next stage holds spacer (`ack_in = 0`), the gates are armed for
  rising rails. The stage takes the incoming token and keeps it until the
  next stage acknowledges.
* Then the gates are armed for falling rails. The stage takes the spacer
  and keeps it until the next stage releases its acknowledge.

This gives three windows in which a transient does damage:

* **Armed for data, data not yet complete** (token limited: the stage waits
  for its predecessor). A pulse on a rail that should stay low sets its
  gate. If the bit's correct rail arrives later, the classic stage holds
  `11`. If the stage is closed before that rail arrives, it holds a legal
  but wrong value.
* **Data complete, next stage not yet acknowledged** (bubble limited: the
  stage waits for its successor). The gates stay armed. A pulse on the idle
  rail of a bit adds the second rail, giving `11`. The acknowledge input is
  also sensitive here. A pulse on it lets the gates drop the word before
  the next stage has taken it, and the token is lost.
* **Null phase.** A pulse can only delay or hang the handshake, because no
  data is carried.

How long the stage spends in each window depends on the speed of the
generator and of the checker, not only on the circuit. For this reason the
testbenches sweep the operating point from bubble limited to token limited.

## The hardened buffers

Both variants replace the two C gates of a bit with asymmetric C gates
(`asym_c_element`). Besides the symmetric inputs `{rail, en}`, such a gate
has two extra inputs:

* `set_en` must be 1 for the gate to rise, and is ignored when it falls.
* `rst_blk` must be 0 for the gate to fall, and is ignored when it rises.

Rule: `q` rises when `rail & en & set_en`, falls when
`~rail & ~en & ~rst_blk`, and otherwise holds.

The output of each gate drives an asymmetric input of its partner:

| style (`STYLE`) | `t` gate | `f` gate | effect |
|---|---|---|---|
| `WCHB_CLASSIC` | `set_en=1, rst_blk=0` | same | plain WCHB, the reference |
| `WCHB_DEADLOCKING` | `rst_blk = q_f` | `rst_blk = q_t` | a `11` bit can never reset: the whole pipeline stops |
| `WCHB_INTERLOCKING` | `set_en = ~q_f` | `set_en = ~q_t` | first rail wins; the partner stays 0 |

**Deadlocking.** While only one rail is set, the partner of that rail is 0
and does not block. The stage therefore behaves exactly like a classic
WCHB, with the same sensitive windows. The only change is that a `11` bit
is held forever. Its completion detector keeps `ack_out` high, and so the
previous stage never moves on. A fault that would have been an illegal
word at the output becomes a deadlock, which a reset clears.

**Interlocking.** The lock goes straight from one gate's output to the
other gate's set enable. It does not pass through the completion detector,
so the window closes one gate delay after the first rail is captured. Only
the partner of the captured rail is held. The captured gate itself still
follows its input normally. The two operating points behave differently:

* Bubble limited: the correct rail is usually captured long before any
  pulse, and a later pulse on the other rail is ignored.
* Token limited: a pulse that arrives before the correct rail is captured
  instead, and it locks out the correct rail. The result is a wrong but
  legal bit. This suits a pipeline protected by an error-correcting code on
  top of the dual-rail code.

If both rails rise at exactly the same instant, the lock cannot choose and
`11` can still form.

Measured on the evaluation pipeline (below), over one output handshake
cycle per operating point, with a pulse on one of the four data rails:

| point | generator delay | checker delay | classic | deadlocking | interlocking |
|---|---|---|---|---|---|
| 0 (bubble limited) | 4 | 44 | 104 code | 104 deadlock | 0 |
| 2 | 12 | 36 | 88 code | 88 deadlock | 0 |
| 4 | 20 | 28 | 72 code | 72 deadlock | 0 |
| 5 (balanced) | 24 | 24 | 64 code | 64 deadlock | 64 value |
| 7 | 32 | 16 | 80 code | 80 deadlock | 80 value |
| 10 (token limited) | 44 | 4 | 104 code | 104 deadlock | 104 value |

The numbers count experiments with an effect beyond a timing shift. Each
experiment injects one pulse of 6 ticks at one tick of the cycle on one
rail. In every experiment, the deadlocking pipeline deadlocks exactly when
the classic one delivers a code fault. The interlocking pipeline never
delivers `11`.

Pulses on the acknowledge input of buffer 2 matter only at the
bubble-limited points:

* The interlocking pipeline loses tokens (380 experiments with value
  faults).
* The deadlocking pipeline has 190 value faults and 190 deadlocks.

Neither buffer was designed against faults on the acknowledge wire.

## Evaluation pipeline and fault injection

`qdi_pipeline` chains `STAGES` WCHB stages of `BITS` dual-rail bits, all of
one `STYLE`. The victim wires sit behind buffer `VICTIM`, counting from 1.
They are the `2*BITS` rails from that buffer to the next one, and the
acknowledge that buffer `VICTIM+1` receives. Each victim passes through a
`set_injector`, an XOR with a `flip` control. Holding `flip` high inverts
the wire for as long as it is held, which models an SET pulse.

The default is 4 stages, 2 bits and `VICTIM = 1`. With these defaults, two
buffers lie between the victim wires and the output. That gives the
downstream stages a chance to mask a fault before the checker sees it.
`vic_d`/`vic_ack` show the victim wires as the receiving buffer sees them.

`qdi_fi_target` places a deadlocking and an interlocking pipeline side by
side with separate ports (prefixes `dl_` and `il_`). The two pipelines
share only `rst`.

```
qdi_fi_target
├── qdi_pipeline u_dl  (STYLE = WCHB_DEADLOCKING)
│   ├── wchb_stage ×4 ── asym_c_element ×2 per bit, completion_detector ── c_element
│   └── set_injector ×2 (data rails, acknowledge)
└── qdi_pipeline u_il  (STYLE = WCHB_INTERLOCKING)   same structure
```

Port summary (per pipeline):

| port | dir | meaning |
|---|---|---|
| `*_in_d`, `*_in_ack` | in / out | input channel, from the data generator |
| `*_out_d`, `*_out_ack` | out / in | output channel, to the checker |
| `*_inj_d`, `*_inj_ack` | in | 1 inverts the matching victim wire |
| `*_vic_d`, `*_vic_ack` | out | victim wires after injection |
| `rst` | in | active high; clears every gate to spacer |

## Timing model and what it means for the results

The RTL has no clock and no delays. C gates are level-sensitive latches
(`always_latch`) that load when their inputs agree. Stages are joined by
combinational handshake loops. Everything settles within one simulation
time step. As a consequence:

* Throughput and latency are set entirely by the environment. A token
  ripples through empty stages at once.
* Windows that come from gate delays have zero width here. Examples are
  the feedback delay of the interlock, and the skew between rails that
  arrive at the same stage.
* Exact coincidences between a pulse and a data edge are avoided by the
  testbenches. The environment changes on one clock edge and injects on
  the other.

Real cells with delays would widen these windows slightly. In particular,
a short window in which the interlocking buffer can still form `11`
appears right after the first rail is captured.

Synthesis maps each C gate to a latch plus logic. Lint tools report the
following, all expected for self-timed logic:

* the handshake loops (Verilator `UNOPTFLAT`);
* the C-gate latches inside those loops (Verilator `NOLATCH`: it no longer
  recognises them).

A real implementation would use C-gate cells from a QDI library.

`rst` is not a part of the buffer scheme. It provides a defined start in
spacer and the only way out of the deadlocking buffer's fail stop.

## Testbenches

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The generator and
checker are behavioural models paced by a testbench clock. The circuit
itself sees only the rail and acknowledge transitions.

| testbench | what it shows |
|---|---|
| `c_element_tb`, `asym_c_element_tb` | gate rules, exhaustive and random |
| `completion_detector_tb` | `done` rises with the last bit and falls with the last bit; `11` counts as complete |
| `set_injector_tb` | transparent when idle, inverts exactly the flipped wire |
| `wchb_stage_tb` | one stage of each style, driven by hand: capture, hold, release; pulses before, after and outside the data phase |
| `qdi_pipeline_tb` | all three styles streaming fault-free at three operating points; targeted pulses with the outcome each style must give |
| `qdi_fi_target_tb` | the full campaign on the top at default size (below) |
| `wchb_style_sweep_tb` | the same campaign on classic, deadlocking and interlocking pipelines side by side (the table above) |

Support files:

* `tb/qdi_tb_pkg.sv`: the word sequence and the fault classes.
* `tb/dr_source.sv`: the data generator. It waits `dly` ticks after each
  acknowledge edge.
* `tb/dr_sink.sv`: the checker. It waits `dly` ticks before each
  acknowledge edge. It counts code faults, value faults and glitches, and
  stamps the tick at which each word is accepted.

The campaign runs 11 operating points. The generator delay goes from 4 to
44 ticks while the checker delay goes from 44 down to 4. Each point runs
as follows:

1. Record a golden fault-free run.
2. For each of the 5 victim wires and each tick of one output handshake
   cycle, reset the pipelines, replay the run to the injection tick, pulse
   the wire for 6 ticks, and run on to 12 words.
3. Classify the outcome as the most important effect seen: timing
   deviation < value fault < code fault < glitch (a second transition in
   one phase, or a protocol violation) < deadlock (no progress).

It checks the rules stated above, plus reset recovery after deadlocks. It
also counts each mechanism, and fails if one never occurs: bubble- and
token-limited operation, a blocked pulse, a locked-in wrong value, a fail
stop, an effect from the acknowledge victim, and recovery by reset. There
are about 4000 experiments per pipeline, which take a few seconds.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/qdi_pkg.sv tb/qdi_fi_target_tb.sv --top-module qdi_fi_target_tb -o sim
obj_dir/sim
```

Replace the testbench name to run another. The RTL files are found through
`-y`. `qdi_pkg` is listed first because the modules import it.

Parameters worth changing:

* `STAGES`, `BITS` and `VICTIM` on `qdi_pipeline` and `qdi_fi_target`.
* `STYLE` on `wchb_stage` and `qdi_pipeline`.
* In the testbenches: `PW` (pulse width), `PRE`/`POST` (words before and
  after the injection window) and the delay sweep.

## Where this RTL departs from, or adds to, the buffer description

* **Cross-coupling.** The buffers are described only as cross-coupled
  asymmetric C gates.
  * For the interlocking buffer, the feedback goes to the partner's set
    side, which is the behaviour described.
  * For the deadlocking buffer, it has to act on the reset side. A
    set-side input cannot keep a gate from returning to spacer.
* **Gate delays.** There are none (see the timing model). The source
  evaluation used inertial gate delays.
* **Pulse polarity.** An injected pulse inverts the victim wire.
* **Pulse size.** Pulse width and step are in testbench ticks, not
  picoseconds. The pulse is 6 ticks, against handshake cycles of 52 to 92
  ticks.
* **Injection window.** One output handshake cycle per operating point.
* **Fault classification.** Timing deviations are judged from the tick at
  which each word is accepted at the output.
* **Additions of this design.** The reset, the `set_injector` gates and
  the `vic_*` observation ports.
* **Styles not built.** The classic WCHB is kept as a parameter value for
  comparison. The other hardening styles the proposal was compared with
  (dual completion detection, CD-driven locking, a Mousetrap-style latch
  buffer, doubled-up double checking) are not built.

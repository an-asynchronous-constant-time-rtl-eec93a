# Constant-time token counter for empty-pipeline detection

A pipeline can only be power gated when no token is inside it: cutting the
supply while data is in flight destroys that data. A cheap way to know is to
count tokens at the two ends: add one for every token that enters, subtract
one for every token that leaves, and call the pipeline empty when the count is
zero. The counter must not slow the pipeline down, and its speed must not
depend on how many bits it has.

This RTL implements such a counter and the instrumented pipeline around it:

* a **constant-time up/down counter** built from single-bit cells, in which
  carries ripple *up* one cell at a time while each cell reports *down* whether
  everything above it is zero (a "sticky-zero" bit), so the least significant
  cell alone knows, at once, whether the whole count is zero;
* a **controller** that turns increment and decrement requests into atomic
  counter updates and cancels an increment and a decrement that arrive
  together;
* an **interleaved arrangement** of two such counters, fed alternately by
  deterministic splits, which lets the instrumented pipeline run at full rate.

The design was originally conceived as quasi-delay-insensitive asynchronous
logic. Here every asynchronous channel is a clocked valid/ready handshake and
every process is clocked logic; see "Clocked rendering" below for what that
changes.

## Structure

```
 in ──► token_gate ──► buffer_pipeline (25 stages) ──► token_gate ──► out
          │ Inc                                           │ Dec
          ▼                                               ▼
      det_split                                       det_split
      odd │ even                                      odd │ even
          │   └──────────────────────┐        ┌──────────┘   │
          ▼                          ▼        ▼              ▼
   counter_system (odd) ◄── dec odd ─┘        └─ inc even ──► counter_system (even)
     negated_probe ×2                                  negated_probe ×2
     counter_controller                                counter_controller
     ct_counter (bit_counter × WIDTH)                  ct_counter
          │ empty_odd                                        │ empty_even
          └──────────────────────► AND ◄─────────────────────┘ ──► empty
```

| file | block |
|---|---|
| `rtl/ectr_pkg.sv` | shared type: `cnt_op_e` (`OP_INC`, `OP_DEC`) |
| `rtl/bit_counter.sv` | one counter cell: data bit, sticky-zero bit, carry register |
| `rtl/ct_counter.sv` | `WIDTH` cells chained into the constant-time counter |
| `rtl/negated_probe.sv` | stable proxy for "is a request waiting?" |
| `rtl/counter_controller.sv` | arbitration, cancellation, update register, empty flag |
| `rtl/counter_system.sv` | two probes + controller + counter: one complete detector |
| `rtl/det_split.sv` | alternates requests between an odd and an even output |
| `rtl/token_gate.sv` | entrance / exit gate that waits for its count request |
| `rtl/buffer_pipeline.sv` | the observed pipeline of one-token buffers |
| `rtl/empty_pipeline_detector.sv` | top: gates, pipeline, splits, two counter systems |

Top parameters: `STAGES = 25`, `DATA_W = 8`, `WIDTH = 5`, `INTERLEAVED = 1`.
Only `STAGES = 25` comes from the original evaluation; the counter width,
the token width and the choice of the interleaved arrangement as the default
are this design's.

## The counter cell and the sticky-zero chain

Each `bit_counter` holds its bit `x` and a bit `sz` meaning "every cell above
me is zero". On a command it does, in this order of importance:

1. **Report zero downwards, first.** For an increment the answer is always
   0 (the count cannot be zero after an increment). For a decrement it is
   `sz AND x`, evaluated on the *old* `x`: the new count of this cell and above
   is zero exactly when the cell held 1 (no borrow) and everything above was
   already zero. Because this report needs only the cell's own two bits, it is
   ready in the cycle the command is taken, whatever the width.
2. **Flip `x`** and, if needed, post a carry (increment of a 1) or borrow
   (decrement of a 0) in the cell's carry register for the cell above.
3. In a separate process, **copy the report coming from above into `sz`**.

The cell refuses a new command while its carry is still waiting. That rule
is what makes the chain correct: the cell above sends its zero report in the
same cycle it takes the carry, so by the time this cell can accept another
command its `sz` already reflects that carry. It also bounds the wait: an
update offered to the counter is taken within one cycle, for 5 or 12 bits
alike (the counter test checks both).

`ct_counter` keeps the report of the least significant cell in a `zero`
register. That is the counter's empty status; `value` (the data bits) can lag
while a carry is still climbing, `zero` never does. The top cell has no
neighbour above, so its `sz` stays 1. A carry out of the top cell is dropped
(the count wraps) and signalled on `overflow`; with `WIDTH = 5` and at most
25 tokens in the pipeline this cannot happen.

## The controller and the negated probe

The controller must act on the *absence* of a request as well as its
presence (to tell "increment only" from "increment and decrement together").
A raw request line can rise at any moment, so it is not a stable thing to
test. `negated_probe` keeps a registered snapshot of the request and offers it
as a one-bit proxy; reading a true proxy is what acknowledges the request.

`counter_controller` waits until a request is present and its update
register is free, then reads both proxies in one step:

| IncP | DecP | action |
|---|---|---|
| 1 | 1 | acknowledge both, leave the counter alone (`skip` pulses) |
| 1 | 0 | post an increment |
| 0 | 1 | post a decrement |
| 0 | 0 | snapshot not yet up to date: try again next cycle |

Only one update is in flight at a time, so increments and decrements reach the
counter one by one. `empty` is the counter's `zero` AND "no update waiting",
so a request that has been acknowledged but not yet applied keeps `empty` low.

Cost of the snapshot: a request is seen one cycle after it appears and a new
request on the same line one cycle after that, so a single controller serves
one increment and one decrement every **two** cycles.

## Interleaving

With one counter system a saturated pipeline therefore moves one token every
other cycle. The interleaved arrangement (`INTERLEAVED = 1`) splits the Inc
requests, and separately the Dec requests, alternately between two complete
counter systems. Because the pipeline is first in, first out, the k-th token
to enter is the k-th to leave, so both of its requests go to the same counter
and neither count ever goes negative. Each counter now serves every second
token at its own half rate, and the pair keeps up with one token per cycle.

`det_split` holds each routed request in a one-entry register per side. That
is a departure from the original split, which completes its input only after
the chosen output has been acknowledged; with the registers a request is
captured at once and the other side can take the next one in the following
cycle. Without them the clocked version would gain nothing from interleaving.

The pipeline is reported empty when both counter systems are empty, neither
split still holds a request, and the exit gate holds no token that has been
counted out but not yet taken by the sink.

Measured with an always-ready source and sink (`tb/tb_config_throughput.sv`):

| configuration | tokens per 400 cycles |
|---|---|
| bare pipeline | 400 |
| one counter (`INTERLEAVED = 0`) | 200 |
| interleaved counters (`INTERLEAVED = 1`) | 400 |

In the same window the single counter cancels an increment against a
decrement for every token (its two request streams line up), while the
interleaved counters cancel none: each counter sees its increments and
decrements staggered. Losing the cheap cancelled case is the price of
interleaving.

The original asynchronous circuit behaved somewhat differently. There the two
request streams of the single counter drifted in and out of step, so pairs
were cancelled only part of the time and updates were otherwise served one
after the other. Interleaving recovered much of the lost rate but not all of
it (about 35 % below the bare pipeline, against about 46 % for one counter),
and it roughly doubled the control logic and raised leakage about fourfold.
Frequencies, power and leakage belong to that transistor-level circuit and
are not modelled here.

## Gates and the observed pipeline

`token_gate` sits at each end. A token arriving at it raises a count request
(Inc at the entrance, Dec at the exit) and passes only when that request is
acknowledged, in the same cycle or later; a `held` flag remembers an
acknowledged token the next stage has not taken yet. So no token is inside
without having been counted, and the count never drops before the token is
about to leave.

`buffer_pipeline` is a row of `STAGES` one-token registers whose ready looks
one stage ahead, so it moves one token per cycle when full; `occupancy` is
provided for checking only.

## Clocked rendering: what differs from an asynchronous implementation

* Every channel is valid/ready with a transfer on a clock edge where both are
  high; valid and data must hold until the transfer (assertions check this for
  the carry and update channels). The zero-report channel between cells has no
  ready, because its receiver only ever waits for it.
* "Constant time" becomes "a constant number of cycles": an update is taken
  within one cycle and `zero` is correct on the next edge, for any `WIDTH`.
* All state is reset by the active-low asynchronous `rst_n` to: counts zero,
  all sticky-zero bits 1, splits pointing at the odd side, no request pending.
* The extra terms of `empty` (pending update, split registers, exit-gate
  hold) exist because the clocked version has places where an acknowledged
  request can wait; they make `empty` conservative, never early.
* The power switch that `empty` is meant to drive is not part of this RTL.

## Simulating

Every file in `tb/` is a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and stops itself (a watchdog ends a hung run).
With plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/ectr_pkg.sv \
    tb/tb_empty_pipeline_detector.sv --top-module tb_empty_pipeline_detector
./obj_dir/Vtb_empty_pipeline_detector
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; the package is
named explicitly because it must be read first. Replace the testbench name to
run another one.

| testbench | what it shows |
|---|---|
| `tb_bit_counter` | zero report, bit flip and carry of one cell against a model |
| `tb_ct_counter` | zero and value against an integer count for 5 and 12 bits; one-cycle acceptance for both |
| `tb_negated_probe` | snapshot timing, acknowledge only on a true read, one acknowledge per request |
| `tb_counter_controller` | every row of the decision table, update held until taken, empty masking |
| `tb_counter_system` | empty never early, settles to the count, steady increments every other cycle, cancellation |
| `tb_det_split` | strict odd/even alternation, one request per cycle |
| `tb_token_gate` | one count per token, no pass before acknowledge, order kept |
| `tb_buffer_pipeline` | order, occupancy, 25-cycle latency, one token per cycle |
| `tb_empty_pipeline_detector` | the whole design at its default size under mixed traffic; empty never high with a token inside and always back after draining; counts cancellations in both counters, odd/even routing, carries, gate holds, a full pipeline |
| `tb_config_throughput` | the three configurations above side by side |

All of them run in well under a second.

## Changing it

* `WIDTH` must satisfy `2**WIDTH > STAGES` (the pipeline plus the exit gate
  hold at most `STAGES` counted tokens); a smaller width wraps and raises
  `overflow`.
* With interleaving each counter sees about half the tokens, so one bit fewer
  would do; both counters keep the same width here.
* `INTERLEAVED = 0` gives the smaller single-counter detector at half the
  throughput.

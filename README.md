# A scan-testable micropipelined 4×4 multiplier

A micropipeline is a self-timed pipeline. Nothing clocks it. Neighbouring stages pass data with
two-phase request/acknowledge handshakes: any transition on a wire is an event. Each stage has
one Muller C-element as its controller and one event-controlled ("transition") latch. The logic
between stages is bundled data: a delay element on the request path makes the request arrive
only after the data has settled. Such a pipeline is hard to test. It has no clock a tester can
stop, and its latches open and close on events rather than on a shared edge.

This design makes the micropipeline testable the way synchronous logic is. It changes two cells,
and only a little:

* The **transition latch** already holds two storage halves. Put a multiplexer in front of each
  half and, in scan mode, the two halves become a master/slave flip-flop with its own scan input
  and output. All latches then join into one scan chain.
* The **C-element** gets two more transistors. In scan mode they make it ignore its request
  input and simply invert its acknowledge input. The chain of C-elements then becomes a clock
  line. It carries pulses applied at the output acknowledge `aout` backwards through the
  pipeline, to every latch in turn.

In normal mode (`scan = 0`) the circuit is an ordinary self-timed micropipeline, with all of
its properties.

The pipeline carries an unsigned 4×4 multiplier in five stages, with latches of 12, 14, 14, 10
and 8 bits. This gives a 58-bit scan chain. Each stage's logic can be tested on its own: a
vector is shifted in, one acknowledge event in normal mode captures every stage's response at
once, and the responses are shifted out. The same scan chain also sets up a two-pattern test of
each stage's bundling delay.

## Structure

```
          rin ──dly──►C0        C2        C4 ◄── aout (scan clock in scan mode)
                       │   ▲ ▲   │   ▲ ▲   │
 a,b ─► stage0 ─► L0(12) ─► stage1 ─► L1(14) ─► stage2 ─► L2(14) ─► stage3 ─► L3(10) ─► stage4 ─► L4(8) ─► o[7:0]
                                 │                   │                                 └─► cout
          ain ◄──────────────────C1                  C3                      rout ◄──
 sin ─► L0 ─► L1 ─► L2 ─► L3 ─► L4 ─► sout      (scan chain, 58 bits)
```

The control parts of all five stages together form the control network, `mp_control`. It is
generic in the number of stages `N`. Stage *k* is made of four parts:

| part | module | role |
|---|---|---|
| processing logic | `mult_stage0`, `mult_stage1`, `mult_stage23` (twice), `mult_stage4` | combinational |
| request delay | `bundle_delay` (`STAGE_DLY_PS`) | delays the incoming request: `rin` for stage 0, otherwise the acknowledge of latch *k−1* |
| controller | `c_element`, plus a `bundle_delay` (`CEL_DLY_PS`) after it | fires when a request is waiting and latch *k+1* has acknowledged the previous item (`aout` for the last stage) |
| latch | `scan_tlatch`, plus a `bundle_delay` (`LATCH_DLY_PS`) from pass to capture | its capture signal is also its acknowledge |

Two more outputs come from the latch acknowledges: `ain` is the acknowledge of latch 0 and
`rout` the acknowledge of latch 4.

## Self-timed operation

All control wires start at 0. `clr` (active high) forces every C-element to 0, which empties
the pipeline. For data to enter:

1. The producer sets `a` and `b`.
2. It toggles `rin`.
3. It waits until `ain` equals `rin` before it sends again.

For data to leave, the consumer waits until `rout` differs from `aout`, reads `o`, then toggles
`aout`. Between the two ends the items move on as far as the next stage is free. A slow consumer
fills the pipeline, and the producer then waits.

In an empty pipeline an item takes 5 × (`STAGE_DLY_PS` + `CEL_DLY_PS` + `LATCH_DLY_PS`) from a
`rin` event to the `rout` event. With the defaults that is 5 × (5000 + 2250 + 3630) ps =
54.4 ns. The logic and the gate-level cells have no delay of their own.

`LATCH_DLY_PS` = 3630 and `CEL_DLY_PS` = 2250 are the request-to-acknowledge times measured for
the scan latch and scan C-element cells in a 2 µm CMOS process. The basic cells took 3.58 ns and
2.07 ns, so scan costs 50 ps and 180 ps.

The C-element delay also matters to correctness. When latch *k* closes, its acknowledge makes
C-element *k−1* open latch *k−1*, and that changes the data latch *k* has just captured.
`CEL_DLY_PS` gives that capture its hold margin.

The top checks the handshake rules with assertions in normal mode:

* `rin` may change only after `ain` has caught up;
* `aout` may change only while `rout` differs from it.
`STAGE_DLY_PS` has no published value. It must exceed the slowest path through any stage's
logic, and that is exactly what the bundling-delay test below checks.

## The scan transition latch (`scan_tlatch`)

This is the part that takes the most care. Each bit has two level-sensitive halves:

* **T** is open while capture `c` = 1.
* **B** is open while `c` = 0.
* The output `q` shows B while pass `p` = 1, and T while `p` = 0.

When `c == p` the latch is opaque. When they differ it is transparent. A transition on `p` opens
the latch. The following transition on `c` closes it on the current `din`, in whichever half
was just showing. Because `c` is `p` delayed, a request event on `p` always ends with the data
captured and an acknowledge event on `c`. Successive events use the two halves in turn.

In scan mode the multiplexers rewire the halves:

* T (the master) loads the scan input: `sin` for bit 0, and the B half of the bit below for the
  other bits.
* B (the slave) loads T.
* B of the top bit drives `sout`.

The T-open and B-open conditions never hold together, so each bit is an edge-triggered
master/slave flip-flop. Inside one latch the bits form a shift register from `sin` to `sout`.

Latch polarity alternates along the pipeline. `INV = 1` inverts `p` and `c`, and it is set for
stages 1 and 3. The reason is that the scan clock is inverted at each C-element. With
alternating latches, every latch shifts on the *rising* edge of `aout`. The output-end latch
sees that edge as its control going high to low.

## The C-element as a scan clock line (`c_element`)

In normal mode the element is a Muller C-element whose acknowledge input is inverted: `z` takes
the value of the request `b` when `b == ~a`, and otherwise holds. In scan mode `z = ~a`.

So with `scan = 1` a transition on `aout` reaches the last latch after one C-element delay. It
reaches latch 3 one latch delay and one C-element delay later, and so on back to `ain`, inverted
at each stage. The scan clock runs
against the data, and the bundling delays are not on its path. This has two effects:

* **Order.** The receiving latch always moves before the latch that feeds it. Shifting never
  races, and in a capture the observing latch records its stage's response before the latch
  that drives that stage changes its vector.
* **Speed.** Shift speed is limited only by the latch and C-element delays.

One scan clock is the pulse `aout` 0 → 1 → 0, and it moves the chain by one bit. At rest
(`aout` = 0) every latch shows its slave contents on `q`, so a shifted-in vector is applied to
the logic after it.

## Test procedures

The end-to-end testbench runs the first two procedures below step by step. The third one, the
bundling-delay test, has a testbench of its own, `mp_delay_test_tb`, which uses a variant of it.

### Processing logic, and the control network with it

1. Set `scan = 1`. Shift the 58-bit vector in with `aout` pulses. Stage 0 takes its inputs
   from the primary inputs `a` and `b`.
2. Set `rin = 0`. With an odd number of stages this is the level at which a request is pending
   at the input.
3. Set `scan = 0`. The C-elements are now in the state of a full pipeline: `rout` is high and
   not acknowledged.
4. Set `aout = 1`. This single acknowledge ripples from the output to `ain`. Each latch fires
   in turn and captures its stage's response into its master half. The output end goes first,
   so every response is computed from the scanned-in vector.
5. Set `scan = 1`. The slaves open onto the masters.
6. Set `aout = 0`. The slaves close on the captured responses.
7. Shift the responses out with `aout` pulses, while the next vector is shifted in.

Step 4 also tests the control network. A C-element that is stuck at a level, or a broken wire
between C-elements, stops the ripple, and `ain` does not toggle. Even stages (counted from the
output end) are exercised falling, odd stages rising.

The second half of the control test starts from the full state with `aout = 1`: set it in scan
mode, set `rin = 1`, return to normal mode and lower `aout`. Every C-element then makes the
opposite transition.

### Latches

Flushing an alternating 0/1 pattern through the chain catches a latch that has become
permanently transparent. Flushing all 0s and then all 1s catches a half stuck at a value.

### Bundling delay (delay faults)

This test is a two-pattern test. As published, the pattern v1 is scanned into the latch in
front of the stage under test. A pattern v3 is scanned into the latch one stage further back,
chosen so that the previous stage turns v3 into v2. A request event in normal mode then launches
v2 into the stage under test. That stage's output latch captures one bundling delay later, and
the captured value is scanned out. The procedure adds no hardware.

This design reaches that situation in the following way, which is its own choice:

1. Shift a vector in.
2. Return to normal mode with no request pending, then pulse `clr`. The control network is
   now empty. Latches 0, 2 and 4, whose control falls, capture their logic's response to the
   scanned data. Latches 1 and 3 keep the scanned data. Every stage input now holds a known v1.
3. Send one `rin` event. It runs forward through the empty pipeline. Each latch k-1 launches
   its new value v2 into stage k. Latch k captures stage k's response
   `STAGE_DLY_PS + CEL_DLY_PS + 2 x LATCH_DLY_PS` = 14.51 ns later. This is the bundling
   budget, and the testbench checks it to the picosecond.
4. Read the result at the product output `o`.

In step 4 the result is not scanned out. After a forward wave all C-elements are 1. Scan mode
needs alternating values, so entering it here makes C-elements 0 and 2 pulse, and the pulses
shift their latches. Reading `o` is enough to detect a slow path in any stage. Each carry-save
bit has a weight below 2^8, so one wrong captured bit always changes the product.

The logic models have no delay, so the testbench imitates a slow path. It holds one output bit
of stage k at its v1 value until X ps after the launch:

* If X is 1.5 ns inside the budget, the product must be correct.
* If X is 1.5 ns beyond the budget, latch k must hold the stale bit and `o` must be wrong.

Both hold for stages 1 to 4.

## The multiplier stages

The five stages split an unsigned carry-save array multiplier. Each latch holds a packed struct
from `mp_pkg`. After array row *i* a bundle holds:

* the finished product bits `p[i:0]`;
* a 3-bit sum vector `s` and a 3-bit carry vector `c`, both of weights *i+1 … i+3*;
* the operand bits that later rows still need.

| latch | bits | contents | stage before it |
|---|---|---|---|
| L0 | 12 | `a`, `b`, `pp = a & b[0]` | `mult_stage0`: AND row |
| L1 | 14 | `a`, `b[3:2]`, `p[1:0]`, `s`, `c` | `mult_stage1`: row 1, half adders |
| L2 | 14 | `a`, `b[3]`, `p[2:0]`, `s`, `c` | `mult_stage23` with `b[2]`: full-adder row |
| L3 | 10 | `p[3:0]`, `s`, `c` | `mult_stage23` with `b[3]`: the same circuit |
| L4 | 8 | product `o` | `mult_stage4`: 4-bit ripple-carry adder, `s + c` → `o[7:4]` |

`cout` is the final adder's carry out. It leaves unlatched. With these widths it is always 0.

The scan chain runs through L0 bit 0 … L0 bit 11, then L1 bit 0, and so on up to L4 bit 7,
which drives `sout`. Within a latch, bit *i* of the struct is chain bit *i*.

## Where this follows the published scheme and where it does not

These parts follow the published scheme:

* The scan latch structure: two halves, input multiplexers, slave feeding `sout`.
* The C-element that inverts its acknowledge input in scan mode.
* The scan clock running backwards from `aout`, and the alternating latch types.
* The test steps.
* The multiplier's five stages, with latch widths 12/14/14/10/8, identical stages 2 and 3, and
  the pins `clr`, `scan`, `sin`, `sout`, `cout`.
* The cell delays: 3.63 ns for the scan latch, 2.25 ns for the scan C-element.

These parts are this implementation's own choices:

* **Stage arithmetic.** The published multiplier gives only stage names and latch widths. The
  carry-save split above reproduces those widths, but it is a reconstruction.
* **Latch polarities.** Which half is open at which level, and therefore which edge shifts. The
  published steps say the master-to-slave copy happens when `aout` returns to 0 (step 6 above).
  In this model the slave already opens onto the master when `scan` returns to 1 (step 5), and
  closes at step 6. The captured data is the same.
* **Chain order.** Left to right, bit 0 first.
* **`clr`.** Active high; it clears the C-elements only, not the latch contents.
* **Timing model.** The stage delay value, and zero delay for the logic. Cell delays are lumped
  into one delay element per cell.
* **Cell level.** Cells are modelled at gate level, not at transistor level.
* **Not modelled:**
  * the basic (non-scan) latch and C-element, which serve only as area comparisons (42 against
    34 transistors for the latch, 16 against 14 for the C-element);
  * real path delays in the logic: in the bundling-delay test the slow path is imitated by
    the testbench.

How far to trust it:

* Every stage's logic is tested exhaustively against an independent column-count model.
* The full pipeline is tested with 221 random products under random consumer speeds.
* The scan flow uses 19 random vector loads. That is the number of loads a per-stage test set of
  at most 19 vectors per stage needs. The generated test vectors themselves are not available.
* Each testbench was also run against a deliberately broken copy of its module and failed.
* `mp_control_tb` checks the control network on its own: exact latency, a capacity of
  exactly 5 items, the order and timing of the scan clock, and that every item comes through.
* `mp_scan_coverage_tb` injects 45 faults one at a time, with all three tests run after
  each:
  * every C-element output stuck at 0 and at 1: the control test sees each;
  * one storage bit of every latch stuck at 0 and at 1: the latch test sees each;
  * one bit of every latch stuck at pass, with both halves transparent: the alternating
    pattern sees each, because the chain loses one position, while the all-0 and all-1
    patterns pass it unchanged;
  * two output bits of every stage's logic stuck at 0 and at 1: the logic test sees each.
* `mp_delay_test_tb` runs the bundling-delay test on stages 1 to 4 with an imitated slow path.
  The path is set just inside the budget and then just beyond it. It also checks the launch to
  capture time.

## Files

| file | content |
|---|---|
| `rtl/mp_pkg.sv` | bundle structs, widths, full-adder function |
| `rtl/c_element.sv` | scan C-element (a latch, open while cleared, in scan mode or when `b == ~a`) |
| `rtl/scan_tlatch.sv` | W-bit scan transition latch, parameters `W`, `INV` |
| `rtl/bundle_delay.sv` | behavioural delay element, `DELAY_PS` (not synthesizable) |
| `rtl/mp_control.sv` | control network: `N` C-elements, their delays, the handshake assertions |
| `rtl/mult_stage0.sv` … `mult_stage4.sv` | the stage logic |
| `rtl/mp_mult4x4.sv` | top: parameters `LATCH_DLY_PS` = 3630, `CEL_DLY_PS` = 2250, `STAGE_DLY_PS` = 5000 |
| `tb/mp_ref_pkg.sv` | reference model of the stages |
| `tb/*_tb.sv` | self-checking testbenches; each ends with `TB_RESULT checks=N failures=M` |
| `tb/mp_scan_coverage_tb.sv` | fault injection: each test must catch the faults it is meant for |
| `tb/mp_delay_test_tb.sv` | bundling-delay (two-pattern) test with an imitated slow path |

Synthesis reports the following, all of which is intended:

* latches: the C-elements and the latch halves;
* logic loops through the C-elements: the self-timed control ring, which is broken only by the
  delay elements that synthesis drops;
* a lint note about the T/B cycle inside a latch, which is never transparent all the way round.

## Simulating

All files use `timescale 1ps/1ps`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mp_pkg.sv tb/mp_ref_pkg.sv tb/mp_mult4x4_tb.sv --top-module mp_mult4x4_tb
./obj_dir/Vmp_mult4x4_tb
```

The same command works for `c_element_tb`, `scan_tlatch_tb`, `bundle_delay_tb`,
`mp_control_tb`, `mult_stages_tb`, `mp_scan_coverage_tb` and `mp_delay_test_tb`.
Verilator finds the other modules through `-Irtl`.

The end-to-end testbench uses the top's default parameters and finishes in well under a second.
It counts each mechanism and fails if one never occurs:

* item transfers;
* the producer waiting on a full pipeline;
* scan shifts;
* the three latch flushes;
* normal-mode captures;
* both control-test states.

It also checks the empty-pipeline latency exactly.

To change timing, override the three delay parameters on `mp_mult4x4`. The testbench derives
its latency check from its own copies of those numbers. Its settling time `TSET` must stay above
five latch delays plus five C-element delays.

# Self-timed radix-2 SRT divider with overlapped stages

This is the significand datapath of a double-precision divider. Five identical
radix-2 SRT stages form a closed ring with no latches between them. Each stage
produces one quotient digit, so one trip round the ring gives five digits and
eleven trips give all 55. Three ideas set the design apart from a textbook
sequential SRT divider:

* **Latch-free self-timed ring.** Each stage's precharged output is its only
  storage. A stage is reset as soon as its successor has consumed its result,
  and it is ready again before the data wave comes back round. No clock paces
  the iteration.
* **Symmetric overlapped stages.** A stage does not wait for its own quotient
  digit. It receives the remainder together with the digit already chosen for
  it. While it applies that digit across the full 55-bit width, it also
  precomputes the top bits of the next remainder for all three possible
  digits, and from them selects the *next* digit. The digit path of one stage
  therefore runs in parallel with the remainder path of the next.
* **Early done.** After every trip the remainder is compared with the one from
  the trip before. If it repeated, every later digit repeats too, so the ring
  stops and the quotient shift registers already hold the repeated digits.

The RTL keeps the structure of the self-timed design, including dual-rail data,
completion detectors, C-element precharge control and C-element shift
registers. It times the structure with a clock: each self-timed event (a stage
evaluating or resetting, a C-element switching) happens on one clock edge. The
result is ordinary synthesizable synchronous logic. Cycle counts show the order
of events, not the delay of the asynchronous circuit.

## Arithmetic

### Number format and recurrence

Dividend `X` and divisor `D` are 53-bit normalised significands `1xxx…x`, read
as fractions in [1/2, 1). The remainder datapath is 55 bits wide, in two's
complement, with bit weights −2, 1, 1/2, … 2⁻⁵³. Between stages the remainder
travels in carry-save form as two 55-bit words.

Each stage implements `P(i+1) = 2·P(i) − q(i)·D` with digits q ∈ {−1, 0, +1}.
What passes from one stage to the next is the *shifted* remainder
`Y = 2·P(i)` plus the digit `q(i)` already chosen for it. The stage computes
`2·(Y − q·D)` with a divisor mux (~D with a carry-in of 1, 0, or D) and one
row of 55 full adders. The factor of 2 is wiring.

The ring starts from the bundle (`X`, carry 0, digit +1). The leading quotient
digit is always +1 for normalised operands, so the first stage begins with
`2·(X − D)`. The quotient is therefore

    Q = 1 + Σ q_k·2^-(k+1),  k = 0 … 54

and the outputs satisfy `X·2^55 = quotient·D + remainder` with
`0 ≤ remainder < D`, where X and D are read as integers.

### Digit selection on a 3-bit approximation

The next digit comes from `P̂`, a 3-bit approximation of the shifted remainder:

* Unit 1/2, range −4 … +3.
* It is formed by adding the top three columns of the sum and carry words.
* The columns below are dropped, so `P̂` is at most one unit below the true
  value.

The selection rules are in `qsl.sv`:

| condition                                | digit |
|------------------------------------------|-------|
| force flag from previous stage set       | −1    |
| P̂ ≤ −2                                   | −1    |
| P̂ = −1                                   | 0     |
| P̂ ≥ 0                                    | +1    |

A conventional design uses 4 bits here. The true shifted remainder lies in
[−2D, 2D], but its truncated estimate can reach −2D − 1, and representing that
takes one more bit. This design drops that bit. In 3 bits the estimates −5 and
−6 wrap round to +3 and +2: the sign bit "falls off". This can only happen
right after the most negative estimate. In that case the next digit is known
to be −1 whatever the estimate says. The selection logic therefore sets a
**force flag** in two cases:

* when `P̂ = −4`;
* when the flag was already set and the current `P̂` looks non-negative, which
  means it is a wrapped value.

While the flag is set, the next stage picks −1 without looking at its
estimate. As a result, a wrapped estimate is never read as a positive number.

The second term of the force flag is essential. With it removed, the end-to-end
test finds wrong quotients in about one division in a hundred. The flag travels with the
remainder and digit as one more dual-rail bit.

### The overlapped stage

`srt_stage.sv` contains two paths that work in parallel. They are built as
three self-timed blocks, R, P and Q, each ending in its own dual-rail output
register. P needs only the incoming remainder Y, so the arms start before the
incoming digit q(i−1) has arrived:

```
 Y, q(i-1) ─► DMUX(q(i-1)) ─► 55-bit CSA ─────────────────── [R] ─► Y'
 Y ─┬─► arm "+D": 3b CSA ─► 3b CPA ─┐
    ├─► arm "0" :          3b CPA ─┼─ [P] ─► RMUX(q(i-1)) ─► QSL ─ [Q] ─► q(i), force
    └─► arm "−D": 3b CSA ─► 3b CPA ─┘
```

Each arm (`approx_arm.sv`) reads four columns (bits 53…50) of the incoming
words and of its divisor multiple. It produces three sum bits and the three
carries that land in them, then adds them with the 3-bit CPA. The zero arm
adds the incoming words directly, without a CSA. In each stage the RMUX only
waits for the incoming digit, not for the full-width CSA.

### Final resolve

When the ring stops, the last stage (E) holds `2·P₅₄` and `q₅₄`. This is true
even after an early stop, because the state repeats with period five and
position 54 is a stage-E position. `quot_resolve.sv` does three things:

1. It forms `P₅₅ = 2·P₅₄ − q₅₄·D` with one carry-propagate add.
2. It converts the signed-digit quotient as `2^55 + plus − minus`.
3. If `P₅₅ < 0`, it subtracts one unit from the quotient and adds D back to
   the remainder.

No rounding to an output format is done. `exact` (remainder zero) is the
sticky bit a rounder needs.

## Self-timing, as modelled

* **Dual-monotonic data.** Each bit between stages is a wire pair: 00 reset,
  01 false, 10 true. Quotient digits use three wires, one per value; all low is
  a *spacer*. Types and encode/decode functions are in `srt_pkg.sv`.
* **Completion detection.** `comp_det.sv` reports when all pairs of a bundle
  have evaluated (`done`) or are all reset (`empty`).
* **Stage control.** A stage is three self-timed blocks, each with its own
  precharged output register, completion detector and precharge control:
  * R, the remainder block (DMUX and 55-bit CSA), needs the incoming
    remainder and digit.
  * P, the approximation block (the three short arms), needs only the
    incoming remainder. It therefore works while the previous stage is still
    choosing the digit.
  * Q, the digit block (RMUX and selection), needs P and the incoming digit,
    and also waits for its shift register to take a digit.

  A block evaluates when it is out of precharge, its inputs are complete and
  its output is empty. It enters precharge once every reader of its output is
  complete and its own inputs are back in reset. It leaves precharge once
  every reader is empty again. The readers are:
  * of R: the next stage's R and P;
  * of P: the stage's own Q;
  * of Q: the next stage's R and Q, and the shift register.

  With one data wave in the five-stage ring, this lets the wave run round
  indefinitely. Which completion signals are combined for each reset is this
  design's choice.
* **Input mux.** It offers stage A the start bundle (`load`). It then offers
  stage E's bundle whenever the controller lets the ring continue (`more`).
  Otherwise it shows reset. `more` stays up until stage E has reset, so stage
  A sees its input go back to reset only when its producer really has.

## Quotient shift registers

Each stage has its own shift register (`quot_shift_reg.sv`). A cell holds one
three-wire digit on three C-elements. Each C-element takes the matching wire
of the previous cell and "next cell is empty" (a NOR of the next cell).
Digits ripple forward and spacers wipe the copies they leave behind. A digit
followed by no spacer is copied into every cell behind it. That is how an
early stop fills the remaining positions with the repeating digit, with no
extra logic.

A digit and its spacer take two cells, so the register has 2·11 − 1 = 21
cells. Digit j settles in cell 20 − 2j. The last cell's acknowledge input is
tied to "empty", so it keeps the first digit.

Spacers must not be sent until the ring is known to iterate again; otherwise
an early stop would find the repeated copies wiped. Each stage therefore keeps
its digit on the shift register input after it resets. It drops the digit only
after the controller's `release_sr` pulse, which follows each trip that does
not stop. A stage also does not evaluate until its shift register's entry cell
is empty. `stable` tells the controller that every digit has reached its place.

## Early done and control

`rem_compare.sv` captures stage E's bundle at the end of each trip. It compares
two things with the bundle from the previous trip:

* the remainder *value* (sum + carry modulo 2⁵⁵);
* the pending digit.

If both match, the last five digits took the remainder back to where it was,
so repeating them keeps it there forever. The quotient from the repeated
digits, together with the same final remainder, is then exact.

The value is compared rather than the carry-save bit pattern. A repeated value
often comes back with its carries in different places. Comparing bit patterns
never stops before the third trip, while comparing values stops after two in
the best case.

`ring_control.sv` sequences each division:

1. `go` → flush the ring, the shift registers and the compare register.
2. Load the operands.
3. Let the ring run.
4. Stop on *Same* or after 11 trips (*Full*).
5. Wait for the shift registers to settle, then raise `done`.

## Interface (`srt_divider`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | event clock, asynchronous active-low reset |
| `go` | in | 1 | start; operands are captured while `busy` is low |
| `dividend`, `divisor` | in | 53 | normalised significands (msb = 1) |
| `busy` | out | 1 | division in progress |
| `done` | out | 1 | result valid; stays high until the next `go` |
| `quotient` | out | 56 | `dividend·2^55 div divisor` (value in (1/2, 2) when read ·2⁻⁵⁵) |
| `remainder` | out | 53 | `dividend·2^55 mod divisor` |
| `exact` | out | 1 | remainder is zero |
| `corrected` | out | 1 | final remainder was negative and the quotient was decremented |
| `early` | out | 1 | stopped on a repeated remainder |
| `trips` | out | 4 | ring trips used (2 … 11) |
| `stage_fired/forced/aliased` | out | 5 | per-stage event taps for observation |

In the tests a division took 44 clocks from `go` to `done` at best (early stop
after two trips) and 163 clocks at worst (eleven trips). That ratio is close to
the chip's measured 45 ns best case and 160 ns worst case.

Parameter: `ITERS` (default 11), the maximum number of trips. Widths are fixed
in `srt_pkg` (`REM_W = 55`, `MANT_W = 53`, `EST_W = 3`, five stages).

## Files

| file | content |
|------|---------|
| `rtl/srt_pkg.sv` | sizes, digit and dual-rail encodings, bundle types |
| `rtl/c_element.sv` | C-element |
| `rtl/comp_det.sv` | completion detector |
| `rtl/qsl.sv` | digit selection with force flag |
| `rtl/approx_arm.sv` | 3-bit CSA + CPA arm |
| `rtl/rem_csa.sv` | divisor mux + 55-bit CSA |
| `rtl/srt_stage.sv` | one ring stage |
| `rtl/quot_shift_reg.sv` | C-element quotient shift register |
| `rtl/rem_compare.sv` | remainder register and compare |
| `rtl/ring_control.sv` | start/stop control |
| `rtl/quot_resolve.sv` | final remainder sign, quotient conversion |
| `rtl/srt_divider.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module, plus the 8-bit workload |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends by itself. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/srt_pkg.sv rtl/*.sv tb/srt_divider_tb.sv --top-module srt_divider_tb
./obj_dir/Vsrt_divider_tb
```

The tests:

* `srt_divider_tb` runs the design at full size through 508 divisions:
  directed cases, random 53-bit operands and random 8-bit operands. It checks
  each quotient and remainder against wide integer division and checks the
  trip count. It also counts that every mechanism occurred: early stop, full
  stop, a two-trip stop, a forced digit, a wrapped estimate, the final
  decrement, and, in every stage, the arms finishing before the incoming
  digit arrived.
* `srt_divider_8bit_tb` divides all 128 × 128 pairs of normalised 8-bit
  significands. All are exact. 4.0 % stop early (465 after two trips, 199
  after three); the rest run all 11 trips. The original design quotes about
  12 % early finishes for uniformly distributed 8-bit operands, but does not
  say how those operands were drawn.

## Where this differs from the chip

* **Timing.** There is no asynchronous timing: one clock per event. The chip's
  nanosecond figures (quotient bits every 2.8 ns, 45 ns to 160 ns per
  division) have no counterpart here. The trip counts do: two trips at best,
  eleven at worst.
* **Operands and start-up.** The operand format (53-bit fractions), the
  start-up with a fixed leading +1 digit and the column details of the short
  adders are this design's reading.
* **Control details.** The controller's state sequence, the C-element pairing
  in the stage control and the shift register length are not given by the
  original and are choices made here.
* **Full.** *Full* is a trip count in the controller. The chip takes it from
  the shift registers.
* **Early-done compare.** It taps stage E's output and compares values; see
  above. The chip's die shows a "remainder shift register" for this; its
  working is not described, and it is not modelled.
* **Dynamic path ordering.** Each block firing takes one clock, whatever the
  data. The order of events is modelled: the arms run ahead of the digit, and
  whichever of a stage's remainder and digit paths is ready first goes first.
  The gate delays that decide that order on the chip are not modelled.
* **Circuit optimisations.** Transistor sizing of the frequently used −1 arm is
  a circuit optimisation with no RTL counterpart.
* **Not modelled.** Test registers, test address decoders, test output bus,
  buffers and pads. Rounding to a destination format is also left out: the
  rounding mode is not specified.

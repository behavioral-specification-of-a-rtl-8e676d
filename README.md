# Three-level line encoder/decoder with zero-run substitution

This is a synchronous encoder/decoder pair for sending a binary stream over a
wire as a three-level signal: +U (`p`), 0 (`z`) and -U (`n`). The code has two
properties that a plain binary line lacks:

1. **No DC bias.** The running sum of the line voltage never leaves the range
   -U..+U.
2. **Enough transitions.** The line never carries more than three `z` in a row,
   so the receiver never loses its clock and a broken wire (a steady 0) can
   never be mistaken for data.

The first property comes from sending every `1` as a pulse whose polarity
alternates (`p`, `n`, `p`, ...) and every `0` as `z`. The second needs a trick:
each run of four `0`s is replaced by a pattern that contains pulses, and a
pulse that *repeats* the previous polarity (a "violation" of the alternation)
marks the pattern so that the decoder can tell it from real `1`s. This is, in
substance, the HDB3 line code used on telephone trunks.

Besides the encoder and decoder, the RTL contains four **observers**: small
monitors that watch the line and raise a flag when one of the code's safety
properties is broken. They change nothing in the datapath and can be left out
of a product; here they are wired into the top level and make the end-to-end
test self-checking.

## The code

Reading the input bit by bit, from left to right:

| input | sent |
|-------|------|
| `1`   | **A** (alternation): the opposite polarity of the last pulse sent |
| `0`   | `z` |
| `0000` (a complete run of four, taken from the left) | `P z z V` |

In `P z z V`:

* **P** is `z` if an even number of pulses has been sent so far, and an
  alternation (a pulse) if the number is odd.
* **V** is a pulse with the *same* polarity as the last pulse sent (after P),
  i.e. a deliberate violation.

Before anything has been sent the count of pulses is even (zero) and the
"last pulse" counts as `n`, so the first `1` is sent as `p`.

Worked example:

| bit number | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|------------|---|---|---|---|---|---|---|---|---|----|----|
| input      | 0 | 1 | 0 | 0 | 0 | 0 | 1 | 0 | 0 | 0  | 0  |
| sent       | z | p | n | z | z | n | p | z | z | z  | p  |
| kind       |   | A | P (odd) | | | V | A | P (even) | | | V |
| running sum| 0 | +1 | 0 | 0 | 0 | -1 | 0 | 0 | 0 | 0 | +1 |

The parity rule is what keeps the running sum within range, as the last row
of the example shows. After every `P z z V` group the number of pulses sent
is odd, whichever `P` was chosen.

## Look-ahead, latency and start-up

Whether a `0` is sent as `z` or as the `P` of a group depends on the next
three bits. The encoder therefore works three cycles behind its input: a shift
register holds the last three bits, and the bit being encoded in cycle *k* is
the input of cycle *k*-3. The decoder needs the same look-ahead in the other
direction (it must see the `V` to know that a pulse three symbols earlier was a
`P`), so the whole chain has a latency of **6 cycles**: `bout` in cycle *k*
equals `bin` of cycle *k*-6.

Reset clears the encoder's shift register, so the encoder behaves as if the
stream were preceded by three `0`s. The first three symbols after reset carry
no input bit (they are `z`, or the start of a group). This matters when the
stream begins with `0`: that `0` completes a run of four with the three
assumed ones and is sent as `n` after `z z z`. The line properties hold from
the very first cycle, and the decoder, whose reset state matches, still
returns the exact input. To reproduce the table above bit for bit, send
`1 1` first: it leaves the parity even and the last polarity `n`, exactly as
after reset.

## Encoder structure

The encoder (`encoder.sv`) is four small agents running in parallel and
talking through one-bit signals that are either present (1) or absent (0) in
a cycle:

```
            +-----------+  delayed_x   +-----------+  alternation  +-----------+ plus
   bin ---->| detector  |------------->| sequencer |-------------->|  nonzero  |------>
            | 3 x delay |  four_zeros  |  NORMAL / |  violation    | last pol. | minus
            +-----------+------------->| EXCEPTION |-------------->|           |------>
                                       +-----------+               +-----------+
                                          ^    |  zero                   | plus_or_minus
                                     even |    +------------------------------------->
                                       +-----------+                     |
                                       |  parity   |<--------------------+
                                       +-----------+
```

| agent | job | state |
|-------|-----|-------|
| `detector` | shift register of the last three input bits (three `sc_delay` stages); `delayed_x` is the bit to encode now; `four_zeros` is present when it and the three following bits are all 0 | 3 bits |
| `sequencer` | decides, each cycle, between `zero`, `alternation` and `violation` | 2 bits |
| `nonzero` | turns `alternation`/`violation` into `plus` or `minus` from the last polarity; reports `plus_or_minus` | 1 bit |
| `parity` | counts pulses modulo 2; `even` describes the pulses sent *before* the current cycle | 1 bit |

Exactly one of `minus`, `zero`, `plus` is present in every cycle; the encoder
contains an assertion for that.

All outputs are combinational from the current input and the registers; the
only loop between agents (sequencer -> nonzero -> parity -> sequencer) is cut
by the parity register, so there is no combinational cycle.

## The sequencer: the part that needs care

The sequencer has two modes:

* **NORMAL**: each cycle, `delayed_x = 1` gives `alternation`, `0` gives
  `zero`.
* **EXCEPTION**: four cycles that produce `P z z V`: first `zero` if `even`
  else `alternation`, then `zero`, `zero`, then `violation`.

The timing rules are what make the code correct:

1. **The switch to EXCEPTION is immediate.** In a NORMAL cycle the sequencer
   tests `four_zeros` *first*; if it is present, that same cycle already
   produces the `P` symbol and NORMAL's own output is suppressed. (In
   synchronous-language terms: an immediate, strong pre-emption.)
2. **`four_zeros` is ignored inside an exception.** During cycles 2-4 the
   detector may keep reporting four zeros (for a run of five or more), but
   those zeros already belong to the group being sent.
3. **The return is automatic, and the next cycle is NORMAL again.** After
   the `V` cycle the mode register is back in NORMAL, and rule 1 applies at
   once: a run of eight `0`s becomes two back-to-back groups with no cycle in
   between.

The mode register is an enum `NORMAL, EXC_Z1, EXC_Z2, EXC_V`.

## Decoder

The decoder (`decoder.sv`) classifies every incoming symbol as it arrives:
is it a pulse, and is it a violation (same polarity as the previous pulse)?
Violations only ever occur as the `V` of a group. So a symbol decodes to `1`
exactly when

* it is a pulse,
* it is not itself a violation, and
* the symbol three cycles later is not a violation (otherwise it was a `P`).

It keeps the classifications of the last three symbols and the last polarity,
and decides the symbol of three cycles ago using the one arriving now: 3
cycles of latency, no parity needed. A cycle with no legal symbol (none or
several of `minus`/`zero`/`plus` present) is read as `z`.

## Observers

| module | property watched | flag |
|--------|------------------|------|
| `observer_exclusion` | exactly one of `n`, `z`, `p` each cycle | `non_exclusive` |
| `observer_r1` | running sum stays within -U..+U: states -U, 0, +U and two final states | `too_negative`, `too_positive` (stay set once reached) |
| `observer_r2` | never four `z` in a row: a chain of four `z` steps, restarted by any pulse | `too_many_z` (in each cycle that ends a run of four or more) |
| `observer_sequence` | `bout` equals `bin` delayed by a 6-stage shift register | `violation` (`seq_violation` at the top) |

Flags are raised in the cycle of the offending symbol, not one cycle later.

## Top level: `encdec_top`

| port | dir | type | meaning |
|------|-----|------|---------|
| `clk` | in | 1 | one cycle per bit |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `bin` | in | 1 | input bit stream |
| `line_tx` | out | `line_sym_t` | symbol to put on the wire (`minus`, `zero`, `plus`) |
| `line_rx` | in | `line_sym_t` | symbol received from the wire, feeds the decoder |
| `bout` | out | 1 | decoded stream, `bin` delayed by 6 cycles |
| `non_exclusive`, `too_negative`, `too_positive`, `too_many_z`, `seq_violation` | out | 1 each | observer flags; never set with `line_rx = line_tx` |

The analog line driver and receiver (three voltage levels) are not part of
this RTL; `line_tx` and `line_rx` are where they connect. For an ideal wire,
tie `line_rx` to `line_tx`. The exclusion and line-property observers watch
`line_tx`; the sequence observer compares `bin` with `bout` and therefore
also catches line errors.

`encdec_pkg` holds the `line_sym_t` struct, the constants `SYM_N`, `SYM_Z`,
`SYM_P`, and the sizes: `ZERO_RUN = 4`, `ENC_DELAY = DEC_DELAY = 3`,
`CODEC_LATENCY = 6`. These follow from the code itself; changing `ZERO_RUN`
alone does not give a different valid code (the sequencer's `P z z V` is
fixed at four symbols).

## Own choices and departures

* **Reset.** Asynchronous, active low. Reset clears the look-ahead register,
  sets parity even and last polarity `n` in the encoder, and puts the decoder
  in the matching state. The consequence for streams starting with `0` is
  described under start-up.
* **Grouping of zero runs.** Runs of `0`s are cut into groups of four from
  the left, as the bits arrive. A purely mathematical definition could also
  group from the right end of a finished stream; only left-to-right grouping
  can be built with a fixed look-ahead, and it agrees with the worked example.
* **Parity and polarity managers.** Only their job is fixed by the code; both
  are single flip-flops here. `parity` reads `plus_or_minus` from `nonzero`
  and drives `even`.
* **Decoder.** Its algorithm above is this design's, derived from the code;
  its latency (3) and the end-to-end latency (6) are those the code requires.
* **Observers in hardware.** The observers are meant as verification
  monitors. They are written as synthesizable logic and all four run at once
  in `encdec_top`; they cost a few flip-flops and can be removed.
* **Flag timing.** `too_many_z` is kept while a run of `z` continues, and the
  two requirement-1 flags stay set until reset.

## Files

| file | contents |
|------|----------|
| `rtl/encdec_pkg.sv` | shared types and constants |
| `rtl/sc_delay.sv` | one-cycle delay of a signal |
| `rtl/detector.sv` | look-ahead register and four-zeros detector |
| `rtl/sequencer.sv` | NORMAL/EXCEPTION control |
| `rtl/nonzero.sv` | polarity choice |
| `rtl/parity.sv` | pulse parity |
| `rtl/encoder.sv` | encoder: the four agents |
| `rtl/decoder.sv` | decoder |
| `rtl/observer_*.sv` | the four observers |
| `rtl/encdec_top.sv` | top level |
| `tb/encdec_ref_pkg.sv` | reference model of the code used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_reachable_states.sv` | counts the reachable register states |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends; a watchdog
stops it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/encdec_pkg.sv tb/encdec_ref_pkg.sv tb/tb_encdec_top.sv --top-module tb_encdec_top
./obj_dir/Vtb_encdec_top
```

Replace `tb_encdec_top` by any other `tb_<module>` to test one block. The
testbenches rely only on `$urandom`, so different seeds
(`+verilator+seed+N`) give different random streams.

What is checked:

* `tb_encoder` compares every encoder symbol with the reference model for the
  worked example above, the line example `0 1 0 0 0 0 0 1 0` (sent as
  `z p n z z n z p z`), all-ones, all-zeros and 12,000 random bits of varying
  density, and checks both line properties directly.
* `tb_decoder` decodes reference-encoded streams and checks the 3-cycle
  latency.
* `tb_encdec_top` runs about 28,000 bits through encoder, ideal wire and
  decoder at the default configuration, checks `line_tx` against the model,
  `bout` against `bin` six cycles earlier, and that no observer fires. It
  counts each mechanism (alternation, group with `P = z`, group with a pulse
  as `P`, `four_zeros` ignored inside a group, back-to-back groups, a pulse
  `P` decoded as 0) and fails if one never occurs. It then corrupts single
  received symbols and checks that `seq_violation` catches each one.
* `tb_encoder` also runs the classical ten-state Mealy-machine formulation of
  the encoder (inputs: the delayed bit and the four-zeros flag) next to the
  RTL as a second reference.
* The unit testbenches of the agents and observers compare against
  independent models and exercise every branch, including exceptions at both
  parities and runs of exactly three and of four `z`.

## Size

The encoder holds 7 state bits, of which 46 combinations are reachable from
reset; the decoder holds 7 state bits, with 30 reachable when it is fed by the encoder;
together they reach 375 states. The observers add 12 state bits (3 for the
running sum, 3 for the run of `z`, 6 for the shift register, whose contents
always follow from the codec's state). `tb_reachable_states` measures these
counts in simulation and checks them against an enumeration of the
next-state functions.

## Limits

* The properties are checked by simulation of random and directed streams,
  not proven exhaustively.
* The line driver, the wire and the receiver front end (the analog side) are
  not modelled beyond an ideal or a deliberately corrupted symbol.
* The decoder assumes it starts in step with the encoder (both reset
  together). It has no explicit resynchronisation; how it behaves after a
  line error beyond flagging it has not been characterised.

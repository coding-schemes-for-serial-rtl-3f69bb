# ETI serial link: transition-inversion coding with the flag hidden in the clock phase

When a parallel bus is squeezed onto a serial line, the bits of each word follow
one another on the same wire. Every change between neighbouring bits is a
transition, and the line's dynamic power grows with the number of transitions.
This RTL implements the *modified Embedded Transition Inversion* (ETI) code for
such a link. It keeps the number of transitions low and sends no extra bit.

* **Inversion.** The transmitter counts the transitions `N_t` inside each
  `WL`-bit word. If `N_t` reaches half the word length (`N_th = WL/2`), it
  inverts every second bit of the word. Each pair `b1 b2` becomes `b1 ~b2`:
  01→00, 10→11, 00→01, 11→10. Flipping every other bit turns each of the
  `WL-1` neighbour pairs from "different" to "equal" and back, so the word
  leaves with `WL-1-N_t` transitions.
* **Phase flag.** Some codes add a bit to each word to say that it was
  inverted. This one does not. It shifts an inverted word on the line by half a
  clock cycle. The clock travels with the data. In a plain word the line changes
  at the clock's rising edge; in an inverted word it changes at the falling edge.
  The receiver measures that phase with a Hogge phase detector, and then undoes
  the inversion.

Examples, sent MSB first:

| word | N_t | decision | on the line |
|---|---|---|---|
| 1000 (WL=4) | 1 | plain | 1000, changes at rising edges |
| 1101 (WL=4) | 2 ≥ 2 | inverted | 1000, changes half a cycle late |
| 11110000 (WL=8) | 1 | plain | 11110000 |
| 10101010 (WL=8) | 7 ≥ 4 | inverted | 11111111, half a cycle late |

The main configuration is one link with 8-bit words (`NBITS = WL = 8`).
`NBITS/WL` links are built side by side when `NBITS` is a multiple of `WL`.

## Data path

```
 data_in ─► serializer ─► ┌─ check_transition ──── decision ──┐
  (ld)                    │        (WL indicator)             ▼
                          └─ eti_buffer(WL) ─► b2inv ─► phase_encoder ─► line ─┐
                                                                              │ + clk
 data_out ◄─ deserializer ◄─ b2inv ◄─ eti_buffer(WL-1) ◄─ q1 ─┬─ hogge_pd ◄───┘
 (out_valid)                   ▲                               │   │ up
                               └── decision ── decision_detector ◄─┘
```

Transmitter (`eti_encoder`): the serial word goes into the transition counter
and the buffer at the same time. The buffer holds it for one word time, until
the counter has seen the last bit and registered the decision. Then the word
leaves the buffer through the bit-two inverter and reaches the phase encoder.
The phase encoder has a rising-edge register (`dpre`) and a falling-edge copy of
it. It drives the line from one or the other, chosen by the decision.

Receiver (`eti_decoder`): the Hogge detector's rising-edge flop samples the line
in the middle of a bit in both phases. Its output `q1` is therefore already the
phase-decoded data. The decision-bit detector judges the phase of the line's
transitions over the word. The retimed bits wait in a `WL-1` stage buffer until
that judgement is made. The same bit-two inverter then restores the inverted
bits before the deserializer.

## Timing

Everything runs on one clock `clk` and uses both of its edges. Cycle numbers
below count rising edges after the synchronous reset `rst` is released. Word `w`
is the `w`-th word taken, starting at 0. WL = 8 in the numbers.

| cycle (w = 0) | what happens |
|---|---|
| 0 | `ld` high: `data_in` is taken at the end of the cycle (then every WL cycles) |
| 1 – 8 | bits on the serializer output; the transition count runs |
| 8 (end) | decision registered: `N_t >= N_th` |
| 9 – 16 | the word leaves the buffer, is inverted if needed, and is registered on the rising edge |
| 10 – 17 | the word is on the line: each bit from the rising edge (plain), or from the falling edge in the middle of the cycle (inverted) |
| 11 – 18 | retimed bits on `q1` |
| 17 (end) | the receive window ends; the decision is recovered |
| 18 – 25 | decoded bits enter the deserializer |
| 26 | `out_valid` high, the word is on `data_out` |

The latency from `ld` to `out_valid` is `3*WL + 2` cycles, and a new word can be
sent every `WL` cycles. No start or framing bit is sent. The two ends agree on
where words begin because both word counters start from the shared reset, and
the receiver's counter is offset by the fixed transmitter delay (`RST_IDX =
WL-2` in `eti_decoder`). The deserializer discards the first three words after
reset, which hold only the reset state of the pipeline (`SKIP = 3`). The source
must present a word at every `ld`: the line never idles.

Switching between the phases is glitch-free. The select register changes only
at a rising edge, and at that moment the rising-edge register and its
falling-edge copy hold the same value.

## Reading the phase: Hogge detector and decision-bit detector

This is the part that needs the most care.

`hogge_pd` is the textbook Hogge detector. Its parts:

* `q1` is the line sampled on the rising edge;
* `q2` is `q1` sampled on the falling edge;
* `up = line ^ q1` rises at a line change and falls at the next rising edge;
* `down = q1 ^ q2` is a reference pulse half a cycle wide.

If the line changed at a rising edge (plain word), `up` stays high for a whole
cycle. If it changed at a falling edge (inverted word), `up` is high for the
second half of the cycle only.

`decision_detector` turns that width into a bit. It samples `up` on the falling
edge (`up_mid`). At each rising edge a high `up` means the line changed during
the cycle just ended. If `up_mid` was also high, the change was early (plain);
if not, it was late (inverted). The detector remembers what it saw over one
receive window of `WL` cycles. At the end of the window it registers
`decision = 1` if it saw a late change.

The receive window of a word covers its own `WL` bit times. It includes the
change from the previous word's last bit into its first bit. That change is
made in the new word's phase, so it belongs to the new word. A window with
changes of both phases (`conflict`) cannot occur on a correctly aligned link.
The top asserts this.

### Windows without transitions: a limit of the code

A word whose window contains no transition at all carries no phase
information. Two different words give exactly that line:

* a constant word (plain, `N_t = 0`);
* an alternating word (inverted to a constant, `N_t = WL-1`).

Either one is transition-free when its level equals the previous line bit. The
receiver cannot tell them apart. In that case it keeps the previous word's
decision and raises `held` (`rx_held` at the top). This is what a phase detector
does without data edges. The word is delivered correctly when its decision
equals the previous word's. A steady stream of 10101010, for example, is sent
as a constant 1 and decodes correctly. A constant word that follows an inverted
word, or an alternating word that follows a plain one, is delivered with every
second bit flipped.

The end-to-end test sent 1500 words, mostly random. It contained 15
transition-free windows, and 8 of them altered the word. Anyone using this RTL
for real data needs either data that avoids these cases or an encoder rule that
avoids them. One such rule: when the chosen coding would leave the window empty
and its decision differs from the previous word's, send the other coding. That
rule is not part of the scheme as published and is not built here.

## Modules

| module | role |
|---|---|
| `eti_serial_link_top` | `NBITS/WL` links: serializer → encoder → line → decoder → deserializer |
| `serializer` | takes a word at `ld`, shifts it out MSB first |
| `eti_encoder` | check_transition + eti_buffer + b2inv + phase_encoder |
| `check_transition` | previous-bit flop, XOR, adder, comparison `N_t >= NTH`; contains a WL indicator |
| `wl_indicator` | modulo-`WL` bit-position counter with `first` / `last` flags |
| `eti_buffer` | shift-register delay of `DEPTH` cycles |
| `b2inv` | bit-two inverter: `dout = din ^ (inv & second)` (combinational) |
| `phase_encoder` | rising-edge register, falling-edge copy, select by decision |
| `eti_decoder` | hogge_pd + decision_detector + eti_buffer(WL-1) + b2inv |
| `hogge_pd` | Hogge phase detector; `q1` is the retimed data |
| `decision_detector` | decision from the `up` pulse width per window; `held`, `conflict` |
| `deserializer` | collects `WL` bits MSB first, `valid` after the first `SKIP` words |
| `eti_pkg` | default word length and the threshold function `WL/2` |

Top parameters: `NBITS` (8), `WL` (8), `NTH` (`WL/2`). Top ports:

* inputs: `clk`, `rst`, `data_in[NBITS]`;
* outputs: `ld`, `data_out[NBITS]`, `out_valid`;
* per link, for observation: `line`, `enc_decision`, `rx_decision`, `rx_held`,
  `pd_down`.

## What follows the source description and what is a choice made here

Taken from the published scheme:

* the two-bit base inversion of the second bit;
* the threshold of half the word length;
* the transition counter built from a flop, an XOR and an adder, reset at the
  first bit of each word by a word-length indicator;
* the buffer that waits for the decision;
* the half-cycle shift of inverted words;
* a Hogge phase detector and a decision-bit detector at the receiver;
* the order serializer → encoder → decoder → deserializer;
* the 8-bit main configuration.

Resolved here:

* **Threshold comparison.** The description says both "exceeds" and "`>=`".
  Its worked example (1101: two transitions, threshold two, inverted) settles it
  as `>=`.
* **Built here because the source gives only the name:**
  * the phase encoder circuit;
  * the decision-bit detector logic, including the handling of
    transition-free windows;
  * the framing of words from the reset;
  * the reset itself (synchronous, active high);
  * the `ld` strobe;
  * the MSB-first order, read from the examples.
* **Receiver delay.** The source's block diagram shows two flops ahead of the
  receiver's inverter. Here the receiver holds the bits for `WL-1` cycles
  instead, because the decision is only known once the whole window has been
  seen.
* **Extra ports.** The top brings out more ports than the 18 pins of the
  published FPGA build, so that the lines and decisions can be watched.

Not modelled:

* the physical channel: the line is a wire from encoder to decoder;
* any clock recovery: the receiver uses the transmitter's clock;
* power.

For size, a generic yosys synthesis of the default top gives 66 flip-flop bits
and about 70 word-level cells. The published FPGA build reports 41 flip-flops;
that is a different flow, so the numbers are not directly comparable.

## Simulation

Every testbench in `tb/` checks itself, prints
`TB_RESULT checks=<n> failures=<n>` and stops. The packages must be read first,
for example:

```
verilator --binary --timing -Wno-fatal --Mdir build --top-module tb_eti_serial_link_top \
    -y rtl -y tb +libext+.sv rtl/eti_pkg.sv tb/eti_ref_pkg.sv tb/tb_eti_serial_link_top.sv
./build/Vtb_eti_serial_link_top
```

`tb/eti_ref_pkg.sv` is a word-level reference model. For a list of words it
gives:

* each word's decision and coded value;
* the expected line level in both halves of every cycle;
* what the receiver must recover, including carried-over decisions.

Testbenches:

* `tb_eti_serial_link_top`: the default link end to end (1500 words). It checks:
  * the line in both clock phases;
  * both decision bits;
  * every output word and its 26-cycle latency;
  * that each mechanism occurs: plain and inverted words, phase switches both
    ways, carried-over decisions right and wrong, and reference pulses;
  * the switching activity. On these mostly random words the line makes 4335
    transitions, against 5887 for the same words serialized without coding
    (73%).
* `tb_eti_link_sizes`: a 4-bit link with the examples 1000 and 1101, and two
  8-bit links side by side.
* `tb_<module>`: one unit test per module, each checked against values computed
  in the testbench.

All testbenches pass. Each one also fails when its module is replaced by a
version with a deliberate bug.

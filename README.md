# Signature-analysis board tester

This is the digital part of an automatic tester for boards built from TTL or
CMOS logic. The tester drives the board's inputs with 80-bit test patterns.
It then compresses the bit stream seen at one probed node into a 23-bit
*signature*. A signature taken on a known-good board is the reference. A
different signature on a board under repair means that node's waveform is
wrong, and tracing wrong nodes back to their inputs finds the failing part.

Classic signature analyzers open their measurement window on START and STOP
signals taken from the board. That needs a trained operator, and it fails
when the board has no suitable signals or no clock of its own. This tester
sets the window itself. It clears its own pattern generator and its own
compactor at the start of every window. It also keeps the window open for a
fixed number of clock edges. A good board therefore always gives the same
signature, and the operator only has to move one probe.

The RTL implements the published architecture. It reproduces that design's
published numbers: the pattern left on the generator after one window, and
every good and faulty signature of the published 48-node example board. Choices the design
leaves open are marked as such below and in each file's header comment.

## Block diagram

```
 clk_int ─┐                     ┌──────────── CLOCK3OS ──────────────► hex_display ─► seg
 clk_ext ─┤ timing_controller   │                                          ▲
 SEL1/2 ──┤  (gate, clears,     ├── CLOCK2OS, CLOCK1 ─► prtpg ─► tpg_pr[79:0] ─► board
 RESET ───┘   CLOCK5OST)        ├── CLOCK4OS, CLOCK1 ─┐                    │
                                │                     ▼                    │
 probe (board node) ───────────────────────► signature_analyzer (¬CLOCK) ──┴► sig[23:0]
                                │                     ▲  DCLK, DRESET (re-timed)
                                └── CLOCK5OST ─► sig_latch_mux ◄── sig      │
                                                   │  ▲ SEL(3), DLATCH       │
 host status port S7..S3 ◄────────────────────────┘  │                      │
 host control port C3..C0, D7 ─────────────────► demux ── BYTE0..9, DCLK ──► dtpg ─► tpg_det[79:0] ─► board
 host data port D7..D0 ─────────────────────────────────────────────────────┘
```

`ate_top` wires these six blocks. `ate_pkg` holds the widths, feedback taps,
default timing and command codes.

## The measurement window

The whole design depends on the timing of one measurement window (the
*gate*). Everything runs from one system clock CLOCK. SEL1 picks it: the
internal 1 MHz clock when low, the external clock when high.

```
CLOCK      _‾_‾_‾_‾_‾_‾_‾ … _‾_‾_‾_‾_‾_
CLOCK2OS   __‾‾______________________     clear PRTPG   (one clock, before the gate)
CLOCK4OS   __‾‾______________________     clear SA
CLOCK3OS   ____‾‾‾‾‾‾‾‾‾ … ‾‾‾‾______     gate, switches on falling edges of CLOCK
CLOCK1     _____‾_‾_‾_‾_ … _‾_‾______     CLOCK & CLOCK3OS: GATE_CLOCKS whole pulses
CLOCK5OST  _____‾‾‾‾‾‾‾‾ … ‾‾‾‾‾_____     CLOCK3OS half a clock later
```

- **Whole pulses only.** CLOCK3OS changes on falling edges of CLOCK, so the
  gated clock CLOCK1 never has a partial pulse. It has exactly
  `GATE_CLOCKS` = 99,999 rising edges per gate.
- **The board gets half a clock to settle.** The PRTPG steps on each rising
  edge of CLOCK1. The signature analyzer takes the probe on the falling edge
  that follows, so each pattern has half a clock to pass through the board
  before it is sampled.
- **The finished signature is latched on CLOCK5OST.** CLOCK5OST falls half a
  clock after the gate closes. Its fall loads the signature latch, which
  feeds the host.
- **The display updates only while the gate is closed.** While CLOCK3OS is
  low the display follows the analyzer. While it is high the display keeps
  the value it had when the gate opened, so the previous signature stays in
  view during a measurement.
- **Free-running mode (SEL2 low).** The gate repeats every `CYCLE_CLOCKS` =
  200,000 clocks. At 1 MHz that is 5 gates per second: about 100 ms open and
  100 ms closed. A signature that stays steady on the display shows the
  measurement is repeatable.
- **One-shot mode (SEL2 high).** One gate runs after each RESET.

In the RTL, blocks do not run on CLOCK1 as a real gated clock. They run on
CLOCK and use CLOCK3OS as an enable, which has the same effect. The signature
analyzer samples on the rising edge of the inverted clock, which is the
falling edge of CLOCK. `clock1` is still generated, as a glitch-free AND, and
brought out for the fixture and for observation.

## Pattern generators

**PRTPG** (`prtpg`) is an autonomous LFSR for the primitive polynomial
1 + x^9 + x^79, with an 80th stage added so that it drives 80 pins. It
shifts from bit 0 towards bit 79. The new bit 0 is the **XNOR** of bit 78
(stage x^79) and bit 8 (stage x^9). XNOR feedback makes the cleared state
(all zeros) a legal start, so CLOCK2OS can simply clear the register. These
exact choices (direction, XNOR, bit positions) were fixed by matching the
published pattern sequence:

| after step | pattern |
|---|---|
| 43,987 | `D758_483D_DF50_FD52_DAD9` |
| 43,988 | `AEB0_907B_BEA1_FAA5_B5B2` |
| 99,999 (end of gate) | `BFC7_6761_6954_93DB_BF09` |

**DTPG** (`dtpg`) holds host-supplied patterns. Ten byte strobes
(BYTE0..BYTE9) copy the 8-bit data port into ten staging bytes; byte k goes
to bits 8k+7..8k. DCLK moves all 80 staged bits to the outputs at once, so
the board sees each new pattern change in one step. In deterministic mode
the host sets the test length; the hardware places no limit on it.

The two 80-bit buses are always driven. Choosing which board input takes
which bus is left to the fixture wiring. In the *hybrid* mode, inputs that
must be held at a fixed level take a constant DTPG pattern, and the other
inputs take PRTPG bits.

## Signature analyzer

`signature_analyzer` is an external-XOR LFSR for 1 + x^5 + x^23:

```
sig <= {sig[21:0], probe ^ sig[22] ^ sig[4]}
```

Its aliasing probability is 2^-23 (about 1.2e-7). It has two sample enables
and two clears, one pair per mode: CLOCK1 and CLOCK4OS from the timing
controller, and DCLK and DRESET from the host. They are ORed, and a clear
wins over a sample. The signature bus to the latch and display is 24 bits
wide, and its bit 23 is always 0.

Reference values over one 99,999-clock gate, with the PRTPG cleared at the
start of the gate:

| node | signature |
|---|---|
| constant 1 (VCC) | `299BD5` |
| constant 0 (GND) | `000000` |
| PRTPG bit 0 / 1 / 2 | `02775E` / `413BAF` / `209DD7` |
| inverse of PRTPG bit 0 / 1 / 2 | `2BEC8B` / `68A07A` / `090602` |
| PRTPG bit 21 | `376FB4` |

So a node stuck at 1 reads `299BD5` and a node stuck at 0 reads `000000`.

## Host interface

The host connects through a PC parallel port, which has 8 data outputs, 4
control outputs and 5 status inputs. The hard part of this interface is that
the host cannot change several port bits at the same instant. A decoder that
looked only at the control code would fire on the intermediate codes.

`demux` handles this as follows.

- The control code C3..C0 and D7 pass through two-flop synchronizers.
- While D7 is high, the code selects one of 16 decoded levels. Code `F` is
  idle.
- A command fires once, for one clock, when it is **released**: either the
  code leaves it or D7 drops. Intermediate codes do no harm as long as the
  host parks the code on `F`, or holds D7 low, while it changes bits.
- Because a byte is captured at release, D7 can also carry bit 7 of the
  pattern byte (see the byte load in the table below).

| code | command | effect |
|---|---|---|
| 0–9 | BYTEk | data port → DTPG staging byte k |
| A | DCLK | staged pattern → DTPG outputs; SA takes the probe half a clock later |
| B | DRESET | clear the SA |
| C | DLATCH | SA → signature latch (deterministic mode) |
| D | NEXT | nibble select + 1 (0..5, wraps) |
| E | FIRST | nibble select = 0 |
| F | idle | — |

The 13 strobes BYTE0..9, DCLK, DRESET and DLATCH form the control bundle.
NEXT and FIRST drive the 3-bit nibble select SEL.

Host sequences, allowing a few system clocks between port writes:

- **Command:** write data `0x80` (D7 = 1), write control = code, write
  control = `F`.
- **Byte load:** write data `0x80`, write control = k, write data = byte,
  write control = `F`. The byte is captured on whichever of the last two
  writes releases the command. That depends on the byte's bit 7, and both
  cases capture the byte.
- **Read signature:** FIRST. Then six times: read status[4:1], then NEXT.
  Nibble 0 (bits 3..0) comes first, so `67897A` reads A, 7, 9, 8, 7, 6.
  status[0] is high while a measurement is in progress.

`pc_status[4:0]` are meant for pins S7..S3. The PC port hardware inverts S7,
C0, C1 and C3, and the host software must undo that. The RTL works with the
levels on the connector pins.

## Test modes

| mode | patterns | window | SA clock / clear |
|---|---|---|---|
| pseudorandom | PRTPG | timing controller, 99,999 clocks | CLOCK1 / CLOCK4OS |
| hybrid | PRTPG + fixed DTPG pattern | timing controller | CLOCK1 / CLOCK4OS |
| deterministic | DTPG, loaded by the host | host | DCLK / DRESET |
| monostable | DTPG triggers one-shots on the board | host | separate analyzer, not included |

For deterministic runs, leave the timing controller in one-shot mode after
its gate, so that it does not clear the SA.

## Files

| file | contents |
|---|---|
| `rtl/ate_pkg.sv` | widths, taps, default timing, command codes |
| `rtl/ate_top.sv` | top level |
| `rtl/timing_controller.sv` | clock select, gate, clears, CLOCK5OST |
| `rtl/prtpg.sv` | pseudorandom generator |
| `rtl/dtpg.sv` | deterministic generator |
| `rtl/signature_analyzer.sv` | 23-stage compactor |
| `rtl/demux.sv` | control-port decoder |
| `rtl/sig_latch_mux.sv` | signature latch and status multiplexer |
| `rtl/hex_display.sv` | 6-digit seven-segment driver |
| `tb/tb_<block>.sv` | self-checking test of each block |
| `tb/tb_ate_top.sv` | whole tester at default sizes, every mode |
| `tb/tb_case_study.sv` | good-board and faulty-board run of a 24-gate TTL board, 48 nodes |

Top-level parameters: `GATE_CLOCKS` (default 99999) and `CYCLE_CLOCKS`
(default 200000). The widths (80-bit generators, 23-stage analyzer) are
package constants. The analyzer and generator modules also take their width
and taps as parameters.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ate_pkg.sv tb/tb_ate_top.sv \
          --top-module tb_ate_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ate_top` with any other testbench name. Everything runs at the
default sizes. `tb_ate_top` takes about 4 s and `tb_case_study` about 14 s,
which covers 96 gates of 99,999 clocks. The testbenches use `$urandom` only
and need no input files.

What is verified:

- every block against an independent reference in its testbench;
- the full tester end to end, at default sizes, in all modes: one-shot,
  free-running, external clock, hybrid, deterministic with host download,
  DRESET, DLATCH, D7 masking, host readout, the display hold and the
  monostable display source;
- in `tb_case_study`, a complete troubleshooting session, described in the
  next section.

## Example session: a 24-gate board

`tb_case_study` models a small TTL board and runs the whole procedure on it.

- **The board.** It has inverters, 2-input NANDs, and 3-input ANDs and NANDs:
  24 gates in parts U1..U9. The first 22 PRTPG outputs drive it. Its 24 test
  points, VCC, GND and the 22 driven inputs make 48 nodes.
- **Programming pass.** The tester runs free. The probe moves to the next node
  after each gate, and each signature is stored as that node's good
  signature.
- **Testing pass.** The outputs of U3A and U3B are stuck at 1 and the output
  of U4A at 0, and all 48 nodes are measured again.
- **The report.** The testbench prints a PASS/FAIL list and back-traces it.
  A failing node whose inputs all pass is a source fault.

All 96 signatures equal the published good and measured values for this
board. Ten test points fail. Three of them read `299BD5` (constant 1) and one
reads `000000`. The back-trace names exactly U3A, U3B and U4A. Test point
TP6, the output of NAND U7B, reads `67897A`. That is the value used in the
readout example above.

## Departures and open points

- **Own choices where the design gives only the function:**
  - the command-code assignment and act-on-release decoding;
  - D7 high meaning enabled;
  - the DLATCH, NEXT and FIRST commands;
  - the meaning of status bit 0;
  - the DTPG byte order;
  - the clear pulses being one clock long and just before the gate;
  - active-high control signals and an asynchronous active-high RESET;
  - the seven-segment display format and the `mono_sel` input;
  - the display holding its last value during a gate instead of going dark.
- **Clock switching.** SEL1 drives a plain clock multiplexer. Change SEL1 only
  while RESET is held.
- **Reset.** Master RESET also clears the DTPG. In hybrid mode, load the fixed
  pattern after RESET and use the second gate, or run free-running.
- **Not included:** the TTL-to-CMOS level converters, the probe switch and
  16-bit analyzer of the monostable-multivibrator mode (only its 16-bit
  result enters, on `mono_sig`), the internal oscillator, the fixture and
  the host software (signature files, comparison and back-tracing).
- **CUT master reset.** The tester provides no separate reset output for the
  board under test; the board's reset must come from the fixture.
- **Unused bit.** Bit 23 of the 24-bit signature bus and of the latch is
  constant 0.

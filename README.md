# 4-level FSK receiver for biomedical implants

An implant that talks to many nerve channels needs a fast downlink, but the
carrier of an inductive link is low (here about 10 MHz). This receiver sends
two bits per symbol by switching the RF carrier between four frequencies
only 1.6 kHz apart, and demodulates them almost entirely in digital logic:
after down-conversion to a ~50 kHz IF and hard limiting, a small counter
measures how many cycles of a 5 MHz clock fit in one whole IF period, and
that count *is* the symbol.

```
 RF 9.9476..9.9524 MHz ─┐
                        ├─ mixer ── IF 52.4..47.6 kHz ── OTA ── full-swing IF ── fsk4_demod ── data[1:0]
 LO 10 MHz ─────────────┘  (model)    ~386 mV         (model)   (logic level)   5 MHz counter
```

The digital demodulator (`fsk4_demod` and its two sub-blocks) is
synthesizable RTL. The mixer and the OTA are analog circuits and are provided
as behavioural models with real-valued ports, so that the whole chain from RF
to bits can be simulated. The local oscillator is an external source.

## Frequency plan and counts

| data | RF (MHz) | IF = 10 MHz − RF | IF period / 200 ns | nominal count | accepted counts | `code_o` |
|------|----------|------------------|--------------------|---------------|-----------------|----------|
| 11   | 9.9476   | 52.4 kHz         | 95.4               | 95            | 94–96           | 1011111  |
| 10   | 9.9492   | 50.8 kHz         | 98.4               | 98            | 97–99           | 1100010  |
| 01   | 9.9508   | 49.2 kHz         | 101.6              | 101           | 100–102         | 1100101  |
| 00   | 9.9524   | 47.6 kHz         | 105.0              | 105           | 104–106         | 1101001  |
| –    | other    | other            | –                  | –             | anything else   | 0000000  |

Two inequalities size the counter:

* the clock period must be shorter than the difference between neighbouring
  carrier periods, `1/f_clk < 1/f_IF(k+1) − 1/f_IF(k)`. The tightest pair
  (50.8/49.2 kHz) differs by 0.64 µs against a 0.2 µs clock period, so the
  counts of neighbouring carriers are 3 to 4 apart;
* the longest period must fit the counter, `f_clk / f_IF,min < 2^n`:
  5 MHz / 47.6 kHz = 105 < 128, hence a 7-bit counter.

Measuring the whole period instead of a half period doubles the count and
therefore the separation between carriers. Edge jitter on the received IF moves
the count by a cycle or so; every count within ±1 of a nominal value is
accepted (for 47.6 kHz, 104–106 counts, about ±0.53 kHz). Note that count 103
falls between two windows and is rejected, and that the true periods 95.4,
98.4 and 101.6 land on either of two counts depending on the phase of the
clock; both are inside the window. `code_decoder` checks at elaboration that
the windows are disjoint and fit the counter.

## The digital demodulator

`fsk4_demod` = `period_counter` → `code_decoder`. Everything runs on the
5 MHz counter clock `clk`; the IF input is asynchronous to it.

**period_counter.** The IF passes a two-flop synchronizer; a third flop
detects rising edges. On each rising edge the counter restarts at 1 and then
counts up once per clock, so at the next rising edge it holds exactly the
number of clock cycles in the period; that value is output with a one-cycle
`period_valid_o`. Details that are this design's own:

* the first rising edge after reset only opens a period (no measurement);
  the synchronizer resets to ones, so an IF that is already high when reset
  ends is not mistaken for an edge;
* the counter saturates at 127. A period that reached 127 is flagged
  (`period_ovf_o`) and is never decoded as a symbol; while the counter sits
  at 127, `timeout_o` is high, meaning no carrier edge for 25 µs.

**code_decoder.** Compares the count with the four windows of the table and
registers the result: `code_o` (the carrier's nominal count, or 0),
`data_o`, `match_o`. `data_o` is only meaningful when `match_o` is high.

**Timing.** One decision per IF period, i.e. roughly every 100 clock cycles
(19–21 µs). `valid_o` pulses on the third rising clock edge after the clock
edge that first samples the closing IF rise (3–4 clock periods, 0.6–0.8 µs,
after the IF edge itself).

**What the demodulator does not do.** It makes a decision per IF period and
has no notion of symbol boundaries or data rate; a symbol lasting N IF
periods produces about N decisions, and the period that straddles a symbol
change may decode to either neighbour or to "no symbol". Grouping decisions
into symbols (majority vote, framing) is left to the logic that consumes
`data_o`.

### Ports of `fsk4_demod`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 5 MHz counter clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `if_in` | in | 1 | full-swing IF from the amplifier, asynchronous |
| `period_o` | out | 7 | last measured whole-period count |
| `code_o` | out | 7 | matched carrier's code, 0000000 if none |
| `data_o` | out | 2 | demodulated symbol |
| `match_o` | out | 1 | last period matched a carrier |
| `valid_o` | out | 1 | one-cycle pulse per decision |
| `timeout_o` | out | 1 | no IF edge for 127 cycles |

The sizes and tables live in `fsk4_pkg` (`CNT_W`, `NOMINAL_COUNT`,
`NOMINAL_DATA`, `TOL`); `code_decoder` takes the tables and tolerance as
parameters. A faster counter clock gives larger counts and more jitter
margin at the cost of a wider counter: scale the nominal counts by
`f_clk / f_IF` and check the two inequalities above.

## Analog front end (behavioural models)

These models are for system simulation only; they are not synthesizable
and do not model the transistor circuits.

**mixer.** The real circuit is a fully differential double-balanced mixer
with a degenerated transconductance stage, LO switching pairs and LC
resonator loads, RF port biased at 1 V. The model is an ideal multiplier of
the differential RF and LO voltages (gain `CONV_K` = 77.2 /V) followed by two
poles at 1 MHz standing in for the output loads; they pass the 50 kHz
difference and suppress the ~20 MHz sum. A 50 mV RF with a 200 mV LO gives a
386 mV IF, the conversion reported for the circuit. Output common mode 0.9 V.

**ota.** One pole at 4.24 MHz with 51.1 dB DC gain, output clipped to 0..1.8 V,
plus `vout_logic`, the output as a CMOS input sees it (above VDD/2). The
amplifier's reported unity-gain bandwidth (455 MHz) and "high frequency gain"
(−16.2 dB) are not reproduced by a single pole; at the 50 kHz IF only the
DC gain and clipping matter.

Both models step every 2 ns of simulated time (`STEP_NS`).

**fsk4_receiver** (the top) chains mixer → OTA → `fsk4_demod`. Its RF and LO
inputs are differential real voltages and `clk` is a separate 5 MHz input,
unrelated to the LO. It also brings out the IF, the OTA voltage and the
full-swing IF for observation.

## Departures and choices

* **Counter clock.** The counter runs at 5 MHz. The chip's summary lists
  an operating frequency of 10 MHz; that is read here as the LO frequency,
  and how the chip derives its 5 MHz clock is not known, so `clk` is simply an
  input.
* **Code of the 52.4 kHz carrier.** Taken as 1011111 (95), consistent with
  5 MHz / 52.4 kHz and with the other three codes, which are their nominal counts.
* Synchronizer, edge choice (rising), restart value, saturation and timeout,
  first-edge rule, output register and the `match_o`/`valid_o` handshake,
  and the asynchronous active-low reset are this design's choices.
* Model parameters not given for the circuits (mixer output poles and
  common mode, OTA logic threshold) are chosen and listed as parameters.

## Files

| file | contents |
|------|----------|
| `rtl/fsk4_pkg.sv` | counter width, carrier table, types |
| `rtl/period_counter.sv` | synchronizer, edge detect, 7-bit period counter |
| `rtl/code_decoder.sv` | tolerance windows, code and data output |
| `rtl/fsk4_demod.sv` | digital demodulator (counter + decoder) |
| `rtl/mixer.sv` | behavioural mixer model |
| `rtl/ota.sv` | behavioural OTA model |
| `rtl/fsk4_receiver.sv` | top: whole receiver |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/fsk4_pkg.sv tb/fsk4_receiver_tb.sv \
          --top-module fsk4_receiver_tb
./obj_dir/Vfsk4_receiver_tb
```

Replace the testbench name for the others. All run in seconds; the
end-to-end test simulates 3.2 ms of the full receiver at its default
parameters in about a second.

What the testbenches establish:

* `period_counter_tb` — IF driven in step with the clock, so every count is
  known exactly: the four nominal periods, ±1 jitter, 3 to 200 cycles
  (saturation and overflow), a lost carrier (timeout), a reset ending with
  the IF high; checks value, flag and the exact cycle of every measurement.
* `code_decoder_tb` — all 128 counts, with and without overflow, against the
  table; one-cycle latency and hold.
* `fsk4_demod_tb` — IF generated from the real carrier frequencies,
  asynchronous to the clock, with ±30 ns random edge jitter; count equal to
  floor or ceiling of period/200 ns, decoded symbol, latency of 3–4 clocks,
  rejection of 60 kHz and 48.5 kHz (count 103), timeout.
* `mixer_tb` — for each RF carrier: IF frequency, 386 mV amplitude, common
  mode, sum-frequency residue; silence with no RF.
* `ota_tb` — 51.1 dB DC gain, −3 dB at 4.24 MHz, rail-to-rail output and a
  50 % duty logic view of a 47.6 kHz, 386 mV IF.
* `fsk4_receiver_tb` — RF to bits: a phase-continuous 4-FSK transmitter
  sending 20 segments of 160 µs (all four symbols, random symbols, a
  non-symbol carrier, RF off). Every decision on a period wholly inside a
  segment must give the symbol sent and a count within one of
  5 MHz/f_IF; each data segment must give at least four of them. It counts
  and requires at least one each of: every symbol value, an off-nominal
  count accepted by the tolerance, a rejected carrier, a timeout, the
  first-edge rule after reset.

Not verified: anything of the analog circuits beyond the behaviour modelled
here, gate-level timing, and power.

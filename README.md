# BLECS combiner logic

The combiner is the one card in each VME crate of the LHC beam loss monitor
electronics that talks to everything outside the crate. It does five jobs:

1. It receives the beam energy from the timing receiver (the CISV) on two
   redundant serial links. It reduces the energy to one of 32 levels and
   passes it, with a few control bits, to the 16 processing cards of the crate.
2. It closes the daisy chain of beam permits. Each permit line runs through
   the 16 processing cards, then through the combiners of up to four crates,
   and finally into the beam interlock interface (the CIBUS).
3. It runs the tests that prove the chain can still dump the beam.
4. It drives and reads back the ionisation chambers' high voltage supply,
   including the slow sine modulation used to check that every chamber is
   connected.
5. It watches its own supplies for ripple.

This repository holds synthesizable SystemVerilog for that logic. The top
module is `blecs_top` in `rtl/`. There is one module per file, plus a package,
`blecs_pkg`, with the frame constants, CRCs and the composite word type.

Every time constant is a parameter in clock cycles. The defaults assume a
40 MHz clock.

## Energy path

```
cisv_a ─ manchester_rx ─ energy_frame_rx ─┐
cisv_b ─ manchester_rx ─ energy_frame_rx ─┴─ energy_selector ─ energy_composer ─ blecs_tx ─ tc_link_a/b
```

### Incoming frame

The CISV sends a 32-bit frame every millisecond, at 1 Mbit/s, Manchester
coded. Manchester code is taken as '1' = low→high in mid-bit, with the line
idling low.

| bits  | content |
|-------|---------|
| 31:28 | header `1001` |
| 27:25 | `000` |
| 24    | toggle |
| 23:8  | 16-bit energy |
| 7:0   | CRC-8 |

A new energy value appears every 100 ms, and the toggle bit flips with it.

`manchester_rx` starts on the first edge after a quiet line. It accepts each
mid-bit transition from 3/4 to 5/4 of a bit after the previous one. A missing
transition aborts the frame.

`energy_frame_rx` checks the header and the CRC. It also declares a frame
lost when none arrives within 1.5 periods.

### Choosing between A and B

`energy_selector` implements the selection table:

| A in error | B in error | toggle timeout | energy used |
|------------|------------|----------------|-------------|
| no  | –   | no  | A |
| yes | no  | no  | B |
| yes | yes | no  | previous value kept |
| –   | –   | yes | `FFFF`, with the error bit set |

- "In error" means the last frame on that link was bad or lost.
- The toggle timeout fires 110 ms after the last toggle change, which is 110%
  of the 100 ms update time. It is counted once per occurrence.
- Counters, all 16-bit and saturating: good frames per link, CRC errors per
  link, lost frames per link, and toggle timeouts. A millisecond counter
  shows the time since the counters were last cleared.

### Outgoing word to the processing cards

`energy_composer` builds this word:

| bits  | field |
|-------|-------|
| 15:11 | energy level (top 5 bits of the energy: a linear 16→5 conversion) |
| 10    | error |
| 9     | SofResetTC |
| 8     | system under test |
| 7     | unmaskable beam info |
| 6     | maskable beam info |
| 5     | test activation, unmaskable line |
| 4     | test activation, maskable line |
| 3:0   | card number for the activation |

- When the error bit is set and both links are broken, the word becomes the
  "broken link" state: level 31, error 1, both beam infos 1, everything else 0.
- An arbitrary substitute energy can replace the received one, but only while
  a test is running.

`blecs_tx` sends this frame on both links to the cards every millisecond:

| field | content |
|-------|---------|
| header | `10010000` |
| body | the word |
| flags | toggle + `000` |
| check | CRC-4 |

## Beam permit path

Each crate carries two permits: unmaskable (U) and maskable (M). Each permit
travels on two redundant lines, A and B. `bp_combiner` computes each permit
as the AND of:

- the crate's own chain (from the last processing card, `tc_u`/`tc_m`)
- both upstream lines from the combiner above
- the system-test state

Its outputs feed four lines: UA, UB, MA and MB.

A line does not carry a level. It carries activity:

- `bp_line_driver` sends a 2 MHz clock on the line while the permit is 'True'.
- The line ends in a retriggerable one-shot (SN74LV123, about 1 µs) that
  stays high only while it keeps being retriggered.
- The one-shot's CLR pin combines the previous card's output.

As a result, a stopped clock, a broken wire or a pulled card all give
'False' within a microsecond. The one-shot is outside the FPGA; its
behavioural model is `rtl/oneshot_lv123.sv`, which is not synthesizable.

`dump_timestamp` watches for the combined permit falling. From that moment it
counts microseconds up to two events:

- the post-mortem freeze trigger
- the beam info going 'False'

It also freezes a turn counter and an in-turn clock counter at the dump, so
the front-end computer can place the dump in machine time. The same block
checks the turn clock all the time. It flags the turn clock as lost after two
turns without a pulse (88.9 µs each), and it counts each loss.

## Testing the chain

The design has three test mechanisms. Together they cover the path from each
processing card to the interlock system.

### BPTC (`bptc_sequencer`)

The combiner walks through the 16 cards, first on U and then on M. For each
one it sets the card number and activation bit in the outgoing word. That
card then drops its permit, and the dump runs down the chain to the last
crate. The last crate reports that it saw the dump by pulling the common line
OD3 low. Each step records pass or fail, giving 32 result bits.

The sequencer waits up to three frame periods for each step. The activation
can only leave with the next frame, so a one-period wait would lose steps.

### Common lines (`crate_lines`)

All crates of a point share three open-drain lines:

| OD1 OD2 OD3 | meaning |
|-------------|---------|
| 1 1 1 | normal |
| x x 0 | the last crate received a permit 'False' |
| 0 1 x | system under test: HV to the 100 pA test level |
| 0 0 x | modulation level plus sine modulation requested |

The crate whose ID input reads '1' is the last one before the interlock
interface. While the system is under test, that crate holds its output lines
'False', so a test dump never reaches the beam.

### Outside line test (`bpl_test_ctrl`)

This tests the lines to the interlock system. The combiner enters test mode
only when both of these hold:

- the test is requested
- both beam infos have been 'False' for a settling delay (1 s)

In test mode, an external tester may force one line of U and/or M 'True', on
either A or B, but never both. `bp_combiner` carries an assertion for this
rule. The result is written back:

- A failed test keeps all lines 'False' until a test passes.
- While a test is running, the composer may substitute the energy.

### System test supervision (`test_supervisor`)

A timer raises a normal-priority request and later a high-priority one. The
periods are not given and default to one and two days. Once the high request
is up, the next beam dump forces all lines 'False'. They stay 'False' until
a system test passes. The consistency and BPBIS results are decided outside
and written to the combiner; a failed one also keeps the lines 'False'.

`system_test_seq` runs the rest of the system test on the combiner itself:

1. A full BPTC.
2. The HV modulation with HVLF evaluation. The first evaluated period is
   discarded while the HV settles.
3. The verdict. The test passes when BPTC passed and at least
   `hvlf_expected` channels (the installed chambers) show the modulation.

The last crate reports on OD3 the permits it *receives*, not its forced
outputs. This keeps BPTC working while the lines are forced 'False'.

Dumps caused by a test (BPTC, outside line test) do not count as that "next
dump".

## High voltage

`hv_control` drives a two-channel DAC8532 over SPI (`dac8532_spi`):

- Channel A carries the working level. This is the normal level, the 100 pA
  test level when the system is under test, or the modulation level during
  the HVLF test.
- Channel B carries the modulation: a 256-entry sine, 0x8000 +
  round(32767·sin(2πi/256)), computed at elaboration. It steps at 30 mHz or
  100 mHz.

The two channels are summed in analog after the DAC. Only the last crate before
the interlock interface drives the DAC; the others keep its bus quiet and only
read the monitors. `digipot_i2c` writes the
potentiometer that sets the modulation amplitude.

### HVLF evaluation (`hvlf_processor`)

This is the part that takes the most reading.

Modulating the high voltage makes a current flow through each chamber's
capacitance. That current shows up in the channel's running maximums (the value the
processing card logs) as a sine at
the excitation frequency. A channel whose chamber is disconnected shows
nothing.

During modulation, at every sine position the block stores:

- every channel's running maximum (RAM1 → RAM2, 256 channels × 256 positions ×
  32 bit)
- the HV voltage image (the reference)

After a full period it works channel by channel:

1. It subtracts the reference's mean.
2. It accumulates I = Σ sum·ref and Q = Σ sum·ref(shifted a quarter period).
3. It compares |I| + |Q| with a per-channel threshold read from outside.

It stores I, Q and pass/fail per channel and counts the passes. The
arithmetic is exact: 66-bit signed accumulators.

## Monitoring

`hv_monitor` handles two HV supplies. Each has four comparators: voltage low
or high, and current low or high. For each comparator it keeps:

- the current state
- a sticky flag
- an event counter

It also keeps the last ADC sample and the peak-to-peak value per window
(`minmax_window`) for each voltage and current.

`lv_monitor` handles eight supplies. Per supply it counts under-threshold
events and measures the time spent below the threshold in µs. It also takes
max − min of the ADC samples per window and flags ripple when that value
exceeds a threshold.

## Top-level interface

The top's ports are grouped by function: energy links, permit lines,
timestamps, tests, common lines, DAC/I2C and the monitors. The parts around
the FPGA are not modelled in RTL:

- VME/CPU registers
- ADCs and comparators
- the NV memory with the HVLF thresholds
- the interlock interface
- the one-shots

Their signals are plain ports. `bp_lines` is `{UA, UB, MA, MB}`, and
`bp_trig_clk` is the matching set of one-shot clocks.

## Where this departs from, or fills in, the source description

- **Clock.** The FPGA clock is not given; 40 MHz is assumed throughout.
- **CRCs.** Only the lengths are given. The design uses:
  - CRC-8: polynomial 0x07, init 0, over the first 24 bits
  - CRC-4: x⁴+x+1, init 0, over the first 28 bits
- **Manchester convention.** IEEE ('1' rises in mid-bit), MSB first, idle
  low.
- **Outgoing toggle.** The toggle bit in the cards' frame repeats the toggle
  of the energy in use.
- **Energy conversion.** Taking the top five bits is a guess at the linear
  16→5 conversion.
- **Chosen values.** These are not given and are this design's choices:
  - lost-frame timeout of 1.5 ms
  - BPTC step timeout of 3 ms
  - test-mode entry delay of 1 s
  - system-test request periods
  - monitor window of 256 samples
  - I2C address 0x2C and a 100 kHz bus
  - DAC8532 control bytes, from the part's data sheet
- **Mechanisms.** The order of BPTC steps, the exact rules for entering and
  leaving the outside line test, the I/Q-and-threshold evaluation of HVLF,
  and the system test's order (BPTC, then HVLF, with one settling period
  discarded) are this design's own.
- **OD3 in a test.** The last crate reports the permits it receives on OD3,
  not the lines it drives, so BPTC can run while the lines are forced
  'False'.
- **HVLF sampling.** The running maximums are captured at each of the 256 sine
  positions, matching the 256 × 256 memory. The 1 Hz rate at which the
  logging system reads them is not modelled.
- **Permit inputs.** They pass a two-flop synchroniser, so a permit change
  reaches the lines three clocks later.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_energy_selector rtl/blecs_pkg.sv tb/tb_energy_selector.sv
./obj_dir/Vtb_energy_selector
```

- **`tb_blecs_top`** runs the whole combiner with shortened time constants
  (2000-clock frames). It uses models of the CISV (`cisv_model`), the 16
  processing cards (`bletc_chain_model`), the one-shots, the DAC and the
  potentiometer. It makes each mechanism happen and counts it:
  - A, B and previous-value energy selection
  - toggle timeout and the broken-link word
  - substitution
  - permit through the one-shots
  - a dump with its timestamps
  - a forced 'False' and its release by a system test (BPTC and HVLF) that
    the combiner runs and decides
  - the outside line test with one line forced
  - BPTC, both passing and finding a deaf card
  - test level and modulation on the DAC
  - HVLF evaluation
  - a potentiometer write
  - an HV comparator event and LV ripple
  - a turn clock loss
- **`tb_hvlf_workload`** runs the HVLF evaluation at full size: 256 channels
  × 256 positions. Only 4 channels have a chamber connected. It checks I and
  Q of every channel and that exactly those 4 pass.
- **`tb_blecs_top_full`** runs the top with every parameter at its default.
  It covers about 80 ms of real time:
  - energy frames at 1 ms
  - the level reaching the cards
  - a maskable dump that leaves the unmaskable lines 'True'
  - a full 32-step BPTC

  It takes a few seconds with Verilator.

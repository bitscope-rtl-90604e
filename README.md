# BitScope capture engine in SystemVerilog

BitScope is a mixed-signal oscilloscope and logic analyser built around one
idea: the instrument has no user interface at all. It is a peripheral that
executes a tiny byte-code language arriving on a serial line, one byte per
instruction, with no program memory and no syntax. The host PC holds all the
intelligence (display, scaling, calibration). The hardware only has to capture
fast and hand the samples back slowly.

Capture works like this. One analog channel, through an 8-bit flash ADC, and
eight logic inputs are written side by side into two 32K x 8 sample RAMs. A
programmable logic device, "Spock", generates the RAM address from a 16-bit
counter and compares every sample against a pattern/mask trigger word. The
controller lets the sample clock run until the trigger fires. It then waits a
programmable post-trigger delay, freezes the clock, and reports where the
counter stopped. The host then asks for the samples around that address.

This repository holds synthesizable RTL for the digital part: the controller,
the Spock PLD, the sample-clock gating, the RAMs, latches and multiplexers. It
also has behavioural models of the analog chain, so the whole engine can be
simulated from serial bytes in to serial bytes out.

## Structure

```
 serial_in ─► uart_rx ─► bitscope_vm ─► uart_tx ─► serial_out (or POD IO-1 in pass-through)
                            │  ▲
                   RA3 ─► zzclk_ctrl ─► zz_tick (sample clock)
                   RB0/RB1/RB4 ◄─► spock ─► RAM address {PG1, counter[13:0]}, TRIG7, PG1
                   RA4 ◄── data_mux ◄── logic bus ◄── pod_latch ◄── pod_logic[7:0]
                   RB0 ◄── data_mux ◄── ADC bus   ◄── flash_adc ◄── adc_buffer ◄── range_select ◄── analog_source_mux
                   RB7 STORE ──► sample_sram (logic), sample_sram (ADC)
 rf_in ─► prescaler (f/64) ─► Spock EVENT1          adc_buffer edge ─► Spock EVENT2
```

| Module | Role |
|---|---|
| `bitscope_top` | Wires the engine together; ports are the serial line, POD signals, RF input and four analog inputs in millivolts |
| `bitscope_vm` | Byte-code interpreter and controller (registers R0..R19, all commands) |
| `spock_link` | Shift-mode sequencer that loads Spock and reads its counter |
| `trace_ctrl` | The trace loop of `T`: trigger polling, chop, timebase expansion, post-trigger delay |
| `sample_reader` | Reads one logic and one ADC byte bit-serially through the MUXes and steps the clock |
| `uart_rx`, `uart_tx` | 8N1 serial receiver and transmitter with a run-time divider |
| `spock` | The PLD: counter, 36-bit shift chain, trigger comparator, TRIG7 select, PG1 |
| `zzclk_ctrl` | Three-state sample-clock control: held high, held low or free-running |
| `sample_sram` | 32K x 8 sample RAM, written on the sample clock while STORE is high |
| `data_mux` | 8:1 bit multiplexer from a RAM data bus to a controller pin |
| `pod_latch` | Transparent latch for the eight logic inputs |
| `prescaler` | Divide-by-64 prescaler for frequency counting |
| `flash_adc`, `adc_buffer`, `range_select`, `analog_source_mux` | Behavioural models of the analog front end (not synthesizable intent, though they elaborate) |
| `bitscope_pkg` | Register numbers, command codes, option bit positions, hex helpers |

Everything runs on one master clock, `clk`, nominally 50 MHz. The sample
clock ("zz-clk") is not a separate clock. It is a one-cycle enable, `zz_tick`,
that every sampling register uses, so the whole design is a single clock
domain. The only exception is the prescaler, which is clocked by `rf_in`.

## The byte-code machine (`bitscope_vm`)

Each byte received is one instruction. Printable bytes (0x20..0x7e) are echoed
before they run. Unknown non-printable bytes are ignored.

Data entry works through R0:

- `[` clears R0.
- A hex digit `0`..`9`, `a`..`f` adds the digit to R0 and then swaps R0's
  nibbles.
- `]` swaps R0's nibbles once more.
- Worked through for `[a5]`: `[` gives 00; `a` gives 0a, swapped to a0; `5`
  gives a5, swapped to 5a; `]` gives a5. Two digits followed by `]` therefore
  leave the value as written.
- A single digit as `[f]` gives 0f.

| Byte | Action |
|---|---|
| `00` | Reset all registers, print CR `BitScope` CR |
| `?` | Print CR `BitScope` CR |
| `@` / `#` | R1 = R0 (destination pointer) / R2 = R0 (source pointer) |
| `s` / `l` | R(R1) = R0 / R0 = R(R2) |
| `n` | R1 = R1 + 1 |
| `+` / `-` | R(R1) = R(R1) ± 1 |
| `p` | Print CR, R(R1) as two lower-case hex digits, CR |
| `u` | R9,R10 = R3,R4 (copy the preload address to the dump address) |
| `>` | Load Spock from R3..R7 |
| `<` | Read Spock's counter into R9 (low), R10 (high) |
| `T` | Trace until trigger, then print CR, counter as four hex digits, CR |
| `S` | Dump R15 samples (0 = 256) from address R10:R9 |
| `x` | Send R18 to the POD at 9600 baud, receive a reply into R19, forward it raw |
| `|` | Send R18 to the POD at the host rate, then connect POD IO-1 to the host output |

Registers:

| Register | Use |
|---|---|
| R3, R4 | Counter preload |
| R5, R6 | Trigger pattern and mask |
| R7 | Spock option. Bit 0: trigger on the ADC bus; bits 2:1: TRIG7 source (DD7, match, EVENT1, EVENT2); bit 3: PG1 |
| R8 | Trace mode in [3:0]. The trigger pin in [7:4]: bit 7 picks the ADC MUX over the logic MUX, [6:4] is the MUX select |
| R9, R10 | Counter capture / dump address |
| R11, R12 | Post-trigger delay |
| R13 | Timebase |
| R14 | Port A nibbles: RNG0, RNG1, CH-A/B, frozen zz-clk level; the high nibble is the chop alternate |
| R15 | Dump length |
| R16, R17 | Plain storage |
| R18, R19 | POD transmit and receive |

Pointers beyond R19 read as 0 and ignore writes.

**Abort.** Any byte from the host interrupts a long operation. This covers a
trace waiting for its trigger, a dump, a POD wait and pass-through. The
falling edge of the start bit is enough: the sample clock is frozen at once,
and the byte is executed when it has been received. A host can therefore
always regain control, for example from a trace whose trigger never comes.
A line break (the line held low for longer than a frame) is received as
byte 00, the reset code. The receiver then waits for the line to go high
again.

**Dump format.** `S` prints a CR, then for each sample four hex digits: the
logic byte, then the ADC byte. A comma follows each sample, except after every
16th sample and the last one, which are followed by a CR instead. After the
dump, R10:R9 points past the last sample, so repeated `S` commands walk
through the buffer.

## Spock, the PLD (`spock`, `spock_link`)

Spock has two modes, selected by SHIFT/!COUNT (RB4). Both are clocked by the
sample clock.

- **Count mode.** The 16-bit counter increments on every sample clock. The
  comparator watches either the logic or the ADC bus and raises `trig_match`
  when every bit whose mask bit is 0 equals the pattern. A mask 1 means don't
  care, so pattern 01100100 with mask 00001111 matches 0110xxxx. TRIG7 replaces
  bit 7 of the logic RAM data. It carries DD7, the match, EVENT1 (the
  prescaler) or EVENT2 (the AC-coupled ADC edge), so the trigger or a
  frequency reference is stored alongside the samples. The comparator is
  combinational and also works while the RAMs are read back.
- **Shift mode.** The 36 bits {option[3:0], mask, pattern, counter} form one
  shift register. Bits enter at counter[0] from RB0, and counter[15] leaves on
  RB1.

`spock_link` drives this chain from the controller:

- For each bit it drives RA3 low for half a bit time and then high; zz-clk
  follows, and Spock shifts on the rising edge.
- `>` shifts 40 bits, R7 first and MSB first. R3 ends up in counter[7:0], R4
  in counter[15:8], R5 as pattern, R6 as mask and R7[3:0] as option.
- While the first 16 bits go in, the old counter comes out and is captured.
- `<` does the same 40-bit shift but feeds the captured counter back in as the
  last 16 bits, so pattern, mask and option survive a counter read. The
  original only specifies the counter read; the recirculation is this
  design's way to make the read harmless.

The RAM address is {PG1, counter[13:0]}. Each RAM is therefore split into two
16K halves, one for the BNC channels and one for the POD channels.

## The sample clock (`zzclk_ctrl`)

The controller has a single three-state pin, RA3, for the sample clock:

- **Released:** the clock free-runs, with one tick every master cycle.
- **Driven:** the clock is frozen at the driven level.
- **Driven 0 then 1:** one rising edge, which makes exactly one tick.

This is how the controller single-steps Spock, both in shift mode and when
reading samples. The original circuit uses a flip-flop clocked from a doubled
clock to make the switching glitch-free. Here one retiming register does the
same job. As a result, the clock reacts one master cycle after RA3 changes.
`zz_level` reports the held level. While it is high, the POD latch is
transparent.

## The trace loop (`trace_ctrl`)

`T` reloads nothing by itself. The usual sequence is `>T`: reload Spock, then
trace. The trace loop works as follows:

1. It raises STORE and releases the sample clock.
2. It polls the selected MUX pin for a rising edge.
3. It runs the post-trigger delay, then freezes the clock at R14[3].
4. The controller reads the counter through `spock_link` and prints it.

R8[1:0] selects one of four loops:

| Mode | Waiting for the trigger | Each delay iteration |
|---|---|---|
| 0 simple | clock runs | clock runs max(R13,1) µs |
| 1 timebase expansion | freeze R13 µs, burst 1 µs, repeat; poll during bursts | one freeze + burst |
| 2 chop | as 0, CH-A/B nibble swapped every 5 µs (200 kHz) | as 0, chopping |
| 3 chop + expansion | as 1, nibble swapped once per burst | as 1, chopping |

The delay is R12:R11 iterations; a delay of 0 halts as soon as the trigger is
seen. With timebase expansion the delay is magnified by R13. The longest delay
is 65535 × 256 µs ≈ 16.8 s. Modes 4..15 behave as their low two bits.

Because of the one-cycle clock latency, STORE is held for two extra cycles
after the loop ends. This makes sure the last tick that still gets through is
written, so no RAM location is left holding stale data at the halt address.

## Reading samples back (`sample_reader`, `data_mux`)

The controller has no parallel bus to the RAMs. For each sample:

1. STORE goes low, and the RAMs drive the logic and ADC buses at Spock's
   address.
2. The reader walks the shared select lines RB1..RB3 through 0..7. At each
   step it samples RA4 (logic MUX) and RB0 (ADC MUX) after `SETTLE` cycles.
3. It steps the sample clock once, which advances the counter.

`S` first shifts the start address R10:R9 into Spock, keeping R5..R7. It then
reads the samples one by one, printing each as it is read. With default
parameters one sample takes 8×2+8 = 24 master cycles to read. The serial line
(5 characters per sample) is by far the slower part.

## Analog front end (behavioural models)

These models use signed 16-bit integer millivolts instead of `real`, so they
elaborate in every tool. They are not meant for synthesis.

- `analog_source_mux`: selects BNC A/B or POD A/B using CH-A/B and PG1. The POD
  inputs are divided by 4.83. It lights one channel LED while sampling.
- `range_select`: applies the gain for RNG1..RNG0: 4.583, 1.0, 0.5 or 0.19.
  The output clips at ±5 V.
- `adc_buffer`: clamps the signal to ±0.6 V, applies a gain of 1.667 and
  offsets it to the ADC centre (1 V). It also gives the zero-crossing edge
  used as EVENT2.
- `flash_adc`: converts 0..2 V to codes 0..255 on each sample-clock tick. Its
  output is enabled while STORE is high.

Together these reproduce the instrument's table of input ranges. For range
00..11 the full scale is ±130 mV, ±600 mV, ±1.20 V and ±3.16 V on a BNC
input (×10 with a ×10 probe), and ±632 mV, ±2.90 V, ±5.80 V and ±15.28 V on a
POD input. In every case the full scale reaches the ends of the 2 V ADC span.
The POD divider of 4.83 is the ratio between the two columns.

The logic inputs pass through `pod_latch`, which is transparent while the
sample clock is held high and captures on each tick. The 1 GHz prescaler
(`prescaler`) divides `rf_in` by 64 when enabled.

## Parameters and sizes

All defaults are the nominal instrument values:

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | master (sample) clock |
| `HOST_BAUD` | 19 200 | host serial rate (115 200 also works: divider 434) |
| `POD_BAUD` | 9 600 | POD byte-exchange rate |
| `TICK_CYCLES` | CLK_HZ/1e6 | timebase unit, 1 µs |
| `BURST_CYCLES` | CLK_HZ/1e6 | burst length in expansion modes, 1 µs |
| `CHOP_CYCLES` | CLK_HZ/200e3 | chop period, 5 µs |
| `RAM_ADDR_W` | 15 | 32K x 8 per RAM |

Synthesis of the top gives about 1000 cells and 700 flip-flop bits, plus the
two 256 Kbit memories.

## Where this design departs from the original instrument

- **Controller.** The original controller is firmware on a small
  microcontroller. Here it is a hardware state machine, so command timing is
  much faster than the original's, but the serial protocol is the same.
- **Timebase unit.** One unit of R13 is 1 µs. The original's unit depends on
  firmware loop timing and on the crystal.
- **Burst length.** The instrument's descriptions give both "1 µs" and
  "about 5 µs" for the sample burst in timebase expansion. This design uses
  1 µs.
- **POD lines.** The command list names IO-0 for POD output. The POD section
  names IO-1 as the input and IO-2 as the output. This design follows the POD
  section: `pod_io2` out, `pod_io1` in.
- **Print framing.** `T` prints its address framed by CRs, like `p`. The ID
  string is `BitScope`. All hex output is lower case.
- **Counter read.** `<` restores pattern, mask and option after reading the
  counter. `S` loads its start address from R10:R9.
- **Trigger.** The trigger is a rising edge of the polled pin. It is only
  polled while the clock runs, which means during bursts in expansion mode.
- **Not modelled:**
  - the EEPROM behind R16/R17, because no command reaches it;
  - the input JFET buffers, supplies and RS-232 level shifters;
  - the analog switch that routes RNG0/RNG1 to the POD.
- **Not built, because no command is defined for them:**
  - the "Alt" capture, where CH-A/B flips on each analog trigger; a host can
    do this with repeated `T` commands and R14;
  - frequency counting with the controller's own timer input;
  - a binary byte-stream dump (`S` is CSV only). With CSV, 5 characters per
    sample, a 16K buffer takes about 7 s at 115 200 baud rather than under
    2 s.
- **Sample clock.** zz-clk is a clock enable rather than a gated clock, with a
  one-cycle retiming delay.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares against values computed independently in the testbench and ends by
printing `TB_RESULT checks=N failures=M`.

- `tb_bitscope_top` runs the whole engine at a reduced clock (1.92 MHz, so a
  serial bit is 100 cycles) with shortened timebase constants. It checks the
  serial output byte for byte against a reference model of the sample path.
  It counts that each mechanism occurred: echo, Spock preload, logic and ADC
  triggers, post-trigger delay, timebase expansion, chop, dump, counter read,
  EVENT1 through TRIG7, the PG1 bank, abort, POD exchange and pass-through.
- `tb_bitscope_full` runs one complete capture at the default parameters:
  50 MHz and 19 200 baud, about 250 ms of simulated time. The sequence is:
  1. reset and ID;
  2. the register-preload example;
  3. trigger set-up;
  4. `>T` with random logic data and an injected trigger word;
  5. a check of the printed halt address;
  6. a dump of 64 samples around the trigger, compared with a model.

  It takes about 10 s of wall time. It also checks that a line break resets
  the machine, and runs the register-script example (`[6]@[5a]s`).
- `tb_input_ranges` drives the analog chain with the full-scale voltages of
  the range table, for all four ranges on both BNC and POD inputs.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_bitscope_full -y rtl -y tb rtl/bitscope_pkg.sv tb/tb_bitscope_full.sv
./obj_dir/Vtb_bitscope_full
```

Replace the top module name to run any other testbench. The designs start from
an explicit reset, so they also run with random initial values
(`+verilator+rand+reset+2`).

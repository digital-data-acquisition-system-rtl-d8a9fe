# Data acquisition for a three-site interplanetary scintillation array

Three radio telescopes, a few hundred kilometres apart, watch the same
compact radio source. Each one logs the SIN and COS outputs of its correlation
receiver so that the three records can later be cross-correlated. Two things
make this hard:

* The three records must carry the **same time**, to within about ±5 ms.
* Observing must start and stop on its own, at the **sidereal** time when
  each source transits.

This design does that in each station's data acquisition system (DAS). It
uses these parts:

* two BCD clocks: IST (local standard time, trimmed by hand to a broadcast
  time signal) and sidereal time;
* a 256-entry source library that holds the sidereal ON and OFF time, the
  beam and the attenuation of each source;
* a frame sequencer that samples SIN and COS together at 20 Hz, converts
  each to 12 bits, and writes each sample as two 6-bit halves;
* a status serialiser. It puts one bit of a 128-bit status word into every
  tape byte, so every 128 bytes on tape hold a complete copy of the time,
  station, source and setup;
* a controller for a buffered magnetic tape transport.

The tape byte is `{6 A/D bits, 0, status bit}`. The data and the context
that explains them are therefore the same byte stream. No separate header
record is needed, and damage to one part of the tape costs at most 128
bytes of status.

The RTL rebuilds the original TTL system as synchronous logic with clock
enables. One top module, `das_top`, holds one station. The station code is a
parameter.

## Clocks and how time moves around

`ist_clock` counts from a 10 MHz oscillator. Each step below is a
single-cycle enable, not a derived clock:

* ÷10 gives 1 MHz;
* ÷10 gives 100 kHz;
* ÷2 gives 50 kHz, the serial bit rate;
* ÷50 gives 1 kHz, the millisecond tick.

BCD counters then count milliseconds, seconds, minutes, hours and days
(000–999). A thumb-wheel preset loads days, hours and minutes and clears
everything below them.

Four push buttons trim the phase against the broadcast time signal:

| Button | Effect |
|---|---|
| Fine retard | stops the oscillator enable for 1 ms |
| Coarse retard | stops the oscillator enable for 20 ms |
| Fine advance | for 111 µs, counts each 1 MHz tick in place of the 100 kHz tick (gains about 1 ms) |
| Coarse advance | the same for 2222 µs (gains about 20 ms) |

The sidereal clock uses the same module on its own 10.026 MHz oscillator
(`clk_sdt`).

Time is not wired to its users in parallel. It travels as a 48-bit serial
frame, most significant digit first, at 50 kHz:

1. `time_serializer` loads the parallel time when `clock_display` asks for
   it.
2. `clock_display` turns each group of four bits into a BCD digit, latches
   it, and drives one of nine 7-segment digits (days to seconds). Its
   digit counter runs 0–11. When the counter wraps, it requests the next
   frame, so a new frame starts every 12 × 4 × 20 µs = 960 µs.
3. The serializer also sends `ser_load`, a marker that is high during the
   first bit of each frame.
4. `time_deserializer` receives the frame. It takes a bit on each rising
   edge of the serial clock and uses the marker to align. Its inputs pass
   through two-flip-flop synchronisers, so it can receive the sidereal frame
   from the other clock domain.

`das_top` has two receivers:

* the sidereal one feeds the source library;
* the IST one feeds the status word.

## Source library and the ON/OFF decision

`memory_register` holds 256 × 40 bits, which is ten 4-bit RAMs wide. Each
40-bit entry (`das_pkg::src_entry_t`) holds:

| Field | Bits | Meaning |
|---|---|---|
| spare | 3 | always 0 |
| on_bit | 1 | observe this source |
| lf_att | 4 | LF attenuation |
| beam | 6 | beam code |
| off_time | 13 | OFF time in BCD hh:mm |
| on_time | 13 | ON time in BCD hh:mm |

A 13-bit time packs hours-tens (2 bits), hours-units (4), minutes-tens (3)
and minutes-units (4).

The front-panel switches select one of three modes:

| Mode | Switches | What happens |
|---|---|---|
| WRITE | MAN / WRITE / NOT MOD / NOT RUN | Two hex keys (`hex_encoder`) and LOAD give the address. The write button stores the whole entry from the thumb-wheels. |
| MODIFY | MAN / WRITE / MOD / NOT RUN | The same, but only the ON bit is written. This is how the operator picks tonight's sources. |
| RUN | AUTO / READ / NOT MOD / RUN | The address steps at 100 Hz, so each entry is shown for 10 ms. |

In RUN mode, each entry is compared with the sidereal hours and minutes:

* When an entry's ON time matches, the ON flip-flop sets. The same happens
  when the manual-start button is pressed.
* While ON is set, the address stops (`scan_hold`). The matching entry
  therefore stays addressed, and its OFF time, beam and attenuation stay
  valid.
* The `on` output is the ON flip-flop AND the entry's ON bit.
* When the OFF time matches, or the manual-stop button is pressed, the OFF
  flip-flop sets and the scan resumes.

An entry with its ON bit low still stops the scan at its ON time, but it
records nothing. This follows the original circuit, where the scan is
stopped by the comparator output itself. Give such entries ON times that do
not clash with the sources you want.

The library is cleared during the first 256 clocks after reset. The original
instead kept its RAM alive on a UPS.

## The 50 ms frame: where the timing lives

This is the part to read closely. `mux_controller` syncs ON to the next IST
minute boundary (`on_sync`, shown as `das_on`). This means every station
starts on the same minute. `pertec_controller` then gates the 1 kHz tick
and divides it by 50 into `frame_tick`. The first tick comes 50 ms after
ON.

Each frame tick sends one token through eleven 1 ms slots (`das_pkg::slot_e`):

```
slot  0    1      2         3      4     5    6     7      8     9    10    11..49
      NOP  RESET  S&H+MOD   MUX A  COS I NOP  COS II MUX B SIN I NOP  SIN II idle
```

What happens in each slot:

* **RESET**: `adc_sequencer` clears its two toggles. The next MUX A
  toggle then selects COS, and the half-select starts on the high six bits.
* **S&H**: both sample-and-holds track during this slot and hold when it
  ends. COS and SIN are therefore sampled at the same instant. If the
  modify-time flag is armed, this slot also copies the current IST into
  the status word (see below).
* **MUX A / MUX B**: toggle the analog mux to COS, then to SIN. One clock
  after each toggle, the converter is started. It has the whole next slot
  to finish.
* **Byte slots (COS I, COS II, SIN I, SIN II)**: at the start of each one,
  an answer strobe goes to the tape, gated by FEN. At the end of each one,
  the half-select toggles. The four bytes are therefore COS high, COS low,
  SIN high, SIN low.

That gives 4 bytes per frame, or 80 bytes/s. A 1024-byte tape record holds
12.8 s of data. A one-hour observation writes 288 000 bytes, about 281 records.
The two-digit record counter counts modulo 256, so it wraps once during such
a run.

**Status address and modify time.** Each byte written advances the 7-bit
status address `ssi_addr`. The strobe that does this is the delayed answer
strobe, as it leaves the control signal generator. When the address wraps
from 127 to 0, a flag is armed. The next S&H slot gives the `modify_time`
pulse, which copies the IST into the status word and clears the flag. As a
result:

* the time recorded in a status cycle never changes halfway through it;
* that time is the IST of a real sample instant.

The internal reset at the end of an observation clears the address and
arms the flag.

## The status word (SSI)

`data_multiplexer` holds sixteen bytes:

| Byte | Content |
|---|---|
| E0–E5 | IST as 12 BCD digits, least significant byte first (E0 = ms tens/units, …, E5 = days hundreds/tens) |
| E6 | station code: D2 Thaltej, CD Rajkot, C9 Surat (parameter `STATION_CODE`) |
| E7 | source code, which is the library address |
| E8 | LF attenuation in bits 3..0 |
| E9 | beam code in bits 5..0 |
| E10, E11 | sidereal ON time: minutes, then hours (BCD) |
| E12–E15 | sync word 00 FF 0F 0F |

The 7-bit address is split in two:

* `addr[3:0]` picks the byte (the 16-input multiplexers);
* `addr[6:4]` picks the bit within it (the final 8-input multiplexer).

Tape bytes 0–15 therefore carry bit 0 of E0–E15, bytes 16–31 carry bit 1,
and so on. The decoder looks for the sync pattern to find where the status
word starts.

## Tape commands

`pertec_controller` runs a short command sequence, stepped by the 1 kHz
tick, at each end of an observation:

* **After ON:** FEN (formatter enable) at 2 ms, then a 1 ms GO at 4 ms.
* **After OFF:** WFM at 1 ms, held for 140 ms (`WFM_MS`, the 140 ms
  monoshot of the Pertec controller), and GO at 3 ms (this writes the file
  mark). FEN drops when WFM ends, and an internal reset follows 1 ms later,
  142 ms after OFF. The reset returns the Pertec controller and the status
  address to idle.

`control_signal_generator` sits between these commands and the tape:

* It has a 5-bit manual register {ERASE, WFM, FEN, R/F, R/W}. The panel
  switches, gated by a load button, can only set bits. One clear input
  clears them all.
* Each manual bit is ORed with the matching automatic command.
* GO and the answer strobe are delayed by `STB_DELAY` clocks (1 µs), so
  the data lines settle before the strobe.
* Rising edges of GO | A-overflow | B-overflow are counted in the 8-bit
  record counter for the two-digit display.

`tape_data_interface` forms the byte `{adc6, 0, sib}` and drives it
inverted (`wd_n`). It shows write data or read data plus parity on the
data LEDs, depending on R/W. It also stretches the active-low transport
status lines for the status LEDs.

The tape transport itself is not part of the RTL. Its lines are ports of
`das_top`. `tb/pertec_bmtt_model.sv` is a simple stand-in used by the top
testbench. It fills 1024-byte records and reports A/B buffer overflows in
turn.

## Files

Everything is in `rtl/`:

* `das_pkg.sv`: shared types (BCD time, 13-bit hh:mm, library entry, panel
  and mode switches, frame slots), station codes, the sync word and a
  7-segment decoder.
* One module per block: `ist_clock`, `time_serializer`, `clock_display`,
  `time_deserializer`, `hex_encoder`, `memory_register`, `mux_controller`,
  `adc_sequencer`, `data_multiplexer`, `pertec_controller`,
  `control_signal_generator` and `tape_data_interface`.
* `sh_adc_model.sv`: a behavioural model, not meant for synthesis, of the
  analog front end: two sample-and-holds, a 2:1 analog mux and a 12-bit
  converter over ±5 V in offset binary. Inputs are signed millivolts.
* `das_top.sv`: one whole station.

All the IST-side logic runs on `clk` (10 MHz). The sidereal clock, its
display and its serialiser run on `clk_sdt`. `rst_n` is asynchronous and
active low.

## Where this design departs from the original circuit or fills gaps

* **Timing.** There is one clock per oscillator, with clock enables, in
  place of ripple counters and monoshots. Pulse stretches become whole
  clocks or whole milliseconds. The sample-and-hold window is the 1 ms
  slot, not a 200 µs monoshot.
* **Choices made where the original does not say:**
  * the serial bit order and frame marker;
  * the byte order inside the IST and ON-time fields;
  * the slot numbers of the tape command sequence;
  * the advance window lengths;
  * the strobe delay;
  * the status-LED stretch (`STRETCH` = 1000 clocks);
  * the A/D conversion time (`ADC_CONV_CYCLES`);
  * days wrapping at 999.
* **Clock-domain crossing.** The sidereal time crosses clock domains through
  a two-flip-flop synchroniser. The original had none.
* **Where LF attenuation and beam come from.** In the status word they come
  from the addressed library entry, not directly from the front-panel
  switches. The original mentions both sources. The stored values make the
  record describe the source actually being observed.
* **COUNT.** The mux controller's COUNT input, which advances the status
  address, is driven by the delayed answer strobe: one count per byte.
* **Not modelled:**
  * the oscillators and their analog shaping;
  * the receiver buffers;
  * the strip-chart recorder;
  * the tape transport;
  * the manual procedure for syncing to the time signal. Only its buttons
    and 1 Hz output are here.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The shared
check task is in `tb/tb_check.svh`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/das_pkg.sv tb/tb_mux_controller.sv --top-module tb_mux_controller
./obj_dir/Vtb_mux_controller
```

Swap in any other testbench name. `tb_das_top` runs one whole observation:

1. Enter source 37 on the keyboard and write it.
2. Set its ON bit in MODIFY mode.
3. Switch to RUN and preset the clocks.
4. Check that the scan stops on the source.
5. Wait for the IST minute.
6. Write about 600 frames.
7. Check the A/D halves, and rebuild the 128 status bits from the first
   128 tape bytes.
8. Stop at the OFF time with one file mark.

It counts each mechanism and fails if one never happens:

* keyboard entry;
* scan hold;
* frames;
* modify-time refreshes;
* A and B overflows;
* the file mark.

**Largest size simulated.** `tb_das_top` runs with `OSC_DIV = 1` and
`CLK_DIV_1K = 10`, so one millisecond is 100 clocks instead of 10 000. That
is a 1/100 time scale: about 90 simulated seconds in about 12 s of
Verilator time. All other parameters (256-entry library, 48-bit time,
50-slot frame divider, 128-bit status word) are at their real sizes. The
observation cannot be shorter than about a minute, because recording waits
for an IST minute boundary and stops at a sidereal minute. The same
testbench with every parameter at its default (the real 10 MHz clock) was
run once and passed, but took about 20 minutes of Verilator time, so the
kept testbench uses the reduced scale. `tb_ist_clock` runs the clock with
its real dividers after the first stage (`OSC_DIV = 1`).

## Changing it

* **Station:** set `das_top #(.STATION_CODE(STN_RAJKOT))` and so on.
* **Frame layout:** change `slot_e` in `das_pkg`, the slot decode in
  `mux_controller`, and the slot use in `adc_sequencer`. `NUM_SLOTS` must
  stay below the frame divider `FRAME_DIV`.
* **Status word layout:** change only the `ssi_bytes` assignments in
  `data_multiplexer`.
* **Library size:** set `DEPTH` and `ADDR_BITS` on `memory_register` and
  `hex_encoder`. E7 holds only 8 address bits.

# Logic board tester: 120-channel stimulus / response machine

This is the RTL of a general-purpose tester for digital logic boards, built around
a simple idea. Every one of 120 I/O channels owns a 1024 x 1 memory. All memories
share one address counter, which loops between two program bounds. The memory
contents *are* the test program:

* An **OUTPUT** channel drives its memory bit onto the board under test.
* An **INPUT** channel compares the board's pin with its memory bit.
* Any other channel is a **recorder** and writes whatever its pin shows.

Testing a board takes two passes. First, run the stimulus over a known-good board
with the response channels still recording; their memories now hold the good
board's signature. Then turn those channels into INPUTs and put in the suspect
board. The tester halts at the first address where any pin disagrees. At that
instant it freezes a snapshot of every pin in per-channel glitch latches, so the
operator can see which pin failed and what every other pin was doing.

The same machinery also serves as:

* a data-domain logic analyser: record on a trigger word, with up to 999 words
  after the trigger;
* a word generator;
* a memory editor: strings of 1s, 0s or pseudorandom bits, word copies, and a
  search for a word.

The top module is `logic_board_tester`. The defaults are the full machine: 120
channels on twelve ten-channel boards, with 1024-word memories.

## One memory step

Everything the tester does happens inside a *memory step*. The original machine
times a step with a tapped 25 ns delay line. Here one clock cycle stands for one
tap, and the delay line is `strobe_sequencer`:

```
cycle  0   step accepted: address counter moves, DELAY counter counts,
           pseudorandom generator shifts, pulse enters the line
cycle  2   lat_stb   (SETTLE = 2 taps = 50 ns of RAM settling)
           every channel's memory latch takes its RAM output; OUTPUT
           channels drive the new value from here on
cycle  8   cmp_stb   (SETTLE + CMP_DLY = 8 taps = 200 ns after the counter)
           recorders write their pin into RAM, comparators are strobed,
           and the compare window opens
...        window stays open until the next step, so a glitch later in
           the step still halts the tester
```

The line holds one step at a time. A new step must come at least
`SETTLE + CMP_DLY + 1` = 9 cycles after the previous one; the assertion
`a_step_spacing` in `master_board` checks this.

Where steps come from:

* The internal generator's fastest setting gives a step every 20 cycles.
* Divider output 0 fed back into the EXTERNAL CLOCK input gives a step every 10
  cycles.

A halt (DELAY run out, a recognition with DELAY 000, or a mismatch in board test)
stops the step in the cycle it happens. It also removes any pulse still in the
line.

## The channel command word

Each channel holds two things of its own:

* a small **channel register**: BIT, TRIGGER, INPUT, OUTPUT;
* a **J flag**, set while the WRITE button is held on the channel under the
  cursor.

The master board broadcasts three mode bits (`cfr_a`) to all channels. Each
channel looks up a 32 x 8 **channel function ROM (CFR)** at this address:

```
addr = { INPUT | J,  OUTPUT & ~J,  WRITE,  COPY/SEARCH/WRITE flag,  COPY held }
```

The ROM holds the word table of the original PROM. What each bit of a word
switches is not known, so a channel decodes whole words (`io_channel`):

| word | meaning in this design |
|------|------------------------|
| 96 | RECORD: write the pin into RAM; trigger compares the pin with BIT |
| CD | SEARCH: trigger compares the memory latch with BIT |
| A8 | COPY: write the memory latch back into RAM |
| 7A | OUTPUT: drive the latch and compare the pin with it (catches a shorted line) |
| FA | INPUT: compare the pin with the latch |
| 8C | WRITE: write BIT (cursor channel, J set) or a 1 (INPUT channels) |
| 50 | INHIBIT WRITE: nothing written; an OUTPUT channel keeps driving |
| E8, 00 | nothing |

Address 6 (the WRITE flag alone) holds E8, a word no channel acts on. This is
what lets the operator step through memory in WRITE mode without changing it.

The INPUT and OUTPUT buttons each do three things. They turn the cursor channel
into an INPUT or an OUTPUT. They put the tester in **board test**. And, for one
cycle, they add 110 or 010 to `cfr_a`. Every INPUT channel (address 10+6 = 16) or
every OUTPUT channel (address 8+2 = A) then writes a 1 at the current address.
Two such *scratchpad* words record which channels are INPUTs and which are
OUTPUTs.

## Front panel and master register

`master_control` holds the master register. Its flags are RECORD, SEARCH, COPY,
WRITE and BOARD TEST. Once BOARD TEST is set, only RECORD leaves it. RECORD also
clears every channel register, so all channels become recorders again.

| control | effect |
|---------|--------|
| ENTER | BIT and TRIGGER into the cursor channel (clears INPUT/OUTPUT); re-seeds the pseudorandom generator |
| BIT off + TRIGGER on | the BIT line carries the generator output (random strings); ENTER itself enters a 0 |
| WRITE (held) | writes the cursor channel at once, starts the DELAY countdown; steps while held write further words |
| COPY | press latches the current word; move the address; release writes the word there |
| MEMORY SWEEP | single step, then repeats while held. Forward executes steps like the generator; reverse executes nothing (viewing) |
| CHANNEL SWEEP | moves the cursor through the fitted channels; left homes it |
| PROGRAM BOUNDS SET | loads BEGIN/END, puts the address at BEGIN, reloads DELAY (only while running) |
| DELAY SET (held) | reloads the DELAY count, disables countdown, overrides every halt |
| DELAY COUNT | enables countdown |
| DISPLAY | channel LEDs show BIT/TRIGGER/MEMORY or INPUT/OUTPUT/GLITCH; a failing channel blinks as it is toggled |

## DELAY, triggers and halts

`delay_counter` is a 3-digit BCD down counter with an enable flip-flop. A DELAY of
N started at address A stops the tester with the address at A+N. The last of the
N steps moves the address but executes nothing. So a 64-bit string written from
address 0 fills words 0..63 and stops at 0x040.

A trigger word is every TRIGGER-marked channel agreeing with its BIT. In RECORD a
channel compares its pin; in SEARCH it compares its memory. A trigger recognition
enables the countdown, so recording runs N more words past the trigger. With
DELAY 000, the recognition itself halts the tester; this is how SEARCH stops on
the word it finds.

In board test, any compared mismatch halts the tester and clocks every channel's
glitch latch at once (`fail_halt`). Holding DELAY SET keeps the tester running
through failures; this is the dynamic-analysis mode, used with an oscilloscope.

## Module map

```
logic_board_tester
├── master_board
│   ├── sweep_timer x2      MEMORY and CHANNEL SWEEP toggles
│   ├── signal_generator    oscillator, 8-output divider, 1-of-8 select, edge detect
│   ├── run_control         memory-counter clock enable, halt and override
│   ├── memory_counter      address counter with BEGIN/END loop
│   ├── delay_counter       BCD DELAY counter and enable flip-flop
│   ├── strobe_sequencer    the delay line
│   ├── prng                31-bit LFSR for random strings
│   ├── cursor_counter      channel cursor and 1-of-N decoder
│   └── master_control      master register, button strokes, channel commands
└── channel_board x (N_CH/10)
    └── io_channel x 10
        ├── channel_ram           1024 x 1
        ├── channel_register      BIT/TRIGGER/INPUT/OUTPUT and J
        ├── channel_function_rom  the CFR
        └── display_mux           LED selection
```

`lbt_pkg` holds the shared types: the channel register, the command bundle
`chan_ctrl_t` and the LED struct.

The top's ports are the front panel plus three vectors for the pins:

* `io_out`: the level the tester drives.
* `io_oe`: high on OUTPUT channels.
* `io_in`: the level actually on the pin. Outside logic must feed the tester's own
  drive back on driven channels.

`mem_out` shows every channel's RAM output at the current address. Buttons are
synchronous, debounced levels. `rst_n` is the power-up reset. One cycle after
reset, the thumbwheel values are loaded.

Parameters of the top:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CH` | 120 | channels (multiple of ten) |
| `N_ACTIVE` | `N_CH` | channels fitted (cursor range) |
| `DEPTH` | 1024 | words per channel |
| `SETTLE`, `CMP_DLY` | 2, 6 | delay-line taps |
| `OSC_DIV` | 5 | system clock / oscillator |
| `HOLDOFF` | 64 | sweep cycles before repeats |

## Simulating

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lbt_pkg.sv tb/tb_logic_board_tester.sv --top-module tb_logic_board_tester
./obj_dir/Vtb_logic_board_tester
```

`tb_logic_board_tester` runs the whole tester at its default size and operates it
the way the operating procedures do. The board under test is a model: channel 2
is the AND and channel 3 the XOR of the stimulus on channels 0 and 1. The
testbench:

* writes a string of 1s and a pseudorandom string, checking the random string
  against its recurrence;
* copies a word;
* records all seven square waves T0..64·T0, clocking the tester from the lowest
  divider output;
* builds and runs a board test: a scratchpad mark for each INPUT and OUTPUT
  channel, a program pass, a passing pass, a stuck pin, a one-cycle glitch, a run
  under override and a reverse sweep;
* searches memory for a ten-bit word;
* records with a trigger and five words of delay.

It counts each of these mechanisms and fails if any never happened. It runs in
about a second.

## Departures from the original, and limits

* **Synchronous timing.** The original is asynchronous TTL clocked by edges from
  buttons, one-shots and a delay line. Here everything runs on one clock, and
  button edges become one-cycle strokes.
* **Analog parts are modelled.** The 555 sweep timer becomes counters. The 9 MHz
  crystal becomes the system clock divided by `OSC_DIV` (8 MHz at 25 ns per
  cycle). The power-up RC pulse becomes `rst_n`.
* **Speed.** The original reached a 4.5 MHz pin-change rate. It did so by letting
  the pulses of successive steps overlap in its delay line: at 9 MHz, a halt could
  land up to two addresses after the failing one. This design's delay line holds
  one step, which caps the step rate at 1/(9 x 25 ns), about 4.44 MHz. Halts are
  exact.
* **Glitch capture.** The pin is compared once per clock while the compare window
  is open. A pulse is therefore caught when it spans a clock edge. The original
  claims 23 ns, just under one 25 ns cycle.
* **Whole-word CFR decoding** (see above). Which hardware buffer each ROM bit
  enables is not known.
* **Pseudorandom generator.** The original's generator circuit is not given, so a
  31-bit maximal-length LFSR (x^31 + x^28 + 1) stands in for it. After ENTER, its
  first 31 output bits are always the seed, so they are the same every time;
  running out 32 steps before writing discards them, matching the original's
  advice.
* **Choices where the original is silent:**
  * ENTER with BIT off and TRIGGER on enters a 0, so a trigger on 0 can be set.
  * The external clock passes a two-flop synchroniser.
* **Square-wave phase.** The original always starts a recorded square wave with
  a full high half-cycle. Here the phase depends on where the free-running divider
  happens to be.
* **Not built.** The optional M6800 microcomputer interface (an MC6820 PIA
  decoding channel and instrument commands) is not built; the front-panel ports
  stand in for it. The LED panel and switches are plain ports.

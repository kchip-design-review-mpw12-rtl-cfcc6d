# Kchip: a data concentrator for four PACE front-end chipsets

This is a silicon-strip detector readout. Each front-end hybrid carries a PACE chipset: a
32-channel preamplifier and a 32-channel analog pipeline memory. On a trigger, three
consecutive pipeline columns are frozen and read out at 20 MHz, and a quad 12-bit 40 MSPS ADC
digitises them. The Kchip sits between four such chipsets and one gigabit optical link
transmitter (GOL). It has four jobs:

- Take the ADC words of the four chipsets.
- Buffer them per chipset in SRAM protected by an error-correcting code.
- Send one packet per chipset per trigger, merged into a single 16-bit word stream for the link.
- Watch the PACE readout for loss of synchronisation.

It also passes the fast timing signals (trigger, resync, calibration) from the control chips on
to the PACE chips. It generates the calibration pulse with programmable delay and width. It
offers its registers over I2C and can self-test its SRAMs.

The RTL is synthesizable SystemVerilog, except `cal_dll`, a behavioural model of a
delay-locked loop. It runs on a single 40 MHz clock; the ADC input demultiplexer also uses
the falling edge.

## Block structure

```
 control chips ─ l1a, resync_in ─► pace_controller ─► p_lv1, p_resync ─► PACE x4
               ─ cal_req ─► cal_pulse_gen ─► cal_dll ─► p_calpulse ─────► PACE x4
               ─ I2C ─► i2c_slave ◄─► config_regs ─► cfg, bist_start, err_clear

 PACE x4 ─ DataValid[3:0] ─┬─► pace_controller (column-address deserialiser)
                           └─► error_logger ◄─ pace_emulator (expected DataValid)

 ADC ─ 2 x 12-bit DDR buses ─► adc_demux ─► 4 channels ─► pace_controller
                                          ─► data_fifo x4 (Hamming + SRAM)
                                          ─► gol_formatter ◄─ column FIFO (sync_fifo)
                                          ─► gol_data[15:0], gol_en ─► GOL

 sram_bist ─► raw SRAM ports of all four data_fifo SRAMs (while a test runs)
```

| Module | Role |
|---|---|
| `kchip_top` | Wires everything together. Pads, LVDS receivers and ID fuses are outside; their signals are ports. |
| `kchip_pkg` | Sizes, register map, shared types, CRC and Hamming helper functions. |
| `adc_demux` | Splits the two double-data-rate ADC buses into four 12-bit channels, one per PACE. |
| `pace_emulator` | Copy of the PACE readout state machine; gives the expected DataValid and the slot strobes. |
| `pace_controller` | Forwards the trigger and resync, deserialises column addresses, writes samples into the Data FIFOs after the ADC pipeline delay, decides overflow. |
| `data_fifo` | One per PACE: Hamming encoder, `sram_2p` storage, Hamming decoder, pointers. |
| `hamming_enc` / `hamming_dec` | Extended Hamming SEC-DED code for 12 data bits (18-bit codewords). |
| `sram_2p` | One-write, one-read-port synchronous SRAM (1024 x 18 by default). |
| `sync_fifo` | Column Address FIFO (register-based, first-word fall-through). |
| `gol_formatter` | Builds the packets and the CRC and merges the four FIFOs into the link stream. |
| `error_logger` | Compares real and expected DataValid, and the four PACEs' column addresses; sticky flags and an error count. |
| `sram_bist` | March-style self test of all four SRAMs in parallel. |
| `cal_pulse_gen` + `cal_dll` | Calibration pulse: coarse delay in clocks, fine delay from a DLL tap, programmable width. |
| `i2c_slave` + `config_regs` | Register access over I2C. |

## The PACE readout frame

Everything in the datapath is timed by the readout frame, so it comes first. The PACE chips
are not part of this RTL. The frame below is this design's model of their readout, and it is
the part most likely to need adjusting to the real chip. A slot is one 20 MHz period, which is
two system clocks.

| Slots | DataValid | Content |
|---|---|---|
| 0 | 1 | start of frame |
| 1 .. 8 | address bit | 8-bit column address, MSB first |
| 9 .. 104 | 1 | 96 samples, 3 columns x 32 channels, one per slot on the ADC |
| 105 | 0 | gap |

- A frame is 106 slots, or 212 clocks.
- It starts `PACE_LAT + 1` = 5 clocks after the clock in which `p_lv1` is high.
- If a frame is already running, the new frame starts right after that frame's gap, so
  triggers queue (up to 63 in the emulator).
- `p_resync` empties the queue and stops any frame.

`pace_emulator` runs this state machine from the same `p_lv1`. It knows, clock by clock, what
every PACE should be driving on DataValid; it does not know the value during the address
bits. `error_logger` compares the two and sets a sticky `sync_err` bit for a PACE whose
DataValid ever differs. This catches a chip that missed or gained a trigger, or that runs out
of step.

The error logger also watches the pipeline memories. All four PACE chips receive the same
triggers, so they must freeze the same columns. When an event's column entry is queued, the
four deserialised column addresses are compared. A difference sets the sticky `col_err` flag
(STATUS bit 6). Clearing through CTRL bit 1 resets it together with the sync flags and count.

Sampling point: `pace_controller` samples each address bit and marks each sample in the
second clock of its slot. The ADC has a pipeline latency, so the sample strobe goes through a
delay line selected by the ADC pipeline depth register (reset value 6) before the word is
written. The testbench's ADC model has 5 clocks of conversion latency, and `adc_demux` adds
one register, so 6 is the matching value.

## ADC demultiplexing

The ADC sends two 12-bit buses, each carrying two channels: one word on the falling edge and
one on the rising edge. `adc_demux` captures the falling-edge words in a negative-edge
register. At the next rising edge it registers all four words together:

| Channel | Source |
|---|---|
| 0 | bus 0, falling-edge word |
| 1 | bus 0, rising-edge word |
| 2 | bus 1, falling-edge word |
| 3 | bus 1, rising-edge word |

The channel-to-edge assignment is this design's choice.

## Data FIFOs and SRAM protection

Each PACE has its own FIFO of `DEPTH` = 1024 words, which is about ten events of 96 samples.

- On write, each 12-bit sample becomes an 18-bit extended Hamming codeword:
  - 5 check bits at the power-of-two positions;
  - overall parity in bit 0.
- On read, the decoder:
  - corrects any single flipped bit and raises `sec`;
  - flags any double flip as uncorrectable with `ded`.
- Reads have one clock of latency.

Both flags travel with the sample into the packet. If any sample of a packet has `ded` set, the
packet's CRC word is forced to `FFFFh`, so the receiver discards the packet. Corrected and
uncorrectable errors are also counted in registers.

## Packet format

For every trigger the link carries four packets, PACE 0 to 3. The words are sent back to back
with `gol_en` high.

| Word | Content |
|---|---|
| 0 | `{4'hA, dropped, 0, pace[1:0], column[7:0]}` |
| 1 | `{4'h0, event_number[11:0]}` |
| 2 .. 97 | `{2'b00, ded, sec, sample[11:0]}`, in readout order |
| last | CRC-16-CCITT (polynomial 1021h, init FFFFh, MSB first) over the words before it, or FFFFh after an uncorrectable SRAM error |

- A complete event takes 4 x 99 = 396 clocks on the link.
- The event number counts packet sets since reset or resync.
- The column address is the one PACE sent in its frame.
- All of this layout is this design's own.

## Overflow policy

The link drains one full event in 396 clocks, which is about 101 kHz of sustained triggers.
The PACE readout accepts triggers faster than that, so the FIFOs can fill. At the first clock
of each frame, `pace_controller` checks two things:

- every Data FIFO has room for a whole event, counting words already promised to frames still
  being written;
- the Column Address FIFO has room.

If either check fails, the whole event is dropped:

- none of its samples are written;
- its column entry is still queued with the `dropped` flag;
- the overflow counter is incremented.

The formatter then sends the two header words and the CRC for each PACE of that event, with the
`dropped` bit set and no samples. The receiver therefore sees exactly one packet set per
trigger and can tell which events were lost. Events are never cut in half.

The Column Address FIFO holds 32 entries. Dropped events produce entries while the formatter
is still sending up to ten stored events, and 32 covers that backlog at the defaults. An
assertion in `pace_controller` checks that it never overflows.

## Calibration pulse

A calibration request from the control chips starts a delay; the PACE `p_calpulse` is then
high for `CalPulse_WIDTH` clocks (reset value 2). `CalPulse_DELAY` (reset value `8'b1111_1110`)
has two fields:

- Bits [7:3] are the coarse delay. The pulse starts `delay[7:3] + 1` clocks after the request,
  so 31 clocks at reset.
- Bits [2:0] select one of eight taps of a DLL. The tap shifts the pulse by that many eighths
  of a 25 ns clock period, 6/8 at reset.

The split of the register into these two fields is this design's choice. `cal_dll` is a
behavioural model: a transport delay of `tap * 25 ns / 8`, plus a `locked` flag after 16
clocks. A real implementation needs a DLL macro with the same ports.

## Registers (I2C)

The I2C slave answers at 7-bit address `42h` (a parameter). It samples SCL and SDA with the
40 MHz clock through two-flop synchronisers. That is enough for 3.33 Mbit/s, which is 12 clocks
per bit.

- Write: `S, addr+W, pointer, data, data, ..., P`
- Read: `S, addr+W, pointer, Sr, addr+R, data, ..., NACK, P`

The pointer increments after every data byte.

| Addr | Name | Access | Reset | Content |
|---|---|---|---|---|
| 00 | CTRL | W | 0 | bit 0: start SRAM self test; bit 1: clear error flags and counters (both self-clearing) |
| 01 | CAL_WIDTH | R/W | 2 | CalPulse width in clocks |
| 02 | CAL_DELAY | R/W | FEh | [7:3] coarse delay, [2:0] DLL tap |
| 03 | ADC_PIPE | R/W | 6 | ADC pipeline depth in clocks (0..15 used) |
| 04 | STATUS | R | – | {1'b0, col_err, bist_fail, bist_done, sync_err[3:0]} |
| 05 | SYNC_ERRS | R | 0 | clocks with a DataValid mismatch (saturating) |
| 06 | ECC_SEC | R | 0 | corrected single errors (saturating) |
| 07 | ECC_DED | R | 0 | uncorrectable errors (saturating) |
| 08 | OVF | R | 0 | dropped events (saturating) |
| 09 / 0A | ID_LO / ID_HI | R | fuses | chip ID fuse bits [7:0] / [15:8] |

The three reset values for CAL_WIDTH, CAL_DELAY and ADC_PIPE are the chip's specified defaults;
the rest of the map is this design's choice.

## SRAM self test

Writing CTRL bit 0 starts `sram_bist`. It takes over the raw codeword ports of all four SRAMs,
drives the same addresses and data to each, and compares each memory separately. The test runs
four groups of march elements, one operation per clock:

- all-0s then all-1s;
- a checkerboard and its inverse;
- marching-1s (upward through a 0 background);
- marching-0s (downward through a 1 background).

It takes 15 x DEPTH clocks, which is 0.38 ms for 1024 words at 40 MHz. At the end STATUS shows
`bist_done` and, if any memory failed, `bist_fail`; a per-memory fail mask is an internal
signal. The test overwrites the FIFO contents, so start it only while no readout is in
progress.

## Where this RTL departs from, or adds to, the specification it implements

Specified and followed:

- four chipsets, 12-bit ADC words, 32 channels, 3 columns per trigger;
- 20 MHz PACE readout on a 40 MHz clock;
- two DDR ADC buses demultiplexed on both clock edges;
- four Data FIFOs and a Column Address FIFO;
- a copy of the PACE readout state machine compared with DataValid to detect loss of
  synchronisation;
- SEC-DED Hamming coding of the SRAMs, with the CRC forced to FFFFh on a multiple error;
- an SRAM self test with the four named patterns, within the 1.5 ms budget;
- register access and ID fuse read-out over I2C at up to 3.33 Mbit/s;
- the calibration pulse with DLL fine timing;
- the three register reset values;
- no loss of synchronisation with 200 kHz random (Poisson) triggers.

This design's own choices, which should be checked against the real chips before use:

- the PACE frame layout and latency, and the 8-bit column address;
- monitoring the pipeline memories by comparing the four chips' column addresses;
- the DDR channel assignment;
- the packet layout, the CRC polynomial and the 12-bit event number;
- the drop-whole-event overflow policy and the FIFO depths;
- the Hamming bit placement;
- the order of the self-test elements;
- the CalPulse_DELAY field split, the 8-tap DLL and its lock time;
- the I2C address and pointer protocol, and the register map.

Not in this RTL:

- LVDS receivers, I2C pads with hysteresis and the ID fuses (ports instead);
- the DLL's analog implementation (behavioural model only);
- the PACE, ADC, GOL and control chips (the PACE and ADC have testbench models).

Clock frequency and power depend on the process and layout and are not addressed here.

## Simulation

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=<n> failures=<m>` and stops on a watchdog if the design hangs. The
end-to-end test `tb_kchip_top` runs the top at its default parameters (1024-word FIFOs,
96 samples, 32-entry column FIFO); it builds in a few seconds and runs in under one. It uses two testbench models:

- `tb/pace_model.sv` models four PACE chips, one of which can be told to skip a trigger;
- `tb/adc_model.sv` models a 5-clock pipelined ADC with DDR outputs.

The test runs these phases:

- register read-out over I2C, including the ID fuses;
- SRAM self test;
- single triggers, with every sample, header and CRC compared against the models;
- a fast burst of triggers that overflows the FIFOs;
- single and double SRAM upsets injected into stored words;
- 60 triggers at 200 kHz with random spacing;
- calibration-pulse timing at reset and after reprogramming;
- a PACE that misses a trigger, followed by resync and clearing of the error flags.

At the end it checks that every mechanism occurred at least once: full events, trigger queueing,
overflow drops, a corrected (SEC) and an uncorrectable (DED) error, the self test,
sync-loss detection, a column-address mismatch, resync, calibration pulses and the 200 kHz sequence.

With plain Verilator 5 (add `-Itb` for the top-level test):

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    rtl/kchip_pkg.sv tb/tb_kchip_top.sv --top-module tb_kchip_top
./obj_dir/Vtb_kchip_top
```

A block test works the same way, e.g. `tb/tb_data_fifo.sv --top-module tb_data_fifo`. Files
are found through `-I`, and the package must come first. The RTL also passes slang and Yosys
synthesis. The only non-synthesizable module is `cal_dll`.

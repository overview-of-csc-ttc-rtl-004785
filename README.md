# TTC and BPI FPGAs for a cathode-strip-chamber readout integration test

This is the trigger-and-readout logic that a readout driver board needs to run a
system integration test of cathode strip chamber (CSC) front-end electronics.
The front end stores the analog signals in switched-capacitor arrays (SCAs).
A trigger tells it which stored samples to digitize, and the digitized samples
come back over optical G-Links to be formatted for the data processing units
(DPUs). Two kinds of FPGA share the work:

* The **TTC FPGA** decides when a trigger happens. It manages the SCA cells of
  the front end through the G-Link transmitter word and tells the other FPGAs
  what data to expect.
* Four **BPI FPGAs** each receive two G-Links. They rebuild the 12-bit ADC
  samples, store each time slice with a block of status words, and stream it
  to their DPU in a programmable channel order.

The SystemVerilog here covers both FPGAs and a top level (`sit_top`) that
connects one TTC FPGA to four BPI FPGAs. All of it simulates with plain
Verilator. It includes a test-data mode in which the TTC FPGA's transmitter
sends simulated ADC data, so a loopback fiber exercises the whole chain.

```
            HPU register bus (16 bit)
                  |
  front panel --> TTC FPGA ---------------- G-Link Tx word FE[15:0] ---> front end (SCA, ADC)
  trigger         |  TTC controller                                        |
                  |  SCA controller                                        | G-Links
                  |  TMODE, LOCKED, EXPECTED_RXDATA, SERIAL                v
                  +-------------------------------> BPI FPGA x4 <---- two G-Link Rx each
                  <------------ RXREADY x2 -------  |
                                                    +--> IC_DPU[24:0] to each DPU
```

## How a trigger becomes data

The whole chain in one pass:

1. A trigger source fires. The sources are the front-panel input through the
   TDC, a software write, or the synchronous trigger generator (STG). The
   trigger waits in the trigger delay pipeline, then reaches the **trigger
   gate**.
2. The gate accepts it only if all of these hold:
   * the run is active;
   * the dead time has expired;
   * the rate limit has room;
   * the SCA controller is not still selecting cells for the previous trigger;
   * there are enough free SCA cells (if that inhibit is enabled).

   An accepted trigger raises `TRIGGER` for one clock. A refused trigger is
   counted as missed.
3. The TTC controller writes a three-word trigger record into the TTC FIFO. The
   record holds the TDC value, status bits, the trigger type, a 40-bit
   timestamp and the 28-bit L1ID.
4. The SCA controller picks the cells holding the triggered samples. A cell is
   chosen when it comes out of the latency pipeline. For each time slice it
   queues one Readout FIFO entry: {first, phase, type, cell}.
5. For each queued cell, the readout sequencer does the following:
   * sends `SliceStart` plus 24 bits of slice information down `SERIAL`;
   * shifts the Gray-coded cell address into the SCA on `SD`/`RDCLK`;
   * pulses `RD`;
   * clocks twelve ADC conversions, with `EXPECTED_RXDATA` high while data is
     due back;
   * returns the cell to the Done FIFO.
6. In each BPI FPGA, the TTC lines pass a programmable latency pipeline, so
   `EXPECTED_RXDATA` lines up with the words arriving on the G-Links. The
   deserializers turn three G-Link words into four 12-bit samples per link. The
   input sequencer then does two things:
   * writes the 48 data words of the slice into one page of the Data DPRAMs;
   * writes eight status words (addresses 56–63), then hands the page to the
     output side.
7. The output sequencer reads `OutWordCount` words. It reads them through the
   channel-order table, two samples per word, from the two identical DPRAMs,
   and sends them to the DPU.

## SCA cell management

The front-end SCA has a ring of analog cells. The TTC FPGA chooses which cell is
written in each write period, and it must never overwrite a cell that holds a
triggered sample still waiting for readout. It does this with three FIFOs of
cell numbers and a delay line (`sca_controller`, `write_addr_gen`,
`latency_pipe`, `sync_fifo`):

* **Free FIFO.** After reset, `write_addr_gen` fills it with 0 … C−1 (C =
  number of cells, default 144), one per clock. The front end is not written
  during this fill.
* **Write step.** Each write step takes the next cell and sends it to the front
  end as the write address `WA`, Gray coded through a 256×8 table on
  `FE[12:5]`, with WA0 on bit 12 and WA7 on bit 5. The next cell comes from the **Done FIFO** if it is not empty,
  otherwise from the Free FIFO. A write step is every clock at 40 MHz, or every
  other clock at 20 MHz. At 20 MHz, `CLK_20M` on `FE[15]` marks the phase.
* **Latency pipeline.** Every cell written enters the latency pipeline (128
  steps). It comes out L clocks later, or L/2 steps at 20 MHz. This is the cell
  whose sample the trigger refers to.
  * With no trigger pending, that cell goes straight back to the Free FIFO.
  * After a trigger, the next `slices` cells out of the pipeline go to the
    Readout FIFO instead, the first one marked `first`.
* **Done FIFO.** The readout sequencer returns each cell to the Done FIFO when
  it has been read. The Done FIFO is drained first so that read cells return to
  service quickly.

Some timing details matter when you program the latency:

* **40 MHz write.** The first cell read for a trigger is the one that was on
  `WA` L−2 clocks before `TRIGGER`. The trigger capture register and the `WA`
  register are counted in L.
* **20 MHz write, odd L.** An odd L adds a one-clock delay on the trigger (the
  "latency fudge"), so the trigger is aligned to the nearer write step. The
  trigger's phase relative to the write steps is recorded as bit P of the slice
  information.
* **Gating.** `scac_busy` stays high from the trigger until all its cells are
  selected. The trigger gate uses it, so two triggers never interleave their
  cells.
* **Running out of cells.** `insuf_free` is raised when free plus done cells are
  no more than `slices`. If the Free FIFO still runs dry, or an address ≥ C
  appears, sticky faults are set. They show in the status register and in
  every trigger record.

The readout sequencer (`readout_seq`) is counter-based. Its `RDCLK` period is 8
clocks (5 MHz) or 6 clocks (6.67 MHz). At 20 MHz writes, each slice's sequence
starts in the write-step clock chosen by the read-phase bit P of the SCAC setup
register. All RDCLK periods are whole write steps, so this fixes RDCLK's phase
relative to the write-address changes. For each slice it runs:

| phase   | RDCLK periods | what happens                                             |
|---------|---------------|----------------------------------------------------------|
| address | 8             | one Gray address bit per period on `SD`, MSB first       |
| read    | 1             | `RD` high                                                |
| convert | 12            | one ADC clock per period; `DAV` high 6 clocks per period |

Three outputs can be delayed:

* `SD` and the ADC clock each get a delay of 0–7 clocks (`TTCR_ROSEQ_Setup`).
* `TRIG_DATA` is the inverted `DAV` delayed by at least two clocks.

`EXPECTED_RXDATA` is `DAV`, so the BPI FPGA knows which G-Link cycles carry
data. With alignment checking enabled, an idle sequencer sends `CheckCoarse`
every 65536 clocks.

## Trigger regulation (TTC controller)

| mechanism | rule as built |
|---|---|
| trigger delay | 0–255 clocks on TDC and STG triggers (and the TDC value); CAL is taken before the delay |
| dead time | after each trigger, the next is refused for V+1 clocks (V from `TTCR_DeadTime`) |
| rate limit | at most M triggers in any 3200-clock (80 µs) window; M = 0 disables it; a FIFO of trigger times implements the sliding window |
| stop at max | with S set, `RUNNING` falls when the L1ID count reaches `TTCR_MaxTriggers`; TMODE then reads Stopped, and `RunEnd` is sent once the SCA controller is idle |
| STG | periodic: bursts of N triggers I clocks apart every PERIOD clocks; one-shot: a TDC trigger starts a single burst whose first trigger is PERIOD+1 clocks later |
| N bit | STG triggers fire `TRIGGER` but are neither counted nor recorded |

Trigger type is 1 for TDC, software and L1A triggers and 0 for STG triggers. If
both kinds arrive together, the type is 1. With the L bit set, the L1A input
drives `TRIGGER` directly.

The TTC FIFO is 256×32 on the write side and is read as 16-bit halfwords, most
significant first. Trigger records are:

```
word 0: 1 0 DDDDDD SSSSSSS T 0000 tttttttttttt     D = TDC value, S = status, T = type, t = timestamp[11:0]
word 1: 0010 LLLL...L (28)                          L1ID[27:0]
word 2: 0100 tttt...t (28)                          timestamp[39:12]
NOP   : 00000000 SSSSSSS 0 0000000000000000
```

The status bits S, from MSB to LSB, are:

* bad write address;
* Free FIFO empty;
* readout fault;
* BPI supervisor (always 0 here);
* transition module absent;
* running;
* locked.

## The TTC-to-BPI interface

| line | meaning |
|---|---|
| `TMODE[1:0]` | 11 synchronous reset, 10 stopped, 01 trigger (running, and `TRIGGER` this clock), 00 running |
| `LOCKED` | AND of `RXREADY` over the links enabled in `TTCR_Control` |
| `EXPECTED_RXDATA` | high in each clock that data is due on the G-Links |
| `SERIAL` | commands, MSB first, one bit per clock, idle low |

The commands are:

| command | code | parameter |
|---|---|---|
| `SliceStart` | 1001 | 24-bit slice info {fault[3:0], cell[7:0], 0[8:0], type, phase, first} |
| `RunEnd` | 1010 | none |
| `AlignFine` | 1100 | none |
| `AlignCoarse` | 1101 | none |
| `CheckCoarse` | 1110 | none |

Every code starts with a 1, so the receiver needs no framing. Slice traffic has
priority. `AlignFine` and `AlignCoarse` are sent when requested through
`TTCR_Control`.

Each BPI FPGA delays all four lines by `BPIR_TTC_Latency` clocks. Set it to the
round trip from the TTC FPGA's `FE` register through the fiber and receiver;
the end-to-end test uses loop delay + 1.

## BPI FPGA

**Deserializer.** G-Link nibble j carries sample j, low nibble first, over three
words. The ADC reformat modes are: 0 none, 1 invert the MSB, 2 invert the 11
LSBs. Simulated data sends the time-slice field with its MSB inverted, so use
mode 1 with it.

**Input sequencer, normal mode.** A synchronous reset arms it; the mode register
then selects disabled, normal or capture. For each `SliceStart`:

* Link 0's word k goes to address {page, k, 0} and link 1's to {page, k, 1}.
  Both are 48 bits: four samples.
* After `InWordCount` (default 72) expected cycles, and once the last word is
  stored, it writes the status words:

| addr | high 12 bits | low 12 bits |
|---|---|---|
| 56 | 0xfae | 0xfed |
| 57 | RXERROR count, link 1 | link 0 (saturating, only while locked) |
| 58 | RXDATA-mismatch count, link 1 | link 0 |
| 59 | RXREADY and word alignment, link 1 | link 0 |
| 60 | 0 | 0 |
| 61 | {fault code, cell} | {chip id, 0, type, phase, first} |
| 62 | event counter | slice counter (both 0 for the first slice of a run) |
| 63 | {RXDATA, RXERROR, RXREADY faults per link} | {lost lock, command mid-slice, recover (0), summary} |

* Then it toggles `frame_done` to the output clock domain and swaps pages.
* A `SliceStart` that arrives while status words are being written waits until
  they are done.
* A `SliceStart` that arrives while data is still expected aborts the slice and
  sets the mid-slice flag.
* `RunEnd` disables the sequencer.

**Input sequencer, capture modes** (link 0 or link 1). Starting at the next
synchronous reset, the sequencer records every G-Link cycle as a 24-bit value
holding the TTC lines and the receiver status. It packs two values per DPRAM
word and interleaves a status word write between data writes. It stops when
the TTC mode reads stopped.

**Data DPRAM** (`data_dpram`). 256×48 written, 1024×12 read: read address =
word × 4 + sample. Two copies are built so that two samples can be read per
clock.

**Channel order table** (`reorder_lut`). 256 entries of {sample A, sample B}. At
power-up it is in natural order: entry k = {2k+1, 2k}. It is written and read
one nibble at a time through `BPIR_ReorderLUT`, and the address auto-increments.

**Output sequencer** (`output_seq`). On each frame it sends `OutWordCount`
(default 128) words. Each is `{valid, sample A, sample B}`, with a two-clock
pipeline (table read, DPRAM read). A frame that finishes while the previous one
is still being sent sets the overrun bit.

## Registers

**HPU bus** (`ttc_fpga`, 16-bit data, 4-bit address). An access happens on a
falling edge of `hpu_stb_n`, seen through a two-flop synchronizer; `hpu_wr_n`
low makes it a write.

| addr | register |
|---|---|
| 0 | status {U O W F S C D, 0…, P R L} |
| 1 | link status {signal detect, RXREADY} |
| 2 | control {P C S N 0 A R T, link enables}; P, C, S and N are one-shot actions |
| 3 | TTC FIFO |
| 4 | missed triggers |
| 5 | triggers |
| 6 | TTCC setup {C c S N F T G L I, max rate[6:0]} |
| 7 | dead time |
| 8 | max triggers |
| 9 | trigger delay |
| 10 | STG period |
| 11 | STG burst {one-shot, N[6:0], I[7:0]} |
| 12 | SCAC setup {Tx mode, L, write rate, read rate, read phase, S, slices} |
| 13 | readout setup {ADC phase, SD phase, G, TRIG_DATA delay} |
| 14 | {latency, cells} |
| 15 | gray-code table port |

Defaults after `rst`:

| setting | default |
|---|---|
| dead time | 3 |
| rate limit | 7 per 80 µs |
| STG period | 4000 |
| slices | 5 |
| latency | 100 |
| cells | 144 |
| TRIG_DATA delay | 2 |
| max triggers | 0xffff |

The Tx modes are:

| mode | FE drives |
|---|---|
| 00 | SCA control |
| 01 | walking one |
| 10 | simulated ADC data while `DAV` is high |
| 11 | zero |

**BPI bus** (`bpi_fpga`, 4-bit data).

| addr | register |
|---|---|
| 1 | chip id (write) / status {bad command, overrun} (read) |
| 2–5 | link status |
| 6 | align (stored) |
| 7 | control {mode, L} |
| 8–9 | TTC latency |
| 10–11 | input word count |
| 12–13 | output word count |
| 14 | table port |
| 15 | reformat |

`sit_pkg` holds all the codes, register addresses and packed register layouts.

## Where this design departs from or goes beyond the description it follows

* **TDC.** It measures only which half of the clock period the front-panel edge
  fell in. That is one bit, carried in bit 0 of the 6-bit TDC field.
* **Readout sequencer.** Only the counter-based version is built, not the
  table-programmed one; register 15 with G = 0 reads 0. The gain lines are
  held low.
* **Unused setup bit.** The simultaneous read/write bit of the SCAC setup
  register is stored and has no effect.
* **Read phase.** At 20 MHz writes, P selects which of the two clocks of a
  write step each slice's RDCLK sequence starts in. Which P value maps to
  which clock is this design's choice.
* **Readout time.** A slice takes 157–158 clocks (about 3.95 µs) to read at
  6.67 MHz with 20 MHz writes:
  * 28 clocks of `SliceStart`;
  * 21 RDCLK periods of 6 clocks;
  * 3 clocks of sequencer state changes;
  * up to 1 clock to start on the selected read phase.

  Sustaining 100 kHz triggers with 5 slices each would need about 2 µs per
  slice. At that rate, with the insufficient-cell inhibit on, about one
  trigger in five is refused. Bursts within the 80 µs rule are absorbed by the
  144 cells.
* **Not built:**
  * the DLLs;
  * G-Link phase and cycle alignment (the AAL/FAL hardware) — its status
    fields show `RXREADY` and deserializer word alignment;
  * the BPI supervisor — its fault bits read 0;
  * the ATLAS TTC receiver — L1A is a plain input.
* **Widths the description leaves open or states inconsistently:**
  * The cell-count field is taken as 8 bits, since 144 cells do not fit in 6.
  * The slice-information cell address is 8 bits (4+8+9+3 = 24).
  * The timestamp is 40 bits (12 + 28 in the record).
  * The L1ID counter is 32 bits.
* **Status word timing.** In normal mode all eight status words (56–63) are
  written after the slice's last data word. Only 61–63 need to wait for the
  data. As a result, the error counts in words 57 and 58 include errors seen
  during the slice itself, not only those before it.
* **STG one-shot timing.** The first trigger comes PERIOD+1 clocks after the TDC
  trigger, following the timing diagram rather than the register description.

## Files

* `rtl/sit_pkg.sv`: codes, register map, packed register types.
* `rtl/sit_top.sv`: one TTC FPGA and `N_BPI` (4) BPI FPGAs.
* `rtl/ttc_fpga.sv`:
  * `ttc_controller.sv` with `tdc`, `stg`, `cal_logic`, `delay_line`,
    `dead_time`, `rate_limit`, `ts_counter`, `tis_gen`, `ttc_fifo`;
  * `sca_controller.sv` with `write_addr_gen`, `latency_pipe`, `gray_lut`,
    `readout_seq`, `asm_sim_gen`;
  * `tsc_tx.sv`.
* `rtl/bpi_fpga.sv`:
  * `bpi_ttc_pipe.sv` (uses `delay_line`), `tsc_rx.sv`, `deserializer.sv`;
  * `input_seq.sv`, `data_dpram.sv`, `reorder_lut.sv`, `output_seq.sv`.
* `rtl/sync_fifo.sv`: first-word-fall-through FIFO used throughout.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl rtl/sit_pkg.sv tb/tb_sit_top.sv --top-module tb_sit_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way; replace the testbench name.

`tb_sit_top` runs the full system at its default size (four BPI FPGAs). The
TTC FPGA's G-Link word is looped back into all eight receivers, with the
transmitter in simulated-data mode. It checks:

* every sample of every frame on all four DPU outputs against the expected
  pattern (time slice, channel, ADC, mux);
* the header, chip id and slice counter status words;
* that the frame count equals triggers × slices;
* every trigger record in the TTC FIFO;
* the walking-one test pattern.

The triggers come from the software trigger and the STG at a rate that runs into
the dead time, the rate limit and the SCA controller's busy signal. The test
fails if any of these mechanisms never occurs. It runs in a few seconds.

`tb_ttc_workloads` runs the TTC FPGA at its defaults under the loads its budget
is sized for:

* all 144 cells written in 288 clocks (7.2 µs) at 20 MHz;
* 7 of 10 closely spaced triggers accepted under the 80 µs rule;
* 8 triggers × 5 slices queued and read at 157–158 clocks per slice;
* 600 µs of 100 kHz STG triggers, in which the cell inhibit refuses some
  triggers and the Free FIFO never runs dry.

The unit testbenches compare each block with an independent model:

* queue models for the FIFOs and the latency pipeline;
* a sliding-window model for the rate limit;
* a bit-level serial decoder for the command stream;
* behavioural transmitter, FIFO and memory models around the sequencers.

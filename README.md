# XFT Rx Pulsar board — SystemVerilog model of the board logic

The XFT Rx board sits in the CDF Level 2 trigger. It collects the track
segments that twelve Level 1 XFT Finder channels send after each Level 1
accept (L1A), and builds one event record from them. The board records each
channel's data per L2 buffer for readout over VME. It appends word counts and
sends the event in the Pulsar S-LINK format. The event is then read by a
FILAR receiver card, whose 512-word input FIFOs must not overflow.

The board has three FPGAs:

* **Two DataIO FPGAs.** Each takes six Finder channels. It packs each
  channel's 16-bit words into 32-bit words and stores them in that channel's
  input DAQ RAM. It then merges the six channels into one packet for the
  Control FPGA.
* **One Control FPGA.** It merges the two packets and appends the twelve
  channel word counts. It applies the event abort from the Tracklist A board,
  and it protects the FILAR with a model of that card's FIFO fill. It frames
  the event for S-LINK and keeps a copy in its output DAQ RAM.

This repository describes the logic of all three FPGAs, with one top module
(`xft_rx_top`) that wires them together. One 80 MHz clock (12.5 ns) drives
everything.

## Event flow

```
 Finder ch 1..6  ──► DataIO FPGA 1 ──link1──┐
 Finder ch 7..12 ──► DataIO FPGA 2 ──link2──┤
                                            ▼
  abort (P2 or TS) ──► Control FPGA ──► S-LINK (two identical ports)
  L1A, buffer, bunch crossing ───────┘      └─► output DAQ RAM 1 (VME)
```

### In a DataIO FPGA (`dataio_fpga`)

1. **XFT protocol.** A Finder packet is a run of 16-bit words. The first word
   has bits 15:14 = `10` and the last word has `11`. All other words have
   bit 15 = 0.
2. **`xftdaq`: one per channel, six per FPGA.**
   * Words enter a 32x16 input FIFO.
   * Each L1A pushes its L2 buffer number (0-3) and a time stamp into a
     16-entry L1A FIFO.
   * State Machine 1 takes one L1A entry and waits for the first word. It
     then packs the words in pairs: the first word of a pair goes to
     bits 15:0, the second to bits 31:16.
   * If a packet has an odd number of words, its end word is copied into both
     halves.
   * Each 32-bit word goes to two places:
     * the channel's output FIFO (256 words for channel 1, 512 for the
       others), with an end-of-event flag;
     * the 512-word input DAQ RAM at `{buffer, word}`, which gives four
       buffers of 128 words.
   * Two latency words follow in the DAQ RAM: L1A to first word, and L1A to
     end word, in 100 ns units. They sit at words 126 and 127 of the buffer.
   * A 7-bit per-buffer word count records how many 32-bit words the event
     had.
3. **`dataio_merger`.** It reads the output FIFOs of enabled channels in
   order, from channel 1 to channel 6, each up to its end word. Control
   register 1 holds the enables (power-up `0x3F`). Disabled channels are
   skipped. The board does not support disabling all six channels.
4. **`dio_wc_inserter`.** It forwards the words on the link to the Control
   FPGA.
   * The last word of the event goes out **twice**, with `Data EOE` high
     both times.
   * On the next two cycles come word count word 1 (on word count strobe 1)
     and word count word 2 (on strobe 2):

     ```
     word 1 = {2'b00, wc4[6:0], wc3[6:0], 2'b00, wc2[6:0], wc1[6:0]}
     word 2 = {18'b0, wc6[6:0], wc5[6:0]}        (disabled channels: 0)
     ```
   * The counts are those of the event's L2 buffer. A 16-entry FIFO, written
     on L1A, supplies the buffer number.

### In the Control FPGA (`control_fpga`)

1. **Input FIFOs.** Each link fills a 512-word input FIFO with
   `{EOE, data}`.
2. **`ctrl_wc_storage`.** It captures the two word count words of each link
   and merges them into three words of four 7-bit counts each: channels
   1-4, 5-8 and 9-12.
3. **`event_abort_logic`.** It queues one abort decision per event.
   * The decision arrives on either P2 (`PULSAR_FREEZE*`/`PULSAR_SPARE*`,
     active low) or the front-panel LVDS pair.
   * The strobe on either connector is accepted, so the connector in use is
     found automatically.
   * Inputs are synchronised with two flops. The abort bit is sampled at the
     strobe's rising edge.
4. **`ctrl_merger`: the Merger State Machine.**
   * It waits for the event's abort decision. It skips this wait while
     aborts are ignored (control register 2, power-up 1).
   * It then sends FIFO 1 up to its EOE word and drops the repeated EOE word.
     It does the same with FIFO 2, then sends the three word count words.
   * An aborted event is replaced by the single word `0xC000C000`. Its data
     and counts are still read, then discarded.
5. **`filar_overflow_detector`.** It sits on the data words between the
   merger and the 2048-word Output FIFO (see below).
6. **`bunch_counter`.** An 8-bit counter advances on each bunch crossing
   strobe. The bunch-zero marker loads it with the Bunch Count Shift
   (control register 1, power-up 41). At each L1A it queues
   `{count, buffer, time stamp}`.
7. **`slink_if`.** It drains the Output FIFO one event at a time (see
   *S-LINK packet*). It writes every word into output DAQ RAM 1: 2048 words,
   512 per buffer. Each buffer starts with the DAQ header word:

   ```
   {board type 102 [31:23], serial [22:13], geographical address 0 [12:8], bunch count [7:0]}
   ```

## The FILAR overflow detector

The FILAR card buffers 512 words per FIFO and drains them after a while. The
detector estimates that fill level from the number of data words sent
recently. While the estimate is at or above the *word count max*, it drops
data words by masking their strobe.

* **Registers.** A *current word counter* counts the data words passed in the
  running event. When the event ends, or when an overflow is raised during
  it, the count is moved into one of four *word count registers*. A 2-bit
  event counter chooses which register.
* **Timers.** Each register has a timer that counts clock cycles (12.5 ns).
  When the timer reaches *num timer ticks*, it clears its register, which
  models the FILAR draining. Control register 3 holds word count max
  (bits 29:20, power-up 1023) and num timer ticks (bits 19:0, power-up 16).
* **Total.** The total is the current count plus the four registers, formed
  in 12 bits so that it cannot wrap.
* **Overflow timing.** A data word that arrives while total ≥ max sets a
  request flop. The overflow bit follows one cycle later, two cycles after
  the count that caused it. While the overflow bit is high:
  * the counter stops;
  * the output data strobe is masked;
  * the rest of the event's data is dropped.

  The word count words and the S-LINK framing are not counted and never
  dropped.
* **Clearing.** The overflow bit clears only between events, when the merger
  signals that the next event has not started yet, and only if total < max.
  An overflow therefore carries into later events until the timers have
  drained the registers.
* **Error flags.** At each end of event, the error flags FIFO records
  `{overflow, abort}` for the S-LINK trailer.

With max = 10 and one event of *d* back-to-back data words after an idle
period:

| d     | data words sent | truncation flag |
|-------|-----------------|-----------------|
| 1-10  | d               | 0               |
| 11-12 | d               | 1               |
| ≥13   | 12              | 1               |

Words 11 and 12 pass because of the two-cycle delay. The flag is set as soon
as total reaches max during the event, even when nothing is dropped. The
condition that raises the overflow ("a word arriving at total ≥ max") is this
design's reading of the board's behaviour: it is the rule that gives the
table above.

## S-LINK packet

Each event is sent as a packet of these words, in order:

```
BOF     0xB0F00000                                   (control word)
H1      {format[31:24], source[23:20], region[19:18], 8'b0, bunch count[9:2], buffer[1:0]}
H2      {16'b0, latency}           latency = 100 ns ticks from L1A to the packet start
data    DataIO 1 words, DataIO 2 words   (truncated if overflowing)
FWC     three Finder word count words
TRL     {data size[31:16], 13'b0, ignoring aborts, truncation, abort}
EOF     0xE0F00000                                   (control word)
```

* For an aborted event, `data` + `FWC` is replaced by the single word
  `0xC000C000`.
* *data size* is the number of words between H2 and the trailer.
* Format, source, region and the board serial number are parameters of
  `slink_if`. They default to 0 because the values are assigned outside this
  design.

## Register map

The VME bus is represented by a simple synchronous register bus
(`xft_pkg::vme_req_t`):

* a 24-bit byte address, `wr`, `rd` and `wdata`;
* read data returns one cycle after `rd`, with `rvalid`.

Address bits 19:18 select the FPGA: `00` Control, `10` DataIO 1, `11` DataIO 2.

| offset | DataIO FPGA                    | Control FPGA                                  |
|--------|--------------------------------|-----------------------------------------------|
| 0x00   | firmware version `0x0D705140`  | firmware version `0x0C710090`                  |
| 0x04   | reset (write pulse)            | reset (write pulse)                            |
| 0x08   | DAQ SW version (R/W, 0)        | DAQ SW version (R/W, 0)                        |
| 0x0C   | channel enables 5:0 (`0x3F`)   | bunch count shift 7:0 (41)                     |
| 0x10   | status 1 `0x00C0FFEE`          | status 1 `0x00C0FFEE`                          |
| 0x14   | pulse 1 (unused)               | pulse 1 (unused)                               |
| 0x18   | control 2 (unused, R/W)        | ignore aborts, bit 0 (1)                       |
| 0x1C   | control 3 (unused, R/W)        | word count max 29:20 (1023), timer 19:0 (16)   |
| 0x20   | status 2 `0x00000CDF`          | status 2 `0xDEADBEEF`                          |
| 0x24   | —                              | state 1: `{2'b0, wcreg1, wcreg0, current}`     |
| 0x28   | —                              | state 2: `{4'b0, timer en 3:0, event count, total≥max, overflow, wcreg3, wcreg2}` |
| 0x800 + 0x100·b | word count, buffer b (sum of the 6 channels) | word count, buffer b    |
| 0x100000-0x10007C | —                     | IDPROM, byte in bits 31:24                     |

**DAQ RAM readout.**

* Address bit 23 = 1 and bit 22 = 0 select the DAQ RAM window. Bits 21:20
  pick the buffer and bit 17 picks the DAQ RAM.
* DAQ RAM 2 and its word count registers (offset +4) are not used on this
  board and read as 0.
* In a DataIO FPGA, bits 11:9 pick the channel (0-5) and bits 8:2 the word
  within its 128-word buffer.
* In the Control FPGA, bits 10:2 index the 512-word buffer.

The reset register resets the FPGA's logic but keeps its register settings.
Write it after changing the channel enables or the ignore-aborts bit, so that
the state machines and queues start in step.

The IDPROM contents are board data, so they are not part of this logic. The
Control FPGA decodes the window and reads the byte through the top-level
ports `idprom_addr`/`idprom_data`.

## Where this model departs from the board

* **Clocking.** One clock for all three FPGAs and the links. The latency
  unit stays 100 ns, made from the 80 MHz clock by a divide-by-8 prescaler
  (`LAT_TICK_CYCLES`).
* **FIFOs.** All FIFOs are show-ahead (`sync_fifo`). The board's state
  machines test FIFO fill levels ("used words > 2") to pipeline their reads.
  These merger and packer state machines keep the board's state sequence but
  read one word at a time, so they do not need those tests.
* **Own choices.** The board does not specify these:
  * the order of the two halves in a packed word;
  * the placement of the latency words;
  * the bunch-zero load;
  * the depth of the abort, event, flag and buffer-number FIFOs (16, the
    same as the board's L1A FIFO);
  * the VME bus abstraction;
  * which latency header 2 carries (L1A to the start of the S-LINK packet);
  * what *data size* counts (the words between header 2 and the trailer);
  * that the data and word counts of an aborted event are read and
    discarded;
  * what happens to long events: a channel's words beyond the 126 that fit
    in its DAQ RAM buffer are still sent but not stored. The same applies to
    an S-LINK packet beyond the 512 words of an output DAQ RAM buffer.
* **Finder clocks.** On the board each Finder input comes with its own clock.
  Here all Finder inputs are taken as already in the system clock domain.
* **External parts.** The optical receivers, S-LINK LSC card, connectors and
  line receivers are outside the logic. Their signals are top-level ports.
  S-LINK flow control is not modelled: the interface sends one word per
  clock.
* **Word counts.** Finder word counts are 7 bits per channel and wrap above
  127 words.

## Files

* `rtl/xft_pkg.sv`: shared constants (control words, register reset values,
  board type) and the structs `dio_link_t`, `slink_t` and `vme_req_t`.
* `rtl/<block>.sv`: one module per block named above. `xft_rx_top` is the
  top.
* `tb/tb_<block>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.
  `tb/tb_util.svh` holds the check and watchdog macros.

`tb_xft_rx_top` runs the whole board at its default sizes (about 315 µs
simulated). It compares every S-LINK packet word by word with a model of the
event. It also counts these mechanisms and fails if any never occurs:

* aborts ignored;
* an abort over P2;
* an abort over the LVDS pair;
* a disabled channel;
* truncation;
* an overflow carried into the next event;
* its clearing by the timers;
* odd-length packets.

It also reads the DAQ RAMs, word counts and IDPROM over VME and checks them.

`tb_filar_overflow_detector` replays the max = 10 sweep above.

`tb_overflow_cases` runs six multi-packet scenarios with max = 10 and a
5 µs timer:

* an overflow cleared by the timers before the next packet;
* an overflow caused by the sum of two packets;
* an overflow carried through one or two later packets;
* a timer that runs out in the middle of a packet, which is still truncated;
* an overflow that builds up only in the third packet.

Its expected counts come from the two-cycle rule above.

## Simulating

With Verilator 5, run any testbench like this, from the repository root:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb rtl/xft_pkg.sv \
    tb/tb_xft_rx_top.sv --top-module tb_xft_rx_top
./obj_dir/Vtb_xft_rx_top
```

Replace `tb_xft_rx_top` with any other `tb_<block>`. Testbenches include
`tb/tb_util.svh` by a path relative to the repository root.

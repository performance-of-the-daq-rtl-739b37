# Module Data Concentrator (MDC) for a microstrip detector module

The MDC is the digital chip that sits on a double-sided silicon microstrip detector module,
between the front-end readout chips (ToASt, 64 strip channels each) and an lpGBT optical
transceiver. The module runs without a trigger: the front-end chips send every hit, and the MDC
has to collect the hits of up to 16 serial input links and pack them into self-describing
frames. It sends the frames to the counting room over two 320 Mb/s upstream e-links. In the
other direction it takes commands from one downstream e-link and uses them to configure the
front-end chips and to run calibration pulse trains.

This repository holds synthesizable SystemVerilog for the logic of that chip, plus
self-checking testbenches. The block structure, the link counts and rates, the main FIFO size
and the mechanisms listed below follow the published MDC architecture. The published
description gives what the blocks do but not their encodings or protocols. Every word format,
command code, line protocol and most buffer sizes here are therefore this design's own
choices. They are marked as such below and in the first comment of each file.

## Data flow at a glance

```
 ch_rx[15:0]  (16 x 160 Mb/s, one bit per clock)
   |
   v
 readout_channel x16:  activity detect -> SERDES + bitslip -> FSM align (lock)
   |                   -> FSM control (event data only) -> channel FIFO (64 x 32)
   v
 readout_mux:  round-robin readout FSM, frame builder, CRC, frame_check
   |
   v
 main FIFO 256 x 32
   |
   v
 elink_balancer:  link 0 only, or split over both links    <-- readback words (cmd_config)
   |            |
 link FIFO    link FIFO   (64 x 32 each)
   |            |
 elink_tx 0   elink_tx 1  (8b/10b, 2 bits per clock = 320 Mb/s DDR)
   |            |
 elink_up[0]  elink_up[1]

 elink_down -> elink_rx_down -> cmd_config (TMR global registers, sequence check)
                                  |-> toast_config -> cfg_tx / cfg_rx (write, read back, rewrite)
                                  |-> tp_gen -> test_pulse
                                  |-> sync_reset, clk_skew
```

Everything runs on one 160 MHz clock (`clk`). `rst_n` is the power-on reset: active low,
asserted asynchronously, released synchronously by the driver.

## Input channels

Each front-end link carries 32-bit words, one bit per clock, most significant bit first. The
word types the channel understands are defined in `mdc_pkg`:

| word | format |
|---|---|
| idle | `32'h3C5A0F96` |
| frame header | `{4'hA, 12'h0, frame[15:0]}` |
| hit | `{2'b01, payload[29:0]}` |
| frame trailer | `{4'hE, 12'h0, nhits[15:0]}` |

A front-end frame is a header, zero or more hits and a trailer carrying the number of hits sent.
The real front-end protocol is not used here. This stand-in has just enough structure to
exercise alignment, frame checks and loss detection.

**Activity detection.** A channel stays in a power-saving state, with SERDES and aligner held,
until its line toggles. After `ACT_TIMEOUT` (256) clocks without a transition it drops back. A
channel also needs its bit in the `ch_en` register.

**Word alignment.** `chan_deser` shifts the line into a 32-bit register and outputs a word every
32 clocks. On request it "bitslips": it drops one bit, which moves the word boundary by one.
`chan_align` compares each word with the idle pattern. A mismatch requests one bitslip, and the
next word is ignored because it straddles the old and new boundary. Four idle words in a row
declare lock. The idle pattern differs from all 31 of its rotations, so lock is always found.
While locked, four illegal words in a row drop the lock.

**Event data only.** Once locked, idle words are discarded. Headers, hits and trailers go into
the channel FIFO. A hit is stored only while at least two entries are free, so the trailer
always fits. A dropped hit raises `ovf` for one cycle. The trailer keeps the count sent by the
front-end, so the readout logic sees the loss as a count mismatch. `frame_ready` is high while
at least one complete frame waits in the FIFO.

## Frame building (readout_mux)

The readout FSM starts an output frame when every active channel holds a complete frame. It
also starts one `FRAME_TIMEOUT` (8192) clocks after the first channel became ready; the missing
channels are then skipped and flagged. It then visits the channels in round-robin order and writes one output
frame into the main FIFO, one word per clock:

| word | format |
|---|---|
| MDC header | `{4'h8, 12'h0, frame[15:0]}` |
| ToASt header | `{4'h9, 8'h0, channel[3:0], frame[15:0]}` |
| hit | as received |
| ToASt trailer | `{4'hC, 4'h0, crc8[7:0], nhits[15:0]}` |
| MDC trailer | `{4'hD, status[11:0], frame[15:0]}` |

A channel without hits in a frame writes nothing (zero suppression). Its input frame is still
consumed and checked. The starting channel of the round-robin advances by one per frame, so no
link is always first or last. `frame` counts output frames from zero and restarts on the
synchronous-reset command.

The ToASt header names the input link, not the chip. A chip may use one link (low occupancy)
or two links (high occupancy), so the chip follows from the link number and the board wiring.

**Checks.** `frame_check` compares the frame number in each channel's input header with the
frame being built (frame alignment). It also compares the hit count in the input trailer with
the hits actually read (data consistency). Channels that failed are kept in a sticky mask,
readable as register `0x12`; writing that register clears it.

**CRC.** The CRC is CRC-8, polynomial x^8+x^2+x+1 (`0x07`), initial value 0. It covers the 32
bits of each hit word, most significant bit first (`mdc_pkg::crc8_word`).

**MDC trailer status bits:**

| bit | meaning |
|---|---|
| 0 | frame number mismatch in some channel |
| 1 | hit count mismatch (hits were lost) |
| 2 | channel FIFO overflow during this frame |
| 3 | frame started on timeout |
| 11:4 | number of channels that had hits |

A full main FIFO stalls the FSM. The stall pushes back into the channel FIFOs, and then into
the drop rule above.

## Data balancing over the two upstream e-links

`elink_balancer` takes complete frames from the main FIFO. It decides the mode for each frame
from the FIFO level when the frame starts, compared against the `split_th` register (default 32
words):

* **Below the threshold:** the whole frame goes out on link 0. The MDC header and trailer are
  sent once. Link 1 stays idle.
* **At or above the threshold:** the MDC header and MDC trailer are sent on both links. Each
  ToASt block (header, hits, trailer) goes whole to the link that has carried fewer words of
  this frame so far. A block is never cut in two, so each link carries complete, checkable
  blocks.

`split_th = 0` always splits; a value above 256 never does. Between frames, readback words from
the command block are sent on link 0, and they go before the next frame.

Two details make the split actually double the bandwidth:

* **Link FIFOs.** The main FIFO is a single queue, and the ToASt blocks in it alternate between
  the links. Without buffering, the link that is not receiving the current block would sit idle
  and a split frame would go out no faster than on one link. Each transmitter therefore has a
  64-word FIFO in front of it (`LINK_FIFO_DEPTH`). The balancer moves one word per clock into
  either FIFO, and both links drain at once.
* **Frames larger than the main FIFO.** A frame normally starts when its MDC trailer is in the
  main FIFO. A frame also starts when the main FIFO is full. At 50 % occupancy on all 16 links a
  frame is about 290 words, more than the 256-word main FIFO holds. Such a frame streams out
  while the readout FSM is still writing it, and a full FIFO always selects split mode.

## Upstream line coding (elink_tx)

Each 32-bit word is sent as four bytes, most significant byte first. Each byte is 8b/10b coded
(standard code, running disparity), and the code is sent bit `a` first. While no word is
waiting, K28.5 commas are sent. A receiver aligns on the comma, and after a comma every group of
four data symbols is one word. The output `elink_up[i]` carries two bits per clock: `[1]` is
meant for the rising edge and `[0]` for the falling edge of a DDR output cell. The line
therefore runs at 320 Mb/s. One word takes 20 clocks, which is 256 Mb/s of payload per link.

## Slow control

**Downstream line (elink_rx_down).** The line is sampled once per clock and rests low. A
command is a start bit, 32 command bits (most significant first) and one even-parity bit. The
command appears two clocks after its parity bit. A parity failure is reported as an error
instead of executing the command.

**Commands (cmd_config).** A command word is `{opcode[3:0], chip[3:0], addr[7:0], data[15:0]}`:

| opcode | command |
|---|---|
| 1 | write global register `addr` |
| 2 | read global register `addr` |
| 3 | begin a front-end configuration sequence |
| 4 | configuration write: `chip` (`4'hF` = all), front-end register `addr`, `data` |
| 5 | end of sequence |
| 6 | front-end synchronous reset (also restarts the MDC frame counter) |
| 7 | start test pulses |
| 8 | stop test pulses |

Global registers (16 bit, reset value in brackets): `0` channel enable mask (`FFFF`), `1` split
threshold (32), `2` test pulse count (100), `3` test pulse delay in clocks (0), `4` test pulse
control, polarity in bit 8 and width in clocks in bits 7:0 (`0010`), `5` mask of front-end
chips present (`0003`), `6` clock skew setting (0, brought out on `clk_skew`). Read-only
registers: `0x10` locked channels, `0x11` active channels, `0x12` sticky error mask.

Answers travel upstream as readback words `{4'hF, code[3:0], addr[7:0], data[15:0]}`:

| code | meaning |
|---|---|
| 1 | register read answer |
| 2 | configuration write verified; `addr` is the front-end register, data holds the chip in bits 15:12 and the number of rewrites in bits 7:0 |
| 3 | configuration write failed after all retries (same fields) |
| E | error flag. The data field holds the cause: 1 unknown opcode, 2 wrong sequence, 3 parity error, 4 sequence too long, 5 bad register address |

**Sequence protection.** Configuration writes are buffered, up to 16 per sequence. They are
sent to the front-end only after a correct `begin, write..., end` sequence. Each of these
discards the whole sequence and raises a sequence error:

* a write or end outside a sequence;
* a second begin;
* an end with no writes;
* a buffer overflow;
* a begin while the previous sequence is still being sent.

Nothing of a rejected sequence reaches the chips.

**Front-end configuration with read-back (toast_config).** All chips share one configuration
line pair. The line rests low and sends one bit every `CFG_DIV` (16) clocks, most significant
bit first:

* MDC to chips: `start, rw (1 = write), chip[3:0], addr[7:0], data[15:0]`;
* addressed chip to MDC: `start, data[15:0]`.

For each buffered write the block sends the write, to one chip or as a broadcast. It then reads
the register back from every addressed chip; for a broadcast, that is every chip set in register
5. It compares each answer with the written value. A chip that answers wrongly, or not within
64 bit periods, is rewritten individually and read again, up to 3 times. The outcome of each
write goes upstream as a readback word.

## Calibration test pulses (tp_gen)

A free-running reference repeats every `TP_PERIOD` = 4096 clocks (25.6 us, 39.06 kHz). The start
command arms a train of `tp_count` pulses, one per reference period. Each pulse begins exactly
`tp_delay` clocks (6.25 ns steps) after the reference and lasts `width` clocks. Polarity sets
the idle level of the output. The stop command ends a train at once. The single `test_pulse`
output drives all front-end chips in parallel. The hits the pulses cause come back through the
normal data path.

## SEU protection (tmr_reg)

The global registers are held in three copies with a majority vote. A copy that disagrees with
the vote is rewritten with the voted value on the next clock (scrubbing), and a mismatch flag is
raised. The test-only input `seu_flip` can flip bits of single copies. The top module ties it to
zero. Only the global registers are triplicated. The published design plans triple redundancy
for all critical logic, and that is not done here.

## Parameters (mdc_top)

| parameter | default | note |
|---|---|---|
| `NCH` | 16 | input links, as published |
| `MAIN_FIFO_DEPTH` | 256 | 32-bit words, as published (main FIFO 32 x 256) |
| `CH_FIFO_DEPTH` | 64 | own choice: holds one frame of 32 hits plus header and trailer |
| `ACT_TIMEOUT` | 256 | own choice: clocks without a transition before a channel sleeps |
| `FRAME_TIMEOUT` | 8192 | own choice: two test pulse periods |
| `TP_PERIOD` | 4096 | own choice, chosen to match the published 39.1 kHz test pulse rate |
| `CFG_DIV` | 16 | own choice: clocks per configuration-line bit |
| `LINK_FIFO_DEPTH` | 64 | own choice: buffer in front of each upstream transmitter |

## Capacity

* **Upstream.** Two links give 640 Mb/s on the line and 512 Mb/s of payload. A realistic busy
  module (7 chips, about 10 Mb/s each, about 70 Mb/s) uses about 14 % of that, and usually
  link 0 alone.
* **Bench case.** The bench measurement has 2 chips on 4 links, 128 hits per frame, at a
  39.1 kHz pulse rate. It needs 34 words per channel FIFO (64 available) and 138 words of main
  FIFO (256 available). Split over both links, that is 70 words per link, which takes 1400
  clocks of the 4096-clock period. `tb_mdc_top` runs exactly this case.
* **50 % occupancy.** 8 chips x 64 strips at 50 % occupancy means 256 hits per frame on 16
  links. That is 292 upstream words per frame, 146 per link, or 2920 of the 4096 clocks. The
  frame is larger than the main FIFO, so it streams through while being built, with
  back-pressure into the channel FIFOs (18 words each). `tb_mdc_occupancy` runs this case at
  the 39.06 kHz pulse rate. The last word of each frame leaves 3807 clocks after its test pulse,
  inside the 4096-clock period, and no hit is lost.

## Simulation

All testbenches are self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_mdc_top \
  rtl/mdc_pkg.sv tb/ref8b10b_pkg.sv $(ls rtl/*.sv | grep -v mdc_pkg) \
  tb/toast_link_model.sv tb/elink_rx_model.sv tb/toast_cfg_model.sv tb/tb_mdc_top.sv
./obj_dir/Vtb_mdc_top
```

Replace `tb_mdc_top` with any other `tb_<block>`; the models in `tb/` that a testbench does not
use can stay on the command line. Verilator has only two states, so the design resets everything
it reads.

| testbench | what it covers |
|---|---|
| `tb_mdc_top` | Whole MDC at default parameters. Four skewed front-end links, command line, configuration chips and two upstream receivers are modelled. It checks: channel lock after random bitslips, register access, a broadcast configuration, a configuration with one faulty chip that is rewritten, command errors, a synchronous reset, three test pulse frames of 128 hits split over both links, single-link frames, zero suppression, round-robin order, a channel overflow, a wrong frame number, a lost hit and a frame timeout. Every upstream word is compared with a model and every mechanism must occur. |
| `tb_mdc_occupancy` | Whole MDC at default parameters with all 16 links locked and 16 hits per link per test pulse (256 hits per frame). Checks every hit, the CRCs, the even split, and that each frame has left before the next pulse. |
| `tb_readout_channel` | Lock through bitslips on a skewed link, one word per 32 clocks, activity timeout, overflow drop rule, frame_ready. |
| `tb_readout_mux` | Frame layout, CRC, round-robin order, zero suppression, timeout, status bits, stalls. |
| `tb_frame_check` | Frame and count mismatches, sticky mask. |
| `tb_elink_balancer` | Single and split mode, even split, duplicated MDC header and trailer, readback priority, frames larger than the main FIFO. |
| `tb_elink_tx` / `tb_enc8b10b` | Bit-exact line output and running disparity against reference tables; 20 clocks per word. |
| `tb_elink_rx_down` | Framing, parity, latency. |
| `tb_cmd_config` | Every opcode, every error cause, sequence rules, register reset values. |
| `tb_toast_config` | Unicast and broadcast write, read-back, rewrite, retry limit, missing chip. |
| `tb_tp_gen` | Pulse count, delay to the clock, width, polarity, stop. |
| `tb_tmr_reg` | Single-copy upsets are voted out and scrubbed; double upsets show the limit. |
| `tb_sync_fifo` | Random traffic against a queue model at full and empty. |

The behavioural models in `tb/` stand in for the parts outside the chip: a front-end data link
(`toast_link_model`), front-end configuration registers (`toast_cfg_model`) and an lpGBT
upstream receiver (`elink_rx_model`).

## What is not in the RTL

* **Clock distribution.** The time-skew-controlled clock outputs to the front-end chips are not
  here. Only the 16-bit skew register is brought out, on `clk_skew`.
* **Pads and power.** There are no sLVS drivers and receivers, no DDR output cells and no power
  domains. The serial signals are plain one-bit ports, and each e-link is two bits per clock.
* **Memories.** The FIFOs are register arrays (`sync_fifo`), not generated SRAM macros. For a
  chip, replace the array in `sync_fifo` with a macro of the same size.
* **External devices.** The front-end chip, the lpGBT and the off-detector card are external
  and appear only as testbench models.

## Departures and limits to be aware of

* The published design gives no protocols. Input word format, idle pattern, upstream word
  encodings, CRC polynomial, downstream framing, command set, register map and configuration
  line protocol are all invented here. To match real front-end chips, change `mdc_pkg`,
  `chan_align` and `toast_config`.
* The published ToASt trailer carries "the number of channels with events". Here it carries the
  number of hits of that link in the frame, which is the same as the number of strips hit.
* The rule that picks split mode (FIFO level against a threshold) and the whole-block greedy
  split are this design's own reading of "evenly split at high occupancy".
* Lint notes: unused package constants, unconnected status outputs, and `rst_n` used both as an
  asynchronous reset and in the `disable iff` of FIFO assertions. All are intended. There are no
  latches, loops or multiply-driven nets.

# FF-LYNX link interfaces in SystemVerilog

FF-LYNX is a serial protocol for the control and readout electronics of
silicon trackers. One link carries three things that normally need separate
links: trigger signals, which must arrive with a fixed and known latency;
timing and control; and data frames of any length. To do this, every cycle of
the experiment's reference clock F is split into two channels:

* the **THS channel** carries 2 bits per cycle. Triggers, frame headers and
  synchronization marks travel there as 6-bit patterns over 3 cycles.
* the **FRM channel** carries the remaining bits of the cycle. Frame data
  travels there.

This repository holds a synthesizable implementation of the transmitter
(FF-TX), the receiver (FF-RX) and the two helper modules a ring of readout
chips needs: a data concentrator (DCM) and a redundancy manager (RM). The top
level, `ff_lynx_node`, is one node of such a ring.

The protocol structure follows the published FF-LYNX description: the channel
split, the frame formats, the error-protection methods, the fixed-latency
trigger frames with hit recovery, and the block partitioning of the
interfaces. Much of the detail is this implementation's own, because the
description does not give it. That includes:

* the code words;
* the CRC polynomial;
* the bit orders;
* the synchronization algorithm;
* the buffer formats;
* the concentrator and redundancy policies.

The sections below mark which is which.

## The link, cycle by cycle

Everything runs on one clock, `clk`, the bit clock of the link. One line bit
is sent per clock (the double-wire link: clock and data on separate lines).
A reference cycle is `SPEED` bit clocks long. A one-clock pulse, `tick`,
marks its last clock. The transmitter's serializer generates `tick`; the
receiver rebuilds it as `tick_rx`.

| SPEED | line rate at F = 40 MHz | THS bits | FRM bits per cycle |
|-------|-------------------------|----------|--------------------|
| 4     | 160 Mb/s                | 2        | 2                  |
| 8 (default) | 320 Mb/s          | 2        | 6                  |
| 16    | 640 Mb/s                | 2        | 14                 |

Within a cycle, the two THS bits go first and the FRM bits follow, most
significant bit first. This order is an implementation choice.

### THS patterns

A pattern occupies the THS bits of three consecutive cycles:

| pattern | bits (first cycle first) |
|---------|--------------------------|
| idle    | `00 00 00` |
| sync    | `01 11 10` |
| header  | `10 11 01` |
| trigger | `11 00 11` |

All four words are at Hamming distance 4 from each other. The words were
chosen for this implementation; the protocol asks only for a "robust" 6-bit
code. How far that robustness reaches is the subject of
[Limits of the THS code](#limits-of-the-ths-code).

### Variable-latency (VL) frames

A VL frame is a data frame of any length. Each one is announced by a header
pattern, and the frame starts in the FRM channel of the header's first cycle.
It is made of these fields, in order:

| field | bits | notes |
|-------|------|-------|
| frame descriptor | 12 | extended Hamming(12,7) code of `{len[3:0], dtype, label_on, last}`; the overall parity bit goes first |
| words | 16 × `len` | `len` = 0 to 15; when `label_on` is set, the first word is the label |
| CRC | 8 | only when `crc_en` is set; CRC-8, x^8+x^2+x+1, zero initial value, over the words |

The last cycle of a frame is padded with zeros. At 8x, a frame with a label,
three words and a CRC is 12 + 64 + 8 = 84 bits, which is 14 cycles.

Inside the descriptor, code bit `c[p-1]` holds Hamming position `p`:

* the parity bits are at positions 1, 2, 4 and 8;
* the data bits are at the other positions, with `last` (bit 0 of the
  information word) at position 3.

A single error in the descriptor is corrected. A double error makes the
receiver drop the frame.

The published frame description gives a CRC-on/off choice per frame. The
7-bit descriptor, however, has no bit that could carry it. Here the CRC is
therefore a static setting, `crc_en`, and the transmitter and the receiver
must agree on it.

### Fixed-latency (FL) frames: trigger data from the chips

On an up-link, readout chips send hit data (timing and position of a hit) for
the trigger processor. These frames must have a constant latency. An FL frame
works as follows:

* The first hit opens a window of `NC` reference cycles.
* Up to `NH` hits seen in the window are packed into one frame, each with its
  timing relative to the first hit.
* At the end of the window, the frame is sent at once: a trigger pattern in
  the THS channel, and `NC` cycles of FRM bits.

An FL frame pre-empts a VL frame that is being sent. The VL frame is
suspended for those `NC` cycles and then continues where it stopped.

The payload is `NC × (SPEED−2)` bits:

```
{ hit count − 1 : CNTW-bit Hamming code,
  NH × { timing : TW bits, address : ADDR_W bits },   first hit first, unused fields zero
  even parity over the hit fields : 1 bit }
```

* `TW = max(1, ceil(log2(NC)))` bits of timing.
* `CNTW` is whatever remains of the payload.
* The default, 8x with `NC = 3` and `NH = 2`, gives 3 + 2×7 + 1 = 18 bits.
  Its count code is Hamming(3,1), a three-fold repetition.

The count code is an ordinary Hamming code over positions 1 to `CNTW`. The
count is stored as data and the unused data positions are zero. For the
frame sizes the description lists, this gives Hamming 1/3, 2/5 and 3/7.

**Hit recovery (`RECOVERY = 1`).** A hit can arrive in the last cycle of a
full window. It is then carried into a second frame, whose window opens on
the very next cycle. There it is sent with timing −1, which is coded as all
ones in the timing field. Hits that overflow in earlier cycles are lost and
counted on `hits_lost`; carried hits are counted on `hits_carried`. The
receiver turns the timing field back into a signed value, `fl_time`. The
absolute hit time is the frame start minus `NC` plus `fl_time`.

On a down-link (`FL_EN = 0`), the trigger pattern is a level-1 trigger
(`trg_in`). It carries no FRM data, and a VL frame keeps running underneath
it.

## Transmitter (`ff_tx`)

```
host words ─> TX_BUF ─> FRM_BLD ──┐
host descriptors ───────┘         ├─> SER ─> dat
hits ─> FL builder ─> THS_SCH ────┘
```

| block | module | job |
|-------|--------|-----|
| TX_BUF | `ff_tx_buf` | FIFO of host words. `get_data` is high while it is not full. |
| FRM_BLD | `ff_frm_bld` | Waits until all `len` words of the next descriptor are buffered, then asks for a header. From the granted cycle on, it streams the descriptor, the words and the CRC. It holds its state on cycles marked `stall`. |
| FL builder | `ff_fl_bld` | The hit window, the frame packing and hit recovery. Its `trg_in` output requests the trigger pattern that announces the frame. |
| THS_SCH | `ff_ths_sch` | Puts patterns on the THS channel with priority trigger > sync > header. See below. |
| SER | `ff_ser` | Loads `{ths, frm}` on `tick` and shifts it out. |

Rules of the THS scheduler:

* A trigger requested at tick *t* starts its pattern `TRG_LAT` cycles later.
* A header or sync is not started if a trigger would fall due before the
  header or sync ends.
* A trigger that still collides with another pattern is queued and reported
  on `trg_late`.
* `SYNC_N` syncs are sent after reset, and then one every `SYNC_PERIOD`
  cycles.

Measured latencies at the defaults:

* **Trigger.** A trigger pattern starts on the wire `TRG_LAT + 1` cycles after
  the tick that sampled `trg_in`. The extra cycle is the serializer load.
  `TRG_LAT` is 3 on a down-link and `NC` on an up-link.
* **FL frame.** The frame starts `NC + 1` cycles after its first hit.
* **VL frame.** A header starts at least 2 cycles after the frame's last word
  entered TX_BUF.

## Receiver (`ff_rx`)

```
dat ─> DES ─> SYNC (phase, lock)
         └──> THS_DET ─> FRM_ANA ─> RX_BUF ─> host
                            └─────> FL analyzer ─> fl_*
```

### Finding the reference cycle (`ff_des`, `ff_sync`)

The receiver is given only the line clock. It must work out which of the
`SPEED` bit positions starts a cycle. It does so as follows:

* `ff_des` shifts the line into a register. On every clock it offers the last
  6 bits (`raw6`) to `ff_sync`.
* `ff_sync` keeps one counter per bit phase. The counter counts sync patterns
  seen ending at that phase: `01` `11` `10` read as the THS bits of three
  cycles, `SPEED` bits apart.
* The first phase to reach `LOCK_TH` becomes the locked phase, and `tick_rx`
  starts.
* While locked, another phase that reaches `UNLOCK_TH` takes over. This is a
  relock after a slip. It is allowed only after the locked phase has gone
  `WD_CYC/2` cycles without a sync. Frame data can look like a sync at a
  wrong phase several times within one sync period, and a link that still
  delivers its syncs must not be moved by it.
* `WD_CYC` cycles without a sync at the locked phase drop the lock.

The FF-LYNX work compared several threshold-counting synchronization
algorithms, but does not specify one. This is one such algorithm, and the
thresholds are parameters. With the defaults, a receiver locks about 12
cycles after the transmitter leaves reset.

### Pattern detection (`ff_ths_det`)

Once per cycle, the 6-bit window made of the last three THS pairs is compared
with the three code words:

* At distance 0 or 1 from a word, that pattern is reported on `pat`. `corr`
  is set when one bit was corrected.
* After a detection, the next two windows are skipped, because they overlap
  the pattern just found.
* A window at distance 2 may be a double error. It may also just be the front
  of a pattern still arriving. It is therefore flagged on `err` two cycles
  later, unless a pattern was found in between.

### Limits of the THS code

The protocol's goal is that single bit flips are corrected with correct
timing, and that double flips are detected. With 2 bits per cycle, the
window one cycle before a pattern already holds two thirds of it. No three
6-bit code words exist whose shifted windows all stay at distance 3 or more
from every word. A search over all candidate sets confirmed this. The
consequences for the code used here:

* A pattern without errors is always detected, on its third cycle.
* A single flip is always corrected. In 16 of the 18 single-flip cases the
  pattern keeps its timing. The two exceptions are the two middle bits of the
  trigger word. A flip there makes the window one cycle early read as a
  corrected header or sync.
* 29 of the 45 double flips are flagged. Double flips never turn a pattern
  into another pattern on its own cycle.

The THS_DET testbench measures exactly these numbers. If the link's error
rate makes this matter, the place to change it is the code words in
`ff_lynx_pkg` together with the decision rule in `ff_ths_det`.

### Frames (`ff_frm_ana`, `ff_fl_ana`, `ff_rx_buf`)

A pattern is known only at its third cycle, but its frame started with its
first cycle. `ff_frm_ana` therefore passes the FRM bits through a 3-cycle
delay line and tags them before they leave:

* **Header.** The oldest cycle in the line starts a VL frame.
* **Trigger on an up-link.** The oldest cycle and the next `NC − 1` cycles
  are an FL frame. They go to `ff_fl_ana` and are skipped by the VL parser.

The VL parser appends `SPEED−2` bits per cycle to an accumulator. On the
clocks between cycles it takes out one field per clock:

* the descriptor, which is Hamming-decoded;
* the words;
* the CRC, when `crc_en` is set.

The last word is held back until the CRC is known, so that it can carry
`eof` and `crc_err`.

Each word becomes one `rx_entry_t` in RX_BUF. An entry holds:

* the word;
* the descriptor fields;
* `sof`, marking the first word of a frame;
* `eof`, marking the last word;
* `nodata`, set for a frame without words, which gives one entry;
* `crc_err`;
* `fd_corr`, set when a descriptor bit was corrected.

### Host handshake

All host ports use the FF-LYNX handshake:

* `data_valid` says a word is on offer.
* The word is taken on a clock edge where `get_data` and `host_ce` are both
  high.
* With `get_data` low the word stays put. This is the flow control.

`host_ce` lets a host work at the reference rate: connect it to `tick` or
`tick_rx`. Inside the node it is tied to 1.

## Ring node (`ff_lynx_node`)

```
dat_in[0] (previous node) ─> FF-RX ─┐
                                    RX_RM ─> DCM ─> TX_RM ─> FF-TX ─> dat_out[0] (next node)
dat_in[1] (bypass)        ─> FF-RX ─┘        ^             └─> FF-TX ─> dat_out[1] (bypass)
                                  local chip frames (loc_*)
```

Each node receives the link from the previous node and a bypass link from
the node before that. It sends the same stream on two links: to the next
node, and past it.

* **RX_RM (`ff_rx_rm`).** Uses the primary link while its receiver is
  locked, and the bypass link when it is not. It switches back when the
  primary link locks again.
  * It switches only between frames. The one exception is a selected link
    that died with its buffer empty.
  * The input that is not selected is drained. After a switch, entries are
    discarded until the next start of frame, so only whole frames are
    forwarded.
  * A failed node is therefore skipped. The frames in flight at the moment
    of the switch are lost.
* **DCM (`ff_dcm`).** Merges the stream received from upstream with the
  local chip's frames.
  * It picks the next input round-robin, and always forwards a whole frame
    (descriptor, then words).
  * An entry found without a start-of-frame mark is discarded, and pulses
    `dropped`.
  * **Event building** is optional and off in the ring node. It is enabled
    with the `EVB` parameter. It merges two frames that share a label, such
    as a time stamp or an event number. The merge happens when the frame
    picked and the frame at the head of another input both carry a label,
    the labels are equal, and together they fit in 15 words. The two frames
    then leave as one frame:
    * one descriptor with the combined length;
    * the first frame's words, label first;
    * the second frame's words, without its label.

    Only frames that are present at the same moment are merged. The DCM
    never holds a frame back to wait for a partner.
* **TX_RM (`ff_tx_rm`).** Offers every word to both transmitters. It
  releases a word only when every enabled transmitter has taken it.

The local chip's hits go out as FL frames on both links. The next node
decodes FL frames and triggers and presents them on `trg_out` and `fl_*`.
They are not forwarded further around the ring, because the merging of
trigger data is not described.

### Star topology

Several front-end links feed one DCM (`N_IN` inputs),
whose output drives a faster link, for example four 4x links onto one
16x link. Every module here runs on the single bit clock of its own link.
A real star of mixed speeds therefore needs:
* one bit clock per link speed, all derived from the shared reference
  clock;
* a clock-domain crossing at the DCM inputs.

Neither is part of this RTL. The star testbench runs all links on one
clock, so there the 16x link has the bit rate of a 4x link.


## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `SPEED` | 8 | bits per reference cycle: 4, 8 or 16 |
| `FL_EN` | 1 | 1 = up-link with FL trigger frames; 0 = down-link with L1 triggers |
| `NC` | 3 | FL frame length in cycles |
| `NH` | 2 | hits per FL frame |
| `HPC` | 2 | hit inputs per cycle |
| `ADDR_W` | 5 | hit address bits |
| `RECOVERY` | 1 | carry last-cycle overflow hits into an immediate second frame |
| `BUF_DEPTH` | 32 | TX_BUF / RX_BUF depth in words |
| `SYNC_N`, `SYNC_PERIOD` | 4, 32 | syncs after reset, and the sync interval in cycles |
| `LOCK_TH`, `UNLOCK_TH`, `WD_CYC` | 3, 3, 128 | synchronizer thresholds and watchdog |

The FL frame configurations evaluated for trigger-transmission efficiency
are listed below. Only the first is the default; the others need the
parameters shown. The count code width `CNTW` follows from the other sizes
in each case.

| configuration | parameters | CNTW |
|---------------|------------|------|
| 8x, 3 cycles, 2 hits | the default | 3 |
| 8x, 5 cycles, 3 hits | `NC=5 NH=3` | 5 |
| 16x, 4 cycles, 7 hits | `SPEED=16 NC=4 NH=7` | 6 |
| 16x, 8 cycles, 13 hits | `SPEED=16 NC=8 NH=13` | 7 |

Hit recovery needs a spare timing code: `NC < 2^TW`. An elaboration-time
check enforces this.

The fraction of hits that reach the trigger side was measured for each
configuration. The input was Poisson hits at 0.125 hits per cycle from each
front-end circuit: one circuit at 8x, four at 16x. The published figures
come from the FF-LYNX efficiency study, and the measured ones from
`tb_ff_tte`:

| configuration | published | measured here |
|---------------|-----------|---------------|
| 8x, 3 cycles, 2 hits | 96.57 % | 98.7–98.8 % |
| 8x, 5 cycles, 3 hits | 98.53 % | 99.3–99.5 % |
| 16x, 4 cycles, 7 hits | 97.29 % | 99.98–100 % |
| 16x, 8 cycles, 13 hits | 98.94 % | 100 % |

The measured values are higher than the published ones, for two reasons.
First, hit recovery saves most of the hits that would otherwise overflow a
window. Second, in this model a hit is lost only when a frame is full. How
the published study counted losses is not known. Its figures may include
effects this model leaves out, so treat them as a lower bound rather than a
match.

## Files

* `rtl/ff_lynx_pkg.sv` holds the shared code words, types, and the Hamming
  and CRC functions. Compile it first.
* `rtl/ff_fifo.sv` is the FIFO used by both buffers.
* The other `rtl/` files hold one module each, named as in the block lists
  above.
* `tb/ff_ref_pkg.sv` holds reference models for the testbenches. They are
  written independently of the RTL: the CRC by polynomial division, and the
  Hamming codes from explicit parity equations.
* `tb/tb_<module>.sv` is a self-checking testbench per module. Each one ends
  by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/ff_lynx_pkg.sv tb/ff_ref_pkg.sv rtl/*.sv \
          tb/tb_ff_lynx_node.sv --top-module tb_ff_lynx_node
./obj_dir/Vtb_ff_lynx_node
```

Replace the last file and the top name to run another testbench. For
`tb_ff_tte`, also add `tb/tte_link.sv`; for `tb_ff_emu`, add
`tb/emu_link.sv`. Width
warnings appear in `ff_fl_bld`: an index into a two-entry array is a
counter that is one bit wider than the index. They are harmless.

What the testbenches cover:

* **Block tests.** Each block is checked against values the testbench works
  out itself. This includes:
  * the frame bit strings, their cycle counts and the 14-cycle example frame;
  * trigger latencies;
  * the FL frame layouts for the two hit sequences with and without
    recovery;
  * single and double error handling in THS patterns, descriptors, hit
    counts and CRC;
  * lock, relock and loss of lock;
  * buffer order, hold and overflow;
  * round-robin merging, and event building of same-label frames;
  * switching between the primary and bypass links.
* **`tb_ff_rx`.** A transmitter and a receiver joined by a delayed line. It
  checks that every VL entry arrives intact under random flow control, that
  every FL hit is decoded with a constant trigger latency, and that THS bit
  flips are corrected.
* **`tb_ff_tte`.** The efficiency workload above. Four transmitter-receiver
  pairs, built by the helper `tb/tte_link.sv`, run side by side. The test
  checks that every hit is either decoded or reported lost, that no FL frame
  arrives with an error, and that each measured efficiency is within 3
  points of the published one.
* **`tb_ff_emu`.** Two down-links under random load, using the helper
  `tb/emu_link.sv`. Triggers and data packets arrive as Poisson processes at
  two rates:
  * at 4x: 400 kHz each, with 5-word packets;
  * at 8x: 133 kHz each, with 8-word packets.

  These are the loads of the published link-emulator runs, taking F as
  40 MHz. The test checks that every packet and every trigger arrives, and
  that every trigger has the same latency unless the scheduler reported it
  delayed on `trg_late`. About 1–2 % of triggers are delayed at these rates.
  They are triggers that follow the previous one by less than the 3-cycle
  pattern length, so their patterns cannot both go out on time.
* **`tb_ff_star`.** The star topology. Four 4x front-end links are
  received and merged by one DCM onto a 16x link. Every frame must reach
  the far end whole and in order per source.
* **`tb_ff_lynx_node`.** The end-to-end test, at the default parameters. A
  source and three ring nodes feed a sink receiver. The middle node is
  killed, and the test checks that the next node bypasses it and later
  switches back. It counts every mechanism and fails if one never happened:
  * lock;
  * frames with CRC;
  * FL frames at the nodes and at the sink;
  * pre-emption of a VL frame;
  * hits recovered and hits lost;
  * flow control and back-pressure;
  * merges;
  * both redundancy switches;
  * a corrected THS pattern.

## Not implemented

* **The serial host port.** The description names a serial host port besides
  the 16-bit parallel one, but does not define its format.
* **The single-wire link.** Clock and data on one line, with an "8b/10b-like"
  FRM encoding. Only its existence is stated.
* **Forwarding of FL trigger data** around a ring.
* **Link drivers and receivers.** They are electrical parts.

# SpaceFibre single-lane CODEC and its hardware validator

SpaceFibre is a serial link for spacecraft data handling. It carries several
independent streams (virtual channels, VCs) and short broadcast messages over one
8B/10B-coded lane. Lost or corrupted frames are repaired by retransmission, so the
application sees a reliable, in-order byte stream per VC. This repository holds a
synthesizable SystemVerilog model of one end of such a link, the *CODEC*. It sits
between host-side FIFOs and a 40-bit SerDes word interface. Around it is a
*validator*: two CODECs with packet generators, checkers, error injectors and a
trace memory, for testing the link end to end.

The design runs one 40-bit coded word (four 8B/10B symbols) per clock. At the
intended 62.5 MHz clock that is 2.5 Gb/s on the line. In simulation at the default
sizes, one VC with 100-word packets carries 0.90 payload words per clock. That
remainder is the cost of frame delimiters, acknowledgements, flow-control words and
SKIP words.

Where the SpaceFibre standard fixes something this design does not reproduce bit for
bit, the design makes its own concrete choice. Examples are control-word codes, the
exact lane state machine, and the flow-control encoding. These choices are listed in
the section [Own choices and departures](#own-choices-and-departures). Two ends built
from this RTL interoperate with each other. They are **not** claimed to interoperate
with other SpaceFibre equipment.

## Structure

```
spfi_validator                 two CODECs + test hardware (top)
 ├─ spfi_codec ×2              one SpaceFibre end
 │   ├─ spfi_data_link         framing, scheduling, retry, flow control
 │   │   ├─ spfi_async_fifo    OUT VC / IN VC / OUT BC / IN BC buffers (hclk ↔ clk)
 │   │   ├─ spfi_mac           medium access controller: what to send next, framing
 │   │   ├─ spfi_retry_buffer  error recovery buffer (go-back-N replay)
 │   │   ├─ spfi_dl_tx         scrambler, CRC-16 insertion, ACK/NACK/FCT insertion
 │   │   │   ├─ spfi_scrambler
 │   │   │   └─ spfi_crc16
 │   │   └─ spfi_dl_rx         control-word split, CRC/sequence check, de-scrambling,
 │   │       └─ spfi_word_id_fsm  commit/rollback into IN VC, ACK/NACK/FCT generation
 │   ├─ spfi_lane_layer
 │   │   ├─ spfi_lane_init_fsm lane initialisation handshake
 │   │   ├─ spfi_lane_tx       lane control words, IDLE fill, SKIP every 5000 words
 │   │   ├─ spfi_enc8b10b      4 symbols per clock, running disparity chained
 │   │   ├─ spfi_word_sync     comma search over 40 bit offsets, lock/unlock
 │   │   ├─ spfi_dec8b10b      table decoder with code and disparity errors
 │   │   ├─ spfi_elastic_buffer recovered clock → CODEC clock, SKIP drop/repeat
 │   │   └─ spfi_lane_rx       lane control word detector
 │   └─ spfi_mgmt_regs         configuration and status registers
 ├─ spfi_pkt_gen ×2            incrementing-data packet generator
 ├─ spfi_pkt_check ×2          incrementing-data checker
 ├─ spfi_error_inject ×4       XOR-mask injector on TX code and RX code per CODEC
 └─ spfi_rolling_memory ×2     8192-word TX and RX trace with trigger and interrupt
```

Everything shared lives in `rtl/spfi_pkg.sv`. That includes the word type, the
control-word codes, the CRC, 8B/10B and scrambler functions, and the configuration and
status structs.

## Words

A word is 36 bits: `{k[3:0], d[31:0]}`. Byte 0 is `d[7:0]` and is sent first. `k[i]`
marks byte *i* as a K (control) character. After encoding, symbol 0 occupies
`code[39:30]`.

| Word | Byte 0 | Byte 1 | Byte 2 | Byte 3 |
|---|---|---|---|---|
| Lane control (INIT1/2/3, STANDBY, IDLE, SKIP) | K28.5 | type | ~type | type |
| SDF (start of data frame) | K28.3 | 0x10 | VC | seq |
| SBF (start of broadcast frame) | K28.3 | 0x13 | channel | seq |
| EDF / EDF_EOP (end of data frame, EOP = packet ends here) | K28.3 | 0x11 / 0x12 | CRC-16 low | CRC-16 high |
| EBF (end of broadcast frame) | K28.3 | 0x14 | CRC-16 low | CRC-16 high |
| ACK / NACK | K28.3 | 0x20 / 0x21 | seq | CRC-8 of bytes 1–2 |
| FCT (flow control token) | K28.3 | 0x22 | {vc[4:0], count[2:0]} | CRC-8 of bytes 1–2 |

Only lane control words carry the comma character K28.5. Word alignment therefore
relies on them alone. Data-link control words start with K28.3.

On the host side, a VC word is 33 bits: `{eop, data[31:0]}`. A broadcast (BC)
message is 72 bits: `{channel[7:0], data[63:0]}`.

## Data link layer

### Transmit: what goes out next (MAC)

`spfi_mac` builds one frame at a time. It chooses among three sources:

1. **A replay from the retry buffer.** This always wins. While a replay is pending,
   no new frame starts.
2. **A broadcast frame.** It is chosen while the BC bandwidth counter is not
   negative, or whenever no VC is ready.
3. **A data frame from an OUT VC.**

A VC is *ready* only when all three of these hold:

- its buffer holds data;
- the far end has granted it a credit;
- the current timeslot is one of the VC's slots.

The MAC chooses among ready VCs in this order:

- **Priority.** The value is 1..15 and 1 is the highest. A VC never sends while a
  VC of better priority is ready.
- **Bandwidth reservation.** Each VC has a signed counter. It gains the VC's
  configured share (in percent) for every word sent on the link. It loses 100 for
  every word the VC itself sends. A VC whose counter is not negative is within its
  share and goes first.
- **Round robin**, starting from the VC after the last one served.

Timeslots: there are as many slots as VCs. Each slot lasts `slot_cycles` clocks. A
value of 0 means slots never advance, so only slot 0 is used. After reset every VC
owns every slot.

A data frame is `SDF`, then 1 to `MAX_FRAME` (64) data words, then `EDF` or
`EDF_EOP`. The frame ends at the end of a packet, after 64 words, or when the VC
buffer runs dry. A packet may therefore span several frames. A BC frame is always
`SBF`, two data words, then `EBF`.

### Scrambling and CRC (`spfi_dl_tx`)

Only the data words of data frames are scrambled:

- additive scrambler, polynomial x¹⁶+x⁵+x⁴+x³+1;
- 32 bits advance per word;
- seed 0xFFFF, reloaded at every SDF.

Both ends must set `scramble_en` the same way.

The frame CRC is CRC-16/CCITT: polynomial 0x1021, initial value 0xFFFF, most
significant bit first. It covers, in order:

- bytes 1–3 of the SDF or SBF;
- every data word as it appears on the line, i.e. after scrambling;
- the type byte of the end word.

The result is placed in bytes 2–3 of the EDF or EBF.

ACK, NACK and FCT words are inserted between any two frame words. The order is NACK,
then ACK, then FCT. ACK, NACK and FCT carry a CRC-8 (polynomial 0x07) over their
type and argument bytes. A receiver ignores a control word whose CRC-8 is wrong.

### Retry (`spfi_retry_buffer`, `spfi_dl_rx`)

This is the heart of the link's reliability. Every frame carries an 8-bit sequence
number, and the scheme is go-back-N.

**Sender side.** Each new frame is written, word by word, into a 256-word circular
buffer. The words are stored *before* scrambling and CRC, so a replay passes through
the same transmit path and comes out bit-identical. A table of 8 entries, indexed by
the low bits of the sequence number, holds the start address of each unacknowledged
frame.

The MAC may start a new frame only if both of these hold:

- fewer than 8 frames are outstanding;
- the buffer has room for a maximum-size frame.

Three events act on the buffer:

- **ACK(s)** releases every frame up to and including *s*.
- **NACK(s)** schedules a replay starting at frame *s*.
- **Timeout.** If frames are outstanding and nothing is acknowledged for `TIMEOUT`
  (1024) clocks, a replay starts from the oldest frame.

A replay waits until the MAC is between frames. It then streams all stored words
from the chosen frame up to the write pointer.

**Receiver side** (`spfi_dl_rx`). Data words go straight into the IN VC buffer while
the frame arrives. At the end word, the frame is **committed** if all of these hold:

- its CRC-16 is right;
- its sequence number is the one expected;
- no corrupted word or buffer overflow was seen.

Otherwise the buffer is **rolled back**, and the partly written frame vanishes. This
is why the IN VC buffers are `spfi_async_fifo` instances with `COMMIT_MODE = 1`. The
reader sees words only up to the last commit. A rollback moves the write pointer back
to that point.

The receiver's replies:

- **Good frame:** ACK with its sequence number, and the expected number is
  incremented.
- **First bad frame** after a good one: a single NACK naming the expected number.
  Frames that follow out of order are dropped silently until the replay arrives. This
  keeps one error from triggering a storm of NACKs.
- **Duplicate** of a frame already accepted (sequence number up to 128 behind): not
  written, but acknowledged again. This covers an ACK that was lost.

A corrupted ACK or NACK therefore costs time but never data. Either the next ACK
covers it, or the sender's timeout replays. The full-size testbench corrupts about
one word in 3000 on the line, which is the rate expected at a bit error rate of 10⁻⁵.
It sees tens of retries per direction, and every packet arrives intact.

BC frames use the same sequence space and are checked the same way. A BC frame may be
inserted inside a data frame. The receiver keeps separate CRC accumulators for the
two frame types, so the nested BC is checked on its own.

### Flow control (FCT credits)

The sender must not start a frame for a VC unless the far end can store it. The
receiver grants credits:

- one credit per 64 words of free IN VC space that has not yet been promised;
- the grant is sent as a **cumulative 3-bit count** in an FCT word.

The sender counts the frames it has started per VC. The VC has credit while
`granted != started` (mod 8), so up to 7 frames may be in flight per VC. Every 512
clocks the receiver re-sends all counts, so a lost FCT only delays traffic.

When the host stops reading an IN VC, credits stop and that VC's sender stalls. The
other VCs keep going. Because frames are at most 64 words and credits cover 64
words each, a committed frame can never overflow the IN buffer.

### Receive framing (`spfi_word_id_fsm`)

Five states track where the received words belong:

- `RX_IDLE`;
- `RX_DATA` (inside a data frame);
- `RX_BC` (inside a BC frame);
- `RX_MIXED` (a BC frame inside a data frame);
- `RX_NOTRAFFIC` (the lane is not active).

An unexpected delimiter or a corrupted word aborts the open frame or frames. The
retry mechanism then recovers them.

## Lane layer

### Initialisation (`spfi_lane_init_fsm`)

The two ends reach ACTIVE through a three-step handshake. Each state has its own
send and exit conditions:

| State | Sends | Moves on when |
|---|---|---|
| STARTED | INIT1 | symbol-synchronised and INIT1 or INIT2 heard |
| CONNECTING | INIT2 | INIT2 or INIT3 heard |
| CONNECTED | INIT3 | it has sent at least 8 INIT3 and heard INIT3, or heard data/IDLE from an end that is already active |

Falling back:

- Each handshake state falls back to WAIT (64 clocks) after 2048 clocks without
  progress.
- ACTIVE drops to WAIT in any of these cases:
  - word synchronisation is lost;
  - nothing is received for 2048 clocks;
  - the far end starts over (INIT1 or INIT2 heard).

Standby:

- A standby request sends STANDBY words and disables the lane.
- A STANDBY heard from the far end also disables it.
- From DISABLED the lane restarts in either of these cases:
  - `lane_start` is set;
  - `auto_start` is set and the far end sends INIT1.

In ACTIVE, `spfi_lane_tx` passes data-link words through. It fills empty clocks with
IDLE, and every 5000th word it sends a SKIP.

### Alignment and decoding (`spfi_word_sync`, `spfi_dec8b10b`)

The SerDes delivers 40 bits per clock at an unknown bit offset. The synchroniser
keeps the last two raw words as an 80-bit window and looks for the 7-bit comma of
K28.5 at all 40 offsets in parallel. Because K28.5 appears only as byte 0 of lane
control words, one comma fixes both symbol and word alignment.

- **Lock:** two commas at the same offset.
- **Loss of lock:** 8 decoder errors within a 256-word window. The search then
  restarts.

During initialisation, INIT words arrive constantly, so lock is gained within a few
words.

The decoder is a 1024-entry table built at elaboration time from the encoder
function. It therefore cannot disagree with the encoder. For each symbol it reports
one of two errors:

- **code error:** the code is valid at neither disparity;
- **disparity error:** the code is valid only at the other disparity. The byte is
  still delivered.

Running disparity is then re-taken from the received code, so one bit error does not
cause a run of disparity errors. Any error on a word marks it `err`. The data link
layer treats such a word as corrupted.

### Elastic buffer (`spfi_elastic_buffer`)

The receive chain runs on the SerDes's recovered clock, while the CODEC runs on its
own clock. The two differ by up to a few hundred ppm. A 16-word dual-clock FIFO
carries words across, with Gray-coded pointers and two-flop synchronisers. SKIP words
absorb the rate difference:

- **Write side (recovered clock).** An incoming SKIP is dropped if the buffer is more
  than half full. Used when the far end is faster.
- **Read side (CODEC clock).** If the word at the head is a SKIP and the buffer is
  less than half full, the SKIP is handed out *without being removed*. It is
  repeated, and the buffer refills. Used when the far end is slower.

With one SKIP per 5000 words, each SKIP can absorb one word of difference per 5000.
That is a 200 ppm mismatch between the two clocks, i.e. two oscillators each within
±100 ppm of nominal.

The full-size testbench runs the two CODECs 100 ppm apart, and both mechanisms fire.
The lane-layer testbench uses a 1000 ppm offset with `SKIP_INTERVAL = 100` to
exercise them hard. Each SKIP's fill level is checked against the half-full mark on
its own side of the clock crossing. The level can therefore lag by the synchroniser
delay (2–3 words). With 16 words, that lag is well inside the margin.

Lane control words are removed after the buffer by `spfi_lane_rx`. Only data-link
words reach the data link layer.

## Configuration and status (`spfi_mgmt_regs`)

The register bank has an 8-bit address and 32-bit data, with single-cycle writes and
combinational reads.

| Address | Access | Contents |
|---|---|---|
| 0x00 | RW | bit0 lane_start, bit1 auto_start (reset 1), bit2 lane_standby, bit3 scramble_en |
| 0x01 | RW | BC bandwidth share, percent (reset 10) |
| 0x02 | RW | timeslot length in clocks (0 = no timeslot rotation) |
| 0x10 + 2v | RW | VC v: bits 3:0 priority (reset 1), bits 14:8 bandwidth share (reset 100/NUM_VC) |
| 0x11 + 2v | RW | VC v: timeslot mask (reset all ones) |
| 0x40 | R | lane state, receive framing state, rx_synced |
| 0x41–0x44 | R | code errors, frames rejected, retries, lane re-initialisations (16-bit, saturating) |

## Validator (`spfi_validator`)

The top holds two CODECs, A and B, side by side. Their 40-bit ports are brought out,
and the link between them is made outside. The end-to-end testbench wires it with a
bit shift per direction and slightly different clocks.

Each CODEC has the following test hardware:

- **Packet generator.** It writes packets of `pkt_len` words, counting up by `step`
  from `seed`, into a chosen OUT VC. The last word carries EOP.
- **Packet checker.** It reads a chosen IN VC and checks the sequence and the EOP
  position. After a mismatch it resynchronises on the received value.
- **Error injectors**, one on the TX code and one on the RX code. Each XORs a 40-bit
  mask into chosen words. Modes are one word now, or every *period* words up to
  *count* words. The TX injector is in the CODEC clock; the RX injector is in that
  port's recovered clock.
- **Rolling memory.** Two 8192 × 36-bit circular buffers record every word sent and
  received, taken just before encoding and just after decoding. When a chosen word
  passes, 4096 more words are recorded, then recording stops and `rm_irq` rises. The
  trace is read back by address, with the oldest word at address 0.

While the generator or checker is enabled on a VC, it owns that VC. The host port of
that VC should be left idle.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_VC` | 4 | virtual channels (1..32) |
| `VC_DEPTH` | 256 | words per OUT and per IN VC buffer |
| `BC_DEPTH` | 16 | BC messages per BC buffer |
| `MAX_FRAME` | 64 | maximum data words per frame; also words per credit |
| `RETRY_DEPTH` | 256 | words in the retry buffer |
| `RETRY_TIMEOUT` | 1024 | clocks without an ACK before a replay |
| `SKIP_INTERVAL` | 5000 | words between SKIPs |
| `EB_DEPTH` | 16 | elastic buffer words |
| `WAIT_CYCLES`, `LANE_TIMEOUT` | 64, 2048 | lane state machine timers |
| `RM_DEPTH`, `RM_POST` | 8192, 4096 | rolling memory size and post-trigger count |

## Simulating

Every testbench is in `tb/` and is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung run as a
failure. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
    rtl/spfi_pkg.sv rtl/*.sv tb/tb_spfi_validator.sv --top-module tb_spfi_validator
./obj_dir/Vtb_spfi_validator
```

Each block has a testbench `tb/tb_<module>.sv`. The ones that carry most weight:

- **`tb_spfi_validator`.** Full size, no parameter overrides. Two CODECs are joined
  with 100 ppm clock offset and different bit shifts, and the following run in turn:
  - generator to checker on VC0 (rate measured and checked above 0.85 words per
    clock);
  - host traffic on VC1–VC3 and broadcast;
  - a priority contest;
  - a 75/25 bandwidth split;
  - a flow-control stall;
  - a rolling-memory trigger;
  - error injection both ways.

  It prints how often each mechanism occurred and fails if any never did. The
  mechanisms counted are lane activation, frames per VC, BC frames, retries, rejected
  frames, SKIP sent/dropped/repeated, priority, bandwidth, stall, trigger and
  generator packets. It runs in a few seconds.
- **`tb_spfi_data_link`.** Two data link layers are joined through a channel that
  flips bits, flags errors and drops words at random. It checks that all 12000 VC
  words and all BC messages arrive in order.
- **`tb_spfi_lane_layer`.** It checks alignment at odd bit offsets, SKIP drop and
  repeat under clock offset, standby and restart.

## Own choices and departures

The document describes the CODEC's architecture and behaviour and defers the
protocol detail to the SpaceFibre standard. The following are therefore this
design's own choices:

- **Control-word coding.** Type codes, byte layout, and the CRC-8 on ACK/NACK/FCT are
  this design's own.
- **Go-back-N retry.** The design uses 8 outstanding frames, a 1024-clock timeout, a
  single NACK per error episode, and re-ACK of duplicates. The standard's own retry
  protocol differs in detail.
- **Flow control.** Credits are sent as a cumulative 3-bit count per VC with periodic
  refresh. The standard's FCT format is not reproduced.
- **Lane state machine.** The state set, the counts and the timeouts are this
  design's own. The receive polarity inversion state of the standard is not built.
- **Scheduling counters.** The bandwidth counters (gain share per word, lose 100 per
  own word) and the timeslot clock are this design's own.
- **Scrambler.** Its polynomial and seeding are this design's own.
- **8B/10B coder.** The encoder is a plain table coder: the 5b/6b and 3b/4b parts are
  applied symbol by symbol, with the running disparity chained through the four
  symbols of a word. It is not a resource-optimised parallel encoder.
- **BC buffers.** The OUT BC and IN BC buffers are always present (16 messages
  each). They are not optional.
- **8B/10B placement.** 8B/10B is always done inside the CODEC. The SerDes interface
  is 40 bits only; a 20-bit mode is not provided.
- **Validator control.** The AXI bus, processor, Ethernet link and DMA engines of a
  complete validation board are not part of this RTL. The host interfaces and test
  controls are plain ports of the top instead.
- **Not built:**
  - a multi-lane mode;
  - network-level features: routing and the management information base;
  - the SerDes itself.
- **Resource and power figures.** These are properties of an FPGA implementation.
  Nothing here reproduces them. The memory built at the defaults is about 80 kbit for
  4 VCs, excluding the validator's rolling memories.

## Caveats

- **Clock crossings.** Multi-bit values cross clocks only as Gray-coded pointers, and
  control inputs of the RX error injector are sampled in the recovered clock. In a
  real device, the configuration registers should be treated as static while the
  lane runs.
- **No timing closure.** Timing closure at 62.5 or 78.125 MHz has not been checked.
  The widest combinational paths are the 40-offset comma search and the MAC's
  selection over `NUM_VC` VCs.

# ICEBERG WIB data path in SystemVerilog

The warm interface board (WIB) of the ICEBERG liquid-argon test stand sits
between the cold front-end boards (FEMBs) and the DAQ. Each FEMB holds COLDATA
ASICs that send ADC samples over four 8b10b serial links, so one WIB receives
16 links. Each link carries one frame of 64 bytes for every ADC convert, at
2 MS/s. The WIB does three things with those frames:

- It checks them: framing, checksum and stray command characters. It counts
  each kind of error and keeps the frame anyway.
- It buffers each frame in a small per-link RAM that is written one byte at a
  time and read one 32-bit word at a time.
- It packs all the frames that belong to one convert into a single event. The
  event gets a header carrying the time stamp and error information, a CRC,
  and 8b10b coding for a DAQ link.

This RTL implements that chain. Around it sit the parts needed to run and debug
it:

- a generator for the convert strobe and time stamp;
- fake COLDATA sources that can inject every error the checker knows;
- a spy buffer on each DAQ link;
- a master for the three-byte "DUNE I2C" that configures the cold chips;
- a bridge that carries register reads and writes into the design's clock
  domains.

`wib_top` instantiates all of it.

```
 FEMB links (16 x 10-bit symbols)                       DAQ links (4 x 8 symbols)
        |                                                          ^
   femb_rx: 8b10b decode, strip bad symbols, link status           |
        |                                                    daq_link_pcs
        v        coldata_sim (8 fake CDAs, 2 streams each)  (8b10b encode)
   [per link: real or fake] <------+                               ^
        |                                                          |
   cd_stream_processor x16  --- clk_cd | clk_evb --->  daq_link_eventbuilder x4
   (frame checks, counters,                             (event header, CRC-32,
    CD_RAM 256 B, pacd x2)                               gearbox 32->64, spy)
        ^                                                          ^
        +------------- convert_gen (clk_sys, 2 MHz convert) -------+

   dune_i2c_master x4 (clk_sys)    register_map_bridge (clk_sys -> 7 domains)
```

## Sizes and arrangements

All the shared sizes live in `wib_pkg`:

| Name | Value | Meaning |
|---|---|---|
| `FEMB_COUNT` | 4 | front-end boards |
| `LINKS_PER_FEMB` | 4 | serial links per board |
| `CDAS_PER_FEMB` | 2 | COLDATA ASICs per board |
| `LINKS_PER_CDA` | 2 | links (streams) per COLDATA chip |
| `LINK_COUNT` | 16 | links per WIB |

Link `l` belongs to FEMB `l/4`, CDA `(l/2)%2` and stream `l%2`.

There are two DAQ back ends, and `wib_top.CDAS_PER_DAQ_LINK` selects between
them:

- **RCE arrangement** (`CDAS_PER_DAQ_LINK = 2`, the default): 4 DAQ links, each
  fed by 4 consecutive links.
- **FELIX arrangement** (`CDAS_PER_DAQ_LINK = 4`): 2 DAQ links, each fed by 8
  consecutive links.

The event builder, its `COLDATA_en` mask and the encoder all follow this
parameter.

## Clocks

The design has three clock domains. All resets are synchronous to their own
clock.

| Clock | Runs | Rate needed |
|---|---|---|
| `clk_sys` | `convert_gen`, I2C masters, register bridge | 64 MHz system clock; `CONVERT_PERIOD = 32` gives 2 MHz converts |
| `clk_cd` | `femb_rx`, `coldata_sim`, link side of the stream processors | one link word per clock; all 16 links are assumed to share it |
| `clk_evb` | read side of the stream processors, event builders, DAQ encoders | one 32-bit event word per clock |

The rates set the limits:

- A link frame is 78 words. To carry one frame per convert at 2 MS/s, `clk_cd`
  must run at 156 MHz or faster.
- An RCE event is 79 words. To carry one event per convert, `clk_evb` must run
  at 158 MHz or faster. A FELIX event is 151 words and needs 302 MHz.
- The end-to-end testbench runs `clk_sys` at 64 MHz, `clk_evb` at about
  208 MHz and `clk_cd` at about 217 MHz.

A real FEMB link runs at 1.28 Gb/s, which is 128 M symbols/s, or 64 symbols per
convert. That is exactly the 64 payload bytes with no room for this design's
14 words of framing. So at the real link rate, this design's frame does not fit
a 2 MS/s convert rate. See "Limits" below.

Crossings between domains:

- `pacd` is a toggle synchroniser. It turns a one-cycle pulse in one clock into
  a one-cycle pulse in another. Pulses must be at least three destination
  cycles apart.
- The convert record crosses to `clk_evb` and `clk_cd` as a `pacd` pulse. The
  record's fields change only on a trigger, so they are stable when the crossed
  pulse arrives.
- Inside each stream processor, a frame-ready pulse goes from `clk_cd` to
  `clk_evb` and a slot-free pulse goes back.

## Link words and the COLDATA frame

Every link word is 9 bits wide. Bits 7:0 hold the byte, and bit 8 marks a
command (K) character. The frame layout below is this design's own; the chip's
own format is not reproduced.

```
K28.1 (SOF, 0x13C)
CD_errors[15:8]  CD_errors[7:0]
timestamp[15:8]  timestamp[7:0]
reserved[15:8]   reserved[7:0]
header[31:24] .. header[7:0]
64 payload bytes
checksum[15:8]   checksum[7:0]     16-bit sum of the 74 bytes after SOF
K28.6 (EOF, 0x1DC)
K28.5 (0x1BC) idle between frames
```

`femb_rx` decodes the symbols using the standard 8b10b tables in
`enc8b10b`/`dec8b10b`.

- Its latency is one clock.
- A symbol with a code or running-disparity error is replaced by K28.5. The
  error is flagged for that clock, and the checker downstream sees it as a K
  character.
- `rx_syncstatus` is set by a clean comma and cleared by any error.
- Serialisation, clock recovery and word alignment belong to the FPGA
  transceivers and are not modelled. The module's input is already-aligned
  10-bit symbols, with `a` in bit 9.

## The stream processor (the hardest part)

`cd_stream_processor` is where the checking and the buffering happen. Each
instance handles one link, and it spans two clocks.

Either of its two reset inputs resets both halves. The reset reaches each
clock through its own two-flop synchroniser, so the slot bookkeeping on the two
sides always starts from the same state.

### Link side (`clk_cd`)

A state machine walks through the frame. Payload bytes go straight into
`cd_ram`, which holds 256 bytes as four 64-byte slots. The RAM takes an 8-bit
write port and gives a registered 32-bit read port, with the first byte in bits
7:0.

The header fields are kept in registers per slot. The checksum is added up on
the fly. Eight 32-bit counters record what happened, and each one clears on its
bit of `counter_reset`:

| Counter | Counts |
|---|---|
| `BAD_CHSUM` | checksum mismatch at EOF |
| `BAD_SOF` | data where a SOF was due (counted once per run of bad words) |
| `BUFFER_FULL` | SOF while all four slots are in use; the frame is dropped |
| `CONVERT_IN_WAIT_WINDOW` | a convert while the previous one is still waiting for its SOF |
| `KCHAR_IN_DATA` | a K character other than EOF inside a frame |
| `MISSING_EOF` | data where the EOF was due (frame too long) |
| `UNEXPECTED_EOF` | EOF before 64 payload bytes (frame too short) |
| `packets` | intact frames |

Error policy: **any frame that got a slot is handed on, good or bad.** Each
frame carries an 8-bit `capture_errors` mask with one bit per counter (see the
`CE_*` constants in `wib_pkg`). This keeps every stream of a DAQ link at the
same frame count, so an event never mixes frames from different converts. It
also means the DAQ sees how bad a frame was instead of losing it. A frame
dropped for `BUFFER_FULL` is the only case where the streams can slip apart.

### Convert and wait window

`convert.trigger` crosses into `clk_cd` and is delayed by `convert_delay`
clocks. It then opens a "wait window", which the next SOF closes.
`monitor.wait_window` reports the length of the last window, which shows how
far behind the convert the frames arrive.

### Event-builder side (`clk_evb`)

`CD_to_EB_stream.valid` is high while at least one frame is ready. `data_out`
is the current 32-bit payload word, and the header fields belong to that same
frame. The builder pulses `EB_rd` to take one word. After the 16th word the
slot is released through the return `pacd`, and the next frame, if any, appears
one clock later.

Slot ownership is the delicate point:

- A slot's header registers are written before its ready pulse is sent.
- The link side reuses a slot only after the slot-free pulse has come back.

So no field is read while it can change.

## Events on the DAQ link

`daq_link_eventbuilder` waits until `enable` is set and every stream selected
in `COLDATA_en` holds a frame. It then sends one event of 32-bit words, one
word per clock, with per-byte K flags:

```
SOF      {crate[3:0], slot[3:0], fiber[7:0], 8'h00, K28.1}   k = 0001
         time_stamp[31:0]
         time_stamp[63:32]
         {out_of_sync, 7'h0, reset_count[23:0]}
         {convert_count[15:0], event_count[15:0]}
per enabled stream, lowest index first:
         {capture_errors[7:0], stream index[7:0], CD_errors[15:0]}
         {16'h0, CD_timestamp[15:0]}
         16 payload words
CRC      Ethernet CRC-32 of all words between SOF and CRC
EOF      {24'h0, K28.6}                                        k = 0001
K28.5 idle words between events
```

- With 4 streams an event is 79 words; with 8 streams it is 151 words.
- The CRC is the usual reflected 0xEDB88320 polynomial, initialised to all
  ones and inverted at the end. Bytes go in lowest byte first, and
  `ethernet_crc32` handles 32 bits per clock.
- `enable_bad_crc` XORs `bad_crc_bits` into the CRC so that the receiver's
  check can be tested.
- `eb_gearbox` pairs the words into 64-bit words, with the earlier word in the
  low half and `data_wr` set every second clock.
- `daq_link_pcs` encodes each 64-bit word as eight 8b10b symbols with running
  disparity. The symbols are ready for a serialiser; the serialiser itself is
  not modelled.

`spy_buffer` records the builder's output so that software can read it back
word by word through the monitor record.

- `spy_buffer_start` arms the buffer and empties it.
- With `spy_buffer_wait_for_trigger` set, capture starts at the next SOF.
- Capture stops when the buffer is full. `SPY_DEPTH` is 1024 words of 36 bits.

## Convert generation

`convert_gen` runs on `clk_sys` and works as follows:

- It counts a 64-bit time stamp.
- Every `CONVERT_PERIOD` clocks it emits `convert.trigger` along with
  `convert_count`.
- A `sync_cmd` restarts the period and the convert count, and increments
  `reset_count`.
- When the timing endpoint delivers a time stamp (`ts_valid`/`ts_in`), the
  local count is compared with it and then reloaded. `out_of_sync` reports
  whether the last comparison failed.
- The timing endpoint itself is outside the design.

## Fake COLDATA

Each `coldata_sim` stands in for one COLDATA chip with two streams. On every
convert it sends one frame per stream:

- The time stamp is `convert_count`.
- Payload byte `i` of stream `s` is `convert_count + i + 64*s`.

While `inject_errors` is set, the per-stream bits corrupt every frame:

| Control | Effect |
|---|---|
| `inject_CD_errors` | value written into the frame's CD_errors |
| `BAD_checksum` | checksum inverted |
| `BAD_SOF` | SOF sent as a data byte |
| `LARGE_FRAME` | one extra payload byte |
| `K_CHAR` | payload byte 5 sent as K28.7 |
| `SHORT_FRAME` | last payload byte dropped |

`fake_cd_control[a].fake_stream_type[s+1]` selects, per link, whether the
stream processor sees the fake stream or the real link.

## DUNE I2C

The COLDATA chips are configured over a three-byte variant of I2C. One transfer
carries a chip/page byte, a register address and a data byte. The data line is
split into two one-way lines: `sda_w2c` from the WIB and `sda_c2w` from the
chip. Both lines are driven, never tri-stated.

```
write: START {chip[3:0], page[2:0], 0} A  reg A  data A  STOP
read:  START {chip[3:0], page[2:0], 1} A  reg A  data(chip) N  STOP
```

- Bits are sent MSB first. Each bit takes `4*CLK_DIV` clocks; `CLK_DIV = 160`
  gives 100 kHz from 64 MHz.
- A transfer takes `29*4*CLK_DIV + 2` clocks from `start` to `done`.
- A missing acknowledge sets `ack_error`.
- `wib_top` has one master per FEMB.

## Register bridge

`register_map_bridge` takes register reads and writes from `clk_sys` into up to
seven clock domains.

- Bits 15:12 of the address select the domain.
- A request pulse crosses into the domain, where `*_valid` stays high until the
  domain returns its `*_ack`.
- Read data comes back on `read_data_wr`/`read_data`. It is held in the domain,
  and a completion pulse carries it home.
- Only one access is in flight at a time. Read addresses are queued in a
  read-address FIFO (`RD_FIFO_DEPTH = 4`) and served in order, so software can
  issue reads back to back. A write is taken only while the bridge is idle.
- An access ends with `error` set, and a read returns `32'hDEADBEEF`, when:
  - its domain number is 7 or above (it ends at once);
  - its domain's `clk_domain_locked` bit is low (it ends at once);
  - its domain stays silent for `TIMEOUT` clocks.
- Each domain gets its reset through a two-flop synchroniser.

In `wib_top`, both sides of the bridge are ports. The register files that would
drive the control records live outside.

## Where this departs from the original firmware

The block names, the record fields, the array sizes, the RAM size and widths,
the counters, the two clock domains of the stream processor with their pulse
crossers and reset synchronisers, the register bridge's read-address FIFO, the
64 MHz system clock and the two DAQ arrangements all follow the original
firmware. The following are this design's own:

- The COLDATA frame layout, checksum, and idle/SOF/EOF characters.
- The DAQ event layout and its CRC coverage.
- The CD_RAM slot scheme and the error policy.
- The sync and stripping rules in `femb_rx`.
- The convert counting rules.
- The bit placement and timing of the DUNE I2C bits.
- The register address map.
- The split into three clocks.

Smaller differences:

- The register bridge returns only the low 32 bits of the 36-bit domain read
  data.
- The fake-COLDATA monitor has no `fake_data_type` field.
- The event builder has no gearbox or debug control fields.
- The receive status covers decoding only; transceiver lock and calibration
  flags are absent.
- The register files, the UDP/Ethernet slow-control path, the timing endpoint,
  the fast-command path to the FEMBs, the transceivers, flash, power monitoring
  and the data-quality monitor are not included.

## Limits

- **Link rate.** A 1.28 Gb/s link gives 64 symbols per 500 ns convert, but this
  design's frame is 78. At the real link rate, the design can only take frames
  every 39 system clocks, not every 32. The stream processor then flags
  `CONVERT_IN_WAIT_WINDOW` and eventually `BUFFER_FULL`. The testbenches run
  the link clock fast enough to avoid this.
- **Event builder rate.** `clk_evb` must be at least 158 MHz in the RCE
  arrangement, or 302 MHz in the FELIX one, to keep up with 2 MS/s.
- **FELIX arrangement.** `tb_wib_top_felix` runs it end to end with fake
  sources only and an event-builder clock 5.2 times the system clock. It does
  not repeat the error-injection, I2C and register scenarios of `tb_wib_top`.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. To build and run one with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    --top-module tb_cd_stream_processor -y rtl -y tb +libext+.sv \
    -Irtl -Itb rtl/wib_pkg.sv tb/tb_cd_stream_processor.sv
./obj_dir/Vtb_cd_stream_processor
```

`tb_wib_top` runs the whole design at its default parameters: 16 links, 4 DAQ
links and 3 clocks. It finishes in about a second of CPU time. In this test:

- FEMB 0 sends real frames, encoded in the testbench.
- The other links use the fake COLDATA sources.
- Every DAQ link is decoded and every event is checked: length, SOF fields,
  CRC, event numbering, stream headers and payload pattern.
- It drives every mechanism at least once and prints how often each occurred:
  - fake and real frames;
  - the five injected frame errors, each checked against its counter;
  - a `CD_errors` override;
  - `BUFFER_FULL`, caused by stalling one builder;
  - a deliberately corrupted CRC;
  - a spy capture;
  - a corrupted link symbol;
  - sync commands;
  - a time-stamp mismatch;
  - an I2C write and read;
  - a register write and read.

A mechanism that never happened counts as a failure.

`tb_wib_top_felix` runs the same event checks with `CDAS_PER_DAQ_LINK = 4`,
which gives 2 DAQ links of 8 streams and 151-word events. It also checks that no
link reports a full buffer.

The other testbenches compare against models written independently of the RTL:

| Testbench | Independent reference |
|---|---|
| `tb_enc_dec8b10b` | published code words, a round trip of every byte and control character in both disparities, and DC balance and run length on a random stream |
| `tb_ethernet_crc32` | two known CRC values and a table-driven byte-wise model |
| `tb_dune_i2c_master` | a chip model that answers on `sda_c2w` |
| `tb_register_map_bridge` | seven domains with random latencies |

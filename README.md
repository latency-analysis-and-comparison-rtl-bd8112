# CSI-2 to 10G Ethernet gateway in logic only

This RTL takes image lines from a camera's CSI-2 receiver and sends them as
Ethernet frames to a 10 Gbit/s MAC. The frames have an IEEE1722 (AVTP) header.
It is meant for recording raw sensor data in driver-assistance development,
where a measurement PC records the network traffic.

The main idea is that the gateway works **line by line, entirely in
hardware**. The usual alternative buffers a whole image in processor RAM and
builds the packets in software, which costs tens of milliseconds. This
gateway instead:

- buffers one image line at a time;
- cuts the line into frames of at most 1440 payload bytes;
- sends the frames as soon as the last byte of the line has arrived.

Every line carries the time it was received, taken from a synchronised
hardware clock. A receiver can therefore measure the latency of each line as
its own arrival time minus that stamp. In this RTL, the delay from a line's
last input byte to its first Ethernet beat is 6 clocks (30 ns at 200 MHz).
The rest of the latency is the time the line takes to arrive.

## Data path

```
 CSI-2 receiver core (not included)
   | 96-bit beats, 4 pixel slots of 24 bit, 200 MHz           csi_*
   v
 sync_fifo            input FIFO, 256 x 111 bit
   v
 axis_96to64          96 -> 64 bit; beats with > 8 valid bytes take 2 clocks
   v
 axis_packet_fifo     store-and-forward: a line leaves only when complete
   v
 line_preproc         header + timestamp -> line_info_t; payload byte order
   v
 eth_axis_gen         splits the line into frames, packs the payload
   +- frame_header_builder   48-byte Ethernet/VLAN/AVTP header
   v
 10G Ethernet MAC (not included)                              eth_*
 hw_time              64-bit ns time base -> t_fpga, used to stamp lines
```

The top level is `csi2_eth_gateway`. All stages run on one clock with a
synchronous active-low reset (`rst_n`). Every link between stages is a
valid/ready stream, so the MAC can pause the whole chain with `eth_tready`.
The input side cannot really wait, because a camera keeps sending.
`csi_ready` going low therefore means the input FIFO has overflowed, and the
system around the gateway must treat it as an error.

## Stream formats

All beat formats are packed structs in `gw_pkg`.

**`csi_beat_t` (receiver → gateway, 111 bits):**

- `data[95:0]` holds up to 12 bytes.
- `keep[11:0]` marks the valid bytes. They are contiguous from byte 0, so the
  receiver core packs the pixel bits into bytes (RAW12 gives 6 bytes per four
  pixels, YUV 4:2:2 gives 8, 24-bit RGB gives 12).
- `last` marks the line's last beat.
- The first beat of every line has `hdr = 1` and carries
  `{timestamp[63:0], CSI-2 packet header[31:0]}`.
- The packet header is the standard one: data identifier `{VC[1:0], DT[5:0]}`,
  a 16-bit word count (least significant byte first), and ECC.
- `sof` on that first beat marks the first line of an image frame.

**`axis64_t` (inside the gateway, 76 bits):**

- `data[63:0]` and `keep[7:0]`, `last`, `sof`.
- `kind` tells three beat types apart:
  - `BEAT_CSIHDR`: the packet header in bytes 0–3;
  - `BEAT_TSTAMP`: the 64-bit timestamp;
  - `BEAT_PAYLOAD`: pixel data.
- A line is one header beat, one timestamp beat, then its payload beats.

The width converter does not pack bytes across beats. A 96-bit beat with
k ≤ 8 valid bytes becomes one 64-bit beat with the same k bytes. A beat with
k > 8 valid bytes (pixels deeper than 16 bits) becomes two beats, with
ceil(k/2) bytes and then the rest. So 12 bytes become 6 + 6 and 10 become
5 + 5. The result is that every payload beat of a line carries the same
number m of valid bytes.

## Cutting lines into frames

This is the part of the design that takes the most care.

A 5760-byte camera line does not fit in one Ethernet frame, so
`eth_axis_gen` sends it as several frames. Each frame has the 48-byte header
and at most **1440** payload bytes; the last frame of a line carries the
rest. The number 1440 is chosen because 1, 2, 3, 4, 5, 6 and 8 all divide it.
Whatever m a line uses, a frame boundary therefore always falls between two
input beats, and no beat ever has to be split between two frames. A line
whose m does not divide 1440 (for example m = 7) breaks this rule. An
assertion in the generator (`a_no_split`) catches that case.

The generator is a three-state machine:

- **IDLE** waits for the first payload beat of a line. It then latches the
  line information, and takes the number of bytes still to send
  (`remaining`) from the CSI-2 word count.
- **HDR** sends the six 64-bit header words.
  - `frame_header_builder` computes the frame's payload length,
    `min(remaining, 1440)`, and whether this frame ends the line.
  - Both values are written into the header (stream data length, event
    bit 0), so the header is complete before any payload is sent.
- **PAY** moves the payload through a 16-byte packing buffer.
  - A MAC stream may be partial only in its last beat, but the input beats
    hold m ≤ 8 bytes. The buffer therefore takes in an input beat while it
    holds at most 8 bytes and the frame still needs data.
  - It sends a full 8-byte word whenever it has one. Once all of the frame's
    bytes are in, it sends the remainder with a partial `keep` and `last`.
  - After that beat the machine either starts the next frame of the same
    line (HDR) or goes back to IDLE.

The line length comes from the word count, not from `last`. Another
assertion (`a_last_at_end`) checks that the two agree.

With the MAC always ready, a full frame takes 187 clocks:

- 6 header beats;
- 1 clock to fill the packing buffer;
- 180 payload beats.

That is 1488 bytes in 935 ns, about 12.7 Gbit/s, which is above the 10G line
rate. At 200 MHz the generator can therefore keep a 10G MAC busy, and the
MAC's `tready` sets the pace.

## Frame layout

Multi-byte fields are big-endian. On the 64-bit stream, frame byte 8w+j is in
`tdata[8j+7:8j]` of beat w.

| bytes | field | value |
|---|---|---|
| 0–5 | destination MAC | `cfg.dst_mac` |
| 6–11 | source MAC | `cfg.src_mac` |
| 12–13 | Ethertype | 0x8100 (VLAN) |
| 14–15 | VLAN tag | `cfg.vlan_tci` |
| 16–17 | AVTP type | 0x22F0 |
| 18 | AVTP subtype | `cfg.avtp_subtype` |
| 19 | sv (bit 7), reserved, tv (bit 0) | 0x81 |
| 20 | sequence number | +1 per frame, wraps at 256 |
| 21 | reserved | 0 |
| 22–29 | stream ID | `cfg.stream_id` |
| 30–37 | timestamp | line reception time, ns |
| 38–39 | line number | 0 on the first line of an image frame, then +1 |
| 40 | [3:0] internal sequence number | frame index within the line |
| 41 | [3:0] event | bit 0: last frame of the line; bit 1: first line of an image frame |
| 42–43 | CSI-2 word count | payload bytes of the whole line |
| 44 | CSI-2 data type | `{2'b00, DT}` |
| 45 | [1:0] VC | CSI-2 virtual channel |
| 46–47 | stream data length | payload bytes in this frame |
| 48– | payload | up to 1440 bytes |

The MAC adds the preamble and the frame check sequence. A receiver puts a
line back together from:

- the line number;
- the internal sequence number (the frame index within the line);
- the stream data length of each frame.

## Preprocessing and byte order

`line_preproc` takes the header and timestamp beats off each line and turns
them into a `line_info_t`: data type, VC, word count, timestamp, line number
and `sof`. This register stays stable while the line's payload passes, and is
updated only when the next line's header arrives. `eth_axis_gen` keeps its
own copy for the whole line.

The payload byte order is set by `cfg.byte_order`:

- `BO_NONE`: bytes as received;
- `BO_SWAP16`: swap the two bytes of every 16-bit word;
- `BO_REVERSE`: reverse the m valid bytes of each beat.

The mode applies to each 64-bit beat. For pixels split over two beats, it
therefore applies to each half on its own. Change the mode only while no
line is in flight.

## Time base

`hw_time` is a 64-bit nanosecond counter that adds `NS_PER_CLK` (5) every
clock. `time_load`/`time_load_value` set it. `time_adj_up`/`time_adj_down`
add or drop one nanosecond in a clock, so a synchronisation engine can steer
its rate. The engine itself is not part of this RTL. In the reference system
it is gPTP, run over a separate 10G port through a time-aware switch. That
port is used because one port could not send image data and run gPTP at the
same time.

The current time goes out on `t_fpga`. The CSI-2 receiver core puts it into
the header beat of every line it receives.

## Latency

In the gateway, a line's latency (from its stamp to its first Ethernet beat)
is the time the line takes to arrive plus 6 clocks:

- 1 clock through the input FIFO;
- 1 clock until the packet FIFO counts the line as complete;
- 2 clocks to consume the header and timestamp beats;
- 2 clocks through the generator.

Any wait for the MAC adds to this.

`tb_sensor_workloads` streams whole image frames of three camera formats.
The input arrives at 0.6 byte/ns and the MAC is paced at the 10G line rate.

| sensor format | lines × bytes | gateway latency (mean) |
|---|---|---|
| 3840×2160 RAW12 | 2160 × 5760 | 9629 ns |
| 2880×1860 YUV 4:2:2 | 1860 × 5760 | 9629 ns |
| 1824×940 YUV 4:2:2 | 940 × 3648 | 6109 ns |

The difference between the two line sizes is 3520 ns. This matches the line
latency measured end to end on the reference hardware, which follows
t ≈ 8653 ns + s · 1.6652 ns/byte. That model gives 3517 ns for the same
2112-byte difference.

The constant part of the model (the MAC, PHY, switch and receiving PC) lies
outside this RTL. Lines of equal size have equal latency whatever the pixel
format, as expected. At the CSI-2 maximum of 6 Gbit/s, a 5760-byte line
would arrive in 7680 ns.

## Parameters and sizes

| module | parameter | default | origin |
|---|---|---|---|
| `csi2_eth_gateway` | `IN_FIFO_DEPTH` | 256 | this design's choice |
| `csi2_eth_gateway`, `axis_packet_fifo` | `PKT_FIFO_DEPTH` / `DEPTH` | 2048 beats | this design's choice: two RAW12 lines of 962 beats |
| `csi2_eth_gateway`, `eth_axis_gen`, `frame_header_builder` | `MAX_PAYLOAD_BYTES` | 1440 | original design |
| `csi2_eth_gateway`, `hw_time` | `NS_PER_CLK` | 5 | 200 MHz stream clock of the original design |

The packet FIFO must hold the longest line, in beats, plus its two header
beats. A longer line never completes, and the gateway stalls. At the
defaults the storage is 2048 × 76 bits in the packet FIFO and 256 × 111 bits
in the input FIFO.

The 4-bit internal sequence number allows 16 frames per line, which means
lines of up to 23040 bytes.

## What is outside, and where this RTL makes its own choices

The gateway has no RTL for these parts. They connect through its ports:

- **CSI-2 receiver core** (D-PHY lanes, packet decoding). It connects through
  `csi_*` and `t_fpga`.
- **10G Ethernet MAC/PHY.** It connects through `eth_*`.
- **Time synchronisation engine.** It connects through `time_*`.
- **Configuration source.** The reference unit has a separate configuration
  Ethernet port; here `cfg` is a static input.

The stage order, the 96/64-bit widths, the two-clock conversion of wide
pixels, the packet-mode FIFO, the 1440-byte split and the header fields
follow the original design. The following are this implementation's own
choices:

- **Clock.** One clock for the whole path; the original design names only
  the 200 MHz stream clock. A MAC on its own 156.25 MHz clock needs an
  asynchronous FIFO in front of it (or inside its wrapper).
- **FIFO depths.** 256 and 2048.
- **Header beat.** The layout of the line's first 96-bit beat, and the
  `hdr`/`sof` sideband bits.
- **Byte-valid marking.** `keep` at byte level, contiguous from byte 0.
- **Split of wide beats.** The equal split of a wide beat over two clocks.
- **Byte-order modes.** The three modes.
- **Header field values.**
  - Ethertypes 0x8100 and 0x22F0; sv = tv = 1.
  - The encoding of the event nibble.
  - The reading of the internal sequence number as the frame index within a
    line.
  - The line-number rule.
- **Sequence number.** +1 per frame.
- **Packing buffer.** The packing buffer in the generator.
- **Time-base hooks.** The load and trim ports of the time base.

## Files

- `rtl/gw_pkg.sv`: stream structs, line information, configuration, frame constants.
- `rtl/csi2_eth_gateway.sv`: top level.
- `rtl/sync_fifo.sv`, `rtl/axis_96to64.sv`, `rtl/axis_packet_fifo.sv`,
  `rtl/line_preproc.sv`, `rtl/frame_header_builder.sv`, `rtl/eth_axis_gen.sv`,
  `rtl/hw_time.sv`: the stages.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_csi2_eth_gateway.sv`: end-to-end test at the default sizes.
  - Covers the three camera line sizes, 8/12/16/20/24-bit pixels, all byte
    orders, MAC back-pressure and input-FIFO overflow.
  - Checks the packet-mode hold and the 6-clock latency, and compares every
    frame byte by byte with a reference model.
- `tb/tb_sensor_workloads.sv`: whole image frames of the three formats, with
  latency measurement.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_csi2_eth_gateway \
    -y rtl -Irtl rtl/gw_pkg.sv tb/tb_csi2_eth_gateway.sv
./obj_dir/Vtb_csi2_eth_gateway
```

Replace the top module and testbench file to run any other test. The end-to-end
test takes well under a second. The whole-frame workload test takes about
half a minute. Lint a module with
`verilator --lint-only -Wall -y rtl -Irtl rtl/gw_pkg.sv rtl/<module>.sv`.

Useful places to change the design:

- **Frame size:** `MAX_PAYLOAD_BYTES`. It must stay a multiple of every m in
  use.
- **Header:** `frame_header_builder`. If the header length changes,
  `HDR_BYTES` in `gw_pkg` must stay a multiple of 8.
- **Byte-order rules:** `line_preproc`.

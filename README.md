# Ethernet-attached hardware services: a network device, an LLC dispatcher and photo-filter servers

This RTL turns an FPGA on a LAN into a small server farm. A client workstation sends Ethernet
frames holding work (here: rows of image samples to be filtered). Hardware application servers on
the FPGA pick up the work, process it and send the result back to the sender. Every component
talks to its neighbours through *remote method calls*: each method is a set of nets carrying its
arguments and return value, plus a `req`/`ack` pair that runs a four-phase handshake. Components
can therefore be built separately and joined by plain wiring. A hardware server can also be
swapped for a software one that exposes the same methods.

Two FPGA configurations are provided. They stand side by side in `kiwi_top`, together with the
small factorial circuit used as the introductory example.

* **Shared FPGA** (`kiwi_farm_fpga`): one Ethernet port and one network device. An LLC-style
  dispatcher lets four servers share them: three single-channel photo filters and a monitor
  that reports counters.
* **Single-application FPGA** (`kiwi_single_app_fpga`): one three-channel photo filter wired
  straight to the network device.

## Layers and blocks

```
 shared FPGA                                   single-application FPGA
 +-------------+-------------+-------------+-----------+   +-------------------------+
 | photo_filter| photo_filter| photo_filter| monitor   |   | three_channels_app      |
 | _app (port0)| _app (port1)| _app (port2)| _app (p3) |   |  3 x photo_filter_channel|
 |  reliable_  |  reliable_  |  reliable_  | reliable_ |   |  reliable_layer         |
 |  layer      |  layer      |  layer      | layer     |   |                         |
 +-------------+-------------+-------------+-----------+   +-------------------------+
 |                 llc_dispatcher                      |   |                         |
 +-----------------------------------------------------+   +-------------------------+
 |                   ether_link                        |   |       ether_link        |
 +------------------ LocalLink ------------------------+   +------- LocalLink -------+
              Ethernet MAC (hard block, outside the RTL)
```

| file | role |
|---|---|
| `kiwi_pkg.sv` | `framing_e` (Start/Mid/End), protocol ids, LLC header constant, filter coefficients |
| `ether_link.sv` | network device: 2048-byte receive and transmit buffers, LocalLink, methods `WriteInt`, `ReadInt`, `RxBytes`, `DiscardRxFrame` |
| `llc_dispatcher.sv` | shares the device among `PORTS` client ports: receive demultiplexing, transmit mutex |
| `reliable_layer.sv` | `ArrayRead` / `ArrayWrite` over word calls: protocol id, sequence number, length |
| `photo_filter_channel.sv` | 9-tap convolver, one tap per clock |
| `photo_filter_app.sv` | one-channel filter server (512-word work buffer) |
| `monitor_app.sv` | status server |
| `three_channels_app.sv` | three-channel filter server, samples interleaved |
| `factorial_circuit.sv` | introductory example: `n!`, one multiplication per clock |
| `kiwi_farm_fpga.sv`, `kiwi_single_app_fpga.sv`, `kiwi_top.sv` | the configurations and the top |

## Remote method calls

Every arrow between blocks is a method. The caller puts the arguments on the bus and raises
`req`. The callee does the work, drives the return value and raises `ack`. The caller then drops
`req` and the callee drops `ack`. A call that cannot proceed yet simply gets no `ack`: that is how
a call *blocks*. For example, `ReadInt` waits until a frame has arrived, and a client's first
`WriteInt` waits while another client holds the transmit mutex. Return values are valid while
`ack` is high. Assertions in the dispatcher and in the reliability layer check that a caller
holds `req` until it is acknowledged.

`WriteInt(d, kfp)` carries a `framing_e` tag:

* `FR_START` opens a frame and, at the dispatcher, claims the transmit mutex.
* `FR_MID` adds a word.
* `FR_END` adds the last word. The device then sends the frame, and the dispatcher releases the
  mutex.

## Frame formats

All words are 32 bits and big-endian. Bytes 0-5 are the destination MAC address and bytes 6-11 the
source MAC address. A reply always goes back to the last sender. The device copies the source
address of the frame it holds into the reply's destination field, and that frame's destination
address into the reply's source field.

The **reliability message**, written by `ArrayWrite` and read by `ArrayRead`, is:

| word | content |
|---|---|
| 0 | `32'h45C03200` (protocol id) |
| 1 | sequence number (counts messages per direction, from 0) |
| 2 | `len`, the number of data words |
| 3 .. len+2 | data |
| len+3 | `32'h45C03201` (protocol id with end-of-message flag) |

Single-application frame: MAC addresses followed by one reliability message.

Shared-FPGA frame received: MAC addresses, then a length word `W` (the number of message words
for the client), then the LLC header `{16'hAA03, 8'h00, port}`, then the `W` message words. Words
before the header whose upper half is not `16'hAA03` are skipped. A reply carries the LLC header
of the sending port, then its message; no length word is sent.

## How the dispatcher shares one device

This is the part that takes the most care.

**Receive.** A receive state machine in the dispatcher loops over frames:

1. It calls `RxBytes`, which blocks until the device holds a frame.
2. It reads the length word, then scans with `ReadInt` for the LLC header. The scan stops at the
   end of the frame.
3. It reads the port number from the header. The frame is discarded if there is no header, if
   the port is not registered (`>= PORTS_IN_USE`), or if the length word is zero.
4. Otherwise it sets that port's `rx_ready` flag and waits.

While the flag is set, that client's `ReadInt` calls are turned into device `ReadInt`s, one word
at a time, counting the length down. The last word clears the flag. All other clients' reads stay
blocked. Once the flag clears, the dispatcher calls `DiscardRxFrame`, which frees the device's
single receive buffer for the next frame. Frames that arrive meanwhile are held off by
`rx_dst_rdy_n`.

The client must read exactly `W` words. If it expects fewer, the flag never clears. If it expects
more, its extra read blocks until the next frame for it. In both cases the port stops being
served.

**Transmit.** A client's `WriteInt` with `FR_START` must win the transmit mutex. Waiting
starters are granted round-robin; a start that finds the mutex taken stalls and is counted in
`tx_stalls`. When granted, the dispatcher writes the LLC header with `FR_START`, then the client's
word with `FR_MID`. The owner's later calls pass through unchanged. Its `FR_END` call sends the
frame and then releases the mutex. Frames of different clients therefore never interleave.

The device's `WriteInt` acknowledges `FR_END` only after the whole frame has left, so a frame is
never overwritten in the transmit buffer while it is being sent.

## The photo filter

`photo_filter_channel` keeps a circular store of 9 samples, a pointer `ptr` and a fill mark `max`.
`convolve(din)` does the following:

1. Advances `ptr` (8 wraps to 0), raises `max` to `ptr` if needed, and stores `din` at `ptr`.
2. For `xx = 0..8`, one per clock, adds `data[xx] * coef[(ptr - xx) mod 9]`, where coef =
   {1, -2, 3, -4, 5, -4, 3, -2, 1}. A tap counts only when both indices are `<= max`.

The sum wraps at 32 bits, signed. Note the indexing: samples are taken by tap number and
coefficients by distance from the pointer. The kernel is symmetric, so the arithmetic is
well-defined, but the result is not a textbook sliding-window FIR over the last 9 samples. Keep
this in mind before "fixing" it. A channel reset clears `ptr` and `max` only. Stored samples
survive until the global reset, so they influence the first results of the next job.

A server loops: `ArrayRead` into its work buffer, reset the channel(s), replace every word by its
convolution, `ArrayWrite` the result. The three-channel server sends word `i` to channel `i mod
3`. It works in groups of three even when `len` is not a multiple of three, so up to two words past
`len` are also filtered (and not sent).

The three-channel server comes in two forms, chosen by `PARALLEL_CHANNELS`:

* `0` (default): one loop converts the three words of a group one after the other, in 42 cycles
  per group.
* `1`: each channel runs its own loop over words `c, c+3, c+6, ...` (group index below `len`), so
  the three convolvers work at the same time, in 14 cycles per group. The work buffer then needs
  three read and three write ports. Generic synthesis therefore builds it from flip-flops, about
  135k cells against about 500 for the default form. The results are identical to those of the
  default form.

## The factorial circuit

`factorial_circuit` captures the 8-bit input `n` while `reset` is high. After reset it multiplies
`fac` by `i` and decrements `i`, once per clock, until `i` reaches 1. `done` rises in the cycle of
the last multiplication, so `n >= 2` takes `n - 1` clocks. For `n` of 0 or 1, `done` rises after
one clock with `fac = 1`. The output `fac` is 16 bits wide and wraps modulo 2^16, so results are
exact only up to `8! = 40320`. At the top its ports are `fact_reset`, `fact_n`, `fact_fac` and
`fact_done`; it shares only the clock with the rest.

## Timing

* `WriteInt`: 4 cycles to store the word (byte-wide buffer, one byte per clock), plus handshake.
  With `FR_END`, add one clock per frame byte, stretched by `tx_dst_rdy_n`.
* `ReadInt`: 4 cycles per word after the request is seen.
* Convolution: 11 cycles per call (1 setup + 9 taps + ack). One word in a server's work loop costs
  14 cycles.
* Receive: one byte per clock while `rx_src_rdy_n` is low and a buffer is free.

## Sizes and limits

Defaults: `RX_BYTES = TX_BYTES = 2048` and `BUF_WORDS = 512`. The shared FPGA has 4 ports.

A full 512-word work buffer does not fit in one frame. A single-application message of `n` words
needs `12 + 4(n+4)` bytes, so `n <= 505`. Through the dispatcher, a request also carries the
length and header words, so `n <= 503`. A standard 1518-byte Ethernet frame limits `n` further,
to about 372 words. Bytes beyond a buffer are dropped and counted (`rx_overflows`,
`tx_overflows`). There is no segmentation and no retransmission: the reliability layer only
counts sequence and format errors.

Monitor report words (shared FPGA):

| word | content |
|---|---|
| 0 | frames received |
| 1 | frames sent |
| 2 | frames forwarded |
| 3 | frames discarded |
| 4-6 | jobs done by filters 0-2 |
| 7-9 | sequence errors of filters 0-2 |
| 10 | receive overflows |
| 11 | transmit overflows |

## Design choices that are this implementation's own

* The LLC header constant `16'hAA03` and the 2-bit Framing encoding.
* Port assignment (filters on ports 0-2, monitor on port 3) and the monitor report layout.
* The transmit buffer pointer restarts at byte 12 on `FR_START`, so that the client's first word
  directly follows the MAC addresses.
* The transmitter honours `tx_dst_rdy_n`.
* The receive side of the device: it holds one frame at a time, `ReadInt` starts at byte 12, and
  bytes past the end read as zero.
* The dispatcher bounds its header scan by `RxBytes`, discards zero-length frames, and frees each
  frame after its client has read it.
* The round-robin mutex grant.
* The `ArrayRead` format mirrors `ArrayWrite`. The expected sequence number resynchronises after
  an error, and overlength messages are read to the end but stored only up to the buffer size.
* Synchronous active-high reset everywhere. All buffers are plain arrays with same-cycle reads
  (distributed RAM).
* The threaded form of the three-channel server (`PARALLEL_CHANNELS = 1`): its structure is
  this implementation's own: one independent loop per channel, with results written back in
  place.
* Factorial circuit: `fac` is 16 bits wide, `i` counts down once per multiplication, and `n` of 0
  or 1 finishes at once with `fac = 1`.
* The hard Ethernet MAC is not included; its LocalLink side is brought out as ports.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/kiwi_pkg.sv rtl/kiwi_top.sv \
          tb/tb_kiwi_top.sv --top-module tb_kiwi_top -Mdir obj_top
./obj_top/Vtb_kiwi_top
```

Replace `kiwi_top` with any block name (`ether_link`, `llc_dispatcher`, `reliable_layer`,
`photo_filter_channel`, `photo_filter_app`, `monitor_app`, `three_channels_app`, `kiwi_farm_fpga`,
`kiwi_single_app_fpga`, `factorial_circuit`). The testbenches compare against independent software models: a
convolver model, expected frame bytes, and expected word streams.

* `tb_kiwi_top` runs both configurations at their default sizes. It includes three filter jobs,
  a frame for an unregistered port, an oversize frame, a monitor report, and two three-channel
  jobs. It fails unless each of these happened at least once: a forwarded frame, a discarded
  frame, a transmit mutex stall, a receiver hold-off, transmit back-pressure, a receive overflow,
  a monitor report, and a three-channel group running past `len`. It also runs the factorial
  circuit for 5 and 8 and checks the results and the cycle counts.
* `tb_three_channels_par` runs the unit test of the three-channel server in its threaded form.
  It also checks that the three convolvers are busy at once and that the work phase is short.
* `tb_kiwi_workloads` runs both configurations with the largest messages that fit one frame:
  three 503-word jobs on the shared FPGA, one per filter, followed by a monitor report; and
  505-word and 504-word jobs on the single-application FPGA. Every request frame is exactly
  2048 bytes. A last job sends a full 512-word buffer, which does not fit. The test checks that
  both frames are cut at 2048 bytes, that each buffer counts one overflow, and that the
  reliability layer counts one format error.
* `tb_kiwi_workloads` is built like `tb_kiwi_top`, and `tb_three_channels_par` like
  `tb_three_channels_app`.
* The unit testbenches use reduced buffer sizes:
  * `ether_link`: 64 bytes, to reach overflow.
  * `reliable_layer`: 8 words.
  * The filter servers: 30-32 words.

## How far to trust it

All testbenches pass, including the full-size end-to-end one. Each testbench has also been shown
to fail against a deliberately broken copy of its block. The design has been linted and
elaborated, and coarse synthesis runs through. It has not been placed on an FPGA or run against a
real MAC or client.

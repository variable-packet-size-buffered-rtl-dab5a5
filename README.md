# Variable-packet-size buffered crossbar (CICQ) switch core

A crossbar switch whose crosspoints hold small buffers can accept packets for
the same output from several inputs at once: the packets wait in the
crosspoints instead of being refused. That removes the global, cell-by-cell
matching an unbuffered crossbar needs. Each input and each output decide on
their own, and the packets can stay whole, with variable size. There is no
segmentation into cells, no reassembly, and no internal speedup. With no
speedup there are no output queues either. The large queues stay on the
ingress line cards, one virtual output queue (VOQ) per output. This is why the
organization is called combined input-crosspoint queueing (CICQ). Credit flow
control from the crossbar back to the line cards makes sure that a crosspoint
buffer never overflows.

This repository holds synthesizable SystemVerilog for the switch core, after
the architecture in the paper "Variable Packet Size Buffered Crossbar (CICQ)
Switches". The defaults are 32 x 32 ports, a 32-bit datapath per port
(300 Gb/s aggregate at 300 MHz) and a 2 KByte buffer in each of the 1024
crosspoints.

## Packet format

Every packet enters, crosses and leaves the switch as a run of 32-bit words
on consecutive clocks:

| word | contents |
|------|----------|
| 0 | multicast bitmap: bit k set = deliver to output k |
| 1 | first 4 bytes of the IP header; bits [15:0] = IP total length L in bytes |
| 2 .. | rest of the IP packet, most significant byte first |

A packet of L bytes is `1 + ceil(L/4)` words long (`vcb_pkg::pkt_words`). For
example, 40 bytes take 11 words and 1500 bytes take 376 words. The bitmap
word is stored in the buffers and counted by credits like any other word.
Because the bitmap fills word 0, N must not exceed the word width.

## Data path

```
 in link j ──► enqc ──► row bus j ──► xpd(j,0) xpd(j,1) ... xpd(j,N-1)
                                        │  each xpd: write side (in_clk[j]),
                                        │  2-port buffer xpm, read side (out_clk[k])
 column k: rd_data of xpd(0..N-1,k) ──► os k ──► out link k
 credit toggles of row j from os 0..N-1 ──► crs j ──► cred_line[j]
```

* **enqc** (one per input) marks `sop` on the bitmap word and `eop` on the
  last word. It finds the last word from the length in word 1.
* **xpd** (one per crosspoint) starts writing when `sop` is high and its own
  bitmap bit is set. It then writes one word per clock at a wrapping write
  address and stops after `eop`. It does not check for overflow, because the
  credits already prevent it.
* **xpm** is the crosspoint buffer: a 512 x 32 memory with a write port on
  the input clock and a read port on the output clock. Each word is written
  once and read once. There are no other elastic buffers in the chip.
* **os** (one per output) counts the packets in each crosspoint of its column.
  It picks crosspoints round robin and reads packets out whole.
* **crs** (one per input) returns one credit per departed packet to the line
  card.

## Crossing clock domains in the crosspoint

This is the subtle part of the design. Every input link and every output link
has its own clock. The only information that has to cross from the input side
to the output side, other than the data in the memory, is "one more packet has
arrived". The output learns each packet's length from the buffer itself.

* On the input clock, the crosspoint toggles its `newPacket` flag at the
  first word of every packet it enqueues.
* Two flip-flops on the output clock synchronize the flag (`xpd.new_pkt`).
* The output scheduler keeps the last value it saw. Each change adds one to
  that crosspoint's packet counter.

The pointers are never compared across the boundary, so the output knows how
many packets a buffer holds but not how many bytes. The scheduler therefore
works on packet counts only.

Because newPacket is a toggle, no acknowledge has to come back into the input
domain. Two packets in a row are never merged into one notification, as long
as they are at least a few clocks apart. The shortest packet is 11 clocks.

## Output scheduling and cut-through

`os` uses plain round robin. It serves the next crosspoint with a non-zero
packet count after the one it served last. It does not look at packet sizes.
To serve a packet it does the following:

1. It takes one from the crosspoint's counter and toggles the credit signal
   for that crosspoint's row.
2. It raises `deq` on every clock. The read data comes back one clock later.
3. When word 1 (the length) comes back, on the third clock, it works out how
   many reads are left. It stops `deq` after the last word.
4. On that last clock it already picks the next crosspoint, so output packets
   leave back to back with no idle clock between them.

`out_*` follows `deq` by two clocks: one for the memory read, one for the
output register.

A packet is counted one synchronization delay after its first word is
written. Its output can start reading it while the rest is still arriving.
This is **cut-through**, and it needs no extra logic. It is safe as long as
the reads never overtake the writes. That holds when an output clock is not
faster than the input clock by more than about (synchronization delay) /
(maximum packet duration). With 376-word packets, this means the output may
be at most about 1 % faster.

The opposite bound comes from the credits. The credit for a packet is sent
when the packet *starts* to leave. The line card may then refill the space
that is still being read. This is safe only while the read stays ahead of the
refill. So an input clock must not be faster than the output clock by more
than about (credit round trip) / (maximum packet duration). With the short
loop of the 4 x 4 test (about 20 clocks), this is about 5 %. Real links have
round trips of about 100 clocks, which gives more room.

Keeping the clocks within both bounds is a system constraint. The RTL does
not check it.

## Credits and flow control

The input schedulers live on the line cards, next to the VOQs. A line card
keeps a credit count per output, in words, starting at the buffer size (512
words). It sends a packet only if the packet fits in the credit of every
output in its bitmap. Each time an output starts sending a packet from
crosspoint (j, k), input j receives a credit that names output k only. The
line card remembers the sizes of the packets it sent to k and gives back the
oldest one.

`crs` synchronizes the N credit toggles of its row into the input clock. It
counts the pending credits per output and sends them on the serial line
`cred_line[j]`, which is low when idle. Each credit is a start bit `1`, then
the output number in log2(N) bits with the most significant bit first, then a
stop bit `0`. A credit takes 7 clocks at N = 32. The shortest packet takes 11
clocks, so the line always keeps up. When several outputs have credits
pending, they are served round robin. Credits of one output always leave in
order.

A buffer of one maximum-size packet plus one round-trip window keeps an output
fully used. The round-trip window is the credit loop delay times the line
rate. With 2 KByte, 1504 bytes plus a window of about 540 bytes fit in a
crosspoint.

## Files

| file | contents |
|------|----------|
| `rtl/vcb_pkg.sv` | sizes and `pkt_words()` |
| `rtl/xpm.sv` | crosspoint memory, two clocks |
| `rtl/xpd.sv` | crosspoint write/read logic and newPacket synchronizer; contains `xpm` |
| `rtl/enqc.sv` | enqueue controller |
| `rtl/os.sv` | output scheduler, output multiplexer |
| `rtl/crs.sv` | credit sequencer |
| `rtl/vcb_switch.sv` | top: N enqc, N x N xpd, N os, N crs |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/vcb_line_card.sv` | behavioural ingress line card (VOQs, input scheduler, credits) |
| `tb/vcb_out_checker.sv` | per-output packet checker |

Top-level parameters: `N` (ports, 32), `WIDTH` (32), `XP_BYTES` (crosspoint
buffer, 2048), `CNT_W` (packet and credit counter width, 6). Any `XP_BYTES` of
at least 1504 works, because one maximum packet must fit. It need not be a
power of two: the buffer addresses wrap explicitly. Raise `CNT_W` if
`XP_BYTES / 44` exceeds `2^CNT_W - 1`; `os` asserts that no packet counter overflows. All resets are asynchronous and active
low, with one per clock domain. The top's ports are unpacked arrays with one
element per port.

## What follows the paper and what is this design's own

These parts follow the paper:

* the crosspoint logic: enqueue on sop AND bitmap bit, stop on eop, one write
  counter, a read counter driven by deq, a 2-port buffer between the clocks,
  a synchronized newPacket notification;
* packet counters per crosspoint and a size-oblivious round robin from the
  last served crosspoint;
* deq held for the length read from the buffer;
* a credit generated when a packet starts to leave, naming the output only;
* line-card input schedulers with credits;
* the 32 x 32 size, the 32-bit datapath and the 2 KByte buffers.

These parts are this design's own choices:

* the exact word layout and length position;
* newPacket as a toggle instead of a set/acknowledge/reset flag;
* separate clocks for every output (the paper draws one common output clock
  domain);
* counter widths, pipeline registers and reset style;
* the credit frame format;
* per-output pending-credit counters served round robin. The paper's
  simulator sends the credits of a line card in strict FIFO order.

Link SERDES, pads and the line cards are outside the RTL. The memory is
written as an array. A real chip would use a two-port SRAM macro in its place.

Limits:

* A packet's words must arrive back to back. `enqc` has an assertion for this.
* Packets must be at least 5 bytes. The design point is 40 to 1500 bytes.
* Jumbo frames (10 KB) need `XP_BYTES` of 16 KB or more.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

* `tb_xpm`: two unrelated clocks, read-after-write over all addresses, and
  rd_data holding while rd is low.
* `tb_xpd`: exactly one newPacket toggle per enqueued packet, 1 to 3 output
  clocks after sop, and none when the bitmap bit is clear. Every word is read
  back in order, and the buffer wraps around.
* `tb_enqc`: sop and eop positions for 40 to 1500-byte packets, back to back
  and with gaps.
* `tb_os`: the exact round-robin order, deq held for exactly the packet's
  words, back-to-back output, the 2-clock latency, and one credit per packet.
* `tb_crs`: the serial frame, 3 to 5 clocks of latency, round-robin order,
  one credit per 7 clocks, and no credits lost in bursts.
* `tb_vcb_switch`: the whole switch at 4 x 4, with 150 packets per input
  from line-card models. The traffic mixes random unicast, a hot spot and
  multicast, and every port runs on its own clock. Every word of every packet
  and the order per source are checked, and all packets and all credits must
  arrive. The test also counts multicast copies, cut-through departures,
  back-to-back packets, round-robin source changes, credit back-pressure
  stalls, buffer wrap-around and credits. Any of these that never happens
  counts as a failure.
* `tb_vcb_switch_full`: the same test at the default 32 x 32 size with 2 KByte
  buffers, 24 packets per input. It takes about half a minute.
* `tb_vcb_workloads`: six 4 x 4 switches run side by side, one per traffic
  class. Inputs send back to back either to random outputs or all to output 0.
  Packets are all 40 bytes (3000 per input), all 1500 bytes (200 per input),
  or random sizes (400 per input). All packets must arrive intact. When every
  input sends to one output, that output must be busy on at least 99 % of the
  clocks between its first and last packet. It reaches 100 %.
* `tb_vcb_rtt`: the buffer-size rule. Four 2 x 2 switches with buffers of
  1536, 1792, 2048 and 2400 bytes carry one flow that alternates 1500-byte
  packets with short ones. The line cards add 100 clocks to the credit loop.
  Output utilization comes out at 0.80, 0.93, 1.00 and 1.00: the output stays
  busy once the buffer holds one maximum packet plus the round-trip window.
  The test checks full rate at the largest buffer, a clear loss at the
  smallest, and that utilization never falls as the buffer grows.
* `tb_vcb_throughput`: unbalanced traffic on six 8 x 8 switches. Input i sends
  to output i with probability f + (1-f)/N and to each other output with
  probability (1-f)/N. Packet sizes follow a bounded Pareto law between 40
  and 1500 bytes, `L = 40 / (1 - u (1 - (40/1500)^a))^(1/a)` with u uniform in
  [0,1) and a = 0.0912, which gives a mean of about 370 bytes. Inputs never
  run dry, and the credit loop is 100 clocks longer than the bare switch.
  With f = 0.5 and buffers from 1.5 to 8 KByte the throughput is 0.96 to
  0.99; it is about 0.98 at f = 0 and 0.997 at f = 1. The test checks that
  every packet arrives intact, that f = 1 reaches full rate, that every case
  stays above 0.9, and that buffer size moves the f = 0.5 result by at most
  0.03. With saturated inputs an output nearly always finds a packet in some
  crosspoint of its column, so this model does not show the loss near f = 0.5
  that arrival-driven traffic at 100 % load shows.
* `tb_vcb_pkg`: the word-count formula.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  --top-module tb_vcb_switch rtl/vcb_pkg.sv tb/tb_vcb_switch.sv
./obj_dir/Vtb_vcb_switch
```

The testbenches keep every output clock 0.5 to 2 % slower than the input
clocks. The switch has not been checked against timing at 300 MHz, and it has
not been run outside the clock bounds described under cut-through.

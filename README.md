# In-line IP-spoofing filter: packet base system with pluggable PIEF and HCF filters

Most DDoS floods forge the source address of their packets. This design sits in
a 10 Gb/s-class Ethernet path and drops such packets at line rate. It combines
two independent tests:

* **Port ingress/egress filtering (PIEF).** A packet is dropped if its source
  address lies in a range that can never be a genuine Internet source, such as
  private, loopback, multicast or documentation blocks. The ranges can be
  reprogrammed.
* **Hop-count filtering (HCF).** An attacker can forge every header field, but
  not the number of routers the packet crossed. The filter learns the hop-count
  of each source /24 block. Later packets from that block whose hop-count
  differs are dropped.

The design is split in two. The **base system** moves packets. The **filters**
only ever see a small decoded header. A new filter can be added beside PIEF and
HCF without touching the packet path.

```
 s_axis ─► pre_decode ─┬──────────► packet_fifo (raw frames, 1024 x 256 b) ──► post_decode ─► m_axis
                       │                                                           ▲
                       └─ header ─┬─► pief ─┐                                      │
                      (src, dst,  │         ├─► decision_maker ─► verdict queue ───┘
                          TTL)    └─► hcf  ─┘      (DROP / BYPASS, 1 bit per frame)
```

## How a frame travels

1. **pre_decode** accepts a beat only if the packet buffer can take it.
   It passes the beat to `packet_fifo` unchanged, in the same cycle.
   At the same time it picks fixed byte offsets out of the first two beats:
   - ethertype at bytes 12–13 and the IP version at byte 14;
   - TTL at byte 22;
   - source IP at bytes 26–29;
   - destination IP at bytes 30–33, which spans beats 0 and 1.

   One cycle after the second beat, it emits one header record per frame.
   A frame that is not IPv4, or that is too short to hold an IPv4 header
   (under 34 bytes), still gets a record. The record has `is_ipv4 = 0`, and
   such frames are always forwarded.
2. **pief** and **hcf** both register their result one cycle later.
3. **decision_maker** ORs the two results, without a register. The verdict
   (`DROP` or `BYPASS`) goes into a one-bit **verdict queue**, which is another
   `packet_fifo` instance. A frame's verdict therefore exists **two cycles
   after the beat that completes its header** (beat 1, or beat 0 of a
   one-beat frame). The end-to-end testbench checks this exact latency.
4. **post_decode** takes frames from the head of the buffer. The first beat of a
   frame waits until that frame's verdict is at the head of the verdict queue.
   The verdict is latched for the whole frame:
   - a `BYPASS` frame is sent out beat by beat, honouring `m_axis_tready`;
   - a `DROP` frame is read out of the buffer at one beat per cycle and
     thrown away.

Frames are never split into header and payload and put back together. The
whole raw frame waits in the buffer while it is classified. Verdicts and frames
stay in the same order, so no tags are needed.

**Throughput.** Every stage moves one 256-bit beat per cycle, and frames can
follow each other with no idle cycle between them. At 118.9 MHz that is
30.4 Gb/s, about three times a 10G port.

**Back-pressure.**
- When the output stalls, the buffer fills. `s_axis_tready` then drops.
- Short frames could fill the verdict queue before the buffer. When the queue
  has 4 or fewer free slots, pre_decode is held. This covers headers still in
  flight, and the queue cannot overflow (an assertion checks it).

## Hop-count filtering in detail

`hop_count_calc` infers the initial TTL Ti. It takes the smallest of the usual
operating-system start values {30, 32, 60, 64, 128, 255} that is not below the
received TTL Tf. The hop-count is then Hc = Ti − Tf. For example, TTL 118
arrived from a start of 128, so it crossed 10 hops.

The IP-to-hop-count table is split in two:

* `hcf_cam` is a 128-entry content-addressable memory of 24-bit keys (the /24
  block of the source address). It returns HIT/MISS and an index.
* `hc_reg_array` holds the hop-count of slot *k* at word *k*. A CAM can only
  return an index, so the value lives in this parallel register array.

For a header, `hcf` searches the CAM, reads the register array at the returned
index, and compares the stored hop-count Hs with the computed Hc. It then acts
as follows:

| case | result | table |
|---|---|---|
| HIT, Hc = Hs | legitimate | unchanged |
| HIT, Hc ≠ Hs | **spoofed** | unchanged |
| MISS, `learn_en` = 1 | legitimate | block and Hc written to the next slot |
| MISS, `learn_en` = 0 | legitimate | unchanged |
| TTL = 0 | **spoofed** | unchanged |
| not IPv4 | legitimate | unchanged |

The lookup, the compare and the table write all happen in the cycle the header
arrives. A header in the very next cycle from the same new block therefore
already hits.

Slots are filled in order. Once all 128 are in use, the oldest slot is
overwritten.

HCF learns regardless of what PIEF decided. The two filters are fully
independent, and only the decision maker combines them. One consequence:
packets that PIEF rejects still occupy hop-count slots. A flood from many
different forged private or multicast /24 blocks can therefore push genuine
sources out of a 128-entry table. When such a source returns, it is learned
again from its next packet. In the meantime, a forged TTL for it can slip
through, and a genuine packet can be dropped if the forged value was learned
first. Size `HCF_ENTRIES` for the number of blocks expected, or keep
`hcf_learn_en` low during an attack.

**Limitations of the method.**
- The first packet from an unknown block always passes.
- A flood that starts before the genuine source has been seen teaches the table
  the attacker's hop-count.

`learn_en` lets the system learn only during a quiet period and then freeze the
table. Combining HCF with PIEF also catches the most common forged sources
regardless of what the table learned.

## Ingress/egress ranges

`pief_cam` stores 16 ranges as prefix/mask pairs. At reset it is loaded with
these 14 special-use blocks:

| block | use | block | use |
|---|---|---|---|
| 0.0.0.0/8 | "this" network | 198.18.0.0/15 | benchmarking |
| 10.0.0.0/8 | private | 198.51.100.0/24 | TEST-NET-2 |
| 127.0.0.0/8 | loopback | 203.0.113.0/24 | TEST-NET-3 |
| 169.254.0.0/16 | link local | 224.0.0.0/4 | multicast |
| 172.16.0.0/12 | private | 240.0.0.0/4 | reserved |
| 192.0.0.0/24 | IETF protocol assignments | 255.255.255.255/32 | limited broadcast |
| 192.88.99.0/24 | 6to4 relay anycast | 192.168.0.0/16 | private |

The two spare slots start empty. A port-specific rule is written through the
`pief_wr_*` port. An example is blocking the site's own prefix when it arrives
as a source from outside. Every slot is a block rule: a hit means drop, so an
"only these sources" rule has to be expressed as the ranges to refuse. The
port fields are:
- `idx` selects the slot;
- `valid = 0` removes a range;
- the address and prefix length define the range.

`pief` compares the source address against all 16 slots in parallel
(`(src & mask) == addr`). A HIT on any slot means drop.

## Files

| file | contents |
|---|---|
| `rtl/ddos_pkg.sv` | stream beat and header structs, verdict enum, field offsets, reset table of ranges |
| `rtl/ddos_top.sv` | the whole filter |
| `rtl/pre_decode.sv` | header extraction, stream pass-through |
| `rtl/packet_fifo.sv` | first-word-fall-through FIFO (packet buffer and verdict queue) |
| `rtl/post_decode.sv` | forward or drop per verdict, frame counters |
| `rtl/pief.sv`, `rtl/pief_cam.sv` | ingress/egress filter and its range store |
| `rtl/hcf.sv`, `rtl/hcf_cam.sv`, `rtl/hc_reg_array.sv`, `rtl/hop_count_calc.sv` | hop-count filter |
| `rtl/decision_maker.sv` | DROP/BYPASS combination |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_throughput` and `tb_accuracy`; `tb_frame_pkg.sv` builds frames and holds the reference models |

### Top-level interface (`ddos_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `s_axis_tvalid/tready/tdata/tkeep/tuser/tlast` | in/out/in… | 1/1/256/32/128/1 | receive stream |
| `m_axis_*` | out/in… | same | transmit stream |
| `pief_wr_en/idx/valid/addr/len` | in | 1/4/1/32/6 | program one filter range |
| `hcf_learn_en` | in | 1 | allow the hop-count table to learn |
| `verdict_valid`, `verdict_drop`, `verdict_bypass` | out | 1 | one strobe per frame |
| `pief_hit`, `pief_rule`, `hcf_spoofed`, `hcf_hit`, `hcf_learned` | out | 1/4/1/1/1 | the filter results behind each verdict |
| `buffer_level` | out | 11 | beats in the packet buffer |
| `frames_forwarded`, `frames_dropped` | out | 32 | running counts |

The stream format has these conventions:
- byte 0 of a frame is in `tdata[7:0]`, and `tkeep[i]` qualifies byte *i*;
- frames are untagged Ethernet II;
- `tuser` is carried through untouched.

### Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ddos_top` | `PKT_FIFO_DEPTH` | 1024 | packet buffer depth in 32-byte beats (also verdict queue depth) |
| | `PIEF_ENTRIES` | 16 | filter ranges |
| | `HCF_ENTRIES` | 128 | hop-count table entries (256 is the larger variant) |
| | `HCF_PREFIX_W` | 24 | source bits that form a table key (/24 blocks) |

Buffer capacity: a 1500-byte frame takes 47 beats, so the buffer holds 21 of
them. A 64-byte frame takes 2 beats, so it holds 512.

## What follows the original architecture and what is added

These parts follow the original architecture:
- the split into base system and filters;
- the fields extracted;
- storing whole raw frames while they are classified;
- the sizes: 256 × 1024 buffer, 16 ranges, 128-entry table of /24 blocks;
- the special-use ranges;
- the initial TTL candidates and Hc = Ti − Tf;
- the CAM + comparator + register-array structure of HCF, and learning on a
  miss;
- DROP when either filter fires.

These are choices made here:
- **Verdict queue and its hold threshold.** The original only says the output
  stage waits for the decision maker. A queue is the simplest way to pair
  verdicts with buffered frames.
- **Stream byte order and the 128-bit tuser.**
- **No VLAN or IPv6 parsing.** Such frames are forwarded unfiltered.
- **The initial-TTL rule** ("smallest candidate not below the received TTL"),
  **table replacement order** (oldest first), **`learn_en`**, and dropping
  TTL-0 packets in HCF.
- **Register timing.** One-cycle filters, a combinational decision maker, and
  a combinational pass-through in pre_decode and post_decode.
- **A plain FIFO array** in place of a vendor FIFO core.
- **The rule write port**, the status outputs and the frame counters.

### Not included

- The 10G MAC/PHY ports of the board.
- Arbitration between several ports.
- Any full-duplex arrangement: how two traffic directions would share or
  duplicate the path is not defined here. One instance handles one stream.

Timing closure is not verified. The original implementation reached about
119 MHz. The 128-way 24-bit CAM search followed by the register-array read and
compare is a single-cycle path, and it is the one to watch.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. For example, to run the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ddos_pkg.sv tb/tb_frame_pkg.sv tb/tb_ddos_top.sv --top-module tb_ddos_top
./obj_dir/Vtb_ddos_top
```

Replace `tb_ddos_top` with any other `tb_<module>` to test one block.

`tb_ddos_top` runs about 2,300 frames through the full-size design and compares
every output beat with a reference model. The model is written independently:
- the ranges are octet tests;
- the hop-count table is a software array.

The test forces each mechanism at least once and fails if any never happened:
- a range hit;
- a hop-count mismatch and a match;
- TTL 0;
- non-IPv4 and runt frames;
- learning;
- table replacement;
- learning switched off;
- a full buffer;
- the verdict-queue hold;
- output back-pressure;
- waiting for a verdict.

It also checks that:
- at full rate the input never stalls;
- every verdict arrives exactly two cycles after the beat that completes its
  header.

Two testbenches reproduce the two kinds of measurement on the full-size
design:

* `tb_throughput` sends frames of 64, 128, 256, 512, 1024 and 1500 bytes back
  to back, 200 of each size. It checks that input and output both move one beat
  per cycle with no gap between frames. This gives 30.4 Gb/s of frame data at
  118.9 MHz; the test requires at least 9.869 Gb/s.
* `tb_accuracy` runs a 300,000-packet mix: 286,162 legitimate and 13,838
  spoofed, the spoofed half by range and half by forged TTL.
  - Frame sizes fall in six groups from 64 to 1500 bytes.
  - There are 120 distinct source blocks, so the table never replaces an
    entry.
  - It prints the detection, false-positive and false-negative rates per size
    group, and requires 100 %, 0 % and 0 %.
  - A second instance with a 256-entry table runs on the same input and must
    agree in every cycle.

The block testbenches check the following:
- `tb_hop_count_calc`: all 256 TTL values.
- `tb_pief`: range edges and random addresses, and adding and withdrawing a
  range at run time.
- `tb_hcf`: random traffic on an 8-entry table, so that replacement happens
  often.
- `tb_packet_fifo`: the FIFO against a queue model; the 1024-deep buffer is
  filled and drained completely.
- `tb_pre_decode`: field extraction under random gaps, stalls and holds.
- `tb_post_decode`: drop and forward order, late verdicts, and the one beat per
  cycle rate.

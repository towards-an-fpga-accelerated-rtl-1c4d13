# Programmable NIC data path for 5G edge-to-core traffic

Traffic between the edge and the core of a 5G network is wrapped in several
tunnels. A video stream from a user can travel as RTP inside UDP/IP, inside a
GTP-U mobile tunnel, inside a VXLAN tenant overlay. An ordinary NIC sees only
the outer IP header, so it cannot act on one user's flow or on one layer of a
scalable video stream.

This RTL is the data path of an FPGA NIC with four 10GbE ports and one DMA
port to the host. It walks the whole header stack of every packet, whatever
the nesting. From the innermost IP header, the tunnel identifiers, the RTP
payload type and the H.265 layer IDs it builds a 152-bit key. It looks that
key up in a 512-entry ternary CAM of host-installed rules. Then it drops,
mirrors, redirects or normally forwards the packet. A typical rule: "for the
user with GTP TEID 17, drop the enhancement layer of the video". The host
then receives only the base layer, at line rate, without the software stack
touching the dropped packets.

## Data path

```
 port 0..3 (10GbE, own clocks)  ┐
 port 4 (DMA to host)           ┤ RX pkt_queue (dual clock) ──> input_arbiter (round robin, per packet)
                                                                    │
                          ┌─────────────────────────────────────────┤ every beat goes to both
                          v                                         v
              packet buffer (sync_fifo, 64 beats)          p4_parser (160-byte window, 12-step walk)
                          │                                         │ 152-bit key
                          │                                         v
                          │                   match_action: tcam (512 x 152) + action RAM ─── rule_config <── cmd/rsp
                          │                                         │ destination port mask
                          v                                         v
                        p4_deparser (pairs packet with its decision, drops or stamps ports)
                          │
                          v
                   output_arbiter (copies each beat to every destination) ──> TX pkt_queue x5 ──> ports
```

* **Bus.** All pipeline traffic is 256-bit beats (`nic_pkg::axis_beat_t`).
  * Byte *i* of a beat is `tdata[8*i +: 8]`, the *i*-th byte on the wire.
  * `tkeep` marks the valid bytes from byte 0 up.
  * `tlast` ends a packet.
  * Inside the pipeline a beat also carries its source port and a destination
    mask (`pipe_beat_t`).
* **Clocks.** Each port has its own clock. The pipeline runs on `clk`, and the
  dual-clock queues move beats between the two domains. The testbench uses
  200 MHz for the pipeline (256 bits × 200 MHz = 51.2 Gb/s), 156.25 MHz for
  the Ethernet ports and 250 MHz for the DMA port.
* **Ordering.** A packet and its decision travel on separate paths, but both
  keep arrival order. The deparser simply pairs the head packet of the buffer
  with the head decision.
* **Control.** `cmd_*`/`rsp_*` is the rule channel. On the board it is fed by
  the register channel of the PCIe DMA engine.
* **Counters.** `cnt_*` count packets decided by a rule (hit) or by the
  defaults (miss), drops, fragments and packets sent.

## The key

The key is the match side of every rule. Fields are listed from the most
significant bit down. The list of fields and the 152-bit total are fixed by
the architecture; the width of each field is this implementation's choice.

| Key | Field | Bits | Taken from |
|---|---|---|---|
| K1 | `src_ip`, `dst_ip` | 32 + 32 | innermost IPv4 header (each new IPv4 header overwrites) |
| K2 | `src_port`, `dst_port` | 16 + 16 | innermost UDP or TCP header |
| K3 | `flow_layer` | 2 | number of VXLAN and GTP headers met: 0 IP flow, 1 VXLAN or GTP flow, 2 GTP over VXLAN |
| K4 | `encap_id1` | 16 | VXLAN VNI, low 16 bits |
| K5 | `encap_id2` | 16 | GTP-U TEID, low 16 bits |
| K6 | `encap_id3` | 7 | RTP payload type |
| K7..K9 | `encap_type1..3` | 3 × 2 | type of the 1st, 2nd and 3rd encapsulation met (none, VXLAN, GTP, RTP) |
| K10 | `hevc_layer` | 6 | H.265 `nuh_layer_id` (0 base layer, 1 enhancement layer, ...) |
| K11 | `hevc_tid` | 3 | H.265 `nuh_temporal_id_plus1` |

K7..K9 give meaning to K4..K6. A rule can say "the outermost tunnel is VXLAN
and inside it is GTP" just by setting `encap_type1 = VXLAN` and
`encap_type2 = GTP`, whatever identifiers the packet carries. To stay inside
152 bits, the VNI (24 bits) and the TEID (32 bits) are cut to their low 16
bits. Rules therefore tell apart 65,536 tenants and 65,536 tunnels.

## How the parser follows nested headers

The parser (`p4_parser`) works in two parts.

**Capture.** It watches the beats on their way into the packet buffer and
copies the first 5 beats of each packet into a 160-byte header window. A
shorter packet fills the window up to its last beat.

**Walk.** The window then enters a chain of 12 `parser_stage` steps. Each step
is combinational logic that:

* reads the header at byte 0 of the window, using a "next header" state;
* writes that header's fields into the key;
* picks the next header;
* shifts the window left by the header's length.

Every step takes one cycle, so a new packet can enter the walk on every
cycle. The parse graph:

```
Ethernet --0x0800--> IPv4 --17--> UDP --dport 4789--> VXLAN --> Ethernet ...
                          \--6--> TCP   \-dport 2152--> GTP-U (T-PDU) --> IPv4 ...
                                         \-otherwise--> RTP signature? --> RTP --> H.265 payload header
```

Tunnels are told apart by their well-known UDP ports, not by inspecting the
payload.

**RTP signature.** RTP has no port of its own. It is recognised by a mask on
the first 6 bytes after the UDP header. The value is `80 C0 00 00 00 00` and
the mask is `DF C0 00 00 00 00`, which requires:

* version 2, no extension and no CSRC;
* the marker bit set;
* the payload type's top bit set, i.e. a dynamic type 96..127 as video
  streams use.

The bytes after the 12-byte RTP header are read as the 2-byte H.265 NAL unit
header (K10, K11).

Twelve steps cover the deepest supported stack:
Ethernet/IPv4/UDP/VXLAN/Ethernet/IPv4/UDP/GTP/IPv4/UDP/RTP/H.265. That stack
is 142 bytes, so the shortest video packet of interest (144 bytes) fits the
window.

**Special cases.**

* IPv4 options are skipped using IHL.
* A GTP header with any of its E, S or PN flags set has 4 optional bytes,
  which are skipped.
* The walk ends without error, leaving the rest of the key zero, on:
  * a GTP extension-header chain;
  * a GTP message that is not a T-PDU;
  * an unknown protocol;
  * a header that does not fit in the window.

**Fragments.** Nested tunnels make IP fragmentation likely, and only the
first fragment of a datagram carries the inner headers.

* An IPv4 fragment (MF set or offset not zero) at any layer sets the packet's
  fragment flag, which `cnt_frag` counts.
* The outermost fragmented IPv4 header also gives the datagram's identity
  (source, destination, identification) and says whether this is the first
  fragment.
* A later fragment has no headers past that IPv4 header, so the walk stops
  there and its own key holds only the outer fields.

To give all fragments of a datagram the same fate, `match_action` keeps the
decision of each first fragment in a 16-entry table (`FRAG_ENTRIES`, oldest
replaced first) under the datagram identity. A later fragment found in the
table gets exactly that decision: same ports, or dropped.

A later fragment that is not in the table is classified on its own key. This
happens when its first fragment came after it, was never seen, or was
evicted by 16 newer datagrams. Fragments are never buffered or reordered.

## Rule table and control channel

`tcam` keeps 512 entries of value, mask (1 = compare this bit) and a valid
bit.

**Lookup.** A lookup compares the key with every entry in parallel and
registers the lowest-numbered matching entry one cycle later. A lower index
therefore means a higher priority.

**Writes.** Writes are modelled on a TCAM built from SRL16E shift-register
LUTs. The write port is busy for 16 cycles, after which the entry changes at
once. Lookups go on during a write and see the old contents. The storage
itself is plain registers; the bit-serial SRL loading is not modelled.

**Action RAM.** Next to each entry, `match_action` keeps `{rule_id[15:0],
action[1:0], ports[4:0]}`. It is written when the TCAM write commits.

**Commands.** `rule_config` takes one command at a time (`cmd_ready` is high
when idle) and answers with a one-cycle `rsp_valid` pulse:

| `cmd` | Effect | Response |
|---|---|---|
| `CMD_ADD` | writes value, mask and action into the lowest free entry | `ST_OK` with the entry in `rsp_data`, or `ST_FULL` |
| `CMD_DELETE` | invalidates entry `cmd_index` | `ST_OK`, or `ST_BAD_INDEX` if it was empty |
| `CMD_CLEAN` | invalidates all entries | `ST_OK` |
| `CMD_NUM_RULES` | — | `ST_OK`, number of valid rules in `rsp_data` |

Commands that write the table answer 18 cycles after the command cycle: the
16-cycle write plus 2. The others answer on the next cycle. Because ADD fills
from the lowest free entry, rules added first win. There is no separate
update command. To change a rule, delete it and add it again; the freed
entry is reused if it is the lowest free one. If rules must be reordered,
the host has to delete and re-add them.

## Actions and default forwarding

Every packet gets a destination port mask (bit *p* = port *p*; port 4 is
DMA):

| Action | Destination |
|---|---|
| no match, or `ACT_FORWARD` | `DEFAULT_DST[src]` (FORWARD only counts the hit) |
| `ACT_DROP` | none: the deparser consumes the packet without sending it |
| `ACT_MIRROR` | `DEFAULT_DST[src]` plus `ports` |
| `ACT_REDIRECT` | `ports` |

By default the parameter `DEFAULT_DST` sends Ethernet ports 0..3 to the host
and the host to port 0. The output arbiter offers each beat to all its
destinations at once and keeps it until every one of them has taken it, so a
slow port holds back the mirrored copies.

## Timing and throughput

**Rate.** The pipeline moves one 256-bit beat per cycle. The input arbiter
switches ports without an idle cycle. The parser takes a beat every cycle
unless its output is stalled. The deparser has no gap between packets. With
all five ports sending, the end-to-end test measures 1984 beats in 2000
cycles.

**Delay.** A packet's decision is ready 17 cycles after the beat that
completes its header window (the 5th beat, or the last beat of a shorter
packet) leaves the input arbiter:

* 13 cycles through the 12-step walk;
* 4 cycles for the TCAM lookup, the action RAM read, the decision FIFO and the
  deparser.

At that point the packet's first beat enters the deparser. The delay does
not depend on the number of rules, the packet size or the offered rate.

For a packet arriving from a 10GbE port at 156.25 MHz, the first five beats
take about 5 pipeline cycles to arrive. That gives 22 cycles (110 ns at
200 MHz) from first beat to decision. The packet then streams out at one
beat per cycle, e.g. 47 cycles for 1500 bytes.

**Back-pressure.** A full TX queue stalls the output arbiter, then the
deparser, the packet buffer and the input arbiter. Finally the RX queues stop
taking beats. Nothing is dropped except by rules.

**Sizes.** The RX/TX queues and the packet buffer hold 64 beats (2048 bytes),
enough for a 1500-byte packet. They are parameters of the top
(`QUEUE_ADDR_W`, `BUF_ADDR_W`).

## Where this implementation fills gaps or departs from the architecture

* The architecture states the 152-bit key, its fields, 512 rules, the
  one-cycle lookup and the 16-cycle SRL write. The field widths and the
  16-bit truncation of VNI and TEID are this implementation's choice.
* **Fragments.** The architecture calls for the same decision on all
  fragments of a packet but gives no mechanism. The decision table keyed by
  datagram identity is this implementation's own. It relies on the first
  fragment arriving first.
* **Action semantics.** The architecture names DROP, mirror and redirect. The
  exact port semantics, the FORWARD code, the 16-bit rule ID and the port
  mask argument are this implementation's choice, and so is the default
  routing.
* **One IP pair in the key.** The key holds a single IPv4 address pair, the
  innermost one. Outer tunnels are matched through their identifiers and
  types (K4..K9), not through their IP addresses.
* **Parser window.** The 160-byte window, the 12-step walk and the
  window-size limit on parsing are this implementation's choice. Headers past
  byte 160 are not parsed.
* **Invented details.** The queue depths, the command/response format, the
  status codes, the choice of the lowest free entry on ADD, the counters and
  the synchronous active-low resets are all invented here.
* **Missing board parts.** The 10GbE MACs, the PCIe DMA engine with its
  driver, and the host software are not part of this RTL. Their stream and
  register interfaces are the top's ports.

## Files

| File | Content |
|---|---|
| `rtl/nic_pkg.sv` | types and constants: beats, key, actions, commands |
| `rtl/nic_datapath.sv` | top level |
| `rtl/pkt_queue.sv` | dual-clock FIFO (Gray pointers), RX and TX queues |
| `rtl/sync_fifo.sv` | single-clock FIFO: packet buffer, decision FIFO |
| `rtl/input_arbiter.sv` | round-robin packet arbiter |
| `rtl/p4_parser.sv`, `rtl/parser_stage.sv` | header window and walk; one header step |
| `rtl/tcam.sv` | ternary CAM |
| `rtl/match_action.sv` | lookup, action RAM, destination resolution |
| `rtl/rule_config.sv` | add / delete / clean / count commands |
| `rtl/p4_deparser.sv` | pairs packets with decisions |
| `rtl/output_arbiter.sv` | multicast into the TX queues |
| `tb/tb_pkt_pkg.sv` | packet builder (all four flow types, RTP, H.265, fragments) and reference key |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_nic_datapath.sv` | end-to-end test at full size |
| `tb/tb_nic_workloads.sv` | sweeps of rule count (0..512), packet size (144..1500 B), offered rate (1..10 Gb/s) and flow type |

The end-to-end test runs the top with its default parameters. It:

* installs 512 rules through the control channel and checks that the 513th
  is refused as full;
* sends about a thousand mixed packets of 150–1500 bytes from all five ports
  at once;
* compares every packet leaving every port byte for byte with a reference
  model;
* checks the counters, the rate and the delay;
* stalls the host side to back the pipeline up;
* sends fragmented enhancement-layer packets whose later fragments must be
  dropped with their first;
* deletes a rule and cleans the table.

It also counts each mechanism (four flow types, hit, miss, DROP, MIRROR,
REDIRECT, fragment, fragment following its first, contention, back-pressure,
FULL, delete, clean) and fails if any of them never happened.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/nic_pkg.sv tb/tb_pkt_pkg.sv rtl/pkt_queue.sv rtl/sync_fifo.sv \
  rtl/input_arbiter.sv rtl/parser_stage.sv rtl/p4_parser.sv rtl/tcam.sv \
  rtl/match_action.sv rtl/rule_config.sv rtl/p4_deparser.sv \
  rtl/output_arbiter.sv rtl/nic_datapath.sv tb/tb_nic_datapath.sv \
  --top-module tb_nic_datapath -o sim
obj_dir/sim
```

The full-size test runs in well under a minute. For a block test, list
`nic_pkg.sv`, the block, its helpers (`sync_fifo`, `tcam`, `parser_stage`),
`tb_pkt_pkg.sv` where the testbench uses it, and the testbench. Some block
tests shrink the TCAM to keep runs short; the TCAM test itself runs at 512
entries.

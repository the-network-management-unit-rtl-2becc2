# Network Management Unit (NMU) — Universal variant

An FPGA that is plugged straight into a datacenter network, rather than sitting behind a host
CPU, has no operating system between its applications and the wire. If several applications (or
several tenants) share that FPGA, nothing stops one of them from sending packets with someone
else's addresses, talking to hosts it should not reach, or reading traffic meant for a neighbour.

The NMU fills that gap in hardware, the way an MMU does for shared memory. Every application
talks over *logical connections*. For each connection the host programs a rule; the NMU then

* lets a connection **send** only packets whose source fields are its own and whose destination is
  one it is allowed to reach (source and destination access control lists, ACLs),
* **delivers** a received packet only to the connection whose endpoint it addresses (a CAM search),
  and drops what matches no connection,
* **routes internally**: a packet from one connection to another connection on the same FPGA is
  turned around inside the NMU instead of going out to the network,
* keeps connections in separate **virtual networks** by tagging every outgoing packet with the
  connection's virtual network id and checking and removing that tag on every incoming packet.

This RTL is the "universal" NMU, which has all of these mechanisms at once and inspects headers up
to layer 4 (Ethernet, 802.1Q VLAN, IPv4, TCP/UDP). It is written for a 10 Gb/s port: 64-bit beats at
156.25 MHz, one beat per cycle, 32 logical connections by default.

## Packet paths

```
 applications                                                          Ethernet controller
 app_tx ──► parsers ──► nmu_check ──► buffer/filter ──┬─ remote ──► tag insert ──► net_tx
 (+conn)    MAC,VLAN,   src+dst ACL,   hold until      │
            IPv4,L4     CAM (local?)   verdict, drop   └─ local ─┐ (internal routing)
                                                                 ▼
 app_rx ◄── merge ◄──────────── buffer/filter ◄── nmu_check ◄── parsers ◄── tag remove ◄── net_rx
 (+conn)    round robin          drop            tag present,             + tag parser
                                                 CAM → conn
```

Both directions use the same parser chain (`hdr_parser_chain`), the same verdict stage
(`nmu_check`, with `EGRESS` = 1 or 0) and the same buffer (`pkt_buffer_filter`), all reading one
rule table (`nmu_rule_table`).

## Parsing in flight: the header record

The hardest part to follow is how the parsers work without ever storing a packet.

Every stream beat (`beat_t`: 64 data bits, 8 keep bits, `last`; byte lane 0 is the first byte on
the wire) travels with a **header record** (`hdr_t`). Each parser is one register stage. While a
beat passes, the parser copies those bytes of *its own* fields that lie in this beat into the record,
and raises a valid flag when the last byte of a field has passed. It also keeps its own copy of what
it has found so far in the packet, because the record arriving from upstream with a later beat
does not know what this stage found in an earlier one.

Because each parser is one cycle behind the previous one, a field found by stage *k* is already in
the record when the same beat reaches stage *k+1*. That is what lets later offsets depend on earlier
fields without stalling:

| stage | reads | depends on |
|---|---|---|
| `mac_parser` | dst MAC 0–5, src MAC 6–11, EtherType 12–13 | — |
| `vlan_parser` | if EtherType = 0x8100: VLAN id 14–15, inner type 16–17; sets layer-3 offset 14 or 18 | EtherType |
| `ipv4_parser` | IHL, protocol, src IP, dst IP; computes layer-4 offset = L3 + 4·IHL | L3 offset, type 0x0800 |
| `transport_parser` | src and dst port (TCP or UDP only) | L4 offset, protocol |

The record leaving the chain with a beat holds every field whose bytes have passed by then. For an
untagged UDP frame the ports are complete with beat 4 (bytes 32–39). A packet that is not
IPv4 TCP/UDP, or that ends inside its headers, leaves with `v_l4` low.

The byte helpers `cap_field` and `field_done` in `nmu_pkg` do the copying for any field offset,
fixed or computed.

## Verdicts and filtering

`nmu_check` is one more register stage. At the first beat of a packet whose record is complete
(`v_mac` and `v_l4`) it computes a verdict and pulses `verdict_valid` one cycle later. If the
headers never complete, the verdict is forced at the last beat, or at beat 15 for a long packet
(`HDR_BEATS_MAX`), and the packet is dropped. So every packet gets exactly one verdict, at most 16
beats after it starts.

`verdict.reason` has one bit per failed check:

| bit | direction | meaning |
|---|---|---|
| 0 | egress | connection id out of range or rule not valid |
| 1 | both | headers incomplete (not IPv4 TCP/UDP, or too short) |
| 2 | egress | source ACL: src MAC, VLAN, src IP or src port is not the connection's own |
| 3 | egress | destination ACL: dst MAC not the permitted one, dst IP outside the permitted network, or dst port not permitted |
| 4 | ingress | packet did not carry the NMU tag |
| 5 | ingress | no valid destination: CAM miss |

`pkt_buffer_filter` writes every beat into a beat FIFO and every verdict into a verdict FIFO. The
read side waits until the packet at its head has a verdict. It then streams that packet out, with
the verdict beside each beat, or discards it at one beat per cycle. A packet is therefore held only
until its headers are parsed, not until its end, so latency does not grow with packet length. The
verdict FIFO is as deep as the beat FIFO, so it cannot overflow; an assertion checks this.

### The connection CAM and internal routing

`conn_cam` compares a key against all rules in parallel. The key holds destination MAC, VLAN (tagged
or not), destination IP, destination port and virtual network id. The lowest-numbered valid match
wins. A rule VLAN id of 0 means "untagged".

* On **ingress** the virtual network id is taken from the received tag. The hit index is the
  connection the packet is delivered to (`app_rx_conn`).
* On **egress** the virtual network id is the sender's own. A hit means the destination is another
  connection on this FPGA in the same virtual network. The buffer output is then steered to the
  merge (`pkt_arbiter`) instead of the tagger. The packet arrives at the destination connection
  unchanged and untagged. It has already passed the sender's ACLs.

## Tag insertion and removal: the segmented FIFO

Inserting or deleting bytes in the middle of a 64-bit stream shifts all later bytes across beat
boundaries. Both tag units use `seg_fifo` for this: a ring of bytes, each with an end-of-packet flag,
that accepts a variable number of bytes per cycle and hands out full 8-byte beats. It re-aligns every
packet to lane 0.

* `pkt_inserter` (encapsulator/tagger): its write side walks the bytes of each beat in order. Just
  before absolute byte `OFF` it writes the `INS_BYTES` insert bytes. That one write can carry
  8 + `INS_BYTES` bytes. The FIFO accepts a write only when that many bytes are free.
* `pkt_remover` (de-encapsulator/de-tagger): bytes `OFF`..`OFF+REM_BYTES-1` are simply never
  written. The removed bytes are kept as the packet's tag. They go into a 4-entry tag FIFO,
  which is shown beside the packet's output beats and released at its last beat.

The tag used here is 4 bytes at byte 12, right after the source MAC: TPID 0x88A8, then a 16-bit
field whose low 12 bits are the virtual network id (the other bits are zero). On ingress a packet
whose bytes 12–13 are not 0x88A8 still loses those four bytes and is then dropped (reason 4).
The offset and length are module parameters, so the same units can insert a longer encapsulation
header.

## Rules and the host port

`nmu_rule_table` holds one `rule_t` per connection in flip-flops, so that every CAM entry can be
compared at once. The host writes 32-bit words (`cfg_we`, `cfg_conn`, `cfg_addr`, `cfg_wdata`) and can
read any word back on `cfg_rdata`:

| addr | contents |
|---|---|
| 0 | [0] valid, [1] any remote MAC allowed, [2] any remote port allowed |
| 1 | own MAC [31:0] |
| 2 | [15:0] own MAC [47:32], [27:16] own VLAN id (0 = untagged) |
| 3 | own IPv4 address |
| 4 | [15:0] own port, [27:16] virtual network id |
| 5 | permitted remote MAC [31:0] |
| 6 | [15:0] permitted remote MAC [47:32], [31:16] permitted remote port |
| 7 | permitted remote IPv4 network |
| 8 | mask for word 7 (the packet's dst IP and word 7 are compared under it) |

Writes to connections ≥ `N_CONN` are ignored. Reset clears all rules, so nothing passes until the
host enables a connection. A write takes effect at the next clock edge and applies to packets
whose verdict is taken after that.

## Timing

* Throughput: one 64-bit beat per cycle everywhere, which is 10 Gb/s at 156.25 MHz. The tagger
  makes each packet 4 bytes longer, which can add one beat per packet.
* Latency, 64-byte untagged UDP frame, no back-pressure: the first beat reaches `net_tx`
  **11 cycles** after `app_tx` offers it. A received frame reaches `app_rx` **12 cycles** after
  `net_rx` offers it. The breakdown is 4 parser stages and 1 check stage. Then comes the wait
  until the beat with the ports has passed the check (beat 4, or beat 5 behind the tag). Last
  come the buffer and the tag unit.
* For comparison, the reference implementation reports 13–18 cycles egress and 19–25 cycles
  ingress for its universal NMU.

## Where this design departs from, or adds to, the reference description

The description this RTL follows gives the block structure, the mechanisms and the evaluation
numbers, but few internals. This design makes its own choices in these places:

* **Beat format and handshake**: 64-bit valid/ready streams with `keep`/`last` and an asynchronous
  active-low reset.
* **Where checks happen**: the reference draws one ACL and one CAM inside each parser (MAC, IPv4,
  port). Here all compares happen in one stage after the transport parser. The decision is the
  same.
* **Ingress order**: the reference puts tag parsing and the destination CAM before de-tagging. Here
  the tag is read inside the de-tagger, and the CAM search happens after parsing, since the
  destination fields lie behind the tag.
* **Egress order**: internal routing is decided before tagging, so internally routed packets are
  never tagged.
* **Ingress ACLs**: none. Delivery is decided by the CAM alone.
* **Tag format**: the 0x88A8 tag described above. The reference names tagging and encapsulation
  (and VLAN/VXLAN/NVGRE as known schemes) but no format.
* **Filtering**: packets are released as soon as their verdict is known. Headers that are
  incomplete by beat 15 cause a drop.
* **Sizes**: buffers of 32 beats, segment FIFOs of 32 bytes, a tag FIFO of 4 packets.
* **Not modelled**: the PCIe controller, the Ethernet controller, the applications and the on-chip
  interconnect. Their signals are the top-level ports (`cfg_*`, `net_*`, `app_*`).
* **Scaling**: `N_CONN` may be set up to 256 (connection ids are 8 bits). `tb_nmu_scale` runs the
  full end-to-end traffic at 256 connections with the same latencies. The CAM and rule table grow
  linearly in flip-flops and compare logic; no area figures are given here.

## Files

| file | role |
|---|---|
| `rtl/nmu_pkg.sv` | beat, header record, rule, CAM key and verdict types; byte-capture helpers |
| `rtl/mac_parser.sv`, `vlan_parser.sv`, `ipv4_parser.sv`, `transport_parser.sv` | the four parser stages |
| `rtl/hdr_parser_chain.sv` | the four parsers in a row |
| `rtl/nmu_rule_table.sv` | per-connection rules, host register port |
| `rtl/acl_check.sv`, `rtl/conn_cam.sv` | source/destination ACL compare; parallel connection CAM |
| `rtl/nmu_check.sv` | verdict stage (egress or ingress) |
| `rtl/pkt_buffer_filter.sv` | hold-until-verdict buffer that forwards or drops packets |
| `rtl/seg_fifo.sv` | byte-lane (segmented) FIFO |
| `rtl/pkt_inserter.sv`, `rtl/pkt_remover.sv` | tagger/encapsulator, de-tagger/de-encapsulator with tag parser |
| `rtl/pkt_arbiter.sv` | packet-level round-robin merge of network and internally routed traffic |
| `rtl/nmu_top.sv` | the universal NMU |
| `tb/nmu_tb_pkg.sv` | frame builder and reference models for tag insertion/removal |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_nmu_top` end to end at full size, `tb_nmu_scale` the same at 256 connections |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a hung run
as a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nmu_pkg.sv tb/nmu_tb_pkg.sv rtl/*.sv tb/tb_nmu_top.sv \
    --top-module tb_nmu_top -Mdir obj_top
./obj_top/Vtb_nmu_top
```

Replace `tb_nmu_top` by any other `tb/tb_*.sv` to test one block. The packages must come first.

`tb_nmu_top` programs all 32 connections. It then runs 400 application packets and 400 network
packets at the same time, under random back-pressure. Every output packet is compared with a
reference built from the packet description and the rules. The testbench counts each mechanism:
tagging, de-tagging, internal routing, the crossing into another virtual network, each drop
reason, back-pressure on both outputs and contention at the merge. A mechanism that never
occurs is a failure. The testbench also checks the 11/12-cycle latencies. It also sends bursts
of back-to-back packets to check that both directions take one beat per cycle. The block testbenches
drive randomized traffic against independent reference models. They check data, side bands,
counters, latency and, for the tagger, throughput.

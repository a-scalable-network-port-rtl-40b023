# Port scan detection and blocking in hardware

A port scanner probes many addresses and ports and gets mostly refusals back. Keeping state per
flow or per host to catch this does not scale to a busy link. This core keeps its main state per
**subnet** instead. For each source subnet it counts how often hosts in that subnet behave like
scanners: they receive a TCP RST+ACK refusal, or they send a packet with an impossible flag
combination. Only when a subnet's count passes a threshold do its misbehaving hosts get
individual attention. They go on a short **suspicion list**, where each one is watched for the
typical habits of a scanner. A host that shows enough of those habits goes on a **black list**
(the scanner list), and every packet from or to it is dropped from then on.

Slow ("stealth") scanners wait minutes between probes, so they leave the suspicion list before
they have shown enough. The core does not forget them. When a suspect times out, its score moves
into a **hash table** with a much longer time-out. The next time that host misbehaves, it is
caught through the hash table. If its scores add up over time, it is blacklisted.

The core sits in-line between two Ethernet MACs. A frame received on one MAC is stored in a
memory bank and its header is judged. The frame is then copied out through the other MAC, or
dropped.

## Per-packet algorithm

For every IPv4 header, the scan detection unit (`scan_detection_unit`) runs these steps in order:

1. **Black list.** The source and the destination are searched in the scanner list. A hit drops
   the packet and ends the work. Non-TCP packets end here and pass.
2. **Is the refusal genuine?** For an RST+ACK, the replier's subnet is looked up in the
   *aggregate destination list*. That list holds the subnets that traffic has been sent to. A
   refusal from a subnet nobody contacted is treated as spoofed and ignored. The destination
   subnet of every TCP packet is entered in (or refreshed in) this list.
3. **Suspects are watched.** If the source or the destination is on the suspicion list, its row
   is updated (see below).
4. **Bad packets.** A packet is *bad* if it carries invalid flags, or if it is a genuine RST+ACK.
   The *subject* of a bad packet is the host being judged:
   - for invalid flags, the host that sent them;
   - for an RST+ACK, the host that receives the refusal.

   For a bad packet, the hash table is probed for the subject. If the subject has a row there
   (a suspect that timed out earlier), its HASH_count goes up by one.
5. **Subnet count.** The subject's subnet (address AND subnet mask) is looked up in the
   *aggregate source list*. For a bad packet its AGG_count is incremented. An unknown subnet gets
   a new row. When the count reaches AGG_TH it is flagged and restarts from zero. So a busy
   subnet flags again each time it collects another AGG_TH bad packets.
6. **New suspects.** A bad subject that is not yet a suspect enters the suspicion list if its
   subnet count just reached AGG_TH, or if it has a hash table row.
7. **Blocking.** A host whose SUSP_count reaches SUSP_TH, or whose HASH_count reaches HASH_TH,
   is added to the scanner list. The packet is dropped if its source or destination was found on
   the black list, or was added to it during this work.

Invalid flag combinations are NULL (no flags), SYN+FIN, SYN+RST, and FIN without ACK
(`sds_pkg::is_invalid_flags`).

### What the suspicion list counts

Each suspect row holds:
- the peer of its current connection;
- the number of connections it has opened (8 bits);
- the number of packets in the current connection (3 bits, saturating);
- SUSP_count (5 bits).

SUSP_count goes up by one for each of these scanner habits:

- the suspect receives an RST+ACK (refused probe);
- the suspect sends invalid flags;
- the suspect opens a new connection (SYN without ACK), and its previous connection carried
  2, 3 or 5 packets. That is a half-open probe (SYN, SYN+ACK, RST) or a handshake with no data
  exchanged.

Any other packet between the suspect and its current peer only advances the packet count.

### Stealth path

The suspicion list is purged like every list (next section). Each purged suspect is held in a
one-entry buffer. Before it accepts the next header, the unit adds that suspect's SUSP_count to
the hash table. This takes 4–7 cycles and happens only on time-outs. It must not wait for idle
cycles: under back-to-back traffic there are none, and the suspicion list's purge would stall
behind the full buffer.

The hash table is direct-mapped: the address XOR-folded to 8 bits indexes one of 256 rows, and a
row holds the last address hashed there, HASH_count and an arrival time. Two addresses that share
a row share a count. This errs toward blocking, and the stored address is the last one hashed.
If HASH_count reaches HASH_TH, that address is blacklisted at once.

## How a list is built

Every list except the scanner list is a `timed_list`: a **CAM** (`cam`) that holds only the key
(IP address or masked subnet), plus a **dual-port block RAM** (`dp_ram`) that holds the rest of
the row and a 32-bit arrival time. The CAM's matched address is the RAM address. Each CAM row has a valid bit, and a delete clears it, so any
address, 0.0.0.0 included, can be stored. Keeping the
wide data out of the CAM saves a lot of logic, because a CAM bit costs far more than a RAM bit.
The price is an extra cycle or two per access.

A request takes three cycles:

| cycle  | work |
|--------|------|
| accept | key presented to the CAM search |
| match  | match flag, matched row and lowest vacant row latched; RAM port A read |
| update | old row shown to the owner (`cur_valid/cur_hit/cur_data`); the owner's combinational rule answers `upd_write/upd_data`; the row is rewritten with the new arrival time, or a new row is written into CAM and RAM; `resp_*` strobes |

The three list types differ only in that update rule:
- `aggregate_source_list`: count with AGG_TH;
- `aggregate_destination_list`: no data, presence only;
- `suspicion_list`: the habit counters.

The scanner list (`scanner_list`) is a bare CAM: search, or add after a search finds nothing.
When it is full, the oldest row is reused. The hash table (`hash_table`) needs no CAM. Its valid
bits are kept in flip-flops, so it is empty right after reset.

### Time-out purge by cycle stealing

Each list has a `timeout_purge_fsm` with these states:

START → GENERATE NEW ADDRESS → START BRAM READ → READ BRAM DATA → CHECK BRAM DATA
(→ WAIT FOR CAM TO GET FREE → DELETE ENTRY IN CAM)

Every *check interval* ticks, the FSM walks all rows through the RAM's second port. Packet
traffic uses port A, so the scan itself never stalls packet processing. Only deleting a
timed-out row touches the CAM. (A deleted suspicion row does delay the next header by the 4–7
cycles of its hash table hand-off.) The delete waits until the CAM is not busy and the list has no request in
flight, then takes one cycle. A row that a packet rewrites while the scan is checking it is not
deleted. Scan time:
- 4 cycles per row;
- 2 more cycles for each row deleted.

A row is timed out when `now - arrival >= timeout`, computed modulo 2^32, so the 32-bit time
base may wrap. The hash table's time-out should be much longer than the other two lists'
(default: 1 hour against 1 minute). Otherwise stealth scanners are forgotten before their
next probe.

The time base (`scan_detection_engine`) divides the clock by `tick_div + 1`. The default is 1 ms
per tick at 100 MHz. `now` counts ticks.

## Frame path: transfer engine

`transfer_engine` plays the role of the DMA and memory banks:

1. **Receive.** It picks a receiving MAC round-robin. It copies a complete frame, one byte per
   cycle, into the next free memory bank (default: 2 banks of 2048 bytes).
2. **Header extraction.** While the frame streams in, `header_extraction_unit` picks out the
   EtherType, IPv4 addresses, protocol, and TCP flags. The TCP flags sit at byte
   14 + 4·IHL + 13, so IP options are handled.
3. **Judging.** Banks are judged in arrival order. Each header goes to the scan detection
   engine. The engine's verdict either copies the frame to the *other* MAC's transmit stream
   (one byte every two cycles), or frees the bank at once.

While all banks are full, `rx_ready` is low and the receive FIFOs wait. A frame longer than a
bank is discarded without being judged.

## Configuration and status registers

`config_regs` uses a 5-bit word address with 32-bit data. A read returns data one cycle after
`bus_rd`.

| addr | register | reset |
|------|----------|-------|
| 0 | subnet mask (any bit pattern, need not be contiguous) | FFFF_FF00 |
| 1 / 2 / 3 | AGG_TH / SUSP_TH / HASH_TH | 5 / 5 / 8 |
| 4 / 5 / 6 | time-out: aggregate / suspicion / hash (ticks) | 60000 / 60000 / 3600000 |
| 7 / 8 / 9 | check interval: aggregate / suspicion / hash (ticks) | 1000 each |
| 10 | tick divider (clocks per tick − 1) | 99999 |
| 16–20 (read) | packets decided, dropped, scanners added, suspects added, HASH_TH crossings | 0 |
| 21 / 22 (read) | current time, scanner list rows used | |

The aggregate destination list uses the aggregate list's time-out and check interval.
AGG_count and SUSP_count are 5 bits and saturate at 31, so thresholds above 31 are never reached.

## Timing and throughput

- **List requests.** Each list request takes 3 cycles; scanner list and hash table requests
  take 2. The controller adds a cycle per step.
- **Per header.** A single TCP header that blocks nothing is decided in 20–28 cycles,
  measured in `tb_scan_detection_unit`. On the mixed traces of `tb_workload_trace`, headers
  sent back to back are accepted every 20.5 cycles on average.
- **Throughput.** At 100 MHz, 2 Gbps is 20 bits per cycle. At 20.5 cycles per header, the
  engine keeps up with 2 Gbps whenever the average frame is at least 52 bytes, which every
  Ethernet frame is. In the worst case (28 cycles), a stream of minimum-size 64-byte frames
  gets about 1.8 Gbps.
- **Frame path.** Receive runs at 800 Mbps and transmit at 400 Mbps at 100 MHz.

## Default sizes

| list | rows | key | row data |
|------|------|-----|----------|
| aggregate source | 128 | masked source subnet | AGG_count 5 b, arrival 32 b |
| aggregate destination | 128 | masked destination subnet | arrival 32 b |
| suspicion | 128 | suspect address | peer 32 b, connections 8 b, packets 3 b, SUSP_count 5 b, arrival 32 b |
| hash table | 256 | 8-bit hash | address 32 b, HASH_count 8 b, arrival 32 b |
| scanner | 64 | address | — |

At these sizes, a population like the following fits:
- about 3000 benign hosts grouped into 64 subnets;
- a few dozen fast scanners;
- a few dozen stealth scanners.

How many hosts are suspects at once depends on the traffic. The suspicion list's 128 rows are
the point to watch. When a list is full, new entries are not made (scanner list: the oldest is
replaced).

## Behaviour on synthetic traces

`tb_workload_trace` drives the engine at its default sizes with two generated traces. Every
verdict is checked against a model of the black list.

**Fast scanners.** 3000 benign hosts in 64 subnets make TCP sessions to outside servers. Every
tenth host has one connection in six refused; the others have one in 32 refused. 38 SYN
scanners sit in the same subnets. HASH_TH is 8.

| AGG_TH = SUSP_TH | 1 | 4 | 8 | 12 |
|---|---|---|---|---|
| scanners missed (of 38) | 0 | 0 | 0 | 0 |
| benign hosts blocked (of 3000) | 53 | 18 | 3 | 3 |

**Stealth scanners.** 512 benign users each show one refused connection or one flagless packet.
20 scanners probe so rarely that their suspicion rows time out between probes. AGG_TH and
SUSP_TH are 5.

| HASH_TH | 4 | 6 | 8 |
|---|---|---|---|
| stealth scanners missed (of 20) | 0 | 0 | 0 |
| benign users blocked (of 512) | 13 | 1 | 0 |

Raising a threshold trades false positives for detection delay. The few benign hosts still
blocked at high AGG_TH/SUSP_TH come through the hash table. Its HASH_TH is independent of the
other two thresholds, and each of its 256 rows is shared by every host that hashes to it.

## Departures and own choices

What the core follows closely: subnet aggregation, reply validation, the suspicion habits,
suspect to hash table hand-off, the CAM + RAM split, the purge states, and the list sizes.

The following are this design's own choices:

- The per-request cycle schedule and the order of the algorithm's steps. The suspicion list is
  updated before the hash probe, so a host that enters from the hash table is not counted twice
  for one packet.
- Only bad packets probe the hash table, for their subject. Probing on every packet would
  re-suspect a hashed host for ordinary traffic.
- A timed-out suspect is handed to the hash table ahead of the next header, not only in idle
  cycles (see *Stealth path*). The time-out scans themselves do use only idle cycles.
- Counter widths, other than the 5-bit AGG_count and 32-bit arrival time.
- The hash function and the reset values of the time-outs.
- The register map.
- The number and size of the memory banks, and the byte-stream interfaces.
- **Suspicion rows.** A suspect has one row, which tracks only its current connection. Its
  connection habits are judged when it opens the next one. A design with one row per
  suspect–peer pair would need more rows.
- **Flagging.** AGG_count and HASH_count restart from zero when they reach their thresholds.
  The subject of a bad packet is the receiver of an RST+ACK, or the sender of invalid flags.
- **Not built.** A per-subnet threshold column, which would allow different AGG_TH per subnet,
  is not built. UDP and ICMP scans are not handled; other IPv4 packets are only checked against
  the black list.

## Not included

These parts connect to the core's ports:

- **MACs.** The Ethernet MACs are not included; their FIFOs connect to the `rx_*`/`tx_*` byte
  streams.
- **Host side.** The host processor and its buses are not included. The register port stands in
  for a bus slave.
- **Further engines.** Other detection engines that could share the header path (for example
  denial-of-service or payload inspection) are not included.

## Files

- `rtl/sds_pkg.sv`: widths, header and configuration structs, event bundle, flag helpers.
- `rtl/cam.sv`, `rtl/dp_ram.sv`, `rtl/timeout_purge_fsm.sv`, `rtl/timed_list.sv`: list building
  blocks.
- `rtl/aggregate_source_list.sv`, `rtl/aggregate_destination_list.sv`, `rtl/suspicion_list.sv`,
  `rtl/hash_table.sv`, `rtl/scanner_list.sv`: the five lists.
- `rtl/scan_detection_unit.sv`: the controller. `rtl/scan_detection_engine.sv`: lists,
  controller, and time base.
- `rtl/header_extraction_unit.sv`, `rtl/transfer_engine.sv`: the frame path.
- `rtl/config_regs.sv`: the registers.
- `rtl/scan_detection_core.sv`: the top level.
- `tb/tb_<module>.sv`: one self-checking testbench per module. `tb/tb_frame_pkg.sv` builds
  Ethernet/IPv4/TCP frames.
- `tb/tb_workload_trace.sv`: the trace experiments above. It runs for about 30 s.

`tb_scan_detection_core` runs the whole core at its default sizes. It configures the core
through the registers and replays benign traffic, a fast scanner, a stealth scanner and spoofed
refusals through both MACs. It checks every verdict and forwarded frame, and counts that every
mechanism occurred: passes, drops, spoof rejection, AGG_TH and SUSP_TH crossings, suspicion and
aggregate time-outs, hash adds, hits and HASH_TH crossings, receive back-pressure, and transmit
waits.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has a cycle-count
watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/sds_pkg.sv tb/tb_frame_pkg.sv tb/tb_scan_detection_core.sv \
    -y rtl --top-module tb_scan_detection_core
./obj_dir/Vtb_scan_detection_core
```

Replace the testbench file and top module name to run another testbench. Testbenches that build
frames need `tb/tb_frame_pkg.sv`; the others need only `rtl/sds_pkg.sv` ahead of them.

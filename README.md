# Hardware security perimeter for a nuclear-plant gateway network

In a plant such as the APR1400, safety-channel data flows one way (through data
diodes) to four redundant *DCS gateway servers*. These are ordinary computers.
They feed the non-safety data network (DCN-I), and on that network the
information processing system (IPS), the qualified indication and alarm
system (QIAS-N) and the main database (MDB) can also send them on-demand
requests. Nothing protects the gateways from that network. If they are
flooded or compromised, the operators lose their view of the plant.

This RTL puts a hardware firewall between the two segments. It makes two
checks, one after the other:

1. **Header filtering.** The source IP address and UDP port of each frame
   (and its direction and protocol) are compared with a fixed list of ALLOW
   rules. If no rule matches, the frame is dropped. This is the default DENY.
2. **Deep packet inspection (DPI).** Frames allowed *into* the trusted segment
   have their payload scanned, at every byte alignment, against a database of
   attack signatures. A hit drops the frame.

Frames that the gateways send out are trusted. They are filtered but not
scanned. Every drop is logged and raises an alert.

The filtering is all XNOR comparators and AND/OR trees, with no processor
and no software. This follows the published design that this RTL implements.
That design specifies the units, their order of operation, the ruleset, the
comparator structure and one 7-byte signature. The buffering, the timing,
the interfaces and the encodings are this implementation's own choices. The
section "Departures and own choices" lists them.

## The policy it enforces

The deployment has these sockets. All traffic is UDP.

| System   | IP address    | UDP port |
|----------|---------------|----------|
| IPS      | 192.168.1.10  | 50001    |
| QIAS-N   | 192.168.1.20  | 50002    |
| MDB      | 192.168.1.30  | 50003    |
| GW ch. A | 10.0.1.10     | 50000    |
| GW ch. B | 10.0.1.20     | 50000    |
| GW ch. C | 10.0.1.30     | 50000    |
| GW ch. D | 10.0.1.40     | 50000    |

The rules are checked in order, and the first one that matches decides:

| Rule | Action | Direction | Protocol | Source              | Destination |
|------|--------|-----------|----------|---------------------|-------------|
| 0–3  | ALLOW  | OUT       | UDP      | GW A–D : 50000      | any         |
| 4    | ALLOW  | IN        | UDP      | 192.168.1.10:50001  | any         |
| 5    | ALLOW  | IN        | UDP      | 192.168.1.20:50002  | any         |
| 6    | ALLOW  | IN        | UDP      | 192.168.1.30:50003  | any         |
| 7    | DENY   | any       | any      | any                 | any         |

"OUT" means the frame arrived on the gateway-side port, and "IN" means it
arrived on the DCN-I port. A frame's direction is the port it arrived on, not
its addresses. So a DCN-I host that spoofs a gateway's address still arrives
"IN" and is refused. Rule 7 is not a piece of hardware. It is what happens
when none of rules 0–6 matches.

The default signature database holds one pattern: the 7 ASCII bytes
`STUXNET` (`53 54 55 58 4E 45 54`).

Both tables are in `rtl/sc_pkg.sv` as `DEFAULT_RULES` and
`DEFAULT_PATTERNS`/`DEFAULT_PATT_LENS`. They are parameters of the top, so a
different policy is a parameter override, not an RTL edit.

## Life of a frame

The perimeter stores and forwards. It holds exactly one frame at a time.
The memory control unit (MCU) takes that frame through these steps:

```
 RECV ──last byte──► HDR ──► HDR_WAIT ──► FILT ──► FILT_WAIT
   ▲                  │ oversize                      │
   │                  ▼                     deny ─────┼──────────► DROP ─┐
   │                 DROP                   allow OUT ┼──► PASS ──► PASS_WAIT ─┐
   │                                        allow IN, │ empty payload ─► PASS  │
   │                                        payload ──┴─► DPI ─► DPI_WAIT      │
   │                                                      clean ─► PASS        │
   │                                                      hit ───► DROP        │
   └──────────────────────────────── CLEAR ◄─────────────────────────────────┘
```

* **RECV.** The Ethernet I/O unit picks a side and sends the frame, byte by
  byte, into the buffer. If both sides have a frame waiting, it alternates
  between them. The frame's direction is recorded.
* **HDR.** The controller reads the buffer from offset 0 to the end of the
  UDP header. The header extractor picks the fields out of this stream: the
  EtherType, the IPv4 version and IHL, the protocol, both addresses and both
  ports. It takes the UDP position from IHL, so IPv4 options are skipped.
* **FILT.** By default, all seven rule blocks compare the extracted header
  at once. Their flags are ORed into *allow*. A priority encoder reports the
  lowest-numbered rule that matched, which is the same result as trying the
  rules one by one. With `SEQ_RULES = 1` the rules really are tried one per
  cycle, stopping at the first match (see below).
* **DPI** (allowed inbound frames only). The payload is read out one byte per
  cycle into a shift-register window. After each byte, every signature
  matcher compares its pattern with the newest *L* bytes of the window, so
  each byte alignment is tested exactly once. A hit at any alignment marks
  the frame malicious.
* **PASS / DROP.** A passed frame is read out of the buffer again and leaves
  unchanged on the opposite port. A dropped frame never leaves. The I/O unit
  emits a log record and an alert pulse.
* **CLEAR.** The stored length is reset and the next frame can enter.

Timing, counted in cycles from the cycle after the last byte is received,
for a frame of *N* bytes with a *P*-byte payload and a 20-byte IPv4 header:

| Step                         | Cycles              |
|------------------------------|---------------------|
| header read (42 bytes)       | 43                  |
| filter decision              | 2 (parallel rules); *k* + 3 for rule *k*, 9 for DENY with `SEQ_RULES = 1` |
| DPI (inbound, *P* > 0 only)  | *P* + 3             |
| pass: read-out + command     | *N* + 1             |
| drop: command                | 1                   |
| clear                        | 1                   |

The transmit ports are registered, so the last byte of a passed frame
appears one cycle after the pass command. For example, an inbound frame of
102 bytes with 60 bytes of payload leaves 42 + 3 + 60 + 3 + 102 + 1 = 211
cycles after its last byte arrived. The receive port is held off (`ready`
low) for the whole time. This one-frame-at-a-time design favours simplicity
over throughput. A 125 MHz clock moves one byte per cycle, which is the
byte rate of gigabit Ethernet. At that clock, a full-size inbound frame
occupies the perimeter for about three times its time on the wire, so
sustained throughput is about a third of line rate.

## Header filtering in detail

`rule_block` is one ALLOW rule. It contains XNOR comparators for the source
IP (32 bits), destination IP (32), source port (16), destination port (16)
and protocol (8). Each comparator is a bitwise XNOR followed by an AND
reduction (`xnor_comparator`). The rule's match flag is the AND of:

* each comparator output, or that field's `*_any` wildcard flag;
* a direction term (IN, OUT or ANY);
* `hdr.ok`. A header that is not a complete Ethernet II + IPv4 + UDP header
  never matches, so it falls to DENY.

A rule is a packed struct `sc_pkg::rule_t`. `sc_pkg::allow_from(dir, ip, port)`
builds the "from this socket, to anywhere" rules of the table above.
`filtering_unit` instantiates `NUM_RULES` rule blocks from its `RULES`
parameter. Rule 0 has the highest priority.

The source design describes the ruleset in two ways. One is a cascade:
rule 0 is executed, then rule 1 if rule 0 did not match, and so on. The
other is a set of parallel blocks into an OR gate. Both are available, and
they give identical decisions:

* `SEQUENTIAL = 0` (top: `SEQ_RULES = 0`, the default) evaluates all rules
  in one cycle.
* `SEQUENTIAL = 1` walks them one per cycle. Rule *k* decides *k* + 2
  cycles after `eval`, and DENY after `NUM_RULES` + 1 cycles.

The memory controller waits for `dec_valid`, so either form works without
other changes.

## Payload inspection in detail

`payload_extractor` is a `WIN`-byte shift register. Byte 0 is the newest
byte, and byte *j* arrived *j* bytes ago. A `fill` counter tracks how many
bytes of the current payload it holds.

`pattern_matcher` compares one signature of length *L*. Candidate byte *k*
(k = 0 is the first on the wire) is window byte *L*−1−*k*, and there is one
8-bit XNOR comparator per byte. A matcher is enabled only when `fill` ≥ *L*.
The window is emptied at the start of each payload, so a signature can never
be assembled from the tail of one frame and the head of the next.

`dpi_unit` holds `NUM_PATT` matchers, each with its own length (up to
`PATT_MAX`). It ORs their flags and latches the first hit: `malicious`, and
`pattern_id` (the earliest position, then the lowest index). `done` comes two
cycles after the last byte.

## Interfaces

Top module `security_controls`:

| Port group          | Direction | Meaning |
|---------------------|-----------|---------|
| `clk`, `rst_n`      | in        | clock; active-low asynchronous reset |
| `gw_rx_*`, `dcn_rx_*` | in / `ready` out | receive byte streams from the gateway side and the DCN-I side: `valid`, `data[7:0]`, `last`; a byte moves when `valid && ready`; hold `valid` until taken |
| `gw_tx_*`, `dcn_tx_*` | out     | transmit byte streams: one byte per cycle while `valid`, `last` on the final byte; no back-pressure |
| `log_valid`, `log_rec` | out    | one record per dropped frame: reason (`DROP_UNAUTHORIZED`, `DROP_MALICIOUS`, `DROP_OVERSIZE`), direction, signature id and the extracted header (`sc_pkg::log_rec_t`) |
| `alert`             | out       | one-cycle pulse per dropped frame |
| `stats`             | out       | 32-bit counters: outbound passes, inbound passes, drops per reason (`sc_pkg::stats_t`) |

Frames on the ports are Ethernet II bytes from the destination MAC address
to the end of the payload, with no preamble and no FCS. A MAC core is
expected on each side.

## Module map

```
security_controls              top: wiring only
├── eth_io_unit                side selection, direction tag, routing, log/alert/counters
├── buffer_memory              1514 x 8 frame buffer, 1 write + 1 synchronous read port
├── memory_controller          the frame sequencer above (MCU)
├── filtering_unit             header filter
│   ├── header_extractor       field capture from the buffer stream
│   └── rule_block x7          one ALLOW rule each
│       └── xnor_comparator    equality comparator (IP, port, protocol)
└── dpi_unit                   payload inspection
    ├── payload_extractor      shift-register window
    └── pattern_matcher xN     one signature each
        └── xnor_comparator    byte comparator
```

`sc_pkg` holds the shared types (header, rule, log record, counters), the
socket constants, the ruleset and the signature database.

## Parameters

| Parameter (top) | Default | Meaning |
|-----------------|---------|---------|
| `BUF_DEPTH`     | 1514    | buffer bytes; longer frames are dropped as oversize |
| `SEQ_RULES`     | 0       | 0: all rules in parallel; 1: one rule per cycle, first match stops |
| `NUM_RULES`, `RULES` | 7, table above | ALLOW rules, rule 0 first |
| `NUM_PATT`      | 1       | number of signatures |
| `PATT_MAX`      | 7       | longest signature, and the window size |
| `PATTERNS`, `PATT_LENS` | `STUXNET`, 7 | signature *i*: byte *k* in `PATTERNS[i][8k+7:8k]`, length `PATT_LENS[i]` |

The source design expects hundreds of signatures of different lengths. Each
one costs a matcher of *L* byte comparators plus a wider window. Its
database is a parameter for that reason, but only the one signature above
is given, so that is the default.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The testbenches share a frame builder,
`tb/tb_pkt_pkg.sv`. With Verilator 5:

```sh
verilator --binary --timing --assert --top-module tb_security_controls \
    -y rtl -y tb +libext+.sv -Irtl rtl/sc_pkg.sv tb/tb_pkt_pkg.sv \
    tb/tb_security_controls.sv -o sim
./obj_dir/sim
```

To run a block's testbench, replace `tb_security_controls` in both places
with that testbench's name (`tb_dpi_unit`, `tb_memory_controller`, ...).

`tb_security_controls` runs the top at its default parameters. It covers:

* traffic from every system in both directions;
* unknown hosts, wrong ports and TCP;
* the signature at random alignments;
* empty payloads, full 1514-byte frames and a 1600-byte frame;
* both sides offering frames at once.

A reference model predicts each frame's fate. The testbench checks every
passed frame byte for byte, every log record, the counters and the
pass latencies. It also counts each mechanism: outbound pass, inbound pass
after DPI, DENY drop, signature drop, oversize drop, an outbound frame that
carries the signature and still passes, and arbitration. It fails if any of
them never happened. The block testbenches include the schematic-level
vectors of the 7-byte matcher: `STUXNET` matches, and the bytes
`31 32 61 73 5A 40 36` do not. `tb_memory_controller` checks the cycle
counts in the timing table above. `tb_dpi_database` runs the DPI unit with
200 signatures of 3 to 7 bytes, generated by a fixed formula. This is the
size of a realistic signature set.

## Departures and own choices

These follow the source design: the units and their order; the ALLOW-then-
DENY ruleset and its contents; one rule block per rule, built from XNOR
comparators ANDed into a match flag; rule flags ORed into the filtering
decision; signature matchers of one byte comparator per pattern byte,
ANDed and then ORed into the DPI decision; a byte-by-byte window so that
every alignment is scanned; DPI for inbound traffic only; drop, log and
alert; clearing the buffer after each frame.

These are this implementation's choices:

* **Parallel rules by default.** The source describes rules tried one after
  another, stopping at the first match, and also draws them as parallel
  blocks into an OR gate. By default this RTL evaluates them all in one
  cycle and picks the lowest-numbered match with a priority encoder. The
  cascade is available as `SEQ_RULES = 1`. The decision is the same either
  way.
* **Direction and protocol in the rule.** The source's rule block has four
  comparators (addresses and ports). Its ruleset table also constrains
  direction and service (UDP), so a protocol comparator and a direction term
  are added. "Any" is expressed with wildcard flags.
* **The buffer:** its size (one maximum Ethernet frame), a single read port
  shared by header extraction, payload extraction and transmit, and
  one-frame-at-a-time operation.
* **Oversize frames are dropped.** The source does not consider them.
* **"Clear the buffer" resets the stored length.** It does not zero the
  memory.
* **The payload runs to the end of the frame.** Ethernet padding is scanned
  too, and the UDP length field is not used.
* **Interfaces and formats** are all this implementation's: the byte-stream
  interfaces, round-robin side selection, the log record format and the
  counters.
* **Not implemented:**
  * the Ethernet PHY/MAC;
  * storage of the log (records are emitted, not kept);
  * any rule or signature update at run time, since both sets are fixed
    at elaboration as the source intends;
  * IP fragment handling and checksum verification.

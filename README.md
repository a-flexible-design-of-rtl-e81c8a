# Reconfigurable CAM and six network units built on it

A content addressable memory (CAM) answers the question "where is this word
stored?" in one step: the search key is compared with every stored word in
parallel, and the CAM returns whether any word matched and at which address.
Many packet-processing jobs have this shape: "is this MAC address allowed?",
"which firewall rule fits these IP addresses and ports?", "where does this
destination go?".

This design is an *array-method* reconfigurable CAM (RCAM). It is described
only by its word width and depth. The words sit in a plain register array, and
one clocked loop compares all of them at once. It is SystemVerilog rather than
vendor primitives such as shift-register LUTs or block RAM, so one module fits
any size. The price is area: every stored bit is a flip-flop plus a comparator
bit. Around this core sit six network units, each with its own CAM size and a
32-bit system bus:

| unit | module | CAM (width x depth) | decision | cycles per search |
|---|---|---|---|---|
| Ethernet source-address filter | `ethernet_addr_filter` | 48 x 32 | pass / drop | 4 (3 capture + 1 compare) |
| WLAN access-point MAC filter | `wlan_mac_filter` | 48 x 128 | accept / reject | 3 (2 + 1) |
| Firewall on chip | `foc_unit` | 96 x 64 | permit / deny | 11 (10 + 1) |
| QoS packet classifier | `qos_classifier` | 104 x 16 | one of 16 queues | 12 (11 + 1) |
| Routing table search | `route_search_unit` | 32 x 256 + 48-bit RAM | next hop or "not found" | 3 (1 CAM + 2 RAM) |
| NIDS keyword search | `nids_search_unit` | 80 x 64 | alert / clean | 4 (3 + 1) |

The top, `rcam_network_devices`, puts all six side by side. They share only
the clock and the power-on reset. Each unit's ports appear on the top with a
prefix: `eth_`, `wlan_`, `foc_`, `qos_`, `rt_` and `nids_`.

## The RCAM core (`rcam`)

### Pins and operations

The pin-out is the classic RCAM one. One operation happens on each clock edge
at which the CAM is active:

| pin | meaning |
|---|---|
| `reset` | 1: CAM inactive (no operation, outputs hold, contents kept); 0: active |
| `en` | 1: match mode; 0: read/write mode |
| `rdw` | in read/write mode, 1: read, 0: write |
| `addr` | word address for read and write |
| `din` | word to write, or search key |
| `dout` | word read |
| `match`, `location` | match found, and the lowest matching address |

- **Match:** `din` is compared with every valid word. `match` and `location`
  are registered at that same edge, so they are valid one clock after the
  request.
- **Read:** `dout` is registered with the word at `addr`.
- **Write:** `din` is stored at `addr`.

Each of the three takes one clock.

`reset` does not clear anything. It only parks the CAM. An extra active-low
`rst_n` is the power-on reset. It clears the outputs and one valid bit per
word, so a word that was never written cannot match. Without these valid bits,
an empty CAM would "match" the all-zero key.

### Sub-arrays

A 104-bit compare across 256 words makes a long path. The array is therefore
cut by word width into sub-arrays (`rcam_subarray`). Each sub-array holds an
`SUB_W`-bit slice of every word (8 bits by default) and produces one hit bit
per word for its slice. `rcam` ANDs the hit vectors of all slices with the
valid bits and feeds the result to a priority encoder (`prio_enc`). The
encoder gives the lowest matching address the highest priority. The last
slice is narrower when `WIDTH` is not a multiple of `SUB_W`. Functionally the
slicing changes nothing. It only sets how the compare logic is arranged.

## The comparison and timing unit (`cam_filter_unit`)

This is the part that is hardest to follow from the port list. Every unit
except routing wraps one of these around its RCAM. It turns the single-word
RCAM pins into two 32-bit-bus procedures. The unit's `en` input selects
between them, just as the RCAM's `en` pin does.

### Programming mode (`en` = 0)

The host programs the CAM over the bus. A word of `WIDTH` bits travels as
`BEATS = ceil(WIDTH/32)` beats:

- The most significant beat comes first.
- The last beat is left-aligned, with its unused low bits zero. A 48-bit MAC
  address is sent as `mac[47:16]`, then `{mac[15:0], 16'h0}`.
- `req` is high on every beat, and `addr` and `rdw` stay constant during the
  word.

**Write:** the beats are shifted into a temporary word buffer. In the cycle of
the last beat, the buffer and that beat together are written into the RCAM, so
a write takes exactly `BEATS` cycles.

**Read:** one `req` cycle reads the RCAM. The word then comes back on `rdata`
over the next `BEATS` cycles, with `rvalid` high, in the same beat order. The
host must not raise `req` in the meantime (an assertion checks this). So a read
takes one cycle more than a write.

### Operation mode (`en` = 1)

The wrapper collects the search key from its input stream (see below) and
raises `key_valid` for one cycle. In that cycle:

- `hold` is high, telling the packet source to pause, and
- the RCAM compares.

In the next cycle, `done` pulses and `match`/`location` hold the result. The
key latency is therefore always (beats to collect the key) + 1.

Between operations the unit drives the RCAM's `reset` pin high, so the CAM sits
inactive.

## Key collection in the units

Every wrapper uses a `beat_collector`:

- A beat with `*_sop` starts a packet.
- That beat and the next `BEATS-1` valid beats are shifted into a buffer, with
  the first beat most significant.
- The edge that stores the last of them raises `full`, which is wired to
  `key_valid`.
- Later beats of the same packet are ignored.

The source is expected to hold its next beat while `hold` is high. The
testbenches do so.

Byte order on the packet buses is network order: byte 0 of a frame is in bits
31:24 of the first beat. Frames are assumed to be untagged Ethernet II
carrying IPv4 without options and TCP or UDP. This gives the offsets in
`rcam_pkg`:

| bytes | field |
|---|---|
| 0 | destination MAC |
| 6 | source MAC |
| 15 | IPv4 TOS |
| 26 | source IP |
| 30 | destination IP |
| 34 | source port |
| 36 | destination port |

- **Ethernet filter.** The first three beats hold the destination and source
  MAC addresses. Both are shown on `dst_mac`/`src_mac`. The source address is
  the key. On a match the frame is passed to the switch; otherwise it is
  dropped.
- **WLAN filter.** The WLAN port hands over the source address of an RTS frame
  in two beats (`SA[47:16]`, then `{SA[15:0], 16'h0}`). A stored address means
  the client may associate.
- **Firewall.** Ten beats (bytes 0 to 39) are captured. The rule key is
  `{source IP, destination IP, source port, destination port}`, 96 bits. All
  four fields must match exactly, so a rule is one 96-bit word. A match
  permits the packet.
- **QoS classifier.** Eleven beats are captured. The flow key is
  `{source IP, source port, destination IP, destination port, TOS}`, 104 bits.
  Entry *i* of the CAM belongs to queue *i*. A 4-to-16 decoder turns the
  match location into the one-hot `queue_en`. On a miss, `queue_en` selects
  `LOW_Q` instead, the lowest-priority queue (15 by default; queue 0 is the
  highest).
- **NIDS search.** Extraction logic outside the unit sends each candidate word
  as three beats. A word has up to 10 ASCII characters, the first character
  most significant, zero padded. The unit keeps bits 95:16 of the three beats
  as the 80-bit key. A match raises `alert`, and `location` names the
  signature.

## The routing table search unit (`route_search_unit`)

A routing entry has four fields: destination IP (32 bits), next hop (32), hop
count (8) and interface (8). Only the destination IP is the CAM key. The rest
lives in `assoc_ram`, a RAM with 256 entries of 48 bits at the same index.
There is no temporary buffer: the router fabric presents `dst_ip` with
`dst_valid` directly.

**Search timing:**

- Cycle 1: the CAM compares.
- Cycle 2: on a match, the RAM is read at the matching location. The RAM has
  two register stages.
- Three cycles after the request, `result_valid` pulses with one of:
  - `found` plus `next_hop`, `hop_count` and `iface`, or
  - `not_found` ("destination not found"), with the data outputs at zero.

A miss is carried through a two-stage shift register beside the RAM, so hits
and misses both take three cycles. Searches may be issued every cycle.

**Storing a route** takes three beats with `en` = 0, `req` high and `addr`
held:

1. the destination IP, written into the CAM at once;
2. the next hop, held in a register;
3. `{hop count, interface, 16'h0}`, written into the RAM together with the
   held next hop.

Routes cannot be read back.

## Sizes and throughput

All parameters default to the sizes above. `SUB_W` (8) and the 32-bit bus
(`rcam_pkg::BUS_W`) are common to all units. The CAM depth of each unit is a
parameter. The key width is fixed by the fields it holds. `rcam` on its own
takes any `WIDTH`, `DEPTH` and `SUB_W`. The testbenches also run it as
32 x 8 bits and as 64-bit words in four 16-bit sub-arrays.

The usual throughput figure for such units is bus width x clock / (cycles per
search). With published FPGA clock rates for these units (227, 200, 206, 232,
190 and 236 MHz), the cycle counts of this RTL give:

| unit | result | compared with the published throughput |
|---|---|---|
| Ethernet | 1.8 Gbps | higher than 1 Gbps |
| WLAN | 2.13 Gbps | the same |
| Firewall | 0.60 Gbps | higher than 0.314 Gbps |
| QoS | 0.62 Gbps | higher than 0.322 Gbps |
| Routing | 2.03 Gbps | the same as 2 Gbps |
| NIDS | 1.89 Gbps | the same |

The published figures for Ethernet, Firewall and QoS imply about 7, 21 and 23
cycles per packet. The RTL spends only the capture beats plus one compare. The
only clock limit in the RTL is its combinational compare path. Area and clock
rate on a particular FPGA are not modelled.

## Where this RTL departs from the reference description, or fills gaps

- **Data pins.** The RCAM's bidirectional data lines are split into `din` and
  `dout`. The routing unit's tri-state output buffers become outputs forced to
  zero, plus the `found`/`not_found` flags.
- **Reset.** `rst_n` and the per-word valid bits are additions. `reset`
  deactivates the CAM; it does not clear it.
- **Reads.** A read in programming mode takes `BEATS + 1` cycles, not
  `BEATS`, because the RCAM's read port is registered. Writes take exactly
  `BEATS`.
- **Bus details.** The `req`/`rvalid` handshake, the beat order and the zero
  padding are choices of this design.
- **Frame format and field orders.** Ethernet II/IPv4/TCP-UDP without VLAN
  tags or IP options is assumed. The field order inside the firewall and QoS
  keys, and queue 15 as the lowest priority, are also choices of this design.
- **Match rules.** Matches are exact over the whole word. There are no
  wildcards or prefix masks: firewall rules match exactly, and routing does
  not do longest-prefix match. When several words match, the lowest address
  wins.
- **Outside the design.** The equipment around the units is not modelled: the
  MAC units and switch buffers, the WLAN port, the router fabric and
  controller, the priority queues themselves, and the NIDS word extraction.
  Their signals are the top's ports.

## Files

| file | contents |
|---|---|
| `rtl/rcam_pkg.sv` | bus width, sub-array width, header offsets, `route_entry_t` |
| `rtl/rcam.sv` | RCAM core |
| `rtl/rcam_subarray.sv` | one sub-array of the core |
| `rtl/prio_enc.sv` | priority encoder for the core |
| `rtl/cam_filter_unit.sv` | comparison and timing unit |
| `rtl/beat_collector.sv` | key capture buffer |
| `rtl/ethernet_addr_filter.sv`, `rtl/wlan_mac_filter.sv`, `rtl/foc_unit.sv`, `rtl/qos_classifier.sv`, `rtl/nids_search_unit.sv` | the units built on `cam_filter_unit` |
| `rtl/route_search_unit.sv`, `rtl/assoc_ram.sv` | routing unit and its RAM |
| `rtl/rcam_network_devices.sv` | top |

Each file starts with a comment on its interface and timing.

## Simulation

Each block has a self-checking testbench in `tb/<module>_tb.sv`:

- Each prints `TB_RESULT checks=N failures=M`.
- Each has a watchdog.
- Each compares the block with a reference model in the testbench, including
  the cycle counts in the table above.

`tb/rcam_network_devices_tb.sv` runs the whole top at its default sizes. It
programs all six units at once (560 words), reads words back and sends hit
and miss traffic to every unit. It counts each mechanism: writes, reads,
`hold` pauses, hits and misses per unit, the QoS fallback queue and routing
"not found". A mechanism that never occurs counts as a failure.
`tb/rcam_configs_tb.sv` runs the two extra core sizes.

With Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/rcam_pkg.sv tb/rcam_network_devices_tb.sv --top-module rcam_network_devices_tb
./obj_dir/Vrcam_network_devices_tb
```

Replace the testbench file and top-module name to run any other testbench.
Every testbench finishes in well under a minute. Nothing relies on X values:
all state that is read is reset or written first.

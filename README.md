# Microprogrammed packet classifier

This is a hardware packet classifier that works at line rate. It maps every packet to the
highest-priority rule the packet satisfies. The classifier is not tied to a fixed set of
protocols: the protocol stack is decoded by a small microprogram held in RAM. Criteria and rules
sit in ternary CAMs. Supporting a new protocol, a changed header or a new rule set means writing
tables, not changing logic. Every packet takes a fixed number of clocks that depends only on its
header and payload lengths.

The RTL implements the architecture described in "A Scalable Architecture for Flexible
High-Speed Packet Classification". Where that description stops, this code makes its own
choices. Those are listed in [Design choices and departures](#design-choices-and-departures).

## How a packet is classified

```
 packet words ─► Protocol Layering Decoder ─► Criteria Matching Unit ─► Match Accumulator ─► Result Unit ─► category
 (+ reference)   indexed data words            word match vector         packet match vector   (rule, hit, reference)
```

1. The **Protocol Layering Decoder** walks the header chain of the packet, for example Ethernet,
   VLAN, IPv4, TCP, then payload. It realigns the data so that every header starts at byte 0 of
   a fresh word. Each word it outputs carries an *index*: {protocol id, word position inside that
   protocol}.
2. The **Criteria Matching Unit** compares each indexed word with all K *criteria* in parallel.
   A criterion is a ternary pattern on one 32-bit sub-word at one index, for example "TCP, word
   0, bytes 2-3 = 80". The result is a K-bit *word match vector*.
3. The **Match Accumulator** ORs the word match vectors of all words of a packet. The result is
   the *packet match vector*: the set of criteria the packet satisfies.
4. The **Result Unit** searches the N *rules* with the packet match vector. A rule is a ternary
   pattern over the criteria bits: it can require a criterion, forbid it, or ignore it. A
   priority multiplexer returns the lowest-numbered rule that matches.

Because criteria address fields relative to the start of their own protocol, one criterion
works whatever comes before that protocol. This covers VLAN tags, IP options and tunnels such as
IP-in-IP.

## The Protocol Layering Decoder

This is the hardest part of the design and the part that limits the clock rate. It consists of
seven units (files `pld_*.sv`, top `protocol_layering_decoder.sv`).

### Which protocols it knows: two tables

Each protocol id (1 … 31) has one **microcode instruction** (`pc_pkg::mc_instr_t`). The
instruction says how long the header is and where the field naming the next protocol is:

| field | meaning |
|---|---|
| `hl_fixed`, `hl_add` | fixed header length `hl_add` bytes |
| `hl_off`, `hl_shift`, `hl_mask`, `hl_scale`, `hl_add` | otherwise `((field16(hl_off) >> hl_shift) & hl_mask) << hl_scale) + hl_add` |
| `np_fixed`, `np_value` | fixed next-protocol value |
| `np_off`, `np_mask` | otherwise `field16(np_off) & np_mask` |
| `term` | no header follows: the rest of the packet is payload |

`field16(o)` is the big-endian value of header bytes `o` and `o+1`. Both bytes must lie inside
the header. They may lie in any word of the header, and may straddle two words.

The **Jump Table** is a binary CAM. It maps {current protocol id, next-protocol value} to the
protocol id of the encapsulated header. If nothing matches, or `term` is set, the rest of the
packet gets protocol id 0, which means payload. Every packet starts with protocol `start_proto`.

Example programming (the end-to-end testbench uses exactly this):

| id | protocol | instruction |
|---|---|---|
| 1 | Ethernet | fixed 14; next = bytes 12-13 |
| 2 | 802.1Q | fixed 4; next = bytes 2-3 |
| 3 | IPv4 | length = ((bytes 0-1 >> 8) & 0xF) << 2; next = bytes 8-9 & 0x00FF |
| 4 | IPv6 | fixed 40; next = bytes 5-6 & 0x00FF |
| 5 | TCP | length = ((bytes 12-13 >> 12) & 0xF) << 2; `term` |
| 6 | UDP | fixed 8; `term` |

The Jump Table entries are: (1, 0x0800) → 3, (1, 0x86DD) → 4, (1, 0x8100) → 2, (2, 0x0800) → 3,
(3, 6) → 5, (3, 17) → 6, (3, 4) → 3 (IP-in-IP), and so on.

### Realignment: the Shifter and the control

The Shifter is a 2W-byte buffer. Its front W bytes form the *window*, which is the word being
decided in this cycle. In that same cycle, all of the following happen combinationally:

* The **Counter & Index Generator** supplies the word's position `pos` within the current
  protocol.
* The **Header Length** and **Next Protocol** units take their field bytes from the window, or
  from bytes they stored from earlier words of the header.
* The **Layer Decoder Control** state machine (IDLE / HDR / PAY) decides whether this is the
  last word of the header. That is the case when the length is known and
  `hdr_len <= (pos+1)*W`.
  * On the last word, the control consumes only the `hdr_len - pos*W` bytes that are left.
  * The Jump Table result selects the protocol of the next word.
* The Shifter drops the consumed bytes. The next header now starts at byte 0. The input is
  stalled (`in_ready` low) while the buffer is too full.
* The output word is registered. Bytes that belong to the next header, or lie past the packet
  end, are cleared to 0, so no criterion can see them.

A packet's first word enters the buffer only when the previous packet has left it. If the next
packet is already waiting, it enters in the same clock, so packets follow each other without a
gap.

### Throughput

The decoder outputs one word per clock. A packet with headers H_1 … H_n bytes long and R bytes
of payload takes `Σ ceil(H_i/W) + ceil(R/W)` clocks. The rest of the pipeline never stalls. At
W = 16 bytes, a 200-byte Ethernet/IPv4/TCP packet takes 1 + 2 + 2 + 10 = 15 clocks. At 60 MHz,
with the 12-byte Ethernet gap, that is 6.8 Gbit/s of line rate, or 4 Mpackets/s. With 32-bit
words, a 64-byte frame takes 17 clocks, which is 2.47 Mpackets/s at 42 MHz.

### Header-only decoding

For long packets most clocks go to payload, which criteria rarely need. With `hdr_only = 1` the
decoder stops after the headers. The word that would be followed by payload is marked as the
packet's last word. The Shifter drops everything it still holds of that packet. It also raises
`in_skip`, which means "the rest of this packet is not needed". A source that honours `in_skip`
presents the next packet's first word in the same clock. A source that ignores it can keep
sending: the words are accepted and thrown away up to the next start of packet. `in_skip` is
derived only from registers, so the source may react to it within the same cycle.

A packet then takes only `Σ ceil(H_i/W)` clocks. The 200-byte packet above takes 5 clocks instead
of 15. At 60 MHz that is 20.3 Gbit/s of line rate. Criteria on payload words can of course not
match in this mode. Change `hdr_only` only between packets.

`tb_workload_throughput` measures all three figures.

## Criteria and rules

**Criteria CAM.** The W-byte word is cut into NSUB sub-words. With the defaults these are four
32-bit sub-words; sub-word 0 is the first four bytes. Each sub-word, with the index in front of
it, is searched in its own ternary sub-CAM of K/NSUB entries. There is no AND stage across
sub-CAMs: a criterion tests one sub-word. Criterion `c` sits in sub-CAM `c / (K/NSUB)` and is
bit `c` of the match vector. So the criterion number decides which part of the word it can
test. A sub-CAM with more than CRIT_DEPTH (64) entries is built from several CAMs of 64. This
only matters beyond 256 criteria, and is invisible from outside. An entry holds:

* an index value and mask, so a criterion may ignore the word position, or even the protocol;
* a pattern value and mask (mask bit 1 means the bit is compared).

**Rules.** The K criteria bits are split into K/SEG_W Rule CAMs of N entries × SEG_W bits. The
defaults give four of 128 × 64, before the depth split described below. A rule is written into
all of them at once, as value and mask over all K bits:

| mask bit | value bit | meaning |
|---|---|---|
| 1 | 1 | the criterion must have matched |
| 1 | 0 | the criterion must not have matched |
| 0 | - | the criterion is ignored |

So that no CAM becomes too deep, each of these is again divided by depth into CAMs of RULE_DEPTH
(64) rules. With the defaults that makes 4 × 2 CAMs of 64 × 64. A rule address selects the CAM
row it is written to; from outside, the division is invisible. An AND stage combines the Rule CAMs
per rule. The priority multiplexer then has two registered
stages: groups of GROUP rules, then the group winners. It returns the lowest rule number.

## Interface of `packet_classifier`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (clears valid bits of all CAMs, not the microcode RAM) |
| `in_valid`/`in_ready` | in/out | 1 | packet word handshake; a word moves when both are high |
| `in_data` | in | 8W | packet bytes, byte 0 in the most significant bits |
| `in_sop`, `in_eop` | in | 1 | first / last word of a packet |
| `in_bytes` | in | clog2(W+1) | valid bytes in the last word (1 … W) |
| `in_ref` | in | REF_W | reference of the packet, for example its buffer address; returned with the category |
| `cat_valid`, `cat_hit`, `cat_rule`, `cat_ref` | out | | one result per packet, in packet order |
| `in_skip` | out | 1 | header-only mode: the rest of the current packet is not needed |
| `start_proto` | in | PROTO_W | protocol id of the first header |
| `hdr_only` | in | 1 | header-only decoding (payload is not classified) |
| `mc_we`, `mc_waddr`, `mc_wdata` | in | | microcode write |
| `jt_we`, `jt_waddr`, `jt_wvalid`, `jt_wkey_proto`, `jt_wkey_val`, `jt_wtarget` | in | | Jump Table write |
| `crit_we`, `crit_addr`, `crit_valid`, `crit_idx_val/mask`, `crit_pat_val/mask` | in | | criterion write |
| `rule_we`, `rule_addr`, `rule_valid`, `rule_val`, `rule_mask` | in | | rule write |

All tables take one entry per clock. Classifying packets while a table they use is being written
gives undefined results for those packets.

**Latency.** An accepted word reaches the decoder output after at least two clocks. The category
follows six clocks after the packet's last decoder word.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 16 | word width in bytes (128 bits) |
| `NSUB` | 4 | criteria sub-CAMs (sub-word = 8W/NSUB bits) |
| `K` | 256 | criteria; must be a multiple of NSUB and of SEG_W |
| `N` | 128 | rules; must be a multiple of GROUP |
| `PROTO_W` | 5 | protocol id width (32 microcode entries, id 0 = payload) |
| `POS_W` | 7 | word position width; the position saturates at 127 |
| `JT_DEPTH` | 32 | Jump Table entries |
| `SEG_W` | 64 | criteria bits per Rule CAM |
| `GROUP` | 16 | rules per first-stage priority encoder |
| `CRIT_DEPTH` | 64 | entries per criteria CAM; a sub-CAM of more entries is built from several (K/NSUB must then be a multiple of it) |
| `RULE_DEPTH` | 64 | rules per Rule CAM (one CAM if N is smaller); N must be a multiple of it |
| `REF_W` | 16 | packet reference width |

The word width, the four 32-bit sub-words, and K = 256 / N = 128 come from the implemented
configurations the architecture was evaluated with. That evaluation covered 64-512 criteria and
16-256 rules. The other parameter values are this design's own.

## Design choices and departures

The original description gives the block structure, what each block does, the reduced Criteria
CAM, the split Rule CAMs with an AND stage, and the pipelined priority multiplexer. The following
are this implementation's own choices:

* Making header-only decoding a run-time mode, and the `in_skip` signal.
* The depth of 64 entries at which Criteria and Rule CAMs are divided.
* The microcode format and its length arithmetic.
* A Jump Table key that includes the current protocol.
* Protocol id 0 for payload, and the `term` bit.
* The Shifter's buffer organisation and input handshake.
* The decoder's states.
* Clearing bytes past a header.
* Ternary index matching in criteria.
* Lowest rule number = highest priority.
* The category being the rule number (there is no separate rule → category table).
* Register positions in the Result Unit.
* The configuration ports.
* Table sizes not named above.

Not implemented:

* **Replicated decoders** for higher rates.
* **Decoding more than one header per word.** This would remove the rounding of each header to
  whole words, at the cost of a much more complex and slower decoder.
* **The surrounding system**: input stage, packet buffer and memory management, next processing
  stage. The classifier only carries the reference they would use.

Limitations to know:

* A header whose length field has not been seen yet is treated as continuing.
* A length field lying past the end of its own header therefore turns the rest of the packet into
  that header.
* A header whose length is shorter than the words already passed ends at the current word.
* Word positions saturate at 2^POS_W − 1.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it shows |
|---|---|
| `tb_packet_classifier` | The full design at default size, 300 random packets. These include VLAN, IPv4 with options, IP-in-IP, IPv6, TCP/UDP/other, unknown EtherTypes, truncated packets, and gaps then back-to-back traffic. Another 100 packets follow in header-only mode, with the source skipping. Every decoder word and every category is compared with a reference parser written from the protocol formats. Also checks no bubbles and the 6-clock category latency, and that each mechanism occurred. |
| `tb_workload_throughput` | Clocks per packet for 200-byte packets at 128 bits, normal and header-only, and 64-byte frames at 32 bits / 64 criteria / 32 rules. |
| `tb_workload_large` | The largest configuration, 512 criteria and 256 rules. Criteria and rules sit in the upper CAMs of the depth split, and TCP port / SYN rules are checked on random packets. |
| `tb_protocol_layering_decoder` | The decoder at W = 8 with long payloads (position saturation), against a reference parser. |
| `tb_pld_*`, `tb_tcam`, `tb_criteria_matching_unit`, `tb_match_accumulator`, `tb_result_unit`, `tb_priority_mux` | Unit tests against bit-level models. |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/` (the package must be
compiled first; `-Wno-fatal` because the testbenches trigger harmless width and static-lifetime
warnings):

```
TB=tb_packet_classifier
verilator --binary --timing --assert -Wno-fatal rtl/pc_pkg.sv $(ls rtl/*.sv | grep -v pc_pkg) \
          tb/$TB.sv --top-module $TB -o sim && ./obj_dir/sim
```

Every testbench finishes in well under a second of simulation time once built.

# XnorBV 5-tuple packet classifier

A packet classifier decides which rule of an ordered ruleset an incoming
packet belongs to, by comparing the five classic header fields (source and
destination IPv4 address, source and destination port, protocol) with every
rule. This RTL implements the *XnorBV* approach: instead of lookup tables
(as in the bit-vector family StrideBV and FSBV) or a TCAM, every rule field is
compared with the packet field directly by a row of XNOR gates, and the
results are collected as *bit vectors*, one bit per rule.

All N rules are checked in parallel. One header is accepted every clock cycle
and its result appears three cycles later.

## The bit-vector idea

For each header field the hardware builds an N-bit vector in which bit *n*
says whether the field satisfies rule *n*. The five field vectors are ANDed
bit by bit. A bit that is still 1 marks a rule that the *whole* packet
matches. Several bits can be set (multi-match). Rules are stored in order of
decreasing priority, so a priority encoder picks the lowest set bit as the
single answer.

Three kinds of match are needed, and two kinds of matcher provide them:

| Field             | Width | Match kind            | Matcher          |
|-------------------|-------|-----------------------|------------------|
| source IP         | 32    | prefix / ternary      | `xnorbv_match`   |
| destination IP    | 32    | prefix / ternary      | `xnorbv_match`   |
| source port       | 16    | range [lo, hi]        | `range_match`    |
| destination port  | 16    | range [lo, hi]        | `range_match`    |
| protocol          | 8     | exact or wildcard     | `xnorbv_match`   |

The header is 104 bits. The source IP is in bits 103:72 and the protocol in
bits 7:0 (`pc_pkg::header_t`).

### XNOR matching with wildcards

For rule *n* and a K-bit field `T`, the matcher computes
`S[b] = W[n][b] XNOR T[b]` for every bit and ANDs the K results into bit *n*
of the vector. A bit that must not be compared (`*` in a ternary rule) has a
*care* bit of 0, which forces its XNOR term to 1:

    bv[n] = AND over b of ( (W[n][b] XNOR T[b]) OR NOT care[n][b] )

Prefix matching is a care mask of leading ones. Exact matching is a mask of
all ones. Arbitrary masks work as well.

Example with 4-bit rules 1010, 1\*01, 0010, \*001 and the field 1101: the
XNOR rows are 1000, 1111, 0000, 1011, so only the second rule matches.

### Range matching for ports

Ports are matched against inclusive bounds, with no conversion of ranges to
prefixes: `bv[n] = (field >= lo[n]) AND (field <= hi[n])`. A rule whose lower
bound is above its upper bound matches nothing.

## Pipeline and timing

```
 in_header ──► field matchers (5) ──► [s1: 5 x N bits] ──► AND ──► [s2: N bits] ──► priority encoder ──► [out regs]
 ruleset ────┘                        + rule-valid bits
```

| Stage | Work                                              | Register        |
|-------|---------------------------------------------------|-----------------|
| 1     | all five field vectors, for all rules             | `s1_bv_q`       |
| 2     | AND of the vectors (aggregator)                   | `s2_bv_q`       |
| 3     | priority encoding                                 | `out_*` outputs |

A header is driven with `in_valid_i` and captured at rising edge *t*. Its
result is on the outputs after edge *t+2*. The testbench drives in one cycle
and sees the result three cycles later. There is no backpressure and no
stall: a new header can come every cycle. A valid bit travels with each
header through the stages.

The three-stage organisation and the 3-cycle latency follow the original
architecture. The valid bits, the lack of a handshake and the register
placement inside each stage are choices made here.

## Ruleset storage and programming

`rule_memory` holds N entries of type `pc_pkg::rule_t` (209 bits each):

| Member                      | Bits | Meaning                            |
|-----------------------------|------|------------------------------------|
| `valid`                     | 1    | entry takes part in matching (MSB) |
| `sip_value`, `sip_care`     | 32+32| ternary source IP                  |
| `dip_value`, `dip_care`     | 32+32| ternary destination IP             |
| `sport_lo`, `sport_hi`      | 16+16| source port range, inclusive       |
| `dport_lo`, `dport_hi`      | 16+16| destination port range, inclusive  |
| `proto_value`, `proto_care` | 8+8  | ternary protocol                   |

Entry 0 has the highest priority. Entries are registers, because every rule
is read every cycle.

To write an entry, raise `rule_wr_en_i` for one cycle with `rule_wr_idx_i`
and `rule_wr_data_i`. Writing `valid = 0` deletes the entry. A header
captured on the same edge as the write still sees the old rule. Headers
captured from the next edge on see the new one. Reset (`rst_ni` low,
asynchronous) clears every valid bit, which empties the ruleset. The pattern
bits are not reset because they are never used while an entry is invalid.
Inside the classifier the valid bits enter the AND stage as a sixth vector.

The original architecture does not describe how rules are loaded. Its
resource figures suggest the rules were constants built into the logic. The
write port and the valid bits are this design's way of making the ruleset
programmable.

## Outputs

| Port              | Width  | Meaning                                          |
|-------------------|--------|--------------------------------------------------|
| `out_valid_o`     | 1      | a result is present                              |
| `out_hit_o`       | 1      | at least one rule matched                        |
| `out_rule_idx_o`  | log2 N | highest-priority matching rule (0 when no hit)   |
| `out_match_vec_o` | N      | the full multi-match vector                      |

Assertions in the top check that the reported rule is set in the vector, that
no lower-numbered rule is set, and that a miss comes with an empty vector.

## Where this RTL departs from the original figures

- **Memory per rule.** The original claims 15 bytes (120 bits) per rule. That
  is too few to hold a wildcard mask next to the 72 XNOR-matched bits and
  four 16-bit port bounds. This RTL stores 209 bits per rule (about 26 bytes).
- **Throughput.** The original quotes 114 Gbit/s at 300 MHz. This design
  takes one 104-bit header per clock, which is 31.2 Gbit/s at 300 MHz.
  The 114 Gbit/s figure could not be derived from the architecture.
- **Priority encoder.** The encoder is a single combinational stage, written
  as a scan from the highest index down to 0. Synthesis may rebuild it as a
  tree. For large N at high clock rates it may need to be split over more
  cycles, which would change the latency.
- **Pins.** The original's pin counts (about 111 to 115 for 32 to 512 rules)
  fit a header input plus an encoded rule index. This top also brings out
  the ruleset write port and the N-bit multi-match vector, so it has many
  more ports. Leave `out_match_vec_o` unconnected if it is not needed.
- **Widths.** Only the 104-bit total and the 16-bit ports are given. The
  32/32/8 split of the rest is the IPv4 layout.

## Parameters

| Parameter | Default | Where               | Meaning                          |
|-----------|---------|---------------------|----------------------------------|
| `N`       | 512     | all modules         | rules in the ruleset             |
| `IW`      | clog2 N | several             | rule index width (derived)       |
| `K`       | 32      | `xnorbv_match`      | field width                      |
| `W`       | 16      | `range_match`       | port width                       |
| `M`       | 5       | `bv_aggregator`     | number of vectors ANDed          |

512 is the largest ruleset the architecture was evaluated with (32, 64, 128,
256 and 512 rules). Smaller rulesets run on the 512-entry design by leaving
entries invalid. Field widths are in `pc_pkg`.

## Files

| File                        | Contents                                      |
|-----------------------------|-----------------------------------------------|
| `rtl/pc_pkg.sv`             | widths, `header_t`, `rule_t`, field indices   |
| `rtl/xnorbv_match.sv`       | ternary XNOR/AND field matcher                |
| `rtl/range_match.sv`        | inclusive range matcher                       |
| `rtl/bv_aggregator.sv`      | bit-wise AND of M vectors                     |
| `rtl/priority_encoder.sv`   | lowest-set-bit encoder                        |
| `rtl/rule_memory.sv`        | writable ruleset store                        |
| `rtl/xnorbv_classifier.sv`  | top level: the 3-stage classifier             |
| `tb/tb_*.sv`                | one self-checking testbench per module        |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. For
example, the end-to-end test at the full 512-rule size:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/pc_pkg.sv rtl/*.sv tb/tb_xnorbv_classifier.sv \
  --top-module tb_xnorbv_classifier -o sim
./obj_dir/sim
```

It builds in about 10 seconds and runs in under a second. The other
testbenches build the same way with their own module names.

What the testbenches cover:

- `tb_xnorbv_match`: the 4-rule worked example above, plus random 32-bit
  rules with exact, prefix, arbitrary and full-wildcard masks.
- `tb_range_match`: a 4-bit example (bounds [9,12], [2,4], [5,9], [12,10],
  field 8: only the third rule matches), plus random bounds with fields on,
  next to and between them.
- `tb_bv_aggregator` and `tb_priority_encoder` (at 512 inputs and at 5):
  random and edge-case vectors.
- `tb_rule_memory`: writes, deletes, timing of writes, and reset.
- `tb_xnorbv_classifier`: five phases with 32, 64, 128, 256 and 512 rules.
  Each phase resets, loads the rules, then streams about 400 headers,
  rewriting rules while traffic flows. A reference model in the testbench
  predicts every vector, hit and index. The test checks the 3-cycle latency
  and counts how often each behaviour occurred: prefix, wildcard and exact
  matches, hits and near-misses on range bounds, misses, multi-matches,
  writes under traffic, back-to-back headers and resets.

The simulator used has only two logic states. Everything that is read is
reset or written first.

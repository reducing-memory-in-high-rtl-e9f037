# Multi-subset prefix-coloring packet classifier (MSPCCA) in SystemVerilog

A firewall has to find, for every packet, the highest-priority rule whose
conditions on the 5-tuple (source IP, destination IP, protocol, source port,
destination port) all hold. At 100 Gb/s and above that has to happen in
constant time, one packet per clock. Decomposition classifiers do it in two
steps. First they run a longest-prefix match (LPM) in every field
independently. Then they look up the resulting *LPM vector* in a table. The
catch is that the table must also hold *pseudorules*: vectors that are no
rule themselves but can occur and must map to the right rule. Their number
grows like a cross product.

This design combines four ways of keeping that table small:

1. **Spoiler removal.** The few rules that would create most pseudorules go
   to a separate, small matcher (a TCAM-like block).
2. **Subsets.** The remaining rules are split into three subsets, so there are
   three small cross products instead of one big one. The split is made so
   that a packet can match rules of one subset only.
3. **Prefix coloring.** The LPM returns *all* matching prefixes of a field.
   Each prefix carries a color and a bitmap that says which colors of the
   other fields it ever appears with in a rule. A simple AND/OR filter throws
   away prefixes no rule can combine, so far fewer vectors, and so fewer
   pseudorules, can come out.
4. **Perfect hashing.** Pseudorules are not stored at all. A Bloom filter per
   subset tells whether a vector is a known rule or pseudorule. A perfect hash
   function maps the vector straight to the rule-table index of its target
   rule. The function costs two 16-bit reads from an external memory and an
   addition.

Only the real rules are stored, on chip, and each packet costs exactly two
external-memory reads. At a 533 MHz memory that is 266 million packets per
second, one per cycle of a 266 MHz packet clock.

## Pipeline

```
 header ─┬─ lpm_engine x5 ──► color_processing x3 ──► bloom_filter x3 ──► perfect_hash ──► rule_table ──► priority_resolve ─► rule number
         │   (per field)        (per subset)            (per subset)        (one, shared)      (check)          ▲
         │                                                                   │ ▲                               │
         │                                                       two reads ──┘ └── vertex tables (external)    │
         └─ spoiler_tcam ─────────────────────── delay ────────────────────────────────────────────────────────┘
```

| stage | module | latency (cycles) |
|---|---|---|
| LPM, one engine per field | `lpm_engine` | 2 |
| color filter, one per subset | `color_processing` | 4 |
| Bloom filter, one per subset | `bloom_filter` | 2 |
| perfect hash, shared | `perfect_hash` | MEM_LAT + 2 |
| rule read and check | `rule_table` | 2 |
| branch priority and default rule | `priority_resolve` | 1 |
| spoiler branch (in parallel) | `spoiler_tcam` | 2, then delayed |

The total is `MEM_LAT + 13` cycles: 17 at the default `MEM_LAT = 4`. A new
packet can enter every cycle; nothing stalls. `delay_line` carries the header
and the spoiler result alongside the main branch. All shared types, sizes and
functions are in `mspcca_pkg`.

## The color filter

This is the least obvious part. Within one subset and one field, every
stored prefix has a color (0..7). The compiler must give nested prefixes
different colors, for example by using the nesting depth. So at most one
matching prefix per color exists, and the LPM output can be indexed by
color. A prefix P of field e also holds `bitmap[d][c]` for every other field
d. The bit is 1 when P and some prefix of color c in field d occur together
in one rule.

For each field d the filter computes:

```
allowed[d] = AND over e != d of ( OR over matching prefixes P of e of P.bitmap[d] )
```

It drops every matching prefix of d whose color is not in `allowed[d]`, and
outputs the longest survivor's id. If some field keeps nothing, no rule of
the subset can match and no vector is produced. The filter never drops a
prefix of a rule that really matches the packet, because that rule's own
prefixes allow each other. So the target rule of the output vector is the
highest-priority rule whose prefixes all contain the vector's prefixes. The
four register stages are: input, per-field OR, AND and mask, longest
selection.

## Perfect hash and vertex tables

For the vector key `k` of subset `s`:

```
ptr = ( VT[s][0][h1(k)] + VT[s][1][h2(k)] ) mod 2048
```

`h1` and `h2` are H3 hashes (XOR trees), 12 bits wide. `VT` is a table of
16-bit words in external memory, addressed as `{subset, half, index}` (15
bits). The compiler treats every key as an edge between a vertex in half 0 and
a vertex in half 1. If this graph is acyclic, the vertex values can be chosen
so that every key's sum is its target's rule-table address: walk each
component from an arbitrary root with value 0. Splitting the table into two
halves rules out self-loops. If the graph has a cycle, other seeds are needed
(`PHF_SEED_A/B` in `mspcca_pkg`).

If more than one Bloom filter says yes, which only happens through a false
positive, the lowest-numbered subset is used. A false positive is harmless
otherwise: the pointed-to rule fails the full header check in `rule_table`,
and the default rule (or a spoiler) is returned.

## Interfaces of `mspcca_top`

* `in_valid`, `in_hdr` (`header_t`: src_ip, dst_ip, proto, src_port,
  dst_port): one packet per cycle.
* `out_valid`, `out_rule`, `out_default`, `out_spoiler`: the result,
  `MEM_LAT + 13` cycles later, in packet order. Rule numbers are priorities
  (0 is highest). `DEFAULT_RULE` (all ones) is returned when nothing matches.
* `mem_rd_en`, `mem_addr_a`, `mem_addr_b` / `mem_rd_valid`, `mem_data_a`,
  `mem_data_b`: the vertex-table memory. Two reads are issued in one packet
  cycle, standing for two accesses of a double-rate memory. Data must return
  exactly `MEM_LAT` cycles later. An assertion in `perfect_hash` checks this.
* `lpm_wr`, `bf_wr`, `rt_wr`, `sp_wr`: one write per cycle into the prefix
  tables, Bloom bits, rule table and spoiler entries. The rule compiler
  (software) fills them before traffic starts. The Bloom arrays and the rule
  table have no reset and must be written completely. The vertex tables are
  loaded into the external memory directly.

Default sizes:

| size | value | from |
|---|---|---|
| fields | 5 | design |
| colors | 8 | design |
| subsets | 3 | design |
| spoiler entries | 8 | design |
| vertex words | 16 bits | design |
| prefix entries per field | 256 | own |
| prefix id | 8 bits | own |
| LPM vector | 40 bits | own |
| rule table | 2048 × 166 bits | own |
| rule number | 16 bits | own |
| vertex halves | 2 × 4096 per subset | own |
| Bloom filter | 8 hashes × 2048 bits per subset | own |

The Bloom filter size aims at a false-positive rate of 0.005 for about 1400
keys per subset.

## What follows the source design and what does not

Taken from the source design:

* the four techniques, and the block order LPM → color processing → set
  membership → perfect hash → rule table;
* the separate Bloom filter and color processing per subset;
* a single perfect-hash unit with per-subset vertex tables, two 16-bit reads
  and a sum;
* on-chip storage of only the real rules, and the final match check;
* the spoiler branch, priority resolution and the default rule;
* 5 fields, 8 colors, 3 subsets and 8 spoilers;
* four cycles of latency for color processing.

This design's own choices:

* **LPM engine.** The source does not define one. It is built as a parallel
  search of a 256-entry register table per field (CAM style), which gives
  the required function: all matches, split by subset and color. A trie or
  tree-bitmap engine could replace it behind the same output format.
* **Spoiler matcher.** It holds full rules, with port ranges, compared in
  parallel rather than bit-level TCAM cells.
* **Everything else** listed as "own" in the table above, plus all other
  latencies, the hash family (H3), the memory interface and the load ports.
* **Rule compilation is not part of the RTL.** That covers spoiler
  selection, subset splitting, coloring, pseudorule generation, Bloom filling
  and perfect-hash construction. `tb/tb_mspcca_top.sv` contains a small
  working compiler for its test rule set and is the best reference for the
  table formats.

Limitations:

* Correct results need the compiler's guarantee that a packet matches rules
  of at most one subset.
* Whether the default table sizes hold a given rule set depends on its
  number of pseudorules after coloring. For the published rule sets
  (103 to 1107 rules, at most 158 distinct prefixes in one field) the rule
  table and prefix tables are large enough. The Bloom-filter and vertex-table
  capacity could not be confirmed.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each one computes the expected values its
own way (shift arithmetic, brute-force search, direct models), checks the
latency, and has a watchdog.

`tb_mspcca_top` runs the whole classifier at its default sizes. It compiles
a 16-rule set (three subsets, four spoilers) into all tables, solves the
perfect-hash graph, and plants one extra Bloom entry as a false positive. It
then sends 3000 packets back to back, with a few idle cycles, and compares every result with a
brute-force search over all rules. It also requires each of these to happen
at least once:

* a spoiler win;
* a main-branch win;
* the default rule;
* a vector changed by the color filter;
* a Bloom negative;
* a rejected false positive;
* both branches matching the same packet.

`tb/vertex_mem_model.sv` is a behavioural model of the external memory, not
design RTL.

To run a test with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mspcca_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/mspcca_pkg.sv tb/tb_mspcca_top.sv -o sim
./obj_dir/sim
```

Swap in another testbench name to run a unit test. The top-level build takes
about two minutes, mostly spent compiling the 256-entry prefix tables; the
simulation itself runs for seconds. Logic synthesis of `lpm_engine` is slow
for the same reason: it is a wide AND-OR structure.

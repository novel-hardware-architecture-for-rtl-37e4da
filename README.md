# Bitmap-trie IPv4 route lookup engine

An IPv4 router must find, for every packet, the longest routing-table prefix
that matches the destination address. This engine does it with a 16-way trie
whose *shape* is squeezed into a small on-chip SRAM, one bit per trie node,
while the next hops live in a large off-chip DRAM. A lookup walks the 8 trie
levels with one SRAM access per level and then makes exactly one DRAM read, so
every lookup takes the same time and the lookup rate is set by the DRAM's
random-access time: one lookup per 64 ns (15.6 million per second) with an
8 ns clock.

The RTL implements the forwarding engine: bit extraction, mask generation,
the sum-of-1s adder tree, the two pipelined level FSMs, the trie SRAM, the
level table and the DRAM request logic. The DRAM itself and the host
processor that builds the tables are outside the engine; their signals are
ports, and the testbenches provide a behavioural DRAM and a software table
builder.

## The data structure

### Complete 16-way trie

Each trie node has 16 children, selected by 4 address bits: level 0 uses
address bits 31..28, level 1 bits 27..24, and so on to level 7 (bits 3..0).
The trie is *complete*: a prefix whose length is not a multiple of 4 is
expanded to all children it covers (a /2 prefix fills 4 of the root's 16
children), and when a longer prefix forces a leaf to become an internal node,
the new node's 16 children inherit the next hop the leaf had. So every leaf
carries the next hop of the longest prefix covering it, and the search never
has to backtrack.

### SRAM bitmap

Visit the trie breadth-first, skip the root, and write one bit per node:
1 for an internal node, 0 for a leaf. The bits of the children of the
depth-*i* nodes form *level i*. In this engine every level starts on a fresh
SRAM row.

Each SRAM row is 148 bits: a 20-bit **Sum** field and 128 bitmap bits. Bit *j*
of row *r* is SRAM bit *r*·128 + *j*. Sum holds the number of 1s on the row's
own level in the earlier rows of that level, so the number of 1s before any
bit of a level can be found from the single row holding that bit.

Two small arrays go with the bitmap (the level table):

* `Level[i]`: SRAM bit address where level *i* starts (a multiple of 128);
* `total[i]`: number of 1s on level *i*.

### DRAM next hops

Number the internal nodes breadth-first with the root as 0. DRAM row *r*
(16 entries) holds the next hops of the 16 children of internal node *r*;
entry index = *r*·16 + child. An internal child's entry holds its inherited
next hop (it is never read for such a child, but keeps the layout regular).

### Worked example

Routes 128/2→3, 128/4→6, 140/8→3, 140.12/16→2, 64/2→7, 64/8→12, 38/8→5,
112/4→9, 112.48/14→5, 80/4→2, default route 0. The root's children 2, 4, 7
and 8 are internal, so level 0 is `0010 1001 1000 0000` written first-bit
first. Level 1 (children of nodes 2, 4, 7, 8) has 1s only at bit 0 of node 7's
group and bit 12 of node 8's group. For address 0x703020f8 the walk reads
children 7, 0, 3 (all internal) and then 0 on level 3 (a leaf). The last
internal node passed is the 7th internal node after the root, so the next hop
is DRAM entry 7·16 + 0 = 112, which holds 5. Both unit and end-to-end
testbenches check this case.

## The search, and why one SRAM access per level is enough

The context of a lookup carries START (first bit of the current node's
16-bit child group), P1 (breadth-first rank of the last internal node passed,
initially 0 for the root) and the number of 1s on all levels already left.
On level *i*:

1. OFFSET = the level's 4 address bits.
2. Read the SRAM row holding bit START + OFFSET.
3. If that bit is 1, the child is internal:
   * ONES = Sum of the row + the 1s in the row before the bit = number of
     internal nodes on level *i* that come before this child;
   * P1 = (1s on earlier levels) + ONES + 1, the child's breadth-first rank;
   * START = `Level[i+1]` + ONES·16, since every earlier internal node of
     level *i* owns one 16-bit group on level *i*+1;
   * (1s on earlier levels) += `total[i]`.
4. If the bit is 0 (or the level is 7, whose nodes are always leaves) the
   search ends; the DRAM index is P1·16 + OFFSET.

Step 3 is where the hardware is: the bit position inside the row (7 bits)
is decoded to a one-hot word, turned into a mask of that position and all
lower ones, ANDed with the row, and the surviving 1s are counted by an adder
tree; the row's Sum is then added. When the bit is 1 the result is ONES + 1,
which is directly the increment of P1, and ONES for the next START is one
less. Because Sum already covers the earlier rows of the level and the levels
are row-aligned, no second access and no lower bound on the mask are needed.

## Pipeline and timing

A level takes two clock cycles: READ (the SRAM row is addressed) and SUM
(mask, count, update). Eight levels would take 16 cycles, too slow for one
lookup per DRAM access (8 cycles), so the level loop is unrolled once: one
`lookup_fsm` does levels 0–3, a second does levels 4–7, and they form a
two-stage pipeline. Each FSM holds one lookup.

The two FSMs share one single-port SRAM by reading in opposite cycles (a
`phase` bit that toggles every cycle): while one is in READ the other is in
SUM. A context leaving the first FSM therefore waits one cycle for the second
FSM's read phase.

| event (lookup accepted in cycle *t*) | cycle |
|---|---|
| level 0 READ (same cycle as acceptance) | *t* |
| context handed to the second FSM | *t*+8, taken at *t*+9 |
| search finished | *t*+16 (last SUM) |
| DRAM request offered | *t*+18 |
| DRAM data (8-cycle access) | *t*+26 |
| `result_valid` | *t*+27 |
| next lookup accepted | *t*+8 |

A search that ends early still steps through its remaining levels (without
reading the SRAM), so the latency is always 27 cycles when the DRAM keeps up,
and results come out in lookup order. If the DRAM is not ready the request
waits; the second FSM then waits in a HOLD state, the first FSM waits for the
second, and `lookup_ready` stays low. Nothing is dropped.

## Modules

| file | what it is |
|---|---|
| `flu_pkg.sv` | constants (32-bit address, 4 bits per level, 8 levels, 128-bit rows, 20-bit Sum) and the types `sram_row_t` and `ctx_t` |
| `fast_lookup_engine.sv` | top: phase register, level table, SRAM, two `lookup_fsm`, `dram_req_gen` |
| `lookup_fsm.sv` | READ/SUM level FSM for a group of levels; parameters `FIRST_LEVEL`, `NLEV`, `READ_PHASE` |
| `bit_extract.sv` | selects the 4 address bits of a level |
| `mask_gen.sv` | 7-to-128 decoder and mask generator: `mask[j] = j <= pos` |
| `ones_counter.sv` | 128-bit popcount: 18 7:3 compressors, then 9 3-bit, 5 4-bit, 2 5-bit, one 6-bit and one 7-bit adder |
| `compressor_7to3.sv` | seven 1-bit inputs to a 3-bit count, four full adders |
| `trie_sram.sv` | `ROWS` × 148-bit SRAM, one synchronous read port, one host write port |
| `level_table.sv` | `Level[i]` and `total[i]` in flip-flops, host write port |
| `dram_req_gen.sv` | DRAM index P1·16 + OFFSET, request register, result register |

Top-level parameters: `SRAM_ROWS` (default 4096 rows = 64 KB of bitmap, up to
8192 with the 20-bit bit addresses) and `NH_W` (next-hop width, default 8).

### Ports of `fast_lookup_engine`

* `lookup_valid` / `lookup_ready` / `lookup_addr[31:0]`: a lookup is taken in a
  cycle where both valid and ready are high (at most every 8 cycles).
* `result_valid` / `result_next_hop`: one-cycle pulse per lookup, in order.
* `dram_req_valid` / `dram_req_ready` / `dram_req_addr[24:0]`: read request
  with the entry index; `dram_rvalid` / `dram_rdata`: the entry, returned in
  request order at any later time.
* `sram_we` / `sram_waddr[12:0]` / `sram_wdata` (`{sum[19:0], bits[127:0]}`):
  host writes one SRAM row per cycle.
* `lvl_we` / `lvl_widx[2:0]` / `lvl_wstart[19:0]` / `lvl_wtotal[20:0]`: host
  writes one level-table entry per cycle.
* `rst_n`: asynchronous, active low; clears all control state and the level
  table, not the SRAM.

## Building the tables

The host builds the tables in software; `tb/trie_model_pkg.sv` is a complete
reference (class `trie_db`):

1. Sort the routes by prefix length so that parents are handled before
   children; create the root with every child set to the default route.
2. For a route of length *L* > 0, descend ⌈*L*/4⌉−1 levels, turning leaves into
   internal nodes whose children inherit the leaf's next hop; on the last level
   set the next hop of the 2^(4·⌈*L*/4⌉−*L*) children the prefix covers.
3. Number the internal nodes breadth-first (root 0). For each level *i* = 0..7,
   start a new row, write the 16 child bits of every depth-*i* internal node
   in that order, and give each row Sum = 1s of level *i* in its earlier rows.
   `Level[i]` = 128 · (first row of level *i*), `total[i]` = 1s on level *i*.
4. DRAM entry *r*·16 + *c* = next hop of child *c* of internal node *r*.

Write all rows and the level table, and the DRAM, while no lookup is in
flight; the engine does not coordinate host writes with running lookups.

## Sizes

A 16-way trie costs about one byte of bitmap per route on real backbone
tables: tables of 17,600 to 35,800 routes need 20.5 to 34.75 KB of bitmap.
The default 4096-row SRAM holds 64 KB of bitmap (plus 10 KB of Sum fields),
room for all of them. The Sum field adds 20 bits per 128 (15.6 %).

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_bit_extract`, `tb_mask_gen` (all 128 positions), `tb_ones_counter`
  (against `$countones`), `tb_trie_sram`, `tb_level_table`, `tb_dram_req_gen`;
* `tb_lookup_fsm`: one FSM walking all 8 levels (the loop not unrolled)
  against tables from `trie_model_pkg`, checking the DRAM index of every
  lookup, the 16-cycle traversal and the HOLD state;
* `tb_fast_lookup_engine`: the whole engine at its default size with
  `tb/dram_model.sv` (8-cycle access and cycle time). It runs the example
  table and a random table of about 560 routes (216 SRAM rows, levels spanning
  many rows), 3800 lookups in all, compares each result with a direct
  longest-prefix scan of the route list, checks the 8-cycle spacing and
  27-cycle latency, and then adds random DRAM stalls. It fails unless searches
  end on each of the 8 levels, some read a row whose Sum is used, two lookups
  are in the level pipeline at once, DRAM stalls occur and reach back to the
  lookup input, and the default route is hit. It also changes the next hop
  of one route and checks that only 4 DRAM entries change, the SRAM stays
  the same, and lookups return the new next hop;
* `tb_backbone_tables`: five synthetic tables with the route counts of five
  public backbone tables (17,641 to 35,752 routes, mostly /24 and /16../23
  routes clustered in 600 /16 blocks). They need 1260 to 1700 SRAM rows
  (0.8 to 1.1 bitmap bytes per route) of the 4096 built; 1000 lookups per
  table are checked against a direct longest-prefix scan, with the 8-cycle
  spacing.

Simulate one, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/flu_pkg.sv tb/trie_model_pkg.sv tb/tb_fast_lookup_engine.sv \
  --top-module tb_fast_lookup_engine -o sim && ./obj_dir/sim
```

Lint: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/flu_pkg.sv
rtl/fast_lookup_engine.sv`. The remaining warnings are package constants a
module does not use, context fields a module does not read, and the reset
used both by flip-flops and by assertion `disable iff` clauses.

## How far to trust it, and where it departs from the published design

Follows the published design: the trie layout, the search algorithm, the
128-bit row with a 20-bit Sum field, the per-level totals, the decoder and
mask generator, the compressor/adder tree counts, two 8 ns states per level,
the loop unrolled once into two pipelined FSMs, one lookup per 64 ns.

This implementation's own choices:

* Each level starts on a new SRAM row (the layout implies it but does not
  state it); the mask then needs only an upper bound.
* The mask includes the bit being tested (decoder line 127 drives all 128
  mask bits, as in the published mask circuit), so the counter returns
  ONES + 1 and ONES is formed by a decrement.
* The two FSMs share one SRAM read port in alternate cycles, adding one cycle
  of latency between them.
* P1 is formed as (1s on earlier levels) + ONES + 1 from the per-level totals
  instead of counting from SRAM bit 0; a search ending on level 0 uses
  P1 = 0. Level-7 nodes are always leaves.
* The mask decoder takes 7 bits (128 positions); the published text mentions
  an 8-bit decoder input.
* How the two bits left over by the 18 compressors, and the odd partial sums,
  enter the adder tree.
* All handshakes, the HOLD state, reset behaviour, the host write ports, the
  8-bit next hop and the 4096-row SRAM depth.

Not built: the alternatives the design is compared with or could grow into:
tries of degree 8, 4 or 2, 512- or 1024-bit SRAM rows, a direct lookup table
for the first 16 address bits, and several DRAMs in parallel. Timing at 8 ns
per state was not checked; the design was only simulated and linted.

# A 32-entry, four-wide shifting reorder buffer

A superscalar processor issues and completes instructions out of order.
To update its registers in program order anyway, it keeps the results in
a reorder buffer until retirement. The same structure renames registers.
Each destination register gets a unique tag. Later readers of that register
get either the finished value or the tag to wait for.

This RTL implements such a buffer for a processor that decodes four
instructions per cycle. It has 32 entries. Its central idea is that the
buffer does not use head and tail pointers. It is a physical shift register
of eight **blocks** of four entries:

- every cycle, the whole buffer moves down one block (four rows);
- the decoded group of up to four instructions enters the empty top block;
- the bottom block leaves and is written to the register file.

Age is therefore position. The higher a row, the younger its instruction.
"Find the most recent writer of register r" becomes "find the topmost
matching row". A small *lookup array* solves that in constant depth.

## Per-cycle behaviour

Four interfaces act in one clock cycle. Their order matters, because
later steps see the effects of earlier ones:

1. **Result write.** Up to four result buses arrive, each carrying a tag and
   a 32-bit value. The tag field compares each tag with every row. A
   matching valid row stores the value and sets its ready bit.
2. **Operand lookup.** Eight source register identifiers arrive: two
   sources for each of four instructions. The destination field compares
   them with every valid row. The lookup array keeps only the topmost
   match of each source.
3. **Operand read.** For each source, the selected row is read. The output
   is `hit`, `ready` and `value`. When `ready` is 1, `value` is the result.
   When it is 0, `value[4:0]` is the producer's tag. Because the write comes
   first, a result arriving in this cycle is already visible. When `hit` is
   0, no instruction in flight writes that register, so the operand must be
   read from the register file.
4. **Shift / commit.** On the clock edge the buffer shifts one block,
   unless `stall_i` is high or the bottom block holds a valid entry that
   still has no result. A result arriving in this cycle counts as present.
   When the buffer shifts:
   - the offered group enters at the top and gets the tags shown on
     `alloc_tag_o`;
   - each new entry's data word holds its tag, and its ready bit is 0;
   - the valid entries of the bottom block appear on `commit_o`.

   When it does not shift, nothing enters or leaves. `alloc_ready_o` says
   which case applies, so the decoder must hold its group until it is 1.

Lookups see the buffer as it was at the start of the cycle. The group
being allocated is not included. A source is therefore never matched
against the destination of its own group. **The decoder must resolve
dependences inside a group itself**, for example by ending a group before
an instruction that reads an earlier member's destination.

A group of four goes in and a block of four comes out every cycle. An
instruction retires no sooner than eight cycles after it enters, and
later if the buffer stalls.

## Fields of an entry

| field | bits | kind | role |
|-------|------|------|------|
| DEST  | 2 x 5 | 4-port CAM, twice | destination register. Two identical copies: one compares the four first sources, the other the four second sources |
| TAG   | 5 | 4-port CAM | the entry's tag, compared with the result tags |
| DATA  | 32 | 4-write / 8-read RAM | the tag while waiting, then the result |
| READY | 1 | 4-write / 8-read RAM | DATA holds the result |
| VALID | 1 | resettable shift cell | the entry holds a live instruction |
| CURRENT | 8 x 5 lines | lookup array | one per source operand: picks the topmost match |

The tag is stored in the data word itself, not in a separate field. The
ready bit tells the two uses of the word apart. Every field is built from
one storage element, `rob_shift_cell`, which either keeps its value or
loads the value of the row four above.

## The lookup array

For n rows there are m = lg n lookup lines per operand. Rows are numbered
from the top, starting at 0. Line j is cut into independent segments of
2^(j+1) rows. A cut lies above every row i with i mod 2^(j+1) = 0. Within
a segment:

- if a row in the **upper half** matches (bit j of i is 0), it pulls the
  segment's line low;
- a row in the **lower half** (bit j of i is 1) drops its own match when
  it sees the line low.

Take any matching row k above a row i. Look at the highest bit where i
and k differ: k has a 0 there and i has a 1, and the line of that bit has
both rows in one segment. So row i drops its match exactly when some row
above it matched. All rows do this at once, using lg n lines per operand,
whatever the number of matches. In the circuit view, each row's constants
are:

- p(i,j) = i mod 2^(j+1): a segment cut where it is zero;
- d(i,j) = floor((i mod 2^(j+1)) / 2^j): bit j of i.

`rob_lookup` computes exactly this segmented structure rather than a
generic priority encoder.

## Mispredicted branches and exceptions

A result bus can set its `squash` flag. This marks the instruction as a
mispredicted branch or as one that raised an exception. Its row is found
through the tag field, as for any result. On the same edge:

- every valid bit above that row is cleared (a prefix OR from the bottom);
- the group offered in that cycle is discarded;
- the flagged instruction itself stays, receives its result and commits
  normally.

Invalid rows never match a source. They never take a result and never
commit. If several squashes arrive in one cycle, the oldest one decides.

## Tags

Tags are `{block counter mod 8, slot}`. The counter advances on every
shift. A block stays in the buffer for exactly eight shifts, so every
tag in flight is unique. An assertion checks this. Within a block, slot
0 (the oldest instruction of the group) sits in the lowest row. On
`commit_o`, slot 0 is the first instruction in program order.

## Interface (`rob_top`)

All types are in `rob_pkg`. The clock is `clk`, and `rst` is a
synchronous, active-high reset that empties the buffer.

| port | dir | type | meaning |
|------|-----|------|---------|
| `stall_i` | in | 1 | hold the buffer for this cycle |
| `alloc_i` | in | `alloc_t[4]` {valid, dest} | decoded group, slot 0 oldest |
| `alloc_ready_o` | out | 1 | the group is taken on this edge |
| `alloc_tag_o` | out | `tag_t[4]` | tag of each slot |
| `src_i` | in | `reg_id_t[8]` | [0..3] first sources of slots 0..3, [4..7] second sources |
| `operand_o` | out | `operand_t[8]` {hit, ready, value} | operand answers |
| `result_i` | in | `result_t[4]` {valid, tag, data, squash} | result buses |
| `commit_o` | out | `commit_t[4]` {valid, dest, data} | retiring block, slot 0 oldest |

Everything except the state update is combinational within the cycle.
This includes the path from `result_i` through the write, lookup and read
to `operand_o`, and through the stall decision to `alloc_ready_o` and
`commit_o`.

## Modules

| module | role |
|--------|------|
| `rob_pkg` | sizes (32 entries, blocks of 4, 32-bit data, 5-bit registers and tags) and port structs |
| `rob_shift_cell` | storage element: hold, shift from the row four above, or update in place; optional reset |
| `rob_ram_field` | multi-port RAM field that shifts by blocks; used for DATA (32 bits) and READY (1 bit) |
| `rob_cam_field` | CAM field that shifts by blocks; used for both DEST copies and for TAG |
| `rob_lookup` | lookup array of one source operand |
| `rob_valid_field` | valid bits with squash of younger rows |
| `rob_tag_gen` | tag generator |
| `rob_top` | the buffer |

## Relation to the original circuit

The original is a full-custom dynamic CMOS layout. It runs on a
four-phase, 100 MHz clock and spreads the work over the phases:

- phase 1: tag match, lookup precharge, DEST shift;
- phase 2: result write, destination match, lookup;
- phase 3: shift of the other fields, bus precharge;
- phase 4: read.

This RTL keeps the fields, sizes, block shift, lookup structure and the
order of operations within a cycle. It collapses the phases into one
clock edge. It therefore has no equivalent of the following parts:

- the phase generator;
- the read and write driver cells, which share one word line per row
  between the write phase and the read phase (here reads and writes have
  separate word lines);
- precharge, ratioed match lines and the complementary read bit lines.

The following are choices of this implementation, not of the original
design:

- the stall rule;
- the `squash` interface;
- the tag scheme;
- that lookups use start-of-cycle contents, which excludes the group
  being allocated;
- reset behaviour;
- reading 0 when no row is selected.

The benchmark programs used to verify the original are not reproduced
here; a generated DSP-style program stands in for them. The RTL's timing depends on the target technology;
the 100 MHz figure belongs to the original 1.0 µm layout.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M`.

`tb_rob_top` runs the full-size buffer. It checks every output every
cycle against an independent model, which tracks eight groups of four
instructions and searches from the newest instruction to the oldest. It
covers these traffic patterns:

- 20,000 cycles of random traffic, with random results, external stalls
  and occasional squashes;
- a drain;
- a rate phase that requires one group accepted per cycle, four commits
  per cycle and a retirement latency of exactly eight cycles.

It counts, and requires, these mechanisms:

- bottom-block and external stalls;
- same-cycle forwarding;
- writes into the leaving block;
- tag reads and value reads;
- misses and multiple matches;
- squashes, including one that discards an offered group.

`tb_rob_program` runs a generated DSP-style program (multiply-accumulate
filter taps, with dependent chains) through a small out-of-order core
built around the buffer. The core has:

- a four-wide decoder that ends a group at an intra-group dependence;
- a register file updated only from `commit_o`;
- an instruction window that waits for tags on the result buses;
- four functional units with random latencies.

It runs the first 1,000 cycles and then lets the program finish. Every
retired instruction must be the next one in program order, with the value
that sequential execution gives, and the final register file must match.
The 4,018-instruction program retires in about 2,560 cycles, about 1.6
instructions per cycle, limited mostly by the dependent accumulation
chain.

To simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/rob_pkg.sv rtl/*.sv tb/tb_rob_top.sv --top-module tb_rob_top -o sim
./obj_dir/sim
```

# Priority-TCAM IP-routing lookup engine

This is a longest-prefix-match lookup engine for IPv4 destination addresses. It
splits the routing table at prefix length 24 and serves the two halves with
different structures:

- **Prefixes of length ≤ 24** go to a *compact lookup*. It keeps one 4-byte
  descriptor per 16-bit segment, one default hop per segment, and a small
  *next hop array* (NHA) per segment. The NHA holds only as many entries as the
  segment's prefixes really need. A lookup costs two memory reads.
- **Prefixes longer than 24** (a few hundred in a backbone table) go to a
  *priority TCAM*. It has four small TCAMs, each a priority class, plus a
  priority resolver and an associated memory holding the next hops.

The two halves search every address in parallel. A selector prefers the TCAM
answer, because a TCAM prefix is always longer than any compact one. New
results come out at one per clock, three clocks after the address goes in.

```
                 +-------------------- compact lookup ---------------------+
 in_ip --+-----> | seg_table ---> logic_process_unit ---> nha_mem ---+     |
         |       | adh_mem   -------------------------------------+  |     |
         |       +-------------------------------------------------|--|----+
         |                                                       (pick entry / default)
         |       +-------------------- priority_tcam --------------------+  |
         +-----> | tcam x4 ---> priority_resolve ---> assoc_mem          |  |
                 +-------------------------------------------------------+  |
                                        route_selector <--------------------+
                                              |
                                     out_hop / out_src
```

## The compact lookup

### Segment information

Address bits are numbered 1..32 from the most significant bit. Bits 1..16
select one of 2^16 *segments*. Each segment has a 32-bit `seg_entry_t` in
`seg_table` and a default hop in `adh_mem`:

| field      | bits    | meaning |
|------------|---------|---------|
| `cprefix`  | [31:26] | the bits 17..22 that all of the segment's prefixes share |
| `cmarker`  | [25:20] | 1 where bit 17..22 is shared; bit 5 is address bit 17 |
| `mlength`  | [19:17] | longest compact prefix length in the segment, minus 17 |
| `nbit`     | [16]    | NHA entry size: 0 means 4 bits, 1 means 8 bits |
| `npointer` | [15:0]  | NHA start, in 4-byte units; 0 means the segment has only its default route |

The field widths are part of the scheme. Their order inside the word is this
design's choice.

### Finding the NHA entry (`logic_process_unit`)

The main idea is that bits shared by every prefix of a segment carry no
information, so the NHA needs no index bits for them. For an address `a`:

1. **Common-bit check.** At every position marked in `cmarker`, bits 17..22 of
   the address must equal `cprefix`. If one differs, no prefix of length 17..24
   can cover the address, and the segment's default hop is the answer.
2. **Index.** Take bits 17..24 and drop the marked positions. Pack the
   remaining bits in order, with bit 17 as the most significant. Shift right by
   `7 - mlength` to remove the bits beyond the segment's longest prefix. This
   gives the entry number `k`.
3. **Address.** The byte address is `npointer*4 + k` for 8-bit entries, or
   `npointer*4 + k/2` for 4-bit entries. With 4-bit entries the even entry of a
   byte is its low nibble.

`npointer == 0` also selects the default hop.

**Worked example (segment 192.168).** The segment has these routes:

- 192.168/16 → 0 (the default)
- 192.168.20/22 → 1
- 192.168.84/22 → 2
- 192.168.68/23 → 3

Bits 17, 19, 21 and 22 are shared, so `cmarker = 101011`. The longest prefix is
/23, so `mlength = 6`. The index is then address bits 18, 20 and 23, which
gives eight 4-bit entries `{0,0,1,1,3,0,2,2}`: four bytes `00 11 03 22`.

The longer routes 192.168.68.16/28 → 4 and 192.168.68.16/32 → 5 go into two
TCAM entries. The end-to-end testbench loads this segment and checks the word
and the bytes.

### Building the tables

The tables are built by the router's control software, not by this RTL. For
each segment:

1. Sort the routes by length.
2. Set `cmarker` to the positions in 17..22 where all non-default routes agree.
   Only count positions that lie inside each route's own length.
3. Set `nbit` if any hop, the default one included, is above 15.
4. Allocate `2^(mlength+1-popcount(cmarker))` entries at a 4-byte-aligned
   address other than 0, and fill them with the default hop.
5. In increasing length order, write route `j`'s hop into the
   `2^(mlength+17-len_j)` entries that start at `route_j`'s own index `k`.

The procedure takes O(routes) time. One route update rewrites at most 2^8 NHA
entries: 64 NHA words at 8 bits per entry, plus the segment word and the
default hop. At a 10 ns write cycle, 100 such updates take 66 µs.
`tb/ptcam_tb_pkg.sv` contains this procedure (`build_segment`) as a
SystemVerilog function.

The rule in step 2 is needed for correctness. If a bit past a short prefix's
end were marked as shared, addresses covered by that prefix could fail the
common-bit check. The index shift could also drop a meaningful bit.

## The priority TCAM

`tcam` holds `N` entries. Each entry has a prefix register and a mask register.
The mask is built from the prefix length when the entry is written, with a 1
for each compared bit. Every entry compares all 32 address bits at once, using
`!mask | (prefix == addr)` per bit, and ANDs the 32 results into a match line.

The table must be laid out so that **at most one entry per TCAM can match any
address**. The address generator can then simply OR the matching indices
together. An assertion flags a violation.

There are four TCAMs, and TCAM 0 has the highest priority. `priority_resolve`
picks the lowest-numbered TCAM that hit. It forms the associated-memory address
`{TCAM number, entry}`, and `assoc_mem` returns the next hop.

Software must also lay out the classes correctly: a longer prefix must sit in a
higher-priority TCAM than any shorter prefix that overlaps it. The testbenches
place lengths 31-32, 29-30, 27-28 and 25-26 in TCAM 0..3. When more than four
nested long prefixes cover one address, software can expand them into pairs of
the same length (prefix expansion). The hardware does not change for this.

### The four-clock TCAM option

A full-width TCAM needs 32 comparators per entry. With `TCAM_SLICE_W = 8`,
each entry has only 8 comparators, about a quarter of the gates. The
comparators are reused over four clocks, most significant byte first, and a
running match flag per entry collects the results.

`tcam` signals the end of a search with `search_done` and reports
`search_busy` while it works. Through the hierarchy this becomes `in_ready` at
the top. With this option the engine takes one address every four clocks, and
the latency grows from 3 to 7 clocks. At the default width `in_ready` is
always 1.

This option is useful when the memory clock is slower than the logic clock:
the TCAM then finishes in the time of the compact lookup's two memory
accesses.

### Route updates through the TCAM

The TCAM can also hold recent route updates of any length, for later merging
into the compact tables. This works only if the priority rules above still
hold.

## Timing

| edge | compact lookup | priority TCAM |
|------|----------------|---------------|
| 1 | `seg_table` and `adh_mem` read with bits 1..16 | compare, resolve, register the address |
| 2 | `nha_mem` read at the address from `logic_process_unit` | `assoc_mem` read |
| 3 | `route_selector` registers the TCAM hop on a hit, otherwise the compact hop | |

`out_valid` follows `in_valid` by exactly three clocks, and a new address can
enter every clock. `out_src` reports where the hop came from:

- `SRC_ADH_ONLY`: the segment has only its default route.
- `SRC_ADH_MISMATCH`: the common-bit check failed.
- `SRC_NHA4` or `SRC_NHA8`: the hop came from a 4-bit or 8-bit NHA entry.
- `SRC_TCAM`: the TCAM hit. `out_class` then names the winning TCAM.

## Interface of `ptcam_lookup_top`

- Lookup: `in_valid`, `in_ip`. Results: `out_valid`, `out_hop` (8 bits),
  `out_src`, `out_class`.
- `seg_wr_en/addr/data`: write one segment word.
- `adh_wr_en/addr/data`: write one default hop.
- `nha_wr_en/addr/be/data`: write one 32-bit NHA word, with byte enables. Byte
  0 is bits [7:0].
- `tcam_wr_en/tcam/addr/prefix/len/valid/hop`: write one TCAM entry and its
  next hop together. `valid = 0` removes the entry.

All writes are synchronous and take effect at the clock edge. The memories use
read-first behaviour, so a lookup running during an update sees either the old
or the new word. `rst_n` is asynchronous and active low. It clears the
pipeline and every TCAM valid bit. The memories are not reset: software must
write a descriptor and a default hop for every segment before using it.

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `SEG_AW`  | 16 | 2^16 segment descriptors and default hops (256 KB + 64 KB) |
| `NHA_AW`  | 16 | 2^16 NHA words = 256 KB, the span of a 16-bit `npointer` |
| `NT`      | 4  | TCAMs (priority classes) |
| `N`       | 128 | entries per TCAM (512 in all) |
| `TCAM_SLICE_W` | 32 | TCAM bits compared per clock: 32, or 8 for the four-clock option |

Shared types are in `rtl/ptcam_pkg.sv`.

## Sizing against real tables

Three published backbone tables are used here for sizing:

| table | prefixes | segments | prefixes longer than 24 |
|-------|----------|----------|-------------------------|
| AADS | 33,931 | 5,813 | 431 |
| Mae-West | 37,523 | 6,126 | 433 |
| PAIX | 18,569 | 3,571 | 443 |

Their reported compact-lookup memory is 423, 463 and 377 KB. Subtract the
fixed 320 KB of segment table and default hops, and each table's NHAs fit in
256 KB. Each table's long prefixes fit in 512 TCAM entries, as long as no
single class needs more than 128.

`tb_ptcam_table2_workloads` loads the full-size engine with tables of these
three sizes in turn. The prefix counts are the real ones, but the prefixes are
synthetic. Each segment gets a default hop and a few prefixes of length 17..24.
Their upper bits agree and between 2 and 7 of bits 17..24 vary, since real
tables are clustered in this way. With this mix the NHAs need about 126 KB,
132 KB and 72 KB. The long prefixes spread to about 108 per TCAM class. Each
table is followed by 10,000 checked lookups.

## What is this design's choice, and known limits

Several details are this design's own choices:

- the field order inside the descriptor
- the 8-bit hop width
- the NHA byte and nibble order
- the pipeline registers and the 3-cycle latency
- the write ports
- the TCAM valid bits
- the TCAM size of 128 entries per class
- the start/done handshake of the sliced TCAM

The descriptor's field widths, the index formula, the two-access lookup, the
TCAM entry structure and the priority rule belong to the scheme itself.

Two table-building rules differ from a literal reading of the procedure:

- **NHA size:** the NHA has `2^(mlength+1-clength)` entries, not
  `2^(mlength-clength)`. The worked example needs the larger size.
- **Default hop:** the default hop counts toward the 8-bit-entry decision,
  since it fills the array.

Known limits:

- **No table management.** Building the tables, placing prefixes into TCAM
  classes and expanding prefixes are software tasks, and are not in the RTL.
- **No hazard logic.** Nothing orders updates against lookups already in
  flight.
- **Pacing of the sliced option is this design's own.** With
  `TCAM_SLICE_W = 8`, the whole engine takes one address per four clocks, and
  the compact result is delayed to meet the TCAM result.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. The testbenches compare results with models
written independently of the RTL: a bit-by-bit index computation, and a plain
longest-prefix match over the route list.

`tb_ptcam_lookup_top` runs the engine at its full default size:

1. It loads default hops into all 65,536 segments.
2. It builds the worked 192.168 segment and about 60 random segments. These
   include 4-bit and 8-bit arrays and default-only segments.
3. It fills the four TCAM classes with nested long prefixes.
4. It runs 25,000 lookups, mostly back to back, with a TCAM entry added and
   another removed in between.

It checks every hop, its source and the 3-cycle latency. It fails if any of
these mechanisms never happens: default-only segment, common-bit mismatch,
4-bit array, 8-bit array, TCAM override of a compact route, or several TCAMs
matching at once.

To run it with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/ptcam_pkg.sv tb/ptcam_tb_pkg.sv tb/tb_ptcam_lookup_top.sv \
    --top-module tb_ptcam_lookup_top
./obj_dir/Vtb_ptcam_lookup_top
```

`tb_ptcam_lookup_sliced` runs the same test with `TCAM_SLICE_W = 8`. It also
checks the 7-clock latency and that lookups wait for `in_ready`.

`tb_ptcam_table2_workloads` is described under *Sizing against real tables*.

The other testbenches run the same way. Replace the last file and the top
module with `tb/tb_<module>.sv` and `tb_<module>`.

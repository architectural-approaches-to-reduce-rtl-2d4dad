# Leakage-reducing L1 caches: subbank shut-off and macroblock-driven resizing

Leakage in a large L1 cache is paid for every powered SRAM cell, used or
not. Both caches here save it the same way: they watch how the running
program uses the cache and power down the parts it does not need, by gating
the supply of those cells (gated-Vdd). They differ in what they watch and in
how finely they resize.

* **Subbank shut-off** (`sb_icache`). The 64 KB instruction cache is split
  into 8 subbanks (or 4). Per-subbank miss rates are measured over intervals
  of one million fetches. A subbank that misses rarely and is the least used
  is switched off, except for a 1 KB corner of it, the *ADS* (activated part
  of the disabled subbank). Later fetches that map to that subbank are folded
  into its ADS. The cache shrinks in small steps. With 8 subbanks the sizes
  are 64, 57, 50, 43, 36, 29, 22 and 15 KB.
* **Macroblock method** (`mb_cache`). Memory is cut into 1 KB macroblocks. A
  1024-entry Memory Address Table (MAT) keeps a spatial counter per macroblock.
  It serves as an instruction cache or, with write-through stores, as a data
  cache.
  The counters drive two things. On every miss they decide whether the
  refilled line is worth keeping or should *bypass* the cache. At the end of
  every interval their sum decides whether the cache halves or doubles, between
  64 KB and 4 KB.

`leak_top` puts the two side by side. They are independent alternatives built
on the same base cache, and each brings out its own CPU port, its own port to
the next level (the L2) and its resizing state. The L2 and the power-gating
circuit itself are not part of this RTL. The resizing state that would drive
the gating is on the ports: `disabled` and `active_lines` for the subbank
cache, `size_log` and `active_lines` for the macroblock cache. A gated line
loses its contents, so the RTL invalidates it.

## Common base cache

Both caches are direct-mapped and hold 64 KB, with 32-byte lines (2048 lines)
and 32-bit byte addresses (`rtl/leak_pkg.sv`). Only the 64 KB size and direct
mapping come from the method. The line size and address width are choices
made here.

Both caches share the same interface and timing:

| signal | meaning |
|---|---|
| `cpu_req_valid/addr/ready` | fetch request, taken when valid and ready are both high |
| `cpu_resp_valid/data/hit` | one-cycle response with the 32-bit word |
| `l2_req_valid/addr/ready` | line refill request, held until it is taken |
| `l2_resp_valid/data` | the whole 256-bit line, in one beat |
| `cpu_req_we/wdata`, `l2_wr_*` | `mb_cache` only: word stores and their write-through |

A request is taken in cycle 0, and the tag and data arrays are read
synchronously. A hit answers in cycle 1. A miss raises the refill request in
cycle 2 and answers in the cycle the line arrives. Only one request is in
flight at a time. `cpu_req_ready` stays low while an interval is being
evaluated. Reset is asynchronous and active low. It invalidates every line
and restores the full size.

## Subbank shut-off

### Mapping into the ADS (`sb_index_map`)

The 11-bit line index is split into a subbank number (the upper
log2(N) bits) and an in-subbank line address. With 8 subbanks a subbank holds
256 lines, and its ADS is its first 32 lines (1 KB). For a disabled subbank,
the upper bits of the in-subbank address are forced to zero:

```
8 subbanks:  idx = sss_mmm_aaaaa   ->  sss_000_aaaaa   (3 masked bits)
4 subbanks:  idx = ss_mmmm_aaaaa   ->  ss_0000_aaaaa   (4 masked bits)
```

Several addresses now share one ADS line, so the masked bits (`mmm`) are
stored with the tag. The tag is 16 + 3 bits wide with 8 subbanks. The
comparison is the same whether or not the subbank is folded, so lines cached
in the ADS before a shut-off stay valid and correct afterwards. On the index
path, the mapping adds one gate level, an AND with the disable bit.

### Interval policy (`sb_monitor`)

Every completed fetch adds to its subbank's access counter, and a miss also
adds to its miss counter. A fetch completes on a hit, or when its refill
returns. After `INTERVAL` fetches (1,000,000) the monitor takes one cycle to
decide, with the cache holding new requests:

1. Candidates are the subbanks that are still fully on and whose miss rate
   is below 1.5 %, tested as `misses * 1000 < 15 * accesses`. A subbank with
   no access at all also counts.
2. Of these, the one with the fewest accesses is switched off. Ties go to the
   lowest index.
3. The last fully powered subbank is never switched off.

Then all counters restart. At most one subbank goes per interval, and none
ever comes back. Only reset restores the full cache. The method states the
interval, the threshold and the least-accessed rule. The one-per-interval
step, the zero-access rule, the tie rule and the absence of re-enabling are
choices made here.

## Macroblock method

### Memory Address Table (`mat`)

The table is direct-mapped. Macroblock number = `addr[31:10]`. Its low
10 bits index the table, and the next 12 bits are the tag. Each entry holds a
valid bit, a 12-bit tag and an 8-bit saturating counter, 21 bits in all. The
cache makes one table operation per fetch, in its lookup cycle:

* **Any fetch.** The fetched macroblock's counter goes up by one. If the
  macroblock is not in the table, a new entry is made with a count of 1. This
  is *ctr1*.
* **Miss with a valid line to replace.** The replaced line's address is
  rebuilt from its tag and index. If its macroblock is in the table, that
  counter goes down by one. This is *ctr2*. The refill bypasses the cache
  when `ctr1 < f * ctr2`, with f = 1/2: `ctr1 << 4 < 8 * ctr2`. A bypassed
  refill is sent to the CPU (`cpu_resp_bypass`) and not written into the cache.

If the new and the replaced macroblocks share a table slot, the new one takes
the slot and no bypass is made. The method leaves open f, the initial
count, the saturation and whether the increment comes before the compare.
These are parameters (`F_NUM`, `F_SHIFT`, `INIT_CTR`) or choices made here.
The table is built from flip-flops, so that the update, the decrement and the
summation read can all happen in one cycle.

### Resizing (`mb_resize_ctrl`, `mb_cache`)

After `INTERVAL` completed fetches (1,000,000, a choice made here), the
controller walks the 1024 entries, one per cycle. It adds the counters of the
valid ones in a 16-bit adder that saturates, which gives `sum_MATcnt`. The
following cycle it decides:

* `sum_MATcnt < THRESHOLD`: halve the cache, down to 2^7 lines (4 KB).
* otherwise: double it, up to 2^11 lines (64 KB).

The cache takes no request for 1 + 1024 + 1 cycles from the last fetch of the
interval. The size is held as `size_log`, the number of active index bits.
The index is ANDed with a mask of `size_log` ones, which is the mask shifting
right on every downsize. The tag is sized for the smallest cache (20 bits).
At larger sizes it holds up to four index bits again (the *resizing tag
bits*), and it is always compared in full, so no aliasing can occur at any
size. On a downsize, every line above the new size is invalidated.

### Stores (`mb_cache` as a data cache)

`mb_cache` also takes whole-word stores (`cpu_req_we`, `cpu_req_wdata`). The
policy is the simplest one that stays correct: write-through, with no
allocation on a write miss. A store hit updates the line. Every store leaves
on a separate `l2_wr_valid/addr/data/ready` channel and is answered in the
cycle that channel takes it, two cycles after acceptance with an always-ready
next level. A store counts as an access in the MAT, but it never replaces a
line, so it makes no bypass decision.

Resizing adds one subtlety. A line filled while the cache was small can
survive an upsize at its old index, where it is out of reach. After a later
downsize it would be in reach again. If its address had been stored to in
the meantime, that copy would be stale. Each store therefore also invalidates
the lines at its address's index masked to every smaller size
(`MIN_IDX` .. `size_log-1` bits). This takes at most four valid bits, cleared
in the same cycle.

`THRESHOLD` defaults to 138, the value for an instruction cache at a 0.1 %
performance penalty. Use 141 for a data cache at 1 %. Be aware that the
scale of this comparison is uncertain. A literal sum over 1024 counters
exceeds 138 as soon as a few macroblocks are in use, so with the default the
cache downsizes only in phases that touch very few macroblocks. Choose the
threshold for the workload at hand. The testbenches use 1200.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `sb_icache` | `NUM_SUBBANKS` | 8 (4 also evaluated) | method |
| | `ADS_BYTES` | 1024 | method |
| | `INTERVAL` | 1,000,000 | method |
| | `THR_NUM/THR_DEN` | 15/1000 (1.5 %) | method |
| `mb_cache` | `INTERVAL` | 1,000,000 | chosen here |
| | `THRESHOLD` | 138 | method (I-cache) |
| | `MIN_IDX` | 7 (4 KB) | chosen here |
| | `MAT_ENTRIES`, `MAT_TAG_W`, `CTR_W` | 1024, 12, 8 | method |
| | `F_NUM/2^F_SHIFT` | 8/16 | chosen here |
| `leak_top` | `SB_SUBBANKS`, `SB_INTERVAL`, `MB_INTERVAL`, `MB_THRESHOLD` | 8, 1e6, 1e6, 138 | as above |

## Departures and limits

* The store path of `mb_cache` is this design's own: the method is evaluated
  on a data cache but gives no write policy (see *Stores* above).
* Subbanks that have been switched off never come back, except through reset.
* In the resizing scheme this cache follows, the resizing tag bits are
  ignored at the larger sizes. Here they are always compared. For a line
  filled at the current size the extra compare changes nothing. For a line
  that stays in the cache across an upsize, it prevents a false hit.
* The interval of the macroblock method, the smallest macroblock-cache size,
  f, the initial MAT count, the store policy and all handshakes are choices
  made here.
* The supply gating and the L2 are outside the RTL. `tb/l2_model.sv` is a
  fixed-latency behavioural line memory, used only in simulation.
* Energy figures are not produced. The ports give what an energy model needs:
  active lines per cycle, misses (L2 traffic) and bypasses.

## Behaviour on a synthetic loop workload

`leak_top_loops_tb` sends the same fetch stream through both caches at their
default parameters. The stream is four phases of sequential loops: 4 KB,
then 20 KB, then 40 KB, then 8 KB. It is a stand-in for real program traces,
and the results are properties of the RTL on this stream only:

| cache | misses | resizing steps | average active size |
|---|---|---|---|
| subbank (8 subbanks) | 2.9 % | 4 shut-offs | 82 % |
| macroblock (threshold 138) | 0.12 % | none | 100 % |

The run shows two consequences of choices described above. First, subbanks
switched off during the small-loop phases stay off, so the 40 KB loop later
thrashes in the remaining space. A workload that grows after a quiet phase
pays for the missing re-enable path. Second, with the literal 16-bit sum,
sum_MATcnt reaches about 14,600. The default threshold of 138 never triggers
a downsize.

## Files

`rtl/`: `leak_pkg` (shared constants and types), `sb_index_map`, `sb_monitor`,
`sb_icache`, `mat`, `mb_resize_ctrl`, `mb_cache`, `leak_top`.

`tb/`: one self-checking testbench per module, plus the helpers
`tb_mem_pkg` (memory contents: the word at address `a` is
`{a[15:0], a[31:16]} ^ 32'h5A5AC3C3`) and `l2_model`.

| testbench | what it shows |
|---|---|
| `sb_index_map_tb` | folding for 8 and 4 subbanks against index arithmetic |
| `sb_monitor_tb` | shut-off choice over random intervals against a reference |
| `sb_icache_tb`, `sb_icache4_tb` | 8- and 4-subbank caches: every hit or miss predicted, ADS folding, one-cycle hits |
| `mat_tb` | counter updates, victim decrements, bypass rule and saturation against a reference table |
| `mb_resize_ctrl_tb` | 16-bit sum, threshold boundary (137/138), size limits, 1025-cycle walk |
| `mb_cache_tb` | full reference model (cache + MAT + resizing + stores): hits, bypasses, resize stall, down- and upsizes, write-through and dropped copies |
| `leak_top_tb` | both caches at once, shortened intervals; fails unless shut-off, ADS folding, bypass, downsize, upsize and stores all occur |
| `leak_top_loops_tb` | default parameters, a synthetic four-phase loop workload of 4.2 M fetches through both caches; prints miss rates and average active size |
| `leak_top_full_tb` | default parameters, one full one-million-fetch interval on each cache: subbank 1 is switched off (57 KB left) and the macroblock cache halves |

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module leak_top_tb \
  -Irtl -Itb -y rtl -y tb rtl/leak_pkg.sv tb/tb_mem_pkg.sv tb/leak_top_tb.sv
./obj_dir/Vleak_top_tb
```

The full-size run takes about ten seconds.

# Selectively clearable cache for software-directed coherence

A multiprocessor whose processors reach shared memory over a scalable network
(a multistage switch rather than a bus) cannot snoop, and broadcasting
invalidations eats the bandwidth the network was chosen for. This design keeps
the caches coherent without any coherence traffic. Software says when
coherence is needed. A program that has taken the lock on a shared structure
tells its own cache to forget the addresses of that structure. Its next reads
of the structure miss and fetch current data from memory, and shared data is
always written through. So once a processor holds the lock, its cache can hold
no stale copy.

The hardware that makes this cheap is the **selectively clearable valid-bit
memory**. The valid bits are kept apart from the tags and data in a cell array
whose row and column decoders accept an address *range* rather than a single
address. A whole run of valid bits can then be reset in one to three clock
cycles, and the entire cache in one cycle. Everything else is an ordinary
set-associative cache with a few policy changes.

## System view

```
 processor 0 ──cpu port── sc_cache ──mem port──┐
 processor 1 ──cpu port── sc_cache ──mem port──┤  interconnection  ── memory modules
     ...                                       │  network (any)
 processor N ──cpu port── sc_cache ──mem port──┘
```

`sc_multiproc` (the top) holds `NPROC` caches side by side. It brings out each
cache's processor port and memory port. The processors, the network and the
memory modules are outside the design. The scheme asks nothing of the network,
so it does not matter what the network is. The testbenches model it as a
round-robin arbiter in front of one memory.

Inside each `sc_cache`:

| module | role |
|---|---|
| `cache_ctrl` | request FSM: lookup, fills, write policy, clears, prefetch, flush steps, uncached/swap |
| `tag_mem` | tags, all elements of a set read in parallel |
| `data_mem` | 8-byte lines, byte-strobed writes |
| `sel_clear_mem` | valid and dirty bits; range clear with dirty-bit inhibit |
| `clear_sequencer` | splits a cell range into 1–3 row/column selections |
| `range_decoder` | row or column decoder that selects every line between `lo` and `hi` |
| `prefetch_unit` | background line fills for a prefetched range |
| `flush_machine` | counter and FSM that write back dirty lines after a migration |

Types and constants shared by these modules are in `sc_pkg`.

Default configuration: a 16 kbyte cache of 512 sets with 4 elements (ways)
each, 8-byte lines and 32-bit byte addresses. Four processors. Private data is
written back (`WRITE_BACK = 1`).

## The valid-bit memory and its clear

The valid bits of all elements are one array of `WAYS*NSETS` = 2048 cells,
arranged as 32 rows × 64 columns (`VCOLS`). Cell number `e*NSETS + s` holds
element `e` of set `s`, so each element owns a contiguous block of cells.
Cell `c` sits in row `c / 64`, column `c % 64`.

A clear of cells `first..last` is done by selecting a rectangle of rows ×
columns per cycle (`clear_sequencer` drives two `range_decoder`s):

| range | cycle 1 | cycle 2 | cycle 3 |
|---|---|---|---|
| within one row | row `rs`, cols `cs..ce` | | |
| two adjacent rows | row `rs`, cols `cs..63` | row `re`, cols `0..ce` | |
| more rows | row `rs`, cols `cs..63` | rows `rs+1..re-1`, all cols | row `re`, cols `0..ce` |
| clear-all | all rows, all cols | | |

The first selection is driven in the same cycle as `clr_start`. `clr_busy`
covers the later cycles. The order of the three steps is this design's choice.

The line-dirty bits live in the same array. Within the selected rectangle a
cell's valid bit is reset only if its dirty bit is clear. Dirty lines therefore
survive any clear. Only private data can be dirty, because shared stores are
always written through (by default). So a clear still removes every shared
line.

## Direct-mapped placement of shared data

In a set-associative cache a line can sit in any element of its set, so
removing it would mean clearing every element of the set. That also removes
unrelated lines that happen to share the set, and the damage grows with the
associativity. This design places shared data direct-mapped instead. Its
element is given by the two address bits just above the set index (the lowest
tag bits). Shared lookups check only that element. Private data is still placed
freely: an invalid element first, otherwise one picked by a 16-bit LFSR.

The address split, with defaults:

```
 31            12 11        3 2      0
 [     tag      ][   set    ][offset ]
           [13:12] = element for shared data
```

Together with the cell numbering above, this means that the lines of any
contiguous shared address range occupy a contiguous run of cells: cell =
`addr[13:3]`. `OP_COHERE addr..addr_end` is then a single range clear. A range
that wraps past cell 2047 becomes two clears. A range of 2048 lines or more
becomes a clear-all. Only the elements that shared data can occupy are cleared,
so private lines elsewhere in the same sets stay.

`DCL = 0` builds the plain set clear instead. Shared data is placed like
private data, so a line may be in any element of its set. `OP_COHERE` then
clears the set range once in every element: four range clears at the default
size. This also removes the synonyms, that is the unrelated lines that share
those sets. It is kept for comparison; the direct-mapped placement (`DCL = 1`)
is the default because it clears more selectively.

The software contract: an address is always reached with shared operations or
always with private ones. The compiler knows which, because shared structures
are declared shared.

## Processor operations

Requests use `sc_pkg::cpu_req_t`. The processor holds `valid` until it sees
`ack` for one cycle.

| op | effect |
|---|---|
| `OP_LOAD` / `OP_STORE` | word access; `shared` selects direct-mapped placement and write-through; `uncached` bypasses the cache |
| `OP_COHERE` | Make_coherent: invalidate `addr..addr_end` (byte range); acknowledged after the clear |
| `OP_PREFETCH` | hand `addr..addr_end` to the prefetch unit; acknowledged at once |
| `OP_SWAP` | indivisible exchange at memory, never cached: the semaphore primitive |
| `OP_MIGRATE` | the process leaves this processor: clear-all (dirty lines survive), start the flush machine |
| `OP_RELEASE` | before unlock, write back the dirty lines of `addr..addr_end`; only does work with `SHARED_WB = 1` |

The intended use, around a shared structure `S` guarded by semaphore `L`:

```
  repeat SWAP(L, 1) until old value == 0       -- lock (uncached)
  COHERE(S.first, S.last)                      -- drop any stale copy
  PREFETCH(S.first, S.last)                    -- optional
  ... shared LOAD / STORE on S ...             -- stores write through
  RELEASE(S.first, S.last)                     -- only with SHARED_WB = 1
  STORE uncached L = 0                         -- unlock
```

Write policy:
- By default shared stores write through. A hit also updates the line. A miss does not
  allocate.
- With `WRITE_BACK = 1`, private stores allocate the line and set its dirty
  bit. Dirty victims are written back before the refill.
- With `WRITE_BACK = 0`, every store writes through without allocating.
- With `SHARED_WB = 1` (and `WRITE_BACK = 1`), shared stores are written back
  like private ones. The program must then issue `OP_RELEASE` on the
  structure just before it unlocks. The controller looks up each line of the
  range in turn, writes back the dirty ones and marks them clean but still
  valid. Memory is then current for the next lock holder, and this cache's
  next clear is not blocked by a dirty line. The release costs about one cycle
  per line, plus one memory write per dirty line.

Prefetch: the prefetch unit walks the range one line at a time. The controller
serves a fill only when the processor has no request pending, so a processor
that cleared first and then prefetched keeps running. Prefetched lines are
placed as shared data. A prefetch fetches a line again even when it is already
present, unless the line is dirty. So a prefetch alone also makes the range
coherent: without a clear before it, the program waits for
`cpu_rsp.pf_busy` to fall before using the range. A load that reaches a line
before the prefetch does simply fetches it itself; the prefetch later fetches
it once more.

Migration: the clear-all takes one cycle, and the next process can start at
once. The flush machine sweeps all 2048 cells in the background. For each
valid dirty line it writes the line back and resets the dirty bit, leaving the
line valid. `cpu_rsp.flush_busy` stays high until the sweep ends. The
operating system must not restart the old process elsewhere until it drops.
Flush steps go before prefetch fills and after processor requests.

## Timing

All arrays read combinationally and write on the clock edge.

- A request is captured in the cycle after `valid` rises and looked up in the
  next cycle. `ack` follows one cycle later: 3 clock edges from request to
  `ack` on a hit.
- A miss adds one memory read, plus a write-back first if the victim is dirty.
- `OP_COHERE` takes the hit time plus 1, 2 or 3 clear cycles. The testbench
  checks these differences.
- Write-through stores, uncached accesses and swaps are acknowledged after
  memory acknowledges them.

The memory port (`mem_req_t` / `mem_rsp_t`) carries whole lines:
- `MEM_READ` returns a line.
- `MEM_WRITE` writes the bytes whose strobes are set.
- `MEM_SWAP` returns the old line and writes the strobed bytes, indivisibly.

The cache holds `valid` and all fields until `ack`. Assertions check this.

## Parameters

| parameter | default | where |
|---|---|---|
| `NPROC` | 4 | `sc_multiproc` |
| `WAYS` | 4 | all cache modules |
| `NSETS` | 512 | all cache modules |
| `WRITE_BACK` | 1 | `sc_cache`, `cache_ctrl`, `sc_multiproc` |
| `SHARED_WB` | 0 | `sc_cache`, `cache_ctrl`, `sc_multiproc` (1: shared data written back, flushed by `OP_RELEASE`) |
| `DCL` | 1 | `sc_cache`, `cache_ctrl`, `sc_multiproc` (0: plain set clear) |
| `VCOLS` | 64 | `sc_cache` (columns of the valid-bit array) |
| `ADDR_W`, `WORD_W`, `LINE_BYTES` | 32, 32, 8 | constants in `sc_pkg` |

Constraints:
- `WAYS` and `NSETS` must be powers of two.
- `WAYS*NSETS` must be a multiple of `VCOLS`.
- `WAYS` must be at least 2.
- The line size is a package constant because it sizes the port structs.

## How far it follows the scheme, and what is this design's own

Taken from the scheme:
- a valid-bit memory with range row/column decoders, clearing in 1, 2 or 3
  cycles depending on how many rows the range spans, and the whole memory in
  one cycle;
- the dirty bit held in the same device, inhibiting the clear;
- direct-mapped placement of shared data in a set-associative cache, and
  the plain set clear as the alternative;
- write-through for shared data, with optional write-back for private data;
- as the alternative, write-back for shared data too, with a flush of the
  shared data at unlock;
- the flush machine as "a counter and a small state machine";
- prefetch of a cleared structure;
- uncached semaphores with an indivisible read-modify-write at memory.

This design's own choices:
- all widths, encodings and handshakes;
- the 32 × 64 array shape and the cell numbering;
- which address bits choose the shared element;
- random replacement by LFSR;
- no write-allocate for shared stores;
- the splitting of wrapping ranges, and promoting very large ranges to a
  clear-all;
- the priorities between processor, flush and prefetch traffic;
- the controller's cycle counts;
- `NPROC = 4`.

Not built:
- Line sizes other than 8 bytes as a parameter.
- Other ways of tracking coherence, such as one-time identifiers.
- Any model of the network, the memories or the processors beyond the
  testbenches' behavioural ones.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at full
size:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sc_pkg.sv tb/tb_pkg.sv tb/tb_sc_multiproc.sv --top-module tb_sc_multiproc
./obj_dir/Vtb_sc_multiproc
```

| testbench | what it covers |
|---|---|
| `tb_range_decoder` | exhaustive at N=16, random at N=64 |
| `tb_clear_sequencer` | coverage of every cell range and 1/2/3-cycle counts |
| `tb_sel_clear_mem` | bit-level model of writes, range clears, clear-all and the dirty inhibit |
| `tb_tag_mem`, `tb_data_mem` | random writes/reads against a model |
| `tb_prefetch_unit`, `tb_flush_machine` | request sequences under random ack delays |
| `tb_sc_cache` | one cache in three builds (default, write-through, set clear), directed and random tests (see below) |
| `tb_sc_multiproc` | four processors at default size (see below) |
| `tb_shared_wb` | two caches with `SHARED_WB = 1` on one memory: release, clear, and a structure passed between them |
| `tb_clear_workload` | miss rates of one reference stream under each clearing regime (see below) |

`tb_sc_cache` checks:
- stale data until `OP_COHERE`, fresh data after it;
- that the clear spares other elements and dirty lines;
- clear latencies;
- wrapping ranges;
- evictions;
- migration with flush;
- prefetch;
- swap.

`tb_sc_multiproc` runs four processors at the default size. Each one:
- takes a lock, makes one of three shared structures coherent (80 bytes in
  one row, 80 bytes across two rows, 1 kbyte across many rows), sometimes
  prefetches it, reads it and increments it;
- does private work in between;
- finally migrates and waits for its flush.

It checks:
- that no stale value is ever read;
- that memory holds every store at the end.

It also counts how often each mechanism happened: hits, fills, dirty evictions,
write-through stores, each clear shape, clear-alls, dirty-inhibited clears,
flush write-backs, prefetch fills, uncached accesses, lock contention and
refetches after clears.

`tb_clear_workload` replays one synthetic reference stream of 20000 word
loads through a fresh default-size cache under each regime. The stream is
made of sequential runs with random jumps, mostly inside a 12 kbyte hot
region. Every N references the regime clears 80 bytes at the current address
(or the whole cache for the total clear). Measured miss rates:

| regime | N = 100 | N = 1000 | N = 10000 |
|---|---|---|---|
| no clearing | 0.173 | | |
| direct-map clear, 80 bytes | 0.222 | 0.179 | 0.173 |
| set clear, 80 bytes | 0.308 | 0.189 | |
| total clear | 0.529 | 0.464 | |
| direct-map clear + prefetch | 0.169 | | |
| 8 elements × 256 sets, direct-map clear | 0.213 | | |
| 8 elements × 256 sets, set clear | 0.372 | | |
| 32 kbyte (4 × 1024), no clearing | 0.144 | | |
| 32 kbyte (4 × 1024), direct-map clear | 0.202 | | |

The ordering is the one expected of the scheme: the selective clear costs
little unless it is very frequent, the set clear costs more because it also
removes synonyms, and clearing the whole cache costs most. The set clear's extra
cost grows with the number of elements, while the direct-map clear's does
not. The testbench
checks this ordering. The stream is synthetic, so only the ordering means
anything, not the values.

`tb_mem` (network and memory model) and `tb_pkg` (initial memory contents) are
simulation-only helpers.

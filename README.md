# BWA short-read mapping accelerator

Sequencing machines produce millions of short DNA fragments ("reads", tens to
hundreds of bases). Each has to be placed on a long reference genome. It may
differ from the reference by a few substituted bases (SNPs), inserted bases or
deleted bases. The Burrows-Wheeler Aligner (BWA) does this with a backward
search over the Burrows-Wheeler transform (BWT) of the reference. Each search
step needs only 32-bit additions and comparisons and one table look-up. The
look-ups go to effectively random addresses.

This RTL implements an accelerator built on that observation. It has an array
of 128 small processing elements (PEs). Each PE maps one read at a time and
runs the BWA inexact search on it. All PEs share the precomputed occurrence
tables, which sit in two external DDR2 memories. A network arbitrates the PEs'
random row reads onto the two memories, one request per memory per cycle, so
the memories stay busy even though each PE waits for its own reads. The host
streams reads into an on-chip buffer and drains results from another.

```
 host ──► short_read_buffer ──┐                      ┌──► DDR2 channel 0 (even rows)
                              ▼                      │
                       pe_network ◄──────────────────┼──► DDR2 channel 1 (odd rows)
                      ▲    ▲    ▲                    │
                    pe[0] pe[1] … pe[127]            │
                              │
 host ◄── output_buffer ◄─────┘
```

## The search each PE runs

Notation: `X` is the reference, `W` the read, `B` the BWT of `X$`. The
suffix-array (SA) rows are numbered `0 .. |X|`, with row 0 the suffix `$`.

- `C(b)` is the number of bases of `X` smaller than `b`. `$` is not counted.
- `O(b,r)` is the number of `b` in `B[0..r]`.
- `O'` is the same table built for the reversed reference.

The SA rows whose suffixes start with a string `aW` form an interval `[k,l]`.
One backward step extends `W` by a base `b` on the left:

```
k_b = C(b) + O(b, k-1) + 1          l_b = C(b) + O(b, l)          (O(b,-1) = 0)
```

The interval is empty when `k_b > l_b`. A call `InexRecur(i, z, k, l)` means:
`W[0..i]` is still to be matched, `z` differences are still allowed, and the
current interval is `[k,l]`. A call does the following:

1. If `z < D(i)`, it is dropped (pruned).
2. If `i < 0`, the interval `[k,l]` is a hit.
3. Otherwise it creates these new calls:
   - insertion: `(i-1, z-1, k, l)`
   - for every base `b` with a non-empty `[k_b, l_b]`:
     - deletion: `(i, z-1, k_b, l_b)`
     - match when `b = W[i]`: `(i-1, z, k_b, l_b)`
     - mismatch otherwise: `(i-1, z-1, k_b, l_b)`

`D(i)` is a lower bound on the differences in `W[0..i]`. Each PE computes it
before the search by exact forward matching over `O'`. When the interval
becomes empty, the count goes up by one and the match restarts after that
base. For `i < 0`, `D` is 0.

Worked example (`tb_pe` checks it): `X = CCTGAG`, `W = CGA`, one difference
allowed, `C = (A 0, C 1, G 3, T 5)`. This gives `D = (0,1,1)`. The search
reports exactly three intervals, each with no difference left:

| Interval | Position in `X` | Difference |
|---|---|---|
| `[5,5]` | 3 | one insertion |
| `[6,6]` | 2 | one SNP |
| `[3,3]` | 1 | one deletion |

## Processing element (`pe`)

The datapath is deliberately minimal:

- one 32-bit adder/subtractor (`pe_addsub`), whose carry input supplies the
  `+1` of `k_b`;
- one 32-bit signed comparator behind two operand multiplexers
  (`pe_comparator`), which tests `z < D(i)`, `i < 0` or `k <= l`;
- `k`, `l` and the `C(.)` registers;
- a per-read table of the bases and of `D(i)`;
- the register file (`pe_regfile`), which is a stack of pending calls
  `(i, z, k, l)`, 4 x 32 bits each.

A controller sequences the datapath one operation per cycle:

| Step | Cycles |
|---|---|
| pop a call | 1 |
| `z < D(i)`? (drop if so) | 1 |
| `i < 0`? (report the hit if so) | 1 |
| `k-1` | 1 |
| read occurrence row `k-1` | request accepted + memory latency |
| read occurrence row `l` | request accepted + memory latency |
| per base: `k_b`, `l_b`, compare | 3 |
| per base with a non-empty interval: push two calls | 2 |
| push the insertion call | 1 |

The row read for `k-1` is skipped when `k = 0`. A call that is dropped or
reported costs 3 cycles. One memory word holds a whole occurrence row,
`O(A..T, r)`, as 4 x 32 bits, so an expanded call needs exactly two memory
reads.

The D phase uses the same states with table `O'` and one base per position.

**Visit order and stack depth.** The stack makes the search depth first. The
result set does not depend on the order, but the stack depth does. The PE
visits the bases starting at `W[i]` and pushes the insertion call last. Calls
that spend a difference are therefore popped before the single call that keeps
`z`. When that call is finally popped, the stack is back where it was before
its parent. So a long run of matches does not pile up entries. The depth grows
roughly with the number of allowed differences, not with the read length.

Eighty entries (1.25 kB per PE) were enough for every read in the testbenches
with up to two differences. If a push finds the stack full, the call is lost.
The read's end record then carries `overflow = 1`, and its hits are only a
subset of the true ones. The host should re-map such a read.

**Records.** A PE emits one `RES_HIT` record per hit:
`{id, k, l, z}`, where `z` is the allowed differences still unused. It emits
one `RES_END` record per read: `{id, overflow}`. Turning `[k,l]` into
reference positions needs the suffix array: position = `SA[row]` for each row
of the interval. The host does this, because the hardware never holds the SA.
The differences used are `zmax - z`. Which bases were SNPs or indels is not
tracked: the stack entries carry only `(i, z, k, l)`.

## Memory layout and the network (`pe_network`)

Row `r` of a table is stored in DDR2 channel `r mod 2`, at word address
`{table, r >> 1}`, where table 0 is `O` and table 1 is `O'`. Words are
128 bits.

The row interleave splits random accesses evenly over both memories, so they
work in parallel. Each channel has a round-robin arbiter. It accepts one
request per cycle when the memory is ready and tags the request with the PE
index. Responses may arrive with any latency and are steered back by their
tag. Each PE has one read in flight, so a PE never gets two responses in the
same cycle.

Two more round-robin arbiters do the rest:

- one hands the head of the short-read buffer to one idle PE per cycle;
- one moves one PE result per cycle into the output buffer. A full output
  buffer stalls that PE.

## Host side (`bwa_accel` ports)

Before mapping, the host must:

- Load `O` and `O'` into the two memories in the layout above. Each table has
  `|X|+1` rows. Loading goes through the memory controllers
  and the host link, outside this RTL; the accelerator only reads the tables.
- Drive the configuration inputs, and keep them stable while any PE is busy
  (`pe_busy`):
  - `cfg_c` = `C(A), C(C), C(G), C(T)`, counted without `$`;
  - `cfg_last_row` = `|X|`.

Reads go in through `host_rd_*` as whole `read_t` records:

- `id`
- `len` (1 to 128)
- `zmax`
- the bases, coded A=0, C=1, G=2, T=3, with base `j` in `bases[j]`.

Mapping starts as soon as a read is in the buffer. `sr_low` asks for more
reads when a quarter of the buffer or less is full. Results come out of
`host_res_*`. `ob_almost_full` (last eighth of the buffer) asks the host to
drain faster. `ob_stall_cycles` counts the cycles a PE waited on a full
buffer.

A DDR2 port is read-only and pipelined:

- A request (`addr`, `tag`) is taken when valid and ready are both high.
- The response comes back later with the same tag and is always accepted.

The memory controllers and the PCIe link are not part of this RTL.

## How far it follows the source architecture

These parts follow the published architecture:

- a one-dimensional array of 128 PEs;
- two DDR2 memories shared through an interconnection network;
- an on-chip short-read buffer and output buffer;
- the PE made of a `C(.)` register, occurrence data from DDR2, a 32-bit
  ADD/SUB unit, `k`/`l` registers, a register file of `(i, z, k, l)` calls,
  and a 32-bit comparator behind two multiplexers;
- the search algorithm itself;
- a new read is fed to a PE when the old one is finished, and the host
  streams reads in and drains results during mapping.

These are choices of this implementation:

- **`C(b)` without `$`.** The update formulas above use `C(b)` without `$`,
  with the `+1` in `k_b`. If `C` counted `$` (one more for every base), the
  formulas would be `k_b = C(b) + O(b,k-1)` and `l_b = C(b) + O(b,l) - 1`.
  Both conventions give the same intervals; the host must load the first.
- **`D(i)` procedure.** The architecture only names the lower bound. The
  standard BWA procedure was used.
- **Controller and formats.** The state sequence, the visit order, the
  record formats, and all handshakes (valid/ready, asynchronous active-low
  reset).
- **Sizes not given by the source:**
  - register file depth: 80, derived from 1.25 kB per PE;
  - read length: at most 128;
  - buffer depths: 256 reads and 1024 records;
  - buffer watermarks.
- **Memory organisation.** One 128-bit word per occurrence row without the
  `$` column, the even/odd row interleave, and per-PE tags.
- **No SA lookup.** There is no suffix-array lookup or alignment-detail
  reconstruction in hardware.
- **Unsampled tables.** The occurrence arrays are stored in full, one row per
  SA row. That is fine
  for references of thousands to millions of bases. A human genome would need
  about 99 GB for `O` and `O'` and does not fit in two 4 GB DDR2 memories.

The source reports a 100 MHz clock on a Stratix IV FPGA and, per PE, 844 LUTs,
1015 registers and 1.25 kB of on-chip memory. This RTL has not been through
FPGA synthesis, so neither the clock rate nor the LUT count has been checked.
A generic, technology-independent synthesis of one `pe` gives 721 flip-flop
bits and 11,520 memory bits, of which 10,240 are the call stack.

## Files

| File | Contents |
|---|---|
| `rtl/bwa_pkg.sv` | widths, base codes, `call_t`, `read_t`, `result_t`, comparator operations |
| `rtl/pe_addsub.sv`, `rtl/pe_comparator.sv`, `rtl/pe_regfile.sv`, `rtl/pe.sv` | processing element |
| `rtl/rr_arbiter.sv`, `rtl/pe_network.sv` | interconnection network |
| `rtl/short_read_buffer.sv`, `rtl/output_buffer.sv` | host-side buffers |
| `rtl/bwa_accel.sv` | top level |
| `tb/bwa_ref_pkg.sv` | builds SA, BWT, `O`, `O'` and `C` from a reference; software model of the search |
| `tb/ddr2_model.sv` | behavioural DDR2 channel: fixed latency, optional random refusals |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two end-to-end runs |

The end-to-end runs are:

- **`tb_bwa_accel`**: 4 PEs and tiny buffers, so that every mechanism
  happens at least once. The testbench counts each one and fails if one never
  occurs. The mechanisms are:
  - memory arbitration waits, and both channels busy in the same cycle;
  - `D(i)` pruning;
  - reads streamed in during mapping;
  - a full and a low short-read buffer;
  - an almost full output buffer, and stalls on a full one;
  - stack overflow.
- **`tb_bwa_accel_full`**: every parameter at its default (128 PEs). It maps
  100 reads of 30 to 60 bases, with up to two differences, against a random
  2000-base reference. The measured run took 423,866 cycles, reported 2208
  hits, and had no overflow. While at least half of the PEs were busy, some PE
  requested memory in every cycle, and the two channels together served 1.96
  accesses per cycle out of a possible 2: the memories, not the PEs, set the
  rate. Averaged over the whole run it was 0.48, because most of the time is a
  tail in which a few reads with many candidate paths are still being mapped.

Both compare every read's intervals with the software model.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bwa_pkg.sv tb/bwa_ref_pkg.sv tb/tb_bwa_accel_full.sv \
    --top-module tb_bwa_accel_full -Mdir obj_full
./obj_full/Vtb_bwa_accel_full
```

Replace the testbench name to run another one; `-y` finds the modules it
uses. Testbenches that do not import `bwa_ref_pkg` can leave it out. The full-size testbench
builds in about 20 s and runs in about 5 s.

To change the array size or the stack depth, override `N_PE` or `RF_DEPTH` on
`bwa_accel`. The read-length limit and the field widths are in `bwa_pkg`.

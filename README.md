# Read-write aware hybrid cache (RWHCA) with SRAM, STT-MRAM and a stacked PRAM L3

Non-volatile memories such as spin-transfer-torque MRAM and phase-change RAM are denser
than SRAM and leak almost nothing. But writing them is slow and costs a lot of energy. A
read-write aware hybrid cache keeps those advantages without paying for writes on every
store. One cache level is split into two regions of different technologies:

* a small **write region** in SRAM, where writes are fast and cheap;
* a large **read region** in STT-MRAM, which is dense, has low leakage and reads nearly as
  fast as SRAM.

Each line lives in exactly one region. Lines brought in by loads go to the read region.
Lines brought in by stores go to the write region. A small saturating counter per line
watches how the line is actually used. When a line keeps being hit by the "wrong" kind of
access, it is swapped into the other region.

This repository holds synthesizable SystemVerilog for:

* the hybrid L2 (`rwhca_l2`);
* a 3D-stacked configuration (`rwhca_3d`), in which a 32 MB PRAM L3 sits on a second die
  between the hybrid L2 and main memory.

## Organisation of the hybrid L2

| | default |
|---|---|
| capacity | 4 MB: 2048 sets x 16 ways x 128-byte lines |
| write region (SRAM) | 1 way per set = 256 KB; latency 6 cycles for reads and writes |
| read region (STT-MRAM) | 15 ways per set = 3.75 MB; read 20 cycles, write 60 cycles |
| banks | one per way; each region has one read/write port |
| per-line state | valid, dirty, tag (22 bits for 40-bit addresses), 2-bit saturating counter |
| replacement | true LRU within each region |
| swap buffer | 16 lines |

All latencies are in core cycles (4 GHz). Both regions use the same set index, so the
16 ways of a set are really 1 SRAM way plus 15 MRAM ways. A swap therefore always
exchanges two lines of the same set: the line being moved, and the LRU line of that set in
the other region. The address decoder is conceptually duplicated, one copy per region. In
the RTL it is simply the split of the address into tag, set index and offset. Each region's
tag array does its own compare.

The 16-way, 1 + 15 split is how this RTL reads the published configuration. That
configuration gives a 4 MB L2, a 256 KB SRAM region, associativity 16 and 16 banks. Another
reading would be a full 4 MB MRAM region plus the 256 KB SRAM region. That needs only
`RD_WAYS = 16`, but then the cache is 17-way.

## The migration policy

Everything the cache decides follows from two facts: which region was hit, and whether the
request was a load or a store.

| event | action | counter |
|---|---|---|
| load miss | allocate the LRU way of the **read** region (dirty victims are written back first) | set to `11` |
| store miss | allocate the LRU way of the **write** region, merging the store bytes into the fetched line | set to `11` |
| load hit in read region, store hit in write region ("right" hit) | serve | +1, saturating at `11` |
| load hit in write region, store hit in read region ("wrong" hit) | serve | -1, saturating at `00` |
| wrong hit whose decrement leaves the MSB at 0 | serve, then swap with the LRU line of the same set in the other region | both lines set to `11` |

Starting from `11`, a line needs two wrong hits in a row to move (`11 -> 10 -> 01`). A right
hit in between sends it back to `11`. The counter width and start value are parameters
(`CNT_W`, `CNT_INIT`), so the policy can be biased. A 3-bit counter starting at `101` needs
three wrong hits. The swap test is always "MSB is 0 after a decrement" (`sat_counter`).

The counter is written in the same cycle the data access starts. The swap begins only
after the response has been sent. Neither the counter update nor the swap delays the data.

## Swaps and the swap buffer

A swap moves two lines in opposite directions between arrays that have very different
write times. A single staging buffer is enough if the work is serialized into three steps:

1. The write-region line is read out into the swap buffer.
2. The read-region line is read out and written into the write region (SRAM, fast).
3. Later, the buffered line is written into the read region (MRAM, 60 cycles).

For a swap triggered by a load hit in the write region, step 1 costs nothing: the line was
just read to answer the load, and that copy is pushed directly. Both tag entries are updated
when step 2 completes. From then on, the tag of the read-region slot already names the
buffered line, even though its data is still in the buffer.

Step 3 is deferred so that the slow MRAM write does not block the cache. The buffer is a
16-entry FIFO, so several swaps can be outstanding. The controller writes out ("drains") the
oldest entry in three cases:

* the controller is idle and no request is waiting;
* a new swap finds the buffer full;
* a request's set still has an entry in the buffer (a *conflict*). The request waits until
  the entry is home, so it never sees a tag that points at data still in the buffer.

Coherence snoops are compared with every buffer entry. A snoop that hits a buffered line
gets `snoop_retry` in the same cycle. The tag arrays are not snooped: the RTL only implements
the swap-buffer side of snooping.

If the partner slot of a swap is empty, the valid line is still moved. The slot it leaves
becomes invalid, and nothing is pushed when the write slot was empty.

## Request handling and timing

The controller (`rwhca_ctrl`) serves one request at a time, which matches the single port
per region. A request accepted in cycle *c* is looked up in both tag arrays in cycle *c+1*,
and the data access is issued in the same cycle. Hits answer in cycle *c+1+L*, where *L* is
the region latency:

| hit | response after acceptance |
|---|---|
| load, read region | 21 cycles |
| store, write region | 7 cycles |
| load, write region | 7 cycles |
| store, read region | 61 cycles |

A load miss answers as soon as the next level returns the line. The fill into the array
happens afterwards. A store miss is acknowledged once the merged line has been written.
Dirty victims are read out and sent to the next level before the fetch. The cache is
write-back and write-allocate.

## 3D configuration: PRAM L3

`rwhca_3d` connects the L2's memory port to `pram_l3`:

* capacity 32 MB: 16384 sets x 16 ways x 128 B;
* PRAM read 40 cycles, write 200 cycles;
* write-back and LRU replacement.

It reuses the tag/status array, whose counter field this level does not use, and the region
data array with PRAM timing. L2 write-backs arrive as whole lines. A write-back that misses
in the L3 allocates without fetching. A read hit answers 42 cycles after acceptance. A read
miss answers with the memory data and then fills the L3. Only the capacity, the technology
and its latencies come from the described system. The L3's associativity, line size and
policies are choices of this RTL.

## Interfaces

All ports of `rwhca_l2` (and the L2 side of `rwhca_3d`) are plain signals. The reset is
asynchronous and active low; there is one clock.

* **Upper level:** `req_valid`/`req_ready` (ready only while idle), `req_op` (`OP_LOAD` or
  `OP_STORE`), `req_addr` (byte address), `req_wdata` (1024-bit line), `req_wmask` (128
  byte enables). The answer is a one-cycle `resp_valid` pulse, with `resp_rdata` for loads.
  Stores get the pulse as an acknowledgement.
* **Snoop:** `snoop_valid`, `snoop_addr`. Answered combinationally with `snoop_retry`.
* **Next level:** `mem_req_valid`/`mem_req_ready`, `mem_req_we`, `mem_req_addr` (line
  aligned), `mem_req_wdata`. Read data comes back as a `mem_resp_valid` pulse with
  `mem_resp_rdata`. Writes have no response.
* **Statistics:** `ev_o` (type `rwhca_pkg::ev_t`) pulses once per event: right hit, wrong
  hit, load miss, store miss, swap, write-back, drain, conflict, snoop retry.
  `sb_count_o` gives the swap-buffer fill.

## Files

| file | contents |
|---|---|
| `rtl/rwhca_pkg.sv` | line and mask types, request/region enums, event record, byte-merge function |
| `rtl/sat_counter.sv` | counter update and swap decision |
| `rtl/tag_status_array.sv` | per-region valid/dirty/tag/counter + LRU, tag compare, victim choice |
| `rtl/region_data_array.sv` | per-region line storage with read and write latency |
| `rtl/swap_buffer.sv` | FIFO of lines bound for the read region, snoop and set checks |
| `rtl/rwhca_ctrl.sv` | allocation, counter, swap, drain, miss and write-back control |
| `rtl/rwhca_l2.sv` | the hybrid L2 |
| `rtl/pram_l3.sv` | the stacked PRAM L3 |
| `rtl/rwhca_3d.sv` | L2 + L3 hierarchy (top of the design) |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus full-size runs |
| `tb/mem_model.sv`, `tb/tb_util_pkg.sv` | behavioural main memory (400-cycle default) and test helpers |

The bit cells are not modelled: the 1-transistor/1-MTJ MRAM cell with its sense amplifier
and bipolar write driver, and the 1-transistor/1-GST PRAM cell. Each data array is an array
of lines with the technology's timing, so the RTL is technology-neutral logic around memory
macros. A real implementation would replace `region_data_array`'s storage with the macros
and keep its handshake.

## Simulating

Everything is plain Verilator 5. Packages are listed first, and the rest is found by file
name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb --top-module tb_rwhca_3d \
    rtl/rwhca_pkg.sv tb/tb_util_pkg.sv tb/tb_rwhca_3d.sv
./obj_dir/Vtb_rwhca_3d
```

Every testbench ends with `TB_RESULT checks=N failures=M`. The testbenches are:

* `tb_sat_counter`: exhaustive check of the counter rule, for 2-bit and 3-bit counters.
* `tb_tag_status_array`, `tb_region_data_array`, `tb_swap_buffer`: random tests against
  reference models. These also check the exact access latency, the LRU victim choice, FIFO
  order and the associative checks.
* `tb_rwhca_ctrl`: walks one line through the whole policy, step by step, with exact
  latencies. It then checks write-region LRU and dirty write-back using two write ways.
* `tb_rwhca_l2`: random loads and partial stores against a reference memory image at
  reduced size. It checks hit latencies, and counts each mechanism (both swap kinds, drains,
  conflicts, full buffer, write-backs, snoop retries), failing if any never occurs.
* `tb_pram_l3`, `tb_rwhca_3d`: the same approach for the L3 and for the whole hierarchy.
* `tb_rwhca_l2_pram`: the SRAM-PRAM configuration of the same L2 (63 PRAM ways, latencies
  40/200, reduced set count): hit latencies, the swap and LRU over 63 ways.
* `tb_rwhca_l2_full`, `tb_rwhca_3d_full`: the L2 alone (4 MB) and the full hierarchy
  (4 MB + 32 MB), at default size, taken through the complete migration cycle.
  Each builds in about 15 seconds and runs in under a second.

To try another configuration, override the parameters. For example, the SRAM-PRAM hybrid L2
(16 MB, 64-way, PRAM latencies; exercised by `tb_rwhca_l2_pram`) is `rwhca_l2 #(.RD_WAYS(63), .NVM_RD_LAT(40),
.NVM_WR_LAT(200))`. Changing `CNT_W`/`CNT_INIT` changes how eagerly lines migrate.

## How far to trust it, and where it goes beyond the source description

Taken from the described architecture:

* the two-region organisation and its sizes and latencies;
* the allocation rule by miss type;
* the counter with start value `11` and the MSB-zero swap test;
* swapping with the LRU line of the opposite region;
* the three-step serialized swap through a multi-entry buffer, with step 1 shared with the
  load;
* snoop retry on a swap-buffer hit;
* the 16-entry buffer size;
* the 32 MB PRAM L3 with PRAM latencies.

Choices of this RTL:

* the 1 + 15 way reading of the geometry, with a shared set index;
* 40-bit addresses;
* the request, memory and snoop interfaces;
* write-back with dirty bits;
* one request at a time;
* when the swap buffer drains, and the conflict wait;
* touching both swapped lines as most recently used;
* the handling of empty swap partners;
* the whole internal organisation of the L3.

Not built:

* the alternative of reading both swap lines in parallel into a dual-ported buffer;
* a coherence protocol: only the swap-buffer side of a snoop (the retry) is built, and the
  tag arrays are not snooped;
* power accounting (the event pulses are the hooks for it).

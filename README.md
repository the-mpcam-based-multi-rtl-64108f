# MPCAM: a contention-free shared cache for multi-core processors

In a conventional multi-core processor every core reaches the shared last
level cache through one interconnect, so cores queue for it, and every update
of a shared variable has to be pushed to the other cores by a coherence
protocol. The multi-port content addressable memory (MPCAM) removes both
costs. It gives each core a private write port and a private read port into
the shared cache, so no request ever waits for another, and it never updates
a variable in place: each new value is stored as a new *version* under its own
tag, so there is nothing to keep coherent. A consumer asks for exactly the
version it needs.

This repository holds synthesizable SystemVerilog for the MPCAM and for the
memory side of the eight-core processor built around it, with self-checking
testbenches for every module.

## The idea in one picture

```
               OF0      OF1      OF2   ...  OF7        (operand-fetch units: search)
                |        |        |          |
  SB0  ------[X]------[X]------[X]-- ... --[X]----      (store-back units: write)
  SB1  ------[X]------[X]------[X]-- ... --[X]----
  ...
  SB7  ------[X]------[X]------[X]-- ... --[X]----
  MMU  ------[X]------[X]------[X]-- ... --[X]----      (global MMU: primary data)
```

The memory is a crossbar. Each cross point `[X]` holds its own dual port CAM
(DPCAM). Rows are write buses and columns are search buses:

* **Write (broadcast).** When core *i*'s store-back stage produces a shared
  value, it drives the (tag, data) pair onto row *i*. Every cross point of that
  row stores it in the same cycle, so every column now holds a copy.
* **Search.** When core *j*'s operand-fetch stage needs a shared value, it
  drives the tag onto column *j*. Every cross point in that column compares the
  tag with all its lines at once, and the column returns the matching data.
* Because a copy of every row sits in every column, all cores can write and all
  cores can search in the same cycle, for the same or for different tags.
  There is no arbiter and no queue anywhere in the path, and the access time
  does not depend on the number of cores or on the memory size. The price is
  area: the data of each row is stored once per column (N copies).

### Tags and versions

A tag (32 bits) names one version of one variable. Software packs the
variable's address and a version number into it, so 2^32 versions can be told
apart. The hardware treats the tag as an opaque key.

Each DPCAM writes into its lines in a circle: the write pointer always names
the least recently written line. A version written into a DPCAM of `LINES`
lines therefore survives the next `LINES - 1` writes on that row, and then its
line is reused. Within that window any core can read any version, in any
order, as often as it likes. A **miss** means either that the consumer asked
before the producer wrote, in which case it simply asks again, or that the
version has aged out. Keeping producers ahead of consumers, and consumers
within the window, is the job of scheduling and the compiler.

### Near-reaching and far-reaching versions

Some versions are consumed long after they are written. They risk being
overwritten by the stream of short-lived versions on the same row. Each cross
point therefore holds two DPCAMs on the same buses:

* a large **near-reaching** DPCAM (2048 lines) for ordinary traffic;
* a smaller **far-reaching** DPCAM (512 lines) for long-lived versions.

The writer sets the `far_reach` bit of its write request to steer a version
into the far-reaching memory. A search looks in both memories at once.

## Timing and corner rules

All blocks are synchronous to one clock. The rules below are this design's own
choices where the architecture leaves them open.

| event | behaviour |
|---|---|
| write on a row in cycle *t* | stored at the edge ending cycle *t*; searchable from cycle *t+1* |
| search on a column in cycle *t* | answer (`valid`, `hit`, `data`) in cycle *t+1* |
| search hits the line being overwritten in the same cycle | the write wins: that line is left out of the search (miss); the new version is visible next cycle |
| tag present in several lines of one DPCAM | the lowest-numbered line answers |
| tag present in the near and the far DPCAM | the near-reaching DPCAM answers |
| tag present in several rows of a column | the lowest row answers (core 0 first, MMU row last) |
| miss | `hit = 0`, `data = 0` |
| reset (`rst_n` low, asynchronous) | all lines invalid, write pointers at line 0 |

Tags are meant to be unique, so the priority rules only settle corner cases.
They are what the testbenches check.

The architecture states the access time for an asynchronous prototype, about
5 to 6 ns for a write or a read. This RTL turns that into one clock cycle for
a write and one for a search.

## Module hierarchy

```
mpcam_system                 top: MPCAM + one dual port RAM per core
├── mpcam                    (N_CORES + 1) x N_CORES crossbar, column merge
│   └── mpcam_xpoint         one cross point: near + far DPCAM
│       └── dpcam            circular-write, parallel-search CAM
└── dp_ram                   128 KB true dual port RAM (per core)
mpcam_pkg                    widths and the bus structs
```

| module | file | default parameters |
|---|---|---|
| `mpcam_pkg` | `rtl/mpcam_pkg.sv` | `TAG_W = 32`, `DATA_W = 32` |
| `dpcam` | `rtl/dpcam.sv` | `LINES = 2048` |
| `mpcam_xpoint` | `rtl/mpcam_xpoint.sv` | `LINES = 2048`, `FAR_LINES = 512` (0 removes the far DPCAM) |
| `mpcam` | `rtl/mpcam.sv` | `N_CORES = 8`, `MMU_ROW = 1`, `LINES`, `FAR_LINES` |
| `dp_ram` | `rtl/dp_ram.sv` | `WORDS = 32768` (128 KB of 32-bit words) |
| `mpcam_system` | `rtl/mpcam_system.sv` | `N_CORES = 8`, `LINES`, `FAR_LINES`, `RAM_WORDS = 32768` |

### Bus types (`mpcam_pkg`)

* `wr_req_t {en, far_reach, tag[31:0], data[31:0]}`: one row (write) bus.
* `rd_req_t {en, tag[31:0]}`: one column (search) bus.
* `rd_rsp_t {valid, hit, data[31:0]}`: the answer on a column, one cycle
  after the request.

### Top-level ports (`mpcam_system`)

| port | dir | meaning |
|---|---|---|
| `sb_wr[i]` | in | store-back stage of core *i* writes on row *i* |
| `of_rd[i]` | in | operand-fetch stage of core *i* searches column *i* |
| `of_rsp[i]` | out | answer for core *i* |
| `mmu_wr` | in | global MMU loads primary shared data into the extra row |
| `row_last_data[r]` | out | last word written on row *r* (*r* = `N_CORES` is the MMU row) |
| `gm_en/we/addr/wdata/rdata[i]` | | port A of core *i*'s dual port RAM, global MMU side |
| `lm_en/we/addr/wdata/rdata[i]` | | port B of core *i*'s dual port RAM, local MMU side |

Outside this RTL, and connected through these ports, are the cores, their
private 32 KB L1 instruction and data caches, the per-core local MMUs, the
global MMU, and the L3 cache and main memory beyond the chip. The architecture
names these parts but does not design them. The per-core 128 KB dual port RAMs
sit between the global MMU and each local MMU. Together they form a 1 MB
mid-level memory. They are built as plain RAMs: no cache tags, no replacement.
A RAM write collision on one word goes to port A (global MMU).

## How the DPCAM is built

Each line has a tag register, a data register and a valid bit. A comparator
per line produces a match line:

```
match[i] = valid[i] & (tag[i] == rd_tag) & ~(wr_en & wr_ptr == i)
```

The last term is the write-priority rule. The lowest set match line is
isolated with `match & (~match + 1)`, and the data words are AND-OR combined
under that one-hot vector. `hit` is the OR of all match lines. Both are
registered. The write pointer is a wrapping counter.

## Where this RTL departs from, or adds to, the architecture

* **Clocked instead of asynchronous.** The architecture's prototype uses
  WR/RD strobes and reports nanosecond access times. Here both operations take
  one clock cycle.
* **Sizes.**
  * The architecture gives 2 K lines per DPCAM as its example, and a 32-bit
    tag. Both are the defaults here.
  * It gives no data width; 32 bits is this design's choice.
  * Its system diagram labels the shared cache "2 MB". With 8 x 8 DPCAMs of
    2 K lines and 32-bit words, the near-reaching data storage is 512 KiB, or
    720 KiB with the far-reaching DPCAMs and the MMU row. Reaching 2 MB would
    take 16-byte words, or 8 K lines of 32-bit words: change `DATA_W` in
    `mpcam_pkg` or `LINES`.
  * The far-reaching DPCAM is described only as "smaller". Its 512 lines are a
    choice.
* **Far-reaching steering** by a `far_reach` bit in the write request is this
  design's mechanism. The architecture leaves the choice to the compiler
  without defining an interface.
* **MMU row.** The architecture offers two ways to load primary shared data:
  an extra row written by the MMU, or spreading the data over the core rows.
  The extra row is built (`MMU_ROW = 1`). The second way needs no hardware.
* **Valid bits, reset, and the priority rules** in the table above are
  additions.
* **Independent enables.** Every row and every column has its own enable. The
  3 x 3 prototype waveforms share one write and one read strobe among all
  cores.
* **Mid-level RAM.** The system diagram calls the per-core RAMs an "L2 cache",
  while the prose calls the MPCAM the L2 cache and the system two-level. The
  RAMs are kept as plain dual port memories between the MMUs, as drawn.

## Cost and scaling

At the defaults the top holds 9 x 8 = 72 cross points. Each has 2048 + 512
lines of 64 bits plus a valid bit, about 12 Mbit of registers with one 32-bit
comparator per line. The MPCAM is therefore register-heavy. Elaboration and
simulation are quick because the memories are arrays and the search is a loop.
Gate-level synthesis of the full crossbar, however, produces a very large
netlist: allow for long run times. The search latency does not grow with
`N_CORES` or `LINES` in this RTL, but the combinational depth of the match and
select logic does (log2 of `LINES` for the priority and OR trees, log2 of the
rows for the column merge).

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog.

| testbench | what it does |
|---|---|
| `tb/tb_dpcam.sv` | 8-line DPCAM against a reference model. Checks the empty miss, write-to-search latency, write priority on the line being overwritten, line reuse after `LINES` writes, the duplicate-tag rule and `last_data`, then 3000 random cycles. |
| `tb/tb_mpcam_xpoint.sv` | A far-reaching version outlives near-reaching traffic, the near DPCAM wins when both hit, plus random traffic against a model. |
| `tb/tb_mpcam.sv` | 3-core crossbar plus MMU row. Replays a four-interval 3 x 3 sequence: all cores write different variables; all read core 2's variable; two cores write while the third reads; one writes while two read. Then random traffic on every row and column against a model, including tags present in several rows. |
| `tb/tb_dp_ram.sv` | Random two-port traffic against a model; port A wins a collision. |
| `tb/tb_mpcam_system.sv` | End to end with 4 cores and small memories: MMU load read by all cores at once, rounds of producer/consumer exchange with miss and retry, far-reaching survival, line reuse, write priority, and the RAM path from global to local MMU. Counts each mechanism and fails if one never happened. |
| `tb/tb_workload_matmul.sv` | A dependent multithreaded program on the 4-core system: the global MMU loads two 4 x 4 matrices, producer cores compute the rows of their product through their own ports, and core 0 consumes the product as it appears (retrying misses) and computes its determinant. Run with 1, 2 and 4 active cores. Results are checked, and the cycle count must fall as cores are added (161, 146 and 74 cycles). |
| `tb/tb_mpcam_system_full.sv` | The top at its default size (8 cores, 2048/512 lines, 128 KB RAMs). All cores broadcast at once, every core reads every core's variable, a full lap of 2048 writes reuses every line of a row, and a RAM round trip. |

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb rtl/mpcam_pkg.sv tb/tb_mpcam.sv --top-module tb_mpcam
./obj_dir/Vtb_mpcam
```

The full-size testbench takes about two minutes to build and runs in seconds.

The testbenches check the design against the behaviour described in this
file. They cannot check the architecture's performance claims: execution
times and miss ratios of multi-threaded programs run on 1 to 8 cores. Those
depend on cores, compilers and programs that are not part of this RTL. The
RTL supports up to 8 cores at its defaults, and any `N_CORES` as a parameter.

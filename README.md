# ReCaC: a shared L2 cache that partitions its ways for power and performance

In a chip multiprocessor, several cores share one large last-level cache. This
cache spends much of its energy on leakage, and usually not every way earns its
keep. One core may stream through data that it never reuses. Another may reuse
a working set that fits in two ways. Partitioning the ways between the cores
stops one thread from pushing out another's useful lines, and the ways that no
core needs can be switched to a low-voltage *drowsy* state. A drowsy line keeps
its contents and leaks much less, but it must be woken before it can be read.

ReCaC is such a cache. Every interval (750,000 cycles by default) it measures
how many misses each core would have with 1, 2, …, 16 ways. It then picks a way
partition in two steps:

1. **Performance step.** It finds the partition of all 16 ways that gives the
   fewest total misses.
2. **Power step.** It looks for a smaller partition that leaves some ways
   drowsy. A smaller partition is accepted only if:
   - the extra misses cost each core less than an OS-set tolerance, and
   - the leakage saved is greater than the memory energy of those extra misses.

The measurement costs almost no area. A few real cache sets are lent to each
core as sampling sets, and the core uses them as though it owned the whole
cache. The other cores' accesses to those sets are redirected elsewhere by an
index remapping circuit.

The default configuration is the one evaluated:
- 2 cores and a 2 MB, 16-way L2 with 128-byte lines, giving 1024 sets;
- 64-bit addresses;
- a 12-cycle hit, and a 250-cycle memory in the testbench;
- 16 sampling sets per core.

## Block map

```
             cfg port (OS)
                 |
          recac_os_regs ---- mask, patterns, R registers, APD registers, flush
                 |                                         |
 cores --req--> recac_l2_cache --------- memory port       |
                 |  recac_irl (index remap, 1 cycle)        |
                 |  recac_set_class (set kind)              |
                 |  recac_rtable (R bit per line)           |
                 |  recac_victim_sel (quota replacement)    |
                 |  recac_pirl (parallel variant)           |
                 |  drowsy bit per line                     |
                 |-- profile events --> recac_sdh --curves--+--> recac_partition_logic
                 |                                               recac_partition_gen
                 '<----------------- quotas ---------------------'
   interval timer (in recac_top): histogram snapshot, start the partitioning, all lines drowsy
```

All sizes and constants are in `rtl/recac_pkg.sv`, and every module takes them
as parameters.

## Embedded monitoring: sampling sets and index remapping

The profile comes from **monitoring sets** inside the data array, not from a
separate shadow tag array.

The low K index bits (K = 6) split the 1024 sets into 64 classes of 16 sets
each. Class j (for j < N) is core j's group of monitoring sets. In those 16
sets, core j sees a private 16-way cache, and every access it makes there is
profiled. For any other core, an access that lands in class j is redirected to
another class. With two cores, class 0 is redirected to class 3 and class 1 to
class 2. So a monitoring set only ever holds its owner's lines.

`recac_irl` does the redirection, in the cycle after a request is accepted.
This one cycle is the only cost of the scheme, and it makes a hit 12 cycles
instead of 11. The IRL works like this:
- The index is ANDed with a mask register.
- The result is compared with each group's *current pattern*.
- On a match, the low bits are replaced by the accessing core's *new pattern*
  for that group, and an *R* bit is set alongside.

All of these registers are in `recac_os_regs`.

A redirected set now holds two kinds of line with the same index bits:
- lines that belong there directly, with R = 0;
- lines sent there from a monitoring set, with R = 1.

Two such lines can carry the same tag. The **R-table** (`recac_rtable`) keeps
one R bit per way for every set that can receive redirected lines. For two
cores that is 2 × 16 rows of 16 bits, or 64 bytes. The row is read together
with the tags, and a way hits only if its R bit equals the access's R bit. The
table is addressed by the remap group and the index bits above K, so it is
sized for the redirected sets only.

When the cache writes a dirty line back, it must rebuild the line's original
address. For a line with R = 1, `line_addr()` in `recac_l2_cache` puts back
the current pattern of the row's group.

Limitation: the plain scheme assumes that the cores never share a physical
line. A shared line would have two homes, so a core could read a stale copy.
`recac_l2_cache` therefore has a **parallel** mode (`PARALLEL = 1`) for threads
that share data:
- An access to a monitoring set is not remapped.
- `recac_pirl` queues two lookups. The first goes to the monitoring set with
  R = 0. The second goes to the redirected set with R = 1, and is cancelled if
  the first one hit.
- A core that is not the owner may hit in the monitoring set, but that hit
  does not change the set's LRU order.
- A miss is filled into the monitoring set only by its owner. Every other core
  fills into the redirected set.

A hit that needs the second lookup takes 2 × 12 cycles. The default is the
plain mode.

## Profiling: stack distance histograms

For each core, `recac_sdh` keeps:
- one counter per LRU stack position, incremented when the core hits at that
  position in one of its monitoring sets;
- one miss counter.

If the core had only w ways, its predicted misses would be the misses plus the
hits at positions w and deeper. The module turns the counters into a
16-entry miss curve for each core.

At each interval boundary the curves are frozen into a snapshot, and the
counters start again from zero. Counters are 20 bits wide and saturate. The
curves count only sampled accesses. Each monitoring set stands for 64 sets, so
the partitioning logic multiplies its miss estimates by 2^K before it weighs
them in energy.

## Choosing the partition

### Generating candidates (`recac_partition_gen`)

Candidates come from a chain of incrementers, one per core, that counts like an
odometer. Each digit runs from 1 up to a limit and then wraps to 1, carrying
into the next digit:
- In the performance step, the limit is A − N + 1 (15 for two cores), the
  largest share a core can get while every other core keeps at least one way.
- In the power step, the limit for core i is its share in the performance
  result. The power step therefore only looks at partitions that give each core
  no more than that share.

`finish` is raised on the last combination. The performance step skips any
combination whose sum is not exactly A.

### Evaluating candidates (`recac_partition_logic`)

The logic evaluates one candidate per clock cycle. For two cores a run takes
(A − N + 1)^N + m0·m1 + 2 cycles, where m0 and m1 are the shares from the
performance step. That is at most 227 + 64 cycles at the defaults, which is
negligible against a 750,000-cycle interval.

- **Performance step:** the candidate's score is the sum over cores of
  curve[core][ways − 1]. The lowest score wins, and the first candidate wins a
  tie. The winner is kept in the `min_misses` registers.
- **Power step:** for each core, extra = misses(candidate) − misses(performance
  result). A candidate is accepted only if all of the following hold:
  - For every core, `extra * 1000 < APD * misses(performance result)`, or
    extra = 0. APD is in units of 0.1 %, and the reset value 10 means 1 %. So a
    core with APD 0 can lose ways only if that costs it nothing.
  - `(A − Σ ways) * E_WAY > (Σ extra << K) * E_MEM`. That is, the leakage saved
    by the ways left drowsy is greater than the memory energy of the extra
    misses. Energies are in units of one L2 access. E_MEM = 150. E_WAY = 20000
    is an assumed value: it stands for the leakage that one drowsy way saves
    over one interval.
  - The net gain is greater than the best so far. The best starts as the
    performance result with zero gain, so if no candidate passes, the cache
    keeps the performance result.

`power_saving` tells whether the result differs from the performance result.

### Applying the decision

`recac_top` puts all lines into the drowsy state at each interval boundary. It
starts the partitioning logic on the snapshot one cycle later. The new
per-core quotas apply as soon as the run ends, a few hundred cycles into the
interval.

Ways are not locked to cores. Instead, `recac_victim_sel` enforces the quota
whenever a line must be replaced. In order:
1. If the missing core already owns as many lines in the set as its quota, it
   replaces its own LRU line.
2. Otherwise it takes an invalid way.
3. Failing that, it takes the LRU line of a core that is over its quota.
4. Failing that, it takes the set's LRU line.

Monitoring sets ignore the quotas: they must show the core's full 16-way
behaviour. With this policy, a set fills only up to the sum of the quotas. The
ways beyond the sum are never touched again, so they stay drowsy for the rest
of the interval.

## Drowsy lines

Each line has a drowsy bit. The bit is the control input of the line's voltage
switch, which is an analog part and lies outside this RTL.
- `drowsy_all` (the interval boundary) sets every drowsy bit.
- A hit on a drowsy line clears its bit and adds one cycle, so the hit takes 13
  cycles.
- A filled line is always awake.
- Tags are compared on drowsy lines as well. Only the line that is hit or
  filled is woken.

`awake_lines` counts the lines woken in the current interval. Multiplied by the
per-line leakage, it gives the interval's leakage energy.

## Cache pipeline and interfaces

`recac_l2_cache` takes one request at a time. A request is a line address, a
core number, and either a read or a full-line (1024-bit) write. It goes
through these stages:
1. accept;
2. remap (IRL, one cycle);
3. lookup: tags, valid bits, LRU order and R-table row read together;
4. then one of:
   - a hit: the response leaves 12 cycles after accept, or 13 if the line was
     woken;
   - a miss: a victim is chosen, a dirty victim is written back, the line is
     fetched, installed and returned. A clean read miss takes memory latency
     + 7 cycles.

A full-line write miss installs the line without fetching it. The cache is
write-back with write-allocate.

The memory port sends whole-line requests through a valid/ready handshake. A
read returns one `mem_resp_valid` pulse. After reset, and on a flush command,
the cache walks all sets, writing back dirty lines and invalidating them. The
OS must flush whenever it reprograms the patterns.

### OS register map (word addresses on the `cfg_*` port)

| address | register |
|---|---|
| 0x00 | mask (K bits) |
| 0x10 + j | current pattern of group j |
| 0x20 + j·N + t | {R, new pattern} of group j for core t (R in bit K) |
| 0x40 + t | APD of core t (0.1 % units, reset 10) |
| 0x60 | bit 0 = 1: flush the cache |

The registers reset to the two-core mapping described above.

`recac_top` also brings out one-cycle event pulses for testing and energy
accounting: `interval_end`, `part_done`, `prof_valid`, `evt_remap`, `evt_wake`
and `evt_wb`. The current `quota` and `min_misses` are ports as well.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a cycle watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_recac_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/recac_pkg.sv tb/tb_recac_top.sv
./obj_dir/Vtb_recac_top
```

Replace `tb_recac_top` with any other testbench:

| testbench | what it checks |
|---|---|
| tb_recac_top | whole design at full default size (2 MB, 750k-cycle intervals) |
| tb_recac_workloads | the six two-thread utility mixes at full size, about 10 s |
| tb_recac_scale4 | the top built for four cores: two mixes and the 28,561-candidate search time |
| tb_recac_l2_cache | cache with 32 sets: hits, misses, write-backs, quotas, remapping, R-table aliasing, drowsy wake-up, flush, latencies |
| tb_recac_l2_parallel | parallel mode with data shared between cores |
| tb_recac_irl, tb_recac_pirl | remapping logic against a reference model over all indices |
| tb_recac_rtable, tb_recac_sdh, tb_recac_victim_sel | storage, curves and replacement rules against models |
| tb_recac_partition_gen | candidate order and count, both steps |
| tb_recac_partition_logic | both steps against a software search, plus cycle counts |
| tb_recac_os_regs | register map, reset values, flush pulse |

`tb_recac_top` takes about three simulated intervals and runs in a few seconds.
It uses two cores with separate address ranges:
- **Phase A.** Each core reuses two lines per set. The logic must choose a
  power-saving partition of at most four ways.
- **Phase B.** Each core cycles through eight lines. The logic must fall back to
  {8, 8}.

Every read is compared with a reference memory image. Every hit latency must
be 12 or 13 cycles. Each mechanism must occur at least once:
- remapping;
- profiling;
- wake-up;
- write-back;
- flush;
- a power-saving decision;
- a fall-back decision.

`tb_recac_workloads` runs synthetic threads of three kinds, one kind per
core, at full size:
- **L** (low utility) streams through lines it never reuses.
- **S** (saturating) reuses two lines per set.
- **H** (high utility) cycles through twelve lines per set, so it hits only
  with twelve or more ways.

It runs all six pairings and checks the decision taken on the first full
interval of each pairing:

| mix | performance step | chosen |
|---|---|---|
| L-L | {15,1} | {1,1} |
| L-S | {14,2} | {1,2} |
| S-S | {14,2} | {2,2} |
| L-H | {4,12} | {1,12} |
| H-S | {14,2} | {12,2} |
| H-H | {15,1} | {12,1} |

In every case, the ways that no thread can use are left drowsy.

`tb_recac_scale4` builds the same top for four cores (`N = 4`) and checks two
mixes:
- S-S-S-S gives {2,2,2,2}, so half the cache sleeps.
- L-H-S-L needs {1,12,2,1}, which uses every way, so the power step keeps the
  performance result.

It also checks the length of a run: 13^4 candidates in the performance step,
plus the power-step candidates, plus 3 cycles.

`tb/tb_recac_mem_model.sv` is the behavioural 250-cycle memory that the
cache-level testbenches use.

## How far to trust it

- Each block is checked against an independent model in its testbench. Each
  testbench was also shown to fail on a deliberately broken copy of its block.
- The full-size run exercises every mechanism together.
- The cache has not been run on real program traces. The figures for energy
  savings and performance therefore rest on the algorithm, not on measurements
  made here.
- The code is synthesizable. The tag and data arrays are plain SystemVerilog
  arrays: 2 MB of data plus tags, about 17.7 Mbit. A real implementation would
  use SRAM macros.

## Departures and own choices

- **R-bit check per way.** Every way is qualified by its own R bit before the
  hit is formed. The original check is done only on the way the tag compare
  selects. Both give the same result unless a set holds two lines with the
  same tag, and per-way is the safer of the two.
- **Search cost.** Candidates are generated by exhaustive incrementers.
  For two cores this matches the expected cost: 225 performance candidates,
  against about A²/2 · N = 256. The walk grows as (A − N + 1)^N, so with eight
  cores it is far slower than a cost that grows linearly in N. A smarter
  performance-step search would be needed beyond four cores.
- **Candidate range.** The performance step counts each core's share from 1 to
  A − N + 1. The descriptions available give both "1 to A − N" and "up to A".
  A − N + 1 is the largest share that leaves every other core a way.
- **Miss tolerance.** The limit is measured against the misses of the
  performance result: a miss-rate increase is taken as the same relative
  performance loss. A zero increase always passes.
- **Assumed values.** E_WAY, the scaling of sampled misses by 2^K, the APD
  units, the tie-breaking, the 20-bit counters and the reset mapping of the
  pattern registers are all own choices.
- **Quotas.** Quotas are enforced by counting the lines each core owns in the
  set, not by fixed way masks.
- **Interfaces.** One request at a time, line-wide ports, write-back with
  write-allocate, the OS register bus and the flush walk are own choices.
- **Not included.**
  - The per-line voltage controllers (analog); only their control bit is
    here.
  - The cores and their L1 caches.
  - Main memory (a model only).
  - The OS software.
- **Sizes not built by default.** Four- and eight-core systems and cache sizes
  other than 2 MB are not instantiated at the defaults. `N` and `NSETS` are
  parameters. Four cores are simulated (`tb_recac_scale4`). Eight cores have
  not been tried: the performance step's search grows as (A − N + 1)^N, which
  is 9^8 ≈ 43 million cycles for eight cores and longer than an interval.

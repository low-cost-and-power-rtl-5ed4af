# Thread-priority-aware shared data cache: collision bit vector with HPAL fallback

In a multithreaded embedded core that runs one real-time thread next to ordinary
ones, every thread allocates lines in the same L1 data cache. The replacement policy
does not know which thread matters, so a low-priority (LP) thread's miss can throw out
a line the high-priority (HP, real-time) thread still needs, and the HP thread misses
its deadline more often.

Two ways to deal with it are combined here:

* **HPAL ("HP always locked")** locks every line the HP thread allocates. LP misses
  then never evict HP lines unless a whole set is HP-owned. It protects the HP thread
  best, but starves the LP threads of cache space.
* **Collision bit vector** lets LP threads evict HP lines once, but remembers the
  eviction. Each set keeps the lowest tag bit of the last HP line that an LP thread
  pushed out. When the HP thread later allocates a line in that set with the same
  tag bit, the line is taken to be a returning, still-useful line, and it is locked.
  One bit per set is enough because an occasional false match only locks a line that
  did not need it; it costs 64 bits of storage for an 8 KB cache instead of 64 full
  tags.

A small monitor in the core counts the active LP threads and picks the mode: the
collision bit vector while few LP threads run, HPAL once more of them are active. In
HPAL mode the collision bit vector is switched off and not accessed.

The RTL is the data cache with this allocation logic and the monitor. The processor
core and the next memory level are outside it. The testbenches model the memory.

## Per-line and per-set state

| State | Size (default) | Written when | Read when |
|---|---|---|---|
| tag + valid | 64 x 22 per way | a line is allocated | every lookup |
| lock bit, HP bit | 64 x 2 per way | a line is allocated | every lookup (lock: victim choice; HP: collision check) |
| collision entry | 64 x `CT_W` per set, `CT_W = 1` | an LP fill evicts a valid HP line (collision mode only) | an HP fill in collision mode |
| round-robin pointer | 64 x 2 flip-flops | a line is allocated | a line is allocated |
| data | 64 x 256 per way | line fill; store hit | every lookup |

A `CT_W` equal to the tag width (21) turns the bit vector into full collision tags,
which give exact detection of returning lines. Widths in between (4 and 8 bits) work
too.

## Allocation rules

All of the decisions below are made on a load miss, in the lookup cycle. The cache
then waits about 60 cycles for the line, so the decision costs no extra cycles. The
results are written into the arrays when the line arrives.

**Victim choice** (`replacement_unit`), the same in both modes:
1. If the set has an invalid way, the lowest one is used.
2. Otherwise, from the set's round-robin pointer onwards, the first way whose lock bit
   is clear is used.
3. If every way is locked, the locks are ignored and the pointer's way is used (a
   *forced eviction*).
The pointer then moves to the way after the victim.

**New line state and collision capture** (`collision_detect`):

| Mode | Request | Victim | Collision entry | New HP bit | New lock bit |
|---|---|---|---|---|---|
| collision | LP | valid and HP bit set | := low `CT_W` bits of victim tag | 0 | 0 |
| collision | LP | anything else | unchanged | 0 | 0 |
| collision | HP | any | unchanged (compared) | 1 | 1 if low tag bits == entry, else 0 |
| HPAL | LP | any | not accessed | 0 | 0 |
| HPAL | HP | any | not accessed | 1 | 1 |

Locks are never cleared in place. A lock disappears only when its line is replaced,
which happens when the set is fully locked, or when a line is allocated over it.

Worked example (collision mode, one set, 4 ways). The HP thread loads line A, whose
tag ends in bit 1. Four LP misses follow and fill the set. The round-robin pointer
reaches A, and the fourth LP miss evicts it. A was valid and HP-owned, so the set's
collision bit becomes 1. When the HP thread misses on A again, A's tag bit (1) equals
the stored bit, so A is written back with its lock bit set. From then on, LP misses to
that set skip A, and A keeps hitting. Any other HP line with a tag ending in 1 that is
allocated in the set is also locked. That is the false positive that the short entry
trades for area and power.

The end-to-end testbench runs this exact sequence.

## Mode switch (`lp_activity_monitor`)

The monitor takes one active bit per hardware thread and the id of the HP thread. It
counts the active threads other than the HP one. With `HPAL_MIN_LP` (default 2) or
more active LP threads, the registered `mode_o` becomes `MODE_HPAL` and `cbv_enable_o`
drops. Otherwise the mode is `MODE_CBV`. The change takes effect one clock after the
activity change. The cache samples the mode when it accepts a request, so a request
in flight finishes under the mode it started with.

With four threads, the defaults give:
* HP + 1 LP: collision bit vector.
* HP + 2 or 3 LP: HPAL.

Lines locked in one mode stay locked after a switch. In HPAL mode every HP line gets
equal HP and lock bits, so switching back is safe.

## Cache organisation and timing (`shared_dcache`)

* 4 ways, 64 sets, 32-byte lines (8 KB), 32-bit byte addresses.
  * Address split: tag [31:11], index [10:5], word [4:2].
* All storage is in `sp_sram`: single-port, synchronous read, per-bit write mask.
  * It is written as an array and stands in for memory-compiler macros.
* One request at a time (`req_valid_i`/`req_ready_o`). A request is accepted in the
  IDLE state and looked up in the next cycle.
  * **Load hit:** `resp_valid_o` in the cycle after acceptance (1-cycle hit).
  * **Load miss:** the victim and the new line state are decided in the lookup cycle.
    The cache sends a line read to memory one cycle later. The line is written, and
    the word returned, in the cycle the memory answers. With a 60-cycle memory this
    is 62 cycles from acceptance to response.
  * **Store:** write-through. On a hit the word is also written into the line. A store
    miss does not allocate. The response comes when memory acknowledges the write
    (62 cycles with a 60-cycle memory).
* Memory port: `mem_req_valid_o`/`mem_req_ready_i` handshake.
  * A read carries the line address. A write carries a word address and data.
  * `mem_resp_valid_i` returns the whole line (`mem_resp_data_i`, word 0 in bits
    31:0) or acknowledges a write.
  * An assertion flags a response that arrives when none is awaited.
* After reset, the controller clears tags, valid, lock and HP bits, and collision
  entries, one set per cycle (64 cycles). `req_ready_o` is low during the sweep.
* `evt_o` (`cc_events_t`) pulses once per event: hit, miss, LP-evicts-HP collision,
  collision entry write, relock of a returning HP line, forced eviction, HPAL lock,
  write-through.
  * `ct_access_o` is high in the cycles the collision array is enabled. It is never
    high for a request in HPAL mode.

## Module map

```
mt_dcache_top           request priority = (req_tid_i == hp_tid_i)
├── lp_activity_monitor  active LP count -> mode, cbv_enable
└── shared_dcache        controller FSM: INIT, IDLE, LOOKUP, MEM_RD, MEM_WAIT, WT_REQ, WT_WAIT
    ├── sp_sram x4       tag + valid, one per way
    ├── sp_sram x4       {HP, lock}, one per way
    ├── sp_sram x4       line data, one per way
    ├── sp_sram          collision entry per set
    ├── replacement_unit lock-aware round-robin victim choice
    └── collision_detect capture / compare / new lock and HP bits
cc_pkg                   geometry constants, cc_mode_e, cc_events_t
```

Parameters of `mt_dcache_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_THREADS` | 4 | hardware threads (2 and 4 are the configurations of interest) |
| `NUM_WAYS` | 4 | associativity |
| `NUM_SETS` | 64 | sets (8 KB with 4 ways and 32-byte lines) |
| `LINE_BYTES` | 32 | line size |
| `CT_W` | 1 | collision entry width: 1 = bit vector; 21 = full collision tag |
| `HPAL_MIN_LP` | 2 | active LP threads from which HPAL is used; set it above `NUM_THREADS-1` for collision mode only |

## Simulating

Every testbench checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/cc_pkg.sv tb/cc_ref_pkg.sv tb/tb_mt_dcache_top.sv --top-module tb_mt_dcache_top
./obj_dir/Vtb_mt_dcache_top
```

| Testbench | What it shows |
|---|---|
| `tb_sp_sram` | Masked writes and reads against a shadow array. Read data appears one clock after the read and holds on idle and write cycles. |
| `tb_collision_detect` | Every input combination for a 1-bit entry, and random inputs for a 4-bit entry, in both modes. |
| `tb_replacement_unit` | Random valid/lock patterns against a pointer model. Covers skips over locked ways and forced evictions. |
| `tb_lp_activity_monitor` | Every thread-activity pattern and HP id. Checks the mode one clock later. |
| `tb_shared_dcache` | 3000 random loads and stores from HP and LP threads, with the mode alternating. Checks data, hit flag, latency (1 or 62 cycles) and every event against `cc_ref_model`. Checks that the collision array is untouched in HPAL mode. |
| `tb_mt_dcache_top` | The whole design at default parameters. Runs the directed collision, return and lock sequence, then a dual-thread phase, a four-thread phase (the switch to HPAL), and two threads again with a different HP thread. Requires every mechanism and both mode switches to occur. |
| `tb_thread_models` | The two-thread (HP + 1 LP) and four-thread (HP + 3 LP) configurations, each under the collision bit vector and under HPAL, on one synthetic stream. HPAL must give the HP thread at least as many hits, and the LP threads at most as many. |
| `tb_collision_widths` | The same dual-thread stream through caches with 1-, 4-, 8- and 21-bit collision entries, each checked against the model. A narrower entry must lock at least as many returning HP lines as the next wider one. Prints the lock counts and the HP and LP hit counts. |

`tb/mt_harness.sv` drives one top-level instance with a fixed-seed stream for the
last two testbenches. `tb/cc_ref_pkg.sv` holds the reference model. It applies the
rules above to its own copy of the tag-side state. `tb/mem_model.sv` is a next-level memory with a 60-cycle
latency, and its contents are a fixed function of the address. In the width
comparison, the 1-bit entry locks clearly more returning lines than the wider ones
and gives the HP thread a few more hits and the LP thread fewer. Those are the
false positives described above.

## Design choices beyond the scheme

The scheme fixes the lock/HP/collision rules, the per-set placement of the collision
entry, the HP = lock rule of HPAL mode, and the switch on LP thread activity. The
following are this implementation's own choices:

* **Underlying replacement policy:** round-robin, one pointer per set. Invalid ways
  are filled first. LRU or random would serve as well. Only the lock masking is part
  of the scheme.
* **Lock bits and HP requests:** the lock bits steer every allocation, the HP
  thread's included. In HPAL mode an HP miss therefore also prefers LP lines.
* **Write policy:** write-through without allocation on a store miss. Only load misses
  change the lock, HP and collision state.
* **Valid bit:** a valid bit is kept with each tag. The collision entry has no valid
  bit; it resets to 0. A freshly reset set can therefore lock an HP line whose low tag
  bit is 0 before any collision has happened.
* **Matches do not consume the entry:** after a match, later HP lines with the same
  low bits are still locked, until an LP collision overwrites the entry.
* **Mode threshold:** `HPAL_MIN_LP = 2`. The scheme does not give a number. The
  monitor has no hysteresis.
* **HP bits in HPAL mode:** they are still written (equal to the lock bit), so that
  they are correct after a switch back. Only the collision array is gated off. The lock
  and HP bits share one 2-bit-wide array per way, so the HP bits cannot be gated
  separately.
* **Interfaces:** one request in flight, and a valid/ready memory port with a
  line-wide read response. These are illustrative. A core with a pipelined LD/ST unit
  would want a non-blocking front end.
* **Tag width:** 21 bits, from 32-bit addresses with 64 sets and 32-byte lines.

## Limits

* The performance results that motivate the scheme came from whole benchmark
  programs running on a dual-issue SMT core. Neither the core nor those programs are
  here. The testbenches use synthetic streams, so they show the mechanisms work, not
  the speedups.
* The power argument rests on memory-compiler SRAM figures. Here the arrays are
  plain RTL arrays, so only their sizes (64 x 21, 64 x 2, 64 x 1) can be compared.
* The same scheme could guard an instruction cache, TLB or branch target buffer. Only
  the data cache is built.

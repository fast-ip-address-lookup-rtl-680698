# Pipelined k-multibit trie IP address lookup

A router must find, for every packet, the routing prefix that matches the
longest leading part of the destination address. This design does that
longest-prefix match in hardware with nothing but embedded SRAM and
multiplexers. A k-multibit trie is cut into one level per pipeline stage. Each
stage reads its own memory once and makes a 2-input choice. One lookup is
accepted every clock cycle, and each result comes out a fixed W/k cycles later.

The default build is for IPv4: W = 32 address bits and a stride of k = 4 bits
per stage, so there are 8 stages. Each stage has a 2^19 x 16-bit memory (1 MB).
The architecture this RTL implements was published with a target of about
2 ns per cycle in 0.18 µm technology. That is one SRAM access plus two
multiplexer delays, or about 500 million lookups per second. This RTL makes no
timing claims of its own.

There are two engines, side by side in `ip_lookup_top`:

* **`trie_pipeline`** is the plain pipeline: 8 stages, one lookup per cycle.
* **`mux_trie_engine`** uses *hardware multiplexing*: the same 8 physical
  stages each run 1, 2 or 4 trie levels. This lets a larger routing table fit
  in the same memories, at 1/2 or 1/4 of the throughput.

## How a lookup walks the trie

Every memory word is an *entry* of M + 1 = 16 bits:

```
 15          14 .................. 0
+-----------+-------------------------+
|is_pointer |  result  or  pointer    |
+-----------+-------------------------+
```

A stage's memory is divided into *chunks* of 2^k consecutive entries. A
pointer is a chunk number in the **next** stage's memory. The stage reads
the entry at this address:

```
memory address = { pointer (M bits), next k bits of the destination address }
```

A lookup enters stage 0 as the tuple `<is_pointer = 1, pointer = 0>`. Stage 0
therefore reads chunk 0, the 2^k-entry root, indexed by the top k address
bits. Each stage then does the following (`trie_stage`):

1. If the incoming entry is a pointer, the stage reads its memory at
   {pointer, next k bits}.
2. At the same time, it stores the incoming entry, and the address shifted
   left by k, in its pipeline register.
3. On the next cycle, the *stored* is_pointer bit drives the output
   multiplexer:
   - if it was a pointer, the memory word goes on;
   - if it was a result, the stored result goes on unchanged.

A result found at stage 2 is therefore simply carried through stages 3 to 7.
Every lookup takes exactly W/k cycles and leaves in the order it came in, so
the pipeline needs no reorder logic. The critical path is the memory read plus
two multiplexers: the update/lookup address multiplexer in front of the
memory, and the result/pointer multiplexer behind it.

The routing software fills the memories by *leaf pushing*. Take entry e of a
chunk at stage l, and call its path the (l+1)·k address bits leading to it.
There are two cases:

* If some prefix longer than (l+1)·k bits starts with that path, the entry is
  a pointer to a fresh chunk at stage l+1.
* Otherwise the entry holds the result of the longest prefix of at most
  (l+1)·k bits that matches the path, or 0 if none matches.

So result 0 means "no route" in this design. The testbench class
`trie_model` (`tb/trie_model_pkg.sv`) builds the images exactly this way. It
is the reference for what the routing software has to produce.

Sizing: a chunk index must fit in M = 15 bits, and a stage may hold up to
2^(M+k) = 524,288 entries. The largest published per-stage count for the
backbone tables used to size the design is 298,320 entries at k = 4. All
stages are the same size, for regularity.

## Changing the table while forwarding

Adding or removing a prefix changes at most 2^k entries per stage. The
routing software hands these over as **update steps** (`upd_valid`). A step
carries at most one write for each stage, each with its own enable, address
and data. `update_scheduler` delays stage i's write by i cycles, so the
writes move through the stages as a wave, exactly as a lookup accepted in
that cycle would. `lookup_ready` is low during the step.

A lookup accepted in cycle t reads stage i in cycle t + i, and a step
accepted in cycle u writes stage i in cycle u + i. Since t ≠ u, a lookup
never meets a write in a memory. Every lookup also sees each step either
completely or not at all. An update therefore costs one lookup slot per step:
at most 2^k slots in all. An assertion in `trie_stage` checks that no
collision ever happens.

What is *not* guaranteed: atomicity across several steps. A lookup that runs
between two steps of one prefix change sees a table that is partly updated.
The software can order its steps to make that harmless. For example, it can
write the new chunks of the next stages before the pointer to them, or it
can hold back lookups for the whole change.

## Hardware multiplexing

The stages of a trie differ in size by orders of magnitude: the root needs
2^k entries, the middle stages need tens of thousands. Since every stage must
be built as large as the largest, most memory sits empty. Hardware
multiplexing runs several logical trie levels on each physical stage, so that
small and large levels share one memory. The cost is throughput: each
physical stage is busy R times per lookup.

The multiplexed engine has P = 8 physical stages. The stride is chosen at run
time, `k = 4 >> cfg_rshift`, which gives R = 2^cfg_rshift:

| cfg_rshift | k | logical stages | R | accepted lookups |
|---|---|---|---|---|
| 0 | 4 | 8  | 1 | one per cycle |
| 1 | 2 | 16 | 2 | one per 2 cycles on average |
| 2 | 1 | 32 | 4 | one per 4 cycles on average |

`cfg_scheme` chooses which physical stage runs logical stage l
(`lookup_pkg::phys_of`):

| scheme | physical stage of logical stage l | path for P = 4, R = 2 |
|---|---|---|
| `SCHEME_MIRROR` | l mod P on even passes, P−1−(l mod P) on odd passes | p0 p1 p2 p3 p3 p2 p1 p0 |
| `SCHEME_SERIAL` | l / R | p0 p0 p1 p1 p2 p2 p3 p3 |
| `SCHEME_LOOP`   | l mod P | p0 p1 p2 p3 p0 p1 p2 p3 |

Mirroring with R = 4 folds the path three times, for example p0 p1 p1 p0 p0 p1
p1 p0 with P = 2. This is **double mirroring**. It pairs large middle levels
with small outer ones, and often gives the smallest largest-stage memory.

**The physical stage (`mux_stage`)** is the trie stage with one extra
multiplexer in front. That multiplexer picks the incoming lookup from one of
four sources:

* the previous stage (a new lookup, for stage 0);
* the stage's own output;
* the next stage;
* for stage 0 only, the last stage.

These four sources cover all three schemes. The memory address becomes
`(pointer << k) | next k bits`. The routing software places the chunks of
all logical levels that share a physical stage in that stage's one memory,
and numbers pointers by chunk within it. Chunk 0 of physical stage 0 is the
root. The extra multiplexer makes the critical path three multiplexers plus
the memory.

**The control part (`mux_control`)** has two jobs.

* *Routing.* Every lookup carries a tag: the index of the next logical
  stage it must run. For each physical stage p, the control picks the source
  whose tag maps to p. A lookup whose tag has reached P·R is finished, and its
  entry is the result.
* *Admission.* A reservation table `busy[p][j]` records that stage p is
  taken j cycles from now. A new lookup would use stage phys(l) in l cycles,
  so it is admitted only if all of those slots are free. Admitting it books
  them.

With a request waiting every cycle, this greedy rule gives these admission
cycles:

* mirroring and serial reuse with R = 2: every 2nd cycle;
* full loops with R = 2 and 4 physical stages: cycles 0, 1, 2, 3, 8, 9, …;
* double mirroring with 2 physical stages: cycles 0, 2, 8, 10, 16, …;
* serial reuse with R = 4: every 4th cycle.

All of these keep every physical stage busy every cycle. These are the
published schedules for k = 4, and `mux_control_tb` checks them task by task
and stage by stage. By construction, two lookups never need the same stage in
the same cycle, and an assertion checks the bookings against the selects.

**Mode switch.** A new `cfg_scheme`/`cfg_rshift` takes effect only when the
engine is empty. Until then no lookup is admitted. `act_scheme` and
`act_rshift` show the active mode. The memories must be loaded with an image
built for the new mode.

**Table writes** in the multiplexed engine work differently from the plain
pipeline. A write carries one optional word per physical stage. While a write
waits, no lookup is admitted. The write is accepted (`upd_ready`) in the first
cycle in which none of the stages it writes is reading for a lookup.

## Modules

| module | role |
|---|---|
| `lookup_pkg` | default sizes (W = 32, k = 4, m = 15), scheme/source enums, `phys_of` |
| `stage_sram` | 2^AW × DW single-port synchronous SRAM with read-first behaviour and a registered output (a compiled macro in silicon) |
| `trie_stage` | one pipeline stage: address multiplexer, SRAM, register, result/pointer multiplexer |
| `update_scheduler` | skews update steps so that stage i is written i cycles later; stalls lookups |
| `trie_pipeline` | W/k chained `trie_stage`s plus the scheduler |
| `mux_stage` | physical stage with input multiplexer, run-time stride and tag |
| `mux_control` | selects, reservation-table admission, mode switch, write arbitration |
| `mux_trie_engine` | P `mux_stage`s, `mux_control` and the result collector |
| `ip_lookup_top` | both engines with their ports brought out (`pl_*`, `mx_*`) |

All handshakes are valid/ready. A request is taken in a cycle in which
both are high. Results come with `result_valid` and have no back-pressure.
`result_is_pointer` is high only if the table ends in a pointer, which means
the table is malformed. Reset (`rst_n`) is asynchronous and active-low. It
clears valid bits and control state but not the memories.

Latency, from the cycle of acceptance to the cycle in which `result_valid` is
high:

* `trie_pipeline`: W/k cycles, 8 by default;
* `mux_trie_engine`: W/k cycles for the active k, so 8, 16 or 32.

## Capacity against the evaluated tables

* **Smallest backbone table, 16,416 prefixes, k = 4:** the largest stage needs
  86,208 entries, against 524,288 available.
* **Largest table used for sizing, k = 4:** e_max is 298,320 entries, which
  still fits.
* **Same 16,416-prefix table, multiplexed engine at k = 2:** with mirroring,
  the largest physical stage needs 27,120 entries; with 2 full loops it needs
  26,896. Both are well under the 2^17 words that a 15-bit pointer reaches at
  k = 2.
* **Same table at k = 1 with double mirroring:** at most 4 × 14,100 entries
  against 2^16.
* **IPv6:** needs W = 128. The default build has W = 32. The `W` parameter
  of `trie_pipeline` accepts 128 (32 stages), and this is simulated.

## Departures and limits

* The remaining address is carried left-aligned in a W-bit register, not in
  a register that narrows by k bits per stage. This is logically the same;
  the constant zeros disappear in synthesis.
* Valid/ready signalling, the update-step interface, the tag-based routing,
  the reservation-table admission, the mode-switch rule and the write
  arbitration of the multiplexed engine are all choices made here.
  Published only in outline: the control part and the "extra multiplexer".
* Each physical memory of the multiplexed engine is 2^(m+4) words. At k < 4,
  a pointer reaches only 2^(m+k) of them. Sizing the memories per stage after
  manufacturing-time analysis, and configurable memory allocation between
  stages, are not built.
* Not built:
  - the routing update software, which runs on a host CPU;
  - an update scheme with dual-port memories (zero lost cycles, but
    inconsistent lookups during an update);
  - two-dimensional (source and destination) search. It would use the same
    pipeline with different table contents, but no table layout for it is
    defined here.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. The
package files must come first. Example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/lookup_pkg.sv tb/trie_model_pkg.sv tb/ip_lookup_top_tb.sv \
    --top-module ip_lookup_top_tb -Mdir obj_top
./obj_top/Vip_lookup_top_tb
```

| testbench | what it shows |
|---|---|
| `ip_lookup_top_tb` | Runs the whole subsystem at default sizes. The pipeline is loaded, streamed (8-cycle latency) and updated under traffic. The multiplexed engine is switched through k = 4, k = 2 with mirroring and with full loops, and k = 1 with double mirroring. Counts forwarded results, full-depth walks, update stalls, mode switches, schedule holds and waiting writes. |
| `table_scale_tb` | Synthetic 16,416-prefix table (random values, mostly /16 and /24) on both engines at default size. |
| `ipv6_pipeline_tb` | `trie_pipeline` at W = 128 with a synthetic 219-prefix table (latency 32). |
| `table8_schemes_tb` | Multiplexed engines with 4 physical stages (KMAX = 8, m = 12) and 2 physical stages (KMAX = 16, m = 8), both at k = 4. Each is run under mirroring or double mirroring, serial reuse and full loops. The driver is `mux_schedule_runner`. |
| `trie_pipeline_tb`, `mux_trie_engine_tb` | One engine each, every mode, with throughput and latency checks. |
| `mux_control_tb` | Admission cycles and stage paths against the published k = 4 schedules. |
| `trie_stage_tb`, `mux_stage_tb`, `update_scheduler_tb`, `stage_sram_tb` | Unit checks. |

All of them build and pass with Verilator 5. Every design file also
elaborates with the slang front end of Yosys. The synthesizable sizes use
memory cells for the SRAMs.

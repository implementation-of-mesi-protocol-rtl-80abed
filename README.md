# MESI cache coherence for three processors: SystemVerilog RTL

When several processors each keep a private cache of one shared memory,
a write by one processor leaves stale copies in the other caches. This design
keeps three small direct-mapped caches coherent with the **MESI** protocol,
which is based on invalidation. Each cache line is tagged with one of four
states:

| state | code | meaning |
|---|---|---|
| M, modified  | `00` | the only copy; it differs from memory (dirty) |
| E, exclusive | `01` | the only cached copy; it equals memory |
| S, shared    | `10` | other caches may hold the same byte |
| I, invalid   | `11` | unusable |

A write to a line leaves the writer holding it in M. It first invalidates every
other copy. A read miss is served by another cache if one holds the byte, and
both copies then end in S. Otherwise memory serves it and the line is loaded
in E.

The RTL also contains the single-processor design that comes before the MESI
system: one write-back cache in front of a memory, with no coherence. Both
designs are in the top level `mesi_top`, side by side.

## Sizes and address split

| item | size |
|---|---|
| main memory | 32 bytes, 5-bit address |
| cache | 8 lines of one byte, direct mapped |
| address split | `add[4:3]` tag, `add[2:0]` index |
| processors / caches in the MESI system | 3 (`NUM_CACHES`) |

All of these sizes come from the package `mesi_pkg`. Only the number of caches
is a module parameter.

### Line formats

```
single cache (12 bits):  [11] dirty  [10] valid  [9:8] tag  [7:0] data
MESI cache   (14 bits):  [13:12] state  [11] dirty  [10] valid  [9:8] tag  [7:0] data
```

For example, `01_0_1_11_00000100` is an exclusive, clean, valid line for
address `11_000` holding `0x04`. A write hit of `0x01` turns it into the
modified line `00_1_1_11_00000001`.

A MESI line *holds* an address when all three of these are true:
- `valid` is 1;
- the state is not I;
- its tag matches.

Invalidation sets the state to I and clears the dirty bit. It leaves the valid
bit alone, so an invalidated line reads as `11_0_1_...`.

## The single write-back cache (`wb_cache`, `single_cache_system`)

The cache uses write-back with write allocate.

| case | what happens |
|---|---|
| read hit | `cac_cpu_hit` pulses and the byte appears on `cac_cpu_data`. |
| read miss | `cac_cpu_miss` pulses. The byte is read from memory and stored as a clean line. Then `cac_cpu_hit` pulses with the byte. |
| write hit | The byte is written into the line, the dirty bit is set and `cac_cpu_hit` pulses. Memory is not written. |
| write miss | `cac_cpu_miss` pulses. The line is overwritten with the new byte, dirty. There is no memory read, because a line is one byte. Then `cac_cpu_hit` pulses. |
| dirty victim | On a miss, if the line being replaced is dirty, it is first written to memory at `{old tag, index}`. |

Memory is written only when a dirty line is evicted.

**Handshake.** The CPU raises `cpu_cac_read` or `cpu_cac_wrt` for one clock
(or longer), with the address and data. The cache takes the request only when
it is idle. `cac_cpu_hit` ends every access, so the CPU sends its next request
only after it. `cac_cpu_miss` is only an extra signal saying that the access
missed.

Latency is counted from the clock edge that takes the request:

| access | `cac_cpu_miss` | `cac_cpu_hit` |
|---|---|---|
| read or write hit | – | +1 |
| write miss | +1 | +2 |
| read miss | +1 | +3 |
| dirty victim | | +1 more |

`main_memory` takes a write on the clock edge. Read data appears on its
registered output one clock after the read strobe.

## The MESI system (`mesi_system`)

```
 CPU A        CPU B        CPU C
   |            |            |
mesi_cache   mesi_cache   mesi_cache      line arrays + request latch + tag compare
   \            |            /
    +---- coherence bus -----+            bus_index/bus_tag out, bus_line/bus_match back,
               |                          upd_en/upd_line, rsp_hit/rsp_miss/rsp_data
        mesi_controller                   one request at a time, round-robin
               |
          main_memory (32 B)
```

The caches make no decisions. Each one does three things:
- It latches its CPU's request.
- It shows the controller its line at the index on the bus, with a match flag.
- It passes the controller's responses to its CPU.

All protocol decisions are made in `mesi_controller`, which serves one request
at a time. This keeps the protocol free of races: a request is a single
transaction, and the caches never see a half-done one.

### What the controller does for a request from cache R

| case in R | action |
|---|---|
| read hit | Return the byte. No state change. |
| write hit, M or E | Write the byte, set dirty, state M. No bus traffic. |
| write hit, S | Write the byte, set dirty, state M. Invalidate every other copy. Also write the byte to memory. |
| any miss | Pulse `rsp_miss`. If R's victim line is dirty and not I, write it back first (one clock). |
| read miss | Check the other caches one per clock, in the order R+1, R+2 (A checks B then C; B checks C then A). The first cache that holds the byte supplies it. If the supplier is dirty, its byte is written to memory in the same clock. Both lines become S and the supplier's dirty bit is cleared. If no cache holds it, read memory and load the line in E. |
| write miss | Invalidate every other copy. Write R's line in M, dirty. |

Every access ends with `rsp_hit`. The cache turns it into `cac_cpu_hit` one
clock later.

While the controller checks the other caches, `snp_hit[k]` or `snp_miss[k]`
pulses for each cache *k* it looks into. This lets the serial search be watched
from outside without disturbing that CPU's own `cac_cpu_hit` and
`cac_cpu_miss`.

Some points are easy to misread:

* **A write to a shared line also writes memory.** The written line stays M
  with its dirty bit set. So it may be written back once more when it is
  evicted. That write is harmless, because the data is the same.
* **A read of a line that another cache holds in M** takes the byte from that
  cache. If the line is dirty, it is also written to memory. Both caches then
  hold it in S and clean.
* **Only one request is in service at a time.** A CPU whose request waits
  behind another's simply sees a longer latency. The arbiter is round-robin,
  starting after the cache served last.

### MESI latency

Latency is seen at the CPU and counted from the edge that latches the request
in the cache:

| access | clocks to `cac_cpu_hit` |
|---|---|
| any hit (read, write in M/E/S) | 2 |
| read miss, first cache checked holds it | 3 |
| read miss, second cache checked holds it | 4 |
| read miss, served by memory | 6 |
| write miss | 3 |
| dirty victim to write back | +1 |

Add the time spent waiting for the controller while another cache's request is
being served.

### Rules checked by assertions

These rules are checked in the RTL by assertions:
- at most one `rsp_hit` at a time;
- no memory read and write in the same clock;
- a line in M or E on the bus is the only copy;
- a cache gets no response without a pending request;
- no simultaneous read and write request.

## Files

| file | contents |
|---|---|
| `rtl/mesi_pkg.sv` | sizes, state enum, line structs, reset-image types, address helpers |
| `rtl/main_memory.sv` | 32-byte memory, one access per clock, reset-loaded from `INIT` |
| `rtl/wb_cache.sv` | single write-back cache and its controller FSM |
| `rtl/single_cache_system.sv` | `wb_cache` + `main_memory` |
| `rtl/mesi_cache.sv` | one MESI cache: line array, request latch, tag compare |
| `rtl/mesi_controller.sv` | arbiter and MESI transaction FSM |
| `rtl/mesi_system.sv` | three `mesi_cache`, the controller, one `main_memory` |
| `rtl/mesi_top.sv` | both designs side by side (`mp_*` and `sc_*` ports) |

**Reset.** `rst_n` is active low and synchronous. While it is low, every cache
and memory loads its `INIT` image. At the top level these images are empty:
every line is invalid and the memory holds zeros. The lower modules take
`CACHE_INIT` and `MEM_INIT` parameters, so a test can start from any contents.

## Testbenches

Each testbench checks itself, stops itself with a watchdog, and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb/main_memory_tb.sv` | reset image, random read/write against a shadow copy, one-clock read latency |
| `tb/wb_cache_tb.sv` | The six single-cache cases: read hit, read miss, write hit, write miss then read, write-back on eviction, read hit then read miss. Each starts from fixed line and memory values and checks the exact resulting line values and latencies. Then 400 random accesses against a reference model. |
| `tb/single_cache_system_tb.sv` | cache plus real memory: the write-back case, then random accesses where every read must return the latest write; finally every dirty line is forced out and memory is compared |
| `tb/mesi_cache_tb.sv` | one MESI cache with the testbench acting as controller: match flag for every state and tag, updates, request latching, response pulses |
| `tb/mesi_controller_tb.sv` | The controller with modelled caches and memory. Random concurrent requests from three caches, and every completed transaction checked against a MESI reference model: all lines, memory, returned data, miss and look-up pulses. Also checks latencies. |
| `tb/mesi_system_tb.sv` | The worked MESI cases in sequence, checking exact 14-bit line values, memory, look-up pulses and latency: local hit, miss served by B, miss served by C after B, miss served by memory (E), write hit in E, write hit in S, and a three-processor sequence ending with a third cache reading a modified line. Then 1200 concurrent random accesses, where every read must return the latest write and the MESI rules are checked every clock. |
| `tb/mesi_top_tb.sv` | End-to-end at default sizes: three CPUs on the MESI system and one on the single cache, running concurrently. Checks data and counts every mechanism; any mechanism that never happens counts as a failure. |

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/mesi_pkg.sv rtl/*.sv tb/mesi_system_tb.sv --top-module mesi_system_tb
./obj_dir/Vmesi_system_tb
```

The testbenches read internal signals by hierarchical name, for example
`dut.u_mem.mem_q` and `dut.g_cache[0].u_cache.lines_q`. Keep those names if
you restructure the RTL.

## Where this design makes its own choices

The protocol's state changes, the line format, the sizes, the serial search of
the other caches before memory, and the write to memory on a write to a shared
line all follow the original description of this design. The following points
are not specified there and were chosen here:

* **All timing.** The clock-level schedule, the one-clock memory read latency,
  and `cac_cpu_hit` as the end-of-access mark even after a write miss.
* **A single central controller that serves one request at a time,** and
  round-robin arbitration between the caches.
* **Write misses in the MESI system.** They invalidate the other copies and
  allocate the line in M. The original only states that every write
  invalidates the other copies, and works through write hits only.
* **Dirty suppliers.** A dirty cache that supplies a read miss writes its byte
  back to memory.
* **A single-cache write miss does not write memory.** It allocates a dirty
  line, as the write-back policy and the worked example require. A sentence in
  the original says the written value also goes to main memory; that reading
  was not followed.
* **`snp_hit` / `snp_miss` are separate outputs.** In the original waveforms,
  the looked-up caches' own `cac_cpu_hit` / `cac_cpu_miss` pulse during the
  search. Here they get outputs of their own.
* **Reset load.** Reset loads a parameter image, and the default image is
  empty.

## Limits

* Lines are one byte and caches are direct mapped, as in the original. There
  is no block transfer, no associativity and no replacement policy.
* Requests are served one at a time. Hits are not served in parallel, and
  nothing is pipelined.
* Processors are not part of the RTL. Their signals are the ports of the top.

# Predictable coherent memory system for a real-time multicore (dedicated data buses)

Real-time multicores want private caches for speed and shared data for
multi-threaded code. A conventional coherence protocol gives no useful upper
bound on how long a memory request can take: a core may wait behind any number
of other cores, write-backs and responses in an order nobody controls. A
*predictable* protocol fixes the order. Every cache gets its own time slot on
the bus that carries requests. Every cache keeps its outstanding requests and
write-backs in FIFO buffers. The shared memory serves requests to one line in
the order they were broadcast. With these rules the worst-case latency of a
request can be written as a formula in the number of cores.

This repository holds SystemVerilog for the memory side of such a machine,
modelled on the MapleBoard platform for predictable coherence research. It is
built in the organisation that platform proposes and analyses:

* the predictable MSI protocol (PMSI);
* one shared, time-multiplexed **request** bus;
* **dedicated data buses**: each cache has a private link to memory for
  write-backs and another for responses, so data never waits for a bus slot.

The dedicated buses are the core idea. On a shared data bus a dirty line must
wait for its owner's next slot before it can be written back, and these waits
add up quadratically with the core count. Here a write-back leaves the moment
it is needed, and only the memory itself serialises the work. The worst case
becomes

    WCL = (2N+1)·S + (4N − ⌊(2N+1)·S / L⌋ + 2)·L

for N cores, slot width S and memory latency L. That is 2754 cycles for N = 4,
S = 256 and L = 150. The cores and the host computer are not part of the RTL.
Each cache's core-side port is a port of the top, and the testbenches play
the cores.

## The system at a glance

```
   core c (not built)              host (not built)
   ┌────────┬────────┐                   │
   │  I$    │  D$    │  ... N cores     host D$
   │ id 2c  │ id 2c+1│                  id 2N
   └──┬──┬──┴──┬──┬──┘                   │
      │  │     │  │                      │
 PR ──┘  │  PR ┘  │            ┌─────────┘
         │        │            │
   ══════╪════════╪════════════╪══════  request bus (TDM, one slot per cache)
         │        │            │            │ broadcast to all caches + smc
  per-cache wb / resp buses (no arbitration)│
         └────────┴────────────┴──────► smc (PRLUT + owner table) ◄─► main_memory
```

| Module | Role |
|---|---|
| `maple_board` | Top. `2·N_CORES+1` caches, request bus, controller, memory. |
| `l1_cache` | Set-associative L1 with the coherence controller, PR and PWB buffers. |
| `pmsi_cache_table` | Combinational table: (state, event) → next state and actions. |
| `pr_buffer` | FIFO of requests waiting for the cache's slot. |
| `pwb_buffer` | FIFO of dirty lines waiting to go out on the write-back bus. |
| `request_bus` | Arbiter plus the registered one-cycle broadcast. |
| `bus_arbiter` | RR, TDM, weighted TDM, weighted TDM with slack slots. |
| `smc` | Shared memory controller. |
| `prlut` | Pending request lookup table inside `smc`. |
| `main_memory` | Constant-latency line memory. |
| `maple_pkg` | Widths, message, state and event types, bus structs. |

Cache numbering is used for port indices, request-bus ids and TDM slots:

* `2c` is core c's instruction cache (read only);
* `2c+1` is core c's data cache;
* `2N` is the host's data cache.

The slot order around the TDM frame is this design's choice.

## Where a request spends its time

A data-cache miss goes through these steps:

1. The miss installs the new tag in a victim way, in state `IS_AD` (load) or
   `IM_AD` (store). It then pushes GetS or GetM into the PR buffer. A
   modified victim is pushed into the PWB buffer in the same step.
2. The PR head waits for the cache's slot. Under TDM there is one grant per
   slot of `SLOT_W` cycles, and the frame is `2N+1` slots long. So the
   arbitration wait is at most one frame.
3. The granted request is broadcast for one cycle. Every cache snoops it, and
   the cache that sent it sees its own request and moves to `IS_D` / `IM_D`.
   The controller records it in the PRLUT.
4. Any cache holding the line modified pushes it into its PWB buffer. The
   line leaves at once on that cache's own write-back bus.
5. The controller serves write-backs before requests, one memory operation
   at a time. A request to a line that some cache still owns waits until the
   owner's write-back has reached memory.
6. The line is read (`L_ACC` cycles) and sent on the requester's own response
   bus. The table picks the final state.

In the worst case every other core has a dirty replacement and a write-back
of the contended line queued before the request. The linear term `4N·L` in
the formula counts that memory work. The floor term subtracts the memory
work that already overlaps the arbitration wait.

## The coherence controller (`l1_cache`, `pmsi_cache_table`)

The cache is blocking: one core access is held at a time in a one-entry MSHR.
Tags and states are flip-flops, so a snooped request and a core access can be
looked up in the same cycle. Line data is a memory array. When a snooped
request hits a line, the core-side step waits one cycle, so the two never
update a line together.

The table is instantiated three times:

* for the snoop;
* for the core access or data arrival;
* for the victim on replacement.

Each instance returns the next state and the actions `respond`, `pr_insert`
(with GetS/GetM), `fill`, `store` and `wback`, plus a `legal` flag. Assertions
fire on illegal pairs.

| State | Meaning | Core load | Core store | Own req seen | Remote GetS | Remote GetM | Data |
|---|---|---|---|---|---|---|---|
| I | invalid | →IS_AD, GetS | →IM_AD, GetM | | – | – | |
| S | shared clean | hit | →IM_AD, GetM | | – | →I | |
| M | modified | hit | hit | | →S, write back | →I, write back | |
| IS_AD | GetS queued | | | →IS_D | – | – | |
| IS_D | waiting for data | | | | – | →IS_D_I | →S, respond |
| IS_D_I | will lose line | | | | – | – | →I, respond once |
| IM_AD | GetM queued | | | →IM_D | – | – | |
| IM_D | waiting for data | | | | →IM_D_S | →IM_D_I | →M, store |
| IM_D_S | must share after store | | | | – | →IM_D_I | →S, store, write back |
| IM_D_I | must give up after store | | | | – | – | →I, store, write back |

"–" means the event is legal and changes nothing. A replacement of S goes to
I. A replacement of M goes to I with a write-back.

Some of these rules are this design's completion of the protocol:

* The stable MSI rules, `IS_AD`, and `IM_D → M` on data follow the platform
  description.
* The other transient states (`IS_D`, `IM_AD`, `IS_D_I`, `IM_D_S`, `IM_D_I`)
  and their rules are this design's choice.
* A store to a shared line is handled as a GetM miss in the same way. There
  is no separate upgrade state.

In the transient states a request that arrives late still completes once:
the access is answered, and the line is then given up, written back if it is
dirty. This matches what the memory will have seen in broadcast order.

**PR buffer.** Depth 2. An entry is removed when its request is granted, and
the MSHR keeps track of it until data arrives.

**PWB buffer.** Depth `NUM_CACHES+1`. It drains in order whenever the
controller accepts, with no bus slot needed. On a shared data bus these two
buffers would compete for the cache's slot. Here they never meet.

**Timing.** A request is taken when `crq_ready` is high. A hit answers 3
cycles later (lookup, then a registered reply). `crs.valid` is high for one
cycle.

## The request bus (`request_bus`, `bus_arbiter`)

`request_bus` offers each cache's PR head to the arbiter. It returns a
combinational one-hot grant, which pops the PR. The broadcast (`bus_req_t`:
message, source id, line) is registered and valid for exactly one cycle.

The arbiter has four policies, selected by `POLICY`:

* `ARB_TDM`: the default, and the one the latency formula assumes. Slot k of
  the frame belongs to cache k, each slot lasts `SLOT_W` cycles, and at most
  one grant is made per slot, in any cycle of it.
* `ARB_WTDM`: a slot table of `NSLOTS` entries, one byte per slot in `SCHED`,
  giving the owner of each slot. An owner may appear several times.
* `ARB_WTDM_RR`: like `ARB_WTDM`. A slot whose owner has nothing pending in
  its first cycle is a slack slot and goes to the round-robin winner. The
  platform's mixed-criticality protocol uses this policy for non-critical
  cores. That protocol itself is not built.
* `ARB_RR`: work-conserving round robin with one grant per cycle. Each cache
  waits for at most one grant to every other cache, but the latency formula
  above is written for TDM and does not apply.

Assertions check that at most one grant is made per slot under the TDM
policies.

## The shared memory controller (`smc`, `prlut`, `main_memory`)

**PRLUT.** Every broadcast goes into the PRLUT. This is an age-ordered table
with one entry per cache (`ENTRIES = NUM_CACHES`). It offers the oldest entry
that meets both conditions:

* no older entry is pending for the same line;
* its line is not *blocked*.

So requests to one line are served in broadcast order, while requests to
different lines may pass each other.

**Owner table.** For every memory line, the owner table holds a "modified in
some cache" bit and the owner's id:

* serving a GetM sets the bit;
* a write-back from the owner clears it;
* a request to an owned line is blocked until then.

So memory always answers with current data, and no cache-to-cache transfer is
needed. The table is one bit plus five bits per memory line, sized by
`MEM_LINES`.

**Write-backs.** Write-backs can arrive on any cache's bus in any cycle. When
several are waiting they are accepted round robin (`wb_ready` pulses for one
cycle) and written in that order. Write-backs go before requests.

**Timing.** One memory operation runs at a time. A response appears on
`resp[i]` `L_ACC + 2` cycles after its request is picked.

**Main memory.** `main_memory` takes one operation at a time. `done` pulses
exactly `L_ACC` cycles after the request is taken. After reset the memory
clears itself, one line per cycle, with `req_ready` low until it is done. So
the first miss is served about `MEM_LINES` cycles after reset. On real
hardware this is a DRAM behind the board's controller. The fixed latency
stands in for it, as the platform does in simulation.

## Parameters (top, `maple_board`)

| Parameter | Default | Origin |
|---|---|---|
| `N_CORES` | 4 | platform evaluates 2, 4 and 8 cores; 4 chosen |
| `NUM_CACHES` | 2·N_CORES+1 | I$ + D$ per core + host D$ |
| `SLOT_W` | 256 cycles | platform |
| `L_ACC` | 150 cycles | platform |
| `POLICY` | `ARB_TDM` | platform |
| `NSLOTS`, `SCHED` | NUM_CACHES, identity | this design (weighted TDM only) |
| `SETS` | 64 (16 KiB per cache with 4 ways of 64 B) | this design; capacity is configurable on the platform |
| `WAYS` | 4 | platform |
| `MEM_LINES` | 4096 (256 KiB) | this design |

The line size is `LINE_BYTES` in `maple_pkg` (64 bytes; no other size has been
simulated). Addresses are 32-bit byte addresses and the core word is 64 bits.
Cache ids are 5 bits wide (`CID_W`), so `N_CORES` can go up to 15.

**Address limit.** The memory and the owner table use only the low
`log2(MEM_LINES)` bits of a line address. Software must keep addresses below
`MEM_LINES·64` bytes, or lines alias.

## Measured worst case

The synthetic worst case is built as follows:

* all data caches fill one set with dirty lines;
* then every data cache stores to the same line A in the same cycle, while
  every instruction cache fetches.

This gives the following store latencies (cycles, default slot width and
memory latency):

| Cores | Formula above | Worst seen here | Reference platform: bound / observed |
|---|---|---|---|
| 2 | 1580 | 1430 | 1580 / 1462 |
| 4 | 2754 | 2454 | 2604 / 2453 |
| 8 | 5102 | 4685 | 4802 / 4539 |

The reference bounds for 4 and 8 cores do not count the host, and sit 150 and
300 cycles below the formula, which does count it. All measured values are
within both. The 8-core run uses an 8192-line memory so that its fill lines
stay distinct.

## Where this RTL departs from, or adds to, the platform

* **Not built:**
  - the RV64 cores, their criticality register, the host computer and its
    system-call proxy, and the DRAM controller;
  - the other protocols (MSI, MESI, PMESI, and the criticality-aware CARP);
  - the shared and atomic data-bus organisations.
* **This design's own choices:**
  - the blocking single-MSHR cache;
  - store-to-S as a GetM miss;
  - the snoop-first rule inside the cache;
  - the victim policy (an invalid way first, else round robin);
  - the owner table and the priority of write-backs over requests;
  - the memory clearing itself after reset;
  - every width not named above;
  - all reset values. Tag and state arrays reset to I. Data arrays are not
    reset.
* **Exact transient state set.** The full transient set of the predictable
  protocol is not given in the platform description, so the table above is
  this design's completion.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/maple_pkg.sv rtl/*.sv \
          tb/tb_maple_board.sv --top-module tb_maple_board -Mdir obj -o sim
./obj/sim
```

Replace `tb_maple_board` with any other testbench:

| Testbench | What it does |
|---|---|
| `tb_synthetic_wcl` | Top at its defaults (4 cores). Three worst-case rounds, checks every store against 2754 cycles, then checks data through the host cache. |
| `tb_synthetic_wcl_cores` | Same workload at 2 and 8 cores, side by side. |
| `tb_maple_board` | Random traffic on a small configuration (2 cores, short slots and latency, 4-set caches). Checks every load against a golden memory model and every latency against a bound. Counts each mechanism (hits, upgrades, snoop and replacement write-backs, each transient race state, PRLUT blocking, queued write-backs) and fails if one never happens. |
| `tb_l1_cache` | One cache against a model bus and memory. |
| `tb_pmsi_cache_table` | Exhaustive check of all state/event pairs. |
| `tb_bus_arbiter`, `tb_request_bus` | All policies against a reference model, including grant timing. |
| `tb_prlut`, `tb_smc`, `tb_main_memory`, `tb_pr_buffer`, `tb_pwb_buffer` | Unit tests against queue, ordering and latency models. |

The full-size test takes well under a second of simulation after a
compile of about twenty seconds.

## Changing it

* **Protocol.** Protocol rules live only in `pmsi_cache_table`. The cache
  reacts to its outputs. A new state needs a value in `cstate_e` and rows in
  the table. The exhaustive testbench lists the expected rows explicitly.
* **Arbitration.** Policies live in `bus_arbiter`. Nothing else depends on
  the policy.
* **Sizes.** Cache sizes, core count and memory depth are top-level
  parameters. The line size and widths are set in `maple_pkg`.

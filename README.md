# Test automata for memory ordering, and four shared-memory systems to run them on

A multiprocessor memory system is *sequentially consistent* when every run could be
explained by some single interleaving of all processors' reads and writes in which each
processor's accesses keep their program order. Proving that directly is hard. This
design takes the testing route instead: small, fixed test programs run on every
processor, and a few simple assertions over the values the readers observe catch every
ordering the memory should never produce. The test programs are written as
*nondeterministic automata*: wherever a test would need long runs or large values, the
automaton *guesses* the one moment that matters. Each guess is a free input, so random
stimulus (or a formal tool) explores all the outcomes.

The RTL contains:

* three test automata (a writer, a reader and a program-order tester), plus a harness that
  arranges them into three tests and evaluates their safety properties;
* four memory systems under test, each with four processor ports:
  * a **serial memory**, which is correct by definition;
  * **lazy caching**, a textbook protocol with caches and decoupling queues;
  * a **Runway-style snoopy bus** with four PA8000-like clients, a memory controller
    (HOST), split transactions and out-of-order data return;
  * a **queue-abstracted version of that bus**: the snoop and data return queues are
    replaced by immediate responses and a counter in HOST;
* a top level, `tmc_top`, that runs the same test on all four systems side by side.

Everything is synthesizable SystemVerilog. The only behavioural code is one testbench
memory.

---

## 1. The tests and what they detect

All three tests use two shared locations, **A** and **B**, both 0 at reset.

### The data abstraction

The underlying tests write increasing values (1, 2, 3, …) and check that readers never
see them go backwards, or see two processors' writes in opposite orders. Those checks only
ever compare a value read against a threshold. So each writer here writes just 0 and 1:

* it writes 0 for a while;
* at a moment it guesses, it switches to writing 1, and keeps writing 1.

Every choice of threshold corresponds to some switch moment. That is why address and
data are one bit wide (`tmc_pkg::AW = 1`, `DW = 1`).

### The automata

| Module | States | One step | What is kept |
|---|---|---|---|
| `ta_writer` | s0 (writes 0), s1 (writes 1) | one write | nothing |
| `ta_reader` | s0 → s1 → s2 | read `ADDR0`, then `ADDR1` if `NRD=2` | first sample (`cap1`) on s0→s1, second (`cap2`) on s1→s2 |
| `ta_po_proc` | s0..s3 | write own location (0 or 1), then read the other one | the value read (`sample`), and `j`: whether its own write of 1 came before that read |

Each automaton samples its guess input (`choice`) when a step begins. It starts steps
only while `enable` is high.

### The tests

The harness `tmc_harness` places the automata on ports by `mode`:

| `mode` | Port 0 | Port 1 | Port 2 | Port 3 | Property (checked every cycle) |
|---|---|---|---|---|---|
| `MODE_ROWO` | writer of A | reader of A | – | – | MONOTONIC: reader in s2 ⇒ second sample ≥ first |
| `MODE_WA` | writer of A | reader A,B (u,v) | reader B,A (x,y) | writer of B | ATOMIC: both readers past s0 ⇒ v ≥ x or y ≥ u. Also MONOTONIC on each reader |
| `MODE_PO` | writes A, reads B (y, j) | writes B, reads A (x, i) | – | – | PO_CROSS: both in s3 ⇒ (x ≥ j or y ≥ i) and (x ≤ j or y ≤ i) |

Each test catches a specific bad outcome:

* **ATOMIC** fails only for u=1, v=0, x=1, y=0. P2 saw A's write before B's, while P3
  saw B's before A's. The two writes became visible in different orders to different
  processors.
* **PO_CROSS** fails for pairs like y=0, j=1, x=0, i=1. Each processor wrote 1, then read
  the other's location and saw 0. At least one read overtook a write in program order.

`MODE_WA` and `MODE_PO` together cover sequential consistency. `MODE_ROWO` is the smaller
single-location test.

### Hit and violation flags

For every property the harness keeps two sticky flags:

* `hit_*` means the antecedent held at least once. Without it, a pass says nothing.
* `viol_*` means the property failed.

A correct memory shows `hit_*` set and `viol_*` clear for the property of the mode it ran.

### Pacing

`run[p]` pauses processor p between steps. Random pauses matter: many interesting
interleavings need one processor to stall while the others move on.

---

## 2. The serial memory (`serial_mem`)

One array answers one request per cycle, picked round-robin among the waiting ports. It
answers in the same cycle (`rsp.done` with the read data). It is the reference for what a
correct memory may do.

---

## 3. Lazy caching (`lazy_cache_mem`)

Each processor i has three things:

* a cache C_i (a valid bit and a value per location);
* an out-queue Out_i of its own buffered writes;
* an in-queue In_i of pending cache updates.

There is one shared memory. A processor write is only appended to Out_i, and completes
at once. Everything else happens through internal events:

| Event | Enabled when | Effect |
|---|---|---|
| MW_i | Out_i not empty, all in-queues have room | head of Out_i written to memory and appended to **every** in-queue. In In_i itself it is *starred* (own write) |
| MR_i(a) | In_i has room | current memory value of a appended to In_i (a fill) |
| CU_i | In_i not empty | head of In_i written into C_i |
| CI_i(a) | always | a dropped from C_i (eviction) |

A read by processor i waits for three things:

* its location is in C_i;
* Out_i is empty;
* In_i holds no starred entry.

The last rule stops a read from overtaking the processor's own earlier write. Without it,
a cache that still holds an old value answers the read, and program order breaks while
write atomicity does not. That is the kind of fault `MODE_PO` is built for and `MODE_WA`
cannot see. The failing interleaving is narrow, so the random top-level run does not
reliably hit it. `tb_lazy_cache_mem` checks the rule directly. The star test is one compare against a per-queue count (`star_cnt`), which goes up on
a starred append and down when a starred head is consumed.

When each event happens is the protocol's free choice. Here it is an input. Each cycle,
`ev_valid`, `ev_kind`, `ev_proc` and `ev_addr` name at most one event. It is performed if
it is enabled, and `ev_fired` reports that it was. The processor access in the same cycle
is ordered first.

Queues hold `QDEPTH` (4) entries. An event that would overflow one is simply not enabled.

---

## 4. The Runway-PA8000 memory system

This is the most involved part of the design. `runway_system` connects these users on a
single bus that carries one transaction per cycle:

* `NCLIENT` (4) `runway_client`s;
* one `runway_host`;
* a `runway_arbiter`.

The bus (`rw_bus_t`) carries `kind`, `src`, `dst`, `addr`, `data` and the `shared` flag.
It is the OR of all users' drive signals; only the granted user drives.

### 4.1 Cache lines and transactions

Each client caches every location (two lines). A line is in one of four states:
`LS_INVALID`, `LS_SHARED`, `LS_PRIV_CLEAN` or `LS_DIRTY`.

* A read hits in any valid state.
* A write hits in private-clean or dirty, and leaves the line dirty.
* Anything else is a miss. The client sends one of:
  * **rsp**: read, shared or private, for a read miss;
  * **rp**: read private, for a write miss, a write to a shared line included.

Data comes back later in one of two ways:

* **hdr**: host data return, from HOST;
* **c2cw**: cache-to-cache write, from the client that held the line dirty.

### 4.2 Snooping: the CCC queue and the coherency response

Every client pushes every rsp/rp it sees on the bus into its **CCC queue** (cache
coherency check). Its own transactions go in too. The client works off this queue at its
own pace. `ccc_hold` pauses it, which is how the tests vary that pace.

For the transaction at the head, the client sends a **ccr** (coherency response) to HOST
and updates its line:

| Transaction at head | Line state | ccr | Line afterwards |
|---|---|---|---|
| own | – | coh_ok | stays invalid; the pending miss is now *owned* |
| other's | invalid | coh_ok | invalid |
| other's rsp | shared / private-clean | coh_shared | shared |
| other's rp | shared / private-clean | coh_ok | invalid |
| other's | dirty | coh_copyout | invalid; a c2cw with the data is queued for the requester |

### 4.3 HOST

HOST keeps two kinds of queue:

* an **order queue** of the rsp/rp it snooped;
* one **CCR queue** per client.

Every client answers in bus order, so the heads of all these queues refer to the same
transaction. Once every client has answered it, HOST decides:

* if any client answered coh_copyout, that client will send the data, and HOST does
  nothing;
* otherwise HOST queues an **hdr** for the requester. It sets the hdr's `shared` flag (the
  Client_op indication) when any client answered coh_shared. The requester then installs
  the line shared instead of private-clean.

An hdr carries the memory contents at the moment it is driven. Each c2cw on the bus is
also written into memory.

### 4.4 Data return and the two reasons to hold back a ccr

A data return addressed to a client waits in its **DR queue**. It is used only when the
client has *owned* its miss, meaning its own transaction has reached its CCC head. Data
can arrive before that. When the data is used, the waiting access completes:

* a read returns the data, and the line becomes shared or private-clean;
* a write stores its value, and the line becomes dirty.

A c2cw never carries the `shared` flag, so a read served by a copyout installs the line private-clean.

The client holds back the ccr at its CCC head (`ccr_delay_c2cw`, `ccr_delay_own`) in two
cases. Both matter for correctness.

1. **A c2cw for that line is still in its queue.** Say client C1 answered coh_copyout to
   C2 but has not yet sent the c2cw. If C1 now answered coh_ok to a third client C3, HOST
   would send C3 the stale memory copy. Holding the ccr until the c2cw has gone out (and
   updated memory) avoids this. `cw_pend` counts queued c2cws per line.
2. **The client owns a miss on that line and the data has not yet been used.** Ownership
   is taken when the own transaction reaches the CCC head, which can be long before the
   data arrives. Answering another client's request in that window would let the line
   move on before this client's access happened. The ccr waits until the access has
   completed.

### 4.5 Arbitration timing

`runway_arbiter` follows a pipelined schedule:

* a user raises `req` in cycle N;
* the request is registered, and the winner is computed during N+1;
* `grant` is high for the winner in N+2, and the winner drives the bus in that cycle.

A user drops `req` in its grant cycle. The next winner is evaluated while the current one
drives, so with waiting users the bus is busy every cycle.

Priority:

* A user with a c2cw waiting (`hipri`) beats everyone. This keeps the copyout data, and
  with it the delayed ccrs above, moving.
* Ties inside each class are broken by a round-robin pointer that moves past every winner.
* The user granted in the current cycle is left out of the evaluation, because its
  registered request is already stale.

### 4.6 Flow control

The snoop queues are finite. New coherent transactions (rsp/rp) are therefore granted
only while every CCC queue and HOST's order queue has room for two more: one for the
transaction on the bus and one for the next, already granted.

When this holds requests back, `coh_blocked` is high. c2cw and hdr transactions are never
held, so the queues always drain.

### 4.7 Cycle summary

| Event | Latency |
|---|---|
| Cache hit | `rsp.done` in the request cycle (one cycle later if the CCC is updating the same line) |
| Lone miss, to its rsp/rp on the bus | 3 cycles (request, evaluation, mastership) |
| Miss completion | when the owned transaction's data is at the DR head; at least 2 further bus transactions (the transaction itself and the hdr/c2cw), plus CCC/CCR processing |

---

## 5. The queue-abstracted bus (`urm_system`)

The snoop queues make the Runway system correct, but they also give it a very large state
space: the same logical situation can be spread over the queues in many ways.
`urm_system` is a second, smaller model of the same protocol. It keeps the c2cw queues
and HOST's hdr queue, and removes the CCC, CCR and DR queues. Three things replace them.

**Immediate answers (`urm_client`).** Each client answers every rsp/rp in the cycle it is
on the bus, on a combinational `ccr` output. It uses the table of 4.2. A client takes
ownership of its miss when its own transaction is on the bus, so a request for the same
line can arrive before its data. It then answers for the state the line is about to
reach:

| Own miss pending on the line | Other's request | Answer | After the own access completes |
|---|---|---|---|
| write (rp) | rsp or rp | coh_copyout; a c2cw is queued, marked to wait for the write | line invalid; the c2cw leaves carrying the written value |
| read (rsp) | rsp | coh_shared | line installed shared |
| read (rsp) | rp | coh_ok | line dropped |

Answering coh_ok for a pending write would be wrong. HOST would hand the requester
memory's old value, while the write is still to come.

**hdr counters (`urm_host`).** Without delayed answers, a client can no longer hold HOST
back while its c2cw is still queued. HOST therefore tracks this itself:

* `pend[a]` counts the copyouts on line a whose c2cw has not yet been on the bus.
* A new hdr starts with its counter at `pend[a]`.
* Each c2cw on line a decrements `pend[a]` and the counter of every queued hdr for a.
* The head hdr asks for the bus only when its counter is zero.

The counter is `CNT_W` = 2 bits wide, enough for four clients. The HDR queue is a shift
queue, so every entry's counter can be decremented in place.

**Data-returned bit.** A data return sets a per-client bit and holds the value. The
waiting access completes from it in the next cycle. With one access outstanding per
processor, there is never an older unfinished access to wait for, so the bit is set for
one cycle only.

Arbitration (`runway_arbiter`) and bus format are shared with `runway_system`. Flow
control holds new rsp/rp while the HDR queue has fewer than two free entries.

---

## 6. The top level (`tmc_top`)

`mode` and `run` are shared by the four systems. Each system has its own harness and its
own guesses.

| Port | Dir | Meaning |
|---|---|---|
| `mode` | in | `MODE_ROWO`, `MODE_WA`, `MODE_PO`; change only in reset |
| `run[3:0]` | in | per-processor step enable |
| `choice[4][4]` (2 bit) | in | guesses, per system and port |
| `rw_ccc_hold[3:0]` | in | pause Runway client snoop processing |
| `lc_ev_valid/kind/proc/addr`, `lc_ev_fired` | in/out | lazy caching event choice |
| `hit_*[3:0]`, `viol_*[3:0]` | out | per system: 0 serial, 1 lazy caching, 2 Runway, 3 queue-abstracted Runway |
| `steps[4][4]` | out | completed steps per automaton (progress) |
| `rw_bus`, `rw_ccr_delay_c2cw/own`, `rw_copyout`, `rw_coh_blocked` | out | Runway observation |
| `urm_bus`, `urm_hdr_held`, `urm_copyout`, `urm_dr_bit`, `urm_copyout_wait`, `urm_coh_blocked` | out | queue-abstracted Runway observation |

Reset (`rst_n`) is asynchronous and active low. It clears every state element read before
it is written.

---

## 7. How far to trust it, and where it departs from the original description

* **Random simulation, not a proof.** The tests are made for exhaustive state exploration.
  The testbenches here drive random guesses and pauses. They found no violation in any of
  the four systems, and they reach every property's antecedent. That is evidence, not
  proof.
* **The harness does catch bad memories.** `tb_tmc_harness` runs it on a deliberately
  relaxed behavioural memory. MONOTONIC, ATOMIC and PO_CROSS all fail there, in the modes
  meant to catch them.
* **One outstanding access per processor.** In the original, a PA8000 has several misses
  in flight, and speculative execution. Here each client has a blocking port, so at most
  one miss, and transactions complete out of order only *across* processors.
* **Runway simplifications:**
  * no I/O processor;
  * no non-coherent transactions;
  * no write-backs or evictions; a dirty line leaves only by copyout;
  * one line per location;
  * one central arbiter instead of one evaluator per user;
  * flow control and the HOST order queue are additions.
* **Queue depths are this design's own.** Lazy caching is described with unbounded queues;
  here they hold 4 entries.
* **The abstracted bus has the same limits.** It also has one access per processor, and
  no speculation. Its answers for a line whose miss is owned but not complete are this
  design's own. HOST's c2cw queue is left out, because HOST never sends one here.
* **The ROWO monotonicity check** uses x2 ≥ x1. A violation is exactly "1 then 0".

---

## 8. Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/tmc_pkg.sv tb/tb_tmc_top.sv --top-module tb_tmc_top
./obj_dir/Vtb_tmc_top +verilator+rand+reset+2
```

| Testbench | What it checks |
|---|---|
| `tb_tmc_top` | All four systems at default sizes. It runs 40 random episodes per mode and checks that no property fails, every automaton progresses, and every antecedent is reached. It counts each Runway mechanism and each lazy-caching event, and fails if any never occurred: rsp, rp, c2cw, copyout, shared hdr, both ccr delays, flow control, MW/MR/CU/CI, and for the abstracted bus: held hdr, waiting c2cw, data-returned bit |
| `tb_tmc_harness` | Harness on `tb_weak_mem`: clean on a consistent memory, and catches each property on a relaxed one |
| `tb_runway_system` | 3-cycle miss-to-bus latency; random bursts, with caches and memory checked against a reference copy |
| `tb_urm_system` | The abstracted bus: the same directed sequence and random bursts as `tb_runway_system`, plus a write miss with two reads right behind it, which needs the hdr counter |
| `tb_runway_client`, `tb_runway_host`, `tb_runway_arbiter` | Directed checks: the ccr table, both ccr delays, the HOST decision, and the N+2 grant timing, c2cw priority and round-robin fairness |
| `tb_lazy_cache_mem`, `tb_serial_mem` | Directed and random checks of the event rules and the round-robin |
| `tb_ta_writer`, `tb_ta_reader`, `tb_ta_po_proc` | Each automaton against a reference model, with random memory delays |

Concurrent assertions guard the handshakes:

* FIFO overflow and underflow;
* a one-hot grant;
* a request held stable until done;
* a data return matching the owned miss.

## 9. Changing it

* `NCLIENT` (`runway_system`, `urm_system`) and `NPROC` (`serial_mem`, `lazy_cache_mem`) set the number
  of processors. The harness and top assume four ports.
* The queue depths are parameters: `CCC_DEPTH`, `CCR_DEPTH`, `DR_DEPTH`, `C2CW_DEPTH`,
  `HDR_DEPTH`, `QDEPTH` and `CNT_W`. Flow control keeps two CCC entries in reserve, so `CCC_DEPTH` must be at least 2 (3 or more lets several misses overlap).
* `tmc_pkg` holds the shared widths and types. Wider data only makes sense with automata
  that write more than two values.

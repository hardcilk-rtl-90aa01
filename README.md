# HardCilk-style task management in SystemVerilog

Some programs expose a lot of parallelism as a tree of small tasks that
differ in control flow and memory accesses. Cilk handles this on CPUs:
a task can *spawn* children, create a *successor* that waits for their
results, and *send arguments* to that successor. A runtime balances the
work by work stealing.

This RTL does the same in hardware, for an FPGA accelerator:

- The processing elements (PEs) run only the task bodies.
- Dedicated circuits hold the tasks, balance them across the PEs, allocate
  successor records ("closures") and track which successors are ready.
- No hardware queue is a hard limit. When a queue overflows, its tasks spill
  to memory and come back later, so a program never fails for lack of queue
  space; it only runs slower.

The system is built from three kinds of network. Each network joins
per-PE *clients* and a few *servers* that have memory ports:

| Network | Cilk primitive | Module |
|---|---|---|
| work-stealing scheduler | `spawn` | `scheduler` |
| closure allocator | `spawn_next`: get an empty closure | `closure_allocator` |
| argument notifier | `send_argument` | `argument_notifier` |

One instance of a network exists per task type that needs it. The top module,
`hardcilk_fib`, wires these networks up for a two-task Fibonacci program:

- `fib(n)` spawns `fib(n-1)` and `fib(n-2)` and creates a `sum` successor.
- Both `fib` and `sum` send their results to a `sum`.

Its defaults are:

| Item | Count |
|---|---|
| fib PEs | 16 |
| sum PEs | 8 |
| scheduler servers | 4 per task type |
| closure-allocator servers | 1 |
| argument-notifier servers | 4 |
| task queue | 32 entries of 256 bits |

## Task model seen by a PE

A PE of type T has these streams:

- **task in** (`*_task_*`): the next task to execute, taken from its own
  queue.
- **spawn out** (`*_spawn_*`): a new task of type T goes into the PE's own
  queue. A task of a different type goes into a *spawn-only client* of that
  type's scheduler.
- **closure in** (`fib_closure_*`): the address of an empty closure, already
  prefetched, used for `spawn_next`.
- **closure write** (`fib_cw_*`): writes that fill a new closure, that is, its
  join counter and its task word. They go into a write buffer, so the PE does
  not wait for memory.
- **argument out** (`*_arg_*`): a closure address to notify. This is the
  `send_argument` event. Argument values are written by the PE itself.

A task is an opaque 256-bit word. The task-management logic never looks inside
it.

### Closure layout

A closure is 64 bytes, aligned to 64 bytes:

| Word | Contents |
|---|---|
| word 0, bits [31:0] | join counter: arguments still missing |
| word 1 | the 256-bit successor task, handed to the scheduler once the counter reaches zero |

## The work-stealing scheduler (`scheduler`)

This is the most involved part. One scheduler exists per task type. It contains
the following:

- **`task_deque`**, one per executing PE, with 32 entries.
  - The PE pushes and pops at the *head*, in LIFO order, which keeps its
    working set local.
  - The network side works at the *tail*, so stolen tasks are the oldest ones.
    In a tree computation these are the biggest.
  - The head has priority. In one cycle at most one tail operation happens.
    An assertion checks this.
- **`sched_client`**, one per deque. It decides each cycle from the queue's
  fill level:
  - **Request.** When the queue is (nearly) empty (`q_count <= REQ_THR`, 0 by
    default) and the client has no request outstanding, it puts a steal
    request on the *requests ring*. Then it takes the first task that reaches
    it on the *data ring*.
  - **Serve.** When the queue holds at least `STEAL_THR` (2) tasks, the client
    takes a request that passes by. It pops the tail task and injects it on
    the data ring.
  - **Offload.** When the queue is nearly full (`OFFLOAD_THR = DEPTH-2`), the
    client pushes tail tasks onto the data ring without waiting for a request.
  - **Spawn-only.** Spawn-only clients (`CAN_EXECUTE = 0`) belong to PEs of
    other types. They never request, and they offload every task.
- **`ring_network`**, used twice. A ring is a loop of one-flit registers, one
  per node, and every flit advances one node per cycle. A node can *take* the
  flit in front of it, or *inject* a flit into a free slot (or into a slot it
  is emptying). Flits carry a hop count. It is at least 8 bits wide, and the
  scheduler widens it for rings of more than 255 nodes. The requests ring and the data ring
  run in opposite directions, so a task heading for a requester meets it
  about halfway around.
- **`sched_server`**, `NUM_SERVERS` of them, on the same two rings.
  - **Absorb.** A task that has gone round the ring (hop count ≥ nodes − 1)
    without a taker means that nobody needs tasks now. The server removes it
    and writes it to a memory queue.
  - **Serve.** A steal request reaching a server whose memory queue is not
    empty is answered with a task read back from memory.
  - The memory queue is a circular buffer of `cfg_size` 32-byte slots at
    `cfg_base`. The host sets both.

Why it works without a central arbiter:

- Steal requests carry no identity. A task on the data ring goes to *any*
  requester that is still waiting.
- A requester that got a task from elsewhere leaves its old request
  circulating. A surplus task this produces is absorbed by a server and comes
  back later.
- Tasks are therefore never lost or duplicated. The only cost is an occasional
  round trip through memory.

A client also stops waiting when its own PE refills the queue. Without this
rule, a client whose PE keeps spawning would stay "requesting" forever and
never offload, and its queue would fill up.

Node order on both rings: execute clients, then spawn-only clients, then
servers.

## Closure allocator (`closure_allocator`)

- **`alloc_server`** reads a free list of closure addresses from memory
  (`cfg_list_base`, `cfg_list_len` entries). Each read returns four 64-bit
  addresses in one 256-bit word. The server puts the addresses on a ring.
- **`alloc_client`**, one per PE that does `spawn_next`. Each holds up to
  `BUF_DEPTH` (2) addresses ready for its PE, so a PE usually gets a closure
  with no wait.

## Argument notifier (`argument_notifier`)

- **`arg_client`**, one per PE that sends arguments. It buffers closure
  addresses and injects them on a ring.
- **`arg_server`**, one per shard.
  - Server `k` of `N` accepts only addresses with `(addr/64) mod N == k`. Each
    closure therefore has exactly one server, and its join counter is updated
    by one read-modify-write at a time. That makes the update atomic without
    locks, while different closures are updated in parallel.
  - Per notification, the server reads word 0, decrements the counter and
    writes it back.
  - When the counter reaches zero, the server reads word 1 and hands the task
    to a spawn-only client of the successor type's scheduler.
  - Adding servers divides the memory latency of these read-modify-writes
    among more units.

## spawn_next write buffer (`spawn_next_write_buffer`)

This is a small FIFO of memory writes, one per `fib` PE. It lets the PE post
the closure's initial writes and continue at once. Its `pending` output tells
the top when writes are still in flight; the top uses it to order spawns (see
below).

## Memory port

Every server and write buffer has its own port, of type `hc_pkg::mem_req_t`:

- Request: `mem_req_valid` / `mem_req_ready`, with `{we, addr[63:0],
  wdata[255:0], wstrb[31:0]}`.
- Addresses are 32-byte aligned.
- Read data returns on `mem_resp_valid` / `mem_resp_data` in request order,
  and must be accepted.

This is a simplified AXI (two channels folded into one). An AXI bridge per
port, or an arbiter onto fewer ports, goes outside the top. In `hardcilk_fib`
the ports are numbered in this order:

1. fib scheduler servers
2. sum scheduler servers
3. closure server
4. argument servers
5. write buffers

There are 29 ports at the defaults.

## Files

- `rtl/hc_pkg.sv`: types and constants.
- `rtl/sync_fifo.sv`: a helper FIFO.
- One file per block, named after its module.
- `rtl/hardcilk_fib.sv`: the top.
- `tb/tb_<block>.sv`: a self-checking test for each block. Each prints
  `TB_RESULT checks=… failures=…`.
- `tb/tb_mem_model.sv`: a multi-port memory with latency and random stalls,
  used by the tests.
- `tb/tb_hardcilk_fib.sv`: runs the full-size top with no parameter changes.
  - It has behavioural fib and sum PEs and runs 60 Fibonacci root tasks.
  - It checks every result.
  - It checks that each mechanism happened at least once: steal requests,
    steals, offloads by fib clients and by spawn-only clients, absorbs into
    memory, serves from memory, closures issued, ready successors, buffered
    closure writes, and a spawn held back by pending closure writes.
  - It checks that no child is spawned before its closure's join counter is
    in memory.
- `tb/tb_bench1.sv`: a knary workload on one scheduler, at 28 PEs and at
  256 PEs, run side by side. Each system is a `tb/tb_knary_sched.sv`
  instance. The testbench reports the efficiency for 8-, 32-, 64- and
  256-cycle tasks.
- `tb/tb_bench2.sv`: the same work split over two task types and two
  schedulers, with 14 + 14 PEs.
- `tb/tb_bench3.sv`: a knary tree with serial dependences, on 28 PEs of one
  task type. A scheduler, a closure allocator and an argument notifier are
  wired for a task whose continuation has the same type. Each serial child's
  parent loop resumes as a continuation closure once the child notifies it.
  This testbench plays the write buffer's role itself by writing closures
  directly into the memory model.

Measured efficiency (total work ÷ (PEs × elapsed cycles)), DEPTH 5,
BRANCH 6, memory latency 10 cycles:

| task length | 8 | 32 | 64 | 256 |
|---|---|---|---|---|
| one scheduler, 28 PEs | 0.83 | 0.95 | 0.96 | 0.98 |
| one scheduler, 256 PEs (depth 6) | 0.52 | 0.86 | 0.90 | 0.95 |
| two schedulers, 14 + 14 PEs | 0.19 | 0.76 | 0.93 | 0.98 |
| continuations, 28 PEs, 1 serial child per node | 0.36 | 0.80 | 0.88 | 0.94 |

With two schedulers and short tasks, efficiency is poor. Every type-2 task
enters its scheduler through a spawn-only client, so it must cross the data
ring to reach an executing PE. At 8-cycle tasks, 14 PEs need about 3.5 new
tasks per cycle, which is more than that ring delivers. The published results
show a smaller loss at this size. From 64-cycle tasks on, the one- and
two-scheduler workloads come close to the near-perfect efficiency reported for
the original. The continuation workload stays a few percent lower, at 0.94
with 256-cycle tasks.

At 256 PEs, requests and tasks travel over a 260-node ring. Short tasks then
lose a noticeable share of time to that transit. With 256-cycle tasks the speedup is still about 243. With 64 and 128
PEs (edit `NPE` in an instance), efficiency at 256 cycles is 0.99 and 0.98.

With continuations, every serial dependence costs a closure allocation, a
join-counter read-modify-write and a trip through the scheduler. Short tasks
cannot hide that cost. The argument servers are the first limit. Changing
`AS` in `tb_bench3.sv` from 4 to 1 or 8 moves the 8-cycle efficiency from
0.36 to 0.12 or 0.53, and the 32-cycle efficiency from 0.80 to 0.47 or 0.80.
With 256-cycle tasks the number of argument servers no longer matters. Two
serial children per node cut the available
parallelism to about three times the PE count, and efficiency drops with it.

## Simulating

With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hc_pkg.sv \
    tb/tb_hardcilk_fib.sv --top-module tb_hardcilk_fib -Mdir obj
./obj/Vtb_hardcilk_fib
```

Replace the testbench name to run any other test. Each test has a watchdog.
All of them finish in seconds.

## Where this departs from the published description, and limitations

- **Interfaces and encodings are this design's own**, since none are
  specified. This covers:
  - the memory port and the closure layout;
  - the steal thresholds;
  - the hop-count test for contention;
  - the FIFO order of the spilled-task queue.
- **Stealing order.** Spilled tasks come back in FIFO order, and a ring task
  goes to the first waiting requester.
- **Growing a spill queue.** `cfg_size` may be raised while the system runs,
  but only safely while that server's memory queue is empty, because the
  circular buffer wraps at the old size.
- **One memory operation at a time per server.** More bandwidth comes from
  more servers, not from pipelining inside one server.
- **Closures are not recycled.** The free list is read once, up to
  `cfg_list_len` entries. The host may raise `cfg_list_len` while the system
  runs, but no hardware returns used closures to the list. A long run needs a
  list as large as the number of successors it creates, or a host that keeps
  extending it.
- **Spawn ordering after `spawn_next`.** A fib PE's spawn port is held
  (not ready) while that PE's write buffer still holds closure writes.
  Children therefore exist only after their closure's join counter is in
  memory. Without this rule the end-to-end test sees children spawned, and
  able to notify, before their closure was written. The rule assumes that
  memory applies a write once it accepts it. Behind an AXI bridge, that means
  the bridge must raise `mem_req_ready` only on the write response. The cost
  is that a PE waits a few cycles for its writes to drain before it spawns.
- **Argument values.** Values travel through memory written by the PEs. The
  notifier only moves addresses and counts arrivals.
- **Task types are wired by hand.** The published system is generated from a
  description of task relations. Here the Fibonacci system is wired by hand,
  and other programs need their own top built from the same blocks.
- **Outside the RTL:**
  - the PEs;
  - the memory system;
  - the host that sets up spill regions and free lists;
  - the generator.

# Adaptive Memory Interface Controller and a BFS accelerator built on it

Irregular kernels such as graph traversal issue many small memory accesses
whose addresses are only known at run time. A memory split into several
independent banks could serve several of those accesses per cycle, but no
access can be bound to a bank at design time, and kernels that update shared
data (a "visited" flag, a queue tail) need atomic read-modify-write
operations. The **Memory Interface Controller (MIC)** solves both at run time.
It takes N memory operations, one per requester port, looks at their
addresses, and sends each to the bank that holds its word. Operations that hit
different banks go ahead in parallel. Operations that collide on a bank are
serialised without an extra arbitration cycle. Fetch-and-add and
compare-and-swap run inside the controller, one per bank at a time. Kernels
can therefore be replicated freely: they never talk to each other and only
see a plain load/store/atomic port.

The RTL follows the controller of *"An Adaptive Memory Interface Controller
for Improving Bandwidth Utilization of Hybrid and Reconfigurable Systems"*.
Around it sits the case study used to evaluate that controller, a
breadth-first-search (BFS) accelerator: a loop driver, N copies of a BFS
kernel with two controller ports each, the MIC, and M memory banks with a
fixed latency per operation.

```
             +---------+   start/id/level    +-----------+  2 ports  +-----+  1 port  +--------+
  start ---> | driver  | ------------------> | kernel 0  | <=======> |     | <======> | bank 0 |
  done  <--- | (loop)  | <------------------ |   ...     |    ...    | MIC |   ...    |  ...   |
             +---------+   done/n_added      | kernel N-1| <=======> |     | <======> | bank M-1
                                             +-----------+           +-----+          +--------+
```

## Inside the controller

The controller has one small set of units per input port i and another per
memory port j. The steering logic between them is written out in
`rtl/mic.sv`.

| unit | per | file | job |
|---|---|---|---|
| CE (control element) | input | `mic_ce.sv` | Turns the requester's start pulse into a request. Holds the request until some port accepts it. |
| PI (port index) | input | `mic_pi.sv` | Scrambling function: gives the bank `ind` and the word offset inside that bank. |
| UNBD | input | `mic_unbd.sv` | Keeps the input's selection `sel` high from acknowledge to done. |
| RM (resource manager) | port | `mic_rm.sv` | Accepts one of the requests routed to its port when the port is free. Keeps the port bound until the operation ends. |
| OPI (operation index) | port | `mic_opi.sv` | Remembers which input owns the port, so that done and results go back to it. |
| AMO (port operation unit) | port | `mic_amo.sv` | Passes loads and stores to the bank. Runs atomic operations as load, compute, store. |

The four steering stages work as follows:

1. Each request `req-i` goes to `RM[ind-i]` only.
2. Each input's `sel-i` is steered to port `ind-i`. This gives `sel-i-j`.
3. Port j takes op, offset, data and compare value from the input whose
   `sel-i-j` is high (an AND-OR mux).
4. The port's done and results go back to the input named by `OPI_j`.

**How a request flows, cycle by cycle.** A requester pulses `in_start` in cycle
t. The CE's request is combinational: `req = start | pending`. The PI is also
combinational, so in cycle t the RM of the addressed bank already sees the
request. If the port is free, it raises `ack` in cycle t. The UNBD turns that
`ack` into `sel` in the same cycle. The steering drives the bank, and the bank
samples the operation at the end of cycle t. The bank raises `mem_done` in
cycle t+L. The steering returns it as `in_done` in that same cycle. A lone
load therefore completes exactly L cycles after its start pulse, and the
controller adds no latency.

**Conflicts.** When several inputs want the same bank, the RM grants one of
them. It picks the first requester after the input it served last (round
robin). The others keep requesting. The RM is free again in the cycle in
which the running operation's done comes back, and it can grant the next
request in that same cycle. So two loads that collide finish after L and 2L
cycles, with no idle cycle on the bank in between. This same-cycle handover is
why the UNBD drops `sel` combinationally when `done` arrives. It is also why
the OPI's owner index is a register: it is captured whenever some `sel-i-j`
is high, which breaks the loop done → sel → owner → done.

**Atomic operations.** When an accepted operation is a fetch-and-add or a
compare-and-swap, the port's AMO unit keeps the port to itself. The steps
are:

1. It copies the address and operands.
2. It issues a load.
3. When the bank's done arrives, it intercepts that done instead of passing it
   on. It buffers the old value and computes the new one: `old + wdata` for
   fetch-and-add, or `wdata` for a compare-and-swap whose `cmp` matched.
4. It issues the store in the next cycle.
5. The store's done becomes the operation's done. The buffered old value is
   returned on `in_amo_result`.

A compare-and-swap that does not match stores nothing and completes on the
load's done. Latencies: L for loads, stores and failed compare-and-swaps, and
2L+1 for the others. Since each bank has its own AMO unit, atomic operations
on different banks run concurrently. Two atomics on the same word are
serialised by the RM, which is what makes them atomic.

**Parameter `ATOMICS`.** With `ATOMICS = 0` the AMO units never leave their
pass-through state, and synthesis removes the atomic logic. This gives the
load/store-only version of the controller.

### Port protocol

Requester side, per input i. Unpacked arrays of `N_IN`:

- `in_start` — one-cycle pulse.
- `in_op` (`mic_pkg::mem_op_e`: LOAD, STORE, FAA, CAS).
- `in_addr` — global word address.
- `in_wdata` — store data, the FAA addend, or the CAS swap value.
- `in_cmp` — the CAS compare value.
- `in_done` — one-cycle pulse.
- `in_result` — load data.
- `in_amo_result` — the old value of an atomic operation.

Rules for the requester:

- Keep op, address and data steady from `in_start` until `in_done`.
- Have at most one operation in flight per input.

Assertions check these rules, the one-hot acknowledges and that a done only
returns to a bound port.

Bank side, per port j: `mem_start`, `mem_we`, `mem_addr` (word offset inside
the bank), `mem_wdata` → `mem_done`, `mem_rdata`. The bank answers each start
with one done at least one cycle later.

### Scrambling function

Word addresses are interleaved over the banks: `bank = addr mod M` and
`offset = addr div M`. Consecutive words of every array therefore fall in
consecutive banks, and random accesses spread over all of them. For a
power-of-two M this is just bit selection. Any other M gets a real
divider. The PI is the only place that knows the mapping. To change the data
distribution, change `mic_pi.sv`; kernels and banks stay as they are.

## The BFS accelerator

**Memory layout** (word addresses; the base addresses are inputs of
`bfs_accel`):

- `off[0..V]` — CSR row offsets.
- `edge[0..E-1]` — edge targets.
- `dist[V]` — BFS level; all ones means unvisited.
- `parent[V]`.
- `queue[V]`.
- `tail` — one word.

The host writes the graph before `start`. It also sets `dist` and `parent` of
the sources, puts the sources into `queue[0..S-1]`, sets `tail = S` and drives
`src_count = S`.

**Kernel** (`bfs_kernel.sv`). Started on queue position `id` at level `lvl`,
it does the following:

1. Loads `u = queue[id]`.
2. Loads `off[u]` and `off[u+1]` together, on its two ports.
3. For every edge `e`:
   - It loads `v = edge[e]`.
   - It claims v with `CAS(dist[v], unvisited → lvl+1)`.
   - A won claim reserves a queue slot with `FAA(tail, 1)`. It then stores
     `queue[slot] = v` and `parent[v] = u` together.

Per visited edge this is six memory accesses and two atomic operations, with
at most two in flight. It reports the number of vertices it appended.
Duplicate edges and vertices reached by two kernels at once are resolved by
the compare-and-swap. Exactly one claimant wins.

**Driver** (`bfs_driver.sv`). It is the accelerator's loop `for id in
frontier: kernel(id)`, unrolled N times. It starts the kernels on N
consecutive queue positions and waits until all of them are done. Then it
starts the next group. All levels live back to back in one queue. The
frontier of level L is `[head, tail)`, and the next frontier is `[tail, tail +
sum of n_added)`. The tail word therefore only ever grows and needs no reset.
The search ends when a level appends nothing. `levels` gives the deepest
level and `visited` the number of vertices reached.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_KER` | 8 | bfs_accel, bfs_driver | kernels (the evaluated range is 4–8; 8 is the largest) |
| `N_BANKS` | 8 | bfs_accel, mic, mic_pi | memory banks = controller output ports (4 or 8 were evaluated) |
| `N_IN` | 16 | mic, mic_rm, mic_opi | controller inputs (two per kernel) |
| `LATENCY` | 2 | bfs_accel, mem_bank | cycles per memory operation (2, 5, 10 were evaluated) |
| `BANK_DEPTH` / `DEPTH` | 16384 | bfs_accel, mem_bank | words per bank. 8 × 16384 holds a 5000-vertex, 72887-edge graph (92889 words). |
| `ADDR_W`, `DATA_W` | 32 | all | word address and data width |
| `ATOMICS` | 1 | mic, mic_amo | 0 gives the load/store-only controller |

For other bank counts, keep `N_BANKS × BANK_DEPTH` large enough for the
graph. The testbenches use 131072 words in total.

## What to trust, and where it departs from the original

The controller's organisation comes from the original description. That
covers the CE, PI, RM, UNBD and OPI units, the four steering stages, one
atomic unit per bank and the load–buffer–compute–store sequence. The
following points are this design's own choices, because the description
leaves them open:

- **Port protocol.** Start and done are one-cycle pulses, and the lines are
  held until done.
- **Round-robin arbitration.** The arbitration is only described as
  lightweight and delay-free.
- **Word interleaving** as the scrambling function.
- **Registered OPI and handover in the release cycle.**
- **A separate `in_cmp` line** for the compare value of compare-and-swap. The
  swap value uses the store-data line.
- **A separate `in_amo_result` output** for atomic results.
- **No store for a failed compare-and-swap.**
- **One idle cycle between the load and the store** of an atomic operation.
- **In-bank offset from the PI.** The PI hands the bank the in-bank offset
  rather than the global address, so the banks are plain memories.
- **The kernels and the driver.** In the original case study these were
  generated by a high-level-synthesis tool, and only their behaviour is
  known. They are hand-written here with the same access mix: six accesses,
  one CAS and one FAA per visit, two ports per kernel. Their cycle counts
  differ from generated hardware.
- **The memory banks** are a plain RTL memory array with a pipelined, fixed
  latency. They stand in for the platform's memories, and they ignore writes
  during reset.
- **The serial reference** of the speed-up study is one kernel on one bank
  *through* the controller, not a controller-less design.

Not reproduced: the FPGA area and frequency results (Virtex-6, 100 MHz), and
the host processor of the hybrid system. The testbenches play the host.

## Measured behaviour

`tb_bfs_speedup` searches three random graphs with 5000 vertices and 22767,
47597 and 72887 edges. It compares each configuration against one kernel on
one bank. The tables give the speed-up, i.e. serial cycles divided by
accelerator cycles.

22767 edges:

| kernels | M=4, 2 cc | 5 cc | 10 cc | M=8, 2 cc | 5 cc | 10 cc |
|---|---|---|---|---|---|---|
| 4 | 2.43 | 2.28 | 2.22 | 2.64 | 2.56 | 2.53 |
| 5 | 2.69 | 2.47 | 2.38 | 3.03 | 2.90 | 2.84 |
| 6 | 2.88 | 2.62 | 2.51 | 3.36 | 3.17 | 3.09 |
| 7 | 3.06 | 2.74 | 2.61 | 3.61 | 3.38 | 3.29 |
| 8 | 3.17 | 2.83 | 2.69 | 3.85 | 3.57 | 3.46 |

47597 edges:

| kernels | M=4, 2 cc | 5 cc | 10 cc | M=8, 2 cc | 5 cc | 10 cc |
|---|---|---|---|---|---|---|
| 4 | 2.64 | 2.44 | 2.36 | 2.88 | 2.78 | 2.73 |
| 5 | 2.95 | 2.67 | 2.56 | 3.33 | 3.17 | 3.10 |
| 6 | 3.19 | 2.85 | 2.72 | 3.72 | 3.51 | 3.41 |
| 7 | 3.38 | 2.98 | 2.83 | 4.06 | 3.77 | 3.65 |
| 8 | 3.52 | 3.08 | 2.92 | 4.33 | 3.99 | 3.85 |

72887 edges:

| kernels | M=4, 2 cc | 5 cc | 10 cc | M=8, 2 cc | 5 cc | 10 cc |
|---|---|---|---|---|---|---|
| 4 | 2.72 | 2.53 | 2.44 | 2.98 | 2.87 | 2.83 |
| 5 | 3.08 | 2.78 | 2.66 | 3.48 | 3.31 | 3.24 |
| 6 | 3.33 | 2.96 | 2.82 | 3.92 | 3.67 | 3.56 |
| 7 | 3.55 | 3.12 | 2.95 | 4.28 | 3.99 | 3.85 |
| 8 | 3.71 | 3.22 | 3.04 | 4.61 | 4.23 | 4.07 |

The results show four trends:

- More kernels always help.
- Eight banks beat four, by more at higher latency.
- The gains shrink as latency grows, because each kernel waits on a chain of
  dependent accesses.
- Denser graphs gain more, since each vertex brings more edges to work on in
  parallel.

At the default size, the search over 5000 vertices takes 67 k cycles for
average out degree 10, 95 k cycles for degree 20 and 123 k cycles for degree
30 (`tb_bfs_accel`).

## Simulating

Every file under `rtl/` holds one module or package. Read the package first.
Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and finishes.
Each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mic_pkg.sv tb/tb_bfs_accel.sv \
          --top-module tb_bfs_accel -Mdir obj_accel
./obj_accel/Vtb_bfs_accel
```

Replace `tb_bfs_accel` with any other testbench:

| testbench | what it checks |
|---|---|
| `tb_bfs_accel` | The whole accelerator at default parameters. It runs a 40-vertex graph and the three 5000-vertex graphs (degrees 10, 20, 30). It checks dist, parent, the queue and the tail against a software BFS. It also counts that conflicts, same-cycle handovers, parallel banks, won and lost claims and dual-port kernel activity all occurred. |
| `tb_bfs_speedup` | The speed-up tables above: 33 accelerators side by side, run on each graph in turn. The run takes about two minutes. |
| `tb_mic` | The controller with 6 inputs and 4 banks: exact latencies for lone, parallel and colliding loads; random private traffic; shared fetch-and-add and compare-and-swap counters. |
| `tb_mic_amo` | The atomic unit and a bank: every operation's result and cycle count, and the final memory contents. It also runs loads and stores on a unit built with `ATOMICS = 0`. |
| `tb_mic_rm` | The arbiter against a round-robin reference. |
| `tb_mic_ce`, `tb_mic_unbd`, `tb_mic_opi`, `tb_mic_pi` | The small units, cycle by cycle. |
| `tb_mem_bank` | Exact latency (2 and 5 cycles), pipelining, and data. |
| `tb_bfs_kernel` | One kernel on a small graph: claims, duplicates, visited neighbours and cycle count. |
| `tb_bfs_driver` | Group dispatch and level bookkeeping, with model kernels. |

The testbenches load the graph straight into the bank arrays through
hierarchical references (`dut.g_bank[b].u_bank.mem`), using the interleaving
rule. The RTL has no host port.

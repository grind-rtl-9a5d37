# Guarded dataflow accelerator: verifying HLS-generated RTL while it runs

High-level synthesis turns a C kernel into a dataflow circuit: a network of
small nodes (adders, comparators, multiplexers, loads, stores) that pass
tokens to one another with valid/ready handshakes. When such a circuit gives a
wrong answer, the usual remedy is to dump a trace of every signal and search
it afterwards. That needs a lot of memory, and by the time the trace is read
the first error has already spread into everything downstream.

This design takes a different route. Small checking circuits called **guards**
are attached to the outputs of chosen nodes. While the accelerator runs, each
guard compares every value its node produces against a reference ("golden")
value computed in software beforehand and streamed in from main memory. On a
mismatch the guard can:

- **flag** the node;
- **patch** the output, so the successors see the correct value and the error
  cannot spread;
- **report** the event as a small debug packet written to memory.

The same hook can also do the opposite: **inject** a fault (stuck-at-zero,
bit flips, an address offset) into a node that is correct, so you can study
how a fault travels through the circuit. A read-only variant, the
**profiler guard**, keeps statistics on chip (a value histogram and an
activity count inside a cycle window) so that they need not be traced at all.
A **handshake guard** watches the accelerator's cache port and checks that
every request gets its response. A cache that silently loses a request
otherwise shows up only as a hung accelerator.

Only post-analysis data ever goes to memory: mismatches, injected faults and,
if asked for, logged tokens.

The RTL here is a complete system around one instrumented kernel, an
in-place **Relu** over an n×n array of 64-bit signed integers
(`A[i][j] = max(A[i][j], 0)`). It has:

- a host-visible controller;
- the Relu dataflow circuit with 11 guarded nodes;
- the guard core, which holds the golden-value readers, the guards and the
  trace writer;
- a profiler guard on one node the host picks (the address node after reset);
- a handshake guard on the cache port;
- an arbiter that shares main memory between the accelerator's cache and the
  guard core.

## The system

```
 host bus ──► accel_ctrl ──start/cfg──► grind_core (guards) ──┐
                 │                          ▲  │              │
               start                  taps │  │ hold/patch    │ golden in,
                 ▼                          │  ▼              │ packets out
              relu_accel (dataflow nodes) ──┘                 ▼
                 │ acc_* (loads/stores)                  mem_arbiter ──► m_* main memory
                 ▼                                            ▲
           [ external cache ] ── cache_m_* ───────────────────┘
 profiler_guard watches the node picked by PROF_SEL; handshake_guard watches acc_*
```

`grind_top` leaves the cache out. The accelerator's cache-side channel
(`acc_*`) and the cache's memory-side channel (`cache_m_*`) are ports, so any
cache (or a straight wire, as in the testbench) can sit between them. All
memory channels share one format, `mem_req_t {write, addr[31:0], wdata[63:0],
len[7:0]}`:

- a request uses a valid/ready handshake;
- a response is valid-only, and the requester must accept it;
- a read returns `len+1` beats and a write returns one acknowledge beat;
- the last beat has `last = 1`.

Single clock, synchronous active-low reset `rst_n`.

## How a guard sits on a node

Every guarded node exports a `guard_tap_t` and accepts a `guard_ctl_t`
(`rtl/grind_pkg.sv`):

| tap (node → guard) | meaning |
|---|---|
| `valid` | the node holds an output token |
| `fire`  | the token completes this cycle (all successors have it) |
| `value` | the node's own, unpatched result |
| `ext`   | extra context; the select node puts its input mask here |

| ctl (guard → node) | meaning |
|---|---|
| `hold` | do not offer the token yet |
| `patch_en`, `patch` | successors see `patch` instead of `value` |

The guard function is a plain equality test, and it is combinational. In the
same cycle a token is offered, the guard compares it with the head of its
golden-value queue and drives the patch. A patched token therefore costs no
extra cycle.

The golden queue is refilled from memory, so it can run dry. When it does, a
comparing guard raises `hold` and the node waits. This is the one point where
a guard changes the circuit's timing. It was chosen so that no comparison is
ever skipped. The testbenches count these stalls.

A new run rewinds every reader to its region's start. A burst requested
before the rewind still completes on the memory channel, because requests
are never withdrawn, but its data is thrown away.

The guard keeps a counter of completed tokens, which becomes the packet's
*iteration* field. Golden values are consumed one per completed token, in
order. This is why the golden stream must list the node's values in exactly
the order the node produces them.

### Modes (per guard, set by the host before a run)

| mode | compares | patches | packet on |
|---|---|---|---|
| OFF    | – | – | nothing; reads no golden values |
| VERIFY | yes | golden value on mismatch | mismatch (or every token with `log_all`) |
| CHECK  | yes | never: errors propagate | mismatch (or every token) |
| FAULT  | no  | always: the faulty value | every token |

Fault kinds: stuck-at-0, XOR with `fault_mask` (bit flips), add `fault_mask`
(address perturbation) and stuck-at-1.

A typical debugging loop runs on the host. First, put VERIFY guards on the
loop controls, the memory operations and the live-outs, then run. Next, read
`BUGGY`, move the guards to the parents of each flagged node (a backward
slice), and run again. The faulty node is the one that is flagged while all
its parents stay clean. Because every flagged value is patched, each run sees
only errors that arise locally.

### Debug packets and the trace region

A packet holds the node ID, a flag (set for a wrong value or an injected
fault), the opcode, the iteration, 16 reserved bits, 48 bits of data and a
32-bit cycle stamp. In memory it takes three 64-bit words:

```
word0 = {id[7:0], flag, 7'b0, opcode[15:0], iteration[15:0], reserved[15:0]}
word1 = {16'b0, data[47:0]}
word2 = {32'b0, cycle[31:0]}
```

Each guard has a small FIFO (`FIFO_DEPTH`). The trace writer drains the FIFOs
round robin into one region `[TRACE_BASE, TRACE_BASE+TRACE_SIZE)`, allocating
packet slots with a bump pointer.

Packets are never allowed to stall the accelerator:

- a packet whose FIFO is full is dropped and counted in `DROPPED`;
- a packet that no longer fits in the region is dropped and counted in
  `OVERFLOW`.

Either way, the guards keep checking and patching.

## The Relu dataflow circuit

`relu_accel` is built from generic node modules:

| module | role |
|---|---|
| `df_compute` | compute node; forks its result to N successors and takes no new input until every successor has taken the last one |
| `df_select` | mux node; passes the selected input and discards tokens on the other input whenever they arrive, even later |
| `df_branch` | control node; steers a token to its T or F output |
| `df_load`, `df_store` | memory operations |
| `mem_interface` | puts the loads and stores onto one cache port |

Guarded nodes (guard slot: node):

| slot | node | computes |
|---|---|---|
| 0 | mul3    | i·n |
| 1 | add6    | i·n + j |
| 2 | gep7    | base + 8·(i·n + j) |
| 3 | load8   | A[k] |
| 4 | cmp10   | A[k] > 0 |
| 5 | select11| cmp ? A[k] : 0 |
| 6 | store12 | write data |
| 7 | add13   | j + 1 |
| 8 | cmp14   | j + 1 < n |
| 9 | add16   | i + 1 (once per row) |
| 10| cmp17   | i + 1 < n (once per row) |

The loop control (`loop_ctrl`) keeps the current j in a loop-token register.
That token is forked to the body and to add13. The branch on cmp14 either
feeds j+1 back into the register, or ends the row through add16/cmp17. For an
n×n array, slots 0–8 see n² tokens each and slots 9–10 see n tokens each.
`done` rises once the loop has ended and every store has been acknowledged.

## Host registers (`accel_ctrl`, word addresses)

| addr | name | |
|---|---|---|
| 0x00 | CTRL | write bit 0 = start |
| 0x01 | STATUS | {done, busy} |
| 0x02 / 0x03 | N / BASE | array size and byte address |
| 0x04 / 0x05 | GOLDEN_BASE / GOLDEN_STRIDE | guard g reads from BASE + g·STRIDE |
| 0x06 / 0x07 | TRACE_BASE / TRACE_SIZE | packet region (bytes) |
| 0x08 / 0x09 / 0x0A | PROF_LO / PROF_HI / PROF_EN | profiler window [lo, hi] in cycles, enable |
| 0x0B | CYCLES | length of the last run |
| 0x0C | BUGGY | one bit per guard |
| 0x0D / 0x0E | PROF_ACTIVE / PROF_TOTAL | profiler counts |
| 0x0F | TRACE_PTR | bytes of trace written |
| 0x10+g | GUARD_CFG | {fault_kind[4:3], log_all[2], mode[1:0]} |
| 0x20+g | FAULT_MASK | |
| 0x30+g | MISMATCHES | per guard |
| 0x40+b | PROF_HIST | bin b |
| 0x50 / 0x51 / 0x52 | WRITTEN / OVERFLOW / DROPPED | packet counts |
| 0x53 / 0x54 | HS_REQS / HS_RSPS | cache-port requests accepted / responses completed |
| 0x55 | HS_STATUS | {outstanding[9:2], timeout[1], orphan[0]} |
| 0x56 | PROF_SEL | guard slot whose node the profiler watches; reset 2 (gep7), slots ≥ 11 refused |

A run:

1. Starting pulses `start` to the accelerator and the guard core. This
   rewinds the golden readers and the trace pointer and clears the counters.
2. The controller waits for the accelerator's `done`.
3. It then waits until the trace writer is empty.
4. It sets STATUS.done and raises `irq`.

## Golden values in memory

Guard g reads 64-bit words from `GOLDEN_BASE + g·GOLDEN_STRIDE`: one word per
token of its node, in execution order. Comparisons are made on the full 64-bit
value, so a boolean node's golden word is 0 or 1. The reader fetches
`BUFFER_LEN` words at a time, and only when its queue is empty.

## Parameters

| parameter | default | where |
|---|---|---|
| `BUFFER_LEN` | 8 | golden words per refill burst |
| `FIFO_DEPTH` | 4 | packets buffered per guard |
| `NBINS` | 8 | profiler histogram bins (value >> 3, XOR-folded) |
| `HS_TIMEOUT` | 1024 | cycles without a response before the handshake guard flags a lost request |
| `XLEN`, `MEM_AW` | 64, 32 | data and address width (package) |

These sizes are not fixed by the method. They are modest values chosen here.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/grind_pkg.sv tb/tb_grind_top.sv --top-module tb_grind_top
./obj_dir/Vtb_grind_top
```

`tb_grind_top` runs the top at its default parameters on a 6×6 array through
seven scenarios:

1. a clean run with every guard verifying;
2. a stuck-at-zero fault on select11 with store12 verifying: store12 is
   flagged once per positive element, the packets are decoded, and the memory
   still ends correct thanks to the patch;
3. the same fault with store12 only checking: the fault reaches memory;
4. stuck-at-zero addresses on gep7, with the first-pass guard list of the
   debugging loop: only store12 is flagged;
5. every guard logging into a small region: FIFO drops and region overflow,
   plus a profiler histogram checked against a model;
6. a control fault (cmp14 stuck at zero: every row stops after its first
   element), with the profiler switched to store12 so it counts one store per
   row and bins the stored values, and a memory fault (gep7's addresses
   moved one row on), each checked against the memory it must leave;
7. the cache loses one response: the accelerator hangs, and the handshake
   guard reports one request outstanding past its timeout.

The test counts hold stalls, patches, injected faults, arbitration conflicts
between cache and guard core, drops, overflows, profiler window hits, profiler
retargeting and handshake timeouts, and whether the control and memory faults changed the
result. It fails if any of them never happened.

`tb_relu_workload` runs a 32×32 Relu on the same top. With all eleven
guards verifying, the run takes 36,310 cycles and streams in 75,584 bytes of
golden data. With the guards off it takes 20,167 cycles. The difference is
the cost of fetching golden values through one shared memory channel: guards
hold their nodes while their readers wait for the arbiter.

`tb_mem_model` is a behavioural memory with random stalls, used by the
testbenches only.

## Where this design departs from, or goes beyond, the method it implements

- **Wiring.** Guards are connected by ordinary ports. In the original flow, a
  compiler pass threads the wires through the generated hierarchy and removes
  them again afterwards. Here the guard list of a run is chosen by mode
  registers instead of by recompiling.
- **Golden values are not produced in hardware.** They come from software,
  which in the testbenches is the Relu definition itself.
- **The host-side search is not in hardware.** The iterative backward-slice
  search is host software; the hardware provides the modes and flags it needs.
- **Hold on a missing golden value** is this design's own rule. Without it, a
  guard would have to skip comparisons whenever memory is slow.
- **One profiler, switchable.** Profilers are meant to be inserted widely
  and enabled as needed. Here a single profiler guard is routed to one node
  at a time through PROF_SEL.
- **The trace drains continuously** rather than being dumped once at the end,
  so the FIFOs can stay small.
- **Packet data is 48 bits**, as in the packet format this design follows,
  so the upper 16 bits of a 64-bit value are not recorded. Comparisons and
  patches still use all 64 bits.
- **The Relu circuit is a single lane.** The generated circuit it models runs
  about 48 operations at once; this one computes the same result with one
  lane.
- **Select nodes.** The loop-header select nodes are folded into a
  token register.
- **Not built:**
  - the task node (tasks with queues of children);
  - the cache;
  - AXI, which is replaced by the simple channel above;
  - the host;
  - the other benchmark kernels (Saxpy, Vadd, Conv2D, Stencil, Gemm, FFT).
    The guard core is independent of the kernel, but those kernels' dataflow
    graphs are not available here.
- **The memory-address fault** is an add of `fault_mask`. How large a
  perturbation to use is left to the user.

## Lint notes

Verilator's `-Wall` reports only unused signals and unused package constants.
These are:

- node outputs that a kernel does not consume, for example the done token of
  a store, or the upper bits of a compare result;
- observation outputs such as `iterations`.

None of them affects the circuit.

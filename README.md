# A lockup-free data cache without miss registers

When main memory is 100 to 200 processor cycles away, a processor that stops on
every load miss spends most of its time waiting. Stores are easy to hide behind
a store buffer. Loads are not, because an instruction eventually needs the
value. This design keeps the processor running past load misses. Any number of
misses can be outstanding, and there is no table of miss status holding
registers. Two ideas make this work:

1. **The register remembers the miss.** When a load misses, the processor writes
   the load *address* into the target register and sets that register's busy
   bit. Nothing else records which register waits for which word.
2. **The cache frame remembers the miss.** The missing block's frame in the
   direct-mapped cache is marked *pending* and one block read goes to memory.
   A pending frame cannot be replaced.

When an instruction later reads a busy register, the processor performs an
*implicit load* with the address held in that register. The implicit load
blocks until the block is in the cache. It then writes the data into the
register, clears the busy bit, and the instruction executes. If the block
arrived long before it was needed, the implicit load is a one-cycle hit.

So the hardware only pays off if loads are issued well before their values are
used. Two compiler transformations provide that distance:

* **Load hoisting** moves loads to the top of the loop body.
* **Load pipelining** issues, in iteration k, the loads for iteration k+S.

The testbench measures the effect of both.

## Blocks

| module | file | role |
|---|---|---|
| `nb_system` | `rtl/nb_system.sv` | top: wires the blocks below together and exposes the memory and instruction ports |
| `nb_core` | `rtl/nb_core.sv` | in-order processor, one instruction per cycle; busy-register and implicit-load logic |
| `busy_regfile` | `rtl/busy_regfile.sv` | 32 registers, each with a busy bit; probe port for busy addresses |
| `nb_cache` | `rtl/nb_cache.sv` | 8 KB direct-mapped data cache with 32-byte blocks; invalid/valid/pending frames |
| `store_buffer` | `rtl/store_buffer.sv` | store FIFO (16 entries) with a word-address lookup for read-after-write checks |
| `perf_counters` | `rtl/perf_counters.sv` | execution time, blocked cycles, misses and the miss overlap factor |
| `nb_pkg` | `rtl/nb_pkg.sv` | shared types: frame states, access kinds, instruction format, counter record |

Main memory and the instruction cache are not part of the RTL:

* Memory is reached through a request channel and a block-fill channel. The
  testbenches model it as unlimited interleaved banks with a fixed latency
  (`tb/mem_model.sv`).
* Instructions come from `imem_addr`/`imem_instr`, which must answer in the
  same cycle, like a perfect instruction cache.

## How a load is handled

The cache classifies every processor access by the state and tag of the one
frame the address maps to:

| frame state | tag | explicit load (`LD`) | implicit load |
|---|---|---|---|
| valid | equal | hit: data to the register | hit: data to the register, busy cleared |
| pending | equal | **secondary miss**: address to the register, busy; no memory request | waits for the fill, then hits |
| pending | different | **conflict miss**: waits until the pending fill arrives, then is a primary miss | same |
| invalid, or valid with another tag | — | **primary miss**: frame marked pending, block read sent, address to the register, busy | frame marked pending, block read sent, waits |

Things worth knowing:

* **Explicit loads never wait for memory.** An `LD` completes in one cycle
  unless it meets a conflict, the memory refuses the request, or a buffered
  store to the same word must drain first.
* **The only limit on outstanding misses is the number of frames.** In the
  tests, loops with hoisted or pipelined loads keep two to four primary misses
  outstanding, on average, while the processor waits.
* **An implicit load may miss again.** If another access replaced the block
  between fill and use, the implicit load starts a new primary miss and waits.
  The busy register still holds the address, so this needs no extra state.
* **An `LD` to a busy target register just overwrites it.** The earlier miss
  is forgotten and its block still fills.
* **A fill writes the whole block**, except words posted by stores when write
  posting is on (see below). The frame becomes valid, and the waiting
  access hits in the next cycle; there is no bypass of the fill data.

### Timing

If a block read is accepted in cycle *t*, the fill is on the fill channel in
cycle *t + L − 1* for a memory of latency *L*. An implicit load waiting for that
block completes in cycle *t + L*. A hit costs one cycle, and an instruction that
finds a busy source register executes one cycle after its implicit load
completes. `tb_nb_core` checks these counts exactly.

## Stores and memory ordering

Stores go into the store buffer, and the processor waits only when the buffer is
full. The buffer drains into the cache whenever the processor leaves the cache
port free: either it makes no access, or its access is waiting on a pending
frame. The cache is write-through without allocation:

* A store to a valid block updates the cached word and writes the word to memory.
* A store to an absent block only writes memory.
* A store to a *pending* block stays in the buffer until the fill. Otherwise
  the fill would overwrite the new word.

Two ordering rules keep program order correct with loads that finish late:

* **Read after write.** A load whose word is still in the store buffer waits
  until that store has drained.
* **Write after read.** Before a store enters the buffer, the processor looks
  for a busy register holding an address in the same word. If it finds one, it
  performs that register's implicit load first, so the pending load returns the
  value from before the store. This costs one comparator per register.

### Write posting (optional)

In the basic design, a load that reads a word soon after it was stored pays a
full miss. The store wrote only memory, so the load finds the block absent.
Loops with a recurrence through memory, such as Loop 11 below, lose most of
their time this way. Setting `WRITE_POSTING = 1` on `nb_system` makes the cache
allocate on stores:

* A store whose block is neither valid nor pending allocates the frame and
  marks it pending. It also sends a block read. The store stays at the head of
  the buffer.
* A store to a block that is pending writes its word into the frame, marks that
  word *full* and writes it through to memory.
* A load of a full word in a pending frame hits. A load of an empty word is an
  ordinary secondary miss.
* The fill writes only the words that are not full.
* A store to a frame that is pending for a different block cannot allocate.
  It is only written through.

Allocation and posting take two separate cycles because both need the single
request channel. With posting on, Loop 11 as compiled takes 4223 cycles instead
of 7208. Its `X` misses disappear, apart from the block of `X(1)`, which is read
before anything is stored to it. Loop 20 pipelined by one stage takes 12336
cycles instead of 13616. Posting is off by default: it is proposed as a
refinement of the architecture, which was evaluated without it.

## Memory interface

| signal | direction | meaning |
|---|---|---|
| `m_req_valid`, `m_req_ready` | out, in | request handshake; at most one request per cycle |
| `m_req_we` | out | 1: write the 32-bit word `m_req_wdata` at `m_req_addr`; 0: read the block at `m_req_addr` (block-aligned) |
| `f_valid`, `f_addr`, `f_data` | in | a whole block (word 0 in the low bits); cannot be stalled; at most one fill per cycle |

The memory may return reads in any order and after any delay. Each fill must be for a
frame that is still pending with the same tag, and the design guarantees this
by never replacing a pending frame. Assertions in `nb_cache` check it.

## Instruction set

The processor runs a minimal 32-bit instruction set, made just large enough to
write the loops (format in `nb_pkg`):

* `op[31:28] rd[27:23] rs1[22:18] rs2[17:13] imm[12:0]`
* `ADD`, `SUB` and `MUL` compute `rd = rs1 op rs2`.
* `ADDI` computes `rd = rs1 + sext(imm)`.
* `LUI` computes `rd = imm << 13`.
* `LD rd, [rs1 + sext(imm)]` and `ST rs2, [rs1 + sext(imm)]`.
* `BNE rs1, rs2, offset` and `BLT rs1, rs2, offset` (signed less-than) are
  relative to the branch.
* `HALT` stops fetching.

Other details:

* Register 0 is always zero. A `LD` into r0 is an *in-cache load*, that is, a
  prefetch. It allocates the frame and fetches the block like any miss, but
  reserves no register, so no instruction waits for its data.
* Every instruction takes one cycle when nothing blocks, except `MUL`. `MUL`
  stands in for a floating-point operation and occupies the processor for
  `MUL_CYCLES` cycles (default 3). Those cycles count as execution, not as
  blocked cycles.
* `done` rises once the processor has halted, the store buffer is empty and no
  miss is pending. Memory then holds the final state.

## Measurements

`perf` gives:

* **cycles**: the execution time.
* **blocked_cycles**: cycles in which no instruction retired.
* **primary_misses**, **secondary_misses** and **implicit_loads**.
* **conflict_cycles**: cycles spent waiting on a pending frame of another tag.
* **pending_sum**: the number of pending primary misses, summed over blocked
  cycles.

From these:

* The **miss overlap factor** is `pending_sum / blocked_cycles`: how many misses
  are outstanding, on average, while the processor is blocked.
* A blocking cache would need about `(cycles − blocked_cycles) + primary_misses
  × L` cycles. Dividing that by `cycles` estimates the **speedup** over a
  blocking cache. The end-to-end testbench prints it.

Results of `tb_nb_system` (memory latency 200 cycles, default sizes, integer
versions of the Livermore loops). Unless a row says otherwise, Loop 1 runs 990
iterations, Loop 9 101, Loop 11 127, Loop 15 600 (j = 2..7, k = 2..101) and
Loop 20 100:

| program | cycles | primary misses | miss overlap factor | speedup vs. blocking |
|---|---|---|---|---|
| Loop 1, as compiled | 69615 | 249 | 0.99 | 1.00 |
| Loop 1, loads hoisted | 44246 | 249 | 1.99 | 1.57 |
| Loop 1, 1-stage load pipelining | 39683 | 249 | 1.96 | 1.69 |
| Loop 1, 2-stage load pipelining | 37590 | 249 | 1.92 | 1.76 |
| Loop 1, 3-stage load pipelining (988 iterations) | 35467 | 249 | 1.88 | 1.86 |
| Loop 9, as compiled | 42496 | 227 | 1.19 | 1.18 |
| Loop 9, loads hoisted | 24896 | 227 | 2.15 | 2.01 |
| Loop 9, 1-stage load pipelining (100 iterations) | 12300 | 227 | 4.23 | 4.04 |
| Loop 9, unrolled once, all loads at the top (100 iterations) | 14359 | 224 | 4.10 | 3.42 |
| Loop 11, as compiled | 7208 | 32 | 1.03 | 1.03 |
| Loop 11, X load just after its store | 7260 | 32 | 1.01 | 1.02 |
| Loop 11, Y loads pipelined by 1 stage (128 iterations) | 7164 | 34 | 1.01 | 1.06 |
| Loop 11, Y loads pipelined by 2 stages (126 iterations) | 6812 | 33 | 1.01 | 1.07 |
| Loop 11, Y loads pipelined by 3 stages (128 iterations) | 6908 | 34 | 1.01 | 1.08 |
| Loop 15, as compiled | 74265 | 230 | 1.00 | 1.01 |
| Loop 15, all loads hoisted out of the IFs | 69654 | 269 | 1.06 | 1.22 |
| Loop 20, as compiled | 24433 | 106 | 1.02 | 1.03 |
| Loop 20, loads hoisted | 14765 | 106 | 1.90 | 1.71 |
| Loop 20, 1-stage load pipelining | 13616 | 106 | 1.82 | 1.84 |
| Loop 20, 2-stage, Z loaded inside the IF (99 iterations) | 10744 | 106 | 2.53 | 2.33 |
| Loop 20, 2-stage, Z loaded before the IF (99 iterations) | 8008 | 106 | 3.78 | 3.13 |

Unrolling Loop 9 once and hoisting all twenty loads uses the same registers as
pipelining it by one stage, but is slower. The loads of the second column are
issued only a few instructions before the first column is computed. So only
about half the body runs in the shadow of the misses. With pipelining, a whole
iteration separates every load from its use.

Loop 11 is a recurrence, `X(k) = X(k-1) + Y(k)`, so hoisting cannot help it: the
load of `X(k)` cannot move above the store that produces it. The cost of the
read-after-write wait shows in its second row. Pipelining the `Y` loads does
not help either: every `X` load still misses right after the store that
produced it, so the overlap factor stays at one.

Loop 15 has a large body full of arithmetic IFs, and its integer form keeps
them all. The square root is dropped, and the division by `S` becomes a
multiplication. Its eleven loads hardly ever miss together where they stand, so
the miss overlap factor is one. Hoisting all of them to the top of the body
makes several of them speculative: they load values that the branch taken
never uses. The extra loads cost a few more misses but still shorten the loop,
because the misses now overlap.

Loop 20 is run in an integer form that keeps its memory behaviour: every
division becomes a multiplication and the min/max clamp a subtraction.

```
DI = Y(k) - G(k)*(XX(k) + DK);  DN = 2;  if (DI != 0) DN = Z(k) - DI
X(k)    = ((W(k) + V(k)*DN)*XX(k) + U(k))*VX(k) + V(k)*DN
XX(k+1) = (X(k) - XX(k))*DN + XX(k)
```

`XX(k)` is loaded one iteration after it is stored, so that load always waits
for the store buffer. The other loads can be pipelined. `Z(k)` is only needed
when `DI` is not zero. Loading it inside the IF lets it miss in the middle of
the body. Loading it speculatively, before the IF and with the pipelined loads,
costs one extra load per iteration but hides that miss. In the table, the
speculative version is the faster one.

`tb_latency_sweep` runs Loop 1, and Loop 9 pipelined by one stage, on five
copies of the system with different memory latencies:

| latency (cycles) | 5 | 10 | 50 | 100 | 200 |
|---|---|---|---|---|---|
| Loop 1, as compiled: cycles | 21060 | 22305 | 32265 | 44715 | 69615 |
| Loop 1, 2-stage pipelined: cycles | 16773 | 16777 | 18990 | 25190 | 37590 |
| Loop 1, 2-stage pipelined: miss overlap factor | 0.00 | 0.02 | 1.26 | 1.80 | 1.92 |
| Loop 1, 2-stage pipelined: speedup vs. blocking | 1.06 | 1.13 | 1.53 | 1.64 | 1.76 |
| Loop 9, 1-stage pipelined: cycles | 5147 | 5321 | 5351 | 7300 | 12300 |
| Loop 9, 1-stage pipelined: miss overlap factor | 0.12 | 0.34 | 2.29 | 3.79 | 4.23 |
| Loop 9, 1-stage pipelined: speedup vs. blocking | 1.06 | 1.24 | 2.93 | 3.70 | 4.04 |

The sweep shows two regimes:

* **Below the critical latency**, the pipelined loop's time hardly changes,
  because every miss is hidden behind useful work. This latency is about the
  distance between a load and its first use.
* **Above it**, the time grows by about the latency divided by the overlap
  factor, for every miss. The code as compiled instead grows by a full latency
  per miss.

Loop 9 has a long body between each load and its use, so its critical latency
lies between 50 and 100 cycles. For Loop 1 pipelined by two stages it lies
between 10 and 50 cycles.

## Where this design departs from, or adds to, the source architecture

* **Store buffer depth.** The architecture assumes an unbounded store buffer.
  This one has 16 entries (`SB_DEPTH`) and stalls the processor when full.
* **Write policy.** Write-through without allocation, a store to a pending block
  held until the fill, the read-after-write wait and the write-after-read
  implicit load are all this design's choices; the architecture leaves store
  handling open. Write posting (allocating on a store miss and marking words
  full) was proposed as a later improvement; it is built as an option that is
  off by default.
* **Processor.** The processor is a minimal in-order integer machine, not a
  SPARC.
  * All operations take one cycle except the 3-cycle `MUL`.
  * There is no floating-point unit; the studied loops are floating point and
    run here in integer form with the same memory access pattern.
  * There is one register file of 32 registers, not separate integer and
    floating-point files. Counted for the original floating-point code,
    some loop versions need more than 31 registers and do not fit: Loop 9
    pipelined by one stage, Loop 15, and Loop 20 pipelined by two stages.
    The integer versions used here need fewer registers. Loop 15 needs 23,
    with its loads hoisted or not. Loop 9 pipelined by
    one stage fits in exactly 31 once `CO*(...)` (CO = 2) is formed with adds.
    Loop 20 pipelined by two stages needs 28 registers, or 31 with the
    speculative load.
* **Memory model.** The memory model answers in a fixed number of cycles and has
  no bank conflicts, as in the evaluation of the architecture. The RTL itself
  accepts fills in any order and any latency.
* **Arbitration.** The processor has priority for the single cache port. The
  store buffer uses the cache when the processor is not using it.
* **Reset.** All state resets asynchronously on `rst_n` low. Frames become
  invalid, registers become zero and not busy, and the program counter and
  counters clear.

## Simulating

All files are SystemVerilog-2017. `nb_pkg` must be read first, and `tb_nb_pkg`
before any testbench. For example, to run the end-to-end test with plain
Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nb_system \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/nb_pkg.sv tb/tb_nb_pkg.sv tb/tb_nb_system.sv
./obj_dir/Vtb_nb_system
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it covers |
|---|---|
| `tb_busy_regfile` | random reads, writes and busy-address probes against a reference |
| `tb_store_buffer` | random push/pop, order, full flag and lookup against a reference queue |
| `tb_perf_counters` | random events against reference counts |
| `tb_nb_cache` | primary, secondary and conflict misses, six misses pending together, exact completion cycle of implicit loads, stores to valid, pending and absent blocks, refused requests, store drain during a wait |
| `tb_nb_core` | short programs: exact blocked-cycle and execution-time counts, read-after-write wait, write-after-read implicit load, full store buffer, conflict, branch loop |
| `tb_latency_sweep` | five systems with memory latencies 5 to 200 cycles running Loop 1 as compiled and 2-stage pipelined, and Loop 9 1-stage pipelined; checks results, the flat low-latency region, the slope above the critical latency and the rising speedup |
| `tb_write_posting` | two systems, with and without write posting, running the same programs: posting into a pending frame, hits on full words, the fill merge, stores to a frame pending for another block, and Loops 11 and 20 |
| `tb_nb_system` | the whole system at default sizes with a 200-cycle memory: Loops 1 (as compiled, hoisted, 1 to 3 pipeline stages), 9 (as compiled, hoisted, 1 stage, unrolled once), 11 (up to 3 stages), 15 (as compiled, hoisted) and 20 (as compiled, hoisted, 1 and 2 stages, with and without a speculative load), results checked against a reference; checks that hoisting and pipelining shorten execution and raise the overlap factor, and that every mechanism above occurs |

The memory latency is the `LATENCY` parameter of `mem_model`. The sizes and the
multiply latency are the parameters of `nb_system` (`CACHE_BYTES`,
`BLOCK_BYTES`, `SB_DEPTH`, `MUL_CYCLES`), as is `WRITE_POSTING`. `tb/tb_nb_pkg.sv` has small assembler functions (`i_ld`, `i_add`,
…) for writing further programs. Immediates are 13-bit signed: build addresses
with `LUI` plus an `ADDI` whose value is below 4096.

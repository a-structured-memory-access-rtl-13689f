# SMA: a machine that separates memory access from computation

The Structured Memory Access (SMA) machine divides a processor into two
cooperating engines:

* the **Memory Access Processor (MAP)**, which alone talks to memory. It
  fetches every instruction and knows how the program's loops and arrays are
  laid out, so it can produce operand addresses well ahead of their use;
* the **Computation Processor (CP)**, which never forms an address. It receives
  instructions and an ordered stream of data words, computes, and hands result
  words back to the MAP.

Three things stop address arithmetic and loop bookkeeping from costing
instructions in the computation stream:

* loop indices live on a hardware **index stack**;
* arrays are described once in two tables: *which* index feeds *which*
  dimension, and *where* the array is and how large it is;
* the CP runs a loop body again and again, for as long as data keeps arriving
  (**loop mode**).

This repository holds synthesizable SystemVerilog for the whole machine:

* the MAP and its parts (fetcher, preprocessor, operand/instruction buffer,
  address generator with its tables, read and write queues, memory controller);
* the CP (instruction buffer, data FIFO, registers, ALU);
* a top level, `sma_top`, with one tagged memory port;
* a self-checking testbench for every block and an end-to-end testbench.

## Programs: blocks, operands and the instruction word

A program is a sequence of **instruction blocks**. A block is a straight run of
instructions ending in one whose end-of-block bit is set. MAP and CP
instructions are mixed in one instruction stream:

* the MAP executes MAP instructions itself;
* for CP instructions, the MAP makes every operand's address and sends the CP
  only the operation.

Every instruction is one 64-bit word (`rtl/sma_pkg.sv`):

| bits | field |
|---|---|
| 63 | 1 = MAP instruction, 0 = CP instruction |
| 62 | end of block |
| 61:60 | number of operands (0–3) |
| 59 | CP: immediate operands name registers |
| 58 | CP, one operand: the operand is written (otherwise read) |
| 55:48 | operation |
| 47:32, 31:16, 15:0 | operands 1, 2, 3 |

Each 16-bit operand has three fields:

* a 2-bit type;
* an indirect bit;
* a 13-bit value.

| type | name | value |
|---|---|---|
| 0 | scalar | `[12:11]` base register, `[10:0]` displacement |
| 1 | immediate | the value itself (used as an address by table loads, or as a constant sent to the CP) |
| 2 | data structure | `[12:8]` access-information entry, `[7:0]` access-pattern entry |
| 3 | index | index-stack level whose current value is sent to the CP |

The operand count decides which operands are read and which are written:

| operands | read | written |
|---|---|---|
| 1 | operand 1, or none if bit 58 is set | operand 1 if bit 58 is set |
| 2 | 1 and 2 | 2 |
| 3 | 1 and 2 | 3 |

**MAP operations:**

| op | name | what it does |
|---|---|---|
| 1 | `LDAPT e,a` | load access-pattern entry e from memory at a (a pointer at a if indirect) |
| 2 | `LDAIT e,a` | load access-information entry e in the same way |
| 3 | `LDTMP e,a` | load index template e in the same way |
| 4 | `SETUP t` | push template t on the index stack |
| 4 | `SETUP t,a` | the same, but the initial value is the memory word at a (immediate address or scalar), e.g. a pivot row index saved earlier |
| 5 | `INCR l,t1,t2` | step index level l; branch to t1 while it is within its final value, else remove it and branch to t2 |
| 6 | `REMIDX` | remove the top index |
| 7 | `CLRIDX` | remove every index |
| 8 | `BR t` | branch |
| 9 | `BRCP t1,t2` | branch on the CP's last test outcome |
| 10 | `LDBASE r,v` | load scalar base register r |
| 11 | `STOP` | halt |

**CP operations:**

| op | name | what it does |
|---|---|---|
| 1 | `CLR` | result 0 |
| 2 | `MOV` | copy |
| 3 | `ADD` | add |
| 4 | `SUB` | subtract |
| 5 | `MUL` | multiply |
| 6 | `TSTZ` | report whether the value is zero |
| 7 | `TSTN` | report whether the value is negative |

A table entry occupies consecutive memory words:

* template, 3 words: initial, final, step;
* access pattern, 3 words, one per dimension: bits `[2:0]` index level
  (0 = dimension unused), bits `[23:8]` signed index offset;
* access information, 6 words: base address, displacement of dimension 2,
  displacement of dimension 3, upper bounds of dimensions 1–3.

The address of a data-structure operand is:

    base + Σ over used dimensions of (IS[level] + offset) × displacement

The first dimension's displacement is 1. A used dimension whose index exceeds
its upper bound raises the bound error; the address is still formed. With
column-major `n × n` matrices the sample pattern (i, j) with displacement n
gives `base + i + j·n`. Indices start at 1, so the base is the address of
element (0,0).

## Inside the MAP

```
 memory ──► mem_controller ──► instr_fetcher ──► instr_preproc ──► oib ──► addr_gen ──► read_queue  ──► data to CP
    ▲            ▲   ▲                               │ CP instructions        │  ▲          │ MAP words
    │            │   └────────────── write_queue ◄───┼────────────────────────┘  └──────────┘
    └────────────┘                        ▲          ▼
                                          └──── result words from CP ◄── CP
```

**instr_fetcher:**

* requests one instruction at a time and passes it on with its address;
* stops at every end of block until the address generator gives it the next
  block address. Blocks already buffered are never fetched again.

**instr_preproc:**

* sends CP instructions straight to the CP's instruction buffer, with
  per-operand read/write/register bits;
* writes MAP instructions and all operand specifications into the OIB;
* for each new block, picks a buffer slot round-robin. It skips the slot the
  CP is executing, and waits until no end-of-data word is on its way to the CP.
  An end-of-data word names a slot, so the slot it names must not change
  underneath it.

**oib (operand and instruction buffer):**

* `NBLK` slots of `BLK_LINES` lines. A line holds: MAP instruction or operand
  specification, read bit, write bit, 16-bit field, end-of-block bit;
* each slot also records the address of its first instruction, the address
  after it and whether it holds CP work;
* a branch target is looked up by comparing it with every slot's first
  address at once;
* the CP's instruction buffer uses the same slot numbers, so "block in slot s"
  means the same thing on both sides.

**addr_gen:** walks the buffered lines of the current slot.

* *Operand lines* become queue entries:
  * immediates and index values go on the read queue with their value already
    present;
  * scalar and data-structure operands go on the read queue, the write queue
    or both, as the read/write bits say.
* *MAP instructions* run here. Table loads read their words through the read
  queue, marked as the MAP's, and the unit waits for them.
* At the end of each block, the unit:
  * works out the successor;
  * looks it up in the OIB;
  * on a miss, asks for a slot and a fetch.

  A `BRCP` waits for the CP's test outcome. There is no speculation past it.
* The index stack, template table, access-pattern table, access-information
  table and address formula (`index_stack`, `template_table`,
  `access_pattern_table`, `access_info_table`, `ds_addr_gen`) sit inside it.

**read_queue / write_queue:** in-order queues of entries with these fields:

* CP/MAP;
* indirect;
* received;
* done;
* address;
* data.

Their main rules:

* Memory may answer out of order: the memory controller tags each request with
  its source (2 bits) and queue entry (6 bits).
* An *indirect* entry uses its first answer as the real address and asks again.
* A read records, at the moment it is queued, which older writes go to the same
  address (or may, because their address is still indirect). It is not sent to
  memory until those writes are done. This keeps read-after-write order without
  stalling unrelated reads.
* The write queue takes result words from the CP in order and writes an entry
  once it has both a direct address and its data.

**mem_controller:**

* priority order: instruction fetch, then write queue, then read queue;
* routes tagged answers back to their source.

## Keeping the two processors in step: end-of-data words and loop mode

This is the part of the design that needs the most care. The CP does not see
branch targets or addresses. It learns which block to run *only* from the data
stream:

1. When the CP reaches the end of a block whose first instruction takes data,
   it looks at the FIFO head. If that is an ordinary data word, it runs the
   same block again. This is loop mode: an inner loop costs the MAP nothing but
   operand addresses.
2. When the MAP leaves a block, it prepares an **end-of-data (EOD) word**. The
   word carries the slot of the next block with CP work, or the reserved
   all-ones value meaning "the block that has just been sent to you".
3. The EOD word is sent lazily, just before the first CP operand of the new
   block. Consequences:
   * a run of MAP-only blocks (index steps, `SETUP`s) sends nothing;
   * a later end of block simply replaces the prepared word.
4. When the MAP goes back to the block the CP is already repeating, no EOD word
   is sent; the CP simply keeps looping. An example is the `INCR k` block of a
   matrix multiply, which only steps the index and branches back.
5. A block whose first instruction takes no data runs once. The CP then waits
   for an EOD word.
6. Each EOD word the CP consumes pulses `eod_taken`. The MAP counts words in
   flight and does not reuse a buffer slot while any are outstanding.

For data-dependent branches, the CP executes `TSTZ`/`TSTN` and reports the
outcome. The MAP's `BRCP` waits for it. Because the CP cannot run ahead of its
data, the outcome always belongs to the right test.

## The CP

* `cp_ibuf` holds CP instructions by slot (`BLK_INSTR` per slot), with a
  complete mark per slot and a FIFO of newly arrived slots for the all-ones EOD
  value.
* The execution unit takes, in operand order, one FIFO word per read operand or
  immediate. When the opcode says immediates name registers, the word is a
  register number.
* Results go to a register or, for memory destinations, back to the MAP as the
  next write word.
* The ALU (`CLR MOV ADD SUB MUL TSTZ TSTN`) and the eight registers are this
  design's own minimal choice.

## Top level

`sma_top` ports:

| port | meaning |
|---|---|
| `start`, `start_pc` | begin executing at an instruction address (pulse) |
| `halted` | a `STOP` was executed |
| `cp_busy` | CP still working |
| `err[3:0]` | sticky: {CP protocol error, OIB block overflow, index-level error, bound error} |
| `mem_req_*` | valid/ready request: `we`, 16-bit word address, 64-bit write data, 8-bit tag |
| `mem_resp_*` | read answer: valid, tag, data, in any order, any latency; writes get no answer |

The index-level error covers a missing level and stack over- or underflow. A
CP protocol error is data with no block, end-of-data inside a block, or a
block with more than `BLK_INSTR` CP instructions.

Parameters (defaults are used by the full-size test):

| parameter | default | meaning |
|---|---|---|
| `NBLK` | 8 | block slots in OIB and CP instruction buffer |
| `BLK_LINES` | 32 | OIB lines per block (instructions plus operand specifications) |
| `BLK_INSTR` | 8 | CP instructions per block (the size of an inner-loop body) |
| `IS_DEPTH` | 7 | index stack levels (3-bit level field, 0 = unused) |
| `TMP_ENTRIES` | 16 | index templates |
| `APT_ENTRIES` | 32 | access patterns |
| `AIT_ENTRIES` | 16 | data-structure descriptions |
| `NBASE` | 4 | scalar base registers |
| `RQ_DEPTH`, `WQ_DEPTH` | 8 | read / write queue entries |
| `NREG` | 8 | CP registers |
| `FIFO_DEPTH` | 4 | CP data FIFO |

The architecture fixes none of these sizes. The table sizes were chosen to
hold the largest published program statistics: a Gaussian elimination needs
8 templates, 11 access patterns and 2 arrays. An eigenvalue routine needs 14
templates, 19 patterns and 3 arrays, with loops at most 3 deep, and an
8-instruction loop buffer for the Gaussian inner loops. Programs with more
blocks than `NBLK` still run; blocks are replaced and fetched again.

Timing:

* every unit is a simple state machine, one step per clock;
* an operand address takes one cycle in the address generator plus the queue
  and memory latency;
* the data-structure address (`ds_addr_gen`) is combinational. It uses three
  16×16 multiplies (the first dimension's displacement is the constant 1, so
  after flattening only two remain), which set the critical path.

## Where this design departs from the architecture, and what is missing

* **Slots instead of variable-length FIFOs.** The architecture describes both
  buffers as fixed-length FIFO stacks of variable-length blocks. Here, both
  are divided into equal slots. A block longer than `BLK_LINES` lines or
  `BLK_INSTR` CP instructions raises `err[2]` or `err[3]`.
* **The instruction encoding is this design's own.** The architecture does
  not fix the width of any field. Operand values are 13 bits, so immediate
  addresses in programs stay below 8192. Larger addresses are reached through
  base registers or indirection.
* **Conflicting loop test.** One description continues a loop while the index
  is *less than* its final value; the worked example runs the loop body n
  times for 1..n. This design follows the example: it continues while the
  stepped index has not passed the final value (`<=` for positive steps,
  `>=` for negative).
* **No sequential prefetch of the next block.** In the architecture the
  fetcher stops only at a block ending in a branch and otherwise runs on into
  the next block. Here it stops at every end of block and waits for the
  address generator. This costs one block lookup on fall-through, but no
  block is ever fetched that is not executed, so slot replacement stays
  simple.
* **LDTMP takes two operands** (entry, address), like the other table loads.
* **Index from memory.** An index saved earlier is put back on the stack by a
  second `SETUP` operand; its final value and step still come from the
  template. The encoding is this design's own.
* **Not built:**
  * subroutine calls with stack, frame and argument pointers, and therefore
    recursion (a recursive quicksort cannot run);
  * prefetching past an unresolved data-dependent branch, with a purge word
    to discard the wrong data. The MAP waits for the CP instead.
* **Memory is not part of the design.** `tb/mem_model.sv` is a behavioural
  model for simulation only.

## Verification

Every block has a self-checking testbench in `tb/`. Each one:

* drives random traffic from `$urandom`;
* checks against values worked out independently;
* ends with a line `TB_RESULT checks=N failures=M`;
* has a watchdog.

`tb/sma_tb_pkg.sv` has helpers that assemble instructions.

`tb_sma_top` runs the machine at its default parameters with a memory that:

* applies random back-pressure;
* gives random latency;
* answers reads out of order.

It runs two programs three times:

1. A matrix multiply C = A × B, written like the architecture's sample program:
   * one template;
   * patterns (i,j), (i,k), (k,j);
   * a two-instruction CP body repeated in loop mode while the MAP steps k.
2. A vector pass with scalars, indirect table loads, indirect reads and writes,
   a data-dependent branch on the CP's test, an index set up from a value in
   memory, and index removal.

The three runs use n = 3, 4 and 2, with random data. They take the branch both
ways, and the third run gives an array a bound one too small. The testbench:

* checks every result element and the error bits;
* counts about twenty mechanisms from internal signals: loop-mode repeats, EOD
  variants, slot replacement, read-after-write holds, indirect accesses,
  out-of-order answers, both branch directions, the bound error and others;
* fails if any mechanism never happens.

`tb_gauss` runs the elimination kernel of a Gaussian elimination at n = 20 on
the default-size machine, in integer form without division:

    A[i,j] = A[k,k]·A[i,j] − A[i,k]·A[k,j]    for i, j = k+1..n

* The inner loops start at k+1. The CP computes that value from the index
  operand k and stores it, and `SETUP t,a` reads it back.
* The 2470 inner iterations take about 51,000 cycles with the random-latency
  memory. That is roughly 20 cycles for five memory references, because this
  memory model overlaps only a few requests.
* All 400 elements are checked against a model of the same loops.

To run a testbench with Verilator (5.x), list the package first, then the RTL,
the testbench package and the memory model. The example uses `tb_sma_top`; for
another testbench, change the file and the top module:

```
verilator --binary --timing -Wno-fatal --top-module tb_sma_top \
  rtl/sma_pkg.sv tb/sma_tb_pkg.sv $(ls rtl/*.sv | grep -v sma_pkg) \
  tb/mem_model.sv tb/tb_sma_top.sv
./obj_dir/Vtb_sma_top            # add +trace to tb_sma_top for a cycle log
```

The full-size run takes about 3000 cycles and well under a second.

## Files

| file | contents |
|---|---|
| `rtl/sma_pkg.sv` | widths, instruction and operand formats, operation codes, shared structs |
| `rtl/index_stack.sv`, `template_table.sv`, `access_pattern_table.sv`, `access_info_table.sv`, `ds_addr_gen.sv` | index and array description hardware |
| `rtl/instr_fetcher.sv`, `instr_preproc.sv`, `oib.sv`, `addr_gen.sv` | MAP instruction path |
| `rtl/read_queue.sv`, `write_queue.sv`, `mem_controller.sv` | MAP memory side |
| `rtl/map.sv` | the MAP |
| `rtl/sync_fifo.sv`, `cp_ibuf.sv`, `cp.sv` | the CP |
| `rtl/sma_top.sv` | the machine |
| `tb/tb_<block>.sv` | one testbench per block |
| `tb/tb_gauss.sv` | Gaussian elimination kernel at n = 20 |
| `tb/mem_model.sv` | behavioural memory |
| `tb/sma_tb_pkg.sv` | instruction-assembly helpers |

# Worst-fit hardware memory manager with a Rocket-Queue

Software `malloc`/`free` take a time that depends on how many free blocks
exist and where they lie, which is why hard real-time systems usually avoid
dynamic memory. This design moves the allocator into hardware. It is a small
coprocessor that owns an SRAM and serves four instructions: MALLOC, FREE,
WRITE and READ. Every MALLOC and FREE finishes in a fixed, short number of
cycles, whatever the state of the memory.

The allocation policy is **worst fit**: a request is always served from the
largest free block, which is split if it is bigger than needed. The expensive
part in software is finding that largest block. Here a hardware priority queue
keeps every free block sorted by size, so the largest block is simply a
register. That queue is a **Rocket-Queue**: a pipelined heap whose upper
levels form a binary tree and whose lower levels form parallel columns. All
cells of one level share a single comparator.

```
                 +--------------------------------------------+
 clk, rst  ----->|            memory_manager                  |
 enable    ----->|   +--------------+     +---------------+   |----> ready
 instr[1:0]----->|   |mm_control_unit|<-->| rocket_queue  |   |----> valid
 data_in   ----->|   |  (15-state   |     | (max queue of |   |----> error
 [D_W+A_W-1:0]   |   |    FSM)      |     |  free blocks) |   |----> data_out[D_W-1:0]
                 |   +------+-------+     +---------------+   |
                 |          | 2 ports                         |
                 |   +------+-------+                         |
                 |   |  mm_memory   |  2^A_W x D_W SRAM       |
                 |   +--------------+                         |
                 +--------------------------------------------+
```

## Files

| file | content |
|---|---|
| `rtl/mm_pkg.sv` | instruction codes and control-unit state type |
| `rtl/memory_manager.sv` | top level: wires the three parts together |
| `rtl/mm_control_unit.sv` | instruction sequencer, block headers, split and merge |
| `rtl/rocket_queue.sv` | the queue: a cascade of levels |
| `rtl/rq_dup_level.sv` | one duplicating (tree) level of the queue |
| `rtl/rq_merged_level.sv` | one merged (column) level of the queue |
| `rtl/mm_memory.sv` | dual-port synchronous SRAM |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus a queue workload test |
| `tb/max_queue_model.sv`, `tb/rq_workload_driver.sv`, `tb/mm_workload_driver.sv` | testbench helpers |

## Coprocessor interface

All signals are in one clock domain. Reset is synchronous and active high.
An instruction is accepted in a cycle in which both `enable` and `ready` are 1.
`enable` is ignored while `ready` is 0.

| `instr` | name | operand in `data_in = {addr[A_W-1:0], data[D_W-1:0]}` | result |
|---|---|---|---|
| 0 | MALLOC | `data` = number of words wanted, *n* ≥ 1 | `data_out` = block address, with `valid` |
| 1 | FREE | `addr` = block address returned by MALLOC | none; `error` if the block is already free |
| 2 | WRITE | `addr`, `data` | none |
| 3 | READ | `addr` | `data_out` = word, with `valid` |

A MALLOC of *n* words takes a block of *n*+1 words, because the first word of
every block is its header. The returned address is the address of that header.
The caller's data therefore lives at `addr+1 … addr+n`. `error` is raised
instead of `valid` if *n* = 0 or if even the largest free block is smaller than
*n*+1 words.

Timing, counted from the cycle the instruction is accepted:

| instruction | result (`valid` or `error`) after | `ready` again after |
|---|---|---|
| WRITE | – | 1 cycle |
| READ | 1 cycle | 2 cycles |
| MALLOC, block fits exactly | 1 cycle | 2 cycles |
| MALLOC, block split | 2 cycles | 4 cycles |
| MALLOC, error | 1 cycle | 2 cycles |
| FREE, no neighbour free | – | 4 cycles |
| FREE, one neighbour free (merge) | – | 6 cycles |
| FREE, both neighbours free | – | 8 cycles |
| FREE of a free block (error) | 1 cycle | 2 cycles |

None of these numbers depends on the number of blocks or on the memory size.
After reset, the manager spends one cycle writing the initial header, which
describes one free block covering the whole memory. `ready` rises one cycle
after `rst` falls.

## Block headers

The managed memory is a sequence of blocks that are contiguous and never
overlap. Each block starts with a one-word header. Its low `2*A_W+2` bits are
used, and any upper bits are written as zero:

| bits | field | meaning |
|---|---|---|
| `2*A_W+1` | `free` | this block is free |
| `2*A_W` | `prev_free` | the block just before this one is free |
| `2*A_W-1 : A_W` | `prev_addr` | address of the block just before this one |
| `A_W-1 : 0` | `size` | block size in words, header included; 0 stands for 2^A_W |

This layout is specific to this implementation. The original design states
only that headers exist and what they must let the controller decide. The
layout needs `D_W ≥ 2*A_W+2`, and an elaboration check enforces this.

The controller keeps the following invariants:

* Two free blocks are never adjacent, because FREE always merges.
* `prev_free` and `prev_addr` of every block are correct. Whenever a block is
  allocated, split, freed or merged, the header of the block that follows it
  is updated in the same instruction.
* Every free block is in the queue as the item `{id = address+1, value = size}`.
  ID 0 is reserved for the empty item, so addresses are offset by one.
* If a block is merged into the free block before it, the block's old header is
  rewritten as free. A second FREE of that address is then reported as an
  error and does not corrupt the heap.

Because the needed neighbour information sits in the header of the block
itself, FREE can decide after a single header read whether the previous block
is free. This is what makes the fixed cycle counts possible.

## Control unit (`mm_control_unit`)

The state machine has the fifteen states `S_RESET`, `S_READY`, `S_MEM_READ`,
`S_MALLOC`, `S_MALLOC_BIGGER`, `S_WAIT`, `S_FREE_BEGIN`, `S_FREE_PREV_EMPTY`,
`S_FREE_PREV_USED`, `S_FREE_PREFIX_MERGE`, `S_FREE_POSTFIX_MERGE`,
`S_FREE_MERGES_1/2/3` and `S_FREE_END`. Its transitions follow the original
state diagram. The memory work done in each state is this implementation's
own schedule. Port 0 of the SRAM serves the block being worked on, and port 1
serves a neighbour's header. Below, A is the freed block, P the block before
it, N the block after it, and NN the block after N.

**MALLOC.** T denotes the top of the queue, a block of S words. *b* is *n*+1.

| state | memory | queue |
|---|---|---|
| `S_READY` | read header(T), read header(T+S) | – |
| `S_MALLOC`, *b* = S | header(T) ← allocated; header(T+S).prev_free ← 0 | remove T |
| `S_MALLOC`, *b* < S | header(T) ← allocated, size *b* | remove T |
| `S_MALLOC_BIGGER` | header(T+b) ← free rest of S−b words; header(T+S).prev_addr ← T+b | insert rest |
| `S_WAIT` | – | – |

**FREE.**

| path | states after `S_READY` (read header(A)) | what happens |
|---|---|---|
| no merge | `BEGIN` → `PREV_USED` → `WAIT` | BEGIN reads header(N) and, if `prev_free`, header(P). PREV_USED marks A free, sets N.prev_free and inserts A. |
| N free | `BEGIN` → `PREV_USED` → `POSTFIX_MERGE` → `END` → `WAIT` | PREV_USED reads header(NN). POSTFIX removes N and grows A over it. END inserts A and points NN.prev_addr at A. |
| P free | `BEGIN` → `PREV_EMPTY` → `PREFIX_MERGE` → `END` → `WAIT` | PREV_EMPTY removes P, grows P over A and points N at P. PREFIX marks the old header of A free. END inserts P. |
| both free | `BEGIN` → `PREV_EMPTY` → `MERGES_1` → `MERGES_2` → `MERGES_3` → `END` → `WAIT` | PREV_EMPTY removes P and reads header(NN). MERGES_1 grows P over A and N and points NN at P. MERGES_2 removes N and marks A free. END inserts P. |

A FREE whose header already says `free` goes from `BEGIN` straight back to
`S_READY` with `error`.

The queue accepts an instruction only every two cycles, and a remove may never
come in the cycle right after another instruction (see below). The schedule
respects this rule. This is why, in the three-block merge, the second remove
is placed in `MERGES_2` and not in `MERGES_1`.

## Rocket-Queue (`rocket_queue`, `rq_dup_level`, `rq_merged_level`)

```
 level 1      o                      duplicating levels: 1, 2, 4, ... cells,
 level 2    o   o                    each cell has two children
 level 3   o o o o
 level 4  oooooooo   (2^D cells)
 merged   oooooooo                   merged levels: 2^D cells each,
 merged   oooooooo                   cell i has one child, cell i below
   ...
```

With `D = DUP_LEVELS` and `M = MERGED_LEVELS`, the capacity is `2^D − 1 + M·2^D`
cells. For example, D = 4 and M = 7 gives 127 cells. Each cell holds one item
`{id, value}`. The items obey heap order: a cell's value is at least as large
as every value below it (the order is reversed when `IS_MAX = 0`). The single
cell of level 1 is therefore always the best item and is the queue's output.

An instruction enters level 1. It then moves down one level per cycle through
registered `add_item / item_down / addr / push` signals. Each level talks only
to the level above it and the level below it, so the critical path does not
grow with the number of merged levels.

**Insert.** At the cell addressed in the current level, the incoming item
replaces the stored one in three cases: the cell is empty, the incoming value
is strictly better, or `push` is set. If it replaces, the old item travels on
with `push = 1`. Once one item has been displaced, every cell below on the same
path shifts down by one. This continues until an empty cell absorbs the item.
If nothing is replaced, the incoming item travels on unchanged. In a
duplicating level, the next address is extended by one bit. The bit selects
whichever child subtree holds fewer items, which keeps the tree balanced so
that the columns fill evenly.

**Remove by ID.** All cells of a level compare their IDs with the requested ID
in parallel. If a cell matches, it takes the better of its children from the
level below and sends that child's address down with `push = 1`. The hole then
moves down one level per cycle until it reaches an empty cell. If no cell
matches, the request passes down unchanged. A request for an ID that is not
stored changes nothing.

**Item counts.** Every cell keeps a register with the number of items in its
subtree. The register is recomputed each cycle as "this cell is occupied" plus
the children's counts. The count at a given level is therefore exact a few
cycles after a change, once the change has propagated up level by level.
Balancing decisions that use a slightly stale count still place the item
correctly. Only the balance can be slightly less even. The queue's
`item_count` output is the count of level 1.

**Instruction spacing.** In general, one instruction is allowed every two
cycles. An insert only reads the level it is in, so it may also follow any
instruction in the very next cycle. A remove reads the level below it. That
level may still be changing under the previous instruction, so a remove must
never follow another instruction in the next cycle. An assertion in
`rocket_queue` reports a violation of this rule. The control unit relies on
the relaxation once: the insert in `S_FREE_END` follows the remove in
`S_FREE_POSTFIX_MERGE` directly.

**Empty item and overflow.** ID 0 marks an empty item. Sending an empty item is
a no-operation. If more items are inserted than there are cells, items fall out
of the bottom and are lost. The manager's queue is sized so that this cannot
happen (next section).

## Parameters and sizing

| module | parameter | default | notes |
|---|---|---|---|
| `memory_manager` | `A_W` | 8 | address width; 256 words |
| | `D_W` | 32 | word width; must be ≥ 2·A_W+2 |
| | `QUEUE_DUP_LEVELS` | 4 | 15 cells in the tree part |
| | `QUEUE_MERGED_LEVELS` | 5 | 5 × 16 cells in columns; 95 cells in total |
| `rocket_queue` | `DUP_LEVELS`, `MERGED_LEVELS`, `ID_W`, `VAL_W`, `IS_MAX` | 4, 5, 9, 9, 1 | |

Free blocks are never adjacent, and an allocated block has at least two words.
A memory of W words therefore holds at most ⌊(W+2)/3⌋ free blocks, which is 86
for W = 256. `memory_manager` refuses to elaborate with a queue smaller than
this bound. For A_W = 9 use `QUEUE_MERGED_LEVELS = 10` (175 cells ≥ 171).
Memory sizes from 16 to 512 words with 16- or 32-bit words are all valid
settings, and only the parameters need to change.

The bound is simple but slightly loose. A split keeps the allocated part at the
start of the block, so a free block at address 0 always has at least two words.
That caps a 256-word memory at 85 free blocks, not 86. The queue is sized for
the simple bound anyway.

## Departures and own choices

These points go beyond what the original description fixes, or differ from it:

* **Two SRAM ports.** The memory type is given only as SRAM. A single port
  cannot update a block and its neighbour's header within the stated cycle
  counts, so the SRAM has two ports.
* **Header layout** and **ID = address + 1**, both described above.
* **`data_out` is D_W bits wide.** The original block diagram shows A_W bits,
  but READ returns a whole memory word. A MALLOC address appears in the low
  A_W bits.
* **MALLOC timing.** The original lists MALLOC as taking 1 or 2 cycles, but its
  state diagram occupies the controller for 2 or 4 cycles. Here the address
  is returned after 1 or 2 cycles, and `ready` follows the state diagram.
* **Instruction encoding** (MALLOC=0, FREE=1, WRITE=2, READ=3) and the
  `{addr, data}` split of `data_in` are this design's choice.
* **Subtree counts** are recomputed from the children instead of being
  incremented and decremented along the instruction's path. The original
  decrement rule would leave the counts of a removed item's ancestors stale.
* **Insert directly after remove** is allowed, as explained above. The original
  description both requires a NOP after every queue instruction and issues
  these two back to back in its state machine.
* Removing an item pulls up the **better of the two children**. The original
  comparison for this choice is not usable as written.
* Not built: the Systolic-Array queue, which serves only as the baseline of the
  original comparison.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `tb_rq_dup_level` | directed: replace, pass-down, push, empty item, steering by counts, pull-up of the better child, unknown ID |
| `tb_rq_merged_level` | the same for a merged level |
| `tb_rocket_queue` | 15-cell queue against a reference model: fills to capacity, drains, then runs 3000 random inserts and removes, including inserts one cycle after a remove; checks the top after every instruction and the count after idle gaps |
| `tb_rocket_queue_sizes` | the 31-cell and 255-cell shapes with 60-bit items (4 tree levels, 16-cell columns): fill, sorted drain, random traffic; plus a min-queue (`IS_MAX = 0`) instance |
| `tb_memory_manager_sizes` | the whole manager at 16, 32, 64 and 128 words of 16 bits and at 512 words of 32 bits (with `QUEUE_MERGED_LEVELS = 10`). Each size gets the same predictor, fragmentation phases, cycle-count checks and mechanism counts as `tb_memory_manager`, and the largest reaches 170 free blocks in the queue |
| `tb_mm_memory` | both ports, read latency, data held while idle |
| `tb_mm_control_unit` | 32-word memory with a behavioural queue: every FSM path, each resulting header read back and compared bit for bit, every latency |
| `tb_memory_manager` | the whole manager at default parameters. A predictor keeps its own block map. The test fragments the memory into 64 and then 85 free blocks, then issues about 6000 random instructions. Every MALLOC must return a largest free block or fail exactly when none fits. Every FREE is checked for the expected error and cycle count, and READ data is checked. Each path must occur at least once. |

To run one of them with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mm_pkg.sv \
    tb/tb_memory_manager.sv rtl/memory_manager.sv rtl/mm_control_unit.sv \
    rtl/mm_memory.sv rtl/rocket_queue.sv rtl/rq_dup_level.sv rtl/rq_merged_level.sv \
    --top-module tb_memory_manager
./obj_dir/Vtb_memory_manager
```

The other testbenches need the files of their own module, plus
`tb/max_queue_model.sv` (control-unit test), `tb/rq_workload_driver.sv`
(evaluation-size queue test) or `tb/mm_workload_driver.sv` (other memory
sizes). Every testbench finishes within seconds.

**What is not verified.** No synthesis timing or area was measured. The queue
was tested for correctness only, not for the critical-path claims. The
end-to-end test reaches 85 free blocks held in the queue at once. That is
the most a 256-word memory can hold under this split rule, but it leaves 10 of
the 95 queue cells unused, so the bottom merged level is never filled by the
full manager. `tb_rocket_queue` and `tb_rocket_queue_sizes` do fill their
queues to capacity.

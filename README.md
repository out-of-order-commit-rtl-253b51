# Out-of-order commit back end

A conventional out-of-order core retires instructions in order through a
reorder buffer (ROB). The ROB must be as large as the instruction window, so a
window of thousands of instructions is impractical. This design takes the ROB
out. It takes a small number of **checkpoints** of the rename state instead.
Instructions complete and leave in any order. Whole groups between two
checkpoints commit at once when their instruction counter reaches zero. A
branch misprediction or exception rolls back to a checkpoint.

The second half of the idea is about the instruction queue. A small,
conventional instruction queue would fill up with instructions that wait for
loads that missed in the cache. Such instructions are therefore found and
moved to a large, cheap, in-order **Slow Lane Instruction Queue (SLIQ)**. They
go back to the fast queue once their load returns.

The RTL is the rename / retire / scheduling back end. Fetch, execution units,
caches, memory and branch prediction are outside it. The testbenches model
them as latencies and events.

## Parts

### Rename with a CAM map (`rtl/cam_rename.sv`)
There is one entry per physical register (4096). Each entry holds the logical
register it maps, a **Valid** bit (it is the current mapping) and a
**Future Free** bit (it was replaced, so it can be freed once the current
checkpoint group commits). Sources are found by a CAM match on logical
register and Valid. Up to four destinations per cycle are taken from the free
bits, with renaming inside the group bypassed. When a checkpoint is taken, the
Valid and Future Free vectors are copied out and Future Free is cleared.

### Checkpoint table (`rtl/checkpoint_table.sv`)
There are eight entries. Each holds the Valid / Future Free snapshot, the
restart PC and counters of instructions and stores. Decode counts
instructions in, and completion broadcasts count them out. The oldest
checkpoint commits when its counter is zero and a younger one exists. This
frees the registers in the next checkpoint's Future Free copy. A rollback
restores the Valid bits. It also frees every register that is neither valid
in the restored map nor still needed by an older group.

### Checkpoint placement (`rtl/ckpt_policy.sv`)
A checkpoint is taken:
- at the first branch after 64 instructions;
- after 512 instructions;
- after 64 stores;
- at the first instruction after a rollback.

Decode stops in front of an instruction that needs a checkpoint while the
table is full.

### Pseudo-ROB and dependence mask (`rtl/pseudo_rob.sv`, `rtl/ll_dep_mask.sv`)
Decoded instructions also enter a 128-entry FIFO. They leave it as late as
possible (when it is full, or when the instruction queue has no room).

On the way out, a load that has not finished counts as a long-latency load.
A mask with one bit per logical register (32 bits) marks registers that
descend from a pending long-latency load. Each marked register carries the
identifier of that load. A leaving instruction that reads a marked register
is a dependent. It is invalidated in the instruction queue and written into
the SLIQ.

### Instruction queue (`rtl/issue_queue.sv`)
This is a conventional 128-entry queue with a ready bit per operand, wakeup
from the completion broadcast, and selection of up to four ready entries
(lowest slot first). It also takes invalidations by slot and sequence number.
Physical-register ready bits are in `rtl/preg_ready.sv`.

### SLIQ (`rtl/sliq.sv`)
The SLIQ is a 2048-entry circular buffer without wakeup logic. A small load
table (16 entries) records each long-latency load's register, checkpoint and
position in the buffer.

When a load's register is written, a walk starts 4 cycles later at the
load's position. It moves towards the tail, looks at 4 entries per cycle and
sends back those whose load has completed. A second load that completes
during the walk:
- if it lies ahead of the walk, the running walk picks it up;
- if it lies behind, the walk restarts from it.

### Top (`rtl/cooo_core.sv`)
The top module wires all of the above together. Its ports are plain signals
and arrays:
- decoded instructions in;
- issued micro-ops out;
- completion broadcasts in;
- rollback requests in;
- the commit event and per-mechanism event counters out.

Queue slots go first to SLIQ re-insertions, then to decode.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with a
reference model. Random stimulus is generated with `$urandom`.

`tb/tb_cooo_core.sv` (reduced sizes) and `tb/tb_cooo_core_full.sv` (all
paper parameters) run a synthetic program through the core. The program has
phases heavy in branches, in long branch-free runs and in stores. The tests
include:
- load misses of 150 or 1000 cycles;
- 10 % mispredicted branches.

They check:
- operand order at issue;
- single completion;
- in-order group commit;
- the restart PC;
- that the whole program commits.

They also require every mechanism to occur at least once: each checkpoint
reason, table-full stalls, commits, rollbacks, long-latency loads, moves,
re-insertions, walks and restarted walks.

## Deviations and own choices

- **No execution, memory or predictor hardware.** Only latencies and events
  are modelled, and no data values are kept.
- **Load identifiers.** SLIQ entries wait on a load identifier (load-table
  slot plus a generation count) instead of the physical register. A
  register can be freed and reused while a transitive dependent is still
  parked.
- **Older second load.** When a second load lying behind the walk completes,
  the walk restarts from that load's position. The description of this case
  is incomplete.
- **Parked-register bits.** An instruction can depend on two different
  long-latency loads but carries only one identifier. The SLIQ keeps one bit
  per physical register whose producer is parked, and holds such an
  instruction until both producers are back. Without this, the instruction
  queue can fill with instructions that cannot issue.
- **Mask kept over rollbacks.** The dependence mask is not cleared on a
  rollback, because surviving older chains must stay known.
- **Load table full.** A long-latency load that finds the load table full is
  treated as an ordinary instruction.
- **Pseudo-ROB recovery.** Branch recovery from inside the pseudo-ROB is not
  built; every rollback goes to a checkpoint.
- **Queue slots.** SLIQ re-insertion has priority over decode for queue
  slots.
- **Checkpoint limit.** At most eight checkpoints (3-bit identifiers). At
  most one checkpoint per decode group.

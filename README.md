# Soft-error reduction for an in-order instruction queue

An instruction queue that is protected only by parity has a problem. Most of
the parity errors it detects would never have changed what the program does:

- the struck instruction was on a wrong path, or its predicate was false;
- the struck bits belonged to a no-op, a prefetch or a branch hint;
- the instruction's result was never used.

Raising a machine check on every parity error turns these harmless upsets
into crashes, which are *false* detected-unrecoverable errors. This RTL
attacks the queue's error rate in two ways.

1. **Less exposure.** An instruction sitting in the queue during a long
   stall is a target for a particle strike. On an L1 data-cache miss, the
   queue squashes everything it holds and stays empty until the miss returns.
   The squashed instructions are then fetched again.
2. **Deferred judgement.** A detected error does not raise a machine check
   at once. Instead it sets a *pi* ("possibly incorrect") bit that travels
   with the instruction. The check is raised only at a point where the
   hardware knows that the corrupted value matters.

   - A second bit, *anti-pi*, marks neutral instructions. Errors outside
     their opcode field are ignored.
   - The default configuration carries pi through the register file and
     raises the check when a store commits its data. Three earlier stopping
     points can be selected with a parameter.

The design is written for an in-order, 6-wide machine with a 64-entry
queue. It contains only the pipeline pieces that store instructions or decide
their fate. The execution units, branch resolution, caches and fetch unit are
outside it and connect through ports.

## Block structure

```
fetch chunk ──► chunk_decoder ──► instruction_queue ──► issue_* ─► (execution core)
   ▲  parity, pi        pi, anti-pi       parity check, squash            │
   └── refetch_pc ◄─────────────────────────┘                            ▼
                                                     done_* ─► retire_unit
                                                                 │   │   │
                                             pi_regfile ◄────────┘   │   └──► pet_buffer (PI_PET only)
                                                                     ▼
                                                             pi_store_buffer ──► drain_* (data cache)
```

| File | Role |
|---|---|
| `rtl/serr_pkg.sv` | Instruction format, pi-mode and error-cause enums, opcode-class helpers |
| `rtl/chunk_decoder.sv` | Chunk parity check; copies the chunk pi bit to each instruction; sets anti-pi |
| `rtl/instruction_queue.sv` | 64-entry in-order queue: two parity bits per entry, the pi update on issue, squash-on-miss and refetch |
| `rtl/retire_unit.sv` | In-order commit; drops pi bits of uncommitted instructions; applies the tracking mode |
| `rtl/pi_regfile.sv` | One pi bit per architectural register, with optional propagation along dependences |
| `rtl/pi_store_buffer.sv` | Committed stores with their pi bits; error on drain; load lookup for marked data |
| `rtl/pet_buffer.sv` | Post-commit log that proves a marked instruction dead before it is evicted |
| `rtl/serr_core.sv` | Top level |

## The pi bit, end to end

Every instruction carries `{insn, pi, anti_pi}` (`tracked_insn_t`) from
decode to retire.

1. **Fetch chunk.** A chunk of up to six instructions arrives with one even
   parity bit and an incoming pi bit (`fetch_pi_i`). The incoming bit lets an
   earlier, parity-protected front-end structure pass its own error on.
   - If the parity is wrong, the chunk's pi bit is set.
   - Every instruction decoded from the chunk inherits the chunk's pi bit.
2. **Anti-pi.** The decoder sets anti-pi for the neutral opcode classes:
   `OP_NOP`, `OP_PREFETCH` and `OP_BRHINT`.
3. **Instruction queue.** Each entry holds the instruction plus two parity
   bits: one over the 4-bit opcode class, one over the rest. It also holds
   the stored pi and anti-pi bits. On issue the pi bit is recomputed:

   ```
   pi_out = pi_stored | opcode_parity_error | (rest_parity_error & ~anti_pi)
   ```

   An opcode error always counts, because a corrupted opcode could turn a
   no-op into a store. The pi and anti-pi bits themselves are not protected.
   A strike on pi therefore produces a false error. A strike on anti-pi can
   hide an error in a neutral instruction's operand field, which is harmless
   by construction.
4. **Retire.** A retire group is up to six executed instructions, returned
   in order with their wrong-path and predicate outcomes. An instruction that
   does not commit has its pi bit dropped; the `n_pi_ignored_o` port counts
   these. For committed instructions, `PI_MODE` decides what a set pi bit
   does:

| `PI_MODE` | A set pi bit on a committed instruction… | Machine check (`mc_cause_o`) | Offending instruction known? |
|---|---|---|---|
| `PI_TILL_COMMIT` | raises the check at once | `ERR_COMMIT` | yes |
| `PI_PET` | is logged in the PET buffer; the check comes at eviction unless the result is proven dead | `ERR_PET` | yes |
| `PI_REGFILE` | moves to the destination register. A later reader of that register raises the check. An instruction with no register destination (store, branch, I/O) raises it at once | `ERR_REG_READ`, `ERR_OUT_OF_SCOPE` | no: the reader is reported |
| `PI_STORE_COMMIT` (default) | is ORed with the pi bits of the sources and written to the destination, so it follows dependence chains | see below | no: the store or load is reported |

In `PI_STORE_COMMIT` mode, three events raise the check:

- a store whose pi bit is set drains to the data cache (`ERR_STORE`);
- a committing load matches a pi-marked store in the store buffer, or an
  older store in the same retire group (`ERR_LOAD_FWD`);
- an I/O access, or another instruction with no register destination, has
  its pi bit set when it commits (`ERR_OUT_OF_SCOPE`).

The last rule exists because the pi bit would otherwise go out of scope
silently. Branches fall under it.

Stores and loads are matched on address bits 31:3, which is an 8-byte
granule, and the youngest matching store wins.

If several machine checks arrive in the same cycle, one is reported, in this
order: the PET buffer, then the store-buffer drain, then the retire stage.

## Squash on a cache miss

`SQUASH_ON` selects the trigger:

| Value | Trigger |
|---|---|
| 0 | no squash |
| 1 (default) | `l1_miss_i` |
| 2 | `l0_miss_i` |

In the cycle the trigger is high:

- `squash_o` is high, and nothing issues or enters the queue.
- The whole queue is emptied on the next clock edge.
- If the queue held anything, `refetch_valid_o` is high and `refetch_pc_o`
  gives the oldest squashed instruction.
- The decoder stage is flushed. If the queue was empty, the refetch address
  is the first instruction waiting in the decoder.

The queue then holds itself empty (`iq_hold_o`) until `miss_done_i`, so
refetched instructions do not wait through the miss. For an in-order machine
nothing behind the missing load can issue anyway, which is why squashing
*everything* costs little performance.

The memory system outside the core must report the miss in the cycle after
the load issues. It must also stop issue (`issue_max_i = 0`) for the load's
dependants. The end-to-end testbench models this with a 25-cycle miss.

Only one outstanding miss is tracked. A second trigger while holding simply
squashes again; on an in-order machine there is nothing to squash.

## The PET buffer scan

The PET (post-commit error tracking) buffer is a FIFO of committed
instructions. Each entry holds the PC, destination, two sources and the pi
bit, and the buffer has 512 entries by default. It proves that a marked
instruction's result was dead by finding an overwrite before any read.

- **Eviction.** Entries leave when fewer than six slots are free, so a whole
  retire group always fits. Clean entries leave up to six per cycle.
- **Marked head, no destination.** The error is raised immediately, since
  there is nothing to prove.
- **Marked head with a destination register R.** The buffer enters `S_SCAN`
  and stops accepting pushes, which stalls retire. It then reads one younger
  entry per cycle, oldest first:
  - if the entry reads R, the error is raised (`err_pc_o` = the evicted
    instruction);
  - else if the entry writes R, the instruction was dead, nothing is raised
    and `false_err_o` pulses;
  - if the tail is reached without either, the error is raised.

  An instruction that both reads and writes R counts as a read.

A scan of a full buffer can take up to 511 cycles. Errors are rare enough
that this does not matter for performance.

## Parameters of `serr_core`

| Parameter | Default | Meaning |
|---|---|---|
| `PI_MODE` | `PI_STORE_COMMIT` | How far the pi bit travels (table above) |
| `W` | 6 | Fetch-chunk, issue and retire width |
| `IQ_DEPTH` | 64 | Instruction-queue entries |
| `SQUASH_ON` | 1 | 0 none, 1 L1 miss, 2 L0 miss |
| `NUM_REGS` | 128 | Architectural registers with a pi bit |
| `SB_DEPTH` | 16 | Store-buffer entries |
| `PET_DEPTH` | 512 | PET-buffer entries; the buffer exists only in `PI_PET` mode |

The instruction format in `serr_pkg` is generic, not a real ISA. An
instruction has:

- a 4-bit opcode class;
- a destination and two 7-bit source registers, each with a valid bit;
- a 16-bit immediate;
- a 32-bit PC.

This makes 76 bits in all.

## Where this departs from the published technique, or fills gaps

- **Caches and memory have no pi bits.** The technique's last step keeps
  pi bits in caches and memory and checks only on I/O. That step is not
  built, because the caches are outside this design.
- **PET tracking is by register only.** It does not track dead values
  through memory or through procedure returns. Larger PET sizes are only a
  parameter change.
- **Fetch throttling is not built.** It is the other exposure action, and it
  gave no gain beyond squashing.
- **Choices made here.** The following were not specified by the source:
  - the chunk width and its single parity bit;
  - the two-parity-bit split of a queue entry;
  - the squash rule "hold empty until `miss_done_i`";
  - the store-buffer size, and matching on 8-byte granules;
  - checking a load when it commits;
  - treating branches as out of scope;
  - the PET eviction margin and its one-entry-per-cycle scan;
  - the machine-check priority;
  - every handshake and reset value.
- **Register pi bits are written at commit.** The register-file pi bits are
  written in commit order, lanes in program order. They are not written at
  execute. For an in-order pipeline this gives the same outcome, and
  wrong-path results never reach the array.
- **Error granularity.** There is one pi bit per instruction and per 64-bit
  register, not one per byte.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With plain Verilator 5, from the
repository root:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module serr_core_tb rtl/serr_pkg.sv tb/serr_core_tb.sv -o sim
obj_dir/sim +verilator+rand+reset+2 +verilator+seed+1
```

Replace `serr_core_tb` with any other testbench module. `-y rtl -y tb` lets
Verilator find the sub-modules by name. Random initialisation
(`+verilator+rand+reset+2`) is recommended, because every state that is read
is reset.

| Testbench | What it exercises |
|---|---|
| `chunk_decoder_tb` | Parity and pi copy, anti-pi classes, handshake and flush |
| `instruction_queue_tb` | Cycle-exact reference of the queue. It covers enqueue compaction, issue limits, the pi rule for every parity-error case (strikes on random bits), squash, refetch address and hold on L1 misses, with L0 misses that must not squash |
| `pi_regfile_tb` | Propagation on and off; same-cycle read-after-write across lanes |
| `pet_buffer_tb` (32 entries) | Scan outcomes: true errors, proven-dead errors, no-destination errors, and stalls during the scan |
| `pi_store_buffer_tb` | Youngest-match lookup, drain order with back-pressure, error on drain |
| `retire_unit_tb` | All four modes against a reference model, with wrong-path and predicated-false lanes |
| `serr_core_tb` | The whole core at its default parameters, end to end |
| `serr_core_modes_tb` | The core in the commit, PET and register-file modes |
| `serr_core_squash_tb` | The same program with no squash, squash on L1 and squash on L0, compared for exposure and IPC |

In `serr_core_tb`, a generated 3000-instruction program runs with:

- bad chunk parity;
- random single-bit strikes on the queue;
- L0 and L1 misses;
- wrong paths and false predicates;
- data-cache back-pressure.

It checks:

- that every instruction issues and commits once, in order;
- that an instruction issued without a parity error is unchanged;
- the squash and refetch behaviour;
- every machine check (cycle, cause and PC) against a reference model of
  store-commit tracking.

It also counts each mechanism and fails if one never occurs: squash,
refetch, hold, chunk parity error, queue pi, anti-pi masking, ignored pi,
propagation, the store error, the forwarding error, the out-of-scope error,
and both stalls.

`serr_core_modes_tb` recomputes the PET decision from the log of committed
instructions.

## Using the core

To use the core in a pipeline:

- Feed `done_*` with the instructions that left `issue_*`. Return them in
  order, grouped from lane 0, with `wrong_path`, `pred_false` and the memory
  `addr` and `data` filled in.
- Stop issue while a miss is outstanding.
- Connect `drain_*` to the data cache.
- Tie `strike_i` low. It only models particle strikes for verification.

`iq_count_o` gives the queue occupancy in each cycle. Summing it over a run
measures the exposure that squashing removes.

## What squashing buys

`serr_core_squash_tb` runs one synthetic in-order program, with 10-cycle L0
and 25-cycle L1 misses, through the three trigger settings:

| `SQUASH_ON` | IPC | Valid entries / 64 | IPC per exposure |
|---|---|---|---|
| 0, no squash | 0.732 | 94% | 0.78 |
| 1, L1 miss | 0.731 | 65% | 1.12 |
| 2, L0 miss | 0.720 | 31% | 2.29 |

The queue is almost always full here, because fetch outruns issue. For that
reason the absolute numbers say more about the test program than about a
real workload. The trend is what matters, and the testbench checks it:

- squashing lowers exposure;
- squashing costs little IPC;
- L1 squashing is nearly free.

Occupancy is an upper bound on vulnerability: only the bits whose corruption
would change the outcome count. The printed figures are from a run at the
default parameters.

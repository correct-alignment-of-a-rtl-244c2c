# Return-address stack with correct alignment after call and return mispredictions

A return-address stack (RAS) predicts where a return instruction will jump. A
call pushes its return address, and a return pops the top entry and uses it
as the predicted target. In a speculative pipeline, calls and returns on a
mispredicted path push and pop too. The usual fix is to checkpoint the
top-of-stack pointer (TOS) with every branch and restore it when that branch
turns out to be mispredicted.

This RTL implements the *correct-alignment* variant of that repair. It
recognises that restoring the checkpoint verbatim is only right for branches
that do not touch the stack:

* A mispredicted **call** was still a call. Its target was wrong, but the
  return address it pushed is right. After recovery the TOS must therefore
  sit **one entry above** the checkpoint, on that return address. Otherwise
  the matching return later pops the caller's address instead.
* A mispredicted **return** was still a return. The entry it popped was the
  wrong address. After recovery the TOS must sit **one entry below** the
  checkpoint. Otherwise the next return is predicted with the same bad
  address again.
* Any other branch (conditional, jump) leaves the TOS **at the checkpoint**.

The three rules together keep the TOS equal to the program's real call depth,
modulo the stack size, after every recovery. The default design does exactly
this. It also offers two content repairs from the same line of work, as
parameters:

* restoring the checkpointed TOS entry's content;
* rewriting a mispredicted call's return address.

It also offers a second way of implementing the same rule.

## How recovery works

Let `c` be the TOS checkpointed with a branch before that branch touched the
stack, and `D` the stack depth. Indices wrap modulo `D`.

| mispredicted branch | recovered TOS | why |
|---|---|---|
| conditional / jump / other | `c` | the branch did not touch the stack |
| call | `c + 1` | the call's push was correct; the TOS lands on its return address |
| return | `c - 1` | the return's pop was correct; its popped entry is skipped |

Example, with a 32-entry stack holding `A` at index 4 (TOS = 4):

1. A call at PC `P` is fetched. It is checkpointed with `c = 4`, pushes
   `P+8` into index 5, and sets TOS = 5. It is then mispredicted: say its
   target was not in the BTB.
2. Before it resolves, the wrong path executes a return (TOS = 4) and a call
   (TOS = 5, index 5 overwritten with junk).
3. The call resolves as mispredicted. Restoring the checkpoint (TOS = 4) would
   make the callee's return predict `A`, the caller's own return address.
   Correct alignment sets TOS = 5 instead.
4. Index 5 still holds the wrong-path junk. With `CALL_UNCORRUPT = 1` the
   recovery also writes `P+8` back into index 5, because the call's PC comes
   with the misprediction. Then the next return is predicted correctly.

The content damage in step 4 is why alignment alone does not fix every
misprediction. Wrong-path pushes overwrite entries above the TOS, and
wrong-path pop-then-push sequences overwrite entries at or below it. Two
options address that:

* `UNCORRUPT = 1` saves the content of entry `c` with every checkpoint and
  writes it back on recovery. That entry is the one most often damaged.
* `CALL_UNCORRUPT = 1` rewrites a mispredicted call's return address, as in
  the example. It needs no checkpoint storage.

Entries further away are not repaired. That is a limit of the scheme, not of
this implementation.

### Checkpoint before or after the update

There are two ways to reach the same recovered TOS:

* **before** (default, `CKPT_AFTER = 0`): checkpoint the TOS before the
  branch's own push or pop, and apply the `+1 / 0 / -1` rule at recovery. The
  checkpoint does not depend on the branch type, so it can be taken before
  the type is known.
* **after** (`CKPT_AFTER = 1`): checkpoint the TOS after the branch's own
  push or pop, and restore it unchanged. The type must be known at
  checkpoint time. With `UNCORRUPT`, the content saved is that of the
  post-update top entry. For a call that is its own return address.

Both give the same TOS after every recovery. The testbenches check this
against the program's call depth in both modes.

## Blocks

```
                 pred_* (fetch)                    mis_* (resolve)
                      |                                  |
          +-----------v-----------+          +-----------v-----------+
          |  ras_ckpt_table       |<-- tag --|  (read by mis_tag_i)  |
          |  TOS (+content) per   |          +-----------+-----------+
          |  in-flight branch tag |                      | checkpoint
          +-----------^-----------+          +-----------v-----------+
                      | TOS, top             |  ras_align            |
          +-----------+-----------+  set TOS |  recovery rule,       |
 push/pop |  ras_stack            |<---------|  repair writes        |
--------->|  DEPTH x ADDR_W ring  |  writes  +-----------------------+
          |  + TOS pointer        |
          +-----------+-----------+
                      v
            pred_target_o (top entry)
```

| file | what it is |
|---|---|
| `rtl/ras_pkg.sv` | branch type enum `br_type_e`: `BR_OTHER`, `BR_CALL`, `BR_RETURN` |
| `rtl/ras_stack.sv` | ring of `DEPTH` return addresses in flip-flops, TOS pointer, push/pop, TOS override, two repair write ports |
| `rtl/ras_ckpt_table.sv` | per-branch checkpoint (TOS, and TOS content if `UNCORRUPT`), indexed by branch tag |
| `rtl/ras_align.sv` | combinational recovery: recovered TOS and repair writes from the checkpoint, the branch type and the branch PC |
| `rtl/ras_predictor.sv` | the top: wires the three together, with one prediction port and one misprediction port |

## Interface and timing of `ras_predictor`

The design handles one branch per cycle. All state changes on the rising
edge of `clk`. `rst_n` is an asynchronous, active-low reset that clears the
TOS, the stack and the checkpoints.

| port | dir | width | meaning |
|---|---|---|---|
| `pred_valid_i` | in | 1 | a branch is fetched this cycle |
| `pred_type_i` | in | `br_type_e` | its type |
| `pred_pc_i` | in | `ADDR_W` | its PC |
| `pred_tag_i` | in | log2 `NUM_TAGS` | tag under which its checkpoint is kept |
| `pred_target_valid_o` | out | 1 | high when the fetched branch is a return |
| `pred_target_o` | out | `ADDR_W` | predicted return address: the current top entry, combinational |
| `mis_valid_i` | in | 1 | a branch resolved as mispredicted |
| `mis_type_i` | in | `br_type_e` | its type |
| `mis_pc_i` | in | `ADDR_W` | its PC (used by call-uncorruption) |
| `mis_tag_i` | in | log2 `NUM_TAGS` | the tag it was given at fetch |
| `tos_o` | out | log2 `DEPTH` | TOS pointer |

Cycle behaviour:

* **Fetch cycle.** A return reads its prediction from `pred_target_o` in the
  same cycle. At the edge:
  * the checkpoint is stored under `pred_tag_i`;
  * a call pushes `pred_pc_i + INST_BYTES`;
  * a return pops.
* **Recovery cycle.** With `mis_valid_i` high, at the edge:
  * the TOS takes the recovered value;
  * the enabled repair writes are done.

  From the next cycle on, the stack is aligned. A prediction presented in the
  same cycle as a recovery belongs to the squashed path and is ignored.
* **The pipeline's side.** The pipeline allocates tags, and no two branches in
  flight may share one. It reports mispredictions oldest first and drops
  every younger branch after reporting one.

The stack is a ring with no overflow or underflow detection. A call chain
deeper than `DEPTH` overwrites the oldest entries, and the returns beyond
that depth are mispredicted.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 32 | stack entries (the published baseline; 8, 16 and 64 were also studied) |
| `ADDR_W` | 32 | address width |
| `INST_BYTES` | 8 | instruction size; a call's return address is its PC + `INST_BYTES` |
| `NUM_TAGS` | 128 | checkpoint slots = branches in flight (sized to a 128-entry instruction window) |
| `UNCORRUPT` | 0 | save and restore the TOS entry's content |
| `CALL_UNCORRUPT` | 0 | rewrite a mispredicted call's return address at recovery |
| `CKPT_AFTER` | 0 | checkpoint after the branch's own update instead of before |

The defaults are the published baseline: 32 entries, with only the TOS
recovered, under correct alignment. `DEPTH` need not be a power of two.

At the defaults the top synthesises to about 1,700 flip-flops. Most of them
are the 32 x 32-bit stack and the 128 x 5-bit checkpoint table.
`UNCORRUPT` adds 128 x 32 bits of checkpoint content.

## What is this design's own

The recovery rule, the two checkpoint points, and the two repair options
follow the published method. The method describes behaviour, not hardware.
So the following are choices made here:

* The RAS handles one operation per cycle, and a prediction is available in
  the fetch cycle. The stack is a flip-flop array with a combinational top
  read.
* Checkpoints live in a table indexed by a branch tag. It has 128 slots, the
  size of the instruction window of the baseline machine.
* The misprediction interface carries the valid bit, the type, the PC and the
  tag. Recovery takes one edge and has priority over a same-cycle fetch.
* Content repair writes the saved content into the checkpointed entry. With
  `CKPT_AFTER`, the content saved is the post-update top.
* Reset clears everything. Pops of an empty stack return whatever the entry
  holds.
* Several writes to one stack entry in a cycle follow a fixed priority:
  push, then call-uncorruption, then content repair.
* The return address is PC + 8. That is the instruction size of the
  simulated instruction set the method was evaluated on.

Not built: the out-of-order processor, the branch direction predictor, the
BTB and the caches of the evaluation platform. They decide *which* branches
are mispredicted, and that reaches this design only through the `mis_*` port.
The incorrect-alignment baseline and full-stack checkpointing, which the
method is compared against, are not built either.

## Verification

Each testbench checks itself, ends with a line
`TB_RESULT checks=<n> failures=<n>`, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb/ras_stack_tb.sv` | random push/pop/override/repair writes, including collisions, against a reference ring; wrap-around in both directions; the whole array |
| `tb/ras_align_tb.sv` | every checkpointed TOS x every branch type x all 8 option combinations, exhaustively |
| `tb/ras_ckpt_table_tb.sv` | random writes and reads against a reference, including read-before-edge |
| `tb/ras_predictor_tb.sv` | end to end, 8 configurations (both repairs on/off x checkpoint before/after), 100,000 branches each |
| `tb/ras_predictor_full_tb.sv` | end to end with every parameter at its default, 400,000 branches |
| `tb/ras_sweep_tb.sv` | 8/16/32/64 entries x resolve latency 5..30 with content repair; prints return misprediction rates and, for 32 entries, corruption by distance from the TOS |

The end-to-end tests use a pipeline model, `tb/ras_pipe_harness.sv`.

* **The program.** It generates a program on the fly with bursts of deep
  recursion that overflow the stack. It fetches up to one branch per cycle and
  resolves each branch 20 cycles later (configurable), oldest first.
* **Mispredictions.** Calls and other branches are mispredicted at random.
  Returns are mispredicted exactly when the predicted address differs from
  the program's real return address.
* **Wrong paths.** After a mispredicted branch, fetch follows a random wrong
  path until the branch resolves.
* **Checks every cycle.** The predicted address and the TOS are compared with
  a reference stack.
* **Checks after every recovery.** The TOS must equal the real call depth
  modulo `DEPTH`; this check does not rely on the reference. The repaired top
  entry is checked when a repair option is on.
* **Corruption by distance.** After every recovery the stack is compared,
  entry by entry, with a second stack that only correct-path branches update.
  Each differing entry is counted by its distance from the recovered TOS:
  0 is the TOS, 1 the entry below it, `DEPTH-1` the entry above it. An entry
  that is never repaired is counted again at every later recovery. The TOS
  of the two stacks must match after each recovery.
* **Mechanism coverage.** The top-level testbenches count these events and
  fail if any of them never happened:
  * pushes and pops;
  * TOS wrap-around;
  * recovery after each of the three branch types;
  * a fetch dropped by a same-cycle recovery;
  * content repair and call-uncorruption;
  * correct and wrong return predictions;
  * corruption at the recovered TOS and above it (default configuration).

The misprediction rates and corruption counts that the testbenches print come
from this synthetic program, so they are not rates for any real benchmark.
They still show the expected direction. Both repair options reduce
corruption at the recovered TOS. Content repair does more with
`CKPT_AFTER = 1`, where the saved entry is the recovered TOS itself; with the
default, a return's recovered TOS is the entry below the saved one. The return
misprediction rates of real programs, and the speed-up correct alignment
gives, depend on real code. None of the testbenches reproduces them.

## Running the tests

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/ras_pkg.sv tb/ras_predictor_full_tb.sv --top-module ras_predictor_full_tb
./obj_dir/Vras_predictor_full_tb
```

Replace the testbench name to run any other test. Each one runs in under a
second on a desktop machine, after a build of a few seconds. To lint the design:

```
verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/ras_pkg.sv rtl/ras_predictor.sv
```

One lint warning is expected: `wr_data_i` of `ras_ckpt_table` is unused when
`UNCORRUPT = 0`, because the content field is then not built.

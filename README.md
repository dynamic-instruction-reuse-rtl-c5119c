# Reuse buffers for dynamic instruction reuse

A program runs the same static instruction many times, and often with the
same inputs: a loop re-reads a value nobody changed, address arithmetic
recomputes the same address, and a mispredicted branch throws away work
that is then done again. Dynamic instruction reuse keeps the results of
executed instructions in a small table, the **reuse buffer (RB)**, indexed by
the program counter. When an instruction is decoded, the buffer is asked
whether a stored outcome is still correct. If it is, the instruction
skips the issue window and the functional units, takes the stored result
and goes straight to the reorder buffer. Results become available earlier,
so dependent instructions can start sooner, and execution resources are
freed for other work.

The difficulty is deciding, at decode and in one cycle, that an old result
is still correct. This RTL provides the three ways to do that as three
complete buffers:

| scheme | module | what an entry remembers | how it knows the result is still good |
|---|---|---|---|
| **Sv** | `rb_sv` | the operand *values* | compare the values with the current operand values |
| **Sn** | `rb_sn` | the operand *register names* | a valid bit, cleared when one of those registers is written |
| **Sn+d** | `rb_snd` + `rb_rst` | operand names plus, per operand, the buffer entry that produced it | the valid bit, plus a check that the producer recorded for each dependent operand is still that register's newest producer |

`reuse_top` instantiates all three side by side, each with its own ports, so
that a core model or a testbench can drive them with the same instruction
stream and compare them.

## What a reuse buffer entry holds

All three buffers are looked up by the PC (bits 31:2 as the tag), are fully
associative, and replace entries in FIFO order. The Sv buffer can optionally
be made set associative. By default they have 128 entries and handle 4
lookups, 4 result writes and 4 commits per cycle.

* ALU and control instructions reuse their whole result.
* Loads split into two parts. The address calculation is reused like an
  ALU result. The loaded value is reused only when a `memvalid` bit says that
  no store has written that address since the value was loaded.
* Stores reuse only their address calculation. The memory write itself
  always happens.

## Scheme Sv: compare values

An Sv entry stores the operand values the instruction last ran with. At
decode, an entry matches when the tag equals the PC and every register
operand is known and equal to the stored value. This needs the operand
values at decode, which is the cost of the scheme: an operand that is still
being computed (not `src_known`) blocks reuse.

Within a decode group, an operand written by an earlier instruction in the
same group takes that instruction's *reused* result. So a chain such as
`add r1,..; sub r2,r1,..; lw r3,0(r2)` can be reused whole in one cycle if its
head is. If the earlier instruction was not reused, its result is not known
yet, and the dependent instruction is not reused either.

## Scheme Sn: names and a valid bit

An Sn entry stores operand register *names* and a `resultvalid` bit. When a
committing instruction writes register `r`, every entry that names `r` as
an operand loses `resultvalid`. A valid entry therefore says that its
operand registers have not been written since its result was computed, and
no values have to be read at decode.

The catch is that this speaks only about the architectural register file. If
an older instruction that writes an operand register is still in flight,
the entry may be about to become stale. Such an operand (`src_inflight`, or a
write by an earlier instruction of the same group) blocks reuse. So Sn
reuses independent instructions well but cannot reuse a chain whose members
depend on each other within the window.

## Scheme Sn+d: dependence links (the hard part)

Sn+d lets a whole dependent chain be reused. Its two parts are the entries'
**src-index** fields and the **Register Source Table (RST)**.

**The RST** (`rb_rst`) has one slot per architectural register (67: 32
integer, hi, lo, 32 floating point, fcc). A slot holds
`{valid, committed, handle}`. The handle names the RB entry that holds, or
will hold, the newest value of that register. `valid` is clear when that
producer is not in the buffer. `committed` says the producer has retired,
so the register file already holds its value. Decode updates the RST the way
a rename map is updated. Both a reused instruction and a newly reserved one
point their destination register at their entry.

**src-index.** When an instruction is given an RB entry, each operand
records the RST slot of its register at that moment:

* If the slot is valid, the operand is *dependent* and remembers its
  producer's entry.
* If it is not valid, the operand is *independent*.

**Reuse test.** An entry is reused when all of these hold:

* the tag matches and `resultvalid` is set;
* every dependent operand's src-index still equals the RST slot of that
  register, so the same producer instance supplies the value;
* no independent operand has a producer in flight.

The RST is not consulted only once per cycle. A working copy is passed
from slot 0 to slot 3 of the decode group, and each slot's reuse or
reservation updates it before the next slot is tested. Take a chain `I, J, K`
that ran before and sits in entries `eI, eJ, eK`. The entries record
`J.src = eI` and `K.src = eJ`. Now decode `I, J, K` again:

1. `I` is independent and valid, so it is reused, and the working RST maps
   `I`'s destination to `eI`.
2. `J`'s dependent operand reads `eI` from the working RST and matches, so
   `J` is reused. The working RST now maps `J`'s destination to `eJ`.
3. `K` matches in the same way.

The whole chain is reused in one cycle, without one operand value being
read. Entries reserved earlier in the same cycle are never treated with
their old contents, neither as a candidate nor as a producer.

**Invalidation.**

* A committed register write clears `resultvalid` only of entries that use
  the register as an *independent* operand. Dependent operands are covered by
  the src-index test, which already fails once a newer producer has been
  decoded.
* When FIFO replacement evicts entry `E`, every entry with an operand whose
  src-index is `E` loses `resultvalid`, because `E`'s slot can now be reused
  for something else. There is one exception. If `E` is the committed, newest
  producer of its register, the register file holds exactly `E`'s value, and
  those operands are turned into independent operands instead of being
  invalidated. The `ev_converted` output reports each such event.
* A committing store clears `memvalid` of entries with the same word
  address.

**Branch repair.** The RST is speculative, so like a rename map it is
checkpointed at each predicted branch (the `ckpt` flag of a decode slot,
with `ckpt_id`) and reloaded from a checkpoint when the branch turns out
mispredicted (`restore`, `restore_id`). There are 8 checkpoints, one per
unresolved branch. Checkpoints are kept correct while they wait:

* an eviction clears pointers to the evicted entry in every checkpoint,
  including one taken earlier in the same cycle;
* a commit sets `committed` in every checkpoint whose slot still points at
  the committing entry.

Wrong-path instructions that were given entries keep them. After the
restore, those results can be reused when the same instructions come
around on the correct path with the same producers. This is the source of
the squash reuse the scheme is meant to capture.

## Interface and timing

Each buffer has three port groups, one for each pipeline stage that uses it.

**Decode, `lk_*` (combinational plus a clock edge).** The core presents up to
`LOOKUPS` instructions in program order as `lookup_req_t`. The fields are PC,
kind (ALU, load, store), operand names, operand values with known/in-flight
flags, destination, `st_pending`, and a checkpoint request. In the same cycle
the buffer answers:

| output | meaning |
|---|---|
| `lk_hit` | result or load value reused |
| `lk_addr_hit` | load/store address reused |
| `lk_result`, `lk_address` | the reused values |
| `lk_alloc` | an entry is reserved at the clock edge |
| `lk_handle` | `{epoch, index}` of the reserved entry, or of the reused one |

A store whose address is reused reserves nothing.

**Execute, `wr_*`.** Any later cycle, the core writes result, address and
operand values with the handle it got at decode. The entry then takes part
in reuse tests. The epoch bit in the handle makes a write to an entry that
has since been replaced harmless: it is dropped.

**Commit, `cm_*`.** Register writes and store addresses of retiring
instructions drive the invalidations above. Sn+d also takes the committing
handle (`cm_handle`, the handle the instruction got at decode, reserved or
reused) to mark the RST `committed` bit.

**Restore (Sn+d only).** `restore` reloads the RST in a cycle with no
decode. An assertion checks this.

Everything is reset asynchronously by `rst_n` (active low) to an empty
buffer.

## Rules this design adds

The schemes say what an entry means. Connecting them to a pipeline needed
some extra rules, which are this design's own:

* **Reservation and handles.** Entries are reserved at decode and filled
  when the result arrives. A `filled` bit keeps half-written entries out of
  reuse tests. The epoch bit protects against late writes.
* **In-flight operands in Sn/Sn+d.** An entry reserved while an
  independent operand was still in flight never becomes valid (`nv` bit).
  Its result was computed from a value the architectural register did not
  yet hold, so the commit-time invalidation could not protect it.
* **Older stores.** `memvalid` only knows about *committed* stores. A load is
  therefore not given its value while an older store is uncommitted
  (`st_pending`, or a store earlier in the same group). A load whose value
  was forwarded from an uncommitted store (`wr_req.fwd`) never sets
  `memvalid`. A store committing while a load entry waits for its value
  prevents `memvalid` from being set (`memkill`).
* **Mixed operands.** Independent/dependent is decided per operand, so one
  instruction can have one of each.
* **The `committed` condition** on the eviction exception above.
* **Priority.** When several entries match, the lowest index wins.

## Where this departs from the original proposal

* Only the reuse buffers and the RST are built. The out-of-order core around
  them is the user's, and `reuse_top` exposes the ports where it connects:
  fetch, instruction queue, rename, issue window, reorder buffer, register
  file, functional units, branch predictor, load/store queue and caches.
* The Sv buffer can also be set associative: `WAYS` on `rb_sv`
  (`SV_WAYS` on `reuse_top`), with PC bits 3 and up choosing the set and a
  FIFO pointer per set. Set associativity is studied mainly for Sv, at
  4 ways. Sn and Sn+d are built fully associative only.
* Buffer sizes of 32 and 1024 entries are a change of the `ENTRIES`
  parameter (a power of two). The default is 128.
* Data width is 32 bits and register names are 7 bits (a MIPS-I-like
  machine). Addresses are compared per 32-bit word.

## Cost

Every lookup slot compares against every entry, so the buffers are large.
A generic (technology-independent) yosys synthesis at the default 128
entries gives about 20k cells and 21k flip-flop bits for `rb_sv`, 21k cells
and 15k flip-flop bits for `rb_sn`, and 7.7k cells and 6k flip-flop bits
for `rb_rst` with its 8 checkpoints. Elaborating `rb_snd` and the whole top
for synthesis takes several minutes at that size.

## Files

| file | contents |
|---|---|
| `rtl/rb_pkg.sv` | shared types: request structs, kinds, widths |
| `rtl/rb_sv.sv` | scheme Sv buffer |
| `rtl/rb_sn.sv` | scheme Sn buffer |
| `rtl/rb_snd.sv` | scheme Sn+d buffer, instantiates `rb_rst` |
| `rtl/rb_rst.sv` | register source table with checkpoints |
| `rtl/reuse_top.sv` | the three buffers side by side |
| `tb/tb_prog_pkg.sv` | small instruction set and golden model for the tests |
| `tb/tb_rb_*.sv` | directed/randomised unit tests per block |
| `tb/tb_reuse_top.sv` | end-to-end test at full default size |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -j 8 --top-module tb_reuse_top \
  rtl/rb_pkg.sv tb/tb_prog_pkg.sv rtl/rb_rst.sv rtl/rb_sv.sv rtl/rb_sn.sv \
  rtl/rb_snd.sv rtl/reuse_top.sv tb/tb_reuse_top.sv
obj_dir/Vtb_reuse_top +verilator+seed+3
```

For a unit test, replace the top module and the last file with
`tb_rb_sv`, `tb_rb_sn`, `tb_rb_snd` or `tb_rb_rst`.

What the tests cover:

* **`tb_reuse_top`** runs the three buffers at their default size (128
  entries, 4-wide) under one model pipeline. It executes about 6000
  instructions of a random program with loops, loads, stores and
  mispredicted branches. Mispredictions run a wrong path, restore the RST and
  reconverge. Every reused result, address and load value is checked
  against an architectural golden model. The test also counts each
  mechanism and fails if one never happens:
  * hits per scheme;
  * chain reuse in Sv and Sn+d;
  * Sn+d reuse that Sn misses;
  * load-value, address-only and store-address reuse;
  * evictions and conversions;
  * restores;
  * reuse after a squash.

  A fourth buffer, Sv organised as 32 sets of 4 ways, runs on the same
  stream and is checked the same way.

  It runs in well under a second. The seed changes the program.
* **`tb_rb_sv`, `tb_rb_sn`, `tb_rb_snd`** are directed tests on 8-entry
  buffers: chain reuse in one group, the invalidation rules, loads and
  stores, replacement and stale handles, checkpoint restore, and eviction
  with and without conversion. `tb_rb_sv` also checks the set-associative
  placement and per-set replacement.
* **`tb_rb_rst`** drives the RST randomly and compares it with a
  behavioural reference.

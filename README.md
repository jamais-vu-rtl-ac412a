# A fence unit against microarchitectural replay attacks

In an out-of-order core, a squash (exception, branch misprediction, memory-consistency
violation) throws away the younger instructions in the reorder buffer (ROB) and fetches
them again. An attacker who can cause squashes over and over can make one secret-dependent
"transmitter" instruction execute many times, and so remove the noise from any side channel
it drives. This is a *microarchitectural replay attack*. It works even when the transmitter
is supposed to run only once.

The unit in this repository stops the replay. It records which instructions were squashed
(the *Victims*). When a Victim is about to enter the ROB again, the unit tells the pipeline to
put a fence in front of it. A fenced instruction may not execute until its *Visibility Point*
(VP), the moment when nothing older can squash it any more. After that it runs once, and the
attacker gets one more observation at most.

The hard part is deciding how to remember Victims and when to forget them. The unit offers three
answers, which run side by side; an input selects the one the pipeline obeys.

| Scheme | What is recorded | When it is forgotten | Cost |
|---|---|---|---|
| Clear-on-Retire | Victim PCs in one Bloom filter, plus the oldest Squashing instruction (ID) | when the ID instruction reaches its VP | 1232 bits |
| Epoch-Rem | Victim PCs in one counting Bloom filter per *epoch* (loop or loop iteration) | a PC when that Victim reaches its VP; an epoch when a younger epoch starts retiring | 12 × 1232 × 4 bits |
| Counter | a 4-bit counter per static instruction (squashes minus retirements) | never; kept in memory, cached | 4 KB Counter Cache |

Clear-on-Retire is the cheapest and the weakest. Epoch-Rem with loop epochs gives the strongest
bound for the cost. Counter is as strong, but it needs memory pages of counters that the OS
manages.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/jv_pkg.sv` | package | sizes, enums, hash function, wrapping epoch compare |
| `rtl/bf_hash.sv` | `bf_hash` | the n hash functions: PC → n filter indices |
| `rtl/bloom_filter.sv` | `bloom_filter` | one PC Buffer: plain (K = 1) or counting (K bits) Bloom filter |
| `rtl/sb_cor.sv` | `sb_cor` | Clear-on-Retire Squashed Buffer (SB): filter + ID register |
| `rtl/sb_epoch.sv` | `sb_epoch` | Epoch SB: 12 {ID, PC-Buffer} pairs + OverflowID |
| `rtl/epoch_tracker.sv` | `epoch_tracker` | epoch IDs from start-of-epoch markers, reset on squash |
| `rtl/counter_cache.sv` | `counter_cache` | 32-set, 4-way cache of Squashed Counters with a memory port |
| `rtl/squash_alarm.sv` | `squash_alarm` | alarm when one instruction squashes the pipeline too often |
| `rtl/jamais_vu_top.sv` | `jamais_vu_top` | the whole unit |
| `tb/tb_<module>.sv` | | one self-checking testbench per module |

## How the unit meets the pipeline

The ROB, the fence itself and the memory hierarchy belong to the host core. The unit sees
four kinds of events:

* **Insertion** (`ins_*`, 2 lanes). Each instruction about to enter the ROB gives its PC,
  ROB index and start-of-epoch marker. The unit returns a fence bit for each scheme:
  Clear-on-Retire and Epoch one clock later, Counter two clocks later (plus
  `cc_pending`). `fence_valid`/`fence` give the selected scheme's answer with that scheme's
  latency.
* **Squash** (`squash_*`, one cycle). It names the Squashing instruction: its PC, its ROB
  index, and whether it leaves the ROB (`squash_removed`: an exception or a consistency
  violation) or stays (a mispredicted branch).
* **Updates** (`upd_*`, valid/ready, one per transfer, in order):
  * `UPD_VICTIM`: each squashed instruction, oldest first, right after the squash.
  * `UPD_VP`: an instruction reached its VP. It carries the fence flags that the Epoch and
    Counter schemes gave it at insertion, so that only fenced Victims are removed or
    decremented.
  * `UPD_CTX`: a context switch, which flushes the Counter Cache to memory.

  Only a Counter Cache miss or a flush makes the channel wait.
* **Counter memory** (`mem_*`). Requests carry the virtual address of a 64-byte counter line
  (instruction line address + `cc_offset`). The TLB and the caches answer. Writes get no reply.

`cor_clear` pulses when Clear-on-Retire forgets everything. The pipeline must then drop every
fence that Clear-on-Retire placed; those instructions may execute at once. `alarm` pulses
when one Squashing instruction exceeds its squash budget.

## The Squashed Buffers

**Bloom filters.** The PC Buffer is an array of M = 1232 entries. Seven hash functions of
the PC select seven of them. A plain filter sets the selected bits on insert. A counting
filter increments the selected 4-bit entries on insert and decrements them on remove. A PC is
"in" the filter when all seven entries are non-zero. A false positive only causes a needless
fence. A counting filter can also give false negatives, for two reasons:

* A non-Victim that aliases onto Victims is fenced. At its VP it removes entries that
  belong to Victims.
* An entry saturates at 15, and the increments beyond that are lost.

The hash functions (`jv_pkg::bf_hash_idx`) are a multiply/xor-shift mix of the PC folded to
32 bits, salted per function and scaled to [0, M) by a multiply-high. Any well-mixed family
will do. M need not be a power of two.

**Clear-on-Retire ID.** ID holds the oldest Squashing instruction since the last clear. Age is
the distance from `rob_head` in the circular ROB. A branch that stays in the ROB is tracked
by its ROB index. An instruction that left the ROB is tracked by its PC. When that PC is
inserted again, ID takes its new ROB index. When the ROB index in ID reaches its VP, the
filter and ID are cleared.

**Epochs.** The compiler marks the first instruction of every epoch with an ignored
instruction prefix. Calls and returns also start epochs. `epoch_tracker` numbers the
epochs and keeps the ID of every ROB entry. After a squash, the first re-inserted instruction
gets the epoch ID of the oldest squashed one. In `sb_epoch`:

* A Victim goes into the pair that owns its epoch. If no pair owns it, a free pair is taken.
* If no pair is free, the epoch *overflows*. OverflowID then holds the highest overflowed epoch.
* Every instruction of an epoch that owns no pair and is not above OverflowID is fenced. Such
  an epoch never takes a pair later, so all of its instructions stay fenced until it retires.
* When the first instruction of epoch E reaches its VP, all older pairs are freed. OverflowID
  is cleared once E is younger than it.

Epoch IDs are 8 bits wide and compared in wrapping arithmetic. This is safe while fewer than
128 epochs are in flight; a 192-entry ROB cannot hold more epochs than that in practice.
Parameter `REM = 0` gives Epoch without removal. Loop versus iteration epochs is a compiler
choice, not a hardware one.

## The Counter Cache

Each instruction byte has a counter byte in memory at VA + Offset; the counter is its low
4 bits. The cache keeps only those 4 bits, so a 64-byte counter line becomes 256 bits. The
cache is indexed and tagged by the instruction's line address. Two side-channel rules shape it:

* A lookup never changes state. A hit returns the counter. A miss returns CounterPending,
  which also fences, and fetches nothing.
* LRU state moves, and misses are fetched, only for a VP update (`CC_DEC`) or a squash update
  (`CC_INC`). Both happen after the fact.

A miss on an update writes back a dirty victim line, reads the counter line, installs it and
applies the update. The counter saturates at 15 and does not go below 0. An instruction is
fenced while its counter is above `THRESH`. The default `THRESH = 0` fences any non-zero
counter.

## Repeated-squash alarm

Fencing cannot stop an instruction that is itself the Squashing one from faulting again and
again. `squash_alarm` counts squashes per Squashing PC in an 8-entry table. The entry is freed
when that instruction reaches its VP. The fifth squash (`THRESH = 4`) raises the alarm.
The table size and the threshold are this design's choices; all that is specified is
"a very small number".

## Parameters

All defaults are the evaluated configuration, except those marked *own*.

| Parameter | Default | Meaning |
|---|---|---|
| `ROB` | 192 | ROB entries |
| `M` | 1232 | entries per Bloom filter |
| `N` | 7 | hash functions |
| `K` | 4 | bits per counting entry |
| `P` | 12 | {ID, PC-Buffer} pairs |
| `SETS`, `WAYS` | 32, 4 | Counter Cache geometry (`SETS` ≥ 2) |
| `CW`, `LB` | 4, 64 | counter bits, line bytes |
| `PCW` | 48 (*own*) | PC width |
| `EW` | 8 (*own*) | epoch ID width |
| `L` | 2 (*own*) | insertion lanes (14 read ports / 7 hashes) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/jv_pkg.sv rtl/*.sv \
          tb/tb_jamais_vu_top.sv --top-module tb_jamais_vu_top -Mdir obj
./obj/Vtb_jamais_vu_top
```

Replace `tb_jamais_vu_top` with any other `tb_<module>`. `tb_jamais_vu_top` runs the whole
unit at its default size in well under a second. Its first part is a replay attack:

* ten Squashing instructions, each squashed five times at the ROB head, precede a
  secret-dependent division;
* the testbench's ROB model counts how often the division executes and is then squashed;
* result: 50 replays with fences ignored, 10 with Clear-on-Retire, 1 with Epoch and 1 with
  Counter, with the alarm raised once per Squashing instruction.

Its second part squashes 19 epochs with 12 pairs. It checks the overflow fencing, then a
context-switch flush. It counts each mechanism of the unit and fails if one never happens.
The block testbenches use small sizes so that the corner cases happen often: 4 pairs (the
six-epoch overflow example, with and without removal), a 2 × 2 Counter Cache, and 2-bit
counting entries.

## Limits and departures

* Only the fence *decision* is built. The fence in the pipeline, the ROB, the VP logic, the
  TLB and caches, and the compiler pass that places epoch markers are outside this unit.
* Saving and restoring the Squashed Buffers at a context switch is not built. The buffers
  have no port through which their contents could be read out or written back. Only the
  Counter Cache flush, the Counter scheme's context-switch action, is built.
* Events are serialized: one Victim or one VP per cycle on a single update channel. A core
  that retires several instructions per cycle needs to queue them. Only VPs that matter need
  to be sent: the ID instruction, epoch starts, fenced instructions and tracked squashers.
* Squash-time counter increments that miss in the Counter Cache are fetched like VP
  decrements. Nothing specifies this case.
* A fully associative Counter Cache (`SETS = 1`) is not supported.
* Synthesis of the full-size Epoch SB is slow with open-source tools. Its 59,136 flip-flops
  have seven hashed write ports each.

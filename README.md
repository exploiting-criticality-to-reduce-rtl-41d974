# Criticality-guided branch misprediction trace cache

A deep pipeline pays for each branch misprediction with a full refill of its
front end: fetch, decode and rename must run again before the execution core
gets any work. Right after such a flush, the instructions that follow the
branch tend to sit on the critical path of the program at their *decode*
step. Nothing else is in flight, so each waits only for the front end. A run
of such instructions after a branch is called a **critical D chain**, and its
length says how much a faster front end would help after that branch.

This RTL caches, for a few chosen branches, the predecoded instructions that
followed them the last time they were mispredicted. When one of those
branches is mispredicted again, the cached trace goes straight to rename and
skips fetch and decode. The cache is tiny: five traces of up to 100 8-byte
instructions, 4000 bytes in all. So the real design question is which
branches deserve a slot. Each branch gets a *value* built from its history:
by default its mean critical D chain length times the number of times it was
mispredicted. The cache always keeps the branches with the largest values.

The design sits beside a 4-wide out-of-order core with a 128-entry reorder
buffer (ROB). The core, and the criticality predictor that marks instructions
D-critical, are not part of this RTL. They connect through the ports of
`crit_bmtc_top`.

## The parts

| module | role |
|---|---|
| `trace_buffer` | circular buffer of every instruction entering rename; one entry per ROB entry |
| `dchain_tracker` | one chain-length counter per ROB entry, started by a branch |
| `abib` | auxiliary branch information buffer: per-branch mean chain length, misprediction count and last trace |
| `value_compute` | updates mean and count, forms the replacement value |
| `bmtc` | branch misprediction trace cache: 5 fully-associative entries of trace + value |
| `min_value_select` | finds the weakest cache entry |
| `bmtc_sequencer` | plays a cached trace into rename, 4 instructions per cycle |
| `update_ctrl` | commit-time update of the ABIB and the cache |
| `crit_bmtc_top` | wires it all together, with the decoder/cache multiplexer in front of rename |
| `crit_pkg` | shared sizes, types and the value-scheme enumeration |

## Life of a mispredicted branch

**1. Dispatch.** Every instruction that enters rename also enters the
trace buffer. Rename gets them from the decoder, or from the cache during a
replay. The buffer has exactly as many entries as the ROB. The core must
allocate ROB entries in the same order (`rn_rob_base` is the ROB index of
lane 0). A buffer position is then the same as a ROB index, so the position
saved for a branch is just its ROB index.

**2. Counting the chain.** When a branch is dispatched into ROB entry *i*,
counter *i* of `dchain_tracker` restarts at 0 and becomes active. Each later
instruction that the predictor flags D-critical (`rn_dcrit`) adds one to
every active counter. The first instruction that is not D-critical freezes
them. Within a 4-wide group, lanes are applied in program order. Counters
saturate at 511.

**3. Misprediction (from execute).** `mp_valid` carries the branch address
and ROB index, and three things happen in the same cycle:
* the trace buffer drops everything younger than the branch and resumes
  writing right after it;
* the branch's chain counter restarts, so only correct-path instructions count;
* the branch address is looked up in the cache.

On a hit, `skip_valid`/`skip_len` tell fetch how many instructions the cache
will supply. From the next cycle the sequencer owns the rename input.
`rn_from_bmtc` is high and the decoder is held (`dec_ready` low) until the
trace is used up, at 4 instructions per accepted cycle. A 100-instruction
trace takes 25 cycles. On a miss the normal refill path is used. No
instruction reaches rename in the misprediction cycle itself.

**4. Commit.** When the mispredicted branch reaches the ROB head, the core
pulses `cm_valid` with its address and ROB index. `update_ctrl` then works
through these steps:

| step | cycles | what happens |
|---|---|---|
| start | 1 | reads the chain length of the branch's ROB entry. The trace is the instructions after the branch in the trace buffer, at most 100. |
| COPY | ceil(len/4) | copies the trace into the branch's ABIB record. Meanwhile the trace buffer takes no input (`tb_hold`), which holds the decoder. |
| ABIB record | 2, overlapping COPY | mean and count are updated and the new value is formed (see below) |
| DECIDE | 1, more if the victim is being replayed | if the branch is cached, only its value is replaced. If not, and the new value is *strictly larger* than the weakest entry's (or an entry is empty), that entry is evicted. Otherwise nothing changes. |
| FILL | ceil(len/4) + 1 | copies the trace from the ABIB into the evicted entry |
| ENTRY | 1 | writes tag, value and length, and makes the entry valid |

Traces always enter the cache from the ABIB, never straight from the trace
buffer. Comparing every new value against the weakest cached value keeps the
largest values in the cache at all times. Only one update runs at a time. A
commit that arrives while one is running is ignored, and `upd_drop` pulses.
The only cost is a slightly staler value.

## The value of a branch

`value_compute` keeps a running mean with a multiplier, an adder and a
divider:

    cnt'  = min(cnt + 1, 65535)
    mean' = floor((mean * (cnt' - 1) + len) / cnt')

The division truncates, so the mean drifts slightly low, as any
finite-precision version does. The replacement value is chosen by the
`SCHEME` parameter:

| `SCHEME` | value | comment |
|---|---|---|
| `VS_WEIGHTED` (default) | mean' × cnt' | the best performer in the evaluation |
| `VS_TOTALS` | cnt' | nearly as good |
| `VS_MEAN` | mean' | almost no gain: rare branches with long chains win slots |

Misprediction counts reach tens of thousands while chain lengths stay in the
hundreds, so the weighted value is dominated by the count. Anyone wanting to
experiment with a different weighting should start in `value_compute`, which
is purely combinational.

## Sizes

| parameter | default | origin |
|---|---|---|
| `WIDTH` | 4 | 4-wide core of the evaluation |
| `ROB_ENTRIES` | 128 | ROB of the evaluation; trace buffer depth (power of two) |
| `MAX_TRACE` | 100 | longest trace |
| `INSTR_W` | 64 | 8-byte predecoded instruction |
| `BMTC_ENTRIES` | 5 | main configuration; 10 was also evaluated |
| `ABIB_ENTRIES` | 64 | this design's choice (see below) |
| `CHAIN_W` | 9 | chains stay below 500 |
| `CNT_W` | 16 | up to ~30,000 mispredictions per branch |
| `ADDR_W`, `PC_LSB` | 32, 3 | this design's choice |

The cache holds 5 × 100 × 64 bits = 4000 bytes of traces. The ABIB trace
store is 64 × 100 × 64 bits (50 KB). It can live far from the core because
nothing on the lookup path reads it.

## Where this RTL departs from, or fills in, the original proposal

* **ABIB organisation.** The proposal treats the ABIB as an ideal, infinitely
  large, fully-associative table. Here it is a 64-record direct-mapped table
  tagged with the full branch address. A branch that maps onto a record owned
  by another branch takes the record over and starts again from count 0.
  Associativity, size and replacement of this structure were left open.
* **Trace buffer input.** The proposal feeds the buffer from decode. Here it
  is fed from the rename input, after the decoder/cache multiplexer, so that
  replayed instructions also occupy their ROB positions. While full or while
  being copied out, the buffer *holds* its sender instead of losing
  instructions.
* **When the cache is looked up.** The text ties the lookup to commit. The
  pipeline drawing takes the branch address from execute. The lookup is done
  when execute reports the misprediction, since the trace has to replace the
  refill. The update is done at commit.
* **Data path into the cache.** The pipeline drawing also shows a direct
  trace-buffer-to-cache path. Here every trace passes through the ABIB.
* **Chain boundaries across a redirect.** A misprediction ends every other
  growing chain. The proposal says nothing on this.
* **Cached trace on a value update.** When a cached branch is mispredicted
  again, only its value is refreshed. The stored trace is kept.
* **Replay protection.** An update that would evict the entry being replayed
  waits in DECIDE until the replay has finished.
* **Not built:** the criticality predictor, which is prior work; only its
  per-instruction flag is an input. Also not built: the alternative update
  method that keeps the best value outside the cache in a register, which
  performed worse and was dropped, and pattern-history indexing of the ABIB,
  which was measured but not used.

## Interface summary (`crit_bmtc_top`)

| group | signals | notes |
|---|---|---|
| decoder | `dec_valid[4]`, `dec_instr[4]`, `dec_ready` | valid lanes contiguous from lane 0 |
| rename | `rn_valid[4]`, `rn_instr[4]`, `rn_from_bmtc`, `rn_rob_base`, `rn_ready` | a lane moves when `rn_valid & rn_ready` |
| core flags | `rn_is_branch[4]`, `rn_dcrit[4]` | for the instructions shown on `rn_*` in the same cycle |
| execute | `mp_valid`, `mp_addr`, `mp_rob_idx`; `skip_valid`, `skip_len` | |
| commit | `retire_cnt` (0–4), `cm_valid`, `cm_addr`, `cm_rob_idx` | |
| status | `tb_hold`, `upd_busy`, `upd_drop`, `ev_insert`, `ev_value_update`, `ev_reject` | |

All state resets asynchronously on `rst_n` low. Trace contents need no reset
because they are only read under a valid length.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
against an independent model and prints `TB_RESULT checks=N failures=M`:

* `tb_value_compute`: all three schemes against integer arithmetic, random
  and corner cases (empty record, saturated count).
* `tb_min_value_select`: 5 and 10 entries, random patterns.
* `tb_dchain_tracker`: directed chains, saturation, restart on a
  misprediction, and a random stream against a per-instruction model.
* `tb_trace_buffer`: random writes, retires, flushes and locks. Checks
  pointer, occupancy, both hold conditions and every stored word.
* `tb_abib`: mean/count sequences, aliasing records, update latency, and
  trace store read-back.
* `tb_bmtc`: random writes with both lookup ports, trace reads and weakest
  entry checked every cycle.
* `tb_bmtc_sequencer`: replays of every length with rename back-pressure and
  interrupted replays. Checks the cycle count.
* `tb_update_ctrl`: the controller with a real ABIB and cache. After every
  commit the cache contents (branches, values, lengths, traces) must equal a
  model of the replacement rule. The copy phase must last ceil(len/4) cycles.
* `tb_crit_bmtc_top`: the whole design at its default size, driven by a small
  core model for 300 mispredictions of eight branches. Every lookup result,
  every replayed instruction and the replay duration are predicted by a model.
  The test also counts each mechanism (hit, miss, insertion, value update,
  rejection, dropped commit, hold for a full buffer, hold for a copy, flush)
  and fails if any never happens.
* `tb_crit_bmtc_top_10_totals`: the same run for the other evaluated
  configuration, a 10-entry cache with totals-only values. Sixteen branches
  compete for the ten entries.

The workloads of the original evaluation, SPEC-style programs on a simulated
core, cannot be run here. The counters are sized to hold the chain lengths
and misprediction counts reported for them.

To run a testbench with Verilator (package first):

    verilator --binary --timing --assert -Wno-fatal \
      rtl/crit_pkg.sv rtl/*.sv tb/tb_crit_bmtc_top.sv --top-module tb_crit_bmtc_top
    ./obj_dir/Vtb_crit_bmtc_top

The same command works for any other testbench with its name substituted.
Listing `rtl/crit_pkg.sv` twice produces a duplicate-package warning, which
`-Wno-fatal` lets through. Alternatively, list just the files that testbench
needs.

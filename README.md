# SpecLFB: a line fill buffer that keeps speculative misses out of the cache

Spectre-style attacks leave a trace in the data cache. A load executes on a
path that later turns out to be wrong, misses, and brings a line into L1D.
The attacker then times accesses to find that line. This design removes the
trace at the one point where a miss changes the cache: the refill.

A line returned by the lower level waits in the line fill buffer (LFB). It is
written into the L1D arrays only once at least one load that asked for it is
known to be on the correct path. If every load waiting on the line is squashed
instead, the line is dropped. The tag and data arrays, and the replacement
state, then look as if the miss never happened.

Only loads that miss are delayed, and only until they become safe. Hits and
safe misses run at full speed. The question "is this load safe yet?" is
answered by one bit per reorder-buffer (ROB) row, the **ROB unsafe mask**.

The RTL is SystemVerilog (IEEE 1800-2017). It is built around a
SonicBOOM-like core: a 64-entry ROB with 16-entry load and store queues and a
16 KB, 4-way L1D with 64-byte lines and 2 MSHRs. It contains the protection
logic and the cache it guards. The rest of the core and the L2 connect through
ports.

## When a load is unsafe

A uop is marked `unsafe` at dispatch if it uses the load queue, uses the store
queue (fences excepted), or is a branch or jump. Such a uop starts with its
security bit `b` set to 1. The bit is recomputed every cycle and drops to 0
once all three of these hold:

| reason | bit stays 1 while | source |
|---|---|---|
| control flow | an older branch is unresolved (the uop's branch mask is non-zero) or, for a branch, the branch itself is unresolved | branch unit (`br_resolve_mask`, `br_mispredict`) |
| memory order | the uop's own address is unknown, or an older store still in the STQ has an unknown address or the same 8-byte word | `lsu_order_check` |
| exceptions | see below | `exu_exc_*`, `lsu_exc_*`, `flush` |

An exception changes the rule. From the cycle an exception is reported, the
bits of the excepting uop and of every younger uop may be set but not cleared.
This lasts until `flush` ends the exception, so no speculative miss after a
faulting instruction can reach the cache. The two report ports model the
execution units and the LSU. If both report in the same cycle, the older
instruction is kept.

The mask bit of a ROB row is the OR of the bits of all banks in that row. With
2 banks, the 64 entries form 32 rows, so the mask is 32 bits. A load that
misses carries its ROB row, and the LFB asks the mask for that row.

`rob_unsafe_mask` also keeps the ROB head and tail, the commit vector and the
kill vector:

- A mispredict kills every slot whose branch mask holds the mispredicted tag.
  It then moves the tail to the row after the branch.
- A branch keeps its own tag separately (`dis_br_tag`), so its own mispredict
  does not kill it.

## Memory order: `lsu_order_check`

Each LDQ or STQ entry records, when it is allocated, which older stores are
in the STQ at that moment. This dependency set only shrinks: a store's bit is
cleared in every entry when the store leaves the STQ.

An entry is unsafe if:

- its own address is unknown; or
- a store still in its set has an unknown address; or
- a store still in its set has the same 64-bit word address.

The check runs again whenever an address arrives from address generation.
Committed stores are never unsafe.

Loads leave at commit. Stores leave once the cache accepts their write.
Squashed entries come off the queue tails.

## The fill buffer and its security check: `mshr_lfb`, `lfb_security_check`

Each of the `NM` MSHR/LFB entries runs this sequence:

```
FREE -> REQ -> WAIT -> HELD -> REFILL -> REPLAY -> FREE
                  \        \
                   +--------+--> FREE (all waiting loads squashed: line dropped)
```

- **REQ:** the line request is sent to the lower level.
- **WAIT:** the entry waits for the line.
- **HELD:** the line sits in the LFB. `lfb_security_check` passes when some
  live load of the entry sits in a ROB row whose mask bit is 0. Then the entry
  moves to REFILL.
- **REFILL:** the line is written into the arrays in one cycle.
- **REPLAY:** the waiting loads receive their 64-bit words, one per cycle.

A later miss to a line that already has an entry is merged into it, and no
second request goes out. Up to `NREQ` loads can wait on one entry. A merged
load can arrive in REQ, in WAIT, or in HELD while the line is still live.

The kill vector removes squashed loads from every entry:

- An entry in WAIT with no live loads left drops its line when it arrives.
- An entry in HELD with no live loads drops the line at once.

A committed store to a held line updates the held copy. A store to a line
still being fetched waits.

With merged loads, the line enters the cache as soon as any one of them is
safe. That load is certain to bring the line in anyway, so the refill reveals
nothing about the still-unsafe ones.

## The cache: `l1d_cache`

The cache is 64 sets × 4 ways × 64 bytes, with a parallel tag check.

- **Hits:** a load hit answers one cycle after it is accepted.
- **Misses:** a miss goes to the MSHRs and is answered after the refill.
- **Replacement:** the victim is an invalid way if the set has one, otherwise
  the way chosen by a per-set round-robin pointer. The victim is chosen at
  refill time, so a dropped line evicts nothing.
- **Stores:** stores arrive only after commit. They are written through to
  the lower level, with no allocation on a store miss. On a hit they update
  the array.
- **Port sharing:** a refill or a replay takes the port for one cycle and
  holds off new requests.

The memory port carries two kinds of traffic:

- line reads tagged with the MSHR number, answered with the full 512-bit line
  in one beat;
- posted 64-bit writes with byte enables.

## Top level: `speclfb_top`

The top connects the mask, the order check and the cache. A dispatch row of
`BANKS` uops is a valid/ready transfer. It allocates a ROB row and, for loads
and stores, LDQ or STQ entries. The row number and queue indices come back in
the same cycle.

The surrounding core drives the rest:

- address generation (`agu_*`, with store data);
- the load pipe (`ld_*`, tagged with the load's ROB slot `row*BANKS+bank`);
- branch resolution;
- exception reports;
- `flush`;
- commit.

A committed store at the STQ head goes to the cache by itself and takes
priority over loads.

Observation outputs expose the mask, the per-slot memory-order state, MSHR
occupancy, and one-cycle event strobes for hits, misses, refills, drops and
store writes.

All logic is synchronous to `clk`, with an active-low synchronous reset.
Latencies:

- load hit: 1 cycle;
- mask update: 1 cycle after its cause;
- refill: 1–2 cycles after the mask bit of a waiting load falls, then one
  replay cycle per waiting load.

## Parameters

| parameter | default | origin |
|---|---|---|
| ROB entries (`ROWS`×`BANKS`) | 64 = 32×2 | entries: evaluated core; 2 banks = decode width |
| `LDQ` / `STQ` | 16 / 16 | evaluated core |
| L1D | 16 KB, 4 ways, 64 B lines (`SETS`=64) | evaluated core |
| MSHRs `NM` | 2 | evaluated core |
| `NREQ` loads merged per MSHR | 4 | design choice |
| `NBR` branch tags | 12 | design choice (MediumBoom-like) |
| physical address | 32 bits | design choice |
| data width | 64 bits | RV64 |
| store/load compare granularity | 8 bytes | design choice |

All are parameters in `rtl/speclfb_pkg.sv` or on the modules.

## Where this RTL departs from, or adds to, the published scheme

- **Cache policies.** Write-through, round-robin replacement, one-beat line
  transfers and the 1-cycle hit are simplifications. The evaluated core uses
  its own write-back cache.
- **Multiple merged loads.** The rule for this case (any live safe load
  releases the line) is this design's choice. The scheme itself states the
  check for a single load entry.
- **Older stores only.** Memory-order safety looks only at older stores, not
  older loads.
- **Unknown addresses.** An unknown address counts as a conflict.
- **Memory-order violations.** A load that bypassed an older store to the
  same word is squashed by the surrounding core (as an exception report on the
  load followed by `flush`); the order check itself only reports safety.
- **Branches.** Branches are meant to occupy a ROB row alone. The mask logic
  does not rely on this; the top-level testbench dispatches that way.
- **Not included:**
  - value prediction, whose mask rules are not defined;
  - prefetch refills;
  - protection of the L2;
  - any defence for speculative cache hits.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    --top-module tb_speclfb_top rtl/speclfb_pkg.sv tb/tb_speclfb_top.sv
./obj_dir/Vtb_speclfb_top
```

| testbench | what it drives |
|---|---|
| `tb_lfb_security_check` | random masks and request sets against a reference |
| `tb_rob_unsafe_mask` | branch clearing, mispredict kill and roll-back, memory-order clearing, exception freeze with both report ports, flush, full ROB |
| `tb_lsu_order_check` | directed cases plus 300 random rounds against a program-order model |
| `tb_mshr_lfb` | hold-until-safe with its refill latency, merge, drop while held or waiting, both MSHRs busy, store into a held line |
| `tb_l1d_cache` | random loads and stores over a small line pool, with random unsafe rows and squashes, against a behavioural memory; every refill is checked against the security rule |
| `tb_spectre_poc` | Evict+Reload Spectre v1 (mispredicted branch) and v4 (store bypass) on the full-size top; the probe of all 256 lines of a 16 KB probe array must find no fast line, while a correct-path control finds exactly the secret line |
| `tb_speclfb_top` | full default size; a small core model dispatches, computes addresses out of order, issues loads in order, resolves and mispredicts branches, raises exceptions and flushes, and commits |

`tb_speclfb_top` checks:

- load values;
- the security rule on every refill;
- the mask of rows under unresolved branches;
- that the mask of an excepting row holds.

It counts each mechanism (hit, miss, merge, LFB hold, refill, drop, squash of
a waiting miss, memory-order hold and release, exception freeze, flush,
store drain, MSHR-full stall, store-priority stall, dispatch stall). It fails
if any count is zero. It runs in seconds.

All testbenches run at the default sizes except the block tests, which set
their block's parameters to the same default values explicitly.

# IFRA: on-chip instruction-footprint recorders for post-silicon bug localisation

When a processor prototype crashes in a validation lab after billions of
cycles, the hard part is finding *where* and *when* an electrical bug (a
marginal path, a noise-induced bit flip) first corrupted state. Reproducing
the failure is often impossible, and simulating the whole system to obtain
golden values is far too slow.

This RTL implements the on-chip half of the Instruction Footprint Recording
and Analysis (IFRA) method. Small recorders sit at every pipeline stage of an
out-of-order core and continuously log a compact *footprint* of each
instruction that passes: a short instruction ID plus a few bits saying what
the instruction did there (its PC, its decoded class, residues of its register
names, operands and results, its memory address). When a failure symptom
appears, a post-trigger generator freezes the recorders. Their contents, the
last ~1,000 cycles before the failure, are then shifted out serially.
Off-line software links the footprints of each instruction across stages
and runs self-consistency checks against the program binary. No failure
reproduction and no system simulation are needed. That software is not part
of this repository; the RTL defines the data it receives (see
[Scan-out format](#scan-out-format)).

The configuration is that of a 4-wide Alpha 21264-like core with at most
n = 64 instructions in flight.

## Block overview

| Module | Role |
|---|---|
| `ifra_top` | Everything below, wired as one recording infrastructure; the core is outside and connects through ports |
| `id_assign_unit` | Gives each instruction leaving fetch an 8-bit ID |
| `footprint_recorder` | 1,024-entry circular buffer with idle-cycle compaction, pause/stop and serial scan-out (24 instances) |
| `commit_recorder` | Single register: ID and fatal-exception code of the youngest committed instruction |
| `post_trigger_gen` | Soft triggers pause recording, hard triggers stop it and halt the core; stages are stopped commit-first |
| `residue_gen` | Mod-3 / mod-7 residues used as compact auxiliary information |
| `rec_ctl_sync` | Two-flop synchroniser that carries pause/stop into a recorder clock domain and the acknowledgement back |
| `ifra_pkg` | Widths, stage enumeration, recorder control struct, trigger-cause codes |

Recorders instantiated by `ifra_top` (footprint = `{ID[7:0], aux}`, ID in the
upper bits):

| Stage | Count | Auxiliary information | aux bits | Entry bits (incl. idle flag) |
|---|---|---|---|---|
| Fetch | 4 | PC[31:0] | 32 | 41 |
| Decode | 4 | `{FU class[1:0], uses dest, uses 2nd operand}` | 4 | 13 |
| Dispatch | 4 | three register names mod 3: `{r2, r1, r0}`, 2 bits each | 6 | 15 |
| Issue | 4 | two operands mod 7: `{op1, op0}`, 3 bits each | 6 | 15 |
| ALU0, ALU1, MUL0, MUL1 | 4 | result mod 7 | 3 | 12 |
| Branch | 2 | none | 0 | 9 |
| Load/store | 2 | `{result mod 7, address[31:0]}` | 35 | 44 |
| Commit | 1 register | fatal-exception code | 4 | 12 (no buffer) |

The storage is 1,024 × 490 bits = 501,760 bits (61.25 KiB). Of the 490 bits
per row, 466 are footprint bits; the other 24 are idle flags, one per recorder.

## Instruction IDs: why 8 bits are enough

An ID must tell apart instructions that are in flight at the same time.
Consecutive numbers modulo 4n do that. Wider IDs would make every recorder
entry larger, and a timestamp would add even more bits. The trick is in the
flush rule:

1. After reset, the first instructions get IDs 0, 1, 2, …
2. If X was the last ID handed out and q instructions leave fetch this
   cycle, they get X+1 … X+q (mod 4n), in slot order.
3. If the instruction with ID Y causes a pipeline flush, X becomes Y+2n
   (mod 4n). The first instruction fetched after the flush therefore gets
   Y+2n+1.

The jump of 2n makes every flush visible as a break in the ID sequence. So
software can tell flushed instructions from the ones that flushed them. It
also keeps instructions with equal IDs in the same relative order in every
recorder. With n = 64 the IDs are log2(4n) = 8 bits.

`id_assign_unit` computes the IDs combinationally in the cycle the
instructions leave fetch. These go to the fetch-stage recorders, together with
the PCs. The unit also registers the IDs once (`fetch_id_o`,
`fetch_id_valid_o`); the core must carry them down its pipeline with the
instructions. A flush in the same cycle as a fetch group takes priority, and
the registered valids of that group are dropped. Valid slots need not be
contiguous.

## The recorder

Each `footprint_recorder` writes one entry per recorded cycle into a
power-of-two circular buffer and overwrites its oldest entry. It therefore
always holds the most recent history.

**Idle compaction.** A cycle without a footprint would waste an entry, so a
run of idle cycles shares one entry. Bit `FP_W` of an entry is the idle flag.
If the flag is clear, bits `FP_W-1:0` are a footprint. If it is set, they
count the idle cycles the entry stands for, from 1 to 2^FP_W−1. A longer run
continues in a new entry. The open run lives at the write pointer and is
rewritten every idle cycle. The next footprint goes into the entry after it.
Every write is a single write to the array, so the buffer maps onto a
one-port SRAM.

**Pause and stop.** `ctl_i.pause` (soft post-trigger) freezes the buffer, the
pointer and an open idle run, and recording continues when it drops. Cycles
spent paused are not recorded. `ctl_i.stop` (hard post-trigger) is latched:
the recorder never writes again until reset, and `stopped_o` goes high.
Pointers and counters reset asynchronously; the array itself has no reset.

### Scan-out format

After the stop, a recorder with `scan_go_i` high shifts out one bit per clock,
LSB first, starting one clock after `scan_go_i` is sampled:

1. a header of log2(DEPTH)+2 bits: `{open_idle, wrapped, wr_ptr}`;
2. entries 0 … DEPTH−1 in address order, each `FP_W+1` bits, LSB first.

`wr_ptr` is the next entry to be written. `wrapped` says the buffer has been
filled at least once. `open_idle` says that entry `wr_ptr` holds an
unfinished idle run. The youngest entry is `wr_ptr` if `open_idle` is set,
and `wr_ptr−1` otherwise. If `wrapped` is set, the oldest entry is the one
after the youngest. If not, entries 0 up to the youngest are valid. Unwrapping
and expanding the idle runs are left to software.

Recorders form a daisy chain. A recorder that is not shifting passes
`scan_in_i` to `scan_out_o` combinationally. Its `scan_done_o` rises during its
own last bit, and that signal starts the next recorder up the chain, so the
stream has no gaps. `scan_done_o` stays high until `scan_go_i` drops. The
commit recorder uses the same protocol with a bare 12-bit `{ID, exception}`
and no header.

In `ifra_top` the chain order (first out) is: fetch 0–3, decode 0–3,
dispatch 0–3, issue 0–3, ALU0, ALU1, MUL0, MUL1, branch 0–1, LSU 0–1, commit.
At the default size a full dump is 24 × 12 + 1,024 × 490 + 12 = 502,060
bits. `scan_done_o` rises with the last bit. The chain is meant to sit behind
a boundary-scan (JTAG) data register, which is not included.

## Post-triggers

Waiting for the crash would let the buffers overwrite the interesting part of
the history. So `post_trigger_gen` watches for earlier symptoms:

| Symptom | Kind | Ends when |
|---|---|---|
| Array parity error (`parity_err_i`) | hard | — |
| Residue-check error in an arithmetic unit (`residue_err_i`) | hard | — |
| Fatal exception at commit (`fatal_exc_i`) | hard | — |
| `HARD_GAP` cycles with no retirement (deadlock) | hard | — |
| Segfault reported by the OS (`segfault_i`) | hard | — |
| Load/store address equal to zero on any LSU port | hard | — |
| `SOFT_GAP` cycles with no retirement | soft | an instruction retires |
| I- or D-TLB miss (`tlb_miss_i`) | soft | `tlb_refill_i` (or a segfault, which is hard) |
| Interrupt / I-TLB handler entered (`intr_i`) | soft | `intr_return_i` |

A hard trigger latches the stop, raises `halt_o` and holds the first cause
in `cause_o`. A soft trigger only pauses, and `soft_active_o`/`cause_o` show
which one. `tlb_soft_dis_i` disables the TLB soft trigger. This is meant for
test programs that target TLB servicing itself, which would otherwise fall
into a recording blind spot.

The off-line checks assume that no stage has recorded beyond a later stage.
So control reaches the stages in sequence: commit first, then execute
(ALU/MUL, branch and LSU recorders), issue, dispatch, decode and fetch. The
stages may run on different clocks, so a fixed spacing would not guarantee
the order. Instead the generator hands the control to the next stage only
after the previous stage acknowledges that it has applied it. The control is
synchronised into each recorder domain, and the applied value is synchronised
back to the generator's clock as the acknowledgement. The execute stage
acknowledges only when all four of its domains (ALU, MUL, branch, LSU) have.
Pause and resume travel the same way. `stop_seq_done_o` rises when the fetch
stage has acknowledged the stop, so every recorder is frozen.

With all clocks equal, the commit recorders see a trigger three clocks after
the trigger input (one register plus the two-flop synchroniser). Each further
stage follows five clocks later: two for the acknowledgement, one in the
generator and two for the synchroniser into the next stage.

Parity and residue checkers are part of the core and are not built here. The
generator takes their error outputs.

Defaults: `SOFT_GAP` = 400 cycles stands for the time of two memory loads at
an assumed 200-cycle memory latency. `HARD_GAP` = 2×10⁹ cycles stands for two
seconds at an assumed 1 GHz. It is counted from the last retirement, not from
the soft trigger.

## Connecting a core to `ifra_top`

The core drives, per stage and per slot, a valid bit, the ID it carries for
that instruction, and the raw values. Residues and field packing are done
inside `ifra_top`.

- **Fetch:** `fetch_valid_i[4]` and `fetch_pc_i[4]` for instructions leaving
  fetch. The IDs come back registered on `fetch_id_o`/`fetch_id_valid_o` for
  the decode pipeline register.
- **Flush:** `flush_i` and `flush_id_i` give the ID of the instruction that
  causes the flush. A D-TLB miss at the head of the ROB is reported as such a
  flush as well.
- **Decode:** `dec_bits_i` = `{FU class[1:0], uses dest, uses 2nd operand}`.
- **Dispatch:** `dis_reg_i[s][0..2]` = register names (7-bit physical tags).
- **Issue:** `iss_opnd_i[s][0..1]` = operand values (64-bit).
- **Execute:** `ex_*` for ALU0, ALU1, MUL0, MUL1, `br_*` for the two branch
  units, and `lsu_*` for the two load/store units. `lsu_addr_i` is the full
  64-bit address; bits 31:0 are recorded and all 64 are checked for zero.
- **Commit:** `commit_valid_i[4]`, `commit_id_i`, `commit_exc_i` in program
  order (the highest valid slot is the youngest). Any valid commit counts as
  retirement for the gap counters.
- **Symptoms:** the trigger inputs listed above.
- **Scan:** `scan_go_i`, `scan_in_i`, `scan_out_o`, `scan_done_o`.

### Clocks and reset

There are nine clock inputs, one per recorder domain: `clk_fetch`,
`clk_decode`, `clk_dispatch`, `clk_issue`, `clk_alu`, `clk_mul`, `clk_branch`,
`clk_lsu` and `clk_commit`. Each in-order stage and each functional-unit type
can therefore be frequency-scaled on its own. The ID unit runs on
`clk_fetch`, so `flush_i`/`flush_id_i` belong to the fetch domain. The
post-trigger generator runs on `clk_commit`, so all symptom inputs and the
commit inputs belong to the commit domain. Every other input belongs to the
domain of its stage. `all_stopped_o` collects flags from all domains and is
only meaningful once they have settled.

Scanning goes through every recorder, so all nine clocks must come from one
scan clock while the chain is shifted. This is the usual scan-dump mode of a
clock generator and is not part of this RTL.

`rst_n` is an asynchronous active-low reset. Its release must be synchronised
to each domain by the reset network.

## Where this design departs from, or adds to, the method

- **Clock domains.** The method allows a clock domain as small as one
  pipeline stage but does not say how the recording control crosses between
  domains. The nine-domain split, the two-flop synchronisers, the
  acknowledged stop sequence and the common scan clock are this design's
  choices.
- **Resume order.** A resume after a pause also starts at commit. Right after
  it, a later stage can therefore record an instruction whose footprints in
  earlier stages fell inside the pause. The recorders do not mark where a
  pause happened, so software that checks that earlier stages hold every
  footprint of later ones must allow for such gaps.
- **Idle flag.** The method only says that idle runs occupy one entry. The
  flag bit and the run-length field are this design's encoding, and they cost
  one bit per entry (about 5 % more storage).
- **Scan protocol and format**, chain order, trigger priorities, cause codes,
  and the two gap thresholds are this design's
  choices.
- **Field layout.** The assignment of residues to fields (register 0 / operand
  0 in the low bits) and the 7-bit register tags are assumptions. So are the
  64-bit operands and addresses.
- **Not included:** the processor core (fetch queue, decoders, dependency
  checker, rename tables, issue queue, register file, execution units,
  reorder buffer, caches, TLBs), its parity and residue checkers, the JTAG TAP
  controller, and the off-line analysis software.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_residue_gen` | mod-7 of 64-bit and mod-3 of 7-bit values against `%`, corner cases and random values |
| `tb_id_assign_unit` | 5,000 cycles of random fetch groups and flushes against a model of the three rules, for the 4-way unit and a 2-way unit with 6-bit IDs; registered copy |
| `tb_footprint_recorder` | 16-entry recorder; random traffic with long idle runs (saturation), pauses, wrap-around; scanned contents and scan timing against a run-length model |
| `tb_commit_recorder` | youngest-commit register under pauses and stop; 12-bit scan |
| `tb_post_trigger_gen` | every trigger with short thresholds; exact cycle at which pause/stop reaches each stage, with immediate and with delayed acknowledgements; end of the stop sequence; resume rules; disable; causes |
| `tb_rec_ctl_sync` | output equals the input sampled two (or three) destination clocks earlier, with an unrelated source clock; reset value |
| `tb_ifra_top` | full default size, all clocks equal; see below |
| `tb_ifra_clock_domains` | full default size with nine unrelated clock periods; see below |

`tb_ifra_top` runs the top with no parameter overrides. A simple core model
drives 4-wide fetch with flushes and passes the returned IDs down a
decode → dispatch → issue → ALU/MUL pipeline. It adds random branch,
load/store and commit traffic, a 300-cycle all-idle stretch, a TLB-miss
pause, an interrupt pause, a 450-cycle retirement gap and finally a load from
address zero. It keeps its own model of every recorder: reference IDs,
residues computed with `%`, and idle compaction, gated by the stage control
the generator issues. After the hard trigger it scans out all 502,060 bits
and compares every entry. It also counts flushes, ID wrap-arounds,
saturated idle runs, buffer wrap-around, each soft trigger, the hard trigger,
the commit-first stop sequence and the scan-out. A mechanism that never
occurs counts as a failure. It runs in a few seconds.

`tb_ifra_clock_domains` drives the nine clocks with half-periods between 3
and 8 time units and random traffic in each domain. It raises a TLB-miss
pause and a parity error in the commit domain. For each one it records the
time at which the control arrives in every domain. It checks that each stage
receives the control strictly after every domain of the stage before it, and
that the pause clears after the refill. After the stop it checks `halt_o`,
`all_stopped_o` and `stop_seq_done_o`. It then switches all clocks to one scan
clock and shifts out the full chain. It checks the chain length, `scan_done_o`,
the youngest entry of fetch recorder 0 and the commit register against what
it saw being recorded in those domains.

Not verified: full-content comparison of every recorder with unequal clocks
(only the ordering and selected entries are checked there), metastability
itself (simulation cannot show it), and recorders narrower or deeper than the
instances above.

## Simulating

Everything is plain SystemVerilog-2017. The package must be read first. With
Verilator 5:

```sh
verilator --binary --timing -Wno-fatal rtl/ifra_pkg.sv -y rtl \
  tb/tb_ifra_top.sv --top-module tb_ifra_top --Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ifra_top` with any other testbench name to run that one. In a
single-clock system, tie all nine clock inputs together. To
change the configuration, override `DEPTH`, `SOFT_GAP` or `HARD_GAP` on
`ifra_top`. The ID width, fetch width and field widths live in `ifra_pkg`.
`DEPTH` must be a power of two. The recorder module can be instantiated with
any `FP_W`/`DEPTH` for other field tables.

# Memory-side logic for a GPU streaming multiprocessor: racetrack register file, locality-aware warp scheduling, thread-batch DRAM partitioning

A GPU streaming multiprocessor (SM) loses time and energy at three levels of
its memory hierarchy, and this design has one mechanism for each level.

1. **Register file.** The 128 KB register file is built from racetrack
   memory (RM), which is denser and uses less leakage power than SRAM. The
   catch is that a bit can only be read or written when the track has been
   shifted so that the bit sits under an access port, and each shift step
   costs a cycle. The design keeps shifting low in three ways:
   - it places registers so that they sit close to the ports (*register
     remapping*);
   - it issues the warp whose operands need the least shifting (*RMWS*, the
     RM-aware warp scheduler);
   - it holds results in a small write buffer until a write costs no shift.
2. **L1 data cache.** The *versatile warp scheduler* (VWS) limits how many
   warps run, which protects each warp's working set. It then picks those
   warps from as few thread blocks (CTAs) as possible, and hands CTAs to an
   SM in consecutive runs so that warps sharing cache blocks run together.
3. **DRAM.** *Thread-batch memory partitioning* (TEMP) groups consecutive
   thread blocks into *thread batches* and sends each batch to one SM. Page
   colouring then places the batch's pages in DRAM banks that only that SM
   uses, and CPU pages go to separate rows. The *thread-batch-aware scheduler*
   (TBAS) runs one batch at a time so that the open DRAM row keeps being hit.

The three mechanisms are independent. The top, `vmo_gpu_top`, instantiates
all three side by side, each with its own ports. The parts a real GPU would
wrap around them are not included:
- the instruction pipeline and operand collectors;
- the L1 cache;
- the memory controller, the DRAM and the host CPU.

The top sees these parts as inputs (events and state) and outputs
(decisions).

All defaults are the evaluated configuration:
- 48 warps per SM;
- 16 register banks of 64 warp registers × 1024 bits;
- 64-bit tracks with 4 access ports;
- 2 write-buffer entries per bank;
- 15 SMs and a 32 KB L1 (256 blocks of 128 B) for VWS;
- 8 SMs with 2 channels × 16 banks and 4 KB pages for TEMP.

## File map

| File | Block |
|---|---|
| `rtl/gpu_pkg.sv` | shared constants of the register file (bank count, track length, ports, widths) |
| `rtl/vmo_gpu_top.sv` | top: the three sections side by side |
| `rtl/rmws_rf.sv` | racetrack register file subsystem with RMWS issue |
| `rtl/bml_calc.sv` | register remapping: warp/register → bank, port, bit-map location |
| `rtl/rmws_sched.sv` | RM-aware warp scheduler (shift-distance score and selection) |
| `rtl/wbit.sv` | write buffer info table (scoreboard side of the write buffer) |
| `rtl/rf_arbiter.sv` | per-bank arbitrator with the write buffer data array |
| `rtl/rm_bank.sv` | one racetrack bank (array, latencies) |
| `rtl/rm_shift_ctrl.sv` | shift controller: location register and shift pulses |
| `rtl/vws.sv` | versatile warp scheduler |
| `rtl/iwl.sv` | intra-warp locality: working-set estimate, warp throttle |
| `rtl/amt.sv` | address miss table (first-miss filter) |
| `rtl/intracl.sv` | intra-CTA locality: which warps stay active |
| `rtl/intercl_sched.sv` | inter-CTA locality: two-level scheduler |
| `rtl/dispatch_queue.sv` | serial per-SM thread-block queue with batch numbering (used by VWS and TEMP) |
| `rtl/temp_tbas.sv` | TEMP + TBAS section |
| `rtl/tbas_sched.sv` | thread-batch-aware scheduler |
| `rtl/page_color_map.sv` | page-colouring address decode and frame allocation |

Each file opens with a comment that covers:
- what the block does and how;
- its interface and timing;
- which parts are this design's own choice.

## The racetrack register file

### Geometry

A bank stores 64 warp registers of 1024 bits (32 lanes × 32 bits). It is
built from 1024 tracks of 64 bits, with bit *i* of every register on track *i*.

Each track has 4 evenly spaced ports, so each port covers a 16-bit segment.
All tracks of a bank move together under one shift driver. The position of
the bank is therefore one number: the *bit-map location* (BML, 0..15) that
currently sits under every port. A register is identified by (port, BML).

Reaching a register from location *l* costs |BML − l| shift cycles. Then:
- a read takes 1 cycle;
- a write takes 2 cycles.

These latencies are the parameters `RD_LAT` and `WR_LAT` of `rm_bank`. The
ports stay wherever the last access left them: the bank never shifts back
on its own.

`rm_shift_ctrl` holds the location register. It compares it with the
requested BML and emits one pulse per cycle, with a direction, until
`aligned`.

### Register remapping (`bml_calc`)

A conventional register file lays out a warp's registers one after another:
- the linear index is L = warp·regs_per_warp + reg;
- the bank is L mod 16;
- the row within the bank is r = L / 16.

Stacking rows from the top of the track would put row 40 forty shifts away
from port 0. Instead, row *r* goes to:
- port r mod 4;
- BML = r / 4 + offset.

The used rows thus form four short groups, one under each port. The worst
shift becomes ceil(rows/4) instead of `rows`.

Both `offset` and `regs_per_warp` are kernel-launch inputs. `offset` is the
number of unused bits left above every segment.

With `NUM_SCHED > 1`, warp-register remapping is used instead:
- the banks are split into one group per scheduler;
- warp *w* keeps all its registers in group w mod NUM_SCHED;
- schedulers therefore never move each other's tracks.

The published BML formula is written per warp segment, with the register
index taken modulo the segment. The dense-then-pack arrangement above is
this design's concrete form of it. It reproduces the published worked
example (the first register of warp 0 at BML 2) and gives the same
ceil(rows/4) worst-case shift. A different arrangement would change only
`bml_calc`.

### RM-aware warp scheduling (`rmws_sched`)

Each bank's arbitrator serves requests strictly first-come first-served.
The position a bank will be at when a new read arrives is therefore the BML
of the newest read already queued for it. The scheduler keeps that BML per
bank, and updates it when it issues.

For each candidate warp, the score of its next instruction is built in
hardware as follows:

1. `BMLpp = (1 << 15) >>> BML`. This is a thermometer code with BML+1 ones
   from the top bit down.
2. XOR it with the BMLpp of the bank's queued position. The result is a run
   of |distance| ones.
3. Shift that run down to bit 0. The result is the thermometer of the
   distance.
4. OR the thermometers of all source operands. The result is the
   thermometer of the largest distance: the instruction's *score*.

The scores of all candidate warps form a matrix. Columns are scanned from
bit 0 upward. The first column whose AND over the candidates is 0 holds the
minimum, and the lowest-numbered warp with a 0 in that column wins.

Warps that cannot issue are removed from the scan before it runs. A warp
cannot issue when:
- it has no ready instruction;
- there is a scoreboard hazard;
- the write buffer rejected it.

The selection is combinational, and one instruction issues per cycle.

### Write buffer: WBIT and WBDA

Writes would move the tracks behind the scheduler's back. They therefore go
to a write buffer of 2 entries per bank (32 in all). The buffer is split in
two parts:
- **WBIT** (`wbit`, in the scoreboard) holds, per entry:
  - V: valid;
  - R: data received;
  - the warp and register of the pending write;
  - F: a 4-bit count of issued reads that will still read this entry.
- **WBDA** (inside each `rf_arbiter`) holds the 1024-bit data.

At issue, WBIT checks the proposed instruction combinationally:
- **Source hits an entry with R=0** (the value is not produced yet): this is
  a RAW hazard, and the instruction waits.
- **Source hits an entry with R=1:** the read is answered from the WBDA and
  F is incremented.
- **Destination hits an entry (WAW):**
  - With R=1 and F=0, the old entry is *voided* and reused. The superseded
    value never reaches the track.
  - Otherwise the instruction waits.
- **Destination misses:** the instruction needs a free way in its bank's
  set. If none is free, the set is *full*. A ready way (R=1, F=0) is then
  named for an *overflow writeback* and the instruction waits.

An entry leaves the buffer in one of two ways, both performed by the
bank's arbitrator:
- **Piggyback write:** when the bank is idle and the entry's register is
  already under its port, because an earlier request moved it there, the
  entry is written with no shift.
- **Overflow writeback:** the named way is written wherever the tracks are.
  It joins the FCFS order like any other request.

When the bank is idle, the arbitrator serves in this order:
1. a WBDA read at the head of the queue;
2. an overflow writeback;
3. a piggyback write;
4. a track read at the head of the queue.

Two ordering rules keep the data consistent. Both are this design's
additions, found necessary in random testing:
- **Arrival blocking.** A way is not written back:
  - while an older queued track read targets the same register;
  - in a cycle when a new read of that way or register arrives. The
    scoreboard counts that read against the way on the same clock edge, so
    freeing the way then would let the next result overwrite data that is
    still owed to a reader.
- **Self-read before void.** An instruction may read a buffered register
  and also write it. In that case voiding the entry would replace the value
  before the instruction's own read. WBIT instead requests a writeback of
  that entry and holds the instruction until the way is free.

### Issue protocol of `rmws_rf`

Each warp presents its next instruction on `ib_*`:
- up to 3 sources and one destination;
- a valid bit, set when the pipeline considers the instruction ready.

The issue path works as follows:
- An instruction issues in the cycle `iss_valid` is high. `iss_dst_way`
  tells which WBDA way will receive its result.
- Operands return per bank on `opnd_*`, tagged {warp, operand slot}.
- Results come back on `wb_*`, carrying the way number.
- If WBIT rejects the scheduler's pick, that warp is masked until the next
  issue or write-buffer update. Over the following cycles the search moves
  to the next-best warp.
- Issue also waits until every bank queue has room for 3 reads.

The rejection mask and the queue-room rule are design choices.

## The versatile warp scheduler (`vws`)

VWS combines four blocks.

**`iwl` (intra-warp locality)** estimates how many warps the L1 can hold.
- Every warp has two 10-bit saturating counters:
  - L1 accesses;
  - *first* misses, meaning misses that `amt` says the block has not had
    before.
- When a warp finishes, it gives two new samples:
  - WS_new = misses;
  - RRDegr_new = accesses / misses.
- Both feed half-weight running averages with 4 fraction bits.
- The throttle is N_act = ceil(β · 256 / (WS · RRDegr)) with β = 4,
  clamped to 1..48.
- After `launch`, the unit is in the *sampling stage*, in which all warps
  run. It lasts until N_pred = ceil(0.1 · N_CTA · CTA_size / (32 · 15))
  warps have finished.
- The address miss table is cleared every N_pred finished warps.

**`amt`** is an 8192 × 1-bit table indexed directly by the low bits of the
block address.

**`intracl`** takes the first N_act occupied warp slots. A CTA occupies
consecutive slots, so this activates whole CTAs first and at most one CTA
partly.

**`dispatch_queue`** gives each SM a contiguous run of CTAs,
[sm·q, min((sm+1)·q, N)). Here q = stride · ceil(ceil(N / stride) / N_SM),
so whole thread batches are shared out. VWS uses stride 1, which gives
q = ceil(N / N_SM). The queue is two counters instead of storage.

**`intercl_sched`** is a two-level scheduler.
- At most 16 warps are in the first level, and they issue greedy-then-oldest.
- A warp is demoted when it stalls, finishes or is throttled.
- One warp per cycle is promoted. The priority is:
  1. a warp of a CTA already in the first level;
  2. one of the CTA just before the lowest CTA there (the *precursor*);
  3. one of the CTA just after the highest CTA there (the *successor*).
- The first level therefore always covers consecutive CTAs.

In N_pred, N_CTA is taken as the CTA count of the whole grid, so the SM
count divides it only once. This is a design choice: the published text
also suggests pre-dividing by the SM count, which would divide twice.

Other choices in VWS:
- the first finished warp initialises the averages;
- a warp with no misses counts as WS = 1;
- ties in every arbiter go to the lowest slot.

## Thread batches and the DRAM (`temp_tbas`)

**Batches.** `dispatch_queue` numbers batches as tb_id / stride. The
*thread-block stride* is found offline by profiling and is a launch input.

**`page_color_map`** splits a physical address as
`{row | bank | channel | page offset}`.
- The channel and bank bits (the *colour*) lie just above the 4 KB page
  offset, so the page allocator chooses them.
- Each of the 8 SMs owns 32 / 8 = 4 colours.
- The block has two functions:
  - **decode:** channel, bank, row, column, owning SM, and whether the
    access is local to the requesting SM;
  - **frame allocation:** the n-th GPU page of an SM goes to colour
    sm·4 + n mod 4 and row n / 4, counting up from row 0. CPU pages count
    down from the top row and cycle through all colours.

**`tbas_sched`** runs warps from one batch only, greedy-then-oldest.
- When the batch has no active warp left, the whole batch is demoted.
- The *oldest* pending batch with an active warp is then promoted.
- "Enough active warps" is the parameter `MIN_ACTIVE`, which defaults to 1.

The published text first suggests promoting the successor batch, then
settles on oldest-first. Oldest-first is what is built.

## Top-level interface

`vmo_gpu_top` has three port groups:
- **`rf_*`:** the instruction buffer, operand return and writeback
  interfaces of `rmws_rf`. It also has observation outputs:
  - event pulses: shift direction, piggyback, overflow, void and so on;
  - the scheduler's per-bank planned BML;
  - write-buffer occupancy.
- **`vws_*`:** L1 events (access, miss with block address, warp done), CTA
  launch and pop, per-slot state (valid, CTA id, ready, stall), and the
  issue choice. It also brings out N_act, N_pred, WS, RRDegr, the sampling
  flag and the active mask.
- **`temp_*`:** thread-block launch and pop with batch numbers, per-slot
  batch ids, the TBAS issue choice, batch-switch events, address decode and
  frame allocation.

The top has one clock domain and an active-low asynchronous reset, `rst_n`.
The top adds no logic of its own. Each section's timing is given in its
files:
- scheduler choices are combinational from registered state;
- all state changes at the rising edge.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/gpu_pkg.sv tb/tb_vmo_gpu_top.sv \
          --top-module tb_vmo_gpu_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another. `-Irtl` lets Verilator find each
module by its file name.

`tb_vmo_gpu_top` is the end-to-end test at full size, with no parameter
overrides. It drives all three sections at once.
- **Register file:**
  - 48 warps run random streams over 20 registers each, with 1024-bit data;
  - the testbench acts as instruction buffer, collector and writeback stage;
  - it checks every operand against a reference register file.
- **VWS:**
  - a 150-CTA kernel runs on SM 3;
  - the working-set estimate must settle at WS = 20, RRDegr = 4, N_act = 13.
- **TEMP:** a 64-block grid with stride 4 runs on SM 2.

The test counts every mechanism, and one that never happens counts as a
failure. The mechanisms are:
- reads from the buffer, piggyback writes, overflow writebacks, voids,
  full-set and hazard stalls;
- shifts in both directions;
- first misses, AMT clears, throttling;
- each promotion class, and demotions;
- batch switches, local and remote accesses, CPU frames.

It compiles in under a minute and runs in about a second.

Per-block testbenches:

| Testbench | What it checks |
|---|---|
| `tb_rm_shift_ctrl`, `tb_rm_bank` | shift count and read/write latency cycle by cycle, data against a model |
| `tb_bml_calc` | mapping against an independent formula, worst-case shift |
| `tb_rmws_sched` | scores and selection against a software scan |
| `tb_wbit` | directed hazard, void, full-set and overflow cases |
| `tb_rf_arbiter` | FCFS order, buffer reads, piggyback/overflow against a shadow bank |
| `tb_rmws_rf` | the register file at 8 warps × 4 banks × 32 bits against a reference register file |
| `tb_amt`, `tb_iwl`, `tb_intracl`, `tb_intercl_sched`, `tb_dispatch_queue` | against reference models; `tb_iwl` also checks a worked case (N_pred 8, WS 20, RRDegr 4, N_act 13) |
| `tb_vws`, `tb_temp_tbas` | each section end to end |
| `tb_rf_workloads` | the register file at full size running six application footprints in turn (WP 63 regs × 16 warps, STO 48 × 12, LBM 36 × 27, BINO 20 × 48, CP 15 × 32, NN 21 × 8), each with operands checked against a reference |
| `tb_page_color_map`, `tb_tbas_sched` | decode/frames and batch switching against models |

## Sizing against the evaluated applications

The register file holds an application when:
- ceil(regs/thread × warps / 16) ≤ 64 rows per bank;
- regs ≤ 63;
- warps ≤ 48.

All published per-application register counts fit, from 13 rows (NN) to
63 rows (WP), with one exception: a sort kernel listed with 53 resident
warps exceeds the 48 warp slots of the configuration.

The VWS and TEMP sections take any grid up to 65535 CTAs or thread blocks:
- CTA and thread-block ids are 16 bits;
- CTA sizes go up to 1536 threads.

## Departures and open points

- **Placement formula:** the BML placement is this design's concrete form
  of the published formula (see above).
- **Added ordering rules:** arrival blocking in the arbitrator and
  self-read-before-void in WBIT were added for correctness; see the write
  buffer section.
- **No automatic port adjustment:** none is done after an access, as in the
  evaluated design.
- **Piggyback timing:** piggyback writes happen only when the bank is idle.
  Overflow writebacks take priority over piggyback writes.
- **Arbitrator queue depth:** 8 per bank, which is not specified. Issue
  waits when a queue lacks room for 3 reads.
- **AMT indexing:** the AMT is untagged and uses low-bit indexing. Aliasing
  can only lower the working-set estimate.
- **Fixed-point precision:** fixed point with 4 fraction bits for WS and
  RRDegr.
- **TBAS promotion threshold:** `MIN_ACTIVE` = 1.
- **Multi-scheduler mode:** warp-register remapping with several schedulers
  is built in `bml_calc`. `rmws_rf` instantiates one scheduler;
  `NUM_SCHED` only changes the mapping. The organisation with two or four
  schedulers, each issuing to its own bank group in the same cycle, is not
  built. It would need a second write-buffer check port and per-group
  queues.

### Tool warnings that stand

Verilator `-Wall` reports three warnings that are left in place on purpose:
- `SYNCASYNCNET` on `rst_n`. The reset is asynchronous in the circuit, and
  it is also used in `disable iff` of the queue and write-buffer assertions,
  which are not hardware.
- `amt.miss_blk` has unused upper bits. The direct-indexed table uses only
  the low 13 bits; the port keeps the full block address.
- `vws.dq_batch` is unused. VWS dispatches with stride 1, so the batch
  number equals the CTA number.

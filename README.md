# Area- and energy-efficient register files for wide superscalar cores

A wide out-of-order core reads two source operands and writes one result
per issued instruction, every cycle. An 8-issue core therefore wants a
register file with about 16 read and 8 write ports. A multiported RAM cell
needs one wordline and one bitline per port, so its area grows roughly with
the square of the port count, and energy and access time follow. This RTL
implements three ways to give the core the operand bandwidth it needs
without building such a RAM:

| System | Idea | Top module |
|---|---|---|
| **MStage** | Many banks of single-port cells. An access that loses its bank gets a second chance one cycle later, in a second pipeline stage. The pipeline stalls only when three or more accesses meet in one bank. | `mstage_rf` |
| **BAIS** | Many banks of single-port cells. The instruction scheduler itself avoids bank conflicts: it only issues instructions whose banks are free. | `bais_select`, `bais_rf` |
| **NORCS** | A small register cache with all the ports, in front of a main register file with few ports. The pipeline always assumes the cache missed, so a miss costs nothing unless too many happen in one cycle. | `norcs_rf` |

`regfile_top` places one of each side by side (for BAIS, both the select
logic and the banked register file). They are alternatives, so
they share only clock and reset, and each keeps its own ports. All
parameter defaults are the configurations the three schemes were sized for:
- MStage and BAIS: an 8-issue core with 180 integer physical registers.
- NORCS: a 4-issue core with 128 physical registers.

All files are synthesizable SystemVerilog (IEEE 1800-2017). Shared constants
live in `rtl/rf_pkg.sv`.

---

## 1. MStage: the skewed multistaged multibanked register file

### 1.1 Banks and switches

The 180 registers are spread over 18 banks of 10 words each. Each bank is a
RAM of 1-read/write cells (`rf_bank`), so it serves one access per cycle.
A register number is `{bank[4:0], index[3:0]}`. Bank numbers are assumed to
be random: the renamer hands out physical registers in no particular order,
so the banks see roughly uniform traffic.

Any of the 15 request ports (10 reads, 5 writes) can reach any bank. That
needs three crossbars, each built from `mb_switch`:
- register numbers from the ports to the banks;
- write data from the ports to the banks;
- read data from the banks back to the ports.

Each bank has its own arbiter; `bank_arbiter` holds all 18 of them. An
arbiter grants one access per cycle.

### 1.2 Two chances per access

A plain multibanked file stalls whenever two accesses meet in one bank.
MStage adds a second bank stage instead. It has two *physical* stages:
1. arbitrate and route the register number;
2. access the bank and route the data.

These two stages slide over three *virtual* stages, depending on whether an
access wins or loses:

```
          cycle c      c+1          c+2          c+3
winner    rn1: arb     RR1: bank    d1 (wait)    d2 -> execute
loser     rn1: lost    rn2: arb     RR2: bank    d2 -> execute
2nd loser rn1: lost    rn2: lost    rnx: arb     bank (stalled cycle)
```

Either way the operand reaches `d2` three cycles after the group entered
`rn1`, so the group stays together. The cost of a conflict is hidden in
pipeline depth, which the core pays anyway.

Arbitration in a bank is first come, first served:
- `rnx` beats `rn2`, and `rn2` beats `rn1`;
- within a class, the lower port index wins;
- write ports are numbered before read ports, so writes beat reads.

`bank_arbiter` receives the accesses of `rn2`/`rnx` as the upper-priority
half of its request vector and the new `rn1` accesses as the lower half.

### 1.3 The skewed stall

If an access loses twice, a bank met three or more accesses. The access
goes to `rnx`, takes its bank with top priority in the next cycle, and the
pipeline must stall for one cycle. The stall is split in two halves one
cycle apart:

- **Front freeze** (`stall_front`): the cycle in which `rnx` holds an
  access. `rn1`, `rn2` and the issue handshake (`in_ready`) hold still, and
  the `rnx` access uses its bank.
- **Back freeze** (`stall_back`): the next cycle. `d1`, `d2` and the output
  hold still while the `rnx` word arrives.

The bubble inserted at the front arrives at the back exactly when the back
freezes. The groups in flight therefore stay aligned, and no operand
overtakes another. The freeze of the back half is a flip-flop copy of the
front condition.

Example for a 2-read configuration:

- Five groups enter on consecutive cycles C1 to C5.
- Group 5 loses its bank twice, because its bank is also wanted by the
  loser of group 4 and by group 5's other read.
- The groups reach execution in C4, C5, C6, C7 and C9.
- C8 is the single back-freeze cycle.

`tb_mstage_rf` checks this sequence cycle by cycle.

### 1.4 Request aggregation

Several ports of one group often name the same register: two readers of one
value, or a reader of a value the group also writes. They must not count as
bank conflicts. Two arrays handle this:

- **Before the arbiters:** a comparator array (`agg_compare`) compares the
  register numbers of all new accesses. The lowest-index access of each set
  of equal numbers becomes the leader, and only the leader requests the
  bank.
- **After the arbiters:** an AND-OR array (`agg_andor`) gives every
  follower the grant of its leader. The bank's read data then fans out
  through the read crossbar.

Because write ports rank first, a read that shares a register with a write
in the same group is led by the write. The read then receives the new value
straight from the bank port (`rf_bank` forwards write data on a write
cycle).

A leader that loses carries its followers along into `rn2`/`rnx`: the
leader index is stored with each access, so nothing is compared twice. Only
new accesses pass through the comparators.

### 1.5 Interface and timing (`mstage_rf`)

- **Input:** `in_valid`/`in_ready` handshake. A group holds up to 10 reads
  (`rd_v`, `rd_reg`) and 5 writes (`wr_v`, `wr_reg`, `wr_data`). The group
  is taken when both signals are high.
- **Output:** `out_valid` with `out_rd_v` and `out_rd_data`, 3 cycles after
  the group entered `rn1`, plus one cycle for each back freeze in between.
- **Ordering:** a read sees all writes of earlier groups and the writes of
  its own group.
- **Event outputs for counting:**
  - `conflict`: some access moved to `rn2`;
  - `aggregated`: some access rode on another's grant;
  - `stall_front`, `stall_back`: the two freeze halves.

---

## 2. BAIS: bank-aware instruction scheduling (`bais_select`, `bais_rf`)

BAIS keeps the banks and the crossbars but moves conflict avoidance into the
select logic of the scheduler. Nothing is retried after issue.

### 2.1 Arbiters

Three groups of arbiters evaluate in the same cycle over the 64-entry
window:

1. **Issue arbiters (`gp`).** The usual select logic: 3 cascaded arbiters
   pick the three lowest-numbered ready entries.
2. **Read arbiters (`gr`), one per bank (24).**
   - Each ready entry decodes the bank numbers of its source registers,
     ORs the two one-hot vectors, and requests every bank it needs.
   - `gr` of an entry is true when all of its requests were granted.
   - A bank that an earlier-issued instruction will write in the read cycle
     is *busy*, and its read arbiter grants nothing.
3. **Write arbiters (`gw`), one per bank (24).** They arbitrate on the
   destination register.

An entry issues on port `p` when `gp[p] && gr && gw`.

The bank arbiters work in parallel with one another and with the issue
arbiters, so the select path only gains the final AND. An entry that wins
`gp` but fails `gr` or `gw` wastes that issue slot for the cycle. This is
reported on `lost_bank`.

### 2.2 Write reservations

An issued instruction with a destination reserves its write bank. The
reservation is a shift register `WB_DIST` cycles long (default 2). Its
output is the busy vector that blocks the read arbiters.
`WB_DIST` is the distance between the read cycle of an instruction and the
write cycle of its result, for one-cycle operations.

### 2.3 Bypass awareness

An operand that was woken up in the last two cycles arrives through the
bypass network, not from the register file. It must not claim a bank. To
achieve this, each operand's ready flag passes through two flip-flops before
it reaches the read-arbiter decoder. An operand that is already ready when
its entry is dispatched loads both flip-flops at once, because its value is
certainly in the register file.

### 2.4 Two operands in one bank

- **Same register:** one bank access suffices. The value is duplicated in
  the read crossbar.
- **Different registers in the same bank:** BAIS still issues the
  instruction. It raises `issue_2nd_read` so that the back end spends an
  extra cycle on the second read.

### 2.5 Interface and timing

Inputs are the per-entry state of the window:
- `alloc`: the entry is dispatched this cycle;
- `req`: all operands are ready;
- `src_v`, `src_rdy`, `src_reg`, `dst_v`, `dst_reg`.

`issue_v` and `issue_idx` are combinational in the select cycle. The window
removes issued entries at the clock edge. The delay flip-flops and
reservations also update at the edge.

### 2.6 The banked register file (`bais_rf`)

`bais_rf` is the register file behind the scheduler. It has 24 banks of 8
single-port entries, 6 read ports and 3 write ports.
- **No arbitration stage.** The scheduler already kept the banks apart, so
  each bank simply takes the lowest-numbered request that names it. A
  write comes before any read.
- **Routing.** Register numbers are routed to the banks. A read crossbar
  brings each bank's word to every read port naming that register.
- **Extra read cycle.** Two different registers of one bank, read by one
  instruction, need two bank accesses. The read stage then holds for one
  more cycle: `second` is high and `in_ready` is low.
- **Timing.** A group taken at the clock edge is read in the next cycle.
  Its operands appear registered one cycle later, plus one cycle per extra
  read.
- **Writes.** `wr_*` write the banks in the cycle they are presented.

---

## 3. NORCS: the non-latency-oriented register cache system (`norcs_rf`)

### 3.1 Why "non-latency-oriented"

A conventional register cache reads the cache in one cycle and goes to the
main register file only on a miss. Every miss then disturbs the pipeline
like a cache miss. NORCS instead schedules every operand as if it missed:
the pipeline always spends the full main-file access time. A hit delivers
its data from the cache in the last of those cycles. A miss just uses the
main file and costs nothing extra, unless more operands miss in one cycle
than the main file has read ports.

### 3.2 Parts

- **`norcs_rct` (tag array).** An 8-entry CAM of 7-bit physical register
  numbers with valid flags, with 8 search ports. Each search yields a
  one-hot *read-hit wordline* vector. Results are **blindly allocated**:
  every result takes a new entry, round-robin. Any older entry holding the
  same register is invalidated in the same cycle, so a register is never
  cached twice.
- **`norcs_rcd` (data array).** 8 words, 8 read and 4 write ports. There is
  no address decoder: the hit wordlines from the tag array, and the
  allocated-entry wordlines for writes, drive the array directly.
- **`norcs_mrf` (main register file).** 128 words, only 2 read and 2 write
  ports. The read is pipelined:
  1. RR1 decodes the register number and latches the row.
  2. RR2 reads the array.

  A new read can start on each port every cycle.
- **`norcs_rn_switch`.** Routes the register numbers of missing operands
  (lowest operand index first) to the two main-file read ports. It reports
  which operands were served.
- **`norcs_wb` (write buffer).** A 4-entry FIFO. It accepts up to 4 results
  per cycle and drains 2 per cycle into the main-file write ports, so those
  ports only see the average result rate. A main-file read also searches
  the buffer, and the youngest matching entry overrides the array.

### 3.3 Pipeline

```
RS      tag search of the group's 8 source registers
RR1     misses -> register-number switch -> MRF decode
        hit whose entry was re-allocated since RS -> turned into a miss
        more misses than MRF read ports -> stay in RR1 next cycle (stall)
RR2/CR  MRF array read (+ write-buffer search) for misses,
        data-array read with the hit wordlines for hits -> out_rd_data
```

A group accepted in cycle `t` leaves in cycle `t+2`. Each extra batch of
two misses adds one cycle, during which `stall` is high and `in_ready` is
low. During a stall the main file keeps working, pipelined: the batch sent
in one cycle is read in the next and collected in a per-operand register.

**Re-allocation hazard.** Blind allocation can overwrite an entry between
the tag search and the data-array read. The tag array's `alloc_mask` gives
the entries taken by results this cycle, and a registered copy gives the
entries taken last cycle. Any hit on those entries is converted into a miss
in RR1. The current-cycle check uses the entries the offered results *would*
take, not those actually written. This keeps `stall` independent of
`wr_ready` and avoids a combinational loop. The price is an occasional
unnecessary miss.

**Results.** Results are accepted when `wr_ready` is high, which requires
two things:
- the pipeline is not stalled;
- the write buffer has room for a full set of 4.

`wr_v` must not depend on `wr_ready`. Accepted results go to the cache and
to the write buffer in the same cycle.

**Consistency contract.** A group reads the values written *before* the
cycle it is accepted. A register must not be written while a group that
reads it is in flight. Register renaming in a core guarantees both: a
physical register is written once, before its readers issue, and is not
reallocated while they are pending.

---

## 4. Parameters

| Package constant | Default | Meaning |
|---|---|---|
| `DATA_W` | 64 | word width |
| `MST_NREAD` / `MST_NWRITE` | 10 / 5 | MStage request ports |
| `MST_NBANK` / `MST_BANK_DEPTH` | 18 / 10 | banks × words = 180 registers |
| `MST_BANK_W` / `MST_IDX_W` | 5 / 4 | register number fields |
| `BAIS_W` / `BAIS_ISSUE` | 64 / 3 | window entries / integer issue ports |
| `BAIS_NBANK`, `BAIS_BANK_W` / `BAIS_IDX_W` | 24, 5 / 3 | banks and register number fields |
| `BAIS_WB_DIST` | 2 | read-to-write distance for reservations |
| `NRC_ISSUE` | 4 | NORCS issue width (8 reads, 4 writes) |
| `NRC_RC_ENT` / `NRC_NREGS` | 8 / 128 | cache entries / physical registers |
| `NRC_MRF_RP` / `NRC_MRF_WP` / `NRC_WB_ENT` | 2 / 2 / 4 | main file ports, write-buffer depth |

Every module takes these as typed parameters and can be instantiated at
other sizes.
- `mstage_rf` requires `BANK_DEPTH <= 2**IDX_W`.
- Register numbers with a bank field `>= NBANK` are out of range. The
  design assumes the renamer never produces them.

At the default sizes the design holds:
- 180 registers for the 8-issue configuration (MStage);
- a 64-entry window with 24 banks (BAIS);
- 128 registers with an 8-entry cache (NORCS).

The larger NORCS variant used for an 8-issue core needs different
parameters:
- 12 cache entries;
- a 3-read/3-write main file;
- 180 registers;
- 16/8 operand ports.

The RTL is parameterised for it but was only simulated at the defaults.

---

## 5. Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and finishes; a watchdog ends a hung
run. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
    rtl/rf_pkg.sv $(ls rtl/*.sv | grep -v rf_pkg) tb/tb_regfile_top.sv \
    --top-module tb_regfile_top
./obj_dir/Vtb_regfile_top
```

For a single block, list the package, the block's files and its testbench,
for example `tb/tb_norcs_rf.sv` with `rtl/norcs_*.sv`. Simulation needs
only two-state logic. Every register that is read is reset or written
first.

What the testbenches establish:

- **`tb_regfile_top`.** Runs all three systems at their default sizes,
  in parallel.
  - **Checks:**
    - MStage and NORCS operands against reference register arrays;
    - MStage and NORCS output cycles against the expected latency plus
      observed stall cycles;
    - the BAIS bank rules on every issued instruction;
    - BAIS register file operands, and output cycles that include the extra
      read cycles.
  - **Mechanism counts** (each must be non-zero):
    - MStage carry-overs, aggregations and stalls;
    - BAIS bank-conflict rejections, busy-bank requests, second reads and
      bypass-delayed operands;
    - extra read cycles in the BAIS register file;
    - NORCS main-file reads, stalls, write-buffer backpressure and hits
      turned into misses by re-allocation.
- **`tb_mstage_rf`.** First reproduces the five-group example of 1.3
  cycle by cycle. Then it runs 3000 random groups at full size against a
  reference, checking data and latency.
- **`tb_bais_rf`.** Checks read data and the output cycle of every group
  against a reference array. Writes are mixed in, and some of them take a
  bank that a waiting read still needs. Extra read cycles and write-blocked
  reads must both occur.
- **`tb_bais_select`.** Checks every output, every cycle, against an
  independently written model of the three arbiter groups, the delay
  flip-flops and the reservations. It also checks the bank invariants.
- **`tb_norcs_rf`.** First runs a 1-issue instance with one main-file read
  port through a directed example:
  - one instruction with a single miss flows through without stalling;
  - a second instruction has no operands;
  - a third, with two misses, stalls exactly one cycle.

  The output cycles `t+2`, `t+3` and `t+5` are checked. Then it runs 20000
  cycles of random groups and results against a reference. Half of the
  operands come from recently written registers, so both hits and misses
  are frequent.
- **Sub-block testbenches.** `rf_bank`, `bank_arbiter`, `agg_compare`,
  `agg_andor`, `mb_switch`, `norcs_rct`, `norcs_rcd`, `norcs_mrf`,
  `norcs_wb` and `norcs_rn_switch` are each compared with a small
  behavioural model under random or exhaustive stimulus.

The register traffic in all testbenches is random. No program traces are
run, so the IPC and hit rates of real programs are not reproduced here.

---

## 6. Where this RTL makes its own choices

Things the scheme descriptions leave open, decided here:

- **MStage stall timing.** The issue side freezes one cycle before the data
  side, in the cycle the `rnx` access takes its bank; the data side freezes
  in the next cycle. In the reference example no group arrives in that
  earlier cycle, so the example's cycle table is met exactly. A group
  offered then simply waits one cycle.
- **MStage ports.** Reads and writes travel together as one group per
  cycle. Priority within a class is fixed by port index.
- **BAIS.**
  - Issue arbiters and bank arbiters use fixed lowest-index priority.
  - The delay flip-flops are loaded at dispatch.
  - `WB_DIST = 2`.
  - In `bais_rf`, an extra read cycle holds the whole read stage.
- **NORCS tag array and pipeline.**
  - Blind allocation is round-robin.
  - The converted-hit rule (3.3) and the search of the write buffer on
    main-file reads are added for correctness.
  - Results are refused during a stall.
- **NORCS write buffer.** Order is FIFO. `in_ready` asks for room for a
  full set of results, not for the count actually offered.

Circuit-level structure is not modelled; the RTL keeps only the logic
function:
- hierarchical and single-ended bitlines;
- the two-column cell arrangement of the main file;
- the duplicated tag CAM.

The rest of the core is outside this RTL and is represented only by the
ports: renaming, wakeup, execution units and bypass network.

# Chrono-scheduled execution core

A dynamic (out-of-order) instruction scheduler for processors whose operation
latencies are fixed and known. A classical Tomasulo-style scheduler holds
waiting instructions in reservation stations. There, tags are compared against
every result bus in every cycle to find out when operands arrive and when an
instruction may wake up and be selected. A *chrono-scheduler* works all of this
out once, when the instruction issues. Every latency is known, so the issue
stage can compute:

* the exact cycle in which each source operand will appear on a result bus;
* the exact cycle in which the instruction will execute;
* the exact cycle in which its result will be broadcast.

After issue, the stations only count down. There are no tags, no renaming, no
CAM, no wake-up logic and no select logic. A waiting station holds just one
operand. Operands are picked off the result buses by time alone.

This repository holds synthesizable SystemVerilog for a scalar core built this
way: a register scoreboard, the issue stage, reservation tables, a pool of hold
stations, per-FU shift stations with an operand delay chain, and two
fixed-latency functional units (integer ALU, multiplier). Each has a
self-checking testbench.

## Vocabulary

| term | meaning |
|---|---|
| FU | functional unit: `FU_INT` (full latency 2: EX, WB) and `FU_MULT` (full latency 4: E1 E2 E3 WB) |
| CDB | common data bus. Each FU has its own, driven by the FU's output latch in the WB period. No tag is carried |
| RP | relative period: a cycle counted from "now" (at issue: from the issue cycle) |
| Ts1, Ts2 | RPs at which the two source operands are on a CDB. 0 = available now, either in the register file or on a CDB in this very cycle |
| T_EX | RP of the execution period (the first EX cycle) |
| Td | RP at which the result is on the FU's CDB: `Td = T_EX + L_UF - 1`. Equals `MAX(Ts1,Ts2) + L_UF` when the FU is free |
| L_UF | full latency of an FU, write-back included |
| BRT | binary reservation table: one bit per future period of a shared resource |
| K_UF | number of BRT bits the issue stage can search in one cycle |
| SS | shift station: slot in a per-FU stack that moves one place towards the FU every cycle |
| HS | hold station: entry of a pool for instructions too far from execution to fit in the SS stack |

## How one instruction is scheduled

In its issue (IS) cycle an instruction goes through these steps:

1. **Read source timing.** For every register the scoreboard keeps its value, a
   pending RP and the FU that will produce the pending value. The RP it stores
   is the one seen at the end of a cycle. A reader in a later cycle sees one
   less, so `Ts = stored - 1`. If the stored RP is 1, the value is on the CDB in
   this cycle: the read port forwards the CDB and `Ts = 0`.
2. **Find the execution period.** With `Ts = MAX(Ts1, Ts2)`, the FU's BRT is
   searched from bit `Ts` for the first free bit among `K_UF` bits. Bit `j`
   stands for period `j+1`, so the earliest candidate is `T_EX = Ts + 1`. The
   search is done from both Ts1 and Ts2 in parallel, and the comparison only
   selects between the two results, which keeps the comparator off the search
   path.
3. **Record the destination.** The scoreboard entry of `rd` gets `Td` and the
   FU. An older pending value of that register is simply forgotten: its
   producer will still broadcast it, but nobody registered for it. This is all
   the renaming needed; WAW and WAR hazards disappear without tags.
4. **Reserve** bit `T_EX - 1` of the FU's BRT.
5. **Write the station record.**
   * The source that arrives first, `MIN(Ts1,Ts2)`, goes into the record. It is
     stored as a value if already available, or as `{FU1, RP}` in the same
     32-bit field otherwise.
   * The source that arrives last is only noted: its CDB (`FU2`) and RP (`Ts`).
     If it is already available, it is written straight into the FU's
     left-input delay chain.
   * A `swap` flag records whether the record holds source 2, so that the FU
     can restore operand order for SUB, shifts and SLT.
   * The record goes to shift station `T_EX - 1` of the FU if that slot exists
     (`T_EX - 1 < N_SS`). Otherwise it goes to a free hold station, with an EX
     counter.

The example program below, issued in consecutive cycles, gets exactly these
predictions. The testbenches check every number.

| instruction | Ts1 | Ts2 | T_EX | Td | goes to |
|---|---|---|---|---|---|
| `MUL R3,R2,R1` | 0 | 0 | +1 | +4 | SS slot 0 |
| `ADD R4,R3,R1` | +3 (MULT) | 0 | +4 | +5 | HS |
| `SUB R5,R4,R3` | +4 (INT) | +2 (MULT) | +5 | +6 | HS |
| `XOR R4,R6,R1` | 0 | 0 | +1 | +2 | SS slot 0 |
| `SRL R3,R4,R2` | +1 (INT) | 0 | +2 | +3 | SS slot 1 |

## Stations: time moves down to the FU

**Shift stations** (`shift_stations`, one stack per FU, `N_SS = 3`). During
any cycle, slot `s` holds the instruction that executes `s` cycles later. Slot
0 is the register that feeds the FU. Every cycle the stack moves down one
place. The stack is in order by construction, so there is no selection logic:
the bottom slot simply is the instruction of this period. While a record moves
down:

* it counts down the RP of its first operand and captures CDB `FU1` when the
  RP expires;
* it counts down `Ts` of its last operand. When `Ts` expires, it makes the
  delay chain load CDB `FU2`.

**Delay chain** (part of `shift_stations`, `K_UF` registers). The BRT search
may push execution up to `K_UF - 1` periods past the arrival of the last
operand. That operand therefore waits in a short shift register on the FU's
other input. Chain register `j` holds the last operand of the instruction that
executes `j+1` cycles later. When a station in slot `s` captures, it writes
register `s-1`. When the operand is available at issue, it is written to
register `T_EX-1`.

At most one instruction per FU executes in a period, so neither a slot nor a
chain register can be claimed twice. Assertions check this.

**Hold stations** (`hold_stations`, `N_HS = 8`, one pool for both FUs). An
entry:

* captures its first operand by RP, exactly like a shift station;
* counts down its EX counter;
* leaves for the top shift station of its FU in the cycle its EX counter reads
  `N_SS`.

The entry that launches next for an FU is always the busy entry of that FU
with the smallest counter. That entry is recomputed every cycle from the next
state of the pool and kept in a register (the *next-HS-to-launch* pointer), so
the launch multiplexer's select is never on a critical path. Entries are
allocated by a lowest-free priority encoder.

A record launched from a hold station enters the top slot as if it were slot
`N_SS`. This is how a capture that falls on the launch cycle itself is still
honoured.

## Counter conventions (read this before changing anything)

Getting the timing right depends on a few off-by-one conventions, used the
same way everywhere:

* A scoreboard RP is the value at the end of the cycle. An issue in cycle `c`
  writes `Td`, and the value is on the CDB in cycle `c + Td`.
* Station counters (`rp1`, `ts2`, `ex`) are stored *as seen from the next
  cycle*: a counter that reads 0 during a cycle means "this cycle". The issue
  stage therefore writes `Ts - 1`, and `T_EX - 1` for the EX counter.
* BRT bit `j` is period `j + 1`. The current period can never be reserved by
  the instruction issuing now. Each cycle the table shifts towards bit 0 after
  the new reservation is merged in.
* FU timing: a record in slot 0 during cycle `c` executes in `c`. The result
  is on the CDB in `c + L_UF - 1`.

`station_tick()` in `cs_pkg` is the single place where a waiting record ages by
one cycle. Both station kinds use it.

## Structural stalls

The instruction is not accepted (`in_ready` low) and is offered again in the
next cycle when:

* **(a)** it needs a hold station and none is free (`ev_stall_hs`);
* **(b)** the `K_UF` bits searched in the BRT are all busy (`ev_stall_brt`);
* **(c)** the window runs past the end of the BRT, or `Td` does not fit the RP
  counter (`ev_stall_range`).

The counter width and BRT length come from the bound on predictable cycles:

    PCLK_MAX = max(L_UF) * N_HS - floor((N_HS - 1) / m)      m = issue width
    RP_W     = ceil(log2(PCLK_MAX))

With `L_MULT = 4`, `N_HS = 8` and `m = 1` this gives `PCLK_MAX = 25` and
5-bit counters. The BRT is 25 bits long.

## Files

| file | contents |
|---|---|
| `rtl/cs_pkg.sv` | configuration, Eq. for `PCLK_MAX`/`RP_W`, operation set, `instr_t`, `station_t`, `station_tick()` |
| `rtl/reg_scoreboard.sv` | register values + RP + producing FU, CDB capture, CDB forwarding at issue |
| `rtl/brt.sv` | one reservation table |
| `rtl/brt_search.sv` | K_UF-bit priority search; optional OR with a shared-CDB table |
| `rtl/issue_unit.sv` | the IS-stage computation and stall detection |
| `rtl/hold_stations.sv` | HS pool, launch multiplexers, next-HS pointers |
| `rtl/shift_stations.sv` | SS stack and left-input delay chain of one FU |
| `rtl/functional_unit.sv` | pipelined INT or MULT FU with CDB output latch |
| `rtl/chrono_core.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

### Top-level interface (`chrono_core`)

* `in_valid`, `in_instr` (`instr_t`: op, rd, rs1, rs2, use_imm, imm),
  `in_ready`: decoded instructions in program order. `in_ready` is the issue
  decision and depends combinationally on the offered instruction.
* `cdb_valid[1:0]`, `cdb_data[1:0]`: the two result buses.
* `dbg_addr` → `dbg_val`, `dbg_rp`: register inspection. `idle`: nothing in
  flight.
* `ev_*`: the issue prediction (`ev_td`, `ev_tex`, `ev_fu`) and one-cycle
  strobes: issue to HS, HS launch, BRT delay, CDB forwarding at issue, chain
  capture, and the three stall causes.

Parameters: `N_HS` (8), `N_SS` (3), `K` (2), `LEN` (`PCLK_MAX`). Latencies,
widths and the register count are package constants in `cs_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/cs_pkg.sv \
        tb/tb_chrono_core.sv --top-module tb_chrono_core
    ./obj_dir/Vtb_chrono_core

`-y rtl` lets Verilator find each module in the file of the same name; the
package is named explicitly because it must be read first. `-Wno-fatal` keeps
the width warnings of the testbenches' random stimulus from stopping the
build. Replace the testbench name to run another one. `tb_chrono_core` runs the core
at its default parameters and takes well under a second. It covers:

* register initialisation;
* the example program, with the predicted Td/T_EX of each instruction checked
  and the MULT result checked on its CDB exactly at IS+4;
* a dependent multiply chain that fills every hold station;
* a longer chain whose consumer falls beyond the reservation table;
* 4000 random instructions over eight registers.

Throughout, every result must appear on its FU's CDB in exactly the period Td
predicted when the instruction issued, with the right value, and a CDB must
stay silent in every period nobody reserved. This is the property the whole
scheme rests on.

After each part it compares all registers with an in-order reference model. It
also counts each mechanism (direct SS issue, HS issue and launch, BRT delay,
CDB forwarding at issue, chain capture, operand swap, each stall cause) and
fails if one never happens. The unit testbenches check their modules against
independent models, cycle by cycle.

## What is taken from the scheme and what was chosen here

Taken from the chrono-scheduling scheme:

* the RP equations;
* the scoreboard holding an RP and a producer FU per register;
* one-operand stations that count down and capture from the CDB named in them;
* the in-order shift-station stack whose bottom slot is the FU's input register;
* the hold-station pool with a registered next-to-launch select;
* BRTs searched `K_UF` bits at a time from Ts, with the MAX after the search;
* the `K_UF - 1` extra registers on the FU's left input;
* the three stall causes;
* the counter-width bound;
* latencies 2 and 4, three SSs, K_UF = 2, one CDB per FU, a scalar 32-bit
  machine.

Choices made here, where the scheme leaves things open:

* **Sizes:** 8 hold stations, 32 registers with R0 hardwired to zero.
* **Operations and FUs:** the operation set (ADD SUB AND OR XOR SLL SRL SRA SLT
  on the integer FU, MUL on the multiplier). An immediate second source is
  treated as available at issue. Both FUs are fully pipelined, and the product
  is computed in E1 and carried through E2/E3.
* **Station records and counters:** binary down counters. A one-hot shifting
  RP would be an equivalent alternative. The delay chain does not keep an
  avail/wait bit.
* **Pool and allocation:** a single HS pool shared by both FUs, with
  lowest-index allocation.
* **Ties:** when both sources arrive in the same period, source 1 goes into the
  station.
* **Interface and reset:** the valid/ready instruction port and an
  asynchronous active-low reset.

Places where this RTL departs from the scheme as first described:

* **Launch trigger.** The scheme launches a hold station when the RP of its
  last operand reaches `N_SS + 1`. Here every record carries its own EX
  counter and launches when that counter reaches `N_SS`. The two are the same
  when the FU was free at `MAX(Ts) + 1`. The EX counter also covers an
  instruction whose execution the BRT pushed later, and one whose sources are
  all ready early.
* **Where the last operand waits.** The scheme has a hold station catch its
  second operand in the cycle before EX. Here the last operand is always caught
  into the FU's delay chain, at its own Ts, whether the record is in a hold or
  a shift station. The hold station therefore only ever captures the first
  operand.
* **Non-commutative operations.** The scheme suggests inverting operand signs
  for SUB and a swap circuit only for DIV. Here every record carries a swap
  flag and the FU puts its two inputs back in program order for every
  operation.
* **RP encoding.** One of the scheme's figures shifts a one-hot RP; its cost
  table uses binary down counters. Binary counters are used throughout.

## Not included

* **Instruction fetch and decode.** The core starts at IS and takes decoded
  instructions.
* **A shared CDB.** `brt_search` supports it (`USE_CDB = 1` ORs each FU bit
  with the CDB-table bit `DUR` periods later, giving T_EX and T_WB) and is
  tested that way. The core itself uses one CDB per FU, so no CDB table is
  instantiated.
* **Non-constant latencies.** No loads or stores through a cache, no divider,
  and no swap circuit beyond the operand-order flag.
* **Precise interrupts and speculation.** There is no reorder buffer.
* **Superscalar issue** (`m > 1`).
* **Splitting the scheduler into a slow HS section and a fast SS/FU section**
  (different clock or technology, launches started several cycles early). The
  logic here is all in one clock domain.

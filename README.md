# TM-RF: a trimodal, power-managed register file

A physical register in an out-of-order core holds useful data for only a small
part of its life. After its last reader has read it, it is usually kept only in
case a mispredicted branch has to be undone; after it is released it holds
nothing at all. Yet a conventional register file keeps every bit-cell fully
powered the whole time, and bit-cell leakage dominates the register file's
static power.

TM-RF gives every register three power modes and picks one per register from
the rename state that the core already tracks:

| register state (rename view)                     | mode    | DEAD        | DROWSY | contents             |
|--------------------------------------------------|---------|-------------|--------|----------------------|
| value still to be written or read                | work    | 0           | 0      | normal read/write    |
| all readers done, kept for branch recovery (HC)  | drowsy  | 0           | 1      | retained, not usable |
| released                                         | dead    | short pulse | 1      | discharged to 0      |

In the circuit, each bit-cell gets an extra discharge transistor (N_D, driven by
DEAD) and each register row a footer transistor (N_R) to a virtual ground.
DROWSY turns the footer off, so the row leaks through a transistor stack but
keeps its data; a DEAD pulse discharges every bit to 0, the lowest-leakage state.
Leaving drowsy or dead mode costs a wakeup delay while the virtual ground is
pulled back down. The footer is built from transistor fingers; two control
bits, DR1 and DR2, choose how many are on:

* **lp-TM** (DR1 = 0, DR2 = 0): all fingers on, wakeup in **1 cycle**;
* **aggr-TM** (DR1 = 0, DR2 = 1): bottom finger only, lower leakage, wakeup in
  **2 cycles**.

This RTL models all of this at the level of logic and cycles. Leakage currents,
voltages, transistor sizing and the threshold-voltage choices that make the
cell age well are properties of the transistor-level circuit and are not
represented here.

## Structure

```
tmrf_top
├── reg_status_table        per-register rename status (Unmap, Complete, Counter,
│                           Earlyfree, 1stReady)
├── tm_control_logic  x128  status -> DEAD pulse, DROWSY level, free flag, mode
└── tm_rf_array             128 x 64 b, 4 read / 2 write ports
    ├── zero_write_filter x2   skip writing 0 into a discharged register
    └── tm_register      x128  one row: storage, discharge, wakeup counter
```

`tmrf_pkg` holds the mode and scheme enums and the wakeup delays.

Default sizes are those of the evaluated configuration: 128 physical integer
registers of 64 bits, four read and two write ports, and a 4-wide machine
(4 rename and commit lanes, 8 source-operand lanes). The floating-point file
of the same core would be a second instance.

## The control schemes

`tm_control_logic` is a small decision table per register, selected by the
`SCHEME` parameter.

**Release condition** (both schemes): `unmap & complete & counter == 0`, i.e.
the register's architectural name has been redefined, the redefining
instruction has committed, and no renamed reader is still waiting.

**Low complexity, `SCHEME_LC`.** Released → dead; anything else → work. Only
the conventional rename fields are needed. A register goes from work straight
to dead, so reads never wait; only the first write after allocation can hit
the wakeup delay.

**High complexity, `SCHEME_HC` (default).** Uses two more bits per register,
set from compiler information:

* *Earlyfree*: the register's last reader has been renamed and there is no
  unresolved branch between it and the redefining instruction;
* *1stReady*: the instruction that first writes the register is on its way
  (set at allocation or by a later event, cleared when it commits).

Then, in priority order:

1. released, or early release (`counter == 0 & earlyfree & !first_ready`) →
   **dead**, and the register is reported free;
2. `counter == 0 & !first_ready` (idle, kept for recovery) → **drowsy**;
3. otherwise → **work**.

Setting 1stReady at allocation wakes the register at once, which hides the
wakeup delay behind the pipeline stages between rename and write-back. If the
core sets it later instead (`fr_set_*`, for example when the producer issues),
an allocated but still empty register with no renamed readers stays drowsy.
It holds the 0 left by its discharge, and a drowsy row holding 0 leaks as
little as a dead one, so the empty register stays in the low-leakage state
until just before it is written.

A register can also go drowsy before a late reader has even been renamed;
when that reader is renamed the counter becomes non-zero, the register returns
to work mode, and the reader may have to wait out the wakeup delay. That wait
is the performance cost of the scheme.

In both schemes DROWSY is a combinational function of the registered status.
DEAD is a pulse one clock long, issued in the first cycle of each free period
(one flip-flop per register remembers the previous free value).

## Timing and the port handshake

Everything is synchronous to `clk`, with an asynchronous active-low `rst_n`.

* Status events (allocation, rename of readers and redefiners, operand reads,
  commits) are sampled at a clock edge. The new DROWSY level and, for a newly
  released register, the DEAD pulse appear in the following cycle; the row is
  cleared to 0 at the end of that cycle.
* A row is **awake** when DROWSY is low and the wakeup count has run out. If
  DROWSY falls in cycle *t*, the row is unusable in cycles *t* … *t*+*w*−1 and
  usable from *t*+*w*, with *w* = 1 (lp-TM) or 2 (aggr-TM). Out of reset a row
  needs 2 cycles whatever DR1/DR2 say. Change DR1/DR2 only while the rows that
  are waking up are not affected (for example with the file idle); a row that
  is already counting keeps the delay it started with.
* Reads are combinational: `rd_data` follows `rd_addr` in the same cycle.
  `rd_ready` says whether the value is valid this cycle. It is low while the
  register is drowsy, dead or waking, and the requester must repeat the read.
* Writes take effect at the clock edge. `wr_ready` says whether the write is
  accepted this cycle; a write that is not ready is dropped and must be
  repeated.
* **Zero-write skipping.** A released register already holds 0. A write of an
  all-zero word into a register that has not been written since its discharge
  is not performed: `wr_skipped` and `wr_ready` are both 1, even if the row is
  still waking up.
* If both write ports name the same register in one cycle, port 1 wins.

## Rename-status interface

The core (not part of this design) reports events on lanes, each a valid bit
plus a physical register number. All events of a cycle are applied together,
an allocation first.

| event lanes (`*_valid`, `*_preg`)   | lanes | effect on the register's status |
|-------------------------------------|-------|---------------------------------|
| `alloc_*`, `alloc_first_ready`      | 4     | mapped: Unmap = 0, Complete = 0, Counter = 0, Earlyfree = 0, 1stReady = `alloc_first_ready` |
| `fr_set_*`                          | 4     | the first writer is about to write: 1stReady = 1 |
| `use_*`, `use_earlyfree`            | 8     | a reader renamed: Counter + 1; `use_earlyfree` marks the last reader (sets Earlyfree) |
| `read_*`                            | 8     | a reader has taken its operand (from the file or a bypass): Counter − 1 |
| `redef_*`                           | 4     | the redefining instruction renamed: Unmap = 1 |
| `redef_commit_*`                    | 4     | the redefining instruction committed: Complete = 1 |
| `prod_commit_*`                     | 4     | the first writer committed: 1stReady = 0 |

`reg_free` tells the allocator which registers can be reused. The design
assumes that the core:

* never sends more reads than renamed readers (the counter is 8 bits wide;
  an assertion in `reg_status_table` flags an underflow);
* only reallocates a register that `reg_free` reports free (an assertion in
  `tmrf_top` checks this), and, with the HC scheme, only once its
  conventional release condition holds, even if it was already released
  early: its data is gone, but the core still has to retire the old mapping's
  redefine and commit events;
* handles branch-misprediction recovery itself. A drowsy register wakes up
  as soon as a reader is renamed against it again.

Out of reset every register is free, discharged and asleep.

## Departures from the circuit and choices made here

* The DEAD pulse in the circuit is a few tens of picoseconds inside one
  cycle; here it lasts one clock and the discharge acts at the clock edge.
* The circuit's DR1 = 1 settings are not defined; here they are treated as the
  slow (2-cycle) setting.
* The early-release condition uses the same reader counter as the
  conventional one.
* Port handshakes (`*_ready`), write-conflict priority, combinational reads,
  lane counts and counter width are this design's choices; the circuit only
  fixes that a write completes in one cycle and that wakeup costs 1 or 2 cycles.
* Only the 1- and 2-cycle wakeup latencies of the footer sizes are modelled.
  The worst-case sizing method and the high-threshold write-access devices
  that give those latencies and the ageing tolerance are circuit work with no
  counterpart in RTL.

## Verification

Each block has a self-checking testbench in `tb/` with a reference model
written separately from the RTL. Each prints
`TB_RESULT checks=N failures=M`.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_tm_register`       | random drowsy/dead/write sequences with both finger settings; contents, discharge flag and exact wakeup cycles |
| `tb_zero_write_filter` | all enable/row-state combinations against zero, one-hot and random data |
| `tb_tm_rf_array`       | 128 × 64, 4R/2W; random per-row modes and port traffic; read data, ready/stall, zero skipping, same-row write priority |
| `tb_reg_status_table`  | several events per cycle on the same registers; all five fields |
| `tb_tm_control_logic`  | both schemes against their decision tables, pulse placement, both release kinds |
| `tb_tmrf_top`          | full default size, HC: complete register lifetimes driven by a core model, run with lp-TM and then aggr-TM; checks mode, free, pulse, wakeup and read data every cycle. It also checks that read and write stalls last at most 1 (lp) / 2 (aggr) cycles, that a directed write after allocation and a directed read of a drowsy register wait exactly that long, that every mechanism (stalls, zero skips, drowsy periods, empty registers held drowsy until 1stReady, early and conventional releases) actually occurs |
| `tb_tmrf_top_lc`       | the same with `SCHEME_LC`; also checks that reads never stall and no drowsy or early release occurs |
| `tb_tmrf_top_configs`  | the `tb_tmrf_top` test (through the parameterised `tmrf_harness`) on six sizes side by side: 128 × 64 b with 2R/1W and with 12R/6W, 64 and 256 registers, 32- and 128-bit words |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl rtl/tmrf_pkg.sv \
    rtl/tm_register.sv rtl/zero_write_filter.sv rtl/tm_rf_array.sv \
    rtl/reg_status_table.sv rtl/tm_control_logic.sv rtl/tmrf_top.sv \
    tb/tb_tmrf_top.sv --top-module tb_tmrf_top
./obj_dir/Vtb_tmrf_top
```

`tb_tmrf_top_configs` also needs `tb/tmrf_harness.sv` on the command line.

Each testbench finishes in well under a second of simulation time. The design
is plain synthesizable SystemVerilog. At the default size the whole file is
about 10 k flip-flops, 8 k of them the register contents. A real
implementation would use a custom multi-ported array for the contents.

Lint notes: `tmrf_top` leaves the status table's raw `counter` output
unconnected (only `cnt_zero` is needed), which Verilator reports as an empty
pin connection.

# APON OLT MAC processor

In an ATM passive optical network (APON) up to 64 optical network units (ONUs) share one
upstream fibre to the optical line termination (OLT). An ONU may only send a cell when the OLT
has given it a *grant*. The OLT sends grants in the 27 grant fields of the PLOAM cell that opens
each half of the downstream frame. This RTL is the OLT's scheduler. Each half frame it decides
who gets those 27 grants:

* it collects queue-length reports (CBR and VBR) from the ONUs,
* it shares a fixed budget of grants among them, CBR first,
* it spreads each ONU's grants evenly over time with a look-up table,
* it interleaves ranging windows, PLOAM grants and OMCC grants, and
* it hands the result, one grant per clock, to the PLOAM cell generator.

The top module is `mac_processor`. It has no parameters: it is built for the full 64-ONU system.

## The half-frame rhythm

Everything runs on one clock, the downstream byte clock (19.44 MHz at 155.52 Mbit/s). A half
frame has 28 cells of 53 bytes, 1484 clocks in all. Cell 0 is the PLOAM cell.
`mac_timing` counts bytes and cells and gives one-clock strobes at byte 0 of these cells:

| cell | strobe | what happens |
|---|---|---|
| 0 | `pclk` | PLOAM clock: a new half frame begins |
| 3 | `ms_start` | mini-slot scheduling: one MDLUT column moves into the DGCB; at the first half frame of a period, the ALU starts |
| 20 | `win_start` | window scheduling: a requested ranging window is written into the RGCB |
| 27 | `out_start` | the multiplexer sends the 27 grants of the next PLOAM cell |

Two counters run alongside:

* `hf_idx` counts the eight half frames of the four-frame grant cycle.
* `per_idx` counts the half frames of the mini-slot period.

The mini-slot period is MPR half frames long, with MPR from 1 to 8, set by the CPU.

## Grant codes

Each grant is one byte:

| code | grant |
|---|---|
| `FF` | idle |
| `FE` | unassigned (UA_GR) |
| `FD` | ranging |
| `FC` | W_End: end of a ranging window (internal) |
| `FB` | W_Pro: rest of a ranging window (internal) |
| `80+g` | divided slot for ONU group g (DS_GR), g = 0..7 |
| `40+n` | CBR data grant for ONU n |
| `00+n` | VBR data grant for ONU n |
| `88+n` | PLOAM grant for ONU n |

The PLOAM grant code is this design's choice. It uses the 64 codes left free below the
reserved range. The two window markers are never sent: the PLOAM cell gets UA_GR in their place.
The raw stream `gr_raw` keeps them, for the arrival predictor.

## Reports: divided slots and mini-slots

ONUs are organised in 8 groups of 8; ONU `8g+k` is member k of group g. One divided-slot grant
per half frame asks one group to answer. In the next upstream slot the group sends 56 bytes:
eight 7-byte mini-slots, one per member. Each mini-slot holds:

* 3 bytes of overhead,
* the VBR queue length,
* the CBR queue length,
* a reserved byte,
* a CRC byte.

`minislot_rx` buffers two such slots, each tagged with the group it was granted to. It scans
each slot at one byte per clock and emits one report per ONU. The CRC is CRC-8 with polynomial
x^8+x^2+x+1 and initial value zero, over the VBR, CBR and reserved bytes. The polynomial is this
design's choice. A report whose CRC fails counts as zero requests, and `ev_crc_err` pulses.

The divided-slot grant sent with column c of the MDLUT names group c. A period of MPR half
frames therefore polls groups 0..MPR-1, which are ONUs 0..8·MPR-1.

## Sharing the budget: MAC-ALU

A period has a budget of Y = 25·MPR data grants, that is 25 per half frame. At the first half
frame of a period, `mac_alu` takes the reports of the previous period and computes:

```
CBR_t = Σ C_i      CBR_Gi = C_i                   if CBR_t <= Y
                   CBR_Gi = floor(C_i·Y / CBR_t)   otherwise
SUB_Y = Y − Σ CBR_Gi
VBR_t = Σ V_i      VBR_Gi = V_i                   if VBR_t <= SUB_Y
                   VBR_Gi = floor(V_i·SUB_Y / VBR_t) otherwise
```

Each scaled product goes through one shared bit-serial multiplier/divider (`serial_muldiv`),
which takes 25 clocks. For 64 ONUs at MPR 8 the whole computation needs about 3500 clocks, so
it runs over about three half frames. That is allowed because its results are needed only a
period later. The bound tested is 1378 clocks per half frame of the period.

The source draws the read, CBR, VBR, ranging and DGCB phases inside every half frame. Here that
order holds within one half frame only at MPR 1; for longer periods the arithmetic runs once
per period.

The floors lose grants under overload: up to one grant per ONU and class is left unassigned
and goes out as UA_GR. With 32 heavily loaded ONUs at MPR 4, 80 of the 100 grants are assigned;
with 64 ONUs at MPR 8, 191 of 200 are. This is how the equations behave, not a defect of this
implementation. A remainder pass would fix it, but it would change the arithmetic.

The counts go into `mgcb`, one CBR and one VBR count per ONU, and wait there for the MDLUT.

## Spreading grants: the MDLUT

This is the least obvious part of the design. The MDLUT (`mdlut`) is a table of 25 rows by
MPR columns:

* A **column** is one half frame of the period.
* A **row** is one of the 25 data-grant positions in that half frame's PLOAM cell.

An 8-bit address holds the row ("upper", 5 bits) and the column ("lower", 3 bits).

**Writing.** The writer walks the counts and forms one list: the CBR grants of ONU 0, 1, …,
N−1, then their VBR grants, then UA_GR up to Y entries. Entry k of the list goes to:

```
column = k mod MPR            (the lower address runs fastest)
row    = useq(k div MPR)      (the upper address advances once per MPR entries)
```

Because the column runs fastest, an ONU's consecutive grants land in consecutive half frames.
Its grants per half frame therefore differ by at most one. `useq` is a fixed permutation of
0..24 that spreads the rows:

* MPR = 1: `21 18 15 12 9 6 3 0 23 20 17 14 11 8 5 2 24 22 19 16 13 10 7 4 1`.
  Each next entry lands three rows away.
* MPR > 1: `useq(k) = 3·((5·⌊k/3⌋) mod 8) + (k mod 3)` for k < 24, and `useq(24) = 24`.
  Rows come in triples: 0 1 2, 15 16 17, 6 7 8, 21 22 23, 12 13 14, 3 4 5, 18 19 20, 9 10 11, 24.

**Reading.** Each `ms_start`, one column is read row 0..24 (the upper address runs fastest).
The 25 grants and then the divided-slot grant go into the DGCB. After the last column the
banks swap.

**Worked example.** Take MPR = 2 (Y = 50), ONU 1 asking for 5 CBR cells and ONU 2 for 3. No
scaling is needed. List entries 0..4 are ONU 1 and entries 5..7 are ONU 2:

| entry | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| ONU | 1 | 1 | 1 | 1 | 1 | 2 | 2 | 2 |
| column | 0 | 1 | 0 | 1 | 0 | 1 | 0 | 1 |
| row | 0 | 0 | 1 | 1 | 2 | 2 | 15 | 15 |

So half frame 0 carries ONU 1 three times and ONU 2 once; half frame 1 carries each twice.

**Double banking.** The table has two banks: one is written while the other is read. The
written bank takes over at the next period boundary. If the write bank is not ready by then,
the old bank is dropped and UA_GR is read until a new schedule arrives.

The double banking is this design's choice; the source says only that the table is written
and read once per half frame.

**Latency.** A report made in period p is computed at the start of period p+1. It is written
into the idle bank during p+1, and its grants are sent during period p+2.

## Buffers and the multiplexer

**DGCB** (`dgcb`) is a 32-entry FIFO of data grants. Each half frame it receives 26 grants and
normally hands out 26. While a ranging window is being served the multiplexer takes the window
grants instead, so the DGCB fills. If it holds more than 6 entries, another 26 would not fit.
The source prints this threshold as 28, which cannot work with a 32-entry buffer; 32 − 26 = 6
is used instead. `stall` then skips that half frame's move (`ev_move_skip`). The MDLUT keeps its column and
moves it at the next half frame, so no data grant is lost. The table's reading falls one half
frame behind, and its banks swap one half frame later.

The divided-slot grant of the skipped half frame is not sent. Its group therefore does not
report in that period, and its ONUs count as asking for nothing in the next budget. This is
this design's behaviour; the source does not say what a skipped move does to the divided-slot
grant.

**RGCB** (`rgcb`) holds a ranging window. The CPU sets WSR = `1_nnnnnnn` (flag and length,
3..127 cells). At the next cell 20, if the RGCB is empty, the window is written:

* W_Pro in every position,
* the PGR grant in position n/2,
* W_End in the last position.

The flag then clears itself. The PGR grant is the ranging grant, or one ONU's PLOAM grant when
its delay is being measured. On the fibre the window reads as a run of UA_GR with one grant in
the middle, so a single ONU answers into a quiet gap.

**MAC-MUX** (`mac_mux`) sends fields 0..25 from the RGCB while it holds grants, else from the
DGCB, else UA_GR. Field 26 (the 27th) depends on which half frame of the four-frame cycle the
PLOAM cell opens:

| half frame | field 26 |
|---|---|
| 0 | PLOAM grant of ONU `po_onu`; the pointer advances every four frames, so each ONU gets one every 256 frames |
| 2, 4, 6 | OMCC grant for the next ONU of a rotating pointer (this design uses the ONU's CBR grant code) |
| 1, 3, 5, 7 | idle |

A PLOAM or OMCC grant for an ONU whose Alive bit is clear becomes UA_GR.

## CPU registers (`mac_regs`)

| addr | register | contents |
|---|---|---|
| 0 | MPR | 1..8; 0 reads as 1 and values above 8 as 8 |
| 1 | PGR | grant placed in the middle of a window; reset: ranging grant |
| 2 | WSR | bit 7 window request, bits 6:0 length |
| 8..15 | Alive-1GR..Alive-8GR | bit b of register 8+k: ONU 8k+b is active |

Writes are synchronous (`cpu_we`, `cpu_addr`, `cpu_wdata`); reads are combinational.

## Top-level interface

| signals | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | byte clock; asynchronous active-low reset |
| `cpu_we`, `cpu_addr`, `cpu_wdata`, `cpu_rdata` | in/out | register port |
| `ds_valid`, `ds_sof`, `ds_byte`, `ds_group` | in | upstream divided slots, with the group each was granted to; a slot is 56 consecutive valid bytes |
| `gr_valid`, `gr_idx`, `gr_out`, `gr_raw`, `gr_src` | out | 27 grants per half frame in cell 27: `gr_out` for the PLOAM cell, `gr_raw` with window markers, `gr_src` 0 = RGCB, 1 = DGCB, 2 = none, 3 = field 26 |
| `pclk`, `cell_cnt`, `hf_idx`, `per_idx` | out | time base |
| `ev_*`, `st_*` | out | events (move skipped, bank swap, CRC error, ALU done) and state, for monitoring |

## What departs from the source, and what is assumed

* **Fixed by this design.** The grant-stream timing is fixed to cells 3, 20 and 27 of a
  28-cell half frame. Cell numbering starts at 0 for the PLOAM cell.
* **Reporting window.** A period's budget is shared among the 8·MPR ONUs polled in that period.
* **DGCB stall level.** The stall level is 6, not the printed 28.
* **Row permutation.** The source gives the row permutation for MPR = 1 and 8 only. The MPR = 8
  permutation is used for every MPR from 2 to 7.
* **Unspecified codes.** The PLOAM grant code, the OMCC grant code, the CRC polynomial and the
  register map are not given by the source and are chosen here.
* **OMCC half frames.** The source numbers the OMCC frames two ways ("2nd, 3rd, 4th frame"
  and "2nd, 4th, 6th"). Both fit half frames 2, 4 and 6, which is what is built.
* **CBR before VBR.** The source also contains a sentence that reads the other way round.
* **Window acceptance.** A new window is accepted only when the RGCB is empty. A window
  shorter than 3 is raised to 3.

Not included, as they are outside the scheduler:

* the PLOAM cell generator and the arrival predictor,
* the ranging delay measurement,
* the ONU side,
* the optical and burst-mode receiver.

Their connections are ports of the top.

## Size

Yosys coarse synthesis of `mac_processor` gives about 1400 word-level cells, 4900 flip-flop
bits and 4100 memory bits. The memory is the two MDLUT banks, the DGCB, the RGCB and the
divided-slot buffer. No timing analysis has been done.

## Testbenches and how to run them

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_serial_muldiv` | floor(a·b/d) against direct arithmetic; latency |
| `tb_mac_alu` | equations against a model for unscaled, CBR-scaled and VBR-scaled loads at MPR 1, 2, 5 and 8; the time budget |
| `tb_mgcb` | count tables and the pending handshake |
| `tb_mdlut` | every table address against the formulas above, bank swap, UA fill, write latency |
| `tb_dgcb` | FIFO order, stall at every fill level, overflow |
| `tb_rgcb` | window contents for many sizes, clamping, flag clear |
| `tb_mac_mux` | priorities, field 26 over the cycle, Alive masking, marker replacement |
| `tb_minislot_rx` | report extraction, CRC errors, back-to-back slots at line rate |
| `tb_mac_timing` | strobes, counters and the PLOAM pointer across MPR changes |
| `tb_mac_regs` | register map, clamping, flag clear |
| `tb_mac_processor` | the whole scheduler at its defaults against a reference of the equations |
| `tb_workloads` | the example above at MPR 2 and at MPR 1, 32 ONUs at MPR 4, 64 ONUs at MPR 8, windows of 3 and 127 cells |

`tb_mac_processor` drives an ONU model that answers each divided-slot grant. It runs four
phases: light load, overload with a bad CRC, a 100-cell window, and a switch to MPR 1. For
each, it compares the per-ONU grant counts of a whole period with the reference. It also
checks that every mechanism occurred: scaling, CRC error, skipped move, bank swap, and PLOAM,
OMCC and idle grants.

`mac_processor` and `serial_muldiv` carry concurrent assertions. Those in the top check that:

* a column move never meets a full DGCB,
* column moves do not overlap,
* the multiplexer pops only non-empty buffers,
* grants leave only in cell 27.

The one in `serial_muldiv` checks its caller contract: no start while busy, and a ≤ d with
d ≠ 0. Build with `--assert` to have them stop a simulation.

To run one with Verilator 5 from the top folder:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_mac_processor.sv --top-module tb_mac_processor
./obj_dir/Vtb_mac_processor
```

Each testbench runs in well under a second.

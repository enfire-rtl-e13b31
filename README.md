# ENFIRE: a spatio-temporal LUT fabric

An FPGA evaluates a logic network spatially. Every LUT is a separate piece of
hardware, and a large programmable interconnect wires the LUTs together. That
interconnect dominates an FPGA's power and delay. ENFIRE takes another route.
It keeps many 8-input LUTs as columns of a dense SRAM inside a small
processing element, the **memory logic block (MLB)**. It evaluates them one
after another, two per clock, under a static schedule. The signals of the
network stay in a 64-bit register file between evaluations. Only the values
that cross MLB boundaries travel on a sparse, time-multiplexed bus hierarchy:
four MLBs form a **cluster** and four clusters form a **tile**.

This repository is synthesizable SystemVerilog for one tile: 16 MLBs, each with
a 64 x 128-bit schedule table, 64 one-bit registers and 4 kB of LUT/data
memory in two banks. It also has self-checking testbenches, including a
full-size tile test against an instruction-level reference model.

## Hierarchy

```
enfire_tile                      16 MLBs; inter-cluster bus + hold register; host port
 └─ mlb_cluster  x4              intra-cluster bus: one 8-bit lane per MLB, seen by all four
     └─ mlb  x4                  one processing element
         ├─ mlb_ctrl             program counter / run state
         ├─ sched_table          64 entries x (2 x 64-bit instructions)
         ├─ mlb_decoder  x2      one per VLIW slot
         ├─ mlb_regfile          64 x 1 bit, 16 bit-read ports, 2 masked 8-bit write ports
         ├─ addr_gen  x2         LUT inputs -> bank row; LUT index -> bank + segment
         ├─ mem_ctrl  x2         bank enable + segmented-wordline select
         ├─ lut_data_mem         two lut_mem_bank (256 x 64 bits each)
         └─ mlb_datapath         response extraction/alignment, bus lanes, MOVE
```

`enfire_pkg` holds the sizes, the instruction layout, the structs and the
segment map.

## One schedule entry per clock

While an MLB runs, the entry at the program counter is fetched, both of its
instruction slots are decoded, and both execute in the same clock. Fetch,
register read, memory read and register write-back form one combinational
path per cycle. There is no pipeline and therefore no hazard: an entry sees
every register written by the previous entry. There are no branches. The
program counter steps by one until an entry holding `HALT` has executed (the
other slot of that entry still executes) or entry 63 has executed.

A **LUT** slot names eight register addresses (6 bits each). The eight bits
read there form the 8-bit row address of the LUT. The LUT's width (1, 2, 4 or
8 output bits) and index pick the bank and the columns. The response is
written back through the slot's 8-bit write port: to one register row,
starting at a bit offset, with a write enable only on the response's bits.
The two slots therefore need only one write address each, not one per output
bit.

## How LUTs sit in the memory

Each bank is 256 rows x 64 bits. A LUT of width *w* occupies *w* adjacent
columns over all 256 rows, so the LUT inputs *are* the row address and no
address arithmetic is needed. The wordline of a row is cut into gated
segments. A read energizes only the segment of the addressed LUT; in the RTL
the unselected columns read as zero. A row holds four LUTs of each width:

| width | segment 0 | segment 1 | segment 2 | segment 3 |
|-------|-----------|-----------|-----------|-----------|
| 8x8   | 39..32    | 47..40    | 55..48    | 63..56    |
| 8x4   | 7..4      | 15..12    | 23..20    | 27..24    |
| 8x2   | 3..2      | 11..10    | 17..16    | 19..18    |
| 8x1   | 0         | 1         | 8         | 9         |

Columns 31..28 form a fifth 4-bit segment. No LUT index reaches it, so it
only holds plain data. Index bit 2 of a LUT selects the bank, so each MLB has
eight LUTs of each width (32 in all).

The two slots of an entry must use different banks, because each bank has
one read port. If both slots address the same bank, slot 0 is served,
slot 1 reads zeros, and an assertion fires.

## Instruction encoding (64 bits per slot)

| bits   | LUT                                    | MOVE                                         |
|--------|----------------------------------------|----------------------------------------------|
| 63:62  | `01`                                   | `10` (`00` NOP, `11` HALT)                   |
| 61     | size[1]                                | 0 send / 1 receive                           |
| 60     | size[0] (0: 8x1 … 3: 8x8)              | 0 intra-cluster / 1 inter-cluster            |
| 59:57  | LUT index ([59] bank, [58:57] segment) | [59] 0: 4 bits, 1: 8 bits (intra only)       |
| 56     | bus-out                                | –                                            |
| 55     | virtual-register reads                 | –                                            |
| 54     | write response to registers            | –                                            |
| 53:48  | write address: row [53:51], offset [50:48] | receive: write address                   |
| 47:0   | eight input addresses, input *i* at [6i+5:6i] (input 0 = row LSB) | send: [47:45] source row, [44] source nibble, [43] lane nibble; receive: [42] nibble, [41:40] source MLB, [39:38] source cluster |

`enfire_pkg::enc_lut`, `enc_send` and `enc_recv` build these words. The
fields of the decoded instruction (`dec_t`) are zero for operations that are
not issued.

## Moving bits between MLBs

Each MLB owns two bus lanes. Both are registers and keep their value until
overwritten:

* an **8-bit intra-cluster lane**, read by all four MLBs of the cluster;
* a **4-bit inter-cluster lane**. The four lanes of a cluster form its 16-bit
  inter-cluster bus. The tile registers all four cluster buses (64 bits)
  once more and broadcasts them to every MLB.

Timing follows from this. A value sent in cycle *t* can be used in cycle
*t+1* anywhere in the same cluster, and in cycle *t+2* in another cluster.

Ways to put data on a lane:
* `MOVE send` intra, 8 bits: a whole register row goes onto the lane.
* `MOVE send` intra, 4 bits: one nibble of a row goes into the chosen lane
  nibble.
* `MOVE send` inter: one nibble goes onto the inter-cluster lane.
* a LUT with **bus-out**: response bits 3:0 of slot *s* go to lane nibble *s*,
  in addition to the register write.

Ways to read:
* `MOVE receive`: 4 or 8 bits from any cluster lane, or 4 bits of any MLB's
  inter-cluster lane. The bits are written at the write address.
* **virtual registers**: a LUT with the vreg flag reads register addresses
  40..63 (rows 5, 6, 7) from the intra-cluster lanes of the other three MLBs
  instead, in ascending MLB order. MLB 2, for example, sees MLBs 0, 1 and 3
  there. Data computed in one MLB can thus feed a LUT in a neighbour on the
  next cycle without any MOVE. Without the flag those rows are ordinary
  registers.

A schedule must not let both slots of an entry write the same register bit,
or drive the same lane bits. Assertions in `mlb_regfile` and `mlb_datapath`
report either case. If it happens anyway, slot 1 wins.

## Host interface and running a program

`enfire_tile` has a single write port, `cfg` (`cfg_req_t`). Its `mlb` field is
{cluster, MLB}. Its `sel` field picks the target:
* one 64-bit half of a schedule entry (`CFG_SCHED0`/`CFG_SCHED1`, `addr` =
  entry);
* one bank row (`CFG_BANK0`/`CFG_BANK1`, `addr` = row);
* the whole register file (`CFG_REGS`).

Primary inputs of the mapped network are loaded into register files. Results
are read back through `rd_mlb`/`rd_regs`. A one-cycle `start` pulse starts
every MLB at entry 0. `busy[i]` is high while MLB *i* runs, and `done` when
none does. The run takes as many cycles as the longest schedule, counting its
HALT entry. Lanes and the held inter-cluster bus keep their values across
runs. Reset (`rst_n`, asynchronous, active low) clears program counters,
registers and lanes. It does not clear the schedule tables or the memories.

## What follows the published architecture and what is this design's choice

Published: the MLB's parts and sizes (64 x 1-bit registers, 64 x 128-bit
schedule table, 2 x 2 kB banks of 256 x 64 bits), VLIW-2 issue with one bank
per engine and cycle, eight-input LUTs of width 1/2/4/8 with eight of each per
MLB, direct mapping of LUT inputs to the row address, the segment columns,
16 single-bit read ports and two 8-bit write ports with per-bit enables, the
4-MLB cluster with an 8-bit full connection, the 4-cluster tile with a 16-bit
inter-cluster bus (4 bits per MLB) broadcast to all clusters, MOVE with
next-cycle reception, one extra cycle between clusters, LUT bus output of up
to 4 bits, and virtual register ports on the upper 3 x 8 register bits.

This design's own choices:
* the instruction bit layout;
* the HALT opcode and the stop after entry 63;
* single-cycle execution with combinational schedule and memory reads;
* which 4-bit segment is the spare (31..28);
* bank = LUT index bit 2;
* lane nibble = slot number for bus-out;
* a per-instruction flag for virtual reads;
* the row-read ports that feed MOVE sends;
* slot-1-wins on conflicts;
* the configuration and read-back port.

Not provided:
* **8-bit inter-cluster MOVE.** An MLB's inter-cluster lane is 4 bits wide, so
  8 bits take two 4-bit moves.
* **A one-MOVE bypass through a third MLB.** It would need a MOVE that copies
  a lane value onto the forwarding MLB's own lane in the same cycle. The
  same route works with two MOVEs: receive, then send.
* **Loads and stores to the data memory.** The memory's non-LUT space (such
  as columns 31..28) is reachable only through the configuration port, since
  no such instruction is specified.
* **The mapping tool flow.** Partitioning, fusion, packing, placement and
  routing of a BLIF netlist are left to software. The testbenches build small
  programs directly.
* **Circuit properties of the SRAM.** The banks are plain arrays. The
  wordline segmentation, the read-skewed cell and the 1.3 GHz timing target
  of the original 32 nm design are modelled only as logic.

## Capacity against the published benchmark mappings

The ISCAS/MCNC mapping results give, per benchmark, the LUT count of each
width, MOVEs, cycles and MLBs. At the default size a tile holds 128 LUTs of
each width, 64 kB of LUTs and 64-entry schedules. It issues 32 operations
per cycle. All benchmarks fit. Three of them have more than 128 8x1 LUTs:
des (170), misex3 (134) and seq (270). The rest of their 8x1 functions go
into free 8x2 or 8x4 segments. Such a LUT is issued at the wider size, and
its surplus output bits land in a scratch register bit.

Each MLB holds only eight LUTs of each width, so some benchmarks need more MLBs than their mapping reports. c6288
has 85 8x4 LUTs and needs 11 MLBs rather than 5. e64 has ten 8x8 LUTs and
needs 2 MLBs rather than 1. ex5p evaluates eight 8x8 LUTs in a single cycle.
Four MLBs could do that, but `HALT` takes a slot of its own, so the one
entry of this schedule needs 8 MLBs.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_enfire_pkg` holds the
reference LUT contents (a fixed hash) and an independent copy of the segment
map.

* `tb_enfire_tile`: full tile at default parameters, 40 random programs. The
  generator mixes all four LUT widths with bus-out, virtual reads, and every
  MOVE kind. Schedules are 8..40 entries. After every cycle, all 16 register
  files are compared with an instruction-level model of the tile written in
  the testbench. The run length is checked. Each mechanism is counted from the
  design's decoders and must occur. A directed program first checks the bus
  latencies: one cycle within a cluster, two between clusters.
* `tb_enfire_workloads`: replays the operation mix of each fitting benchmark
  (LUTs per width and MOVEs from the published mapping table, with random
  LUT contents and connections). It checks the results against the same
  model and the run length against the published cycle count. All nineteen
  benchmarks run in exactly their published number of cycles.
* `tb_enfire_routing`: builds by hand each pattern a schedule uses to carry
  a LUT result to another LUT, and checks the consumer's result and the run
  length. The patterns are: same MLB; direct (bus-out, then a virtual read);
  one MOVE, late or early; two MOVEs, direct or through a third MLB; and
  between clusters, direct, late and early. A one-MOVE bypass, in which a
  third MLB forwards a lane value in the cycle it receives it, has no
  instruction in this design and is not run.
* `tb_mlb`, `tb_mlb_cluster`: directed programs on one MLB and one cluster,
  with cycle checks.
* one unit testbench per remaining module.

Run one with plain verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/enfire_pkg.sv tb/tb_enfire_pkg.sv tb/tb_enfire_tile.sv \
    --top-module tb_enfire_tile -o sim && obj_dir/sim
```

The full-size tile test takes well under a minute to build and run.

# A real-time AXI interconnect built on random access queues

A conventional AXI crossbar puts a FIFO in front of every port. A FIFO serves
transactions in arrival order, so an urgent write from one core can wait behind
a long train of unimportant writes that got there first. Arbitration between
ports is usually round-robin or fixed priority, which says nothing about
deadlines. The result is blocking that you cannot bound.

This interconnect removes both problems, for the write channels (AW, W, B)
and the read channels (AR, R) alike:

* **Buffers are addressable, not ordered.** Every Secondary (memory or
  peripheral, an AXI slave) owns one *random access queue* (RAQ) for write
  headers, one for write bursts and one for read headers. All Primaries (processors, DMAs,
  accelerators, the AXI masters) share these queues. Any buffered transaction
  can be pulled out of them directly by its identifiers, whatever its position.
* **A scheduler per Secondary decides what goes next.** Every Secondary has a
  *transaction control unit* (TCU) for writes and another for reads, each
  with a two-level scheduler:
  * Within one Primary, the most urgent waiting transaction wins.
  * Across Primaries, only those with budget left in their current period
    compete. Each Primary gets a periodic server: a budget of Θ transactions
    every Π cycles.

  The TCU names the next transaction, and the port fetches its header and burst
  from the RAQs.
* **Transactions carry their own scheduling data.** AWID/ARID is the Primary
  ID (PID). AWUSER/ARUSER carries a per-Primary transaction ID (TID) and a
  16-bit priority. An *AXI-decoder* on every Primary's address channels
  extracts these fields at the handshake and files them with the
  destination's TCU.

The periods, budgets and Primary priorities are programmed over APB. Choosing
them is an offline schedulability problem, and that analysis is not part of
this RTL.

## Block diagram

```
 Primary 0 ──AW/W/AR──┐                                 ┌── Secondary 0
 Primary 1 ──AW/W/AR──┤   per Primary:                  │
   ...                │   icrt_axi_decoder × 2 (AW, AR) │   per Secondary: icrt_wr_port
 Primary N-1 AW/W/AR──┘   W-burst tracker               │     icrt_raq  (AW headers, 1 entry/cell)
         ▲                R-burst owner                 │     icrt_raq  (W bursts, W_DEPTH beats/cell)
         │  B, R (pass-through, routed by ID = PID)     │     icrt_tcu
         └──────────────────────────────────────────────┤       icrt_tib + icrt_lsched   × N_PRI
                                                        │       icrt_gsched (icrt_counter × 2·N_PRI)
              APB ── icrt_apb_cfg ── config pulses ─────┤       switch
                                                        │     sequencer (IDLE→AW→W→B)
                                                        │   and icrt_rd_port
                                                        │     icrt_raq (AR headers), icrt_tcu,
                                                        │     sequencer (IDLE→AR→R)
```

| File | What it is |
|---|---|
| `rtl/icrt_pkg.sv` | Widths, AXI channel structs (`aw_t`, `w_t`, `b_t`, `ar_t`, `r_t`), the transaction-info struct `tinfo_t`, the configuration register enum, the default address map and the priority order. |
| `rtl/axi_icrt.sv` | Top level: the per-Primary decoders and W routing, one `icrt_wr_port` and one `icrt_rd_port` per Secondary, the B and R return paths and APB. |
| `rtl/icrt_wr_port.sv` | Write side of one Secondary: two RAQs, a TCU and the sequencer. |
| `rtl/icrt_rd_port.sv` | Read side of one Secondary: one RAQ, a TCU and the sequencer. |
| `rtl/icrt_raq.sv` | Random access queue. |
| `rtl/icrt_axi_decoder.sv` | AW field extractor and register bank. |
| `rtl/icrt_tcu.sv` | Scheduler of one Secondary. |
| `rtl/icrt_tib.sv` | Transaction information block: the table of one Primary's waiting transactions inside a TCU. |
| `rtl/icrt_lsched.sv` | Local scheduler: a comparator tree over one TIB. |
| `rtl/icrt_gsched.sv` | Global scheduler: period and budget counters for every Primary. |
| `rtl/icrt_counter.sv` | Reloadable countdown counter with a priority register. |
| `rtl/icrt_apb_cfg.sv` | APB slave that programs the global schedulers. |

## Conventions a Primary must follow

* **AWID** is the Primary ID. Primary `p` (port index `p`) must send
  `AWID = p+1`, because the response path uses BID to find the Primary. ID 0
  is never a valid Primary.
* **AWUSER[7:0]** is the transaction ID. It must be unique among that
  Primary's outstanding writes, because PID+TID is the key that finds a
  transaction in the RAQs.
* **AWUSER[23:8]** is the 16-bit priority, and a smaller value is more urgent.
  The intended encoding puts the priority of the issuing software job in the
  upper byte and a per-job sequence number in the lower byte, so one job's
  writes leave in issue order.
* **Reads** follow the same rules: `ARID = p+1`, a TID in ARUSER[7:0] that is
  unique among the Primary's outstanding reads, and a priority in
  ARUSER[23:8]. Read and write TIDs are independent.
* **Secondaries** must return `BID = AWID` and `RID = ARID`. RUSER from the
  Secondary is ignored: the interconnect fills it with the TID of the read.
* **Destinations** come from the top four address bits (16 regions) through
  the `ADDR_LUT` parameter. By default, region `r` goes to Secondary
  `r mod N_SEC`.

## Random access queue (`icrt_raq`)

A RAQ is a bank of `NCELLS` cells, addressed 1..NCELLS; address 0 means "no
cell".

Each cell holds:
* a payload FIFO of `DEPTH` entries;
* a 17-bit header `{V, PID[7:0], TID[7:0]}`, with V at bit 16.

**Write controllers.** Each Primary has one write controller.
* It asks for a cell with `alloc_req`. `alloc_gnt` tells it a free cell (V=0)
  is available.
* It takes the cell with `alloc_commit`, which sets V and the header, then
  pushes payload into that cell until `push_last`.
* When several controllers allocate in the same cycle, the lowest port gets
  the lowest free cell, the next port the next one, and so on.
* Allocation is split from pushing so that the interconnect can reserve a
  burst cell when the header arrives, before any data.

**Read controller.** There is one read controller.
* It compares `{1, rd_pid, rd_tid}` with every cell header in parallel and
  returns the matching cell's address and FIFO head in the same cycle.
* `rd_pop` consumes the head. `rd_free` clears V and empties the cell.
* An assertion checks that at most one cell ever matches.

**Cell depth.** The header RAQ uses `DEPTH = 1`. The burst RAQ uses
`DEPTH = W_DEPTH` (16 beats), so a burst longer than `W_DEPTH` beats cannot be
taken.

## AXI-decoder (`icrt_axi_decoder`)

The decoder watches one Primary's AW channel. When `AWVALID && AWREADY`, it
loads five registers:
* Info_Valid;
* TCU_ID (the destination, from the address table);
* PID (from AWID);
* TID (from AWUSER[7:0]);
* priority (from AWUSER[23:8]).

The decoded information is therefore valid one cycle after the handshake.
Info_Valid is a one-cycle pulse, and the top uses it as the TIB write enable of
the destination TCU. A combinational copy of the destination (`dest`) steers
the header itself in the handshake cycle.

## Transaction control unit (`icrt_tcu`)

For every Primary `i`, the TCU of one Secondary contains:

* **A TIB** (`TIB_DEPTH` = 8 entries of `{PID, TID, priority}`). Entries are
  written from the decoder and removed when their transaction is granted. The
  free count goes back to the request side, so a header is refused rather than
  lost when the table is full.
* **An L-Sched**: a binary tree of two-input priority comparators. It finds the
  most urgent valid TIB entry combinationally, and ties go to the lower slot.
* **A share of the G-Sched** (`icrt_gsched`): two `icrt_counter`s.
  * The **period counter** counts clock cycles down. When it reaches zero, it
    reloads itself and the budget counter, so a reload value `R` gives a period
    of `R+1` cycles. It also holds the Primary's priority.
  * The **budget counter** drops by one each time a transaction of this PID is
    granted. At zero, the Primary is *budget-blocked* until the next period.

The **switch** looks at the L-Sched results of all Primaries whose budget is
not zero and picks the most urgent one. Ties on transaction priority go to the
Primary with the more urgent Primary priority, then to the lower PID. The result
(`ctrl_valid`, `ctrl_pid`, `ctrl_tid`) is the TCU's decision.

Reset values:
* Period and budget both reset to `DEF_PERIOD` / `DEF_BUDGET` (1023), so the
  system works before anything is programmed.
* Primary `i` gets Primary priority `i`.

## One Secondary's write port (`icrt_wr_port`) and its timing

**Accepting a header.** A header of Primary `p` for this Secondary is accepted
only when three things are free: an AW cell, a W cell (reserved for the burst)
and an entry in Primary `p`'s TIB. A TIB write still in flight counts as taken.

**Serving transactions.** The sequencer serves one transaction at a time:

| State | Action | Leaves when |
|---|---|---|
| IDLE | takes the TCU decision (`grant`): the TIB entry goes and the budget drops | immediately |
| AW | finds the header cell by PID+TID, presents it, frees the cell | `AWREADY` |
| W | streams the burst from its cell (waits if beats have not arrived yet) and frees the cell | `WLAST` |
| B | waits until the response has been handed back to the Primary | response delivered |

Holding the Secondary from grant to response is what makes the schedule exact:
one transaction fills one time slot, and no lower-priority transaction can be
in the Secondary's pipeline when an urgent one arrives. The price is that a
Secondary never overlaps transactions. A memory that could pipeline writes is
used below its peak rate.

**Latency with nothing else waiting:**
* edge 1: the header handshake (AW cell allocated, decoder registers loaded);
* edge 2: the TIB entry is written;
* edge 3: the TCU decision is granted, and AWVALID to the Secondary rises
  after this edge.

The end-to-end testbench checks this 3-edge latency.

**Scheduling points.** A new decision is made in the cycle after the previous
transaction's response. A transaction that arrives while another is in flight
competes at that point with everything else that is waiting.

## Top level (`axi_icrt`): W and B handling

**W channel.** AXI write data carries no ID, so the interconnect must know
where each beat goes.
* Each Primary may have one burst in progress: after a header is accepted,
  AWREADY for that Primary stays low until the burst's WLAST has been taken.
* Beats go into the W cell reserved at header time.
* The Primary can therefore finish its burst whatever the scheduler does,
  and the scheduler can always fetch a complete burst.

**B channel.** Responses are not buffered.
* BID selects the Primary.
* If two Secondaries answer the same Primary in the same cycle, the lower
  Secondary goes first and the other is held with BREADY low.

## Read channels (`icrt_rd_port` and the R return path)

The read side is built the same way as the write side.

* A second AXI-decoder per Primary watches AR.
* Per Secondary, `icrt_rd_port` holds an AR RAQ (one header per cell), a TCU
  and a sequencer:
  * IDLE: takes the TCU decision.
  * AR: sends the header and frees its cell.
  * R: waits until the read's last data beat has been handed to the
    Primary.
* ARREADY needs only a free AR cell and a TIB entry. There is no data to
  reserve room for.
* Idle-path latency is the same as for writes: ARVALID rises 3 edges after
  the header handshake.

**R return path.** Read data is not buffered either.
* RID selects the Primary.
* A Primary can have reads in flight at several Secondaries. They complete
  in schedule order, not issue order, so RID alone cannot tell them apart.
  The interconnect therefore overwrites RUSER with the TID of the read that
  Secondary is serving, and the Primary matches data to reads by TID.
* Once a Secondary has delivered the first beat of a burst to a Primary,
  that Primary accepts R only from that Secondary until RLAST, so bursts
  never interleave.
* Among Secondaries starting a burst to the same Primary in the same cycle,
  the lowest-numbered one goes first.

## Configuration registers (`icrt_apb_cfg`)

APB slave, 32-bit registers, no wait states. A write for Secondary `s`
programs both its write-side and its read-side TCU, so a Primary's reads and
writes to one Secondary get the same period and budget, counted separately. The byte address is
`{sec, pri, reg[1:0], 2'b00}`, with `pri` taking $clog2(N_PRI) bits and `sec`
taking $clog2(N_SEC) bits (10 address bits at the defaults).

| reg | Meaning |
|---|---|
| 0 | period reload value `R`; the period is `R+1` cycles |
| 1 | Primary priority (bits 15:0, smaller = more urgent), used for tie-breaks |
| 2 | budget: transactions allowed per period |
| 3 | reserved; PSLVERR |

Details:
* An address outside the Primary or Secondary range also returns PSLVERR.
* A new reload value is used from the counter's next reload. It does not
  cut the current period short.
* Reads return the last value written. Before any write they return 0, not the
  reset values.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_PRI` | 16 | Primaries (largest configuration evaluated for the design) |
| `N_SEC` | 4 | Secondaries |
| `NCELLS` | 16 | cells per RAQ, i.e. outstanding writes buffered per Secondary |
| `TIB_DEPTH` | 8 | outstanding writes per Primary per Secondary |
| `W_DEPTH` | 16 | beats per burst cell (own choice) |
| `DEF_PERIOD`, `DEF_BUDGET` | 1023 | reset values of the period and budget counters (own choice) |
| `ADDR_LUT` | `r mod N_SEC` | region-to-Secondary map (own choice) |

Widths are fixed in `icrt_pkg`:
* address and data: 32 bits each;
* ID and TID: 8 bits each;
* priority: 16 bits;
* AWUSER: 24 bits;
* counters: 32 bits.

Most of the area is the 4 × 16 × 16-beat write-burst storage and the
2 × 4 × 16 × 8 TIB entries of the write and read TCUs.

## Where this design goes beyond, or differs from, the published architecture

* **Read channels.** The source describes the write channels in detail and
  only states that the read channels use the same method. The read side here
  is built by analogy. The RUSER tagging, the burst ownership on R and the
  shared configuration of read and write TCUs are this design's own.
* **No read-data buffer.** The published structure also buffers read bursts
  in a RAQ. Here R data is passed straight through, as B is, and the
  Secondary stays allocated to the read until its last beat is accepted by
  the Primary. A Primary that is slow to take read data therefore holds up
  that Secondary.
* **Priority direction.** Smaller numbers are more urgent. The source
  describes a 16-bit priority in which a job's earlier transactions must come
  first. That only works if a smaller sequence number is more urgent, so the
  whole field is read the same way.
* **Units.** The period is counted in clock cycles. The budget is counted in
  transactions, one transaction per time slot.
* **Own choices.** These were all chosen here:
  * tie-breaking;
  * the cell allocation ranking;
  * W-burst tracking (one burst in progress per Primary) and the W-cell
    reservation;
  * the AWREADY conditions;
  * the sequencer state machine;
  * the B arbitration;
  * the address map;
  * the APB register map;
  * the reset values.
* **Counter timing.** The counters decrement once per clock cycle while
  enabled; they do not detect edges on the enable.
* **Scheduling policy.** The scheduler is a fixed-priority selection among
  Primaries with budget. If deadlines are to be used, software must encode
  them into the 16-bit priority.

## Verification

Each block has a self-checking testbench in `tb/` that compares the block
against an independent model. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_icrt_counter` | reload, decrement, saturation, configuration, priority |
| `tb_icrt_gsched` | period length (R+1), budget per period, per-PID enable, replenishment |
| `tb_icrt_tib` | random writes and removals against a model, free count |
| `tb_icrt_lsched` | worked example and random tables against a reference minimum search |
| `tb_icrt_axi_decoder` | example headers and random traffic; fields, destination, one-cycle timing |
| `tb_icrt_apb_cfg` | decoding, configuration pulses, read-back, PSLVERR |
| `tb_icrt_raq` | several writers and random reads by PID+TID against a model; FIFO order, allocation and freeing |
| `tb_icrt_tcu` | TIB example order, random traffic against a scheduling model, budget blocking and replenishment |
| `tb_icrt_wr_port` | idle latency, a full bank refusing a header, service in priority order rather than arrival order, burst integrity |
| `tb_icrt_rd_port` | the same for reads, plus: no new read while data returns, TID tagging, end of a read at its last beat |
| `tb_axi_icrt` | the whole interconnect at its default size, described below |

`tb_axi_icrt` runs at the default size (16 Primaries, 4 Secondaries) with no
parameter overrides.
* **Traffic.** Each Primary issues 2-4 writes to every Secondary per round, each
  with a random priority and 1-4 beats. It then waits for all of them to
  finish. Concurrently, it issues 2-4 reads to every Secondary per round in
  the same way. Secondaries use random ready and response delays, and
  return read data computed from the address and the beat number.
* **Checks:**
  * routing;
  * data integrity (write beats at the Secondary, read beats at the Primary);
  * response routing;
  * the 3-edge idle latency;
  * that every grant is at least as urgent as everything eligible;
  * that a Primary programmed to 2 transactions per 200 cycles never exceeds
    that.
* **Mechanisms.** It counts each mechanism and fails if any never happened:
  * out-of-order service;
  * budget blocking;
  * budget replenishment;
  * back-pressure from full RAQs;
  * burst stalls;
  * response collisions;
  * multi-beat bursts;
  * APB writes;
  * out-of-order read service;
  * read data for one Primary offered by two Secondaries at once;
  * multi-beat reads.

To run a testbench with verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/icrt_pkg.sv tb/tb_axi_icrt.sv \
  --top-module tb_axi_icrt -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_axi_icrt` with any other testbench name. `tb_axi_icrt` takes
`+NGEN=4` or `+NGEN=8` to drive traffic from only the first 4 or 8 Primaries.
It prints the counts of every mechanism and the mean and largest write
latency, measured from header handshake to response. The full-size testbench
takes a few minutes to compile and seconds to run.

Assertions are immediate assertions in clocked blocks, and they are active
only when out of reset. They check three things:
* no TIB overflow;
* a unique RAQ match;
* a granted header is present, and a header is taken only with room.

Verilator's lint reports that `rst_n` is used both as an asynchronous reset
and as a synchronous condition of these assertions. The double use is
deliberate.

# Memory domain protector

Several processor cores that must stay strictly isolated from each other
often have to share one external DRAM. The sharing creates three ways for
one domain to reach another:

1. **Timing.** When cores compete for the DRAM, the latency one core sees
   depends on what the others do. That is a covert channel and a side channel.
2. **Rowhammer.** Opening one DRAM row again and again can flip bits in the
   rows next to it. Those rows may belong to another domain.
3. **Direct access.** A core can simply address memory that is not its own.

The memory domain protector sits between the cores' AXI4 ports and the DRAM
controller and closes all three:

* a **fixed time arbiter** gives every port a fixed time slot and makes every
  transfer's latency a constant plus its burst length, whatever the others do;
* a **row refresher** counts row activations and refreshes the neighbours of
  a row that has been opened too often;
* an **address mapper** per core confines the core to its own window of the
  DRAM and answers anything else with an AXI4 decode error.

```
 core 0 ──AXI4──► address_mapper (offset 0)        ─┐
 core 1 ──AXI4──► address_mapper (offset 128 MB)   ─┤  fixed_time_arbiter  ──AXI4──► DRAM controller
                  row_refresher (own manager port) ─┘   (3 slots)          │
                        ▲                                                   │
                        └──────────── watches every address handshake ──────┘
```

All interfaces use one AXI4 bundle, defined as packed structs in
`rtl/mdp_pkg.sv`: `axi_req_t` (aw, w, b_ready, ar, r_ready) and `axi_resp_t`
(aw_ready, w_ready, b, ar_ready, r). The bundle has 128-bit data, 32-bit
addresses and 4-bit IDs. Only INCR bursts of full 16-byte beats are timed
exactly. Everything is synchronous to one clock with a synchronous,
active-high reset.

## Fixed time arbiter

This is the part that takes the most care. Its guarantee is: **the cycle on
which a core receives a response depends only on that core's own requests.**

### Slots

`fta_time_slot_tracker` divides time into rounds of `N_PORTS` slots. Each
slot is `ALLOC_TIME + TIME_BUFFER` = 258 + 65 = 323 cycles long. Port *p*
owns slot *p* of every round, even when it has nothing to do. A transfer may
only *start* in the first `ALLOC_TIME` cycles of its port's slot. The
`TIME_BUFFER` then gives the last transfer time to complete before the next
port takes the bus. With two cores and the refresher, a round is 969 cycles.

`ALLOC_TIME` = 258 is chosen so that one 256-beat burst fits exactly. The
burst takes 256 data cycles, plus one cycle for the address handshake and one
for the state change. `TIME_BUFFER` equals the fixed latency, 65 cycles.

### Channel controller

There is one `fta_channel_ctrl` per port. It is a seven-state FSM:

```
IDLE ──(own slot, request, fits)──► RD_ACCEPT ──ar──► RD_RESP ──last r──► RELEASE ──► IDLE
     └──────────────────────────► WR_ACCEPT ──aw──► WR_DATA ──last w──► WR_RESP ──b──► RELEASE
```

* **Fit rule.** In IDLE, a request with burst length `len + 1` is taken only
  if `slot_time + len + 3 <= ALLOC_TIME`. A burst that is too long for the
  rest of the window waits for the port's next slot. This "deferral" is
  visible as the sawtooth in bandwidth against burst length.
* **RELEASE.** This state waits until the delay stage has handed the
  response to the core. So a port has only one transfer in flight, and its
  next transfer cannot start before the previous one is visible to the core.
* **Alternation.** If a read and a write are both waiting, they take turns.

### AXI mux

`fta_axi_mux` has no clock. It connects the slot owner's channels to the
DRAM side, and only the channels its controller's state allows:

| state | channel |
| --- | --- |
| RD_ACCEPT | ar |
| RD_RESP | r |
| WR_ACCEPT | aw |
| WR_DATA | w and b |
| WR_RESP | b |

Every other port sees an idle bus.

### Deterministic delay

Each port has one `fta_det_delay`. It puts FIFOs on the r and b channels and
holds each response back until a counter says its time has come. The counter
starts with the address handshake at cycle *h* and releases entries once it
reaches `DELAY`. So, whatever the DRAM latency:

* read beat *k* of an *L*-beat burst reaches the core at **h + DELAY + k**;
  the last beat arrives at h + DELAY + L − 1;
* a write response reaches the core at **h + DELAY + L**.

This holds when the core is ready. A core that stalls only delays itself.
The R FIFO holds a full 256-beat burst, so the DRAM side is never stalled.
`DELAY` = 65 covers the worst latency measured for the target DRAM controller
(57 cycles beyond the data beats), plus about 15 % margin.

**What is assumed.** The DRAM controller must always answer within `DELAY`.
A slower answer breaks the constant latency, and nothing detects it. The two
address-channel assertions in `fixed_time_arbiter` are the only checks.

## Row refresher

`row_refresher` watches the arbiter-to-controller bus. It treats every ar
or aw handshake as one activation of the addressed row. The byte address is
split as:

| bits | field |
| --- | --- |
| [10:0] | column |
| [24:11] | row (14 bits) |
| [27:25] | bank (3 bits) |

Counters are 16 bits wide and live in `rh_count_ram`, a two-port
read-first RAM (port a reads, port b writes). Three pipeline stages handle
one access per cycle:

1. Read the row's counter.
2. Increment it. When the count reaches `THRESHOLD` (5000), write 0 instead
   and flag a hit. If the same counter was written on the previous edge, that
   value is forwarded, because the read-first RAM still returns the old word.
3. Push the hit into a 4-entry refresh queue.

A request generator turns each queued hit into single-beat AXI4 reads of
rows row−1 and row+1. Opening a row recharges it. The refresher issues the
reads on its own arbiter port, in a slot of its own. So a refresh never
delays a core's transfer, and it cannot reveal one domain's access pattern to
another. The price is the extra slot: with two cores every round is half as
long again.

There are two modes, selected with `TRACK_BANKS`:

| `TRACK_BANKS` | counters | RAM | reads per hit |
| --- | --- | --- | --- |
| 0 (default) | one per row number, banks merged | 2¹⁴ × 16 bit = 32 KiB | 16: both neighbours in all 8 banks |
| 1 | one per bank and row | 2¹⁷ × 16 bit = 256 KiB | 2: both neighbours in the accessed bank |

The refresh reads are counted as activations too. One row needs 5000
accesses per hit, but an attacker can bring many rows close to the threshold
and then touch them all in a short burst, so hits can come faster than the
refresh reads drain. A hit is therefore taken only when the queue has room.
Otherwise the row's counter is parked at `THRESHOLD - 1`, so the row's next
access hits again, and the sticky `overflow` output records that a refresh
had to wait. No hit is ever dropped. Rows 0 and 16383 take their neighbours
modulo the row count.

## Address mapper

There is one `address_mapper` per core. Each transfer is checked as an
incrementing burst:

* The transfer is legal if `addr + (len+1)·2^size <= SIZE`.
* A legal transfer goes on with `OFFSET` added to its address.
* Any other transfer never reaches the DRAM. Its write data are taken and
  dropped, and the core gets DECERR: on every read beat (data 0, last on the
  final beat), or on the single b response.

Fixed and wrapping bursts are checked as if they were incrementing. Nothing
outside the window can pass, but a few legal ones are refused.

Each channel has its own controller:

* **ar / aw.** A one-register stage checks the address. After an illegal
  address, the stage accepts nothing more until its error answer is complete
  (`error_resp_done`).
* **w.** A token per accepted write address (legal or illegal) decides what
  happens to the next write burst: pass it on or drop it.
* **r / b.** They give the error answer only after every earlier legal
  transfer has finished, so responses stay in order.

The mapper adds one cycle on ar and aw and none on the other channels.

In the top, core *i* gets `OFFSET = i · 0x0800_0000` and
`SIZE = 0x0800_0000`. With the address split above, core 0 owns banks 0–3
and core 1 owns banks 4–7. A row of one domain is therefore never physically
next to a row of the other, and no guard rows are needed between them.

## Top level and parameters

`memory_domain_protector` wires the blocks together. Its ports are the core
AXI4 buses and the DRAM-side bus, plus status signals:

* `decode_error` — one bit per core;
* `refresh_event`, `refresh_reads` and `refresh_overflow` — from the row
  refresher;
* `slot_owner` and `slot_time` — the current slot.

| parameter | default | meaning |
| --- | --- | --- |
| `N_CORES` | 2 | cores; the arbiter has `N_CORES + 1` ports |
| `ALLOC_TIME` | 258 | accept window per slot, in cycles |
| `TIME_BUFFER` | 65 | drain time at the end of each slot |
| `DELAY` | 65 | fixed latency from address handshake to first beat |
| `R_DEPTH` | 256 | read FIFO per port, in beats |
| `TRACK_BANKS` | 0 | refresher mode (see above) |
| `THRESHOLD` | 5000 | activations before a refresh |
| `REFRESH_QUEUE` | 4 | pending threshold hits |
| `WINDOW_STRIDE` | 0x0800_0000 | distance between core windows |
| `WINDOW_SIZE` | 0x0800_0000 | bytes per core window |

### Throughput

A port's transfers start at fixed points in its slot. Reads start
`L + 67` cycles apart and writes `L + 68` cycles apart, for L-beat bursts.
The gap is the fixed latency, the beats, and a few cycles of handshake and
turnaround. A transfer starts only while the fit rule allows it. So the
number of transfers per slot, and the bandwidth, depend only on the burst
length. This gives a sawtooth:

| burst length | transfers per slot | bytes per 969-cycle round |
| --- | --- | --- |
| 1–8 | 4 | 64–512 |
| 16–32 | 3 | 768–1536 |
| 48–64 | 2 | 1536–2048 |
| 96–256 | 1 | 1536–4096 |

At most, a core gets 4 KiB per round: one 256-beat burst, about 4.2 bytes per
cycle. The other core's traffic does not change these numbers. The cost of
isolation is large: idle slots are never lent out, and every access pays
the worst-case latency.

## Departures and design choices

The arbiter's structure, its slot and latency numbers, the refresher's
pipeline and modes, and the mapper's per-channel structure follow the
published design. The following are this implementation's own choices:

* `ALLOC_TIME` = 258 is derived from "one 256-beat burst fits a slot". The
  published per-core bandwidth figure would suggest a longer slot; the
  65-cycle time buffer rule was followed instead.
* The seventh controller state is RELEASE, the wait for the delayed response.
  The exact fit rule and read/write alternation are also this design's.
* A response is released when the counter is *at least* `DELAY`, not
  greater than it. The write response also waits for the burst length, so
  write latency grows with the burst, like read latency does.
* The b channel is also connected in WR_DATA.
* FIFO depths, the refresh queue with its back-pressure and overflow flag,
  forwarding in the refresher, and row wrap at the edges are not specified
  by the published design.
* The address mapper adds 1 cycle of latency. The original implementation
  added 4.
* The DRAM windows are split by bank.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
| --- | --- |
| `tb_fta_time_slot_tracker` | slot owner and time against a closed formula, at two sizes and across a reset |
| `tb_fta_axi_mux` | 5000 random vectors against the connection table |
| `tb_fta_channel_ctrl` | every FSM path, the fit rule at its exact boundary, alternation |
| `tb_fta_det_delay` | exact beat and b-response cycles for random DRAM latencies, order and data under core back-pressure |
| `tb_fixed_time_arbiter` | three ports, DRAM latency 20–57 cycles; exact latencies, transfers only in the owner's window, deferral of a 128-beat burst, 256-beat bursts at slot start; port 0's timing is identical with and without load on the other ports |
| `tb_rh_count_ram` | initial zeros, read-back, read-first behaviour |
| `tb_row_refresher` | both modes with `THRESHOLD` 8; every refresh address and count against a reference model, back-to-back accesses of one row; when hammered faster than refreshes drain, the overflow flag, 16 reads per reported hit, and hits continuing (none dropped) |
| `tb_address_mapper` | the window-edge cases (0x0, 0x5, 0xFF0, 0x1000, 0xFFFFF, a burst from 0xF00 that crosses the edge) and random traffic; responses, data, DRAM-side addresses, transfer counts |
| `tb_memory_domain_protector` | end to end with `THRESHOLD` 16 |
| `tb_bandwidth_sweep` | default parameters; bursts of 1–256 beats, reads and writes, all to one start address and alternating between two rows, under random load from the other core. In every full slot, starts must fall exactly where the fit rule and the fixed period put them; the bandwidth table above comes from this run |
| `tb_mdp_full` | end to end at default parameters, with 5004 accesses to one row |

The two end-to-end testbenches share `mdp_e2e_bench`. Each counts every
mechanism and fails if any never happened:

* exact latency;
* waiting for the slot;
* deferral;
* remap;
* data isolation between cores;
* read and write decode errors;
* threshold hits;
* neighbour refreshes.

`dram_ctrl_model` and `axi_manager_bfm` are behavioural stand-ins for the DRAM
controller and a core.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/mdp_pkg.sv tb/tb_mdp_full.sv --top-module tb_mdp_full -o sim
./obj_dir/sim
```

`tb_mdp_full` simulates about 1.3 million cycles, which takes a few seconds.

## Not included

* The DRAM controller, the DRAM chip, the soft processors and the traffic
  generator are external parts. They appear only as behavioural models in
  `tb/`.
* The bit-flip characterisation of a real DRAM is a software experiment, not
  hardware.
* There is no run-time detection of a DRAM answer slower than `DELAY`.

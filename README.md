# Sifter: an inversion-free packet scheduler in SystemVerilog

A programmable packet scheduler gives every packet a *rank* and sends the packet
with the smallest rank first. A true PIFO (push-in first-out queue) does this
exactly, but a sorted queue in hardware only scales to a few dozen entries. The
cheap alternative is a set of FIFOs, one per range of ranks (a calendar queue). It
scales to large buffers but suffers *packet inversions*. A packet of rank 3 can leave
while a packet of rank 2, queued behind it in the same FIFO, is still waiting.

Sifter combines the two. A small sorted **mini-PIFO** always holds the packets with
the smallest ranks in the scheduler. A large **rotating calendar queue (RCQ)** of
FIFOs holds everything else. Packets only ever leave from the mini-PIFO. Before it
runs dry, the earliest calendar FIFO is poured into it, one descriptor per clock.
This is called *sifting*, and the mini-PIFO sorts the descriptors as they arrive.
Sifting a FIFO takes only a few packet times, so the mini-PIFO never runs out and the
departure order is exact.

This repository holds RTL for the scheduler and for an FPGA test harness around it.
The harness contains a descriptor input buffer, line-rate pacing, STFQ (start-time
fair queueing) rank computation and an output recorder.

## Files

| file | module | role |
|---|---|---|
| `rtl/sifter_pkg.sv` | package | widths, default sizes, descriptor struct |
| `rtl/mini_pifo.sv` | `mini_pifo` | sorted mini-PIFO with overflow eviction |
| `rtl/rcq.sv` | `rcq` | storage of the calendar FIFOs and a ring search for the first non-empty FIFO |
| `rtl/sifter_scheduler.sv` | `sifter_scheduler` | the scheduler: sentinel, enqueue steering, sifting, dequeue |
| `rtl/stfq_rank.sv` | `stfq_rank` | STFQ start-tag rank |
| `rtl/desc_fifo.sv` | `desc_fifo` | input buffer for the descriptor trace |
| `rtl/rate_ctrl.sv` | `rate_ctrl` | paces descriptors to the line rate |
| `rtl/output_recorder.sv` | `output_recorder` | records the departure order |
| `rtl/sifter_testbed_top.sv` | `sifter_testbed_top` | the whole harness (top level) |
| `tb/tb_<module>.sv` | | one self-checking testbench per module |
| `tb/tb_workload_*.sv` | | workload runs: line-rate traces and flow convergence |
| `tb/tb_sifter_scheduler_large.sv` | | the scheduler at a larger configuration |

## The three structures and the sentinel

A descriptor is 64 bits: a 32-bit rank, a 16-bit flow number and a 16-bit packet
length (`sifter_pkg::desc_t`). Inside the scheduler the rank is kept apart from the
32-bit payload.

**Mini-PIFO** (`mini_pifo`). This is a sorted register array of `PIFO_SIZE` (S_P)
entries, with entry 0 the smallest rank. In one clock it can both remove the head and
insert one descriptor. A new descriptor goes behind all entries of equal rank, so ties
leave in arrival order. If the array is full and nothing leaves in that clock, the
largest of the S_P+1 descriptors is pushed out on the `evict_*` outputs.

**Rotating calendar queue** (`rcq`). There are `NUM_FIFOS` FIFOs of `FIFO_SIZE` (S_F)
entries. FIFO *i* holds ranks whose block number `rank / BUCKET_W` is congruent to *i*
modulo `NUM_FIFOS`. With the defaults, FIFO 0 holds ranks 0-9, FIFO 1 holds 10-19, and
so on up to 90-99. After FIFO 0 is emptied it serves ranks 100-109, so the calendar
rotates. One push and one pop are allowed per clock. A ring search finds the first
non-empty FIFO from a given starting FIFO.

**Sentinel** `s`. This is the rank boundary between the two structures:

* every descriptor in the mini-PIFO has rank ≤ s;
* every descriptor in the RCQ has rank ≥ s, except, during a sifting pass, the
  descriptors of the FIFO being sifted.

The sentinel is the key to the whole design. Every operation below exists to keep
these two statements true.

## Operations

All operations are performed by `sifter_scheduler`.

**Enqueue.** A descriptor with rank ≤ s is inserted into the mini-PIFO. A descriptor
with rank > s is appended to the calendar FIFO for its rank range. A rank beyond the
last range the calendar currently covers goes to the last FIFO. It is re-filed later
(see *send-back*).

**Dequeue.** The mini-PIFO head leaves. `deq_valid` is high whenever the mini-PIFO is
non-empty, except in the case described under *Why the order is exact*.

**Sifting.** A pass starts when the mini-PIFO holds fewer than `SIFT_TH` (Th_S)
descriptors and the RCQ is not empty. The scheduler then:

1. finds the earliest non-empty calendar FIFO, searching in ring order from the FIFO
   that contains s;
2. raises s to the highest rank of that FIFO's range, so every descriptor in it now
   belongs in the mini-PIFO;
3. reads the FIFO's descriptors, one per clock. Only the descriptors present when the
   pass started are read; later arrivals go to the tail and are not read.

**Eviction.** Inserting into a full mini-PIFO, from an enqueue or from sifting, pushes
its largest descriptor back into the RCQ, and s becomes that descriptor's rank. All
descriptors still in the mini-PIFO are no larger than it, so the sentinel rule holds
again.

**Send-back.** During a pass, a descriptor read from the FIFO whose rank is now above
s goes back to the tail of a FIFO. This happens when an eviction lowered s, or when
the descriptor had been filed in the last FIFO because its rank lay beyond the
calendar.

A worked example, with the default sizes (S_P = 6, Th_S = 3, ten FIFOs of 6, ten ranks
per FIFO). The sequence is the directed part of `tb_sifter_scheduler`:

| action | mini-PIFO | RCQ | s |
|---|---|---|---|
| reset | – | – | 0 |
| enqueue 15 (> 0) → FIFO 1; mini-PIFO below Th_S → sift FIFO 1 | 15 | – | 19 |
| enqueue 12, 11 | 11 12 15 | – | 19 |
| enqueue 33 (> 19) → FIFO 3; mini-PIFO holds Th_S, no pass | 11 12 15 | 33 | 19 |
| enqueue 16, 14, 10 | 10 11 12 14 15 16 | 33 | 19 |
| enqueue 13: mini-PIFO full, 16 evicted | 10 11 12 13 14 15 | 16 \| 33 | 16 |
| enqueue 17 (> 16) → FIFO 1 | same | 16 17 \| 33 | 16 |
| dequeue 10, 11, 12, 13 → two left, sift FIFO 1 | 14 15 16 17 | 33 | 19 |
| dequeue 14 … 17 → sift FIFO 3 | 33 | – | 39 |

## Why the order is exact

Outside a pass, the head of the mini-PIFO is the smallest rank in the scheduler. It is
the smallest in the mini-PIFO, and every descriptor in the RCQ is at or above s.

During a pass, the FIFO being sifted may still hold ranks smaller than some that have
already moved into the mini-PIFO. Sifter's argument is about time. A pass moves at most
S_F descriptors, one per clock. The Th_S descriptors left in the mini-PIFO cover that
time if

* `Th_S × K ≥ S_F`, where K is the number of descriptors moved per packet time (the
  speed-up factor), and
* `S_P ≥ 2 × Th_S`, so that a pass refills the mini-PIFO to at least Th_S.

With the defaults (Th_S = 3, S_F = 6, S_P = 6), K ≥ 2 is needed. At 322 MHz and
100 Gb/s, a 370-byte packet lasts 9.5 clocks, so K = 9.5.

The original sizing example assumes 8-byte descriptors moved over a 32-bit memory at
2 GHz (64 Gb/s) and 128-byte packets at 100 Gb/s, which gives K = 10.24. This RTL
keeps the calendar on chip instead and moves one 64-bit descriptor per 322 MHz clock.
In this implementation a pass takes one clock more than its length, because of the
start clock. The hold-free condition is therefore, strictly, about
(Th_S − 1)·K ≥ S_F + 1.

This RTL adds a safety rule of its own. During a pass, a dequeue is held unless the
mini-PIFO head is below the lowest rank of the FIFO being sifted (`ev_deq_hold`).
When the condition above holds, the rule is never triggered at line rate (see the
end-to-end test). When the condition is broken, for example by draining the scheduler
faster than the line, the rule keeps the order exact at the cost of a few held clocks.
The scheduler testbench drains at up to one descriptor per clock and sees such holds.

## Timing and handshakes

* One clock per descriptor moved. A sifting pass over n descriptors takes n clocks,
  plus 1 clock to start it.
* Enqueue uses a valid/ready handshake. `enq_ready` is low during a pass and in the
  clock a pass starts, so at most one descriptor enters the mini-PIFO per clock.
* Dequeue uses valid/ready. `deq_rank`/`deq_data` show the head combinationally.
* A descriptor that meets a full calendar FIFO is dropped. It is reported on
  `drop`/`drop_rank`/`drop_data` for one clock. This covers an enqueue above s, an
  evicted descriptor, and a send-back into another FIFO.
* Reset is synchronous and active low. It empties everything and sets s = 0.
* The RCQ array and the input and recorder buffers are read combinationally. On an
  FPGA they map to distributed RAM. A block-RAM version would need one more pipeline
  stage in the sifting loop.

## The test harness (`sifter_testbed_top`)

```
host --> input buffer --> rate ctrl --> STFQ --> Sifter scheduler --> rate ctrl --> output recorder --> host
                          (run, in_burst)          ^      |
                                                   +------+  dequeued rank = STFQ virtual time
```

* **Input buffer** (`desc_fifo`, 16384 entries). It holds a trace of (flow, length)
  descriptors written by the host over `host_in_*`.
* **Rate control** (`rate_ctrl`). It paces descriptors to 100 Gb/s at 322 MHz using
  each packet's length. A debt counter in 1/4096-bit units adds 8·len per packet and
  pays off 100000/322 bits per clock, so back-to-back packets leave at exactly the
  line rate. The input instance is released by `run`. `in_burst` disables its pacing,
  which emulates many inputs converging on one output and fills the scheduler. The
  output instance stands for the link and takes the scheduler's head whenever the
  line is free.
* **STFQ** (`stfq_rank`). The rank is the start tag `max(V, F[flow])`, and the flow's
  finish tag advances by the length in 32-byte units. V is the rank of the packet
  most recently dequeued. All 8 flows have equal weight.
* **Output recorder** (`output_recorder`, 16384 entries). It stores the departure
  order for readback on `rec_rd_*` and counts rank decreases. The counter
  `rec_order_drops` can be non-zero without any inversion: a packet ranked just
  before a dequeue moved V may come out below it.
* Counters are provided for drops, sifting passes, evictions, send-backs and held
  dequeues, along with the sentinel and the occupancies.

The PCIe link and host software are not part of the RTL. Their signals are the
`host_in_*` and `rec_rd_*` ports.

## Parameters

| parameter (scheduler / top) | default | meaning | origin |
|---|---|---|---|
| `PIFO_SIZE` / `PIFO_SIZE_P` | 6 | S_P, mini-PIFO entries | Sifter's worked example |
| `SIFT_TH` / `SIFT_TH_P` | 3 | Th_S, sifting threshold | Sifter's worked example |
| `NUM_FIFOS` / `NUM_FIFOS_P` | 10 | calendar FIFOs | Sifter's worked example |
| `FIFO_SIZE` / `FIFO_SIZE_P` | 6 | S_F, entries per FIFO | Sifter's worked example |
| `BUCKET_W` / `BUCKET_W_P` | 10 | ranks per FIFO | Sifter's worked example |
| `RANK_W`, `DATA_W` | 32, 32 | rank and payload width (8-byte descriptor) | 8-byte metadata from Sifter; split chosen here |
| `RATE_MBPS`, `CLK_MHZ` | 100000, 322 | line rate, clock | Sifter's FPGA prototype |
| `IN_DEPTH`, `REC_DEPTH` | 16384 | trace buffers | chosen here (traces of ~14,000 descriptors) |
| `NUM_FLOWS`, `LEN_SHIFT` | 8, 5 | STFQ flows, cost unit 2^5 bytes | chosen here |

The published prototype's own sizes for the mini-PIFO and the calendar are not known.
The defaults are those of the small example the design is explained with: 66
descriptors in all. A real deployment would raise `NUM_FIFOS`, `FIFO_SIZE` and
`PIFO_SIZE`, keeping `SIFT_TH × K ≥ FIFO_SIZE` and `PIFO_SIZE ≥ 2 × SIFT_TH`. All
modules are fully parameterised. Rank and bucket arithmetic uses constant division by
`BUCKET_W`, which becomes a shift when `BUCKET_W` is a power of two.

## Departures from the published design and choices made here

* **Taken from Sifter's description:**
  * the enqueue rule against the sentinel;
  * the dequeue from the mini-PIFO;
  * sifting of the earliest FIFO when the mini-PIFO falls below Th_S;
  * raising the sentinel to the sifted range's top;
  * lowering the sentinel to an evicted rank when the mini-PIFO overflows;
  * the example sizes, the 8-byte descriptor, 100 Gb/s at 322 MHz, and the chain of
    harness blocks.
* **Chosen here, because Sifter's description does not cover it:**
  * the sorted-shift-register mini-PIFO;
  * one descriptor moved per clock;
  * send-back of descriptors above the sentinel during a pass;
  * the ring search from the sentinel's FIFO;
  * filing ranks beyond the calendar in its last FIFO;
  * dropping on a full calendar FIFO;
  * refusing enqueues during a pass;
  * the held-dequeue safety rule;
  * all handshakes and reset behaviour;
  * the STFQ cost unit and flow count;
  * the pacing scheme and `in_burst`;
  * buffer depths.
* **Not included:** the PCIe interface and host software. Also not included is a
  per-flow weight table for STFQ (all weights are equal).
* **Rank wrap-around is not handled.** Ranks are assumed never to pass 2^32 − 1.
* **Ranks far beyond the calendar are slow to reach.** A rank far above the current
  calendar window is reached in steps. Each sifting pass over the last FIFO advances
  the window by `NUM_FIFOS − 1` ranges and re-files such descriptors. Enqueues wait
  during these passes. Choose `NUM_FIFOS × BUCKET_W` larger than the spread of ranks
  the rank function produces.

## Verification

Every module has a self-checking testbench that ends with a line
`TB_RESULT checks=N failures=M`:

* `tb_mini_pifo` and `tb_rcq` compare against reference queues every clock.
* `tb_sifter_scheduler` has two parts:
  * directed sequences: the hand-worked sequence in the table above, the timing of a
    6-descriptor pass (6 clocks), and a pass that overfills the mini-PIFO. In that
    pass, FIFO 10-19 holds 11 16 12 14 15 10 and the mini-PIFO holds 7 9. Rank 15
    pushes out 16, then 10 pushes out 15. The pass ends with s = 15 and 16 15 back in
    the FIFO;
  * random traffic, with a reference list of held descriptors. Every dequeue must be
    a held descriptor, and no held descriptor may have a smaller rank. Every event
    (pass, eviction, send-back, hold, drop, stall) must occur.
* `tb_sifter_testbed_top` runs the harness at its default parameters with three
  traces of 3000 packets over 8 flows:
  * fixed 370-byte packets, which must leave within 2% of the 100 Gb/s wire time;
  * packet sizes from 370 to 1500 bytes, paced;
  * the same sizes as an unpaced burst. This fills the 66-entry scheduler, and most
    of the burst is dropped, as expected at these sizes.

  It checks:
  * that there is no packet inversion at any dequeue;
  * that recorded plus dropped packets equal the packets sent;
  * the readback of the recorded order;
  * that enqueues to the mini-PIFO, enqueues to the calendar, sifting passes and
    evictions all occur.

Four further testbenches run workloads and a larger configuration:

* `tb_workload_hw_testbed` replays three 14,000-descriptor traces over 8 flows through
  the full harness at 100 Gb/s:
  * fixed 370-byte packets: 100.0 Gb/s at 33.8 Mpacket/s;
  * sizes from 370 to 750 bytes: 100.0 Gb/s at 22.3 Mpacket/s;
  * fixed 128-byte packets, the published speed-up example: 100.0 Gb/s at 97.7
    Mpacket/s. That is one packet every 3.3 clocks, which still meets Th_S·K ≥ S_F.

  No trace drops a packet or shows an inversion.
* `tb_workload_flow_convergence` emulates the published flow-convergence run on the
  harness. Eight flows join one 100 Gb/s output one after another and then leave
  again, in 15 phases. Each sender keeps at most three 370-byte packets in flight.
  In every phase each active flow gets 1/n of the link, to within one packet, with
  no inversion. Equal flows carry equal STFQ start tags, so eight descriptors can
  land in one calendar range while a FIFO holds six. About 4% of the descriptors are
  then dropped and sent again. With FIFOs of 8 (`FIFO_SIZE_TB` = 8 in the
  testbench), nothing is dropped.
* `tb_workload_load_fct` sends random messages of 1 to 200 packets at 70% and then
  90% of the line rate, first with random arrivals and then in incast bursts of
  eight messages at once. It compares flow completion time and 95th-percentile packet
  delay per message-size class with a shadow ideal PIFO. The shadow sees the same
  enqueues and dequeues. The harness runs with FIFOs of 8, and the two agree within
  0.3% (FCT) and one packet time (delay) in every class.
* `tb_sifter_scheduler_large` runs the scheduler with S_P = 16, Th_S = 8 and 32 FIFOs
  of 16:
  * dequeuing every clock breaks the condition Th_S·K ≥ S_F. The hold rule then acts
    and the order stays exact;
  * dequeuing every 4th clock meets the condition, and no dequeue is ever held.

Run a testbench with plain Verilator (5.x) from the repository root, for example:

```
verilator --binary --timing --assert -j 4 --top-module tb_sifter_testbed_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/sifter_pkg.sv tb/tb_sifter_testbed_top.sv
./obj_dir/Vtb_sifter_testbed_top
```

Each testbench finishes in seconds.

## How far to trust it

* **The scheduler core is checked against an independent reference.** The reference
  is a list of held descriptors, and the check is that no dequeue leaves a smaller
  rank behind. It covers random traffic, full and overflowing structures, and the
  worked example.
* **Line-rate behaviour is verified in simulation only**, for 128-1500-byte packets
  at the default sizes. No timing closure at 322 MHz has been attempted. The
  combinational path through the calendar read, the mini-PIFO compare and the
  eviction is the longest in the design.
* **The default sizes are those of the worked example, not of a product.** Sixty-six
  descriptors and calendar FIFOs of six are enough for the traces above. But more
  flows with equal ranks than a FIFO has slots lead to drops, as the
  flow-convergence run shows. Size S_F for the number of flows that can share a
  rank range.
* **Larger configurations were simulated only for the scheduler on its own**
  (S_P = 16, Th_S = 8, 32 FIFOs of 16) and, for the harness, with FIFOs of 8. The
  modules are parameterised for more, but wide mini-PIFOs grow quadratically in
  compare-and-shift logic.

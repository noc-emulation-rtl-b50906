# An FPGA emulation platform for networks-on-chip

Simulating a network-on-chip (NoC) at cycle level in an HDL simulator is slow:
long traffic traces and wide parameter sweeps take days. The alternative
explored here is to put the network itself on an FPGA and surround it with
hardware that generates traffic, collects statistics and is steered by a
processor on the same chip. The processor writes configuration registers,
starts and stops the emulation, streams traffic traces in and reads results
out. Between two emulation runs only software changes, so the hardware
doesn't have to be synthesized again.

This repository holds that surrounding hardware in synthesizable
SystemVerilog:

* **traffic generators (TGs)** that inject packets into the network.
  *Stochastic* TGs produce bursty on/off traffic from random generators.
  *Trace-driven* TGs replay packet descriptors streamed in by the processor.
* **traffic receptors (TRs)** that absorb packets and measure them.
  *Stochastic* TRs keep global latency statistics. *Trace-driven* TRs act
  as slave memories: they log every packet, keep per-interval statistics and
  send replies.
* a **control module** that starts, stops, resumes and resets all units at
  once. It also provides the common time base and a global congestion
  counter.
* an **OPB-to-IB filter** that maps the processor's OPB bus onto two
  internal register buses.

The network under test is **not** part of this RTL. Neither are the
processor and the host monitor. The top module `emu_platform` brings out the
network links and the OPB slave port. The testbenches plug a small
behavioural crossbar into the links in place of the network.

```
            OPB (from the processor)
               |
        +--------------+   IB 0   +----------------+
        | opb_ib_filter|----------| control_module |--- run/clear, time ---+
        +--------------+          +----------------+                       |
               | IB 1                     ^ done, nack                     |
   +-----------+-----------+--------------+-------------+                  |
   |           |           |              |             |                  v
 stochastic_tg x4   trace_tg x4    stochastic_tr x4   trace_tr x4     (all units)
   |           |  ^        ^              ^             |  ^
   +--- tg_fwd/tg_bwd -----+-- tr_fwd/tr_bwd -----------+  +-- rsp_fwd/rsp_bwd
               |  +--- tg_rsp_fwd/tg_rsp_bwd (replies back to masters)
                 \                  /
                network under test (outside this RTL)
```

The default top holds two groups of units side by side:

* 4 stochastic TG/TR pairs, the set used to emulate a 2x3 mesh of switches
  with a generator and a receptor at each corner;
* 4 trace-driven TG/TR pairs, the set used to emulate a complete 2x2-mesh
  NoC with one master and one slave per switch.

## The flit link and retransmission

Every generator, and the reply side of every slave receptor, drives a
*flit link* (`emu_pkg::link_fwd_t` forward, `link_bwd_t` back):

| signal      | direction       | meaning                                          |
|-------------|-----------------|--------------------------------------------------|
| `req`       | sender → network | a flit is on `data` this cycle                  |
| `replay`    | sender → network | this flit is a retransmission                   |
| `data[15:0]`| sender → network | the flit                                        |
| `ack_valid` | network → sender | the network answers this cycle                  |
| `ack`       | network → sender | 1: flit taken; 0: flit not acknowledged         |

The answer comes **in the same cycle** as the offer. On `ack=1` the sender
moves to the next flit, so a packet can go out at one flit per cycle. On
`ack=0` the flit counts as *not acknowledged*. The sender presents it again
in the next cycle with `replay=1`, and keeps doing so until it is taken.
This is stop-and-wait: only one flit is ever outstanding. Refused flits are
the design's measure of congestion. Each generator counts them in
`NACK_FLITS` and pulses `nack` to the control module, and the control module
counts the running cycles with at least one refusal (`CONGESTION`).

While the emulation is stopped (`run=0`), senders drive `req=0` and hold
their position inside the packet. Resuming continues the same packet.

### Packet format

Packets are sequences of 16-bit flits. The two top bits give the flit type.

| flit      | `[15:14]`        | contents                                                        |
|-----------|------------------|-----------------------------------------------------------------|
| head      | `10`             | `[13:10]` destination, `[9:6]` source, `[5:4]` command           |
| 2nd       | `00`, or `01` if last | `[12:0]` time stamp                                       |
| body      | `00`             | `[13:0]` flit number (2, 3, ...)                                |
| last      | `01` (TAIL)      | as body or as the 2nd flit                                      |

Commands: `00` data (stochastic traffic), `01` write request, `10` read
request, `11` reply. A packet has at least two flits. The 16-bit width is
the switch width of the mesh-of-switches experiment. The field layout is
this design's own.

## Time base and latency

The control module counts `now`, the emulation time, in the cycles during
which units run. All units receive it. A generator stamps the low 13 bits of
`now` into the second flit of each packet when it creates the packet, which
is one cycle before the head flit first appears on the link. A receptor
takes the latency as `now - stamp` modulo 2^13 when the tail flit arrives.
A 13-bit stamp therefore measures latencies up to 8191 cycles exactly.
Because `now` freezes while the emulation is stopped, a stop/resume doesn't
distort latencies.

## Stochastic traffic generator (`stochastic_tg`)

The generator has two 16-bit Galois LFSRs (`lfsr`, polynomial
x^16+x^14+x^13+x^11+1, seeds loadable over the bus). Each one feeds a bounded
draw `Low + LFSR % (High − Low)`:

* LFSR 1 → packet length in flits (`PL_LOW`..`PL_HIGH−1`);
* LFSR 2 → idle interval between packets of a burst
  (`IBP_LOW`..`IBP_HIGH−1`).

If High ≤ Low the draw is simply Low.

The traffic follows a two-state on/off Markov chain:

* **OFF**: silent. Each running cycle draws `u = LFSR2[15:8]`. If
  `u < P_OFF_ON` a burst starts with a packet.
* **ON**: after each packet, `u = LFSR1[15:8]` is drawn. If `u < P_ON_OFF`
  the chain goes back to OFF. Otherwise the generator waits the drawn
  interval and sends the next packet.

Probabilities are in 1/256 units, from 0 to 256. The mean burst therefore
has 256 / `P_ON_OFF` packets. After `NUM_PACKETS` packets (0 means no limit)
the generator stops and raises `done`.

Timing with a network that always accepts: a packet of L flits takes L
consecutive cycles. A drawn interval G leaves G+1 idle cycles between a tail
and the next head.

| offset | register      | offset | register                  |
|--------|---------------|--------|---------------------------|
| 0 | PL_HIGH            | 8  | DEST (destination id)         |
| 1 | PL_LOW             | 9  | NUM_PACKETS                   |
| 2 | LFSR1_SEED (write reloads) | 10 | SENT_PACKETS (ro)     |
| 3 | IBP_HIGH           | 11 | SENT_FLITS (ro)               |
| 4 | IBP_LOW            | 12 | NACK_FLITS (ro)               |
| 5 | LFSR2_SEED (write reloads) | 13 | STATUS (ro): bit0 done, bits3:1 state |
| 6 | P_ON_OFF           |    |                               |
| 7 | P_OFF_ON           |    |                               |

A clear from the control module zeroes the counters and reloads both LFSRs
from their seeds. The same seeds therefore reproduce the same traffic. The
configuration survives a clear.

## Trace-driven generator (`trace_tg`)

The processor pushes one 32-bit descriptor per packet into a 16-deep queue
while the emulation runs:

```
[31:16] delay since the previous release   [15:12] destination
[11:10] command (01 write, 10 read)        [9:2]   length in flits
```

A counter runs from the last release. The head descriptor goes to the
sender once the counter has reached its delay and the sender is idle. The
trace keeps its spacing unless the network holds the previous packet back.
Descriptors written into a full queue are counted in `DROPPED`. Writing
`END` (offset 6) marks the end of the trace. `done` rises when the end has
been marked, the queue is empty and no packet is in flight. Without the end
mark, a queue that briefly runs dry would look finished.

The slaves' replies come back on a second link, which accepts every flit
at once. The generator counts reply packets and flits and sums the reply
latency, taken from the time stamp in the reply's second flit. Replies do
not hold back the next request: the trace's own spacing decides when it
goes.

Registers: 0 DESC (write pushes), 1 STATUS (bit 31 done, [7:0] fill),
2 SENT_PACKETS, 3 SENT_FLITS, 4 NACK_FLITS, 5 DROPPED, 6 END, 7 REPLIES,
8 REPLY_FLITS, 9 REPLY_LAT_SUM.

## Receptors

**`stochastic_tr`** accepts every flit at once. It counts packets and flits
and accumulates the latency sum, minimum and maximum. The processor divides
the sum by the packet count to get the mean latency. It also measures
congestion on its incoming link: STALLS counts the cycles in which a packet
has started (head received, tail not yet) but no flit arrives, so the
packet is held up somewhere in the network. Registers: 0 PACKETS, 1 FLITS,
2 LAT_SUM, 3 LAT_MIN, 4 LAT_MAX, 5 STALLS.

**`trace_tr`** plays a slave memory. For every packet it:

1. **logs a descriptor** in a 16-deep queue that the processor drains at
   run time. Reading offset 0 pops it. The layout is `[31:19]` latency,
   `[18:15]` source, `[14:13]` command, `[12:5]` flits. Packets that find
   the queue full are counted in OVERFLOW.
2. **adds the packet to the current interval**: read and write counts,
   their latency sums, and the packets that arrived within `LAT_LIMIT`
   cycles. The acknowledgment ratio is the on-time count divided by the
   packet count. Every `INTERVAL` running cycles the counters are copied to
   snapshot registers and restarted. The reset values are 1,000,000 cycles
   and 14 cycles.
3. **replies** to reads and writes, to the request's source, `RESP_LAT`
   cycles after the tail. A read gets `RD_LEN` flits (default 4), a write
   gets 2. The reply head appears `RESP_LAT + 2` cycles after the request
   tail. Only one reply can be pending. Until it has been sent, the head
   flit of any new packet is answered `ack=0`, so a busy slave pushes back
   into the network. REFUSED counts these refused heads.

Registers: 0 DESC, 1 STATUS (fill), 2 RESP_LAT, 3 RD_LEN, 4 INTERVAL,
5 LAT_LIMIT, 6 SNAP_RD_CNT, 7 SNAP_RD_LAT, 8 SNAP_WR_CNT, 9 SNAP_WR_LAT,
10 SNAP_ONTIME, 11 INTERVAL_IDX, 12 OVERFLOW, 13 PACKETS, 14 REFUSED.

## Control module

Write these bits to IB 0 offset 0:

| bit | command | effect                                                        |
|-----|---------|---------------------------------------------------------------|
| 0   | reset   | stop; pulse clear; zero time and counters                     |
| 1   | start   | pulse clear; zero time and counters; run                      |
| 2   | stop    | units freeze                                                  |
| 3   | resume  | run without clearing                                          |

If several bits are set, the lowest one wins. Each TG and TR has its own
run/clear interface. The clear pulse is registered, so all units see it in
the same cycle.

Readable registers:

* 0 STATUS: bit 0 running, bit 1 all done
* 1 NOW
* 2 CONGESTION
* 3 DONE (the done inputs as a vector)
* 4 RUNTIME: the time when all generators were first done

## Address map

The filter claims 64 KiB at `C_BASEADDR` (default `0x8000_0000`). Every
register is a 32-bit word.

* `base + 4*r`: control module register r (IB 0).
* `base + 0x8000 + 4*(slot*16 + r)`: register r of the unit in `slot` (IB 1).

With NT = N_STOCH + N_TRACE, generator k (stochastic ones first) is slot k
and uses source id k. Receptor k is slot NT + k and destination id k. An OPB
transfer takes three cycles: address capture, internal-bus strobe, then
`Sl_xferAck`. Only single-word transfers are supported.

## Files

| file | contents |
|------|----------|
| `rtl/emu_pkg.sv` | link, bus and control types; flit format helpers |
| `rtl/emu_platform.sv` | top module |
| `rtl/opb_ib_filter.sv`, `rtl/control_module.sv` | bus bridge, global control |
| `rtl/stochastic_tg.sv`, `rtl/lfsr.sv` | stochastic generator and its random generators |
| `rtl/trace_tg.sv` | trace-driven generator |
| `rtl/pkt_sender.sv` | flit sender with retransmission (network-interface side of every generator and of the slave's replies) |
| `rtl/stochastic_tr.sv`, `rtl/trace_tr.sv` | receptors |
| `rtl/sync_fifo.sv` | descriptor queues |
| `tb/tb_<module>.sv` | self-checking test of each block |
| `tb/tb_emu_platform.sv` | end-to-end run of the whole platform at its default size |
| `tb/tb_noc_model.sv` | behavioural crossbars standing in for the network, requests and replies (testbench only) |
| `tb/tb_app_switch_sweep.sv`, `tb/tb_app_trace_load.sv` | the two experiment benches described below |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. A watchdog
ends it with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
          rtl/emu_pkg.sv tb/tb_emu_platform.sv --top-module tb_emu_platform
./obj_dir/Vtb_emu_platform
```

Swap in any other `tb/tb_*.sv` and its module name to run that test.

The end-to-end test uses the default parameters. In about a thousand cycles
it runs 4×30 stochastic packets and 4×12 read/write transactions. Its
network model refuses 10 % of offers at random and locks each destination
for the length of a packet. The test checks every counter the processor can
read against what it saw on the links. It also checks that each mechanism
happened at least once: refused flits and retransmission, contention for a
destination, a slave refusing a head flit while a reply is pending, replies,
two replies meeting at one master so that one is refused and resent,
replies counted at the masters, packets stalled on their way into a
receptor, descriptor-queue overflow, interval snapshots, stop and resume,
and bursts ending in the OFF state. The model routes replies back to the
masters on a second crossbar that also locks each master for a whole
packet.

### Experiment benches

Two further benches run the platform the way its two reference experiments
use it. The network is still the stand-in crossbar, so the numbers they
print show how the platform measures, not how a real mesh behaves.

* `tb/tb_app_switch_sweep.sv` is the mesh-of-switches experiment. Four
  stochastic pairs run with fixed packet lengths L = 5, 10, 15 and mean
  bursts of 3, 9 and 15 packets, a constant number of packets per
  generator, and the mean latency read back from the receptors. It then
  runs the exploration loop: a dichotomic search over L = 5..15 for the
  longest packets whose mean latency stays within 19 cycles. That takes four
  emulations, plus one more to confirm the next length fails.
* `tb/tb_app_trace_load.sv` is the complete-NoC experiment. Four
  trace-driven masters share two slaves. The offered load rises every
  statistics interval, and the software reads each interval's snapshot. It
  prints read, write and overall latency and the on-time ratio per load
  level. The interval is set to 2,000 cycles so that six levels run in
  seconds; the register resets to 1,000,000.

Both check every statistic read over the bus against values recomputed from
the traffic the bench observed.

## Where this design departs from the original platform, and what is missing

* **Network under test.** Not included: the switches and network interfaces
  come from an existing NoC library. The behavioural crossbar in `tb/` is
  only a test fixture. Its latencies aren't those of a real mesh, so the
  latency values the tests see are not comparable with published mesh
  results.
* **Core protocol.** In a complete-NoC setup the original TGs and TRs speak
  OCP to the network interfaces. Here all units speak the flit link, so the
  trace-driven pair cannot be attached to OCP interfaces without an adapter.
* **Routing.** A stochastic generator has a single destination register,
  not a routing table. Packets carry a destination id, not a source route.
* **Flit width.** Fixed at 16 bits (`emu_pkg::FLIT_W`). The header needs all
  16, so narrower links (down to the 4 bits a flit-width sweep would need)
  cannot be emulated, and wider ones require widening the package.
* **Statistics.** Link congestion is measured where the platform can see
  it: refused flits at each generator, a global congestion count, stalls
  inside packets and refused heads at each receptor. Links inside the
  network are not visible, so congestion on them is not measured. Averages
  are left to software (sum and count are provided).
* **Own choices.** Everything named above as a choice: the link timing and
  stop-and-wait retransmission, packet layout, register maps and widths,
  Markov-chain encoding, descriptor formats, queue depths, the
  single-outstanding-reply slave, masters that only count replies, the
  end-of-trace mark, the OPB window and transfer timing. Parameters carry the original platform's numbers where they are
  known: 16-bit flits, 13-bit stamps, 4+4 units, 1,000,000-cycle intervals,
  14-cycle on-time limit.
* **Lint notes.** Verilator reports `SYNCASYNCNET` on `rst_n`, because the
  handshake assertions use it in `disable iff` while the flops reset
  asynchronously. This is intended. The `UNUSEDSIGNAL` reports are bits a
  unit has no use for: upper time bits that the 13-bit stamps don't need,
  the `replay` bit at receivers (a resent flit is handled like any other),
  the OPB byte-offset bits, the two spare descriptor bits, and the
  per-flit outputs of the slave's reply sender.

# Wireless NoC with adaptive multi-voltage scaling

In a network-on-chip most routers are lightly used most of the time, yet
they all burn dynamic and leakage power at full supply. This design is a
4x4 mesh network-on-chip, with a single-hop wireless channel added between
four of its routers, in which every router manages its own supply:

* **Adaptive multi-voltage scaling (AMS).** Every 1000 cycles (an *epoch*)
  each router picks one of four supply levels, 0 V, 0.8 V, 1.0 V or 1.1 V.
  It chooses from the load heading its way and from how similar loads
  actually kept it busy in the last 16 epochs. At 0 V the router is
  power-gated.
* **Utilization zones.** A profiling run of the application sorts routers
  into high, low and rare utilization zones (HUZ, LUZ, RUZ). RUZ routers
  stay off for the whole application.
* **Wireless interface (WI) power gating.** Only one wireless link can be
  active at a time. So every power amplifier (PA) and low-noise amplifier
  (LNA) sleeps except the transmitter's PA and the addressed receiver's LNA.
  A receiver wakes itself when a comparator senses power at its antenna, so
  no wake-up messages travel between WIs.

The RTL is SystemVerilog 2017. The analog parts (regulator, PA, LNA,
comparator) are behavioural models. The rest is synthesizable. The design
follows the published AMS wireless-NoC design where that design is
specific: mesh size, flit and packet size, clock and link rate, epoch
length, history depth, voltage levels, zone thresholds, the 8-bit load
signals, the AMS and WI control flows, and the hybrid-router positions. The
published design only names the router's internal parts and the WI's
digital parts, so their internals here are ordinary, simple choices. They
are listed under "Choices and departures".

## Network

```
 row 0:   0    1   [2]   3          [n] = hybrid router (router + WI)
 row 1:  [4]   5    6    7          node id = row*4 + column
 row 2:   8    9   10  [11]         WI address: node 2 -> 0, 4 -> 1,
 row 3:  12  [13]  14   15                      11 -> 2, 13 -> 3
```

* Each node is a router, its AMS controller and its voltage regulator
  (`br_node`). The four hybrid routers (`hybrid_router`) also have a sixth
  router port that leads to a wireless interface.
* Links carry a 32-bit flit plus head, tail and 2-bit VC sideband bits
  (`flit_t`). The receiver returns one ready bit per VC. A flit moves when
  `valid` and the ready bit of its VC are both high.
* In a head flit, `data[3:0]` is the destination node and `data[7:4]` the
  source node. Packets can have any length. The tests use the published
  64-flit packets.
* Routing is XY (X first) over the wires. A packet sitting at a hybrid
  router goes wireless if one wireless hop, plus the wired hops from the WI
  nearest its destination, is shorter than its wired path. It then goes to
  that WI and continues by XY.
* `wnoc_top` brings out a local injection port and a local ejection port
  for each node. It also brings out each node's profiled busy count, its
  zone and its supply status, and each WI's grant and PA/LNA enables.

## Router (`base_router`, `ucu`)

The router is an input-buffered wormhole router with `NVC` = 2 virtual
channels of 4 flits per input port. Its pipeline has three stages, so a hop
takes three cycles:

1. **Buffer write and route computation.** As a flit is written, the header
   decoder reads a head flit's destination and route computation picks the
   output port. The port is stored next to the flit. Body flits reuse their
   head's port.
2. **Allocation.** Each input port first chooses one ready VC (round
   robin). Each output port then chooses one input (round robin). A head
   flit also needs a free output VC (the lowest free one). That VC stays
   reserved until the tail flit passes. A VC whose previous flit still sits
   in the output register is not offered again that cycle. The downstream
   ready bit only promises room for one flit, so this rule ensures that a
   flit in the output register is always taken on the next cycle. Without
   it, a flit waiting for a full VC would block the link's other VC, and
   converging traffic can then deadlock.
3. **Traversal.** The winning flit crosses the crossbar into the output
   register, which drives the link. An uncontended head flit appears on the
   output two cycles after it is written, and is written into the next
   router one cycle later.

Every buffered flit already knows its output port, so the utilization
computing unit (UCU) simply counts buffered flits per output port. It adds
one on each write and subtracts one on each read. The counts for N, E, S
and W are 8-bit saturating values. They go to those neighbours as the
*upstream load* they are about to receive. The UCU also reports the
router's total buffer occupancy, its *input load*.

When `pwr_on` is low the router is gated. It shows no ready bits, moves
nothing and keeps its (empty) state. If a neighbour or the local port
offers it a flit, it raises `wake_req`.

## Adaptive multi-voltage scaling (`ams_voltage_ctrl`, `voltage_regulator`, `zone_classifier`)

This is the heart of the design. Each router's controller works per epoch
(`EPOCH_CYCLES` = 1000):

* **Measure.** During the epoch it counts the cycles in which the router
  switched a flit. At the end of the epoch it quantizes that count into a
  utilization level: below 5 % is level 0, below 30 % is level 1, below
  75 % is level 2, and 75 % or more is level 3.
* **Remember.** It pushes the pair *(load bin at the start of this epoch,
  measured level)* into a 16-entry history.
* **Load now.** It computes the total load TL as the four neighbours'
  upstream-load values plus its own input-buffer occupancy. It then bins TL
  at 1, 8 and 32 flits into bins 0 to 3.
* **Estimate.** For each level, it counts the history entries that have
  the current load bin and that level. These counts are the *level
  probabilities*. The estimate UE is the most frequent level, with the
  higher level winning a tie. If no entry has the current load bin, UE is
  the bin number itself.
* **Act.** The level for the next epoch is UE itself. The voltage
  therefore rises when UE is above the present level, falls when it is
  below, and stays otherwise. The new level appears one cycle after the
  epoch's last cycle.

The zone rules sit on top of this:

* **RUZ:** always 0 V. The output is forced combinationally, so this holds
  from the first cycle after reset.
* **HUZ:** never gated. Level 0 becomes 0.8 V.
* **LUZ:** may be gated for an epoch when UE is level 0, but only if the
  router is completely empty. If a flit then arrives for a gated LUZ router,
  the controller raises it to 0.8 V at once (`woke`).

`zone_classifier` turns a profiling run's per-router busy cycles into
zones. Below 5 % is RUZ, 75 % or more is HUZ, and everything in between is
LUZ.

`voltage_regulator` is a behavioural model. It turns the level into
millivolts and raises power-good 2 cycles after each change. A 0 V request
gates the supply at once. The router runs only while power-good is high.
Only the voltage changes: every router keeps the same clock at every
non-zero level.

## Wireless interface and its power gating

Transmit path: router wireless port, then `wi_serializer`, then
`power_amplifier`, then the shared channel.
Receive path: channel, then `rx_comparator` and `low_noise_amplifier`, then
`wi_deserializer`, then the router. `wi_pg_ctrl` switches the PA and LNA
supplies.

* **Framing.** When a head flit reaches the serializer buffer, the
  serializer requests the channel from `wi_medium_arbiter`, a round-robin
  arbiter that holds its grant for a whole packet. On the grant, the PA
  supply comes on. The PA is ready one cycle later, which covers the 0.14 ns
  wake-up. The serializer then sends:
  1. 2 cycles of bare carrier,
  2. a control symbol `0xA0 | WI address` naming the destination WI,
  3. each flit as four 8-bit symbols, least significant byte first,
  4. a control symbol `0xE0` marking end of packet.

  The PA supply then turns off.
* **Rate.** A symbol may go out in 4 of every 5 cycles. That is 32 bits per
  5 cycles, or 16 Gb/s at the 2.5 GHz clock: a 64-flit packet occupies the
  air for 320 cycles.
* **Receiver-end control.** Every other WI's comparator sees the carrier
  and wakes its LNA. Once the address symbol is decoded, each LNA that is
  not addressed is switched off. It then stays off until the channel is
  quiet again. The addressed LNA stays on until end of packet.
* **Received flits.** The deserializer rebuilds flits. It marks the first
  as head and the last as tail, and buffers them for the router on VC 0.
  The receive buffer holds a whole 64-flit packet. The top level only
  forwards a WI's channel request to the arbiter while the addressed
  receiver has room for a whole packet (`wi_dst`, `wi_room`), so a granted
  packet can never be lost. `rx_overflow` would flag any loss anyway.
* **One packet at a time.** The router may use only VC 0 of its wireless
  port. This stops two packets from mixing in the serializer.

## Choices and departures

Where the published design gives only the name or the function of a part,
this implementation chose the following. Each is a parameter or a small,
local piece of logic:

* **Router internals:** 2 VCs, 4-flit buffers, the ready-per-VC handshake,
  the separable round-robin allocator, the header layout, and the framing
  of the three pipeline stages.
* **UCU:** counts flits, not packets.
* **AMS thresholds:** the quantization thresholds (5/30/75 %) and the load
  bins (1/8/32 flits).
* **AMS estimate rules:** the exact form of the level probabilities, the
  tie rule, the fall-back to the load bin, and jumping straight to the
  estimated level rather than stepping one level at a time.
* **Zones and gating:** the HUZ floor, gating only empty routers, and
  immediate wake-on-demand.
* **Regulator:** a 2-cycle settling time.
* **Wireless link:** the symbol format, the preamble, how the address is
  carried, the LNA lock-out after a packet, the 64-flit receive buffer, the
  round-robin channel arbiter, and the receiver-room check before a grant.
* **Behavioural models:** the RF power units and the comparator threshold.

Not built:

* **RUZ bypass.** The published design bypasses gated RUZ routers with
  express virtual channels from earlier work. That bypass is not described
  there and is not built here. A packet whose route crosses a RUZ router
  waits there. The tests therefore use routes that avoid RUZ nodes.
* **NorthLast routing.** The published design uses NorthLast routing for
  wireless links. Here wired hops are XY and the wireless shortcut rule
  above is applied. The combination is not proven deadlock free, and none
  was seen in the tests.
* **Analog circuits.** The modulator, demodulator, carrier and antennas are
  folded into the PA and LNA models. Their power figures (normalized sleep,
  wake-up and active power) are not modelled. Only the sleep, wake-up and
  active state is reported (`pstate`).
* **WI placement.** The WIs are fixed at nodes 2, 4, 11 and 13. The
  published design chooses WI positions by simulated-annealing optimization.
* **Wired-only variant.** The published design also evaluates a wired
  mesh with AMS. `br_node` alone gives such a mesh, but no wired-only top
  is provided.

The published energy and throughput results were measured with
application traces (PARSEC and SPLASH-2 benchmarks) on a 16-core system.
The network here is sized for that system (16 nodes). The traces
themselves are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **`tb_base_router`:**
  * packets on all ports and both VCs under contention, with output port,
    order, head/tail and VC exclusivity checked against an XY model;
  * the 2-cycle in-to-out latency;
  * back-pressure;
  * the UCU counts;
  * gating and `wake_req`.
* **`tb_ucu`:** random writes and reads against a counting model.
* **`tb_ams_voltage_ctrl`:**
  * epoch-by-epoch level decisions worked out by hand: gating, wake,
    voltage up, voltage down, the tie rule and the fall-back;
  * the HUZ floor and the RUZ hold;
  * the epoch period.
* **`tb_wi_serializer`:**
  * the exact symbol stream;
  * the 4-symbols-per-5-cycles rate.
* **`tb_wi_deserializer`:**
  * address match and mismatch;
  * head/tail marking;
  * overflow.
* **`tb_wi_pg_ctrl`:** the PA and LNA control flow, including mismatch,
  lock-out and end of packet.
* **`tb_hybrid_router`:** three hybrid routers share the channel.
  * A 64-flit packet crosses the air in 320 cycles.
  * The bystander's LNA wakes and is switched off after the address.
  * Everything is gated again afterwards.
* **Small model tests:** `tb_voltage_regulator`, `tb_power_amplifier`,
  `tb_low_noise_amplifier`, `tb_rx_comparator`, `tb_zone_classifier` and
  `tb_wi_medium_arbiter`.
* **`tb_wnoc_top`:** the whole network at its default sizes. The epoch is
  1000 cycles and packets are 64 flits. The run has three phases: heavy
  random traffic, silence, then light traffic. It checks:
  * that every packet arrives whole, in order, at the right node;
  * that each mechanism happens at least once: voltage up, voltage down,
    gating, wake-on-demand, RUZ hold, HUZ floor, wireless transfer, LNA
    rejection and back-pressure.
* **`tb_synthetic_traffic`:** the whole network at its default sizes under
  transpose, uniform random, bit-reversal, butterfly and hotspot (all to
  node 0) traffic. Each source sends 3 packets of 64 flits. Every packet
  must arrive whole and in order, with no receive-buffer overflow. The
  test prints cycles, throughput, wireless packets and level changes per
  pattern. The pattern definitions are the common textbook ones.

## Simulating

With Verilator 5 (two-state: every register that is read is reset):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    rtl/wnoc_pkg.sv -y rtl tb/tb_wnoc_top.sv --top-module tb_wnoc_top
./obj_dir/Vtb_wnoc_top
```

Use the same command for any other testbench, swapping the name. Compiling
the full network takes about two minutes. The run itself takes about a
second.

To change the design:

* The main sizes are parameters of `wnoc_top`: `NVC`, `DEPTH`,
  `EPOCH_CYCLES`, `HIST` and `DES_DEPTH`.
* The AMS thresholds are parameters of `ams_voltage_ctrl`.
* The geometry, flit format, WI positions and routing helpers live in
  `wnoc_pkg`.

## Files

| file | content |
|---|---|
| `rtl/wnoc_pkg.sv` | types, constants, XY and wireless routing functions |
| `rtl/wnoc_top.sv` | 4x4 network, channel arbiter, channel model, zone classifier |
| `rtl/br_node.sv`, `rtl/hybrid_router.sv` | node wrappers |
| `rtl/base_router.sv`, `rtl/ucu.sv`, `rtl/sync_fifo.sv` | router |
| `rtl/ams_voltage_ctrl.sv`, `rtl/zone_classifier.sv` | AMS control |
| `rtl/voltage_regulator.sv` | regulator model |
| `rtl/wi_serializer.sv`, `rtl/wi_deserializer.sv`, `rtl/wi_pg_ctrl.sv`, `rtl/wi_medium_arbiter.sv` | wireless interface logic |
| `rtl/power_amplifier.sv`, `rtl/low_noise_amplifier.sv`, `rtl/rx_comparator.sv` | RF models |
| `tb/tb_*.sv` | testbenches |

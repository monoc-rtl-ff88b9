# MoNoC: a network on chip that watches its own traffic and re-routes congested flows

A 2D-mesh network on chip in which a communicating pair of processing elements
(PEs) can sign a *contract*: a number of payload flits that must arrive at the
target in every monitoring window. The target network interface checks the
contract window by window. When it is broken, the source asks whether its own
PE was simply slow. If it was not, the route is congested: the source sends one
small probe packet along each of its pre-computed alternative routes; every
router output port the probe crosses adds its measured link occupancy; the
target picks the least occupied route and tells the source, which switches to
it. All of this is done in hardware, on a high-priority control lane, with the
PE blocked for only about a hundred cycles.

## Packets and source routing

Flits are 16 bits. A packet is

    path flit(s) | 0xFFFF terminator | payload size | payload ...

Each path flit holds four hops of 4 bits, most significant nibble first:
`0`=East, `1`=West, `2`=North, `3`=South, `F`=none. A router reads the leading
hop of the first path flit, sends the packet to that output, and replaces the
flit by itself shifted left one nibble with `F` filled in. A flit that becomes
`0xFFFF` that way is dropped (`ev_drop`), so the next router sees the next path
flit. A leading `F` means "arrived": the packet goes to the Local port, and the
network interface strips the remaining path flits and the terminator. The PE
receives the size flit and the payload.

Bit 15 of the size flit marks a packet of a monitored flow. The source
interface sets it, the routers ignore it (sizes are 15 bits), and the target
interface clears it before the PE sees the flit. Only marked packets count
towards the target's reception rate, so best-effort traffic that ends at the
same node does not hide a broken contract.

Route example on the 5 x 5 mesh (node n = 5y + x, East = x+1, North = y+1),
from node 0 to node 24: `0x0000, 0x2222, 0xFFFF` (four hops East, then four
North).

## Router

`monoc_router` has five ports (East, West, North, South, Local). Every link
carries `{tx, lane, data}` and returns one credit bit per lane. The credit bit
means "there is room in my buffer for this lane".

* **Input port** (`input_port`, two `input_lane`s, `lane_fifo`): one 4-flit
  FIFO per lane. The lane decodes the hop, consumes it, and holds a request
  to the chosen output until the packet's last payload flit has left. The
  credits it returns are simply "FIFO not full".
* **Crossbar** (`crossbar`): a per-lane multiplexer. Each output lane forwards
  the input lane it was granted to.
* **Output port** (`output_port`):
  * An **arbiter** per lane serves requests first come, first served. An
    ageing counter records how long each request has waited. On a tie, the
    lowest port number wins.
  * A **granter** puts one flit per cycle on the link. Control goes first
    if it has a flit and a credit; otherwise data goes if it has both.
    A control packet therefore interrupts a data packet flit by flit, and
    the data packet keeps its lane (`ev_preempt`). With a flit waiting but
    no credit, `tx` stays high and the port stalls (`ev_stall`).

Timing: a header written into an input FIFO at clock edge *t* leaves the output
link at edge *t+3*; after that, one flit per cycle.

## Intra Monitor (IAM): measuring link occupancy

Every output port has an `intra_monitor`. It classifies each cycle of the link:

* Free: `tx` low.
* Transmitting: `tx` high and the credit of the offered lane high.
* Stalled: `tx` high and that credit low.

Per state it keeps three numbers, each recomputed once per observation
window (OTS, 1000 cycles by default):

* **OVS** is the count in the running window.
* **CVS** is the count of the last complete window.
* **AVS** is a running average. It is updated as `AVS <- (AVS + CVS)/2`,
  and after the first window it simply equals CVS.

This weighting reproduces the worked example (three 1000-cycle windows)
that `tb_intra_monitor` checks.

The port reports `link_use = AVS(transmitting) + AVS(stalled)`, saturating.
An operation interface lets the control packets that pass through use the
monitor:
* a SETUP packet loads a new OTS;
* a PROBE packet has `link_use` added to its *sum* field, folded into its
  *max* field, and its *hops* field incremented.

## Network interface and the Inter Monitor

`network_interface` holds:

* `ni_sender`: the PE-to-network path. It has a data lane and a control lane;
  control has priority.
* `ni_receiver`: the network-to-PE path. It also decodes control packets for
  the monitors.
* `mst_monitor` with its `rate_probe`, on the source side.
* `slv_monitor` with its `rate_probe`, on the target side.

A node can be source of one monitored flow and target of another at the same
time.

### PE interface

The PE side is a valid/ready stream with `pe_tx_kind` and `pe_tx_last`. The
`pe_tx_kind` values are:

* `KIND_BE`: a complete best-effort packet, path included.
* `KIND_MON`: a monitored packet, given as size + payload only. The NI
  prepends the route the contract currently uses.
* `KIND_OPEN`: the configuration packet that opens a session. Its flits are
  MTS, AC, OTS, N, three flits of return route, then N routes of three flits
  each. Route 0 is used first and should be the XY route.
* `KIND_CLOSE`: one flit that closes the session.

`pe_blocked` tells the PE to hold its monitored flow. This happens while
the session opens and while a new route is being chosen.

### Control packets

Control packets travel on the control lane. Their payload starts with a
command:

| command | sent by | payload |
|---|---|---|
| SETUP (1) | source | MTS, AC, OTS, number of routes, return route (8 flits) |
| RELEASE (2) | source | command only |
| VIOLATION (3) | target | command only |
| LOWINJ (4) | source | command only |
| PROBE (5) | source | route index, sum, max, hops (5 flits) |
| NEWPATH (6) | target | index of the selected route |

### Contract protocol

1. **Opening.** The PE sends the configuration packet. The source blocks the
   flow and sends SETUP along route 0; every IAM on that route loads the OTS.
   The source then starts its probe and unblocks the flow. On SETUP, the
   target stores MTS, AC and the return route and starts monitoring.
2. **Monitoring.**
   * The target probe counts the payload flits delivered to the PE. Its
     count for the last window is **CRR**.
   * The source probe counts the cycles in which the PE offers a monitored
     payload flit, whether or not the network accepts it. Its running
     average is **AIR**. Counting offers, not acceptances, keeps
     back-pressure from a congested route from looking like a slow source.
3. **Violation.** At the end of a window where CRR < AC, the target stops
   monitoring and sends VIOLATION.
   * **AIR < AC.** The source itself is slow. The source replies LOWINJ
     and the target resumes.
   * **AIR >= AC.** The route is congested:
     1. The source blocks the flow.
     2. It sends one PROBE on each of the N routes.
     3. The target collects the N probes. It picks the lowest average
        occupancy (sum/hops). A tie goes to the lowest max, then to the
        lowest index. Averages are compared by cross-multiplication, so no
        divider is needed.
     4. The target sends NEWPATH on the return route.
     5. The source switches route, unblocks and resumes.
4. **Closing.** The PE sends a close. The source sends RELEASE, and both
   sides go idle.

## Measured behaviour

`tb_monoc_top` runs the default 5 x 5 network:

* A monitored flow from node 0 to node 24 with four candidate routes.
* Three disturbing flows that load the XY route.
* Contract settings: MTS 200, AC 120, OTS 200.

It measures:

| step | this RTL | reference design, same step |
|---|---|---|
| session opening (request to target monitoring) | 60 cycles | 78 cycles |
| flow blocked during adaptation | 105 cycles | 212 cycles |
| session closing | 35 cycles | 36 cycles |

The reference numbers come from a different traffic scenario, so they only
show the same order of magnitude. In this run:

* 3 violations
* 2 of them explained as low injection
* 1 adaptation, to route 2
* 66 preemption cycles
* 310 stall cycles
* 867 dropped path flits

### Static disturbance (`tb_static_scenario`)

This bench runs the 5 x 5 network with these flows:

* The pair runs from node 0 to node 24.
* The source generates a 20-flit-payload packet every 30 cycles, for 250
  packets. That is about 80 % of a link.
* Four disturbing flows cross its XY route: 1→3, 2→4, 9→19 and 14→24.

Application latency runs from the packet's generation to its arrival, so it
includes waiting in the source queue. Results:

| run | peak latency | mean of last 25 packets |
|---|---|---|
| no disturbance | 51 | 51 |
| 10-20 % disturbance, no contract | 3776 | 3614 |
| 40-50 % disturbance, no contract | 13972 | 13292 |
| 10-20 % disturbance, contract | 285 | 57 |

With a contract, the route is changed once, to YX. The network latency peaks
at 144 cycles.

Latency comes back to the reference slowly. The 10-packet mean is within
20 % of the reference only from about packet 210 on. The cause is the
backlog: the source offers 80 % of a link, and the target port is shared
with one disturbing flow, so the queue built during detection drains with
little headroom.

### Moving disturbance (`tb_dynamic_scenario`)

This bench changes the disturbance over time:

* The pair runs from node 5 to node 23.
* The source offers about 86 % of a link, for 400 packets.
* The disturbing flows change every 100 packets, each at 20-30 %.
* Each phase loads the route chosen in the phase before.
* The contract uses a window of 30 packets.

Results:

* **Without a contract** the peak latency reaches 1422 cycles.
* **With a contract, phases 1 and 2:** one adaptation each, with peaks of
  335 and 430 cycles (against 800 and 1228 without).
* **With a contract, phase 3:** the choice takes several rounds. The route
  just left by a disturbing flow still shows its load in the averaged
  measure, while a flow that has just started does not show yet. The phase
  peaks at 911 cycles.

This lag is a property of the averaged link-use measure. A shorter OTS on
every router would reduce it. However, SETUP sets the OTS only along route 0.

## Where this design makes its own choices

* **Adapt when AIR >= AC.** The protocol description reads "AIR smaller
  than AC means the source is slow, no adaptation". The cost example,
  however, says the source "verifies AIR < AC" before adapting. This design
  follows the protocol description.
* **Averaging weights** are 1/2 for the new window and 1/2 for the history.
* **Route measure.** A probe measures `link_use` = transmitting +
  stalled cycles per window.
* **Monitored-packet mark.** The size-flit mark exists in this design only.
* **Encodings** are all chosen here: the link format, the credit-per-lane
  handshake, the PE interface, the command codes, the control payload
  layouts, the configuration packet order and the 3-flit route length
  (up to 12 hops).
* **Arbiter.** The ageing FCFS arbiter breaks ties by port number.
* **Windows.** MTS and OTS are counted in clock cycles. The reset value
  of both is 1000.
* **Processing elements** are not modelled. Their ports are brought out at
  the top, and the testbenches drive them.

## Files and parameters

`rtl/monoc_pkg.sv` holds the shared constants:

| constant | value |
|---|---|
| `FLIT_W` | 16 |
| `BUF_DEPTH` | 4 |
| `NLANES` | 2 |
| `NPORTS` | 5 |
| `MAX_PATHS` | 4 |
| `PATH_FLITS` | 3 |
| `CTRL_PL_MAX` | 8 |
| `CNT_W` | 16 |

The package also holds the link and message types and the path helper
functions.

`monoc_top` takes the parameters `XS`, `YS` (both 5 by default) and
`OTS_DEFAULT` (1000).

Every block in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one prints `TB_RESULT checks=N failures=M`. To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/monoc_pkg.sv \
        tb/tb_monoc_top.sv --top-module tb_monoc_top -Mdir obj -o sim
    ./obj/sim

`tb_static_scenario` and `tb_dynamic_scenario` run the traffic experiments
above at the default size, in a few seconds each.

`tb_network_interface` connects two interfaces back to back. It exercises a
full session, a congestion adaptation and a low-injection violation without
routers. `tb_monoc_top` runs the full default-size network end to end in well
under a minute.

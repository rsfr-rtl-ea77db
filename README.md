# RSFR: a self-testing, fault-tolerant router for a 2-D mesh network-on-chip

Routers in a network-on-chip can break in ways that do not stop them:
a router may keep sending every packet to the same port, send copies to
several ports, take the wrong turn, or lose packets now and then. RSFR
("recursive self-testable fault-tolerant routing") lets the routers find such
faults in each other while carrying normal traffic, with no test mode and no
test packets, and route around what they find.

The idea rests on the routing rule being fixed and known to every router.
All routers use the same adaptive negative-first routing with the same
priority list of output ports. When a packet arrives, the receiving router
knows where it came from and where it is going. It can therefore work out
which port the previous router should have used and compare that with the
port the packet actually came through. If they differ, the previous router
is faulty. The receiving router records this in a small register. It also
writes the faulty router's address into the packet header, so the news
travels with the traffic to the other neighbours of the faulty router.
Later decisions avoid faulty neighbours. If a packet is boxed in, it goes
back where it came from (a backtrack). A router that loses packets detects
this itself and announces it.

This repository holds synthesizable SystemVerilog for the router and a
parameterised mesh of them, with self-checking testbenches.

## Mesh, ports and packets

* `rsfr_mesh` is an `NX x NY` grid of routers (default 8 x 8).
  * X grows to the east and Y to the north.
  * Router `i` sits at x = `i % NX`, y = `i / NX`.
* Every router has five ports, numbered W=0, E=1, S=2, N=3, local=4.
* Each link is a one-packet-per-cycle valid/ready channel.
  * A packet is a single 64-bit flit (`pkt_t`).
  * It carries a 32-bit header (`hdr_t`) and a 32-bit payload.
* Per router, the top brings out:
  * the local injection and ejection ports;
  * a fault-model setting (`fcfg`), for evaluation;
  * the 8-bit requisite register and the "I am a dropper" flag, for observation;
  * a bundle of one-cycle event flags (`stat_t`) for counting.
* Links at the edge of the mesh are tied off. Their inputs are idle and their outputs always ready. A packet that a faulty router pushes off the edge is lost.

### Header

| field    | bits | use |
|----------|------|-----|
| `sop`, `eop` | 1+1 | packet framing, kept for the single-flit format |
| `ttl`    | 8 | hop budget. The source sets it; the top's `ttl_init` output suggests `2*(NX+NY)`. A router that receives a packet with TTL 0 drops it. |
| `faulty` | 8 | address (x,y) of a router being reported |
| `frc`    | 1 | force bit. Set when the sender did not use its first-priority port. |
| `risky`  | 1 | the sender has more than one faulty neighbour |
| `pid`    | 2 | "previous input direction": the side from which the sender received the packet |
| `tof`    | 2 | type of the reported fault, or a self-announcement (below) |
| `dest`   | 8 | destination (x,y) |

### Type-of-fault codes

Codes about a neighbour:

* `00`: general fault (stuck-at-port, copies, dropper).
* `01`: straight fault. The router cannot pass packets straight through.
* `10`: turn fault. The router cannot turn packets.
* `11`: fault-free.

When `faulty` holds the sender's own address, the code is a self-announcement instead:

* `00`: "I lose packets".
* `01`: "this packet is backtracking".
* `11`: "I am clear again".
* `10`: "nothing to report".

### Requisite register (8 bits per router)

`[7:6]` risky neighbour (W,E,S,N = 00,01,10,11), `[5:2]` faulty flags of the
W, E, S, N neighbours, `[1:0]` type of fault of one faulty neighbour.

Only one neighbour's type fits in the register:

* The two type bits belong to the first faulty neighbour in W, E, S, N order.
* A second report about that neighbour with a different type turns its type into 00 (general).
* Clearing that neighbour sets the type to 00. If no faulty neighbour is left, it sets the type to 11.

Two pieces of state sit beside the register:

* A valid flag for the risky field, because the 8-bit layout has no "no risky neighbour" value.
* A 4-bit "local only" mask for neighbours marked only because a backtracked packet came back from them. Such marks steer this router's own decisions but are never announced to others.

## Priority table and the test of the previous router

`rsfr_prio` lists the minimal negative-first ports in order of priority for a
(router, destination) pair. West and south ("negative" directions) go before
east and north. Some pairs have only one port:

| destination lies | ports, first to last |
|---|---|
| west and south | W, S |
| west and north | W, then N |
| west only / south only | W / S |
| east and south | S, then E |
| east and north | E, N |
| east only / north only | E / N |

Negative-first forbids two turns: a packet moving north may not turn west,
and a packet moving east may not turn south. In port terms the forbidden
(input, output) pairs are (S, W) and (W, S).

`rsfr_fault_detect` judges the previous router from the input side, the
destination and the header:

* It rebuilds the previous router's address.
* It runs that router's priority table.
* It checks the port actually used:
  * With `frc=0` the used port must be the first priority.
  * With `frc=1` it may be any listed port.
  * If the previous router was itself the destination, any forwarding is wrong.
  * Backtracked packets are exempt from the test.
* It classifies a misroute as a turn or a straight fault. It compares the previous router's supposed output with the side the packet entered that router (from `pid`). If the supposed path was straight, the fault is a straight fault; otherwise it is a turn fault.
* It decodes any report in the header (`faulty`, `tof`):
  * a report about one of this router's neighbours;
  * a self-announcement of the previous router.

## Choosing the output port

`rsfr_port_select` is the routing algorithm. A candidate port must meet all of these:

* The port leads to a router inside the mesh.
* It is not the input port. The exception is the first detection of a misrouting previous router; see *Departures* below.
* It does not form a forbidden negative-first turn. For a backtracked packet the turn is also checked against `pid`. The packet may not go back the way it originally came.
* **Path prediction.** The next router must have a legal continuation towards the destination from the side the packet would enter. A hop north or east must not pass the destination row or column. This avoids sending a packet into a router from which negative-first cannot go on.
* The neighbour is not marked faulty. A neighbour with only a turn fault, or only a straight fault, is still usable when the packet's predicted path through it needs only what it can still do. The prediction is the neighbour's own first-priority port.

The choice among the candidates:

1. Non-risky neighbours are tried first, in priority order. Risky neighbours are a last resort.
2. If no port qualifies:
   * the packet is backtracked when it came from another router that is not faulty;
   * otherwise it is dropped.
3. The force bit is set whenever the chosen port is not the first priority. This tells the next router that a detour was intended.

## Rewriting the header

The routing logic block (`rsfr_rlb`) serves one packet per cycle. It picks
from the five input FIFOs round-robin. For each packet, in one combinational
pass, it:

1. updates the requisite register from two events:
   * the test of the previous router;
   * the report carried in the header;
2. chooses the port with the updated register;
3. fills in the outgoing header. The `faulty`/`tof` field is filled with the first case that applies:
   1. For a backtrack: the own address with code 01. `pid` is unchanged and `frc` is 0.
   2. A pending "I lose packets" announcement.
   3. A pending "clear" announcement.
   4. A previous router just found faulty: its address and type.
   5. The first-priority neighbour is bypassed because it is marked faulty, and not by a backtrack alone: its address and type.
   6. Otherwise the incoming report passes on unchanged. Locally injected packets, and incoming "nothing" or backtrack signatures, instead carry the own address with "nothing to report".

The block also decrements TTL. It sets `pid` to the input side; for an
injected packet, `pid` is the side opposite its output. It sets `risky` if
the router has more than one faulty neighbour.

## Lost-packet detection

`rsfr_drop_monitor` sets a bit when a packet is accepted from a FIFO and
clears it when the packet leaves. A deliberate routing drop also counts as
leaving. If the bit is still set at the next acceptance, a packet has
vanished inside the router. The router then:

* marks itself a dropper;
* announces this on the next packet it forwards;
* after a clearing period of 5 forwarded packets, announces that it is clear.

Neighbours mark a dropper as faulty (type 00) and unmark it on the clear announcement.

## Fault injection

`rsfr_fault_inject` sits between the routing decision and the output
registers. It rewrites the set of ports a packet goes to, according to `fcfg`:

* none;
* stuck-at-port: always to the configured port;
* multiple copies: the intended port plus the configured one;
* turn fault: turning packets go to the configured port;
* straight fault: straight-through packets go to the configured port;
* transient drop: packets vanish, without the routing logic knowing.

This is how the testbenches create the faults that the routers must detect.

## Timing

* Packets pass two registers per router: the input FIFO and the output register.
* An unobstructed packet on a path of `h` hops leaves the destination's local port `2*(h+1)` cycles after injection.
* A router commits a packet only when every output it goes to is free. A copy-making fault can need two outputs at once.
* One packet per router per cycle. The five inputs share one routing logic block.
* Reset is asynchronous and active low.

## Files

| module | what it is |
|---|---|
| `rsfr_pkg` | types, codes, `opp()` and `prohibited()` helpers |
| `rsfr_mesh` | top: grid of routers |
| `rsfr_router` | 5 input FIFOs, routing logic block, fault injection, output registers |
| `rsfr_rlb` | routing logic block: arbitration, test, register, port choice, header |
| `rsfr_prio` | priority table |
| `rsfr_fault_detect` | test of the previous router, header report decoding |
| `rsfr_req_reg` | requisite register and its update rules |
| `rsfr_port_select` | output choice, backtrack, drop, TTL |
| `rsfr_drop_monitor` | lost-packet detection and announcements |
| `rsfr_fault_inject` | fault models for evaluation |
| `rsfr_fifo` | first-word-fall-through FIFO |

Testbenches, in `tb/`:

* Each block has its own, `tb_<module>`.
* `tb_rsfr_mesh` runs the default 8 x 8 mesh end to end:
  * exact latency of isolated packets;
  * full delivery of fault-free traffic under back-pressure;
  * TTL expiry;
  * a faulty phase with six faults of all five kinds. Every mechanism above must happen at least once: detection, forced choice, use of a partly faulty neighbour, backtrack, prediction cut, risky choice, drop, lost-packet detection, clearing, stall.
* `tb_rsfr_workload` uses the helper `tb_rsfr_wl_run`. It runs a 4 x 4 mesh with 125 packets and an 8 x 8 mesh with 500 packets, each fault-free and then with 10 % of the routers faulty, and prints the drop rate.

Every testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert --top-module tb_rsfr_mesh \
        rtl/rsfr_pkg.sv $(ls rtl/*.sv | grep -v rsfr_pkg) tb/tb_rsfr_mesh.sv
    ./obj_dir/Vtb_rsfr_mesh

For the workload test, add `tb/tb_rsfr_wl_run.sv` and use
`--top-module tb_rsfr_workload`. Building an 8 x 8 mesh takes well under a
minute with `--build-jobs 4`. A 16 x 16 mesh (`NX=NY=16`, the largest the
4-bit coordinates allow) builds but takes many minutes to compile.

## Departures and open points

* **Drop rate.** With 10 % of routers faulty (random kinds and places), the
  workload test loses far more packets than the figures this scheme was
  published with (about 2 %). Most losses come from stuck-at-port routers.
  Packets pushed off the mesh edge, or into a corner where negative-first
  allows no way on, are dropped by the rules above. Treat the fault-tolerance
  figures as unverified. Measured on this RTL (one random seed, random fault
  kinds): 4 x 4 with 125 packets loses 46 %, 8 x 8 with 500 packets loses
  27 %. Fault-free, every packet arrives. The 16 x 16 case was not
  simulated. In one attempt its faulty pass had not drained after 200,000
  cycles, so a remaining live-lock or deadlock at that size cannot be ruled
  out.
* **U-turn after a misroute.** The rules forbid sending a packet back through
  its input port. The worked example the scheme is built on does exactly that
  when a router has just found that its previous router misrouted. This design
  allows the U-turn only on that first detection. Allowing it on every
  misroute made packets bounce between a stuck router and its neighbour until
  the buffers deadlocked.
* **Own choices:**
  * the "nothing to report" code;
  * the risky-field valid flag;
  * the local-only mask;
  * `pid` of injected packets;
  * counting a routing drop as "leaving" for the lost-packet bit;
  * the order of report precedence for backtrack and announcements.
* **Path prediction** is one hop deep plus the no-overshoot rule. How deep the prediction goes is a design choice here.
* **Not specified, chosen here:** single-flit packets, field widths, FIFO depth (4), the valid/ready handshake, round-robin arbitration, reset values, and the TTL value. A local port is added to the four mesh ports.
* **Not modelled:** network interfaces, traffic generators, data-corruption faults (the scheme does not test for them), and the power and nanosecond latency figures of the original evaluation.

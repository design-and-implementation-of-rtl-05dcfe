# Reliable mesh router with elastic buffers

This is a router for a 2-D mesh network-on-chip. It keeps delivering packets
when parts of the network fail. It has three lines of defence:

* **Data errors on a link** are corrected switch to switch. Every flit crosses
  each link as a Hamming code word. The receiving port corrects a single
  flipped bit. For a word it cannot correct, it sends a *Nack* back to the
  sender.
* **Unavailable routers** are routed around. Every router tells its eight
  neighbours, including the diagonal ones, whether it can receive. An
  adaptive form of XY routing uses these bits to step around a router that
  cannot receive. A packet already waiting for a neighbour that then becomes
  unavailable is *looped back* into its own router and routed again.
* **Routing errors** made by a neighbour are detected. Each input port checks
  whether the neighbour had a right to send it this packet. The results go
  into a small per-port *journal* that tells a one-off error from a permanent
  fault.

The router has no FIFOs. Each port has one **elastic buffer** (EB) at its
input and one at its output. An EB is a flip-flop split into its master and
slave halves, so it can hold two flits, under ready/valid control. Chained
EBs behave like a FIFO spread along the path.

Everything is synthesizable SystemVerilog in `rtl/`, with self-checking
testbenches in `tb/`.

## Flits, packets and code words

| item | bits | layout |
|---|---|---|
| address | 4 | `{x[1:0], y[1:0]}`; a 4x4 mesh; `y` grows towards north |
| header flit | 16 | `[15]`=1 type, `[14:11]` source, `[10:7]` destination, `[6]` unique-path bit, `[5:0]` payload |
| data flit | 16 | `[15]`=0 type, `[14:0]` payload |
| packet | 4 flits | a header, then 3 data flits (`PKT_LEN`) |
| code word | 22 | extended Hamming (22,16): bit 0 is overall parity; parity bits sit at positions 1, 2, 4, 8 and 16; data bits, LSB first, fill the other positions |

The flit type is a single bit, so no flit can mark the end of a packet. For
that reason, packets have a fixed length. Every block that must know where a
packet ends counts to `PKT_LEN`: the input port, the output allocator and
both sides of the loopback module. The flit width and the packet length are
this implementation's choices. They sit in `noc_pkg`. `CW_W` follows from
`FLIT_W`.

## The path through one port

```
link in ──► loopback_module ──► input_port ─────────────────────► output_fsm ──► hamming_enc ──► loopback_module ──► link out
            (mux: link or       Hamming decode + correct          (round-robin,      (re-encode)    (semi-crossbar:
             loopback bus)      input EB (2 flits)                 whole-packet lock,               neighbour or
                                adaptive XY route                  output EB)                       loopback bus)
                                routing-error check + journal
```

There are four such ports: N, E, S and W. Each link is a code word bus
(`data_*`), a valid (`data_request_*`) and a back-pressure signal (`occ_*`,
meaning "do not send"). A processing element (PE) can be attached to any
side. `LOCAL_PORT` names the side that takes the packets addressed to this
router. That side is never used for through traffic. A router with no PE
(`LOCAL_EN = 0`, for example inside a mesh) uses all four sides for through
traffic.

Uncontended timing: a header offered on an input link appears on the output
link two cycles later. It spends one cycle in the input EB and one in the
output EB. The rest of the packet follows at one flit per cycle.

## Elastic buffer (`elastic_buffer`)

There are two storage slots, *master* and *slave*, with enables `enm` and
`ens`. Data always leaves from the slave.

* `r_in` (ready to the upstream) is high while at least one slot is empty.
  It depends only on the buffer's own state, never combinationally on
  `r_out`. Long chains therefore have no combinational ready path.
* A flit moves on a rising edge when valid and ready are both high.
* An arriving flit goes straight into the slave when the slave is free (or
  being emptied) and the master is empty. Otherwise the flit waits in the
  master. This gives a latency of one cycle
  and one flit per cycle, and two flits of storage when the downstream
  stalls.

The original design builds the EB from two latches. Here the two halves are
modelled as enabled registers in a single-clock flip-flop style. The
handshake and the storage seen from outside are the same.

## Adaptive XY routing (`route_logic`)

Plain XY routing is the preferred choice: move along X until the column is
right, then along Y. A direction is *usable* when all of these hold:

* the neighbour there is available;
* it is not the port the packet arrived by (no U-turns);
* it is not the local side.

If the preferred direction is not usable, the router tries, in order:

1. **While X still differs:** the Y direction towards the destination. In
   the destination's row, it takes the Y side whose diagonal neighbour
   towards the destination is available.
2. **While moving in Y:** the X side whose diagonal neighbour towards the
   destination is available.
3. Failing those, the other perpendicular side, and as a last resort the
   way back.

If nothing is usable, the preferred direction is kept. The packet then waits
in the output EB, or the loopback module sends it round again.

Plain XY forbids turning from Y back to X. This router does make that turn,
but only to get round an unavailable router. Under heavy load this can
deadlock (see the mesh results).

### The unique-path bit

The next router must be able to tell a legitimate detour from a routing
error. It can do so for one kind of detour: a step to the first fallback
side because the preferred neighbour is unavailable. That neighbour is then
diagonal to the receiver, which sees its availability bit.

Any other detour sets the header's unique-path bit, and the receiver skips
its check. Examples are a first fallback taken because of the no-U-turn or
local-side rule, the second fallback, or the way back. A packet that
follows plain XY, or makes the checkable detour, leaves with the bit
cleared.

## Routing error detection (`route_error_detect`)

This is the least obvious part of the design. A header arriving on port P
comes from the neighbour N on that side. The input port re-runs N's XY
choice for the header's destination, which gives a router Q. The arrival is
**correct** when one of these holds:

* Q is this router, so N followed plain XY;
* Q is one of this router's eight neighbours and its availability bit is
  low, so N made a legitimate bypass (this is why availability is sent
  diagonally);
* the header's unique-path bit is set.

A header whose destination was N itself is always an error.

Headers from the local PE and looped-back headers are not checked, because
no neighbour's routing logic produced them. As a result, the local port's
journal and `rerr_o` bit always stay zero.

Each checked header shifts one bit into a 3-bit journal per port:

| journal | meaning |
|---|---|
| `000` | no routing error in the last three headers |
| `111` | permanent fault in the neighbour's routing logic |
| anything else | transient error |

`control_logic` treats a neighbour whose journal reads `111` as unavailable,
so traffic stops going to it. Reset clears the journals.

## Loopback (`loopback_module`)

This block sits between each port's link and the router core.

* **Output side (semi-crossbar).** When a packet's header reaches it, the
  block checks whether the neighbour is unavailable. If it is, the whole
  packet is switched onto an internal loopback bus instead of the link. The
  choice is held until the packet's last flit.
* **Input side (multiplexer).** The port's input receives either the link or
  the loopback bus, switching only between packets. A looped-back packet
  takes priority, so the output buffer drains.
* **Re-routing.** A looped packet enters the same port's input as a new
  packet. It cannot leave by that port again (no U-turn, and the neighbour
  is unavailable), so it is routed out another side.
* **`occ_out`.** While the loop uses the input, `occ_out` stops the
  neighbour from sending. It also does so when the input EB is full or the
  port is disabled.

Limitation: the loop decision is taken only at a header. If a neighbour
becomes unavailable while a packet is half sent to it, the rest of that
packet waits.

## Availability, faults and error bookkeeping

* `port_fault_i[p]` marks input port *p* permanently faulty. That port
  refuses all traffic (`occ_out` high) while the others keep working.
* When all four ports are faulty, `avail_o` goes low. `avail_o` is meant to
  drive the matching `dai_i` bit of all eight neighbours.
* `dai_i` holds the neighbours' availability, in the bit order N, NE, E, SE,
  S, SW, W, NW. Positions outside the mesh should read 0; a PE side should
  read 1.
* `nack_o[p]` pulses for every code word on port *p* that could not be
  corrected. If that word is a header, the whole packet is dropped, because
  its destination cannot be trusted. A data flit is passed on as received;
  the sender is expected to retransmit. A data flit that arrives where a
  header is expected is dropped.
* `data_error_journal` counts corrected and uncorrectable words per port,
  saturating at 255. It also gives a total of uncorrectable words.
  `journal_clear_i` resets the counts.

## Top-level interface (`reliable_router`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `id_i` | in | 4 | this router's address |
| `port_fault_i` | in | 4 | permanently faulty input ports |
| `dai_i` | in | 8 | availability of the eight neighbours (N, NE, E, SE, S, SW, W, NW) |
| `avail_o` | out | 1 | this router can receive |
| `data_in_i[4]`, `data_request_in_i`, `occ_out_o` | in/in/out | 22 / 4 / 4 | incoming links: word, valid, "stop sending" |
| `data_out_o[4]`, `data_request_out_o`, `occ_in_i` | out/out/in | 22 / 4 / 4 | outgoing links |
| `nack_o` | out | 4 | uncorrectable word received, per port |
| `looping_o` | out | 4 | a packet is being looped back, per port |
| `rerr_o` | out | 4 | routing error found on a header, per port (pulse) |
| `route_journal_o[4]` | out | 3 each | routing error journals |
| `journal_clear_i` | in | 1 | clears the error counts |
| `corr_cnt_o[4]`, `uncorr_cnt_o[4]`, `uncorr_total_o` | out | 8, 8, 10 | data error counts |

The port index is `noc_pkg::dir_e`: N=0, E=1, S=2, W=3. Parameters:
`LOCAL_PORT` (default W), `LOCAL_EN` (default 1) and `PKT_FLITS`
(default 4).

## Behaviour in a 4x4 mesh

`tb/tb_mesh_4x4.sv` wires sixteen routers, all at default parameters, into a
4x4 mesh. Each router's availability output feeds its neighbours' `dai_i`
bits. The twelve edge routers carry a PE on an outer side; the four inner
routers have none. In that test:

* Fault-free, uniform random traffic: 240 packets arrive intact with no
  routing error reported. Mean latency is about 18 cycles, measured from
  header injection to tail reception.
* With inner router (2,1) made unavailable, random sink stalls and injected
  single-bit errors: every packet that would have crossed (2,1) goes round
  it. All packets arrive, every bit error is corrected, and the detection
  logic classifies no detour as a routing error.
* With (2,1) failing while traffic flows (6 packets per PE): the headers
  already waiting for it are looped back and leave by another side. Every
  packet arrives, and none is reported as a routing error.

**Deadlock.** In the last scenario with 12 packets per PE, all queued at
once, the network deadlocks. The detours round (2,1) turn from Y back to X,
which plain XY forbids. Here they closed a ring of the eight routers round
(2,1): eastbound along the bottom, northbound up the right side, westbound
along the top and southbound down the left. Each router holds a packet
waiting for the next. Nothing in the router breaks such a cycle. The paths
that may turn need restricting (turn-model rules) or separating (virtual
channels), and neither is part of this design. Treat the adaptive bypass as
safe only under light load, or add one of these.

The original evaluation reports throughput in bit/s and latency in ns. Those
figures depend on a clock frequency and a traffic set it does not state, so
only cycle counts are given here.

## Where this departs from the original description, and what is assumed

* **Switching.** The original calls the switch store-and-forward, but also
  replaces the buffers by two-slot EBs, which cannot hold a whole packet.
  This design follows the EBs. A packet moves flit by flit, and each output
  is locked to one input for the length of a packet.
* **Turning from Y back to X.** Plain XY never turns from Y back to X; this
  router does, but only to get round an unavailable router.
* **Deadlock and livelock.** The original claims its adaptive routing avoids
  both, but gives no argument. This design has no virtual channels and no
  hop limit, so it guarantees neither. Deadlock does occur; see the mesh
  results above.
* **Burst errors.** The code corrects one flipped bit per 22-bit word and
  detects two. It does not handle longer bursts within one word.
* **Error handling.** The original both "corrects" errors and answers errors
  with a Nack. Here single errors are corrected and uncorrectable ones are
  Nacked. Double-error detection, and dropping a packet whose header is
  uncorrectable, are additions.
* **Choices made here, not given in the original.** The flit width, packet
  length, address split, bit layout, arbitration (round-robin), order of
  bypass directions, rule for the unique-path bit, meaning of the 3-bit
  journal as a shift register, contents of the central error journal,
  isolation of a neighbour with a permanent routing fault, and the reset
  scheme.
* **Loopback module buffers.** The original shows a buffer on each data path
  of the loopback module. Here the router's own input and output EBs take
  that role.
* **`Id_in`.** The original also shows an `Id_in` input without describing
  it. The router address is a plain input, `id_i`.
* **Retransmission.** The router raises the Nack, but nothing in it resends
  a packet. The original does not describe a sender-side copy or a Nack
  path. Whoever consumes `nack_o` (a PE, or a wrapper) must act on it.
* **Not provided.** A FIFO-buffered router, which is only a baseline for
  comparison. A multi-virtual-channel EB variant, which is only mentioned as
  a possible replacement. Area and power figures, which come from a synthesis
  flow that is not specified.

## Simulating

The testbenches need nothing but Verilator 5 (two-state simulation, with
`--timing`). For example, the router end to end:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_util_pkg.sv \
    -y rtl -y tb +libext+.sv tb/tb_reliable_router.sv --top-module tb_reliable_router
./obj_dir/Vtb_reliable_router
```

Use the same command with any other `tb/tb_*.sv`. Every testbench ends with
one `TB_RESULT checks=N failures=M` line, and it has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_hamming_enc`, `tb_hamming_dec` | against an independently written encoder; every single-bit error corrected; double errors flagged |
| `tb_elastic_buffer` | random traffic against a queue model; ready = "a slot free"; 1-cycle latency, 1 flit/cycle |
| `tb_route_logic` | directed bypass cases and a random sweep of the routing rules |
| `tb_route_error_detect` | correct arrivals, legal bypasses, misroutes, unique-path bit, journal states; a sweep over random 4x4 availability maps in which every route `route_logic` picks must pass the receiver's check, and every accepted misroute must be explained by an unavailable diagonal router |
| `tb_input_port` | routing, packet framing, correction, Nack, dropped packets, journal |
| `tb_output_fsm` | no interleaving, round-robin order, nothing lost |
| `tb_loopback_module` | link path with stalls, loopback with `occ_out`, no mid-packet switching, port disable |
| `tb_data_error_journal`, `tb_control_logic` | counts against a saturating model every cycle, clear and reset; availability rules |
| `tb_reliable_router` | the whole router at default parameters: latency, streaming, back-pressure, correction, Nack, bypass, routing error and permanent journal, loopback, port faults, unavailability (each counted) |
| `tb_mesh_4x4` | sixteen routers in a mesh: fault-free traffic, a router unavailable from the start, and a router failing in flight (loopback) |

`tb/tb_util_pkg.sv` holds the testbenches' reference encoder and flit
builders.

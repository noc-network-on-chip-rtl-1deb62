# Victory: a bidirectional ring network-on-chip router

Victory is a small router for connecting the cores of a multi-core chip in a
ring. Each router sits between a local processing element (PE) and its two
ring neighbours. A packet is one 64-bit word that carries its own route:
a direction (clockwise or counter-clockwise) and a hop count. The PE that
injects a packet sets both; every router on the way only decrements the hop
count and tests it for zero. Each physical link carries two virtual channels
(VCs) by alternating between them on even and odd clock cycles. The VCs are
the means by which a ring can be kept free of deadlock.

This repository holds synthesizable SystemVerilog for the router, a ring of
routers built from it, and self-checking testbenches for every module.

## Packet format

A packet is exactly one 64-bit word: packet, flit, phit and channel width
are all the same. So a whole packet moves from one buffer to the next in a
single clock cycle, and every buffer holds exactly one packet (virtual
cut-through switching with one-word packets).

| bits    | field    | meaning                                                    |
|---------|----------|------------------------------------------------------------|
| 63      | vc       | virtual channel: 0 = even, 1 = odd                          |
| 62      | dir      | direction, used only at injection: 0 = clockwise, 1 = counter-clockwise |
| 61:56   | reserved | set to 0; carried unchanged                                |
| 55:48   | hop      | hops still to go; decremented at each hop                  |
| 47:32   | source   | id of the injecting node; carried unchanged                |
| 31:0    | payload  | carried unchanged                                          |

The upper 32 bits are the header. The fields are declared as
`victory_pkg::packet_t`.

A packet that should travel four hops is injected with `hop = 8'h04`. It
leaves the first four routers with 03, 02, 01 and 00, and the fifth router
sees 00 on its ring input and delivers it to its PE. The hop count must not
be zero at injection: a PE cannot send a packet to itself. An assertion
checks this rule.

## Two virtual channels, time-multiplexed by polarity

This is the part of the design that takes the most getting used to.

Every router has a `polarity` output. It is 0 while reset is held, becomes 1
at the first rising clock edge after reset is released, and then toggles on
every edge. All routers of a ring share clock and reset, so all have the
same polarity. In a cycle of polarity `p`:

* **VC `p` moves inside the router.** Packets of VC `p` go from input
  buffers to output buffers through the switch.
* **VC `!p` moves between routers.** Packets of VC `!p` go from output
  buffers over the links into the neighbours' input buffers. The PE channels
  also carry VC `!p`.

Each input channel and each output channel therefore holds two 64-bit
buffers, one per VC. No buffer is ever written from one side and read from
the other in the same cycle. A packet never changes VC: the `vc` bit set at
injection fixes which half of the cycles it uses. With no contention a
packet moves forward one buffer per cycle:

```
cycle t     pesi=1, packet with vc=v   (polarity = !v)  -> latched in pe input buffer v
cycle t+1   switched                   (polarity =  v)  -> cw/ccw output buffer v, hop-1
cycle t+2   cwso=1                     (polarity = !v)  -> neighbour's cw input buffer v
cycle t+3   switched in the neighbour  (polarity =  v)  ...
```

A packet sent on `pedi` with hop count H appears on `pedo` of the router
H hops away, with `peso` high, exactly `2*H + 2` cycles later. Through a
single router, from any input channel to its output channel, it takes
2 cycles.

A sender, including the PE, must present a packet only in a cycle whose
external VC matches the packet's `vc` bit, that is, when `polarity != vc`.
The input stores the packet in the buffer of the external VC. An assertion
flags a packet whose `vc` bit does not match.

## Channels and handshake

Each of the six unidirectional channels has a 64-bit data bus and two
control wires: send (`s`) from the sender and ready (`r`) from the receiver.

| router port              | dir | width | meaning                                                |
|--------------------------|-----|-------|--------------------------------------------------------|
| `clk`                    | in  | 1     | clock                                                  |
| `reset`                  | in  | 1     | synchronous, active high                               |
| `polarity`               | out | 1     | 0 even / 1 odd cycle; VC forwarded internally          |
| `cwsi`,`ccwsi`,`pesi`    | in  | 1     | send: data is a valid packet; latch it at the next edge |
| `cwri`,`ccwri`,`peri`    | out | 1     | ready: this input's buffer for the external VC is empty |
| `cwdi`,`ccwdi`,`pedi`    | in  | 64    | packet data in                                         |
| `cwso`,`ccwso`,`peso`    | out | 1     | send: the output buffer for the external VC is full **and** ready is high |
| `cwro`,`ccwro`,`pero`    | in  | 1     | ready from the receiver                                |
| `cwdo`,`ccwdo`,`pedo`    | out | 64    | packet data out                                        |

`so = full & ro`, so a send is never raised without ready, and the receiver
latches on `si`. Both ends empty or fill their buffer at the same edge.
Ready is a plain combinational function of the buffer state. It does not
depend on send, so there is no combinational path through a link. Assertions
in the input controller check that send never arrives while ready is low.

## Inside the router

```
            input_ctrl (x3)                      output_ctrl (x3)
 cw  in --> [VC0 buf][VC1 buf] --route--+--> arbiter -> [VC0 buf][VC1 buf] --> cw  out
 ccw in --> [VC0 buf][VC1 buf] --route--+--> arbiter -> [VC0 buf][VC1 buf] --> ccw out
 pe  in --> [VC0 buf][VC1 buf] --route--+--> arbiter -> [VC0 buf][VC1 buf] --> pe  out
```

**Routing (`route_decode`).** This block is combinational and sits in every
input channel, on the buffer of the VC being switched:

* pe input: `dir = 0` goes to the cw output and `dir = 1` to the ccw output.
* cw or ccw input: `hop == 0` goes to the pe output. Any other packet goes
  on in the direction it was travelling: cw input to cw output, ccw input to
  ccw output.
* A packet switched to a ring output has its hop count decremented on the
  way into the output buffer.

Each output is therefore reachable from exactly two inputs:

| output | sources                |
|--------|------------------------|
| cw     | cw input, pe input     |
| ccw    | ccw input, pe input    |
| pe     | cw input, ccw input    |

**Input controller (`input_ctrl`).** It holds the two VC buffers and
implements the ready side of the handshake. When the buffer of the internal
VC is full, it raises a request to the routed output. The buffer is freed at
the edge at which the request is granted.

**Output controller (`output_ctrl`).** It holds the two VC buffers and
implements the send side of the handshake. It grants a request only when the
buffer of the internal VC is empty. When both sources request in the same
cycle, a round-robin arbiter chooses between them. There is one arbiter per
VC (`rr_arbiter`, N = 2), so the loser wins the next contest on that VC.
Through traffic and injected traffic therefore cannot starve each other. A
full output buffer whose receiver is not ready holds its packet. Requests
for that output then wait in their input buffers, and those inputs drop
ready for their next packet. This is how back pressure spreads.

**Polarity (`polarity_gen`).** This is the toggle flip-flop described above.

**Reset.** Reset is synchronous and active high. It empties every buffer,
points every arbiter at its first source and sets the polarity to even.

## A ring of routers (`victory_ring`)

`victory_ring #(NODES)` (default 4) connects NODES routers:

* `cwdo`/`cwso` of node i drive `cwdi`/`cwsi` of node i+1, and `cwri` of
  node i+1 is `cwro` of node i.
* `ccwdo`/`ccwso` of node i drive `ccwdi`/`ccwsi` of node i-1, and `ccwri` of
  node i-1 is `ccwro` of node i.

Indices are modulo NODES. Only the PE channels of each node are ports, as
packed arrays (`pedi[i]` is node i's 64-bit input). A packet from node s
with direction 0 and hop count H arrives at node (s+H) mod NODES. With
direction 1 it arrives at node (s-H) mod NODES. Hop counts larger than the
ring simply go around more than once.

**Deadlock is the user's concern.** Two VCs are enough to make ring routing
deadlock-free only if sources choose the `vc` bit by a suitable rule. A
common rule is to switch VC at a dateline. That needs a router that can
change the VC, and these routers keep the VC they are given. No rule for
choosing the VC is built in. If one VC in one direction has every input and
output buffer of the whole ring full with packets that must travel on, that
VC stops. The end-to-end testbench avoids this by bounding the number of
packets in flight, and draws VCs at random.

## Choices this RTL makes where the specification is silent

* **Switch connectivity.** Packets continue in their direction of travel,
  and there is no U-turn from one ring direction to the other.
* **Where the hop count is decremented.** It is decremented when a packet is
  switched to a ring output. This reproduces the specified 04, 03, 02, 01, 00
  sequence, with 00 seen at the destination's ring input.
* **Arbitration policy.** Round robin, one pointer per output and per VC.
* **Which buffer a packet enters.** It enters the buffer of the VC that owns
  the link in that cycle, and the `vc` bit must agree. A mismatch is caught
  by an assertion, not handled.
* **`pedo` is an output.** One table of the specification lists it as an
  input, while its interface drawing and its signal description make it the
  PE output data.
* **Clock and reset names.** They are `clk` and `reset`.
* **Ring size.** The ring has 4 nodes, and its wiring is as described above.
* **Data outputs.** `*do` always shows the buffer of the external VC, even
  when send is low.

## Files

| file                    | contents                                              |
|-------------------------|-------------------------------------------------------|
| `rtl/victory_pkg.sv`    | packet struct, port enum, widths                      |
| `rtl/polarity_gen.sv`   | even/odd cycle flag                                   |
| `rtl/route_decode.sv`   | routing decision and hop-count update                 |
| `rtl/input_ctrl.sv`     | input channel: two VC buffers, ready, switch request  |
| `rtl/rr_arbiter.sv`     | round-robin arbiter                                   |
| `rtl/output_ctrl.sv`    | output channel: arbitration, two VC buffers, send     |
| `rtl/victory_router.sv` | the router                                            |
| `rtl/victory_ring.sv`   | a ring of NODES routers                               |
| `tb/tb_*.sv`            | one self-checking testbench per module                |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` at the end and stops
itself with a watchdog if something hangs. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/victory_pkg.sv \
          tb/tb_victory_ring.sv --top-module tb_victory_ring -Mdir obj -o sim
./obj/sim
```

Replace `tb_victory_ring` with `tb_victory_router`, `tb_input_ctrl`,
`tb_output_ctrl`, `tb_rr_arbiter`, `tb_route_decode` or `tb_polarity_gen`.
All finish in well under a second.

What the testbenches establish:

* **`tb_victory_ring`** runs a 4-node ring at default parameters. It checks
  that single packets of 1 to 5 hops arrive after exactly `2*H+2` cycles
  (including the 4-hop case). It checks the same for 255 hops, the largest
  hop count, which goes round the ring many times. It then sends about 2000 random packets in both
  directions and both VCs, with random PE back pressure. Every packet must
  arrive once, at the right node, with hop count 0 and all other fields
  intact. Packets in flight are then reset and the ring must recover. The
  test also counts each mechanism and fails if any of them never happened:
  injection and through traffic in each direction, ejection, two-way
  arbitration, ring and PE outputs held by a not-ready receiver, a refused
  send, a switch stall into a full output buffer, both VCs, ring
  wrap-around, and reset.
* **`tb_victory_router`** drives one router's pins. It checks the 2-cycle
  in-to-out timing, routing and hop update on all three inputs, ordering per
  input, VC and output, send never without ready, and reset.
* **The unit testbenches** compare each block with an independent reference
  model cycle by cycle.

## Extending

The packet layout lives only in `victory_pkg`. The switch source table lives
in `victory_router` (`SRC_A`/`SRC_B`). The arbiter is generic in N, so a
router with more ports needs a new source table and more `input_ctrl` and
`output_ctrl` instances. Deeper buffers would replace the single-entry VC
buffers in `input_ctrl` and `output_ctrl`. The ready definition (buffer
empty) would then become "buffer not full".

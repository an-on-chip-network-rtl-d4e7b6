# SoCBUS: a circuit-switched mesh network on chip

SoCBUS replaces a shared on-chip bus with a two-dimensional mesh of small
switches. Each IP block sits on one tile of the mesh. A transfer does not
travel as a packet. Instead a one-word *request* travels ahead and locks a
path through the switches. Once the whole path is locked, the payload streams
down that fixed circuit at one word per cycle, with one cycle of latency per
switch and no buffering on the way. The switches hold no payload buffers and
the request never waits for a resource, so the network cannot deadlock.
Payload latency depends only on distance. This is why the network suits hard
real-time systems whose traffic is scheduled in advance.

This repository holds synthesizable SystemVerilog for the network: the
switch and its parts, the network ends of the source and drain wrappers, the
tile, and the parameterized mesh (`socbus_mesh`, 8x8 by default). It also has
a self-checking testbench for each of them.

## Packet connected circuit (PCC)

PCC is the setup protocol that every block in this design implements. A
transaction has four phases, and two more when a route is blocked:

| phase | who | what happens |
|---|---|---|
| I   request  | source wrapper -> switches | A request word (the destination address) enters the local switch. Each switch picks a free output that leads closer to the destination, locks it and passes the request on. |
| Ia  nAck     | blocking switch -> source  | If no output is free, the switch answers with a negative acknowledgment. Every switch on the way back frees its lock. |
| Ib  retry    | source wrapper             | The source waits `RETRY_DELAY` cycles and sends the request again. |
| II  ack      | drain wrapper -> source    | The destination's drain wrapper acknowledges. The ack runs back along the locked path. |
| III transfer | source -> drain            | Payload words flow through the circuit. |
| IV  cancel   | source -> drain            | A cancel word follows the payload and frees each lock as it passes. |

A request is never queued in a switch. It either gets an output right away
or it is refused, so no resource is held while waiting for another. That is
what rules out deadlock. The cost is that a refused request must be retried
from the source. Under random, unscheduled traffic many requests are refused.
With scheduled or mostly local traffic, few are.

### Link format

Every link has the same format, between switches and between a switch and its
wrappers. In each direction of travel it has 8 data wires and 1 forward
control wire one way, and 2 reverse control wires the other way. That is 11
wires per direction. The encodings are defined in `rtl/socbus_pkg.sv`:

| forward `{ctrl, data}` | meaning |
|---|---|
| `ctrl=1` | A request word when the receiving input is idle; a payload byte when the circuit is open. |
| `ctrl=0, data=8'h00` | Idle. |
| `ctrl=0, data=8'h01` | Route cancel. |

| reverse | meaning |
|---|---|
| `2'b01` | Positive acknowledgment. |
| `2'b10` | Negative acknowledgment (nAck). |
| `2'b00` | Nothing. |

The request is a single word, so up to 256 wrapper addresses can be reached
(a 16x16 mesh). Wrapper `A` sits on tile `(x, y) = (A % MESH_X, A / MESH_X)`.
`(0,0)` is the upper left corner and north points toward `y = 0`.

## The switch (`socbus_switch`)

Each switch has five ports: north, east, south and west to the neighbours,
plus the local port (numbered 0-4). Nearly all of its logic sits at the
inputs:

- **Input register.** There is one register per input. It stands in for the
  per-link retiming stage and is the switch's one cycle of pipeline.
- **Input FSM** (`socbus_input_fsm`). There is one per input, with nine states:
  1 Idle, 2 Try route, 3 nAck, 4 Lock, 5 Pass request, 6 Wait ack, 7 Send ack,
  8 Transfer, 9 Unlock. In Idle the FSM stores the request's address, which is
  the only buffer in the switch. It then asks the arbiter for an output.
  - If it is refused, it sends nAck (state 3).
  - If it gets an output, it locks it (4), sends the request on (5) and waits
    (6).
  - On an ack it sends the ack upstream (7), then passes payload until the
    cancel goes by (8), then frees the output (9).
  - An nAck from downstream takes it to state 3, which frees the output and
    passes the nAck upstream.
- **Routing table** (`socbus_route_table`). This is static, with one 5-bit
  entry per destination. A set bit marks an output that brings the request
  closer: at most two bits (for example north and west), or only the local bit
  for the switch's own wrapper. This is minimal-path routing. The table is
  computed at elaboration from the mesh size and the switch's position.
  At 8x8 it holds 64 x 5 bits; at 16x16 it holds 1280 bits.
- **Arbiter and lock** (`socbus_arbiter_lock`). It serves one waiting input per
  cycle, picked round robin, so colliding requests are arbitrated fairly.
  Inputs that are not served stay in Try route.
  - For the served input, it takes the table entry, removes the arrival port
    (no U-turns) and any locked outputs.
  - It then picks the next candidate after a round-robin pointer, so the
    second choice is used when the first is locked.
  - It holds a lock bit and an owner for each output.
- **Crossbar** (`socbus_crossbar`). This is pure muxing, steered by the
  locks. It carries forward words from owner to output, and reverse control
  from output back to owner.

### Timing per switch

| event | cycles per switch | how |
|---|---|---|
| request | 4 (minimum) | input register, Idle, Try route, Lock; then the word is driven in Pass request |
| acknowledgment | 1 | Wait ack sees it, Send ack drives it the next cycle |
| payload, cancel | 1 | input register, then straight through the crossbar |

End to end, the setup time over `H` switches is `4H + 1 + H + 1` cycles. The
extra cycles are the drain's answer and the source wrapper registering the
ack. The first payload byte reaches the drain's IP side `H + 1` cycles after
the source offers it. The mesh testbench checks both numbers on the 15-switch
corner-to-corner path: 77 cycles of setup and 16 of payload latency.

A cancel must be followed by at least one idle cycle before the next request
on the same input, because Unlock does not look at the input. The source
wrapper always leaves that cycle.

## Wrappers and tile

`socbus_tile` is one switch with two wrappers on its local port. A source
wrapper drives the local input and a drain wrapper reads the local output.
`socbus_mesh` joins the tiles to their neighbours. Boundary ports are tied to
idle; minimal routing never sends a request toward them.

- **`socbus_src_wrapper`**. On the IP side it takes a command (`cmd_dest`,
  `cmd_len`) and then exactly `cmd_len` bytes over `tx_valid`/`tx_ready`.
  `tx_ready` is high only while the circuit is open.
  - It pulses `retry` on each nAck and `done` when it sends the cancel.
  - It retries for as long as it takes, with `RETRY_DELAY` idle cycles
    between tries.
  - Cycles with no byte offered go out as idle words.
- **`socbus_drain_wrapper`**. It acknowledges a request one cycle after it
  arrives, or refuses it with nAck while the IP holds `rx_accept` low.
  - It delivers each payload byte on `rx_valid`/`rx_data`, one cycle after it
    arrives.
  - It pulses `rx_start` when it accepts a circuit and `rx_end` at the cancel.
  - There is no backpressure: the reverse wires carry only acknowledgments,
    so the IP side must take a byte every cycle.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 8, 8 | mesh, tile, switch, table | Mesh size. At most 256 tiles (8-bit request). |
| `MY_X`, `MY_Y` | 0, 0 | tile, switch, table | Position of one switch; set by the mesh. |
| `LEN_W` | 16 | mesh, tile, source wrapper | Width of the transfer length. |
| `RETRY_DELAY` | 4 | mesh, tile, source wrapper | Idle cycles before a retry. |

## Where this RTL departs from the architecture or fills gaps

- **Clocking.** The architecture intends mesochronous links: the same
  frequency everywhere but an unknown phase per link, with a retiming circuit
  at each switch input. Here everything runs on one clock, and the retiming
  circuit is reduced to a plain register. The optimized link drivers and
  transmission-line wires are analog and are not modelled.
- **Wrappers.** Only the network end of each wrapper is written. The
  architecture gives wrappers clock-domain bridging, buffering and data-format
  conversion toward each IP block. Those depend on the IP and are not
  specified, so the IP side here is a simple byte stream on the network clock.
- **Configuration and control.** The architecture names a global
  configuration-and-control block that supervises the network and monitors
  faults, but does not specify it. It is not built. The routing tables are
  static, so nothing needs configuring at run time.
- **Temporary and permanent locks.** The architecture calls a lock temporary
  while the request is on its way, and permanent once the ack has passed.
  Here there is one lock bit per output. The input FSM's state tells the two
  apart: Wait ack means temporary, Transfer means permanent. An nAck frees a
  temporary lock; a cancel frees a permanent one.
- **Own choices.** Every encoding is this design's own choice: the word
  formats, the one-word request, port numbering, address mapping, reset (an
  asynchronous active-low reset that frees all locks) and the retry delay.
  So are the arbiter's structure (one request served per cycle, with
  round-robin pointers for inputs and for outputs) and the drain's
  `rx_accept` refusal.

## Sizes the architecture was evaluated at

| configuration | needs | this RTL |
|---|---|---|
| Random traffic, 8x8 network, 1 GHz | 64 tiles; 64 GB/s of source bandwidth (1 byte per source per cycle) | The default is 8x8 with 64 byte-wide local ports: 64 bytes/cycle. |
| Voice gateway, 7x7 switches at 1 GHz, 32-byte voice frames, 200-byte swap buffers, 12.8 GB/s total | 49 tiles; transfers up to 200 bytes | Set `MESH_X=MESH_Y=7` (the 8x8 default also holds 49 IP blocks). `LEN_W=16` allows 65535-byte transfers; 7x7 gives 49 bytes/cycle = 49 GB/s at 1 GHz. |
| Static routing analysis, 10x10 | 100 tiles | Set `MESH_X=MESH_Y=10`; does not fit the 8x8 default. Simulated in `tb_socbus_mesh_sizes`. |
| Routing table example, 16x16 | 256 tiles, 1280-bit table per switch | Set `MESH_X=MESH_Y=16`; this is the largest mesh the 8-bit request can address. Simulated in `tb_socbus_mesh_sizes`. |

## Simulating

Every `tb_*` testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. A
testbench finds the modules it needs through the include paths. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/socbus_pkg.sv \
    tb/tb_socbus_mesh.sv --top-module tb_socbus_mesh -o sim
./obj_dir/sim
```

| testbench | covers |
|---|---|
| `tb_socbus_route_table` | All 256 addresses for two switch positions, against directions computed from coordinates. |
| `tb_socbus_arbiter_lock` | Directed rules (round robin, second choice, refusal, no U-turn, release), then 3000 random cycles against a reference model. |
| `tb_socbus_crossbar` | Random lock patterns. |
| `tb_socbus_input_fsm` | Every state and transition, with the cycle each output appears. |
| `tb_socbus_switch` | 4/1/1-cycle latencies, a collision (one passes, one nAck), second choice, local delivery, a downstream nAck. |
| `tb_socbus_src_wrapper`, `tb_socbus_drain_wrapper` | Each phase on the wrapper's own link. |
| `tb_socbus_tile` | Two tiles sending to each other at once. |
| `tb_socbus_mesh` | The full 8x8 network at default parameters. |
| `tb_socbus_traffic` | Uniform, half-local and local random traffic on the full 8x8 network. |
| `tb_socbus_mesh_sizes` | 7x7, 10x10 and 16x16 meshes: setup and payload latency over the longest path, then crossing transfers. |
| `tb_socbus_gateway` | The data flow of a voice gateway on a 7x7 network, unscheduled and spread out in time. |

`tb_socbus_mesh` first runs one corner-to-corner transfer and checks its
setup and payload latency. It then runs random traffic from all 64 tiles
while two drains refuse for a while. Every transfer is checked to arrive
exactly once, complete and in order. The testbench counts the network's
mechanisms and fails if any of them never happens: retries, colliding
requests, second-choice outputs, switch refusals, drain refusals and
concurrent circuits. It runs in about a minute, mostly compile time.

`tb_socbus_mesh_sizes` builds a mesh at each of three other sizes through
the harness `tb/socbus_mesh_probe.sv`. On the corner-to-corner path of `H`
switches it measured 67/14, 97/20 and 157/32 cycles of setup/payload
latency, for H = 13, 19 and 31. Those are exactly `5H + 2` and `H + 1`.
Building the 256-tile mesh takes verilator several minutes.

`tb_socbus_traffic` runs three destination patterns, first at a low offered
load and then at a high one. Destinations are (a) uniform over the mesh,
(b) at most 4 hops away for half of the transfers, and (c) at most 4 hops
away for all of them. It reports the *first-time blocking rate*: the share
of transfers whose first request is refused. Uniform traffic blocks most,
because a long path holds many outputs that other requests need. With one
seed it measured:

| load | pattern | first-time blocked | mean usage | mean setup |
|---|---|---|---|---|
| low  | (a) uniform    | 71 % | 6.0 %  | 155 cycles |
| low  | (b) half local | 62 % | 9.1 %  | 92 cycles |
| low  | (c) local      | 44 % | 12.3 % | 47 cycles |
| high | (a) uniform    | 78 % | 7.2 %  | 221 cycles |
| high | (b) half local | 71 % | 10.5 % | 127 cycles |
| high | (c) local      | 58 % | 16.4 % | 69 cycles |

The testbench checks the ordering (a) > (b) > (c) at the high load, and that
blocking rises with load. It does not check the absolute values.
Those depend on the arrival process, the lengths and the retry delay. These
sources are much burstier than scheduled traffic: every source starts
transfers on its own, and many target a drain that is already busy. The
network is meant for traffic scheduled before run time, where a transfer
meets no busy output and sets up at the minimum `5H + 2` cycles.

`tb_socbus_gateway` models a telephone / voice-over-IP gateway on a 7x7
mesh:

- **Placement.** The 7 top-row tiles are memories holding one 200-byte
  computing buffer per channel. The left column holds 3 voice inputs and 3
  voice outputs. The other 36 tiles are two layers of 18 processors.
- **Data flow per channel and frame.** A 32-byte voice frame goes from the
  input to a first-layer processor. That processor asks its memory for the
  channel's buffer with a 2-byte message. It gets the buffer, writes it
  back changed, and passes the processed frame on. The second layer repeats
  this and sends the result to an output.
- **Checks.** Every byte is checked at the end. Each memory checks that its
  buffer came back changed exactly once per frame.

36 channels run for 4 frames. In the first two frames all channels start at
once. There, 63 % of first requests are refused, since many transfers
target a busy memory or processor. In the last two frames the inputs start
one channel every 400 cycles, and only 15 % are refused. The testbench
checks that the spread frames see less than half the blocking of the burst
frames. That shows why the network is meant to be used with traffic
scheduled in advance. A real schedule would be a table of time slots worked
out before run time. That belongs to the system, not to the network, and is
not part of this RTL.

Assertions in the RTL check two things: the arbiter never hands out a locked
output, and a source stays quiet while its request is being set up.

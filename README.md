# iSLIP-scheduled mesh network-on-chip

A crossbar switch is only as fast as its scheduler. Each cell time, the
scheduler must pick a set of input-to-output connections with no two inputs on
one output and no input on two outputs. It must also keep the crossbar busy
and never let any queue starve. This RTL implements the iSLIP answer to that
problem, then uses it as the switching core of every router in a 2-D mesh
network-on-chip:

* **Virtual output queues (VOQs).** Every switch input keeps one queue per
  output. A packet waiting for a busy output therefore never blocks the
  packets behind it. That kind of blocking, head-of-line blocking, limits a
  switch with plain FIFO inputs to about 58.6 % of its capacity.
* **iSLIP matching.** Each output has a round-robin *grant arbiter* and each
  input a round-robin *accept arbiter*. Several request/grant/accept
  iterations per cell time grow a conflict-free match. The pointers move only
  in the first iteration, which desynchronises them under load. That gives
  100 % throughput for uniform traffic and makes starvation impossible.
* **Mesh.** 64 routers form an 8 x 8 mesh and route packets first along x,
  then along y. Nine external input ports compete, through one more
  round-robin arbiter, to put packets into the network at their source node.

Everything is synthesizable SystemVerilog-2017. It lints cleanly with
Verilator 5 (`-Wall`; only unused-signal and unused-parameter warnings remain) and elaborates in
the slang front end of Yosys.

## Packet format

All packets are 48 bits wide (`islip_pkg::packet_t`):

| bits  | field       | width | use here |
|-------|-------------|-------|----------|
| 47:45 | CRC         | 3     | carried unchanged, never generated or checked |
| 44    | R           | 1     | request bit: the input port wants to send |
| 43:12 | data        | 32    | payload |
| 11:6  | destination | 6     | `{x[2:0], y[2:0]}` of the destination node |
| 5:0   | source      | 6     | `{x[2:0], y[2:0]}` of the node where the packet enters |

Splitting each 6-bit address into x (upper three bits) and y (lower three
bits) is this design's choice. Three bits per coordinate is what fixes the
mesh at 8 x 8.

## Hierarchy

```
e_mesh_router                      top: 9 input ports, 8 x 8 mesh
├── xy_route x9                    first hop of each input port's packet (for flow control)
├── islip_arbiter                  grants one requesting input port per clock
│   └── rr_arbiter (N=9)
│       └── ppe
└── mesh_router x64                one node, coordinates X, Y
    ├── xy_route x5                output port for each arriving packet
    └── islip_switch (N=5)
        ├── input_block x5         one VOQ per output
        │   └── voq_fifo x5
        ├── islip_scheduler
        │   ├── rr_arbiter x5      grant arbiters (one per output)
        │   └── rr_arbiter x5      accept arbiters (one per input)
        ├── crossbar               AND-OR multiplexers
        └── output_block x5        one-packet register, valid/ready
```

`islip_pkg` holds the packet type, the address type and the router port
enumeration: `PORT_LOCAL=0`, `PORT_EAST=1` (+x), `PORT_WEST=2`,
`PORT_NORTH=3` (+y), `PORT_SOUTH=4`.

## The round-robin arbiter (`ppe`, `rr_arbiter`)

Every arbiter in the design is the same generic round-robin arbiter. A pointer
`rpt` names the input with the highest priority. The *Input Selector*
(`ppe`, a programmable priority encoder) grants the request at `rpt` if there
is one. Otherwise it grants the first request above `rpt`, and failing that
the lowest-numbered request below it. This is done combinationally: requests
are masked to indices `>= rpt`, and if none survive the unmasked requests are
used. Both halves pick their lowest set bit.

The *Pointer Updater* sets `rpt <= (g + 1) mod N` at the clock edge after a
grant to input `g`. With no request (`no_req`) the pointer holds its value.
The `update_en` input lets iSLIP block that update. A plain round-robin
arbiter ties it high.

## The iSLIP scheduler (`islip_scheduler`)

This is the least obvious part of the design.

**One cell time = `ITER` clock cycles, one iteration per cycle.** A free-running
counter `iter_q` counts from 0 to `ITER-1`. In every cycle:

1. **Request.** The request matrix `rq[i][j]` means input `i` has a cell for
   output `j`. In the first cycle it is the live `req & out_free`, which is
   also stored in `req_q`. In later cycles it is `req_q`, so the request
   inputs are only sampled once per cell time.
2. **Grant.** Output `j`'s grant arbiter sees `rq[*][j]`, masked to inputs
   not yet matched, and is disabled if output `j` is already matched. The
   decision register `dec_q` is fed back to provide both masks. In the first
   cycle the feedback is treated as empty.
3. **Accept.** Input `i`'s accept arbiter sees the grants addressed to it and
   accepts one. The accepted pairs are ORed into the decision register.

Pointer rules, which carry iSLIP's fairness and throughput properties:

* An accept pointer moves to one past the output it accepted, in the first
  iteration only.
* A grant pointer moves to one past the input it granted, in the first
  iteration only, and only if that grant was accepted. A refused grant leaves
  the pointer in place, so the output keeps offering itself to the same
  input until the input takes it. That is why no VOQ can starve.

At the end of the last iteration the match is copied into `match`, and
`match_valid` is high for one cycle. That cycle is also the first iteration of
the next cell time.

```
cycle        : 0    1    2    3  | 4    5    6    7  | 8
iter_q       : 0    1    2    3  | 0    1    2    3  | 0
requests     : smp  -    -    -  | smp  -    -    -  | smp
match_valid  :                   | 1                 | 1
crossbar     :                   | transfer cell A   | transfer cell B
```

Because sampling and transfer share a cycle, requests must already leave out
the cells being transferred in that cycle. `input_block.req[j]` is therefore
`count[j] > (popping j ? 1 : 0)`. `late_match` pulses when an iteration after
the first adds a connection.

Iterations always run `ITER` times, with no early exit when the match stops
growing. iSLIP needs at most N iterations. The default `ITER = 4` is the
figure usually quoted as enough for a 16-port switch.

## The switch (`islip_switch`)

`islip_switch` is an N x N input-queued switch. Each `input_block` writes an
arriving packet into the VOQ named by `in_port`. The VOQ is a
first-word-fall-through `voq_fifo` of `DEPTH` entries. `in_ready` reports
room in that particular queue. `in_space[i][j]` reports the room of every
queue, so a sender can test a destination before committing.

When `match_valid` is high, each matched input shows the head of its matched
VOQ and pops it. The `crossbar` routes that head to the matched
`output_block`, where it waits on `out_valid`/`out_pkt` until `out_ready`.

Outputs take part in scheduling if their register is free when requests are
sampled (`free = !out_valid || out_ready`). This is optimistic: a register
being loaded in the sampling cycle counts as free for the next cell time.
If the device downstream has still not taken the packet when the next transfer
comes, that connection is dropped (`conn = match & ob_free`). The cell then
stays at the head of its VOQ and asks again. Without this optimism an output
could only be used every other cell time, and saturation throughput would
halve.

Timing at the default size (N = 16, ITER = 4):

* A packet entering an idle switch appears on its output 9 cycles after the
  cycle in which it was offered.
* Each input and each output moves at most one packet per cell time (4
  cycles).
* Under saturation with uniform destinations the switch delivers
  16.00 packets per cell time, which is full throughput.

## The mesh (`mesh_router`, `xy_route`, `e_mesh_router`)

Each `mesh_router` is a 5 x 5 `islip_switch`. An `xy_route` on each input
chooses the output port: east or west until x matches, then north or south,
then local. The design specifies dimension-order routing and an
iSLIP-scheduled crossbar. The 5-port router shape is this design's choice.

Neighbouring routers are joined by the switch's valid/ready ports. An output
register feeds the neighbour's input, and the neighbour's `in_ready` comes
back as `out_ready`. Ports on the mesh edge are tied off (no input, always
ready). XY routing inside a full 8 x 8 mesh never sends a packet off the
edge. The exception is a smaller mesh: with `MESH_X` or `MESH_Y` below 8, a
destination outside the mesh would be routed off the edge and lost. Keep
those parameters at 8 unless the addresses are restricted.

**Injection.** `input_port[k]` presents a packet, and its R bit is the
request. `islip_arbiter` is a 9-input `rr_arbiter` over
`R[k] & port_ready[k]`. `port_ready[k]` is true when the router at the
packet's source address has room in the local-input VOQ for the packet's
first hop. For that, `e_mesh_router` runs one `xy_route` per input port.

`grant[k]` is high for exactly the one cycle in which port k's packet is
taken. The sender then presents its next packet or clears R. With ports 3 and
4 (counted from 1) requesting continuously, the grants go 3, 4, 3, 4, 3, ...
With k requesters a port waits at most k-1 cycles. The input port number is
independent of the packet's source address. For example, input port 4 may
inject a packet whose source is node (2,3).

**Observation outputs.**

* `eject_valid[x][y]`/`eject_pkt[x][y]` deliver packets at their destination,
  held until `eject_ready[x][y]`.
* `out_mesh[x][y]` holds the data field of the last packet that router
  (x, y) sent on any output, taking the lowest port number if several fire
  in one cycle. After a single transfer it shows the packet's whole x-then-y
  path.
* `processing` is high while any R bit is set or any router holds a packet.
* `late_match` is the OR of all routers' `late_match`.

A packet crossing the mesh from (2,3) to (6,7) visits 9 routers. The network
is idle again about 72 cycles after the grant, or roughly 8 cycles per router
at `ITER = 4`.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `e_mesh_router` | `NUM_IN` | 9 | nine input ports, as in the original simulation |
| | `MESH_X`, `MESH_Y` | 8 | 3-bit coordinates of the 6-bit addresses |
| | `ITER` | 4 | four iterations, the figure given for a 16-port switch |
| | `DEPTH` | 4 | own choice |
| `islip_switch`, `islip_scheduler`, `input_block`, `crossbar`, `ppe`, `rr_arbiter` | `N` | 16 | the 16-port switch the scheduler is sized for |
| `islip_switch`, `islip_scheduler` | `ITER` | 4 | as above |
| `voq_fifo`, `input_block`, `islip_switch`, `mesh_router` | `DEPTH` | 4 | own choice |
| `mesh_router` | `X`, `Y` | 0 | node coordinates, set by the top |

All resets are synchronous: `rst_n` is active low inside, and `reset` at the
top is active high. All state that is read is reset, except the FIFO storage
array, which is written before it is read.

## What follows the original description and what does not

Taken from the original description:

* the 48-bit packet layout;
* the round-robin arbiter (pointer to one past the granted input, unchanged
  without requests, optional no-request flag);
* the iSLIP request/grant/accept iterations over unmatched ports, with
  pointers updated only in the first iteration;
* the scheduler structure: queue-state matrix, N grant arbiters, N accept
  arbiters, and a decision register feeding matched ports back;
* one VOQ per output at every input;
* a mux-based crossbar;
* x-then-y routing;
* nine input ports and the two-requester grant sequence above.

Choices made here, because the original is silent:

* the address split into x and y;
* the router port count and numbering;
* queue depths;
* all handshakes and flow control;
* one iteration per clock, with the transfer in the cycle after the last
  iteration;
* the optimistic output-free rule;
* the grant-pointer-moves-only-if-accepted rule (standard iSLIP, not
  spelled out in the original);
* the meaning of `out_mesh` and `processing`.

Known departures and omissions:

* **Single-cycle transfer.** The original has input blocks "pump" a packet to
  the output blocks over several cycles. Here a whole 48-bit packet crosses
  the crossbar in one cycle.
* **CRC.** The 3-bit check field has no defined polynomial, so it is neither
  generated nor checked, only carried.
* **Arbitration latency.** The original aims at arbitration within a single
  clock cycle. The injection arbiter does decide in one cycle, but the iSLIP
  scheduler spends one cycle per iteration (four per cell time). A
  single-cycle scheduler could be made by unrolling the iterations
  combinationally between `base_dec` and `new_dec`, at the cost of a path
  `ITER` times longer.
* **Waiting time.** The original also states a maximum wait of one clock
  cycle for the injection arbiter. That only holds with two requesters; with
  k requesters, round robin gives k-1.
* **Unbuilt signals.** The original simulation shows per-port
  `s_address` signals whose function is not described. They are not built.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against a reference model written independently inside the
testbench, prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_ppe` | random requests and pointers against a circular-scan model (N=16) |
| `tb_rr_arbiter` | grant and pointer against a model with random `update_en`; fairness with all inputs requesting |
| `tb_islip_arbiter` | the 3, 4, 3, 4, 3 grant sequence; random R/ready against a round-robin model |
| `tb_islip_scheduler` | every decision of a 16 x 16, 4-iteration scheduler against a behavioural iSLIP model; decision exactly `ITER` cycles after sampling; later iterations add matches; full-load cells reach a complete 16-way match |
| `tb_islip_fairness` | 16-port switch, one iteration, all 256 VOQs kept backlogged: 1.000 packet per port per cell time, every input/output pair served, and the shares of one output equal within 5 % |
| `tb_islip_convergence` | 8 x 8 scheduler with 8 iterations: every match is maximal and contains only requested pairs |
| `tb_voq_fifo`, `tb_input_block`, `tb_output_block`, `tb_crossbar`, `tb_xy_route` | each against a queue, register or routing model, including full-queue refusals |
| `tb_islip_switch` | 16-port switch: latency, no head-of-line blocking, random traffic with back-pressure (ordered, lossless delivery), saturation rate of at least 0.9 N per cell time (measured 16.0) |
| `tb_mesh_router` | a router at (3,4): every packet leaves by the XY port, in order, with back-pressure everywhere |
| `tb_e_mesh_router` | whole network at default parameters: the two-requester sequence; (2,3)→(6,7) from port 4 and (0,0)→(4,4) from port 2, with `out_mesh` set exactly on the XY path; about 2700 random packets from nine ports (a third from node (0,0), half to one column) with random ejection back-pressure, delivered exactly once and in order per source/destination pair. It also requires that an injection was held back for lack of room, a router refused a packet from a neighbour, a later iteration added a match, and an ejection was stalled |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/islip_pkg.sv tb/tb_islip_switch.sv \
          --top-module tb_islip_switch -Mdir obj_sw
./obj_sw/Vtb_islip_switch
```

Use the same command with another testbench name for the others. The
full-size network (`tb_e_mesh_router`) takes about five minutes to compile
and about a second to run.

# Bundled-data asynchronous NoC of three-port routers

A fixed-function SoC knows ahead of time which cores talk to which, and how
much. This network uses that knowledge. It is a tree of small three-port
routers placed for that one SoC. A packet carries its whole path with it as a
few source-routing bits, so a router does no route computation. It only looks
at one bit, turns the packet left or right, and rotates the bits for the next
router.

The original routers are clockless. They are built for low energy with
bundled data: one request and one acknowledge wire qualify a whole word of
data wires. Links between routers use a 2-phase (transition) handshake, and
the inside of a router uses a 4-phase (level) handshake. This RTL keeps that
structure and those handshakes. It builds each handshake controller as a
small clocked state machine, so the design can be simulated with an ordinary
cycle-based simulator and synthesised as a synchronous circuit. The
"Timing" section says what that changes.

## Packet format and source routing

A packet is one flit. It has `DATA_W` = 32 data bits and `ROUTE_W` = 8 route
bits, which travel on their own wires next to the data. There is no header
flit. The route bits cost wires on every link, but a router can steer a flit
with no decoding.

Each router reads the most significant route bit and sends the flit out of
one of the two ports it did not come in on. It then rotates the route field
left by one bit, so the next router finds its own bit in the MSB. A path can
therefore cross at most `ROUTE_W` routers. Bits beyond the path length are
ignored.

Port numbering used throughout: A = 0, B = 1, C = 2. A flit entering port `p`
leaves by port `(p+1)%3` if its route bit is 0, and by port `(p+2)%3` if it
is 1. `anoc_pkg::route_bit(in, out)` gives the bit for a turn.

## The router (`anoc_router`)

Every port is bidirectional. Each input has a **switch module** and each
output has a **merge module**, which gives three of each. Every switch reaches
the merges of the two other ports, and every merge listens to the switches
of the two other ports. Each switch and each merge holds exactly one flit.
A flit moving through a free router is therefore stored twice: in the switch
latch, then in the merge (output) latch.

### Switch module (`anoc_switch`)

The switch has these parts:

1. **2-to-4 phase converter.** The link request `lr` is compared with the
   switch's own acknowledge `la`. A difference means a flit is offered. The
   switch toggles `la` when it has taken the flit, which completes the
   2-phase handshake on the link.
2. **Linear controller and latches.** On acceptance the data, the route field
   and a separate copy of the route MSB are stored.
3. **DEMUX.** The stored MSB selects which internal request is raised: `rr1`
   for 0, `rr2` for 1. The selected merge answers on `ra1` or `ra2`.
4. **Swizzle.** `rout` is the stored route rotated left by one.

The internal channels use the 4-phase protocol. The request stays high until
it is acknowledged and then falls. After that the switch raises no new
request until it has seen both acknowledges back at zero. The latch is freed
on the edge that sees the acknowledge, and a waiting flit can be taken on
that same edge.

### Merge module (`anoc_merge`, `anoc_mutex`)

Two switches can compete for one output. The **arbitration circuit**
(`anoc_mutex`) grants the request that arrived first and holds the grant
until that request returns to zero. This serialises the two inputs. Under
load the result is a strict alternation between them, which the merge
testbench checks.

The grant steers a data multiplexer. The **merge controller** then does three
things when the output latch is free:

- it stores the selected flit in the output latch;
- it toggles the outgoing link request `rr`;
- it raises that input's acknowledge.

The output latch is free when the previous link transfer has been
acknowledged, that is, when `ra == rr`.

In the original circuit the mutual-exclusion element is a custom analog cell
that settles metastability. Here it is a clocked arbiter. "First" means
"first to be seen high at a clock edge". When both requests are first seen
in the same cycle, the input that lost the previous tie wins.

### Handshake rules, summarised

| channel | protocol | sender may change data | receiver's answer |
|---|---|---|---|
| router-to-router and core links (`req`/`ack`) | 2-phase, toggle | only while `req == ack` | toggles `ack` when the flit is latched |
| switch to merge (`rr1`/`ra1`, `rr2`/`ra2`) | 4-phase, level | only while its request is low | raises `ra` when stored, drops it after the request falls |

The merge and mutex carry concurrent assertions: the two grants, and the two
input acknowledges, are never high together.

## The network (`anoc_network`)

A tree that joins `N` end points with three-port routers needs `N-2` routers,
and a tree has no cyclic channel dependencies. The shape of the tree is the
real design freedom. In the original flow a tool picks it from the floorplan
and the traffic, so that heavy flows cross few routers and short wires.

Here the shape is the `TOPOLOGY` parameter of `anoc_network`. It holds one
8-bit descriptor for each port of each router, at bits `(3*r+p)*8 +: 8`:

- `{1, core[6:0]}`: core `core` sits on this port;
- `{0, router[4:0], port[1:0]}`: this port is linked to that port of that
  router.

`anoc_pkg::core_port` and `link_port` build descriptors. Up to 32 routers can
be described. Elaboration stops with an error if a core index is out of range
or a link is not described from both ends. `anoc_pkg::tree_route(topology,
routers, src, dst)` finds the path between two cores and returns its route
field, and `tree_hops` returns the number of routers on it. The core supplies
the route when it injects a flit.

The default topology, `anoc_pkg::chain_topology(NCORES)`, is a chain (a
caterpillar tree):

```
core0 -A[R0]C--A[R1]C-- ... --A[R(N-3)]C- core N-1
        B        B                B
      core1    core2          core N-2
```

Core 0 is on port A of router 0. Core `k` (1..N-2) is on port B of router
`k-1`. Core `N-1` is on port C of the last router. Each link is a pair of
2-phase channels, one in each direction. `chain_route(N, src, dst)` and
`chain_hops` are shorthands for the chain.

The default `NCORES` = 8 fits the set-top-box SoC below, which has 6 routers.
On a chain the longest path crosses `NCORES-2` routers, so with 8 route bits
every pair of cores can be reached for `NCORES` ≤ 10. Larger SoCs need either
a wider `ROUTE_W` (with a matching route function) or a tree in which only
short paths carry traffic.

Deadlock: in a tree a flit only waits for channels that lead further along
its own path, away from where it came from. Cores must keep draining their
ejection links, and then no cycle of waits can form.

## Timing

The original 65 nm router needs 460 ps from input request to output request,
250 ps from input request to input acknowledge, and reaches 2.38 Gflit/s.
Wires between routers add delay in proportion to their length. None of these
are reproduced. In this clocked implementation:

- backward latency (link request to link acknowledge) is 1 cycle when the
  switch latch is free;
- forward latency is 3 edges per router: a flit whose request toggles before
  edge `k` appears on the output link at edge `k+2`;
- one path carries one flit every 5 cycles. The cycle is switch release, then
  merge return-to-zero, then switch return-to-zero, then grant, then store;
- a flit crossing `h` routers reaches its destination on the `3h`-th edge
  after injection, if there is no contention.

The testbenches check all four numbers. If one clock cycle is taken as 84 ps,
the 5-cycle path period equals the original router's 2.38 Gflit/s. The
workload bench uses that scale.

## Evaluated SoCs and traffic

Two SoCs are used, with average bandwidths in MBytes/s:

- **Set-top box**, 8 cores. The flows are CPU→AudioDec 1, CPU→DDR 3,
  CPU→Demux 1, CPU→MPEG2 1, DDR→CPU 3, DDR→HDTVEnc 314, DDR→MPEG2 593,
  Dem1→Demux 31, Dem2→Demux 31, Demux→AudioDec 5, Demux→MPEG2 7,
  HDTVEnc→DDR 148 and MPEG2→DDR 424. It runs on 6 routers:

  ```
  R0: A DDR, B MPEG2,   C R1      R3: A R2, B CPU,   C AudioDec
  R1: A R0,  B HDTVEnc, C R2      R4: A R2, B Demux, C R5
  R2: A R1,  B R3,      C R4      R5: A R4, B Dem1,  C Dem2
  ```

  No flow crosses more than 4 routers.
- **MPEG-4 decoder**, 12 cores. The edges are VU–SDRAM 64, AU–SDRAM 1,
  MED CPU–SDRAM 20, MED CPU–SRAM1 14, RAST–SDRAM 200, RAST–SRAM1 40,
  SRAM2–IDCT 84, DSP–SDRAM 3, UPSAMP–SDRAM 304, BAB–SDRAM 11,
  UPSAMP–SRAM2 224, BAB–SRAM2 58 and RISC–SRAM2 167. It needs
  `NCORES=12` and runs on 10 routers:

  ```
  R0: A SDRAM, B R4,     C R1     R5: A R4, B SRAM1,   C R6
  R1: A R0,    B UPSAMP, C R2     R6: A R5, B VU,      C R7
  R2: A R1,    B SRAM2,  C R3     R7: A R6, B MED CPU, C R8
  R3: A R2,    B RISC,   C R9     R8: A R7, B DSP,     C AU
  R4: A R0,    B RAST,   C R5     R9: A R3, B IDCT,    C BAB
  ```

  No flow crosses more than 6 routers. Each edge carries half its bandwidth
  in each direction, which is this bench's choice.

Both trees were laid out by hand for this bench. They are not the trees of
the original tool, which are not known.

Traffic is bursty and follows the b-model. Over a run, the volume of each
flow is split in two halves of time, with fraction `b` going to a randomly
chosen half. The split repeats down to 1024-cycle windows. Messages are 256
bytes, or 64 flits, and wait in an unbounded queue at the source. The bench
runs b = 0.5, 0.65 and 0.8. For every run it prints message latency (first
flit accepted to last flit delivered) and source-queue delay, as median and
maximum in cycles.

The bench also counts router traversals. It checks that the count equals the
sum of the path lengths of all flits sent. It then converts the count to
router power using the original router's 1.56 pJ per flit and 0.009 mW
leakage per router. With these trees it prints about 0.78 mW dynamic and
0.054 mW leakage for the set-top box (6 routers). For the MPEG-4 decoder
(10 routers) it prints about 0.90 mW dynamic and 0.09 mW leakage. On a plain
chain the same traffic gives about 1.2 mW and 1.0 mW, because paths are
longer.

At these average bandwidths the network is lightly loaded. Message latency
stays near its zero-load value of about 320 cycles. Burstiness shows up
mainly as source-queue delay.

## Files

| file | contents |
|---|---|
| `rtl/anoc_pkg.sv` | widths, port numbering, `route_bit`, topology descriptors, `tree_route`, `tree_hops`, chain shorthands |
| `rtl/anoc_mutex.sv` | two-way mutual exclusion (clocked arbiter) |
| `rtl/anoc_switch.sv` | switch module: 2-to-4 converter, latch, DEMUX, route rotation |
| `rtl/anoc_merge.sv` | merge module: arbitration, MUX, merge controller, output latch |
| `rtl/anoc_router.sv` | three-port router |
| `rtl/anoc_network.sv` | tree network built from `TOPOLOGY`, top level |
| `tb/tb_anoc_*.sv` | self-checking testbench per module; `tb_anoc_network` runs the top at its default size |
| `tb/tb_anoc_network_tree.sv` | the network on a branching tree whose links join every kind of port pair |
| `tb/tb_anoc_workloads.sv`, `tb/anoc_workload_harness.sv` | both SoCs under b-model traffic |

Every testbench ends by printing `TB_RESULT checks=N failures=M`, and a
watchdog ends a run that hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/anoc_pkg.sv tb/tb_anoc_network.sv --top-module tb_anoc_network
./obj_dir/Vtb_anoc_network
```

Replace `tb_anoc_network` with any other testbench name. The workload bench
takes about 10 s, and the others take well under a second. Widths, core
count and tree shape are module parameters. To use a different SoC, set
`NCORES` and `TOPOLOGY` and compute routes with `tree_route`.

## Departures from the original design and open points

- **Clocked controllers.** The original is clockless. Here the protocols,
  the order of handshake events and the one-flit latches are kept, but the
  controllers are clocked state machines and the latches are load-enabled
  registers. The energy and latency benefits of clockless operation do not
  carry over. The gate-level controllers of the original are not reproduced.
- **Mutual exclusion** is a clocked arbiter, not a metastability-resolving
  analog cell. Ties alternate between the inputs.
- **Topology** is a parameter, with a chain as default. The original
  generates a tree per SoC with simulated annealing and force-directed router
  placement. That tool, the floorplans and the generated trees are not part
  of this RTL. The two trees in the workload bench are hand-made.
- **Chosen details**, none of them fixed by the original:
  - route bit 0 selects port `(p+1)%3`;
  - the route field rotates to the left;
  - reset is synchronous and active high, and clears all handshake state
    but not the data registers;
  - a switch waits for both internal acknowledges to return to zero before
    its next request.
- **Not built:**
  - the inter-router wires and repeaters, which are physical and have no
    logic function (a link here is a direct connection);
  - the traffic generator, which is a simulation model and appears only in
    the workload testbench;
  - the radix-4 and radix-5 router clusters of a hand-built comparison
    network;
  - the synchronous baseline network.

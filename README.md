# AXI4 mesh network-on-chip with embedded private memory

This is a network-on-chip for multi-processor systems whose components speak
AXI4. It replaces a shared bus with a two-dimensional mesh of nodes. Each node
can hold an AXI master (for example a processor), an AXI slave (for example an
external memory controller), and a small private memory. Any master can reach
any address in the system.

The main idea is that the network is transparent to AXI:

- Each of the five AXI4 channels (AW, W, B, AR, R) has its own sub-network,
  with its own router in every node.
- A transfer on a channel becomes one *flit* on that channel's sub-network.
- Routing uses the address itself. The 32-bit address space is split evenly
  over the nodes, so the top address bits name the node that owns an address.

There are no packet headers, no routing tables and no configuration registers.
The mesh size and each node's contents are set by parameters.

## Address map

In an NX×NY mesh:

- The top `ceil(log2 NX)` address bits give the node's column x (east is +x).
- The next `ceil(log2 NY)` bits give its row y (north is +y).
- Node 0 is at the south-west corner. Node number is `n = x*NY + y`.

In the default 4×4 mesh, each node owns 256 MB:

| node | (x,y) | addresses |
|---|---|---|
| 0 | (0,0) | 0x00000000–0x0FFFFFFF |
| 4 | (1,0) | 0x40000000–0x4FFFFFFF |
| 14 | (3,2) | 0xE0000000–0xEFFFFFFF |

For example, a read of 0xED00804C issued at node 4 travels two hops east and
two hops north to node 14.

When a node has local memory, the memory sits at the bottom of the node's
block:

- Word offsets 0x000–0xFFF (`MEM_DEPTH` = 4096 words of 32 bits) go to the
  memory.
- The rest of the block goes to the AXI slave attached to the node.

Addresses step by one per 32-bit beat. An INCR burst from 0xED00804C reads
0xED00804C, then 0xED00804D. So the address is a word address, and "4 KB" of
memory here means 4096 words.

## Flits

All flit types are packed structs in `noc_pkg`. The low 32 bits of every flit
are its `route` field, so every router in the design uses the same address
decoder.

| channel | fields (MSB → LSB) | width | route holds |
|---|---|---|---|
| AW, AR | len[8], burst[2], src[8], route[32] | 50 | target address |
| W | data[32], strb[4], idx[8], src[8], route[32] | 84 | address of this beat |
| B | resp[2], route[32] | 34 | base address of the requester |
| R | data[32], resp[2], idx[8], last, route[32] | 75 | base address of the requester |

Field meanings:

- `src` is the requester's node id `{x[3:0], y[3:0]}`. The destination turns
  it back into a base address for its responses.
- `idx` is the beat number within the burst.

Each beat is routed on its own, and two beats of one burst may take different
paths. W beats therefore carry their own address. W and R beats carry their
beat number, so the receiving end can handle them in any order.

## A node

`noc_node` contains:

- Five `noc_channel` instances, one per AXI channel. Each is five receivers
  plus one router.
- One `noc_local_port`.

Each router has five inputs and five outputs: north, east, south, west and
local. The local port feeds the local inputs:

- AW, W and AR from the attached master.
- B and R from the attached slave or the memory.

The local outputs go back into the local port. `noc_mesh` connects each
node's outgoing link on a channel to the matching incoming link of the
neighbour. Links at the mesh edge are tied off.

Every link uses a valid/ready handshake. A flit moves in a cycle where both
are high.

### Receiver (`noc_rx`)

The receiver is a one-flit register with two states:

- **IDLE**: `port_ready` = 1, nothing is offered to the router.
- **TRANSFER**: the flit is held and offered to the router until the router
  raises ready. The receiver then returns to IDLE.

A new flit is only accepted in the cycle after the hand-off. So a receiver
passes at most one flit every two cycles, and the router is slower than that
anyway. The receivers are the network's only input buffers. A flit that
cannot go on waits in its receiver, which stalls the link behind it.

### Router (`noc_router`)

The router serves one flit at a time through a four-cycle sequence:

| cycle | step | what happens |
|---|---|---|
| 1 | ARB | the service arbiter picks an input that holds a flit |
| 2 | DEC | the address decoder compares the flit's route address with this node's position: east/west/north/south/here |
| 3 | ALLOC | the port allocator picks an output whose register is free |
| 4 | SEND | the flit is copied into that output register, and the input receiver is released |

If no suitable output is free in ALLOC, nothing is sent. The flit stays in its
receiver and the router goes back to ARB, so flits on other inputs are not
blocked behind it.

Each output has one register. It holds its flit until the next node's
receiver (or the local port) takes it.

Together with the receiver cycle, a flit spends 5 cycles per node when there
is no traffic. A read that crosses h hops has to do this h+1 times for the
request and h+1 times for the response.

The router reports three events per cycle, which `noc_mesh` brings out as
`ev_served`, `ev_adaptive` and `ev_blocked`:

- a flit was sent;
- an adaptive turn was taken;
- allocation failed.

### Service arbiter (`noc_service_arbiter`)

- If exactly one input is requesting, it is granted at once.
- If several inputs request after an idle period, the fixed priority
  north, east, south, west, local decides.
- After serving a port, the arbiter does not go back to the top of the
  priority list. It tests the ports one per cycle, starting with the port
  after the one just served and wrapping around, and stops at the first one
  that requests. Each test of an empty port costs one cycle.
- While scanning, if only one request remains, the arbiter jumps straight to
  it.

Example: north, west and local request together.

1. North is served.
2. East and south are each tested for one cycle and skipped.
3. West is served.
4. Local is now the only request and is granted at once.

A port that keeps requesting cannot starve the others. The arbiter returns to
the fixed priority after a cycle in which no input requested.

### Routing (`noc_addr_decoder`, `noc_port_allocator`)

By default the router uses dimension-order routing: first east or west until
the column matches, then north or south, then local.

Routing is adaptive in one case. When the flit must go **east** and also
north or south, and the east output is busy, it takes the vertical output
instead.

**Deviation from the original design.** The original description allows this
vertical escape for any flit that still needs both a horizontal and a vertical
move, west-bound flits included. With that rule the all-to-all test
deadlocked: output registers waited on each other in a cycle. Restricting the
escape to east-bound flits makes the routing the West-First turn model, which
is deadlock-free.

- A west-bound flit always goes west first and waits if west is busy.
- A busy vertical or local output always makes the flit wait.

To try the original rule, change the single condition in
`noc_port_allocator.sv`.

Because of the adaptive step, two beats of one burst can arrive out of order.
The local port handles this (see below).

## Local port (`noc_local_port`)

The local port joins the attached components, the memory and the five routers.
It has two halves and one shared memory.

### Slave interface, for an attached master (`noc_ni_slave`)

The attached master sees an ordinary AXI4 slave. Each node allows one
outstanding write and one outstanding read. There are no AXI IDs.

**Writes:**

- If the address is in this node's own memory, the burst is written directly
  on memory port A, and B is answered locally.
- Otherwise, one AW flit is sent, followed by one W flit per beat. Each W
  flit carries the beat's address (start + idx for INCR; the start address
  for FIXED) and its beat number.
- The B flit from the destination is returned to the master.
- A burst whose WLAST does not fall on beat `len` gets SLVERR.

**Reads:**

- If the address is in local memory, the burst is read on port A.
- Otherwise, an AR flit is sent. The R flits that come back may be out of
  order. Each is stored in a 256-entry reorder buffer at its beat number.
- Beats are handed to the master in order, as soon as the next expected beat
  is present. RLAST is set on beat `len`.

### Master interface, for an attached slave (`noc_ni_master`)

This half serves requests that arrive from the network. Addresses in the
node's memory use memory port B. Other addresses go to the attached slave.
With `HAS_SLAVE=0`, they are answered with DECERR.

**Reads:**

- One AR flit is handled at a time.
- Each beat becomes an R flit addressed to the requester's base address.
- A memory beat takes three cycles: address, capture, send.
- Slave beats are forwarded as the slave delivers them.

**Writes:**

- W flits of different requesters can arrive interleaved, and even ahead of
  their AW flit.
- Because every W flit carries its address, it is carried out at once: a
  memory write, or a single-beat AXI write to the slave.
- A table with one entry per requester node records:
  - whether the AW flit has arrived;
  - how many beats it announced;
  - how many beats are done;
  - any error.
- When the counts match, one B flit goes back to the requester.

An attached slave therefore sees a burst as a series of single-beat writes.

### Memory (`noc_local_mem`)

`noc_local_mem` is a true dual-port RAM of 32-bit words:

- Port A is for the attached master; port B is for the network.
- Reads are synchronous, with one cycle of latency.
- Writes have byte strobes.
- On a write to the same word in the same cycle, port B wins.

It is written as an array so that FPGA tools map it to block RAM.

## Customisation

| parameter | default | meaning |
|---|---|---|
| `NX`, `NY` | 4, 4 | mesh size, up to 16×16 (4-bit coordinates) |
| `MEM_DEPTH` | 4096 | local memory words per node |
| `HAS_MASTER_MASK` | all ones | bit n: node n has an attached master (slave interface built) |
| `HAS_SLAVE_MASK` | all ones | bit n: node n has an attached slave |
| `MEM_MASK` | all ones | bit n: node n has local memory |

Per-node ports of `noc_mesh`:

- `s_req`/`s_rsp` is the AXI slave port for the node's master.
- `m_req`/`m_rsp` is the AXI master port for the node's slave.

Both are `axi_req_t`/`axi_rsp_t` structs from `noc_pkg`. Unused ports can be
tied to zero.

Reset is synchronous and active low (`rst_n`). One clock drives the whole
mesh.

## Timing

With no other traffic, a single-beat remote read from a master to a slave h
hops away completes in **10·(h+1) + 6 cycles**. This is measured from AR
valid at the source to the R handshake.

The original design reports 10·(h+1) + 2. The per-hop cost, 10 cycles, is the
same. The extra 4 cycles are this implementation's choices:

- the local-port interfaces register their outputs;
- the slave model answers one cycle after it accepts the request.

Under load, latency grows with:

- arbitration scans;
- failed allocations, which send the router back to ARB;
- queueing in receivers.

Throughput per router is one flit every four cycles (one for every ARB–SEND
sequence). This is the design's main limit. A burst of n beats on one path
needs about 4n cycles at each router.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if it
hangs.

| testbench | what it checks |
|---|---|
| `tb_noc_rx` | handshake rules of the receiver on both sides, every flit passed exactly once |
| `tb_noc_addr_decoder` | the 4×4 address map examples and random addresses at every node position |
| `tb_noc_port_allocator` | every combination of needed moves and busy outputs |
| `tb_noc_service_arbiter` | the north/west/local example cycle by cycle, and a reference model under random requests |
| `tb_noc_router` | random flits to random destinations under back-pressure; zero-load timing of 4 cycles |
| `tb_noc_local_mem` | both ports against a reference array |
| `tb_noc_ni_slave` | flit fields; shuffled R beats put back in order; local-memory bursts; WLAST error |
| `tb_noc_ni_master` | interleaved W flits from two requesters, B after the last beat, DECERR without a slave |
| `tb_noc_local_port` | own flits looped back: memory and slave paths |
| `tb_noc_node` | one node with its neighbours replaced by the testbench, and the cycle its AR flit leaves |
| `tb_noc_mesh` | the whole 4×4 mesh at default parameters, in three phases (below) |
| `tb_noc_latency` | a 7×7 mesh: single reads from node 0 over 1 to 12 hops, each checked against 10·(h+1)+6 |

The three phases of `tb_noc_mesh`:

1. Node pairs exchange bursts to memory and to slaves, and read them back in
   a different order. One pair uses every burst length from 1 to 256.
2. One node writes to all others and reads back.
3. All nodes do phase 2 at once.

Every read beat is compared with a reference model. The test also counts
adaptive turns, blocked allocations, arbiter scan cycles, out-of-order beat
arrivals and local accesses. It fails if any of these never happened.

The AXI slave attached to each node in the testbenches is a behavioural model,
`tb/tb_axi_slave.sv`.

To simulate with Verilator (5.x), build one testbench as its own top:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_mesh \
    -Irtl -Itb rtl/noc_pkg.sv rtl/*.sv tb/tb_axi_slave.sv tb/tb_noc_mesh.sv
./obj_dir/Vtb_noc_mesh
```

- Replace `tb_noc_mesh` with any testbench name.
- `tb_axi_master_tasks.svh` is found through `-Itb`.
- The mesh test takes well under a minute.

## Departures and limits

- **Adaptive routing is limited to east-bound flits** (West-First), to avoid
  the deadlock described above.
- **Latency constant** is +6 instead of +2 cycles; the slope is the same.
- **Virtual channels:** the original describes its flow control as
  virtual-channel based but gives no mechanism. Here each output has one
  register and each input one receiver; there are no virtual channels.
- **AXI subset:**
  - 32-bit data, no IDs, no LOCK/CACHE/PROT/QOS;
  - one outstanding read and one outstanding write per master;
  - WRAP bursts are treated as INCR;
  - the address advances by one per beat (word addressing).
- **Attached slaves** receive bursts as single-beat writes; reads keep their
  burst form.
- **Receiver bandwidth:** the receiver takes a new flit only in the cycle after
  a hand-off.
- **Not included:** the transmitter of the original is only signal unpacking;
  here the output register drives the link directly.
- **Not included:** the generator script of the original is replaced by the
  parameters of `noc_mesh`.

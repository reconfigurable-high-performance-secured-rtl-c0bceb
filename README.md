# Agent-monitored, fault-tolerant and firewalled mesh NoC

A mesh network-on-chip loses routing paths when links or routers fail, and a
router that only knows about itself keeps sending packets into dead ends.
This design attaches a small **agent** to every node. The agents share fault
and congestion status with their neighbours over one-bit wires, and a
**cluster agent** collects the status of a whole 4x4 cluster. With this
information:

- every router steers around faulty links and unhealthy neighbours;
- network interfaces refuse packets for failed nodes before they enter the
  network;
- a platform level above the clusters learns which nodes have failed and can
  cut them off ("segregate" them).

The same agent also acts as a **hardware firewall** in front of each
processing element (PE). It blocks packets from configured or permanently
blocked source ports and limits the number of open sessions. It lets audio
and video traffic skip these checks.

The top level, `noc_top`, holds two 4x4 clusters. A **cluster separation
module** (CSM) takes packets from the application level and sends each one to
its cluster by one header bit. The routers have no buffers. They arbitrate
in random order and deflect packets that cannot take a productive port.

All RTL is synthesizable SystemVerilog-2017. `rtl/noc_pkg.sv` holds the shared
types.

## Packet

A packet is one 48-bit word (`pkt_t`): a 16-bit header followed by a 32-bit
payload. Links carry the whole packet in one cycle; there are no flits.

| bits  | field      | meaning |
|-------|------------|---------|
| 47:46 | `dst_x`    | destination column |
| 45:44 | `dst_y`    | destination row (grows towards south) |
| 43    | `cluster`  | cluster select bit, used by the CSM |
| 42:41 | `ptype`    | 0 data, 1 video, 2 audio, 3 control |
| 40:36 | `src_port` | source port number 0..31, checked by the firewall |
| 35:34 | `sess`     | 0 none, 1 open session, 2 close session |
| 33:32 | reserved   | cleared by the NI |
| 31:0  | `data`     | payload |

Example: `F800CDD78FD9` is a data packet for node (3,3) of cluster 2 with
payload `CDD78FD9`.

Nodes are numbered `y*4 + x` (0-based). Directions are N=0, E=1, S=2, W=3,
Local=4.

## A node (`noc_tile`)

Each tile holds three parts:

- a router (`noc_router`);
- a cell agent (`cell_agent`);
- a network interface (`network_interface`).

A PE hands a packet to the NI. The NI stamps the cluster bit and keeps the
packet in a one-entry register until the router accepts it on its Local
input. Packets that the router delivers on its Local output first pass the
agent's firewall, then the NI register, and then reach the PE.

At the cluster agent's node the Local input also takes packets from the CSM.
These come from the application level and have priority over the PE.

## Fault status: LFR and RFR (`fault_registers`)

Fault detection circuitry is not part of this design. Its one-bit outputs are
inputs of the top level (`node_fault_t` per node):

- link faults, one per direction;
- input-port faults, one per direction;
- priority encoder, arbiter and crossbar faults;
- PE, NI and local-link faults.

From these, every agent builds two 8-bit registers.

The **Local Fault Register (LFR)**:

- `[3:0]` input port N, E, S, W faulty;
- `[4]` Node = priority_encoder | arbiter | crossbar;
- `[5]` PE = pe | ni | local_link;
- `[7:6]` spare, zero.

The **Regional Fault Register (RFR)**:

- `[3:0]` = NN, NE, NS, NW: the neighbour in that direction is unhealthy,
  meaning its LFR has any bit set or it has been segregated;
- `[7:4]` spare.

A direction `n` may not be used when any of these holds:

```
fault(n) = Link_n | In_Port_n(own) | In_Port_opp(n)(neighbour in n) | LFR bits
```

A router with a Node fault reports all four of its input ports as faulty.
Its neighbours therefore never send to it.

Agents exchange three one-bit signals per direction:

- link status;
- health;
- congestion.

## The router (`noc_router`)

This is the part that needs the most care.

The router has five ports and no packet buffers. The only storage is one
output register per port. Three sub-blocks serve each cycle:

- `random_arbiter`: a 16-bit LFSR that yields a fresh random start index;
- `priority_encoder`: a circular search from that start index;
- `crossbar_switch`: a 5x5 AND-OR switch driven by one-hot selects.

Allocation in one cycle works as follows:

1. An `xy_route` unit for each input computes the packet's preferred outputs.
   - It considers only productive directions (towards the destination) that
     are usable: the link is healthy, the neighbour is healthy, and the
     direction is not the one the packet came from.
   - When both X and Y are productive, the cluster agent's map of failed
     nodes decides first. If exactly one of the two minimal paths crosses a
     failed node, the first step of the other path comes first. The two
     paths are X then Y, and Y then X.
   - Otherwise X is tried first, unless the neighbour in X reports
     congestion and the one in Y does not.
   - A packet for this node gets the Local output.
2. The four link inputs claim outputs one after another, in an order the
   arbiter picks at random each cycle. The Local input (injection) claims
   last.
3. Each input takes the first free preferred output. If none is free, the
   packet is **deflected**. A priority encoder with a random start picks a
   free output, with candidates tried in this order:
   - healthy neighbours other than the one the packet came from;
   - any healthy neighbour;
   - any output whose link works.
4. The crossbar writes the winners into the output registers.

Why this works:

- Neighbours never send over a faulty link. A router therefore never has
  more arriving packets than usable outputs, and every packet arriving on a
  link leaves in the next cycle. Mesh inputs need no ready signal, and the
  network cannot deadlock.
- Injection is the only thing that waits. The Local input is held (its
  `in_ready` stays low) while none of its preferred outputs is free.
- Per-hop latency is one cycle.

A packet is dropped, and the router's `drop` output (the error output)
pulses, in these cases:

- its destination PE has failed;
- its next hop would be the destination and that neighbour is unhealthy;
- no output at all is usable.

`deflect` pulses for every non-minimal step. `busy` marks a cycle in which a
packet was deflected or injection was held. The agent registers `busy` as
the node's congestion bit.

**Limit.** Routing knows three things:

- the faults of the node's own links;
- the faults of its direct neighbours;
- which nodes of the cluster have failed.

It does not know about failed links further away. Two kinds of fault pattern can keep a packet circling:

- a group of faults with a concave outline;
- a fault pattern that cuts a node off from the rest of the mesh.

Patterns in which each blocked hop has a detour nearby are delivered. The
tests use such a pattern: one failed router and five failed links in a 4x4
cluster (6.25 % of nodes, 20.8 % of links). With it, all of 1200 uniformly
random packets arrive, with a mean latency of about 15 cycles.

## Firewall (`cell_agent` → `control_packet_stage`)

Every packet that reaches its destination node is checked in this order
before the PE gets it:

1. The node is segregated → drop (`DROP_SEGR`).
2. The packet type's bit in the 4-bit **bypass register** is set → pass
   with no further checks. At reset, video and audio are set.
3. The source port is blocked in the **port table** (`config_register`, 32
   entries) → drop (`DROP_PORT`).
   - The table is written through the `cfg_*` ports.
   - Ports set in the parameter `HW_BLOCK` are blocked permanently, whatever
     the table holds. By default this is port 31.
4. The packet opens or closes a session that the **session monitor** refuses
   → drop (`DROP_SESSION`).
   - The monitor refuses an open when 31 sessions are already open.
   - It refuses a close when no session is open.
5. Otherwise → pass.

The decision is registered, so it adds one cycle of latency. Drops are
reported on `fw_drop` and `fw_reason`.

## Agent hierarchy (`cell_agent`, `cluster_agent`)

Each cell agent sends its LFR to the cluster agent:

- every `HB_PERIOD` = 16 cycles;
- immediately whenever the LFR changes.

A cell agent whose `agent_fail` input is set stops reporting.

The cluster agent sits at node (1,1). A 4x4 mesh has no single centre node,
so (1,1) stands in for the centre. For each cell, the cluster agent keeps:

- a failure bit: the Node or PE bit of the last report;
- a silence bit: no report within `TIMEOUT` = 64 cycles.

Together these bits form the **critical map**. When the map changes, the
cluster agent does three things:

- it sends the map up to the platform level (`ca_up_valid`, `ca_up_map`);
- it sends the map to the neighbouring cluster agent, which shows it as
  `ca_remote_map`;
- it gives the **destination-fail map** to all NIs and routers of its
  cluster. This map is the critical map OR'ed with the segregated cells.
  - An NI refuses (`pe_tx_err`) a packet whose destination is in the map.
  - A router uses the map to choose between the two minimal paths.

The platform level can segregate cells with `ca_cmd_valid` and
`ca_cmd_segregate`. Once segregated, a cell:

- stays segregated until the next command replaces the set of segregated
  cells;
- reports itself unhealthy to its neighbours;
- drops every packet that reaches it.

## Cluster separation (`cluster_separation_module`)

The CSM is a one-entry register with valid/ready on both sides. It takes a
packet from the application level and offers it to the cluster named by
header bit 43: 0 is cluster 1, 1 is cluster 2. With more clusters, the
select field grows upwards from that bit. In each cluster the packet enters
at the cluster agent's node.

The two clusters have no data links between them. They are coupled only
through the CSM and through the exchange of maps between the cluster agents.

## Timing summary

| path | cycles |
|------|--------|
| CSM register | 1 |
| PE hands a packet to the NI → packet on a mesh link | 2 |
| each hop | 1 |
| last hop → PE (router output, firewall, NI) | 3 |
| change of a fault input → LFR; LFR → neighbour's RFR | 1 each |
| cell report period | `HB_PERIOD` (16) |
| silent cell flagged | after `TIMEOUT` (64) cycles without a report |

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `MESH_N` | 4 | cluster size (4x4) |
| `MAX_SESS` | 31 | session limit per node |
| `HW_BLOCK` | `32'h8000_0000` | permanently blocked source ports (port 31) |
| `HB_PERIOD` | 16 | cell agent report period |
| `TIMEOUT` | 64 | cluster agent silence timeout |
| `BYPASS_INIT` | `4'b0110` | bypass register at reset (video, audio) |
| clusters | 2 | fixed in `noc_top` |

## What follows the source design and what is this implementation's choice

Taken from the design being implemented:

- the agent hierarchy: cell agents, cluster agents, and two clusters joined
  by a CSM;
- the 8-bit LFR and RFR and their bit meanings;
- the fault equations for a direction, the Node and the PE;
- one-bit exchange between agents;
- a bufferless router built from a random arbiter, a priority encoder and a
  crossbar;
- fault- and congestion-aware XY routing;
- the firewall ingredients: a port lookup table, hardware-blocked ports, a
  bypass register for audio and video, and a 0..31 session monitor;
- the cluster agent's duties: report failures and silent agents upwards,
  tell the neighbouring cluster, and segregate on command;
- the 48-bit packet and the 4x4 cluster size.

Chosen here, because the source does not fix them:

- the header field layout;
- deflection as the way a bufferless router serves competing packets;
- the order of the firewall checks;
- the report period, the timeout and the position of the cluster agent;
- which ports are blocked in hardware;
- the NI's one-entry register and its refusal of failed destinations;
- using the failed-node map only to order the two minimal paths;
- the congestion definition (a deflection or held injection in the last
  cycle);
- no data links between clusters;
- reset values.

Left out:

- In the source design, the cluster agent passes non-local fault status to
  the routing, such as the links around a distant destination.
- Here it passes on only its map of failed nodes. Single link faults beyond
  a router's neighbours stay unknown to that router.
- This is why the routing limit described under the router exists.

Not implemented, because they lie outside the design:

- the PEs;
- the fault detection circuitry;
- the platform-level manager that remaps tasks.

Their signals are ports of `noc_top`.

## Simulation

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_random_arbiter`, `tb_priority_encoder`, `tb_crossbar_switch` | the router building blocks against reference models |
| `tb_xy_route` | route choices for faults, congestion and U-turns |
| `tb_noc_router` | a router in random traffic with random faults; every link packet leaves the next cycle or is dropped for a stated reason |
| `tb_fault_registers`, `tb_config_register`, `tb_session_monitor`, `tb_control_packet_stage`, `tb_cell_agent` | the agent |
| `tb_network_interface`, `tb_noc_tile` | one node, with cycle counts |
| `tb_cluster_agent`, `tb_cluster_separation_module` | the upper level |
| `tb_noc_cluster` | a 4x4 cluster with one failed router and five failed links under uniform random traffic; checks delivery, latency and that no faulty link carries traffic |
| `tb_noc_load` | the same faulty cluster under uniform random traffic at a normal load (0.04 packets per node per cycle) and a heavy load (0.3); it measures accepted throughput and mean latency (about 0.039 and 0.19 packets per node per cycle, 10 and 470 cycles), so the cluster saturates near 0.19 |
| `tb_noc_top` | the full two-cluster system at default parameters, end to end |

`tb_noc_top` exercises every mechanism and fails if any of them never
happens:

- the example transfer from node 2 to node 16;
- 1800 random packets, with CSM traffic to both clusters;
- deflection and congestion;
- NI refusal and router drop;
- firewall port drops, hardware port block, bypass, and the session limit
  and close;
- a silent agent that is detected, reported and segregated.

It runs in about one minute.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -y rtl --top-module tb_noc_top \
    rtl/noc_pkg.sv tb/tb_noc_top.sv -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. The package
must be listed first. The remaining lint warnings under `-Wall` are
explained in the header comments of the affected files. They concern:

- unused bits;
- intentionally open outputs;
- the reset that is used both by the registers and by assertions.

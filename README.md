# XGFT on-chip network with TBWP and TB routing

An extended generalized fat tree, XGFT(h; m_1..m_h; w_1..w_h), is a multistage
tree network. A switch in stage L has m_L children below it and w_L parents
above it. Leaves (processors) hang below stage 1. Because m_L and w_L may differ
from stage to stage, the same family covers many sizes and bandwidth shapes.
A packet climbs until it reaches a switch that is a common ancestor of its
source and destination. It then descends along the unique down path to the
destination.

This RTL builds the 60-leaf network XGFT(3; 4,3,5; 2,2,2) in two versions, side by side:

| version | switch node | routing | idea |
|---|---|---|---|
| `dual` | **dual-switch node**: separate up-routing and down-routing switch blocks joined by a *turn-back channel* | **TBWP**, Turn-Back-When-Possible | Turn back at the first common ancestor if its turn-back channel is free. Otherwise climb further and turn back higher up. In the root stage, each parent port is looped back into the same root. |
| `mega` | **mega-switch node**: one crossbar joins every input to every output | **TB**, Turn-Back | Always turn at the nearest common ancestor, so every route is a shortest path. The climb is adaptive: any free parent port will do. |

The design rests on **address encoding**. A routing decision written with plain
leaf numbers needs divisions, because the test is whether `S div N_L == D div N_L`.
Here each leaf address is stored as the sequence of down-port numbers that leads
to it from any root. With that form, the up-routing test is an equality compare
of the high-order fields. The down-routing choice is a fixed bit slice. No
switch contains an adder, a multiplier or a divider.

## Encoded addresses

For leaf D, the down-port number in stage L is

    d_L = (D div (m_1 * ... * m_{L-1})) mod m_L

This field is `k_L = clog2(m_L)` bits wide. The encoded address is the
concatenation `d_h ... d_1`, with d_1 in the least significant bits. In the
default network, k = (2, 2, 3), so an encoded address is 7 bits:

| leaf | d_3 d_2 d_1 | bits |
|---|---|---|
| 11 | 0 2 3 | `000_10_11` |
| 27 | 2 0 3 | `010_00_11` |
| 35 | 2 2 3 | `010_10_11` |

The leaf numbers S and D mean the following in the encoded view:

- The fields `d_h..d_{L+1}` name the sub-tree of height L that holds the leaf.
- A switch in stage L is a common ancestor of S and D exactly when `s_h..s_{L+1} == d_h..d_{L+1}`.
- In the root stage this compare is empty, so it is always true.

`xgft_addr_rom` holds the encoded address of every leaf. Its table is computed
from the formula above when the design is elaborated. Each leaf's injection
channel passes through an `xgft_src_adapter`. The adapter rewrites the header of
every packet:

- the plain destination number becomes the encoded destination;
- the adapter's own encoded address is written into the source field.

Inside the network, only encoded addresses exist.

## The routing decisions

Each input port evaluates one routing function on the header at the head of its
buffer. Every function is combinational: one masked XOR compare, or one bit slice.

**TBWP, up-routing block of a dual node in stage L** (`xgft_rdf_tbwp_up`). The
outputs are `P_UR[0..w_L-1]`, followed by the turn-back channels `TB[0..N_TBC-1]`.

| condition | candidate outputs |
|---|---|
| common ancestor, some turn-back channel free, L < h | the free turn-back channels |
| common ancestor, some turn-back channel free, L = h | the free turn-back channels and the free P_UR ports (both loop back into this root) |
| common ancestor, every turn-back channel reserved, L < h | the free P_UR ports. This is the adaptive *bypass*: the packet turns back in a higher stage. |
| not a common ancestor | the free P_UR ports |

**TBWP, down-routing block** (`xgft_rdf_down`): the packet goes to `C_DR[d_L]`,
with d_L cut directly out of the destination field.

**TB, mega node** (`xgft_rdf_tb`). The outputs are `C_DR[0..m_L-1]`, then
`P_UR[0..w_L-1]`. A root has no P_UR ports.

| packet arrived from | condition | candidate outputs |
|---|---|---|
| a child | common ancestor, or L = h | `C_DR[d_L]` |
| a child | otherwise | the free P_UR ports |
| a parent | always | `C_DR[d_L]` |

Both schemes are deadlock-free for the same reason. Every route is one climb
followed by one descent, so the channel dependency graph has no cycle.

Things that are easy to get wrong:

- **"Reserved" means an output that a packet still holds.** A wormhole packet
  reserves an output from the grant of its header until its last word has
  entered that output's buffer. A turn-back channel counts as reserved during
  that whole time, even if no word is moving at that moment.
- **TBWP can take routes much longer than the shortest path.** A packet between
  two leaves of one stage-1 switch may still travel through a root when every
  turn-back channel on its way is busy. Latency therefore spreads more under TBWP
  than under TB, although both deliver every packet.
- **Root stage, dual network.** The root loop-back makes the w_h parent ports of
  each root extra turn-back paths. They are the only turn-back resources TBWP
  uses there.
- **Root stage, mega network.** The root has no parent ports at all. Its
  `p_in`/`p_out` signals exist only to keep the node interface uniform, and they
  stay idle.

## Network structure

`xgft_network` generates the tree from flat index arithmetic. This is the
recursive construction rule (root switch i of a sub-tree of height L+1 connects
to port i of each of its m_{L+1} child sub-trees) with the recursion unrolled.
The helper functions `roots_of`, `subs_of`, `nsw_of` and `choff_of` live in
`xgft_pkg`.

- **Switch numbering.** Switch s in stage L is root number `r = s mod R_L` of
  sub-tree `p = s div R_L`, where `R_L = w_1*...*w_{L-1}`.
- **Parent side.** Parent port j of that switch is port `k = r*w_L + j` of its
  sub-tree. The sub-tree is child `c = p mod m_{L+1}` of sub-tree
  `p div m_{L+1}` in the stage above. Its port k connects to child port c of
  that sub-tree's root switch k.
- **Channel index.** The channel between the two switches has flat index
  `choff_of(L) + s*w_L + j`, in an up array and a down array.
- **Leaves.** Leaf D is child port `D mod m_1` of stage-1 switch `D div m_1`.
- **Root loop-back.** Each root's `P_UR[j]` is wired straight to its own `P_DR[j]`.
- **Switch counts.** The default network has 15 switches in stage 1, 10 in
  stage 2 and 4 roots, for 58 inter-stage channels in each direction (the 8
  root loop-backs included).

## Inside a switch block

`xgft_switch_block` is a wormhole crossbar with buffers at both ends. It is used
three ways: as the up half of a dual node, as the down half, and as the single
block of a mega node.

- **Input port** (`xgft_input_port`):
  - an 8-word buffer;
  - the routing function;
  - a rotating-priority choice of one free candidate, which becomes a one-hot `req`;
  - a word counter loaded from the header's length field.

  After a grant, the port moves one word per clock into the reserved output,
  provided that output's buffer has space. The port releases the output with
  its last word.
- **Output arbitration.** Each output has a rotating-priority arbiter
  (`xgft_rr_arbiter`) over the inputs requesting it. An output is offered only
  while no packet holds it.
- **Crossbar.** An output is owned by at most one input, so the crossbar is
  plain AND-OR selection.
- **Output port** (`xgft_output_port`): an 8-word buffer driving the outgoing channel.

Timing:

- A header written into an input buffer on clock edge n is routed, granted and
  written into the output buffer on edge n+1. It is offered on the next channel
  after that edge. This gives **2 clocks per switch block** at zero load and
  **1 word per clock** per port when data streams.
- Zero-load header latency from a leaf's injection channel to its destination
  depends on the stage L where the packet turns:
  - dual network: 2L switch blocks, so **4L clocks**;
  - mega network: 2L-1 switch blocks, so **4L-2 clocks**.

  `tb_xgft_network` checks these figures for all 3600 source and destination pairs.

## Channels and packets

Every channel is synchronous valid/ready. `link_t` holds `{valid, data[31:0]}`,
and `ready` runs the other way. A word moves on a clock edge when valid and
ready are both high. A sender keeps a word offered until it is taken.

A packet is a header word followed by payload words:

| bits of the header | inside the network | at a source adapter input |
|---|---|---|
| [6:0] | encoded destination | [5:0] plain destination leaf |
| [13:7] | encoded source | ignored, overwritten |
| [19:14] | length in words, header included (0 counts as 1) | same |
| [31:20] | free, carried unchanged | same |

Packet boundaries come only from the length field. There are no head or tail
marker bits. A leaf's output channel delivers headers with encoded addresses.

## Files

| file | role |
|---|---|
| `rtl/xgft_pkg.sv` | topology constants (H, M, W), buffer depth, word format, encoding functions, types |
| `rtl/xgft_top.sv` | both networks with source adapters; the top level |
| `rtl/xgft_network.sv` | tree generator (`NODE` = `NODE_DUAL` or `NODE_MEGA`, `N_TBC`) |
| `rtl/xgft_dual_node.sv`, `rtl/xgft_mega_node.sv` | the two node kinds |
| `rtl/xgft_switch_block.sv` | crossbar switch block with allocation |
| `rtl/xgft_input_port.sv`, `rtl/xgft_output_port.sv` | port blocks |
| `rtl/xgft_rdf_tbwp_up.sv`, `rtl/xgft_rdf_down.sv`, `rtl/xgft_rdf_tb.sv` | routing decision functions |
| `rtl/xgft_addr_rom.sv`, `rtl/xgft_src_adapter.sv` | encoded-address table and source-side header rewrite |
| `rtl/xgft_fifo.sv`, `rtl/xgft_rr_arbiter.sv` | buffer and rotating-priority arbiter |

## Simulating

Each file in `tb/` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if the
design hangs. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/xgft_pkg.sv tb/tb_xgft_top.sv -y rtl --top-module tb_xgft_top
    ./obj_dir/Vtb_xgft_top

To run another testbench, replace the file and the top name. The two largest
testbenches take about two minutes to compile and seconds to run.

| testbench | what it shows |
|---|---|
| `tb_xgft_top` | Both full-size networks with default parameters. Each of the 60 leaves sends 40 packets of 8..32 words: first half uniform traffic, second half cluster traffic (75 % inside the leaf's 12-leaf sub-tree). Packets are created with probability ρ/20 per clock at ρ = 0.6, and receivers apply back-pressure. It checks every word of every packet, and that each of these happened: turn-back in every stage, a TBWP bypass in stages 1 and 2, use of the root loop-back, TB turns in every stage, and back-pressure at both ends. |
| `tb_xgft_network` | Every source and destination pair alone in the idle networks (route and exact latency), then an all-to-all burst. |
| `tb_xgft_network_tbc` | The dual network with 2 and 3 turn-back channels per node, under uniform load. |
| `tb_xgft_dual_node`, `tb_xgft_mega_node`, `tb_xgft_switch_block` | Allowed outputs per routing rule, zero-load latency, streaming rate, no interleaving of packets on an output, and that adaptive detours occur. |
| `tb_xgft_rdf_*` | The routing functions for all 3600 address pairs, checked against the division form of the algorithms. |
| `tb_xgft_addr_rom`, `tb_xgft_src_adapter`, `tb_xgft_input_port`, `tb_xgft_output_port`, `tb_xgft_fifo`, `tb_xgft_rr_arbiter` | unit behaviour |

## Changing the design

- **Topology.** Edit `H`, `M` and `W` in `xgft_pkg`. Every width, count and
  index follows from them. This includes the encoded address width and the
  header layout, which must stay within 32 bits: 2×ENC_W + 6 ≤ 32.
  - Packages cannot be parameterised, so one topology is compiled at a time.
  - The testbenches have the default numbers (60 leaves, 4/12-leaf groups)
    written into their reference models.
- **Turn-back channels.** `N_TBC` on `xgft_network` and `xgft_dual_node`. The
  top uses `N_TBC_DEFAULT = 1`.
- **Buffers.** `BUF_DEPTH` in the package. It must be at least 1. Wormhole
  operation does not need it to hold a whole packet.

## What is this design's own choice

The routing rules, encoding, node structures, connection rules, root loop-back,
8-word buffers, rotating-priority arbitration and length-counted packets follow
the architecture as specified. The following are choices made here, where the
specification is silent or describes only a behavioural model:

- **Word and header format.** 32-bit words and the header bit layout above.
- **Channel handshake.** Synchronous valid/ready channels. The reference
  evaluation modelled asynchronous request/ready channels, where each word took
  one time slot.
- **Allocation timing.** Routing, arbitration and the first transfer happen in
  a single clock, hence 2 clocks per switch block.
- **Input-side choice.** With several candidates, an input picks one by
  rotating priority. It may lose that output to another input and retry on the
  next clock.
- **Several turn-back channels.** "Reserved" means that all of them are held.
- **Reset.** Active-low asynchronous reset of all control state. Buffer storage
  is not reset.
- **Leaf output headers.** They keep encoded addresses.
- **Not built.** The shortest-path TB variant for dual-switch nodes, which
  served only as a comparison point.
- **Leaves and traffic sources.** These are outside the network. The
  testbenches model the traffic sources.

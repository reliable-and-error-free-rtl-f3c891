# Lightweight store-and-forward NoC router with round-robin arbitration and Hamming-protected crossbar

This is a small network-on-chip in which each router moves whole packets between five ports: local, north, east, south and west. A router first buffers a whole packet at its input. It then opens a path through a 5×5 multiplexer crossbar to the output chosen by XY routing. Each flit crosses that path as a Hamming SECDED code word, so a single bit flip on the way is corrected and a double flip is flagged. Whenever several inputs want the same output, a round-robin arbiter picks one. The input served last gets the lowest priority in the next round, so no input can starve. Each of the five input channels runs its own state machine. Up to five packets can therefore cross a router at the same time when they go to different outputs.

The RTL follows the router described by K. R. Kashwan and G. Selvaraj in "Reliable and Error-free Router Arbitration Design for Circuit-switched NOC". That description gives the block structure, buffer sizes, routing rule, arbitration policy and coding scheme. It leaves the cycle-level protocols, the header layout and several widths open. Those are choices made here, and they are listed under [Design choices and departures](#design-choices-and-departures).

## Packets and the link handshake

A flit is 8 bits. A packet has 1 to 15 flits (8 to 120 bits), and its first flit is the header:

```
header = { dst_x[3:0], dst_y[3:0] }
```

Every link between two routers, and between a router and its core, has three signals. `req` and `data[7:0]` go from the sender to the receiver, and `ack` goes back. The handshake works like this:

1. The sender raises `req` and puts the first flit on `data`.
2. If the receiver is free, it raises `ack` on the next clock edge. Free means its input channel is idle and its FIFO is empty.
3. On every clock edge where `req` and `ack` are both high, the receiver takes one flit and the sender moves on to the next.
4. After the last flit the sender drops `req`. The missing `req` is what marks the end of the packet; the packet has no length field.
5. The receiver drops `ack` one cycle after it sees `req` low. The sender waits for `ack` to go low before it starts another packet.

A receiver may wait any number of cycles before it acknowledges. Once it has acknowledged, it must accept one flit per cycle until the packet ends. The testbench sinks use random waits to exercise this.

## Inside a router

```
            +----------------+   req/gnt   +-----------------+
 link in -->| input_channel  |<----------->| output_channel  |--> link out
 (x5)       | FIFO 16x8, FSM |             | RR arbiter, FSM |    (x5)
            | xy_route, enc  |--code word->| dec, FIFO 16x8  |
            +----------------+   crossbar  +-----------------+
                               (5 x 5:1 mux, sel from the arbiter)
```

**Input channel** (`input_channel.sv`). Its FSM has four states: IDLE, RECV, ROUTE and REQ.

- RECV: the channel receives a whole packet into its 16×8 FIFO (store and forward).
- ROUTE: `xy_route` compares the header with the router's coordinates (`xr`, `yr`). X is resolved first: a larger destination X leaves by east, a smaller one by west. When X matches, a larger Y leaves by north and a smaller Y by south. When both match, the packet leaves by the local port.
- REQ: the channel raises one of its five request lines towards the chosen output and waits for a grant.
- While granted, the channel pops one flit per cycle onto the crossbar, Hamming-encoded to 13 bits.
- When the FIFO is empty, the channel drops its request and is free again.

The grant an input sees is the OR of all output grants addressed to it.

**Output channel and arbitration** (`output_channel.sv`, `rr_arbiter.sv`). This is the part that takes the most care to follow.

- The output channel arbitrates only when its FSM is idle and its FIFO is empty. An empty output FIFO is what allows the next transfer.
- At that point it pulses the arbiter's `update` input. The arbiter's registered one-hot *grant enable* then moves to the first requester found by scanning upward, with wrap-around, from the requester after the one served last.
- The grant is `grant_enable & req`. It therefore stays high exactly as long as the winning input keeps requesting.
- While the grant is high, the output drives its own crossbar multiplexer (`mux_sel` = the winner's port code). It also decodes each valid code word, corrects any single error, and writes the flit into its FIFO.
- When the input drops its request, the grant falls and the crossbar connection is released. The output then sends the packet to its neighbour using the link handshake.

Each output also masks requests that XY routing can never produce. A packet that has turned north or south never turns east or west again, so the east and west outputs only serve the local input and the opposite horizontal input. A packet never leaves by the port it came in on, except at the local port, which loops a packet addressed to its own router back to its core. The mask is in `noc_pkg::xy_legal_outputs` and `noc_pkg::xy_served_inputs`.

After reset, each arbiter gives requester 0 (local) the highest priority. When all five inputs compete for one output, they are served in the order 0, 1, 2, 3, 4, 0, …

**Crossbar** (`crossbar.sv`). Each input has a 1:5 demultiplexer that steers its code word to one output lane. Each output has a 5:1 multiplexer that picks one input. Both selects are 3-bit port codes, and a connection from input p to output q exists only when both ends agree. The granting output channel sets both ends:

- It drives its own multiplexer select.
- It drives a demultiplexer contribution for the granted input: its own port code for that input, zero for all others.

The router ORs each input's contributions from all outputs, and ORs its grants in the same way. Connections to different outputs are independent.

**Hamming SECDED** (`hamming_enc.sv`, `hamming_dec.sv`). The code is (13,8):

- Bit *p* of the code word, for *p* from 1 to 12, is Hamming position *p*.
- The parity bits sit at positions 1, 2, 4 and 8. Parity bit 2^i is the XOR of every position whose number has bit *i* set.
- The data bits d0…d7 fill positions 3, 5, 6, 7, 9, 10, 11 and 12.
- Bit 0 is an overall parity bit.

The decoder computes a syndrome, which is the XOR of the positions of all set bits:

- Odd overall parity means a single error. The bit the syndrome points to is flipped back.
- Even overall parity with a non-zero syndrome means a double error. It is flagged (`ecc_double`) and not corrected, and the packet is still forwarded.

The coder protects the path from an input FIFO, through the crossbar, to an output FIFO. The FIFOs and the links hold plain 8-bit flits.

The router port `err_inject` is XORed onto each input's code word before the crossbar. It is a test hook that lets a simulation show correction and detection. Tie it to zero in real use.

## Timing

For one 15-flit packet crossing an idle router, with a sink that acknowledges at once, it takes 54 cycles from the source raising `req` to the sink seeing the packet end:

| step | cycles |
|---|---|
| source raises `req`, channel acknowledges | 2 |
| 15 flits received | 15 |
| end of packet seen, route latched | 2 |
| arbitration | 1 |
| 15 flits over the crossbar | 15 |
| input and output release the connection | 2 |
| sink acknowledges, 15 flits sent, end seen | 17 |

In general the latency is 3·L + 9 cycles per router for an L-flit packet, because each hop stores the whole packet twice. With five disjoint transfers, the whole batch finishes in the same 54 cycles as one packet. Throughput per output is one packet per about 2·L + 5 cycles, because an output cannot accept a new packet until its FIFO has drained to the neighbour.

## The mesh

`noc_mesh` builds a `MESH_X` × `MESH_Y` mesh. The default is 4 × 4, and coordinates are 4 bits, so meshes up to 16 × 16 are possible.

- Router (x, y) has coordinates (x, y). East is +x and north is +y.
- Its east port connects to the west port of (x+1, y), and its north port connects to the south port of (x, y+1).
- Links on the mesh edge are tied idle. XY routing never uses them for a destination inside the mesh.
- Router r = y·MESH_X + x brings out its local port as `loc_in_*` (core to network) and `loc_out_*` (network to core).
- Its `err_inject` mask and its `ecc_single`/`ecc_double` flags are brought out per router and port.

Dimension-order (XY) routing on a mesh has no cyclic channel dependencies, so the network cannot deadlock.

## Design choices and departures

The following points are left open by the original description and were decided here:

- The cycle-level link protocol, described in [Packets and the link handshake](#packets-and-the-link-handshake).
- The header layout and the 4-bit coordinates.
- Synchronous active-high reset.
- The FSM states.
- The arbiter's reset priority.
- The mesh size.

These points depart from, or narrow, the original description:

- **Flit width through the crossbar.** The crossbar is described once as carrying "40-bit" inputs, but the channels and FIFOs are 8 bits wide. Here the crossbar carries one 8-bit flit per cycle as a 13-bit code word.
- **Arbiter polarity.** The arbiter drawing shows active-low grants. Grants here are active high.
- **Overall parity bit.** The Hamming scheme is described as correcting one error and detecting two. This needs the overall parity bit added here; the plain Hamming(12,8) layout has no such bit.
- **Loopback.** The input channel drawing shows four request lines. Here there are five, so that the local input can send to its own core.
- **Fixed sizes and lengths.** The 16-entry FIFOs and 8-bit flits match the original. A packet longer than 16 flits is not supported: its extra flits are dropped and an assertion fires.
- **Priority queues.** A generic architecture drawing also shows "Normal" and "Low" priority input queues and a "Ts" block. They are not described further and are not built.
- **FPGA results.** FPGA area and power figures are reported for the original (Spartan-3 xc3s200: 1119 LUTs, 1.446 W). They were not reproduced here.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | port codes, widths, flit/code-word types, XY turn masks |
| `rtl/sync_fifo.sv` | 16×8 first-word-fall-through FIFO |
| `rtl/xy_route.sv` | XY routing decision |
| `rtl/hamming_enc.sv`, `rtl/hamming_dec.sv` | (13,8) SECDED encoder and decoder/corrector |
| `rtl/rr_arbiter.sv` | round-robin arbiter with registered grant enable |
| `rtl/crossbar.sv` | 5×5 demultiplexer/multiplexer crossbar |
| `rtl/input_channel.sv`, `rtl/output_channel.sv` | per-port channels |
| `rtl/router.sv` | five-port router |
| `rtl/noc_mesh.sv` | mesh of routers (top) |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_link_src`/`tb_link_snk` are packet source and checking sink models for a link |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It also has a watchdog that counts a failure if the test hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -Mdir obj_mesh
./obj_mesh/Vtb_noc_mesh
```

Use the same command with another `tb_*` name for any other block.

What each testbench checks:

- `tb_noc_mesh` runs the 4 × 4 mesh at its default parameters:
  - 16 cores each send 24 random packets, including packets to their own router, to random destinations.
  - Every packet is checked at its destination.
  - One packet is then sent with an injected single error and one with an injected double error.
  - It counts contention at outputs, X-to-Y turns, loopbacks, parallel crossbar connections, receiver stalls, and corrected and detected errors. Each must occur at least once.
- `tb_router` checks the 54-cycle latency above, five parallel transfers, round-robin service under full contention, error correction, and random legal traffic.
- The other testbenches check their block against an independent model. `tb_xy_route` is exhaustive. `tb_hamming` and `tb_hamming_dec` cover all 256 flits with every single-bit error and random double-bit errors.

## Changing the design

- **FIFO depth.** Use the `DEPTH` parameter on `noc_mesh`, `router` and the channels. It limits the longest packet.
- **Mesh size.** Use `MESH_X` and `MESH_Y` (at most 16 each with 4-bit coordinates).
- **Flit and coordinate widths.** Set `FLIT_W` and `COORD_W` in `noc_pkg`. The header layout assumes `2*COORD_W <= FLIT_W`. The Hamming parameters follow from `FLIT_W`.
- **Permitted turns.** Edit `xy_legal_outputs` in `noc_pkg`. The output-channel masks are derived from it.

# A 4x4 mesh network-on-chip of AES-128 encryption engines

Sixteen identical AES-128 encryption units sit on a 4x4 mesh network-on-chip.
Any node can hand a block of plaintext and a key to any other node, so up to
sixteen encryptions run in parallel. The routers are kept as small as possible:
packet switching with deterministic X-Y routing, one round-robin arbiter per
router, and no virtual channels or pipeline stages. The AES engine is an
iterative core that does one round per clock.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). Every block has a
self-checking testbench. The default parameters are the real size: 4x4 mesh,
AES-128, 10 rounds.

## How a request travels

Each node `n = y*4 + x` has the address `{x, y}`, with 2 bits per coordinate.
In the usual row-by-row drawing the nodes are numbered 1 to 16, so node 1 is
`(0,0)` = `4'b0000` and node 16 is `(3,3)` = `4'b1111`.

1. **Host port.** The host drives `ld[n]` for one clock, together with
   `destadd[n]`, `key[n]` and `text_in[n]`, while `ld_ready[n]` is high.
2. **Network interface.** The NI of node `n` turns the request into one
   264-bit packet: `{dest, src, key, text}`. It holds the packet in a
   register and offers it to the local port of its router.
3. **Routers.** Each router stores the packet in the buffer of the port it
   came in on. The router then forwards it one hop per clock along the X-Y
   path until the destination address equals the router's own address.
4. **Destination.** The packet leaves by the local port. The NI hands it to
   the AES unit as soon as that unit is idle. Ten clocks later `done[d]`
   rises at the destination node `d`. Then:
   - `f_out[d]` holds the ciphertext;
   - `res_src[d]` holds the address of the node that sent the request.

The result is delivered at the node that did the work. It does not travel
back to the sender. As a result, the network only ever carries requests, and
a request can always drain: the AES unit frees itself after ten clocks
without needing the network. X-Y routing on a mesh has no cyclic channel
dependencies, so the network cannot deadlock.

### Direction names

The port names follow one fixed rule, applied consistently. It differs from
the compass convention many mesh papers use:

| condition at the current router     | output port | neighbour reached |
|-------------------------------------|-------------|-------------------|
| `x < dest.x`                        | west        | `(x+1, y)`        |
| `x > dest.x`                        | east        | `(x-1, y)`        |
| `x == dest.x`, `y < dest.y`         | north       | `(x, y+1)`        |
| `x == dest.x`, `y > dest.y`         | south       | `(x, y-1)`        |
| `x == dest.x`, `y == dest.y`        | local       | own AES unit      |

The west port of `(x,y)` feeds the east input of `(x+1,y)`, and the reverse
link closes the pair. North and south links are wired the same way. Ports on
the mesh boundary are tied off, and X-Y routing never selects them.

### Latency

With an idle path and an idle destination engine, a request sent over `h`
hops completes `h + 2 + 10` clocks after the edge that samples `ld`:

- 1 clock into the NI register;
- 1 clock per router visited (`h + 1` routers, the last one hands the packet
  to the local port);
- 10 AES rounds.

For example, `(0,0)` to `(3,3)` takes 18 clocks.

## The router (`noc_router`)

The router has five ports. They are numbered in the round-robin service
order: local (0), west (1), south (2), east (3), north (4). Each cycle it
does the following:

1. **Buffering.** Every input port has a `port_buffer`: a FIFO of
   `BUF_DEPTH` whole packets. The port's `in_ready` is simply "buffer not
   full", which comes from registers. So ready never depends on valid, and
   no combinational path runs through a chain of routers.
2. **Routing.** An `xy_route` unit per buffer computes the output port for
   the packet at the head of that buffer.
3. **Requests.** A buffer requests service only if it holds a packet and the
   output that packet needs is ready, meaning the downstream buffer, or the
   NI for the local port, can take it.
4. **Arbitration.** One `rr_arbiter` grants a single requesting input.
   The search starts at the port after the one granted last, so with all
   five ports requesting they are served in the order local, west, south,
   east, north, and again from the start.
5. **Forwarding.** The granted head packet is driven onto its output and
   popped from its buffer.

So **at most one packet leaves a router per clock**. This is the simplest
reading of "the arbiter decides which packet is routed". A router with one
arbiter per output port would move up to five packets per clock. That would
be a different, larger design, and it is not what this RTL does.

A link is a valid/ready pair plus the 264-bit packet. `out_valid` depends
combinationally on `out_ready`, because a port only asks for an output that
is ready. `in_ready` never depends on `in_valid`.

## The AES engine (`aes_core`, `aes_pkg`)

`aes_core` is a standard FIPS-197 AES-128 encryptor, built iteratively:

- **Load.** `ld` captures the key and the plaintext and applies the initial
  AddRoundKey.
- **Rounds.** Each of the next 10 clocks runs one full round: SubBytes,
  ShiftRows, MixColumns (skipped in round 10) and AddRoundKey. The round
  key is derived on the fly from the previous one, so no key schedule is
  stored. The round constant advances by doubling in GF(2^8).
- **S-box.** The S-box is computed, not stored: `S(a) = affine(a^254)`,
  where `a^254` is the GF(2^8) inverse (0 maps to 0).
- **Outputs.** `f_out` is the state register itself. It shows the
  intermediate state while `busy` is high, and the ciphertext once `done` is
  high. `done` stays high until the next `ld`.

There are 20 S-boxes in the round logic: 16 for the state and 4 for the key
schedule. Together they make up most of the area, about 8k word-level cells
per engine after generic synthesis.

Byte order follows FIPS-197: byte 0 of a 128-bit value is bits `[127:120]`,
and bytes fill the state column by column. The FIPS-197 Appendix B vector is
therefore
`key = 2b7e151628aed2a6abf7158809cf4f3c`, `text_in = 3243f6a8885a308d313198a2e0370734`,
giving `f_out = 3925841d02dc09fbdc118597196a0b32`.

## The network interface (`network_interface`)

The network interface sits between the host port, the router's local port
and the AES engine:

- **Injection.** It packs one request at a time into its injection register.
  `ld_ready` is low while that packet waits for the router.
- **Ejection.** It accepts a packet from the router only while the engine is
  idle (`ej_ready = !pe_busy`). It starts the engine in the same clock, with
  the packet's key and text, and latches the packet's source address on
  `res_src`.

## Top level (`noc_aes_top`)

| parameter   | default | meaning                                     |
|-------------|---------|---------------------------------------------|
| `MESH_X`    | 4       | columns                                     |
| `MESH_Y`    | 4       | rows                                        |
| `BUF_DEPTH` | 2       | packets per router input buffer             |

The address width is `noc_pkg::COORD_W = 2` bits per coordinate. A larger
mesh needs a larger `COORD_W`, and elaboration stops with an error if the
mesh does not fit.

All top-level ports are packed arrays indexed by node: `ld`, `destadd`,
`key`, `text_in`, `ld_ready`, `f_out`, `done`, `res_src`. The `done` flag is
high for at least one clock per result. A host watching a node should
detect its rising edge.

After generic synthesis, the 4x4 top has about 132k word-level cells,
8.9k flip-flop bits and 33.7k memory bits (the port buffers).

## Choices this design makes on its own

These points are not fixed by the architecture description this RTL
implements. Change them freely:

- **Packet format.** A request is one 264-bit packet moved whole over
  264-bit links, using store-and-forward packet switching. A narrower link
  would need flit serialisation and a wormhole or virtual cut-through
  scheme, which this design does not have.
- **Results.** Results appear at the destination node. They are not sent
  back to the sender.
- **Buffer depth.** Each buffer holds two packets.
- **Handshakes.** The valid/ready handshakes and the one-register NI are
  this design's.
- **AES microarchitecture.** One round per clock, on-the-fly key schedule,
  computed S-box. The engine only encrypts; there is no decryption.
- **Reset.** Reset is synchronous and active high. Only control state is
  reset; packet storage is not.
- **Round-robin order.** The order is local, west, south, east, north. A
  recorded router waveform served the inputs in a different order (local,
  east, south, west, north). The written order was taken as the intended
  one.
- **Direction names.** West means towards larger `x` and north towards
  larger `y`, as in the routing rule above.

A published FPGA result for this architecture reports very small register
usage: a fraction of a percent of a Virtex-5 LX220. This RTL cannot match
that figure. Sixteen AES engines alone hold 16 x 270 state, key and control
flip-flops. The figure is therefore not a target for this RTL.

## Verification

Each block has a testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_aes_core`          | FIPS-197 B and C.1 vectors, the all-zero vector, 40 random vectors against an independent byte-level model (`tb/aes_ref_pkg.sv`, whose S-box is built from log/antilog tables), 10-clock latency, restart while busy |
| `tb_xy_route`          | all 256 (current, destination) pairs; hop-by-hop walks for every source and destination: minimal length, x before y |
| `tb_rr_arbiter`        | strict ring order with all ports requesting; 1000 random cycles against a reference pointer; no port waits five grants |
| `tb_port_buffer`       | random push and pop against a queue model, flags, order, full and empty |
| `tb_noc_router`        | five packets entering router (1,1) together, addressed to (3,3), leave west one per clock in ring order; 400 random packets with random backpressure: correct port, order per input, none lost, at most one per clock |
| `tb_network_interface` | packet format, holding under backpressure, engine started only when idle, source tag |
| `tb_noc_aes_top`       | full 4x4 mesh at default parameters: the FIPS vector from (0,0) to (3,3) with 18-clock latency; all-to-all traffic (256 requests); a hot spot (48 requests to one node); every ciphertext and source tag checked |

The `tb_noc_aes_top` testbench also counts several events and fails if any
of them never happened:

- X-to-Y turns;
- deliveries to the sending node itself;
- arbitration between two or more requests;
- full port buffers;
- requests waiting for a busy engine;
- hosts held back by `ld_ready`;
- several engines busy at once.

These counters read internal signals by hierarchical name.

The whole-mesh test simulates about 850 clocks. It builds in about 20 seconds and runs in a fraction of a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_noc_aes_top.sv \
    --top-module tb_noc_aes_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Packages must come first on
the command line. `-y rtl -y tb` lets Verilator find every other module by
its file name. Lint any module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/noc_pkg.sv rtl/aes_pkg.sv rtl/<module>.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | address, port and packet types |
| `rtl/aes_pkg.sv` | AES arithmetic: GF(2^8) multiply and inverse, S-box, round functions, key step |
| `rtl/aes_core.sv` | iterative AES-128 engine |
| `rtl/xy_route.sv` | X-Y routing decision |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/port_buffer.sv` | packet FIFO |
| `rtl/noc_router.sv` | five-port router |
| `rtl/network_interface.sv` | NI between host, router and engine |
| `rtl/noc_node.sv` | one tile: router, NI, engine |
| `rtl/noc_aes_top.sv` | the mesh |
| `tb/aes_ref_pkg.sv` | independent AES-128 reference model for the testbenches |
| `tb/tb_*.sv` | testbenches |

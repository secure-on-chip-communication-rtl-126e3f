# IAV mesh NoC: a network-on-chip with a firewall in every router

In a shared-memory multi-core chip that talks over a network-on-chip, one
compromised core can send packets to memory it should never touch: a buffer
overflow that rewrites a packet header is enough. This design puts a small
firewall, the **Id and Address Verification (IAV) module**, into the local
channel of every router. It checks each packet twice:

1. **At injection.** The local *input* port of the sender's router checks that
   the packet's source id is the router's own node, that the destination is one
   the node may talk to, and that the address lies in the window allowed for
   that destination.
2. **At delivery.** The local *output* port of the receiver's router checks
   that the packet is really for this node, that its source is a node allowed
   to reach it, and that the address lies in the window allowed for that source.

A packet that fails either check is discarded inside the router and a one-cycle
alert, tagged with the packet's id field, is raised for a manager core. A
packet that passes is delayed by one clock cycle in total, at delivery.

The RTL is SystemVerilog-2017: a 5-port router with XY routing, 4-flit packet
buffers and round-robin output arbitration, assembled into an 8 x 8 mesh
(64 nodes) with 16-bit links.

## Packets

A packet is 64 bits sent as four 16-bit flits, flit 0 first; flit *k* carries
packet bits `[16k+15:16k]`.

| bits   | field      | meaning                                   |
|--------|------------|-------------------------------------------|
| 5:0    | `id_dest`  | destination node                          |
| 11:6   | `id_src`   | source node                               |
| 27:12  | `address`  | 16-bit memory address at the destination  |
| 30:28  | `access`   | access type (carried, not checked)        |
| 63:31  | `data`     | data and configuration bits               |

The address straddles flit 0 (bits 15:12) and flit 1 (bits 11:0). That is why
every IAV check starts as soon as **two** flits are buffered. A node id is
`{y[2:0], x[2:0]}`, the router's position in the mesh. `noc_pkg::packet_t` is
this layout as a packed struct.

## The IAV module (`rtl/iav.sv`)

Each IAV holds a table of `ENTRIES` rows (32 by default), each row
`{valid, id, l_bound, u_bound}`. One side of the header is compared with the
router's own id and the other is looked up in the table:

| instance          | must equal `ROUTER_ID` | looked up in table |
|-------------------|------------------------|--------------------|
| local input port  | `id_src`               | `id_dest`          |
| local output port | `id_dest`              | `id_src`           |

A packet passes when the fixed id matches and at least one valid row has the
looked-up id and `l_bound <= address <= u_bound`. All rows are compared in
parallel. The verdict is registered: `done` is high one cycle after `check`,
together with `enable` (pass) or `alert` (block), and `alert_id` holds the
packet's 12-bit `{id_src, id_dest}`.

The bounds are full 16-bit byte addresses. Bounds aligned to 64 bytes (lower
bound a multiple of 0x40, upper bound one less than a multiple) give the
64-byte block granularity the scheme is meant to have, e.g. the rows
`000000: 0x0000-0xA3FF`, `001100: 0x6540-0xA3FF` and `001011: 0xAA80-0xBB7F`
used in `tb/tb_iav.sv`.

**Loading tables.** Rows are written one per cycle through the `cfg_*` port
(`cfg_we`, `cfg_index`, `cfg_entry`; at router and mesh level also `cfg_node`
and `cfg_side` to pick a router and its input-side or output-side table).
Reset clears all valid bits, so a router blocks everything until loaded.
In an FPGA the same tables would be fixed at build time or replaced by
partial reconfiguration. This port stands in for both and also allows
run-time updates; the mesh testbench uses it to open a new traffic pattern
during operation.

The access-type field is not checked. Read-only rules and similar would need a
column for it.

## Inside the router

```
            +-----------------------------------------------+
 local  --> | input port  [FIFO]-->IAV-->XY route--+        |
  (NI)  <-- | output port [FIFO]<--IAV   arbiter   |        |
            |                                    crossbar   |
 N/E/S/W -> | input port  [FIFO]-------->XY route--+ (5x5,  |
 links  <-- | output port [FIFO]<--------arbiter    no U-turn)
            +-----------------------------------------------+
```

Every link uses the same handshake. The sender drives `data` and `req`, the
receiver drives `ack`, and a flit moves on each clock edge where both are high.
`ack` depends only on the receiver's state, never combinationally on anything
past the receiver, so links do not form combinational loops.

**Input port** (`input_port.sv`) has three states:

* `RX`: `ack_in` is high while the 4-flit FIFO is not full. Once two flits are
  in, the IAV check (local port only) is started. When the FIFO is full (a whole
  packet is in) and the packet has passed, the port moves on. A blocked packet
  is flushed from the FIFO and `alert` pulses.
* `REQ`: the XY routing logic, enabled only now, names the output port. The
  port raises that bit of its 4-bit `swt_req`: bit *k* is the *k*-th port other
  than itself, in port order (`noc_pkg::peer`).
* `TX`: after the output port's one-cycle `swt_ack`, the four flits are read
  out on four consecutive cycles with `xbar_valid`.

A packet whose route points back out of the port it came in on (a node
addressing itself) is dropped and flagged on `misroute`. XY routing never
produces this for traffic between different nodes.

**Output port** (`output_port.sv`):

* `IDLE`: while its FIFO is empty, the round-robin arbiter (`rr_arbiter.sv`)
  grants one of the four requests. The winner gets lowest priority next time.
  The grant is `swt_ack`, and the 2-bit `swt_sel` steers the crossbar.
* `FILL`: the four flits are written as they arrive. A standard port forwards
  them downstream at once. The local port with IAV checks the header while
  the second flit is written and sends nothing before the verdict. A blocked
  packet is flushed once all four flits are in, and `alert` pulses.
* `DRAIN`: the rest of the packet leaves. Then the port is `IDLE` again.

**Crossbar** (`crossbar.sv`) is combinational. It routes the request and ack
bits between ports and multiplexes each output's flit and valid from the input
named by its `swt_sel`. There is no path from a port to itself.

### Timing

With flits arriving back to back:

| cycle | input port                          | IAV (local port)        |
|-------|-------------------------------------|-------------------------|
| 0-3   | flits 0-3 written                   |                         |
| 2     |                                     | `check` (2 flits in)    |
| 3     |                                     | verdict registered      |
| 4     | FIFO full, routing enabled          |                         |
| 5     | `swt_req` high, `swt_ack` if idle   |                         |
| 6-9   | flits cross the switch              |                         |

At injection the verdict is ready before the packet is complete, so the local
port with IAV issues its switch request in the same cycle as a standard port.
`tb_input_port` checks this: the request comes two cycles after the fourth
flit is accepted, in both variants.

At delivery the check starts while the second flit (the one holding the rest
of the address) is written into the output FIFO. Its registered verdict
arrives one cycle later, and only then may the first flit leave. So the local
output port with IAV starts sending one cycle later than a standard port,
and that is the only cycle the two checks add.

Zero-load latency is 7 cycles per router plus that one cycle. A router takes
7 cycles from accepting a packet's last flit to the next router accepting it:

* 1 cycle to see the FIFO full;
* 1 cycle to request the switch;
* 4 cycles for the flits to cross;
* 1 cycle on the link.

A route over *h* links therefore takes 7h + 8 cycles, from the node handing
over its last flit to the destination node taking its last flit. The
16-node testbench checks this for every route it uses.

The IAV compare is a parallel match over all rows. Its combinational depth
grows with `ENTRIES`, so large tables lower the clock rate rather than adding
cycles.

## The mesh (`rtl/noc_mesh.sv`)

`noc_mesh` is the top. It holds `MESH_X x MESH_Y` routers (8 x 8 by default).
Router (x, y) has id `{y, x}`. East is x+1 and south is y+1. Each router's
east output drives the east neighbour's west input, and so on. Channels at
the mesh edge are tied off.

The top's ports, all arrays indexed by `y * MESH_X + x`:

* `ni_data_in / ni_req_in / ni_ack_in`: a node injects flits into its router.
* `ni_data_out / ni_req_out / ni_ack_out`: a router delivers flits to its node.
* `cfg_we, cfg_node, cfg_side, cfg_index, cfg_entry`: shared table-load port.
* `alert_in[_id]`: first-level (injection) alerts.
* `alert_out[_id]`: second-level (delivery) alerts.
* `misroute`: self-route drops.

The network interfaces, cores, memories and the manager core that would
consume the alerts are not part of the RTL. The network interface's job is to
pack a core's bus transaction (connection and thread id into `id_src`, bus
address into `address`) into the four flits above.

Node ids are 6 bits, so the mesh is at most 8 x 8. Smaller meshes, e.g. 4 x 4,
work by setting `MESH_X`/`MESH_Y`.

## Parameters

| where        | name                     | default | meaning                            |
|--------------|--------------------------|---------|------------------------------------|
| `noc_pkg`    | `FLIT_W`                 | 16      | link width                         |
| `noc_pkg`    | `PKT_FLITS`              | 4       | flits per packet = FIFO depth      |
| `noc_pkg`    | `ID_W`, `ADDR_W`         | 6, 16   | id and address widths              |
| `noc_mesh`   | `MESH_X`, `MESH_Y`       | 8, 8    | mesh size                          |
| all          | `ENTRIES`                | 32      | rows per IAV table                 |
| `router`     | `IAV_IN_EN`, `IAV_OUT_EN`| 1, 1    | keep or drop either check          |

The package constants describe the 64-node header format and are not meant
to be changed on their own. A 32-bit-link or 256-node variant needs a new
header layout.

## How far to trust it, and where it departs

The following are design choices, not taken from a specification:

* The id-to-coordinate split.
* The port numbering and the compass directions.
* The `cfg_*` table-load port and the per-row valid bit.
* Edge tie-offs and the self-route drop.
* The one-cycle registered IAV verdict.
* The exact req/ack rule.

The departures are:

* **Whole-packet buffering.** An input port waits for the complete packet
  before requesting the switch, as the port's control logic is described.
  This is store-and-forward at the input, not cut-through at the flit level.
  Each FIFO holds exactly one packet.
* **Full-address bounds.** The whole 16-bit address is compared, rather than
  only a block-index part of it.
* **Not built:** 32-bit links, meshes above 64 nodes, and the network
  interface.

Verification is by simulation only. Every block has a self-checking testbench
with a reference model, and each testbench has been shown to fail against a
deliberately broken copy of its module. `tb_noc_mesh` runs the full 64-node
mesh at default parameters. It covers:

* uniform, transpose and hotspot traffic phases;
* injected attacks: unknown destination, address outside the window, forged
  source id, and a packet only the delivery-side table refuses;
* a run-time table rewrite.

It checks every delivered packet against a scoreboard, and every alert
against the expected count and id. It also requires each mechanism (both
alert kinds, back-pressure, switch contention, reconfiguration) to occur at
least once. No timing closure or FPGA results are claimed.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/noc_pkg.sv rtl/*.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh -Mdir obj
./obj/Vtb_noc_mesh
```

Replace `tb_noc_mesh` with any of `tb_flit_fifo`, `tb_xy_routing_logic`,
`tb_iav`, `tb_rr_arbiter`, `tb_crossbar`, `tb_input_port`, `tb_output_port`,
`tb_router`, `tb_iav_sizes` or `tb_noc_mesh_16`. `tb_iav_sizes` runs the IAV
module with full tables of 1, 8, 16, 32, 64 and 128 rows against a reference
search. `tb_noc_mesh_16` is a 4 x 4 mesh with 8-row tables: uniform traffic
with attacks, plus the zero-load latency check. The 64-node mesh testbench
takes about two minutes to compile and under a second to run. The unit
testbenches build in seconds.

## Files

* `rtl/noc_pkg.sv`: types, header field helpers, port enum.
* `rtl/flit_fifo.sv`, `rtl/xy_routing_logic.sv`, `rtl/iav.sv`,
  `rtl/rr_arbiter.sv`: the building blocks of the ports.
* `rtl/input_port.sv`, `rtl/output_port.sv`, `rtl/crossbar.sv`,
  `rtl/router.sv`: the router.
* `rtl/noc_mesh.sv`: the top.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_iav_sizes.sv`, `tb/tb_noc_mesh_16.sv`: table sizes and a 16-node mesh.

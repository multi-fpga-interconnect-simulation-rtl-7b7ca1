# Multi-FPGA mesh interconnect for a spiking-neuron simulator

A large neuron simulation is split over many FPGAs. Each FPGA computes a group of neuron cells.
Every 10 ns a cell may emit a short message: its state plus its own address. Every other FPGA
whose cells listen to it must receive that message. This design is the network that carries those
messages between FPGAs.

- Every FPGA holds one **mesh router**.
- The routers form a 2-D mesh. Neighbours are joined by **serial LVDS links**: several data
  lanes at 14 bits per local clock, plus a frame lane and a forwarded bit clock.
- A message is either unicast, routed in XY order, or multicast. A multicast copy is routed by a
  table indexed with the *source* cell address and forks inside the routers, so every link of
  the tree carries it only once.

The top module `mesh_top` builds a `MESH_X × MESH_Y` mesh, 4×4 by default. Each router's local
port is brought out as a flit channel with credits. On the real FPGA, that port feeds the neuron
clusters through an interface bridge and a tree router, which are not part of this RTL.

## Flits and channels (`noc_pkg`)

A flit is 86 bits:

| field | bits | meaning |
|---|---|---|
| `ht`  | 2  | `01` head, `11` body, `10` tail, `00` single-flit packet |
| `vc`  | 2  | virtual channel on the link it is travelling over |
| `typ` | 2  | message type, carried unchanged |
| `adr` | 10 | source cell address (multicast table index) |
| `dy`,`dx` | 3+3 | destination coordinates (unicast) |
| `data` | 64 | payload |

- A channel (`flit_ch_t`) is a valid bit plus a flit.
- A credit (`credit_t`) is a valid bit plus a VC number.
- On a link both travel together in one 90-bit frame (`link_frame_t`): the credit rides behind
  the flit going the other way.

## The router (`mesh_router`)

It has five ports: 0 local, 1 north (y−1), 2 east (x+1), 3 south (y+1), 4 west (x−1). Each input
port has 4 virtual channels (VCs) of `DEPTH` flits. Flow control uses credits.

A head flit passes through three stages, one per clock:

1. **Buffer write + route compute** (`route_compute`, `input_buffer`). The output set is worked
   out as the flit is written and stored beside it, as a 5-bit mask. In unicast mode the mask is
   the XY dimension-order next hop. In multicast mode it is `table[adr]`. The table is written
   through `tbl_we/tbl_addr/tbl_mask`. The entry for a source is the union of the XY paths from
   that source to all its destinations, as seen at this router.
2. **VC allocation** (`vc_allocator`). A head flit at the front of its VC asks for one free VC
   on *every* output in its mask. It gets all of them in the same cycle or none. Requesters are
   served greedily, in a round-robin order that rotates past the last winner.
3. **Switch allocation + crossbar** (`switch_allocator`, `crossbar`). This is separable and
   input-first:
   - Each input picks, round-robin, one of its VCs that holds an allocated flit with credit on
     every output it still has to serve.
   - Each output then picks, round-robin, one input.
   - A multicast flit may win several outputs in one cycle.
   - The flit leaves its VC only when every output in its mask has taken it. Outputs that
     already sent it are remembered per VC, so a partly served flit never goes out twice.
   - The crossbar writes the downstream VC into the flit's `vc` field. The output is registered.

Body and tail flits skip stage 2 and follow in two cycles. `output_vc_state` keeps, per output
VC, a credit counter and a busy flag. The busy flag is set at allocation and cleared when the
tail leaves. An input credit is returned each time a flit leaves an input VC.

### Why multicast packets are single flits

This is the one rule that is easy to break by accident. A multi-flit multicast packet holds a
VC on every branch of its tree until its tail passes. If its branches have to wait for
ejection VCs held by other multicast packets that are themselves waiting, the mesh deadlocks. A
4×4 all-to-all multicast test did this reliably. All-or-nothing VC allocation removes the
hold-and-wait *inside* one router. It cannot remove it across routers. So a multicast packet is
one flit (kind `00`): it never holds a VC longer than one hop. A neuron message fits in one flit
(64-bit state + 10-bit address + type), so nothing is lost. Unicast packets may be any length.

### Observation outputs

The router drives four event signals. They are for testbenches and are not used in the logic:

- `ev_va_conflict`: a head flit was refused a VC.
- `ev_sa_conflict`: an output was requested by more than one input.
- `ev_credit_stall`: an allocated flit waited for credit.
- `ev_mcast_fork`: a flit went to more than one output.

## The inter-FPGA link (`serdes_link`)

One instance carries one direction. `mesh_top` puts two between every pair of neighbours.

```
tx_frame(90) -> reg -> serdes_tx (7 data lanes + frame lane, 14:1) -> serial lanes + clk_ser
             -> serdes_rx (bit slip) -> aligner -> async_fifo -> reg -> rx_frame(90)
```

- **Serialiser** (`serdes_tx`). Every 14 bit-clocks it loads a 14-bit word per lane and shifts
  it out, bit 0 first. The frame lane always sends `00000001111111`.
- **Deserialiser** (`serdes_rx`). It runs on the forwarded bit clock. It collects 14 bits per
  lane and strobes `word_valid`. A `bitslip` pulse stretches one word by one bit, which moves
  the word boundary by one bit.
- **Aligner** (inside `serdes_link`):
  - After reset it compares the frame-lane word with the pattern.
  - On a mismatch it pulses `bitslip`, then waits two words for the new boundary to settle.
  - At most 14 slips find the boundary, and `locked` rises.
  - Only words whose frame lane matches are written into the FIFO. A link that is not locked
    passes nothing.
- **Clock crossing** (`async_fifo`). The received words are written on the divided receive
  clock and read on the local clock of the receiving FPGA. It uses Gray-coded pointers with
  two-flop synchronisers. The FIFO never fills, because one frame is written and one read per
  local cycle.

`locked` is synchronised to the local clock. `mesh_top` ANDs all of them into `links_up`.
Nothing may be injected before `links_up`.

**Link latency** from `tx_frame` to `rx_frame` is 6 local cycles. The document's budget is 4. The
extra two are the frame register and the FIFO synchroniser. The zero-load latency of a head flit
over *h* hops is therefore `h·(3+6)+3` cycles. For example, 57 cycles corner to corner in a 4×4
mesh.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `mesh_top` | `MESH_X`, `MESH_Y` | 4, 4 | coordinates are 3 bits, so up to 8×8 |
| `mesh_top`, `mesh_router` | `DEPTH` | 4 | flits per VC |
| `noc_pkg` | `NVC` | 4 | VC field is 2 bits; more VCs needs `VC_W` raised |
| `mesh_top`, `serdes_link` | `LANES`, `RATIO` | 7, 14 | `LANES·RATIO` must be ≥ 90 (checked at elaboration) |
| `noc_pkg` | `ADR_W` | 10 | table has 2^10 entries |

## Departures from the document

- **Lanes.** The document asks for at least 6 LVDS data lanes per channel. This design uses 7,
  because 6×14 bits cannot hold the 90-bit frame.
- **Serialisation ratio.** The document's link test uses a 10:1 ratio. This design uses 14:1, a
  width the FPGA's cascaded SERDES also supports.
- **Link latency.** 6 local cycles instead of 4 (see above).
- **Multicast packets.** These are single flits (see above). The document does not restrict
  their length.
- **All-or-nothing VC allocation** for multicast heads, and **separable input-first switch
  allocation**. The document only says both allocators use round robin.
- **Kind code `00`** for a single-flit packet is added. The document defines only head, body
  and tail.
- **On/off back-pressure** is not built. The document's simulator supports it as an
  alternative to credits, and credits are used here.
- **Plain-logic SERDES.** The vendor SERDES primitives, differential pad buffers and regional
  clock buffers are replaced by plain logic with a single-data-rate bit clock.
- **One clock source.** All FPGAs share one clock source in the model. The async FIFOs still
  decouple every link.
- **Not included.** The neuron-side parts are not included: the interface bridge, the tree
  router, the cluster controllers and the neuron cores. The router's local port is brought out
  in their place.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For example:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/noc_pkg.sv rtl/*.sv tb/tb_mesh_top.sv --top-module tb_mesh_top
./obj_dir/Vtb_mesh_top
```

(List `noc_pkg.sv` first, or use a file list with the package before its users.)

`tb_mesh_top` runs the default 4×4 mesh end to end, in four phases:

1. It waits for all 48 links to align.
2. It measures the zero-load latency corner to corner and checks it against `h·9+3`.
3. It sends uniform random unicast packets from all 16 nodes, checking every payload and
   destination at the sinks.
4. It switches to multicast mode, loads each router's table with the XY multicast tree of a
   fully connected (all-to-all) network, and checks that every node receives every other node's
   message exactly once.

It counts each mechanism and fails if one never happened: VC conflicts, switch conflicts,
credit stalls, multicast forks, bit slips and the mode switch. It runs in well under a second.

The sources of the testbenches are reference models, written apart from the RTL:

- an XY path walk for routes;
- queues for the FIFOs;
- a bit-level model for the SERDES.

# A 4x4 ×pipes-style network-on-chip in SystemVerilog

This is a packet-switched on-chip network. It connects up to 16 master cores
and 16 slave cores through a 4x4 mesh of switches. A core sees a plain OCP
bus port. Its network interface cuts each bus transaction into 38-bit flits
(flow-control units) and sends them along a route that the interface looks up
in its own table. Every link uses ACK/NACK flow control: the sender keeps each
flit until the receiver acknowledges it, and resends after a refusal. Because
of this, a link can be cut by any number of register stages (repeaters)
without extra flow-control logic. That is what lets long wires in a deep
sub-micron process run at a high clock rate.

The architecture follows the ×pipes NoC library as presented in a study of
NoC design in 65 nm technology. That study gives the building blocks, their
roles and some sizes:

- switches with output buffers, ACK/NACK flow control and arbitration;
- initiator and target network interfaces (NIs) speaking OCP 2.0;
- source routing from look-up tables in the NIs;
- pipelined links;
- an integer clock ratio between cores and network;
- 4x4 meshes, a 6x6 switch with 38-bit flits and 6-flit buffers.

It does not give the internal mechanisms. The flit layout, the retransmission
scheme, the arbitration policy, the OCP subset and the mesh tile are this
design's own. The section "Departures and open points" lists them.

## The blocks

| file | role |
|------|------|
| `rtl/xp_pkg.sv` | flit, link and OCP types; constants; the XY route function |
| `rtl/xp_out_buffer.sv` | output FIFO + ACK/NACK retransmission store (one per link sender) |
| `rtl/xp_link_rx.sv` | receiving end of a link: sequence check, ACK/NACK answer |
| `rtl/xp_link.sv` | link with `STAGES` repeaters each way |
| `rtl/xp_switch.sv` | NIN x NOUT wormhole switch, output buffered, round-robin |
| `rtl/xp_ni_initiator.sv` | OCP slave port for a master core → request packets; responses back |
| `rtl/xp_ni_target.sv` | request packets → OCP master port on a slave core; responses back |
| `rtl/xp_fifo.sv` | small FIFO used for the NIs' receive side |
| `rtl/xp_mesh.sv` | top: ROWS x COLS tiles, each a 6x6 switch + initiator NI + target NI |

## A transaction end to end

A master core on tile 3 issues a 4-beat read at address `0xC000_0100`:

1. **Initiator NI (tile 3).** The top 4 address bits name the target tile,
   12. The NI reads route 12 from its table. It then pushes two flits into its
   output buffer: a head flit (route, command RD, its own id 3, burst
   length - 1 = 3) and an address flit marked tail. Then it accepts the OCP
   command.
2. **Switches.** Each switch reads the low 3 bits of the head's route field as
   its output port. It forwards the head with the field shifted right by 3
   bits, so the next switch again finds its port in the low bits. The route
   from tile 3 (column 3, row 0) to tile 12 (column 0, row 3) is W, W, W, S,
   S, S and then the target-NI port. That is seven switches.
3. **Target NI (tile 12).** It unpacks the head and the address, issues one
   OCP read with `MBurstLength = 4` to its slave, and sends back a response
   head flit. The route of that head comes from its own table, indexed by the
   initiator id 3. It then sends four data flits, the last one marked tail.
4. **Initiator NI (tile 3).** It turns each data flit into one OCP response
   (`SResp = DVA`, `SData`) toward the master.

A write sends the data in the request packet, one flit per beat. It gets back
a single one-flit DVA packet once the slave has accepted the last beat.

## Flits and packets

A flit is 38 bits: `{head, tail, payload[35:0]}`.

| flit | payload |
|------|---------|
| head | `route[35:15]` (7 hops x 3 bits, first hop lowest), `cmd[14:12]` (MCmd of a request; SResp of a response), `src[11:8]` (sender's tile id), `len[7:4]` (burst length - 1), `[3:0]` reserved |
| body | `be[35:32]` byte enables, `data[31:0]` (the address, a write beat or a read beat) |

| packet | flits |
|--------|-------|
| write request | head, address, N data flits (last = tail) |
| read request | head, address (tail) |
| write response | one flit, head and tail |
| read response | head, N data flits (last = tail) |

So 38 bits hold a 32-bit core word, its byte enables and the two framing
bits. The link adds `valid`, a 3-bit sequence number and, backwards, `ack`
and `nack`. These are the structs `link_fwd_t` (42 bits) and `link_bwd_t`
(2 bits).

## ACK/NACK flow control

This is the part that makes the rest work. Each link has an
`xp_out_buffer` at its sending end and an `xp_link_rx` at its receiving end.
The receiver has no buffer of its own. In the cycle a flit arrives, the
receiving logic either takes it (ACK) or refuses it (NACK). A switch refuses
when:

- the output buffer the flit is heading for is full;
- that output is locked to another packet;
- the flit lost arbitration to another head flit.

**Sender.** The output buffer is a circular store of `DEPTH` flits with
three pointers:

- `wr_ptr`: the next free slot;
- `send_ptr`: the next flit to put on the wire;
- `ack_ptr`: the oldest flit not yet acknowledged.

A slot is freed only when its flit is acknowledged. Responses come back in the
order flits were sent. So each response that counts belongs to the flit at
`ack_ptr`:

- **ACK:** advance `ack_ptr` and free the slot.
- **NACK:** move `send_ptr` back to `ack_ptr`, and resend from there
  (go-back-N).

**Stale flits.** When a NACK arrives, flits sent after the refused one may
still be on the link. These are stale flits, and the receiver must not take
them out of order. Every flit therefore carries a 3-bit sequence number,
assigned when it is pushed. The receiver takes a flit only when its number is
the one it expects next. So after a refusal it refuses everything until the
resent flit arrives. The sender knows how many flits were in flight at the
NACK (`inflight`) and drops that many responses (`ign_cnt`). All of them are
NACKs; an assertion checks this. Three bits are enough because at most
`DEPTH = 6` flits can be outstanding.

**Round trip.** Nothing in this scheme depends on how long a response takes,
as long as responses arrive in order. A repeater is a register on the forward
path plus one on the backward path. It lengthens the round trip and nothing
else. With a round trip shorter than `DEPTH` cycles, a buffer still sends one
flit per cycle. The testbench checks this with no repeater and with one
repeater each way.

**Cost of a refusal.** A refusal costs bandwidth: the refused flit and
everything sent after it go again. Under heavy load, a share of link cycles
carries flits that are refused. The mesh tests count these events (refusals,
retransmissions) and report them.

## The switch

`xp_switch` has no input buffers. Each output port has its own
`xp_out_buffer`, and a flit goes straight from an input link into the output
buffer it is routed to.

- **Wormhole lock.** An output that takes a head flit stays locked to that
  input until the packet's tail passes, so packets never interleave. The input
  remembers the port of its current packet for the body and tail flits.
- **Arbitration.** Several head flits may want the same free output in one
  cycle. A round-robin pointer per output picks one, and the others get a
  NACK. The pointer moves past the winner.
- **Timing.** The accept/refuse decision is combinational in the arrival
  cycle, and the accepted flit leaves from the output register the next cycle.
  So an unloaded switch adds one cycle.

The defaults (`NIN = NOUT = 6`, `DEPTH = 6`) are the mesh tile's switch. The
module builds any port count. Ports must be numbered below 8, because the
route field is 3 bits per hop.

## Network interfaces and the core clock

The network and every core share one clock, `clk`. A core may run at `clk`
divided by an integer. The tile's `ocp_en` input is high in the `clk` cycle
that ends each core clock period. The NIs sample OCP inputs and change OCP
outputs only in those cycles, so a core clocked by the divided clock meets
them on its own edges with no synchroniser. Tie `ocp_en` high for a core at
full speed. The network side of an NI runs every cycle.

OCP subset (both NIs):

- commands: `MCmd` IDLE / WR / RD, with `MAddr`, `MData`, `MByteEn`;
- `MBurstLength` 1 to 16, incrementing; a write burst gives address and data
  on every beat;
- `SCmdAccept`, `SResp` (NULL / DVA / ERR), `SData`, `MRespAccept`.

On the master side writes are non-posted: one DVA per burst. On the slave side
writes are posted, with no response expected. Each NI handles one transaction
at a time.

## The mesh

Tile `t` sits at column `t % 4` and row `t / 4`, with row 0 on the north side.
Switch ports are numbered 0 N, 1 E, 2 S, 3 W, 4 initiator NI, 5 target NI.
Ports on the mesh edge are tied off.

At elaboration, `xy_route` in `xp_pkg` fills every NI's route table with XY
routes: first along the row, then along the column. XY routing on a mesh
cannot deadlock through routing. Requests and responses use separate NIs at
each end, but they share switch buffers. Random all-to-all traffic in
simulation has not deadlocked, but that is not a proof.

Address map: `MAddr[31:28]` is the target tile. The remaining bits go to that
tile's slave unchanged.

## Timing summary

| quantity | cycles of `clk` |
|----------|-----------------|
| switch, unloaded | 1 |
| link | `STAGES` (1 by default; 0 in the mesh by default) |
| head flit, initiator NI output → target NI input, no congestion | switches on the path + (inter-switch links) x `LINK_STAGES` |
| corner to corner in the 4x4 mesh (tile 0 → tile 15) | 7 at the defaults, 13 with `LINK_STAGES = 1` |
| buffer throughput | 1 flit per cycle while the link round trip is below `DEPTH` |

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `xp_mesh` | `ROWS`, `COLS` | 4, 4 | mesh size; `ROWS + COLS - 1 <= 7` and at most 16 tiles |
| `xp_mesh` | `DEPTH` | 6 | flits per output buffer |
| `xp_mesh` | `LINK_STAGES` | 0 | repeaters on each switch-to-switch link |
| `xp_switch` | `NIN`, `NOUT`, `DEPTH` | 6, 6, 6 | ports and buffer depth |
| `xp_link` | `STAGES` | 1 | repeaters each way; the mesh sets it from `LINK_STAGES` |
| NIs | `ROUTE_LUT`, `MY_ID`, `RX_DEPTH` | set by the mesh; 4 | route table, tile id, receive FIFO depth |
| `xp_pkg` | `FLIT_W`, `MAX_HOPS`, `SEQ_W` | 38, 7, 3 | flit width, route length, sequence bits |

For a larger mesh, widen `MAX_HOPS` and `ID_W` in `xp_pkg`. Keep
`SEQ_W` large enough that `2**SEQ_W > DEPTH`.

## Departures and open points

Sizes and roles that follow the reference architecture:

- 4x4 mesh;
- 6x6 switch, 38-bit flits, 6-flit buffers;
- 32-bit core data;
- output buffering, ACK/NACK flow control and arbitration;
- source routing from NI tables;
- initiator and target NIs on OCP;
- repeaters as plain registers on links;
- integer core/network clock ratio.

This design's own choices:

- the flit layout;
- go-back-N with sequence numbers on the link;
- round-robin arbitration and the wormhole lock;
- the OCP subset, non-posted writes, one outstanding transaction per NI;
- the tile (one initiator and one target NI on a six-port switch);
- XY routes, the address map, reset behaviour.

The clock ratio is built as a clock enable. The two NI clock inputs of the
reference become `clk` plus `ocp_en`.

Not covered:

- The application-specific topologies (video decoders, DES encryption) cannot
  be wired, because their connectivity is unknown. Their links (one repeater
  stage at most) can be built. Their switches of 7x6 and 7x7 ports can be
  built too. The 9x9, 10x9 and 11x11 switches cannot: the 3-bit route field
  per hop allows at most 8 ports. Neither can the 21-bit flit of the smaller
  reference switch, which is narrower than a data word in this flit format.
- The 4x4 mesh holds the 19-core DES benchmark: 8 masters, 11 slaves.
  It does not hold the 26- or 38-core decoders.
- Throughput per master is bounded by the single outstanding transaction of
  the initiator NI. With the DES mapping in `tb_xp_mesh_des` (8-beat bursts,
  mostly to a memory on the master's own tile), each master sustains about
  0.38 data words per network cycle. The 180 MB/s per processor-memory flow
  quoted for that benchmark is 45 Mword/s, so this needs a network clock of
  about 120 MHz. The custom DES network of the reference ran at 50 MHz.
  Closing that gap would need several outstanding transactions per NI, with
  tags to match responses.
- Cores, memories, clock tree, power grid and clock-gating cells are outside
  the RTL. Buffer storage loads only on a push, so a synthesis tool can gate
  its clock.

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/xp_pkg.sv tb/tb_xp_mesh.sv --top-module tb_xp_mesh
./obj_dir/Vtb_xp_mesh
```

Swap in the testbench you want:

| testbench | what it does |
|-----------|--------------|
| `tb_xp_out_buffer` | random refusals through links of 0 to 2 cycles each way; order, no loss, no duplicates; full rate with 0 and 1 repeaters |
| `tb_xp_link` | exact delay of 0, 1, 2 repeater stages in both directions; reset |
| `tb_xp_switch` | six senders and six refusing receivers; whole packets, right port, route shifted, no interleaving, per-pair order, 2-cycle unloaded latency, contention and refusals seen |
| `tb_xp_ni_initiator` | random write and read bursts from an OCP master; packet contents, route from table, response data, OCP changes only on core edges; core clock 1/1 and 1/3 |
| `tb_xp_ni_target` | random request packets; memory contents after writes with byte enables, read data, response routes; slave stalls; core clock 1/1 and 1/2 |
| `tb_xp_mesh` | all 16 tiles at once, 40 random bursts each, one repeater per link, every read checked; corner latency 13 cycles; counts refusals, contention, retransmissions, bursts, long paths, divided clocks |
| `tb_xp_mesh_full` | the same traffic (60 per tile) on the mesh at its default parameters; corner latency 7 cycles |
| `tb_xp_mesh_des` | DES-like mapping at default parameters: 8 masters with private memories on their own tiles and 3 shared slaves; reads checked; reports the sustained words per cycle and the clock that 180 MB/s per master needs |

`tb_xp_mesh_traffic` holds the master and memory models shared by the three
mesh benches. Each master writes only its own slice of every memory, so it
can predict every read.

Simulate with two-state semantics. Everything that is read is reset or
initialised, so no X values are needed. All randomness uses `$urandom`.

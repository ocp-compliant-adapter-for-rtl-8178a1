# Slave network adapter: OCP cores on a virtual-channel network-on-chip

A processor or other master IP core speaks OCP: it issues a read or write
with `MCmd`/`MAddr`/`MData`, waits for `SCmdAccept`, and later receives
`SResp`/`SData`. A network-on-chip moves packets of 17-bit flits over
virtual channels (VCs). This adapter sits between the two. It turns each OCP
request into a source-routed packet on one of eight output VCs. It turns the
response packets that come back on eight input VCs into OCP responses.

The network offers two kinds of service, and the adapter handles both:

- **Best effort (BE).** Packets carry a route header and travel on the
  lowest-priority VCs.
- **Guaranteed service (GS).** The core first asks a central network
  controller for a connection. The answer names a dedicated VC, and the
  adapter stores it in a Connection ID Table. GS requests then carry no
  header and go out on that VC, until the core tears the connection down.

The adapter is the *slave* kind: it is an OCP slave facing a master core. It
sends requests and receives responses. The RTL is synthesizable
SystemVerilog with a single clock and a synchronous active-low reset.

## Block structure

```
            OCP master core
   MCmd/MAddr/MData/MFlag/MReqInfo   SCmdAccept, SResp/SData/SDataInfo
                  |                          ^
                  v                          |
             +----------------------------------+     +-----------------+
             | req_e2e  request FSM | resp FSM  |<----| decap           |
             +----------------------------------+     |  priority_      |<-- in_empty[8]
               | enc_msg   | dest_sba  | table write  |  scheduler      |--> in_get[8]
               |           v           v              |  + assembly     |<-- in_flit[8]
               |   route_lookup   conn_id_table       |  + decode       |   (through
               |   _table         (16 x 32)           +-----------------+  input_port_mux)
               v           |           | inj_id
             +-----------------------------+
             | encap  (packetize, pick VC) |
             +-----------------------------+
               | packet, out_ch_sel, packet_sent        ^ hold[8]
               v                                        |
             +-----------------------------+   load[8]  |
             | queue_control               |------------+
             +-----------------------------+   ready[8]
               v  8 x output_queue (one packet each)  --> out_flit[8], out_put[8]
                                                      <-- out_full[8]
```

| Module | Role |
|---|---|
| `na_pkg` | Flit/packet types, packet type codes, OCP codes, message structs, XY route function |
| `req_e2e` | OCP slave side. Request and response state machines, request-type decoding, table accesses |
| `encap` | Builds the packet for a request and chooses the output VC |
| `queue_control` | Hands a packet to the chosen output queue when that queue is free |
| `output_queue` | One per output VC. Holds one packet and puts one flit per cycle while the VC is not full |
| `decap` | Input side. Contains the scheduler, assembles flits into packets, and decodes them |
| `priority_scheduler` | Chooses the input VC to read next (see below) |
| `input_port_mux` | 8:1 flit multiplexer driven by the scheduler |
| `conn_id_table` | 16 × 32-bit table of GS injection channels. Reads and writes can happen in the same cycle |
| `route_lookup_table` | Destination core → 16-bit source route |
| `slave_na` | Top level that wires everything together |

## Packets

A flit is 17 bits: bit 16 marks the last flit of a packet, and bits 15:0
carry the content. Every packet type has a 3-bit code. Bit 0 of the code
distinguishes responses from requests.

| Code | Packet | Flits |
|---|---|---|
| 000 / 001 | GS setup request / response | 8 / 9 |
| 010 / 011 | GS teardown request / response | 6 / 5 |
| 100 / 101 | BE request / response | 6 for a write, 4 for a read / 7 |
| 110 / 111 | GS request / response | 5 for a write, 3 for a read / 3 |

**BE header (4 flits).** Setup, teardown and BE packets start with this
header. GS packets have none.

| Flit | Content |
|---|---|
| 0 | Route path: 8 hops of 2 bits, first hop in bits 1:0 |
| 1 | Address bits 15:0 |
| 2 | `{MCmd[15:13], T/S[12], source core SBA[11:4], 0000}` |
| 3 | Address bits 31:16 |

**How a receiver tells the types apart.** The header does not carry the
type code. Instead:

- `MCmd = 000` marks a response.
- Address bits 23:8 equal to `FFFD` mark traffic for the adapter itself, i.e.
  setup and teardown.
- Among those, `MCmd` RD means setup and WR means teardown on requests. The
  T/S bit tells them apart on responses.

**Payloads after the header:**

- **Setup request:** MData low/high, then MFlag low/high.
- **Setup response:** `{SResp, 0}`, then SDataInfo low/high, then SData
  low/high. SData holds the injection IDs: outgoing VC in bits 7:4, incoming
  VC in bits 3:0.
- **Teardown request:** MFlag low/high (the connection ID).
- **Teardown response:** `{SResp, 0}` as the last flit.
- **BE request:** MData low/high for writes. A read ends on header flit 3.
- **BE response:** `{SResp, R/W, 0}`, then SData low/high.

**GS packets:**

- **GS request:** `{MCmd, connection ID byte, 00000}`, MAddr low/high, and
  MData low/high for writes.
- **GS response:** `{000, SResp[12:11], R/W[10], 0}`, then SData low/high.

R/W = 1 marks the answer to a read.

## OCP side: request types and the two state machines

`MReqInfo` selects the service, and `MCmd` qualifies it:

| MReqInfo | MCmd | Request |
|---|---|---|
| 00 | any | BE request to the core named by `MAddr[31:24]` |
| 01 | RD | GS setup. `MAddr` = target core with page `FFFD`; `MData`/`MFlag` are forwarded to the network controller |
| 10 | any | GS request on connection `MFlag` |
| 11 | WR | GS teardown of connection `MFlag` |

Other combinations are sent as BE requests. Setup and teardown packets go to
the network controller (parameter `NC_SBA`). The adapter's own address
(`MY_SBA`) goes into every BE header as the source core.

**Request and response are handled by two independent state machines**, so
the core can issue new requests while earlier ones are still in the network.

- **Request FSM: IDLE → REQUEST_RECEIVED → PACKAGED.**
  - A non-idle `MCmd` raises `request_phase` to the encapsulation unit.
  - `SCmdAccept` is raised for one cycle only after the packet has been handed
    to an output queue.
  - So when the output VCs are congested, the core is stalled by a withheld
    `SCmdAccept`.
  - The core must hold its request signals until then.
- **Response FSM: IDLE → RESPONSE_RECEIVED.**
  - It drives `SResp`/`SData`/`SDataInfo` for exactly one cycle.
  - The master must accept it in that cycle (`MRespAccept` high); an assertion
    checks this.
  - What it presents depends on the response type:

| Response | SData | SDataInfo | Connection ID Table |
|---|---|---|---|
| Setup | Connection ID on success, the packet's SData on failure | From the packet | Entry written with the injection IDs on success |
| Teardown | Connection ID | 0 | Entry cleared on success |
| BE | Read data | `{source SBA, 24'h0}`, so the core can match out-of-order responses | — |
| GS | Read data | 0 | — |

Success means `SResp = DVA`.

The connection ID's low 4 bits are the Connection ID Table address. Example:
the network controller answers a setup with ID `0x00FFFD13` and SData `0x53`.
Entry 3 then becomes `0x53`, and GS requests with `MFlag = 0x00FFFD13` go out
on VC5. A cleared entry sends GS traffic on VC0, the best-effort VC.

## Output side: packetizing, VC choice and queues

`encap` runs the FSM INIT → IDLE → PACKETIZE → (AWAIT) → SEND.

- In PACKETIZE it builds the whole packet (up to 9 flits) in one cycle and
  chooses the output VC:
  - a GS request uses bits 7:4 of the Connection ID Table entry;
  - anything else uses the lowest-numbered best-effort VC whose `hold` bit is
    clear.
- If the chosen VC is held, it waits in AWAIT. For BE traffic it re-chooses
  every cycle there, so either BE VC that frees first is taken.
- SEND raises `packet_sent` for one cycle.

`queue_control` (INIT → IDLE → LOAD_QUEUE / AWAIT) loads the packet into the
chosen queue when that queue reports `ready`.

- Loading a queue sets its `hold` bit.
- A queue's `hold` bit clears once the queue is empty again.
- While it waits in AWAIT, every `hold` bit is raised. This keeps the
  encapsulation unit from handing over a second packet before the first is
  stored.

Each `output_queue` holds one packet. It puts one flit per cycle while its VC
is not `full` (`put = busy & !full`). It becomes ready after the flit with
bit 16 set has gone. One queue per VC means a blocked VC never blocks another.

## Input side: the priority scheduler

This is the least obvious part of the design. Eight input VCs can each hold
the head of a packet. The scheduler must pick which one to read, and then
stay on that VC until the packet's last flit (packets are never interleaved).
Each VC has a static priority level (parameter `VC_PRIO`):

| VCs | Level |
|---|---|
| 0, 1 | 0, best effort |
| 2, 3 | 1 |
| 4, 5 | 2 |
| 6, 7 | 3, highest |

The scheduler has three parts.

1. **Select Channel** (combinational, one decision per cycle).
   - Among the VCs that hold a flit and are not already chosen or being read,
     it takes the highest priority level that has any.
   - Within that level, it prefers VCs whose *tag* bit is clear. The tag marks
     VCs served recently.
   - Ties go to the lowest number.
   - When a VC is chosen, the tags of its level are cleared and its own tag is
     set. So two busy VCs of the same level alternate.
2. **Decision FIFO.** Each decision `{VC, level}` is queued (8 entries).
   - Decisions are therefore served in the order the packets *arrived*, not
     strictly by priority.
   - Priority only orders packets that became visible in the same cycle.
   - This keeps a steady stream on a high-priority VC from starving the rest.
   - A VC with a queued or current decision is not selected again, so the
     FIFO cannot overflow.
3. **FSM: INIT → KEEP ↔ CHANGE.**
   - INIT and CHANGE take the next decision from the FIFO, or the decision of
     the same cycle when the FIFO is empty.
   - KEEP raises `get` on the chosen VC whenever it is not empty.
   - The last flit (`packet_received`) moves it to CHANGE.

`decap` stores each flit taken into a packet array. With the last flit it
decodes the array plus the current flit:

- the level of the VC gives the format (level 0 = with header);
- the fields give the type (see Packets).

In the next cycle it raises `response_arrived` or `request_arrived` for one
cycle, with the decoded contents in `rx_msg`. The decoder recognises all
eight packet types. A slave adapter only acts on responses, so decoded
requests are brought out on `rx_req_valid`/`rx_req` for whatever sits beside
it.

## Routes

Every BE header needs a source route to the destination. The
`route_lookup_table` is fixed when the adapter is instantiated: the parameter
`ROUTES` has one 16-bit path per core. By default it is computed in
SystemVerilog by `xy_route_table(MY_SBA)`, using these rules:

- the network is a 5×5 mesh, and core `s` sits at `x = s % 5`, `y = s / 5`,
  with y growing southwards;
- routes go X first, then Y;
- hops are coded N = 00, E = 01, S = 10, W = 11, first hop in bits 1:0;
- unused hops are 00.

Example: from core 0 to core 12 (x = 2, y = 2) the route is E, E, S, S, which
is `0x00A5`. Sixteen bits allow 8 hops, which is why the mesh is at most 5×5.
Other topologies only need a different `ROUTES` value.

## Timing

All counts are in clock cycles. The request is presented in cycle 0, and m is
the packet length in flits.

| Event | Cycle |
|---|---|
| `request_phase` (REQUEST_RECEIVED) | 1 |
| PACKETIZE | 2 |
| SEND, `packet_sent` | 3 |
| `SCmdAccept`, queue loaded | 4 |
| first flit put | 5 |
| last flit put | m + 4 |
| next request can be presented | 5 |

On the response path, the first flit is taken in cycle t and the last in
t + m − 1. The decode strobe follows in t + m, and the OCP response appears
in t + m + 1. So the reverse latency is **m + 1**. Within a packet the input
side takes one flit per cycle. Between two packets the scheduler spends one
cycle in its CHANGE state, so back-to-back packets are taken one per m + 1
cycles.

**Departure from the reference design.** The design follows the state
machines of the original description cycle by cycle. That description also
quotes measured figures that those state machines cannot reach:

- one request every **4** cycles; this RTL gives 5;
- a forward latency of **m + 2**; this RTL gives m + 4;
- a reverse throughput of one packet per **m** cycles; this RTL takes
  back-to-back packets one per m + 1 cycles.

The reverse latency of m + 1 matches. Removing the gap would need, for
example:

- packetizing in the REQUEST_RECEIVED cycle;
- loading the queue in the SEND cycle;
- having the scheduler switch VCs on the last flit instead of through CHANGE.

That would change the documented handshakes, so it was not done. The
end-to-end testbench checks the numbers this RTL actually has.

## Choices made where the description is silent

- The VC priority map above, and the rule for choosing BE VCs.
- Reset values and style: a synchronous reset.
- `MY_SBA = 0x00` and `NC_SBA = 0x0C`.
- X-first (XY) routes in the default route table, with cores numbered
  y*5+x.
- Hop order in the route field: first hop in bits 1:0. The N/E/S/W codes
  themselves are the original ones.
- One packet per output queue.
- An 8-entry decision FIFO.
- Taking the same-cycle decision when the FIFO is empty.
- Reserved `MReqInfo`/`MCmd` combinations are sent as BE requests.
- A BE response always carries two SData flits.
- R/W = 1 means read.
- A failed setup returns the packet's SData.
- The response lasts one cycle, and the master must accept it at once.
- A Connection ID Table read in the same cycle as a write to that entry
  returns the old data.
- The Connection ID Table has 16 entries, as the address map requires. Eight
  output VCs can use at most 8 of them.

## Not included

The adapter's surroundings are ports of `slave_na`, and the testbench models
them:

- the clock-domain synchronizers between the clocked adapter and the
  clockless network, which provide the empty/get and full/put handshakes;
- the routing nodes;
- the network controller that grants connections.

Master and duplex versions of the adapter are not part of this design. They
would use a response-side flow-control unit, and an arbiter sharing the
tables between the two sides.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_slave_na rtl/na_pkg.sv tb/tb_na_util_pkg.sv tb/tb_slave_na.sv
./obj_dir/Vtb_slave_na
```

Replace `tb_slave_na` with any other testbench. `tb/tb_na_util_pkg.sv` builds
expected packets independently of the RTL. The testbenches:

- **`tb_slave_na`**: the whole adapter at its default parameters. The
  testbench plays three roles:
  - the master core;
  - the synchronizer FIFOs;
  - the network controller and remote cores.

  It covers the following:
  - BE write and read;
  - GS setup, success and failure;
  - GS read/write on the granted VC;
  - teardown, and the fall-back to VC0;
  - both BE VCs in use;
  - congestion, with `SCmdAccept` withheld and puts stalled;
  - input scheduling by priority, by arrival order and by the fairness tag;
  - back-to-back response packets (reverse throughput);
  - decoding of an incoming request.

  It checks every packet flit by flit and every cycle count in the timing
  table above. It counts each mechanism, and fails if one never happened.
- **`tb_priority_scheduler`**: directed cases for priority, arrival order,
  fairness and the get/empty rules. A random-traffic phase then checks that
  packets are never interleaved, that `sel_pri` is right, and that no packet
  is overtaken by one that became eligible 10 or more cycles later. (One
  decision per cycle across eight VCs bounds reordering to less than that.)
- **`tb_decap`**: random packets of all eight types on all VCs, alone and
  overlapping. Checks the decoded contents and the strobe timing.
- **`tb_req_e2e`**: random requests and responses against a reference model.
- **`tb_encap`**: every request type. Checks the packet contents, the VC
  choice, waiting on held VCs, and the cycle counts.
- **`tb_queue_control`**: random traffic against a reference model.
- **`tb_output_queue`**: random packets and random back-pressure.
- **`tb_conn_id_table`**, **`tb_route_lookup_table`**, **`tb_input_port_mux`**:
  small directed and random tests.

Parameters to adjust:

- `VC_PRIO`: priority of each VC.
- `MY_SBA`, `NC_SBA`: this core's address and the network controller's.
- `ROUTES` in `route_lookup_table`: one route per destination.
- The sizes in `na_pkg`: `NUM_VC`, `PKT_MAX`, `CID_ENTRIES`.

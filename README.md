# Logic-layer communication platform for memory-on-processor 3D stacks

When DRAM layers are stacked directly on a multiprocessor die, every processor tile gets its
own DRAM rank right above it. The bandwidth is there, but the logic layer must make it usable.
It has to carry requests from any processor to any rank. It must answer in the order the
processors expect. It should also keep each DRAM rank busy instead of waiting on row
activations.

This RTL builds that logic layer. It is a 4x4 mesh of tiles. Each tile holds:

* a 5-port virtual-channel **router**;
* a **network interface** (NI). The NI packs the processor's AXI requests into packets and
  unpacks them at the far side. It restores response order with a sequence-number **reorder
  unit**. A **direct local channel** lets requests to the tile's own rank skip the network;
* an **adaptive memory controller** for the rank above the tile. Reads and writes share one
  request table. A scheduler prefers row hits, then bank interleaving, then age.

The processors and the DRAM arrays themselves are not part of the RTL. Every tile's processor
AXI port and DRAM command/data pins are brought out at the top level.

## Mesh and packets

`logic_layer_top` instantiates 16 `ll_node` tiles. Tile number = `y*4 + x`. North is the
smaller y. Tile coordinates are input straps (`my_x`, `my_y`), so all tiles share one module.
Links at the mesh edge are tied off.

The 32-bit address selects the tile, and inside it the DRAM location:

| bits    | meaning                          |
|---------|----------------------------------|
| [31:30] | tile row y                       |
| [29:28] | tile column x                    |
| [27:15] | DRAM row (8192 rows)             |
| [14:13] | bank (4 banks)                   |
| [12:2]  | column (2048 words of 32 bits)   |

Each tile therefore owns 256 MB, and the whole stack 4 GB.

Flits are 32 bits plus head and tail flags. Every packet starts with a head flit:

| field        | bits | meaning                                        |
|--------------|------|------------------------------------------------|
| dst_x, dst_y | 2+2  | destination tile                               |
| src_x, src_y | 2+2  | requesting tile (responses go back there)      |
| resp         | 1    | 0 = request, 1 = response                      |
| write        | 1    | 0 = read, 1 = write                            |
| tid          | 4    | AXI transaction ID (T-ID)                      |
| sn           | 3    | sequence number (S-N) of this T-ID             |
| len          | 3    | burst length - 1 (1 to 8 words)                |
| bresp        | 2    | write response status                          |
| reserved     | 10   |                                                |

Packet shapes:

* read request = head, address
* write request = head, address, one flit per data word
* read response = head, one flit per data word
* write response = head only

Packets are therefore 1 to 10 flits long.

### Router (`noc_router`, `noc_input_channel`)

The router uses wormhole switching with 2 VCs per input port, each buffering 5 flits. Requests
always travel on VC 0 and responses on VC 1. A response can therefore never be blocked behind
the requests that are waiting for it, which rules out message-dependent deadlock.

Routing is dimension-ordered: X first, then Y.

The pipeline has four stages:

1. buffer write;
2. route computation on the head flit;
3. VC allocation;
4. switch allocation and crossbar traversal, into an output register.

So a head flit that meets no contention leaves the router 4 cycles after it arrives. Body
flits then follow one per cycle.

* **VC allocation.** A round-robin arbiter sits at each output VC. It hands out a free output
  VC of the packet's own class. The output VC stays held until the tail flit passes.
* **Switch allocation.** This is separable and round-robin at both stages. First, each input
  picks one of its VCs that has a flit and a downstream credit. Then each output picks one of
  the inputs that want it.
* **Flow control.** Each output VC keeps a credit counter. It starts at the downstream buffer
  depth (5). A credit comes back each time the downstream buffer frees a slot.

## Network interface (`network_interface`)

The NI joins three parties: the processor (AXI slave side), the local memory controller (AXI
master side) and the router's local port.

**Forward path.** Five AXI queues, each 8 deep, hold the incoming traffic:

* processor AR, AW and W;
* memory-controller R and B.

The packetizer picks between four sources round-robin:

* processor reads;
* processor writes;
* memory read data;
* memory write responses.

For a request, the address decoder finds the destination tile. The reorder unit then supplies
the S-N for the request's T-ID. A response copies its routing fields from the tag that came
with the request.

A packet whose destination is the tile itself goes into the **direct local channel** and never
enters the router. This applies to both local requests and responses to local requests.

**Reverse path.** The packet queue has four 8-flit FIFOs:

* network requests;
* network responses;
* local requests;
* local responses.

Network flits return credits to the router. The **detector** reads the response bit of each
head flit and sends the packet to one of two places:

* requests go to the memory-side depacketizer, which creates the controller's AR/AW/W;
* responses go to the reorder unit and then to the processor-side depacketizer, which creates
  R/B.

The detector locks onto one packet until its tail has passed, so packets are never
interleaved.

### Reorder unit (`ni_reorder_unit`)

AXI requires that responses with the same T-ID come back in request order. The mesh breaks
this: two reads with the same T-ID sent to a near and a far tile can easily return in reverse
order. The reorder unit repairs the order with two small counter tables, each indexed by T-ID:

* `next_sn[tid]` is the S-N the next request will carry. The packetizer takes it when it
  builds the header.
* `exp_sn[tid]` is the S-N the processor must see next.

Each response at the unit's input is handled in one of three ways:

* **DIRECT.** The S-N equals `exp_sn`. The packet streams straight to the processor-side
  depacketizer, and `exp_sn` advances.
* **STORE.** Any other S-N. The packet is copied into a free slot of the reorder buffer.
* **RELEASE.** After every delivered packet, the unit searches the buffer for a slot holding
  the now-expected S-N of its T-ID. If one exists, it is streamed out before any new input is
  looked at. This can repeat.

The buffer is 48 words: 6 slots of 8 words, one slot per packet.

The NI lets at most 6 requests be outstanding (`can_issue`). Every early response is
therefore guaranteed a slot, so the unit can never block with a full buffer. Writes take part
in the same numbering, so write responses are ordered the same way.

Each packet costs one decision cycle. After that, one flit moves per cycle.

## Adaptive memory controller (`adaptive_mc`)

There is one controller per tile, clocked with the processor (1.2 GHz in the intended
system). It has three parts:

* AXI request and response queues toward the NI;
* the controller unit;
* the physical interface.

### Controller unit (`mc_ctrl_unit`)

Instead of one queue per bank, reads and writes share one 8-entry **request table**. Each
entry holds:

* valid, read/write, address, length;
* the routing tag from the NI;
* a 4-bit saturating age;
* the head pointer of its write data.

Write data goes into an 8-word **linked-list buffer** (`mc_write_buffer`). Each word stores
the pointer to its successor, and words are freed as they are written to DRAM.

Requests are admitted only under these conditions:

* a write only when its whole burst fits in the free words;
* a read only when the read-data queue can take all its words, counting words already
  promised to reads in flight.

Because of these reservations, the DRAM side never has to stall on a full response queue.

Each cycle, every entry works out its next command from its bank's state:

* open row equal to its own row: RD or WR;
* bank closed: ACT;
* another row open: PRE.

Per-bank counters enforce tRCD, tRAS, tRP and the write-to-precharge time. An entry whose
command may issue now is a candidate.

A PRE is held back while another entry still hits the open row, because closing the row would
waste those hits. A request that has reached maximum age overrides this hold.

The **scheduler** (`mc_scheduler`) picks one candidate in this order:

1. the oldest row hit;
2. otherwise the oldest request to a bank other than the one used last (bank interleaving);
3. otherwise the oldest request.

Each time a request enters the table, all entries already there grow one year older. This
ageing prevents starvation.

A burst leaves as a single RD or WR to the physical interface. The entry is freed when the
last word has gone out.

### Physical interface (`mc_phy_if`)

The physical interface has four parts:

* **Memory mapping** splits the address into bank, row and column.
* **The command generator** encodes ACT/RD/WR/PRE onto CS#, RAS#, CAS# and WE#. It puts the
  row or column on the multiplexed address pins.
* **The sequencer** expands a burst into one column command per word. Write data is driven one
  cycle after its WR.
* **The response path** registers returning read words.

The data path is single data rate, one 32-bit word per clock. There are no strobes, DLL or
PLL.

### Timing

The defaults are the true-3D stacked DRAM figures at 1.2 GHz, rounded up to whole cycles:

| parameter | time    | cycles |
|-----------|---------|--------|
| tRCD      | 8.1 ns  | 10     |
| tCAS      | 8.1 ns  | 10     |
| tWR       | 8.1 ns  | 10     |
| tRP       | 8.1 ns  | 10     |
| tRAS      | 24.3 ns | 30     |

For conventional or planar-stacked DRAM (12 ns and 36 ns), override `TRCD/TRP/TWR = 15` and
`TRAS = 44` on `adaptive_mc`. The DRAM model also needs `TCAS = 15`. `tb_adaptive_mc_planar` runs the controller test this way.

An isolated read to a closed bank returns its first word about tRCD + tCAS cycles after the
request reaches the controller. Each further word follows one cycle later.

## Parameters

Shared constants live in `ll_pkg`:

| constant                    | value                          |
|-----------------------------|--------------------------------|
| mesh                        | 4 x 4                          |
| flit width                  | 32 bits                        |
| VCs per port                | 2                              |
| VC buffer depth             | 5 flits                        |
| T-ID                        | 4 bits                         |
| S-N                         | 3 bits                         |
| burst length                | 1 to 8 words                   |
| NI and controller queues    | 8 x 32 bits                    |
| reorder buffer              | 6 outstanding requests x 8 words |
| banks per rank              | 4                              |
| DRAM timings                | see the Timing table above     |

Per-module parameters default to these values.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=<n> failures=<n>`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ll_pkg.sv tb/tb_logic_layer_top.sv \
          --top-module tb_logic_layer_top -o sim
./obj_dir/sim
```

| testbench              | what it exercises |
|------------------------|-------------------|
| `tb_noc_router`        | Random packets from all five inputs, checked for ordering and integrity per output; back-pressure from a stalled downstream; the 4-cycle head latency; credits all returned at the end. |
| `tb_network_interface` | Remote reads of one T-ID whose responses return in reverse order (must be parked and released); local reads and writes that must bypass the router; incoming remote requests turned into memory-controller transactions. |
| `tb_ni_reorder_unit`   | 300 rounds of 1 to 6 outstanding requests on random T-IDs, each answered in a random order with random input gaps and output stalls. Every packet must leave once, intact and in issue order per T-ID. Also checks the outstanding limit. |
| `tb_mc_scheduler`      | 20000 random request-table snapshots compared against a reference implementation of the three-step rule, including ties. |
| `tb_mc_write_buffer`   | Concurrent chain writing and chain walking/freeing against a reference model. Checks lowest-free allocation, links, data and the free count. |
| `tb_adaptive_mc`       | Isolated read latency; a four-request case where the scheduler must reorder (row hit first, bank interleaving); 16 random writes read back; zero DRAM timing violations. |
| `tb_adaptive_mc_planar` | The same test with planar-DRAM timings (15/44 cycles). |
| `tb_logic_layer_top`   | The full 4x4 platform at default parameters. Sixteen processor models run a uniform-random round, then a non-uniform round (70% of requests to a one-hop neighbour). Every word read is checked and every T-ID's order is checked. The run fails if any mechanism never occurred: out-of-order parking, release, local bypass, row-hit, bank-interleave and oldest-first picks, and VC back-pressure. It builds in about half a minute and simulates in seconds. |

`tb/dram_model.sv` is a behavioural model of one DRAM rank. It stores data sparsely and
returns read data tCAS cycles after RD. It counts every tRCD, tRAS, tRP and tWR violation.
`tb/proc_model.sv` stands in for a processor.

## Where this design makes its own choices

The following follow the source design:

* mesh size, flit width, VC count and depth;
* XY wormhole routing and round-robin switch allocation;
* the NI's block structure and its direct local channel;
* the S-N/T-ID reorder scheme and its 48-word buffer;
* the shared request table, ageing and the three-step scheduling rule;
* linked-list write data;
* queue sizes and DRAM timings.

The following are this implementation's own:

* header layout, packet shapes and address map;
* credit flow control and the router pipeline depth;
* the outstanding-request limit that guarantees reorder-buffer space;
* splitting the packet queue per class and local/network;
* the PRE hold rule;
* the read-side reservation. Read data comes back from the DRAM in command order, so the read
  buffer is a FIFO rather than a linked list.

Not built:

* DRAM refresh;
* the double-data-rate data path with its strobes, DLL and PLL;
* the processors and the DRAM arrays;
* the first-come-first-served controller that the adaptive one is usually compared against.

Known limitations:

* Only incrementing bursts of 32-bit words are supported. AXI is reduced to valid/ready
  channels carrying id, address, length, data and last.
* Bursts must not cross a DRAM row.
* Assertions check FIFO overflow and write-buffer allocation. Synthesis tools ignore them.

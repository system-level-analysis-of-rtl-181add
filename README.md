# Network interface and mesh NoC for a hierarchical MPSoC

This is SystemVerilog RTL for the network level of a hierarchical multiprocessor. Small clusters of CPUs share an
AXI interconnect. The clusters are tied together by a packet-switched 2D-mesh network-on-chip (NoC). The
main part is the **network interface (NI)** that joins each cluster to its router. The NI does more than
convert bus transactions into packets. It works as a DMA engine for channel-based streaming software:

* A sending CPU fills a buffer in its own local memory. It then hands the NI a single pointer.
* The NI reads the buffer, streams it through the mesh, and writes it straight into a CPU memory in the
  destination cluster.
* Software sees only buffers and mutexes. No CPU copies data to or from the network.

The architecture follows the paper *System-Level Analysis of Network Interfaces for Hierarchical MPSoCs*
(CoreVA-MPSoC). The paper describes the NI at block level. This RTL fills in the details it leaves open,
and this README marks which details are this design's own.

The default configuration is 8 clusters in a 4x2 mesh. Each NI has a 256-entry SRAM look-up table of
receive channels. The paper evaluates this configuration as its best one.

## How one buffer travels

This sequence is the key to the whole design. Every mechanism in the RTL serves one of these steps.

1. **Open a receive channel (receiver side, once).** A CPU in the destination cluster writes LUT entry
   `flow_id` of its NI. The entry holds a `data_base` pointer (where the buffer goes) and a `mutex_ptr`
   (which word to set when the buffer is complete). The entry is written through the NI's AXI slave
   window at `0x8000 + 8*flow_id`, as the 64-bit value `{mutex_ptr, data_base}`.
   * In a *semi-static* scheme, each entry is written once at start-up.
   * In a *dynamic* scheme, the sender rewrites the remote entry before every buffer.
   * The hardware is the same for both schemes. How the dynamic scheme works with this hardware is
     described in the section "Re-targeting a channel remotely" below.
2. **Describe the transfer (sender side).** The sending CPU keeps a two-word channel descriptor in its own
   memory:

   | word | bits | field |
   |---|---|---|
   | 0 | 31:0 | buffer pointer (8-byte aligned) |
   | 0 | 47:32 | length in 64-bit words (0 = acknowledge only) |
   | 1 | 7:0 / 15:8 | destination cluster x / y |
   | 1 | 31:16 | flow ID at the destination NI |
   | 1 | 63:32 | local mutex pointer, set when the buffer has been read (0 = none) |

3. **Post the request.** The CPU writes the descriptor pointer to the NI register `SEND` (offset `0x0`).
   * The pointer goes into the send FIFO, so several CPUs can post at once without waiting.
   * If the FIFO is full, the write response is held back until there is room.
4. **Send.** Send Control takes the requests in order.
   * It reads the descriptor with one 2-beat burst.
   * It then reads the buffer with INCR bursts of up to 16 beats. No burst crosses a 4 KB boundary.
   * Each returned 64-bit beat leaves at once as one flit.
   * Bursts are requested ahead of the data. With a memory that answers every cycle, **one flit leaves per
     clock cycle**.
   * After the last beat, Send Control writes `1` to the local mutex. This tells the sending CPU that its
     buffer is free again.
5. **Route.** Each flit is routed on its own, X first and then Y. Each router adds two cycles. All flits of
   a buffer take the same path, so they stay in order. Flits of *different* buffers may interleave.
6. **Receive.** Recv Control handles every flit on its own, so interleaving does no harm.
   * It looks up the flit's flow ID in the LUT.
   * It writes the payload to `data_base + 8*offset`. The offset travels in the flit header.
   * After the flit marked `last`, it writes `1` to `mutex_ptr`. This write is a **fence**: the master port
     issues it only when every earlier data write has been acknowledged. The AXI interconnect may answer
     writes to different memories out of order. Without the fence, the receiving CPU could see the mutex
     before the data.
7. **Acknowledge.** When the receiving CPU has consumed the buffer, it may post a descriptor of length 0.
   The NI then sends a single SYNC flit. That flit sets the mutex of a channel at the original sender, which
   lets the sender know the remote buffer is free again.

The protocol between CPUs (double buffering, when a CPU may write which buffer) is software. The hardware
only guarantees that data come before their mutex.

## Re-targeting a channel remotely

In the dynamic scheme, a sender borrows a receive channel for a single buffer. It must first point the
receiver's LUT entry at the right buffer and mutex. The NI has no special packet for this. It works if
the receiving cluster's interconnect also maps the NI's own register window for the NI's master port:

1. At start-up, the receiver sets up a *configuration channel*. Its `data_base` is the address of the LUT
   entry to be re-targeted, in the NI's own window. Its `mutex_ptr` is a word in local memory.
2. The sender sends a one-word buffer `{mutex_ptr, data_base}` on that channel. Recv Control writes the
   word through the master port and the interconnect into the NI's own slave port. This rewrites the
   LUT entry. The fenced mutex write follows once the LUT write has been acknowledged.
3. The receiving CPU sees that mutex and acknowledges with a zero-length request (a SYNC flit).
4. Only then does the sender post the data buffer on the re-targeted channel.

Without step 3, the LUT write could still be on its way through the interconnect when the first data
flit looks up the entry. `tb_dynamic_channel` runs this sequence three times, with the interconnect
modelled in the testbench.

## Flit format

A flit is a 29-bit header plus 64 bits of payload (`noc_pkg::flit_t`):

| field | bits | meaning |
|---|---|---|
| `dst_x`, `dst_y` | 2 + 2 | destination cluster (mesh of up to 4x4) |
| `flow_id` | 8 | receive channel at the destination NI |
| `kind` | 1 | `FLIT_DATA` or `FLIT_SYNC` (sets the mutex only) |
| `last` | 1 | last flit of the buffer |
| `offset` | 15 | word index of this flit in the buffer |

The paper gives the per-flit header, the flow ID and the 64-bit payload. It also gives the header size: 24
bits with 8 channels and 31 bits with 1024 channels, for a 4x4 mesh. These widths match that formula: the
header is 21 bits plus the flow-ID width. The meaning of the 17 bits besides coordinates and flow ID is this
design's choice.

To use more than 256 channels, raise `FLOW_ID_W` in `noc_pkg` and `LUT_ENTRIES` in `ni` together: 9 bits
for 512 channels, 10 bits for 1024 channels.

## The network interface (`ni`)

`ni` has four parts, as in the paper's block diagram:

| module | role |
|---|---|
| `ni_slave_ctrl` | AXI4 slave. Registers: `SEND` (0x0, write), `STATUS` (0x8, read), LUT entries (address bit 15 set). Single-beat accesses only. |
| `ni_send_ctrl` | Send FIFO (`sync_fifo`), descriptor and buffer reads, flit generation, local mutex write. |
| `ni_recv_ctrl` | Flow-ID LUT (`ni_lut`), per-flit data writes, fenced mutex writes. |
| `ni_master_ctrl` | AXI4 master. Send Control's read bursts pass straight through. Write requests from Send and Recv Control are arbitrated round-robin and issued one per cycle. It counts outstanding write responses and holds fence writes until that count reaches zero. |

The `STATUS` register has these bits:

* `[7:0]`: requests waiting in the send FIFO.
* `[8]`: Send Control is busy.
* `[9]`: Recv Control is busy.
* `[10]`: writes are in flight on the master port.

**LUT implementation.** The `LUT_SRAM` parameter selects how the table is built.

* `LUT_SRAM=1` (default) models an SRAM with a registered read. A flit's write request appears one cycle
  after the flit arrives.
* `LUT_SRAM=0` uses a register file with an asynchronous read. The request leaves in the same cycle: one
  cycle less, as in the paper.

The paper recommends registers only for small tables (about 8 entries). The SRAM model is a plain array.
For a chip you would replace it with a memory macro.

## Router and mesh (`noc_router`, `noc_mesh`)

The router has five ports: Local, North (y+1), East (x+1), South (y-1) and West (x-1).

* Each input has a FIFO, 4 deep by default.
* Each output has a round-robin arbiter and an output register.
* A flit is written into its input FIFO in the first cycle. It wins arbitration into the output register in
  the second cycle. That gives **2 cycles per router**, so an unblocked flit needs `2*(hops+1)` cycles from
  NI to NI.
* Links use valid/ready. `in_ready` depends only on FIFO occupancy, so no combinational path runs from one
  router back to another.

`noc_mesh` places router (x, y) at cluster index `y*NX + x`. Ports at the mesh edge are left unused.

The paper calls its NoC wormhole-routed, yet it also says that flits of different packets arrive at an NI
interleaved. This router routes and arbitrates every flit on its own and never reserves a path for a
packet. That matches the interleaving the NI is designed for. Routing algorithm, FIFO depth and arbitration
policy are not given in the paper.

## Top level (`coreva_mpsoc`)

`coreva_mpsoc` instantiates the mesh and one NI per cluster. The CPUs, their local memories and the cluster
crossbar are not part of this RTL, so for every cluster `i` the top brings out:

* `s_axi_req[i]` / `s_axi_rsp[i]`: the port where the cluster's CPUs reach their NI;
* `m_axi_req[i]` / `m_axi_rsp[i]`: the port where the NI reaches the cluster's memories.

The AXI channels are bundled in the structs `axi_req_t` (master-driven) and `axi_rsp_t` (slave-driven),
defined in `noc_pkg`. The bus is AXI4 with a 64-bit data bus, as in the paper. The NI decodes its slave
window with address bits [15:0]. Decoding the NI's base address is the job of the cluster crossbar.

| parameter | default | notes |
|---|---|---|
| `NX`, `NY` | 4, 2 | 4x2 mesh (the 4x2x4 configuration). `COORD_W=2` allows up to 4x4. |
| `LUT_ENTRIES` | 256 | receive channels per NI |
| `LUT_SRAM` | 1 | SRAM-style LUT |
| `SEND_FIFO_DEPTH` | 8 | send requests that can wait |
| `ROUTER_FIFO` | 4 | router input buffer depth |

## What is the paper's and what is not

These points follow the paper:

* the clusters on a 2D mesh with one router and one NI each;
* the NI's four parts and its AXI master and slave ports;
* the send FIFO, and requests that are only a pointer;
* the descriptor read before the data;
* one flit per cycle, with a 64-bit payload and a header that carries the flow ID;
* the flow-ID LUT that points to data and mutex, in SRAM or registers, with registers one cycle faster;
* 2-cycle routers;
* 256 channels in the main configuration.

These points are this design's own:

* the descriptor layout, the register map and the header fields besides destination and flow ID;
* the SYNC (acknowledge) flit and the local mutex write;
* the write fence and the mutex value `1`;
* XY routing, per-flit arbitration, the FIFO depths and the burst length.

Limits you should know about:

* A LUT entry must be written before its first flit arrives. The SRAM LUT is not reset.
* Receive buffers are limited to 32767 words by the 15-bit offset field.
* The slave port accepts one single-beat access at a time.
* There is no error reporting. An unconfigured flow ID writes wherever its stale entry points.

## Simulation

Each module has a self-checking testbench in `tb/` that ends with a `TB_RESULT checks=N failures=M` line.
`tb/tb_axi_mem.sv` is a behavioural AXI memory that stands in for the cluster memories. It can withhold
ready/valid at random to create back-pressure.

Example, for the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_coreva_mpsoc.sv --top-module tb_coreva_mpsoc
./obj_dir/Vtb_coreva_mpsoc +verilator+rand+reset+2
```

`tb_coreva_mpsoc` runs the whole 4x2 system with its default parameters. It sends:

* a 1 kB buffer, whose source crosses a 4 KB boundary;
* two 16 B buffers, one of them into the same receiver while the 1 kB buffer is in flight;
* an acknowledge back to the first sender.

It checks every word and every mutex. It also counts these mechanisms and fails if any never happened:

* flit interleaving at a receiver;
* NoC back-pressure;
* requests queued in the send FIFO;
* a SYNC flit;
* a fence that waited;
* a burst split at a 4 KB page boundary.

Timing is checked by the block testbenches:

* `tb_noc_router`: 2-cycle router latency.
* `tb_noc_mesh`: `2*(hops+1)` cycles through the mesh.
* `tb_ni_send_ctrl`: 128 flits in 128 consecutive cycles.
* `tb_ni`: one flit per cycle through a looped-back NI.
* `tb_ni_recv_ctrl`: SRAM against register LUT latency.
* `tb_ni_master_ctrl`: one write per cycle.

## Measured latency

`tb_transfer_latency` measures the best case on the full 4x2 system: memories that never stall and no
other traffic. It counts from the cycle the NI accepts the `SEND` write to the cycle the receiving
memory accepts the receive-mutex write.

| buffer | 1 hop, SRAM LUT | 4 hops, SRAM LUT | 1 hop, register LUT |
|---|---|---|---|
| 16 B (2 flits) | 18 cycles | 24 cycles | 17 cycles |
| 1 kB (128 flits) | 144 cycles | 150 cycles | 143 cycles |

The testbench checks these relations:

* 1 kB takes exactly 126 cycles more than 16 B.
* Each extra router adds 2 cycles.
* The register LUT saves exactly one cycle.

The paper reports 26 and 177 cycles for the same two transfers on the semi-static scheme. Its figures
cover the whole transfer including library code on the CPUs. The testbench checks that the hardware
part alone stays below them.

`tb_dynamic_channel` measures 61 cycles per 16 B buffer on the dynamic scheme. That is from the
configuration request to the receive mutex, with the testbench's CPUs answering at once. The paper
reports 148 cycles including software.

## Status

All testbenches pass. Only traffic patterns were simulated: no CPU software runs, so the streaming
benchmarks that the paper measures were not reproduced.

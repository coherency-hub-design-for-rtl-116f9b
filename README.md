# Zambezi: a snoop-broadcast coherency hub for four processor nodes

This is the RTL of a coherency hub. It ties four multithreaded processor nodes into one
cache-coherent shared-memory system. The nodes share no bus. Each node has a pair of serial
links to the hub, and the hub does four jobs:

- It broadcasts every cacheable request to the other three nodes as a snoop.
- It collects the three snoop answers and returns one consolidated answer to the requester.
- It serializes requests from different nodes to the same cache line, so that only one
  transaction per line is in progress at a time.
- It routes non-coherent traffic between nodes: programmed I/O, interrupts and their
  completions.

The physical address space is split into four independent coherence planes, using address
bits 13:12. Each plane has its own hub, and hubs do not talk to each other. One instance of
this design serves one plane.

The design aims at low latency. A request spends 4 clock cycles between entering the hub core
at the input port and leaving at the output port, against a budget of 6 cycles at 800 MHz.

## The pieces

```
          node 0..3 serial links (SerDes outside this RTL)
                 |  144-bit frames + CRC-24 + sequence number
        +--------v---------+   x4
        |  lpu (link port)  |  lfu_rx -> input_port -> ... -> output_port -> lfu_tx
        |   tsb scoreboard  |
        +---+----+-----+----+
   coherent |    | non-coherent        replies (snoop responses, I/O completions)
            v    v                      <----------- xconnect (4x4) ----------->
        +----------------------+        data chunks: input port -> destination
        | asu                  |        output port, one FIFO per source
        |  4+4 FIFOs, 96 CAM,  |
        |  768 pended entries, |
        |  coh/nc routers      |
        +----------------------+
        gpd: CSRs, error logs, reset sequencing, LPC slave for the service processor
```

| File | Block |
|---|---|
| `rtl/zmb_pkg.sv` | Shared package: sizes, packet struct, command codes, packing, CRC-24 |
| `rtl/zambezi.sv` | Top: four `lpu`, `asu`, `xconnect`, `gpd` |
| `rtl/lpu.sv` | Link port unit: `lfu_rx`, `input_port`, `tsb`, `output_port`, `lfu_tx` |
| `rtl/lfu_tx.sv`, `rtl/lfu_rx.sv` | Link framing: packing packets into frames, CRC, replay, retrain trigger |
| `rtl/input_port.sv` | Sorts received packets by kind |
| `rtl/output_port.sv` | Egress queues, weighted round robin, critical-first data, credits |
| `rtl/tsb.sv` | Transaction scoreboard: snoop-response consolidation |
| `rtl/asu.sv` | Address serialization unit |
| `rtl/asu_cam.sv` | 96-entry CAM of active line addresses, with a free list |
| `rtl/asu_pend.sv` | 96 linked lists of pended requests in a 768-entry store |
| `rtl/asu_coh_router.sv` | Broadcast of forwarded requests and the ack to the requester |
| `rtl/asu_nc_router.sv` | Non-coherent routing by destination node |
| `rtl/xconnect.sv` | Reply crossbar between ports |
| `rtl/gpd.sv`, `rtl/lpc_slave.sv` | Housekeeping block and its LPC I/O slave |
| `rtl/sync_fifo.sv`, `rtl/rr_arb.sv`, `rtl/pkt_xbar.sv` | FIFO, round-robin arbiter, packet crossbar |

## Packets and channels

Every packet is a `pkt_t` struct in the core. On the link it is one of three sizes, chosen by
its virtual channel:

| Channel | Length | Commands |
|---|---|---|
| request | 7 bytes | `RTS` (read to share), `RTO` (read to own), `WB` (writeback), `PIORD`, `PIOWR`, `INTR`, `FWD_ACK` |
| reply | 3 bytes | `SNP_RSP`, `CONS_RSP`, `NC_RSP`, `CREDIT` |
| data | 18 bytes | `DATA` (read return), `WDATA` (write data), and the same two with a data-parity-error flag |

The header holds these fields:

| Field | Width |
|---|---|
| command | 4 bits |
| source node | 2 bits |
| destination node | 2 bits |
| requester's tag | 8 bits |
| line address (request channel only) | 34 bits |
| snoop result (reply channel only) | 2 bits |
| chunk number (data channel only) | 2 bits |

A data packet carries one 16-byte chunk, so a 64-byte line takes four data packets. Chunks 0
and 1 are the critical first 32 bytes.

Payload parity errors are not fatal. A node marks a bad chunk by sending it with the
`DATA_PE` or `WDATA_PE` command. The hub forwards such a chunk like any other; it does not
compute payload parity itself.

The exact bit layout and command codes are this design's own. The packet sizes, the channels
and the chunking are not.

The coherence protocol is MOESI. A snoop answer is one of four values: miss, hit shared, hit
owned, or hit modified. A node holding the line in M or O supplies the data by sending its
chunks directly to the requester. They cross the hub on the data channel.

## Link framing (`lfu_tx`, `lfu_rx`)

The link carries 144-bit frames (18 bytes), each protected by a 24-bit CRC. The CRC polynomial
is 0x864CFB and starts at all ones.

**Sending.** The transmitter appends packets to a byte queue and cuts frames from it, so a
7-byte or 18-byte packet often straddles two frames. When traffic pauses, a frame is sent
part-full and its unused tail is zero bytes. Command 0 (NOP) marks the tail.

**Receiving.** The receiver appends good frames to its own byte queue. It reads packet lengths
from the command byte, and when it sees a NOP it skips to the next frame boundary.

**Pacing.** One frame leaves at most every two cycles. A frame is 14 lanes × 12 unit intervals
at 4.8 GT/s, which lasts 2.5 ns, two 800 MHz cycles.

**Replay.** Replay is go-back-N:

- Every frame carries an 8-bit sequence number, and the transmitter keeps the last 8 frames.
- The receiver rejects a frame that has a bad CRC, or that finds its queue full. It then
  asserts `replay_req` with the sequence number it expects.
- The far transmitter resends from that frame onward.
- Frames with other sequence numbers are dropped until the replay arrives.
- A replay request older than the kept window is a fatal `replay_err`.

**Retrain.** Four CRC errors within 1024 cycles pulse `retrain`. That is the trigger for the PHY
to retrain the link. Retraining itself, and retraining with a faulty lane removed, belong to the
SerDes and are not in this RTL.

The sequence number and the replay request travel as sideband signals next to each frame word.
This is a simplification of an in-band link protocol.

## Serializing coherent requests (`asu`)

This is the core of the hub. The ASU keeps four coherent and four non-coherent FIFOs, one of each
per port. Each FIFO holds 192 requests, so a request that has to wait never holds up the link
behind it (see "Departures" below). Each cycle the ASU can do one completion and one new
coherent request.

**New request.** The heads of the coherent FIFOs are served round robin. The address is looked up
in the 96-entry CAM of *active* lines:

- **Miss:** a free CAM entry is allocated (the free list is a bitmap with a priority encoder) and
  the request goes to the broadcast router.
- **Hit:** the request is *pended*. It is appended to the linked list belonging to that CAM
  entry, which keeps requests to one line in arrival order. It is not broadcast.

**Pended store.** A pended entry is addressed by (requester, tag), as `src*192 + tag`. Each of a
node's 192 tags has a fixed slot among the 768 entries, so the store needs no free list of its
own. An entry holds the command, a parity bit and a 10-bit next pointer. Per list the ASU keeps
a head pointer, a tail pointer and a non-empty flag.

**Completion.** When a transaction's scoreboard reports completion with its CAM index, the ASU
checks that entry's list:

- If the list is empty, the CAM entry is freed.
- Otherwise the head is *woken up*. It is reissued to the broadcast router with the address read
  back from the CAM, and the CAM entry stays allocated for it.

A wakeup has priority over a new miss at the router. A new request that hits the very entry being
completed in the same cycle waits one cycle.

**Broadcast (`asu_coh_router`).** In one step the router places a forwarded request into the
request queue of each of the other three ports, and a forwarded-request ack (`FWD_ACK`) into the
requester's queue. At the same time it opens the transaction in the requester's scoreboard. A
broadcast waits until all four ports can accept.

**The ordering rule.** Total store order requires one ordering guarantee. The ack for request A
must reach node N before any forwarded request that was serialized after A and is for the same
line reaches N. This design gets that by construction:

1. Acks and forwarded requests share one FIFO per output port.
2. Each output port drains that FIFO in order.

So nothing can overtake an ack. The end-to-end test checks the rule at every node on every
forwarded request.

**Latency.** A request that misses reaches the router outputs two cycles after it is offered to
the ASU. One register stage is the lookup, one is the router.

**Parity.** CAM entries and pended entries carry parity. An error is checked when the entry is
read and is reported as fatal.

**Non-coherent requests** skip the CAM. `asu_nc_router` sends them by destination node through a
4×4 crossbar with a round-robin arbiter per output.

## Snoop-response consolidation (`tsb`)

Each port has a scoreboard indexed by its node's tags. An entry opens when the ASU broadcasts
that node's request. Responses may arrive in any order and for any open tag. The entry counts
M, O and S hits.

When the third response arrives:

- The consolidated response goes to the node: M if any response is M, else O, else S, else miss.
- The CAM index goes back to the ASU as the completion.

Some answer combinations cannot occur in a correct system: two M hits, two O hits, or M together
with any other hit. Any of these raises a fatal snoop error. A response for a tag that is not
open raises a protocol error.

## Output port arbitration (`output_port`)

Each output port merges the following sources:

- forwarded requests and acks from the ASU;
- non-coherent requests;
- consolidated responses from its own scoreboard;
- replies from the cross connect;
- data chunks from every input port, one FIFO per source so that one line's chunks stay in order.

It sends one packet per cycle:

- **Weighted round robin over channels.** The current channel may send up to W_REQ, W_RPL or
  W_DAT consecutive packets (default 2, 2 and 4) before the turn moves on. Inside the request
  and reply channels, the two FIFOs alternate.
- **Critical first.** Among the data FIFOs, a head holding chunk 0 or 1 wins over heads holding
  chunk 2 or 3.
- **Credits.** There is one counter per channel, 16 at reset. Credits come back in `CREDIT`
  packets, whose tag byte carries {3-bit request, 3-bit reply, 2-bit data} counts. Requests,
  replies and write data spend a credit. Read-return data does not, because the requester
  reserved room for it when it asked. A channel with no usable credit is skipped. `stall_vc`
  shows which channels are blocked.

## Housekeeping (`gpd`, `lpc_slave`)

The service processor reads and writes 8-bit CSRs through LPC I/O cycles at 0x0800–0x08FF:

| Offset | Register |
|---|---|
| 00 | ID = 0xA5 |
| 01 | FATAL_STAT (sticky, write 1 to clear): bit 0 CAM parity, 1 pended parity, 2 snoop combination, 3 protocol, 4 replay |
| 02 | FATAL_PORT |
| 03 | FIRST_ERR (bit 7 valid) |
| 04 | CE_STAT: bit 0 CRC, 1 retrain, 2 receive overflow |
| 08–0B | CRC error count, ports 0–3 |
| 0C–0F | Retrain count, ports 0–3 |
| 10 | FATAL_EN (reset value 0x1F) |
| 11 | SCRATCH |
| 12 | CAM entries in use |
| 13/14 | Pended transactions, low and high byte |

**Error pins.** `err_fatal_n` is low while an enabled fatal error is logged. `sp_intr_n` is low
while any error is logged.

**Reset.**

- `por_n` and `wmr_n` are synchronised.
- The core stays in reset for 16 cycles after both are released.
- A warm reset (`wmr_n`) clears the core and keeps the error logs.
- A power-on reset clears everything.

In the intended system, the service processor answers a fatal error with a system-wide warm reset
and then reads the logs.

## Timing

Everything runs on one clock, meant for 800 MHz, with asynchronous active-low reset. This
includes the LPC slave, which in a real chip would sit in its own clock domain. Measured in the
end-to-end test, an uncontended miss takes 4 cycles from the input-port register to the output
port handing the packet to `lfu_tx`:

1. input port register
2. ASU FIFO, then lookup
3. router register
4. output-port queue

## Where this departs from, or goes beyond, the original description

- **SerDes/PHY and related parts are outside.** The 14-lane serial PHY, its DLL, the PLL and
  clock circuits, and JTAG are not included. The top brings each link out as parallel frame
  words.
- **Link-layer protocol details are this design's own:** the sideband sequence number and replay
  request, the CRC polynomial, the error-burst threshold and the 8-frame replay window.
- **Pended entries are wider.** They hold command, parity and a 10-bit next pointer, 15 bits in
  all. The original block diagram prints 8 bits per entry, which cannot hold a pointer into 768
  entries. The count of 768 entries is kept.
- **Buffering is sized in only one place.** The original hub is described as having room for
  every packet that can be in flight. Here only the ASU input FIFOs are sized that way: 192
  requests per port and class, one node's whole tag range. They hold only the 50 request bits,
  not the whole packet. This size is needed. If the FIFOs were shallow, a request waiting on a
  full CAM would stall its node's link. The snoop responses behind it on that link would then
  stall too, and those responses are what frees the CAM, so the hub would deadlock. The
  load test reproduces that deadlock with 8-entry FIFOs. The other queues are small, 4 to 8
  entries, and use back-pressure. They always drain, because nodes keep accepting packets and
  returning credits. A full link receive queue drops the frame and asks for a replay.
- **Non-coherent requests have their own queue** in each output port. They alternate with the
  queue of forwarded requests. In the original they share one request queue.
- **192 tags per node per hub** is an assumption (768 / 4). A node that sends more than 192
  outstanding requests into one plane is outside what this hub can track.
- **Assumed defaults, not given anywhere in the description:**
  - FIFO depths: 192 in the ASU, 8 in the output port, 4 in the scoreboard response queues;
  - arbitration weights 2/2/4;
  - 16 initial credits per channel;
  - all of the GPD register map and error classes.
- **Not implemented:**
  - CSR access from the nodes over the coherency links (only the LPC path exists);
  - PLL configuration;
  - retraining with a lane removed.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/zmb_pkg.sv tb/tb_zambezi.sv --top-module tb_zambezi
./obj_dir/Vtb_zambezi
```

Replace `tb_zambezi` with any other testbench. The package must come first on the command line.

| Testbench | What it shows |
|---|---|
| `tb_zambezi` | The full hub at its default sizes against four node models. See the list below. |
| `tb_zambezi_load` | The same checks under full load. See below. |
| `tb_lpu` | Every path through one link port, including consolidation and completion |
| `tb_asu` | Serialization against a reference model; 2-cycle latency |
| `tb_asu_cam`, `tb_asu_pend` | Lookup, allocate and free; list order, wakeup order and parity |
| `tb_asu_coh_router`, `tb_asu_nc_router`, `tb_xconnect` | Routing and back-pressure |
| `tb_tsb` | Consolidation results and illegal combinations |
| `tb_output_port` | WRR pattern, critical-first, credit stall and resume |
| `tb_input_port` | Packet sorting |
| `tb_lfu` | Packing and unpacking through a channel that corrupts frames; replay; retrain; frame rate |
| `tb_gpd`, `tb_lpc_slave` | CSR access over LPC, error logging, reset behaviour |

In `tb_zambezi` the four node models issue random RTS, RTO and WB requests to a few shared lines,
plus PIO reads, PIO writes and interrupts. The test keeps a MOESI directory in step with the
ASU's serialization order, so each node must give exactly the snoop answer the directory
predicts. It checks:

- consolidated results;
- cache-to-cache data contents;
- one active transaction per line;
- the ack ordering rule;
- the ≤ 6-cycle latency;
- CSR contents read back over LPC.

It also forces these cases:

- a port whose credits come back only rarely;
- four corrupted frames, which must cause replay and one retrain;
- an illegal double-M snoop, which must raise the fatal pin.

It fails if any of these mechanisms never happened: pending, wakeup, credit stall, critical-first
choice, WRR channel switch, CRC error, replay, retrain, non-coherent routing, fatal error.

`tb_zambezi_load` runs the same models under full load:

- Each node keeps up to 96 coherent requests outstanding. A processor may have 384 transactions
  in flight, and spread over four planes that is 96 per hub.
- The requests cover 256 lines.
- A node takes 150 cycles to answer a snoop.

At the peak about 400 requests are inside the hub. All 96 CAM entries are in use, new misses
stall on the full CAM, and every transaction still completes.

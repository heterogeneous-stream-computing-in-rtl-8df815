# An FPGA stream compute node over raw Ethernet

Stream computing splits an application into a chain of steps: filter, convert, compress and so
on. Each step can then run on whatever machine suits it: an X86 virtual machine, a GPU or a slice
of an FPGA. A central supervisor decides which node runs which step. It programs every node with
two small tables, and from then on the nodes pass the data along among themselves, much as
OpenFlow switches forward packets along routes that a controller installed.

This repository holds synthesizable SystemVerilog for the FPGA member of such a system. It
follows the FPGA compute node of the course project report *Heterogeneous Stream Computing in
SAVI* (C. Lo, 2013). The node:

* takes **control frames** that add entries to its two tables:
  * the **task table** maps a task ID to a procedure and a destination node;
  * the **node table** maps a node ID to an address type and an address;
* takes **data frames**. Each carries one fragment of a *compute package*, a unit of work such as
  a video frame that is larger than one Ethernet frame. The node reassembles the package;
* **acknowledges every frame** it accepts. Withholding an acknowledgement is the system's only
  flow control;
* once a package is complete, looks up its task, **runs the procedure** on it, and **forwards the
  result** to the next node, one fragment per frame. It waits for each fragment to be
  acknowledged before it sends the next.

One controller runs all of this in sequence. A frame is handled completely before the next one is
read. This keeps the logic small, and it is how the original FPGA node was organised.

## How a package travels through the node

```
           control frame ──► entries written to task table / node table ──► ACK
 rx stream ─┤
           data frame ──► input buffer (fragment placed by its number) ──► ACK
                                   │ all fragments present
                                   ▼
                     task table: task ID ─► procedure, destination node
                     node table: destination node ─► Ethernet address
                                   │
                                   ▼
                     compute engine: input buffer ─► procedure ─► output buffer
                                   │
                                   ▼
 tx stream ◄── fragment 0 ─► wait for its ACK ─► fragment 1 ─► wait ... ─► back to receiving
```

A task ID names a route through the system, not a single hop. Every node on the route holds an
entry for the same task ID that names the *next* node. A package therefore keeps its task ID from
node to node, and each node's own table steers it. The node table adds one level of indirection:
the route refers to node IDs, and only the node table knows how a node is physically reached.
Here a node is always reached by its 48-bit MAC address.

## Frame formats

All frames are raw Ethernet frames. Three EtherTypes distinguish them. Multi-byte fields are
big-endian. The frame stream is 64 bits wide, and byte 0 of a frame travels in bits [7:0] of the
first beat.

| bytes | data frame | control frame | acknowledgement |
|---|---|---|---|
| 0–5 | destination MAC | destination MAC | destination MAC |
| 6–11 | source MAC | source MAC | source MAC |
| 12–13 | `0x88B5` | `0x88B6` | `0x88B7` |
| 14–15 | task ID | opcode: 1 add nodes, 2 add tasks | copy of bytes 14–21 of the frame being acknowledged |
| 16–17 | fragment size (bytes) | number of entries | 〃 |
| 18–19 | fragment number (from 0) | reserved | 〃 |
| 20–21 | total fragments | reserved | 〃 |
| 22–25 | total package size (bytes) | reserved (22–23) | — |
| 26–27 | input ID (carried, unused) | — | — |
| 28–31 | reserved | — | — |
| 32– | payload | from byte 24: one 8-byte entry per beat | — |

* **Node entry** (8 bytes): node ID, address type (1 = Ethernet), 6-byte address.
* **Task entry** (8 bytes): task ID (2 bytes), procedure ID (2 bytes), destination node ID
  (1 byte), 3 reserved bytes.

The reserved bytes align two things to 8-byte beats: the payload of a data frame starts at beat
4, and control entries start at beat 3. A payload is cut at fixed `FRAG_BYTES` boundaries: fragment
*n* holds package bytes *n*·`FRAG_BYTES` onwards, and only the last fragment may be shorter.
`FRAG_BYTES` defaults to 1480, the 1500-byte Ethernet payload minus the 18-byte compute header,
rounded down to whole words. An acknowledgement is 22 bytes. The MAC outside this design pads it
to the Ethernet minimum. Frames longer than their fields need are accepted, so padding is
harmless.

The source describes which fields exist. These layouts, the EtherTypes and the opcode values are
this design's own. They all live in `rtl/savi_pkg.sv`.

## Acknowledgements and flow control

This part needs the most care when the node is connected to other equipment:

* An **accepted** data or control frame is acknowledged to its sender. The acknowledgement copies
  bytes 14–21 of the frame, which for a data frame are the task ID, size, fragment number and
  fragment count. A sender can therefore tell which fragment was acknowledged.
* The following are dropped **without** an acknowledgement. This is how the node holds back a
  sender:
  * a frame addressed to another MAC;
  * a frame that is too short;
  * a frame with an unknown opcode;
  * a fragment the input buffer refuses (package larger than the buffer, a fragment count that
    does not match the size, a fragment number out of range, a size that does not match the
    fragment's place);
  * a fragment of another package while the buffer holds a partly assembled one.
* While the node waits for the next node's acknowledgement, it reads incoming frames but acts
  only on acknowledgements. Data and control frames that arrive meanwhile are dropped
  unacknowledged, and their senders must send them again.
* A downstream acknowledgement must come from the destination's MAC address and echo this
  fragment's task ID and fragment number. Any other acknowledgement is ignored.
* A repeated fragment (its acknowledgement was lost) is written again and acknowledged again. It
  does not count twice.
* There is **no timeout**. If the downstream acknowledgement never comes, the node waits forever.
  The original system had the same property: the raw-Ethernet protocol is not robust to frame
  loss. Likewise, a package whose remaining fragments never come keeps the input buffer. The node
  then refuses every other package, and only a reset frees it.

The input buffer holds one package at a time. Once a fragment of a package has been accepted,
fragments of any other package (another task ID or size) are refused without an
acknowledgement until that package has been used. This is how a node keeps a second sender
waiting while its buffer is taken. A fragment that was checked but whose frame then failed does
not claim the buffer.

A package whose task has no task-table entry, or whose destination has no node-table entry of
type Ethernet, is acknowledged and then dropped.

## The controller

`node_ctrl` steps through these states:

| state | what happens | next |
|---|---|---|
| `RX` | receiver may take one frame; control entries are written as they arrive; accepted fragments are committed to the input buffer | `ACK` after a good data/control frame |
| `ACK`, `ACK_W` | send the acknowledgement, wait for it to leave | `LK_TASK` if the package is complete, else `RX` |
| `LK_TASK`, `LK_NODE`, `LK_CHK` | task-table lookup, node-table lookup, check | `COMP`, or `RX` (package dropped) |
| `COMP`, `COMP_W` | run the procedure; then free the input buffer and load the output fragment sequence | `FWD` |
| `FWD`, `FWD_W` | send the current fragment | `WAIT_ACK` |
| `WAIT_ACK` | receive, acting only on ACKs | `FWD` for the next fragment, `RX` after the last |

The `state` output of the top shows the state number in this order (`RX` = 0, `WAIT_ACK` = 10).

## Blocks

| file | block |
|---|---|
| `rtl/savi_pkg.sv` | shared types, field layouts, EtherTypes, opcodes, sizes |
| `rtl/savi_fpga_node.sv` | top: wires the blocks below together |
| `rtl/node_ctrl.sv` | the single controller (above) |
| `rtl/frame_rx.sv` | frame parser: classifies by EtherType, extracts the compute header, streams payload words and table entries |
| `rtl/input_buffer.sv` | package memory plus the reassembly tracker (header checks, fragment bitmap) |
| `rtl/task_table.sv`, `rtl/node_table.sv` | small fully associative tables; a repeated key overwrites its entry; a full table ignores new keys |
| `rtl/compute_engine.sv` | copies the package word by word from input to output buffer through the procedure |
| `rtl/output_buffer.sv` | package memory plus the fragment sequencer (fragment number, size, start word, count) |
| `rtl/frame_tx.sv` | builds ACK and data frames; prefetches payload words so that a frame leaves at one beat per cycle |

The procedure is the **identity**. The original FPGA node had a single built-in procedure. The
working nodes of the original system also performed only the identity, which amounts to basic
forwarding. The procedure ID from the task table reaches the compute engine, where the
`procedure()` function is the place to add word-wise transformations.

## Sizes and timing

| parameter | default | meaning |
|---|---|---|
| `BUF_WORDS` | 2048 | 8-byte words in each of the two package buffers (16 KB each) |
| `FRAG_BYTES` | 1480 | payload bytes per data frame |
| `TASK_ENTRIES` | 8 | task-table slots |
| `NODE_ENTRIES` | 8 | node-table slots |

The source says only that these are kept small on the FPGA. The defaults are this design's
choice. At the defaults a package holds up to 16384 bytes (12 fragments). The software nodes of
the original system were measured with packages of up to about 50 KB. An FPGA node needs
`BUF_WORDS = 8192` (64 KB per buffer) for those.

Cycle counts, with a stream that never stalls:

* An ACK is 3 beats and a data frame is 4 + ⌈size/8⌉ beats. Both leave without gaps.
* The first beat of a forwarded frame leaves **14 + N cycles** after the last beat of the
  package's final fragment arrives, for a package of N words. That time covers the 3-beat ACK,
  two table lookups, N + 1 cycles for the compute engine, and the transmitter start.

The original HLS node reported about 10 cycles from receive to send for basic forwarding at 160
MHz. This design is slower, because it acknowledges first and copies the package through the
procedure before forwarding. At 160 MHz a 200-byte package costs 39 cycles, about 244 ns.

Synthesis gives two 2048 × 64-bit memories, plus about 2.2 k flip-flops, most of them in the
tables and the frame header registers.

## Departures from the source and open points

* The frame formats, field widths, EtherTypes, opcodes and acknowledgement contents are this
  design's choices. The source names the fields but gives no layout.
* Table entries are written while the control frame streams in, so the table update comes before
  the acknowledgement. The original flow chart shows the acknowledgement first.
* Only the identity procedure is provided. Installing new procedures (for example by partial
  reconfiguration) and statistics counters for the supervisor were future work in the source and
  are not built.
* Only Ethernet (type 1) addresses are used. Other address types may be stored, but a package
  routed to one is dropped.
* A task-table entry names one destination. The source allows a task several destinations, but
  its prototype built only single-input, single-output chains, and so does this design.
* The input ID field is carried in the header but not used. The original prototype did not use
  it either, because its task graphs are single-input chains.
* The interface to the Ethernet MAC (a 64-bit valid/ready stream) is assumed. The MAC itself and
  the platform's static logic are not part of this design. Neither are the X86 nodes and the
  supervisor, which are software.

## Simulation

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/savi_pkg.sv tb/tb_pkg.sv tb/tb_savi_fpga_node.sv --top-module tb_savi_fpga_node
./obj_dir/Vtb_savi_fpga_node
```

Replace `tb_savi_fpga_node` with any testbench in `tb/`:

* `tb_savi_fpga_node` runs the whole node at its default sizes. The node is node 2 of a
  three-node chain, with the addresses and routes of the original chain-test configuration. The
  testbench programs the tables and sends packages of 200, 4000, 64, 24 and 16384 bytes, in and
  out of order. It checks every acknowledgement and every forwarded frame byte by byte, and checks
  the forwarding latency. It also makes each of these happen at least once: a repeated fragment,
  output back-pressure, a held-back ACK, a wrong ACK, a frame dropped during the wait, an unknown
  task, a foreign frame, an oversized package, a table overwrite, and a second sender's
  fragment refused while the buffer holds another package.
* `tb_chain` runs the original three-node chain test with two of these nodes. The testbench
  plays node 1, the user and control machine, and a behavioural switch delivers frames by
  destination address. Node 1 programs both nodes and then sends packages along three routes:
  node 2 and back, node 2 then node 3 and back, and node 3 and back. It sends a 200-byte package
  500 times on each route, then sizes from 8 bytes to 64 KB. For the large sizes the nodes get
  8192-word buffers; every other parameter keeps its default. Every returned package is checked
  byte by byte, and the round trip is printed for each route and size. Counting only the nodes'
  own logic, the two-node chain takes exactly twice as long as one node. At 200 bytes that is
  192 against 96 cycles. At 50000 bytes it is 38796 against 19431 cycles, about 2.6 bytes per
  cycle through one node, or roughly 400 MB/s at 160 MHz.
* `tb_frame_rx`, `tb_input_buffer`, `tb_task_table`, `tb_node_table`, `tb_compute_engine`,
  `tb_output_buffer`, `tb_frame_tx` and `tb_node_ctrl` test each block alone, at reduced sizes
  where that helps.
* `tb/tb_pkg.sv` builds frames byte by byte for the testbenches, independently of the RTL.

All testbenches pass. Each one was also run against a copy of its block with one deliberate bug
(for example an off-by-one payload index, a missing overwrite in a table, or an unchecked
fragment number in the ACK match), and each reported failures.

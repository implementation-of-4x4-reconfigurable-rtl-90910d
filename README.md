# RCS-2: a 4 x 4 reconfigurable crossbar switch for a network processor

A network processor is built from many specialised circuits (receive and
transmit engines, packet processors, lookup engines, memories) that must
exchange data. RCS-2 is the interconnect between them: a crossbar whose
topology can be changed while it runs. Every crosspoint ("node") of the
crossbar carries two configuration bits. Depending on those bits a node is
open, closes on demand when a packet's pre-header names its output, or stays
closed as a fixed circuit. Groups of nodes can be rewritten in one clock:
one node, a whole line (all the nodes of one input) or a whole column (all
the nodes of one output). Writing a line of circuit nodes, for example,
turns one input into a broadcast source for every output, the operation that
message-passing middleware needs for its broadcast primitive.

Reconfiguration works at two levels:

1. **Size.** The number of inputs and outputs is a parameter (`N_IN`,
   `N_OUT`), fixed when the hardware is built. The default is 4 x 4.
2. **Topology.** The node configuration bits can be rewritten at run time by
   the network processor.

The RTL also contains the receive and control path of a small
frame-processing network processor (Rx2Mem and Control). This is the kind of
circuit the crossbar is meant to connect. It sits beside the crossbar in the
top level. The frame-editing Process engine is not part of the RTL.

## Block structure

```
np_top
├── u_rcs : rcs2_top            the crossbar
│   ├── g_pha[i].u_pha : rcs2_pha   pre-header analyzer, one per input
│   ├── u_decoder : rcs2_decoder    reconfiguration request -> node writes
│   └── u_matrix  : rcs2_matrix     node configuration + datapath
├── u_rx  : np_rx2mem           frame receive stage
└── u_ctl : np_control          frame store / forward (R2M, M2P, P2M, M2T)
```

`rcs2_pkg` holds the shared enums: the node formats and the request types.

## Packets and the pre-header analyzer

The network processor puts a pre-header in front of every packet it sends
into the switch. A packet word is 16 bits wide:

| bits   | field |
|--------|-------|
| 15:10  | unused by the switch |
| 9:8    | destination output (0 to 3) |
| 7:0    | payload |

`rcs2_pha` registers the destination and the payload and drops the
pre-header. Only the 8-bit payload crosses the matrix. If `N_OUT` is not a
power of two, a destination that names a missing output drops the word and
pulses `in_bad_dest`.

Example: word `0000_1010_0000_1111` has destination `10` (the third output)
and payload `0000_1111`.

## Node formats: how the topology is encoded

This is the heart of the design. Each node (input *r*, output *c*) holds one
of four formats:

| format | name           | the node connects input *r* to output *c* ... | who may write it |
|--------|----------------|---------------------------------------------|------------------|
| `00`   | `NODE_OPEN`    | never                                         | Reconfiguration Unit only |
| `01`   | `NODE_ROUTED`  | for a word whose pre-header names output *c*  | anyone |
| `10`   | `NODE_CIRCUIT` | for every valid word of input *r*             | anyone |
| `11`   | `NODE_LOCKED`  | for every valid word of input *r*             | Reconfiguration Unit only |

After reset every node is `01`, so the switch behaves as a plain
pre-header-routed crossbar (parameter `RESET_CFG`).

A word takes every closed node on its input line, so it can leave by several
outputs in the same cycle. With a line of `10`/`11` nodes it leaves by all of
them. Each output carries at most one word per cycle. When several closed
nodes compete for one output:

* circuit nodes (`10`, `11`) beat routed nodes (`01`);
* between nodes of the same kind, the highest-numbered input wins;
* the losing words are dropped. There is no buffering, and `in_served[i]`
  tells whether input *i*'s word got out anywhere.

So two packets aimed at the same output from inputs 1 and 2 deliver input
2's payload, and input 1's word is lost.

Outputs with no word show `out_valid = 0` and `out_data = 0`. A tri-state
bus would float instead, but this design has no tri-states. `out_src` names
the input that a word came from.

## Reconfiguration requests and the privilege rule

`rcs2_decoder` takes one request per cycle. A request has these fields:

* `cfg_valid`: a request is present.
* `cfg_type`: `CFG_NODE` (00), `CFG_LINE` (01) or `CFG_COLUMN` (10).
* `cfg_addr` (4 bits at 4 x 4):
  * for a node request, `{row[1:0], column[1:0]}`;
  * for a line request, the row in the low bits;
  * for a column request, the column in the low bits.
* `cfg_data`: the 2-bit format to write.
* `cfg_priv`: who sent the request.
  * `1` is the Reconfiguration Unit, which may write any format to any node.
  * `0` is an instruction of the network processor. An instruction may
    write only `01` or `10`, and only over nodes that currently hold `01`
    or `10`.

Together these rules give the Reconfiguration Unit exclusive control over
the `00` and `11` formats. It can pin a node open or closed, and no
instruction can undo that.

A node that a request addresses but may not write keeps its value. Any such
refusal raises `cfg_reject` in the same cycle, combinationally. So do an
address outside the array and the unused type code `11`. A line or column
request with some locked nodes still writes the nodes it is allowed to.

The decoder is combinational. The configuration registers are in
`rcs2_matrix`. All nodes of a line or column change at the same clock edge.

## Timing of the crossbar

```
edge t     packet word accepted by the PHA register
edge t+1   routed through the matrix, registered at the outputs
           (out_valid / out_data / out_src / in_served valid after t+1)
```

The latency is two cycles, and every input can accept a new word each cycle.
A reconfiguration request is written at the next clock edge. It governs
every word routed after that edge, that is every word the PHA takes in at
that edge or later. `node_cfg` shows the whole topology at all times.
Reset is synchronous and active low (`rst_n`) throughout the design.

## Frame path of the network processor

`np_rx2mem` receives a byte stream from the network adapter. It uses
`rx_valid` and `rx_data`, with `rx_last` on the final byte of a frame. It
passes the bytes on one cycle later and adds three things:

* a start-of-frame mark (`byte_sof`);
* the frame length at end of frame (`frame_end`, `frame_len`, which saturates
  at 2047);
* a running `frame_count`.

`np_control` has four parts:

* **R2M** writes each received byte into a 2 KiB receive memory. When a
  frame ends, it queues `{start address, length}` in a 16-entry frame table.
  A frame that ends while the table is full is dropped, and `rx_overrun`
  pulses.
* **M2P** serves the Process engine. `p_frame_valid` and `p_frame_len`
  describe the oldest pending frame. A request (`p_rd_req` while
  `p_rd_ready`) reads either the whole frame (`p_rd_whole = 1`) or the one
  byte at `p_rd_offset`. The bytes arrive on `m2p_valid/m2p_data/m2p_last`,
  starting one cycle after the request, one byte per cycle.
* **P2M** accepts the processed frame on `p_wr_valid/p_wr_data/p_wr_last`.
  Its length may differ from the original, for example when an Add or Remove
  instruction ran. P2M:
  * stores it in a 2 KiB transmit memory and queues it;
  * reports the signed length change on `p2m_len_delta` with `p2m_done`;
  * retires the received frame.
* **M2T** streams each queued processed frame to the adapter on
  `tx_valid/tx_data`, marking the first byte with `tx_sof` and the last with
  `tx_last`.

Both memories are circular buffers. The frames pending in one memory must fit
in it (2048 bytes); the hardware does not check this. Nothing applies
back-pressure: the Process engine and the adapter take one byte per cycle.
The Process engine must return exactly one frame for each pending received
frame.

## Where this RTL departs from, or adds to, the source design

The source design gives the crossbar's three blocks and what each does. It
also gives the two-bit-per-node configuration, the node/line/column request
types with their three fields, and the rule that instructions touch only
formats `01`/`10`. It shows 16-bit packets with 8-bit outputs and a 2-bit
destination. The four-part split of Control and the duties of Rx2Mem come
from it too.

The following are this design's own choices:

* What each node format means (table above). The source fixes only who may
  write which format.
* The pre-header layout beyond the 2-bit destination in bits 9:8.
* The contention rule. Circuit beats routed, and the highest input wins. The
  highest-input rule matches the source's example, where input 2's packet
  takes the output both packets asked for.
* The `cfg_priv` flag that tells the two request sources apart, and the
  `cfg_reject` flag.
* Registered stages: two-cycle crossbar latency and one-cycle writes.
* Valid/zero outputs instead of high-impedance outputs.
* All sizes of the frame path: 11-bit lengths, 2 KiB memories, 16-entry
  tables. Also its handshakes, its oldest-first frame order, and separate
  memories for received and processed frames.
* The crossbar and the frame path are not connected in `np_top`. The source
  does not say which network-processor circuits sit on which crossbar port.

Not in the RTL:

* **The Process engine.** Its instruction set is not defined beyond Add and
  Remove. Its side of Control is brought out on `np_top`. The testbenches
  drive it with a behavioural model, `tb/np_process_model.sv`.
* **The Reconfiguration Unit.** It drives the `cfg_*` ports with
  `cfg_priv = 1`.

## Verification

Every block has a self-checking testbench. Each one:

* compares the block against a model written independently inside the
  testbench;
* counts checks and failures;
* ends with `TB_RESULT checks=<n> failures=<n>`;
* has a watchdog.

| testbench | block | what it covers |
|-----------|-------|----------------|
| `tb_rcs2_pha` | `rcs2_pha` | field extraction, 4- and 3-output instances, bad destination |
| `tb_rcs2_decoder` | `rcs2_decoder` | node/line/column decode, privilege and lock rules, reject flag, 3000 random requests |
| `tb_rcs2_matrix` | `rcs2_matrix` | reset topology, the two-packet contention example, broadcast, random topologies and traffic |
| `tb_rcs2_top` | `rcs2_top` | cycle-accurate model of the whole crossbar; latency, contention, broadcast, locking, 20000 random cycles |
| `tb_rcs2_top_5x3` | `rcs2_top` (5 x 3) | the same with a non-square, non-power-of-two size |
| `tb_np_rx2mem` | `np_rx2mem` | marks, lengths, counts, saturation |
| `tb_np_control` | `np_control` | 400 frames through R2M/M2P/P2M/M2T with a 4-entry table, overruns, memory wrap |
| `tb_np_top` | `np_top` | everything above at the default parameters, running together |

The crossbar testbenches count each mechanism and fail if any of them never
happens: routed delivery, circuit delivery, contention, broadcast, node,
line and column writes, a refused instruction, a Reconfiguration Unit lock,
and the latency check. The frame-path testbenches do the same for Add and
Remove length changes, single-byte reads and receive overruns.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_np_top rtl/rcs2_pkg.sv tb/tb_np_top.sv
./obj_dir/Vtb_np_top
```

Replace `tb_np_top` with any testbench name in the table. Each one runs in
well under a second.

Lint a module on its own with
`verilator --lint-only -Wall -Irtl rtl/rcs2_pkg.sv rtl/<module>.sv`. There is
one expected warning: the unused pre-header bits of `rcs2_pha`.

To change the port count, set `N_IN`/`N_OUT` on `rcs2_top` or `np_top`. The
address and source widths follow. To change what the formats mean, edit
`rcs2_pkg` (`circuit_format`, `instr_format`) and the request logic in
`rcs2_matrix`.

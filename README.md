# Hypermesh multicomputer for array processing

An n x n array of processing nodes in which every node has a direct link to
every other node of its row and of its column. Any node therefore reaches any
other in at most two hops: a word going from node (i,j) to node (r,s), where
i != r and j != s, first moves along row i to node (i,s) and then down column s.
Node (i,s) is called the **pivot**. A node sends everything over one output bus.
Each of the other nodes in its row or column listens to that bus on an input
channel of its own. This makes a row or column broadcast cost no more than
sending one word.

The RTL covers both layers of the machine:

* **the communication layer.** It is made of n x n network coprocessors (NCs).
  Each NC has one 8-bit output bus and 2n 8-bit input channels, and each channel
  has a req/ack pair. The NC's node drives it through a small instruction set
  over a 16-bit local bus.
* **the processing layer.** It is made of n x n node processors. Each one has a
  streaming memory coprocessor with its data memory and a multiply-accumulate
  coprocessor with left and right operand buffers. All of these sit on a 16-bit
  system bus.

The control processor that would issue each node's microinstructions is
**not** part of the RTL. Each node's microinstruction stream is a port of the
top module, and the testbenches play the control processors.

Defaults are the main configuration: 4 x 4 nodes, 8-bit network data paths,
16-bit local and system buses, and 64-bit operands.

## Files

| file | what it is |
|---|---|
| `rtl/hm_pkg.sv` | Shared types: flit, word, header, packet, NC opcodes, microinstruction format |
| `rtl/hm_fifo.sv` | Synchronous FIFO used for every buffer |
| `rtl/link_rx.sv` | One input channel: assembles flits into packets, keeps a packet FIFO, drives ack |
| `rtl/link_tx.sv` | Output bus transmitter: sends one packet to one or many receivers with req/ack |
| `rtl/hm_router.sv` | Router of one NC: injection, delivery, pivot forwarding, broadcast self-copies |
| `rtl/nc_sequencer.sv` | Instruction unit of one NC: decodes the local-bus instructions |
| `rtl/network_coprocessor.sv` | One NC: sequencer plus router |
| `rtl/hm_network.sv` | n x n NCs wired as a hypermesh (or diagonal hypermesh), with I/O links |
| `rtl/mem_coproc.sv` | Data memory with 8 address streams (read/write "next word") |
| `rtl/arith_coproc.sv` | Multiply-accumulate unit with FPL/FPR operand FIFOs and a result FIFO |
| `rtl/pe_node.sv` | Node processor system bus: joins memory, arithmetic and NC local bus |
| `rtl/hypermesh_top.sv` | Top: n x n `pe_node` over `hm_network` |

Each file has a testbench `tb/tb_<module>.sv`. `tb/hm_perm_runner.sv` is a test
driver that `tb_hm_network` instantiates three times.

## Packets and links

A word travels as a packet of three 8-bit flits: a header, then the high byte,
then the low byte. The header is

```
[7] broadcast   [6] 0   [5:3] destination row   [2:0] destination column
```

The coordinates are 3 bits wide, so the header addresses networks of up to
8 x 8.

**Handshake.** The link protocol is send/acknowledge, with separate lines for
the two directions.

- A receiver holds `ack` high while its channel FIFO has room for a whole packet.
- A sender waits until every receiver it has selected shows `ack`.
- It then raises `req` on those receivers for exactly three cycles and puts one
  flit on the bus each cycle.
- The receiver counts flits while `req` is high and stores the packet after the
  third flit.

Because `ack` reflects the room left in the buffer, it is already valid while
the header is on the bus. A sender can therefore start its next packet without
waiting for a reply to the last one. One output bus carries at most one packet
every four cycles: three flits plus one idle cycle.

## Routing and the pivot

The router of node (ROW, COL) has 2n input channels:

* **Channels 0..n-1** are the row: channel k hears node (ROW, k). Channel COL
  would hear the node itself, so it is the row **I/O link** instead.
* **Channels n..2n-1** are the column group: channel n+k hears the row-k member
  of the node's group. Channel n+ROW is the column I/O link.

For each packet it sends, the router picks the receivers on its own output bus:

| transfer | receivers |
|---|---|
| row broadcast (NRBC) | every other node of the row |
| column broadcast (NCBC) | every other node of the column group |
| point to point, destination in own row | that node only (own position = row I/O port) |
| point to point, destination in own column group | that node only |
| point to point, elsewhere | the pivot: the node of the own row that is in the destination's column group |

A packet that arrives at a node and is not for it is forwarded. This applies to
a packet that is point to point, addressed to another node, and whose
destination is in this node's row or column group. The pivot places such
packets in one forward FIFO, which holds n packets. Forwarded packets take the
output bus before the node's own packets. The input channels are served
lowest index first.

**Self-copies.** A broadcast leaves the sender with a copy of its own word:
there are two self-copy FIFOs, one for the row and one for the column. Reading
"row source COL" or "column source ROW" returns that copy, so an algorithm that
reads all n row words and all n column words needs no special case for its own.

**Diagonal hypermesh** (`DIAGONAL = 1`). Rows stay the same, but columns are
replaced by diagonals: node (r,c) belongs to group (r+c) mod n. The pivot for
(i,j) -> (r,s) is the node of row i that lies in group (r+s) mod n. With this
wiring, bit reversal, perfect shuffle, exchange and butterfly all finish in at
most two routing steps at any n, because no pivot forwards more than one packet.
The row-major hypermesh needs n steps for bit reversal. `tb_hm_network` measures
this (see below).

## Network coprocessor instructions

The node drives the NC over its local bus with `cmd_valid/cmd_op/cmd_data`,
and the NC answers with `cmd_ready/rsp_data`.

| op | data | effect |
|---|---|---|
| NRBC | - | later NDN words are row broadcasts |
| NCBC | - | later NDN words are column broadcasts |
| NPTP | {row[15:8], col[7:0]} | later NDN words go to one node (routed through a pivot if needed) |
| NDN | word | send one word; `cmd_ready` low while the injection queue (4 words) is full |
| NRRW | {words[15:8], io[7], start[6:0]} | read row channels starting at `start`, `words` from each before moving on; with `io`, read the I/O link only |
| NRCW | same | same for the column channels |
| NRWA | words[7:0] | alternate: `words` from row k, then `words` from column k, then k+1, ... |
| NSN | - | the next word from the current source on `rsp_data`, which is combinational; `cmd_ready` low until a word is there |

NPTP is this design's addition, because the other instructions have no way to
address a single node. The opcode values and field layouts are also this
design's own. After reset the NC is in row-broadcast mode and reads row
channel 0.

## Node processor and microinstructions

Each cycle the control processor offers one microinstruction (`uop_t`). It
moves one 16-bit word over the node bus:

- **from** a literal, the network (NSN), a memory stream (SSN) or the
  arithmetic result buffer (FPSN);
- **to** the network (NDN), a memory stream (SDN), the left or right operand
  buffer (FPL/FPR) or back to the control processor (`cp_data`).

In the same cycle it may also:

- start memory stream `dst_stream` at address `imm`, for reading (SRW) or
  writing (SWW);
- give the NC a set-up instruction with `imm` as its parameter;
- trigger the arithmetic unit with a control code: CLEAR, MAC or UNLOAD.

`uop_ready` is high only when every unit involved can act. Otherwise nothing
happens and the microinstruction must be held, which counts as a stall.

A 64-bit operand is written as four 16-bit words, least significant first. A
MAC issued with the last word of the right operand is queued until both
operands are complete. Up to three MACs can be pending. Results are read back
with FPSN, also four words at a time.

The arithmetic is **integer multiply-accumulate modulo 2^64, not floating
point**. The intended node uses a commercial floating-point chip set, whose
arithmetic is outside the scope of this RTL. The buffering, sequencing and
timing around it are modelled. To use real floating point, replace the two
pipeline stages in `arith_coproc.sv` (product, then accumulate).

The memory streams step by one word (unit stride). The memory is 4096 words
per node, and reads are combinational.

## Top module

`hypermesh_top #(N=4, DIAGONAL=0, OPW=64, MEM_WORDS=4096, CH_DEPTH=4)`. All
per-node ports are arrays indexed r*N+c.

* **Control-processor side:** `uop_valid`, `uop`, `uop_ready`, `cp_data`.
* **Row I/O link r, into the network:** `row_io_data[r]`, `row_io_req[r][c]`,
  `row_io_ack[r][c]`. One 8-bit bus per row, with a req/ack pair to each node c
  of the row.
* **Column I/O link g:** `col_io_*`, indexed by group g and member row.
* **Out of the network:** `node_out_data[i]` with `row_out_req/ack[i]`. These
  carry the packets that node i sends to its own row position. The same holds
  for the column. Tie the `*_ack` inputs high if nothing listens.
* **Activity, one bit per node and cycle:** `fwd_event` (pivot forward),
  `mac_event`, `stall_event`.

The I/O controllers and host that would attach to the I/O links are not
included.

Size at the defaults, after generic synthesis: about 14,000 word-level cells,
10,700 flip-flop bits and 1 Mbit of memory (16 x 4096 x 16).

## Verification

Build and run any testbench with plain verilator. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/hm_pkg.sv \
    tb/tb_hypermesh_top.sv --top-module tb_hypermesh_top
./obj_dir/Vtb_hypermesh_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **`tb_hypermesh_top`** runs at the default 4 x 4 size in three phases.
  1. **Matrix multiply**, C = A x B with random 64-bit elements, one element per
     node. Each node stores A(i,j) and B(i,j), broadcasts A along its row and B
     down its column from a memory stream, and reads the words back with NRWA
     into the operand buffers, with a MAC per pair. It then unloads the result,
     stores it and reads it back.
  2. **Transpose.** Every off-diagonal node sends a word to node (j,i), which
     always needs a pivot.
  3. **I/O links.** A packet injected on row 0's I/O link is forwarded down a
     column. A word that a node addresses to itself leaves on its row I/O port.

  It checks all 16 results, the 64 MACs and the exact number of pivot forwards.
  It also requires that row broadcasts, column broadcasts, forwards, MACs,
  stalls, I/O input and I/O output each happened.
* **`tb_hm_network`** runs five permutations on a 4 x 4 hypermesh, an 8 x 8
  hypermesh and an 8 x 8 diagonal hypermesh: bit reversal, perfect shuffle,
  exchange, butterfly and shift. It also runs flooding (all-to-all broadcast:
  row broadcast, then each node re-broadcasts its row's words down its column).
  - For every permutation it checks that each node forwarded exactly as many
    packets as the routing rule predicts.
  - On the diagonal hypermesh it checks that no pivot forwards more than one
    packet.
  - Measured routing steps (largest pivot load + 1):

| permutation | 4x4 hypermesh | 8x8 hypermesh | 8x8 diagonal |
|---|---|---|---|
| bit reversal | 4 | 8 | 2 |
| perfect shuffle | 3 | 3 | 2 |
| exchange | 1 | 1 | 1 |
| butterfly | 2 | 2 | 2 |

* **The unit testbenches** (`tb_link_rx`, `tb_link_tx`, `tb_hm_router`,
  `tb_nc_sequencer`, `tb_network_coprocessor`, `tb_mem_coproc`,
  `tb_arith_coproc`, `tb_pe_node`) check each block's handshakes, data and
  cycle timing against models written in the testbench.

## Where this design departs from, or adds to, the original architecture

* The original has one pivot-forwarding queue per output channel. Here a node
  has a single output bus, so there is one forward FIFO per node (n deep).
* The following are all choices made here, not given by the original:
  - the packet format;
  - the meaning of `ack` (room for a packet);
  - the NC opcode encodings;
  - the NRRW/NRCW/NRWA parameter layouts;
  - the NPTP instruction;
  - the microinstruction format;
  - memory size and buffer depths;
  - reset state.
* NDN's "next destination" sequencing is simplified. The destination set stays
  what NRBC/NCBC/NPTP selected. A broadcast already reaches every row or column
  processor at once.
* There is integer arithmetic instead of floating point, and unit-stride memory
  streams. Memory reads take one cycle, the fastest memory timing considered.
* The header limits n to 8. A 16 x 16 array would need a wider header (a
  second header flit).
* Not built:
  - the control processor, its control memory and diagnostic port;
  - the floating-point chip set;
  - the host computer;
  - the tree of I/O network controllers that would feed the I/O links.

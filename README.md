# 4×4 mesh network-on-chip

Sixteen cores share one on-chip network instead of a bus. Each core sits next
to a router. The routers form a 4×4 grid, and neighbouring routers are joined
by a pair of one-way 16-bit channels. A packet is a single 16-bit word. It
moves from router to router along the XY route, first along its row to the
destination column and then along the column to the destination row. It
leaves the network at the destination's core port. The design is small: a
router is five input FIFOs, one arbiter state machine and one crossbar. A hop
takes at least four clock cycles.

The router structure, the FIFO's pointer logic, the arbiter's state machine,
the crossbar table and the 16-bit/16-entry sizes follow a published VHDL
design of this network (an M.Tech thesis on a 4×4 mesh NoC for a Virtex-II
Pro FPGA). Where that description left a choice open, this RTL makes its own;
each such choice is listed under [Departures and own choices](#departures-and-own-choices).

## Packets and addresses

```
 15  14 ............ 4  3  2  1  0
 H   payload            row   col
```

* **H (bit 15)** is the header flag. A word with H = 1 is a packet. A word
  with H = 0 is an idle channel, and an idle channel is driven as all zeros.
* **bits [3:0]** give the destination node: column in [1:0], row in [3:2].
  Node *n* is at column *n*%4, row *n*/4. R0 is bottom-left, R3
  bottom-right and R12 top-left. North means row + 1 and east means column + 1.
* **bits [14:4]** are payload. The network does not look at them.

A core sends a packet by driving the word for exactly one cycle. The
destination core sees the word on its output for exactly one cycle. There is
no handshake and no back-pressure in either direction.

## Router

```
 DIC ─► FIFO_C ─┐                    ┌─► DOC
 DIN ─► FIFO_N ─┤  DP, dest ► ARBITER│
 DIS ─► FIFO_S ─┼──────────►  grants │─► DON / DOS / DOE / DOW
 DIE ─► FIFO_E ─┤           SEL ▼    │
 DIW ─► FIFO_W ─┴──────────► CROSSBAR┘
```

`router.sv` holds five `fifo_buffer`s (indexed C, N, S, E, W by
`noc_pkg::port_e`), one `arbiter` and one `crossbar`. Only one packet
crosses a router at a time. The arbiter grants one FIFO, and that FIFO puts
its packet on its output for one cycle. The arbiter routes the packet and
sets the crossbar select in that same cycle. All other FIFO outputs are zero
then, so only the granted packet reaches an output. The other router outputs
carry zeros.

### Input FIFO (`fifo_buffer.sv`, `fifo_ram.sv`)

The FIFO is a 16-entry circular queue in a **single-port** RAM, so it does one
read or one write per cycle.

* An incoming word with H = 1 is latched into the DIRAM register.
* Full and empty both mean "write pointer = read pointer". The LASTOP bit
  records whether the last pointer move was a write (then the queue is full)
  or a read (then it is empty).
* A grant while the queue is not empty is a pop. **Pop wins the RAM port.** A
  word in DIRAM that cannot be written in its cycle, because of a pop or a
  full queue, moves to a one-word hold register. It is written from there as
  soon as the port is free. Words leave the hold register before DIRAM, so
  order is kept.
* A packet is lost (`drop`) only if DIRAM has a word that cannot be written
  while the hold register is still occupied. Under the arbiter's timing this
  happens only when the queue is full, or when packets keep arriving
  back-to-back on the core input.
* `dp` = not empty. The popped word appears on `dout` in the cycle after the
  grant. At all other times `dout` is zero.

### Arbiter (`arbiter.sv`)

This is the hardest part to follow. Every port X has three states:

| state | what happens | next |
|---|---|---|
| `S_X` check | the DP multiplexer looks at port X's data-present flag | X_G if set, else the check state of the next port in the order C→N→S→E→W→C |
| `X_G` grant | grant to FIFO X for one cycle; the FIFO pops | X_D |
| `X_D` deliver | grant low; the popped word is on FIFO X's output; its destination is routed (XY) and **SEL is driven to the crossbar in this cycle** | the check state of the first *other* port, in round-robin order after X, whose DP is set; if none, back to `S_X` |

With no traffic the arbiter visits one port per cycle. A busy router
forwards one packet every three cycles (check, grant, deliver), and it jumps
directly between ports that have data.

The crossbar select for "input X to output Y" comes from the fixed table
below. If the route of a packet points back out of its own input port, the
crossbar has no connection for it. Under XY routing that only happens when a
core sends a packet to its own node. The arbiter flags this case (`uturn`),
the router discards the packet and reports it on `drop[C]`.

### Crossbar (`crossbar.sv`)

One 2-bit SEL is shared by all five input demultiplexers and all five output
multiplexers. So each SEL value joins **every** input to a different output:

| SEL | C→ | N→ | S→ | E→ | W→ |
|---|---|---|---|---|---|
| 00 | N | W | C | S | E |
| 01 | W | E | N | C | S |
| 10 | E | S | W | N | C |
| 11 | S | C | E | W | N |

No input is ever joined to its own output, which is why two select bits are
enough. This works because only the granted FIFO has a non-zero output. The
router contains an assertion for that rule.

## Timing

A packet present on an input in cycle *t* moves as follows:

| cycle | event |
|---|---|
| t | word on the input channel |
| t+1 | in DIRAM, written into the RAM at the end of the cycle |
| t+2 | `dp` high; the arbiter sees it if it is checking this port (`S_X`) |
| t+3 | grant (`X_G`), RAM read |
| t+4 | deliver (`X_D`): the word is on the router output and on the next router's input |

So a hop takes 4 cycles at best. It takes up to 4 more if the arbiter's idle
scan has just passed the port, and longer if other ports are queued. The
measured results below all come from the testbenches:

* The shortest transit through a router is exactly 4 cycles (`tb_router`).
* A lone packet from core 0 to core 15 (7 routers) takes 38 cycles.
* All 16 cores injecting in the same cycle: the worst packet takes 46 cycles
  (`tb_mesh4x4`). The reference design reports 47 for its version of this
  experiment.
* Uniform random traffic, one packet per core every 48 / 24 / 16 / 12 cycles:
  * worst latency 50 / 57 / 145 / 767 cycles;
  * dropping probability 0 / 0 / 0 / about 0.1 (`tb_mesh_load`; the exact
    numbers depend on the random seed).

The mesh saturates near one packet per 12 cycles per core. The reason is
that each router serves all five inputs with one arbiter at one packet per
3 cycles. An average route crosses 3.7 routers.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | widths, `port_e`, XY routing function, crossbar table functions |
| `rtl/fifo_ram.sv` | single-port RAM with registered read |
| `rtl/fifo_buffer.sv` | input FIFO |
| `rtl/arbiter.sv` | round-robin state machine, routing, SEL |
| `rtl/crossbar.sv` | 5×5 crossbar with shared SEL |
| `rtl/router.sv` | one router |
| `rtl/mesh4x4.sv` | top: 16 routers; pins `clk`, `init`, `c_in[16]`, `c_out[16]` (16 bits each) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mesh_load` |

Parameters: `DATA_W` (16) and `FIFO_DEPTH` (16) on the router and mesh,
`CUR_ADDR` on the router and arbiter (the mesh sets it to the node number).
The grid itself is fixed at 4×4, because the node address has 2 bits per
axis. `init` is a synchronous, active-high reset. The FIFO RAM contents are
not reset.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends by itself. For
example, the end-to-end test of the full-size mesh:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/noc_pkg.sv tb/tb_mesh4x4.sv --top-module tb_mesh4x4 -o sim
./obj_dir/sim
```

Replace `tb_mesh4x4` with `tb_crossbar`, `tb_fifo_buffer`, `tb_arbiter`,
`tb_router` or `tb_mesh_load` to run the others. Each takes under a minute to
build and under a second to run.

* `tb_mesh4x4`
  * Sends every source→destination pair alone and checks each latency
    against the 4–8 cycles-per-router bound.
  * Runs the all-cores-at-once case, random traffic and a hot spot that
    overflows buffers.
  * Checks that each mechanism occurs at least once: XY turn, delayed write
    through the hold register, full-buffer drop, self-addressed discard, and
    the arbiter jumping between busy ports.
* `tb_arbiter` compares the arbiter cycle by cycle with a reference model
  of the state table above.

## Departures and own choices

* **Destination field in bits [3:0].** The word width, header bit and 4-bit
  address follow the reference. It does not say where the destination sits
  in the word.
* **Routing rule.** The reference's pseudo-code for the row step does not
  match the XY routing its text names. This RTL follows XY routing: once the
  column matches, row bits less → south, greater → north, equal → core.
* **Arbiter after a deliver state.** The reference spells out the check
  order only for the core port's deliver state (N, S, E, W, else back to the
  core's check state). The other four deliver states here use the same rule
  rotated to start after their own port.
* **Hold register in the FIFO.** In the reference, a push that meets a pop
  loses to the pop. Here the push is delayed by a cycle instead of lost, and
  the FIFO can hold 17 packets, not 16.
* **Input register.** Incoming words are registered (DIRAM) before the RAM
  write. This gives the 4-cycle hop the reference reports.
* **`drop` and `uturn` signals and self-addressed packets.** Losses are
  reported per router input (`router.drop`). A core packet addressed to its
  own node is discarded. The reference does not cover this case. The mesh
  keeps these flags internal, so its pins are exactly the reference's 514:
  2×16×16 data pins plus clock and reset.
* **No flow control between routers**, as in the reference. A packet that
  reaches a full buffer is lost.
* **Not included.** The processing cores and any network interface between
  a core and its router are not part of this RTL; testbenches drive the core
  channels directly. The reference's multi-word packets of its network-level
  study are not supported: a packet here is always one 16-bit word.

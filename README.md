# VR switch: an input-buffered ATM switch that routes addresses, not cells

This is a bit-serial N×N ATM cell switch built on *virtual routing*. An arriving cell is
written, bit by bit, into a shift-register buffer at its input port. It stays there until it
leaves. While its payload is still arriving, the input port sends only a short record to the
output ports it is bound for. The record holds the cell's address (input port, buffer), its call
number and the 12 header bits that the switch does not change. Each output port queues these
records, not cells. In the gap between two cells, every output port takes the record at the head
of its queue and sends the address back to the owning input port, which connects that buffer to
the output's column. In the next cell slot all connected buffers shift their payloads out at the
same time. Each output port sends its translated header just ahead of its payload.

What this gives:

- **No head-of-line blocking.** Any buffer is reachable from any output, so an output with a
  queued cell never idles.
- **Cheap multicast.** One stored copy serves any number of outputs.
- **Output-driven real routing.** Every output picks exactly one buffer, so payload routing never
  contends.
- **Nothing faster than the line rate.** No part of the switch does serial-to-parallel
  conversion or runs above the line bit rate.

The RTL is SystemVerilog with parameters. The default size is 4 ports with 7 buffers per input
port and four service classes per output port.

## The cell slot

Everything runs on one clock, `pclk`, with one bit per period. A cell slot is 512 periods: a
155.52 Mb/s SONET STS-3c line delivers a 424-bit cell every 512 bit times (3.42 µs at 6.68 ns per
bit). `vr_slot_timer` counts the position `k` inside the slot. `hclk` is high for the 424 cell
bits. Every block works out its actions from `k`, so there is no handshake between blocks, only a
schedule.

| k | input side | output side |
|---|---|---|
| 0 – 39 | header bits arrive into the header register | translated header of the outgoing cell is sent |
| 39 | lowest idle buffer latched for this cell (Add_Reg) | |
| 40 | cell sort (unassigned / signalling / OAM / user) | payload bits start |
| 41 | route-table and traffic-contract lookups | |
| 42 | header processing done | |
| 48 + i·N + w | input i sends PDU number w (one per destination) on the virtual-routing buses | each output looks it up, queues it or refuses it |
| 48 + N·N | copy counter loaded with the number of outputs that queued it; fate reported | |
| 40 – 423 | payload shifted into the chosen buffer; connected buffers shift out | payload passes from the fabric line to `tx` |
| 424 | `c_sig`: every read flip-flop and crosspoint cleared | |
| 432 + j | input decodes the address, sets read flip-flop and crosspoint, takes one from the copy count | output j pops its queue head and drives its address |

The table's order follows the design the switch comes from. The exact `k` values of the middle
rows are this implementation's choice. They are constants in `vr_pkg`.

Because both routing phases are time-division multiplexed, the slot bounds the port count. The
queue-update phase has T1 = 376 cycles (k = 48 to 423), and each input needs N of them, so N·N ≤ 376
gives N ≤ 19. The connection phase has 80 cycles (k = 432 to 511) at one per output, so N ≤ 80.
An assertion in the input controller enforces the first bound. Going further would need the buses
replaced by a space-division network.

A cell that arrives in slot *t* leaves at the earliest in slot *t*+1. One slot is the switch's
minimum delay.

## Input port (`vr_input_port`)

- **`vr_header_buffer`** shifts in the first 40 bits.
- **`vr_cell_sort`** classifies the header:
  - unassigned cells (VPI = VCI = 0) are dropped;
  - signalling cells (VPI 0, VCI 5) are handed out on the `ctrl_*` ports;
  - OAM cells (VCI 3 or 4, VPI 0 / VCI 16, or PT bit 2 set) are handed out on the `ctrl_*` ports;
  - all other cells are user cells and go on to the lookups.
- **`vr_route_table`** is a CAM of 32-bit entries: 28-bit incoming GFC/VPI/VCI plus a 4-bit call
  number. One match is a unicast cell. Several matches (at most N) are a multicast cell; the calls
  are listed in entry order. No match drops the cell.
- **`vr_traffic`** does usage parameter control with one token bucket per contract. A contract
  adds a token every `period+1` slots, up to `depth` tokens. A conforming cell takes a token. A
  nonconforming cell is either discarded or sent on with CLP = 1, as the contract's `tag` bit
  says.
- **`vr_input_controller`** runs the steps above and sends one PDU per destination in its
  window. It adds up how many outputs accepted, and at the end of the window it raises
  `valid_cell` with that count.
- **`vr_input_scheduler`** keeps one idle flag (IAR) per buffer:
  - a priority encoder picks the lowest idle buffer;
  - `valid_cell` marks that buffer busy;
  - the `free` of the buffer whose count reaches zero marks it idle again.

  A cell that is dropped, or that no output takes, never marks its buffer busy, so the buffer
  is reused at once. A cell that finds no idle buffer is lost.
- **`vr_payload_buffer`** is a 384-bit shift register. Beside it sit the copy counter and the
  read flip-flop. A buffer being read feeds its output back to its input. That way a multicast
  cell is intact for the next output that connects, possibly slots later.
- **`vr_concentrator`** is B×N crosspoint flip-flops with AND-OR columns.

### Subtle points

- **Free and rewrite in the same slot.** A buffer is freed in the connection phase when its last
  copy is claimed. That copy is read during the next slot, and the buffer can take a new cell in
  that same slot. The new bits enter exactly as the old ones leave, so both cells are intact.
  `tb_vr_input_port` and `tb_vr_switch` exercise this constantly.
- **Copy count comes from acceptances.** The count is the number of outputs that *accepted* the
  PDU, not the number of route-table matches. A copy refused by a full output queue is therefore
  never waited for, and the buffer is freed. If no output accepts, the cell is lost as
  `FATE_QUEUE_FULL`.

## Virtual-routing and cell fabrics

`vr_vroute_fabric` is the shared bus set used in both directions:

- the selection bus (call number), the header bus (12 bits) and the address bus;
- an acknowledge count returned to the sending input;
- the requesting output's number, sent with each connection address.

The bus is time-division multiplexed: each input owns N cycles per slot, and each output owns one
cycle. Assertions check that only one side drives at a time.

`vr_cell_fabric` joins column *j* of every concentrator to output *j*. It flags any column that
two ports drive at once; that cannot happen in a correct switch, and an assertion checks it.

## Output port (`vr_output_port`)

- **`vr_output_controller`** is a CAM keyed by (input port, call number). A match gives the new
  28-bit GFC/VPI/VCI and the connection's service class. Unknown keys are ignored.
- **Three `vr_vfifo` queues per class:** addresses, call numbers and kept header bits. They are
  written and read together, and an assertion checks that they stay in step. Their depth
  defaults to N·B, which is every input buffer of the switch. At that depth a queue can never
  overflow. A smaller depth lets the queue refuse PDUs (`queue_loss`).
- **`vr_output_scheduler`** is window-based. The connection cycles are divided into windows:
  class 0 owns 8, class 1 owns 4, class 2 owns 2 and class 3 owns 1 (parameter `WINDOW`). If the
  owner of the current cycle has a cell, it is served. If not, the next non-empty class in
  circular order gets that one cycle, and ownership comes back afterwards (`lent`). Unlike
  weighted round robin, an owner with a short queue loses only the cycles it cannot use.
- **`vr_output_buffer`** sends the 40-bit header (28 translated bits and the 12 kept bits). It
  then passes the payload bit by bit from the fabric line. `tx_valid` is low in a slot with
  nothing to send; there the line interface is expected to insert an unassigned cell.

## Top level (`vr_switch`)

```
rx[N] ──► vr_input_port ×N ──PDUs──► vr_vroute_fabric ──► vr_output_port ×N ──► tx[N], tx_valid[N]
               ▲   │col,drive                 ▲ addresses        │ line
               │   └──────► vr_cell_fabric ───┼──────────────────┘
           vr_slot_timer (k, hclk, c_sig)     │
```

Parameters and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 4 | ports |
| `B` | 7 | buffers per input port |
| `RT_DEPTH` | 16 | route-table entries per input port |
| `UPC_DEPTH` | 8 | traffic contracts per input port |
| `OC_DEPTH` | 16 | output lookup entries per output port |
| `NCLASS` | 4 | service classes |
| `DEPTH` | N·B | queue depth |
| `WINDOW` | {1,2,4,8} | window sizes, class 3 to class 0 |

Control and report ports:

- **Table writes.** The tables are written through `rt_*`, `upc_*` and `oc_*`, one entry per
  clock with a per-port write strobe. In a network, connection admission control would own these
  tables.
- **`fate[i]`** reports, at `k = 48 + N·N`, what became of input *i*'s cell: routed, unassigned,
  no route, policed, no buffer, queue full, or control.
- **`ctrl_*`** carry signalling and OAM headers for the processors that would handle them.
- **`queue_loss`, `lent` and `collision`** are per-output event pulses.

A configured 4×4 switch at the default size synthesises to about 5,700 cells and 12,600
flip-flops. The flip-flops are mostly the 28 payload shift registers of 384 bits each. The queues
add about 16 kbit of memory.

## What is and is not here

- **Not built.**
  - The connection admission control and system management processors: only their interface is
    provided (table write ports and the `ctrl_*` hand-off).
  - The SONET physical layer: cells enter and leave slot-aligned on `rx`/`tx`.
- **Own choices, where the design leaves the point open:**
  - the token-bucket policer;
  - the window sizes;
  - the table depths;
  - the class held in the output lookup entry;
  - the exact instants in the slot;
  - the time-division use of the routing buses;
  - the ring-shift read of multicast buffers;
  - loading the copy count from acceptances.
- **Call number width.** The call number is 4 bits, as in the 32-bit route-table entry. That
  allows 16 connections per input port whatever N is. An equally plausible reading would size
  it at log2 N bits.
- **Performance sizes.** The cell-loss, throughput and delay studies of this architecture use 8
  and 16 ports and up to 35 buffers per port. These sizes are not defaults here. The RTL accepts
  them as parameters (N ≤ 19). `tb_vr_switch_load` simulates a 2×2 switch with b = 2 and an 8×8
  switch with b = 8 (see below); larger sizes have not been simulated.

## Measured performance

`tb_vr_switch_load` offers uniform Bernoulli traffic, with destinations chosen uniformly.

For a 2×2 switch with two buffers per port, 20,000 slots per load:

| load | cell loss | queueing-model reference |
|---|---|---|
| 0.3 | 0.00008 | 0.0079 |
| 0.5 | 0.0028 | 0.038 |
| 0.7 | 0.021 | 0.100 |
| 0.9 | 0.087 | 0.184 |

The reference model treats a buffer as busy for the whole slot in which its cell leaves. This
RTL hands the buffer back when its last copy is claimed, one slot earlier, and overwrites it as
the old payload shifts out. That extra slot of buffer space halves the loss at load 0.9. The
testbench checks that the loss is no worse than the reference.

For an 8×8 switch with 8 buffers per port at load 0.9:

- throughput is 0.896 cells per port per slot;
- cell loss is 0.004;
- mean delay is 4.7 slots, with a minimum of 1.



## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The end-to-end tests share
`tb/vr_tb_env.sv`, a stimulus generator and scoreboard with its own model of the switch:

- input buffer occupancy;
- the contents and order of each output queue;
- the contract token buckets;
- which copies leave in each slot.

Against that model it checks:

- every fate report and every queue refusal;
- every output header and payload bit;
- per-queue delivery order;
- that an output with a queued cell never idles;
- that no cell leaves in its arrival slot.

Every mechanism must occur at least once: unicast, multicast, broadcast, recirculated read,
buffer-full loss, queue-full loss, tagging, discard, unassigned and unroutable drops, control
hand-off, lent slots and one-slot delay.

- `tb_vr_switch` uses 4 buffers and 3-deep queues so that both kinds of loss happen often.
- `tb_vr_switch_full` runs the switch at its default size.
- `tb_vr_switch_load` measures cell loss, throughput and delay under random load (see above).

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vr_pkg.sv rtl/*.sv \
  tb/vr_tb_env.sv tb/tb_vr_switch_full.sv --top-module tb_vr_switch_full
./obj_dir/Vtb_vr_switch_full
```

For a unit test, list `rtl/vr_pkg.sv`, the module and its submodules, then the testbench, for
example:

```
verilator --binary --timing --assert rtl/vr_pkg.sv rtl/vr_vfifo.sv \
  tb/tb_vr_vfifo.sv --top-module tb_vr_vfifo
```

The two end-to-end tests each run in about a second; the load test takes about a minute and a half.

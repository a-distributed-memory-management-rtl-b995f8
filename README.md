# Pointer path: distributed memory management for a 16-port shared-memory switch

In a shared-memory switch every input writes its cells into one common cell
memory, and every output reads its cells from it. The memory itself is simple;
the hard part is the bookkeeping: which addresses are free, which cells wait
for which output, in which order, and when a cell that several outputs want
(multicast) may finally be overwritten. A single central queue manager that
does all of this becomes the bottleneck: with 16 inputs each multicasting to
16 outputs it would have 256 queue insertions to make in one cell time.

This RTL implements that bookkeeping, the *pointer path*, in a distributed
way. Each output owns its own queue (a linked list of shared-memory
addresses), so a multicast cell is written once into the cell memory and its
address is appended to all of its destination queues in the same clock. A
per-address read counter frees the address only after the last destination has
read the cell. IP packets, segmented into a first, middle and last cell, are
queued as one entry; the cells behind the first one are chained through a
separate per-address "next" field, so an output that starts a packet follows
that chain to its end before it returns to its queue. Each output queue holds
eight priority classes served in strict priority.

Default configuration: 16 inputs and outputs, 5500 shared-memory cells,
800 list nodes per output, 8 classes, a 16-clock cell time, and at most
15 % of the shared memory per output.

The cell memory itself (the data path), the input interfaces that segment
packets and the control logic that generates back-pressure are not part of
this RTL; their connections are ports of the top module.

## The two-dimensional list

Two structures together describe every stored cell:

* **Output queues** (`linked_list`, one per output). Each node holds a
  shared-memory address (SMA) and the index of the next node. One entry
  stands for an ATM cell or for a whole IP packet (the address of its first
  cell).
* **Fanout/Next memory** (`fanout_next_mem`), one entry per shared-memory
  address: the fanout (how many outputs will read the cell), the cell type
  (ATM, IP first, IP middle, IP last) and the address of the next cell of the
  same packet.

So the queues run "horizontally" across entries, and each IP packet hangs
"vertically" from its entry through the next fields. An output reads its queue
only at ATM cells and at the start of a packet; inside a packet it takes the
next address from the Fanout/Next entry it has just read.

## A cell time

Everything is organised in cell times of `CELL_CLKS` clocks (16 by default,
at least 16). The top's `cell_end` output marks the last clock of each cell
time.

Write side (`write_scheduler`):

1. In the `cell_end` clock the 16 headers on `hdr_in` are captured into the
   cell header shift register, and the free address provider fixes the 16
   addresses `wr_addr[i]`/`wr_valid[i]` it offers for the coming cell time.
   The data path writes the cell of input *i* at `wr_addr[i]`.
2. In clock *i* of the next cell time the header of input *i* is handled:
   fanout and type are written at its address; for a middle or last IP cell
   the address is written into the next field of the packet's previous cell;
   for an ATM cell the address is appended, with the cell's class, to every
   admitted destination queue at once.
3. An address that was offered but not used (no cell on that input) stays in
   the provider and is offered again; it is not returned to the free pool.
   Used addresses are replaced from the free pool (SMF), one per clock.

Read side (`read_scheduler`, one `port_read_sched` per output):

| clock after port *p*'s turn | action |
|---|---|
| T = *p* | port decides: next cell of its packet, or read its queue (strict priority over classes), or nothing (empty, or `bp_in[p]` high) |
| T+1 | queue answers with the SMA |
| T+2 | the shared Fanout/Next read port is given to port *p* |
| T+3 | entry returns: type and next address stored in the port |
| T+4 | departure visible on `rd_valid`, `rd_port`, `rd_addr`, `rd_type` |

Because the ports take their turns in consecutive clocks, the one Fanout/Next
read port serves all 16 outputs per cell time, at most one departure leaves
per clock, and each output sends at most one cell per cell time.

Release (`return_sma`): every departure increments the read counter of its
address; when the count reaches the fanout the counter is cleared and the
address goes back to SMF one clock later (`freed`).

## Admission, overflow and packets

These rules are this implementation's own choices where only the intent was
available:

* **Per-output limit.** An output may hold at most `QUOTA` =
  `MEM_CELLS * ALPHA_PERMILLE / 1000` stored cells (825 by default), counted
  per output (`occupancy`), so a few hot outputs cannot take the whole shared
  memory. An output at its limit is removed from the destination set of a
  new ATM cell or packet; the cell is stored for the remaining outputs only,
  with the reduced fanout.
* **Queue room.** An output is also refused while its list has 16 or fewer
  free nodes. That reserve guarantees that every packet already admitted (at
  most one unfinished packet per input) can still be queued.
* **IP packets are queued when complete.** The first cell's address enters the
  output queues when the last cell arrives, so an output never follows a next
  field that has not been written yet. The price is that a packet cannot start
  leaving before it has fully arrived.
* **Drops.** A cell with no admitted destination, or whose input has no free
  address this cell time, is dropped (`dropped`). If a middle or last cell
  finds no address, the packet is cut short: its last stored cell is re-marked
  as the last cell, the shortened packet is queued, and its remaining cells
  are dropped (`truncated`). A first cell that arrives while its input's
  previous packet is still open closes that packet the same way and is
  dropped with the rest of its own packet.
* **Back-pressure.** `bp_in[p]` sampled at port *p*'s turn stops that port for
  the cell time, also in the middle of a packet.
* **Priority.** Class 7 is the highest.

## Modules

| file | role |
|---|---|
| `rtl/pp_pkg.sv` | port and class counts, cell type enum, header struct, popcount |
| `rtl/pointer_path.sv` | top: cell-time counter and the wiring of everything below |
| `rtl/free_addr_pool.sv` | free-address FIFO: SMF, and each queue's free-node list |
| `rtl/free_addr_provider.sv` | 16 held free addresses, refilled one per clock |
| `rtl/cell_header_shreg.sv` | captures 16 headers, shifts out one per clock |
| `rtl/write_scheduler.sv` | provider + shift register + write controller |
| `rtl/fanout_next_mem.sv` | fanout/type array and next array, one read port |
| `rtl/linked_list.sv` | List RAM with 8 class lists, head/tail registers, strict-priority read |
| `rtl/port_read_sched.sv` | per-output choice between queue and packet chain |
| `rtl/read_scheduler.sv` | 16 port schedulers and the Fanout/Next read multiplexer |
| `rtl/return_sma.sv` | per-address read counters, address release |

Implementation notes:

* Each list keeps one empty placeholder node per class (the tail always
  points to it), so 8 of the `LL_DEPTH` nodes are never data; with the
  16-node reserve above, 776 entries per output are usable by default.
* The free address provider may refill an input's address register in the
  same clock the address is used. Without that, the input handled in the last
  clock of a cell time would miss the snapshot and could store only every
  other cell.
* The free pools start full without a fill loop: addresses never handed out
  come from a counter, returned ones from the FIFO.
* The read counters must start at zero; after reset `return_sma` clears them
  one per clock, and the top holds `ready` low (and the cell-time counter
  still) for `MEM_CELLS` clocks.
* Nothing is written back into the Fanout/Next memory when an address is
  freed; its entry is simply overwritten by the next cell stored there.
* Reset is synchronous and active low. Memories are not reset; none is read
  before it is written.
* `free_count` counts addresses in SMF. The 16 addresses held for the inputs
  are not in it, so an idle switch shows `MEM_CELLS - 16`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MEM_CELLS` | 5500 | shared-memory cells (11000 for the two-switch memory size) |
| `LL_DEPTH` | 800 | list nodes per output |
| `CELL_CLKS` | 16 | clocks per cell time, at least 16 |
| `ALPHA_PERMILLE` | 150 | per-output share of the shared memory, in 1/1000 |

Port and class counts (16 and 8) are package constants, because the header
struct depends on them.

## Interface of the top (`pointer_path`)

* `hdr_in[i]`: `{valid, ctype, cls, dest[15:0]}`, sampled while `cell_end` is high.
  For middle and last IP cells `cls` and `dest` are ignored (the first cell's
  values apply).
* `wr_addr[i]`, `wr_valid[i]`: write address for input *i*, stable for the
  whole cell time after `cell_end`.
* `rd_valid`, `rd_port`, `rd_addr`, `rd_type`: one departing cell per clock
  at most, for the data path to read and send.
* `bp_in[p]`: per-output back-pressure.
* Status: `ready`, `stored`, `dropped`, `truncated`, `freed`, `free_count`,
  `occupancy[p]`, `port_in_pkt[p]`.

Two-switch operation (two pointer paths sharing the load) is not implemented;
only the memory size can be raised to 11000. The load sweep below also
passes with `MEM_CELLS` set to 11000.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Build and run one with Verilator, for
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_pointer_path rtl/pp_pkg.sv tb/tb_pointer_path.sv
./obj_dir/Vtb_pointer_path
```

* `tb_pointer_path` (512 cells, 64 list nodes) and `tb_pointer_path_full`
  (all defaults) share `tb/pp_e2e_body.svh`. They play the inputs and the data
  path, remember which cell sits at each address, and check every departure:
  right destination, no duplicate, arrival order per input/output/class,
  packets leaving back to back and in sequence, one cell per output per cell
  time, nothing sent under back-pressure, strict priority, and after each
  drain every address back in the free pool. Traffic phases force multicast,
  IP packets, back-pressure, quota refusals, queue-room refusals, SMF
  exhaustion and packet truncation, and the test fails if any of them never
  happened. The full-size run takes a few seconds.
* `tb_pp_broadcast` (defaults): all 16 inputs multicast to all 16 outputs in
  one cell time; all 16 cells are stored within that cell time, every output
  sends all of them, and each address is freed right after its 16th read.
* `tb_pp_load` (defaults): a load sweep with bursty multicast traffic
  (on/off sources, mean burst 8 cells, 1 to 4 destinations per burst, output
  load 50 % to 100 %), once with ATM cell bursts and once with each burst as
  one IP packet. It checks departures against the stored cells, packets
  leaving back to back, work conservation for ATM traffic (an output holding
  a cell at its turn sends one), that departures plus backlog growth match
  the accepted load, no loss up to 80 % load, and that the mean delay grows
  with load. It prints the throughput and delay per load. With the seed used
  here there was no loss at any load. The mean delay from storage to
  departure rose from about 6 cell times at 50 % to about 130 at 100 % for
  ATM bursts, and from about 14 to about 130 for IP packets. IP packets wait
  longer at light load because they are queued only once complete.
* The block testbenches (`tb_free_addr_pool`, `tb_fanout_next_mem`,
  `tb_cell_header_shreg`, `tb_free_addr_provider`, `tb_write_scheduler`,
  `tb_linked_list`, `tb_port_read_sched`, `tb_read_scheduler`,
  `tb_return_sma`) compare each block with a reference model in the
  testbench; the read scheduler test also checks the fixed four-clock turn to
  departure latency.

## How far to trust it

The structure (free-address FIFO, held free addresses per input, header shift
register, per-output eight-class linked lists with head and tail registers and
a free-node list, port read schedulers with a next-address register and a
shared Fanout/Next read port, read counters that release an address at its
fanout) follows the published architecture. Clock-level timing, encodings,
header layout, reset behaviour, the admission and overflow rules, and the
choice to queue IP packets only when complete are this implementation's, as
listed above. No throughput or delay figures of the original design were
reproduced; the RTL has been simulated, linted and elaborated, not run on
hardware.

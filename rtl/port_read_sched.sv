// port_read_sched: the port read scheduler of one output port.
//
// Once per cell time the port gets its `turn`. It then chooses the shared-
// memory address (SMA) that leaves on this output in this cell time:
//  * inside an IP packet, the address held in the Next_Address register
//    (the next cell of the packet); the linked list is not read;
//  * otherwise, if its linked list is not empty, it raises `ll_rd` and takes
//    the address the list returns one clock later.
// When `bp_in` (back-pressure from the control path) is high at the turn, the
// port stays idle for that cell time, also in the middle of a packet (own
// choice; the design only says BPIn deactivates the port).
// The chosen address is held on `cur_addr` with `pending` set until the read
// scheduler has fetched its Fanout/Next entry and returns it with `fn_valid`.
// The cell type decides the next cell time: after a first or middle IP cell
// the next-cell address is stored and the list stays unread; after the last
// IP cell or an ATM cell the port goes back to its linked list.
module port_read_sched
  import pp_pkg::*;
#(
  parameter int MEM_CELLS = 5500,
  localparam int AW = $clog2(MEM_CELLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          turn,
  input  logic          bp_in,
  // linked list of this port
  input  logic          ll_nempty,
  output logic          ll_rd,
  input  logic          ll_valid,
  input  logic [AW-1:0] ll_sma,
  // Fanout/Next data of cur_addr
  input  logic          fn_valid,
  input  cell_type_e    fn_type,
  input  logic [AW-1:0] fn_next,
  // chosen read address
  output logic [AW-1:0] cur_addr,
  output logic          pending,
  output logic          in_pkt
);

  logic [AW-1:0] next_addr;

  assign ll_rd = turn && !bp_in && !in_pkt && ll_nempty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_addr  <= '0;
      next_addr <= '0;
      pending   <= 1'b0;
      in_pkt    <= 1'b0;
    end else begin
      if (turn && !bp_in && in_pkt) begin
        cur_addr <= next_addr;
        pending  <= 1'b1;
      end
      if (ll_valid) begin
        cur_addr <= ll_sma;
        pending  <= 1'b1;
      end
      if (fn_valid) begin
        pending <= 1'b0;
        if (fn_type == CT_IP_START || fn_type == CT_IP_MID) begin
          in_pkt    <= 1'b1;
          next_addr <= fn_next;
        end else begin
          in_pkt <= 1'b0;
        end
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    turn |-> !pending);

endmodule

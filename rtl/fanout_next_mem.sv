// fanout_next_mem: the Fanout/Next memory of the pointer path.
//
// One entry per shared-memory cell, at the same address as the cell. Each
// entry holds three fields: the fanout (number of outputs that still have to
// read the cell), the cell type (ATM, or first/middle/last cell of an IP
// packet) and the address of the next cell of the same IP packet. Together
// with the output linked lists this forms the two-dimensional list: the
// output queues hold one entry per ATM cell or IP packet, and the next field
// chains the cells of a packet.
//
// The fields are written at different times: fanout and type when a cell
// arrives, the next field of the previous cell of a packet when its
// successor arrives. The entry is therefore split into two arrays, each with
// its own write port, so both writes can happen in one clock (own choice).
// One synchronous read port returns the whole entry one clock after `re`.
module fanout_next_mem
  import pp_pkg::*;
#(
  parameter int MEM_CELLS = 5500,
  localparam int AW = $clog2(MEM_CELLS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // fanout/type write (write scheduler, cell arrival)
  input  logic                ft_we,
  input  logic [AW-1:0]       ft_waddr,
  input  logic [FANOUT_W-1:0] ft_fanout,
  input  cell_type_e          ft_type,
  // next-cell write (write scheduler, IP packet linking)
  input  logic                nx_we,
  input  logic [AW-1:0]       nx_waddr,
  input  logic [AW-1:0]       nx_next,
  // read port (read scheduler)
  input  logic                re,
  input  logic [AW-1:0]       raddr,
  output logic                rd_valid,
  output logic [FANOUT_W-1:0] rd_fanout,
  output cell_type_e          rd_type,
  output logic [AW-1:0]       rd_next
);

  typedef struct packed {
    logic [FANOUT_W-1:0] fanout;
    cell_type_e          ctype;
  } ft_t;

  ft_t           ft_mem [MEM_CELLS];
  logic [AW-1:0] nx_mem [MEM_CELLS];
  ft_t           ft_q;

  always_ff @(posedge clk) begin
    if (ft_we) ft_mem[ft_waddr] <= '{fanout: ft_fanout, ctype: ft_type};
    if (nx_we) nx_mem[nx_waddr] <= nx_next;
    if (re) begin
      ft_q    <= ft_mem[raddr];
      rd_next <= nx_mem[raddr];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= re;
  end

  assign rd_fanout = ft_q.fanout;
  assign rd_type   = ft_q.ctype;

endmodule

// linked_list: the output queue of one output port.
//
// A List RAM of LL_DEPTH nodes holds N_CLASSES (8) separate linked lists, one
// per priority class; each node carries a shared-memory address (SMA) as its
// data and the List RAM address of the next node. Eight tail registers and
// eight head registers point into the RAM, and a Free List Addresses pool
// (the same FIFO as SMF) holds the unused nodes.
//
// Write side: on `wr` the SMA is written into the node the tail register of
// class `wr_cls` points to, together with a fresh node taken from the free
// list; that fresh node becomes the new tail. Every tail therefore points to
// an empty placeholder node (8 nodes are always in use that way), and a class
// is empty when its head equals its tail. These placeholder details are this
// design's reading of the block diagram.
// Read side: on `rd` a strict-priority controller picks the highest non-empty
// class (class N_CLASSES-1 is the highest, own choice), outputs the SMA at its
// head on `rd_sma` one clock later with `rd_valid`, advances the head and
// returns the old head node to the free list. A read and a write may happen
// in the same clock, one read and one write per clock at most.
// `free_cnt` lets the write side refuse a cell before the RAM runs full.
module linked_list
  import pp_pkg::*;
#(
  parameter int MEM_CELLS = 5500,
  parameter int LL_DEPTH  = 800,
  localparam int AW = $clog2(MEM_CELLS),
  localparam int LW = $clog2(LL_DEPTH),
  localparam int CW = $clog2(LL_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side (from the write scheduler controller)
  input  logic             wr,
  input  logic [CLS_W-1:0] wr_cls,
  input  logic [AW-1:0]    wr_sma,
  // read side (from the port read scheduler)
  input  logic             rd,
  output logic             nempty,
  output logic             rd_valid,
  output logic [AW-1:0]    rd_sma,
  output logic [CLS_W-1:0] rd_cls,
  // free nodes left
  output logic [CW-1:0]    free_cnt
);

  typedef struct packed {
    logic [AW-1:0] sma;
    logic [LW-1:0] next;
  } node_t;

  node_t                        list_ram [LL_DEPTH];
  logic [N_CLASSES-1:0][LW-1:0] head, tail;
  logic [N_CLASSES-1:0]         ne;
  logic [CLS_W-1:0]             sel;
  logic [LW-1:0]                fl_head;
  logic                         fl_avail;
  logic                         do_rd, do_wr;
  node_t                        rnode;

  // free list: nodes 0..N_CLASSES-1 start as the placeholders of the classes
  free_addr_pool #(.DEPTH(LL_DEPTH), .FIRST(N_CLASSES)) u_free_list (
    .clk, .rst_n,
    .pop      (do_wr),
    .head     (fl_head),
    .avail    (fl_avail),
    .push     (do_rd),
    .push_addr(head[sel]),
    .count    (free_cnt)
  );

  // strict priority: highest non-empty class
  always_comb begin
    for (int c = 0; c < N_CLASSES; c++) ne[c] = (head[c] != tail[c]);
    sel = '0;
    for (int c = 0; c < N_CLASSES; c++) if (ne[c]) sel = CLS_W'(c);
  end

  assign nempty = |ne;
  assign do_rd  = rd && nempty;
  assign do_wr  = wr && fl_avail;
  assign rnode  = list_ram[head[sel]];

  always_ff @(posedge clk) begin
    if (do_wr) list_ram[tail[wr_cls]] <= '{sma: wr_sma, next: fl_head};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CLASSES; c++) begin
        head[c] <= LW'(c);
        tail[c] <= LW'(c);
      end
      rd_valid <= 1'b0;
      rd_sma   <= '0;
      rd_cls   <= '0;
    end else begin
      if (do_wr) tail[wr_cls] <= fl_head;
      if (do_rd) head[sel]    <= rnode.next;
      rd_valid <= do_rd;
      if (do_rd) begin
        rd_sma <= rnode.sma;
        rd_cls <= sel;
      end
    end
  end

  a_wr_room: assert property (@(posedge clk) disable iff (!rst_n) wr |-> fl_avail);
  a_rd_data: assert property (@(posedge clk) disable iff (!rst_n) rd |-> nempty);

endmodule

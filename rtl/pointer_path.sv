// pointer_path: memory manager of a 16-port shared-memory ATM/IP switch.
//
// All inputs write their cells into one shared cell memory (the data path,
// outside this block); this block manages only the addresses. It keeps the
// free addresses (SMF), gives each input a free address per cell time, keeps
// fanout, cell type and IP-packet chaining per stored cell (Fanout/Next
// memory), queues addresses per output and priority class in 16 independent
// linked lists, picks one cell per output per cell time (read scheduler) and
// frees an address once every destination output has read it (Return Shared
// Memory Address). Because each output has its own list, a multicast cell is
// queued to all its outputs in one clock and stored only once.
//
// Cell time: CELL_CLKS clocks (at least 16). `cell_end` marks its last clock.
// In that clock `hdr_in` (one header per input) is sampled; during the next
// cell time `wr_addr[i]` (valid when `wr_valid[i]`) is where the data path
// writes the cell of input i. Departures come one per clock on `rd_*`: the
// output port, the shared-memory address to read, and the cell type. Each
// output sends at most one cell per cell time; a port whose `bp_in` bit is
// high at its turn sends nothing in that cell time. After reset the block
// clears its read counters for MEM_CELLS clocks and raises `ready`; cell times
// run only while `ready` is high.
// `stored`, `dropped`, `truncated` and `freed` pulse on the events of the
// same names; `free_count` is the number of free shared-memory cells,
// `occupancy[k]` the number of stored cells still to leave on output k, and
// `port_in_pkt[k]` shows output k in the middle of an IP packet.
//
// Sizes (5500 shared cells, 800 list nodes per output, 8 classes, alpha of
// 0.15) are those of the design; the cell-time timing and the interface
// signals are this implementation's own.
module pointer_path
  import pp_pkg::*;
#(
  parameter int MEM_CELLS      = 5500,
  parameter int LL_DEPTH       = 800,
  parameter int CELL_CLKS      = 16,
  parameter int ALPHA_PERMILLE = 150,
  localparam int AW  = $clog2(MEM_CELLS),
  localparam int CW  = $clog2(MEM_CELLS + 1),
  localparam int LCW = $clog2(LL_DEPTH + 1),
  localparam int SW  = $clog2(CELL_CLKS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       ready,
  output logic                       cell_end,
  // input side
  input  cell_hdr_t [N_PORTS-1:0]    hdr_in,
  output logic [N_PORTS-1:0][AW-1:0] wr_addr,
  output logic [N_PORTS-1:0]         wr_valid,
  // output side
  input  logic [N_PORTS-1:0]         bp_in,
  output logic                       rd_valid,
  output logic [PORT_W-1:0]          rd_port,
  output logic [AW-1:0]              rd_addr,
  output cell_type_e                 rd_type,
  // status
  output logic                       stored,
  output logic                       dropped,
  output logic                       truncated,
  output logic                       freed,
  output logic [CW-1:0]              free_count,
  output logic [N_PORTS-1:0][CW-1:0] occupancy,
  output logic [N_PORTS-1:0]         port_in_pkt
);

  // ---------------- cell-time counter ----------------
  logic [SW-1:0] slot;
  logic          turn_valid;

  always_ff @(posedge clk) begin
    if (!rst_n || !ready) slot <= '0;
    else if (slot == SW'(CELL_CLKS - 1)) slot <= '0;
    else slot <= slot + 1'b1;
  end

  assign cell_end   = ready && (slot == SW'(CELL_CLKS - 1));
  assign turn_valid = ready && (int'(slot) < N_PORTS);

  // ---------------- SMF ----------------
  logic          smf_pop, smf_avail, smf_push;
  logic [AW-1:0] smf_head, smf_addr;

  free_addr_pool #(.DEPTH(MEM_CELLS), .FIRST(0)) u_smf (
    .clk, .rst_n,
    .pop      (smf_pop),
    .head     (smf_head),
    .avail    (smf_avail),
    .push     (smf_push),
    .push_addr(smf_addr),
    .count    (free_count)
  );

  // ---------------- Fanout/Next memory ----------------
  logic                ft_we, nx_we, fn_re, fn_rd_valid;
  logic [AW-1:0]       ft_waddr, nx_waddr, nx_next, fn_raddr, fn_next;
  logic [FANOUT_W-1:0] ft_fanout, fn_fanout;
  cell_type_e          ft_type, fn_type;

  fanout_next_mem #(.MEM_CELLS(MEM_CELLS)) u_fn (
    .clk, .rst_n,
    .ft_we, .ft_waddr, .ft_fanout, .ft_type,
    .nx_we, .nx_waddr, .nx_next,
    .re(fn_re), .raddr(fn_raddr),
    .rd_valid(fn_rd_valid), .rd_fanout(fn_fanout), .rd_type(fn_type), .rd_next(fn_next)
  );

  // ---------------- write scheduler ----------------
  logic [N_PORTS-1:0]             ll_wr;
  logic [CLS_W-1:0]               ll_wr_cls;
  logic [AW-1:0]                  ll_wr_sma;
  logic [N_PORTS-1:0][LCW-1:0]    ll_free;
  logic                           dep_valid;
  logic [PORT_W-1:0]              dep_port;
  logic [AW-1:0]                  dep_addr;
  logic [FANOUT_W-1:0]            dep_fanout;

  write_scheduler #(
    .MEM_CELLS(MEM_CELLS), .LL_DEPTH(LL_DEPTH), .ALPHA_PERMILLE(ALPHA_PERMILLE)
  ) u_ws (
    .clk, .rst_n,
    .load(cell_end), .hdr_in,
    .smf_pop, .smf_head, .smf_avail,
    .wr_addr, .wr_valid,
    .ft_we, .ft_waddr, .ft_fanout, .ft_type,
    .nx_we, .nx_waddr, .nx_next,
    .ll_wr, .ll_wr_cls, .ll_wr_sma, .ll_free,
    .dep_valid, .dep_port, .occupancy,
    .stored, .dropped, .truncated
  );

  // ---------------- linked lists ----------------
  logic [N_PORTS-1:0]         ll_rd, ll_nempty, ll_valid;
  logic [N_PORTS-1:0][AW-1:0] ll_sma;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_ll
    logic [CLS_W-1:0] rd_cls_unused;
    linked_list #(.MEM_CELLS(MEM_CELLS), .LL_DEPTH(LL_DEPTH)) u_ll (
      .clk, .rst_n,
      .wr      (ll_wr[p]),
      .wr_cls  (ll_wr_cls),
      .wr_sma  (ll_wr_sma),
      .rd      (ll_rd[p]),
      .nempty  (ll_nempty[p]),
      .rd_valid(ll_valid[p]),
      .rd_sma  (ll_sma[p]),
      .rd_cls  (rd_cls_unused),
      .free_cnt(ll_free[p])
    );
  end

  // ---------------- read scheduler ----------------
  read_scheduler #(.MEM_CELLS(MEM_CELLS)) u_rs (
    .clk, .rst_n,
    .turn_valid, .turn_port(PORT_W'(slot)), .bp_in,
    .ll_nempty, .ll_rd, .ll_valid, .ll_sma,
    .fn_re, .fn_raddr, .fn_rd_valid, .fn_fanout, .fn_type, .fn_next,
    .out_valid(dep_valid), .out_port(dep_port), .out_addr(dep_addr),
    .out_fanout(dep_fanout), .out_type(rd_type),
    .port_in_pkt
  );

  assign rd_valid = dep_valid;
  assign rd_port  = dep_port;
  assign rd_addr  = dep_addr;

  // ---------------- return shared memory address ----------------
  return_sma #(.MEM_CELLS(MEM_CELLS)) u_ret (
    .clk, .rst_n, .ready,
    .in_valid (dep_valid),
    .in_sma   (dep_addr),
    .in_fanout(dep_fanout),
    .smf_push,
    .smf_addr
  );

  assign freed = smf_push;

  initial begin
    assert (CELL_CLKS >= N_PORTS) else $error("a cell time needs at least N_PORTS clocks");
  end

endmodule

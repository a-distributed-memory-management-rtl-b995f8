// read_scheduler: the read scheduler of the pointer path.
//
// It holds one port_read_sched per output and the multiplexer that shares the
// single read port of the Fanout/Next memory among them, one port per clock.
// Class selection happens inside the linked lists, so this block only decides
// per port between "next cell of the current IP packet" and "next entry of
// the output queue".
//
// Timing (own choice, one port per clock, fixed offsets): port p gets its
// turn in the clock where `turn_valid` is high with `turn_port == p`
// (clock T). Its linked list, if read, answers in T+1. In T+2 the
// multiplexer puts the port's address on the Fanout/Next read port, and in
// T+3 the entry comes back: the port stores type and next address, and the
// block emits the departing cell on `out_*` (port, shared-memory address,
// fanout, type). That stream is the read-address output towards the data
// path, and also feeds the Return Shared Memory Address block. With turns in
// consecutive clocks each stage serves a different port, so at most one cell
// leaves per clock and every port sends at most one cell per cell time.
module read_scheduler
  import pp_pkg::*;
#(
  parameter int MEM_CELLS = 5500,
  localparam int AW = $clog2(MEM_CELLS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       turn_valid,
  input  logic [PORT_W-1:0]          turn_port,
  input  logic [N_PORTS-1:0]         bp_in,
  // linked lists
  input  logic [N_PORTS-1:0]         ll_nempty,
  output logic [N_PORTS-1:0]         ll_rd,
  input  logic [N_PORTS-1:0]         ll_valid,
  input  logic [N_PORTS-1:0][AW-1:0] ll_sma,
  // Fanout/Next memory read port
  output logic                       fn_re,
  output logic [AW-1:0]              fn_raddr,
  input  logic                       fn_rd_valid,
  input  logic [FANOUT_W-1:0]        fn_fanout,
  input  cell_type_e                 fn_type,
  input  logic [AW-1:0]              fn_next,
  // departing cells
  output logic                       out_valid,
  output logic [PORT_W-1:0]          out_port,
  output logic [AW-1:0]              out_addr,
  output logic [FANOUT_W-1:0]        out_fanout,
  output cell_type_e                 out_type,
  // ports that are in the middle of an IP packet
  output logic [N_PORTS-1:0]         port_in_pkt
);

  logic [N_PORTS-1:0]         turn, fn_hit, pending;
  logic [N_PORTS-1:0][AW-1:0] cur_addr;
  logic                       s1_v, s2_v, s3_v;
  logic [PORT_W-1:0]          s1_p, s2_p, s3_p;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    assign turn[p]   = turn_valid && (turn_port == PORT_W'(p));
    assign fn_hit[p] = fn_rd_valid && s3_v && (s3_p == PORT_W'(p));

    port_read_sched #(.MEM_CELLS(MEM_CELLS)) u_prs (
      .clk, .rst_n,
      .turn     (turn[p]),
      .bp_in    (bp_in[p]),
      .ll_nempty(ll_nempty[p]),
      .ll_rd    (ll_rd[p]),
      .ll_valid (ll_valid[p]),
      .ll_sma   (ll_sma[p]),
      .fn_valid (fn_hit[p]),
      .fn_type  (fn_type),
      .fn_next  (fn_next),
      .cur_addr (cur_addr[p]),
      .pending  (pending[p]),
      .in_pkt   (port_in_pkt[p])
    );
  end

  // port index pipeline: turn -> list answer -> Fanout/Next read -> result
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
      s1_p <= '0;   s2_p <= '0;   s3_p <= '0;
    end else begin
      s1_v <= turn_valid;
      s1_p <= turn_port;
      s2_v <= s1_v;
      s2_p <= s1_p;
      s3_v <= fn_re;
      s3_p <= s2_p;
    end
  end

  // the multiplexer onto the Fanout/Next address port
  assign fn_re    = s2_v && pending[s2_p];
  assign fn_raddr = cur_addr[s2_p];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_port   <= '0;
      out_addr   <= '0;
      out_fanout <= '0;
      out_type   <= CT_ATM;
    end else begin
      out_valid <= fn_rd_valid && s3_v;
      if (fn_rd_valid && s3_v) begin
        out_port   <= s3_p;
        out_addr   <= cur_addr[s3_p];
        out_fanout <= fn_fanout;
        out_type   <= fn_type;
      end
    end
  end

endmodule

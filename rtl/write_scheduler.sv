// write_scheduler: the write scheduler of the pointer path.
//
// It is built from three parts: the Free Address Provider (free addresses for
// the data path), the Cell Header Shift Register (one input header per clock)
// and the controller below. At the end of each cell time (`load`) the 16
// input headers are captured and the provider's addresses for the next cell
// time are fixed; in the following 16 clocks input 0..15 is handled, one per
// clock. For a valid cell stored at address A the controller
//  * writes fanout (popcount of the admitted destinations) and cell type into
//    the Fanout/Next memory at A;
//  * for a middle or last IP cell, writes A into the next field of the
//    packet's previous cell, linking the packet;
//  * for an ATM cell, raises the write command of every admitted output's
//    linked list at once (multicast), with the cell's class and A;
//  * for an IP packet, writes the first cell's address into the linked lists
//    only, never middle or last cells.
//
// Own choices where the design is silent:
//  * An IP packet enters the output queues when its last cell has arrived
//    (store and forward), so an output never follows a next field that is
//    not yet written.
//  * Output admission, checked on ATM and first IP cells: an output takes a
//    cell only while fewer than QUOTA cells wait for it (the at-most
//    alpha*MEMS rule, QUOTA = MEM_CELLS*ALPHA_PERMILLE/1000) and its list
//    RAM has more than N_PORTS free nodes (room for one unfinished packet per
//    input). Refused outputs are removed from the destination set; a cell
//    left with none, or without a free address, is dropped. All cells of a
//    packet use the destination set fixed by its first cell.
//  * If a middle or last cell finds no free address, the packet is cut: its
//    last stored cell is re-marked as the last cell, the packet is queued and
//    the rest of it is dropped. A first cell that arrives while the input's
//    previous packet is still open closes that packet the same way and is
//    itself dropped with the rest of its packet; middle or last cells with no
//    open packet are dropped. No address is ever lost this way.
// `stored`, `dropped` and `truncated` pulse once per such event.
module write_scheduler
  import pp_pkg::*;
#(
  parameter int MEM_CELLS      = 5500,
  parameter int LL_DEPTH       = 800,
  parameter int ALPHA_PERMILLE = 150,
  localparam int AW    = $clog2(MEM_CELLS),
  localparam int LCW   = $clog2(LL_DEPTH + 1),
  localparam int OW    = $clog2(MEM_CELLS + 1),
  localparam int QUOTA = MEM_CELLS * ALPHA_PERMILLE / 1000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  cell_hdr_t [N_PORTS-1:0]     hdr_in,
  // SMF read side
  output logic                        smf_pop,
  input  logic [AW-1:0]               smf_head,
  input  logic                        smf_avail,
  // write addresses for the data path, stable for one cell time
  output logic [N_PORTS-1:0][AW-1:0]  wr_addr,
  output logic [N_PORTS-1:0]          wr_valid,
  // Fanout/Next memory write ports
  output logic                        ft_we,
  output logic [AW-1:0]               ft_waddr,
  output logic [FANOUT_W-1:0]         ft_fanout,
  output cell_type_e                  ft_type,
  output logic                        nx_we,
  output logic [AW-1:0]               nx_waddr,
  output logic [AW-1:0]               nx_next,
  // linked list write commands
  output logic [N_PORTS-1:0]          ll_wr,
  output logic [CLS_W-1:0]            ll_wr_cls,
  output logic [AW-1:0]               ll_wr_sma,
  input  logic [N_PORTS-1:0][LCW-1:0] ll_free,
  // departures, for the per-output occupancy
  input  logic                        dep_valid,
  input  logic [PORT_W-1:0]           dep_port,
  output logic [N_PORTS-1:0][OW-1:0]  occupancy,
  // events
  output logic                        stored,
  output logic                        dropped,
  output logic                        truncated
);

  cell_hdr_t          h;
  logic [PORT_W-1:0]  i;
  logic [N_PORTS-1:0] consume;

  cell_header_shreg u_shreg (
    .clk, .rst_n, .load, .hdr_in, .head(h), .head_port(i)
  );

  free_addr_provider #(.MEM_CELLS(MEM_CELLS)) u_fap (
    .clk, .rst_n, .smf_pop, .smf_head, .smf_avail,
    .snap(load), .consume, .wr_addr, .wr_valid
  );

  // per-input packet state
  logic [N_PORTS-1:0]              pkt_act, pkt_drop;
  logic [N_PORTS-1:0][N_PORTS-1:0] pkt_mask;
  logic [N_PORTS-1:0][CLS_W-1:0]   pkt_cls;
  logic [N_PORTS-1:0][AW-1:0]      pkt_start, pkt_prev;

  logic [N_PORTS-1:0] adm, m, inc;
  logic [AW-1:0]      a;
  logic               av;
  // next packet state of input i
  logic               n_act, n_drop, st_upd;
  logic [AW-1:0]      n_prev, n_start;

  always_comb begin
    for (int k = 0; k < N_PORTS; k++)
      adm[k] = (occupancy[k] < OW'(QUOTA)) && (ll_free[k] > LCW'(N_PORTS));
  end

  assign a  = wr_addr[i];
  assign av = wr_valid[i];
  assign m  = h.dest & adm;

  always_comb begin
    consume   = '0;
    ft_we     = 1'b0;
    ft_waddr  = a;
    ft_fanout = '0;
    ft_type   = h.ctype;
    nx_we     = 1'b0;
    nx_waddr  = pkt_prev[i];
    nx_next   = a;
    ll_wr     = '0;
    ll_wr_cls = h.cls;
    ll_wr_sma = a;
    inc       = '0;
    stored    = 1'b0;
    dropped   = 1'b0;
    truncated = 1'b0;
    st_upd    = 1'b0;
    n_act     = pkt_act[i];
    n_drop    = pkt_drop[i];
    n_prev    = pkt_prev[i];
    n_start   = pkt_start[i];
    if (h.valid) begin
      unique case (h.ctype)
        CT_ATM: begin
          if (m != '0 && av) begin
            consume[i] = 1'b1;
            ft_we      = 1'b1;
            ft_fanout  = popcount(m);
            ll_wr      = m;
            inc        = m;
            stored     = 1'b1;
          end else begin
            dropped = 1'b1;
          end
        end
        CT_IP_START: begin
          st_upd = 1'b1;
          n_act  = 1'b1;
          if (pkt_act[i] && !pkt_drop[i]) begin
            // previous packet never ended: close it, drop the new one
            dropped   = 1'b1;
            truncated = 1'b1;
            ft_we     = 1'b1;
            ft_waddr  = pkt_prev[i];
            ft_fanout = popcount(pkt_mask[i]);
            ft_type   = CT_IP_LAST;
            ll_wr     = pkt_mask[i];
            ll_wr_cls = pkt_cls[i];
            ll_wr_sma = pkt_start[i];
            n_drop    = 1'b1;
          end else if (m != '0 && av) begin
            consume[i] = 1'b1;
            ft_we      = 1'b1;
            ft_fanout  = popcount(m);
            inc        = m;
            stored     = 1'b1;
            n_drop     = 1'b0;
            n_start    = a;
            n_prev     = a;
          end else begin
            dropped = 1'b1;
            n_drop  = 1'b1;
          end
        end
        default: begin  // middle or last IP cell
          st_upd = 1'b1;
          if (h.ctype == CT_IP_LAST) n_act = 1'b0;
          if (!pkt_act[i] || pkt_drop[i]) begin
            dropped = 1'b1;
          end else if (av) begin
            consume[i] = 1'b1;
            ft_we      = 1'b1;
            ft_fanout  = popcount(pkt_mask[i]);
            nx_we      = 1'b1;
            inc        = pkt_mask[i];
            stored     = 1'b1;
            n_prev     = a;
            if (h.ctype == CT_IP_LAST) begin
              ll_wr     = pkt_mask[i];
              ll_wr_cls = pkt_cls[i];
              ll_wr_sma = pkt_start[i];
            end
          end else begin
            // no free address: close the packet at its last stored cell
            dropped   = 1'b1;
            truncated = 1'b1;
            ft_we     = 1'b1;
            ft_waddr  = pkt_prev[i];
            ft_fanout = popcount(pkt_mask[i]);
            ft_type   = CT_IP_LAST;
            ll_wr     = pkt_mask[i];
            ll_wr_cls = pkt_cls[i];
            ll_wr_sma = pkt_start[i];
            n_drop    = 1'b1;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt_act   <= '0;
      pkt_drop  <= '0;
      pkt_mask  <= '0;
      pkt_cls   <= '0;
      pkt_start <= '0;
      pkt_prev  <= '0;
      occupancy <= '0;
    end else begin
      if (st_upd) begin
        pkt_act[i]   <= n_act;
        pkt_drop[i]  <= n_drop;
        pkt_start[i] <= n_start;
        pkt_prev[i]  <= n_prev;
        if (h.ctype == CT_IP_START && !(pkt_act[i] && !pkt_drop[i])) begin
          pkt_mask[i] <= m;
          pkt_cls[i]  <= h.cls;
        end
      end
      for (int k = 0; k < N_PORTS; k++)
        occupancy[k] <= occupancy[k] + OW'(inc[k])
                        - OW'(dep_valid && dep_port == PORT_W'(k));
    end
  end

endmodule

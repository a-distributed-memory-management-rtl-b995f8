// tb_write_scheduler: self-checking test of the write scheduler.
// The testbench models SMF (a queue of free addresses), the linked lists'
// free-node counts and the departures. Each cell time it presents 16 random
// headers (ATM cells and IP packets of 1..4 further cells, unicast and
// multicast, random classes) and, in the clock where input i is handled,
// compares every write command of the block with a cell-level reference:
// Fanout/Next fanout/type write, IP next-field link, linked-list write mask,
// class and address. The reference applies the output admission rule
// (occupancy below QUOTA, more than 16 free list nodes) and the packet
// truncation when SMF runs dry. Every mechanism must occur at least once:
// multicast store, IP packet queued at its last cell, quota refusal, list
// room refusal, drop for lack of an address, truncation, and an unfinished
// packet closed by a new first cell on the same input.
module tb_write_scheduler;
  import pp_pkg::*;
  localparam int MEM_CELLS = 512;
  localparam int LL_DEPTH  = 800;
  localparam int ALPHA_PERMILLE = 150;
  localparam int QUOTA = MEM_CELLS * ALPHA_PERMILLE / 1000;
  localparam int AW  = $clog2(MEM_CELLS);
  localparam int LCW = $clog2(LL_DEPTH + 1);
  localparam int OW  = $clog2(MEM_CELLS + 1);
  localparam int CELL_CLKS = 16;

  logic clk = 0, rst_n = 0, load = 0;
  cell_hdr_t [N_PORTS-1:0] hdr_in = '0;
  logic smf_pop, smf_avail;
  logic [AW-1:0] smf_head;
  logic [N_PORTS-1:0][AW-1:0] wr_addr;
  logic [N_PORTS-1:0] wr_valid;
  logic ft_we, nx_we;
  logic [AW-1:0] ft_waddr, nx_waddr, nx_next;
  logic [FANOUT_W-1:0] ft_fanout;
  cell_type_e ft_type;
  logic [N_PORTS-1:0] ll_wr;
  logic [CLS_W-1:0] ll_wr_cls;
  logic [AW-1:0] ll_wr_sma;
  logic [N_PORTS-1:0][LCW-1:0] ll_free;
  logic dep_valid = 0;
  logic [PORT_W-1:0] dep_port = '0;
  logic [N_PORTS-1:0][OW-1:0] occupancy;
  logic stored, dropped, truncated;
  int checks = 0, failures = 0;

  write_scheduler #(.MEM_CELLS(MEM_CELLS), .LL_DEPTH(LL_DEPTH),
                    .ALPHA_PERMILLE(ALPHA_PERMILLE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- SMF model ----------------
  logic [AW-1:0] smf_q [$];
  bit smf_on = 1;
  assign smf_avail = smf_on && smf_q.size() > 0;
  assign smf_head  = (smf_q.size() > 0) ? smf_q[0] : '0;
  always @(posedge clk) if (rst_n && smf_pop) void'(smf_q.pop_front());

  // ---------------- reference state ----------------
  int occ [N_PORTS];
  int free_nodes [N_PORTS];
  bit act [N_PORTS], drp [N_PORTS];
  logic [N_PORTS-1:0] pmask [N_PORTS];
  logic [CLS_W-1:0] pcls [N_PORTS];
  logic [AW-1:0] pstart [N_PORTS], pprev [N_PORTS];
  int pkt_left [N_PORTS];   // cells still to send of the current packet
  int n_abort = 0, n_mcast = 0, n_ipq = 0, n_quota = 0, n_room = 0, n_noaddr = 0, n_trunc = 0;

  always_comb for (int k = 0; k < N_PORTS; k++) ll_free[k] = LCW'(free_nodes[k]);

  function automatic logic [N_PORTS-1:0] admit();
    logic [N_PORTS-1:0] r;
    for (int k = 0; k < N_PORTS; k++) r[k] = (occ[k] < QUOTA) && (free_nodes[k] > N_PORTS);
    return r;
  endfunction

  function automatic int pop(input logic [N_PORTS-1:0] m);
    int n = 0;
    for (int k = 0; k < N_PORTS; k++) n += int'(m[k]);
    return n;
  endfunction

  // expected commands for the input handled in this clock
  task automatic expect_cell(input int i, input cell_hdr_t h);
    logic [N_PORTS-1:0] m, adm, e_ll, inc;
    bit e_ft, e_nx, e_st, e_dr, e_tr;
    logic [AW-1:0] e_ftaddr, e_llsma;
    int e_fan;
    cell_type_e e_type;
    logic [CLS_W-1:0] e_cls;
    logic [AW-1:0] a;
    bit av;
    a = wr_addr[i]; av = wr_valid[i];
    adm = admit();
    m = h.dest & adm;
    e_ft = 0; e_nx = 0; e_ll = '0; e_st = 0; e_dr = 0; e_tr = 0; inc = '0;
    e_ftaddr = a; e_fan = 0; e_type = h.ctype; e_llsma = a; e_cls = h.cls;
    if (h.valid) begin
      if ((h.ctype == CT_ATM || h.ctype == CT_IP_START) && (h.dest & ~adm) != '0) begin
        for (int k = 0; k < N_PORTS; k++) if (h.dest[k] && !adm[k]) begin
          if (free_nodes[k] <= N_PORTS) n_room++; else n_quota++;
        end
      end
      case (h.ctype)
        CT_ATM:
          if (m != '0 && av) begin
            e_ft = 1; e_fan = pop(m); e_ll = m; inc = m; e_st = 1;
            if (pop(m) > 1) n_mcast++;
          end else begin e_dr = 1; if (!av && m != '0) n_noaddr++; end
        CT_IP_START: begin
          if (act[i] && !drp[i]) begin
            // unfinished packet closed, new first cell dropped
            e_dr = 1; e_tr = 1; n_trunc++; n_abort++;
            e_ft = 1; e_ftaddr = pprev[i]; e_fan = pop(pmask[i]); e_type = CT_IP_LAST;
            e_ll = pmask[i]; e_cls = pcls[i]; e_llsma = pstart[i];
            drp[i] = 1;
          end else if (m != '0 && av) begin
            e_ft = 1; e_fan = pop(m); inc = m; e_st = 1;
            drp[i] = 0; pmask[i] = m; pcls[i] = h.cls; pstart[i] = a; pprev[i] = a;
          end else begin
            e_dr = 1; drp[i] = 1;
            if (!av && m != '0) n_noaddr++;
          end
          act[i] = 1;
        end
        default: begin
          if (!act[i] || drp[i]) e_dr = 1;
          else if (av) begin
            e_ft = 1; e_fan = pop(pmask[i]); e_nx = 1; inc = pmask[i]; e_st = 1;
            if (h.ctype == CT_IP_LAST) begin
              e_ll = pmask[i]; e_cls = pcls[i]; e_llsma = pstart[i]; n_ipq++;
            end
          end else begin
            e_dr = 1; e_tr = 1; n_trunc++;
            e_ft = 1; e_ftaddr = pprev[i]; e_fan = pop(pmask[i]); e_type = CT_IP_LAST;
            e_ll = pmask[i]; e_cls = pcls[i]; e_llsma = pstart[i];
            drp[i] = 1;
          end
          if (h.ctype == CT_IP_LAST) act[i] = 0;
        end
      endcase
    end
    // compare
    check(ft_we == e_ft, $sformatf("input %0d ft_we", i));
    if (e_ft) check(ft_waddr == e_ftaddr && int'(ft_fanout) == e_fan && ft_type == e_type,
                    $sformatf("input %0d ft write %0d/%0d/%0d exp %0d/%0d/%0d", i,
                              ft_waddr, ft_fanout, ft_type, e_ftaddr, e_fan, e_type));
    check(nx_we == e_nx, $sformatf("input %0d nx_we", i));
    if (e_nx) check(nx_waddr == pprev[i] && nx_next == a, $sformatf("input %0d link", i));
    check(ll_wr == e_ll, $sformatf("input %0d ll_wr %h exp %h", i, ll_wr, e_ll));
    if (e_ll != '0) check(ll_wr_cls == e_cls && ll_wr_sma == e_llsma, $sformatf("input %0d ll data", i));
    check(stored == e_st && dropped == e_dr && truncated == e_tr, $sformatf("input %0d events", i));
    if (e_nx) pprev[i] = a;
    for (int k = 0; k < N_PORTS; k++) if (inc[k]) occ[k]++;
  endtask

  // ---------------- traffic ----------------
  cell_hdr_t cur [N_PORTS];
  int ct = 0;

  function automatic cell_hdr_t next_hdr(input int i, input int mode);
    cell_hdr_t h;
    h = '0;
    if ($urandom_range(0, 9) < 2) return h;   // idle input
    h.valid = 1;
    if (pkt_left[i] > 0 && $urandom_range(0, 39) == 0) begin
      // input error: a new packet starts before the last one ended
      pkt_left[i] = 0;
    end
    if (pkt_left[i] > 0) begin
      pkt_left[i]--;
      h.ctype = (pkt_left[i] == 0) ? CT_IP_LAST : CT_IP_MID;
      return h;
    end
    h.cls = CLS_W'($urandom);
    h.dest = (mode == 1) ? N_PORTS'(1 << 5) : N_PORTS'($urandom) & N_PORTS'($urandom);
    if (h.dest == '0) h.dest = N_PORTS'(1 << (i % N_PORTS));
    if ($urandom_range(0, 1) == 0) h.ctype = CT_ATM;
    else begin
      h.ctype = CT_IP_START;
      pkt_left[i] = $urandom_range(1, 4);
    end
    return h;
  endfunction

  task automatic run_cells(input int n, input int mode, input int deps_per_cell);
    for (int c = 0; c < n; c++) begin
      for (int i = 0; i < N_PORTS; i++) begin
        cur[i] = next_hdr(i, mode);
        hdr_in[i] = cur[i];
      end
      load <= 1;
      @(posedge clk);
      load <= 0;
      for (int s = 0; s < CELL_CLKS; s++) begin
        #1;
        if (s == 0)
          for (int k = 0; k < N_PORTS; k++)
            check(int'(occupancy[k]) == occ[k], $sformatf("occupancy %0d: %0d exp %0d", k, occupancy[k], occ[k]));
        if (s < N_PORTS) expect_cell(s, cur[s]);
        // departures lower the occupancy
        dep_valid <= 0;
        if (s < deps_per_cell && s < CELL_CLKS - 1) begin
          int p;
          p = $urandom_range(0, N_PORTS - 1);
          if (occ[p] > 0) begin
            dep_valid <= 1; dep_port <= PORT_W'(p); occ[p]--;
          end
        end
        if (s < CELL_CLKS - 1) @(posedge clk);
      end
      ct++;
    end
    dep_valid <= 0;
  endtask

  initial begin
    for (int a = 0; a < MEM_CELLS; a++) smf_q.push_back(AW'(a));
    for (int k = 0; k < N_PORTS; k++) free_nodes[k] = LL_DEPTH - N_CLASSES;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(posedge clk);
    // an empty first cell time so the provider's addresses are offered
    run_cells(1, 0, 0);
    // mixed traffic with departures
    run_cells(20, 0, 16);
    // output 5 only, no departures: the quota fills
    run_cells(8, 1, 0);
    // list room of output 7 too small
    free_nodes[7] = N_PORTS;
    run_cells(6, 0, 16);
    free_nodes[7] = LL_DEPTH - N_CLASSES;
    // SMF runs dry: drops and truncated packets
    smf_on = 0;
    run_cells(8, 0, 16);
    smf_on = 1;
    run_cells(10, 0, 16);
    check(n_mcast > 0, "multicast stored");
    check(n_ipq > 0, "IP packet queued at its last cell");
    check(n_quota > 0, "quota refusal");
    check(n_room > 0, "list room refusal");
    check(n_noaddr > 0, "drop for lack of address");
    check(n_trunc > 0, "packet truncated");
    check(n_abort > 0, "unfinished packet closed by a new first cell");
    $display("mcast=%0d ipq=%0d quota=%0d room=%0d noaddr=%0d trunc=%0d",
             n_mcast, n_ipq, n_quota, n_room, n_noaddr, n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pp_e2e_body.svh: body shared by the end-to-end pointer path testbenches.
// It expects the including module to declare the DUT signals and the
// localparams MEM_CELLS, LL_DEPTH, CELL_CLKS, QUOTA, AW, CW (see
// tb_pointer_path.sv for what is checked).

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  localparam int T_ROOM  = LL_DEPTH / 2 + 10;
  localparam int T_QUOTA = QUOTA / 2 + 10;
  localparam int T_FULL  = MEM_CELLS / 8 + 20;
  localparam int WATCHDOG = (MEM_CELLS + 120 + 3 * (T_ROOM + T_QUOTA + T_FULL) + 2000) * CELL_CLKS * 4;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- cell records ----------------
  int                 c_in [int];
  logic [N_PORTS-1:0] c_dest [int];
  int                 c_cls [int];
  cell_type_e         c_type [int];
  int                 c_pkt [int];
  int                 c_seq [int];
  bit                 c_stored [int];
  bit                 c_clean [int];
  logic [N_PORTS-1:0] c_deliv [int];
  logic [N_PORTS-1:0] c_quota [int];
  bit                 p_trunc [int];
  int cell_at [MEM_CELLS];
  int n_cells = 0, n_pkts = 0;

  // generator state
  int mode = 0;
  logic [N_PORTS-1:0] dest_set = '1;
  int pkt_left [N_PORTS], pkt_cur [N_PORTS], pkt_seq [N_PORTS], pkt_start_id [N_PORTS];
  int cur_id [N_PORTS], pend_id [N_PORTS];
  int prio_step = 0;

  // mechanism counters
  int n_stored = 0, n_dropped = 0, n_trunc = 0, n_freed = 0, n_mcast = 0, n_ip = 0;
  int n_bp = 0, n_prio = 0, n_fullrate = 0, n_quota = 0, n_room = 0, n_smf_empty = 0;

  function automatic logic [N_PORTS-1:0] rand_dest(input int maxbits);
    logic [N_PORTS-1:0] d;
    int nb;
    int cand [$];
    d = '0;
    for (int k = 0; k < N_PORTS; k++) if (dest_set[k]) cand.push_back(k);
    nb = $urandom_range(1, maxbits);
    for (int b = 0; b < nb; b++) d[cand[$urandom_range(0, cand.size() - 1)]] = 1'b1;
    return d;
  endfunction

  // new header for input i, returns cell id or -1
  function automatic int gen(input int i, output cell_hdr_t h);
    int pv, ipp, maxb, id;
    h = '0;
    case (mode)
      1: begin pv = 30; ipp = 50; maxb = 3; end
      3: begin pv = 90; ipp = 0;  maxb = 2; end
      4: begin pv = 90; ipp = 90; maxb = 2; end
      5: begin pv = 95; ipp = 60; maxb = 1; end
      default: begin pv = 0; ipp = 0; maxb = 1; end
    endcase
    if (mode == 2) begin
      // strict priority probe: three classes to output 2 in one cell time
      // one probe per cell time, lowest class first
      if (prio_step >= 1 && prio_step <= 3 && i == prio_step - 1) begin
        h.valid = 1; h.ctype = CT_ATM; h.dest = N_PORTS'(1 << 2);
        h.cls = (prio_step == 1) ? 3'd1 : (prio_step == 2) ? 3'd3 : 3'd6;
      end else if (pkt_left[i] == 0) return -1;
    end
    if (!h.valid) begin
      if (pkt_left[i] > 0) begin
        // packets always finish, also in idle modes
        h.valid = 1;
        pkt_left[i]--;
        h.ctype = (pkt_left[i] == 0) ? CT_IP_LAST : CT_IP_MID;
      end else begin
        if ($urandom_range(0, 99) >= pv) return -1;
        h.valid = 1;
        h.cls = CLS_W'($urandom);
        h.dest = rand_dest(maxb);
        if ($urandom_range(0, 99) < ipp) begin
          h.ctype = CT_IP_START;
          pkt_left[i] = $urandom_range(1, 4);
        end else h.ctype = CT_ATM;
      end
    end
    id = n_cells++;
    c_in[id] = i; c_type[id] = h.ctype; c_stored[id] = 0; c_deliv[id] = '0;
    c_quota[id] = '0; c_clean[id] = (mode == 1);
    if (h.ctype == CT_IP_START) begin
      pkt_cur[i] = n_pkts++; pkt_seq[i] = 0; pkt_start_id[i] = id;
      p_trunc[pkt_cur[i]] = 0;
    end
    if (h.ctype == CT_IP_MID || h.ctype == CT_IP_LAST) begin
      pkt_seq[i]++;
      h.dest = c_dest[pkt_start_id[i]];
      h.cls  = CLS_W'(c_cls[pkt_start_id[i]]);
      c_clean[id] = c_clean[pkt_start_id[i]];
    end
    c_dest[id] = h.dest; c_cls[id] = int'(h.cls);
    c_pkt[id] = (h.ctype == CT_ATM) ? -1 : pkt_cur[i];
    c_seq[id] = (h.ctype == CT_ATM) ? 0 : pkt_seq[i];
    if (h.ctype == CT_IP_START || h.ctype == CT_IP_MID || h.ctype == CT_IP_LAST) n_ip++;
    return id;
  endfunction

  // ---------------- monitor ----------------
  int tslot = 0;
  bit started = 0;
  longint cyc = 0;
  longint last_dep [N_PORTS];
  int bp_age [N_PORTS];
  int port_pkt [N_PORTS], port_seq [N_PORTS];
  int last_order [int];   // key: (in*16+port)*8+cls -> last ATM/START id
  int deps_in_window = 0;
  int prio_seen [$];

  always @(posedge clk) begin
    cyc++;
    if (ready && started) begin
      // input handled in the clock that just ended
      if (tslot < N_PORTS) begin
        int i, id;
        i = tslot; id = cur_id[i];
        if (id < 0) check(!stored && !dropped, "no event without a cell");
        else begin
          check(stored || dropped, "cell stored or dropped");
          if (c_type[id] == CT_ATM || c_type[id] == CT_IP_START)
            for (int k = 0; k < N_PORTS; k++)
              if (c_dest[id][k] && int'(occupancy[k]) >= QUOTA) c_quota[id][k] = 1'b1;
          if (stored) begin
            check(wr_valid[i], "stored with an address");
            cell_at[wr_addr[i]] = id;
            c_stored[id] = 1;
            n_stored++;
            if ($countones(c_dest[id]) > 1) n_mcast++;
          end
          if (dropped) begin
            n_dropped++;
            if (!wr_valid[i]) n_smf_empty++;
          end
          if (truncated) begin
            n_trunc++;
            p_trunc[c_pkt[id]] = 1;
          end
        end
      end
      if (freed) n_freed++;
      // departures
      if (rd_valid) begin
        int p, id, key;
        p = int'(rd_port);
        id = cell_at[rd_addr];
        deps_in_window++;
        check(id >= 0, "departure of a stored cell");
        if (id >= 0) begin
          check(c_dest[id][p], $sformatf("cell %0d to a destination (port %0d)", id, p));
          check(!c_deliv[id][p], $sformatf("cell %0d not sent twice on port %0d", id, p));
          c_deliv[id][p] = 1'b1;
          check(rd_type == c_type[id] || (rd_type == CT_IP_LAST && c_pkt[id] >= 0 && p_trunc[c_pkt[id]]),
                "cell type");
          if (port_pkt[p] >= 0) begin
            check(c_pkt[id] == port_pkt[p] && c_seq[id] == port_seq[p] + 1,
                  $sformatf("port %0d: packet %0d continues (got cell %0d)", p, port_pkt[p], id));
            port_seq[p] = c_seq[id];
          end else begin
            check(rd_type == CT_ATM || rd_type == CT_IP_START || (rd_type == CT_IP_LAST && c_seq[id] == 0),
                  "a queue entry is an ATM cell or a first IP cell");
            key = (c_in[id] * N_PORTS + p) * N_CLASSES + c_cls[id];
            if (last_order.exists(key)) check(id > last_order[key], "arrival order per input, output, class");
            last_order[key] = id;
            if (p == 2 && mode == 2) prio_seen.push_back(c_cls[id]);
          end
          if (rd_type == CT_IP_START || rd_type == CT_IP_MID) begin
            port_pkt[p] = c_pkt[id]; port_seq[p] = c_seq[id];
          end else port_pkt[p] = -1;
        end
        check(cyc - last_dep[p] >= longint'(CELL_CLKS), "one departure per port per cell time");
        check(bp_age[p] < 8, $sformatf("no departure on port %0d held by BPIn", p));
        last_dep[p] = cyc;
      end
      for (int k = 0; k < N_PORTS; k++) if (bp_in[k] && occupancy[k] != 0 && tslot == k) n_bp++;
      for (int k = 0; k < N_PORTS; k++) bp_age[k] = bp_in[k] ? bp_age[k] + 1 : 0;
    end
    if (ready && cell_end) begin
      // headers on hdr_in were sampled at this edge; make new ones
      cell_hdr_t h;
      if (deps_in_window == N_PORTS) n_fullrate++;
      deps_in_window = 0;
      if (started && mode == 2 && prio_step < 4) prio_step++;
      for (int i = 0; i < N_PORTS; i++) begin
        cur_id[i] = pend_id[i];
        pend_id[i] = gen(i, h);
        hdr_in[i] <= h;
      end
      started = 1;
      tslot = 0;
    end else if (started) tslot++;
  end

  task automatic cells(input int n);
    repeat (n) @(posedge cell_end);
  endtask

  task automatic drain();
    bit busy;
    int quiet;
    mode = 0;
    bp_in <= '0;
    quiet = 0;
    while (quiet < 3) begin
      @(posedge cell_end);
      busy = 0;
      for (int k = 0; k < N_PORTS; k++) if (occupancy[k] != 0) busy = 1;
      for (int i = 0; i < N_PORTS; i++) if (pkt_left[i] != 0) busy = 1;
      quiet = busy ? 0 : quiet + 1;
    end
    cells(2);
    // every address is back: in SMF, or held by the inputs' address registers
    check(free_count == CW'(MEM_CELLS - N_PORTS), $sformatf("all addresses free after drain (%0d)", free_count));
  endtask

  initial begin
    for (int a = 0; a < MEM_CELLS; a++) cell_at[a] = -1;
    for (int i = 0; i < N_PORTS; i++) begin
      pkt_left[i] = 0; cur_id[i] = -1; pend_id[i] = -1;
    end
    for (int p = 0; p < N_PORTS; p++) begin
      port_pkt[p] = -1; last_dep[p] = -100; bp_age[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge ready);
    check(free_count == CW'(MEM_CELLS - N_PORTS), "all addresses free after reset, 16 held for the inputs");
    // 1: light random traffic
    mode = 1;
    cells(30);
    drain();
    // 2: strict priority under BPIn on output 2
    bp_in <= N_PORTS'(1 << 2);
    mode = 2; prio_step = 0;
    cells(6);
    bp_in <= '0;
    cells(6);
    check(prio_seen.size() == 3, "three probe cells left output 2");
    if (prio_seen.size() == 3) begin
      check(prio_seen[0] == 6 && prio_seen[1] == 3 && prio_seen[2] == 1, "strict priority order 6,3,1");
      n_prio++;
    end
    drain();
    // 3: ATM flood to held outputs 0..3: list room runs out
    dest_set = 16'h000f; bp_in <= 16'h000f; mode = 3;
    cells(T_ROOM);
    drain();
    // 4: IP flood to held outputs 4..7: the alpha quota binds
    dest_set = 16'h00f0; bp_in <= 16'h00f0; mode = 4;
    cells(T_QUOTA);
    // 5: all outputs held, all destinations: SMF runs dry
    dest_set = '1; bp_in <= '1; mode = 5;
    cells(T_FULL);
    drain();
    // final checks over all cells
    begin
      int undelivered_clean;
      undelivered_clean = 0;
      for (int id = 0; id < n_cells; id++) begin
        if (!c_stored[id]) continue;
        check(c_deliv[id] != '0 && (c_deliv[id] & ~c_dest[id]) == '0, "delivered to a subset of its destinations");
        if (c_clean[id] && c_deliv[id] != c_dest[id]) undelivered_clean++;
        if (c_type[id] == CT_ATM || c_type[id] == CT_IP_START)
          for (int k = 0; k < N_PORTS; k++)
            if (c_dest[id][k] && !c_deliv[id][k]) begin
              if (c_quota[id][k]) n_quota++; else n_room++;
            end
      end
      check(undelivered_clean == 0, "light traffic: every cell reached every destination");
    end
    $display("stored=%0d dropped=%0d smf_empty=%0d truncated=%0d freed=%0d mcast=%0d ip=%0d bp=%0d prio=%0d fullrate=%0d quota=%0d room=%0d",
             n_stored, n_dropped, n_smf_empty, n_trunc, n_freed, n_mcast, n_ip, n_bp, n_prio, n_fullrate, n_quota, n_room);
    check(n_stored > 0, "cells stored");
    check(n_mcast > 0, "multicast cells");
    check(n_ip > 0, "IP packets");
    check(n_bp > 0, "BPIn held a backlogged output");
    check(n_prio > 0, "strict priority probe");
    check(n_fullrate > 0, "all 16 outputs sent in one cell time");
    check(n_quota > 0, "alpha quota refusal");
    check(n_room > 0, "list room refusal");
    check(n_smf_empty > 0, "drop with SMF empty");
    check(n_trunc > 0, "packet truncated");
    check(n_freed > 0, "addresses returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

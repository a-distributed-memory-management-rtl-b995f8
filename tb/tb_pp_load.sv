// tb_pp_load: bursty multicast load sweep on the pointer path at its default
// sizes (5500 shared-memory cells, 800 list nodes per output, 16-clock cell
// time, alpha = 0.15).
//
// Every input runs an on/off source: in the "on" state it sends one cell per
// cell time, all cells of a burst with the same destination set (1 to 4
// outputs, uniform, mean fanout 2.5). The sweep runs twice: first with
// bursts of ATM cells that end with probability 1/8 per cell (mean burst 8
// cells), then with each burst sent as one IP packet of 2 to 14 cells
// (mean 8). The start probability in the "off" state is
// set so that the load on an output, input rate times mean fanout, equals
// the target: 50, 60, 70, 80, 90 and 100 %. Each load point runs a warm-up,
// a measured window and a drain. The testbench prints, per load, the
// offered output load, the measured throughput per output, the share of
// requested deliveries lost, and the mean and maximum delay in cell times
// from storage to departure.
//
// Checks, all worked out from the traffic and not from the design:
//  * every departure goes to a destination of the cell stored at that
//    address, at most once per output, and in arrival order per input and
//    output;
//  * with IP packets, the cells of a packet leave each output back to back;
//  * work conservation (ATM bursts): an output that holds a cell at its turn
//    sends one in that cell time (nothing is held back, as no back-pressure
//    is applied);
//  * conservation: departures in the window plus the growth of the backlog
//    equal the offered deliveries minus the dropped ones (to within the cells
//    in flight at the window edges, 0.5 %);
//  * no loss at loads up to 80 %, and the mean delay grows with the load;
//  * after each drain every address is free again and every stored cell has
//    been released once.
module tb_pp_load;
  import pp_pkg::*;
  localparam int MEM_CELLS = 5500;
  localparam int CELL_CLKS = 16;
  localparam int AW = $clog2(MEM_CELLS);
  localparam int CW = $clog2(MEM_CELLS + 1);
  localparam int WARM = 300;
  localparam int MEAS = 2500;
  localparam int N_LOADS = 6;
  localparam int WATCHDOG = 2 * N_LOADS * (WARM + MEAS + 3000) * CELL_CLKS + MEM_CELLS + 1000;

  logic clk = 0, rst_n = 0, ready, cell_end;
  cell_hdr_t [N_PORTS-1:0] hdr_in = '0;
  logic [N_PORTS-1:0][AW-1:0] wr_addr;
  logic [N_PORTS-1:0] wr_valid;
  logic [N_PORTS-1:0] bp_in = '0;
  logic rd_valid;
  logic [PORT_W-1:0] rd_port;
  logic [AW-1:0] rd_addr;
  cell_type_e rd_type;
  logic stored, dropped, truncated, freed;
  logic [CW-1:0] free_count;
  logic [N_PORTS-1:0][CW-1:0] occupancy;
  logic [N_PORTS-1:0] port_in_pkt;

  pointer_path dut (.*);

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

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

  // ---------------- source ----------------
  int  load_pct = 0;
  bit  ip_mode = 0;
  int  pkt_left [N_PORTS];
  bit  pkt_open [N_PORTS];
  bit  gen_on = 0;
  bit  src_on [N_PORTS];
  logic [N_PORTS-1:0] src_dest [N_PORTS];
  int  n_ids = 0;
  int  pend_id [N_PORTS], cur_id [N_PORTS];
  logic [N_PORTS-1:0] pend_dest [N_PORTS], cur_dest [N_PORTS];

  function automatic logic [N_PORTS-1:0] pick_dest();
    logic [N_PORTS-1:0] d = '0;
    int f = $urandom_range(1, 4);
    while ($countones(d) < f) d[$urandom_range(0, N_PORTS - 1)] = 1'b1;
    return d;
  endfunction

  // start probability per cell time in the off state, in 1/100000:
  // on share r = load / 2.5, start a = r / (8 (1 - r))
  function automatic int start_prob();
    real r, a;
    r = real'(load_pct) / 250.0;
    if (r >= 0.999) return 100000;
    a = r / (8.0 * (1.0 - r));
    return int'(a * 100000.0);
  endfunction

  // ---------------- records ----------------
  int cell_at [MEM_CELLS];
  int st_ct [MEM_CELLS];
  logic [N_PORTS-1:0] left_at [MEM_CELLS];
  int last_id [N_PORTS][N_PORTS];

  // statistics
  bit  window = 0;
  longint ct = 0;
  longint offered = 0, deps = 0, delay_sum = 0, delay_n = 0, lost = 0;
  int  delay_max = 0;
  int  n_stored = 0, n_freed = 0, n_dropped = 0;
  bit  exp_dep [N_PORTS], got_dep [N_PORTS];
  bit  port_open [N_PORTS];
  int  port_src [N_PORTS];
  int  tslot = 0;
  bit  started = 0;

  always @(posedge clk) begin
    if (ready && started) begin
      if (tslot < N_PORTS) begin
        int i, id;
        i = tslot; id = cur_id[i];
        if (id < 0) check(!stored && !dropped, "no event without a cell");
        else begin
          check(stored ^ dropped, "cell stored or dropped");
          if (stored) begin
            cell_at[wr_addr[i]] = id;
            st_ct[wr_addr[i]] = int'(ct);
            left_at[wr_addr[i]] = cur_dest[i];
            n_stored++;
          end else begin
            n_dropped++;
            if (window) lost += $countones(cur_dest[i]);
          end
        end
        // work conservation at this output's turn
        if (exp_dep[tslot] && !ip_mode) check(got_dep[tslot], $sformatf("output %0d sent while backlogged", tslot));
        exp_dep[tslot] = (occupancy[tslot] != 0);
        got_dep[tslot] = 0;
      end
      if (freed) n_freed++;
      if (rd_valid) begin
        int p, id, a, d;
        p = int'(rd_port); a = int'(rd_addr); id = cell_at[a];
        check(id >= 0 && left_at[a][p], $sformatf("departure on port %0d is owed by address %0d", p, a));
        left_at[a][p] = 1'b0;
        if (!ip_mode) check(rd_type == CT_ATM, "ATM cell type");
        else if (id >= 0) begin
          // the cells of a packet leave an output back to back
          if (port_open[p]) check((rd_type == CT_IP_MID || rd_type == CT_IP_LAST) && id % N_PORTS == port_src[p],
                                  $sformatf("port %0d continues the packet of input %0d", p, port_src[p]));
          else check(rd_type == CT_IP_START, $sformatf("port %0d starts a packet", p));
          port_open[p] = (rd_type != CT_IP_LAST);
          port_src[p] = id % N_PORTS;
        end
        check(!got_dep[p], "one departure per output per cell time");
        got_dep[p] = 1;
        if (id >= 0) begin
          // ids grow in arrival order; the source input is id % N_PORTS
          check(id > last_id[id % N_PORTS][p], "arrival order per input and output");
          last_id[id % N_PORTS][p] = id;
        end
        d = int'(ct) - st_ct[a];
        if (window) begin
          deps++;
          delay_sum += longint'(d); delay_n++;
          if (d > delay_max) delay_max = d;
        end
      end
    end
    if (ready && cell_end) begin
      cell_hdr_t h;
      ct++;
      for (int i = 0; i < N_PORTS; i++) begin
        cur_id[i] = pend_id[i]; cur_dest[i] = pend_dest[i];
        h = '0;
        pend_id[i] = -1;
        if (gen_on || pkt_open[i]) begin
          if (!src_on[i] && $urandom_range(0, 99999) < start_prob()) begin
            src_on[i] = 1;
            src_dest[i] = pick_dest();
            // an IP burst is one packet of 2 to 14 cells (mean 8)
            if (ip_mode) pkt_left[i] = $urandom_range(1, 13);
          end
          if (src_on[i]) begin
            h.valid = 1; h.ctype = CT_ATM; h.cls = '0; h.dest = src_dest[i];
            if (ip_mode) begin
              if (!pkt_open[i]) h.ctype = CT_IP_START;
              else begin
                pkt_left[i]--;
                h.ctype = (pkt_left[i] == 0) ? CT_IP_LAST : CT_IP_MID;
              end
            end
            // ids: N_PORTS * sequence + input
            pend_id[i] = n_ids * N_PORTS + i;
            pend_dest[i] = src_dest[i];
            if (window) offered += $countones(src_dest[i]);
            if (ip_mode) begin
              pkt_open[i] = (h.ctype != CT_IP_LAST);
              if (h.ctype == CT_IP_LAST) src_on[i] = 0;
            end else if ($urandom_range(0, 7) == 0) src_on[i] = 0;
          end
        end
        hdr_in[i] <= h;
      end
      n_ids++;
      started = 1;
      tslot = 0;
    end else if (started) tslot++;
  end

  task automatic cells(input int n);
    repeat (n) @(posedge cell_end);
  endtask

  function automatic longint occ_sum();
    longint s = 0;
    for (int k = 0; k < N_PORTS; k++) s += longint'(occupancy[k]);
    return s;
  endfunction

  longint occ0, occ1;
  real thr [N_LOADS], dly [N_LOADS], lossr [N_LOADS], offr [N_LOADS];

  initial begin
    for (int a = 0; a < MEM_CELLS; a++) begin cell_at[a] = -1; left_at[a] = '0; end
    for (int i = 0; i < N_PORTS; i++) begin
      pend_id[i] = -1; cur_id[i] = -1; src_on[i] = 0;
      pkt_left[i] = 0; pkt_open[i] = 0; port_open[i] = 0;
      exp_dep[i] = 0; got_dep[i] = 0;
      for (int p = 0; p < N_PORTS; p++) last_id[i][p] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge ready);
    $display(" load  offered  throughput  lost     mean_delay  max_delay");
    for (int m = 0; m < 2; m++)
    for (int l = 0; l < N_LOADS; l++) begin
      ip_mode = (m == 1);
      if (l == 0 && ip_mode) $display("IP packets, 2 to 14 cells");
      if (l == 0 && !ip_mode) $display("ATM cell bursts");
      load_pct = 50 + 10 * l;
      gen_on = 1;
      cells(WARM);
      offered = 0; deps = 0; delay_sum = 0; delay_n = 0; delay_max = 0; lost = 0;
      occ0 = occ_sum();
      window = 1;
      cells(MEAS);
      window = 0;
      occ1 = occ_sum();
      gen_on = 0;
      for (int i = 0; i < N_PORTS; i++) if (!pkt_open[i]) src_on[i] = 0;
      begin
        bit busy;
        busy = 1;
        while (busy) begin
          cells(1);
          busy = 0;
          for (int k = 0; k < N_PORTS; k++) if (occupancy[k] != 0) busy = 1;
        end
      end
      cells(3);
      offr[l]  = real'(offered) / real'(N_PORTS * MEAS);
      thr[l]   = real'(deps) / real'(N_PORTS * MEAS);
      lossr[l] = (offered == 0) ? 0.0 : real'(lost) / real'(offered);
      dly[l]   = (delay_n == 0) ? 0.0 : real'(delay_sum) / real'(delay_n);
      $display(" %3d%%  %6.3f   %6.3f      %7.5f  %8.2f    %0d",
               load_pct, offr[l], thr[l], lossr[l], dly[l], delay_max);
      check(free_count == CW'(MEM_CELLS - N_PORTS), $sformatf("all addresses free after load %0d%%", load_pct));
      check(n_freed == n_stored, $sformatf("every stored cell released once (%0d of %0d)", n_freed, n_stored));
      check(offr[l] > 0.9 * real'(load_pct) / 100.0 && offr[l] < 1.1 * real'(load_pct) / 100.0,
            "offered load near the target");
      // conservation over the window: departures plus the growth of the
      // backlog equal the offered deliveries minus those dropped (up to the
      // few cells between generation and storage at the window edges)
      begin
        longint acc;
        acc = deps + occ1 - occ0;
        check(acc > (offered - lost) - offered / 200 && acc < (offered - lost) + offered / 200,
              $sformatf("departures %0d + backlog growth %0d match accepted %0d at %0d%%",
                        deps, occ1 - occ0, offered - lost, load_pct));
      end
      if (load_pct <= 80) check(lost == 0, $sformatf("no loss at %0d%% load", load_pct));
      if (l > 0) check(dly[l] > dly[l-1], "mean delay grows with the load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

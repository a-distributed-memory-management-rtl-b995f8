// tb_read_scheduler: self-checking test of the read scheduler.
// The testbench models the 16 linked lists (queues answering one clock after
// a read) and the Fanout/Next memory (synchronous read). Each list is loaded
// with a random mix of ATM cells and multi-cell IP packets; ports 3 and 9 get
// BPIn for a while. Checks: per port, the departures come in the expected
// order with the right fanout and type; at most one departure per port per
// cell time; the departure of port p leaves exactly 4 clocks after its turn;
// a BPIn port sends nothing; every cell leaves in the end.
module tb_read_scheduler;
  import pp_pkg::*;
  localparam int MEM_CELLS = 1024;
  localparam int AW = $clog2(MEM_CELLS);
  localparam int CELL_CLKS = 16;

  logic clk = 0, rst_n = 0;
  logic turn_valid = 0;
  logic [PORT_W-1:0] turn_port = '0;
  logic [N_PORTS-1:0] bp_in = '0, ll_nempty, ll_rd, ll_valid = '0;
  logic [N_PORTS-1:0][AW-1:0] ll_sma = '0;
  logic fn_re, fn_rd_valid = 0;
  logic [AW-1:0] fn_raddr, fn_next = '0;
  logic [FANOUT_W-1:0] fn_fanout = '0;
  cell_type_e fn_type = CT_ATM;
  logic out_valid;
  logic [PORT_W-1:0] out_port;
  logic [AW-1:0] out_addr;
  logic [FANOUT_W-1:0] out_fanout;
  cell_type_e out_type;
  logic [N_PORTS-1:0] port_in_pkt;
  int checks = 0, failures = 0;

  read_scheduler #(.MEM_CELLS(MEM_CELLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [AW-1:0]       llq [N_PORTS][$];
  logic [AW-1:0]       expq [N_PORTS][$];
  cell_type_e          mtype [MEM_CELLS];
  logic [AW-1:0]       mnext [MEM_CELLS];
  logic [FANOUT_W-1:0] mfan  [MEM_CELLS];
  int next_free = 0, total = 0, departed = 0;
  longint cyc = 0;
  longint turn_cyc [N_PORTS];
  int sent_in_cell [N_PORTS];

  for (genvar p = 0; p < N_PORTS; p++) begin : g_ne
    assign ll_nempty[p] = llq[p].size() > 0;
  end

  // list and Fanout/Next models
  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < N_PORTS; p++) begin
      ll_valid[p] <= ll_rd[p];
      if (ll_rd[p]) ll_sma[p] <= llq[p].pop_front();
    end
    fn_rd_valid <= fn_re;
    if (fn_re) begin
      fn_type   <= mtype[fn_raddr];
      fn_next   <= mnext[fn_raddr];
      fn_fanout <= mfan[fn_raddr];
    end
  end

  // cell-time counter driving the turns
  int slot = 0;
  always @(posedge clk) if (rst_n) begin
    slot = (slot + 1) % CELL_CLKS;
    turn_valid <= slot < N_PORTS;
    turn_port  <= PORT_W'(slot);
    if (slot == 0) for (int p = 0; p < N_PORTS; p++) sent_in_cell[p] = 0;
  end

  // turn time stamps and latency, sampled in one process
  longint lcyc = 0;
  int latency [N_PORTS];
  always @(posedge clk) begin
    if (out_valid) latency[out_port] = int'(lcyc - turn_cyc[out_port]);
    if (turn_valid) turn_cyc[turn_port] = lcyc;
    lcyc++;
  end

  // departure monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    int p;
    logic [AW-1:0] e;
    p = int'(out_port);
    departed++;
    check(expq[p].size() > 0, $sformatf("port %0d sends more than queued", p));
    if (expq[p].size() > 0) begin
      e = expq[p].pop_front();
      check(out_addr == e, $sformatf("port %0d sent %0d exp %0d", p, out_addr, e));
      check(out_fanout == mfan[e] && out_type == mtype[e], "fanout and type");
    end
    #1 check(latency[p] == 4, $sformatf("port %0d latency %0d", p, latency[p]));
    check(!bp_in[p], "no departure under BPIn");
    sent_in_cell[p]++;
    check(sent_in_cell[p] == 1, "one departure per port per cell time");
  end

  initial begin
    for (int p = 0; p < N_PORTS; p++) begin
      for (int k = 0; k < 6; k++) begin
        int n;
        n = ($urandom_range(0, 1) == 0) ? 1 : $urandom_range(2, 5);
        llq[p].push_back(AW'(next_free));
        for (int c = 0; c < n; c++) begin
          mtype[next_free] = (n == 1) ? CT_ATM : (c == 0) ? CT_IP_START :
                             (c == n - 1) ? CT_IP_LAST : CT_IP_MID;
          mnext[next_free] = AW'(next_free + 1);
          mfan[next_free]  = FANOUT_W'($urandom_range(1, 16));
          expq[p].push_back(AW'(next_free));
          next_free++;
          total++;
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (CELL_CLKS * 5) @(posedge clk);
    bp_in[3] <= 1; bp_in[9] <= 1;
    repeat (CELL_CLKS * 6) @(posedge clk);
    bp_in <= '0;
    while (departed < total) @(posedge clk);
    repeat (CELL_CLKS) @(posedge clk);
    for (int p = 0; p < N_PORTS; p++) check(expq[p].size() == 0, "all cells sent");
    check(departed == total, "departure count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_port_read_sched: self-checking test of one port read scheduler.
// The testbench models the port's linked list (a queue) and the Fanout/Next
// memory (type and next address per cell). The queue holds ATM cells and the
// first cells of IP packets whose further cells are chained only through the
// next field. One turn per 16-clock cell time. Checks: the order of chosen
// addresses equals the expected departure order (each packet in one piece,
// no list read during a packet), that the list is read only when not empty,
// not inside a packet and not under BPIn, and that BPIn stops the port.
module tb_port_read_sched;
  import pp_pkg::*;
  localparam int MEM_CELLS = 64;
  localparam int AW = $clog2(MEM_CELLS);

  logic clk = 0, rst_n = 0;
  logic turn = 0, bp_in = 0, ll_nempty, ll_rd, ll_valid = 0, fn_valid = 0;
  logic [AW-1:0] ll_sma = '0, fn_next = '0, cur_addr;
  cell_type_e fn_type = CT_ATM;
  logic pending, in_pkt;
  int checks = 0, failures = 0;

  port_read_sched #(.MEM_CELLS(MEM_CELLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [AW-1:0] llq [$];
  cell_type_e    mtype [MEM_CELLS];
  logic [AW-1:0] mnext [MEM_CELLS];
  logic [AW-1:0] expected [$];
  logic [AW-1:0] seen [$];
  int ll_reads = 0, bp_cells = 0;

  assign ll_nempty = llq.size() > 0;

  // add an IP packet of n cells starting at address a (a, a+1, ...)
  task automatic add_packet(input int a, input int n);
    llq.push_back(AW'(a));
    for (int k = 0; k < n; k++) begin
      mtype[a + k] = (k == 0) ? CT_IP_START : (k == n - 1) ? CT_IP_LAST : CT_IP_MID;
      mnext[a + k] = AW'(a + k + 1);
      expected.push_back(AW'(a + k));
    end
  endtask

  task automatic add_atm(input int a);
    llq.push_back(AW'(a));
    mtype[a] = CT_ATM;
    mnext[a] = '0;
    expected.push_back(AW'(a));
  endtask

  task automatic cell_time(input bit bp);
    bit was_in_pkt;
    was_in_pkt = in_pkt;
    turn <= 1; bp_in <= bp;
    #1;
    if (ll_rd) begin
      check(ll_nempty && !bp && !was_in_pkt, "list read only when allowed");
      ll_reads++;
    end
    if (!bp && !was_in_pkt && ll_nempty) check(ll_rd, "list read when it should be");
    @(posedge clk);
    turn <= 0; bp_in <= 0;
    if (ll_rd) begin
      ll_valid <= 1;
      ll_sma <= llq.pop_front();
    end
    @(posedge clk);
    ll_valid <= 0;
    #1;
    if (bp) begin
      check(!pending, "BPIn: nothing chosen");
      bp_cells++;
    end
    if (pending) begin
      seen.push_back(cur_addr);
      @(posedge clk);
      fn_valid <= 1; fn_type <= mtype[cur_addr]; fn_next <= mnext[cur_addr];
      @(posedge clk);
      fn_valid <= 0;
      #1 check(!pending, "pending cleared by Fanout/Next data");
    end
    repeat (12) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    add_atm(5);
    add_packet(10, 4);
    add_atm(3);
    add_packet(20, 2);
    add_packet(30, 5);
    add_atm(7);
    for (int n = 0; n < 25; n++) cell_time(n == 4 || n == 5 || n == 11);
    check(bp_cells == 3, "BPIn cell times exercised");
    check(seen.size() == expected.size(), $sformatf("departures %0d exp %0d", seen.size(), expected.size()));
    foreach (expected[k])
      if (k < seen.size()) check(seen[k] == expected[k], $sformatf("departure %0d: %0d exp %0d", k, seen[k], expected[k]));
    check(ll_reads == 6, "one list read per ATM cell or packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

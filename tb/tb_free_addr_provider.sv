// tb_free_addr_provider: self-checking test of the free address provider.
// A queue in the testbench stands in for SMF. The test checks that after a
// cell-time boundary every input is offered an address, that all offered
// addresses are distinct and came from SMF, that an address an input did not
// use is offered again (not returned), that a used one is replaced by a new
// SMF address, that a consume in the boundary clock itself is not re-offered,
// that at full rate (every input storing, the last one in the boundary
// clock) every input has a new address for the next cell time,
// and that with SMF starved only as many inputs get addresses as SMF had.
module tb_free_addr_provider;
  import pp_pkg::*;
  localparam int MEM_CELLS = 256;
  localparam int AW = $clog2(MEM_CELLS);

  logic clk = 0, rst_n = 0;
  logic smf_pop, smf_avail, snap = 0;
  logic [AW-1:0] smf_head;
  logic [N_PORTS-1:0] consume = '0, wr_valid;
  logic [N_PORTS-1:0][AW-1:0] wr_addr;
  int checks = 0, failures = 0;

  logic [AW-1:0] smf_q [$];
  bit given [MEM_CELLS];   // ever handed out by SMF
  bit used [MEM_CELLS];    // consumed by the write side
  int pops = 0;

  assign smf_avail = smf_q.size() > 0;
  assign smf_head  = smf_avail ? smf_q[0] : '0;

  always @(posedge clk) if (rst_n && smf_pop) begin
    given[smf_q[0]] = 1;
    void'(smf_q.pop_front());
    pops++;
  end

  free_addr_provider #(.MEM_CELLS(MEM_CELLS)) dut (.*);

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

  // one cell time: consume the inputs in `cmask` at their slot, then snap
  task automatic cell_time(input logic [N_PORTS-1:0] cmask, input bit last_in_snap);
    for (int s = 0; s < N_PORTS; s++) begin
      consume <= '0;
      snap    <= (s == N_PORTS - 1);
      if (cmask[s] && (s < N_PORTS - 1 || last_in_snap)) begin
        consume[s] <= 1'b1;
        used[wr_addr[s]] = 1;
      end
      @(posedge clk);
    end
    consume <= '0;
    snap    <= 0;
    #1;
  endtask

  logic [N_PORTS-1:0][AW-1:0] prev_addr;
  logic [N_PORTS-1:0]         prev_valid;

  task automatic check_offer(input logic [N_PORTS-1:0] cmask, input string tag);
    for (int i = 0; i < N_PORTS; i++) begin
      if (!wr_valid[i]) continue;
      check(given[wr_addr[i]] && !used[wr_addr[i]], $sformatf("%s: input %0d address from SMF, unused", tag, i));
      for (int j = 0; j < i; j++)
        if (wr_valid[j]) check(wr_addr[j] != wr_addr[i], $sformatf("%s: distinct %0d %0d", tag, i, j));
      if (prev_valid[i] && !cmask[i])
        check(wr_addr[i] == prev_addr[i], $sformatf("%s: unused address of %0d kept", tag, i));
    end
  endtask

  initial begin
    logic [N_PORTS-1:0] cm;
    for (int a = 0; a < 40; a++) smf_q.push_back(AW'(a * 3 + 1));
    repeat (3) @(posedge clk);
    rst_n <= 1;
    prev_valid = '0;
    cell_time('0, 0);
    check(wr_valid == '1, "all inputs offered an address after the first cell time");
    check(pops == N_PORTS, "exactly 16 addresses taken from SMF");
    check_offer('0, "first");
    // full rate: every input stores a cell, input 15 in the boundary clock
    prev_addr = wr_addr; prev_valid = wr_valid;
    cell_time('1, 1);
    check(wr_valid == '1, "full rate: every input, the last one too, has a new address");
    check_offer('1, "full rate");
    for (int r = 0; r < 6; r++) begin
      prev_addr = wr_addr; prev_valid = wr_valid;
      cm = N_PORTS'($urandom) & wr_valid;
      cell_time(cm, r[0]);
      if (!r[0]) cm[N_PORTS-1] = 1'b0;
      check_offer(cm, $sformatf("round %0d", r));
      // no address is lost: offered + used == taken from SMF
      begin
        int nv, nu;
        nv = 0; nu = 0;
        for (int i = 0; i < N_PORTS; i++) nv += int'(wr_valid[i]);
        for (int a = 0; a < MEM_CELLS; a++) nu += int'(used[a]);
        check(nv + nu == pops, $sformatf("round %0d: %0d offered + %0d used == %0d taken", r, nv, nu, pops));
        check(nv == ((pops - nu) < N_PORTS ? pops - nu : N_PORTS), "as many offered as SMF allowed");
      end
    end
    check(wr_valid != '1, "SMF ran dry in the test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

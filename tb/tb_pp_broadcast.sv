// tb_pp_broadcast: the all-inputs-to-all-outputs multicast case at the
// default sizes. In one cell time all 16 inputs send an ATM cell addressed to
// all 16 outputs (256 queue entries). Checks: all 16 cells are stored within
// the 16 clocks of that cell time (one input per clock, all 16 lists written
// in parallel); each output then sends all 16 cells, one per cell time, in
// input order (same class); no address is freed before its 16th read, and all
// 16 are back in SMF after the last one.
module tb_pp_broadcast;
  import pp_pkg::*;
  localparam int MEM_CELLS = 5500;
  localparam int AW = $clog2(MEM_CELLS);
  localparam int CW = $clog2(MEM_CELLS + 1);

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
  int checks = 0, failures = 0;

  pointer_path dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_stored = 0, store_first = -1, store_last = -1, n_freed = 0;
  int cyc = 0;
  int input_of [MEM_CELLS];
  int next_in [N_PORTS];
  int deps = 0, last_dep_cyc = -1;
  bit prev_valid = 0;
  logic [AW-1:0] prev_addr = '0;
  int reads [MEM_CELLS];

  always @(posedge clk) begin
    cyc++;
    if (stored) begin
      if (store_first < 0) store_first = cyc;
      store_last = cyc;
      input_of[wr_addr[n_stored]] = n_stored;
      n_stored++;
    end
    if (rd_valid) begin
      int i;
      i = input_of[rd_addr];
      check(i == next_in[rd_port], $sformatf("port %0d got input %0d exp %0d", rd_port, i, next_in[rd_port]));
      next_in[rd_port]++;
      reads[rd_addr]++;
      deps++;
      last_dep_cyc = cyc;
    end
    if (freed) begin
      n_freed++;
      check(prev_valid && reads[prev_addr] == N_PORTS, "freed right after the 16th read of its address");
    end
    prev_valid = rd_valid;
    prev_addr  = rd_addr;
  end

  initial begin
    for (int p = 0; p < N_PORTS; p++) next_in[p] = 0;
    for (int a = 0; a < MEM_CELLS; a++) begin input_of[a] = -1; reads[a] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge ready);
    @(posedge clk iff cell_end);
    #1;
    for (int i = 0; i < N_PORTS; i++)
      hdr_in[i] = '{valid: 1'b1, ctype: CT_ATM, cls: 3'd2, dest: '1};
    @(posedge clk iff cell_end);
    #1 hdr_in = '0;
    repeat (N_PORTS * 16 + 40) @(posedge clk);
    check(n_stored == N_PORTS, $sformatf("16 cells stored (%0d)", n_stored));
    check(store_last - store_first == N_PORTS - 1, "stored in 16 consecutive clocks");
    check(deps == N_PORTS * N_PORTS, $sformatf("256 departures (%0d)", deps));
    for (int p = 0; p < N_PORTS; p++) check(next_in[p] == N_PORTS, "each output got all 16 cells");
    check(n_freed == N_PORTS, "16 addresses freed");
    check(free_count == CW'(MEM_CELLS - N_PORTS), "all addresses back except the 16 held for the inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

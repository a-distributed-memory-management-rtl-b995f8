// tb_return_sma: self-checking test of the Return Shared Memory Address block.
// Waits for the reset-time clearing of the read counters, then feeds reads of
// cells with random fanouts in random order, often the same address in
// consecutive clocks. A reference count per address decides when the
// address must be pushed back to SMF: exactly on its fanout-th read, one
// clock later, and never before.
module tb_return_sma;
  import pp_pkg::*;
  localparam int MEM_CELLS = 32;
  localparam int AW = $clog2(MEM_CELLS);

  logic clk = 0, rst_n = 0, ready;
  logic in_valid = 0, smf_push;
  logic [AW-1:0] in_sma = '0, smf_addr;
  logic [FANOUT_W-1:0] in_fanout = '0;
  int checks = 0, failures = 0;

  return_sma #(.MEM_CELLS(MEM_CELLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int fan [MEM_CELLS];
  int left [MEM_CELLS];
  int returned = 0, init_clks = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (!ready) begin @(posedge clk); init_clks++; end
    check(init_clks >= MEM_CELLS - 2 && init_clks <= MEM_CELLS + 2, $sformatf("clearing takes about MEM_CELLS clocks (%0d)", init_clks));
    #1;
    for (int a = 0; a < MEM_CELLS; a++) begin
      fan[a] = $urandom_range(1, N_PORTS);
      left[a] = fan[a];
    end
    for (int n = 0; n < 3000; n++) begin
      int a;
      bit exp_push;
      if ($urandom_range(0, 3) == 0) a = int'(in_sma);  // repeat the same address
      else a = $urandom_range(0, MEM_CELLS - 1);
      if ($urandom_range(0, 9) == 0) begin
        in_valid <= 0;
        exp_push = 0;
      end else begin
        in_valid <= 1;
        in_sma <= AW'(a);
        in_fanout <= FANOUT_W'(fan[a]);
        left[a]--;
        exp_push = (left[a] == 0);
        if (exp_push) begin
          // address comes back; a new cell with a new fanout is stored there
          fan[a] = $urandom_range(1, N_PORTS);
          left[a] = fan[a];
          returned++;
        end
      end
      @(posedge clk);
      in_valid <= 0;
      #1;
      check(smf_push == exp_push, $sformatf("push for address %0d", a));
      if (exp_push) check(smf_addr == AW'(a), "pushed address");
    end
    check(returned > 50, "enough returns exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

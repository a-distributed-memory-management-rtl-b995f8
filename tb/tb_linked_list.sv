// tb_linked_list: self-checking test of one output linked list.
// Random writes (random class, random shared-memory address) and reads, also
// in the same clock, against eight reference queues. Checks that each read
// returns the head of the highest-priority non-empty class one clock later,
// that `nempty` is right, that `free_cnt` equals the nodes not in use (all
// nodes minus one placeholder per class minus queued entries), and that the
// list can be filled to that capacity and drained again.
module tb_linked_list;
  import pp_pkg::*;
  localparam int MEM_CELLS = 256;
  localparam int LL_DEPTH  = 40;
  localparam int AW = $clog2(MEM_CELLS);
  localparam int CW = $clog2(LL_DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0, nempty, rd_valid;
  logic [CLS_W-1:0] wr_cls = '0, rd_cls;
  logic [AW-1:0] wr_sma = '0, rd_sma;
  logic [CW-1:0] free_cnt;
  int checks = 0, failures = 0;

  linked_list #(.MEM_CELLS(MEM_CELLS), .LL_DEPTH(LL_DEPTH)) dut (.*);

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

  logic [AW-1:0] q [N_CLASSES][$];
  int total = 0;
  bit exp_valid = 0;
  logic [AW-1:0] exp_sma;
  logic [CLS_W-1:0] exp_cls;

  function automatic int top_class();
    for (int c = N_CLASSES - 1; c >= 0; c--) if (q[c].size() > 0) return c;
    return -1;
  endfunction

  // one clock with the given write/read request
  task automatic step(input bit w, input int c, input bit r);
    int tc;
    tc = top_class();
    check(nempty == (tc >= 0), "nempty");
    check(int'(free_cnt) == LL_DEPTH - N_CLASSES - total, $sformatf("free_cnt %0d total %0d", free_cnt, total));
    wr <= w; wr_cls <= CLS_W'(c); wr_sma <= AW'($urandom);
    rd <= r && (tc >= 0);
    #1;
    if (r && tc >= 0) begin
      exp_sma = q[tc].pop_front();
      exp_cls = CLS_W'(tc);
      total--;
    end
    if (w) begin
      q[c].push_back(wr_sma);
      total++;
    end
    @(posedge clk);
    exp_valid = r && (tc >= 0);
    wr <= 0; rd <= 0;
    #1;
    check(rd_valid == exp_valid, "rd_valid");
    if (exp_valid)
      check(rd_sma == exp_sma && rd_cls == exp_cls,
            $sformatf("read got %0d/c%0d exp %0d/c%0d", rd_sma, rd_cls, exp_sma, exp_cls));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    // random mix
    for (int n = 0; n < 600; n++) begin
      bit w, r;
      w = ($urandom_range(0, 99) < 55) && (total < LL_DEPTH - N_CLASSES);
      r = ($urandom_range(0, 99) < 45);
      step(w, $urandom_range(0, N_CLASSES - 1), r);
    end
    // fill to capacity
    while (total < LL_DEPTH - N_CLASSES) step(1, $urandom_range(0, N_CLASSES - 1), 0);
    check(free_cnt == 0, "full");
    // drain completely, in strict priority order
    while (total > 0) step(0, 0, 1);
    check(!nempty, "empty after drain");
    step(0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

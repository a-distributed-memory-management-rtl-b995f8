// tb_free_addr_pool: self-checking test of the free address pool (SMF).
// Checks that after reset every address FIRST..DEPTH-1 is handed out exactly
// once, that the pool then reports empty, that returned addresses come back
// in FIFO order, that a pop and a push in the same clock work, and that
// `count` follows a reference model throughout.
module tb_free_addr_pool;
  localparam int DEPTH = 20;
  localparam int FIRST = 3;
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic pop = 0, push = 0, avail;
  logic [AW-1:0] head, push_addr = '0;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;

  free_addr_pool #(.DEPTH(DEPTH), .FIRST(FIRST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int model_cnt;
  bit seen [DEPTH];
  logic [AW-1:0] got [$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    model_cnt = DEPTH - FIRST;
    check(count == CW'(model_cnt), "count after reset");
    // drain the pool
    for (int n = 0; n < DEPTH - FIRST; n++) begin
      check(avail, "avail while not empty");
      check(head >= AW'(FIRST) && !seen[head], $sformatf("fresh distinct address %0d", head));
      seen[head] = 1;
      got.push_back(head);
      pop <= 1;
      @(posedge clk);
      pop <= 0;
      model_cnt--;
      #1 check(count == CW'(model_cnt), "count while draining");
    end
    check(!avail, "empty after all popped");
    check(count == 0, "count zero");
    // return five addresses in a scrambled order
    for (int n = 0; n < 5; n++) begin
      push <= 1;
      push_addr <= got[(n * 7) % got.size()];
      @(posedge clk);
      model_cnt++;
    end
    push <= 0;
    @(posedge clk);
    check(count == CW'(model_cnt), "count after returns");
    // they must come back in the order they were returned
    for (int n = 0; n < 5; n++) begin
      check(avail && head == got[(n * 7) % got.size()], $sformatf("FIFO order %0d", n));
      pop <= 1;
      // pop and push in the same clock from the third one on
      if (n >= 2) begin
        push <= 1;
        push_addr <= AW'(FIRST + n);
        model_cnt++;
      end
      @(posedge clk);
      pop <= 0;
      push <= 0;
      model_cnt--;
      #1;
    end
    check(count == CW'(model_cnt), "count after mixed pop/push");
    for (int n = 2; n < 5; n++) begin
      check(avail && head == AW'(FIRST + n), "pushed during pop comes out");
      pop <= 1;
      @(posedge clk);
      pop <= 0;
      #1;
    end
    check(!avail && count == 0, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fanout_next_mem: self-checking test of the Fanout/Next memory.
// Writes fanout/type and next fields through their separate ports, also in
// the same clock to different addresses, and reads random entries back
// through the synchronous read port, comparing with a reference array.
module tb_fanout_next_mem;
  import pp_pkg::*;
  localparam int MEM_CELLS = 64;
  localparam int AW = $clog2(MEM_CELLS);

  logic clk = 0, rst_n = 0;
  logic ft_we = 0, nx_we = 0, re = 0, rd_valid;
  logic [AW-1:0] ft_waddr = '0, nx_waddr = '0, nx_next = '0, raddr = '0, rd_next;
  logic [FANOUT_W-1:0] ft_fanout = '0, rd_fanout;
  cell_type_e ft_type = CT_ATM, rd_type;
  int checks = 0, failures = 0;

  fanout_next_mem #(.MEM_CELLS(MEM_CELLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FANOUT_W-1:0] m_fan [MEM_CELLS];
  cell_type_e          m_typ [MEM_CELLS];
  logic [AW-1:0]       m_nxt [MEM_CELLS];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // fill every entry: fanout/type for address a and next for a^1 together
    for (int a = 0; a < MEM_CELLS; a++) begin
      ft_we <= 1; ft_waddr <= AW'(a);
      ft_fanout <= FANOUT_W'($urandom_range(1, 16));
      ft_type <= cell_type_e'($urandom_range(0, 3));
      nx_we <= 1; nx_waddr <= AW'(a ^ 1); nx_next <= AW'($urandom);
      @(posedge clk);
      m_fan[ft_waddr] = ft_fanout; m_typ[ft_waddr] = ft_type; m_nxt[nx_waddr] = nx_next;
    end
    ft_we <= 0; nx_we <= 0;
    // random reads, with random writes to other fields in between
    for (int n = 0; n < 300; n++) begin
      re <= 1; raddr <= AW'($urandom);
      nx_we <= ($urandom_range(0, 1) == 1); nx_waddr <= AW'($urandom); nx_next <= AW'($urandom);
      @(posedge clk);
      if (nx_we) m_nxt[nx_waddr] = nx_next;
      re <= 0; nx_we <= 0;
      #1;
      checks++;
      if (!(rd_valid && rd_fanout == m_fan[raddr] && rd_type == m_typ[raddr])) begin
        failures++;
        $display("FAIL fanout/type at %0d", raddr);
      end
      // the next field was read before this clock's write could land
      @(posedge clk);
      #1 checks++;
      if (rd_valid) begin failures++; $display("FAIL rd_valid held"); end
      re <= 1;
      @(posedge clk);
      re <= 0;
      #1 checks++;
      if (rd_next != m_nxt[raddr]) begin failures++; $display("FAIL next at %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

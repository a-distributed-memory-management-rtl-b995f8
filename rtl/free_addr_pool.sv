// free_addr_pool: pool of free addresses kept as a FIFO.
//
// This is the SMF (Shared Memory Free address) block of the pointer path, and
// also the Free List Addresses block inside every output linked list. After
// reset every address FIRST..DEPTH-1 is in the pool, as the design requires
// ("all addresses are free at the beginning"). Rather than spending DEPTH
// clocks writing them into the FIFO, the pool hands out never-used addresses
// from a counter once the FIFO of returned addresses is empty; this is an
// implementation choice with the same visible behaviour.
//
// Interface: `head` is the address the next pop will return, valid while
// `avail` is set (combinational from registers). `pop` takes it on the clock
// edge; `push`/`push_addr` return an address. Pop and push may share a clock.
// `count` is the number of addresses in the pool.
module free_addr_pool #(
  parameter int DEPTH = 5500,
  parameter int FIRST = 0,
  localparam int AW   = $clog2(DEPTH),
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pop,
  output logic [AW-1:0] head,
  output logic          avail,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  output logic [CW-1:0] count
);

  logic [AW-1:0] fifo [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] fifo_cnt;
  logic [CW-1:0] fresh;       // next never-issued address
  logic          from_fifo;

  assign from_fifo = (fifo_cnt != '0);
  assign head      = from_fifo ? fifo[rd_ptr] : fresh[AW-1:0];
  assign avail     = from_fifo || (fresh < CW'(DEPTH));
  assign count     = fifo_cnt + (CW'(DEPTH) - fresh);

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      fifo_cnt <= '0;
      fresh    <= CW'(FIRST);
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop && avail && from_fifo) rd_ptr <= incr(rd_ptr);
      if (pop && avail && !from_fifo) fresh <= fresh + 1'b1;
      fifo_cnt <= fifo_cnt + CW'(push) - CW'(pop && avail && from_fifo);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr] <= push_addr;
  end

  // An address can only come back after it was handed out.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (count < CW'(DEPTH - FIRST)) || (pop && avail));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> avail);

endmodule

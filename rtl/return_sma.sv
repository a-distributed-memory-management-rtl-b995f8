// return_sma: the Return Shared Memory Address block.
//
// A multicast cell sits in the shared memory once but is read by several
// outputs, so its address may only go back to SMF after its last read. This
// block keeps a Number-of-Reads memory with one counter per shared-memory
// cell. For every departing cell (`in_valid`, its address `in_sma` and its
// fanout from the Fanout/Next memory) it reads the counter, adds one and
// compares the sum with the fanout. If they are equal the cell has been read
// `fanout` times: the counter is written back as zero, ready for the next
// cell stored there, and the address is pushed into SMF (`smf_push`,
// `smf_addr`, one clock later). Otherwise the incremented count is written
// back. The read-modify-write takes one clock, so a new cell can be handled
// every clock, also for the same address twice in a row.
//
// The counters must start at zero. After reset the block clears them one per
// clock (MEM_CELLS clocks) and holds `ready` low meanwhile; the rest of the
// pointer path waits for `ready`. This clearing sweep is this design's choice.
module return_sma
  import pp_pkg::*;
#(
  parameter int MEM_CELLS = 5500,
  localparam int AW = $clog2(MEM_CELLS)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  input  logic                in_valid,
  input  logic [AW-1:0]       in_sma,
  input  logic [FANOUT_W-1:0] in_fanout,
  output logic                smf_push,
  output logic [AW-1:0]       smf_addr
);

  logic [FANOUT_W-1:0] num_reads [MEM_CELLS];
  logic [FANOUT_W-1:0] nr_plus1;
  logic                equal;
  logic [AW-1:0]       init_addr;
  logic                nr_we;
  logic [AW-1:0]       nr_waddr;
  logic [FANOUT_W-1:0] nr_wdata;

  assign nr_plus1 = num_reads[in_sma] + 1'b1;
  assign equal    = (nr_plus1 == in_fanout);

  always_comb begin
    if (!ready) begin
      nr_we    = 1'b1;
      nr_waddr = init_addr;
      nr_wdata = '0;
    end else begin
      nr_we    = in_valid;
      nr_waddr = in_sma;
      nr_wdata = equal ? '0 : nr_plus1;
    end
  end

  always_ff @(posedge clk) begin
    if (nr_we) num_reads[nr_waddr] <= nr_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready     <= 1'b0;
      init_addr <= '0;
      smf_push  <= 1'b0;
      smf_addr  <= '0;
    end else begin
      if (!ready) begin
        init_addr <= init_addr + 1'b1;
        if (init_addr == AW'(MEM_CELLS - 1)) ready <= 1'b1;
      end
      smf_push <= ready && in_valid && equal;
      if (ready && in_valid) smf_addr <= in_sma;
    end
  end

  a_idle_in_init: assert property (@(posedge clk) disable iff (!rst_n)
    !ready |-> !in_valid);

endmodule

// free_addr_provider: the Free Address Provider of the write scheduler.
//
// The data path needs one free shared-memory address per input at the start
// of every cell time. This block pulls free addresses from SMF one per clock
// (serially) into N_PORTS holding registers, one per input, and on `snap`
// (the clock that ends a cell time) copies them to `wr_addr`/`wr_valid`,
// which stay stable for the whole next cell time and go to the data path and
// to the Fanout/Next write port. An input that had no cell does not use its
// address: the address stays in its register and is offered again in the
// next cell time, never written back to SMF. When the write scheduler stores
// a cell of input i it pulses `consume[i]`; the holding register is then
// refilled from SMF. The snapshot is taken from the registers' next state, so
// an address consumed in the same clock as `snap` is not offered twice.
// A register consumed in some clock may be refilled in that same clock, so
// with one cell per input per cell time and one SMF read per clock every
// input, the one handled in the last clock of the cell time included, has a
// fresh address at the next snapshot.
// Refill order (lowest-numbered empty register first) is this design's choice.
module free_addr_provider
  import pp_pkg::*;
#(
  parameter int MEM_CELLS = 5500,
  localparam int AW = $clog2(MEM_CELLS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // SMF read side
  output logic                        smf_pop,
  input  logic [AW-1:0]               smf_head,
  input  logic                        smf_avail,
  // cell-time control
  input  logic                        snap,
  input  logic [N_PORTS-1:0]          consume,
  // addresses for the current cell time
  output logic [N_PORTS-1:0][AW-1:0]  wr_addr,
  output logic [N_PORTS-1:0]          wr_valid
);

  logic [N_PORTS-1:0][AW-1:0] fa, fa_n;
  logic [N_PORTS-1:0]         fv, fv_n;
  logic [PORT_W-1:0]          fill_idx;
  logic                       fill_any;

  // lowest empty holding register; a register consumed in this clock
  // counts as empty, so it can be refilled at once
  always_comb begin
    fill_any = 1'b0;
    fill_idx = '0;
    for (int i = N_PORTS - 1; i >= 0; i--) begin
      if (!fv[i] || consume[i]) begin
        fill_any = 1'b1;
        fill_idx = PORT_W'(i);
      end
    end
  end

  assign smf_pop = fill_any && smf_avail;

  always_comb begin
    fa_n = fa;
    fv_n = fv & ~consume;
    if (smf_pop) begin
      fa_n[fill_idx] = smf_head;
      fv_n[fill_idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fa       <= '0;
      fv       <= '0;
      wr_addr  <= '0;
      wr_valid <= '0;
    end else begin
      fa <= fa_n;
      fv <= fv_n;
      if (snap) begin
        wr_addr  <= fa_n;
        wr_valid <= fv_n;
      end
    end
  end

  // Only an address that is offered and still held can be consumed.
  a_consume_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (consume & ~(wr_valid & fv)) == '0);

endmodule

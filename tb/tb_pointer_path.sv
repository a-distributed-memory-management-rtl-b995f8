// tb_pointer_path: end-to-end test of the pointer path (reduced sizes).
// The testbench plays the input ports and the data path: every cell time it
// offers 16 headers, and for each cell the pointer path stores it records
// which cell sits at the given shared-memory address. Every departure is then
// checked against that record: the output must be one of the cell's
// destinations, no output gets a cell twice, cells of one input, output and
// class leave in arrival order, the cells of an IP packet leave back to back
// on each output in sequence, and an output sends at most one cell per cell
// time. Phases: light random traffic (every cell must reach every
// destination), a strict-priority check under BPIn, an overload with BPIn on
// half the outputs (quota refusals, list-room refusals, SMF exhaustion,
// truncated packets), and a final drain after which every shared-memory
// address must be free again. Each mechanism is counted and must occur.
module tb_pointer_path;
  import pp_pkg::*;
  localparam int MEM_CELLS = 512;
  localparam int LL_DEPTH  = 64;
  localparam int CELL_CLKS = 16;
  localparam int ALPHA_PERMILLE = 150;
  localparam int QUOTA = MEM_CELLS * ALPHA_PERMILLE / 1000;
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

  pointer_path #(.MEM_CELLS(MEM_CELLS), .LL_DEPTH(LL_DEPTH), .CELL_CLKS(CELL_CLKS),
                 .ALPHA_PERMILLE(ALPHA_PERMILLE)) dut (.*);

`include "pp_e2e_body.svh"

endmodule

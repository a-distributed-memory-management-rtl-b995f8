// pp_pkg: types and constants shared by the pointer path (the memory manager
// of a 16-port shared-memory ATM/IP switch fabric).
//
// The port count (16), the number of priority classes (8) and the four cell
// types (ATM cell, first/middle/last cell of a segmented IP packet) are fixed
// by the design. Sizes that depend on the configuration (shared-memory cells,
// list RAM depth, clocks per cell time) are module parameters instead.
// The header field layout and the type encoding are this design's own choice.
package pp_pkg;

  localparam int N_PORTS   = 16;  // input and output ports
  localparam int N_CLASSES = 8;   // strict-priority classes per output
  localparam int CLS_W     = $clog2(N_CLASSES);
  localparam int PORT_W    = $clog2(N_PORTS);
  localparam int FANOUT_W  = $clog2(N_PORTS + 1);  // 0..16

  typedef enum logic [1:0] {
    CT_ATM      = 2'd0,
    CT_IP_START = 2'd1,
    CT_IP_MID   = 2'd2,
    CT_IP_LAST  = 2'd3
  } cell_type_e;

  // Header of one input cell, as seen by the memory manager.
  typedef struct packed {
    logic                 valid;
    cell_type_e           ctype;
    logic [CLS_W-1:0]     cls;    // priority class, higher value served first
    logic [N_PORTS-1:0]   dest;   // destination output bitmap (multicast)
  } cell_hdr_t;

  // Number of ones in a destination bitmap: the fanout of a cell.
  function automatic logic [FANOUT_W-1:0] popcount(input logic [N_PORTS-1:0] m);
    logic [FANOUT_W-1:0] n;
    n = '0;
    for (int i = 0; i < N_PORTS; i++) n = n + FANOUT_W'(m[i]);
    return n;
  endfunction

endpackage

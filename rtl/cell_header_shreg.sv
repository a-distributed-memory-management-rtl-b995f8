// cell_header_shreg: the Cell Header Shift Register of the write scheduler.
//
// At the start of a cell time the headers of all 16 inputs are loaded in
// parallel (`load`, one clock). The register then shifts by one position per
// clock, so `head` shows the header of input 0 in the first clock after the
// load, input 1 in the second, and so on; `head_port` says which input it
// belongs to. The write scheduler thus handles one input per clock, 16 per
// cell time, as the design intends. Positions shifted out are refilled with
// invalid headers. A load takes priority over a shift.
module cell_header_shreg
  import pp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  cell_hdr_t [N_PORTS-1:0] hdr_in,
  output cell_hdr_t               head,
  output logic [PORT_W-1:0]       head_port
);

  cell_hdr_t [N_PORTS-1:0] sr;
  logic [PORT_W-1:0]       cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr  <= '0;
      cnt <= '0;
    end else if (load) begin
      sr  <= hdr_in;
      cnt <= '0;
    end else begin
      sr  <= {cell_hdr_t'('0), sr[N_PORTS-1:1]};
      cnt <= cnt + 1'b1;
    end
  end

  assign head      = sr[0];
  assign head_port = cnt;

endmodule

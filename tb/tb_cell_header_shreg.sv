// tb_cell_header_shreg: self-checking test of the cell header shift register.
// Loads 16 random headers and checks that input k's header appears on `head`
// with `head_port == k` exactly k clocks after the load, that invalid headers
// follow, and that a new load restarts the sequence.
module tb_cell_header_shreg;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  cell_hdr_t [N_PORTS-1:0] hdr_in = '0;
  cell_hdr_t head;
  logic [PORT_W-1:0] head_port;
  int checks = 0, failures = 0;

  cell_header_shreg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_hdr_t rnd_hdr();
    cell_hdr_t h;
    h.valid = 1'b1;
    h.ctype = cell_type_e'($urandom_range(0, 3));
    h.cls   = CLS_W'($urandom);
    h.dest  = N_PORTS'($urandom);
    return h;
  endfunction

  initial begin
    cell_hdr_t ref_h [N_PORTS];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int round = 0; round < 6; round++) begin
      for (int k = 0; k < N_PORTS; k++) begin
        ref_h[k] = rnd_hdr();
        if ($urandom_range(0, 3) == 0) ref_h[k].valid = 1'b0;
      end
      for (int k = 0; k < N_PORTS; k++) hdr_in[k] = ref_h[k];
      load <= 1;
      @(posedge clk);
      load <= 0;
      for (int k = 0; k < N_PORTS + (round % 3); k++) begin
        #1 checks++;
        if (k < N_PORTS) begin
          if (head != ref_h[k] || head_port != PORT_W'(k)) begin
            failures++;
            $display("FAIL round %0d slot %0d got %h/%0d exp %h", round, k, head, head_port, ref_h[k]);
          end
        end else if (head.valid) begin
          failures++;
          $display("FAIL valid header after the last input");
        end
        if (k < N_PORTS + (round % 3) - 1) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

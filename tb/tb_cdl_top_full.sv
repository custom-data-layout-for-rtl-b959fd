// tb_cdl_top_full: one complete run of cdl_top at its default parameters.
//
// The default design: 32x16 arrays, a 2x2 unroll, 8 SRAM banks. The host
// model in system_bench loads B, starts the design, reads A back and checks
// A = B + 1, the kernel's 129 memory cycles and the length of the run.
module tb_cdl_top_full;
  import cdl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;

  // Reset edge before the first clock edge.
  initial #1 rst_n = 1'b0;

  always #5 clk = ~clk;

  logic start, busy, done, fin;
  phase_e phase;
  logic [15:0] kernel_cycles;
  mem_req_t host_req;
  logic [DW-1:0] host_rdata;
  mem_req_t mem_req [DEF_MP];
  logic [DW-1:0] mem_rdata [DEF_MP];
  int checks, failures, n_dist, n_par, n_overlap, n_alt, n_gath, n_lock;

  cdl_top u_top (
    .clk, .rst_n, .start, .busy, .done, .phase, .kernel_cycles,
    .host_req, .host_rdata, .mem_req, .mem_rdata
  );

  system_bench #(.MP(DEF_MP), .N1(DEF_N1), .N2(DEF_N2), .MV(DEF_U1 * DEF_U2)) u_sys (
    .clk, .rst_n, .start, .busy, .done, .phase, .kernel_cycles,
    .host_req, .host_rdata, .mem_req, .mem_rdata, .checks, .failures,
    .finished(fin), .n_dist, .n_par, .n_overlap, .n_alt, .n_gath, .n_lock
  );

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

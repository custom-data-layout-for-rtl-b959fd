// tb_cdl_top_unroll: the example loop under a range of unroll factors and bank counts.
//
// For each (U1 x U2 unroll, MP banks) pair below, the whole design runs once
// through system_bench: B loaded, distributed, A = B + 1 computed, A
// gathered and read back. The kernel's memory cycles are checked against
// N1*N2/MV + 1 when the 2*MV virtual memories of A and B each get a bank of
// their own, and against 2*N1*N2/MV when A and B of a suffix share a bank.
// For comparison, one memory without unrolling needs 2*N1*N2 = 1024.
module tb_cdl_top_unroll;
  import cdl_pkg::*;

  localparam int NC = 10;
  localparam int CU1 [NC] = '{1, 2, 1, 4, 2, 1, 8, 4, 2, 1};
  localparam int CU2 [NC] = '{1, 1, 2, 1, 2, 4, 1, 2, 4, 8};
  localparam int CMP [NC] = '{8, 8, 4, 8, 4, 4, 8, 8, 8, 8};

  logic clk = 1'b0, rst_n = 1'b1;

  // Reset edge before the first clock edge.
  initial #1 rst_n = 1'b0;

  always #5 clk = ~clk;

  int   cc  [NC];
  int   ff  [NC];
  logic fin [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int MPC = CMP[c];
    logic start, busy, done;
    phase_e phase;
    logic [15:0] kernel_cycles;
    mem_req_t host_req;
    logic [DW-1:0] host_rdata;
    mem_req_t mem_req [MPC];
    logic [DW-1:0] mem_rdata [MPC];
    int n_dist, n_par, n_overlap, n_alt, n_gath, n_lock;

    cdl_top #(.MP(MPC), .U1(CU1[c]), .U2(CU2[c])) u_top (
      .clk, .rst_n, .start, .busy, .done, .phase, .kernel_cycles,
      .host_req, .host_rdata, .mem_req, .mem_rdata
    );
    system_bench #(.MP(MPC), .MV(CU1[c] * CU2[c])) u_sys (
      .clk, .rst_n, .start, .busy, .done, .phase, .kernel_cycles,
      .host_req, .host_rdata, .mem_req, .mem_rdata, .checks(cc[c]),
      .failures(ff[c]), .finished(fin[c]), .n_dist, .n_par, .n_overlap,
      .n_alt, .n_gath, .n_lock
    );
  end

  initial begin
    int checks, failures;
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int c = 0; c < NC; c++) all &= fin[c];
    end while (!all);
    checks = 0;
    failures = 0;
    for (int c = 0; c < NC; c++) begin
      checks += cc[c];
      failures += ff[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    int checks, failures;
    repeat (10000) @(posedge clk);
    checks = 0;
    failures = 1;
    for (int c = 0; c < NC; c++) begin
      checks += cc[c];
      failures += ff[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

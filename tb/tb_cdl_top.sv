// tb_cdl_top: end-to-end runs of the design with 8 banks and with 4 banks.
//
// Each configuration is driven by system_bench (host and SRAM models): the
// host loads B, starts the design and reads back A = B + 1. With 8 banks
// every virtual memory has a bank of its own and the kernel overlaps reads
// with writes; with 4 banks A and B share banks and the kernel alternates
// read and write cycles. Every mechanism (distribute, all-bank parallel
// read, overlap, shared-bank alternation, gather, host lock-out) must have
// happened at least once, else it counts as a failure.
module tb_cdl_top;
  import cdl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;

  // Reset edge before the first clock edge.
  initial #1 rst_n = 1'b0;

  always #5 clk = ~clk;

  // 8 banks, the default configuration.
  logic s8, busy8, done8, fin8;
  phase_e ph8;
  logic [15:0] kc8;
  mem_req_t hreq8;
  logic [DW-1:0] hrd8;
  mem_req_t mreq8 [8];
  logic [DW-1:0] mrd8 [8];
  int c8, f8, d8, p8, o8, a8, g8, l8;

  cdl_top u_top8 (
    .clk, .rst_n, .start(s8), .busy(busy8), .done(done8), .phase(ph8),
    .kernel_cycles(kc8), .host_req(hreq8), .host_rdata(hrd8),
    .mem_req(mreq8), .mem_rdata(mrd8)
  );
  system_bench #(.MP(8)) u_sys8 (
    .clk, .rst_n, .start(s8), .busy(busy8), .done(done8), .phase(ph8),
    .kernel_cycles(kc8), .host_req(hreq8), .host_rdata(hrd8),
    .mem_req(mreq8), .mem_rdata(mrd8), .checks(c8), .failures(f8),
    .finished(fin8), .n_dist(d8), .n_par(p8), .n_overlap(o8), .n_alt(a8),
    .n_gath(g8), .n_lock(l8)
  );

  // 4 banks: A and B share banks.
  logic s4, busy4, done4, fin4;
  phase_e ph4;
  logic [15:0] kc4;
  mem_req_t hreq4;
  logic [DW-1:0] hrd4;
  mem_req_t mreq4 [4];
  logic [DW-1:0] mrd4 [4];
  int c4, f4, d4, p4, o4, a4, g4, l4;

  cdl_top #(.MP(4)) u_top4 (
    .clk, .rst_n, .start(s4), .busy(busy4), .done(done4), .phase(ph4),
    .kernel_cycles(kc4), .host_req(hreq4), .host_rdata(hrd4),
    .mem_req(mreq4), .mem_rdata(mrd4)
  );
  system_bench #(.MP(4)) u_sys4 (
    .clk, .rst_n, .start(s4), .busy(busy4), .done(done4), .phase(ph4),
    .kernel_cycles(kc4), .host_req(hreq4), .host_rdata(hrd4),
    .mem_req(mreq4), .mem_rdata(mrd4), .checks(c4), .failures(f4),
    .finished(fin4), .n_dist(d4), .n_par(p4), .n_overlap(o4), .n_alt(a4),
    .n_gath(g4), .n_lock(l4)
  );

  int checks, failures;

  task automatic mechanism(input string name, input int count);
    checks++;
    $display("mechanism %s: %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin8 && fin4);
    checks = c8 + c4;
    failures = f8 + f4;
    mechanism("distribute", d8 + d4);
    mechanism("parallel read of all virtual memories", p8 + p4);
    mechanism("read/write overlap (own banks)", o8);
    mechanism("read/write alternation (shared banks)", a4);
    mechanism("gather", g8 + g4);
    mechanism("host lock-out while busy", l8 + l4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c4, f8 + f4 + 1);
    $finish;
  end
endmodule

// tb_cdl_kernel: runs the unrolled kernel with 8 banks and with 4 banks.
//
// With 8 banks every virtual memory has a bank of its own and reads overlap
// writes (129 memory cycles for the 32x16 arrays); with 4 banks A and B share
// banks and each iteration needs a read and a write cycle (256). The checks
// are in kernel_bench.
module tb_cdl_kernel;
  logic clk = 1'b0, rst_n = 1'b1;

  // Reset edge before the first clock edge.
  initial #1 rst_n = 1'b0;
  int c8, f8, c4, f4;
  logic fin8, fin4;
  int checks, failures;

  always #5 clk = ~clk;

  kernel_bench #(.MP(8)) u_b8 (.clk, .rst_n, .checks(c8), .failures(f8), .finished(fin8));
  kernel_bench #(.MP(4)) u_b4 (.clk, .rst_n, .checks(c4), .failures(f4), .finished(fin4));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin8 && fin4);
    checks = c8 + c4;
    failures = f8 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c4, f8 + f4 + 1);
    $finish;
  end
endmodule

// tb_cdl_ctrl: checks the distribute / compute / gather sequence.
//
// The tb plays the reorganization engine and the kernel, answering each
// start pulse with a done pulse after a random delay, and checks the order
// of the phases, that each engine is started exactly once per run with the
// right direction and array (distribute B, gather A), that nothing starts
// while the design is idle and that done pulses once at the end. Two runs.
module tb_cdl_ctrl;
  import cdl_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;

  // Reset edge before the first clock edge.
  initial #1 rst_n = 1'b0;
  logic start = 1'b0;
  logic busy, done;
  phase_e phase;
  logic reorg_start, reorg_gather, reorg_done = 1'b0;
  arr_e reorg_arr;
  logic kern_start, kern_done = 1'b0;

  cdl_ctrl dut (.clk, .rst_n, .start, .busy, .done, .phase, .reorg_start,
                .reorg_gather, .reorg_arr, .reorg_done, .kern_start, .kern_done);

  always #5 clk = ~clk;

  int n_dist, n_gath, n_kern, n_done;
  int step;  // 0: expect distribute, 1: kernel, 2: gather, 3: done

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (step %0d, phase %s)", what, step, phase.name());
    end
  endtask

  // Engine models: answer a start with a done after 1..20 cycles.
  always @(negedge clk) begin
    if (rst_n && reorg_start) begin
      expect_true("reorganization started in order", step == 0 || step == 2);
      if (!reorg_gather) begin
        expect_true("distribute works on B", reorg_arr == ARR_B);
        n_dist++;
      end else begin
        expect_true("gather works on A", reorg_arr == ARR_A);
        n_gath++;
      end
      fork begin
        repeat ($urandom_range(1, 20)) @(negedge clk);
        reorg_done = 1'b1;
        @(negedge clk);
        reorg_done = 1'b0;
        step++;
      end join_none
    end
    if (rst_n && kern_start) begin
      expect_true("kernel started after distribute", step == 1);
      expect_true("compute phase", phase == PH_COMPUTE);
      n_kern++;
      fork begin
        repeat ($urandom_range(1, 20)) @(negedge clk);
        kern_done = 1'b1;
        @(negedge clk);
        kern_done = 1'b0;
        step++;
      end join_none
    end
    if (rst_n && done) begin
      expect_true("done after gather", step == 3);
      n_done++;
    end
  end

  initial begin
    n_dist = 0; n_gath = 0; n_kern = 0; n_done = 0; step = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    expect_true("idle after reset", !busy && phase == PH_IDLE);
    for (int run = 0; run < 2; run++) begin
      step = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      expect_true("busy after start", busy && phase == PH_DIST);
      while (!done) @(negedge clk);
      @(negedge clk);
      expect_true("idle after done", !busy && phase == PH_IDLE);
      repeat (5) @(negedge clk);
    end
    expect_true("two distributes", n_dist == 2);
    expect_true("two kernel runs", n_kern == 2);
    expect_true("two gathers", n_gath == 2);
    expect_true("two done pulses", n_done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cdl_reorg: distributes B into, and gathers A out of, the custom layout.
//
// Runs the engine with 4 banks, where A and B of one suffix share a bank and
// bank 0 holds both the naive copy and a custom-layout bank. The banks are
// modelled here as word arrays with a one-cycle read. Distribute: random B
// in the naive region of bank 0; afterwards element B[i][j] must sit in bank
// 2*(i%2) + (j%2) at word 128 + 8*(i/2) + (j/2), and the naive copy must be
// unchanged. Gather: random A at bank 2*(i%2) + (j%2), word 8*(i/2) + (j/2);
// afterwards the naive A region, word 2048 + 16*i + j, must hold it. Each
// pass must take 2*32*16 busy cycles.
module tb_cdl_reorg;
  import cdl_pkg::*;

  localparam int MP = 4;
  localparam int N1 = 32, N2 = 16;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b1;

  // Reset edge before the first clock edge.
  initial #1 rst_n = 1'b0;
  logic start = 1'b0, gather = 1'b0;
  arr_e arr = ARR_B;
  logic busy, done;
  mem_req_t      req   [MP];
  logic [DW-1:0] rdata [MP];
  logic [DW-1:0] mem   [MP][2**AW];

  logic [DW-1:0] ref_b [N1][N2];
  logic [DW-1:0] ref_a [N1][N2];
  int busy_cycles;

  cdl_reorg #(.MP(MP)) dut (.clk, .rst_n, .start, .gather, .arr, .busy, .done, .req, .rdata);

  always #5 clk = ~clk;

  always_ff @(posedge clk)
    for (int b = 0; b < MP; b++)
      if (req[b].en) begin
        if (req[b].we) mem[b][req[b].addr] <= req[b].wdata;
        else           rdata[b] <= mem[b][req[b].addr];
      end

  always_ff @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  task automatic expect_eq(input string what, input logic [DW-1:0] got, input logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(input logic g, input arr_e a);
    @(negedge clk);
    busy_cycles = 0;
    start = 1'b1; gather = g; arr = a;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (busy_cycles != 2 * N1 * N2) begin
      failures++;
      $display("FAIL busy cycles %0d expected %0d", busy_cycles, 2 * N1 * N2);
    end
  endtask

  initial begin
    for (int b = 0; b < MP; b++) begin
      rdata[b] = '0;
      for (int w = 0; w < 2**AW; w++) mem[b][w] = $urandom;
    end
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N2; j++) begin
        ref_b[i][j] = $urandom;
        ref_a[i][j] = $urandom;
        mem[0][NAIVE_BASE + N1 * N2 + i * N2 + j] = ref_b[i][j];
        mem[(i % 2) * 2 + (j % 2)][(i / 2) * 8 + (j / 2)] = ref_a[i][j];
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run(1'b0, ARR_B);
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N2; j++) begin
        expect_eq("distributed B", mem[(i % 2) * 2 + (j % 2)][128 + (i / 2) * 8 + (j / 2)], ref_b[i][j]);
        expect_eq("naive B kept", mem[0][NAIVE_BASE + N1 * N2 + i * N2 + j], ref_b[i][j]);
        expect_eq("custom A kept", mem[(i % 2) * 2 + (j % 2)][(i / 2) * 8 + (j / 2)], ref_a[i][j]);
      end

    run(1'b1, ARR_A);
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N2; j++)
        expect_eq("gathered A", mem[0][NAIVE_BASE + i * N2 + j], ref_a[i][j]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// kernel_bench: runs cdl_kernel once with MP banks and checks the result.
//
// Fills B's custom-layout locations with random words (bank and word worked
// out here from the subscripts), runs the kernel and checks that every A
// location holds B + 1, that B is unchanged and that the kernel reported and
// actually used the expected number of memory cycles: 32*16/4 + 1 when every
// virtual memory has its own bank (8 banks), 2*32*16/4 when A and B share
// banks (4 banks). Reports its counts on checks/failures and raises finished.
module kernel_bench
  import cdl_pkg::*;
#(
  parameter int MP = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);

  localparam int N1 = 32, N2 = 16;
  localparam bit SHARED = (MP < 8);
  localparam int EXP_CYCLES = SHARED ? 2 * N1 * N2 / 4 : N1 * N2 / 4 + 1;

  logic start;
  logic busy, done;
  logic [15:0] mem_cycles;
  mem_req_t      req   [MP];
  logic [DW-1:0] rdata [MP];
  logic [DW-1:0] mem   [MP][2**AW];
  logic [DW-1:0] ref_b [N1][N2];
  int used_cycles;

  cdl_kernel #(.MP(MP)) dut (.clk, .rst_n, .start, .busy, .done, .mem_cycles, .req, .rdata);

  always_ff @(posedge clk) begin
    for (int b = 0; b < MP; b++)
      if (req[b].en) begin
        if (req[b].we) mem[b][req[b].addr] <= req[b].wdata;
        else           rdata[b] <= mem[b][req[b].addr];
      end
  end

  always @(posedge clk) begin
    automatic bit any = 1'b0;
    for (int b = 0; b < MP; b++) any |= req[b].en;
    if (any && rst_n) used_cycles <= used_cycles + 1;
  end

  function automatic int bank_of(int a, int i, int j);
    return SHARED ? (i % 2) * 2 + (j % 2) : a * 4 + (i % 2) * 2 + (j % 2);
  endfunction

  function automatic int word_of(int a, int i, int j);
    return (SHARED ? a * 128 : 0) + (i / 2) * 8 + (j / 2);
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL MP=%0d %s: got %0d expected %0d", MP, what, got, exp);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
    start = 1'b0;
    used_cycles = 0;
    for (int b = 0; b < MP; b++) begin
      rdata[b] = '0;
      for (int w = 0; w < 2**AW; w++) mem[b][w] = $urandom;
    end
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N2; j++) begin
        ref_b[i][j] = $urandom;
        mem[bank_of(1, i, j)][word_of(1, i, j)] = ref_b[i][j];
      end
    @(posedge rst_n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N2; j++) begin
        expect_eq("A = B + 1", int'(mem[bank_of(0, i, j)][word_of(0, i, j)]), int'(ref_b[i][j] + 1));
        expect_eq("B kept", int'(mem[bank_of(1, i, j)][word_of(1, i, j)]), int'(ref_b[i][j]));
      end
    expect_eq("reported memory cycles", int'(mem_cycles), EXP_CYCLES);
    expect_eq("used memory cycles", used_cycles, EXP_CYCLES);
    $display("MP=%0d: %0d memory cycles (one memory, no unrolling: %0d)", MP, used_cycles, 2 * N1 * N2);
    finished = 1'b1;
  end
endmodule

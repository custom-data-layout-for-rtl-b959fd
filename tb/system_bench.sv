// system_bench: the world around cdl_top, for the top-level testbenches.
//
// Models the MP external SRAM banks (word arrays, one-cycle read) and the
// host. The host writes random B into the naive copy in bank 0 (word
// NAIVE_BASE + N1*N2 + N2*i + j) and junk into the naive A region, pulses
// start, tries one write to bank 0 while the design is busy (it must be
// ignored), waits for done and reads A back through its port, expecting
// B + 1 everywhere. It also checks the cycle count of the kernel, of the
// whole run, and counts how often each mechanism of the design happened:
// distribute writes, kernel cycles reading all MV virtual memories of B at
// once, cycles where reads overlap writes (own banks), write-only cycles
// (shared banks), gather writes and the ignored host write.
module system_bench
  import cdl_pkg::*;
#(
  parameter int MP = 8,
  parameter int N1 = 32,
  parameter int N2 = 16,
  parameter int MV = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          start,
  input  logic          busy,
  input  logic          done,
  input  phase_e        phase,
  input  logic [15:0]   kernel_cycles,
  output mem_req_t      host_req,
  input  logic [DW-1:0] host_rdata,
  input  mem_req_t      mem_req   [MP],
  output logic [DW-1:0] mem_rdata [MP],
  output int            checks,
  output int            failures,
  output logic          finished,
  output int            n_dist,
  output int            n_par,
  output int            n_overlap,
  output int            n_alt,
  output int            n_gath,
  output int            n_lock
);

  localparam bit SHARED = (2 * MV > MP);
  localparam int ITER = N1 * N2 / MV;
  localparam int EXP_KERNEL = SHARED ? 2 * ITER : ITER + 1;
  // Distribute and gather: two cycles per element; the kernel; plus, for
  // each of the three phases, one cycle for the registered start pulse to
  // reach the engine and one for its registered done pulse to come back.
  localparam int EXP_RUN = 2 * (2 * N1 * N2) + EXP_KERNEL + 3 * 2;

  logic [DW-1:0] mem   [MP][2**AW];
  logic [DW-1:0] ref_b [N1][N2];
  int run_cycles;

  always_ff @(posedge clk)
    for (int b = 0; b < MP; b++)
      if (mem_req[b].en) begin
        if (mem_req[b].we) mem[b][mem_req[b].addr] <= mem_req[b].wdata;
        else               mem_rdata[b] <= mem[b][mem_req[b].addr];
      end

  // Mechanism counters.
  always @(posedge clk) begin
    automatic int rd = 0, wr = 0;
    for (int b = 0; b < MP; b++) begin
      if (mem_req[b].en && !mem_req[b].we) rd++;
      if (mem_req[b].en &&  mem_req[b].we) wr++;
    end
    if (rst_n) begin
      if (phase == PH_DIST && wr > 0) n_dist <= n_dist + 1;
      if (phase == PH_GATHER && wr > 0) n_gath <= n_gath + 1;
      if (phase == PH_COMPUTE && rd == MV) n_par <= n_par + 1;
      if (phase == PH_COMPUTE && rd > 0 && wr > 0) n_overlap <= n_overlap + 1;
      if (phase == PH_COMPUTE && rd == 0 && wr == MV) n_alt <= n_alt + 1;
      if (busy) run_cycles <= run_cycles + 1;
    end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL MP=%0d %s: got %0d expected %0d", MP, what, got, exp);
    end
  endtask

  task automatic host_write(input int addr, input logic [DW-1:0] d);
    host_req = '{en: 1'b1, we: 1'b1, addr: AW'(addr), wdata: d};
    @(negedge clk);
    host_req = REQ_IDLE;
  endtask

  initial begin
    logic [DW-1:0] junk;
    checks = 0; failures = 0; finished = 1'b0;
    n_dist = 0; n_par = 0; n_overlap = 0; n_alt = 0; n_gath = 0; n_lock = 0;
    run_cycles = 0;
    start = 1'b0;
    host_req = REQ_IDLE;
    for (int b = 0; b < MP; b++) begin
      mem_rdata[b] = '0;
      for (int w = 0; w < 2**AW; w++) mem[b][w] = $urandom;
    end
    @(posedge rst_n);
    @(negedge clk);
    // Host loads B (and junk over A) in the naive layout.
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N2; j++) begin
        ref_b[i][j] = $urandom;
        host_write(NAIVE_BASE + N1 * N2 + i * N2 + j, ref_b[i][j]);
        host_write(NAIVE_BASE + i * N2 + j, $urandom);
      end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // A host write while the design runs must not reach the memory.
    repeat (10) @(negedge clk);
    junk = ~ref_b[0][0];
    host_write(NAIVE_BASE + N1 * N2, junk);
    while (!done) @(negedge clk);
    if (mem[0][NAIVE_BASE + N1 * N2] == ref_b[0][0]) n_lock++;
    expect_eq("host write ignored while busy", int'(mem[0][NAIVE_BASE + N1 * N2]), int'(ref_b[0][0]));
    expect_eq("kernel memory cycles", int'(kernel_cycles), EXP_KERNEL);
    expect_eq("run cycles", run_cycles, EXP_RUN);
    // Host reads A back through its port.
    for (int i = 0; i < N1; i++)
      for (int j = 0; j < N2; j++) begin
        host_req = '{en: 1'b1, we: 1'b0, addr: AW'(NAIVE_BASE + i * N2 + j), wdata: '0};
        @(negedge clk);
        host_req = REQ_IDLE;
        expect_eq("A = B + 1", int'(host_rdata), int'(ref_b[i][j] + 1));
      end
    $display("MP=%0d: run %0d cycles, kernel %0d memory cycles; distribute %0d, parallel reads %0d, overlapped %0d, write-only %0d, gather %0d, host lock-out %0d",
             MP, run_cycles, kernel_cycles, n_dist, n_par, n_overlap, n_alt, n_gath, n_lock);
    finished = 1'b1;
  end
endmodule

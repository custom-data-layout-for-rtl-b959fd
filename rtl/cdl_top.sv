// cdl_top: FPGA design running A[i][j] = B[i][j] + 1 over MP SRAM banks.
//
// Arrays A and B (N1 x N2 words) are spread over the banks in a custom data
// layout derived from the loop's access pattern: after a U1 x U2 unroll the
// MV = U1*U2 elements one unrolled iteration touches in each array sit in
// MV different banks, so the whole iteration reads and writes in parallel.
// The host loads B row-major into bank 0 (the single-memory layout), pulses
// start, waits for done and reads A back from bank 0. In between, cdl_ctrl
// runs three phases: cdl_reorg distributes B into the custom layout,
// cdl_kernel computes, cdl_reorg gathers A back. A multiplexer gives the
// banks to the host (idle), to cdl_reorg (distribute, gather) or to
// cdl_kernel (compute). Everything is on one clock with an asynchronous
// active-low reset.
//
// External memories: one request port per bank (mem_req) and its read data
// (mem_rdata), returned one clock after a read request. Host: a request
// port to bank 0, honoured only while busy is low, and host_rdata, bank 0's
// read data. kernel_cycles holds the memory cycles of the last kernel run.
// The loop, the layout and the bank count follow the reference design; the
// host port, the placement of the naive copy and the phase sequencing are
// this design's choices.
//
// The assertions are switched off while rst_n is low; lint reports rst_n as
// used both asynchronously (the flops) and synchronously (the assertion
// disable), which is intended.
module cdl_top
  import cdl_pkg::*;
#(
  parameter int unsigned MP = DEF_MP,
  parameter int unsigned N1 = DEF_N1,
  parameter int unsigned N2 = DEF_N2,
  parameter int unsigned U1 = DEF_U1,
  parameter int unsigned U2 = DEF_U2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output phase_e        phase,
  output logic [15:0]   kernel_cycles,
  input  mem_req_t      host_req,
  output logic [DW-1:0] host_rdata,
  output mem_req_t      mem_req   [MP],
  input  logic [DW-1:0] mem_rdata [MP]
);

  logic     reorg_start, reorg_gather, reorg_done, reorg_busy;
  arr_e     reorg_arr;
  logic     kern_start, kern_done, kern_busy;
  mem_req_t reorg_req [MP];
  mem_req_t kern_req  [MP];

  cdl_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .phase,
    .reorg_start, .reorg_gather, .reorg_arr, .reorg_done,
    .kern_start, .kern_done
  );

  cdl_reorg #(.MP(MP), .N1(N1), .N2(N2), .U1(U1), .U2(U2)) u_reorg (
    .clk, .rst_n, .start(reorg_start), .gather(reorg_gather), .arr(reorg_arr),
    .busy(reorg_busy), .done(reorg_done), .req(reorg_req), .rdata(mem_rdata)
  );

  cdl_kernel #(.MP(MP), .N1(N1), .N2(N2), .U1(U1), .U2(U2)) u_kernel (
    .clk, .rst_n, .start(kern_start), .busy(kern_busy), .done(kern_done),
    .mem_cycles(kernel_cycles), .req(kern_req), .rdata(mem_rdata)
  );

  always_comb begin
    for (int b = 0; b < int'(MP); b++) begin
      unique case (phase)
        PH_IDLE:    mem_req[b] = (b == 0) ? host_req : REQ_IDLE;
        PH_COMPUTE: mem_req[b] = kern_req[b];
        default:    mem_req[b] = reorg_req[b];
      endcase
    end
  end

  assign host_rdata = mem_rdata[0];

  // Only the engine that owns the banks may be active.
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_n)
    !(reorg_busy && kern_busy)) else $error("two engines active at once");
  a_kern_phase: assert property (@(posedge clk) disable iff (!rst_n)
    kern_busy |-> (phase == PH_COMPUTE)) else $error("kernel active outside compute phase");

endmodule

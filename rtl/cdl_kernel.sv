// cdl_kernel: the unrolled loop body A[i][j] = B[i][j] + 1 on the custom layout.
//
// Unrolling i by U1 and j by U2 turns each iteration (ii, jj) of the
// remaining (N1/U1) x (N2/U2) loop into MV = U1*U2 independent statements
//   A<s1><s2>[ii][jj] = B<s1><s2>[ii][jj] + 1,   s1 < U1, s2 < U2,
// one per virtual memory. The kernel issues the MV reads of B in one cycle,
// adds 1 in MV parallel adders as the words return one cycle later, and
// writes the MV results to A in that cycle. Which bank each virtual memory
// sits in comes from cdl_phys_map.
//
// Two schedules follow from the bank binding. When every virtual memory has
// a bank of its own (NARR*MV <= MP, e.g. 8 banks), reads of iteration n and
// writes of iteration n-1 go to different banks and overlap: N1*N2/MV + 1
// memory cycles. When A and B of one suffix share a bank (e.g. 4 banks), the
// bank cannot read and write at once, so each iteration takes a read cycle
// and a write cycle: 2*N1*N2/MV memory cycles. The statements, the layout
// and the one-cycle memory latency are the reference's; the schedules are
// this design's, and MV must not exceed MP (all MV reads in one cycle).
//
// Interface: one-cycle start pulse, busy, one-cycle done pulse after the
// last write, mem_cycles = cycles of the last run in which a bank was used.
module cdl_kernel
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
  output logic [15:0]   mem_cycles,
  output mem_req_t      req   [MP],
  input  logic [DW-1:0] rdata [MP]
);

  localparam int unsigned MV     = U1 * U2;
  localparam int unsigned I1     = N1 / U1;
  localparam int unsigned I2     = N2 / U2;
  localparam bit          SHARED = (NARR * MV > MP);

  initial begin
    assert (MV <= MP)
      else $error("the unrolled body needs one bank per virtual memory of an array");
  end

  logic                 running;
  logic                 rd_left;    // reads still to issue
  logic [cnt_w(I1)-1:0] ii, wi;
  logic [cnt_w(I2)-1:0] jj, wj;
  logic                 wr_pend;    // a read was issued last cycle
  logic                 rd_now;

  logic [bank_w(MP)-1:0] rbank [MV];
  logic [AW-1:0]         raddr [MV];
  logic [bank_w(MP)-1:0] wbank [MV];
  logic [AW-1:0]         waddr [MV];

  for (genvar u = 0; u < int'(MV); u++) begin : g_vm
    localparam int S1 = u / int'(U2);
    localparam int S2 = u % int'(U2);
    cdl_phys_map #(.MP(MP), .N1(N1), .N2(N2), .U1(U1), .U2(U2)) u_rd (
      .arr(ARR_B), .sfx1(idx_t'(S1)), .sfx2(idx_t'(S2)),
      .v1(idx_t'(ii)), .v2(idx_t'(jj)), .bank(rbank[u]), .addr(raddr[u])
    );
    cdl_phys_map #(.MP(MP), .N1(N1), .N2(N2), .U1(U1), .U2(U2)) u_wr (
      .arr(ARR_A), .sfx1(idx_t'(S1)), .sfx2(idx_t'(S2)),
      .v1(idx_t'(wi)), .v2(idx_t'(wj)), .bank(wbank[u]), .addr(waddr[u])
    );
  end

  assign rd_now = running && rd_left && (!SHARED || !wr_pend);
  assign busy   = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      rd_left    <= 1'b0;
      ii         <= '0;
      jj         <= '0;
      wi         <= '0;
      wj         <= '0;
      wr_pend    <= 1'b0;
      done       <= 1'b0;
      mem_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running    <= 1'b1;
        rd_left    <= 1'b1;
        ii         <= '0;
        jj         <= '0;
        wr_pend    <= 1'b0;
        mem_cycles <= '0;
      end else if (running) begin
        if (rd_now || wr_pend) mem_cycles <= mem_cycles + 1'b1;
        wr_pend <= rd_now;
        if (rd_now) begin
          wi <= ii;
          wj <= jj;
          if (int'(jj) == I2 - 1) begin
            jj <= '0;
            if (int'(ii) == I1 - 1) rd_left <= 1'b0;
            else                    ii <= ii + 1'b1;
          end else begin
            jj <= jj + 1'b1;
          end
        end
        if (!rd_left && wr_pend) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int b = 0; b < int'(MP); b++) req[b] = REQ_IDLE;
    if (rd_now)
      for (int u = 0; u < int'(MV); u++)
        req[rbank[u]] = '{en: 1'b1, we: 1'b0, addr: raddr[u], wdata: '0};
    if (wr_pend)
      for (int u = 0; u < int'(MV); u++)
        req[wbank[u]] = '{en: 1'b1, we: 1'b1, addr: waddr[u],
                          wdata: rdata[rbank[u]] + DW'(1)};
  end

  // A bank serves one access per cycle: no two requests may meet in a bank.
  always_ff @(posedge clk) begin
    if (running) begin
      for (int u = 0; u < int'(MV); u++)
        for (int w = 0; w < int'(MV); w++) begin
          if (rd_now && u != w) assert (rbank[u] != rbank[w]) else $error("read bank conflict");
          if (wr_pend && u != w) assert (wbank[u] != wbank[w]) else $error("write bank conflict");
          if (rd_now && wr_pend) assert (rbank[u] != wbank[w]) else $error("read/write bank conflict");
        end
    end
  end

endmodule

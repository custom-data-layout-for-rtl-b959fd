// cdl_reorg: moves one array between the naive and the custom data layout.
//
// Distribute (gather = 0) reads the array element by element, row-major,
// from its naive copy in bank 0 (word NAIVE_BASE + arr*N1*N2 + i*N2 + j)
// and writes each element to the bank and address the custom layout gives
// it: the subscripts i and j are split by cdl_index_map with strides U1 and
// U2 into suffix and local index, and cdl_phys_map turns those into a bank
// and a word. Gather (gather = 1) does the inverse copy. The mapping between
// the two layouts is the layout's own; the engine around it is this
// design's choice and is kept simple: one element every two cycles, a read
// cycle and then a write cycle, so bank 0 may be both source and target.
//
// Interface: a one-cycle start pulse with gather and arr captured, busy
// while copying, a one-cycle done pulse after the last write. One request
// port per bank (req/rdata), with the one-cycle read latency of the SRAMs.
// Timing: 2*N1*N2 cycles from the cycle after start to done.
module cdl_reorg
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
  input  logic          gather,
  input  arr_e          arr,
  output logic          busy,
  output logic          done,
  output mem_req_t      req   [MP],
  input  logic [DW-1:0] rdata [MP]
);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR} state_e;

  state_e                   state;
  logic                     gather_q;
  arr_e                     arr_q;
  logic [cnt_w(N1)-1:0]     i;
  logic [cnt_w(N2)-1:0]     j;

  idx_t sfx1, sfx2, v1, v2;
  logic [bank_w(MP)-1:0] cbank;
  logic [AW-1:0]         caddr;
  logic [AW-1:0]         naddr;

  cdl_index_map #(.S(int'(U1))) u_map1 (.x(idx_t'(i)), .suffix(sfx1), .v(v1));
  cdl_index_map #(.S(int'(U2))) u_map2 (.x(idx_t'(j)), .suffix(sfx2), .v(v2));

  cdl_phys_map #(.MP(MP), .N1(N1), .N2(N2), .U1(U1), .U2(U2)) u_pmap (
    .arr(arr_q), .sfx1(sfx1), .sfx2(sfx2), .v1(v1), .v2(v2),
    .bank(cbank), .addr(caddr)
  );

  assign naddr = AW'(NAIVE_BASE + int'(arr_q) * N1 * N2 + int'(i) * N2 + int'(j));
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      gather_q <= 1'b0;
      arr_q    <= ARR_A;
      i        <= '0;
      j        <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          gather_q <= gather;
          arr_q    <= arr;
          i        <= '0;
          j        <= '0;
          state    <= S_RD;
        end
        S_RD: state <= S_WR;
        S_WR: begin
          if (int'(j) == N2 - 1) begin
            j <= '0;
            if (int'(i) == N1 - 1) begin
              i     <= '0;
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              i <= i + 1'b1;
              state <= S_RD;
            end
          end else begin
            j     <= j + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int b = 0; b < int'(MP); b++) req[b] = REQ_IDLE;
    if (state == S_RD) begin
      if (!gather_q) req[0] = '{en: 1'b1, we: 1'b0, addr: naddr, wdata: '0};
      else           req[cbank] = '{en: 1'b1, we: 1'b0, addr: caddr, wdata: '0};
    end else if (state == S_WR) begin
      if (!gather_q) req[cbank] = '{en: 1'b1, we: 1'b1, addr: caddr, wdata: rdata[0]};
      else           req[0] = '{en: 1'b1, we: 1'b1, addr: naddr, wdata: rdata[cbank]};
    end
  end

endmodule

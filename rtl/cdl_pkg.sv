// cdl_pkg: types and constants shared by the custom-data-layout design.
//
// The design runs the loop nest "A[i][j] = B[i][j] + 1" over two 32x16
// arrays of 32-bit integers, unrolled 2x2, on an FPGA fed by several
// independent external SRAM banks (8 by default). The array shape, the
// unroll factors, the element type (C int) and the bank count are the
// reference configuration; the SRAM word address width, the placement of
// the single-memory ("naive") copy of the arrays and the request format are
// choices of this design.
//
// Memory request format (one per bank, one per cycle): en starts an access,
// we selects a write, addr is the word address, wdata the write data. A read
// returns its word on the bank's rdata one clock later.
package cdl_pkg;

  // Element width: the arrays are C "int".
  parameter int unsigned DW = 32;
  // Word address width of one SRAM bank (4096 words).
  parameter int unsigned AW = 12;
  // Reference loop nest: int A[32][16], B[32][16]; unrolled 2x2.
  parameter int unsigned DEF_N1 = 32;
  parameter int unsigned DEF_N2 = 16;
  parameter int unsigned DEF_U1 = 2;
  parameter int unsigned DEF_U2 = 2;
  // Number of physical memories (external SRAM banks).
  parameter int unsigned DEF_MP = 8;
  // Arrays in the loop nest: A (written) and B (read).
  parameter int unsigned NARR = 2;
  // The naive layout (both arrays, row-major, A first) lives in bank 0
  // from this word address on; the custom layout uses the words below it.
  parameter int unsigned NAIVE_BASE = 2048;

  typedef logic signed [15:0] idx_t;

  typedef enum logic {
    ARR_A = 1'b0,
    ARR_B = 1'b1
  } arr_e;

  typedef struct packed {
    logic          en;
    logic          we;
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
  } mem_req_t;

  localparam mem_req_t REQ_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // Width of a bank number for n banks (at least one bit).
  function automatic int unsigned bank_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Width of a counter that runs 0..n-1 (at least one bit).
  function automatic int unsigned cnt_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Sequencing phases of the design.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,
    PH_DIST    = 2'd1,
    PH_COMPUTE = 2'd2,
    PH_GATHER  = 2'd3
  } phase_e;

endpackage

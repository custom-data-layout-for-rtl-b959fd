// cdl_phys_map: binds a virtual memory to a physical SRAM bank.
//
// After a U1 x U2 unroll each array is split into MV = U1*U2 virtual
// memories, named by the suffix pair (sfx1, sfx2); NARR arrays give NARR*MV
// virtual memories in all. If they number no more than the MP physical
// banks, every virtual memory gets a bank of its own: bank = arr*MV + sfx.
// Otherwise virtual memories of different arrays that carry the same suffix
// share a bank, because the read of B and the write of A for one suffix are
// ordered by the statement anyway: bank = sfx mod MP. Both rules are the
// layout's. Inside a bank, a virtual memory occupies a slot of VM_WORDS
// words (A in slot 0, B above it when they share), stored row-major by its
// local index (v1, v2); the slot arrangement is this design's choice.
//
// Interface: arr, sfx1, sfx2, v1, v2 in; bank and word address out.
// Purely combinational, no clock.
module cdl_phys_map
  import cdl_pkg::*;
#(
  parameter int unsigned MP = DEF_MP,
  parameter int unsigned N1 = DEF_N1,
  parameter int unsigned N2 = DEF_N2,
  parameter int unsigned U1 = DEF_U1,
  parameter int unsigned U2 = DEF_U2
) (
  input  arr_e                    arr,
  input  idx_t                    sfx1,
  input  idx_t                    sfx2,
  input  idx_t                    v1,
  input  idx_t                    v2,
  output logic [bank_w(MP)-1:0]   bank,
  output logic [AW-1:0]           addr
);

  localparam int unsigned MV       = U1 * U2;
  localparam int unsigned TOTAL_VM = NARR * MV;
  localparam int unsigned V2N      = N2 / U2;
  localparam int unsigned VM_WORDS = (N1 / U1) * V2N;
  // Virtual memories of one array that land in the same bank.
  localparam int unsigned PER_ARR  = (MV + MP - 1) / MP;
  localparam bit          SHARED   = (TOTAL_VM > MP);

  initial begin
    assert (N1 % U1 == 0 && N2 % U2 == 0)
      else $error("unroll factors must divide the array dimensions");
    assert (NARR * PER_ARR * VM_WORDS <= NAIVE_BASE)
      else $error("custom layout does not fit below the naive region");
  end

  int unsigned sfx_lin, slot, local_i;

  always_comb begin
    sfx_lin = int'(sfx1) * U2 + int'(sfx2);
    if (!SHARED) begin
      bank   = bank_w(MP)'(int'(arr) * MV + sfx_lin);
      slot   = 0;
    end else begin
      bank   = bank_w(MP)'(sfx_lin % MP);
      slot   = int'(arr) * PER_ARR + sfx_lin / MP;
    end
    local_i = int'(v1) * V2N + int'(v2);
    addr    = AW'(slot * VM_WORDS + local_i);
  end

endmodule

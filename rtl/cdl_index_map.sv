// cdl_index_map: maps one array subscript onto the custom data layout.
//
// For a partition whose common stride in this array dimension is S, the
// element at subscript x lives in the virtual memory with suffix
// "x mod S" and at index "floor(x / S)" inside it. The modulo is always
// non-negative, 0..|S|-1, also for a negative subscript: for x < 0 it equals
// (S-1) - ((-x-1) mod S). A negative stride is treated as its magnitude.
// A stride of 0 (a subscript that is constant in the loop nest) keeps the
// subscript as both suffix and index. These rules, and the use of the same
// mapping both to rename references and to reorganize data between the
// single-memory layout and the custom one, follow the layout algorithm;
// the stride being a compile-time parameter and the 16-bit signed index
// type are this design's choices.
//
// Interface: x in, suffix and v out. Purely combinational, no clock.
module cdl_index_map
  import cdl_pkg::*;
#(
  parameter int S = 2
) (
  input  idx_t x,
  output idx_t suffix,
  output idx_t v
);

  localparam int SABS = (S < 0) ? -S : S;
  // Divisor used for the arithmetic; never 0, the S == 0 case bypasses it.
  localparam int SDIV = (SABS == 0) ? 1 : SABS;

  idx_t q, r;

  always_comb begin
    if (SABS == 0) begin
      suffix = x;
      v      = x;
    end else begin
      // SystemVerilog division truncates toward zero; correct to floor.
      q = idx_t'(x / idx_t'(SDIV));
      r = idx_t'(x % idx_t'(SDIV));
      if (r < 0) begin
        r = r + idx_t'(SDIV);
        q = q - 1;
      end
      suffix = r;
      v      = q;
    end
  end

endmodule

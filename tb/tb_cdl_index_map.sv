// tb_cdl_index_map: checks the subscript-to-layout mapping for several strides.
//
// Sweeps the subscript over -40..40 for strides 1, 2, 3, -4 and 0 and
// compares suffix and local index with a reference found by search: the
// suffix is the one r in 0..|S|-1 for which |S| divides x - r, and the
// local index is (x - r) / |S|. For negative subscripts the suffix is also
// compared with the closed form (|S|-1) - ((-x-1) mod |S|).
module tb_cdl_index_map;
  import cdl_pkg::*;

  int checks = 0, failures = 0;

  idx_t x;
  idx_t s1_sfx, s1_v, s2_sfx, s2_v, s3_sfx, s3_v, sm4_sfx, sm4_v, s0_sfx, s0_v;

  cdl_index_map #(.S(1))  u_s1  (.x(x), .suffix(s1_sfx),  .v(s1_v));
  cdl_index_map #(.S(2))  u_s2  (.x(x), .suffix(s2_sfx),  .v(s2_v));
  cdl_index_map #(.S(3))  u_s3  (.x(x), .suffix(s3_sfx),  .v(s3_v));
  cdl_index_map #(.S(-4)) u_sm4 (.x(x), .suffix(sm4_sfx), .v(sm4_v));
  cdl_index_map #(.S(0))  u_s0  (.x(x), .suffix(s0_sfx),  .v(s0_v));

  task automatic check_one(input int s, input int xv, input int got_sfx, input int got_v);
    int sa, r, rv;
    sa = (s < 0) ? -s : s;
    if (sa == 0) begin
      r  = xv;
      rv = xv;
    end else begin
      r = -1;
      for (int c = 0; c < sa; c++) if ((xv - c) % sa == 0) r = c;
      rv = (xv - r) / sa;
      if (xv < 0) begin
        checks++;
        if (r != (sa - 1) - ((-xv - 1) % sa)) begin
          failures++;
          $display("FAIL closed form S=%0d x=%0d", s, xv);
        end
      end
    end
    checks++;
    if (got_sfx != r || got_v != rv) begin
      failures++;
      $display("FAIL S=%0d x=%0d: suffix %0d v %0d, expected %0d %0d", s, xv, got_sfx, got_v, r, rv);
    end
  endtask

  initial begin
    for (int xv = -40; xv <= 40; xv++) begin
      x = idx_t'(xv);
      #1;
      check_one(1,  xv, int'(s1_sfx),  int'(s1_v));
      check_one(2,  xv, int'(s2_sfx),  int'(s2_v));
      check_one(3,  xv, int'(s3_sfx),  int'(s3_v));
      check_one(-4, xv, int'(sm4_sfx), int'(sm4_v));
      check_one(0,  xv, int'(s0_sfx),  int'(s0_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

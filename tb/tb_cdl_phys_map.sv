// tb_cdl_phys_map: checks the virtual-to-physical bank binding.
//
// Three instances: 8 banks (each of the 8 virtual memories of A and B gets
// its own bank), 4 banks (A and B of one suffix share a bank, A below B) and
// 3 banks (more virtual memories of one array than banks). For every element
// of both 32x16 arrays under a 2x2 unroll the expected bank and word are
// worked out here from the element's subscripts for the 8- and 4-bank cases,
// and for all three cases no two elements may land on the same bank word.
module tb_cdl_phys_map;
  import cdl_pkg::*;

  int checks = 0, failures = 0;

  arr_e arr;
  idx_t sfx1, sfx2, v1, v2;
  logic [2:0] bank8;
  logic [1:0] bank4, bank3;
  logic [AW-1:0] addr8, addr4, addr3;

  cdl_phys_map #(.MP(8)) u_p8 (.arr, .sfx1, .sfx2, .v1, .v2, .bank(bank8), .addr(addr8));
  cdl_phys_map #(.MP(4)) u_p4 (.arr, .sfx1, .sfx2, .v1, .v2, .bank(bank4), .addr(addr4));
  cdl_phys_map #(.MP(3)) u_p3 (.arr, .sfx1, .sfx2, .v1, .v2, .bank(bank3), .addr(addr3));

  bit used8 [int];
  bit used4 [int];
  bit used3 [int];

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_new(input string what, input bit seen);
    checks++;
    if (seen) begin
      failures++;
      $display("FAIL %s: two elements on one bank word", what);
    end
  endtask

  initial begin
    for (int a = 0; a < 2; a++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 16; j++) begin
          arr  = arr_e'(a);
          sfx1 = idx_t'(i % 2);
          sfx2 = idx_t'(j % 2);
          v1   = idx_t'(i / 2);
          v2   = idx_t'(j / 2);
          #1;
          // 8 banks: A in banks 0..3, B in banks 4..7, one virtual memory each.
          expect_eq("bank8", int'(bank8), a * 4 + (i % 2) * 2 + (j % 2));
          expect_eq("addr8", int'(addr8), (i / 2) * 8 + (j / 2));
          // 4 banks: bank by suffix, A in words 0..127, B in words 128..255.
          expect_eq("bank4", int'(bank4), (i % 2) * 2 + (j % 2));
          expect_eq("addr4", int'(addr4), a * 128 + (i / 2) * 8 + (j / 2));
          expect_new("p8", used8.exists(int'(bank8) * 4096 + int'(addr8)));
          expect_new("p4", used4.exists(int'(bank4) * 4096 + int'(addr4)));
          expect_new("p3", used3.exists(int'(bank3) * 4096 + int'(addr3)));
          used8[int'(bank8) * 4096 + int'(addr8)] = 1'b1;
          used4[int'(bank4) * 4096 + int'(addr4)] = 1'b1;
          used3[int'(bank3) * 4096 + int'(addr3)] = 1'b1;
          checks++;
          if (int'(bank3) > 2) begin
            failures++;
            $display("FAIL bank3 out of range");
          end
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

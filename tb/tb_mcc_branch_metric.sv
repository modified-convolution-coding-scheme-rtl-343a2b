// tb_mcc_branch_metric: exhaustive test of the branch metric unit.
//
// For each of the four received pairs the four metrics must equal the number
// of differing bits against pairs 00, 01, 10 and 11, counted bit by bit here.
module tb_mcc_branch_metric;
  import mcc_pkg::*;

  pair_t   rx_pair;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  mcc_branch_metric dut (.rx_pair, .bm);

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx_pair = pair_t'(r);
      #1;
      for (int h = 0; h < 4; h++) begin
        int exp;
        exp = 0;
        if (((r >> 1) & 1) != ((h >> 1) & 1)) exp++;
        if ((r & 1) != (h & 1)) exp++;
        checks++;
        if (int'(bm[h]) != exp) begin
          failures++;
          $display("FAIL: rx %b hyp %b: got %0d exp %0d", rx_pair, 2'(h), bm[h], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_mcc_acs: exhaustive test of the two-state add-compare-select unit.
//
// All path metric pairs (0..7 each) and all branch metric vectors (0..2 each)
// are applied. The reference enumerates the four branches with the pair of
// each taken from the state table of the code (0->0: 00, 0->1: 01, 1->0: 11,
// 1->1: 10), keeps the minimum per state with ties going to predecessor 0, and
// subtracts the smaller result from both.
module tb_mcc_acs;
  import mcc_pkg::*;

  localparam int PM_W = 3;
  logic [1:0][PM_W-1:0] pm_in, pm_out;
  bm_vec_t              bm;
  logic [1:0]           decision;
  int checks = 0, failures = 0;

  mcc_acs #(.PM_W(PM_W)) dut (.pm_in, .bm, .pm_out, .decision);

  // code pair on branch from -> to, from the state table
  function automatic int table_pair(input int from, input int to);
    case ({from[0], to[0]})
      2'b00: return 0;  // 00
      2'b01: return 1;  // 01
      2'b10: return 3;  // 11
      default: return 2; // 10
    endcase
  endfunction

  initial begin
    for (int p0 = 0; p0 < 8; p0++)
    for (int p1 = 0; p1 < 8; p1++)
    for (int bv = 0; bv < 81; bv++) begin
      int b[4], best[2], dec[2], mn;
      int t;
      t = bv;
      for (int h = 0; h < 4; h++) begin b[h] = t % 3; t = t / 3; end
      pm_in[0] = PM_W'(p0);
      pm_in[1] = PM_W'(p1);
      for (int h = 0; h < 4; h++) bm[h] = bmetric_t'(b[h]);
      #1;
      for (int j = 0; j < 2; j++) begin
        int c0, c1;
        c0 = p0 + b[table_pair(0, j)];
        c1 = p1 + b[table_pair(1, j)];
        dec[j]  = (c1 < c0) ? 1 : 0;
        best[j] = (c1 < c0) ? c1 : c0;
      end
      mn = (best[0] < best[1]) ? best[0] : best[1];
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (int'(decision[j]) != dec[j] || int'(pm_out[j]) != best[j] - mn) begin
          failures++;
          if (failures < 10)
            $display("FAIL: pm=%0d,%0d bm=%0d%0d%0d%0d state %0d: got dec %0d pm %0d exp dec %0d pm %0d",
                     p0, p1, b[0], b[1], b[2], b[3], j, decision[j], pm_out[j], dec[j], best[j] - mn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

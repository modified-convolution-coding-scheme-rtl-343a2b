// mcc_acs: add-compare-select for the two-state trellis of the modified code.
//
// Every state j (0 or 1) can be reached from both states i; the branch i -> j
// carries the pair {i, i xor j}, because the next state is the data bit. For
// each j the unit adds the metric of that pair to the path metric of i,
// keeps the smaller sum and records the winning predecessor in decision[j]:
// one column of the decoder's distance matrix and its survivor choices.
//
// Equal sums choose predecessor 0, a fixed tie rule of this implementation.
// The new metrics are normalised by subtracting the smaller of the two. Since
// any state is one branch (metric at most 2) from the better state, the
// normalised metrics stay within 0..2, so a narrow PM_W suffices and no
// overflow can occur; normalising does not change which path wins. The
// normalisation is this implementation's choice in place of unbounded
// accumulated distances.
//
// Purely combinational; the decoder registers pm_out.
module mcc_acs
  import mcc_pkg::*;
#(
  parameter int unsigned PM_W = 3
) (
  input  logic [1:0][PM_W-1:0] pm_in,
  input  bm_vec_t              bm,
  output logic [1:0][PM_W-1:0] pm_out,
  output logic [1:0]           decision
);

  logic [1:0][PM_W:0] sum;   // one extra bit: pm_in may be the large start value

  always_comb begin
    for (int j = 0; j < 2; j++) begin
      logic [PM_W:0] s0, s1;
      s0 = (PM_W+1)'(pm_in[0]) + (PM_W+1)'(bm[branch_pair(1'b0, j[0])]);
      s1 = (PM_W+1)'(pm_in[1]) + (PM_W+1)'(bm[branch_pair(1'b1, j[0])]);
      decision[j] = (s1 < s0);
      sum[j]      = (s1 < s0) ? s1 : s0;
    end
    if (sum[0] <= sum[1]) begin
      pm_out[0] = '0;
      pm_out[1] = PM_W'(sum[1] - sum[0]);
    end else begin
      pm_out[0] = PM_W'(sum[0] - sum[1]);
      pm_out[1] = '0;
    end
  end

endmodule

// mcc_branch_metric: branch metrics of one received code pair.
//
// For the received hard-decision pair (y0, y1) it gives the distance to each
// of the four pairs the code can send, 00, 01, 10 and 11: one column of the
// decoder's metric matrix. The distance is the Hamming distance, 0 to 2, since
// the receiver delivers bits; taking Hamming distance for the "norm" is this
// implementation's reading for hard-decision input.
//
// Interface: rx_pair[1] = y0 (odd-placed bit), rx_pair[0] = y1 (even-placed
// bit); bm[h] is the distance to pair h. Purely combinational.
module mcc_branch_metric
  import mcc_pkg::*;
(
  input  pair_t   rx_pair,
  output bm_vec_t bm
);

  always_comb begin
    for (int h = 0; h < 4; h++) begin
      pair_t d;
      d     = rx_pair ^ pair_t'(h);
      bm[h] = bmetric_t'(d[1]) + bmetric_t'(d[0]);
    end
  end

endmodule

// mcc_pkg: types and helpers shared by the modified convolution codec.
//
// The code is rate 1/2 with a single state bit. A code pair is two bits,
// pair[1] being the bit sent first (the state bit, at the odd position of the
// code stream) and pair[0] the bit sent second (the modulo-2 sum of the state
// and the incoming bit). Branch metrics are Hamming distances between a
// received pair and one of the four possible pairs, so they fit in two bits.
package mcc_pkg;

  typedef logic [1:0] pair_t;     // {first bit, second bit}
  typedef logic [1:0] bmetric_t;  // Hamming distance 0..2
  typedef bmetric_t [3:0] bm_vec_t; // bm[h]: distance to hypothesis pair h

  // Code pair emitted on the trellis branch from state `from` to state `to`.
  // The next state equals the incoming bit, so the pair is {from, from ^ to}.
  function automatic pair_t branch_pair(input logic from, input logic to);
    return {from, from ^ to};
  endfunction

endpackage

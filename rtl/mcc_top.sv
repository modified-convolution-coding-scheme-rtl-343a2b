// mcc_top: modified convolution codec, transmit and receive sides.
//
// The transmit side is mcc_encoder: data bits in, code pairs out, blocks of
// BLOCK_BITS data bits followed by FLUSH flush pairs. The receive side is
// mcc_viterbi_decoder: received hard-decision pairs in, decoded data bits out.
// In a link the code pairs go through a modulator (QAM or PSK), the channel
// and a demodulator before they reach the decoder; those parts are outside
// this RTL, so the encoder output (code_*) and the decoder input (rx_*) are
// ports. Connecting code_* to rx_* gives a loopback codec.
//
// All streams use valid/ready; both sides run at one pair per clock. Both
// halves share BLOCK_BITS and FLUSH so their blocks match.
module mcc_top
  import mcc_pkg::*;
#(
  parameter int unsigned BLOCK_BITS = 1000,
  parameter int unsigned FLUSH      = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // data to encode
  input  logic  tx_valid,
  output logic  tx_ready,
  input  logic  tx_bit,
  // code pairs towards the modulator
  output logic  code_valid,
  input  logic  code_ready,
  output pair_t code_pair,
  output logic  code_last,
  // received pairs from the demodulator
  input  logic  rx_valid,
  output logic  rx_ready,
  input  pair_t rx_pair,
  // decoded data
  output logic  dec_valid,
  input  logic  dec_ready,
  output logic  dec_bit,
  output logic  dec_last
);

  mcc_encoder #(.BLOCK_BITS(BLOCK_BITS), .FLUSH(FLUSH)) u_enc (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_bit(tx_bit),
    .out_valid(code_valid), .out_ready(code_ready),
    .out_pair(code_pair), .out_last(code_last)
  );

  mcc_viterbi_decoder #(.BLOCK_BITS(BLOCK_BITS), .FLUSH(FLUSH)) u_dec (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_pair(rx_pair),
    .out_valid(dec_valid), .out_ready(dec_ready),
    .out_bit(dec_bit), .out_last(dec_last)
  );

endmodule

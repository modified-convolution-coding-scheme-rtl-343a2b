// mcc_viterbi_decoder: hard-decision Viterbi decoder of the modified code.
//
// The decoder takes the BLOCK_BITS + FLUSH received pairs of one block, one
// per clock, and returns the BLOCK_BITS data bits of the most likely path
// through the two-state trellis. Per pair, mcc_branch_metric gives the
// Hamming distance to each of the four possible pairs (the metric matrix
// column), mcc_acs updates the two path metrics and picks the survivor of
// each state (the distance matrix column), and mcc_traceback stores the
// decisions. After the last pair the state with the smaller path metric is
// chosen and traced back; the decoded bits then leave in order. The trellis
// starts in state 0, as the encoder does: state 1 starts with a metric no
// path from state 0 can exceed.
//
// Timing: in_ready is high while a block is received; for T = BLOCK_BITS +
// FLUSH pairs the block takes T clocks in (at full rate), T clocks of
// traceback and BLOCK_BITS clocks out; the first decoded bit is valid T clocks
// after the last pair is taken. Blocks are not overlapped. Handshakes, reset
// and the fixed block length taken from the parameters are this
// implementation's choices.
module mcc_viterbi_decoder
  import mcc_pkg::*;
#(
  parameter int unsigned BLOCK_BITS = 1000,
  parameter int unsigned FLUSH      = 2,
  parameter int unsigned PM_W       = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  pair_t in_pair,
  output logic  out_valid,
  input  logic  out_ready,
  output logic  out_bit,
  output logic  out_last
);

  localparam int unsigned TOTAL = BLOCK_BITS + FLUSH;
  localparam int unsigned CW    = $clog2(TOTAL + 1);
  localparam logic [1:0][PM_W-1:0] PM_INIT = {{PM_W{1'b1}}, {PM_W{1'b0}}};

  logic [1:0][PM_W-1:0] pm_q, pm_d;
  logic [CW-1:0]        cnt_q;
  bm_vec_t              bm;
  logic [1:0]           decision;
  logic                 busy, fire, last, final_state;

  mcc_branch_metric u_bm (.rx_pair(in_pair), .bm(bm));

  mcc_acs #(.PM_W(PM_W)) u_acs (
    .pm_in(pm_q), .bm(bm), .pm_out(pm_d), .decision(decision)
  );

  assign in_ready    = ~busy;
  assign fire        = in_valid & in_ready;
  assign last        = (cnt_q == CW'(TOTAL - 1));
  assign final_state = (pm_d[1] < pm_d[0]);  // compare the last column

  mcc_traceback #(.BLOCK_BITS(BLOCK_BITS), .FLUSH(FLUSH)) u_tb (
    .clk, .rst_n,
    .dec_we(fire), .decision(decision), .final_state(final_state),
    .start_tb(fire & last), .busy(busy),
    .out_valid, .out_ready, .out_bit, .out_last
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pm_q  <= PM_INIT;
      cnt_q <= '0;
    end else if (fire) begin
      if (last) begin
        pm_q  <= PM_INIT;
        cnt_q <= '0;
      end else begin
        pm_q  <= pm_d;
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

endmodule

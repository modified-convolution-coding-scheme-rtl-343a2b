// mcc_encoder: rate-1/2 modified convolution encoder with one memory bit.
//
// The encoder holds one state bit s, the previous data bit (0 at the start of
// every block). For a data bit b it sends the pair (s, s xor b): the first
// code bit repeats the previous data bit and the second is the modulo-2 sum of
// the previous and the current bit; then s takes b. This is the state table of
// the code (0/0 -> 00, 0/1 -> 01, 1/0 -> 11, 1/1 -> 10, state = bit), so the
// data bit 1 has the impulse response 01 11 00 and the bits 1010 encode to
// 01 11 01 11 00 00.
//
// Framing: after BLOCK_BITS data bits the encoder itself inserts FLUSH pairs
// with a zero data bit, which carry the last data bit out and return the state
// to 0; out_last marks the final flush pair. A block is therefore
// BLOCK_BITS + FLUSH pairs long. The defaults (1000 bits per block, two flush
// pairs) are the coding scheme's own; the valid/ready handshake and the
// synchronous active-low reset are choices of this implementation.
//
// Timing: the pair is formed combinationally from the state and in_bit, so a
// data bit is taken and its pair offered in the same cycle (in_ready follows
// out_ready); one pair per clock at full rate. in_ready is low while flush
// pairs are sent.
module mcc_encoder
  import mcc_pkg::*;
#(
  parameter int unsigned BLOCK_BITS = 1000,
  parameter int unsigned FLUSH      = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  logic  in_bit,
  output logic  out_valid,
  input  logic  out_ready,
  output pair_t out_pair,
  output logic  out_last
);

  localparam int unsigned TOTAL = BLOCK_BITS + FLUSH;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic          state_q;   // previous data bit (first register of the encoder)
  logic [CW-1:0] cnt_q;     // pair index within the block
  logic          in_flush;
  logic          cur_bit;   // second register: the incoming bit
  logic          fire;

  assign in_flush  = (cnt_q >= CW'(BLOCK_BITS));
  assign cur_bit   = in_flush ? 1'b0 : in_bit;
  assign out_valid = in_flush | in_valid;
  assign in_ready  = ~in_flush & out_ready;
  assign out_pair  = {state_q, state_q ^ cur_bit};  // modulo-2 adder
  assign out_last  = (cnt_q == CW'(TOTAL - 1));
  assign fire      = out_valid & out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= 1'b0;
      cnt_q   <= '0;
    end else if (fire) begin
      if (out_last) begin
        state_q <= 1'b0;
        cnt_q   <= '0;
      end else begin
        state_q <= cur_bit;
        cnt_q   <= cnt_q + 1'b1;
      end
    end
  end

  initial begin
    assert (FLUSH >= 1)
      else $error("mcc_encoder: FLUSH must be at least 1 to carry the last data bit");
  end

endmodule

// mcc_traceback: survivor memory and block traceback of the Viterbi decoder.
//
// While a block is received, each clock with dec_we stores one decision
// column (decision[j] = predecessor of state j) at the next address. With the
// last column, start_tb brings the state with the smaller final path metric
// (final_state). The unit then walks the survivor path backwards, one trellis
// step per clock: at step t it knows the state s_t, writes it as decoded bit
// t-1 when t-1 is a data position (the state after a pair is the data bit of
// that pair; the FLUSH trailing states are dropped) and moves to the
// predecessor decision[t-1][s_t]. Afterwards the BLOCK_BITS decoded bits are
// read out in order over a valid/ready port, out_last on the final one.
//
// Timing: with T = BLOCK_BITS + FLUSH, the traceback takes T clocks after
// start_tb, then one bit leaves per clock while out_ready is high. busy is
// high from the clock after start_tb until the last bit has left; the decoder
// holds off new input meanwhile. Tracing the whole block at once, the memory
// layout and the readout buffer are this implementation's choices.
module mcc_traceback #(
  parameter int unsigned BLOCK_BITS = 1000,
  parameter int unsigned FLUSH      = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dec_we,
  input  logic [1:0] decision,
  input  logic       final_state,
  input  logic       start_tb,
  output logic       busy,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic       out_last
);

  localparam int unsigned TOTAL = BLOCK_BITS + FLUSH;
  localparam int unsigned AW    = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {IDLE, TRACE, EMIT} phase_e;

  logic [1:0]  surv_mem [TOTAL];       // decision columns of one block
  logic        bit_mem  [BLOCK_BITS];  // decoded bits, written backwards
  logic [AW-1:0] wr_q;                 // next survivor address
  logic [AW-1:0] t_q;                  // traceback time / readout index
  logic          s_q;                  // state on the traced path at time t_q
  phase_e        phase_q;
  logic [1:0]    col;

  assign busy      = (phase_q != IDLE);
  assign out_valid = (phase_q == EMIT);
  assign out_bit   = bit_mem[t_q];
  assign out_last  = (phase_q == EMIT) && (t_q == AW'(BLOCK_BITS - 1));
  assign col       = surv_mem[t_q - 1'b1];

  always_ff @(posedge clk) begin
    if (dec_we) surv_mem[wr_q] <= decision;
    if (phase_q == TRACE && (t_q - 1'b1) < AW'(BLOCK_BITS))
      bit_mem[t_q - 1'b1] <= s_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_q    <= '0;
      t_q     <= '0;
      s_q     <= 1'b0;
      phase_q <= IDLE;
    end else begin
      if (dec_we) wr_q <= start_tb ? '0 : wr_q + 1'b1;
      unique case (phase_q)
        IDLE: if (start_tb) begin
          phase_q <= TRACE;
          t_q     <= AW'(TOTAL);
          s_q     <= final_state;
        end
        TRACE: begin
          s_q <= col[s_q];
          if (t_q == AW'(1)) begin
            phase_q <= EMIT;
            t_q     <= '0;
          end else begin
            t_q <= t_q - 1'b1;
          end
        end
        EMIT: if (out_ready) begin
          if (out_last) phase_q <= IDLE;
          else          t_q     <= t_q + 1'b1;
        end
        default: phase_q <= IDLE;
      endcase
    end
  end

  // A new block must not start while the previous one is traced back.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !dec_we)
    else $error("mcc_traceback: decision written while busy");

endmodule

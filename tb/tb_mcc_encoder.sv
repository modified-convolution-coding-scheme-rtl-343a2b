// tb_mcc_encoder: self-checking test of the modified convolution encoder.
//
// Instance A (4-bit blocks) encodes the worked example 1010 at full rate and
// must send 01 11 01 11 00 00 in exactly six clocks, out_last on the sixth
// pair. Instance B (16-bit blocks) encodes random data for several blocks
// under random valid and ready; every pair is compared with the pair built
// directly from the definition (previous bit, previous xor current), flush
// pairs carry a zero data bit and the state restarts at 0 each block.
module tb_mcc_encoder;
  import mcc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- instance A: worked example ----------------
  logic  a_in_valid, a_in_ready, a_in_bit, a_out_valid, a_out_last;
  pair_t a_out_pair;

  mcc_encoder #(.BLOCK_BITS(4), .FLUSH(2)) dut_a (
    .clk, .rst_n,
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_bit(a_in_bit),
    .out_valid(a_out_valid), .out_ready(1'b1),
    .out_pair(a_out_pair), .out_last(a_out_last)
  );

  // ---------------- instance B: random blocks ----------------
  localparam int NB = 16;
  localparam int FB = 2;
  localparam int BLOCKS = 6;
  logic  b_in_valid, b_in_ready, b_in_bit, b_out_valid, b_out_ready, b_out_last;
  pair_t b_out_pair;

  mcc_encoder #(.BLOCK_BITS(NB), .FLUSH(FB)) dut_b (
    .clk, .rst_n,
    .in_valid(b_in_valid), .in_ready(b_in_ready), .in_bit(b_in_bit),
    .out_valid(b_out_valid), .out_ready(b_out_ready),
    .out_pair(b_out_pair), .out_last(b_out_last)
  );

  bit data [BLOCKS][NB];

  initial begin
    for (int b = 0; b < BLOCKS; b++)
      for (int i = 0; i < NB; i++) data[b][i] = 1'($urandom);
  end

  // expected pair k of a block: first bit = data bit k-1, second = d[k-1]^d[k]
  function automatic pair_t ref_pair(input int b, input int k);
    bit prev, cur;
    prev = (k >= 1 && k - 1 < NB) ? data[b][k-1] : 1'b0;
    cur  = (k < NB) ? data[b][k] : 1'b0;
    return {prev, prev ^ cur};
  endfunction

  // source for B: offer bits in order with random valid
  int src_b = 0, src_i = 0;
  always_ff @(posedge clk) begin
    if (rst_n && b_in_valid && b_in_ready) begin
      if (src_i == NB - 1) begin src_i <= 0; src_b <= src_b + 1; end
      else src_i <= src_i + 1;
    end
  end
  always_comb b_in_bit = (src_b < BLOCKS) ? data[src_b][src_i] : 1'b0;

  // sink for B: check every accepted pair
  int snk_b = 0, snk_k = 0;
  always @(posedge clk) begin
    if (rst_n && b_out_valid && b_out_ready) begin
      check(b_out_pair == ref_pair(snk_b, snk_k),
            $sformatf("B block %0d pair %0d: got %b exp %b", snk_b, snk_k, b_out_pair, ref_pair(snk_b, snk_k)));
      check(b_out_last == (snk_k == NB + FB - 1),
            $sformatf("B block %0d pair %0d: out_last=%b", snk_b, snk_k, b_out_last));
      if (snk_k == NB + FB - 1) begin snk_k <= 0; snk_b <= snk_b + 1; end
      else snk_k <= snk_k + 1;
    end
  end

  always @(negedge clk) begin
    b_in_valid  <= (src_b < BLOCKS) && ($urandom_range(0, 3) != 0);
    b_out_ready <= ($urandom_range(0, 3) != 0);
  end

  // ---------------- sequence A ----------------
  localparam bit [3:0]  EX_IN  = 4'b1010;            // sent first bit first
  localparam bit [11:0] EX_OUT = 12'b01_11_01_11_00_00;

  initial begin
    pair_t got [6];
    int n, cycles;
    a_in_valid = 1'b0;
    a_in_bit   = 1'b0;
    b_in_valid = 1'b0;
    b_out_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    n = 0; cycles = 0;
    while (n < 6) begin
      a_in_valid = (n < 4);
      a_in_bit   = (n < 4) ? EX_IN[3-n] : 1'b0;
      #1;
      check(a_out_valid, "A: out_valid at full rate");
      check(a_in_ready == (n < 4), $sformatf("A: in_ready at pair %0d", n));
      got[n] = a_out_pair;
      check(a_out_last == (n == 5), $sformatf("A: out_last at pair %0d", n));
      @(negedge clk);
      n++; cycles++;
    end
    a_in_valid = 1'b0;
    #1;
    for (int k = 0; k < 6; k++)
      check(got[k] == EX_OUT[11-2*k -: 2],
            $sformatf("A: example pair %0d got %b exp %b", k, got[k], EX_OUT[11-2*k -: 2]));
    check(cycles == 6, "A: block of 4 bits takes 6 clocks");
    // after the block the state is back at 0: bit 0 gives pair 00
    check(a_out_pair == 2'b00 && a_in_ready, "A: state back at 0 after flush");

    wait (snk_b == BLOCKS);
    check(1'b1, "B: all blocks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

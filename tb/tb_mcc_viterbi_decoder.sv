// tb_mcc_viterbi_decoder: self-checking test of the Viterbi decoder.
//
// Random data blocks are encoded here from the code's definition (pair k =
// (d[k-1], d[k-1] xor d[k]), zero before the block and in the flush) and sent
// through a bit-flip channel. Block classes: error free, one error per block,
// isolated single errors six pairs apart, and random errors at a high rate.
// Every decoded bit is compared with a reference Viterbi search written here
// with unbounded integer distances (tie to predecessor 0, final state 1 only
// if strictly better); for the first three classes the decoded bits must also
// equal the data. The test checks the rate (one pair per clock with in_ready
// high throughout a block), that in_ready drops during traceback, and the
// latency (first bit valid BLOCK_BITS + FLUSH clocks after the last pair).
module tb_mcc_viterbi_decoder;

  localparam int NB = 40;
  localparam int FB = 2;
  localparam int T  = NB + FB;
  localparam int BLOCKS = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_ready, out_bit, out_last;
  logic [1:0] in_pair;
  int checks = 0, failures = 0;

  mcc_viterbi_decoder #(.BLOCK_BITS(NB), .FLUSH(FB)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_pair,
    .out_valid, .out_ready, .out_bit, .out_last
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  typedef bit [1:0] rpair_t;

  // Reference: exhaustive two-state Viterbi with integer distances.
  function automatic void ref_decode(input rpair_t rx [T], output bit dec [NB]);
    int pm [2], npm [2];
    bit pred [T][2];
    bit s;
    pm[0] = 0; pm[1] = 1 << 20;            // start in state 0
    for (int k = 0; k < T; k++) begin
      for (int j = 0; j < 2; j++) begin
        int c [2];
        for (int i = 0; i < 2; i++) begin
          bit [1:0] sent;
          sent = {i[0], i[0] ^ j[0]};       // first bit = old state, second = old xor new
          c[i] = pm[i] + $countones(sent ^ rx[k]);
        end
        pred[k][j] = (c[1] < c[0]);
        npm[j]     = (c[1] < c[0]) ? c[1] : c[0];
      end
      pm = npm;
    end
    s = (pm[1] < pm[0]);
    for (int k = T - 1; k >= 0; k--) begin
      if (k < NB) dec[k] = s;
      s = pred[k][s];
    end
  endfunction

  int n_corrected = 0;

  initial begin
    bit     data [NB];
    rpair_t tx [T], rx [T];
    bit     exp_dec [NB];
    int     cls, nerr, got, lat, pos, bitn;
    bit     prev, cur;
    in_valid = 0; in_pair = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int b = 0; b < BLOCKS; b++) begin
      cls = b % 4;
      for (int i = 0; i < NB; i++) data[i] = 1'($urandom);
      for (int k = 0; k < T; k++) begin
        prev = (k >= 1 && k - 1 < NB) ? data[k-1] : 1'b0;
        cur  = (k < NB) ? data[k] : 1'b0;
        tx[k] = {prev, prev ^ cur};
        rx[k] = tx[k];
      end
      nerr = 0;
      case (cls)
        1: begin
             pos = $urandom_range(0, T-1); bitn = $urandom_range(0, 1);
             rx[pos][bitn] ^= 1'b1; nerr = 1;
           end
        2: for (int k = $urandom_range(0, 5); k < T; k += 6) begin
             bitn = $urandom_range(0, 1);
             rx[k][bitn] ^= 1'b1; nerr++;
           end
        3: for (int k = 0; k < T; k++)
             for (int q = 0; q < 2; q++)
               if ($urandom_range(0, 9) == 0) begin rx[k][q] ^= 1'b1; nerr++; end
        default: ;
      endcase
      ref_decode(rx, exp_dec);
      // send the block at full rate
      for (int k = 0; k < T; k++) begin
        in_valid = 1; in_pair = rx[k];
        #1;
        check(in_ready, $sformatf("block %0d: in_ready at pair %0d", b, k));
        @(negedge clk);
      end
      in_valid = 0;
      lat = 0;
      #1;
      while (!out_valid) begin
        check(!in_ready, "in_ready low during traceback");
        @(negedge clk);
        lat++;
      end
      check(lat == T, $sformatf("latency %0d, expected %0d", lat, T));
      got = 0;
      while (got < NB) begin
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (out_ready && out_valid) begin
          check(out_bit == exp_dec[got], $sformatf("block %0d bit %0d: got %b ref %b", b, got, out_bit, exp_dec[got]));
          if (cls != 3)
            check(out_bit == data[got], $sformatf("block %0d (class %0d) bit %0d not corrected", b, cls, got));
          check(out_last == (got == NB - 1), "out_last");
          got++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      #1;
      check(in_ready, "in_ready back after readout");
      if (nerr > 0) n_corrected += (exp_dec == data) ? 1 : 0;
    end
    $display("blocks with channel errors fully corrected: %0d", n_corrected);
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

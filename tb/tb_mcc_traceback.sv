// tb_mcc_traceback: test of the survivor memory and traceback unit.
//
// Random decision columns are written for several blocks with a random final
// state. The reference follows the decisions backwards from the final state
// and takes the state after each of the first BLOCK_BITS steps as the decoded
// bit. The test also checks the traceback time (first bit valid exactly
// BLOCK_BITS + FLUSH clocks after start_tb), busy, out_last and that bits are
// held while out_ready is low.
module tb_mcc_traceback;

  localparam int NB = 12;
  localparam int FB = 2;
  localparam int T  = NB + FB;
  localparam int BLOCKS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       dec_we, final_state, start_tb, busy;
  logic [1:0] decision;
  logic       out_valid, out_ready, out_bit, out_last;
  int checks = 0, failures = 0;

  mcc_traceback #(.BLOCK_BITS(NB), .FLUSH(FB)) dut (
    .clk, .rst_n, .dec_we, .decision, .final_state, .start_tb, .busy,
    .out_valid, .out_ready, .out_bit, .out_last
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [1:0] cols [T];
    bit exp_bits [NB];
    bit fs, s;
    int lat, got;
    dec_we = 0; decision = 0; final_state = 0; start_tb = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < BLOCKS; b++) begin
      for (int t = 0; t < T; t++) cols[t] = 2'($urandom);
      fs = 1'($urandom);
      // reference path
      s = fs;
      for (int t = T; t >= 1; t--) begin
        if (t - 1 < NB) exp_bits[t-1] = s;
        s = cols[t-1][s];
      end
      @(negedge clk);
      check(!busy, "idle before block");
      for (int t = 0; t < T; t++) begin
        dec_we = 1; decision = cols[t];
        start_tb = (t == T - 1); final_state = fs;
        @(negedge clk);
        if (b % 2 == 1 && t < T - 1) begin  // gaps between columns
          dec_we = 0; start_tb = 0;
          @(negedge clk);
        end
      end
      dec_we = 0; start_tb = 0;
      lat = 0;  // clock edges since the edge that took start_tb
      while (!out_valid) begin
        check(busy, "busy during traceback");
        @(negedge clk);
        lat++;
      end
      check(lat == T, $sformatf("traceback time %0d, expected %0d", lat, T));
      got = 0;
      while (got < NB) begin
        out_ready = ($urandom_range(0, 2) != 0) || (b == 0);
        #1;
        check(out_valid && busy, "valid during readout");
        if (out_ready) begin
          check(out_bit == exp_bits[got], $sformatf("block %0d bit %0d got %b exp %b", b, got, out_bit, exp_bits[got]));
          check(out_last == (got == NB - 1), $sformatf("block %0d bit %0d out_last", b, got));
          got++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      #1;
      check(!out_valid && !busy, "idle after block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

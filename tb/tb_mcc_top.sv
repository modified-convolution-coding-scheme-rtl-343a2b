// tb_mcc_top: end-to-end test of the codec at its default size.
//
// The top runs with its default parameters (1000 data bits per block, two
// flush pairs). 100 blocks, 100000 random data bits in all, are encoded; the
// code pairs pass a bit-flip channel model in this testbench and return to
// the decoder. Every code pair is compared with the pair built from the
// code's definition, and every decoded bit with a reference Viterbi search
// written here; blocks that are error free or carry only isolated single
// errors must decode to the original data.
//
// Channel classes, by block number modulo 5: 0 error free, 1 isolated single
// errors every 7 pairs, 2 random errors (1 in 20 bits), 3 both bits of one
// pair flipped (the double error the code is meant to handle), 4 random errors
// (1 in 6 bits). All four ports see random stalls. The test counts how often
// each mechanism happened (flush pairs, encoder input held during flush or
// output stall, decoder input held during traceback, decoded output stalled,
// corrected single errors, injected double errors) and fails if one never did.
module tb_mcc_top;
  import mcc_pkg::*;

  localparam int NB = 1000;       // defaults of mcc_top
  localparam int FB = 2;
  localparam int T  = NB + FB;
  localparam int BLOCKS = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  tx_valid, tx_ready, tx_bit;
  logic  code_valid, code_ready, code_last;
  pair_t code_pair;
  logic  rx_valid, rx_ready;
  pair_t rx_pair;
  logic  dec_valid, dec_ready, dec_bit, dec_last;

  mcc_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  typedef bit [1:0] rpair_t;

  // Reference: two-state Viterbi with integer distances, tie to predecessor 0.
  function automatic void ref_decode(input rpair_t rx [T], output bit dec [NB]);
    int pm [2], npm [2];
    bit pred [T][2];
    bit s;
    pm[0] = 0; pm[1] = 1 << 20;
    for (int k = 0; k < T; k++) begin
      for (int j = 0; j < 2; j++) begin
        int c [2];
        for (int i = 0; i < 2; i++) begin
          bit [1:0] sent;
          sent = {i[0], i[0] ^ j[0]};
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

  bit data [BLOCKS][NB];
  initial
    for (int b = 0; b < BLOCKS; b++)
      for (int i = 0; i < NB; i++) data[b][i] = 1'($urandom);

  // mechanism counters
  int n_flush = 0, n_tx_hold = 0, n_rx_hold = 0, n_dec_stall = 0;
  int n_single_fixed = 0, n_double = 0, n_double_fixed = 0, n_err_blocks_fixed = 0;
  int n_tx_blocks = 0, n_rx_blocks = 0;

  // ---------------- data source ----------------
  int src_b = 0, src_i = 0;
  always @(negedge clk) begin
    tx_valid <= rst_n && (src_b < BLOCKS) && ($urandom_range(0, 7) != 0);
    tx_bit   <= (src_b < BLOCKS) ? data[src_b][src_i] : 1'b0;
  end
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    if (src_i == NB - 1) begin src_i = 0; src_b++; end
    else src_i++;
  end

  // ---------------- encoder output, channel ----------------
  rpair_t blk [T];
  int     cap_k = 0;
  rpair_t rx_q [$];
  bit     ref_q [$];
  bit     must_match_q [$];

  always @(negedge clk) code_ready <= ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n && code_valid && code_ready) begin
    bit prev, cur;
    int b;
    b = n_tx_blocks;
    prev = (cap_k >= 1 && cap_k - 1 < NB) ? data[b][cap_k-1] : 1'b0;
    cur  = (cap_k < NB) ? data[b][cap_k] : 1'b0;
    check(code_pair == {prev, prev ^ cur}, $sformatf("block %0d code pair %0d", b, cap_k));
    check(code_last == (cap_k == T - 1), $sformatf("block %0d code_last at %0d", b, cap_k));
    if (cap_k >= NB) n_flush++;
    blk[cap_k] = code_pair;
    if (cap_k == T - 1) begin
      bit dec [NB];
      bit clean;
      int cls, nerr, pos, bitn;
      cls = b % 5; nerr = 0;
      case (cls)
        1: for (int k = $urandom_range(0, 6); k < T; k += 7) begin
             bitn = $urandom_range(0, 1);
             blk[k][bitn] ^= 1'b1; nerr++;
           end
        2, 4: for (int k = 0; k < T; k++)
             for (int q = 0; q < 2; q++)
               if ($urandom_range(0, (cls == 2) ? 19 : 5) == 0) begin blk[k][q] ^= 1'b1; nerr++; end
        3: begin pos = $urandom_range(1, T-1); blk[pos] ^= 2'b11; nerr = 2; n_double++; end
        default: ;
      endcase
      ref_decode(blk, dec);
      clean = 1'b1;
      for (int i = 0; i < NB; i++) if (dec[i] != data[b][i]) clean = 1'b0;
      if (cls == 1 && clean) n_single_fixed++;
      if (cls == 3 && clean) n_double_fixed++;
      if (nerr > 0 && clean) n_err_blocks_fixed++;
      for (int k = 0; k < T; k++) rx_q.push_back(blk[k]);
      for (int i = 0; i < NB; i++) begin
        ref_q.push_back(dec[i]);
        must_match_q.push_back(cls <= 1);
      end
      n_tx_blocks++;
      cap_k = 0;
    end else begin
      cap_k++;
    end
  end

  // ---------------- decoder input ----------------
  always @(negedge clk) begin
    rx_valid <= rst_n && (rx_q.size() > 0) && ($urandom_range(0, 9) != 0);
    rx_pair  <= (rx_q.size() > 0) ? rx_q[0] : 2'b00;
    dec_ready <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && rx_ready) void'(rx_q.pop_front());
    if (rx_valid && !rx_ready) n_rx_hold++;
    if (tx_valid && !tx_ready) n_tx_hold++;
    if (dec_valid && !dec_ready) n_dec_stall++;
  end

  // ---------------- decoded output ----------------
  int out_i = 0;
  always @(posedge clk) if (rst_n && dec_valid && dec_ready) begin
    bit r, mm;
    r  = ref_q.pop_front();
    mm = must_match_q.pop_front();
    check(dec_bit == r, $sformatf("block %0d bit %0d: got %b ref %b", n_rx_blocks, out_i, dec_bit, r));
    if (mm) check(dec_bit == data[n_rx_blocks][out_i],
                  $sformatf("block %0d bit %0d: not corrected", n_rx_blocks, out_i));
    check(dec_last == (out_i == NB - 1), "dec_last");
    if (out_i == NB - 1) begin out_i = 0; n_rx_blocks++; end
    else out_i++;
  end

  task automatic mech(input string name, input int n);
    $display("mechanism %-34s %0d", name, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism %s never happened", name);
    end
  endtask

  initial begin
    tx_valid = 0; rx_valid = 0; code_ready = 0; dec_ready = 0; tx_bit = 0; rx_pair = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n_rx_blocks == BLOCKS);
    @(posedge clk);
    check(rx_q.size() == 0 && ref_q.size() == 0, "all pairs and bits consumed");
    mech("flush pairs sent", n_flush);
    mech("encoder input held", n_tx_hold);
    mech("decoder input held (traceback)", n_rx_hold);
    mech("decoded output stalled", n_dec_stall);
    mech("blocks of single errors corrected", n_single_fixed);
    mech("blocks with errors fully corrected", n_err_blocks_fixed);
    mech("double errors in one pair injected", n_double);
    $display("double errors in one pair corrected: %0d of %0d", n_double_fixed, n_double);
    check(n_flush == BLOCKS * FB, "flush count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

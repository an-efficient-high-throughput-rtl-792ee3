// tb_bch_ed: self-checking test of one encoder-decoder channel at its default
// size, BCH(15,7) with double-error correction.
// First the words 7f, 79, 4f, 4c are sent with the error pattern
// 000100100000000 (two data bits flipped), then random words with random
// patterns of weight 0..2, some one at a time, some with start held high so
// that words follow every 15 clocks. Checked: every output word equals its
// input word, n_corrected equals the errors on data bits, dout_valid comes
// 25 clocks after the start was taken, and back-to-back words leave 15
// clocks apart.
module tb_bch_ed;
  import bch_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, ready, dout_valid;
  logic [6:0]  din = '0, dout;
  logic [14:0] err_pat = '0;
  logic [3:0]  n_corrected;
  int checks = 0, failures = 0, cyc = 0, last_out = -1, b2b_gaps = 0;

  typedef struct { int data; int ncorr; int t0; } word_t;
  word_t q[$];

  bch_ed dut (.clk, .rst, .start, .ready, .din, .err_pat, .dout, .dout_valid, .n_corrected);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // note a word when the channel takes it
  always @(posedge clk) if (!rst && start && ready)
    q.push_back('{int'(din), popcount15(int'(err_pat) >> 8), cyc});

  always @(negedge clk) if (!rst && dout_valid) begin
    checks += 3;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected word %h", dout);
    end else begin
      if (int'(dout) != q[0].data) begin
        failures++;
        $display("FAIL word %h decoded %h", q[0].data, dout);
      end
      if (int'(n_corrected) != q[0].ncorr) begin
        failures++;
        $display("FAIL word %h corrected %0d expected %0d", q[0].data, n_corrected, q[0].ncorr);
      end
      if (cyc - q[0].t0 != 25) begin
        failures++;
        $display("FAIL latency %0d", cyc - q[0].t0);
      end
      void'(q.pop_front());
    end
    if (last_out >= 0 && cyc - last_out == 15) b2b_gaps++;
    last_out = cyc;
  end

  task automatic send(input logic [6:0] d, input logic [14:0] e);
    din = d;
    err_pat = e;
    start = 1;
    @(negedge clk);
    while (!ready) @(negedge clk);   // wait until it is taken
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    logic [6:0] fig[4] = '{7'h7f, 7'h79, 7'h4f, 7'h4c};
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // the example words, one at a time
    foreach (fig[i]) begin
      din = fig[i];
      err_pat = 15'b000100100000000;
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (40) @(negedge clk);
    end
    // back to back: start stays high, the channel takes a word every 15 clocks
    for (int n = 0; n < 400; n++) begin
      din = 7'($urandom);
      err_pat = 15'(rand_err(int'($urandom % 3)));
      start = 1;
      @(negedge clk);
      while (!ready) @(negedge clk);
    end
    @(negedge clk);
    start = 0;
    repeat (50) @(negedge clk);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("FAIL %0d words lost", q.size()); end
    if (b2b_gaps < 390) begin failures++; $display("FAIL only %0d back-to-back outputs", b2b_gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

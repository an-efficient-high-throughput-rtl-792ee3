// tb_bma_kes: self-checking test of the Berlekamp-Massey solver (t = 3).
// All 576 error patterns of weight 0..3 are applied through their syndromes
// S1, S3, S5. The result must equal prod (1 + alpha^p x) over the error
// positions, done must come t+1 = 4 clocks after start, and busy must be high
// for exactly the 3 iteration clocks. Both branches of the discrepancy test
// (d_r = 0 and d_r != 0) must be exercised.
module tb_bma_kes;
  import bch_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  bch_pkg::gf_t [2:0] syn;
  bch_pkg::gf_t [3:0] lambda;
  int checks = 0, failures = 0, zero_d = 0, nonzero_d = 0;

  bma_kes #(.T(3)) dut (.clk, .rst, .start, .syn, .busy, .done, .lambda);

  always #5 clk = ~clk;

  // count discrepancy outcomes seen during iterations
  always @(posedge clk) if (!rst && busy) begin
    if (dut.dr == '0) zero_d++;
    else              nonzero_d++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, lat;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int e = 0; e < 32768; e++) begin
      if (popcount15(e) > 3) continue;
      syn[0] = bch_pkg::gf_t'(ref_syn(e, 1));
      syn[1] = bch_pkg::gf_t'(ref_syn(e, 3));
      syn[2] = bch_pkg::gf_t'(ref_syn(e, 5));
      start = 1;
      @(negedge clk);
      start = 0;
      syn = '0;
      nb = 0;
      lat = 1;
      while (!done && lat < 20) begin
        if (busy) nb++;
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 4 || nb != 3) begin
        failures++;
        $display("FAIL err %h: done after %0d clocks, busy %0d", e, lat, nb);
      end
      for (int j = 0; j <= 3; j++) begin
        checks++;
        if (int'(lambda[j]) != ref_locator_coef(e, j)) begin
          failures++;
          $display("FAIL err %h lambda%0d got %h expected %h", e, j, lambda[j], ref_locator_coef(e, j));
        end
      end
    end
    checks++;
    if (zero_d == 0 || nonzero_d == 0) begin
      failures++;
      $display("FAIL discrepancy branches: zero %0d nonzero %0d", zero_d, nonzero_d);
    end
    $display("discrepancy zero %0d times, non-zero %0d times", zero_d, nonzero_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
